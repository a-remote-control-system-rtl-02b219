// glink_link_model: behavioural model of one G-LINK optical link (transmitter
// chip, fibre, receiver chip), for simulation only.
//
// Words presented with CAV or DAV on the transmitter side are delivered on the
// receiver side LAT_NS later, one per receiver clock, in order; idle
// transmitter cycles become receiver cycles with neither flag. The receiver
// reports rx_ready only after its input sampler has been reset NEED_RESETS
// times (the sampler reset is taken from the link builder of the receiving
// module); words sent while it is not ready are lost.
module glink_link_model #(
  parameter real         LAT_NS      = 500.0,
  parameter int unsigned NEED_RESETS = 2
) (
  input  logic        tx_clk,
  input  logic [15:0] tx_data,
  input  logic        tx_cav,
  input  logic        tx_dav,
  input  logic        rx_clk,
  input  logic        sampler_rst,
  output logic [15:0] rx_data,
  output logic        rx_cav,
  output logic        rx_dav,
  output logic        rx_ready,
  output logic        rx_error
);
  typedef struct { logic [15:0] w; logic c; realtime t; } item_t;
  item_t q[$];
  int unsigned resets = 0;
  int unsigned n_words = 0;
  logic rst_q = 1'b0;

  initial begin rx_data = 0; rx_cav = 0; rx_dav = 0; rx_error = 0; end
  assign rx_ready = (resets >= NEED_RESETS) && !sampler_rst;

  always @(posedge tx_clk)
    if (tx_cav || tx_dav) q.push_back('{w: tx_data, c: tx_cav, t: $realtime});

  item_t it;
  always @(posedge rx_clk) begin
    rst_q <= sampler_rst;
    if (sampler_rst && !rst_q) resets <= resets + 1;
    rx_cav <= 0; rx_dav <= 0; rx_data <= 0;
    if (q.size() > 0 && $realtime - q[0].t >= LAT_NS) begin
      it = q.pop_front();
      if (rx_ready) begin
        rx_data <= it.w; rx_cav <= it.c; rx_dav <= !it.c;
        n_words <= n_words + 1;
      end
    end
  end
endmodule
