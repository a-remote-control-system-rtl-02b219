// glink_link_init: builds the G-LINK at power-on and keeps it built.
//
// Because the transmitter and receiver of a link run from clocks that differ
// slightly in timing, the receiver's input sampler does not always lock. This
// block pulses the sampler reset (rx_sampler_rst) and then watches the receiver:
// once rx_ready has been high with no rx_error for LOCK_CYCLES cycles the link
// is declared up (link_up). If that does not happen within RETRY_CYCLES after a
// reset, the sampler is reset again, and so on until the link builds. A link
// that later drops (rx_ready low or rx_error) is rebuilt the same way.
// attempts_o counts sampler resets (saturating).
//
// Retrying until the link builds, on both ends, follows the system description;
// the lock criterion, the pulse width and the cycle counts are this design's
// choices.
module glink_link_init #(
  parameter int unsigned RST_CYCLES   = 4,
  parameter int unsigned LOCK_CYCLES  = 16,
  parameter int unsigned RETRY_CYCLES = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_ready,
  input  logic       rx_error,
  output logic       rx_sampler_rst,
  output logic       link_up,
  output logic [7:0] attempts_o
);

  typedef enum logic [1:0] {S_RESET, S_WAIT, S_UP} state_e;
  state_e state;
  logic [$clog2(RETRY_CYCLES+1)-1:0] timer;
  logic [$clog2(LOCK_CYCLES+1)-1:0]  good;

  assign rx_sampler_rst = (state == S_RESET);
  assign link_up        = (state == S_UP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_RESET;
      timer      <= '0;
      good       <= '0;
      attempts_o <= 8'd1;
    end else begin
      unique case (state)
        S_RESET: begin
          good <= '0;
          if (timer == RST_CYCLES - 1) begin
            timer <= '0;
            state <= S_WAIT;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        S_WAIT: begin
          timer <= timer + 1'b1;
          if (rx_ready && !rx_error) good <= good + 1'b1;
          else                       good <= '0;
          if (rx_ready && !rx_error && good == LOCK_CYCLES - 1) begin
            state <= S_UP;
          end else if (timer == RETRY_CYCLES - 1) begin
            timer <= '0;
            state <= S_RESET;
            if (attempts_o != 8'hFF) attempts_o <= attempts_o + 1'b1;
          end
        end
        S_UP: if (!rx_ready || rx_error) begin
          timer <= '0;
          state <= S_RESET;
          if (attempts_o != 8'hFF) attempts_o <= attempts_o + 1'b1;
        end
        default: state <= S_RESET;
      endcase
    end
  end

endmodule
