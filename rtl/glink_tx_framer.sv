// glink_tx_framer: sends one message to the parallel side of a G-LINK
// transmitter.
//
// A message is a 14-bit control word, optionally followed by two 16-bit data
// words (bits 31:16 first). The control word is presented with tx_cav (control
// word available) and the data words with tx_dav (data word available); with
// neither flag set the transmitter sends its fill frames. One word leaves per
// clock, so a message takes one or three cycles of the 40 MHz link clock.
//
// Interface: msg_i/valid_i/ready_o is a valid/ready handshake; a message is taken
// in the cycle both are high and its control word appears on the registered
// outputs in the next cycle. ready_o is high whenever no data word is still to go,
// so single-word messages can leave back to back.
//
// The control/data word split and 16-bit mode follow the system's link; the word
// order of the data words is this design's choice.
module glink_tx_framer
  import rcs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  msg_t              msg_i,
  input  logic              valid_i,
  output logic              ready_o,
  output logic [WORD_W-1:0] tx_data,
  output logic              tx_cav,
  output logic              tx_dav
);

  typedef enum logic [1:0] {S_IDLE, S_HI, S_LO} state_e;
  state_e      state;
  logic [15:0] hi_q, lo_q;

  assign ready_o = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      tx_data <= '0;
      tx_cav  <= 1'b0;
      tx_dav  <= 1'b0;
      hi_q    <= '0;
      lo_q    <= '0;
    end else begin
      tx_cav <= 1'b0;
      tx_dav <= 1'b0;
      unique case (state)
        S_IDLE: if (valid_i) begin
          tx_data <= {2'b00, msg_i.ctrl};
          tx_cav  <= 1'b1;
          hi_q    <= msg_i.data[31:16];
          lo_q    <= msg_i.data[15:0];
          if (msg_i.has_data) state <= S_HI;
        end
        S_HI: begin
          state   <= S_LO;
          tx_dav  <= 1'b1;
          tx_data <= hi_q;
        end
        S_LO: begin
          state   <= S_IDLE;
          tx_dav  <= 1'b1;
          tx_data <= lo_q;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
