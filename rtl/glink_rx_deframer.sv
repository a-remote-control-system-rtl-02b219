// glink_rx_deframer: assembles the words coming out of a G-LINK receiver into
// messages (a 14-bit control word plus, when the control word calls for them,
// two 16-bit data words, bits 31:16 first).
//
// The receiver outputs are registered once on entry. A control word (rx_cav)
// starts a message; whether data words follow is decided from the control word
// by the instruction rules (IS_RESPONSE = 0, HSC side) or the response rules
// (IS_RESPONSE = 1, CCI side) of rcs_pkg. Data words (rx_dav) fill the data
// field. Words are ignored while link_up is low.
//
// Timing: msg_valid_o is a one-cycle pulse two cycles after the last word of the
// message was on the receiver outputs. A control word that arrives while data
// words are still expected, or a data word that is not expected, drops the
// partial message and pulses frame_err_o; the new control word starts a message.
module glink_rx_deframer
  import rcs_pkg::*;
#(
  parameter bit IS_RESPONSE = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              link_up,
  input  logic [WORD_W-1:0] rx_data,
  input  logic              rx_cav,
  input  logic              rx_dav,
  output msg_t              msg_o,
  output logic              msg_valid_o,
  output logic              frame_err_o
);

  logic [WORD_W-1:0] data_q;
  logic              cav_q, dav_q;

  typedef enum logic [1:0] {S_CTRL, S_HI, S_LO} state_e;
  state_e state;
  msg_t   cur;

  logic want_data;
  assign want_data = IS_RESPONSE ? resp_has_data(data_q[CW_W-1:0])
                                 : instr_has_data(data_q[CW_W-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q <= '0;
      cav_q  <= 1'b0;
      dav_q  <= 1'b0;
    end else begin
      data_q <= rx_data;
      cav_q  <= link_up && rx_cav;
      dav_q  <= link_up && rx_dav && !rx_cav;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_CTRL;
      cur         <= '0;
      msg_o       <= '0;
      msg_valid_o <= 1'b0;
      frame_err_o <= 1'b0;
    end else begin
      msg_valid_o <= 1'b0;
      frame_err_o <= 1'b0;
      if (cav_q) begin
        if (state != S_CTRL) frame_err_o <= 1'b1;
        cur.ctrl     <= data_q[CW_W-1:0];
        cur.has_data <= want_data;
        cur.data     <= '0;
        if (want_data) begin
          state <= S_HI;
        end else begin
          state       <= S_CTRL;
          msg_o       <= '{ctrl: data_q[CW_W-1:0], has_data: 1'b0, data: '0};
          msg_valid_o <= 1'b1;
        end
      end else if (dav_q) begin
        unique case (state)
          S_HI: begin
            cur.data[31:16] <= data_q;
            state           <= S_LO;
          end
          S_LO: begin
            msg_o       <= '{ctrl: cur.ctrl, has_data: 1'b1, data: {cur.data[31:16], data_q}};
            msg_valid_o <= 1'b1;
            state       <= S_CTRL;
          end
          default: frame_err_o <= 1'b1;
        endcase
      end
    end
  end

endmodule
