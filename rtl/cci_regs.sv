// cci_regs: the registers of the CCI (Control/Configuration Interface), the
// local end of the remote control system.
//
// The local host writes an instruction into the instruction registers; the
// write of the control word sends it to the HSC over the G-LINK (with the data
// register as its two data words for setVMEA and setVMED). The HSC's response
// lands in the response registers, whose update bit is cleared when an
// instruction is sent and set when its response arrives, so the host can tell
// a fresh response from a stale one. An unprompted interruptVME message from
// the HSC (operand bit 7 set) is stored in the interrupt register instead and,
// when enabled, raises the CCI's own interrupt at the level set in the CSR with
// the HSC's status ID; the acknowledge clears it.
//
// Interrupt handling is switched independently at both ends with the
// enableInterrupt instruction: operand bit 1 clear sends it to the HSC, bit 1
// set switches the CCI's own handling to operand bit 0. The CCI answers the
// latter itself, in the cycle after the write, with a response that echoes
// the operand (bits 1:0) and sets the update bit; nothing goes over the link.
// CSR bit 0 is the same enable and can also be written directly.
//
// Register map (32-bit words, byte offset in the VME window):
//   0x00 CSR        [0] interrupt enable (rw)  [1] busy: response pending (ro)
//                   [2] link up (ro)  [3] interrupt pending (ro; write 1 to clear)
//                   [6:4] CCI IRQ level (rw)
//   0x04 INSTR_CTRL [13:0] control word; a write of bits 15:0 sends it
//   0x08 INSTR_DATA [31:0] data words of setVMEA/setVMED
//   0x0C RESP_CTRL  [13:0] response control word  [31] update bit (ro)
//   0x10 RESP_DATA  [31:0] response data words (ro)
//   0x14 INT_INFO   [15:0] status ID  [18:16] HSC IRQ level  [31] valid (ro;
//                   cleared by a read of the register)
//   0x18 LINK       [7:0] receive link build attempts  [15:8] framing errors
//                   (saturating) (ro)
//
// Timing: the instruction message is offered to the framer in the cycle after
// the register write; response fields update in the cycle after the deframer's
// message pulse. The register set (instruction, response, control/status,
// interrupt) follows the system description; the map and bit layout are this
// design's choices.
module cci_regs
  import rcs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // register bus from the VME slave
  input  logic [5:0]  reg_idx_i,
  input  logic [1:0]  reg_half_i,
  input  logic        reg_wr_i,
  input  logic        reg_rd_i,
  input  logic [31:0] reg_wdata_i,
  output logic [31:0] reg_rdata_o,
  // messages to and from the G-LINK
  output msg_t        tx_msg_o,
  output logic        tx_valid_o,
  input  logic        tx_ready_i,
  input  msg_t        rx_msg_i,
  input  logic        rx_valid_i,
  input  logic        link_up_i,
  input  logic [7:0]  link_attempts_i,
  input  logic        frame_err_i,
  // interrupter
  output logic        irq_req_o,
  output logic [2:0]  irq_level_o,
  output logic [15:0] irq_status_o,
  input  logic        irq_ack_i
);

  logic            int_en_q, busy_q, update_q, int_valid_q;
  logic [2:0]      level_q, hsc_level_q;
  logic [CW_W-1:0] instr_ctrl_q, resp_ctrl_q;
  logic [31:0]     instr_data_q, resp_data_q;
  logic [15:0]     int_status_q;
  logic [31:0]     wmask;
  logic            unprompted, cci_int_instr;
  logic [7:0]      frame_errs_q;

  assign wmask        = {{16{reg_half_i[1]}}, {16{reg_half_i[0]}}};
  assign irq_level_o  = level_q;
  assign irq_status_o = int_status_q;
  assign unprompted   = !cw_is_etbc(rx_msg_i.ctrl) &&
                        cw_opcode(rx_msg_i.ctrl) == OP_INTERRUPT_VME && rx_msg_i.ctrl[7];
  // enableInterrupt with operand bit 1 set addresses the CCI's own interrupter
  assign cci_int_instr = !cw_is_etbc(reg_wdata_i[CW_W-1:0]) &&
                         cw_opcode(reg_wdata_i[CW_W-1:0]) == OP_ENABLE_INT && reg_wdata_i[1];

  always_comb begin
    unique case (reg_idx_i)
      6'd0:    reg_rdata_o = {25'h0, level_q, irq_req_o, link_up_i, busy_q, int_en_q};
      6'd1:    reg_rdata_o = {18'h0, instr_ctrl_q};
      6'd2:    reg_rdata_o = instr_data_q;
      6'd3:    reg_rdata_o = {update_q, 17'h0, resp_ctrl_q};
      6'd4:    reg_rdata_o = resp_data_q;
      6'd5:    reg_rdata_o = {int_valid_q, 12'h0, hsc_level_q, int_status_q};
      6'd6:    reg_rdata_o = {16'h0, frame_errs_q, link_attempts_i};
      default: reg_rdata_o = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_en_q     <= 1'b0;
      busy_q       <= 1'b0;
      update_q     <= 1'b0;
      int_valid_q  <= 1'b0;
      irq_req_o    <= 1'b0;
      level_q      <= 3'd1;
      hsc_level_q  <= '0;
      instr_ctrl_q <= '0;
      instr_data_q <= '0;
      resp_ctrl_q  <= '0;
      resp_data_q  <= '0;
      int_status_q <= '0;
      tx_msg_o     <= '0;
      tx_valid_o   <= 1'b0;
      frame_errs_q <= '0;
    end else begin
      if (frame_err_i && frame_errs_q != 8'hFF) frame_errs_q <= frame_errs_q + 1'b1;
      if (tx_valid_o && tx_ready_i) tx_valid_o <= 1'b0;
      if (irq_ack_i) irq_req_o <= 1'b0;
      if (reg_rd_i && reg_idx_i == 6'd5) int_valid_q <= 1'b0;

      if (reg_wr_i) begin
        unique case (reg_idx_i)
          6'd0: begin
            int_en_q <= (int_en_q & ~wmask[0]) | (reg_wdata_i[0] & wmask[0]);
            if (wmask[0]) level_q <= reg_wdata_i[6:4];
            if (wmask[0] && reg_wdata_i[3]) irq_req_o <= 1'b0;
          end
          6'd1: begin
            instr_ctrl_q <= (instr_ctrl_q & ~wmask[CW_W-1:0]) | (reg_wdata_i[CW_W-1:0] & wmask[CW_W-1:0]);
            if (wmask[0] && cci_int_instr) begin
              // enableInterrupt for the CCI itself: answered here, not sent
              int_en_q    <= reg_wdata_i[0];
              resp_ctrl_q <= cw_op(OP_ENABLE_INT, {7'h00, 1'b1, reg_wdata_i[0]});
              resp_data_q <= '0;
              busy_q      <= 1'b0;
              update_q    <= 1'b1;
            end else if (wmask[0]) begin
              tx_msg_o   <= '{ctrl: reg_wdata_i[CW_W-1:0],
                              has_data: instr_has_data(reg_wdata_i[CW_W-1:0]),
                              data: instr_data_q};
              tx_valid_o <= 1'b1;
              busy_q     <= 1'b1;
              update_q   <= 1'b0;
            end
          end
          6'd2: instr_data_q <= (instr_data_q & ~wmask) | (reg_wdata_i & wmask);
          default: ;
        endcase
      end

      if (rx_valid_i) begin
        if (unprompted) begin
          int_status_q <= rx_msg_i.data[15:0];
          hsc_level_q  <= rx_msg_i.ctrl[2:0];
          int_valid_q  <= 1'b1;
          if (int_en_q && rx_msg_i.has_data) irq_req_o <= 1'b1;
        end else begin
          resp_ctrl_q <= rx_msg_i.ctrl;
          resp_data_q <= rx_msg_i.data;
          update_q    <= 1'b1;
          busy_q      <= 1'b0;
        end
      end
    end
  end

endmodule
