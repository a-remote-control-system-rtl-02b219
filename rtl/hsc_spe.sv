// hsc_spe: Secondary Protocol Encoder of the HSC, the VME side of the remote
// controller.
//
// It executes the VME instructions forwarded by the PPE:
//   setVMEA         load the 32-bit VME address register from the data words
//   setVMED         load the 32-bit VME data register from the data words
//   configVME       run one VME cycle (operand: write, A32, D32); a read returns
//                   the data in the response's data words, a failed cycle
//                   returns the timeout or bus-error status bit
//   enableInterrupt operand bit 0 enables (1) or disables (0) interrupt handling
//   inhibitVME      operand bit 0 forbids (1) or allows (0) VME cycles
//   interruptVME    returns the IRQ lines IRQ7*..IRQ1* seen on the bus
//                   (operand bits 6:0, bit 7 clear)
// Every instruction gets exactly one response, whose control word echoes the
// opcode and carries status bits in its operand.
//
// Interrupts: when handling is enabled, VME access is allowed, no instruction
// is waiting and one of IRQ1*..IRQ7* is low, the SPE runs an interrupt
// acknowledge cycle at the highest active level and sends the status ID to the
// CCI, unprompted, as an interruptVME message (operand bits 2:0 = level, bit 3
// timeout, bit 4 bus error, bit 7 set to mark it unprompted, data words = the
// 16-bit status ID).
//
// Timing: an instruction offered in cycle t is registered at the end of t,
// decoded in t+1 (once the VME controller has finished its last cycle) and
// executed in t+2; a response that needs no VME cycle is offered on
// resp_valid_o from cycle t+3 and held until resp_ready_i.
//
// The instruction names and which of them the SPE handles follow the system's
// instruction set; operand layouts, status bits and the interrupt policy are
// this design's choices.
module hsc_spe
  import rcs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // instructions from the PPE
  input  msg_t        instr_i,
  input  logic        instr_valid_i,
  output logic        instr_ready_o,
  // responses and interrupt messages to the PPE
  output msg_t        resp_o,
  output logic        resp_valid_o,
  input  logic        resp_ready_i,
  // status for the idle report
  output logic        inhibit_o,
  output logic        int_en_o,
  // VME controller
  output logic        vme_req_o,
  output logic        vme_write_o,
  output logic        vme_a32_o,
  output logic        vme_d32_o,
  output logic        vme_iack_o,
  output logic [2:0]  vme_iack_level_o,
  output logic [31:0] vme_addr_o,
  output logic [31:0] vme_wdata_o,
  input  logic        vme_busy_i,
  input  logic        vme_done_i,
  input  logic [31:0] vme_rdata_i,
  input  logic        vme_timeout_i,
  input  logic        vme_berr_i,
  input  logic [7:1]  vme_irq_n
);

  typedef enum logic [2:0] {S_IDLE, S_EXEC, S_VME, S_IACK, S_RESP} state_e;
  state_e state;

  msg_t        in_q;
  logic        in_valid_q;
  logic [31:0] addr_q, data_q;
  logic        inhibit_q, int_en_q;
  logic [1:0]  irq_sync [7:1];
  logic [7:1]  irq_act;
  logic [2:0]  irq_level;
  opcode_e     op;
  logic [8:0]  operand;

  assign inhibit_o     = inhibit_q;
  assign int_en_o      = int_en_q;
  assign instr_ready_o = !in_valid_q;
  assign op            = cw_opcode(in_q.ctrl);
  assign operand       = in_q.ctrl[8:0];
  assign vme_addr_o    = addr_q;
  assign vme_wdata_o   = data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= 7; i++) irq_sync[i] <= 2'b00;
    end else begin
      for (int i = 1; i <= 7; i++) irq_sync[i] <= {irq_sync[i][0], !vme_irq_n[i]};
    end
  end

  always_comb begin
    irq_level = 3'd0;
    for (int i = 1; i <= 7; i++) begin
      irq_act[i] = irq_sync[i][1];
      if (irq_act[i]) irq_level = 3'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      in_q             <= '0;
      in_valid_q       <= 1'b0;
      addr_q           <= '0;
      data_q           <= '0;
      inhibit_q        <= 1'b0;
      int_en_q         <= 1'b0;
      resp_o           <= '0;
      resp_valid_o     <= 1'b0;
      vme_req_o        <= 1'b0;
      vme_write_o      <= 1'b0;
      vme_a32_o        <= 1'b0;
      vme_d32_o        <= 1'b0;
      vme_iack_o       <= 1'b0;
      vme_iack_level_o <= '0;
    end else begin
      vme_req_o <= 1'b0;
      if (instr_valid_i && instr_ready_o) begin
        in_q       <= instr_i;
        in_valid_q <= 1'b1;
      end
      unique case (state)
        S_IDLE: if (!vme_busy_i) begin
          if (in_valid_q) begin
            state <= S_EXEC;
          end else if (int_en_q && !inhibit_q && irq_level != 3'd0) begin
            vme_req_o        <= 1'b1;
            vme_iack_o       <= 1'b1;
            vme_write_o      <= 1'b0;
            vme_d32_o        <= 1'b0;
            vme_iack_level_o <= irq_level;
            state            <= S_IACK;
          end
        end
        S_EXEC: begin
          in_valid_q   <= 1'b0;
          resp_o       <= '{ctrl: cw_op(op, 9'h000), has_data: 1'b0, data: '0};
          state        <= S_RESP;
          resp_valid_o <= 1'b1;
          unique case (op)
            OP_SET_VME_A: addr_q <= in_q.data;
            OP_SET_VME_D: data_q <= in_q.data;
            OP_ENABLE_INT: begin
              int_en_q <= operand[0];
              resp_o.ctrl <= cw_op(op, {8'h00, operand[0]});
            end
            OP_INHIBIT_VME: begin
              inhibit_q <= operand[0];
              resp_o.ctrl <= cw_op(op, {8'h00, operand[0]});
            end
            OP_INTERRUPT_VME: resp_o.ctrl <= cw_op(op, {2'b00, irq_act});
            OP_CONFIG_VME: begin
              if (inhibit_q) begin
                resp_o.ctrl <= cw_op(op, 9'(1 << RS_INHIBITED));
              end else begin
                resp_valid_o <= 1'b0;
                vme_req_o    <= 1'b1;
                vme_iack_o   <= 1'b0;
                vme_write_o  <= operand[CV_WRITE];
                vme_a32_o    <= operand[CV_A32];
                vme_d32_o    <= operand[CV_D32];
                state        <= S_VME;
              end
            end
            default: resp_o.ctrl <= cw_op(op, 9'h0FF);  // not an SPE instruction
          endcase
        end
        S_VME: if (vme_done_i) begin
          resp_o.ctrl     <= cw_op(OP_CONFIG_VME,
                                   {!vme_write_o && !vme_timeout_i && !vme_berr_i, 5'b0,
                                    1'b0, vme_berr_i, vme_timeout_i});
          resp_o.has_data <= !vme_write_o && !vme_timeout_i && !vme_berr_i;
          resp_o.data     <= vme_rdata_i;
          resp_valid_o    <= 1'b1;
          state           <= S_RESP;
        end
        S_IACK: if (vme_done_i) begin
          vme_iack_o   <= 1'b0;
          resp_o       <= '{ctrl: cw_op(OP_INTERRUPT_VME,
                                        {!vme_timeout_i && !vme_berr_i, 1'b1, 2'b0,
                                         vme_berr_i, vme_timeout_i, vme_iack_level_o}),
                            has_data: !vme_timeout_i && !vme_berr_i,
                            data: vme_rdata_i};
          resp_valid_o <= 1'b1;
          state        <= S_RESP;
        end
        S_RESP: if (resp_ready_i) begin
          resp_valid_o <= 1'b0;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
