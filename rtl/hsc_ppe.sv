// hsc_ppe: Primary Protocol Encoder of the HSC, the fundamental block of the
// remote controller.
//
// Every instruction received over the G-LINK passes the PPE. It executes the
// primary instructions itself and sends the others to the SPE:
//   idle        reply with the HSC status (operand: 4:0 selected N-line,
//               5 N-line enabled, 6 interrupts enabled, 7 VME inhibited)
//   resetHSC    operand bit 0 resets the SPE and VME controller, bit 1 the eTBC,
//               for RST_CYCLES cycles
//   configJTAG  operand bit 5 enables and bits 4:0 select one of the N-lines
//               N1..N21 that open the addressable scan port of a module
//               (N1 is the HSC's own port); a disabled or out-of-range select
//               drives no N-line
//   configeTBC  one 8-bit read or write of one of the eight registers (3-bit
//               address) of the embedded test bus controller (eTBC) that
//               masters the JTAG bus
//
// Instruction arbiter: SPE instructions go through a forwarding register to
// the SPE. Responses of the PPE itself and those from the SPE (held in an input
// register) are arbitrated onto the single G-LINK transmitter, PPE first. This
// forwarding and the extra register on the SPE's answer make an SPE
// instruction take four clocks more than a PPE one.
//
// Timing (clock cycles from the last instruction word on the receiver outputs
// to the response control word on the transmitter inputs, with the deframer
// and framer of the HSC): idle 5, SPE instructions without VME cycle 9. An eTBC
// access waits for the chip's RDY*, so its time depends on the eTBC.
//
// eTBC bus: the address, R/W (1 = read) and write data are driven one cycle
// before STRB* falls; STRB* stays low until RDY* (synchronised) is seen, read
// data are latched then, and the access ends when RDY* is released. An eTBC that
// does not answer within ETBC_TIMEOUT cycles gets an error response.
//
// The split of instructions between PPE and SPE, the N-lines and the 8-bit data
// with 3-bit address of the eTBC follow the system description; the encodings,
// the bus handshake and the arbitration order are this design's choices.
module hsc_ppe
  import rcs_pkg::*;
#(
  parameter int unsigned RST_CYCLES   = 4,
  parameter int unsigned ETBC_TIMEOUT = 255
) (
  input  logic              clk,
  input  logic              rst_n,
  // instructions from the receiver deframer
  input  msg_t              instr_i,
  input  logic              instr_valid_i,
  // to the transmitter framer
  output msg_t              tx_msg_o,
  output logic              tx_valid_o,
  input  logic              tx_ready_i,
  // SPE
  output msg_t              spe_instr_o,
  output logic              spe_instr_valid_o,
  input  logic              spe_instr_ready_i,
  input  msg_t              spe_resp_i,
  input  logic              spe_resp_valid_i,
  output logic              spe_resp_ready_o,
  input  logic              spe_inhibit_i,
  input  logic              spe_int_en_i,
  output logic              spe_rst_o,
  // JTAG distribution
  output logic [NLINES:1]   n_lines,
  // eTBC host bus
  output logic [2:0]        etbc_a,
  output logic              etbc_rw,
  output logic [7:0]        etbc_d_o,
  output logic              etbc_d_oe,
  input  logic [7:0]        etbc_d_i,
  output logic              etbc_strb_n,
  input  logic              etbc_rdy_n,
  output logic              etbc_rst_n
);

  typedef enum logic [2:0] {E_IDLE, E_SETUP, E_STRB, E_REL} etbc_state_e;
  etbc_state_e estate;

  msg_t        own_q;      // response of the PPE itself
  logic        own_valid_q;
  msg_t        spe_q;      // SPE response input register
  logic        spe_valid_q;
  logic [4:0]  nsel_q;
  logic        nen_q;
  logic [$clog2(RST_CYCLES+1)-1:0] spe_rst_cnt, etbc_rst_cnt;
  logic [1:0]  rdy_sync;
  logic        rdy;
  logic [$clog2(ETBC_TIMEOUT+1)-1:0] etimer;
  logic        eerr_q;
  logic [CW_W-1:0] ecw_q;
  opcode_e     op;
  logic        arb_load, take_own, take_spe;
  logic [8:0]  operand;

  assign op       = cw_opcode(instr_i.ctrl);
  assign operand  = instr_i.ctrl[8:0];
  assign rdy      = !rdy_sync[1];
  assign spe_rst_o  = (spe_rst_cnt != '0);
  assign etbc_rst_n = (etbc_rst_cnt == '0);
  assign spe_resp_ready_o = !spe_valid_q;
  assign arb_load = !tx_valid_o || tx_ready_i;
  assign take_own = arb_load && own_valid_q;
  assign take_spe = arb_load && !own_valid_q && spe_valid_q;

  always_comb begin
    n_lines = '0;
    if (nen_q && nsel_q >= 5'd1 && nsel_q <= 5'(NLINES)) n_lines[nsel_q] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdy_sync <= 2'b11;
    else        rdy_sync <= {rdy_sync[0], etbc_rdy_n};
  end

  // Instruction decode, PPE execution, forwarding to the SPE
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_q             <= '0;
      own_valid_q       <= 1'b0;
      spe_instr_o       <= '0;
      spe_instr_valid_o <= 1'b0;
      nsel_q            <= '0;
      nen_q             <= 1'b0;
      spe_rst_cnt       <= '0;
      etbc_rst_cnt      <= '0;
      estate            <= E_IDLE;
      etbc_a            <= '0;
      etbc_rw           <= 1'b1;
      etbc_d_o          <= '0;
      etbc_d_oe         <= 1'b0;
      etbc_strb_n       <= 1'b1;
      etimer            <= '0;
      eerr_q            <= 1'b0;
      ecw_q             <= '0;
    end else begin
      if (spe_rst_cnt != '0)  spe_rst_cnt  <= spe_rst_cnt - 1'b1;
      if (etbc_rst_cnt != '0) etbc_rst_cnt <= etbc_rst_cnt - 1'b1;
      if (spe_instr_valid_o && spe_instr_ready_i) spe_instr_valid_o <= 1'b0;
      if (take_own) own_valid_q <= 1'b0;

      if (instr_valid_i) begin
        if (cw_is_etbc(instr_i.ctrl)) begin
          if (estate == E_IDLE && !own_valid_q) begin
            ecw_q     <= instr_i.ctrl;
            etbc_a    <= instr_i.ctrl[10:8];
            etbc_rw   <= instr_i.ctrl[12];
            etbc_d_o  <= instr_i.ctrl[7:0];
            etbc_d_oe <= !instr_i.ctrl[12];
            estate    <= E_SETUP;
          end
        end else if (instr_for_spe(instr_i.ctrl)) begin
          if (!spe_instr_valid_o) begin
            spe_instr_o       <= instr_i;
            spe_instr_valid_o <= 1'b1;
          end
        end else if (!own_valid_q) begin
          own_valid_q <= 1'b1;
          own_q       <= '{ctrl: cw_op(op, 9'h0FF), has_data: 1'b0, data: '0};
          unique case (op)
            OP_IDLE:
              own_q.ctrl <= cw_op(op, {1'b0, spe_inhibit_i, spe_int_en_i, nen_q, nsel_q});
            OP_RESET_HSC: begin
              if (operand[RST_SPE]) begin
                spe_rst_cnt       <= RST_CYCLES[$bits(spe_rst_cnt)-1:0];
                spe_instr_valid_o <= 1'b0;
              end
              if (operand[RST_ETBC]) etbc_rst_cnt <= RST_CYCLES[$bits(etbc_rst_cnt)-1:0];
              own_q.ctrl <= cw_op(op, {7'h00, operand[1:0]});
            end
            OP_CONFIG_JTAG: begin
              nsel_q     <= operand[4:0];
              nen_q      <= operand[5];
              own_q.ctrl <= cw_op(op, {3'b000, operand[5:0]});
            end
            default: ;  // unknown opcode: status 0x0FF
          endcase
        end
      end

      // eTBC bus cycle
      unique case (estate)
        E_IDLE: ;
        E_SETUP: begin
          etbc_strb_n <= 1'b0;
          etimer      <= '0;
          estate      <= E_STRB;
        end
        E_STRB: begin
          etimer <= etimer + 1'b1;
          if (rdy || etimer == ETBC_TIMEOUT[$bits(etimer)-1:0]) begin
            eerr_q      <= !rdy;
            if (rdy && etbc_rw) ecw_q[7:0] <= etbc_d_i;
            etbc_strb_n <= 1'b1;
            estate      <= E_REL;
          end
        end
        E_REL: if (!rdy) begin
          etbc_d_oe   <= 1'b0;
          own_q       <= '{ctrl: {ecw_q[13:12], eerr_q, ecw_q[10:0]}, has_data: 1'b0, data: '0};
          own_valid_q <= 1'b1;
          estate      <= E_IDLE;
        end
        default: estate <= E_IDLE;
      endcase
    end
  end

  // SPE response input register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spe_q       <= '0;
      spe_valid_q <= 1'b0;
    end else begin
      if (take_spe) spe_valid_q <= 1'b0;
      else if (spe_resp_valid_i && !spe_valid_q) begin
        spe_q       <= spe_resp_i;
        spe_valid_q <= 1'b1;
      end
      if (spe_rst_o) spe_valid_q <= 1'b0;
    end
  end

  // Transmit arbiter: the PPE's own response first, then the SPE's. The chosen
  // response moves into the arbiter output register, which the framer empties.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_msg_o   <= '0;
      tx_valid_o <= 1'b0;
    end else if (arb_load) begin
      tx_valid_o <= take_own || take_spe;
      if (take_own)      tx_msg_o <= own_q;
      else if (take_spe) tx_msg_o <= spe_q;
    end
  end

endmodule
