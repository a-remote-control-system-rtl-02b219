// hsc_top: the HSC (Hi-pT/Star-Switch Controller), the remote controller that
// sits in the on-detector VME crate.
//
// It receives instructions from the local host over its G-LINK receiver,
// carries them out on the crate's VME bus or JTAG bus, and returns one response
// per instruction over its G-LINK transmitter. Inside:
//   glink_link_init    rebuilds the receive link until it locks
//   glink_rx_deframer  turns receiver words into instruction messages
//   hsc_ppe            Primary Protocol Encoder: idle, resetHSC, configJTAG,
//                      configeTBC, instruction and response arbitration
//   hsc_spe            Secondary Protocol Encoder: the VME instructions and
//                      interrupt forwarding
//   vme_master         the VME bus controller
//   glink_tx_framer    sends response messages to the transmitter
// The PPE is kept apart from the SPE so that, should the SPE or the VME
// controller fail, the PPE can still reset them and reach the JTAG bus through
// the eTBC and the N-lines to reload their programmable logic. resetHSC holds
// the SPE and the VME controller in reset.
//
// The G-LINK transmitter and receiver, the eTBC and the addressable scan ports
// are separate chips: their pins are ports of this module. All logic runs on
// the 40 MHz link clock. Response times, from the last instruction word at the
// receiver to the response control word at the transmitter: idle 5 cycles,
// setVMEA 9, configVME 9 plus the VME cycle, configeTBC 5 plus the eTBC access.
module hsc_top
  import rcs_pkg::*;
#(
  parameter int unsigned VME_TIMEOUT  = 255,
  parameter int unsigned ETBC_TIMEOUT = 255,
  parameter int unsigned RETRY_CYCLES = 1024,
  parameter int unsigned LOCK_CYCLES  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // G-LINK receiver (instructions)
  input  logic [WORD_W-1:0] rx_data,
  input  logic              rx_cav,
  input  logic              rx_dav,
  input  logic              rx_ready,
  input  logic              rx_error,
  output logic              rx_sampler_rst,
  output logic              link_up,
  output logic [7:0]        link_attempts,
  output logic              frame_err,
  // G-LINK transmitter (responses)
  output logic [WORD_W-1:0] tx_data,
  output logic              tx_cav,
  output logic              tx_dav,
  // VME bus of the remote crate
  output logic [31:1]       vme_a,
  output logic              vme_lword_n,
  output logic [5:0]        vme_am,
  output logic              vme_as_n,
  output logic [1:0]        vme_ds_n,
  output logic              vme_write_n,
  output logic              vme_iack_n,
  output logic [31:0]       vme_d_o,
  output logic              vme_d_oe,
  input  logic [31:0]       vme_d_i,
  input  logic              vme_dtack_n,
  input  logic              vme_berr_n,
  input  logic [7:1]        vme_irq_n,
  // JTAG: N-lines to the addressable scan ports, eTBC host bus
  output logic [NLINES:1]   n_lines,
  output logic [2:0]        etbc_a,
  output logic              etbc_rw,
  output logic [7:0]        etbc_d_o,
  output logic              etbc_d_oe,
  input  logic [7:0]        etbc_d_i,
  output logic              etbc_strb_n,
  input  logic              etbc_rdy_n,
  output logic              etbc_rst_n
);

  msg_t instr, tx_msg, spe_instr, spe_resp;
  logic instr_valid, tx_valid, tx_ready;
  logic spe_instr_valid, spe_instr_ready, spe_resp_valid, spe_resp_ready;
  logic spe_inhibit, spe_int_en, spe_rst, spe_rst_n;

  logic        vreq, vwrite, va32, vd32, viack, vbusy, vdone, vtimeout, vberr;
  logic [2:0]  vlevel;
  logic [31:0] vaddr, vwdata, vrdata;

  assign spe_rst_n = rst_n && !spe_rst;

  glink_link_init #(.LOCK_CYCLES(LOCK_CYCLES), .RETRY_CYCLES(RETRY_CYCLES)) u_link (
    .clk, .rst_n, .rx_ready, .rx_error, .rx_sampler_rst, .link_up, .attempts_o(link_attempts));

  glink_rx_deframer #(.IS_RESPONSE(1'b0)) u_rx (
    .clk, .rst_n, .link_up, .rx_data, .rx_cav, .rx_dav,
    .msg_o(instr), .msg_valid_o(instr_valid), .frame_err_o(frame_err));

  hsc_ppe #(.ETBC_TIMEOUT(ETBC_TIMEOUT)) u_ppe (
    .clk, .rst_n,
    .instr_i(instr), .instr_valid_i(instr_valid),
    .tx_msg_o(tx_msg), .tx_valid_o(tx_valid), .tx_ready_i(tx_ready),
    .spe_instr_o(spe_instr), .spe_instr_valid_o(spe_instr_valid),
    .spe_instr_ready_i(spe_instr_ready),
    .spe_resp_i(spe_resp), .spe_resp_valid_i(spe_resp_valid),
    .spe_resp_ready_o(spe_resp_ready),
    .spe_inhibit_i(spe_inhibit), .spe_int_en_i(spe_int_en), .spe_rst_o(spe_rst),
    .n_lines,
    .etbc_a, .etbc_rw, .etbc_d_o, .etbc_d_oe, .etbc_d_i, .etbc_strb_n, .etbc_rdy_n,
    .etbc_rst_n);

  hsc_spe u_spe (
    .clk, .rst_n(spe_rst_n),
    .instr_i(spe_instr), .instr_valid_i(spe_instr_valid), .instr_ready_o(spe_instr_ready),
    .resp_o(spe_resp), .resp_valid_o(spe_resp_valid), .resp_ready_i(spe_resp_ready),
    .inhibit_o(spe_inhibit), .int_en_o(spe_int_en),
    .vme_req_o(vreq), .vme_write_o(vwrite), .vme_a32_o(va32), .vme_d32_o(vd32),
    .vme_iack_o(viack), .vme_iack_level_o(vlevel), .vme_addr_o(vaddr),
    .vme_wdata_o(vwdata), .vme_busy_i(vbusy), .vme_done_i(vdone), .vme_rdata_i(vrdata),
    .vme_timeout_i(vtimeout), .vme_berr_i(vberr), .vme_irq_n);

  vme_master #(.TIMEOUT_CYCLES(VME_TIMEOUT)) u_vme (
    .clk, .rst_n(spe_rst_n),
    .req_i(vreq), .write_i(vwrite), .a32_i(va32), .d32_i(vd32), .iack_i(viack),
    .iack_level_i(vlevel), .addr_i(vaddr), .wdata_i(vwdata), .busy_o(vbusy),
    .done_o(vdone), .rdata_o(vrdata), .timeout_o(vtimeout), .berr_o(vberr),
    .vme_a, .vme_lword_n, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_iack_n,
    .vme_d_o, .vme_d_oe, .vme_d_i, .vme_dtack_n, .vme_berr_n);

  // The SPE starts a VME cycle only when the controller is idle.
  a_vme_req_idle: assert property (@(posedge clk) disable iff (!spe_rst_n) vreq |-> !vbusy);

  glink_tx_framer u_tx (
    .clk, .rst_n, .msg_i(tx_msg), .valid_i(tx_valid), .ready_o(tx_ready),
    .tx_data, .tx_cav, .tx_dav);

endmodule
