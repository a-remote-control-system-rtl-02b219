// cci_top: the CCI (Control/Configuration Interface), the local end of the
// remote control system, a slave module in the local crate.
//
// The local host reaches the HSC only through this module: it writes an
// instruction into the CCI's registers over VME, the CCI sends it over its
// G-LINK transmitter, and the HSC's response comes back through the G-LINK
// receiver into the response registers, where the host polls it. Interrupts
// forwarded by the HSC are re-issued on the local crate's bus by the CCI's own
// interrupter. Inside:
//   cci_vme_slave      VME slave and interrupter
//   cci_regs           instruction, response, control/status and interrupt
//                      registers
//   glink_tx_framer    instruction messages to the transmitter
//   glink_rx_deframer  response messages from the receiver
//   glink_link_init    rebuilds the receive link until it locks
// The G-LINK chips are outside; their parallel pins are ports. One clock, the
// 40 MHz link clock, runs everything.
module cci_top
  import rcs_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR    = 32'h0080_0000,
  parameter int unsigned RETRY_CYCLES = 1024,
  parameter int unsigned LOCK_CYCLES  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // G-LINK receiver (responses)
  input  logic [WORD_W-1:0] rx_data,
  input  logic              rx_cav,
  input  logic              rx_dav,
  input  logic              rx_ready,
  input  logic              rx_error,
  output logic              rx_sampler_rst,
  output logic              link_up,
  // G-LINK transmitter (instructions)
  output logic [WORD_W-1:0] tx_data,
  output logic              tx_cav,
  output logic              tx_dav,
  // VME bus of the local crate
  input  logic [31:1]       vme_a,
  input  logic              vme_lword_n,
  input  logic [5:0]        vme_am,
  input  logic              vme_as_n,
  input  logic [1:0]        vme_ds_n,
  input  logic              vme_write_n,
  input  logic              vme_iack_n,
  input  logic              vme_iackin_n,
  output logic              vme_iackout_n,
  input  logic [31:0]       vme_d_i,
  output logic [31:0]       vme_d_o,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  output logic [7:1]        vme_irq_n
);

  msg_t        tx_msg, rx_msg;
  logic        tx_valid, tx_ready, rx_valid, frame_err;
  logic [7:0]  attempts;
  logic [5:0]  reg_idx;
  logic [1:0]  reg_half;
  logic        reg_wr, reg_rd;
  logic [31:0] reg_wdata, reg_rdata;
  logic        irq_req, irq_ack;
  logic [2:0]  irq_level;
  logic [15:0] irq_status;

  glink_link_init #(.LOCK_CYCLES(LOCK_CYCLES), .RETRY_CYCLES(RETRY_CYCLES)) u_link (
    .clk, .rst_n, .rx_ready, .rx_error, .rx_sampler_rst, .link_up, .attempts_o(attempts));

  glink_rx_deframer #(.IS_RESPONSE(1'b1)) u_rx (
    .clk, .rst_n, .link_up, .rx_data, .rx_cav, .rx_dav,
    .msg_o(rx_msg), .msg_valid_o(rx_valid), .frame_err_o(frame_err));

  glink_tx_framer u_tx (
    .clk, .rst_n, .msg_i(tx_msg), .valid_i(tx_valid), .ready_o(tx_ready),
    .tx_data, .tx_cav, .tx_dav);

  cci_regs u_regs (
    .clk, .rst_n,
    .reg_idx_i(reg_idx), .reg_half_i(reg_half), .reg_wr_i(reg_wr), .reg_rd_i(reg_rd),
    .reg_wdata_i(reg_wdata), .reg_rdata_o(reg_rdata),
    .tx_msg_o(tx_msg), .tx_valid_o(tx_valid), .tx_ready_i(tx_ready),
    .rx_msg_i(rx_msg), .rx_valid_i(rx_valid), .link_up_i(link_up),
    .link_attempts_i(attempts), .frame_err_i(frame_err),
    .irq_req_o(irq_req), .irq_level_o(irq_level), .irq_status_o(irq_status),
    .irq_ack_i(irq_ack));

  cci_vme_slave #(.BASE_ADDR(BASE_ADDR)) u_vme (
    .clk, .rst_n,
    .vme_a, .vme_lword_n, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_iack_n,
    .vme_iackin_n, .vme_iackout_n, .vme_d_i, .vme_d_o, .vme_d_oe, .vme_dtack_n, .vme_irq_n,
    .reg_idx_o(reg_idx), .reg_half_o(reg_half), .reg_wr_o(reg_wr), .reg_rd_o(reg_rd),
    .reg_wdata_o(reg_wdata), .reg_rdata_i(reg_rdata),
    .irq_req_i(irq_req), .irq_level_i(irq_level), .irq_status_i(irq_status),
    .irq_ack_o(irq_ack));

endmodule
