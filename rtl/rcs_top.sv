// rcs_top: the remote control system for on-detector VME modules.
//
// A local host in the local (off-detector) crate controls the VME slave modules
// of a remote crate in a radiation area. The CCI, a slave in the local crate,
// holds the host's instructions and the returned responses; the HSC, master of
// the remote crate, executes the instructions on the remote VME bus or, through
// an embedded test bus controller and addressable scan ports, on the JTAG bus
// that reloads the modules' programmable logic. CCI and HSC are joined by a
// pair of G-LINK optical links carrying 16-bit words at 40 MHz.
//
// The G-LINK transmitter/receiver chips, optical transceivers and fibres are
// outside this module: each end's parallel G-LINK pins are ports, as are both
// VME buses and the JTAG controls. Each module runs on its own 40 MHz
// oscillator (clk_cci, clk_hsc); on the fibre the G-LINK chips cross between
// them.
module rcs_top
  import rcs_pkg::*;
#(
  parameter logic [31:0] CCI_BASE_ADDR = 32'h0080_0000,
  parameter int unsigned VME_TIMEOUT   = 255,
  parameter int unsigned ETBC_TIMEOUT  = 255,
  parameter int unsigned RETRY_CYCLES  = 1024,
  parameter int unsigned LOCK_CYCLES   = 16
) (
  // ---------------- CCI, local crate ----------------
  input  logic              clk_cci,
  input  logic              rst_cci_n,
  input  logic [WORD_W-1:0] cci_rx_data,
  input  logic              cci_rx_cav,
  input  logic              cci_rx_dav,
  input  logic              cci_rx_ready,
  input  logic              cci_rx_error,
  output logic              cci_rx_sampler_rst,
  output logic              cci_link_up,
  output logic [WORD_W-1:0] cci_tx_data,
  output logic              cci_tx_cav,
  output logic              cci_tx_dav,
  input  logic [31:1]       lvme_a,
  input  logic              lvme_lword_n,
  input  logic [5:0]        lvme_am,
  input  logic              lvme_as_n,
  input  logic [1:0]        lvme_ds_n,
  input  logic              lvme_write_n,
  input  logic              lvme_iack_n,
  input  logic              lvme_iackin_n,
  output logic              lvme_iackout_n,
  input  logic [31:0]       lvme_d_i,
  output logic [31:0]       lvme_d_o,
  output logic              lvme_d_oe,
  output logic              lvme_dtack_n,
  output logic [7:1]        lvme_irq_n,
  // ---------------- HSC, remote crate ----------------
  input  logic              clk_hsc,
  input  logic              rst_hsc_n,
  input  logic [WORD_W-1:0] hsc_rx_data,
  input  logic              hsc_rx_cav,
  input  logic              hsc_rx_dav,
  input  logic              hsc_rx_ready,
  input  logic              hsc_rx_error,
  output logic              hsc_rx_sampler_rst,
  output logic              hsc_link_up,
  output logic [7:0]        hsc_link_attempts,
  output logic              hsc_frame_err,
  output logic [WORD_W-1:0] hsc_tx_data,
  output logic              hsc_tx_cav,
  output logic              hsc_tx_dav,
  output logic [31:1]       rvme_a,
  output logic              rvme_lword_n,
  output logic [5:0]        rvme_am,
  output logic              rvme_as_n,
  output logic [1:0]        rvme_ds_n,
  output logic              rvme_write_n,
  output logic              rvme_iack_n,
  output logic [31:0]       rvme_d_o,
  output logic              rvme_d_oe,
  input  logic [31:0]       rvme_d_i,
  input  logic              rvme_dtack_n,
  input  logic              rvme_berr_n,
  input  logic [7:1]        rvme_irq_n,
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

  cci_top #(
    .BASE_ADDR(CCI_BASE_ADDR), .RETRY_CYCLES(RETRY_CYCLES), .LOCK_CYCLES(LOCK_CYCLES)
  ) u_cci (
    .clk(clk_cci), .rst_n(rst_cci_n),
    .rx_data(cci_rx_data), .rx_cav(cci_rx_cav), .rx_dav(cci_rx_dav),
    .rx_ready(cci_rx_ready), .rx_error(cci_rx_error),
    .rx_sampler_rst(cci_rx_sampler_rst), .link_up(cci_link_up),
    .tx_data(cci_tx_data), .tx_cav(cci_tx_cav), .tx_dav(cci_tx_dav),
    .vme_a(lvme_a), .vme_lword_n(lvme_lword_n), .vme_am(lvme_am), .vme_as_n(lvme_as_n),
    .vme_ds_n(lvme_ds_n), .vme_write_n(lvme_write_n), .vme_iack_n(lvme_iack_n),
    .vme_iackin_n(lvme_iackin_n), .vme_iackout_n(lvme_iackout_n),
    .vme_d_i(lvme_d_i), .vme_d_o(lvme_d_o), .vme_d_oe(lvme_d_oe),
    .vme_dtack_n(lvme_dtack_n), .vme_irq_n(lvme_irq_n));

  hsc_top #(
    .VME_TIMEOUT(VME_TIMEOUT), .ETBC_TIMEOUT(ETBC_TIMEOUT),
    .RETRY_CYCLES(RETRY_CYCLES), .LOCK_CYCLES(LOCK_CYCLES)
  ) u_hsc (
    .clk(clk_hsc), .rst_n(rst_hsc_n),
    .rx_data(hsc_rx_data), .rx_cav(hsc_rx_cav), .rx_dav(hsc_rx_dav),
    .rx_ready(hsc_rx_ready), .rx_error(hsc_rx_error),
    .rx_sampler_rst(hsc_rx_sampler_rst), .link_up(hsc_link_up),
    .link_attempts(hsc_link_attempts), .frame_err(hsc_frame_err),
    .tx_data(hsc_tx_data), .tx_cav(hsc_tx_cav), .tx_dav(hsc_tx_dav),
    .vme_a(rvme_a), .vme_lword_n(rvme_lword_n), .vme_am(rvme_am), .vme_as_n(rvme_as_n),
    .vme_ds_n(rvme_ds_n), .vme_write_n(rvme_write_n), .vme_iack_n(rvme_iack_n),
    .vme_d_o(rvme_d_o), .vme_d_oe(rvme_d_oe), .vme_d_i(rvme_d_i),
    .vme_dtack_n(rvme_dtack_n), .vme_berr_n(rvme_berr_n), .vme_irq_n(rvme_irq_n),
    .n_lines, .etbc_a, .etbc_rw, .etbc_d_o, .etbc_d_oe, .etbc_d_i, .etbc_strb_n,
    .etbc_rdy_n, .etbc_rst_n);

endmodule
