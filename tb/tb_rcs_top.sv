// tb_rcs_top: end-to-end test of the remote control system at its default
// parameters: local host -> CCI -> G-LINK -> HSC -> remote VME/JTAG and back.
//
// The local host is a set of tasks driving the local VME bus; it uses the CCI
// registers as a driver would. Each G-LINK is a behavioural link with 500 ns of
// latency whose receiver needs two sampler resets before it locks; the CCI and
// HSC run on slightly different 40 MHz clocks. The remote crate holds a
// memory module / interrupter model and an eTBC model.
//
// Sequence: power-on link build; idle; A32/D32 and A24/D16 writes and reads; a
// run of random write/read-back cycles; an SEU polling pass that finds a
// corrupted configuration word and rewrites it; a timeout from a dead slave
// followed by JTAG recovery (N-line select, eTBC accesses); a bus error;
// inhibitVME; interrupt forwarding to the local host; resetHSC. The HSC's
// response times are measured at its G-LINK ports and compared with the
// reference table (idle 5, setVMEA 9, configVME read 20, configeTBC 25 clocks).
// Every mechanism is counted and must occur at least once.
module tb_rcs_top;
  import rcs_pkg::*;
  logic clk_cci = 1'b0, clk_hsc = 1'b0;
  always #12.5   clk_cci = ~clk_cci;
  always #12.503 clk_hsc = ~clk_hsc;
  logic rst_cci_n, rst_hsc_n;
  int checks = 0, failures = 0;

  localparam logic [31:0] BASE = 32'h0080_0000;   // default CCI base address
  localparam int N_RW = 1000;                     // random write/read-back cycles in the soak test

  // CCI side
  logic [15:0] c_rxd, c_txd; logic c_rcav, c_rdav, c_rrdy, c_rerr, c_srst, c_up, c_tcav, c_tdav;
  logic [31:1] la; logic llw_n, las_n, lwr_n, liack_n, liackin_n, liackout_n, ld_oe, ldtack_n;
  logic [5:0] lam; logic [1:0] lds_n; logic [31:0] ld_i, ld_o; logic [7:1] lirq_n;
  // HSC side
  logic [15:0] h_rxd, h_txd; logic h_rcav, h_rdav, h_rrdy, h_rerr, h_srst, h_up, h_tcav, h_tdav;
  logic [7:0] h_att; logic h_ferr;
  logic [31:1] ra; logic rlw_n, ras_n, rwr_n, riack_n, rd_oe, rdtack_n, rberr_n;
  logic [5:0] ram; logic [1:0] rds_n; logic [31:0] rd_o, rd_s; logic [7:1] rirq_n;
  logic [21:1] nl; logic [2:0] ea; logic erw, edoe, estrb, erdy, erst; logic [7:0] edo, edi;
  logic [2:0] irq_lv; logic irq_set; logic [15:0] irq_st;

  rcs_top dut (
    .clk_cci, .rst_cci_n, .cci_rx_data(c_rxd), .cci_rx_cav(c_rcav), .cci_rx_dav(c_rdav),
    .cci_rx_ready(c_rrdy), .cci_rx_error(c_rerr), .cci_rx_sampler_rst(c_srst),
    .cci_link_up(c_up), .cci_tx_data(c_txd), .cci_tx_cav(c_tcav), .cci_tx_dav(c_tdav),
    .lvme_a(la), .lvme_lword_n(llw_n), .lvme_am(lam), .lvme_as_n(las_n), .lvme_ds_n(lds_n),
    .lvme_write_n(lwr_n), .lvme_iack_n(liack_n), .lvme_iackin_n(liackin_n),
    .lvme_iackout_n(liackout_n), .lvme_d_i(ld_i), .lvme_d_o(ld_o), .lvme_d_oe(ld_oe),
    .lvme_dtack_n(ldtack_n), .lvme_irq_n(lirq_n),
    .clk_hsc, .rst_hsc_n, .hsc_rx_data(h_rxd), .hsc_rx_cav(h_rcav), .hsc_rx_dav(h_rdav),
    .hsc_rx_ready(h_rrdy), .hsc_rx_error(h_rerr), .hsc_rx_sampler_rst(h_srst),
    .hsc_link_up(h_up), .hsc_link_attempts(h_att), .hsc_frame_err(h_ferr),
    .hsc_tx_data(h_txd), .hsc_tx_cav(h_tcav), .hsc_tx_dav(h_tdav),
    .rvme_a(ra), .rvme_lword_n(rlw_n), .rvme_am(ram), .rvme_as_n(ras_n), .rvme_ds_n(rds_n),
    .rvme_write_n(rwr_n), .rvme_iack_n(riack_n), .rvme_d_o(rd_o), .rvme_d_oe(rd_oe),
    .rvme_d_i(rd_s), .rvme_dtack_n(rdtack_n), .rvme_berr_n(rberr_n), .rvme_irq_n(rirq_n),
    .n_lines(nl), .etbc_a(ea), .etbc_rw(erw), .etbc_d_o(edo), .etbc_d_oe(edoe),
    .etbc_d_i(edi), .etbc_strb_n(estrb), .etbc_rdy_n(erdy), .etbc_rst_n(erst));

  glink_link_model down (.tx_clk(clk_cci), .tx_data(c_txd), .tx_cav(c_tcav), .tx_dav(c_tdav),
    .rx_clk(clk_hsc), .sampler_rst(h_srst), .rx_data(h_rxd), .rx_cav(h_rcav), .rx_dav(h_rdav),
    .rx_ready(h_rrdy), .rx_error(h_rerr));
  glink_link_model up (.tx_clk(clk_hsc), .tx_data(h_txd), .tx_cav(h_tcav), .tx_dav(h_tdav),
    .rx_clk(clk_cci), .sampler_rst(c_srst), .rx_data(c_rxd), .rx_cav(c_rcav), .rx_dav(c_rdav),
    .rx_ready(c_rrdy), .rx_error(c_rerr));
  vme_slave_model #(.DTACK_DELAY(4)) slave (.clk(clk_hsc), .a(ra), .lword_n(rlw_n), .am(ram),
    .as_n(ras_n), .ds_n(rds_n), .write_n(rwr_n), .iack_n(riack_n), .d_i(rd_o), .d_o(rd_s),
    .dtack_n(rdtack_n), .berr_n(rberr_n), .irq_n(rirq_n), .irq_level_set(irq_lv), .irq_set,
    .irq_status(irq_st));
  etbc_model #(.RDY_DELAY(12)) etbc (.clk(clk_hsc), .a(ea), .rw(erw), .d_i(edo), .d_o(edi),
    .strb_n(estrb), .rdy_n(erdy), .rst_n(erst));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_link_retry, n_vme_wr, n_vme_rd, n_d16, n_timeout, n_berr, n_inhibit, n_irq,
      n_jtag_sel, n_etbc, n_reset, n_seu_fix, n_update;

  // ---------------- response time monitor at the HSC G-LINK ports ----------------
  int hcyc = 0, t_last = 0, need_in = 0;
  int trc_q[$];
  logic [13:0] last_cw;
  logic [13:0] trc_cw[$];
  always @(posedge clk_hsc) begin
    hcyc <= hcyc + 1;
    if (h_rcav && h_up) begin
      last_cw = h_rxd[13:0];
      need_in = instr_has_data(last_cw) ? 2 : 0;
      if (need_in == 0) t_last = hcyc;
    end else if (h_rdav && h_up && need_in > 0) begin
      need_in--;
      if (need_in == 0) t_last = hcyc;
    end
    if (h_tcav && !(h_txd[13] == 1'b0 && h_txd[12:9] == OP_INTERRUPT_VME && h_txd[7])) begin
      trc_q.push_back(hcyc - t_last);
      trc_cw.push_back(last_cw);
    end
  end

  // ---------------- local host ----------------
  task automatic lcycle(input bit w, input bit ia, input logic [31:0] ad, input logic [31:0] wd,
                        output logic [31:0] rdv);
    int n = 0;
    la <= ad[31:1]; lam <= 6'h39; llw_n <= ia; lwr_n <= !w; liack_n <= !ia; ld_i <= wd;
    liackin_n <= !ia;
    @(posedge clk_cci); las_n <= 0;
    @(posedge clk_cci); lds_n <= 2'b00;
    while (ldtack_n && n < 50) begin @(posedge clk_cci); n++; end
    if (ldtack_n) begin failures++; $display("FAIL: no DTACK* from the CCI"); end
    rdv = ld_o;
    lds_n <= 2'b11; las_n <= 1; liackin_n <= 1;
    while (!ldtack_n) @(posedge clk_cci);
    liack_n <= 1; lwr_n <= 1;
    @(posedge clk_cci);
  endtask

  // Send one instruction and wait for its response (update bit).
  task automatic host_instr(input logic [13:0] cw, input logic [31:0] d,
                            output logic [13:0] rc, output logic [31:0] rdat);
    logic [31:0] v; int n = 0;
    if (instr_has_data(cw)) lcycle(1, 0, BASE + 32'h08, d, v);
    lcycle(1, 0, BASE + 32'h04, 32'(cw), v);
    do begin lcycle(0, 0, BASE + 32'h0C, 0, v); n++; end while (!v[31] && n < 200);
    if (!v[31]) begin failures++; $display("FAIL: no response to %h", cw); end
    else n_update++;
    rc = v[13:0];
    if (resp_has_data(rc)) lcycle(0, 0, BASE + 32'h10, 0, rdat);
    else rdat = '0;
  endtask

  task automatic vme_write(input logic [31:0] ad, input logic [31:0] d, input logic [8:0] mode,
                           output logic [13:0] rc);
    logic [31:0] x;
    host_instr(cw_op(OP_SET_VME_A, 0), ad, rc, x);
    host_instr(cw_op(OP_SET_VME_D, 0), d, rc, x);
    host_instr(cw_op(OP_CONFIG_VME, mode | 9'b001), 0, rc, x);
  endtask
  task automatic vme_read(input logic [31:0] ad, input logic [8:0] mode,
                          output logic [13:0] rc, output logic [31:0] d);
    host_instr(cw_op(OP_SET_VME_A, 0), ad, rc, d);
    host_instr(cw_op(OP_CONFIG_VME, mode & 9'b110), 0, rc, d);
  endtask

  initial begin
    repeat (2000000) @(posedge clk_cci);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [13:0] rc; logic [31:0] d, v; logic [31:0] cfg [8]; int bad; realtime t0, t1;
    rst_cci_n = 0; rst_hsc_n = 0;
    la = 0; lam = 0; llw_n = 1; las_n = 1; lds_n = 2'b11; lwr_n = 1; liack_n = 1; liackin_n = 1;
    ld_i = 0; irq_lv = 0; irq_set = 0; irq_st = 0;
    {n_link_retry, n_vme_wr, n_vme_rd, n_d16, n_timeout, n_berr, n_inhibit, n_irq, n_jtag_sel,
     n_etbc, n_reset, n_seu_fix, n_update} = '0;
    repeat (4) @(posedge clk_cci); rst_cci_n <= 1; rst_hsc_n <= 1;

    // power-on link build
    wait (c_up && h_up);
    check(h_att == 8'd2 && up.resets == 2 && down.resets == 2, "links built after sampler resets");
    if (h_att > 1) n_link_retry++;

    host_instr(cw_op(OP_IDLE, 0), 0, rc, d);
    check(rc == cw_op(OP_IDLE, 0), "idle status through the system");

    // A32/D32 write and read on the memory module
    vme_write(32'h4000_0020, 32'hC0FF_EE01, 9'b110, rc);
    check(rc == cw_op(OP_CONFIG_VME, 0) && slave.mem[8] == 32'hC0FF_EE01, "A32 D32 write");
    n_vme_wr++;
    vme_read(32'h4000_0020, 9'b110, rc, d);
    check(d == 32'hC0FF_EE01 && rc[RS_HAS_DATA], "A32 D32 read");
    n_vme_rd++;
    // A24/D16, as on an HPT module
    vme_write(32'h0010_0006, 32'h0000_4321, 9'b000, rc);
    vme_read(32'h0010_0006, 9'b000, rc, d);
    check(d == 32'h0000_4321 && slave.mem[1][15:0] == 16'h4321, "A24 D16 write/read");
    n_d16++;

    // long-running write/read-back cycles with random data
    bad = 0;
    t0 = $realtime;
    for (int i = 0; i < N_RW; i++) begin
      v = $urandom;
      vme_write(32'h4000_0030, v, 9'b110, rc);
      vme_read(32'h4000_0030, 9'b110, rc, d);
      if (d != v) bad++;
      n_vme_wr++; n_vme_rd++;
    end
    t1 = $realtime;
    check(bad == 0, "random write/read-back cycles");
    $display("write/read-back cycle: %0.2f us per 32-bit write + read", (t1 - t0) / real'(N_RW) / 1000.0);

    // configuration load, SEU, polling read-back and rewrite
    for (int i = 0; i < 8; i++) begin
      cfg[i] = $urandom;
      vme_write(32'h4000_0080 + 32'(4 * i), cfg[i], 9'b110, rc);
    end
    slave.mem[32 + 5] = slave.mem[32 + 5] ^ 32'h0000_0400;   // upset one bit
    for (int i = 0; i < 8; i++) begin
      vme_read(32'h4000_0080 + 32'(4 * i), 9'b110, rc, d);
      if (d != cfg[i]) begin
        n_seu_fix++;
        vme_write(32'h4000_0080 + 32'(4 * i), cfg[i], 9'b110, rc);
      end
    end
    check(n_seu_fix == 1 && slave.mem[37] == cfg[5], "upset found by polling and rewritten");

    // dead slave: timeout, then JTAG recovery path
    vme_read(32'h0030_0000, 9'b010, rc, d);
    check(rc[RS_TIMEOUT] && !rc[RS_HAS_DATA], "timeout reported to the host");
    n_timeout++;
    host_instr(cw_op(OP_CONFIG_JTAG, 9'h20 | 9'd9), 0, rc, d);
    check(nl == 21'(1 << 8), "N9 selects the failed module's scan port");
    n_jtag_sel++;
    host_instr(14'h2000 | (14'd3 << 8) | 14'h96, 0, rc, d);
    host_instr(14'h3000 | (14'd3 << 8), 0, rc, d);
    check(rc == (14'h3000 | (14'd3 << 8) | 14'h96) && etbc.n_acc == 2, "eTBC write/read");
    n_etbc += 2;
    host_instr(cw_op(OP_CONFIG_JTAG, 9'h00), 0, rc, d);

    // bus error
    vme_read(32'h0020_0000, 9'b000, rc, d);
    check(rc[RS_BERR], "bus error reported");
    n_berr++;

    // inhibitVME
    host_instr(cw_op(OP_INHIBIT_VME, 1), 0, rc, d);
    vme_read(32'h4000_0020, 9'b110, rc, d);
    check(rc[RS_INHIBITED], "access refused while inhibited");
    n_inhibit++;
    host_instr(cw_op(OP_INHIBIT_VME, 0), 0, rc, d);

    // interrupt: HSC and CCI handling enabled by instruction, CCI level 2
    host_instr(cw_op(OP_ENABLE_INT, 1), 0, rc, d);
    lcycle(1, 0, BASE, 32'h0000_0020, v);
    host_instr(cw_op(OP_ENABLE_INT, 9'b11), 0, rc, d);
    check(rc == cw_op(OP_ENABLE_INT, 9'b11), "CCI enableInterrupt answered by the CCI");
    irq_lv <= 3'd6; irq_st <= 16'h6E6E; irq_set <= 1; @(posedge clk_hsc); irq_set <= 0;
    begin
      int n = 0;
      while (lirq_n[2] && n < 2000) begin @(posedge clk_cci); n++; end
    end
    check(!lirq_n[2], "local crate IRQ2 raised");
    lcycle(0, 1, 32'h4, 0, v);
    check(v[15:0] == 16'h6E6E, "status ID from the remote interrupter");
    lcycle(0, 0, BASE + 32'h14, 0, v);
    check(v[18:16] == 3'd6, "remote IRQ level recorded");
    n_irq++;

    // resetHSC
    host_instr(cw_op(OP_INHIBIT_VME, 1), 0, rc, d);
    host_instr(cw_op(OP_RESET_HSC, 9'b11), 0, rc, d);
    check(rc == cw_op(OP_RESET_HSC, 9'b11), "resetHSC answered");
    host_instr(cw_op(OP_IDLE, 0), 0, rc, d);
    check(!rc[7] && !rc[6], "SPE state cleared by reset");
    n_reset++;

    // response times at the HSC
    host_instr(cw_op(OP_IDLE, 0), 0, rc, d);
    check(trc_q[$] == 5, $sformatf("T_RC idle %0d", trc_q[$]));
    host_instr(cw_op(OP_SET_VME_A, 0), 32'h4000_0020, rc, d);
    check(trc_q[$] == 9, $sformatf("T_RC setVMEA %0d", trc_q[$]));
    host_instr(cw_op(OP_CONFIG_VME, 9'b110), 0, rc, d);
    check(trc_q[$] == 20, $sformatf("T_RC configVME read %0d", trc_q[$]));
    host_instr(14'h3000, 0, rc, d);
    check(trc_q[$] == 25, $sformatf("T_RC configeTBC %0d", trc_q[$]));

    check(n_link_retry > 0, "mechanism: link retry");
    check(n_vme_wr > 0 && n_vme_rd > 0, "mechanism: VME write and read");
    check(n_d16 > 0, "mechanism: D16");
    check(n_timeout > 0, "mechanism: timeout");
    check(n_berr > 0, "mechanism: bus error");
    check(n_inhibit > 0, "mechanism: inhibit");
    check(n_irq > 0, "mechanism: interrupt");
    check(n_jtag_sel > 0 && n_etbc > 0, "mechanism: JTAG path");
    check(n_reset > 0, "mechanism: reset");
    check(n_seu_fix > 0, "mechanism: SEU rewrite");
    check(!h_ferr, "no framing errors");
    $display("mechanisms: link_retry=%0d vme_wr=%0d vme_rd=%0d d16=%0d timeout=%0d berr=%0d inhibit=%0d irq=%0d jtag_sel=%0d etbc=%0d reset=%0d seu_fix=%0d responses=%0d",
             n_link_retry, n_vme_wr, n_vme_rd, n_d16, n_timeout, n_berr, n_inhibit, n_irq,
             n_jtag_sel, n_etbc, n_reset, n_seu_fix, n_update);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
