// tb_hsc_top: self-checking test of the HSC remote controller through its
// G-LINK word ports, with a behavioural memory module / interrupter on the VME
// bus and a behavioural eTBC.
//
// Instructions are sent as G-LINK words and responses decoded from the
// transmitter words. Checked: the response times of the reference table (idle
// 5 clocks, setVMEA 9, configVME read 20 with a slave answering 100 ns after
// DS*, configeTBC 25 with an eTBC answering 300 ns after STRB*), VME writes and
// reads, eTBC write and read-back, N-line selection, resetHSC, and interrupt
// forwarding.
module tb_hsc_top;
  import rcs_pkg::*;
  logic clk = 1'b0;
  always #12.5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic [15:0] rxd, txd; logic rcav, rdav, txcav, txdav, srst, up, ferr;
  logic [7:0] att;
  logic [31:1] a; logic lword_n, as_n, write_n, iack_n, d_oe, dtack_n, berr_n;
  logic [5:0] am; logic [1:0] ds_n; logic [31:0] d_o, d_s; logic [7:1] irq_n;
  logic [2:0] irq_lv; logic irq_set; logic [15:0] irq_st;
  logic [21:1] nl; logic [2:0] ea; logic erw, edoe, estrb, erdy, erst; logic [7:0] edo, edi;

  hsc_top dut (.clk, .rst_n, .rx_data(rxd), .rx_cav(rcav), .rx_dav(rdav), .rx_ready(1'b1),
    .rx_error(1'b0), .rx_sampler_rst(srst), .link_up(up), .link_attempts(att), .frame_err(ferr),
    .tx_data(txd), .tx_cav(txcav), .tx_dav(txdav),
    .vme_a(a), .vme_lword_n(lword_n), .vme_am(am), .vme_as_n(as_n), .vme_ds_n(ds_n),
    .vme_write_n(write_n), .vme_iack_n(iack_n), .vme_d_o(d_o), .vme_d_oe(d_oe), .vme_d_i(d_s),
    .vme_dtack_n(dtack_n), .vme_berr_n(berr_n), .vme_irq_n(irq_n),
    .n_lines(nl), .etbc_a(ea), .etbc_rw(erw), .etbc_d_o(edo), .etbc_d_oe(edoe), .etbc_d_i(edi),
    .etbc_strb_n(estrb), .etbc_rdy_n(erdy), .etbc_rst_n(erst));
  vme_slave_model #(.DTACK_DELAY(4)) slave (.clk, .a, .lword_n, .am, .as_n, .ds_n, .write_n,
    .iack_n, .d_i(d_o), .d_o(d_s), .dtack_n, .berr_n, .irq_n, .irq_level_set(irq_lv),
    .irq_set, .irq_status(irq_st));
  etbc_model #(.RDY_DELAY(12)) etbc (.clk, .a(ea), .rw(erw), .d_i(edo), .d_o(edi),
    .strb_n(estrb), .rdy_n(erdy), .rst_n(erst));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // monitor: cycle count, instruction end mark, response words
  int cyc = 0, t_last = 0, t_resp = 0;
  logic mark;
  msg_t rq[$];
  msg_t cur; int need = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (mark) t_last <= cyc;
    if (txcav) begin
      t_resp <= cyc;
      cur = '{ctrl: txd[13:0], has_data: resp_has_data(txd[13:0]), data: 0};
      need = cur.has_data ? 2 : 0;
      if (need == 0) rq.push_back(cur);
    end else if (txdav && need > 0) begin
      cur.data = {cur.data[15:0], txd};
      need--;
      if (need == 0) rq.push_back(cur);
    end
  end

  task automatic word(input logic [15:0] w, input bit c, input bit last);
    rxd <= w; rcav <= c; rdav <= !c; mark <= last; @(posedge clk);
    rxd <= 0; rcav <= 0; rdav <= 0; mark <= 0;
  endtask

  task automatic instr(input logic [13:0] cw, input logic [31:0] d, output msg_t r, output int trc);
    int n;
    rq.delete();
    if (instr_has_data(cw)) begin
      word({2'b00, cw}, 1, 0); word(d[31:16], 0, 0); word(d[15:0], 0, 1);
    end else begin
      word({2'b00, cw}, 1, 1);
    end
    n = 0;
    while (rq.size() == 0 && n < 400) begin @(posedge clk); n++; end
    @(posedge clk);
    if (rq.size() == 0) begin r = '0; trc = -1; end
    else begin r = rq.pop_front(); trc = t_resp - t_last; end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t r; int trc;
    rst_n = 0; rxd = 0; rcav = 0; rdav = 0; mark = 0; irq_lv = 0; irq_set = 0; irq_st = 0;
    repeat (3) @(posedge clk); rst_n <= 1;
    wait (up); repeat (2) @(posedge clk);

    instr(cw_op(OP_IDLE, 0), 0, r, trc);
    check(r.ctrl == cw_op(OP_IDLE, 0), "idle status");
    check(trc == 5, $sformatf("T_RC idle = %0d clocks", trc));
    instr(cw_op(OP_SET_VME_A, 0), 32'h4000_0040, r, trc);
    check(r.ctrl == cw_op(OP_SET_VME_A, 0), "setVMEA response");
    check(trc == 9, $sformatf("T_RC setVMEA = %0d clocks", trc));
    instr(cw_op(OP_SET_VME_D, 0), 32'h0BAD_F00D, r, trc);
    instr(cw_op(OP_CONFIG_VME, 9'b111), 0, r, trc);
    check(r.ctrl == cw_op(OP_CONFIG_VME, 0) && slave.mem[16] == 32'h0BAD_F00D, "VME write");
    slave.mem[16] = 32'h7654_3210;
    instr(cw_op(OP_CONFIG_VME, 9'b110), 0, r, trc);
    check(r.has_data && r.data == 32'h7654_3210, "VME read data");
    check(trc == 20, $sformatf("T_RC configVME read = %0d clocks", trc));
    // A24 D16 read of the high half
    instr(cw_op(OP_SET_VME_A, 0), 32'h0010_0040, r, trc);
    instr(cw_op(OP_CONFIG_VME, 9'b000), 0, r, trc);
    check(r.has_data && r.data == 32'h0000_7654, "A24 D16 read");
    // eTBC write then read
    instr(14'h2000 | (14'd5 << 8) | 14'h5A, 0, r, trc);
    check(r.ctrl == (14'h2000 | (14'd5 << 8) | 14'h5A) && etbc.regs[5] == 8'h5A, "eTBC write");
    check(trc == 25, $sformatf("T_RC configeTBC = %0d clocks", trc));
    instr(14'h3000 | (14'd5 << 8), 0, r, trc);
    check(r.ctrl == (14'h3000 | (14'd5 << 8) | 14'h5A), "eTBC read back");
    // N-line selection
    instr(cw_op(OP_CONFIG_JTAG, 9'h20 | 9'd7), 0, r, trc);
    check(nl == 21'(1 << 6), "N7 selected");
    instr(cw_op(OP_CONFIG_JTAG, 9'h20 | 9'd1), 0, r, trc);
    check(nl == 21'h1, "N1 (HSC's own scan port) selected");
    instr(cw_op(OP_IDLE, 0), 0, r, trc);
    check(r.ctrl == cw_op(OP_IDLE, 9'h021), "idle reports N-line");
    instr(cw_op(OP_CONFIG_JTAG, 9'h00), 0, r, trc);
    check(nl == '0, "N-lines off");
    // inhibit, then resetHSC clears the SPE
    instr(cw_op(OP_INHIBIT_VME, 1), 0, r, trc);
    instr(cw_op(OP_IDLE, 0), 0, r, trc);
    check(r.ctrl[7], "idle reports inhibit");
    instr(cw_op(OP_RESET_HSC, 9'b11), 0, r, trc);
    check(r.ctrl == cw_op(OP_RESET_HSC, 9'b11), "resetHSC response");
    check(etbc.regs[5] == 8'h00, "eTBC reset");
    instr(cw_op(OP_IDLE, 0), 0, r, trc);
    check(!r.ctrl[7], "SPE reset cleared inhibit");
    // interrupt forwarding
    instr(cw_op(OP_ENABLE_INT, 1), 0, r, trc);
    rq.delete();
    irq_lv <= 3'd2; irq_st <= 16'hBEEF; irq_set <= 1; @(posedge clk); irq_set <= 0;
    repeat (60) @(posedge clk);
    check(rq.size() == 1 && rq[0].ctrl == cw_op(OP_INTERRUPT_VME, 9'h182) &&
          rq[0].data == 32'h0000_BEEF, "interrupt forwarded to CCI");
    check(slave.n_iacks == 1 && irq_n == 7'h7F, "interrupt acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
