// tb_vme_master: self-checking test of the HSC VME controller against a
// behavioural memory module and interrupter.
//
// Covers A32/D32 and A24/D16 writes and reads (data compared with values
// written), the request-to-done latency (DTACK delay + 6 clocks), a bus error, a
// timeout on an address nobody answers, and an interrupt acknowledge cycle.
module tb_vme_master;
  logic clk = 1'b0;
  always #12.5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  localparam int unsigned DLY = 4;

  logic        req, wr, a32, d32, iack, busy, done, tmo, berr;
  logic [2:0]  lvl;
  logic [31:0] addr, wdata, rdata;
  logic [31:1] a; logic lword_n, as_n, write_n, iack_n, d_oe, dtack_n, berr_n;
  logic [5:0]  am; logic [1:0] ds_n; logic [31:0] d_o, d_s;
  logic [7:1]  irq_n;
  logic [2:0]  irq_lv; logic irq_set; logic [15:0] irq_st;

  vme_master #(.TIMEOUT_CYCLES(20)) dut (
    .clk, .rst_n, .req_i(req), .write_i(wr), .a32_i(a32), .d32_i(d32), .iack_i(iack),
    .iack_level_i(lvl), .addr_i(addr), .wdata_i(wdata), .busy_o(busy), .done_o(done),
    .rdata_o(rdata), .timeout_o(tmo), .berr_o(berr),
    .vme_a(a), .vme_lword_n(lword_n), .vme_am(am), .vme_as_n(as_n), .vme_ds_n(ds_n),
    .vme_write_n(write_n), .vme_iack_n(iack_n), .vme_d_o(d_o), .vme_d_oe(d_oe),
    .vme_d_i(d_s), .vme_dtack_n(dtack_n), .vme_berr_n(berr_n));

  vme_slave_model #(.DTACK_DELAY(DLY)) slave (
    .clk, .a, .lword_n, .am, .as_n, .ds_n, .write_n, .iack_n, .d_i(d_o), .d_o(d_s),
    .dtack_n, .berr_n, .irq_n, .irq_level_set(irq_lv), .irq_set, .irq_status(irq_st));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int lat;
  task automatic access(input bit w, input bit is32a, input bit is32d, input bit ia,
                        input logic [31:0] ad, input logic [31:0] wd);
    while (busy) @(posedge clk);
    req <= 1; wr <= w; a32 <= is32a; d32 <= is32d; iack <= ia; addr <= ad; wdata <= wd;
    lvl <= ad[2:0];
    @(posedge clk); req <= 0; lat = 1;
    while (!done) begin @(posedge clk); lat++; end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; req = 0; wr = 0; a32 = 0; d32 = 0; iack = 0; addr = 0; wdata = 0; lvl = 0;
    irq_lv = 0; irq_set = 0; irq_st = 0;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);

    access(1, 1, 1, 0, 32'h4000_0010, 32'hDEAD_BEEF);
    check(!tmo && !berr, "A32 D32 write answered");
    check(slave.mem[4] == 32'hDEAD_BEEF, "A32 D32 write reached memory");
    access(0, 1, 1, 0, 32'h4000_0010, 0);
    check(rdata == 32'hDEAD_BEEF, "A32 D32 read data");
    // done_o rises DLY + 6 clocks after the edge that takes req_i; this loop sees
    // it one edge later
    check(lat == DLY + 7, $sformatf("read latency %0d", lat));
    check(am == 6'h09, "A32 address modifier");
    access(1, 0, 0, 0, 32'h0010_0022, 32'h0000_1234);  // A24 D16, low half of word 8
    access(1, 0, 0, 0, 32'h0010_0020, 32'h0000_ABCD);  // high half
    check(slave.mem[8] == 32'hABCD_1234, "A24 D16 writes");
    access(0, 0, 0, 0, 32'h0010_0022, 0);
    check(rdata == 32'h0000_1234, "A24 D16 read low half");
    check(am == 6'h39, "A24 address modifier");
    access(0, 0, 1, 0, 32'h0010_0020, 0);
    check(rdata == 32'hABCD_1234, "A24 D32 read");
    access(0, 0, 1, 0, 32'h0020_0000, 0);
    check(berr && !tmo, "bus error reported");
    access(0, 0, 1, 0, 32'h0030_0000, 0);
    check(tmo && !berr, "timeout reported");
    // interrupt acknowledge at level 5
    irq_lv <= 3'd5; irq_st <= 16'h00A5; irq_set <= 1; @(posedge clk); irq_set <= 0;
    @(posedge clk);
    check(irq_n == 7'b1101111, "IRQ5 asserted by interrupter");
    access(0, 0, 0, 1, 32'h5, 0);
    check(rdata == 32'h0000_00A5 && !tmo, "IACK status ID");
    repeat (3) @(posedge clk);
    check(irq_n == 7'h7F, "interrupter released on acknowledge");
    repeat (10) @(posedge clk);
    check(!busy, "controller idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
