// tb_cci_vme_slave: self-checking test of the CCI's VME slave and interrupter,
// with a register file written here and a VME host driven by tasks.
//
// Checks A24 and A32 D32 writes and reads, D16 access to each half of a
// register, that other addresses and address modifiers get no answer, the
// DTACK* delay (four clocks after the data strobes), and the interrupter: IRQ*
// at the programmed level, the status ID on acknowledge, release on
// acknowledge, and IACKIN*/IACKOUT* pass-through at another level.
module tb_cci_vme_slave;
  logic clk = 1'b0;
  always #12.5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  localparam logic [31:0] BASE = 32'h0080_0000;
  logic [31:1] a; logic lword_n, as_n, write_n, iack_n, iackin_n, iackout_n, d_oe, dtack_n;
  logic [5:0] am; logic [1:0] ds_n; logic [31:0] d_i, d_o; logic [7:1] irq_n;
  logic [5:0] idx; logic [1:0] half; logic wr, rd; logic [31:0] wdata, rdata;
  logic irq_req, irq_ack; logic [2:0] irq_level; logic [15:0] irq_status;

  cci_vme_slave #(.BASE_ADDR(BASE)) dut (.clk, .rst_n, .vme_a(a), .vme_lword_n(lword_n),
    .vme_am(am), .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_iack_n(iack_n),
    .vme_iackin_n(iackin_n), .vme_iackout_n(iackout_n), .vme_d_i(d_i), .vme_d_o(d_o),
    .vme_d_oe(d_oe), .vme_dtack_n(dtack_n), .vme_irq_n(irq_n), .reg_idx_o(idx),
    .reg_half_o(half), .reg_wr_o(wr), .reg_rd_o(rd), .reg_wdata_o(wdata), .reg_rdata_i(rdata),
    .irq_req_i(irq_req), .irq_level_i(irq_level), .irq_status_i(irq_status), .irq_ack_o(irq_ack));

  logic [31:0] regs [64];
  assign rdata = regs[idx];
  always @(posedge clk) if (wr) begin
    if (half[1]) regs[idx][31:16] <= wdata[31:16];
    if (half[0]) regs[idx][15:0]  <= wdata[15:0];
  end
  always @(posedge clk) if (irq_ack) irq_req <= 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int dly;
  task automatic cycle(input bit w, input logic [5:0] m, input bit d32, input bit ia,
                       input logic [31:0] ad, input logic [31:0] wd,
                       output logic [31:0] rdv, output bit ack);
    int n = 0;
    a <= ad[31:1]; am <= m; lword_n <= !d32; write_n <= !w; iack_n <= !ia; d_i <= wd;
    iackin_n <= !ia;
    @(posedge clk); as_n <= 0;
    @(posedge clk); ds_n <= 2'b00;
    @(posedge clk); dly = 0;   // counts cycles from DS* low to DTACK* low
    while (dtack_n && iackout_n && n < 20) begin @(posedge clk); n++; dly++; end
    ack = !dtack_n; rdv = d_o;
    ds_n <= 2'b11; as_n <= 1; iackin_n <= 1;
    n = 0;
    while ((!dtack_n || !iackout_n) && n < 20) begin @(posedge clk); n++; end
    iack_n <= 1; write_n <= 1;
    @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r; bit ack;
    rst_n = 0; a = 0; am = 0; lword_n = 1; as_n = 1; ds_n = 2'b11; write_n = 1; iack_n = 1;
    iackin_n = 1; d_i = 0; irq_req = 0; irq_level = 0; irq_status = 0;
    for (int i = 0; i < 64; i++) regs[i] = 32'h0;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);

    cycle(1, 6'h39, 1, 0, BASE + 32'h08, 32'hA5A5_0001, r, ack);
    check(ack && regs[2] == 32'hA5A5_0001, "A24 D32 write");
    check(dly == 4, $sformatf("DTACK* %0d clocks after DS*", dly));
    cycle(0, 6'h39, 1, 0, BASE + 32'h08, 0, r, ack);
    check(ack && r == 32'hA5A5_0001, "A24 D32 read");
    cycle(1, 6'h09, 1, 0, BASE + 32'h10, 32'h1111_2222, r, ack);
    check(ack && regs[4] == 32'h1111_2222, "A32 D32 write");
    cycle(1, 6'h39, 0, 0, BASE + 32'h12, 32'h0000_BBBB, r, ack);
    check(ack && regs[4] == 32'h1111_BBBB, "D16 write low half");
    cycle(1, 6'h39, 0, 0, BASE + 32'h10, 32'h0000_AAAA, r, ack);
    check(ack && regs[4] == 32'hAAAA_BBBB, "D16 write high half");
    cycle(0, 6'h3D, 0, 0, BASE + 32'h10, 0, r, ack);
    check(ack && r[15:0] == 16'hAAAA, "D16 read high half");
    cycle(0, 6'h0D, 0, 0, BASE + 32'h12, 0, r, ack);
    check(ack && r[15:0] == 16'hBBBB, "A32 D16 read low half");
    cycle(0, 6'h39, 1, 0, 32'h0090_0000, 0, r, ack);
    check(!ack, "other A24 address ignored");
    cycle(0, 6'h09, 1, 0, 32'h1080_0000, 0, r, ack);
    check(!ack, "A32 address outside window ignored");
    cycle(0, 6'h29, 1, 0, BASE, 0, r, ack);
    check(!ack, "A16 modifier ignored");
    // interrupter
    irq_level <= 3'd4; irq_status <= 16'h00C4; irq_req <= 1; @(posedge clk); @(posedge clk);
    check(irq_n == 7'b1110111, "IRQ4 driven");
    cycle(0, 6'h00, 0, 1, 32'h6 << 0, 0, r, ack);   // acknowledge at level 3
    check(!ack && irq_req, "other level passed on");
    cycle(0, 6'h00, 0, 1, 32'h8, 0, r, ack);         // A3..A1 = 4
    check(ack && r[15:0] == 16'h00C4, "status ID on acknowledge");
    @(posedge clk);
    check(!irq_req && irq_n == 7'h7F, "released on acknowledge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
