// tb_cci_top: self-checking test of the CCI module through its VME slave port
// and G-LINK word ports, with an HSC stand-in written here.
//
// The local host (tasks driving the VME bus) writes instructions; the HSC
// stand-in decodes the G-LINK words and answers setVMEA with an echo, configVME
// with a read response whose data is the address it was given plus one, and
// sends an unprompted interrupt, which the CCI must re-issue on its IRQ* line
// with the forwarded status ID. Also checks the link build at power-on with a
// receiver that needs two sampler resets.
module tb_cci_top;
  import rcs_pkg::*;
  logic clk = 1'b0;
  always #12.5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  localparam logic [31:0] BASE = 32'h0080_0000;
  logic [15:0] rxd, txd; logic rcav, rdav, rready, srst, up, txcav, txdav;
  logic [31:1] a; logic lword_n, as_n, write_n, iack_n, iackin_n, iackout_n, d_oe, dtack_n;
  logic [5:0] am; logic [1:0] ds_n; logic [31:0] d_i, d_o; logic [7:1] irq_n;

  cci_top #(.BASE_ADDR(BASE), .RETRY_CYCLES(64), .LOCK_CYCLES(8)) dut (.clk, .rst_n,
    .rx_data(rxd), .rx_cav(rcav), .rx_dav(rdav), .rx_ready(rready), .rx_error(1'b0),
    .rx_sampler_rst(srst), .link_up(up), .tx_data(txd), .tx_cav(txcav), .tx_dav(txdav),
    .vme_a(a), .vme_lword_n(lword_n), .vme_am(am), .vme_as_n(as_n), .vme_ds_n(ds_n),
    .vme_write_n(write_n), .vme_iack_n(iack_n), .vme_iackin_n(iackin_n),
    .vme_iackout_n(iackout_n), .vme_d_i(d_i), .vme_d_o(d_o), .vme_d_oe(d_oe),
    .vme_dtack_n(dtack_n), .vme_irq_n(irq_n));

  // receiver model: locks after the second sampler reset
  int nrst = 0; logic srst_q = 0;
  always @(posedge clk) begin srst_q <= srst; if (srst && !srst_q) nrst <= nrst + 1; end
  assign rready = nrst >= 2 && !srst;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // HSC stand-in
  logic [31:0] hsc_addr = 0; int need = 0; logic [13:0] cw_in; logic [31:0] din;
  logic [15:0] outq[$]; logic outc[$];
  always @(posedge clk) begin
    if (txcav) begin
      cw_in = txd[13:0]; din = 0;
      need = instr_has_data(cw_in) ? 2 : 0;
    end else if (txdav && need > 0) begin
      din = {din[15:0], txd}; need--;
    end
    if ((txcav || txdav) && need == 0) begin
      if (cw_opcode(cw_in) == OP_SET_VME_A) begin
        hsc_addr = din;
        outq.push_back({2'b00, cw_op(OP_SET_VME_A, 0)}); outc.push_back(1);
      end else if (cw_opcode(cw_in) == OP_CONFIG_VME) begin
        outq.push_back({2'b00, cw_op(OP_CONFIG_VME, 9'h100)}); outc.push_back(1);
        outq.push_back(16'((hsc_addr + 1) >> 16)); outc.push_back(0);
        outq.push_back(16'(hsc_addr + 1)); outc.push_back(0);
      end
    end
    if (outq.size() > 0) begin
      rxd <= outq.pop_front(); rcav <= outc[0]; rdav <= !outc[0]; void'(outc.pop_front());
    end else begin
      rxd <= 0; rcav <= 0; rdav <= 0;
    end
  end

  task automatic cycle(input bit w, input bit ia, input logic [31:0] ad, input logic [31:0] wd,
                       output logic [31:0] rdv);
    int n = 0;
    a <= ad[31:1]; am <= 6'h39; lword_n <= ia; write_n <= !w; iack_n <= !ia; d_i <= wd;
    iackin_n <= !ia;
    @(posedge clk); as_n <= 0;
    @(posedge clk); ds_n <= 2'b00;
    while (dtack_n && n < 30) begin @(posedge clk); n++; end
    if (dtack_n) begin failures++; $display("FAIL: no DTACK*"); end
    rdv = d_o;
    ds_n <= 2'b11; as_n <= 1; iackin_n <= 1;
    while (!dtack_n) @(posedge clk);
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
    logic [31:0] v; int n;
    rst_n = 0; a = 0; am = 0; lword_n = 1; as_n = 1; ds_n = 2'b11; write_n = 1; iack_n = 1;
    iackin_n = 1; d_i = 0; rxd = 0; rcav = 0; rdav = 0;
    repeat (3) @(posedge clk); rst_n <= 1;
    n = 0;
    while (!up && n < 1000) begin @(posedge clk); n++; end
    check(up && nrst == 2, "link built after two sampler resets");
    cycle(0, 0, BASE + 32'h18, 0, v);
    check(v[7:0] == 8'd2, "link attempts register");

    cycle(1, 0, BASE + 32'h08, 32'h4000_0100, v);
    cycle(1, 0, BASE + 32'h04, 32'(cw_op(OP_SET_VME_A, 0)), v);
    n = 0;
    do begin cycle(0, 0, BASE + 32'h0C, 0, v); n++; end while (!v[31] && n < 50);
    check(v[31] && v[13:0] == cw_op(OP_SET_VME_A, 0), "setVMEA round trip");
    check(hsc_addr == 32'h4000_0100, "data words reached the link");
    cycle(1, 0, BASE + 32'h04, 32'(cw_op(OP_CONFIG_VME, 9'b110)), v);
    n = 0;
    do begin cycle(0, 0, BASE + 32'h0C, 0, v); n++; end while (!v[31] && n < 50);
    cycle(0, 0, BASE + 32'h10, 0, v);
    check(v == 32'h4000_0101, "configVME read data in response register");

    // unprompted interrupt from the HSC, CCI interrupts enabled at level 3
    cycle(1, 0, BASE + 32'h00, 32'h0000_0031, v);
    outq.push_back({2'b00, cw_op(OP_INTERRUPT_VME, 9'h187)}); outc.push_back(1);
    outq.push_back(16'h0000); outc.push_back(0);
    outq.push_back(16'h5A5A); outc.push_back(0);
    repeat (10) @(posedge clk);
    check(irq_n == 7'b1111011, "CCI drives IRQ3");
    cycle(0, 1, 32'h6, 0, v);
    check(v[15:0] == 16'h5A5A, "status ID passed to the local host");
    repeat (2) @(posedge clk);
    check(irq_n == 7'h7F, "IRQ3 released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
