// tb_hsc_ppe: self-checking test of the Primary Protocol Encoder on its own,
// with a behavioural eTBC and a simple SPE stand-in written here.
//
// Checks the PPE instructions (idle status, configJTAG N-line decoding for all
// 21 lines, resetHSC pulse lengths, eTBC write/read and an eTBC timeout),
// forwarding of SPE instructions and return of their responses, the
// arbitration order when the PPE and SPE answer together, and an unknown
// opcode.
module tb_hsc_ppe;
  import rcs_pkg::*;
  logic clk = 1'b0;
  always #12.5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  msg_t instr, txm, si, sr; logic ivalid, txv, txr, siv, sir, srv, srr, srst;
  logic [21:1] nl; logic [2:0] ea; logic erw, edoe, estrb, erdy, erst, erdy_m, stuck;
  logic [7:0] edo, edi; logic inh, ien;

  hsc_ppe #(.RST_CYCLES(4), .ETBC_TIMEOUT(40)) dut (.clk, .rst_n, .instr_i(instr),
    .instr_valid_i(ivalid), .tx_msg_o(txm), .tx_valid_o(txv), .tx_ready_i(txr),
    .spe_instr_o(si), .spe_instr_valid_o(siv), .spe_instr_ready_i(sir),
    .spe_resp_i(sr), .spe_resp_valid_i(srv), .spe_resp_ready_o(srr),
    .spe_inhibit_i(inh), .spe_int_en_i(ien), .spe_rst_o(srst), .n_lines(nl),
    .etbc_a(ea), .etbc_rw(erw), .etbc_d_o(edo), .etbc_d_oe(edoe), .etbc_d_i(edi),
    .etbc_strb_n(estrb), .etbc_rdy_n(erdy), .etbc_rst_n(erst));
  etbc_model #(.RDY_DELAY(3)) etbc (.clk, .a(ea), .rw(erw), .d_i(edo), .d_o(edi),
    .strb_n(estrb), .rdy_n(erdy_m), .rst_n(erst));
  assign erdy = erdy_m | stuck;

  // SPE stand-in: answers each forwarded instruction, after a delay, with its
  // control word plus 1 and the data inverted
  int spe_seen = 0;
  always @(posedge clk) begin
    if (siv && sir) begin
      spe_seen <= spe_seen + 1;
      sr  <= '{ctrl: si.ctrl + 14'd1, has_data: 1'b1, data: ~si.data};
      srv <= 1'b1;
    end else if (srv && srr) srv <= 1'b0;
  end
  assign sir = !srv;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  msg_t got[$];
  always @(posedge clk) if (txv && txr) got.push_back(txm);

  task automatic send(input logic [13:0] cw, input logic [31:0] d);
    instr <= '{ctrl: cw, has_data: instr_has_data(cw), data: d}; ivalid <= 1;
    @(posedge clk); ivalid <= 0;
  endtask
  task automatic wait_resp(output msg_t r);
    int n = 0;
    while (got.size() == 0 && n < 200) begin @(posedge clk); n++; end
    r = (got.size() > 0) ? got.pop_front() : '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t r; int hi;
    rst_n = 0; ivalid = 0; instr = '0; txr = 1; inh = 1; ien = 0; stuck = 0; srv = 0; sr = '0;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    send(cw_op(OP_IDLE, 0), 0); wait_resp(r);
    check(r.ctrl == cw_op(OP_IDLE, 9'h080), "idle status shows inhibit");
    for (int n = 0; n <= 23; n++) begin
      send(cw_op(OP_CONFIG_JTAG, 9'h20 | 9'(n)), 0); wait_resp(r);
      check(nl == ((n >= 1 && n <= 21) ? 21'(1 << (n - 1)) : 21'h0), $sformatf("N-line %0d", n));
    end
    send(cw_op(OP_CONFIG_JTAG, 9'd3), 0); wait_resp(r);
    check(nl == '0, "N-line disabled");
    // resetHSC: SPE reset only
    send(cw_op(OP_RESET_HSC, 9'b01), 0);
    hi = 0;
    repeat (10) begin @(posedge clk); if (srst) hi++; end
    check(hi == 4 && erst, "SPE reset pulse of 4 clocks, eTBC untouched");
    wait_resp(r);
    check(r.ctrl == cw_op(OP_RESET_HSC, 9'b01), "resetHSC response");
    // eTBC
    send(14'h2000 | (14'd2 << 8) | 14'hC3, 0); wait_resp(r);
    check(etbc.regs[2] == 8'hC3 && r.ctrl == (14'h2000 | (14'd2 << 8) | 14'hC3), "eTBC write");
    send(14'h3000 | (14'd2 << 8), 0); wait_resp(r);
    check(r.ctrl == (14'h3000 | (14'd2 << 8) | 14'hC3), "eTBC read");
    stuck = 1;
    send(14'h3000 | (14'd1 << 8), 0); wait_resp(r);
    check(r.ctrl[13] && r.ctrl[11], "eTBC timeout flagged");
    stuck = 0;
    // SPE forwarding
    send(cw_op(OP_SET_VME_A, 0), 32'h1234_5678); wait_resp(r);
    check(spe_seen == 1 && r.ctrl == cw_op(OP_SET_VME_A, 0) + 14'd1 && r.data == ~32'h1234_5678,
          "SPE instruction forwarded and answered");
    send(cw_op(OP_IDLE, 0), 0); wait_resp(r);
    check(spe_seen == 1, "idle not forwarded");
    // both answer: PPE response leaves first
    send(cw_op(OP_INHIBIT_VME, 0), 0); send(cw_op(OP_IDLE, 0), 0);
    repeat (20) @(posedge clk);
    check(got.size() == 2 && got[0].ctrl[12:9] == OP_IDLE, "PPE response first");
    got.delete();
    // back-pressure: nothing is lost while the transmitter is busy
    txr = 0;
    send(cw_op(OP_SET_VME_D, 0), 32'h0); send(cw_op(OP_IDLE, 0), 0);
    repeat (10) @(posedge clk);
    check(got.size() == 0, "held while transmitter busy");
    txr = 1;
    repeat (10) @(posedge clk);
    check(got.size() == 2, "both delivered after back-pressure");
    got.delete();
    send(cw_op(opcode_e'(4'd12), 0), 0); wait_resp(r);
    check(r.ctrl == {1'b0, 4'd12, 9'h0FF}, "unknown opcode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
