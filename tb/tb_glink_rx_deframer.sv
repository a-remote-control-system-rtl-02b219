// tb_glink_rx_deframer: self-checking test of the G-LINK message deframer on
// the HSC (instruction) and CCI (response) rules.
//
// Random messages are sent word by word with random fill gaps; each assembled
// message is compared with what was sent, and its valid pulse must come two
// clocks after the last word. A truncated message must raise a framing error,
// and words sent while the link is down must be ignored.
module tb_glink_rx_deframer;
  import rcs_pkg::*;
  logic clk = 1'b0;
  always #12.5 clk = ~clk;
  logic rst_n, link_up;
  int checks = 0, failures = 0;

  logic [15:0] rxd; logic cav, dav;
  msg_t mi, mr; logic vi, vr, ei, er;
  glink_rx_deframer #(.IS_RESPONSE(1'b0)) dut_i (.clk, .rst_n, .link_up, .rx_data(rxd),
    .rx_cav(cav), .rx_dav(dav), .msg_o(mi), .msg_valid_o(vi), .frame_err_o(ei));
  glink_rx_deframer #(.IS_RESPONSE(1'b1)) dut_r (.clk, .rst_n, .link_up, .rx_data(rxd),
    .rx_cav(cav), .rx_dav(dav), .msg_o(mr), .msg_valid_o(vr), .frame_err_o(er));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic word(input logic [15:0] w, input bit c, input bit d);
    rxd <= w; cav <= c; dav <= d; @(posedge clk);
    rxd <= 16'h0; cav <= 0; dav <= 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [13:0] cw; logic [31:0] d; bit resp, hd;
    rst_n = 0; link_up = 1; rxd = 0; cav = 0; dav = 0;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      resp = 1'($urandom);
      if (resp) begin
        cw = 14'($urandom) & 14'h1FFF;
        hd = resp_has_data(cw);
      end else begin
        cw = cw_op(opcode_e'($urandom_range(0, 8)), 9'($urandom));
        if ($urandom_range(0, 4) == 0) cw = 14'h2000 | 14'($urandom);
        hd = instr_has_data(cw);
      end
      d = $urandom;
      word({2'b00, cw}, 1, 0);
      if (hd) begin
        repeat ($urandom_range(0, 2)) @(posedge clk);
        word(d[31:16], 0, 1);
        repeat ($urandom_range(0, 2)) @(posedge clk);
        word(d[15:0], 0, 1);
      end
      // last word was on the inputs in the cycle before this edge; valid after
      // two clocks
      #1 check(!(resp ? vr : vi), "no early valid");
      @(posedge clk); #1;
      if (resp) check(vr && mr.ctrl == cw && mr.has_data == hd && (!hd || mr.data == d),
                      $sformatf("response message %h", cw));
      else      check(vi && mi.ctrl == cw && mi.has_data == hd && (!hd || mi.data == d),
                      $sformatf("instruction message %h", cw));
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    // truncated setVMEA: control word, one data word, then a new control word
    word({2'b00, cw_op(OP_SET_VME_A, 0)}, 1, 0);
    word(16'h1234, 0, 1);
    word({2'b00, cw_op(OP_IDLE, 0)}, 1, 0);
    @(posedge clk); #1;
    check(ei && vi && mi.ctrl == cw_op(OP_IDLE, 0), "framing error and restart");
    // link down: ignored
    link_up <= 0;
    word({2'b00, cw_op(OP_IDLE, 0)}, 1, 0);
    repeat (3) begin @(posedge clk); #1 check(!vi && !vr, "ignored while link down"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
