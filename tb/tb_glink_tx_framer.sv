// tb_glink_tx_framer: self-checking test of the G-LINK message framer.
//
// Sends random messages with and without data words and checks the word
// stream: control word with CAV, then the high and low data halves with DAV,
// one word per clock, the control word one clock after the handshake.
module tb_glink_tx_framer;
  import rcs_pkg::*;
  logic clk = 1'b0;
  always #12.5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  msg_t m; logic valid, ready; logic [15:0] txd; logic cav, dav;
  glink_tx_framer dut (.clk, .rst_n, .msg_i(m), .valid_i(valid), .ready_o(ready),
                       .tx_data(txd), .tx_cav(cav), .tx_dav(dav));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t exp;
    rst_n = 0; valid = 0; m = '0;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      exp.ctrl = CW_W'($urandom); exp.has_data = 1'($urandom); exp.data = $urandom;
      #1;
      check(ready, "ready when idle");
      m = exp; valid = 1;
      @(posedge clk); #1 valid = 0;
      check(cav && !dav && txd == {2'b00, exp.ctrl}, "control word");
      if (exp.has_data) begin
        check(!ready, "busy while data words go");
        @(posedge clk); #1;
        check(dav && !cav && txd == exp.data[31:16], "high data word");
        @(posedge clk); #1;
        check(dav && !cav && txd == exp.data[15:0], "low data word");
      end
      if ($urandom_range(0, 1)) begin
        @(posedge clk); #1;
        check(!cav && !dav, "fill between messages");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
