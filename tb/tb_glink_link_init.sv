// tb_glink_link_init: self-checking test of the link builder.
//
// A receiver model locks only after its sampler has been reset a given number
// of times. The test checks that resets repeat until the link is up, that the
// attempt count matches, that the link stays up while the receiver is good,
// and that a lost link is rebuilt.
module tb_glink_link_init;
  logic clk = 1'b0;
  always #12.5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  localparam int unsigned RETRY = 64, LOCK = 8;
  logic rx_ready, rx_error, srst, up;
  logic [7:0] att;
  int resets_needed, resets_seen, cyc_since;
  logic srst_q;

  glink_link_init #(.RST_CYCLES(4), .LOCK_CYCLES(LOCK), .RETRY_CYCLES(RETRY)) dut (
    .clk, .rst_n, .rx_ready, .rx_error, .rx_sampler_rst(srst), .link_up(up), .attempts_o(att));

  // receiver model: ready a few cycles after the resets_needed-th sampler reset
  always @(posedge clk) begin
    srst_q <= srst;
    if (srst && !srst_q) begin resets_seen <= resets_seen + 1; cyc_since <= 0; end
    else cyc_since <= cyc_since + 1;
  end
  assign rx_ready = (resets_seen >= resets_needed) && !srst && cyc_since > 3;
  assign rx_error = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; resets_needed = 3; resets_seen = 0; cyc_since = 0; srst_q = 0;
    repeat (3) @(posedge clk); rst_n <= 1;
    @(posedge clk); #1 check(srst && !up, "sampler reset at power-on");
    wait (up); #1;
    check(resets_seen == 3, $sformatf("link up after %0d resets", resets_seen));
    check(att == 8'd3, "attempt count");
    repeat (200) @(posedge clk); #1;
    check(up && resets_seen == 3, "link held while receiver good");
    // receiver loses lock: link must be rebuilt
    resets_needed = 4;
    force rx_error = 1'b1; @(posedge clk); release rx_error;
    @(posedge clk); #1 check(!up, "link dropped on error");
    wait (up); #1;
    check(resets_seen == 4 && att == 8'd4, "link rebuilt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
