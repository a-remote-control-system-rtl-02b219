// tb_cci_regs: self-checking test of the CCI registers, driven through their
// register bus and message ports.
//
// Checks that writing the instruction control word sends one message (with the
// data register for setVMEA/setVMED only), the busy flag and the response
// update bit, capture of a response with data, that an unprompted
// interruptVME message goes to the interrupt register and raises the
// interrupt only when enabled, the acknowledge, and D16 (half-word) writes.
module tb_cci_regs;
  import rcs_pkg::*;
  logic clk = 1'b0;
  always #12.5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic [5:0] idx; logic [1:0] half; logic wr, rd; logic [31:0] wdata, rdata;
  msg_t txm, rxm; logic txv, txr, rxv, lup, ferr, irq_req, irq_ack;
  logic [2:0] irq_level; logic [15:0] irq_status;

  cci_regs dut (.clk, .rst_n, .reg_idx_i(idx), .reg_half_i(half), .reg_wr_i(wr), .reg_rd_i(rd),
    .reg_wdata_i(wdata), .reg_rdata_o(rdata), .tx_msg_o(txm), .tx_valid_o(txv),
    .tx_ready_i(txr), .rx_msg_i(rxm), .rx_valid_i(rxv), .link_up_i(lup),
    .link_attempts_i(8'd3), .frame_err_i(ferr), .irq_req_o(irq_req), .irq_level_o(irq_level),
    .irq_status_o(irq_status), .irq_ack_i(irq_ack));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  msg_t sent[$];
  always @(posedge clk) if (txv && txr) sent.push_back(txm);

  task automatic wreg(input int i, input logic [31:0] v, input logic [1:0] h = 2'b11);
    idx <= 6'(i); half <= h; wdata <= v; wr <= 1; @(posedge clk); wr <= 0;
  endtask
  task automatic rreg(input int i, output logic [31:0] v);
    idx <= 6'(i); rd <= 1; @(negedge clk) v = rdata; @(posedge clk); rd <= 0;
  endtask
  task automatic rx(input msg_t m);
    rxm <= m; rxv <= 1; @(posedge clk); rxv <= 0; @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    rst_n = 0; idx = 0; half = 0; wr = 0; rd = 0; wdata = 0; txr = 1; rxv = 0; rxm = '0;
    lup = 1; ferr = 0; irq_ack = 0;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);

    wreg(2, 32'hFEED_0042);
    wreg(1, 32'(cw_op(OP_SET_VME_A, 0)));
    repeat (2) @(posedge clk);
    check(sent.size() == 1 && sent[0].has_data && sent[0].data == 32'hFEED_0042 &&
          sent[0].ctrl == cw_op(OP_SET_VME_A, 0), "setVMEA sent with data words");
    rreg(0, v); check(v[1] == 1'b1 && v[2] == 1'b1, "busy and link up");
    rreg(3, v); check(v[31] == 1'b0, "update bit clear while waiting");
    rx('{ctrl: cw_op(OP_SET_VME_A, 0), has_data: 1'b0, data: '0});
    rreg(3, v); check(v[31] && v[13:0] == cw_op(OP_SET_VME_A, 0), "response with update bit");
    rreg(0, v); check(!v[1], "busy cleared");
    sent.delete();
    wreg(1, 32'(cw_op(OP_CONFIG_VME, 9'b110)));
    repeat (2) @(posedge clk);
    check(sent.size() == 1 && !sent[0].has_data, "configVME sent without data words");
    rreg(3, v); check(!v[31], "update bit cleared by new instruction");
    rx('{ctrl: cw_op(OP_CONFIG_VME, 9'h100), has_data: 1'b1, data: 32'h0123_4567});
    rreg(4, v); check(v == 32'h0123_4567, "response data");
    // unprompted interrupt, disabled
    rx('{ctrl: cw_op(OP_INTERRUPT_VME, 9'h185), has_data: 1'b1, data: 32'h0000_00AB});
    check(!irq_req, "no interrupt while disabled");
    rreg(3, v); check(v[13:0] == cw_op(OP_CONFIG_VME, 9'h100), "response register untouched");
    rreg(5, v); check(v == {1'b1, 12'h0, 3'd5, 16'h00AB}, "interrupt register");
    rreg(5, v); check(!v[31], "interrupt valid cleared by read");
    // enabled at level 6
    wreg(0, 32'h0000_0061);
    rx('{ctrl: cw_op(OP_INTERRUPT_VME, 9'h182), has_data: 1'b1, data: 32'h0000_1234});
    check(irq_req && irq_level == 3'd6 && irq_status == 16'h1234, "interrupt raised");
    irq_ack <= 1; @(posedge clk); irq_ack <= 0; @(posedge clk);
    check(!irq_req, "acknowledge clears the request");
    // enableInterrupt addressed to the CCI: handled locally, nothing sent
    sent.delete();
    wreg(1, 32'(cw_op(OP_ENABLE_INT, 9'b10)));
    repeat (2) @(posedge clk);
    check(sent.size() == 0, "CCI enableInterrupt not sent");
    rreg(3, v); check(v[31] && v[13:0] == cw_op(OP_ENABLE_INT, 9'b10), "CCI enableInterrupt answered");
    rreg(0, v); check(!v[0] && !v[1], "CCI interrupt handling disabled by instruction");
    rx('{ctrl: cw_op(OP_INTERRUPT_VME, 9'h183), has_data: 1'b1, data: 32'h0000_0077});
    check(!irq_req, "no interrupt after disable instruction");
    wreg(1, 32'(cw_op(OP_ENABLE_INT, 9'b11)));
    rreg(0, v); check(v[0], "CCI interrupt handling enabled by instruction");
    // enableInterrupt addressed to the HSC goes over the link and leaves the CCI alone
    wreg(1, 32'(cw_op(OP_ENABLE_INT, 9'b00)));
    repeat (2) @(posedge clk);
    check(sent.size() == 1 && sent[0].ctrl == cw_op(OP_ENABLE_INT, 9'b00), "HSC enableInterrupt sent");
    rreg(0, v); check(v[0] && v[1], "CCI enable kept, response pending");
    rx('{ctrl: cw_op(OP_ENABLE_INT, 9'b00), has_data: 1'b0, data: '0});
    // D16 write of INSTR_DATA halves, then control word via low half
    wreg(2, 32'h0000_5555, 2'b01); wreg(2, 32'h7777_0000, 2'b10);
    rreg(2, v); check(v == 32'h7777_5555, "half-word writes");
    sent.delete();
    wreg(1, {16'h0, 16'(cw_op(OP_SET_VME_D, 0))}, 2'b10);
    repeat (2) @(posedge clk);
    check(sent.size() == 0, "high-half write does not send");
    wreg(1, {16'h0, 16'(cw_op(OP_SET_VME_D, 0))}, 2'b01);
    repeat (2) @(posedge clk);
    check(sent.size() == 1 && sent[0].data == 32'h7777_5555, "low-half write sends");
    ferr <= 1; @(posedge clk); ferr <= 0; @(posedge clk);
    rreg(6, v); check(v == 32'h0000_0103, "link register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
