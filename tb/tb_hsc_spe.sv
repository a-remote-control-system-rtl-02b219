// tb_hsc_spe: self-checking test of the Secondary Protocol Encoder, with the
// VME controller and a behavioural memory module / interrupter on the bus.
//
// Checks every SPE instruction: address and data loading, VME writes and
// reads (data compared with the model's memory), inhibit, a timeout, the
// interrupt query, and an interrupt forwarded as an unprompted interruptVME
// message with the status ID. Also checks that a response with no VME cycle is
// offered three clocks after the instruction is.
module tb_hsc_spe;
  import rcs_pkg::*;
  logic clk = 1'b0;
  always #12.5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  msg_t instr, resp; logic ivalid, iready, rvalid, rready, inh, ien;
  logic vreq, vwr, va32, vd32, viack, vbusy, vdone, vtmo, vberr;
  logic [2:0] vlvl; logic [31:0] vaddr, vwdata, vrdata;
  logic [31:1] a; logic lword_n, as_n, write_n, iack_n, d_oe, dtack_n, berr_n;
  logic [5:0] am; logic [1:0] ds_n; logic [31:0] d_o, d_s; logic [7:1] irq_n;
  logic [2:0] irq_lv; logic irq_set; logic [15:0] irq_st;

  hsc_spe dut (.clk, .rst_n, .instr_i(instr), .instr_valid_i(ivalid), .instr_ready_o(iready),
    .resp_o(resp), .resp_valid_o(rvalid), .resp_ready_i(rready), .inhibit_o(inh), .int_en_o(ien),
    .vme_req_o(vreq), .vme_write_o(vwr), .vme_a32_o(va32), .vme_d32_o(vd32), .vme_iack_o(viack),
    .vme_iack_level_o(vlvl), .vme_addr_o(vaddr), .vme_wdata_o(vwdata), .vme_busy_i(vbusy),
    .vme_done_i(vdone), .vme_rdata_i(vrdata), .vme_timeout_i(vtmo), .vme_berr_i(vberr),
    .vme_irq_n(irq_n));
  vme_master #(.TIMEOUT_CYCLES(30)) vm (.clk, .rst_n, .req_i(vreq), .write_i(vwr), .a32_i(va32),
    .d32_i(vd32), .iack_i(viack), .iack_level_i(vlvl), .addr_i(vaddr), .wdata_i(vwdata),
    .busy_o(vbusy), .done_o(vdone), .rdata_o(vrdata), .timeout_o(vtmo), .berr_o(vberr),
    .vme_a(a), .vme_lword_n(lword_n), .vme_am(am), .vme_as_n(as_n), .vme_ds_n(ds_n),
    .vme_write_n(write_n), .vme_iack_n(iack_n), .vme_d_o(d_o), .vme_d_oe(d_oe), .vme_d_i(d_s),
    .vme_dtack_n(dtack_n), .vme_berr_n(berr_n));
  vme_slave_model #(.DTACK_DELAY(4)) slave (.clk, .a, .lword_n, .am, .as_n, .ds_n, .write_n,
    .iack_n, .d_i(d_o), .d_o(d_s), .dtack_n, .berr_n, .irq_n, .irq_level_set(irq_lv),
    .irq_set, .irq_status(irq_st));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int lat;
  task automatic send(input logic [13:0] cw, input logic [31:0] d, output msg_t r);
    while (!iready) @(posedge clk);
    instr <= '{ctrl: cw, has_data: instr_has_data(cw), data: d}; ivalid <= 1;
    @(posedge clk); ivalid <= 0; lat = 0;
    while (!rvalid) begin @(posedge clk); lat++; end
    r = resp;
    @(posedge clk);   // rready is tied high: the response is taken here
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t r;
    rst_n = 0; ivalid = 0; instr = '0; rready = 1; irq_lv = 0; irq_set = 0; irq_st = 0;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);

    send(cw_op(OP_SET_VME_A, 0), 32'h4000_0008, r);
    check(r.ctrl == cw_op(OP_SET_VME_A, 0) && !r.has_data, "setVMEA response");
    check(lat == 3, $sformatf("setVMEA response latency %0d", lat));
    check(vaddr == 32'h4000_0008, "address register");
    send(cw_op(OP_SET_VME_D, 0), 32'h1357_9BDF, r);
    check(vwdata == 32'h1357_9BDF, "data register");
    send(cw_op(OP_CONFIG_VME, 9'b111), 0, r);       // write A32 D32
    check(r.ctrl == cw_op(OP_CONFIG_VME, 0), "configVME write status");
    check(slave.mem[2] == 32'h1357_9BDF, "configVME write reached slave");
    slave.mem[2] = 32'hCAFE_F00D;
    send(cw_op(OP_CONFIG_VME, 9'b110), 0, r);       // read A32 D32
    check(r.has_data && r.data == 32'hCAFE_F00D && r.ctrl[RS_HAS_DATA], "configVME read data");
    // inhibit
    send(cw_op(OP_INHIBIT_VME, 1), 0, r);
    check(inh && r.ctrl == cw_op(OP_INHIBIT_VME, 1), "inhibitVME set");
    send(cw_op(OP_CONFIG_VME, 9'b110), 0, r);
    check(r.ctrl[RS_INHIBITED] && !r.has_data && slave.n_reads == 1, "access refused when inhibited");
    send(cw_op(OP_INHIBIT_VME, 0), 0, r);
    // timeout
    send(cw_op(OP_SET_VME_A, 0), 32'h0030_0000, r);
    send(cw_op(OP_CONFIG_VME, 9'b000), 0, r);
    check(r.ctrl[RS_TIMEOUT] && !r.has_data, "timeout reported");
    // interrupt query with IRQ3 asserted but handling disabled
    irq_lv <= 3'd3; irq_st <= 16'h0033; irq_set <= 1; @(posedge clk); irq_set <= 0;
    repeat (4) @(posedge clk);
    send(cw_op(OP_INTERRUPT_VME, 0), 0, r);
    check(r.ctrl == cw_op(OP_INTERRUPT_VME, 9'b000000100), "interrupt query shows IRQ3");
    check(slave.n_iacks == 0, "no acknowledge while disabled");
    // enable: the SPE acknowledges and forwards the status ID
    send(cw_op(OP_ENABLE_INT, 1), 0, r);
    check(ien, "interrupt handling enabled");
    lat = 0;
    while (!rvalid && lat < 100) begin @(posedge clk); lat++; end
    check(rvalid && resp.ctrl == cw_op(OP_INTERRUPT_VME, 9'h183) && resp.has_data &&
          resp.data == 32'h0000_0033, "unprompted interruptVME message");
    @(posedge clk);
    check(slave.n_iacks == 1, "one acknowledge cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
