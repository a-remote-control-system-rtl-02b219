// etbc_model: behavioural model of the host side of an embedded test bus
// controller (eTBC), for simulation only.
//
// Eight 8-bit registers. When STRB* is low, RDY* falls RDY_DELAY clocks later;
// a write stores the data at the address, a read drives the register on the
// data lines. RDY* rises one clock after STRB* is released. RST* clears the
// registers. The JTAG side of the chip is not modelled; n_acc counts accesses.
module etbc_model #(
  parameter int unsigned RDY_DELAY = 12
) (
  input  logic       clk,
  input  logic [2:0] a,
  input  logic       rw,
  input  logic [7:0] d_i,
  output logic [7:0] d_o,
  input  logic       strb_n,
  output logic       rdy_n,
  input  logic       rst_n
);
  logic [7:0]  regs [8];
  int unsigned cnt, n_acc;
  logic        done;

  initial begin
    for (int i = 0; i < 8; i++) regs[i] = 8'h0;
    rdy_n = 1; d_o = 0; cnt = 0; n_acc = 0; done = 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) regs[i] <= 8'h0;
    end
    if (strb_n) begin
      rdy_n <= 1; cnt <= 0; done <= 0;
    end else if (!done) begin
      if (cnt + 1 < RDY_DELAY) cnt <= cnt + 1;
      else begin
        done  <= 1;
        rdy_n <= 0;
        n_acc <= n_acc + 1;
        if (rw) d_o <= regs[a];
        else    regs[a] <= d_i;
      end
    end
  end
endmodule
