// vme_slave_model: behavioural model of the remote crate's VME slaves, for
// simulation only.
//
// It stands for a memory module with 32-bit registers (A32 and A24 windows,
// D32 and D16) and for an interrupter. A data cycle whose address falls in a
// window reads or writes a 64-word memory; D16 moves bits 31:16 of a word when
// A1 is 0 and bits 15:0 when A1 is 1. DTACK* is driven DTACK_DELAY clocks after
// the model sees both data strobes low, and released one clock after they
// rise. Addresses in the BERR window get BERR*; all others get no answer.
// While irq_level is non-zero, IRQ* of that level is low; an acknowledge cycle
// at that level returns irq_status on D15..D0 and drops the request (release on
// acknowledge). Counters report what happened.
module vme_slave_model #(
  parameter int unsigned DTACK_DELAY = 4,
  parameter logic [31:0] A32_BASE    = 32'h4000_0000,  // bits 31:8 compared
  parameter logic [23:0] A24_BASE    = 24'h10_0000,    // bits 23:8 compared
  parameter logic [23:0] BERR_BASE   = 24'h20_0000     // bits 23:8 compared
) (
  input  logic        clk,
  input  logic [31:1] a,
  input  logic        lword_n,
  input  logic [5:0]  am,
  input  logic        as_n,
  input  logic [1:0]  ds_n,
  input  logic        write_n,
  input  logic        iack_n,
  input  logic [31:0] d_i,
  output logic [31:0] d_o,
  output logic        dtack_n,
  output logic        berr_n,
  output logic [7:1]  irq_n,
  input  logic [2:0]  irq_level_set,
  input  logic        irq_set,
  input  logic [15:0] irq_status
);

  logic [31:0] mem [64];
  logic [2:0]  irq_level;
  int unsigned cnt;
  logic        busy;
  int unsigned n_reads, n_writes, n_iacks, n_berrs;

  initial begin
    for (int i = 0; i < 64; i++) mem[i] = 32'h0;
    irq_level = 0; cnt = 0; busy = 0; dtack_n = 1; berr_n = 1; d_o = 0;
    n_reads = 0; n_writes = 0; n_iacks = 0; n_berrs = 0;
  end

  always_comb begin
    irq_n = '1;
    if (irq_level != 0) irq_n[irq_level] = 1'b0;
  end

  function automatic bit in_mem();
    return (am == 6'h09 && a[31:8] == A32_BASE[31:8]) ||
           (am == 6'h39 && a[23:8] == A24_BASE[23:8]);
  endfunction

  always @(posedge clk) begin
    if (irq_set) irq_level <= irq_level_set;
    if (as_n || ds_n != 2'b00) begin
      busy    <= 0;
      cnt     <= 0;
      dtack_n <= 1;
      berr_n  <= 1;
    end else if (!busy) begin
      if (cnt + 1 < DTACK_DELAY) cnt <= cnt + 1;
      else begin
        busy <= 1;
        if (!iack_n) begin
          if (irq_level != 0 && a[3:1] == irq_level) begin
            d_o       <= {16'h0, irq_status};
            dtack_n   <= 0;
            irq_level <= 0;
            n_iacks   <= n_iacks + 1;
          end
        end else if (in_mem()) begin
          dtack_n <= 0;
          if (!write_n) begin
            n_writes <= n_writes + 1;
            if (!lword_n)  mem[a[7:2]] <= d_i;
            else if (a[1]) mem[a[7:2]][15:0] <= d_i[15:0];
            else           mem[a[7:2]][31:16] <= d_i[15:0];
          end else begin
            n_reads <= n_reads + 1;
            if (!lword_n)  d_o <= mem[a[7:2]];
            else if (a[1]) d_o <= {16'h0, mem[a[7:2]][15:0]};
            else           d_o <= {16'h0, mem[a[7:2]][31:16]};
          end
        end else if (am == 6'h39 && a[23:8] == BERR_BASE[23:8]) begin
          berr_n  <= 0;
          n_berrs <= n_berrs + 1;
        end
      end
    end
  end

endmodule
