// cci_vme_slave: VME controller of the CCI, a slave on the local crate's bus
// with an interrupter.
//
// Data cycles: single A24 or A32 cycles (standard data address modifiers 0x39,
// 0x3D, 0x09, 0x0D) whose address matches BASE_ADDR in bits 23:8 (A24) or 31:8
// (A32) reach a 64-word register window. A D32 cycle (LWORD* low) moves a whole
// register; a D16 cycle moves bits 31:16 of it when A1 is 0 and bits 15:0 when
// A1 is 1, on data lines D15..D0. The register file sits outside: this block
// gives a one-cycle reg_wr_o or reg_rd_o strobe with word index, byte-lane
// half mask and write data, and samples reg_rdata_i in the same cycle.
//
// Interrupter: while irq_req_i is high, IRQ* of irq_level_i is driven low. An
// interrupt acknowledge cycle (IACK* low) at that level with IACKIN* low is
// answered with the 16-bit status ID on D15..D0 and a one-cycle irq_ack_o
// (release on acknowledge); at another level, or with nothing pending, IACKIN*
// is passed on to IACKOUT*.
//
// Timing: AS*, DS0*/DS1* and IACKIN* pass through two synchronising flip-flops;
// DTACK* falls four clocks after both data strobes are low (three for an
// interrupt acknowledge) and rises three clocks after they are released. All single-cycle accesses are supported, no block
// transfers. The access types and the interrupter follow the system
// description; register map, base address and timing are this design's
// choices.
module cci_vme_slave
  import rcs_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = 32'h0080_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // VME bus
  input  logic [31:1] vme_a,
  input  logic        vme_lword_n,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic        vme_iack_n,
  input  logic        vme_iackin_n,
  output logic        vme_iackout_n,
  input  logic [31:0] vme_d_i,
  output logic [31:0] vme_d_o,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  output logic [7:1]  vme_irq_n,
  // register file
  output logic [5:0]  reg_idx_o,
  output logic [1:0]  reg_half_o,   // bit 1: bits 31:16, bit 0: bits 15:0
  output logic        reg_wr_o,
  output logic        reg_rd_o,
  output logic [31:0] reg_wdata_o,
  input  logic [31:0] reg_rdata_i,
  // interrupter
  input  logic        irq_req_i,
  input  logic [2:0]  irq_level_i,
  input  logic [15:0] irq_status_i,
  output logic        irq_ack_o
);

  logic [1:0] as_s, ds0_s, ds1_s, iackin_s;
  logic       strobe, done_q;
  logic       a24_hit, a32_hit, hit;

  assign strobe  = as_s[1] && ds0_s[1] && ds1_s[1];
  assign a24_hit = (vme_am == 6'h39 || vme_am == 6'h3D) && vme_a[23:8] == BASE_ADDR[23:8];
  assign a32_hit = (vme_am == 6'h09 || vme_am == 6'h0D) && vme_a[31:8] == BASE_ADDR[31:8];
  assign hit     = vme_iack_n && (a24_hit || a32_hit);

  always_comb begin
    vme_irq_n = '1;
    if (irq_req_i && irq_level_i != 3'd0) vme_irq_n[irq_level_i] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s     <= '0;
      ds0_s    <= '0;
      ds1_s    <= '0;
      iackin_s <= '0;
    end else begin
      as_s     <= {as_s[0], !vme_as_n};
      ds0_s    <= {ds0_s[0], !vme_ds_n[0]};
      ds1_s    <= {ds1_s[0], !vme_ds_n[1]};
      iackin_s <= {iackin_s[0], !vme_iackin_n};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_q        <= 1'b0;
      vme_dtack_n   <= 1'b1;
      vme_d_o       <= '0;
      vme_d_oe      <= 1'b0;
      vme_iackout_n <= 1'b1;
      reg_idx_o     <= '0;
      reg_half_o    <= '0;
      reg_wr_o      <= 1'b0;
      reg_rd_o      <= 1'b0;
      reg_wdata_o   <= '0;
      irq_ack_o     <= 1'b0;
    end else begin
      reg_wr_o  <= 1'b0;
      reg_rd_o  <= 1'b0;
      irq_ack_o <= 1'b0;
      if (!strobe) begin
        done_q        <= 1'b0;
        vme_dtack_n   <= 1'b1;
        vme_d_oe      <= 1'b0;
        vme_iackout_n <= 1'b1;
      end else if (!done_q) begin
        if (!vme_iack_n) begin
          if (iackin_s[1]) begin
            done_q <= 1'b1;
            if (irq_req_i && vme_a[3:1] == irq_level_i) begin
              vme_d_o     <= {16'h0000, irq_status_i};
              vme_d_oe    <= 1'b1;
              vme_dtack_n <= 1'b0;
              irq_ack_o   <= 1'b1;
            end else begin
              vme_iackout_n <= 1'b0;
            end
          end
        end else if (hit) begin
          done_q      <= 1'b1;
          reg_idx_o   <= vme_a[7:2];
          reg_half_o  <= !vme_lword_n ? 2'b11 : (vme_a[1] ? 2'b01 : 2'b10);
          reg_wdata_o <= !vme_lword_n ? vme_d_i : {vme_d_i[15:0], vme_d_i[15:0]};
          reg_wr_o    <= !vme_write_n;
          reg_rd_o    <= vme_write_n;
        end
      end
      // register access happens in the cycle after the decode
      if (reg_rd_o || reg_wr_o) begin
        vme_dtack_n <= 1'b0;
        if (reg_rd_o) begin
          vme_d_oe <= 1'b1;
          vme_d_o  <= (reg_half_o == 2'b11) ? reg_rdata_i :
                      (reg_half_o == 2'b10) ? {16'h0000, reg_rdata_i[31:16]} :
                                              {16'h0000, reg_rdata_i[15:0]};
        end
      end
    end
  end

endmodule
