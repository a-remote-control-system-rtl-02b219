// vme_master: the VME controller of the HSC, master of the remote crate's bus.
//
// It runs one single-cycle data transfer at a time, A32 or A24 addressing with
// D32 or D16 data (no block transfers), or a D16 interrupt acknowledge cycle
// that fetches the status ID of an interrupter at a given IRQ level.
//
// Sequence: the address, address modifier, LWORD*, WRITE*, IACK* and (for a
// write) the data are driven in the cycle after req_i; AS* follows one cycle
// later, and the data strobes one cycle after that. The controller then waits
// for DTACK* or BERR* (both passed through two synchronising flip-flops). On
// DTACK* a read latches the data, the strobes are released and the result is
// reported at once with a one-cycle done_o pulse; busy_o stays high until the
// slave has released DTACK*/BERR*, and only then may the next cycle start. If
// neither answer comes within TIMEOUT_CYCLES after the strobes, the cycle is
// abandoned and done_o comes with timeout_o; this is how a dead slave
// controller is reported to the local host.
//
// Timing at 40 MHz with a slave that drives DTACK* k cycles after it sees DS*:
// done_o follows req_i after k + 6 cycles.
//
// The bus is modelled with separate data-in, data-out and output-enable
// vectors in place of tri-state lines. Address modifiers 0x39 (A24) and 0x09
// (A32) are the standard non-privileged data codes. The supported access types
// follow the system description; strobe timing, synchronisers and the timeout
// value are this design's choices. The HSC is the only master of its crate, so
// bus arbitration is not implemented.
module vme_master
  import rcs_pkg::*;
#(
  parameter int unsigned TIMEOUT_CYCLES = 255
) (
  input  logic        clk,
  input  logic        rst_n,
  // request side
  input  logic        req_i,
  input  logic        write_i,
  input  logic        a32_i,
  input  logic        d32_i,
  input  logic        iack_i,
  input  logic [2:0]  iack_level_i,
  input  logic [31:0] addr_i,
  input  logic [31:0] wdata_i,
  output logic        busy_o,
  output logic        done_o,
  output logic [31:0] rdata_o,
  output logic        timeout_o,
  output logic        berr_o,
  // VME bus
  output logic [31:1] vme_a,
  output logic        vme_lword_n,
  output logic [5:0]  vme_am,
  output logic        vme_as_n,
  output logic [1:0]  vme_ds_n,
  output logic        vme_write_n,
  output logic        vme_iack_n,
  output logic [31:0] vme_d_o,
  output logic        vme_d_oe,
  input  logic [31:0] vme_d_i,
  input  logic        vme_dtack_n,
  input  logic        vme_berr_n
);

  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_AS, S_WAIT, S_REL} state_e;
  state_e state;

  logic [1:0] dtack_sync, berr_sync;
  logic       dtack, berr;
  logic [$clog2(TIMEOUT_CYCLES+1)-1:0] timer;
  logic       is_write, is_d32;

  assign dtack  = !dtack_sync[1];
  assign berr   = !berr_sync[1];
  assign busy_o = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dtack_sync <= 2'b11;
      berr_sync  <= 2'b11;
    end else begin
      dtack_sync <= {dtack_sync[0], vme_dtack_n};
      berr_sync  <= {berr_sync[0], vme_berr_n};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      vme_a       <= '0;
      vme_lword_n <= 1'b1;
      vme_am      <= '0;
      vme_as_n    <= 1'b1;
      vme_ds_n    <= 2'b11;
      vme_write_n <= 1'b1;
      vme_iack_n  <= 1'b1;
      vme_d_o     <= '0;
      vme_d_oe    <= 1'b0;
      timer       <= '0;
      is_write    <= 1'b0;
      is_d32      <= 1'b0;
      done_o      <= 1'b0;
      rdata_o     <= '0;
      timeout_o   <= 1'b0;
      berr_o      <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        S_IDLE: if (req_i) begin
          state       <= S_ADDR;
          is_write    <= write_i && !iack_i;
          is_d32      <= d32_i && !iack_i;
          timeout_o   <= 1'b0;
          berr_o      <= 1'b0;
          vme_iack_n  <= !iack_i;
          vme_write_n <= !(write_i && !iack_i);
          vme_lword_n <= !(d32_i && !iack_i);
          if (iack_i) begin
            vme_a  <= {28'h0, iack_level_i};
            vme_am <= AM_A24_DATA;
          end else begin
            vme_a  <= a32_i ? addr_i[31:1] : {8'h00, addr_i[23:1]};
            vme_am <= a32_i ? AM_A32_DATA : AM_A24_DATA;
          end
          vme_d_o  <= d32_i ? wdata_i : {16'h0000, wdata_i[15:0]};
          vme_d_oe <= write_i && !iack_i;
        end
        S_ADDR: begin
          vme_as_n <= 1'b0;
          state    <= S_AS;
        end
        S_AS: begin
          vme_ds_n <= 2'b00;
          timer    <= '0;
          state    <= S_WAIT;
        end
        S_WAIT: begin
          timer <= timer + 1'b1;
          if (dtack || berr || timer == TIMEOUT_CYCLES[$bits(timer)-1:0]) begin
            if (dtack && !is_write) rdata_o <= is_d32 ? vme_d_i : {16'h0000, vme_d_i[15:0]};
            berr_o    <= berr && !dtack;
            timeout_o <= !dtack && !berr;
            vme_ds_n  <= 2'b11;
            vme_as_n  <= 1'b1;
            done_o    <= 1'b1;
            state     <= S_REL;
          end
        end
        S_REL: if (!dtack && !berr) begin
          vme_d_oe    <= 1'b0;
          vme_write_n <= 1'b1;
          vme_iack_n  <= 1'b1;
          vme_lword_n <= 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A transfer starts only from idle, and strobes never precede the address strobe.
  a_ds_after_as: assert property (@(posedge clk) disable iff (!rst_n)
                                  (vme_ds_n != 2'b11) |-> !vme_as_n);

endmodule
