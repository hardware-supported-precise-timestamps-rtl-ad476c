// incr_reg: the Incremental Register (INCR) of the timestamp generator.
//
// INCR is the amount of time, in units of 2^-64 s, that the real time
// register advances by on every SCLK cycle. Nominally INCR = 2^64 / f_SCLK
// (0x2A_F31D_C461 for 100 MHz, the reset value). Clock discipline software
// adjusts it to pull the clock frequency onto the reference.
//
// The register is INCR_W (40) bits wide and is written through a 32-bit
// host interface in two accesses: a write of the low word only stages it,
// the write of the high word (bits 39:32) transfers the staged low word and
// the new high bits into INCR in the same cycle. The adder therefore never
// sees half of an update. The width of 40 bits is the architecture's; the
// staging scheme, its order (low word first) and the reset value are this
// design's choice.
//
// Timing: the new INCR value is visible on `incr` the cycle after the
// high-word write. Reset is synchronous, active high.
`timescale 1ns/1ps
module incr_reg #(
  parameter int unsigned                 INCR_W     = 40,
  parameter logic [INCR_W-1:0]           INCR_RESET = 40'h2A_F31D_C461
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr_lo,   // write wdata to the staging low word
  input  logic              wr_hi,   // write wdata[INCR_W-33:0] and commit
  input  logic [31:0]       wdata,
  output logic [INCR_W-1:0] incr     // current increment
);

  logic [31:0] lo_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      lo_q <= INCR_RESET[31:0];
      incr <= INCR_RESET;
    end else begin
      if (wr_lo)
        lo_q <= wdata;
      if (wr_hi)
        incr <= {wdata[INCR_W-33:0], lo_q};
    end
  end

  initial assert (INCR_W > 32 && INCR_W <= 64)
    else $error("incr_reg: INCR_W must be in 33..64");

endmodule
