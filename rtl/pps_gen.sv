// pps_gen: Pulse Per Second output of the generator's own clock.
//
// The output rises at the start of every second of the real time register
// and stays high while the fraction of the second is below 2^-WIDTH_BITS s
// (its top WIDTH_BITS fraction bits are zero): with the default of 3 the
// pulse is 125 ms long. Because it is decoded from RTR, the output follows
// any load or adjustment of the clock. That a PPS output is driven from RTR
// is the architecture's; the pulse shape is this design's choice.
//
// Timing: registered, one SCLK cycle after RTR crosses the second.
`timescale 1ns/1ps
module pps_gen
  import ptm_pkg::*;
#(
  parameter int unsigned WIDTH_BITS = 3
) (
  input  logic clk,
  input  logic rst,
  input  rtr_t rtr_in,
  output logic pps_out
);

  always_ff @(posedge clk) begin
    if (rst)
      pps_out <= 1'b0;
    else
      pps_out <= (rtr_in.frac[FRAC_W-1 -: WIDTH_BITS] == '0);
  end

endmodule
