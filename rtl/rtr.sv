// rtr: the Real Time Register (RTR) and its adder.
//
// RTR is a 96-bit register holding the current time: 32 bits of seconds
// since 1970-01-01 00:00:00 UTC and a 64-bit binary fraction of a second.
// On every SCLK cycle the increment INCR (zero-extended to 96 bits) is added
// to it, so a carry out of the fraction advances the seconds field. With
// INCR = 2^64 / f_SCLK the register accumulates one second every f_SCLK
// cycles. A load (from the host, to initialise the clock or to correct its
// phase) replaces the value for that cycle instead of the addition.
//
// Timing: `rtr_q` is a register; a load is visible the next cycle, and the
// addition of the increment resumes from the loaded value one cycle later.
// Reset (synchronous, active high) clears the register to zero.
// Everything here follows the architecture except the load priority, which
// is this design's choice.
`timescale 1ns/1ps
module rtr
  import ptm_pkg::*;
#(
  parameter int unsigned IW = 40
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [IW-1:0] incr,
  input  logic              load,
  input  rtr_t              load_val,
  output rtr_t              rtr_q
);

  always_ff @(posedge clk) begin
    if (rst)
      rtr_q <= '0;
    else if (load)
      rtr_q <= load_val;
    else
      rtr_q <= rtr_q + RTR_W'(incr);
  end

endmodule
