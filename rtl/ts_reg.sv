// ts_reg: the Timestamp Register (TSR).
//
// The exported 64-bit timestamp is the upper 64 bits of the real time
// register: 32 bits of seconds and the 32 most significant fraction bits
// (LSB 2^-32 s, about 232 ps). RTR changes every cycle, so a host that reads
// it in two 32-bit accesses would get halves of different times. This block
// keeps two copies:
//   - ts_live: the timestamp, re-registered every cycle; it feeds the link
//     to the external card, whose Fast mode sends its low byte continuously;
//   - ts_host: a copy taken atomically on `snap` and then held, so that the
//     host can read the seconds and fraction words of one single instant.
// Splitting the register into a live and a held copy is this design's
// choice; the atomic copy of RTR's upper 64 bits is the architecture's.
//
// Timing: ts_live(t+1) = upper 64 bits of rtr_in(t); ts_host takes the
// value of rtr_in in the cycle `snap` is high, visible the next cycle.
`timescale 1ns/1ps
module ts_reg
  import ptm_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  rtr_t rtr_in,
  input  logic snap,
  output ts_t  ts_live,
  output ts_t  ts_host
);

  always_ff @(posedge clk) begin
    if (rst) begin
      ts_live <= '0;
      ts_host <= '0;
    end else begin
      ts_live <= rtr_to_ts(rtr_in);
      if (snap)
        ts_host <= rtr_to_ts(rtr_in);
    end
  end

endmodule
