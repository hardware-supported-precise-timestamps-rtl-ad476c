// pps_capture: the Pulse Per Second Register (PPSR).
//
// The external PPS input (from a GPS receiver or another reference clock)
// marks the start of each second with its rising edge. The input is
// asynchronous to SCLK, so it passes through a SYNC_STAGES flip-flop
// synchroniser; the first cycle in which the synchronised level is high
// after being low copies the real time register into PPSR. Because PPS
// marks a whole second, the fraction part of PPSR is the clock's phase
// error at that second (a value just below 2^64 means the clock is behind,
// read it as a signed number); the disciplining software reads it.
//
// A sticky flag `pps_new` is set by each capture and cleared by `clr_new`
// (a capture in the same cycle wins). `pps_stb` pulses for one cycle on
// each capture.
//
// Timing: with the default two synchroniser stages, if PPS rises between
// clock edges E0 and E1, PPSR is written at edge E3 with the RTR value
// produced at edge E2, and pps_stb is high in the cycle after E3. The RTR
// sample is thus taken 1 to 2 SCLK periods after the true PPS edge (each
// extra stage adds one); this constant
// latency is not removed here and can be subtracted in software. The
// capture of RTR on PPS is the architecture's; synchroniser, flag and
// latency are this design's choices.
`timescale 1ns/1ps
module pps_capture
  import ptm_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic pps_in,     // asynchronous PPS from the reference
  input  rtr_t rtr_in,     // current real time
  input  logic clr_new,    // clear the new-capture flag
  output rtr_t ppsr,       // RTR value at the last PPS edge
  output logic pps_new,    // a capture happened since the last clear
  output logic pps_stb     // one-cycle pulse on each capture
);

  logic [SYNC_STAGES-1:0] sync_q;
  logic                   level_q;
  logic                   rise;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q  <= '0;
      level_q <= 1'b0;
    end else begin
      sync_q  <= {sync_q[SYNC_STAGES-2:0], pps_in};
      level_q <= sync_q[SYNC_STAGES-1];
    end
  end

  assign rise = sync_q[SYNC_STAGES-1] & ~level_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      ppsr    <= '0;
      pps_new <= 1'b0;
      pps_stb <= 1'b0;
    end else begin
      pps_stb <= rise;
      if (rise) begin
        ppsr    <= rtr_in;
        pps_new <= 1'b1;
      end else if (clr_new) begin
        pps_new <= 1'b0;
      end
    end
  end

  initial assert (SYNC_STAGES >= 2)
    else $error("pps_capture: SYNC_STAGES must be at least 2");

endmodule
