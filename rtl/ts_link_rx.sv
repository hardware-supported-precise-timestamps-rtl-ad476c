// ts_link_rx: timestamp receiver on the external card.
//
// Rebuilds the full 64-bit timestamp from the 8-bit link driven by
// ts_link_tx, in the REFCLK domain (REFCLK is the transmitter's SCLK).
//   - After reset, and whenever `resync` is pulsed, it drives a one-cycle
//     pulse on INIT to ask for the whole timestamp.
//   - In Fast beats (TS_DV low) the low byte is taken from TS_DATA and the
//     upper 56 bits are incremented on each PPTSF.
//   - During the eight Init beats (TS_DV high) the bytes of T0 are collected,
//     least significant first, and the PPTSF pulses of beats 1..7 are
//     counted. At the eighth byte the upper part becomes T0[63:8] plus that
//     count, which brings it up to the present. The low byte is refreshed by
//     the next Fast beat, and from then on `ts_valid` is high.
// The receiver's duties (follow the low byte, increment the upper part on
// each overflow, also during Init) are the architecture's; INIT generation,
// the byte order and the valid flag are this design's choices.
//
// Timing: ts_out is registered; with ts_link_tx on the other end of the
// cable, ts_out in cycle t+2 equals the transmitter's ts_in of cycle t.
`timescale 1ns/1ps
module ts_link_rx
  import ptm_pkg::*;
(
  input  logic       clk,       // REFCLK
  input  logic       rst,
  input  logic [7:0] ts_data,   // TS_DATA
  input  logic       ts_dv,     // TS_DV
  input  logic       pptsf,     // PPTSF
  input  logic       resync,    // request a new Init transfer
  output logic       init_out,  // INIT wire to the PTM card
  output ts_t        ts_out,    // rebuilt timestamp
  output logic       ts_valid   // ts_out follows the transmitter
);

  logic [TS_W-1:8] upper_q;
  logic [7:0]      low_q;
  logic [TS_W-9:8] t0_q;        // bytes 1..6 of T0 land here
  logic [2:0]      beat_q;
  logic [2:0]      ovf_cnt_q;
  logic            done_q;      // Init transfer complete, low byte pending
  logic            req_q;

  // INIT request: once after reset, then on each resync.
  always_ff @(posedge clk) begin
    if (rst) begin
      req_q    <= 1'b1;
      init_out <= 1'b0;
    end else begin
      init_out <= req_q;
      req_q    <= resync;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      upper_q   <= '0;
      low_q     <= '0;
      t0_q      <= '0;
      beat_q    <= '0;
      ovf_cnt_q <= '0;
      done_q    <= 1'b0;
      ts_valid  <= 1'b0;
    end else if (ts_dv) begin
      ts_valid <= 1'b0;
      beat_q   <= beat_q + 3'd1;
      if (beat_q == 3'd0) begin
        ovf_cnt_q <= '0;
      end else begin
        ovf_cnt_q <= ovf_cnt_q + 3'(pptsf);
        if (beat_q != 3'd7)
          t0_q[8*beat_q +: 8] <= ts_data;
      end
      if (beat_q == 3'd7) begin
        upper_q <= {ts_data, t0_q[TS_W-9:8]} + (TS_W-8)'(ovf_cnt_q)
                   + (TS_W-8)'(pptsf);
        done_q  <= 1'b1;
      end else begin
        upper_q <= upper_q + (TS_W-8)'(pptsf);
      end
    end else begin
      beat_q  <= '0;
      low_q   <= ts_data;
      upper_q <= upper_q + (TS_W-8)'(pptsf);
      if (done_q) begin
        done_q   <= 1'b0;
        ts_valid <= 1'b1;
      end
    end
  end

  assign ts_out = {upper_q, low_q};

endmodule
