// ts_link_tx: timestamp transmitter towards an external card (PTM side).
//
// The cable carries REFCLK (SCLK itself), an 8-bit bus TS_DATA, a data
// valid TS_DV and an overflow strobe PPTSF towards the external card, and
// INIT back. A 64-bit timestamp cannot cross 8 wires at once, so the link
// has two modes:
//   - Fast (default): TS_DATA carries the low byte of the live timestamp on
//     every cycle, TS_DV is low. PPTSF is high for one cycle whenever the
//     upper 56 bits of the timestamp changed, i.e. the low byte overflowed;
//     the receiver adds one to its copy of the upper part on each PPTSF.
//   - Init: a rising edge on INIT (from the external card only) makes the
//     transmitter copy the live timestamp T0 and send its eight bytes, least
//     significant first, on eight consecutive cycles with TS_DV high. PPTSF
//     keeps reporting overflows during the transfer, so the receiver can
//     bring T0 up to date. After the eighth byte the link returns to Fast.
//     An INIT edge during Init is ignored.
// With INCR at most 40 bits wide the timestamp advances by at most 256
// units per cycle, so its upper 56 bits step by at most one per cycle and
// a single-cycle PPTSF is enough.
//
// Timing: all outputs are registered. The byte, TS_DV and PPTSF driven in
// cycle t+1 describe ts_in of cycle t (PPTSF: change from t-1 to t). In the
// first Init beat the byte is T0[7:0] with T0 = ts_in of the cycle the INIT
// edge was seen; the PPTSF of that beat is already included in T0.
// The two modes, the signals and the overflow strobe are the architecture's;
// the byte order, the INIT edge detection and the cycle alignment are this
// design's choices.
`timescale 1ns/1ps
module ts_link_tx
  import ptm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  ts_t        ts_in,      // live timestamp, changes every cycle
  input  logic       init_in,    // INIT wire from the external card
  output logic [7:0] ts_data,    // TS_DATA
  output logic       ts_dv,      // TS_DV
  output logic       pptsf,      // PPTSF
  output link_mode_e mode        // current mode (status)
);

  logic [TS_W-1:8] upper_prev;
  logic            init_q;
  logic            init_rise;
  logic [TS_W-1:0] shift_q;
  logic [2:0]      beat_q;
  logic            ovf;

  assign init_rise = init_in & ~init_q;
  assign ovf       = (ts_in[TS_W-1:8] != upper_prev);

  always_ff @(posedge clk) begin
    if (rst) begin
      upper_prev <= '0;
      init_q     <= 1'b0;
      shift_q    <= '0;
      beat_q     <= '0;
      mode       <= LINK_FAST;
      ts_data    <= '0;
      ts_dv      <= 1'b0;
      pptsf      <= 1'b0;
    end else begin
      upper_prev <= ts_in[TS_W-1:8];
      init_q     <= init_in;
      pptsf      <= ovf;
      unique case (mode)
        LINK_FAST: begin
          if (init_rise) begin
            // First Init beat: byte 0 of the snapshot.
            shift_q <= ts_in;
            ts_data <= ts_in[7:0];
            ts_dv   <= 1'b1;
            beat_q  <= 3'd1;
            mode    <= LINK_INIT;
          end else begin
            ts_data <= ts_in[7:0];
            ts_dv   <= 1'b0;
          end
        end
        LINK_INIT: begin
          ts_data <= shift_q[8*beat_q +: 8];
          ts_dv   <= 1'b1;
          beat_q  <= beat_q + 3'd1;
          if (beat_q == 3'd7)
            mode <= LINK_FAST;
        end
        default: mode <= LINK_FAST;
      endcase
    end
  end

endmodule
