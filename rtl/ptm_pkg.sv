// ptm_pkg: types and constants shared by the precise timestamp generator.
//
// Time is kept as a 96-bit fixed-point number: 32 bits of whole seconds
// since 1970-01-01 00:00:00 UTC (Unix time) and a 64-bit binary fraction of
// the second, so one fraction LSB is 2^-64 s. The exported timestamp is the
// upper 64 bits of that value (32 bits of seconds, 32 bits of fraction, LSB
// about 232 ps). The register map of the 32-bit host interface is this
// design's own choice; the widths (96, 64, 40) follow the architecture.
`timescale 1ns/1ps
package ptm_pkg;

  localparam int unsigned SEC_W   = 32;
  localparam int unsigned FRAC_W  = 64;
  localparam int unsigned RTR_W   = SEC_W + FRAC_W;  // 96
  localparam int unsigned TS_W    = 64;              // exported timestamp
  localparam int unsigned INCR_BITS = 40;            // increment register

  // Real time register layout.
  typedef struct packed {
    logic [SEC_W-1:0]  sec;
    logic [FRAC_W-1:0] frac;
  } rtr_t;

  // Exported 64-bit timestamp: seconds and the upper 32 fraction bits.
  typedef struct packed {
    logic [31:0] sec;
    logic [31:0] frac;
  } ts_t;

  function automatic ts_t rtr_to_ts(rtr_t r);
    ts_t t;
    t.sec  = r.sec;
    t.frac = r.frac[FRAC_W-1 -: 32];
    return t;
  endfunction

  // INCR for a 100 MHz SCLK: 2^64 / 100e6 = 0x2A_F31D_C461.
  localparam logic [INCR_BITS-1:0] INCR_100MHZ = 40'h2A_F31D_C461;

  // Register map of the host (PCI/MCU side) interface, byte addresses,
  // 32-bit words.
  localparam logic [7:0] A_INCR_LO  = 8'h00;  // RW, INCR[31:0] (staged)
  localparam logic [7:0] A_INCR_HI  = 8'h04;  // RW, INCR[39:32]; write commits
  localparam logic [7:0] A_RTR_F0   = 8'h08;  // W, RTR fraction [31:0] (staged)
  localparam logic [7:0] A_RTR_F1   = 8'h0C;  // W, RTR fraction [63:32] (staged)
  localparam logic [7:0] A_RTR_SEC  = 8'h10;  // W, RTR seconds; write loads RTR
  localparam logic [7:0] A_CTRL     = 8'h14;  // W, bit0: snapshot RTR into TSR
  localparam logic [7:0] A_TSR_FRAC = 8'h18;  // R, TSR fraction (32 bits)
  localparam logic [7:0] A_TSR_SEC  = 8'h1C;  // R, TSR seconds
  localparam logic [7:0] A_PPSR_F0  = 8'h20;  // R, PPSR fraction [31:0]
  localparam logic [7:0] A_PPSR_F1  = 8'h24;  // R, PPSR fraction [63:32]
  localparam logic [7:0] A_PPSR_SEC = 8'h28;  // R, PPSR seconds
  localparam logic [7:0] A_STATUS   = 8'h2C;  // R: bit0 new PPS capture,
                                              //    bit1 link in Init mode
                                              // W: bit0=1 clears new PPS flag

  // Timestamp link (to the external card) modes.
  typedef enum logic {LINK_FAST = 1'b0, LINK_INIT = 1'b1} link_mode_e;

endpackage
