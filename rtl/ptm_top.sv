// ptm_top: precise timestamp generator with its timestamp link.
//
// The generator keeps time in a 96-bit Real Time Register (RTR) that adds
// the 40-bit increment INCR on every cycle of SCLK, a clock made by
// multiplying a 10 MHz temperature compensated crystal N times. The
// increment is nominally 2^64 / f_SCLK; host software disciplines it (a PI
// regulator on the phase error) using the Pulse Per Second Register, which
// captures RTR at each rising edge of an external PPS reference. The host
// reads the time through an atomic 64-bit Timestamp Register and can load
// RTR to set the clock. A PPS output is decoded from RTR.
//
// An external card receives the timestamp over a narrow cable (REFCLK,
// TS_DATA[7:0], TS_DV, PPTSF, INIT); this top also holds that card's
// receiver, wired to the transmitter through the cable, so the rebuilt
// timestamp is available on ext_ts. The cable wires are also brought out.
//
// Clocks and reset: everything runs on SCLK (also sent as REFCLK). The
// register bus is synchronous to SCLK, which is brought out for the bus
// master. rst_n is asynchronous; internal reset is held until the
// multiplier has locked and is released synchronously to SCLK; the reset
// flip-flops power up in reset (FPGA configuration value).
//
// Structure, register widths and link signals follow the architecture;
// the register bus, reset scheme and putting the receiver beside the
// transmitter are this design's choices.
`timescale 1ns/1ps
module ptm_top
  import ptm_pkg::*;
#(
  parameter int unsigned        MULT        = 10,
  parameter logic [INCR_BITS-1:0] INCR_RESET = INCR_100MHZ,
  parameter int unsigned        SYNC_STAGES = 2,
  parameter int unsigned        PPS_WIDTH_BITS = 3
) (
  input  logic        xtal_clk,    // 10 MHz crystal
  input  logic        rst_n,       // asynchronous board reset
  output logic        sclk,        // generator clock, N * 10 MHz
  output logic        sclk_locked,
  // PPS
  input  logic        pps_in,      // reference PPS (GPS receiver)
  output logic        pps_out,     // PPS of this clock
  // register bus (SCLK domain)
  input  logic [7:0]  bus_addr,
  input  logic        bus_wr,
  input  logic        bus_rd,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_rvalid,
  // cable to the external card, observed
  output logic        refclk,
  output logic [7:0]  cab_ts_data,
  output logic        cab_ts_dv,
  output logic        cab_pptsf,
  output logic        cab_init,
  // external card side
  input  logic        ext_resync,
  output ts_t         ext_ts,
  output logic        ext_ts_valid
);

  // ---------------------------------------------------------------- clock
  freq_mult #(.N(MULT)) u_mult (
    .clk_in (xtal_clk),
    .rst    (~rst_n),
    .clk_out(sclk),
    .locked (sclk_locked)
  );

  logic       arst;
  // Power-up value: in reset. The multiplier gives no SCLK while rst_n is
  // low, so the asynchronous set alone could be missed at power-up.
  logic [1:0] rst_pipe = 2'b11;
  logic       rst;

  assign arst = ~rst_n | ~sclk_locked;

  always_ff @(posedge sclk or posedge arst) begin
    if (arst) rst_pipe <= 2'b11;
    else      rst_pipe <= {rst_pipe[0], 1'b0};
  end
  assign rst = rst_pipe[1];

  // ------------------------------------------------------------ registers
  logic [INCR_BITS-1:0] incr;
  logic              incr_wr_lo, incr_wr_hi;
  logic [31:0]       incr_wdata;
  logic              rtr_load;
  rtr_t              rtr_load_val;
  rtr_t              rtr_q;
  logic              ts_snap;
  ts_t               ts_live, ts_host;
  rtr_t              ppsr;
  logic              pps_new, pps_clr, pps_stb;
  link_mode_e        link_mode;

  reg_bank #(.IW(INCR_BITS)) u_regs (
    .clk         (sclk),
    .rst         (rst),
    .bus_addr    (bus_addr),
    .bus_wr      (bus_wr),
    .bus_rd      (bus_rd),
    .bus_wdata   (bus_wdata),
    .bus_rdata   (bus_rdata),
    .bus_rvalid  (bus_rvalid),
    .incr_wr_lo  (incr_wr_lo),
    .incr_wr_hi  (incr_wr_hi),
    .incr_wdata  (incr_wdata),
    .incr        (incr),
    .rtr_load    (rtr_load),
    .rtr_load_val(rtr_load_val),
    .ts_snap     (ts_snap),
    .ts_host     (ts_host),
    .ppsr        (ppsr),
    .pps_new     (pps_new),
    .pps_clr     (pps_clr),
    .link_init   (link_mode == LINK_INIT)
  );

  incr_reg #(.INCR_W(INCR_BITS), .INCR_RESET(INCR_RESET)) u_incr (
    .clk      (sclk),
    .rst      (rst),
    .wr_lo    (incr_wr_lo),
    .wr_hi    (incr_wr_hi),
    .wdata    (incr_wdata),
    .incr     (incr)
  );

  rtr #(.IW(INCR_BITS)) u_rtr (
    .clk     (sclk),
    .rst     (rst),
    .incr    (incr),
    .load    (rtr_load),
    .load_val(rtr_load_val),
    .rtr_q   (rtr_q)
  );

  pps_capture #(.SYNC_STAGES(SYNC_STAGES)) u_ppsr (
    .clk    (sclk),
    .rst    (rst),
    .pps_in (pps_in),
    .rtr_in (rtr_q),
    .clr_new(pps_clr),
    .ppsr   (ppsr),
    .pps_new(pps_new),
    .pps_stb(pps_stb)
  );

  ts_reg u_tsr (
    .clk    (sclk),
    .rst    (rst),
    .rtr_in (rtr_q),
    .snap   (ts_snap),
    .ts_live(ts_live),
    .ts_host(ts_host)
  );

  pps_gen #(.WIDTH_BITS(PPS_WIDTH_BITS)) u_ppsgen (
    .clk    (sclk),
    .rst    (rst),
    .rtr_in (rtr_q),
    .pps_out(pps_out)
  );

  // ------------------------------------------------- timestamp link + cable
  ts_link_tx u_tx (
    .clk    (sclk),
    .rst    (rst),
    .ts_in  (ts_live),
    .init_in(cab_init),
    .ts_data(cab_ts_data),
    .ts_dv  (cab_ts_dv),
    .pptsf  (cab_pptsf),
    .mode   (link_mode)
  );

  assign refclk = sclk;

  ts_link_rx u_rx (
    .clk     (refclk),
    .rst     (rst),
    .ts_data (cab_ts_data),
    .ts_dv   (cab_ts_dv),
    .pptsf   (cab_pptsf),
    .resync  (ext_resync),
    .init_out(cab_init),
    .ts_out  (ext_ts),
    .ts_valid(ext_ts_valid)
  );

endmodule
