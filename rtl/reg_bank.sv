// reg_bank: host register access to the timestamp generator.
//
// Every register of the generator is reachable from the host through a
// simple synchronous 32-bit register bus in the SCLK domain; the PCI
// controller (or the on-board microcontroller interface) translates its
// accesses into this bus. The map is in ptm_pkg (A_*):
//   INCR_LO/INCR_HI  read the live increment; writes go to incr_reg, whose
//                    high-word write commits both halves at once.
//   RTR_F0/F1/SEC    staged 96-bit load value; the write of the seconds
//                    word loads all 96 bits into RTR in one cycle (used to
//                    initialise the clock and to step its phase).
//   CTRL             writing bit 0 = 1 snapshots RTR into the Timestamp
//                    Register; the host then reads TSR_FRAC and TSR_SEC.
//   PPSR_*           RTR value captured at the last PPS edge (read only).
//   STATUS           bit 0: new PPS capture (write 1 to clear);
//                    bit 1: timestamp link in Init mode.
// Reads of unmapped addresses return 0.
//
// Bus: one access per cycle; `bus_wr` and `bus_rd` must not be high
// together. Writes take effect at the clock edge; read data is registered
// and returned with `bus_rvalid` one cycle after `bus_rd`.
// That all registers are host accessible is the architecture's; the bus,
// the register map and the staging scheme are this design's choices.
`timescale 1ns/1ps
module reg_bank
  import ptm_pkg::*;
#(
  parameter int unsigned IW = 40
) (
  input  logic              clk,
  input  logic              rst,
  // register bus
  input  logic [7:0]        bus_addr,
  input  logic              bus_wr,
  input  logic              bus_rd,
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  output logic              bus_rvalid,
  // Incremental Register
  output logic              incr_wr_lo,
  output logic              incr_wr_hi,
  output logic [31:0]       incr_wdata,
  input  logic [IW-1:0] incr,
  // Real Time Register load
  output logic              rtr_load,
  output rtr_t              rtr_load_val,
  // Timestamp Register
  output logic              ts_snap,
  input  ts_t               ts_host,
  // PPS Register
  input  rtr_t              ppsr,
  input  logic              pps_new,
  output logic              pps_clr,
  // link status
  input  logic              link_init
);

  logic [31:0] f0_q, f1_q;
  logic [31:0] rdata_d;
  logic [63:0] incr64;

  assign incr64 = 64'(incr);

  // Write strobes.
  always_comb begin
    incr_wr_lo = bus_wr && (bus_addr == A_INCR_LO);
    incr_wr_hi = bus_wr && (bus_addr == A_INCR_HI);
    incr_wdata = bus_wdata;
    rtr_load   = bus_wr && (bus_addr == A_RTR_SEC);
    ts_snap    = bus_wr && (bus_addr == A_CTRL) && bus_wdata[0];
    pps_clr    = bus_wr && (bus_addr == A_STATUS) && bus_wdata[0];
    rtr_load_val.sec  = bus_wdata;
    rtr_load_val.frac = {f1_q, f0_q};
  end

  // Staged fraction words of the RTR load value.
  always_ff @(posedge clk) begin
    if (rst) begin
      f0_q <= '0;
      f1_q <= '0;
    end else if (bus_wr) begin
      if (bus_addr == A_RTR_F0) f0_q <= bus_wdata;
      if (bus_addr == A_RTR_F1) f1_q <= bus_wdata;
    end
  end

  // Read multiplexer.
  always_comb begin
    unique case (bus_addr)
      A_INCR_LO:  rdata_d = incr64[31:0];
      A_INCR_HI:  rdata_d = incr64[63:32];
      A_TSR_FRAC: rdata_d = ts_host.frac;
      A_TSR_SEC:  rdata_d = ts_host.sec;
      A_PPSR_F0:  rdata_d = ppsr.frac[31:0];
      A_PPSR_F1:  rdata_d = ppsr.frac[63:32];
      A_PPSR_SEC: rdata_d = ppsr.sec;
      A_STATUS:   rdata_d = {30'd0, link_init, pps_new};
      default:    rdata_d = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bus_rdata  <= '0;
      bus_rvalid <= 1'b0;
    end else begin
      bus_rvalid <= bus_rd;
      if (bus_rd)
        bus_rdata <= rdata_d;
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(bus_wr && bus_rd))
    else $error("reg_bank: read and write in the same cycle");

endmodule
