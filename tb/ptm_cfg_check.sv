// ptm_cfg_check: checks one clock configuration of ptm_top (testbench
// helper for tb_ptm_sclk_configs).
//
// Builds the top with SCLK = MULT x 10 MHz and the matching increment
// INCR = round(2^64 / SCLK), drives it from its own 10 MHz crystal, sets
// the time, and then, over a 20 us window of simulated time, checks that
//   - the timestamp read through two atomic snapshots advanced by the
//     elapsed real time (to within one SCLK period),
//   - INCR reads back as configured,
//   - PPTSF pulsed INCR/2^40 times per cycle on average (+-2),
//   - the external card's timestamp stayed valid and moved forward.
// Results are returned as counts; `done` rises when finished.
`timescale 1ns/1ps
module ptm_cfg_check #(
  parameter int unsigned MULT = 10,
  parameter logic [39:0] INCR = 40'h2A_F31D_C461
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import ptm_pkg::*;

  logic        xtal_clk = 1'b0;
  logic        rst_n;
  logic        sclk, sclk_locked;
  logic        pps_in, pps_out;
  logic [7:0]  bus_addr;
  logic        bus_wr, bus_rd;
  logic [31:0] bus_wdata, bus_rdata;
  logic        bus_rvalid;
  logic        refclk;
  logic [7:0]  cab_ts_data;
  logic        cab_ts_dv, cab_pptsf, cab_init;
  logic        ext_resync;
  ts_t         ext_ts;
  logic        ext_ts_valid;

  ptm_top #(.MULT(MULT), .INCR_RESET(INCR)) dut (.*);

  always #50 xtal_clk = ~xtal_clk;

  int  n_cycles = 0, n_pptsf = 0, n_invalid = 0;
  bit  window = 0;
  always @(posedge sclk) if (window) begin
    n_cycles++;
    if (cab_pptsf) n_pptsf++;
    if (!ext_ts_valid) n_invalid++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL MULT=%0d: %s", MULT, what);
    end
  endtask

  task automatic bus_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge sclk);
    bus_addr = a; bus_wdata = d; bus_wr = 1'b1;
    @(negedge sclk);
    bus_wr = 1'b0;
  endtask

  task automatic bus_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge sclk);
    bus_addr = a; bus_rd = 1'b1;
    @(negedge sclk);
    bus_rd = 1'b0;
    d = bus_rdata;
  endtask

  // Snapshot at the next negedge; returns the stamp and the time of the
  // SCLK edge that took it.
  task automatic snap(output logic [63:0] ts, output realtime t);
    logic [31:0] s, f;
    @(negedge sclk);
    bus_addr = A_CTRL; bus_wdata = 32'h1; bus_wr = 1'b1;
    @(posedge sclk);
    t = $realtime;
    @(negedge sclk);
    bus_wr = 1'b0;
    bus_read(A_TSR_FRAC, f);
    bus_read(A_TSR_SEC, s);
    ts = {s, f};
  endtask

  initial begin
    logic [31:0] lo, hi;
    logic [63:0] ts1, ts2, e1, e2;
    realtime     t1, t2;
    real         d_ns, per_ns, exp_pptsf;
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; pps_in = 1'b0; ext_resync = 1'b0;
    bus_addr = '0; bus_wr = 1'b0; bus_rd = 1'b0; bus_wdata = '0;
    #350;
    rst_n = 1'b1;
    wait (sclk_locked);
    repeat (10) @(negedge sclk);
    bus_read(A_INCR_LO, lo);
    bus_read(A_INCR_HI, hi);
    check({hi[7:0], lo} == INCR, "INCR reset value");
    bus_write(A_RTR_F0, 32'h0);
    bus_write(A_RTR_F1, 32'h0);
    bus_write(A_RTR_SEC, 32'd1199145600);
    @(negedge sclk);
    ext_resync = 1'b1;
    @(negedge sclk);
    ext_resync = 1'b0;
    @(negedge ext_ts_valid);
    wait (ext_ts_valid);
    repeat (2) @(negedge sclk);
    snap(ts1, t1);
    e1 = ext_ts;
    window = 1;
    #20000;
    window = 0;
    snap(ts2, t2);
    e2 = ext_ts;
    per_ns = 1000.0 / (10.0 * MULT);
    d_ns = real'(ts2 - ts1) / (2.0 ** 32) * 1.0e9;
    check(d_ns > (t2 - t1) - per_ns && d_ns < (t2 - t1) + per_ns,
          $sformatf("time advanced %f ns in %f ns", d_ns, t2 - t1));
    exp_pptsf = real'(n_cycles) * real'(INCR) / (2.0 ** 40);
    check(real'(n_pptsf) > exp_pptsf - 2.0 && real'(n_pptsf) < exp_pptsf + 2.0,
          $sformatf("PPTSF %0d in %0d cycles, expected %f", n_pptsf, n_cycles, exp_pptsf));
    check(n_invalid == 0 && e2 > e1, "external timestamp valid and advancing");
    check(n_cycles > 0, "SCLK ran");
    $display("MULT=%0d: SCLK period %f ns, %0d cycles, %0d PPTSF, %0d checks, %0d failures",
             MULT, per_ns, n_cycles, n_pptsf, checks, failures);
    done = 1'b1;
  end
endmodule
