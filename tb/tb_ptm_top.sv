// tb_ptm_top: end-to-end test of the timestamp generator at its default
// parameters (10 MHz crystal multiplied by 10, INCR reset value for
// 100 MHz).
//
// A reference model in this testbench follows every host write and keeps
// its own 96-bit copy of the real time; the design is checked against it:
//   - INCR reads back its reset value 2^64/100e6 = 0x2A_F31D_C461;
//   - the clock is set to 2008-01-01 00:00:00 UTC (0x4779_8280 s) and the
//     atomic Timestamp Register snapshot equals the model;
//   - the PPS output rises once at each second of the model, and is high
//     while the fraction is under 1/8 s;
//   - a reference PPS is captured into PPSR with the model's value and sets
//     the status flag, which the host clears;
//   - one step of the host PI regulator (Ci = 2^-18, Cp = 2^-8) computes a
//     new increment from the captured phase error and writes it; the clock
//     then advances by the new increment;
//   - the external card's receiver, after each resync, shows the model's
//     timestamp three cycles late; PPTSF overflows occur about every 60 ns
//     (INCR / 2^40 per cycle), also during Init transfers.
// Each of these mechanisms is counted and must have happened.
`timescale 1ns/1ps
module tb_ptm_top;
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

  int checks = 0, failures = 0;

  ptm_top dut (.*);

  always #50 xtal_clk = ~xtal_clk;   // 10 MHz crystal

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------ reference model
  bit          model_on = 0;
  logic [95:0] model;
  logic [39:0] incr_m = 40'h2A_F31D_C461;
  logic [31:0] incr_lo_m = 32'h0;
  logic [31:0] f0_m = '0, f1_m = '0;
  logic [63:0] hist [3];
  logic [63:0] exp_tsr;
  logic [95:0] exp_ppsr;
  bit          exp_pps_q = 0, pps_chk = 0;
  int          pps_cnt = 0;
  bit          stale = 1;
  bit          pptsf_count_on = 0;
  int          pptsf_seen = 0, pptsf_cycles = 0;
  logic        pps_out_q = 1'b0;

  // mechanism counters
  int n_load = 0, n_incr = 0, n_snap = 0, n_ppscap = 0, n_ppsclr = 0;
  int n_ppsout = 0, n_carry = 0, n_init = 0, n_pptsf = 0, n_pptsf_init = 0;
  int n_rxchk = 0, n_resync = 0;

  always @(posedge sclk) begin
    // Outputs set at the previous edge, against the model's history.
    if (model_on) begin
      if (pps_chk) begin
        checks++;
        if (pps_out !== exp_pps_q) begin
          failures++;
          $display("FAIL pps_out=%b expected %b", pps_out, exp_pps_q);
        end
      end
      if (ext_ts_valid && !stale) begin
        n_rxchk++;
        checks++;
        if (ext_ts !== hist[2]) begin
          failures++;
          $display("FAIL ext_ts %h expected %h", ext_ts, hist[2]);
        end
      end
      if (cab_ts_dv) stale = 0;
    end
    if (pps_out && !pps_out_q) n_ppsout++;
    pps_out_q = pps_out;
    if (cab_pptsf) n_pptsf++;
    if (cab_pptsf && cab_ts_dv) n_pptsf_init++;
    if (pptsf_count_on) begin
      pptsf_cycles++;
      if (cab_pptsf) pptsf_seen++;
    end
    // Register semantics of the host writes sampled at this edge.
    if (bus_wr && bus_addr == A_INCR_LO) incr_lo_m = bus_wdata;
    if (bus_wr && bus_addr == A_RTR_F0) f0_m = bus_wdata;
    if (bus_wr && bus_addr == A_RTR_F1) f1_m = bus_wdata;
    if (model_on && bus_wr && bus_addr == A_CTRL && bus_wdata[0]) begin
      exp_tsr = model[95:32];
      n_snap++;
    end
    if (model_on && pps_in && pps_cnt < 3) begin
      pps_cnt++;
      if (pps_cnt == 3) exp_ppsr = model;
    end
    exp_pps_q = (model[63:61] == 3'b000);
    pps_chk   = model_on;
    hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = model[95:32];
    if (bus_wr && bus_addr == A_RTR_SEC) begin
      model    = {bus_wdata, f1_m, f0_m};
      model_on = 1;
      stale    = 1;
      n_load++;
    end else begin
      if (model_on && (model + {56'd0, incr_m}) >> 64 != model >> 64) n_carry++;
      model = model + {56'd0, incr_m};
    end
    if (bus_wr && bus_addr == A_INCR_HI) begin
      incr_m = {bus_wdata[7:0], incr_lo_m};
      n_incr++;
    end
    if (cab_init) n_init++;
    if (ext_resync) n_resync++;
  end

  // ------------------------------------------------------------ host bus
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
    check(bus_rvalid == 1'b1, "read data valid after one cycle");
    d = bus_rdata;
  endtask

  task automatic load_rtr(input logic [95:0] v);
    bus_write(A_RTR_F0, v[31:0]);
    bus_write(A_RTR_F1, v[63:32]);
    bus_write(A_RTR_SEC, v[95:64]);
    @(negedge sclk);
    ext_resync = 1'b1;     // the external card must re-read the time
    @(negedge sclk);
    ext_resync = 1'b0;
  endtask

  task automatic snapshot_and_check();
    logic [31:0] s, f;
    bus_write(A_CTRL, 32'h1);
    repeat ($urandom_range(0, 20)) @(negedge sclk);   // time moves on
    bus_read(A_TSR_FRAC, f);
    bus_read(A_TSR_SEC, s);
    check({s, f} == exp_tsr, $sformatf("TSR %h expected %h", {s, f}, exp_tsr));
  endtask

  // --------------------------------------------------------------- watchdog
  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // -------------------------------------------------------------- sequence
  initial begin
    logic [31:0] lo, hi, w0, w1, w2, st;
    logic [39:0] incr_new;
    longint      err;
    real         err_s, drift, adj;
    rst_n = 1'b0; pps_in = 1'b0; ext_resync = 1'b0;
    bus_addr = '0; bus_wr = 1'b0; bus_rd = 1'b0; bus_wdata = '0;
    #350;
    rst_n = 1'b1;
    wait (sclk_locked);
    repeat (10) @(negedge sclk);

    // Reset value of the increment.
    bus_read(A_INCR_LO, lo);
    bus_read(A_INCR_HI, hi);
    check({hi[7:0], lo} == 40'h2A_F31D_C461 && hi[31:8] == 0, "INCR reset value");
    incr_lo_m = lo;

    // Set the clock to 1.1.2008 00:00:00 UTC and read it back atomically.
    load_rtr({32'd1199145600, 64'd0});
    repeat (3) snapshot_and_check();
    check(exp_tsr[63:32] == 32'h4779_8280, "seconds of 2008-01-01");

    // PPTSF rate in Fast mode: INCR/2^40 overflows per cycle (one per
    // ~6 cycles = ~60 ns at 100 MHz).
    repeat (40) @(negedge sclk);
    pptsf_count_on = 1;
    repeat (6000) @(negedge sclk);
    pptsf_count_on = 0;
    check(pptsf_seen >= 1004 && pptsf_seen <= 1009 && pptsf_cycles == 6000,
          $sformatf("PPTSF rate %0d in %0d cycles", pptsf_seen, pptsf_cycles));

    // Approach a second boundary: 300 cycles before the next second.
    load_rtr({32'd1199145601, 64'(-(300 * 64'h2A_F31D_C461))});
    // The reference PPS arrives 4.3 ns after an edge 250 cycles later,
    // i.e. the local clock is behind the reference.
    repeat (249) @(negedge sclk);
    @(posedge sclk);
    #4.3;
    pps_in = 1'b1;
    repeat (100) @(negedge sclk);
    bus_read(A_STATUS, st);
    check(st[0] == 1'b1, "PPS capture flag set");
    n_ppscap += st[0];
    bus_read(A_PPSR_F0, w0);
    bus_read(A_PPSR_F1, w1);
    bus_read(A_PPSR_SEC, w2);
    check({w2, w1, w0} == exp_ppsr, $sformatf("PPSR %h expected %h", {w2, w1, w0}, exp_ppsr));
    bus_write(A_STATUS, 32'h1);
    bus_read(A_STATUS, st);
    check(st[0] == 1'b0, "PPS capture flag cleared");
    if (st[0] == 1'b0) n_ppsclr++;
    pps_in = 1'b0;

    // One step of the host PI regulator from the captured phase error.
    err   = longint'({w1, w0});
    err_s = real'(err) / (2.0 ** 64);
    drift = 0.0 + err_s * (2.0 ** -18);
    adj   = -drift - err_s * (2.0 ** -8);
    incr_new = 40'(longint'(real'(incr_m) * (1.0 + adj)));
    check(err < 0, "clock behind reference gives a negative error");
    check(incr_new > incr_m, "regulator speeds the clock up");
    bus_write(A_INCR_LO, incr_new[31:0]);
    bus_write(A_INCR_HI, {24'd0, incr_new[39:32]});
    bus_read(A_INCR_LO, lo);
    bus_read(A_INCR_HI, hi);
    check({hi[7:0], lo} == incr_new, "new INCR read back");
    repeat (2) snapshot_and_check();

    // Several more seconds, with the new increment, through the PPS output;
    // the external card resynchronises meanwhile.
    for (int s = 0; s < 3; s++) begin
      load_rtr({32'd1199145610 + s, 64'(-(200 * 64'h2A_F31D_C461))});
      repeat (400) @(negedge sclk);
      snapshot_and_check();
    end
    repeat (20) @(negedge sclk);

    $display("mechanisms: load=%0d incr=%0d snap=%0d ppscap=%0d ppsclr=%0d ppsout=%0d carry=%0d init=%0d pptsf=%0d pptsf_in_init=%0d rx_checks=%0d resync=%0d",
             n_load, n_incr, n_snap, n_ppscap, n_ppsclr, n_ppsout, n_carry,
             n_init, n_pptsf, n_pptsf_init, n_rxchk, n_resync);
    check(n_load >= 1,       "RTR load happened");
    check(n_incr >= 1,       "INCR update happened");
    check(n_snap >= 1,       "TSR snapshot happened");
    check(n_ppscap >= 1,     "PPS capture happened");
    check(n_ppsclr >= 1,     "PPS flag clear happened");
    check(n_ppsout >= 4,     "PPS output pulses happened");
    check(n_carry >= 4,      "second carry happened");
    check(n_init >= 5,       "link Init transfer happened");
    check(n_pptsf >= 1000,   "PPTSF overflow happened");
    check(n_pptsf_init >= 1, "PPTSF during Init happened");
    check(n_rxchk >= 5000,   "external timestamp checked");
    check(n_resync >= 5,     "receiver resync happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
