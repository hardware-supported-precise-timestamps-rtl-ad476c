// tb_ptm_packets: packet timestamping workload on the external card.
//
// Minimum-size Ethernet packets (64 bytes plus 8 bytes preamble and 12
// bytes inter-frame gap = 84 bytes) arrive back to back, asynchronously to
// the generator clock: every 67.2 ns on a 10 Gbit/s link, then every
// 672 ns on a 1 Gbit/s link. Each arrival is stamped with the external
// card's rebuilt timestamp at the next REFCLK edge. Checked for every
// packet: the stamp is larger than the previous one (distinct and
// monotonic), and the stamp difference matches the arrival gap to within
// one SCLK period plus rounding. The top runs at its default parameters
// (100 MHz SCLK).
`timescale 1ns/1ps
module tb_ptm_packets;
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

  always #50 xtal_clk = ~xtal_clk;

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge sclk);
    bus_addr = a; bus_wdata = d; bus_wr = 1'b1;
    @(negedge sclk);
    bus_wr = 1'b0;
  endtask

  // Stamp `npkt` packets spaced `gap_ns` apart; return the number stamped.
  task automatic run_link(input real gap_ns, input int npkt, input string name);
    realtime t_arr, t_prev_arr;
    logic [63:0] stamp, prev_stamp;
    real d_ns;
    int ok = 0;
    for (int p = 0; p < npkt; p++) begin
      #(gap_ns);
      t_arr = $realtime;
      @(posedge refclk);
      stamp = ext_ts;
      if (p > 0) begin
        d_ns = real'(stamp - prev_stamp) / (2.0 ** 32) * 1.0e9;
        checks++;
        if (!ext_ts_valid || stamp <= prev_stamp ||
            d_ns < (t_arr - t_prev_arr) - 11.0 || d_ns > (t_arr - t_prev_arr) + 11.0) begin
          failures++;
          $display("FAIL %s packet %0d: stamp %h prev %h diff %f ns gap %f ns",
                   name, p, stamp, prev_stamp, d_ns, t_arr - t_prev_arr);
        end else ok++;
      end
      prev_stamp = stamp;
      t_prev_arr = t_arr;
    end
    $display("%s: %0d packets, %0d consecutive stamps distinct and within one cycle of the true gap",
             name, npkt, ok);
  endtask

  initial begin
    rst_n = 1'b0; pps_in = 1'b0; ext_resync = 1'b0;
    bus_addr = '0; bus_wr = 1'b0; bus_rd = 1'b0; bus_wdata = '0;
    #350;
    rst_n = 1'b1;
    wait (sclk_locked);
    repeat (10) @(negedge sclk);
    // Set the clock shortly before a second boundary so that the stream
    // crosses it, then let the external card resynchronise.
    bus_write(A_RTR_F0, 32'h0);
    bus_write(A_RTR_F1, 32'hFFFF_0000);
    bus_write(A_RTR_SEC, 32'd1199145600);
    @(negedge sclk);
    ext_resync = 1'b1;
    @(negedge sclk);
    ext_resync = 1'b0;
    @(negedge ext_ts_valid);     // Init transfer under way
    wait (ext_ts_valid);
    repeat (2) @(negedge sclk);
    #3.3;                          // arrivals off the clock grid
    run_link(67.2, 2000, "10 Gbit/s");
    run_link(672.0, 300, "1 Gbit/s");
    checks++;
    if (ext_ts.sec != 32'd1199145601) begin
      failures++;
      $display("FAIL the stream should have crossed into the next second");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
