// tb_ts_link_tx: self-checking test of the timestamp link transmitter.
// The live timestamp advances by a random 0..256 units per cycle (the range
// a 40-bit increment allows). In Fast mode TS_DATA must be the low byte and
// PPTSF must mark each change of the upper 56 bits. A rising INIT edge must
// produce exactly eight TS_DV beats carrying the timestamp of that cycle,
// least significant byte first, with PPTSF still reporting overflows, and
// an INIT edge during the transfer must be ignored. The expected outputs
// come from a reference model of the protocol kept in this testbench.
`timescale 1ns/1ps
module tb_ts_link_tx;
  import ptm_pkg::*;
  logic       clk = 1'b0;
  logic       rst;
  ts_t        ts_in;
  logic       init_in;
  logic [7:0] ts_data;
  logic       ts_dv, pptsf;
  link_mode_e mode;
  int checks = 0, failures = 0;

  ts_link_tx dut (.clk, .rst, .ts_in, .init_in, .ts_data, .ts_dv, .pptsf, .mode);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] prev, snap_m;
    logic        init_q_m, busy_m, rise;
    logic [7:0]  exp_data;
    logic        exp_dv, exp_pptsf;
    int          beat_m, inits, dv_beats, ovfs, ovf_in_init;
    rst = 1'b1; init_in = 1'b0;
    ts_in = 64'h4779_8280_FFFF_FE00;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    prev = '0; init_q_m = 1'b0; busy_m = 1'b0; beat_m = 0; snap_m = '0;
    inits = 0; dv_beats = 0; ovfs = 0; ovf_in_init = 0;
    for (int i = 0; i < 12000; i++) begin
      prev  = ts_in;
      ts_in = ts_in + 64'($urandom_range(0, 256));
      // INIT: pulses of 1..3 cycles, sometimes during a transfer.
      if (!init_in && $urandom_range(0, 40) == 0) init_in = 1'b1;
      else if (init_in && $urandom_range(0, 1) == 0) init_in = 1'b0;
      @(negedge clk);
      // Reference model of the cycle just registered.
      rise = init_in && !init_q_m;
      exp_pptsf = (i == 0) ? (ts_in[63:8] != 56'd0) : (ts_in[63:8] != prev[63:8]);
      if (!busy_m) begin
        exp_data = ts_in[7:0];
        exp_dv   = rise;
        if (rise) begin
          snap_m = ts_in; beat_m = 1; busy_m = 1'b1; inits++;
        end
      end else begin
        exp_data = snap_m[8*beat_m +: 8];
        exp_dv   = 1'b1;
        if (beat_m == 7) busy_m = 1'b0;
        beat_m++;
      end
      init_q_m = init_in;
      if (exp_dv) dv_beats++;
      if (exp_pptsf && i > 0) ovfs++;
      if (exp_pptsf && exp_dv && i > 0) ovf_in_init++;
      checks++;
      if (ts_data !== exp_data || ts_dv !== exp_dv || pptsf !== exp_pptsf) begin
        failures++;
        $display("FAIL cycle %0d: data=%h/%h dv=%b/%b pptsf=%b/%b", i,
                 ts_data, exp_data, ts_dv, exp_dv, pptsf, exp_pptsf);
      end
      checks++;
      if ((mode == LINK_INIT) !== busy_m) begin
        failures++;
        $display("FAIL cycle %0d: mode", i);
      end
    end
    // Every Init transfer is exactly eight beats; overflows were seen both
    // in Fast mode and during Init transfers.
    checks++;
    if (inits < 20 || dv_beats != 8 * inits - (busy_m ? 8 - beat_m : 0) ||
        ovfs < 1000 || ovf_in_init < 10) begin
      failures++;
      $display("FAIL counts inits=%0d beats=%0d ovfs=%0d in_init=%0d",
               inits, dv_beats, ovfs, ovf_in_init);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
