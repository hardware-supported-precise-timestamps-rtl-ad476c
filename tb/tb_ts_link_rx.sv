// tb_ts_link_rx: self-checking test of the timestamp link receiver.
// A transmitter model in this testbench advances a 64-bit timestamp by
// 0..256 units per cycle and drives TS_DATA/TS_DV/PPTSF by the link
// protocol, answering each INIT pulse of the receiver after a random delay
// with an eight-beat Init transfer. The receiver must ask for Init after
// reset and after `resync`, and whenever it flags ts_valid its timestamp
// must equal the transmitted one of the cycle just received. The timestamp
// also jumps (as after a clock load); after a resync the receiver must
// follow again.
`timescale 1ns/1ps
module tb_ts_link_rx;
  import ptm_pkg::*;
  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] ts_data;
  logic       ts_dv, pptsf;
  logic       resync;
  logic       init_out;
  ts_t        ts_out;
  logic       ts_valid;
  int checks = 0, failures = 0;

  ts_link_rx dut (.clk, .rst, .ts_data, .ts_dv, .pptsf, .resync, .init_out, .ts_out, .ts_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] ts, prev, snap;
    int          beat, wait_cnt, inits, valid_cycles, init_reqs;
    bit          pending, jumped, stale;
    rst = 1'b1; resync = 1'b0;
    ts = 64'h4779_8280_0000_1234;
    ts_data = '0; ts_dv = 1'b0; pptsf = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    beat = -1; pending = 0; wait_cnt = 0; inits = 0; valid_cycles = 0;
    init_reqs = 0; jumped = 0; stale = 0;
    for (int i = 0; i < 30000; i++) begin
      // Transmitter model: one cycle of the link.
      prev = ts;
      ts   = ts + 64'($urandom_range(0, 256));
      if (i % 5000 == 2500) begin
        ts = ts + 64'h0000_0001_0000_0000;   // clock stepped by one second
        jumped = 1;
        stale  = 1;
      end
      pptsf = (ts[63:8] != prev[63:8]);
      if (beat < 0 && pending && wait_cnt == 0) begin
        snap = ts; beat = 0; pending = 0;
      end else if (wait_cnt > 0) begin
        wait_cnt--;
      end
      if (beat >= 0) begin
        ts_data = snap[8*beat +: 8]; ts_dv = 1'b1;
        beat = (beat == 7) ? -1 : beat + 1;
      end else begin
        ts_data = ts[7:0]; ts_dv = 1'b0;
      end
      resync = jumped;
      @(negedge clk);
      if (init_out) begin
        pending = 1; wait_cnt = $urandom_range(0, 4); init_reqs++;
      end
      // Until the next Init transfer the receiver cannot know of a jump.
      jumped = 0;
      if (ts_dv && beat < 0) stale = 0;
      if (ts_valid) begin
        valid_cycles++;
        checks++;
        if (ts_out !== ts && !stale) begin
          failures++;
          $display("FAIL cycle %0d: rx %h expected %h", i, ts_out, ts);
        end
      end
      if (ts_dv) begin
        checks++;
        if (ts_valid) begin
          failures++;
          $display("FAIL cycle %0d: valid during Init", i);
        end
      end
      if (beat == 7) inits++;
    end
    // One Init after reset plus one per jump.
    checks++;
    if (init_reqs != 7 || valid_cycles < 25000) begin
      failures++;
      $display("FAIL init_reqs=%0d valid_cycles=%0d", init_reqs, valid_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
