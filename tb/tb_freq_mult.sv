// tb_freq_mult: self-checking test of the clock multiplier model.
// A 10 MHz reference (100 ns) must give, once locked, exactly N = 10 output
// rising edges per reference period, 10 ns apart; the output must stop and
// `locked` fall while reset is applied, and lock again afterwards.
`timescale 1ns/1ps
module tb_freq_mult;
  logic clk_in = 1'b0;
  logic rst;
  logic clk_out, locked;
  int checks = 0, failures = 0;
  int edges = 0;
  realtime t_prev, t_now;
  int bad_period = 0;

  freq_mult dut (.clk_in, .rst, .clk_out, .locked);   // default N = 10

  always #50 clk_in = ~clk_in;

  always @(posedge clk_out) begin
    t_now = $realtime;
    if (edges > 0 && locked && (t_now - t_prev < 9.99 || t_now - t_prev > 10.01))
      bad_period++;
    t_prev = t_now;
    edges++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0;
    rst = 1'b1;
    #320;
    rst = 1'b0;
    check(locked == 1'b0, "not locked before two reference edges");
    repeat (3) @(posedge clk_in);
    #1;
    check(locked == 1'b1, "locked");
    for (int k = 0; k < 20; k++) begin
      e0 = edges;
      @(posedge clk_in);
      #1;
      check(edges - e0 == 10, $sformatf("10 output edges per reference period, got %0d", edges - e0));
    end
    check(bad_period == 0, "10 ns output period");
    rst = 1'b1;
    #1;
    check(locked == 1'b0, "unlocked in reset");
    repeat (2) @(posedge clk_in);
    #60;
    e0 = edges;
    repeat (3) @(posedge clk_in);
    check(edges == e0, "no output in reset");
    #10;
    rst = 1'b0;
    repeat (4) @(posedge clk_in);
    #1;
    check(locked == 1'b1, "locked again");
    e0 = edges;
    @(posedge clk_in);
    #1;
    check(edges - e0 == 10, "10 edges after relock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
