// tb_rtr: self-checking test of the Real Time Register.
// Reproduces the worked example of a 100 MHz clock started from zero
// (0x2A_F31D_C461 after one cycle, 0x55_E63B_88C2 after two), the
// initialisation to 2008-01-01 00:00:00 UTC (1199145600 s = 0x4779_8280),
// the carry of the fraction into the seconds at exactly the expected cycle,
// and random increments against a reference model.
`timescale 1ns/1ps
module tb_rtr;
  import ptm_pkg::*;
  logic        clk = 1'b0;
  logic        rst;
  logic [39:0] incr;
  logic        load;
  rtr_t        load_val;
  rtr_t        rtr_q;
  int checks = 0, failures = 0;

  rtr dut (.clk, .rst, .incr, .load, .load_val, .rtr_q);

  always #5 clk = ~clk;

  task automatic check(input logic [95:0] exp, input string what);
    checks++;
    if (rtr_q !== exp) begin
      failures++;
      $display("FAIL %s: rtr=%h expected %h", what, rtr_q, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [95:0] model;
    int          n;
    rst = 1'b1; load = 1'b0; load_val = '0;
    incr = 40'h2A_F31D_C461;
    repeat (3) @(negedge clk);
    check('0, "reset");
    rst = 1'b0;
    @(negedge clk);
    check(96'h0000_0000_0000_002A_F31D_C461, "first cycle");
    @(negedge clk);
    check(96'h0000_0000_0000_0055_E63B_88C2, "second cycle");
    // Initialise to 1.1.2008 00:00:00 UTC.
    load = 1'b1; load_val = {32'd1199145600, 64'd0};
    @(negedge clk);
    load = 1'b0;
    check(96'h4779_8280_0000_0000_0000_0000, "load 2008");
    @(negedge clk);
    check(96'h4779_8280_0000_002A_F31D_C461, "after load +1");
    // The second rolls over exactly after n increments.
    n = 37;
    load = 1'b1;
    load_val = {32'd1199145600, 64'(-(n * 64'h2A_F31D_C461)) + 64'd5};
    @(negedge clk);
    load = 1'b0;
    for (int i = 1; i <= n; i++) begin
      @(negedge clk);
      checks++;
      if (rtr_q.sec !== ((i == n) ? 32'd1199145601 : 32'd1199145600)) begin
        failures++;
        $display("FAIL carry at step %0d: sec=%0d", i, rtr_q.sec);
      end
    end
    check({32'd1199145601, 64'd5}, "fraction after carry");
    // Random increments.
    model = rtr_q;
    for (int k = 0; k < 50; k++) begin
      incr = {8'($urandom), 32'($urandom)};
      repeat (20) begin
        @(negedge clk);
        model = model + {56'd0, incr};
        check(model, "random increment");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
