// tb_incr_reg: self-checking test of the Incremental Register.
// Checks the reset value (2^64 / 100 MHz), that a low-word write alone does
// not change INCR, that the high-word write commits both halves in one
// cycle, and random two-word updates against a reference model.
`timescale 1ns/1ps
module tb_incr_reg;
  logic        clk = 1'b0;
  logic        rst;
  logic        wr_lo, wr_hi;
  logic [31:0] wdata;
  logic [39:0] incr;
  int checks = 0, failures = 0;

  incr_reg dut (.clk, .rst, .wr_lo, .wr_hi, .wdata, .incr);

  always #5 clk = ~clk;

  task automatic check(input logic [39:0] exp, input string what);
    checks++;
    if (incr !== exp) begin
      failures++;
      $display("FAIL %s: incr=%h expected %h", what, incr, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [39:0] model;
    logic [31:0] lo;
    logic [7:0]  hi;
    rst = 1'b1; wr_lo = 1'b0; wr_hi = 1'b0; wdata = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    // 2^64 / 100e6 = 184467440737.09... -> 0x2A_F31D_C461
    check(40'h2A_F31D_C461, "reset value");
    model = 40'h2A_F31D_C461;
    for (int i = 0; i < 200; i++) begin
      lo = $urandom; hi = 8'($urandom);
      wr_lo = 1'b1; wdata = lo;
      @(negedge clk);
      wr_lo = 1'b0;
      check(model, "after low write only");
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        check(model, "staged, idle");
      end
      wr_hi = 1'b1; wdata = {24'($urandom), hi};
      @(negedge clk);
      wr_hi = 1'b0;
      model = {hi, lo};
      check(model, "after high write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
