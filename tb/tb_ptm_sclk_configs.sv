// tb_ptm_sclk_configs: the generator at the three clock settings the
// architecture names, SCLK = 60, 80 and 100 MHz (crystal x 6, 8, 10), each
// with INCR = round(2^64 / SCLK): 0x47_9531_9CA2, 0x35_AFE5_3579 and
// 0x2A_F31D_C461. Each configuration is checked by ptm_cfg_check: the clock
// keeps real time, PPTSF follows INCR/2^40 per cycle, and the external
// card's timestamp stays valid.
`timescale 1ns/1ps
module tb_ptm_sclk_configs;
  logic done6, done8, done10;
  int   c6, c8, c10, f6, f8, f10;

  ptm_cfg_check #(.MULT(6),  .INCR(40'h47_9531_9CA2)) u6  (.done(done6),  .checks(c6),  .failures(f6));
  ptm_cfg_check #(.MULT(8),  .INCR(40'h35_AFE5_3579)) u8  (.done(done8),  .checks(c8),  .failures(f8));
  ptm_cfg_check #(.MULT(10), .INCR(40'h2A_F31D_C461)) u10 (.done(done10), .checks(c10), .failures(f10));

  initial begin
    #1_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c6 + c8 + c10, f6 + f8 + f10 + 1);
    $finish;
  end

  initial begin
    wait (done6 && done8 && done10);
    $display("TB_RESULT checks=%0d failures=%0d", c6 + c8 + c10, f6 + f8 + f10);
    $finish;
  end
endmodule
