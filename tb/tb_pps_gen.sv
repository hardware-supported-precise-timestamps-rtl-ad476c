// tb_pps_gen: self-checking test of the PPS output.
// The real time input advances by a large random step each cycle so that
// many seconds pass. The output must be high exactly in the cycle after
// RTR showed a fraction below 1/8 s, and it must rise once per second.
`timescale 1ns/1ps
module tb_pps_gen;
  import ptm_pkg::*;
  logic clk = 1'b0;
  logic rst;
  rtr_t rtr_in;
  logic pps_out;
  int checks = 0, failures = 0;

  pps_gen dut (.clk, .rst, .rtr_in, .pps_out);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        prev_out;
    logic        expect_high;
    int          rises, seconds;
    logic [31:0] sec0;
    rst = 1'b1;
    rtr_in = {32'd1199145600, 64'hF000_0000_0000_0000};
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    prev_out = pps_out;
    sec0 = rtr_in.sec;
    rises = 0;
    for (int i = 0; i < 20000; i++) begin
      expect_high = (rtr_in.frac < 64'h2000_0000_0000_0000);
      @(negedge clk);
      checks++;
      if (pps_out !== expect_high) begin
        failures++;
        $display("FAIL cycle %0d: pps_out=%b frac=%h", i, pps_out, rtr_in.frac);
      end
      if (pps_out && !prev_out) rises++;
      prev_out = pps_out;
      // advance by 1/64 .. 1/8 s
      rtr_in = rtr_in + {32'd0, 64'h0400_0000_0000_0000 + {$urandom, $urandom} % 64'h1C00_0000_0000_0000};
    end
    seconds = int'(rtr_in.sec - sec0);
    checks++;
    if (rises < seconds - 1 || rises > seconds + 1 || seconds < 100) begin
      failures++;
      $display("FAIL rises=%0d seconds=%0d", rises, seconds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
