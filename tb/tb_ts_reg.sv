// tb_ts_reg: self-checking test of the Timestamp Register.
// Random real time values are applied every cycle. The live copy must be
// the upper 64 bits (seconds and top 32 fraction bits) of the previous
// cycle's value; the host copy must take that value only on a snapshot
// request and hold it otherwise.
`timescale 1ns/1ps
module tb_ts_reg;
  import ptm_pkg::*;
  logic clk = 1'b0;
  logic rst;
  rtr_t rtr_in;
  logic snap;
  ts_t  ts_live, ts_host;
  int checks = 0, failures = 0;

  ts_reg dut (.clk, .rst, .rtr_in, .snap, .ts_live, .ts_host);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] held;
    int          nsnap = 0;
    rst = 1'b1; snap = 1'b0; rtr_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    held = '0;
    for (int i = 0; i < 2000; i++) begin
      rtr_in = {$urandom, $urandom, $urandom};
      snap = ($urandom_range(0, 9) == 0);
      @(negedge clk);
      // The edge between drive and check registered this cycle's input.
      if (snap) begin held = rtr_in[95:32]; nsnap++; end
      checks++;
      if (ts_live !== rtr_in[95:32]) begin
        failures++;
        $display("FAIL live %h expected %h", ts_live, rtr_in[95:32]);
      end
      checks++;
      if (ts_host !== held) begin
        failures++;
        $display("FAIL host %h expected %h", ts_host, held);
      end
    end
    checks++;
    if (nsnap < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
