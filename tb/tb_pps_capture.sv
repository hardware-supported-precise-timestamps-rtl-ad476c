// tb_pps_capture: self-checking test of the PPS register.
// The real time input is a cycle counter. PPS rises at random times between
// clock edges; the register must hold the counter value of the cycle
// SYNC_STAGES+1 edges after the first edge that sampled PPS high (for the
// default of 2, the counter value two edges after the edge preceding the
// PPS rise), raise the new-capture flag, pulse the strobe once per rise and
// ignore the falling edge and the time PPS is held high.
`timescale 1ns/1ps
module tb_pps_capture;
  import ptm_pkg::*;
  logic clk = 1'b0;
  logic rst;
  logic pps_in;
  rtr_t rtr_in;
  logic clr_new;
  rtr_t ppsr;
  logic pps_new, pps_stb;
  int checks = 0, failures = 0;
  int stb_count = 0;
  logic [95:0] cnt;

  pps_capture dut (.clk, .rst, .pps_in, .rtr_in, .clr_new, .ppsr, .pps_new, .pps_stb);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (rst) cnt <= 96'd1000;
    else     cnt <= cnt + 96'd1;
  end
  assign rtr_in = cnt;

  always @(posedge clk) if (!rst && pps_stb) stb_count++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (ppsr=%0d new=%b)", what, ppsr, pps_new);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [95:0] c_at_rise;
    int          edges;
    rst = 1'b1; pps_in = 1'b0; clr_new = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    check(pps_new == 1'b0 && stb_count == 0, "no capture without PPS");
    for (int p = 0; p < 40; p++) begin
      @(posedge clk);
      #(1 + $urandom_range(0, 7));
      c_at_rise = cnt;           // counter value after the preceding edge
      edges = 0;
      pps_in = 1'b1;
      // Strobe must appear after exactly three edges.
      repeat (2) begin
        @(posedge clk); #1; edges++;
        check(pps_stb == 1'b0, "no early strobe");
      end
      @(posedge clk); #1;
      check(pps_stb == 1'b1, "strobe after 3 edges");
      check(ppsr == c_at_rise + 96'd2, "captured value");
      check(pps_new == 1'b1, "new flag set");
      // PPS held high for a while: no further capture.
      repeat ($urandom_range(3, 30)) begin
        @(posedge clk); #1;
        check(pps_stb == 1'b0 && ppsr == c_at_rise + 96'd2, "hold while high");
      end
      pps_in = 1'b0;
      @(negedge clk);
      clr_new = 1'b1;
      @(negedge clk);
      clr_new = 1'b0;
      repeat ($urandom_range(4, 20)) begin
        @(negedge clk);
        check(pps_new == 1'b0 && ppsr == c_at_rise + 96'd2, "falling edge ignored, flag cleared");
      end
    end
    check(stb_count == 40, "one strobe per PPS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
