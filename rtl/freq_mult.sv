// freq_mult: behavioural model of the clock frequency multiplier.
//
// Not synthesizable: in an FPGA this is a clock manager (DLL/PLL) that
// multiplies the 10 MHz reference of the temperature compensated crystal
// by N to make the generator clock SCLK = N * 10 MHz (N is usually 6, 8
// or 10; 10 gives the 100 MHz of the nominal increment). The model measures
// the period of clk_in between rising edges and, once two edges have been
// seen, produces N output periods per input period (half periods rounded
// down to whole picoseconds, re-aligned at every input edge), each output rising edge
// group aligned to an input rising edge; `locked` then goes high. While
// `rst` is high the output stops and `locked` is low. Multiplying the
// crystal clock is the architecture's; lock behaviour and alignment are
// this model's choices.
`timescale 1ps/1ps
module freq_mult #(
  parameter int unsigned N = 10
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out,
  output logic locked
);

  time     t_last;     // in ps
  time     period;
  time     half;
  bit      seen;

  initial begin
    clk_out = 1'b0;
    locked  = 1'b0;
    seen    = 1'b0;
    t_last  = 0;
    period  = 0;
    half    = 1;
    forever begin
      @(posedge clk_in or posedge rst);
      if (rst) begin
        locked = 1'b0;
        seen   = 1'b0;
      end else begin
        if (seen) begin
          period = $time - t_last;
          half   = (period / (2 * N) > 0) ? period / (2 * N) : 1;
          locked = 1'b1;
        end
        seen   = 1'b1;
        t_last = $time;
        if (locked) begin
          fork
            begin : burst
              for (int i = 0; i < int'(N); i++) begin
                if (rst) break;
                clk_out = 1'b1;
                #(half);
                clk_out = 1'b0;
                #(half);
              end
            end
          join_none
        end
      end
    end
  end

endmodule
