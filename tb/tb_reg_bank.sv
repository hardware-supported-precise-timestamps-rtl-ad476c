// tb_reg_bank: self-checking test of the host register bank.
// Each write address must raise exactly its strobe with the right data
// (the RTR load value assembled from the two staged fraction words and the
// seconds word), CTRL and STATUS must act only on bit 0, and every read
// address must return its register one cycle later with bus_rvalid.
`timescale 1ns/1ps
module tb_reg_bank;
  import ptm_pkg::*;
  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  bus_addr;
  logic        bus_wr, bus_rd;
  logic [31:0] bus_wdata, bus_rdata;
  logic        bus_rvalid;
  logic        incr_wr_lo, incr_wr_hi;
  logic [31:0] incr_wdata;
  logic [39:0] incr;
  logic        rtr_load;
  rtr_t        rtr_load_val;
  logic        ts_snap;
  ts_t         ts_host;
  rtr_t        ppsr;
  logic        pps_new, pps_clr, link_init;
  int checks = 0, failures = 0;

  reg_bank dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Drive one write; check the strobes in the cycle of the write.
  task automatic wr(input logic [7:0] a, input logic [31:0] d,
                    input logic [5:0] exp_strobes);
    bus_addr = a; bus_wdata = d; bus_wr = 1'b1;
    #1;
    check({incr_wr_lo, incr_wr_hi, rtr_load, ts_snap, pps_clr, bus_rvalid} ==
          exp_strobes, $sformatf("strobes for write to %h", a));
    check(incr_wdata == d, "incr write data");
    @(negedge clk);
    bus_wr = 1'b0;
  endtask

  task automatic rd(input logic [7:0] a, input logic [31:0] exp);
    bus_addr = a; bus_rd = 1'b1;
    @(negedge clk);
    bus_rd = 1'b0;
    check(bus_rvalid == 1'b1, "rvalid after one cycle");
    check(bus_rdata == exp, $sformatf("read %h: %h expected %h", a, bus_rdata, exp));
    @(negedge clk);
    check(bus_rvalid == 1'b0, "rvalid one cycle only");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] f0, f1, sc;
    rst = 1'b1; bus_addr = '0; bus_wr = 1'b0; bus_rd = 1'b0; bus_wdata = '0;
    incr = '0; ts_host = '0; ppsr = '0; pps_new = 1'b0; link_init = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int k = 0; k < 30; k++) begin
      incr      = {8'($urandom), $urandom};
      ts_host   = {$urandom, $urandom};
      ppsr      = {$urandom, $urandom, $urandom};
      pps_new   = 1'($urandom);
      link_init = 1'($urandom);
      f0 = $urandom; f1 = $urandom; sc = $urandom;
      wr(8'h00, $urandom, 6'b100000);
      wr(8'h04, $urandom, 6'b010000);
      wr(8'h08, f0, 6'b000000);
      wr(8'h0C, f1, 6'b000000);
      bus_addr = 8'h10; bus_wdata = sc; bus_wr = 1'b1;
      #1;
      check(rtr_load == 1'b1, "rtr load strobe");
      check(rtr_load_val == {sc, f1, f0}, "rtr load value");
      @(negedge clk);
      bus_wr = 1'b0;
      wr(8'h14, 32'h1 | ($urandom << 1), 6'b000100);
      wr(8'h14, 32'h0 | ($urandom << 1), 6'b000000);
      wr(8'h2C, 32'h1, 6'b000010);
      wr(8'h2C, 32'h2, 6'b000000);
      wr(8'h30, $urandom, 6'b000000);
      rd(8'h00, incr[31:0]);
      rd(8'h04, {24'd0, incr[39:32]});
      rd(8'h18, ts_host.frac);
      rd(8'h1C, ts_host.sec);
      rd(8'h20, ppsr.frac[31:0]);
      rd(8'h24, ppsr.frac[63:32]);
      rd(8'h28, ppsr.sec);
      rd(8'h2C, {30'd0, link_init, pps_new});
      rd(8'h3C, 32'd0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
