// Unit test of the reply preamble sequences for FM0 and Miller, with and
// without pilot tone, including rewinding between replies.
`timescale 1ns/1ps
module tb_preamble_generator;
  import wisp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, trext = 0, pre_ready = 0;
  mod_e mode = MOD_FM0;
  logic pre_bit, pre_viol, pre_last;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  preamble_generator dut (.*);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic run(input mod_e m, input bit te, input string exp, input int vpos);
    string got = "";
    int n = 0, vcount = 0;
    @(negedge clk); mode = m; trext = te;
    start = 1; pre_ready = 1;          // first symbol taken with start
    forever begin
      #1 got = {got, pre_bit ? "1" : "0"};
      if (pre_viol) begin vcount++; check(n == vpos, "violation position"); end
      n++;
      if (pre_last || n > 40) break;
      @(negedge clk); start = 0;
      pre_ready = 0; @(negedge clk); pre_ready = 1;
    end
    @(negedge clk); start = 0; pre_ready = 0;
    check(got == exp, $sformatf("sequence %s expected %s", got, exp));
    check(vcount == (vpos >= 0 ? 1 : 0), "violation count");
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (2) begin
      run(MOD_FM0, 0, "101001", 4);
      run(MOD_FM0, 1, "000000000000101001", 16);
      run(MOD_M2, 0, "0000010111", -1);
      run(MOD_M4, 1, "0000000000000000010111", -1);
      run(MOD_M8, 0, "0000010111", -1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
