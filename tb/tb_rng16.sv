// Unit test of the RNG: follows an independent model of the LFSR
// x^16+x^14+x^13+x^11+1, never reaches zero, and has period 65535.
`timescale 1ns/1ps
module tb_rng16;
  logic clk = 0, rst_n = 0;
  logic [15:0] rn;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rng16 dut (.*);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] m, first;
    int period = 0, zeros = 0, mism = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    m = 16'hACE1;
    check(rn == m, "seed");
    first = rn;
    do begin
      @(negedge clk);
      m = {m[14:0], m[15] ^ m[13] ^ m[12] ^ m[10]};
      if (rn != m) mism++;
      if (rn == 0) zeros++;
      period++;
    end while (rn != first && period < 70000);
    check(mism == 0, "matches LFSR model");
    check(zeros == 0, "never zero");
    check(period == 65535, $sformatf("period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
