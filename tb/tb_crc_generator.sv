// Unit test of the reply CRC-16 generator against a model, plus the known
// property that appending the sent CRC yields the Gen2 residue 1D0F.
`timescale 1ns/1ps
module tb_crc_generator;
  logic clk = 0, rst_n = 0, init = 0, bit_valid = 0, bit_val = 0;
  logic [15:0] crc_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  crc_generator dut (.*);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      automatic bit [15:0] c = 16'hFFFF;
      automatic bit [15:0] sent;
      automatic int n = $urandom_range(1, 200);
      @(negedge clk) init = 1;
      @(negedge clk) init = 0;
      for (int i = 0; i < n; i++) begin
        automatic bit b = 1'($urandom);
        automatic bit f = c[15] ^ b;
        c = {c[14:0], 1'b0}; if (f) c ^= 16'h1021;
        bit_valid = 1; bit_val = b;
        @(negedge clk); bit_valid = 0;
        if ($urandom_range(0, 1)) @(negedge clk);
      end
      check(crc_out == ~c, "CRC matches model");
      sent = crc_out;
      for (int i = 15; i >= 0; i--) begin
        automatic bit f = c[15] ^ sent[i];
        c = {c[14:0], 1'b0}; if (f) c ^= 16'h1021;
      end
      check(c == 16'h1D0F, "residue");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
