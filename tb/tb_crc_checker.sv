// Unit test of the receive CRC checker: random payloads with CRC-5 or
// CRC-16 appended (computed here bit by bit from the Gen2 definitions) must
// give ok; a single flipped bit must not.
`timescale 1ns/1ps
module tb_crc_checker;
  logic clk = 0, rst_n = 0, init = 0, bit_valid = 0, bit_val = 0;
  logic crc5_ok, crc16_ok;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  crc_checker dut (.*);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  typedef bit bits_t[$];
  function automatic bits_t crc5(input bits_t b);
    bit [4:0] c = 5'b01001; bits_t r;
    foreach (b[i]) begin bit f = c[4] ^ b[i]; c = {c[3:0], 1'b0}; if (f) c ^= 5'b01001; end
    for (int i = 4; i >= 0; i--) r.push_back(c[i]);
    return r;
  endfunction
  function automatic bits_t crc16(input bits_t b);
    bit [15:0] c = 16'hFFFF; bits_t r;
    foreach (b[i]) begin bit f = c[15] ^ b[i]; c = {c[14:0], 1'b0}; if (f) c ^= 16'h1021; end
    c = ~c;
    for (int i = 15; i >= 0; i--) r.push_back(c[i]);
    return r;
  endfunction
  // sep: preset with a separate init pulse, else init comes with the first bit
  task automatic feed(input bits_t b, input bit sep);
    if (sep) begin
      @(negedge clk) init = 1;
      @(negedge clk) init = 0;
    end
    foreach (b[i]) begin
      @(negedge clk);
      init = (i == 0) && !sep;
      bit_valid = 1; bit_val = b[i];
      @(negedge clk); init = 0; bit_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    @(negedge clk);
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bits_t p, f;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      automatic int n = $urandom_range(4, 60);
      p = {};
      for (int i = 0; i < n; i++) p.push_back(1'($urandom));
      f = {p, crc5(p)};
      feed(f, t[0]);
      check(crc5_ok, "CRC-5 ok");
      f[$urandom_range(0, f.size() - 1)] ^= 1'b1;
      feed(f, 1'b1);
      check(!crc5_ok, "CRC-5 error detected");
      f = {p, crc16(p)};
      feed(f, 1'b1);
      check(crc16_ok, "CRC-16 ok");
      f[$urandom_range(0, f.size() - 1)] ^= 1'b1;
      feed(f, 1'b1);
      check(!crc16_ok, "CRC-16 error detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
