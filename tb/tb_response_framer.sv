// Unit test of response framing: replies of every layout (RN16 alone,
// RN16+CRC, PC+EPC+CRC, Read with header, error reply) are streamed
// through a sink with random back-pressure and compared bit by bit with
// the expected layout; the CRC register is modelled here.
`timescale 1ns/1ps
module tb_response_framer;
  import wisp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, bit_ready = 0;
  reply_t desc = '0;
  logic bit_valid, bit_val, bit_last, done, crc_init, crc_bit_valid, crc_bit_val;
  logic [1:0] rd_bank;
  logic [7:0] rd_ptr;
  logic [15:0] rd_data, crc_in, crc_reg;
  logic [15:0] mem [128];
  int checks = 0, failures = 0, ndone = 0;
  bit got[$];
  always #5 clk = ~clk;
  response_framer dut (.*);
  initial for (int i = 0; i < 128; i++) mem[i] = 16'(i * 16'h0101 + 16'h0F00);
  always @(posedge clk) begin
    rd_data <= mem[{rd_bank, rd_ptr[4:0]}];
    if (crc_init) crc_reg <= 16'hFFFF;
    else if (crc_bit_valid) crc_reg <= {crc_reg[14:0], 1'b0} ^ ((crc_reg[15] ^ crc_bit_val) ? 16'h1021 : 16'h0);
    bit_ready <= ($urandom_range(0, 2) == 0);
    if (bit_valid && bit_ready) got.push_back(bit_val);
    if (done) ndone++;
  end
  assign crc_in = ~crc_reg;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  typedef bit bits_t[$];
  function automatic bits_t num(input longint v, input int n);
    bits_t b;
    for (int i = n - 1; i >= 0; i--) b.push_back(v[i]);
    return b;
  endfunction
  function automatic bits_t crc16(input bits_t b);
    bit [15:0] c = 16'hFFFF;
    foreach (b[i]) begin bit f = c[15] ^ b[i]; c = {c[14:0], 1'b0}; if (f) c ^= 16'h1021; end
    return num(~c, 16);
  endfunction
  task automatic run(input reply_t d);
    bits_t exp;
    int waited = 0;
    if (d.hdr_en) exp.push_back(d.hdr);
    if (d.err_en) exp = {exp, num(d.err_code, 8)};
    for (int k = 0; k < d.count; k++) exp = {exp, num(mem[{d.bank, 5'(d.ptr + 8'(k))}], 16)};
    if (d.rn_en) exp = {exp, num(d.rn, 16)};
    if (d.crc_en) exp = {exp, crc16(exp)};
    got = {}; ndone = 0;
    @(negedge clk); desc = d; start = 1;
    @(negedge clk); start = 0;
    while (ndone == 0 && waited < 5000) begin @(negedge clk); waited++; end
    check(ndone == 1, "done");
    check(got == exp, $sformatf("reply bits (%0d vs %0d)", got.size(), exp.size()));
  endtask
  // bit_last must mark the final bit
  int nlast = 0;
  always @(posedge clk) if (bit_valid && bit_ready && bit_last) nlast++;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    reply_t d;
    repeat (2) @(negedge clk); rst_n = 1;
    d = '0; d.rn_en = 1; d.rn = 16'hBEEF;                          run(d);
    d = '0; d.rn_en = 1; d.rn = 16'h1234; d.crc_en = 1;            run(d);
    d = '0; d.bank = 2'd1; d.ptr = 8'd1; d.count = 8'd7; d.crc_en = 1; run(d);
    d = '0; d.hdr_en = 1; d.bank = 2'd3; d.ptr = 8'd4; d.count = 8'd3;
    d.rn_en = 1; d.rn = 16'hA5A5; d.crc_en = 1;                    run(d);
    d = '0; d.hdr_en = 1; d.hdr = 1; d.err_en = 1; d.err_code = 8'h03;
    d.rn_en = 1; d.rn = 16'h0F0F; d.crc_en = 1;                    run(d);
    d = '0; d.hdr_en = 1; d.rn_en = 1; d.rn = 16'h7777; d.crc_en = 1; run(d);
    check(nlast == 6, "one last bit per reply");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
