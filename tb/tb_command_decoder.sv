// Unit test of the command decoder: frames for every supported command with
// random fields are classified and their fields extracted; wrong lengths,
// wrong codes, failed CRCs and multi-byte EBVs give CMD_BAD.
`timescale 1ns/1ps
module tb_command_decoder;
  import wisp_pkg::*;
  logic clk = 0, rst_n = 0, frame_valid = 0, crc5_ok = 0, crc16_ok = 0;
  logic [65:0] frame = '0;
  logic [7:0] len = '0;
  logic cmd_valid;
  cmd_t cmd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  command_decoder dut (.*);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic give(input logic [65:0] f, input int n, input bit c5, input bit c16);
    @(negedge clk);
    frame = f; len = 8'(n); crc5_ok = c5; crc16_ok = c16; frame_valid = 1;
    @(negedge clk); frame_valid = 0;
    check(cmd_valid, "cmd_valid one cycle later");
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      automatic logic [15:0] rn = 16'($urandom);
      automatic logic [1:0] m = 2'($urandom);
      automatic logic [3:0] q = 4'($urandom);
      automatic logic [6:0] ptr = 7'($urandom);
      automatic logic [7:0] cnt = 8'($urandom);
      automatic logic dr = 1'($urandom);
      automatic logic te = 1'($urandom);
      give({44'd0, 4'b1000, dr, m, te, 4'b0, 1'b0, q, 5'h1F}, 22, 1, 0);
      check(cmd.cmd == CMD_QUERY && cmd.dr == dr && cmd.m == mod_e'(m) && cmd.trext == te && cmd.q == q, "Query fields");
      give({44'd0, 4'b1000, dr, m, te, 4'b0, 1'b0, q, 5'h1F}, 22, 0, 1);
      check(cmd.cmd == CMD_BAD, "Query bad CRC-5");
      give({62'd0, 4'b0011}, 4, 0, 0);
      check(cmd.cmd == CMD_QUERYREP, "QueryRep");
      give({57'd0, 4'b1001, 2'b00, 3'b110}, 9, 0, 0);
      check(cmd.cmd == CMD_QUERYADJ && cmd.updn == 3'b110, "QueryAdjust");
      give({48'd0, 2'b01, rn}, 18, 0, 0);
      check(cmd.cmd == CMD_ACK && cmd.rn == rn, "ACK");
      give({48'd0, 2'b11, rn}, 18, 0, 0);
      check(cmd.cmd == CMD_BAD, "bad 18-bit code");
      give({58'd0, 8'hC0}, 8, 0, 0);
      check(cmd.cmd == CMD_NAK, "NAK");
      give({26'd0, 8'hC1, rn, 16'h1234}, 40, 0, 1);
      check(cmd.cmd == CMD_REQRN && cmd.rn == rn, "Req_RN");
      give({26'd0, 8'hC1, rn, 16'h1234}, 40, 1, 0);
      check(cmd.cmd == CMD_BAD, "Req_RN bad CRC-16");
      give({8'd0, 8'hC2, m, 1'b0, ptr, cnt, rn, 16'h0}, 58, 0, 1);
      check(cmd.cmd == CMD_READ && cmd.bank == m && cmd.ptr == {1'b0, ptr} && cmd.count == cnt && cmd.rn == rn, "Read");
      give({8'd0, 8'hC2, m, 1'b1, ptr, cnt, rn, 16'h0}, 58, 0, 1);
      check(cmd.cmd == CMD_BAD, "Read multi-byte EBV");
      give({8'hC3, m, 1'b0, ptr, cnt, cnt, rn, 16'h0}, 66, 0, 1);
      check(cmd.cmd == CMD_WRITE && cmd.bank == m && cmd.ptr == {1'b0, ptr} && cmd.data == {cnt, cnt} && cmd.rn == rn, "Write");
      give({8'hC3, m, 1'b0, ptr, cnt, cnt, rn, 16'h0}, 65, 1, 1);
      check(cmd.cmd == CMD_BAD, "wrong length");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
