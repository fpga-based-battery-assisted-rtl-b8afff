// Unit test of the main state machine with decoded commands driven
// directly: slot draw and countdown, RN16/EPC/handle replies, state
// changes for QueryRep, QueryAdjust, ACK with wrong RN, NAK, Req_RN,
// Read/Write in Secured (with cover-coded write data and range errors),
// and the reply delay T1 = max(RTcal, 20 half periods) after the last
// rising edge.
`timescale 1ns/1ps
module tb_tag_controller;
  import wisp_pkg::*;
  logic clk = 0, rst_n = 0, cmd_valid = 0, rx_rise = 0, tx_done = 0;
  cmd_t cmd = '0;
  logic [15:0] rtcal = 16'd450, half_ticks = 16'd19, rn = 16'h0000, pc_word = 16'h3000;
  logic dr, trext, tx_start, tx_busy, mem_we;
  mod_e mode;
  reply_t reply;
  logic [1:0] mem_bank;
  logic [7:0] mem_ptr;
  logic [15:0] mem_data, slot;
  tag_state_e state;
  logic [3:0] q;
  int checks = 0, failures = 0, cyc = 0, t_rise = 0, t_start = -1, nstart = 0;
  always #5 clk = ~clk;
  tag_controller dut (.*);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tx_start) begin t_start = cyc; nstart++; end
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // issue a command: rising edge, decode 200 cycles later, then wait for a
  // reply (which the test finishes with tx_done)
  task automatic issue(input cmd_t c, input logic [15:0] r, input bit expect_reply);
    int n0 = nstart;
    @(negedge clk); rx_rise = 1; t_rise = cyc;
    @(negedge clk); rx_rise = 0;
    repeat (200) @(negedge clk);
    rn = r; cmd = c; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    repeat (400) @(negedge clk);
    check((nstart - n0) == int'(expect_reply), $sformatf("reply expected %0d for %s", expect_reply, c.cmd.name()));
    if (nstart != n0) begin
      // T1 = max(450, 20*19 = 380) = 450 cycles from the edge
      check(t_start - t_rise >= 450 && t_start - t_rise <= 452, $sformatf("T1 %0d", t_start - t_rise));
      check(tx_busy, "busy while sending");
      repeat (20) @(negedge clk);
      tx_done = 1; @(negedge clk); tx_done = 0;
      @(negedge clk);
      check(!tx_busy, "not busy after done");
    end
  endtask
  function automatic cmd_t mk(input cmd_e c);
    cmd_t x = '0; x.cmd = c; return x;
  endfunction
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cmd_t c;
    logic [15:0] rn16, handle;
    repeat (2) @(negedge clk); rst_n = 1;
    check(state == ST_READY, "reset to Ready");
    // Query Q=2 with rn low bits 3 -> slot 3, Arbitrate
    c = mk(CMD_QUERY); c.q = 4'd2; c.m = MOD_M4; c.dr = 1; c.trext = 1;
    issue(c, 16'h1233, 0);
    check(state == ST_ARBITRATE && slot == 16'd3, "Arbitrate with slot 3");
    check(mode == MOD_M4 && dr && trext, "link settings latched");
    issue(mk(CMD_QUERYREP), 16'h0, 0);
    issue(mk(CMD_QUERYREP), 16'h0, 0);
    check(slot == 16'd1, "slot counted down");
    issue(mk(CMD_QUERYREP), 16'hABCD, 1);
    check(state == ST_REPLY, "Reply at slot 0");
    rn16 = {16'hABCD} >> 8 | 16'({16'hABCD} << 8);
    check(reply.rn_en && !reply.crc_en && reply.count == 0 && reply.rn == rn16, "RN16 reply");
    // wrong ACK -> Arbitrate
    c = mk(CMD_ACK); c.rn = rn16 ^ 16'h1;
    issue(c, 16'h0, 0);
    check(state == ST_ARBITRATE, "wrong ACK -> Arbitrate");
    // QueryAdjust down to Q=1, draw 0 -> Reply
    c = mk(CMD_QUERYADJ); c.updn = 3'b011;
    issue(c, 16'h5502, 1);
    check(q == 4'd1 && state == ST_REPLY, "QueryAdjust Q-1 and reply");
    rn16 = 16'h0255;
    c = mk(CMD_ACK); c.rn = rn16;
    issue(c, 16'h0, 1);
    check(state == ST_ACKNOWLEDGED, "Acknowledged");
    check(reply.bank == BANK_EPC && reply.ptr == 1 && reply.count == 7 && reply.crc_en && !reply.rn_en, "EPC reply: PC + 6 words");
    c = mk(CMD_REQRN); c.rn = rn16;
    issue(c, 16'h7777, 1);
    handle = 16'h7777;
    check(state == ST_SECURED && reply.rn == handle && reply.crc_en, "handle issued");
    c = mk(CMD_REQRN); c.rn = handle;
    issue(c, 16'h00FF, 1);
    check(reply.rn == 16'h00FF && state == ST_SECURED, "new RN16 in Secured");
    // Write with cover code 00FF
    c = mk(CMD_WRITE); c.rn = handle; c.bank = 2'd3; c.ptr = 8'd4; c.data = 16'h12ED;
    fork
      begin
        @(posedge mem_we);
        check(mem_bank == 2'd3 && mem_ptr == 8'd4 && mem_data == 16'h1212, "write decoded with cover code");
      end
      issue(c, 16'h0, 1);
    join
    check(reply.hdr_en && !reply.hdr && reply.rn == handle && reply.crc_en, "Write reply");
    c = mk(CMD_READ); c.rn = handle; c.bank = 2'd2; c.ptr = 8'd0; c.count = 8'd2;
    issue(c, 16'h0, 1);
    check(reply.hdr_en && !reply.hdr && reply.bank == 2'd2 && reply.count == 2 && reply.rn == handle, "Read reply");
    c.ptr = 8'd31; c.count = 8'd2;
    issue(c, 16'h0, 1);
    check(reply.hdr && reply.err_en && reply.err_code == 8'h03, "Read overrun error");
    c.rn = handle ^ 16'h8000; c.ptr = 0;
    issue(c, 16'h0, 0);
    c = mk(CMD_NAK);
    issue(c, 16'h0, 0);
    check(state == ST_ARBITRATE, "NAK -> Arbitrate");
    // Query with Q=0 always answers; 10 BLF periods longer than RTcal
    half_ticks = 16'd30;
    c = mk(CMD_QUERY); c.q = 0;
    begin
      automatic int n0 = nstart;
      @(negedge clk); rx_rise = 1; t_rise = cyc;
      @(negedge clk); rx_rise = 0;
      repeat (200) @(negedge clk);
      cmd = c; cmd_valid = 1; @(negedge clk); cmd_valid = 0;
      repeat (500) @(negedge clk);
      check(nstart == n0 + 1 && t_start - t_rise >= 600 && t_start - t_rise <= 602, $sformatf("T1 = 10 BLF periods: %0d starts, %0d", nstart - n0, t_start - t_rise));
      tx_done = 1; @(negedge clk); tx_done = 0;
    end
    // QueryRep from Acknowledged returns to Ready
    c = mk(CMD_ACK); c.rn = reply.rn;
    half_ticks = 16'd19;
    issue(c, 16'h0, 1);
    issue(mk(CMD_QUERYREP), 16'h0, 0);
    check(state == ST_READY, "QueryRep in Acknowledged -> Ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
