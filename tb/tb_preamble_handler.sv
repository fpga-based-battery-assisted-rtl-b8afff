// Unit test of the preamble handler: a preamble (data-0, RTcal, TRcal) and a
// frame-sync (no TRcal) each followed by data symbols; checks the measured
// Tari, RTcal, TRcal, the symbol lengths passed on, the end-of-command pulse
// 3/4 RTcal after the last rising edge, and abort on a stuck line.
`timescale 1ns/1ps
module tb_preamble_handler;
  logic clk = 0, rst_n = 0, delim_ok = 0, rx_s = 1;
  logic rx_rise;
  logic busy, trcal_valid, cal_done, sym_valid, frame_end, frame_abort;
  logic [15:0] tari, rtcal, trcal, sym_ticks;
  int checks = 0, failures = 0, cyc = 0, t_last = 0, t_end = 0, nsym = 0, nabort = 0;
  int syms[$];
  always #5 clk = ~clk;
  preamble_handler dut (.*);
  logic rx_d = 1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    rx_d <= rx_s;
    if (rst_n && sym_valid) syms.push_back(int'(sym_ticks));
    if (frame_end) t_end = cyc;
    if (rst_n && frame_abort) nabort++;
  end
  assign rx_rise = rx_s & ~rx_d;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic sym(input int n);   // high n-40, low 40
    repeat (n - 40) @(negedge clk);
    rx_s = 0; repeat (40) @(negedge clk); rx_s = 1;
  endtask
  task automatic frame(input bit pre, input int lens[$]);
    rx_s = 0; repeat (300) @(negedge clk);
    rx_s = 1; delim_ok = 1; @(negedge clk); delim_ok = 0;
    // the rising edge after the delimiter counts as cycle 1 of data-0
    repeat (100 - 41) @(negedge clk); rx_s = 0; repeat (40) @(negedge clk); rx_s = 1;
    sym(250);
    if (pre) sym(600);
    foreach (lens[i]) sym(lens[i]);
    t_last = cyc;
    repeat (400) @(negedge clk);
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    syms = {};
    frame(1, '{100, 200, 100, 200});
    check(tari == 100, $sformatf("Tari %0d", tari));
    check(rtcal == 250, $sformatf("RTcal %0d", rtcal));
    check(trcal == 600 && trcal_valid, "TRcal with preamble");
    check(syms.size() == 4 && syms[0] == 100 && syms[1] == 200 && syms[3] == 200, "symbols after preamble");
    // 3/4 of 250 = 187 (62 + 125), one cycle to register
    check(t_end - t_last >= 186 && t_end - t_last <= 190, $sformatf("frame end after %0d", t_end - t_last));
    check(!busy, "idle after frame");
    syms = {};
    frame(0, '{200, 100, 100});
    check(!trcal_valid && trcal == 600, "frame-sync keeps TRcal");
    check(syms.size() == 3 && syms[0] == 200 && syms[2] == 100, "symbols after frame-sync");
    // stuck low after delimiter -> abort
    rx_s = 1; delim_ok = 1; @(negedge clk); delim_ok = 0; rx_s = 0;
    repeat (70000) @(negedge clk);
    rx_s = 1;
    check(nabort == 1, "abort on stuck line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
