// Unit test of the link-frequency divider: half period TRcal/16 (DR=8) or
// 3*TRcal/128 (DR=64/3), rounded; ticks at that period while enabled; the
// first tick one half period after sync_clr; none while disabled.
`timescale 1ns/1ps
module tb_freq_divider;
  logic clk = 0, rst_n = 0, en = 0, sync_clr = 0, dr = 0;
  logic [15:0] trcal = 0, half_ticks;
  logic half_tick;
  int checks = 0, failures = 0, cyc = 0;
  int ticks[$];
  always #5 clk = ~clk;
  freq_divider dut (.*);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (half_tick) ticks.push_back(cyc);
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic run(input int tr, input bit d);
    int h, t0;
    real exact;
    exact = d ? 3.0 * tr / 128.0 : tr / 16.0;
    h = int'(exact + 0.5);
    if (exact - $floor(exact) == 0.5) h = int'($floor(exact)) + 1;
    @(negedge clk); trcal = 16'(tr); dr = d; en = 1; sync_clr = 1;
    t0 = cyc;
    @(negedge clk); sync_clr = 0;
    ticks = {};
    repeat (10 * h + 5) @(negedge clk);
    check(half_ticks == 16'(h), $sformatf("half period %0d expected %0d", half_ticks, h));
    check(ticks.size() >= 10, "ticks produced");
    if (ticks.size() > 0) check(ticks[0] - t0 == h, $sformatf("first tick after %0d", ticks[0] - t0));
    for (int i = 1; i < ticks.size(); i++) check(ticks[i] - ticks[i-1] == h, "tick period");
    @(negedge clk); en = 0; ticks = {};
    repeat (3 * h) @(negedge clk);
    check(ticks.size() == 0, "no ticks when disabled");
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run(800, 1);    // 640 kHz at 24 MHz, DR 64/3
    run(2133, 1);   // 240 kHz
    run(600, 0);    // 320 kHz, DR 8
    run(1000, 0);
    run(1600, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
