// Unit test of the start-of-transmission detector: carrier needs 8 us
// (192 cycles at 24 MHz) of high RX before a falling edge counts as a
// delimiter start; edges are reported three cycles after RX changes; arm
// gates the delimiter start.
`timescale 1ns/1ps
module tb_sot_detector;
  logic clk = 0, rst_n = 0, rx = 1, arm = 1;
  logic rx_s, rx_rise, rx_fall, carrier, delim_start;
  int checks = 0, failures = 0, n_start = 0, n_rise = 0, n_fall = 0;
  int cyc = 0, t_fall = 0, t_start = 0;
  always #5 clk = ~clk;
  sot_detector dut (.*);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && delim_start) begin n_start++; t_start = cyc; end
    if (rst_n && rx_rise) n_rise++;
    if (rst_n && rx_fall) begin n_fall++; t_fall = cyc; end
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rx = 0; rst_n = 1;
    repeat (10) @(posedge clk);
    // short high: no carrier
    rx = 1; repeat (100) @(posedge clk);
    check(!carrier, "no carrier after 100 cycles");
    rx = 0; t0 = cyc; repeat (10) @(posedge clk);
    check(n_start == 0, "no delimiter start without carrier");
    check(n_fall == 1 && t_fall - t0 == 2, $sformatf("fall latency %0d", t_fall - t0));
    // long high: carrier after 192 cycles
    rx = 1; repeat (190) @(posedge clk);
    check(!carrier, "carrier not yet at 190");
    repeat (10) @(posedge clk);
    check(carrier, "carrier at 200");
    rx = 0; t0 = cyc; repeat (10) @(posedge clk);
    check(n_start == 1, "delimiter start after carrier");
    check(t_start - t0 == 2, "delimiter start latency");
    // disarmed
    rx = 1; repeat (300) @(posedge clk);
    arm = 0; rx = 0; repeat (10) @(posedge clk);
    check(n_start == 1, "no start while not armed");
    check(rx_s == 1'b0, "synchronised level");
    check(n_rise == 3, "rising edges counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
