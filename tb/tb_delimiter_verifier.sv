// Unit test of the delimiter verifier at 24 MHz: low pulses of 285..315
// cycles (12.5 us +-5%) are accepted, shorter or longer ones rejected.
`timescale 1ns/1ps
module tb_delimiter_verifier;
  logic clk = 0, rst_n = 0, delim_start = 0, rx_rise = 0;
  logic busy, delim_ok, delim_err;
  int checks = 0, failures = 0, n_ok = 0, n_err = 0;
  always #5 clk = ~clk;
  delimiter_verifier dut (.*);
  always @(posedge clk) begin
    if (delim_ok) n_ok++;
    if (delim_err) n_err++;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // a low pulse of n cycles: start pulse, rise pulse n cycles later
  task automatic pulse(input int n, input bit expect_ok);
    int ok0 = n_ok, er0 = n_err;
    @(negedge clk) delim_start = 1;
    @(negedge clk) delim_start = 0;
    repeat (n - 1) @(negedge clk);
    rx_rise = 1;
    @(negedge clk) rx_rise = 0;
    repeat (3) @(negedge clk);
    check((n_ok - ok0) == int'(expect_ok) && (n_err - er0) == int'(!expect_ok),
          $sformatf("pulse %0d expect %0d", n, expect_ok));
    check(!busy, "idle after pulse");
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    // 12.5 us at 24 MHz = 300 cycles; +-5% = 285 .. 315
    repeat (3) @(negedge clk); rst_n = 1;
    pulse(300, 1); pulse(285, 1); pulse(315, 1);
    pulse(284, 0); pulse(316, 0); pulse(100, 0); pulse(500, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
