// Unit test of command framing: symbols longer than RTcal/2 become 1s, the
// frame register holds the first bit at position len-1, bits are mirrored
// to the CRC port, frame_valid follows frame_end, and frames longer than
// MAX_BITS are dropped.
`timescale 1ns/1ps
module tb_command_framer;
  logic clk = 0, rst_n = 0, cal_done = 0, sym_valid = 0, frame_end = 0;
  logic [15:0] sym_ticks = 0, rtcal = 16'd400;
  logic crc_init, bit_valid, bit_val, frame_valid;
  logic [65:0] frame;
  logic [7:0] len;
  int checks = 0, failures = 0, nvalid = 0;
  bit seen[$];
  always #5 clk = ~clk;
  command_framer dut (.*);
  always @(posedge clk) begin
    if (bit_valid) seen.push_back(bit_val);
    if (frame_valid) nvalid++;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic send(input bit b[$], input bit sync_first);
    // sync_first: first symbol arrives with cal_done (frame-sync case)
    foreach (b[i]) begin
      @(negedge clk);
      cal_done  = (i == 0) ? 1'b1 : 1'b0;
      sym_valid = (i == 0) ? sync_first : 1'b1;
      sym_ticks = b[i] ? 16'(201 + $urandom_range(0, 400)) : 16'(50 + $urandom_range(0, 150));
      if (i == 0 && !sync_first) begin
        @(negedge clk); cal_done = 0; sym_valid = 1;
      end
      @(negedge clk); cal_done = 0; sym_valid = 0;
    end
    @(negedge clk) frame_end = 1;
    @(negedge clk) frame_end = 0;
    @(negedge clk);
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bit b[$];
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      automatic int n = $urandom_range(1, 66);
      b = {};
      for (int i = 0; i < n; i++) b.push_back(1'($urandom));
      seen = {};
      nvalid = 0;
      send(b, t[0]);
      check(nvalid == 1 && len == 8'(n), $sformatf("frame length %0d", n));
      for (int i = 0; i < n; i++) check(frame[n - 1 - i] == b[i], "frame bit");
      check(seen.size() == n && seen == b, "serial bits");
    end
    b = {};
    for (int i = 0; i < 70; i++) b.push_back(1'b1);
    nvalid = 0;
    send(b, 1'b0);
    check(nvalid == 0, "overflow dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
