// Unit test of the sensor manager with a behavioural SPI sensor: the first
// frame carries the configuration, later frames read samples every
// SAMPLE_CYCLES, and each sample is offered to User-bank word 0 until
// acknowledged.
`timescale 1ns/1ps
module tb_sensor_manager;
  logic clk = 0, rst_n = 0;
  logic spi_sclk, spi_cs_n, spi_mosi, spi_miso, wr_req, sample_valid;
  logic [1:0] wr_bank;
  logic [7:0] wr_ptr;
  logic [15:0] wr_data, sample, s_cmd, s_arg, s_last;
  logic wr_ack = 0;
  int frames, checks = 0, failures = 0, cyc = 0, nwr = 0;
  int t_s[$];
  logic [15:0] written[$];
  always #5 clk = ~clk;
  sensor_manager #(.SAMPLE_CYCLES(500)) dut (.*);
  spi_sensor_model #(.BASE(16'h7100)) sensor (.sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi),
    .miso(spi_miso), .last_cmd(s_cmd), .last_arg(s_arg), .last_sample(s_last), .frames);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // acknowledge a request after a random delay, like a busy memory
  always @(posedge clk) begin
    cyc <= cyc + 1;
    wr_ack <= 1'b0;
    if (rst_n && wr_req && !wr_ack && $urandom_range(0, 3) == 0) begin
      wr_ack <= 1'b1;
      written.push_back(wr_data);
      check(wr_bank == 2'd3 && wr_ptr == 8'd0, "User bank word 0");
    end
    if (rst_n && sample_valid) t_s.push_back(cyc);
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    wait (frames == 1);
    check(s_cmd == 16'h2001 && s_arg == 16'h0001, "configuration frame");
    wait (written.size() == 4);
    for (int i = 0; i < 4; i++) check(written[i] == 16'h7100 + 16'(i), $sformatf("sample %0d", i));
    check(s_cmd == 16'h8000, "read command");
    // period: 500 wait cycles + 32 bits * 8 cycles + a few for handshakes
    for (int i = 1; i < t_s.size(); i++)
      check(t_s[i] - t_s[i-1] >= 500 + 256 && t_s[i] - t_s[i-1] <= 500 + 256 + 20, "sample period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
