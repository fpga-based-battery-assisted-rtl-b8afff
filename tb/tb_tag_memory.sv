// Unit test of the tag memory: initial bank contents, one-cycle reads,
// writes on both ports with port A winning a collision and port B
// acknowledged only once written, and out-of-range accesses ignored.
`timescale 1ns/1ps
module tb_tag_memory;
  logic clk = 0, rst_n = 0;
  logic [1:0] rd_bank = 0, a_bank = 0, b_bank = 0;
  logic [7:0] rd_ptr = 0, a_ptr = 0, b_ptr = 0;
  logic [15:0] rd_data, a_data = 0, b_data = 0, pc_word;
  logic a_we = 0, b_req = 0, b_ack;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  tag_memory dut (.*);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic rd(input int bank, input int ptr, output logic [15:0] d);
    @(negedge clk); rd_bank = 2'(bank); rd_ptr = 8'(ptr);
    @(negedge clk); d = rd_data;
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] d;
    int waited;
    repeat (2) @(negedge clk); rst_n = 1;
    check(pc_word == 16'(30 << 11), "PC word: 30-word EPC");
    rd(1, 1, d); check(d == 16'h_F000, "PC read");
    for (int k = 0; k < 30; k++) begin
      rd(1, 2 + k, d);
      check(d == {4'hE, 4'(k), 8'(k * 17)}, "EPC word");
    end
    rd(2, 0, d); check(d == 16'hE280, "TID 0");
    rd(2, 1, d); check(d == 16'h1105, "TID 1");
    rd(0, 1, d); check(d == 16'h0000, "access password zero");
    // port A write
    @(negedge clk); a_we = 1; a_bank = 3; a_ptr = 7; a_data = 16'h1234;
    @(negedge clk); a_we = 0;
    rd(3, 7, d); check(d == 16'h1234, "port A write");
    // collision: A and B together, A wins, B waits
    @(negedge clk); a_we = 1; a_bank = 3; a_ptr = 9; a_data = 16'hAAAA;
    b_req = 1; b_bank = 3; b_ptr = 9; b_data = 16'hBBBB;
    @(negedge clk); a_we = 0;
    check(!b_ack, "B not acknowledged during A write");
    waited = 0;
    while (!b_ack && waited < 10) begin @(negedge clk); waited++; end
    check(b_ack, "B acknowledged");
    @(negedge clk); b_req = 0;
    rd(3, 9, d); check(d == 16'hBBBB, "B write after A");
    // PC rewrite changes pc_word
    @(negedge clk); a_we = 1; a_bank = 1; a_ptr = 1; a_data = 16'h1000;
    @(negedge clk); a_we = 0;
    check(pc_word == 16'h1000, "pc_word follows write");
    // out of range
    @(negedge clk); a_we = 1; a_bank = 3; a_ptr = 40; a_data = 16'h5555;
    @(negedge clk); a_we = 0;
    rd(3, 8, d); check(d == 16'h0000, "out-of-range write ignored");
    rd(3, 40, d); check(d == 16'h0000, "out-of-range read is 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
