// Unit test of the response encoder: preamble and random data are encoded
// in FM0 and Miller 2/4/8; tx is sampled in the middle of every half
// period and decoded here from the encoding rules (FM0: inversion at every
// boundary, extra mid-symbol inversion for 0; Miller: subcarrier times a
// baseband that flips mid-symbol for 1 and between two 0s). Also checks the
// reply length in half periods and the dummy 1.
`timescale 1ns/1ps
module tb_response_encoder;
  import wisp_pkg::*;
  localparam int H = 6;                       // half period in cycles
  logic clk = 0, rst_n = 0, start = 0;
  logic half_tick;
  mod_e mode = MOD_FM0;
  logic pre_bit, pre_viol, pre_last, pre_ready;
  logic bit_valid, bit_val, bit_last, bit_ready;
  logic tx, busy, done, underrun;
  int checks = 0, failures = 0, hc = 0;
  bit pre[$], dat[$];
  int pi = 0, di = 0, vpos = -1;
  always #5 clk = ~clk;
  response_encoder dut (.*);
  // tick generator restarted by start
  always @(posedge clk) begin
    if (start) hc <= 0;
    else if (hc == H - 1) hc <= 0;
    else hc <= hc + 1;
    if (pre_ready) pi <= pi + 1;
    if (bit_ready) di <= di + 1;
  end
  assign half_tick = busy && (hc == H - 1);
  assign pre_bit   = pre[pi];
  assign pre_viol  = (pi == vpos);
  assign pre_last  = (pi == pre.size() - 1);
  assign bit_valid = 1'b1;
  assign bit_val   = dat[di];
  assign bit_last  = (di == dat.size() - 1);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic run(input mod_e m, input int nbits);
    int hps = 2 << m, mm = 1 << m;
    int nsym, waited = 0;
    bit hv[$], sy[$];
    pre = {}; dat = {};
    if (m == MOD_FM0) begin pre = {1, 0, 1, 0, 0, 1}; vpos = 4; end
    else begin pre = {0, 0, 0, 0, 0, 1, 0, 1, 1, 1}; vpos = -1; end
    for (int i = 0; i < nbits; i++) dat.push_back(1'($urandom));
    nsym = pre.size() + nbits + 1;
    @(negedge clk); mode = m; pi = 0; di = 0; start = 1;
    @(negedge clk); start = 0;
    // first half started at the start edge; sample mid-half
    repeat (H / 2 - 1) @(negedge clk);
    for (int k = 0; k < nsym * hps; k++) begin
      hv.push_back(tx);
      repeat (H) @(negedge clk);
    end
    while (busy && waited < 100) begin @(negedge clk); waited++; end
    check(!busy && tx == 0 && waited <= H, "reply ends after dummy bit");
    if (m == MOD_FM0) begin
      for (int s = 0; s < nsym; s++) begin
        sy.push_back(hv[2*s] == hv[2*s+1]);
        if (s > 0 && s != vpos) check(hv[2*s] != hv[2*s-1], "FM0 boundary inversion");
      end
      check(hv[0] == 1'b1, "FM0 starts high");
    end else begin
      for (int s = 0; s < nsym; s++) begin
        bit b0 = hv[hps*s], bm = hv[hps*s + mm] ^ mm[0];
        for (int j = 0; j < hps; j++)
          check((hv[hps*s + j] ^ j[0]) == ((j < mm) ? b0 : bm), "Miller subcarrier");
        sy.push_back(b0 != bm);
        if (s > 0) check(((hv[hps*s-1] ^ 1'b1) != b0) == (!sy[s-1] && !sy[s]), "Miller boundary");
      end
    end
    for (int i = 0; i < pre.size(); i++)
      check(sy[i] == ((m == MOD_FM0 && i == vpos) ? 1'b1 : pre[i]), "preamble symbol");
    for (int i = 0; i < nbits; i++) check(sy[pre.size() + i] == dat[i], "data bit");
    check(sy[nsym-1] == 1'b1, "dummy 1");
    check(!underrun, "no underrun");
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run(MOD_FM0, 40);
    run(MOD_M2, 30);
    run(MOD_M4, 20);
    run(MOD_M8, 12);
    run(MOD_FM0, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
