// Read-rate and data-rate workloads at the default parameters. For each EPC
// length the reader rewrites the PC word (Query, ACK, Req_RN, Req_RN, Write)
// and then runs inventory rounds (Query Q=0, RN16, ACK, PC+EPC+CRC), every
// reply decoded and checked. Two reader settings are used: Tari 7.5 us,
// Miller-2, 640 kHz for EPCs of 32..480 bits (read-rate sweep), and Tari
// 6.25 us, FM0, 640 kHz for EPCs of 16..480 bits (data-rate sweep), a sweep
// of Q = 0..6 at the read-rate settings (four rounds each, the tag found by
// QueryRep within 2^Q - 1 slots), plus one round with Q=7 in FM0. The tag's own time per read (reply
// delays plus reply lengths) gives the read rate and throughput the tag
// could sustain; they must exceed the rates a reader measured with this
// design (1200 reads/s at 32 bits in Miller-2; 307 kb/s at 480 bits in
// FM0), showing the tag is not the limit.
`timescale 1ns/1ps
module tb_read_rate;
  import wisp_pkg::*;

  localparam int CLK_MHZ = 24;
  logic clk = 1'b0, rst_n = 1'b0, rx = 1'b1;
  logic tx, sclk, cs_n, mosi, miso;
  tag_state_e tag_state;
  logic [15:0] s_cmd, s_arg, s_last;
  int s_frames;

  always #20.833 clk = ~clk;

  wisp_fpga_tag dut (.clk, .rst_n, .rx, .tx, .spi_sclk(sclk), .spi_cs_n(cs_n),
                     .spi_mosi(mosi), .spi_miso(miso), .tag_state);
  spi_sensor_model sensor (.sclk, .cs_n, .mosi, .miso, .last_cmd(s_cmd), .last_arg(s_arg),
                           .last_sample(s_last), .frames(s_frames));

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_fm0 = 0, n_m2 = 0, n_m4 = 0, n_m8 = 0, n_trext = 0, n_t1 = 0, n_slot = 0;
  int n_qadj = 0, n_nak = 0, n_crc_rej = 0, n_delim_rej = 0, n_read = 0, n_write = 0;
  int n_err = 0, n_sensor = 0, n_tari = 0, n_blf = 0, n_epc = 0, n_reqrn = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // ---------------- reader link settings ----------------
  int tari = 150, data1 = 300, pw = 75, trcal = 800;
  int dr = 1;          // 1: DR = 64/3
  int mmod = 0;        // 0 FM0, 1 M2, 2 M4, 3 M8
  int trext = 0;
  int delim = 300;
  int t_end;           // cycle of the last rising edge of a command
  int reply_start, reply_end;

  typedef bit bits_t[$];

  function automatic bits_t num(input longint v, input int n);
    bits_t b;
    for (int i = n - 1; i >= 0; i--) b.push_back(v[i]);
    return b;
  endfunction

  function automatic bit [4:0] crc5(input bits_t b);
    bit [4:0] c = 5'b01001;
    foreach (b[i]) begin
      bit f = c[4] ^ b[i];
      c = {c[3:0], 1'b0};
      if (f) c ^= 5'b01001;
    end
    return c;
  endfunction

  function automatic bit [15:0] crc16(input bits_t b);
    bit [15:0] c = 16'hFFFF;
    foreach (b[i]) begin
      bit f = c[15] ^ b[i];
      c = {c[14:0], 1'b0};
      if (f) c ^= 16'h1021;
    end
    return ~c;
  endfunction

  task automatic wait_cyc(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic symbol(input int len);
    rx = 1'b1; wait_cyc(len - pw);
    rx = 1'b0; wait_cyc(pw);
  endtask

  task automatic send(input bits_t b, input bit preamble);
    rx = 1'b1; wait_cyc(400);
    rx = 1'b0; wait_cyc(delim);
    symbol(tari);
    symbol(tari + data1);
    if (preamble) symbol(trcal);
    foreach (b[i]) symbol(b[i] ? data1 : tari);
    rx = 1'b1;
    t_end = int'(cyc);
  endtask

  // ---------------- reply receiver ----------------
  function automatic int half_period();
    return dr ? (trcal * 3 + 64) / 128 : (trcal + 8) / 16;
  endfunction

  // Waits for a reply with nbits data bits; returns its bits (empty if none)
  task automatic receive(input int nbits, output bits_t data, output int latency);
    int h = half_period();
    int hps = 2 << mmod;
    int npre = (mmod == 0) ? (trext ? 18 : 6) : (trext ? 22 : 10);
    int nsym = npre + nbits + 1;
    bit hv[$];
    bits_t sy;
    int waited = 0;
    data = {};
    latency = -1;
    while (!tx && waited < 6000) begin @(posedge clk); #1; waited++; end
    if (!tx) return;
    latency = int'(cyc) - t_end;
    reply_start = int'(cyc);
    wait_cyc(h / 2);
    for (int k = 0; k < nsym * hps; k++) begin
      #1 hv.push_back(tx);
      wait_cyc(h);
    end
    reply_end = reply_start + nsym * hps * h;
    // decode symbols
    if (mmod == 0) begin
      for (int s = 0; s < nsym; s++) begin
        sy.push_back(hv[2*s] == hv[2*s+1]);
        if (s > 0 && s != npre - 2)
          check(hv[2*s] != hv[2*s-1], "FM0 boundary inversion");
      end
      check(hv[2*(npre-2)] == hv[2*(npre-2)-1], "FM0 preamble violation");
    end else begin
      int m = 1 << mmod;
      for (int s = 0; s < nsym; s++) begin
        bit b0 = hv[hps*s] ^ 1'b0;
        bit bm = hv[hps*s + m] ^ m[0];
        bit ok = 1;
        for (int j = 0; j < hps; j++) begin
          bit bj = hv[hps*s + j] ^ j[0];
          if (bj != ((j < m) ? b0 : bm)) ok = 0;
        end
        check(ok, "Miller subcarrier");
        sy.push_back(b0 != bm);
        if (s > 0) begin
          bit prev = hv[hps*s - 1] ^ 1'b1;
          check((prev != b0) == (sy[s-1] == 1'b0 && sy[s] == 1'b0), "Miller boundary rule");
        end
      end
    end
    // preamble bits
    begin
      bits_t exp_pre;
      int npil = npre - 6;
      for (int i = 0; i < npil; i++) exp_pre.push_back(1'b0);
      if (mmod == 0) exp_pre = {exp_pre, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1};
      else           exp_pre = {exp_pre, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1, 1'b1};
      for (int i = 0; i < npre; i++) check(sy[i] == exp_pre[i], "preamble");
    end
    for (int i = 0; i < nbits; i++) data.push_back(sy[npre + i]);
    check(sy[nsym-1] == 1'b1, "dummy 1");
    wait_cyc(2 * h);
    check(tx == 1'b0, "tx idle after reply");
    case (mmod) 0: n_fm0++; 1: n_m2++; 2: n_m4++; default: n_m8++; endcase
    if (trext) n_trext++;
  endtask

  function automatic longint val(input bits_t b, input int from, input int n);
    longint v = 0;
    for (int i = 0; i < n; i++) v = (v << 1) | longint'(b[from + i]);
    return v;
  endfunction

  function automatic int t1_expect();
    int a = tari + data1, b = 20 * half_period();
    return a > b ? a : b;
  endfunction

  task automatic check_latency(input int lat);
    int t1 = t1_expect();
    check(lat >= t1 && lat <= t1 + 8, $sformatf("T1 latency %0d vs %0d", lat, t1));
    n_t1++;
  endtask

  // ---------------- commands ----------------
  function automatic bits_t query(input int q);
    bits_t b = {1'b1, 1'b0, 1'b0, 1'b0};
    b = {b, dr[0], num(mmod, 2), trext[0], num(0, 5), num(q, 4)};
    b = {b, num(crc5(b), 5)};
    return b;
  endfunction
  function automatic bits_t with_crc16(input bits_t b);
    return {b, num(crc16(b), 16)};
  endfunction

  bits_t r;
  int lat;
  logic [15:0] rn16, handle, sample_seen;
  int replied;

  task automatic do_query(input int q, output bit got);
    send(query(q), 1'b1);
    receive(16, r, lat);
    got = (r.size() == 16);
    if (got) begin
      rn16 = 16'(val(r, 0, 16));
      check_latency(lat);
      check(tag_state == ST_REPLY, "state Reply after RN16");
    end
  endtask

  task automatic do_ack(input logic [15:0] v, input int words);
    send({1'b0, 1'b1, num(v, 16)}, 1'b0);
    receive(16 * (words + 1) + 16, r, lat);
    check(r.size() == 16 * (words + 1) + 16, "EPC reply received");
    if (r.size() == 16 * (words + 1) + 16) begin
      bits_t body;
      check_latency(lat);
      check(val(r, 0, 16) == longint'(words) << 11, "PC word");
      for (int k = 0; k < words; k++)
        check(val(r, 16 + 16 * k, 16) == longint'({4'hE, 4'(k), 8'(k * 17)}), $sformatf("EPC word %0d", k));
      for (int i = 0; i < 16 * (words + 1); i++) body.push_back(r[i]);
      check(val(r, 16 * (words + 1), 16) == longint'(crc16(body)), "EPC reply CRC");
      check(tag_state == ST_ACKNOWLEDGED || tag_state == ST_SECURED, "state after ACK");
      n_epc++;
    end
  endtask

  task automatic do_reqrn(input logic [15:0] v, output logic [15:0] got);
    send(with_crc16({num(8'hC1, 8), num(v, 16)}), 1'b0);
    receive(32, r, lat);
    check(r.size() == 32, "Req_RN reply received");
    got = 16'(val(r, 0, 16));
    if (r.size() == 32) begin
      bits_t body;
      for (int i = 0; i < 16; i++) body.push_back(r[i]);
      check(val(r, 16, 16) == longint'(crc16(body)), "Req_RN reply CRC");
      n_reqrn++;
    end
  endtask

  // Read: returns words; expects an error reply if err
  task automatic do_read(input int bank, input int ptr, input int cnt, input bit err, output bits_t words);
    int n = err ? (1 + 8 + 16) : (1 + 16 * cnt + 16);
    send(with_crc16({num(8'hC2, 8), num(bank, 2), num(ptr, 8), num(cnt, 8), num(handle, 16)}), 1'b0);
    receive(n + 16, r, lat);
    words = {};
    check(r.size() == n + 16, "Read reply received");
    if (r.size() == n + 16) begin
      bits_t body;
      for (int i = 0; i < n; i++) body.push_back(r[i]);
      check(val(r, n, 16) == longint'(crc16(body)), "Read reply CRC");
      check(r[0] == err, "Read header");
      check(val(r, n - 16, 16) == longint'(handle), "Read handle");
      if (err) begin
        check(val(r, 1, 8) == 3, "error code");
        n_err++;
      end else begin
        for (int i = 1; i < 1 + 16 * cnt; i++) words.push_back(r[i]);
        n_read++;
      end
    end
  endtask

  task automatic do_write(input int bank, input int ptr, input logic [15:0] d);
    logic [15:0] c;
    do_reqrn(handle, c);
    send(with_crc16({num(8'hC3, 8), num(bank, 2), num(ptr, 8), num(d ^ c, 16), num(handle, 16)}), 1'b0);
    receive(1 + 16 + 16, r, lat);
    check(r.size() == 33, "Write reply received");
    if (r.size() == 33) begin
      bits_t body;
      for (int i = 0; i < 17; i++) body.push_back(r[i]);
      check(r[0] == 1'b0 && val(r, 1, 16) == longint'(handle), "Write reply");
      check(val(r, 17, 16) == longint'(crc16(body)), "Write reply CRC");
      n_write++;
    end
  endtask

  task automatic set_link(input int t, input int blf_khz, input int d, input int m, input int te);
    tari = t; data1 = 2 * t; pw = t / 2; dr = d; mmod = m; trext = te;
    // TRcal = DR / BLF, in cycles
    trcal = d ? (64 * CLK_MHZ * 1000) / (3 * blf_khz) : (8 * CLK_MHZ * 1000) / blf_khz;
    n_tari++; n_blf++;
  endtask

  // watchdog
  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one inventory round; returns the tag's own time (T1 + reply, twice)
  task automatic read_once(input int words, output int tag_cycles, output int all_cycles);
    bit got;
    int t0 = int'(cyc), a;
    do_query(0, got);
    check(got, "RN16");
    a = reply_end - t_end;
    do_ack(rn16, words);
    tag_cycles = a + (reply_end - t_end);
    all_cycles = reply_end - t0 + 400;
  endtask

  task automatic set_epc_len(input int words);
    bit got;
    do_query(0, got);
    do_ack(rn16, cur_words);
    do_reqrn(rn16, handle);
    do_write(1, 1, 16'(words << 11));
    cur_words = words;
  endtask

  int cur_words = 30;
  int n_qsweep = 0;

  initial begin
    int tagc, allc, q7;
    bit got;
    real rr_tag, rr_all;
    int fig4[6] = '{2, 4, 6, 10, 16, 30};
    int fig5[12] = '{1, 2, 3, 4, 6, 8, 9, 10, 16, 20, 29, 30};
    wait_cyc(10);
    rst_n = 1'b1;
    wait_cyc(2000);

    // read-rate settings: Tari 7.5 us, Miller-2, 640 kHz
    set_link(180, 640, 1, 1, 0);
    foreach (fig4[i]) begin
      set_epc_len(fig4[i]);
      read_once(fig4[i], tagc, allc);
      rr_tag = 24.0e6 / tagc;
      rr_all = 24.0e6 / allc;
      $display("M2  EPC %3d bits: tag time %5.1f us -> %6.0f reads/s tag limit, %6.0f reads/s with this reader model",
               16 * fig4[i], tagc / 24.0, rr_tag, rr_all);
      if (fig4[i] == 2)  check(rr_tag >= 1200.0, "tag sustains 1200 reads/s at 32 bits");
      if (fig4[i] == 30) check(rr_tag >= 400.0, "tag sustains 400 reads/s at 480 bits");
    end
    // data-rate settings: Tari 6.25 us, FM0, 640 kHz
    set_link(150, 640, 1, 0, 0);
    foreach (fig5[i]) begin
      set_epc_len(fig5[i]);
      read_once(fig5[i], tagc, allc);
      rr_tag = 24.0e6 / tagc;
      $display("FM0 EPC %3d bits: tag time %5.1f us -> %6.1f kb/s tag limit, %6.1f kb/s with this reader model",
               16 * fig5[i], tagc / 24.0, rr_tag * 16 * fig5[i] / 1000.0, 24.0e6 / allc * 16 * fig5[i] / 1000.0);
      if (fig5[i] == 30) check(rr_tag * 480.0 >= 307.0e3, "tag sustains 307 kb/s at 480 bits");
    end
    // read rate against Q (read-rate settings, 32-bit EPC): a Query with Q,
    // then QueryRep until the tag's slot comes up (at most 2^Q - 1 of them),
    // then ACK; the rate counts every command the reader model needed
    set_link(180, 640, 1, 1, 0);
    set_epc_len(2);
    for (int q = 0; q <= 6; q++) begin
      int t0, t_q, reps, worst;
      t0 = int'(cyc);
      worst = 0;
      for (int k = 0; k < 4; k++) begin
        do_query(q, got);
        reps = 0;
        while (!got && reps < (1 << q)) begin
          send(num(0, 4), 1'b0);
          receive(16, r, lat);
          got = (r.size() == 16);
          if (got) rn16 = 16'(val(r, 0, 16));
          reps++;
        end
        check(got && reps <= (1 << q) - 1, $sformatf("Q=%0d slot within 2^Q-1 QueryReps (%0d)", q, reps));
        if (got) do_ack(rn16, cur_words);
        if (reps > worst) worst = reps;
        n_qsweep++;
      end
      t_q = int'(cyc) - t0;
      $display("M2  Q=%0d, EPC 32 bits: %6.0f reads/s with this reader model (most QueryReps %0d)",
               q, 4 * 24.0e6 / t_q, worst);
    end
    // Q = 7 as in the data-rate setting: find the slot with QueryRep
    set_link(150, 640, 1, 0, 0);
    q7 = 0;
    do_query(7, got);
    while (!got && q7 < 128) begin
      send(num(0, 4), 1'b0);
      receive(16, r, lat);
      got = (r.size() == 16);
      if (got) rn16 = 16'(val(r, 0, 16));
      q7++;
    end
    check(got, "Q=7 slot found within 128 QueryReps");
    if (got) do_ack(rn16, cur_words);
    $display("Q=7: tag answered after %0d QueryReps", q7);
    check(n_qsweep == 28, "Q sweep ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
