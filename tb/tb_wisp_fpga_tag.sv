// End-to-end test of the tag core at its default parameters (24 MHz clock,
// 480-bit EPC). A reader model sends PIE-coded Gen2 commands on rx and a
// receiver model samples tx once per half link period and decodes FM0 or
// Miller replies. The test runs an inventory (Query, ACK), an access sequence
// (Req_RN, Read of the sensor word, Write, Read back, out-of-range Read),
// reader setting changes (Tari 6.25/12.5/25 us; BLF 640/320/240 kHz;
// FM0, Miller 2/4/8; TRext 0/1), slotted anti-collision with QueryRep and
// QueryAdjust, NAK, and frames the tag must ignore (bad CRC, bad delimiter).
// Replies are checked against values and CRCs computed here, and the reply
// delay T1 is checked against max(RTcal, 10/BLF) and the 20 us bound.
`timescale 1ns/1ps
module tb_wisp_fpga_tag;
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
    wait_cyc(h / 2);
    for (int k = 0; k < nsym * hps; k++) begin
      #1 hv.push_back(tx);
      wait_cyc(h);
    end
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
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit got;
    bits_t w;
    wait_cyc(10);
    rst_n = 1'b1;
    wait_cyc(2000);

    // ---- inventory at the data-rate test settings: Tari 6.25 us, 640 kHz, FM0
    set_link(150, 640, 1, 0, 0);
    do_query(0, got);
    check(got, "Query Q=0 answered");
    check(lat <= 20 * CLK_MHZ, "reply delay under 20 us");
    do_ack(rn16, 30);
    do_ack(rn16, 30);                       // repeated ACK in Acknowledged
    do_reqrn(rn16, handle);
    check(tag_state == ST_SECURED, "state Secured");

    // ---- Read the sensor word (User bank word 0)
    check(s_frames >= 2 && s_cmd == 16'h8000, "sensor configured and read");
    do_read(3, 0, 1, 1'b0, w);
    if (w.size() == 16) begin
      sample_seen = 16'(val(w, 0, 16));
      check(sample_seen == s_last || sample_seen == s_last - 16'd1, "Read returns sensor sample");
      n_sensor++;
    end
    // ---- Write then read back; TID read; out-of-range read
    do_write(3, 5, 16'hC0DE);
    do_read(3, 5, 1, 1'b0, w);
    if (w.size() == 16) check(val(w, 0, 16) == 16'hC0DE, "Write/Read back");
    do_read(2, 0, 2, 1'b0, w);
    if (w.size() == 32) check(val(w, 0, 32) == 32'hE280_1105, "TID words");
    do_read(3, 30, 5, 1'b1, w);

    // ---- bad CRC Query is ignored
    begin
      bits_t b = query(0);
      b[21] = ~b[21];
      send(b, 1'b1);
      receive(16, r, lat);
      check(r.size() == 0, "bad-CRC Query ignored");
      if (r.size() == 0) n_crc_rej++;
      check(tag_state == ST_SECURED, "state kept on bad CRC");
    end
    // ---- bad delimiter: 20 us low
    delim = 480;
    send(query(0), 1'b1);
    receive(16, r, lat);
    check(r.size() == 0, "bad delimiter ignored");
    if (r.size() == 0) n_delim_rej++;
    delim = 300;

    // ---- NAK from Secured
    send(num(8'hC0, 8), 1'b0);
    wait_cyc(2000);
    check(tag_state == ST_ARBITRATE, "NAK -> Arbitrate");
    n_nak++;

    // ---- reader setting changes, each answered RN16 and EPC
    set_link(300, 320, 1, 1, 1);            // Tari 12.5, BLF 320 kHz, Miller 2, pilot
    do_query(0, got); check(got, "Query M2"); if (got) do_ack(rn16, 30);
    set_link(600, 240, 1, 2, 0);            // Tari 25, BLF 240 kHz, Miller 4
    do_query(0, got); check(got, "Query M4"); if (got) do_ack(rn16, 30);
    set_link(150, 640, 1, 3, 0);            // Tari 6.25, 640 kHz, Miller 8
    do_query(0, got); check(got, "Query M8");
    set_link(180, 640, 1, 1, 0);            // Tari 7.5, 640 kHz, Miller 2 (read-rate test settings)
    do_query(0, got); check(got, "Query M2 Tari 7.5"); if (got) do_ack(rn16, 30);
    set_link(150, 320, 0, 0, 0);            // DR = 8: Tari 6.25, 320 kHz, FM0
    do_query(0, got); check(got, "Query DR=8");
    set_link(150, 640, 1, 0, 1);            // FM0 with pilot tone
    do_query(0, got); check(got, "Query FM0 TRext");

    // ---- slotted anti-collision: Q = 3, then QueryReps until the tag answers
    set_link(150, 640, 1, 0, 0);
    replied = 0;
    for (int round = 0; round < 4 && replied < 2; round++) begin
      do_query(3, got);
      if (got) continue;
      check(tag_state == ST_ARBITRATE, "Arbitrate after Query with slot > 0");
      for (int k = 1; k < 8 && !got; k++) begin
        send(num(0, 4), 1'b0);
        receive(16, r, lat);
        got = (r.size() == 16);
        if (got) begin
          rn16 = 16'(val(r, 0, 16));
          check_latency(lat);
          n_slot++;
          replied++;
        end
      end
      check(got, "tag answered within 2^Q slots");
      if (got) do_ack(rn16, 30);
    end
    // ---- QueryAdjust: Q 3 -> 2 (repeat until a redraw hits slot 0)
    got = 0;
    for (int k = 0; k < 12 && !got; k++) begin
      do_query(3, got);
      if (!got) begin
        send(num(9'b1001_00_011, 9), 1'b0);
        receive(16, r, lat);
        got = (r.size() == 16);
        n_qadj++;
        check(dut.u_ctrl.q == 4'd2, "QueryAdjust lowers Q");
      end
    end
    check(got, "QueryAdjust redraw answered");

    check(n_fm0 > 0 && n_m2 > 0 && n_m4 > 0 && n_m8 > 0, "all modulations used");
    check(n_trext > 0 && n_t1 > 0 && n_slot > 0 && n_qadj > 0 && n_nak > 0, "protocol mechanisms used");
    check(n_crc_rej > 0 && n_delim_rej > 0 && n_read > 0 && n_write > 0 && n_err > 0, "access mechanisms used");
    check(n_sensor > 0 && n_epc > 0 && n_reqrn > 0, "sensor, EPC and Req_RN used");
    $display("mechanisms: FM0=%0d M2=%0d M4=%0d M8=%0d TRext=%0d T1=%0d slots=%0d QAdj=%0d NAK=%0d crc_rej=%0d delim_rej=%0d read=%0d write=%0d err=%0d sensor=%0d epc=%0d reqrn=%0d",
             n_fm0, n_m2, n_m4, n_m8, n_trext, n_t1, n_slot, n_qadj, n_nak, n_crc_rej, n_delim_rej, n_read, n_write, n_err, n_sensor, n_epc, n_reqrn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
