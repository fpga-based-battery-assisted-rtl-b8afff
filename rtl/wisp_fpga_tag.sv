// FPGA digital core of a battery-assisted passive EPC Gen2 RFID tag.
// Sits between the analog front end (RX: comparator output of the envelope
// detector, TX: control of the backscatter RF switch) and an SPI sensor, and
// implements the tag side of the reader-tag protocol in plain logic, without
// device-specific primitives:
//   receive  rx -> sot_detector -> delimiter_verifier -> preamble_handler
//            -> command_framer (+ crc_checker) -> command_decoder
//   control  tag_controller (main entity) with rng16 and tag_memory;
//            sensor_manager fills the User bank from the sensor
//   transmit response_framer (+ crc_generator) and preamble_generator
//            -> response_encoder -> tx, timed by freq_divider
// Tari, RTcal and TRcal are measured from every frame, and DR, M and TRext
// are taken from every Query, so the link frequency (40-640 kHz) and the
// modulation (FM0, Miller 2/4/8) follow the reader without reconfiguration.
// clk is the free-running system clock of CLK_HZ (the oscillator is outside
// this module). Reset is asynchronous, active low. The block split follows
// the original design's functional blocks; the clock rate, memory sizes and the
// choice of SPI are this design's.
module wisp_fpga_tag
  import wisp_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 24_000_000,
  parameter int unsigned EPC_WORDS     = 30,
  parameter int unsigned BANK_WORDS    = 32,
  parameter int unsigned SAMPLE_CYCLES = 24_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       tx,
  output logic       spi_sclk,
  output logic       spi_cs_n,
  output logic       spi_mosi,
  input  logic       spi_miso,
  output tag_state_e tag_state
);
  localparam int unsigned CW = 16;
  localparam int unsigned MAX_BITS = 66;

  // receive path
  logic rx_s, rx_rise, rx_fall, carrier, delim_start;
  logic dv_busy, delim_ok, delim_err;
  logic ph_busy, trcal_valid, cal_done, sym_valid, frame_end, frame_abort;
  logic [CW-1:0] tari, rtcal, trcal, sym_ticks;
  logic crc_init, bit_valid_rx, bit_val_rx, frame_valid;
  logic [MAX_BITS-1:0] frame;
  logic [7:0] len;
  logic crc5_ok, crc16_ok;
  logic cmd_valid;
  cmd_t cmd;

  // control
  logic [15:0] rn, pc_word;
  logic dr, trext, tx_start, tx_busy;
  mod_e mode;
  reply_t reply;
  logic a_we;
  logic [1:0] a_bank;
  logic [7:0] a_ptr;
  logic [15:0] a_data;
  logic [3:0] q;
  logic [15:0] slot;

  // transmit path
  logic [CW-1:0] half_ticks;
  logic half_tick;
  logic f_valid, f_bit, f_last, f_ready, f_done;
  logic [1:0] rd_bank;
  logic [7:0] rd_ptr;
  logic [15:0] rd_data;
  logic g_init, g_valid, g_bit;
  logic [15:0] g_crc;
  logic p_bit, p_viol, p_last, p_ready;
  logic enc_busy, enc_done, underrun;

  // sensor
  logic s_req, s_ack, s_valid;
  logic [1:0] s_bank;
  logic [7:0] s_ptr;
  logic [15:0] s_data, s_sample;

  sot_detector #(.CLK_HZ(CLK_HZ)) u_sot (
    .clk, .rst_n, .rx, .arm(!dv_busy && !ph_busy && !tx_busy),
    .rx_s, .rx_rise, .rx_fall, .carrier, .delim_start);

  delimiter_verifier #(.CLK_HZ(CLK_HZ)) u_delim (
    .clk, .rst_n, .delim_start, .rx_rise, .busy(dv_busy), .delim_ok, .delim_err);

  preamble_handler #(.CW(CW)) u_pre_rx (
    .clk, .rst_n, .delim_ok, .rx_s, .rx_rise, .busy(ph_busy), .tari, .rtcal, .trcal,
    .trcal_valid, .cal_done, .sym_valid, .sym_ticks, .frame_end, .frame_abort);

  command_framer #(.MAX_BITS(MAX_BITS), .CW(CW)) u_framer (
    .clk, .rst_n, .cal_done, .sym_valid, .sym_ticks, .rtcal, .frame_end,
    .crc_init, .bit_valid(bit_valid_rx), .bit_val(bit_val_rx), .frame_valid, .frame, .len);

  crc_checker u_crc_chk (
    .clk, .rst_n, .init(crc_init), .bit_valid(bit_valid_rx), .bit_val(bit_val_rx),
    .crc5_ok, .crc16_ok);

  command_decoder #(.MAX_BITS(MAX_BITS)) u_dec (
    .clk, .rst_n, .frame_valid, .frame, .len, .crc5_ok, .crc16_ok, .cmd_valid, .cmd);

  rng16 u_rng (.clk, .rst_n, .rn);

  tag_controller #(.CW(CW), .BANK_WORDS(BANK_WORDS)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd, .rx_rise, .rtcal, .half_ticks, .rn, .pc_word,
    .tx_done(enc_done), .dr, .mode, .trext, .tx_start, .reply, .tx_busy,
    .mem_we(a_we), .mem_bank(a_bank), .mem_ptr(a_ptr), .mem_data(a_data),
    .state(tag_state), .q, .slot);

  tag_memory #(.BANK_WORDS(BANK_WORDS), .EPC_WORDS(EPC_WORDS)) u_mem (
    .clk, .rst_n, .rd_bank, .rd_ptr, .rd_data, .a_we, .a_bank, .a_ptr, .a_data,
    .b_req(s_req), .b_bank(s_bank), .b_ptr(s_ptr), .b_data(s_data), .b_ack(s_ack), .pc_word);

  sensor_manager #(.CLK_DIV(4), .SAMPLE_CYCLES(SAMPLE_CYCLES)) u_sensor (
    .clk, .rst_n, .spi_sclk, .spi_cs_n, .spi_mosi, .spi_miso,
    .wr_req(s_req), .wr_bank(s_bank), .wr_ptr(s_ptr), .wr_data(s_data), .wr_ack(s_ack),
    .sample(s_sample), .sample_valid(s_valid));

  freq_divider #(.CW(CW)) u_div (
    .clk, .rst_n, .en(enc_busy), .sync_clr(tx_start), .trcal, .dr, .half_ticks, .half_tick);

  response_framer u_resp (
    .clk, .rst_n, .start(tx_start), .desc(reply),
    .bit_valid(f_valid), .bit_val(f_bit), .bit_last(f_last), .bit_ready(f_ready), .done(f_done),
    .rd_bank, .rd_ptr, .rd_data,
    .crc_init(g_init), .crc_bit_valid(g_valid), .crc_bit_val(g_bit), .crc_in(g_crc));

  crc_generator u_crc_gen (
    .clk, .rst_n, .init(g_init), .bit_valid(g_valid), .bit_val(g_bit), .crc_out(g_crc));

  preamble_generator u_pre_tx (
    .clk, .rst_n, .start(tx_start), .mode, .trext, .pre_ready(p_ready),
    .pre_bit(p_bit), .pre_viol(p_viol), .pre_last(p_last));

  response_encoder u_enc (
    .clk, .rst_n, .start(tx_start), .mode, .half_tick,
    .pre_bit(p_bit), .pre_viol(p_viol), .pre_last(p_last), .pre_ready(p_ready),
    .bit_valid(f_valid), .bit_val(f_bit), .bit_last(f_last), .bit_ready(f_ready),
    .tx, .busy(enc_busy), .done(enc_done), .underrun);

endmodule
