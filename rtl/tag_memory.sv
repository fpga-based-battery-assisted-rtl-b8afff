// Tag memory: the four Gen2 memory banks.
// Reserved (kill and access passwords), EPC (word 0 StoredCRC, word 1
// Protocol-Control word, words 2.. the EPC), TID and User, each BANK_WORDS
// 16-bit words, held in one array addressed by {bank, word}. One synchronous
// read port (data one cycle after the address) serves reply framing; two
// write ports serve the reader's Write command (port A, always wins) and the
// sensor manager (port B, request/acknowledge, waits while A writes).
// Writes beyond the bank are ignored; so are reads, which return 0.
// pc_word always shows EPC-bank word 1, whose top five bits give the EPC
// length in words. Initial contents: EPC_WORDS-word EPC with a fixed pattern
// (word k = {4'hE, k[3:0], k*17}), TID E280_1105, all else zero. Bank layout
// is Gen2's; sizes and contents are this design's choice. StoredCRC is not
// kept up to date: replies compute their CRC as they are sent.
module tag_memory #(
  parameter int unsigned BANK_WORDS = 32,
  parameter int unsigned EPC_WORDS  = 30
) (
  input  logic        clk,
  input  logic        rst_n,
  // read port
  input  logic [1:0]  rd_bank,
  input  logic [7:0]  rd_ptr,
  output logic [15:0] rd_data,
  // write port A (reader Write)
  input  logic        a_we,
  input  logic [1:0]  a_bank,
  input  logic [7:0]  a_ptr,
  input  logic [15:0] a_data,
  // write port B (sensor manager)
  input  logic        b_req,
  input  logic [1:0]  b_bank,
  input  logic [7:0]  b_ptr,
  input  logic [15:0] b_data,
  output logic        b_ack,
  output logic [15:0] pc_word
);
  localparam int unsigned AW = $clog2(BANK_WORDS);
  logic [15:0] mem [4*BANK_WORDS];

  initial begin
    for (int i = 0; i < 4 * BANK_WORDS; i++) mem[i] = 16'h0000;
    mem[BANK_WORDS + 1] = {5'(EPC_WORDS), 11'b0};
    for (int k = 0; k < EPC_WORDS; k++)
      mem[BANK_WORDS + 2 + k] = {4'hE, 4'(k), 8'(k * 17)};
    mem[2 * BANK_WORDS]     = 16'hE280;
    mem[2 * BANK_WORDS + 1] = 16'h1105;
  end

  always_ff @(posedge clk) begin
    if (a_we && a_ptr < 8'(BANK_WORDS))
      mem[{a_bank, a_ptr[AW-1:0]}] <= a_data;
    else if (b_req && b_ptr < 8'(BANK_WORDS))
      mem[{b_bank, b_ptr[AW-1:0]}] <= b_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_data <= '0;
      b_ack   <= 1'b0;
    end else begin
      rd_data <= (rd_ptr < 8'(BANK_WORDS)) ? mem[{rd_bank, rd_ptr[AW-1:0]}] : 16'h0;
      b_ack   <= b_req && !a_we && !b_ack;
    end
  end

  assign pc_word = mem[BANK_WORDS + 1];
endmodule
