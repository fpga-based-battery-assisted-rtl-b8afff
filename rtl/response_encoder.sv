// Response encoder and RF-switch timing (backscatter controller).
// Encodes a reply into the level that drives the antenna's RF switch (tx),
// one half BLF period per half_tick. A reply is the preamble from the
// preamble generator, then the framer's bits, then the end-of-signalling
// dummy data-1; after it tx returns to 0 (no modulation).
//  FM0: the level inverts at every symbol boundary and, for a data-0, also
//       in mid-symbol; the preamble's violation symbol has no inversion at
//       all. The idle level is 0, so the first symbol starts high.
//  Miller (M = 2, 4, 8): a baseband level inverts in mid-symbol for a data-1
//       and at the boundary between two data-0s; it is multiplied by a square
//       subcarrier with M periods per symbol that starts high at every symbol.
// A symbol lasts 2 half periods (FM0) or 2*M half periods (Miller), i.e.
// 2 << mode ticks. start begins the first symbol at once (the divider is
// restarted at the same time); busy stays high until done pulses at the end
// of the dummy bit. The encodings are Gen2's; polarities are this design's.
module response_encoder
  import wisp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  mod_e mode,
  input  logic half_tick,
  // preamble source
  input  logic pre_bit,
  input  logic pre_viol,
  input  logic pre_last,
  output logic pre_ready,
  // data source
  input  logic bit_valid,
  input  logic bit_val,
  input  logic bit_last,
  output logic bit_ready,
  // RF switch
  output logic tx,
  output logic busy,
  output logic done,
  output logic underrun
);
  typedef enum logic [2:0] { E_IDLE, E_PRE, E_DATA, E_DUMMY, E_TAIL } estate_e;
  estate_e     st;
  logic [4:0]  hcnt;      // half periods into the current symbol
  logic [4:0]  len_h;     // half periods per symbol
  logic [4:0]  mid_h;
  logic        lvl;       // FM0 level / Miller baseband
  logic        cur_bit;   // symbol being sent
  logic        cur_viol;  // FM0 violation symbol
  logic        boundary;  // start of a new symbol this cycle
  logic        nb, nv;    // next symbol and its violation flag
  logic        fm0;

  assign fm0      = (mode == MOD_FM0);
  assign len_h    = 5'd2 << mode;
  assign mid_h    = 5'd1 << mode;
  assign boundary = start || (busy && half_tick && hcnt == len_h - 1'b1);

  // which source supplies the next symbol
  always_comb begin
    nb = 1'b1;
    nv = 1'b0;
    pre_ready = 1'b0;
    bit_ready = 1'b0;
    if (start || st == E_PRE) begin
      nb = pre_bit;
      nv = pre_viol;
      pre_ready = boundary;
    end else if (st == E_DATA) begin
      nb = bit_val;
      bit_ready = boundary;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= E_IDLE;
      hcnt     <= '0;
      lvl      <= 1'b0;
      cur_bit  <= 1'b0;
      cur_viol <= 1'b0;
      tx       <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
      underrun <= 1'b0;
    end else begin
      done <= 1'b0;
      if (boundary) begin
        hcnt <= '0;
        if (st == E_TAIL && !start) begin
          st   <= E_IDLE;
          busy <= 1'b0;
          done <= 1'b1;
          tx   <= 1'b0;
          lvl  <= 1'b0;
        end else begin
          // next state of the symbol source
          if (start)                      begin st <= pre_last ? E_DATA : E_PRE; busy <= 1'b1; end
          else if (st == E_PRE && pre_last) st <= E_DATA;
          else if (st == E_DATA && bit_last) st <= E_DUMMY;
          else if (st == E_DUMMY)           st <= E_TAIL;
          if (st == E_DATA && !start && !bit_valid) underrun <= 1'b1;
          cur_bit  <= nb;
          cur_viol <= nv;
          if (fm0) begin
            if (!nv) begin
              lvl <= start ? 1'b1 : ~lvl;
              tx  <= start ? 1'b1 : ~lvl;
            end else begin
              tx  <= lvl;
            end
          end else begin
            // Miller: invert between two data-0s; subcarrier starts high
            if (!start && !nb && !cur_bit) begin
              lvl <= ~lvl;
              tx  <= ~lvl;
            end else if (start) begin
              lvl <= 1'b1;
              tx  <= 1'b1;
            end else begin
              tx  <= lvl;
            end
          end
        end
      end else if (busy && half_tick) begin
        hcnt <= hcnt + 1'b1;
        if (fm0) begin
          if (!cur_bit && !cur_viol) begin
            lvl <= ~lvl;
            tx  <= ~lvl;
          end
        end else begin
          // subcarrier phase flips every half period; data-1 flips baseband
          if (cur_bit && (hcnt + 1'b1 == mid_h)) begin
            lvl <= ~lvl;
            tx  <= (~lvl) ^ hcnt[0] ^ 1'b1;
          end else begin
            tx  <= lvl ^ hcnt[0] ^ 1'b1;
          end
        end
      end
    end
  end
endmodule
