// Preamble or frame-sync generator for tag replies.
// Supplies the Gen2 reply preamble as a bit sequence for the response
// encoder. FM0: 1,0,1,0,v,1 where v is a violation symbol (pre_viol), with
// 12 leading data-0 pilot symbols when TRext=1. Miller: 4 (TRext=0) or 16
// (TRext=1) data-0 pilot symbols followed by 0,1,0,1,1,1. The sequence rewinds after
// its last symbol (and on start); each pre_ready steps it; the first symbol
// is presented while idle, so it can be taken in the start cycle; pre_last marks the final symbol.
// The sequences are Gen2's; the handshake is this design's.
module preamble_generator
  import wisp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  mod_e mode,
  input  logic trext,
  input  logic pre_ready,
  output logic pre_bit,
  output logic pre_viol,
  output logic pre_last
);
  localparam logic [5:0] FM0_PAT    = 6'b101001;  // first symbol at bit 5
  localparam logic [5:0] MILLER_PAT = 6'b010111;

  logic [4:0] idx;
  logic [4:0] n_pilot;
  logic [4:0] k;

  always_comb begin
    if (mode == MOD_FM0) n_pilot = trext ? 5'd12 : 5'd0;
    else                 n_pilot = trext ? 5'd16 : 5'd4;
    k = idx - n_pilot;
    if (idx < n_pilot) begin
      pre_bit  = 1'b0;
      pre_viol = 1'b0;
    end else if (mode == MOD_FM0) begin
      pre_bit  = FM0_PAT[3'd5 - k[2:0]];
      pre_viol = (k == 5'd4);
    end else begin
      pre_bit  = MILLER_PAT[3'd5 - k[2:0]];
      pre_viol = 1'b0;
    end
    pre_last = (idx == n_pilot + 5'd5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    idx <= '0;
    else if (start)                idx <= pre_ready ? 5'd1 : 5'd0;  // first symbol taken at once
    else if (pre_ready)            idx <= pre_last ? 5'd0 : idx + 1'b1;  // rewind for the next reply
  end
endmodule
