// 16-bit pseudo-random number generator.
// A maximal-length Fibonacci LFSR (x^16+x^14+x^13+x^11+1) that steps every
// clock cycle, so the value sampled by the tag depends on when the reader's
// commands arrive. rn is the current register; it is never zero. The
// polynomial and free-running stepping are this design's choice; the
// original design calls for a 16-bit pseudo-RNG for slot selection and anti-collision.
module rng16 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] rn
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rn <= (SEED == 16'h0) ? 16'h0001 : SEED;
    else        rn <= {rn[14:0], rn[15] ^ rn[13] ^ rn[12] ^ rn[10]};
  end
endmodule
