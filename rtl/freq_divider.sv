// Frequency divider for the backscatter link.
// Derives the backscatter link frequency from the reader's TRcal and the
// divide ratio DR of the Query: BLF = DR / TRcal, so one half BLF period is
// TRcal/16 clock cycles for DR = 8 and 3*TRcal/128 for DR = 64/3, both
// rounded to the nearest cycle. While en is high, half_tick pulses once
// every half period; sync_clr restarts the period so the first tick of a
// reply comes exactly one half period after the reply starts. half_ticks is
// also given to the controller for the T1 reply delay. The DR/TRcal rule is
// Gen2's; rounding to whole cycles is this design's choice.
module freq_divider #(
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          sync_clr,
  input  logic [CW-1:0] trcal,
  input  logic          dr,
  output logic [CW-1:0] half_ticks,
  output logic          half_tick
);
  logic [CW+1:0] t3;
  logic [CW-1:0] cnt;

  assign t3         = {2'b00, trcal} + {1'b0, trcal, 1'b0};
  assign half_ticks = dr ? CW'((t3 + (CW+2)'(64)) >> 7) : CW'(({2'b00, trcal} + (CW+2)'(8)) >> 4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      half_tick <= 1'b0;
    end else begin
      half_tick <= 1'b0;
      if (sync_clr) begin
        cnt <= CW'(2);   // the start edge itself counts as cycle one
      end else if (!en) begin
        cnt <= CW'(1);
      end else if (cnt >= half_ticks) begin
        cnt       <= CW'(1);
        half_tick <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
