// Start-of-transmission detector.
// Synchronises the comparator output RX of the analog front end with two
// flip-flops, decides that the reader carrier is present once RX has stayed
// high for CW_MIN_US, and then reports the next falling edge as the start of a
// delimiter (a reader frame). It also gives single-cycle rise/fall pulses of
// the synchronised signal for the later receive stages.
// Interface: rx (asynchronous), arm (high while the receiver is idle and may
// accept a new frame). Outputs are registered; the edge pulses lag RX by
// three clock cycles. Carrier detection by a minimum high time is this
// design's choice; the original design only names the function.
module sot_detector #(
  parameter int unsigned CLK_HZ    = 24_000_000,
  parameter int unsigned CW_MIN_US = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rx,
  input  logic arm,
  output logic rx_s,        // synchronised RX
  output logic rx_rise,
  output logic rx_fall,
  output logic carrier,     // carrier present for CW_MIN_US
  output logic delim_start  // falling edge after carrier: delimiter begins
);
  localparam int unsigned CW_TICKS = CLK_HZ / 1_000_000 * CW_MIN_US;
  localparam int unsigned CW = $clog2(CW_TICKS + 1);

  logic [2:0] sync;
  logic [CW-1:0] hi_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync   <= 3'b000;
      hi_cnt <= '0;
    end else begin
      sync <= {sync[1:0], rx};
      if (!sync[1])
        hi_cnt <= '0;
      else if (hi_cnt != CW'(CW_TICKS))
        hi_cnt <= hi_cnt + 1'b1;
    end
  end

  assign rx_s        = sync[2];
  assign rx_rise     = sync[1] & ~sync[2];
  assign rx_fall     = ~sync[1] & sync[2];
  assign carrier     = (hi_cnt == CW'(CW_TICKS));
  assign delim_start = rx_fall & arm & carrier;
endmodule
