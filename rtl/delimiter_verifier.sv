// Delimiter verifier.
// After the start-of-transmission detector reports a falling edge, this block
// counts how long RX stays low. A low pulse of 12.5 us +-5% (the Gen2
// delimiter) that ends in a rising edge marks the start of a frame:
// delim_ok pulses in the cycle of that rising edge, which is also the start
// of the data-0 calibration symbol. A pulse that is too short or too long
// gives delim_err and the verifier returns to idle. The length and tolerance
// come from the original design; the counter limits are derived from CLK_HZ.
// Interface: delim_start, rx_s and rx_rise from sot_detector; busy is high
// while a delimiter is being measured.
module delimiter_verifier #(
  parameter int unsigned CLK_HZ   = 24_000_000,
  parameter int unsigned DELIM_NS = 12_500,
  parameter int unsigned TOL_PCT  = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic delim_start,
  input  logic rx_rise,
  output logic busy,
  output logic delim_ok,
  output logic delim_err
);
  localparam longint unsigned NOM = longint'(CLK_HZ) * DELIM_NS / 1_000_000_000;
  localparam longint unsigned LO  = NOM * (100 - longint'(TOL_PCT)) / 100;
  localparam longint unsigned HI  = (NOM * (100 + longint'(TOL_PCT)) + 99) / 100;
  localparam int unsigned W = $clog2(HI + 2);

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      delim_ok  <= 1'b0;
      delim_err <= 1'b0;
    end else begin
      delim_ok  <= 1'b0;
      delim_err <= 1'b0;
      if (!busy) begin
        if (delim_start) begin
          busy <= 1'b1;
          cnt  <= W'(1);
        end
      end else if (rx_rise) begin
        busy      <= 1'b0;
        delim_ok  <= (cnt >= W'(LO)) && (cnt <= W'(HI));
        delim_err <= !((cnt >= W'(LO)) && (cnt <= W'(HI)));
      end else if (cnt > W'(HI)) begin
        busy      <= 1'b0;
        delim_err <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
