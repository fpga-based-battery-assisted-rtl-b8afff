// Command framing.
// Turns the PIE symbol lengths measured by the preamble handler into bits:
// a symbol longer than the pivot RTcal/2 is a data-1, a shorter one a data-0.
// Bits are shifted into the frame register from the right, so the first bit
// of a command ends up at position len-1 and the last at position 0. Each bit
// is also passed on serially (bit_valid/bit_val) to the CRC checker, which is
// cleared by crc_init when a new frame starts. When the preamble handler
// reports the end of the command, frame_valid pulses for one cycle with the
// frame and its length, unless it overflowed MAX_BITS or was empty.
// The pivot rule is Gen2's; the frame layout is this design's choice.
module command_framer #(
  parameter int unsigned MAX_BITS = 66,
  parameter int unsigned CW       = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cal_done,
  input  logic                  sym_valid,
  input  logic [CW-1:0]         sym_ticks,
  input  logic [CW-1:0]         rtcal,
  input  logic                  frame_end,
  output logic                  crc_init,
  output logic                  bit_valid,
  output logic                  bit_val,
  output logic                  frame_valid,
  output logic [MAX_BITS-1:0]   frame,
  output logic [7:0]            len
);
  logic overflow;
  logic b;

  assign b         = sym_ticks > (rtcal >> 1);
  assign crc_init  = cal_done;
  assign bit_valid = sym_valid;
  assign bit_val   = b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame       <= '0;
      len         <= '0;
      overflow    <= 1'b0;
      frame_valid <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      if (cal_done) begin
        frame    <= sym_valid ? MAX_BITS'(b) : '0;
        len      <= sym_valid ? 8'd1 : 8'd0;
        overflow <= 1'b0;
      end else if (sym_valid) begin
        frame <= {frame[MAX_BITS-2:0], b};
        if (len == 8'(MAX_BITS)) overflow <= 1'b1;
        else                     len <= len + 1'b1;
      end
      if (frame_end)
        frame_valid <= !overflow && (len != 8'd0);
    end
  end
endmodule
