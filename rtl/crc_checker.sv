// CRC checker for received commands.
// Runs the Gen2 CRC-5 (x^5+x^3+1, preset 01001) and CRC-16
// (x^16+x^12+x^5+1, preset FFFF) registers in parallel over every received
// bit, first bit first, including the CRC bits sent by the reader. A frame
// whose own CRC-5 is correct leaves the CRC-5 register at 00000; one whose
// ones'-complemented CRC-16 is correct leaves the CRC-16 register at the
// residue 1D0F. Which of the two applies is decided by the command decoder.
// init clears both registers (one cycle); each bit_valid updates them; the
// ok flags are valid the cycle after the last bit.
module crc_checker
  import wisp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic bit_valid,
  input  logic bit_val,
  output logic crc5_ok,
  output logic crc16_ok
);
  logic [4:0]  c5;
  logic [15:0] c16;
  logic        fb5, fb16;

  assign fb5  = c5[4] ^ bit_val;
  assign fb16 = c16[15] ^ bit_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c5  <= CRC5_PRESET;
      c16 <= CRC16_PRESET;
    end else if (init && !bit_valid) begin
      c5  <= CRC5_PRESET;
      c16 <= CRC16_PRESET;
    end else if (bit_valid) begin
      // with init and bit_valid together the bit is the first of a frame
      if (init) begin
        c5  <= {CRC5_PRESET[3:0], 1'b0} ^ (((CRC5_PRESET[4] ^ bit_val)) ? 5'b01001 : 5'b0);
        c16 <= {CRC16_PRESET[14:0], 1'b0} ^ ((CRC16_PRESET[15] ^ bit_val) ? CRC16_POLY : 16'h0);
      end else begin
        c5  <= {c5[3:0], 1'b0} ^ (fb5 ? 5'b01001 : 5'b0);
        c16 <= {c16[14:0], 1'b0} ^ (fb16 ? CRC16_POLY : 16'h0);
      end
    end
  end

  assign crc5_ok  = (c5 == 5'b00000);
  assign crc16_ok = (c16 == CRC16_RESIDUE);
endmodule
