// CRC-16 generator for replies.
// Gen2 CRC-16 (x^16+x^12+x^5+1, preset FFFF) updated serially with every
// reply bit that is sent (bit_valid). The value to send after the data is the
// ones' complement of the register, most significant bit first: crc_out.
// init presets the register for a new reply.
module crc_generator
  import wisp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        bit_valid,
  input  logic        bit_val,
  output logic [15:0] crc_out
);
  logic [15:0] c;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         c <= CRC16_PRESET;
    else if (init)      c <= CRC16_PRESET;
    else if (bit_valid) c <= {c[14:0], 1'b0} ^ ((c[15] ^ bit_val) ? CRC16_POLY : 16'h0);
  end
  assign crc_out = ~c;
endmodule
