// Command decoder.
// Classifies a received frame by its length and leading code and extracts the
// fields the tag uses. Supported: Query (22 bits, CRC-5), QueryRep (4),
// QueryAdjust (9), ACK (18), NAK (8), Req_RN (40, CRC-16), Read (58, CRC-16)
// and Write (66, CRC-16), all with one-byte EBV word pointers. A frame that
// matches no command, fails its CRC or uses a multi-byte EBV is reported as
// CMD_BAD. The frame holds the first bit at position len-1.
// Timing: cmd_valid pulses one cycle after frame_valid, with cmd held until
// the next command. Command formats are Gen2's; the subset is this design's.
module command_decoder
  import wisp_pkg::*;
#(
  parameter int unsigned MAX_BITS = 66
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                frame_valid,
  input  logic [MAX_BITS-1:0] frame,
  input  logic [7:0]          len,
  input  logic                crc5_ok,
  input  logic                crc16_ok,
  output logic                cmd_valid,
  output cmd_t                cmd
);
  cmd_t d;

  always_comb begin
    d     = '0;
    d.cmd = CMD_BAD;
    unique case (len)
      8'd4:  if (frame[3:2] == 2'b00) d.cmd = CMD_QUERYREP;
      8'd8:  if (frame[7:0] == 8'hC0) d.cmd = CMD_NAK;
      8'd9:  if (frame[8:5] == 4'b1001) begin
               d.cmd  = CMD_QUERYADJ;
               d.updn = frame[2:0];
             end
      8'd18: if (frame[17:16] == 2'b01) begin
               d.cmd = CMD_ACK;
               d.rn  = frame[15:0];
             end
      8'd22: if (frame[21:18] == 4'b1000 && crc5_ok) begin
               d.cmd   = CMD_QUERY;
               d.dr    = frame[17];
               d.m     = mod_e'(frame[16:15]);
               d.trext = frame[14];
               d.q     = frame[8:5];
             end
      8'd40: if (frame[39:32] == 8'hC1 && crc16_ok) begin
               d.cmd = CMD_REQRN;
               d.rn  = frame[31:16];
             end
      8'd58: if (frame[57:50] == 8'hC2 && !frame[47] && crc16_ok) begin
               d.cmd   = CMD_READ;
               d.bank  = frame[49:48];
               d.ptr   = frame[47:40];
               d.count = frame[39:32];
               d.rn    = frame[31:16];
             end
      8'd66: if (frame[65:58] == 8'hC3 && !frame[55] && crc16_ok) begin
               d.cmd  = CMD_WRITE;
               d.bank = frame[57:56];
               d.ptr  = frame[55:48];
               d.data = frame[47:32];
               d.rn   = frame[31:16];
             end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_valid <= 1'b0;
      cmd       <= '0;
    end else begin
      cmd_valid <= frame_valid;
      if (frame_valid) cmd <= d;
    end
  end
endmodule
