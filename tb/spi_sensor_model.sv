// Behavioural model of an SPI sensor (mode 0) for testbenches.
// Each 32-bit frame shifts in a 16-bit command and a 16-bit argument and
// returns, in the second 16 bits, the current sample value. The sample value
// starts at BASE and increments after every read frame (command MSB set).
// Records the last command and argument received and the last sample sent.
module spi_sensor_model #(
  parameter logic [15:0] BASE = 16'h5A00
) (
  input  logic        sclk,
  input  logic        cs_n,
  input  logic        mosi,
  output logic        miso,
  output logic [15:0] last_cmd,
  output logic [15:0] last_arg,
  output logic [15:0] last_sample,
  output int          frames
);
  logic [31:0] out_sr, in_sr;
  logic [15:0] value;
  int          n;

  initial begin
    value = BASE; frames = 0; miso = 1'b0; n = 0;
    last_cmd = '0; last_arg = '0; last_sample = '0; out_sr = '0; in_sr = '0;
  end

  always @(negedge cs_n) begin
    out_sr = {16'h0000, value};
    n      = 0;
    miso   = out_sr[31];
  end
  always @(posedge sclk) if (!cs_n) begin
    in_sr = {in_sr[30:0], mosi};
    n++;
  end
  always @(negedge sclk) if (!cs_n) begin
    out_sr = {out_sr[30:0], 1'b0};
    miso   = out_sr[31];
  end
  always @(posedge cs_n) if (n == 32) begin
    frames++;
    last_cmd = in_sr[31:16];
    last_arg = in_sr[15:0];
    if (in_sr[31]) begin
      last_sample = value;
      value       = value + 16'd1;
    end
  end
endmodule
