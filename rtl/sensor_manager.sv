// Sensor manager.
// An SPI master (mode 0: SCLK idles low, MOSI changes on the falling edge,
// MISO is sampled on the rising edge) that first sends one configuration
// frame {CFG_CMD, CFG_VAL} to the sensor and then, every SAMPLE_CYCLES clock
// cycles, sends {RD_CMD, 16'h0000} and keeps the 16 bits the sensor returns in
// the second half of the frame. Each sample is written into word DEST_PTR of
// the User bank through the tag memory's request/acknowledge port, where a
// Read command can fetch it. Frames are 32 bits, MSB first, one SCLK
// half-period is CLK_DIV cycles. The original design names the function and the
// I2C/SPI bus; the bus protocol, frame format and command words are this
// design's own.
module sensor_manager
  import wisp_pkg::*;
#(
  parameter int unsigned CLK_DIV       = 4,
  parameter int unsigned SAMPLE_CYCLES = 24_000,
  parameter logic [15:0] CFG_CMD       = 16'h2001,
  parameter logic [15:0] CFG_VAL       = 16'h0001,
  parameter logic [15:0] RD_CMD        = 16'h8000,
  parameter logic [7:0]  DEST_PTR      = 8'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        spi_sclk,
  output logic        spi_cs_n,
  output logic        spi_mosi,
  input  logic        spi_miso,
  output logic        wr_req,
  output logic [1:0]  wr_bank,
  output logic [7:0]  wr_ptr,
  output logic [15:0] wr_data,
  input  logic        wr_ack,
  output logic [15:0] sample,
  output logic        sample_valid
);
  typedef enum logic [2:0] { S_CFG, S_WAIT, S_XFER, S_END, S_WR } sstate_e;
  sstate_e st;
  logic        configured;
  logic [31:0] tx_sr;
  logic [15:0] rx_sr;
  logic [5:0]  nbit;
  logic [$clog2(CLK_DIV+1)-1:0]       div;
  logic [$clog2(SAMPLE_CYCLES+1)-1:0] timer;

  assign spi_mosi = tx_sr[31];
  assign wr_bank  = BANK_USER;
  assign wr_ptr   = DEST_PTR;
  assign wr_data  = sample;
  assign wr_req   = (st == S_WR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_CFG;
      configured   <= 1'b0;
      tx_sr        <= '0;
      rx_sr        <= '0;
      nbit         <= '0;
      div          <= '0;
      timer        <= '0;
      spi_sclk     <= 1'b0;
      spi_cs_n     <= 1'b1;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      unique case (st)
        S_CFG: begin
          tx_sr    <= {CFG_CMD, CFG_VAL};
          spi_cs_n <= 1'b0;
          nbit     <= '0;
          div      <= '0;
          st       <= S_XFER;
        end
        S_WAIT: if (timer == '0) begin
          tx_sr    <= {RD_CMD, 16'h0000};
          spi_cs_n <= 1'b0;
          nbit     <= '0;
          div      <= '0;
          st       <= S_XFER;
        end else begin
          timer <= timer - 1'b1;
        end
        S_XFER: if (div == ($bits(div))'(CLK_DIV - 1)) begin
          div <= '0;
          if (!spi_sclk) begin
            spi_sclk <= 1'b1;
            rx_sr    <= {rx_sr[14:0], spi_miso};
          end else begin
            spi_sclk <= 1'b0;
            tx_sr    <= {tx_sr[30:0], 1'b0};
            nbit     <= nbit + 1'b1;
            if (nbit == 6'd31) st <= S_END;
          end
        end else begin
          div <= div + 1'b1;
        end
        S_END: begin
          spi_cs_n <= 1'b1;
          timer    <= ($bits(timer))'(SAMPLE_CYCLES - 1);
          if (!configured) begin
            configured <= 1'b1;
            st         <= S_WAIT;
          end else begin
            sample       <= rx_sr;
            sample_valid <= 1'b1;
            st           <= S_WR;
          end
        end
        S_WR: if (wr_ack) st <= S_WAIT;
        default: st <= S_WAIT;
      endcase
    end
  end
endmodule
