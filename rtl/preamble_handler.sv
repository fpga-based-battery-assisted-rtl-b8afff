// Preamble handler.
// Measures the reader's calibration symbols after a verified delimiter:
// data-0 (its length is Tari), RTcal and, if present, TRcal. Every symbol is
// timed from one rising edge of RX to the next. The third interval is TRcal
// when it is longer than RTcal (a full preamble, which starts an inventory
// round with a Query) and otherwise already the first data bit (a frame-sync,
// used by all other commands). After calibration each further symbol length
// is passed on through sym_valid/sym_ticks. The command has ended when RX has
// stayed high for 3/4 RTcal without a falling edge; frame_end then pulses.
// Counters that overflow (no edges) abort the frame (frame_abort).
// The symbol order and the TRcal > RTcal rule are Gen2's; the end-of-command
// rule is this design's choice (it is shorter than the reply delay T1).
// Timing: delim_ok arrives in the cycle of the rising edge that starts
// data-0; all outputs are registered.
module preamble_handler #(
  parameter int unsigned CW = 16   // width of the interval counters
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          delim_ok,
  input  logic          rx_s,
  input  logic          rx_rise,
  output logic          busy,
  output logic [CW-1:0] tari,
  output logic [CW-1:0] rtcal,
  output logic [CW-1:0] trcal,
  output logic          trcal_valid,  // last frame had a full preamble
  output logic          cal_done,     // calibration complete, data follows
  output logic          sym_valid,
  output logic [CW-1:0] sym_ticks,
  output logic          frame_end,
  output logic          frame_abort
);
  typedef enum logic [2:0] { P_IDLE, P_TARI, P_RTCAL, P_THIRD, P_DATA } pstate_e;
  pstate_e st;
  logic [CW-1:0] cnt;
  logic [CW-1:0] end_limit;

  assign busy      = (st != P_IDLE);
  // 3/4 RTcal: longer than any PIE high time, shorter than T1
  assign end_limit = (rtcal >> 1) + (rtcal >> 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= P_IDLE;
      cnt         <= '0;
      tari        <= '0;
      rtcal       <= '0;
      trcal       <= '0;
      trcal_valid <= 1'b0;
      cal_done    <= 1'b0;
      sym_valid   <= 1'b0;
      sym_ticks   <= '0;
      frame_end   <= 1'b0;
      frame_abort <= 1'b0;
    end else begin
      cal_done    <= 1'b0;
      sym_valid   <= 1'b0;
      frame_end   <= 1'b0;
      frame_abort <= 1'b0;
      if (cnt != '1) cnt <= cnt + 1'b1;
      unique case (st)
        P_IDLE: if (delim_ok) begin
          st  <= P_TARI;
          cnt <= CW'(1);
        end
        P_TARI: if (rx_rise) begin
          tari <= cnt;
          cnt  <= CW'(1);
          st   <= P_RTCAL;
        end
        P_RTCAL: if (rx_rise) begin
          rtcal <= cnt;
          cnt   <= CW'(1);
          st    <= P_THIRD;
        end
        P_THIRD: if (rx_rise) begin
          cnt      <= CW'(1);
          st       <= P_DATA;
          cal_done <= 1'b1;
          if (cnt > rtcal) begin
            trcal       <= cnt;
            trcal_valid <= 1'b1;
          end else begin
            trcal_valid <= 1'b0;
            sym_valid   <= 1'b1;
            sym_ticks   <= cnt;
          end
        end
        P_DATA: if (rx_rise) begin
          cnt       <= CW'(1);
          sym_valid <= 1'b1;
          sym_ticks <= cnt;
        end else if (rx_s && cnt >= end_limit) begin
          st        <= P_IDLE;
          frame_end <= 1'b1;
        end
        default: st <= P_IDLE;
      endcase
      if (st != P_IDLE && cnt == '1) begin
        st          <= P_IDLE;
        frame_abort <= 1'b1;
      end
    end
  end
endmodule
