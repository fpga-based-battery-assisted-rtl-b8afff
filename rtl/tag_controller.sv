// Main entity: the tag's protocol state machine.
// Acts on each decoded command according to the Gen2 tag states
// Ready -> Arbitrate -> Reply -> Acknowledged -> Secured:
//  Query        latches DR, M, TRext and Q (so BLF, modulation and pilot
//               follow the reader without reconfiguration), draws a slot
//               from the RNG and answers an RN16 if the slot is 0.
//  QueryRep     counts the slot down (answers RN16 at 0); QueryAdjust
//               changes Q by +-1 and redraws the slot.
//  ACK          with the right RN16: answers PC + EPC + CRC-16 (length from
//               the PC word) and enters Acknowledged.
//  NAK          returns to Arbitrate.
//  Req_RN       in Acknowledged: issues a handle and enters Secured; in
//               Secured: answers a fresh RN16 that covers the next Write.
//  Read/Write   in Secured with the right handle: reads words / writes one
//               word (data XOR the last RN16), answering with the handle;
//               out-of-range requests get an error reply (code 03h).
// The access password is zero, so Open is skipped; sessions, inventoried
// flags and Select are not kept. A reply is started T1 = max(RTcal, 10
// BLF periods) after the last rising RX edge of the command (Gen2 T1),
// which at Tari 6.25 us and 640 kHz is under 20 us. Commands that arrive
// while a reply is being sent are ignored.
module tag_controller
  import wisp_pkg::*;
#(
  parameter int unsigned CW         = 16,
  parameter int unsigned BANK_WORDS = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  input  cmd_t          cmd,
  input  logic          rx_rise,
  input  logic [CW-1:0] rtcal,
  input  logic [CW-1:0] half_ticks,
  input  logic [15:0]   rn,
  input  logic [15:0]   pc_word,
  input  logic          tx_done,
  // link settings from the last Query
  output logic          dr,
  output mod_e          mode,
  output logic          trext,
  // reply request
  output logic          tx_start,
  output reply_t        reply,
  output logic          tx_busy,
  // memory write port A
  output logic          mem_we,
  output logic [1:0]    mem_bank,
  output logic [7:0]    mem_ptr,
  output logic [15:0]   mem_data,
  output tag_state_e    state,
  output logic [3:0]    q,
  output logic [15:0]   slot
);
  logic [15:0]   rn16;     // RN16 of the inventory round
  logic [15:0]   handle;
  logic [15:0]   cover_rn;    // last RN16 sent in Secured, covers Write data
  logic          pending;
  logic [CW+4:0] since_rise;
  logic [CW+4:0] t1;
  logic [15:0]   qmask;
  logic [15:0]   draw;
  logic [3:0]    qn;
  logic [15:0]   rn_swap;

  assign rn_swap = {rn[7:0], rn[15:8]};
  assign t1      = ((CW+5)'(rtcal) > (CW+5)'(half_ticks) * 20) ? (CW+5)'(rtcal) : (CW+5)'(half_ticks) * 20;

  // new Q for QueryAdjust
  always_comb begin
    qn = q;
    if (cmd.updn == 3'b110 && q != 4'd15) qn = q + 1'b1;
    if (cmd.updn == 3'b011 && q != 4'd0)  qn = q - 1'b1;
    qmask = (cmd.cmd == CMD_QUERY) ? 16'((32'd1 << cmd.q) - 1) : 16'((32'd1 << qn) - 1);
    draw  = rn & qmask;
  end

  function automatic reply_t rep_rn16(input logic [15:0] v, input logic crc);
    reply_t x = '0;
    x.rn_en = 1'b1; x.rn = v; x.crc_en = crc;
    return x;
  endfunction

  function automatic reply_t rep_err(input logic [15:0] h);
    reply_t x = '0;
    x.hdr_en = 1'b1; x.hdr = 1'b1; x.err_en = 1'b1; x.err_code = ERR_OVERRUN;
    x.rn_en = 1'b1; x.rn = h; x.crc_en = 1'b1;
    return x;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_READY;
      dr         <= 1'b0;
      mode       <= MOD_FM0;
      trext      <= 1'b0;
      q          <= 4'd0;
      slot       <= '0;
      rn16       <= '0;
      handle     <= '0;
      cover_rn      <= '0;
      pending    <= 1'b0;
      reply      <= '0;
      tx_start   <= 1'b0;
      tx_busy    <= 1'b0;
      mem_we     <= 1'b0;
      mem_bank   <= '0;
      mem_ptr    <= '0;
      mem_data   <= '0;
      since_rise <= '0;
    end else begin
      tx_start <= 1'b0;
      mem_we   <= 1'b0;
      if (rx_rise)             since_rise <= (CW+5)'(1);
      else if (since_rise != '1) since_rise <= since_rise + 1'b1;

      // reply timing: start T1 after the command's last rising edge
      if (pending && since_rise >= t1) begin
        pending  <= 1'b0;
        tx_start <= 1'b1;
        tx_busy  <= 1'b1;
      end
      if (tx_done) tx_busy <= 1'b0;

      if (cmd_valid && !tx_busy && !pending) begin : act
        // reply chosen for this command; local to this clock edge
        automatic logic   want   = 1'b0;
        automatic reply_t nreply = '0;
        unique case (cmd.cmd)
          CMD_QUERY: begin
            dr    <= cmd.dr;
            mode  <= cmd.m;
            trext <= cmd.trext;
            q     <= cmd.q;
            slot  <= draw;
            if (draw == 16'd0) begin
              state <= ST_REPLY; rn16 <= rn_swap;
              want = 1'b1; nreply = rep_rn16(rn_swap, 1'b0);
            end else begin
              state <= ST_ARBITRATE;
            end
          end
          CMD_QUERYREP: unique case (state)
            ST_ARBITRATE: begin
              slot <= slot - 1'b1;
              if (slot == 16'd1) begin
                state <= ST_REPLY; rn16 <= rn_swap;
                want = 1'b1; nreply = rep_rn16(rn_swap, 1'b0);
              end
            end
            ST_REPLY: begin state <= ST_ARBITRATE; slot <= 16'h7FFF; end
            ST_ACKNOWLEDGED, ST_SECURED: state <= ST_READY;
            default: ;
          endcase
          CMD_QUERYADJ: unique case (state)
            ST_ARBITRATE, ST_REPLY: begin
              q    <= qn;
              slot <= draw;
              if (draw == 16'd0) begin
                state <= ST_REPLY; rn16 <= rn_swap;
                want = 1'b1; nreply = rep_rn16(rn_swap, 1'b0);
              end else begin
                state <= ST_ARBITRATE;
              end
            end
            ST_ACKNOWLEDGED, ST_SECURED: state <= ST_READY;
            default: ;
          endcase
          CMD_ACK: begin
            if (((state == ST_REPLY || state == ST_ACKNOWLEDGED) && cmd.rn == rn16) ||
                (state == ST_SECURED && cmd.rn == handle)) begin
              if (state != ST_SECURED) state <= ST_ACKNOWLEDGED;
              want = 1'b1;
              nreply.bank   = BANK_EPC;
              nreply.ptr    = 8'd1;
              nreply.count  = 8'd1 + 8'(pc_word[15:11]);
              nreply.crc_en = 1'b1;
            end else if (state != ST_READY) begin
              state <= ST_ARBITRATE;
            end
          end
          CMD_NAK: if (state != ST_READY) state <= ST_ARBITRATE;
          CMD_REQRN: begin
            if (state == ST_ACKNOWLEDGED && cmd.rn == rn16) begin
              state  <= ST_SECURED;
              handle <= rn;
              want = 1'b1; nreply = rep_rn16(rn, 1'b1);
            end else if (state == ST_SECURED && cmd.rn == handle) begin
              cover_rn <= rn;
              want = 1'b1; nreply = rep_rn16(rn, 1'b1);
            end
          end
          CMD_READ: if (state == ST_SECURED && cmd.rn == handle) begin
            want = 1'b1;
            if (cmd.count == 8'd0 || 9'(cmd.ptr) + 9'(cmd.count) > 9'(BANK_WORDS)) begin
              nreply = rep_err(handle);
            end else begin
              nreply        = rep_rn16(handle, 1'b1);
              nreply.hdr_en = 1'b1;
              nreply.bank   = cmd.bank;
              nreply.ptr    = cmd.ptr;
              nreply.count  = cmd.count;
            end
          end
          CMD_WRITE: if (state == ST_SECURED && cmd.rn == handle) begin
            want = 1'b1;
            if (cmd.ptr >= 8'(BANK_WORDS)) begin
              nreply = rep_err(handle);
            end else begin
              mem_we   <= 1'b1;
              mem_bank <= cmd.bank;
              mem_ptr  <= cmd.ptr;
              mem_data <= cmd.data ^ cover_rn;
              nreply        = rep_rn16(handle, 1'b1);
              nreply.hdr_en = 1'b1;
            end
          end
          default: ;
        endcase
        if (want) begin
          pending <= 1'b1;
          reply   <= nreply;
        end
      end
    end
  end
endmodule
