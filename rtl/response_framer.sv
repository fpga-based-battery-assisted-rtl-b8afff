// Response framing.
// Streams a tag reply one bit at a time, most significant bit first, in the
// Gen2 reply layout: an optional header bit, an optional 8-bit error code,
// `count` 16-bit words read from memory starting at word `ptr` of `bank`, an
// optional 16-bit RN16 or handle, and an optional CRC-16 over everything
// before it. The reply is described by a reply_t latched on start.
// Bits leave through a valid/ready handshake (bit_valid, bit_val, bit_last,
// bit_ready); every data bit also goes to the CRC generator (crc_bit_valid),
// which crc_init presets at the start. Between segments the framer needs up
// to three idle cycles (memory latency), far less than one backscatter
// symbol. done pulses after the last bit has been taken.
module response_framer
  import wisp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  reply_t      desc,
  // bit stream to the encoder
  output logic        bit_valid,
  output logic        bit_val,
  output logic        bit_last,
  input  logic        bit_ready,
  output logic        done,
  // memory read port
  output logic [1:0]  rd_bank,
  output logic [7:0]  rd_ptr,
  input  logic [15:0] rd_data,
  // CRC generator
  output logic        crc_init,
  output logic        crc_bit_valid,
  output logic        crc_bit_val,
  input  logic [15:0] crc_in
);
  typedef enum logic [2:0] { SEG_HDR, SEG_ERR, SEG_WORDS, SEG_RN, SEG_CRC, SEG_END } seg_e;
  typedef enum logic [1:0] { F_IDLE, F_LOAD, F_MEM, F_SHIFT } fstate_e;

  fstate_e     st;
  seg_e        seg, nseg;
  reply_t      r;
  logic [15:0] sr;
  logic [4:0]  nbits;
  logic [7:0]  widx;
  logic        take;

  // segment that follows the current one
  always_comb begin
    nseg = SEG_END;
    unique case (seg)
      SEG_HDR:   nseg = r.err_en ? SEG_ERR : (r.count != 0) ? SEG_WORDS : r.rn_en ? SEG_RN : r.crc_en ? SEG_CRC : SEG_END;
      SEG_ERR:   nseg = (r.count != 0) ? SEG_WORDS : r.rn_en ? SEG_RN : r.crc_en ? SEG_CRC : SEG_END;
      SEG_WORDS: nseg = (widx + 1'b1 < r.count) ? SEG_WORDS : r.rn_en ? SEG_RN : r.crc_en ? SEG_CRC : SEG_END;
      SEG_RN:    nseg = r.crc_en ? SEG_CRC : SEG_END;
      default:   nseg = SEG_END;
    endcase
  end

  assign take          = bit_valid && bit_ready;
  assign bit_valid     = (st == F_SHIFT);
  assign bit_val       = sr[15];
  assign bit_last      = (nbits == 5'd1) && (nseg == SEG_END);
  assign crc_bit_valid = take && (seg != SEG_CRC);
  assign crc_bit_val   = sr[15];
  assign rd_bank       = r.bank;
  assign rd_ptr        = r.ptr + widx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= F_IDLE;
      seg      <= SEG_END;
      r        <= '0;
      sr       <= '0;
      nbits    <= '0;
      widx     <= '0;
      done     <= 1'b0;
      crc_init <= 1'b0;
    end else begin
      done     <= 1'b0;
      crc_init <= 1'b0;
      unique case (st)
        F_IDLE: if (start) begin
          r        <= desc;
          widx     <= '0;
          crc_init <= 1'b1;
          st       <= F_LOAD;
          seg      <= desc.hdr_en ? SEG_HDR : desc.err_en ? SEG_ERR :
                      (desc.count != 0) ? SEG_WORDS : desc.rn_en ? SEG_RN :
                      desc.crc_en ? SEG_CRC : SEG_END;
        end
        F_LOAD: begin
          st <= F_SHIFT;
          unique case (seg)
            SEG_HDR:   begin sr <= {r.hdr, 15'b0};      nbits <= 5'd1;  end
            SEG_ERR:   begin sr <= {r.err_code, 8'b0};  nbits <= 5'd8;  end
            SEG_WORDS: st <= F_MEM;
            SEG_RN:    begin sr <= r.rn;                nbits <= 5'd16; end
            SEG_CRC:   begin sr <= crc_in;              nbits <= 5'd16; end
            default:   begin st <= F_IDLE; done <= 1'b1; end
          endcase
        end
        F_MEM: begin      // rd_data holds the word addressed in F_LOAD
          sr    <= rd_data;
          nbits <= 5'd16;
          st    <= F_SHIFT;
        end
        F_SHIFT: if (take) begin
          sr    <= {sr[14:0], 1'b0};
          nbits <= nbits - 1'b1;
          if (nbits == 5'd1) begin
            if (seg == SEG_WORDS) widx <= widx + 1'b1;
            seg <= nseg;
            st  <= F_LOAD;
          end
        end
        default: st <= F_IDLE;
      endcase
    end
  end
endmodule
