// Shared types and constants of the EPC Gen2 tag core.
// Command codes, tag states, reply descriptors and the CRC presets and
// residues used by the receive and transmit paths. The constants follow the
// EPC Gen2 air interface; the encodings of the enums are this design's own.
package wisp_pkg;

  // Received command classes
  typedef enum logic [3:0] {
    CMD_NONE, CMD_QUERY, CMD_QUERYREP, CMD_QUERYADJ, CMD_ACK,
    CMD_NAK, CMD_REQRN, CMD_READ, CMD_WRITE, CMD_BAD
  } cmd_e;

  // Backscatter modulation (Query field M)
  typedef enum logic [1:0] { MOD_FM0 = 2'd0, MOD_M2 = 2'd1, MOD_M4 = 2'd2, MOD_M8 = 2'd3 } mod_e;

  // Tag inventory/access state
  typedef enum logic [2:0] {
    ST_READY, ST_ARBITRATE, ST_REPLY, ST_ACKNOWLEDGED, ST_SECURED
  } tag_state_e;

  // Memory banks
  localparam logic [1:0] BANK_RESERVED = 2'd0;
  localparam logic [1:0] BANK_EPC      = 2'd1;
  localparam logic [1:0] BANK_TID      = 2'd2;
  localparam logic [1:0] BANK_USER     = 2'd3;

  // Decoded command fields
  typedef struct packed {
    cmd_e        cmd;
    logic        dr;        // Query: divide ratio (0 = 8, 1 = 64/3)
    mod_e        m;         // Query: modulation
    logic        trext;     // Query: pilot tone
    logic [3:0]  q;         // Query: slot-count exponent
    logic [2:0]  updn;      // QueryAdjust
    logic [15:0] rn;        // ACK / Req_RN / Read / Write: RN16 or handle
    logic [1:0]  bank;      // Read / Write
    logic [7:0]  ptr;       // Read / Write word pointer
    logic [7:0]  count;     // Read word count
    logic [15:0] data;      // Write data (cover-coded)
  } cmd_t;

  // Reply descriptor handed to the response framer
  typedef struct packed {
    logic        hdr_en;    // send a header bit
    logic        hdr;       // header value (1 = error)
    logic        err_en;    // send an 8-bit error code
    logic [7:0]  err_code;
    logic [1:0]  bank;      // memory words to send
    logic [7:0]  ptr;
    logic [7:0]  count;     // 0 = none
    logic        rn_en;     // send a 16-bit RN / handle
    logic [15:0] rn;
    logic        crc_en;    // append CRC-16
  } reply_t;

  localparam logic [4:0]  CRC5_PRESET   = 5'b01001;
  localparam logic [15:0] CRC16_PRESET  = 16'hFFFF;
  localparam logic [15:0] CRC16_RESIDUE = 16'h1D0F;
  localparam logic [15:0] CRC16_POLY    = 16'h1021;

  localparam logic [7:0] ERR_OVERRUN = 8'h03;

endpackage
