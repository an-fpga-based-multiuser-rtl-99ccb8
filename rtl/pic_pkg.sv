// pic_pkg: types, sizes and helper functions shared by every module of the
// parallel-interference-cancellation (PIC) receiver.
//
// Streams: every module talks to the next over a 16-bit stream word. Bit 15
// is PROG (the word is programming information), bit 14 is VALID (the word
// carries something to act on), bits 13..10 are reserved (RDY, INT, RES1,
// RES2; carried but unused) and bits 9..0 hold a ten-bit two's-complement
// payload. A user's stream is a preamble of invalid words, a six-word
// programming header, NNs-1 filter-initialisation words and one block of
// data words.
//
// Header layout (six ten-bit words, low bits first):
//   word 0 : [9:4] sample index, [3:0] user ID
//   word 1 : [5] last user, [4] acquired, [3:0] correlator config bits 3..0
//   word 2 : correlator config bits 13..4
//   word 3 : [1:0] correlator config bits 15..14
//   word 4 : PN code bits 15..6
//   word 5 : [5:0] PN code bits 5..0
// PN code bit j is the weight of correlator tap j (the sample 4*j samples
// old): 1 means +1, 0 means -1. Tap j meets chip 15-j of a symbol, so bit 15
// is the first chip sent. The correlator configuration word is derived from
// the PN code by the add/subtract polarity rule (corr_config below).
package pic_pkg;

  // System sizes (document's prototype values).
  localparam int unsigned N_CHIPS   = 16;   // processing gain N
  localparam int unsigned NS        = 4;    // samples per chip Ns
  localparam int unsigned SYM_LEN   = N_CHIPS * NS;  // 64 samples / symbol
  localparam int unsigned INIT_LEN  = SYM_LEN - 1;   // 63 refresh words
  localparam int unsigned PRE_LEN   = 10;   // preamble words
  localparam int unsigned HDR_LEN   = 6;    // programming words
  localparam int unsigned DW        = 10;   // data payload width
  localparam int unsigned MAX_USERS = 16;   // header supports 16 user IDs

  // Pipeline latencies (clock cycles from input word to output word).
  localparam int unsigned MFC_LAT   = 8;
  localparam int unsigned ACQ_LAT   = 1;
  localparam int unsigned REGEN_LAT = 1;
  localparam int unsigned COMB_LAT  = 2;
  localparam int unsigned REV_LAT   = 4;
  localparam int unsigned DEMOD_LAT = 3;
  // Delay of the estimated stream behind the actual stream at the Revised
  // module (cycle alignment done by the actual-signal delay RAM).
  localparam int unsigned EST_PATH_LAT = MFC_LAT + ACQ_LAT + REGEN_LAT + COMB_LAT;

  typedef logic signed [DW-1:0] sample_t;

  typedef struct packed {
    logic        prog;   // bit 15 PROGRAM
    logic        valid;  // bit 14 VALID (data available)
    logic [3:0]  rsvd;   // bits 13..10 RDY, INT, RES1, RES2
    sample_t     data;   // bits 9..0 payload
  } stream_t;

  localparam stream_t NULL_WORD = '0;

  // Module state machine states (IDLE, BUSY, PROGRAM, PASS).
  typedef enum logic [1:0] {
    ST_IDLE    = 2'd0,
    ST_BUSY    = 2'd1,
    ST_PROGRAM = 2'd2,
    ST_PASS    = 2'd3
  } mod_state_t;

  typedef struct packed {
    logic [3:0]  uid;
    logic [5:0]  sidx;
    logic        acq;
    logic        last;
    logic [15:0] cfg;
    logic [15:0] pn;
  } hdr_t;

  // Default PN codes, one per user ID: sixteen length-15 Gold-family codes
  // (x^4+x^3+1 combined with shifted x^4+x+1), each extended by one chip.
  localparam logic [15:0] PN_TABLE [MAX_USERS] = '{
    16'h06F6, 16'h971C, 16'hB4CA, 16'h3B92, 16'hF366, 16'h7C3E, 16'h628D, 16'h5FE8,
    16'h2521, 16'hD0B1, 16'hEDD4, 16'h415B, 16'h1845, 16'hAA78, 16'hCE03, 16'h89AE
  };

  // Correlator configuration from the desired tap weights. Each node of the
  // 16-tap adder/subtractor tree computes A+B (bit 1) when both operands have
  // the same polarity and A-B (bit 0) otherwise; the result takes A's
  // polarity. Bits 7..0 are the first tree stage, 11..8 the second, 13..12
  // the third, 14 the last node; bit 15 asks for the final two's complement
  // when the result polarity is negative.
  function automatic logic [15:0] corr_config(input logic [15:0] pn);
    logic [15:0] cfg;
    logic [7:0]  p1;
    logic [3:0]  p2;
    logic [1:0]  p3;
    cfg = '0;
    for (int i = 0; i < 8; i++) begin
      cfg[i] = (pn[2*i] == pn[2*i+1]);
      p1[i]  = pn[2*i];
    end
    for (int i = 0; i < 4; i++) begin
      cfg[8+i] = (p1[2*i] == p1[2*i+1]);
      p2[i]    = p1[2*i];
    end
    for (int i = 0; i < 2; i++) begin
      cfg[12+i] = (p2[2*i] == p2[2*i+1]);
      p3[i]     = p2[2*i];
    end
    cfg[14] = (p3[0] == p3[1]);
    cfg[15] = ~p3[0];
    return cfg;
  endfunction

  // Chip c (0 = first sent) of a user's code: 1 means +1.
  function automatic logic pn_chip(input logic [15:0] pn, input logic [3:0] c);
    return pn[4'd15 - c];
  endfunction

  // Header word k of the header described by h.
  function automatic logic [DW-1:0] hdr_word(input hdr_t h, input int unsigned k);
    case (k)
      0:       return {h.sidx, h.uid};
      1:       return {4'b0, h.last, h.acq, h.cfg[3:0]};
      2:       return h.cfg[13:4];
      3:       return {8'b0, h.cfg[15:14]};
      4:       return h.pn[15:6];
      default: return {4'b0, h.pn[5:0]};
    endcase
  endfunction

  // Header as stored in the Input module's ROM for user u of k users.
  function automatic hdr_t rom_header(input int unsigned u, input int unsigned k);
    hdr_t h;
    h.uid  = 4'(u);
    h.sidx = '0;
    h.acq  = 1'b0;
    h.last = (u == k - 1);
    h.pn   = PN_TABLE[u];
    h.cfg  = corr_config(PN_TABLE[u]);
    return h;
  endfunction

  // Saturate a wide signed value to the ten-bit payload range.
  function automatic sample_t sat10(input logic signed [31:0] v);
    if (v > 32'sd511)       return sample_t'(10'sd511);
    else if (v < -32'sd512) return sample_t'(-10'sd512);
    else                    return sample_t'(v[DW-1:0]);
  endfunction

endpackage
