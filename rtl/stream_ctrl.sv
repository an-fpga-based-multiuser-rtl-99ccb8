// stream_ctrl: the state machine and configuration capture that sit at the
// input of every stream-processing module.
//
// The state machine has the four states IDLE, BUSY, PROGRAM and PASS and is
// driven only by the PROG and VALID bits of the incoming word:
//   any state, PROG=0 VALID=0      -> IDLE
//   any state, PROG=0 VALID=1      -> BUSY   (processing pipeline enabled)
//   IDLE/BUSY, PROG=1 VALID=1      -> PROGRAM (first programming word)
//   PROGRAM/PASS, PROG=1           -> PASS    (further programming words)
// prog_en is asserted in PROGRAM and proc_en in BUSY. A module latches only
// the programming words it needs; here the whole six-word header is decoded
// into a hdr_t and held until the next header, and the other modules pick
// the fields they use. Programming words are global: they pass on unchanged.
//
// data_idx is the position of the current data word (VALID, not PROG) in
// the stream since the last header, counted from 0; it is combinational with
// the input word. hdr is registered: it is complete one cycle after the last
// programming word, before any data word can arrive.
module stream_ctrl
  import pic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  stream_t     in,
  output mod_state_t  state,
  output logic        prog_en,
  output logic        proc_en,
  output logic        is_data,
  output logic        is_prog,
  output logic [2:0]  prog_idx,   // index of the current programming word
  output logic [10:0] data_idx,
  output hdr_t        hdr
);

  mod_state_t  state_q, state_d;
  logic [2:0]  pcnt_q;
  logic [10:0] dcnt_q;

  assign is_data = in.valid & ~in.prog;
  assign is_prog = in.valid & in.prog;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_IDLE, ST_BUSY: begin
        if (in.prog && in.valid)       state_d = ST_PROGRAM;
        else if (!in.prog && in.valid) state_d = ST_BUSY;
        else if (!in.valid)            state_d = ST_IDLE;
      end
      ST_PROGRAM, ST_PASS: begin
        if (in.prog)                   state_d = ST_PASS;
        else if (in.valid)             state_d = ST_BUSY;
        else                           state_d = ST_IDLE;
      end
    endcase
  end

  // Index of the programming word now at the input.
  assign prog_idx = (state_q == ST_PROGRAM || state_q == ST_PASS) ? pcnt_q : 3'd0;
  assign data_idx = dcnt_q;
  assign state    = state_q;
  assign prog_en  = (state_q == ST_PROGRAM);
  assign proc_en  = (state_q == ST_BUSY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      pcnt_q  <= '0;
      dcnt_q  <= '0;
      hdr     <= '0;
    end else begin
      state_q <= state_d;
      if (is_prog) begin
        pcnt_q <= prog_idx + 3'd1;
        dcnt_q <= '0;
        unique case (prog_idx)
          3'd0: {hdr.sidx, hdr.uid} <= in.data;
          3'd1: {hdr.last, hdr.acq, hdr.cfg[3:0]} <= in.data[5:0];
          3'd2: hdr.cfg[13:4] <= in.data;
          3'd3: hdr.cfg[15:14] <= in.data[1:0];
          3'd4: hdr.pn[15:6] <= in.data;
          3'd5: hdr.pn[5:0] <= in.data[5:0];
          default: ;
        endcase
      end else if (is_data) begin
        dcnt_q <= dcnt_q + 11'd1;
      end
    end
  end

endmodule
