// mfc: Matched Filter Correlator module. Correlates the data portion of a
// stream with the current user's spreading code and then integrates over one
// chip (rectangular pulse matched filter).
//
// Processing pipeline (8 cycles, MFC_LAT):
//   delay line of 64 ten-bit words, shifted on each valid data word; taps at
//   positions 0,4,...,60 (every fourth word) feed a 16-input tree of
//   adder/subtractors: 8, 4, 2 and 1 units in four registered stages, each
//   unit doing A+B or A-B as chosen by one bit of the sixteen-bit correlator
//   configuration word from the header (operands sign-extended first);
//   stage 5 takes the tree result or its two's complement (configuration
//   bit 15); stages 6 and 7 add the last four correlator outputs (a two-stage
//   integrator of length four). The 16-bit result is normalised by the
//   correlator length 64 by keeping its top ten bits.
// Delay-line refresh: while the last user's data passes, the last 63 samples
// are kept in a small internal memory. For every user of the next block the
// first 63 data words of the stream (the filter-initialisation words) are
// replaced by these samples as they enter the delay line, and are marked
// invalid at the output, so each user's 1024 outputs continue the filtering
// of the previous block.
// A bypass pipeline and a status pipeline of equal depth carry programming
// words and invalid words past the processing pipeline unchanged.
// The negation of the most negative tree result saturates (this design's
// choice; the document does not mention the case).
module mfc
  import pic_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  stream_t in,
  output stream_t out
);

  localparam int unsigned L = MFC_LAT;

  logic        is_data, is_prog, prog_en, proc_en;
  logic [2:0]  prog_idx;
  logic [10:0] data_idx;
  hdr_t        hdr;
  mod_state_t  state;

  stream_ctrl u_ctrl (
    .clk, .rst_n, .in, .state, .prog_en, .proc_en, .is_data, .is_prog,
    .prog_idx, .data_idx, .hdr
  );

  wire is_init = is_data && (data_idx < 11'(INIT_LEN));

  // ---------------- delay-line refresh memory ----------------
  sample_t    ref_mem [INIT_LEN];
  logic [5:0] wp, rp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      for (int i = 0; i < INIT_LEN; i++) ref_mem[i] <= '0;
    end else begin
      if (is_prog) rp <= wp;
      else if (is_init) rp <= (rp == 6'(INIT_LEN - 1)) ? '0 : rp + 1'b1;
      if (is_data && !is_init && hdr.last) begin
        ref_mem[wp] <= in.data;
        wp <= (wp == 6'(INIT_LEN - 1)) ? '0 : wp + 1'b1;
      end
    end
  end

  // ---------------- processing pipeline ----------------
  sample_t            dl [SYM_LEN];
  logic signed [10:0] s1 [8];
  logic signed [11:0] s2 [4];
  logic signed [12:0] s3 [2];
  logic signed [13:0] s4, s5, t1, t2, t3;
  logic signed [14:0] s6a, s6b;
  logic signed [15:0] s7;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SYM_LEN; i++) dl[i] <= '0;
    end else if (is_data) begin
      dl[0] <= is_init ? ref_mem[rp] : in.data;
      for (int i = 1; i < SYM_LEN; i++) dl[i] <= dl[i-1];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 8; i++)
      s1[i] <= hdr.cfg[i] ? 11'(dl[8*i]) + 11'(dl[8*i+4])
                          : 11'(dl[8*i]) - 11'(dl[8*i+4]);
    for (int i = 0; i < 4; i++)
      s2[i] <= hdr.cfg[8+i] ? 12'(s1[2*i]) + 12'(s1[2*i+1])
                            : 12'(s1[2*i]) - 12'(s1[2*i+1]);
    for (int i = 0; i < 2; i++)
      s3[i] <= hdr.cfg[12+i] ? 13'(s2[2*i]) + 13'(s2[2*i+1])
                             : 13'(s2[2*i]) - 13'(s2[2*i+1]);
    s4 <= hdr.cfg[14] ? 14'(s3[0]) + 14'(s3[1]) : 14'(s3[0]) - 14'(s3[1]);
    // Stage 5: possible two's complement.
    if (!hdr.cfg[15])             s5 <= s4;
    else if (s4 == 14'sh2000)     s5 <= 14'sh1FFF;
    else                          s5 <= -s4;
    // Pulse-shaping integrator: taps 1..3 hold the previous outputs.
    t1  <= s5;
    t2  <= t1;
    t3  <= t2;
    s6a <= 15'(s5) + 15'(t1);
    s6b <= 15'(t2) + 15'(t3);
    s7  <= 16'(s6a) + 16'(s6b);
  end

  // ---------------- status and bypass pipelines ----------------
  stream_t st [L];     // PROG, VALID, reserved bits and bypass data
  logic    sel [L];    // 1: output comes from the processing pipeline

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) begin
        st[i]  <= NULL_WORD;
        sel[i] <= 1'b0;
      end
    end else begin
      st[0]       <= in;
      st[0].valid <= in.valid && !is_init;
      sel[0]      <= is_data;
      for (int i = 1; i < L; i++) begin
        st[i]  <= st[i-1];
        sel[i] <= sel[i-1];
      end
    end
  end

  always_comb begin
    out = st[L-1];
    if (sel[L-1]) out.data = sample_t'(s7[15:6]);
  end

endmodule
