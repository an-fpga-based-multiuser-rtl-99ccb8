// revised: Revised module. Forms the revised received signal
//     r'(t) = r(t) + c * ( r(t) - sum_j s_j(t) )
// from the actual received signal r and the estimated received signal
// (the Combine output), with a common backoff factor c for all users.
//
// It works on the valid data words of the estimated stream, which occur
// only during the last user's stream of each block. The estimate lags the
// actual signal by NNs-1 = 63 samples (the regenerated symbol follows its
// correlation peak), so the actual samples first pass through a 63-word
// circular delay advanced on the same words; it runs on across blocks.
// Pipeline (four stages, REV_LAT), 16-bit arithmetic throughout:
//   1: error e = r_delayed - estimate;
//   2: weighted error c*e, c chosen by backoff_sel: 0 -> 0.00, 1 -> 0.50,
//      2 -> 0.75, 3 -> 1.00 (shift-and-add);
//   3: r_delayed + c*e;
//   4: saturation to the ten-bit payload.
// The actual stream must be aligned word for word with the estimated stream
// (done outside by a stream_delay); an assertion checks that every
// estimated data word meets an actual data word. Programming words and
// invalid words of the estimated stream pass through a bypass of equal
// depth; no header field is used.
module revised
  import pic_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  stream_t    est,
  input  stream_t    act,
  input  logic [1:0] backoff_sel,
  output stream_t    out
);

  localparam int unsigned L = REV_LAT;

  logic        is_data, is_prog, prog_en, proc_en;
  logic [2:0]  prog_idx;
  logic [10:0] data_idx;
  hdr_t        hdr;
  mod_state_t  state;

  stream_ctrl u_ctrl (
    .clk, .rst_n, .in(est), .state, .prog_en, .proc_en, .is_data, .is_prog,
    .prog_idx, .data_idx, .hdr
  );

  // 63-sample delay of the actual received signal.
  sample_t    dmem [INIT_LEN];
  logic [5:0] dptr;

  logic signed [15:0] r1, e1;        // stage 1
  logic signed [15:0] r2, w2;        // stage 2
  logic signed [15:0] r3;            // stage 3
  sample_t            r4;            // stage 4

  stream_t st  [L];
  logic    sel [L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dptr <= '0;
      for (int i = 0; i < INIT_LEN; i++) dmem[i] <= '0;
      for (int i = 0; i < L; i++) begin
        st[i]  <= NULL_WORD;
        sel[i] <= 1'b0;
      end
      r1 <= '0; e1 <= '0; r2 <= '0; w2 <= '0; r3 <= '0; r4 <= '0;
    end else begin
      if (is_data) begin
        dmem[dptr] <= act.data;
        dptr       <= (dptr == 6'(INIT_LEN - 1)) ? '0 : dptr + 1'b1;
      end
      // Stage 1: error signal.
      r1 <= 16'(dmem[dptr]);
      e1 <= 16'(dmem[dptr]) - 16'(est.data);
      // Stage 2: backoff weighting.
      r2 <= r1;
      unique case (backoff_sel)
        2'd0: w2 <= '0;
        2'd1: w2 <= e1 >>> 1;
        2'd2: w2 <= (e1 >>> 1) + (e1 >>> 2);
        2'd3: w2 <= e1;
      endcase
      // Stage 3: add back to the delayed actual signal.
      r3 <= r2 + w2;
      // Stage 4: saturation.
      r4 <= sat10(32'(r3));
      // Status / bypass.
      st[0]  <= est;
      sel[0] <= is_data;
      for (int i = 1; i < L; i++) begin
        st[i]  <= st[i-1];
        sel[i] <= sel[i-1];
      end
    end
  end

  always_comb begin
    out = st[L-1];
    if (sel[L-1]) out.data = r4;
  end

  // Every estimated data word must meet an actual data word.
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    is_data |-> (act.valid && !act.prog))
    else $error("revised: actual stream not aligned with estimated stream");

endmodule
