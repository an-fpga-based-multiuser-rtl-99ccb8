// demod: Differential (DBPSK) Demodulator module. Non-coherent detection of
// the current user from the matched-filtered I and Q streams of the second
// stage.
//
// From the header it takes the user ID, sample index and acquired bit. A
// window counter (data position modulo 64) marks the symbol instant when it
// equals the sample index plus IDX_OFFSET. The revised signal reaching this
// stage lags the first-stage signal by 63 samples, so with the default
// IDX_OFFSET = 63 the correlation peak found by the first stage is sampled
// where it now lies. The same window-boundary rule as in the Regenerate
// module applies (index 0 -> 63: the first sample is also a symbol;
// 63 -> 0: the first sample is skipped).
// Pipeline (three stages, DEMOD_LAT), enabled at each symbol instant:
//   1: latch the complex symbol Y_n and the user's previous symbol Y_n-1
//      (kept per user ID so detection runs on across blocks);
//   2: products Y_I,n * Y_I,n-1 and Y_Q,n * Y_Q,n-1;
//   3: Z_n = sum of the products.
// Output: the I stream delayed by three cycles; data words are valid only
// at symbol instants of an acquired user and carry the top ten bits of Z_n
// (its MSB is the hard decision: 1 = phase reversal). Programming words
// pass unchanged. events pulses [0]/[1] for the two boundary cases.
module demod
  import pic_pkg::*;
#(
  parameter int unsigned K          = 4,
  parameter int unsigned NB         = 1024,
  parameter int unsigned IDX_OFFSET = INIT_LEN
) (
  input  logic       clk,
  input  logic       rst_n,
  input  stream_t    in_i,
  input  stream_t    in_q,
  output stream_t    out,
  output logic [1:0] events
);

  localparam int unsigned UW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned L  = DEMOD_LAT;

  logic        is_data, is_prog, prog_en, proc_en;
  logic [2:0]  prog_idx;
  logic [10:0] data_idx;
  hdr_t        hdr;
  mod_state_t  state;

  stream_ctrl u_ctrl (
    .clk, .rst_n, .in(in_i), .state, .prog_en, .proc_en, .is_data, .is_prog,
    .prog_idx, .data_idx, .hdr
  );

  sample_t    prev_i [K];
  sample_t    prev_q [K];
  logic [5:0] psidx  [K];

  logic [UW-1:0] u;
  logic [5:0]    eidx;
  logic          first, extra, skip, strobe;

  assign u      = hdr.uid[UW-1:0];
  assign eidx   = hdr.sidx + 6'(IDX_OFFSET);
  assign first  = (data_idx == 11'd0);
  assign extra  = first && psidx[u] == 6'd0  && eidx == 6'd63;
  assign skip   = first && psidx[u] == 6'd63 && eidx == 6'd0;
  assign strobe = is_data && (((data_idx[5:0] == eidx) && !skip) || extra);

  sample_t            ci, cq, pvi, pvq;
  logic               v1, v2, v3;
  logic signed [19:0] mi, mq;
  logic signed [20:0] z;
  stream_t            st [L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) begin
        prev_i[i] <= '0;
        prev_q[i] <= '0;
        psidx[i]  <= '0;
      end
      for (int i = 0; i < L; i++) st[i] <= NULL_WORD;
      ci <= '0; cq <= '0; pvi <= '0; pvq <= '0;
      mi <= '0; mq <= '0; z <= '0;
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      events <= '0;
    end else begin
      events <= '0;
      if (is_data) events <= {skip, extra};
      if (is_data && data_idx == 11'(NB - 1)) psidx[u] <= eidx;
      // Stage 1.
      v1 <= strobe && hdr.acq;
      if (strobe) begin
        ci <= in_i.data;
        cq <= in_q.data;
        pvi <= prev_i[u];
        pvq <= prev_q[u];
        prev_i[u] <= in_i.data;
        prev_q[u] <= in_q.data;
      end
      // Stage 2.
      v2 <= v1;
      mi <= ci * pvi;
      mq <= cq * pvq;
      // Stage 3.
      v3 <= v2;
      z  <= 21'(mi) + 21'(mq);
      // Status / bypass.
      st[0] <= in_i;
      for (int i = 1; i < L; i++) st[i] <= st[i-1];
    end
  end

  always_comb begin
    out = st[L-1];
    if (!out.prog) begin
      out.valid = v3;
      out.data  = z[20:11];
    end
  end

endmodule
