// acq_track: Acquisition/Tracking module, the one place in the first stage
// where the I and Q streams meet. It leaves the data of both streams alone
// and rewrites each user's programming header (sample index in word 0,
// acquired bit in word 1) with that user's latest timing and status.
//
// For every data word of a user's stream:
//  * magnitude approximation: max(|I|,|Q|) + min(|I|,|Q|)/2;
//  * chip averaging filter: the magnitude is averaged with the magnitude at
//    the same position one symbol window (64 samples) earlier, kept per user
//    in a 64-entry history so it runs on across blocks;
//  * acquisition (user not locked): the position of the largest filtered
//    magnitude in every 64-sample window is found; when it falls on the
//    same position, ignoring its two LSBs, in ACQ_M windows in a row the
//    sample index is set to that position and the user is locked;
//  * tracking (locked): the filtered magnitudes at the early (index-1),
//    on-time (index) and late (index+1) positions are summed over the block
//    (16 symbols). After the block: if late > on-time or early > on-time
//    the index moves by one sample, down if early > late, up otherwise
//    (modulo 64);
//  * detection (locked): the on-time magnitude is summed over DET_BITS
//    symbols; at the end the acquired bit is set if the average reaches
//    DET_THRESH, otherwise it is cleared and the user returns to
//    acquisition.
// Per-user state (index, lock, acquired, last window maximum, run length,
// detection sums, magnitude history) is kept in local memories addressed by
// the user ID from header word 0. The end-of-block decisions are taken one
// cycle after the last data word, well before the next header.
// Output: both streams delayed by one cycle (ACQ_LAT). events reports, one
// cycle wide: [0] lock, [1] index adjusted, [2] acquired set, [3] acquired
// lost, [4] index wrapped across the window boundary.
// ACQ_M and DET_THRESH are not given by the document and are this design's
// choice; the filter delay of 64 samples follows the stated symbol period.
module acq_track
  import pic_pkg::*;
#(
  parameter int unsigned K          = 4,
  parameter int unsigned NB         = 1024,
  parameter int unsigned ACQ_M      = 8,
  parameter int unsigned DET_BITS   = 256,
  parameter int unsigned DET_THRESH = 48
) (
  input  logic       clk,
  input  logic       rst_n,
  input  stream_t    in_i,
  input  stream_t    in_q,
  output stream_t    out_i,
  output stream_t    out_q,
  output logic [4:0] events
);

  localparam int unsigned UW = (K > 1) ? $clog2(K) : 1;

  logic        is_data, is_prog, prog_en, proc_en;
  logic [2:0]  prog_idx;
  logic [10:0] data_idx;
  hdr_t        hdr;
  mod_state_t  state;

  stream_ctrl u_ctrl (
    .clk, .rst_n, .in(in_i), .state, .prog_en, .proc_en, .is_data, .is_prog,
    .prog_idx, .data_idx, .hdr
  );

  // Per-user state.
  logic [5:0]  sidx   [K];
  logic        locked [K];
  logic        acq    [K];
  logic [5:0]  pmax   [K];
  logic [7:0]  run    [K];
  logic [19:0] dsum   [K];
  logic [9:0]  dcnt   [K];
  logic [10:0] hist   [K * SYM_LEN];

  // Working registers for the user now streaming.
  logic [UW-1:0] cur;
  logic [10:0]   wmax;
  logic [5:0]    wpos;
  logic [15:0]   e_acc, o_acc, l_acc;
  logic          eob;

  // ---- magnitude and chip averaging filter ----
  logic [10:0] ai, aq, mag, prev_mag, filt;
  logic [5:0]  w;
  logic [10:0] nmax;
  logic [5:0]  npos;
  logic [5:0]  s_cur;

  assign ai    = in_i.data[DW-1] ? 11'(-12'(in_i.data)) : 11'(in_i.data);
  assign aq    = in_q.data[DW-1] ? 11'(-12'(in_q.data)) : 11'(in_q.data);
  assign mag   = (ai > aq) ? ai + (aq >> 1) : aq + (ai >> 1);
  assign w     = data_idx[5:0];
  assign prev_mag = hist[{cur, w}];
  assign filt  = 11'((12'(mag) + 12'(prev_mag)) >> 1);
  assign nmax  = (w == 6'd0 || filt > wmax) ? filt : wmax;
  assign npos  = (w == 6'd0 || filt > wmax) ? w : wpos;
  assign s_cur = sidx[cur];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int u = 0; u < K; u++) begin
        sidx[u]   <= '0;
        locked[u] <= 1'b0;
        acq[u]    <= 1'b0;
        pmax[u]   <= '0;
        run[u]    <= '0;
        dsum[u]   <= '0;
        dcnt[u]   <= '0;
      end
      for (int i = 0; i < K * SYM_LEN; i++) hist[i] <= '0;
      cur    <= '0;
      wmax   <= '0;
      wpos   <= '0;
      e_acc  <= '0;
      o_acc  <= '0;
      l_acc  <= '0;
      eob    <= 1'b0;
      events <= '0;
    end else begin
      events <= '0;
      eob    <= is_data && (data_idx == 11'(NB - 1));

      if (is_prog && prog_idx == 3'd0) begin
        cur   <= in_i.data[UW-1:0];
        e_acc <= '0;
        o_acc <= '0;
        l_acc <= '0;
      end

      if (is_data) begin
        hist[{cur, w}] <= mag;
        wmax <= nmax;
        wpos <= npos;
        if (!locked[cur]) begin
          if (w == 6'd63) begin
            pmax[cur] <= npos;
            if (npos[5:2] == pmax[cur][5:2] && 32'(run[cur]) + 1 >= ACQ_M) begin
              locked[cur] <= 1'b1;
              sidx[cur]   <= npos;
              run[cur]    <= '0;
              dsum[cur]   <= '0;
              dcnt[cur]   <= '0;
              events[0]   <= 1'b1;
            end else if (npos[5:2] == pmax[cur][5:2]) begin
              run[cur] <= run[cur] + 1'b1;
            end else begin
              run[cur] <= '0;
            end
          end
        end else begin
          if (w == s_cur) begin
            o_acc     <= o_acc + 16'(filt);
            dsum[cur] <= dsum[cur] + 20'(filt);
            dcnt[cur] <= dcnt[cur] + 1'b1;
          end
          if (w == s_cur - 6'd1) e_acc <= e_acc + 16'(filt);
          if (w == s_cur + 6'd1) l_acc <= l_acc + 16'(filt);
        end
      end

      // End-of-block tracking and detection decisions.
      if (eob && locked[cur]) begin
        if (l_acc > o_acc || e_acc > o_acc) begin
          events[1] <= 1'b1;
          if (e_acc > l_acc) begin
            sidx[cur] <= s_cur - 6'd1;
            if (s_cur == 6'd0) events[4] <= 1'b1;
          end else begin
            sidx[cur] <= s_cur + 6'd1;
            if (s_cur == 6'd63) events[4] <= 1'b1;
          end
        end
        if (32'(dcnt[cur]) >= DET_BITS) begin
          dsum[cur] <= '0;
          dcnt[cur] <= '0;
          if (32'(dsum[cur]) >= DET_THRESH * DET_BITS) begin
            if (!acq[cur]) events[2] <= 1'b1;
            acq[cur] <= 1'b1;
          end else begin
            if (acq[cur]) events[3] <= 1'b1;
            acq[cur]    <= 1'b0;
            locked[cur] <= 1'b0;
            run[cur]    <= '0;
          end
        end
      end
    end
  end

  // ---- header rewrite, one-cycle output register ----
  function automatic stream_t rewrite(input stream_t x, input logic [2:0] k,
                                      input logic [5:0] s, input logic a);
    stream_t y;
    y = x;
    if (x.prog && x.valid && k == 3'd0) y.data[9:4] = s;
    if (x.prog && x.valid && k == 3'd1) y.data[4]   = a;
    return y;
  endfunction

  logic [UW-1:0] hdr_uid;
  assign hdr_uid = (prog_idx == 3'd0) ? in_i.data[UW-1:0] : cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_i <= NULL_WORD;
      out_q <= NULL_WORD;
    end else begin
      out_i <= rewrite(in_i, prog_idx, sidx[hdr_uid], acq[hdr_uid]);
      out_q <= rewrite(in_q, prog_idx, sidx[hdr_uid], acq[hdr_uid]);
    end
  end

endmodule
