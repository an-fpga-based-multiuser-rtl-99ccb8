// tb_acq_track: four users' correlator outputs (I and Q) are synthesised
// block by block: a triangular correlation peak (300 at the peak, falling by
// 75 per sample) with random data polarity on each symbol and small random
// noise elsewhere.
//   user 0: peak fixed at sample 20;
//   user 1: peak starts at 61 and moves up one sample every three blocks,
//           crossing the 63 -> 0 window boundary;
//   user 2: noise only;
//   user 3: peak at 40 for 24 blocks, then noise only.
// A reference model of the algorithm (magnitude max + min/2, average with
// the magnitude one window earlier, window maximum with lock after ACQ_M
// windows agreeing on position / 4, early/on-time/late sums with a
// one-sample move at the end of each block, on-time detection sum over
// DET_BITS symbols against DET_THRESH) predicts the symbol index and
// acquired bit written into every header and every event. The data words
// must pass unchanged one clock later. Expected outcomes are also checked
// directly: users 0 and 1 end locked and acquired on their peaks, user 2 is
// never acquired, user 3 is acquired and then lost.
module tb_acq_track;
  import pic_pkg::*;
  localparam int K = 4, NB = 1024, ACQ_M = 8, DET_BITS = 256, DET_THRESH = 48;
  localparam int BLOCKS = 56;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  stream_t in_i, in_q, out_i, out_q;
  logic [4:0] events;
  acq_track dut (.*);

  int checks = 0, failures = 0;

  // Reference model state.
  int m_sidx [K], m_locked [K], m_acq [K], m_pmax [K], m_run [K], m_dsum [K], m_dcnt [K];
  int m_hist [K][64];
  int wmax, wpos, e_acc, o_acc, l_acc;
  int exp_ev [5], got_ev [5];
  int ever_acq [K];

  typedef struct { stream_t wi, wq; } exp_t;
  exp_t expq [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    #1;
    for (int b = 0; b < 5; b++) got_ev[b] += int'(events[b]);
    if (expq.size() >= ACQ_LAT) begin
      exp_t e;
      e = expq.pop_front();
      check(out_i == e.wi && out_q == e.wq,
            $sformatf("output %h/%h expected %h/%h", out_i, out_q, e.wi, e.wq));
    end
  end

  task automatic drive(input stream_t wi, input stream_t wq, input stream_t ei, input stream_t eq);
    exp_t e;
    @(negedge clk);
    in_i = wi; in_q = wq;
    e.wi = ei; e.wq = eq;
    expq.push_back(e);
  endtask

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic model_word(input int u, input int w, input int vi, input int vq);
    int ai, aq, mag, filt, s;
    ai = iabs(vi); aq = iabs(vq);
    mag  = (ai > aq) ? ai + aq / 2 : aq + ai / 2;
    filt = (mag + m_hist[u][w]) / 2;
    m_hist[u][w] = mag;
    if (w == 0 || filt > wmax) begin wmax = filt; wpos = w; end
    if (!m_locked[u]) begin
      if (w == 63) begin
        if (wpos / 4 == m_pmax[u] / 4) begin
          if (m_run[u] + 1 >= ACQ_M) begin
            m_locked[u] = 1; m_sidx[u] = wpos; m_run[u] = 0; m_dsum[u] = 0; m_dcnt[u] = 0;
            exp_ev[0]++;
          end else m_run[u]++;
        end else m_run[u] = 0;
        m_pmax[u] = wpos;
      end
    end else begin
      s = m_sidx[u];
      if (w == s) begin o_acc += filt; m_dsum[u] += filt; m_dcnt[u]++; end
      if (w == (s + 63) % 64) e_acc += filt;
      if (w == (s + 1) % 64) l_acc += filt;
    end
  endtask

  task automatic model_eob(input int u);
    if (!m_locked[u]) return;
    if (l_acc > o_acc || e_acc > o_acc) begin
      exp_ev[1]++;
      if (e_acc > l_acc) begin
        if (m_sidx[u] == 0) exp_ev[4]++;
        m_sidx[u] = (m_sidx[u] + 63) % 64;
      end else begin
        if (m_sidx[u] == 63) exp_ev[4]++;
        m_sidx[u] = (m_sidx[u] + 1) % 64;
      end
    end
    if (m_dcnt[u] >= DET_BITS) begin
      if (m_dsum[u] >= DET_THRESH * DET_BITS) begin
        if (!m_acq[u]) exp_ev[2]++;
        m_acq[u] = 1;
        ever_acq[u] = 1;
      end else begin
        if (m_acq[u]) exp_ev[3]++;
        m_acq[u] = 0; m_locked[u] = 0; m_run[u] = 0;
      end
      m_dsum[u] = 0; m_dcnt[u] = 0;
    end
  endtask

  int peak [K];
  int n_lost_user3 = 0;

  initial begin
    stream_t wi, wq, ei, eq;
    logic [9:0] h [6];
    int vi, vq, d, pol, amp;
    in_i = '0; in_q = '0;
    for (int u = 0; u < K; u++) begin
      m_sidx[u] = 0; m_locked[u] = 0; m_acq[u] = 0; m_pmax[u] = 0; m_run[u] = 0;
      m_dsum[u] = 0; m_dcnt[u] = 0; ever_acq[u] = 0;
      for (int w = 0; w < 64; w++) m_hist[u][w] = 0;
    end
    for (int b = 0; b < 5; b++) begin exp_ev[b] = 0; got_ev[b] = 0; end
    peak = '{20, 61, -1, 40};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < BLOCKS; blk++) begin
      if (blk > 0 && blk % 3 == 0) peak[1] = (peak[1] + 1) % 64;
      if (blk == 24) peak[3] = -1;
      for (int u = 0; u < K; u++) begin
        // Header: random symbol index and acquired bit on the way in; the
        // module must replace both.
        h[0] = {6'($urandom), 4'(u)};
        h[1] = {4'b0, 1'(u == K - 1), 1'($urandom), 4'($urandom)};
        for (int k = 2; k < 6; k++) h[k] = 10'($urandom);
        for (int k = 0; k < 6; k++) begin
          wi = '0; wi.prog = 1; wi.valid = 1; wi.data = h[k];
          wq = wi;
          ei = wi;
          if (k == 0) ei.data[9:4] = 6'(m_sidx[u]);
          if (k == 1) ei.data[4] = 1'(m_acq[u]);
          eq = ei;
          drive(wi, wq, ei, eq);
        end
        repeat (INIT_LEN) begin
          wi = '0; wi.data = 10'($urandom); wq = '0;
          drive(wi, wq, wi, wq);
        end
        e_acc = 0; o_acc = 0; l_acc = 0;
        for (int n = 0; n < NB; n++) begin
          int w;
          w = n % 64;
          if (w == 0) pol = ($urandom % 2) ? 1 : -1;
          amp = 0;
          if (peak[u] >= 0) begin
            d = iabs(w - peak[u]);
            if (64 - d < d) d = 64 - d;
            amp = (d < 4) ? 300 - 75 * d : 0;
          end
          vi = pol * amp * 3 / 5 + int'($urandom % 31) - 15;
          vq = pol * amp * 4 / 5 + int'($urandom % 31) - 15;
          wi = '0; wi.valid = 1; wi.data = sample_t'(vi);
          wq = '0; wq.valid = 1; wq.data = sample_t'(vq);
          drive(wi, wq, wi, wq);
          model_word(u, w, vi, vq);
        end
        model_eob(u);
        repeat (12) drive('0, '0, '0, '0);
        if (u == 3 && blk >= 24 && ever_acq[3] && !m_acq[3]) n_lost_user3++;
      end
    end
    repeat (4) drive('0, '0, '0, '0);
    for (int b = 0; b < 5; b++)
      check(got_ev[b] == exp_ev[b], $sformatf("event %0d count %0d expected %0d", b, got_ev[b], exp_ev[b]));
    check(exp_ev[1] > 0 && exp_ev[4] > 0 && exp_ev[2] > 0 && exp_ev[3] > 0, "all events exercised");
    for (int u = 0; u < 2; u++) begin
      int d;
      d = iabs(int'(dut.sidx[u]) - peak[u]);
      if (64 - d < d) d = 64 - d;
      check(dut.locked[u] && dut.acq[u] && d <= 1,
            $sformatf("user %0d locked on its peak (index %0d, peak %0d)", u, dut.sidx[u], peak[u]));
    end
    check(!ever_acq[2] && !dut.acq[2], "noise-only user never acquired");
    check(n_lost_user3 > 0, "user 3 acquired, then lost");
    $display("events: lock %0d adjust %0d acquired %0d lost %0d wrap %0d",
             got_ev[0], got_ev[1], got_ev[2], got_ev[3], got_ev[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
