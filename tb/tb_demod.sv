// tb_demod: I and Q streams of four users (same headers on both, random
// second-stage correlator values) drive the DBPSK demodulator. The symbol
// index in the headers moves between blocks as in the regenerator test, so
// the decision index (symbol index + 63, mod 64) crosses the 0/63 boundary
// both ways. Reference: a decision is taken at data index n with n mod 64
// equal to the decision index, with the same boundary rules as the
// regenerator (skip n = 0 after 63 -> 0, extra decision at n = 0 after
// 0 -> 63). At a decision Z = I*I_prev + Q*Q_prev over the user's previous
// decision values (kept across blocks); the output word three clocks later
// is valid for a decision of an acquired user and carries Z >> 11. Other
// data words come out invalid; header words pass unchanged.
module tb_demod;
  import pic_pkg::*;
  localparam int K = 4, NB = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  stream_t in_i, in_q, out;
  logic [1:0] events;
  demod dut (.*);

  int checks = 0, failures = 0;
  typedef struct { bit is_prog; bit valid; stream_t w; int val; } exp_t;
  exp_t expq [$];
  int p_i [K], p_q [K], m_pe [K];
  int exp_skip = 0, exp_extra = 0, got_skip = 0, got_extra = 0, n_dec = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    #1;
    got_extra += int'(events[0]);
    got_skip  += int'(events[1]);
    if (expq.size() >= DEMOD_LAT) begin
      exp_t e;
      e = expq.pop_front();
      if (e.is_prog)
        check(out == e.w, "header word passes unchanged");
      else begin
        check(out.valid == e.valid && !out.prog, "decision valid flag");
        if (e.valid) begin
          check(int'($signed(out.data)) == e.val, $sformatf("decision %0d expected %0d", $signed(out.data), e.val));
          n_dec++;
        end
      end
    end
  end

  task automatic drive(input stream_t wi, input stream_t wq, input bit v, input int val);
    exp_t e;
    @(negedge clk);
    in_i = wi; in_q = wq;
    e.is_prog = wi.prog; e.valid = v; e.w = wi; e.val = val;
    expq.push_back(e);
  endtask

  initial begin
    int sidx [K], eidx, ci, cq, z;
    bit acq, strobe;
    logic [15:0] pn;
    stream_t w, wq;
    in_i = '0; in_q = '0;
    for (int u = 0; u < K; u++) begin p_i[u] = 0; p_q[u] = 0; m_pe[u] = 0; end
    sidx = '{10, 62, 3, 30};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 10; blk++) begin
      for (int u = 0; u < K; u++) begin
        acq = (u != 3) || (blk % 3 != 0);
        pn  = PN_TABLE[u];
        eidx = (sidx[u] + 63) % 64;
        w = '0; w.prog = 1; w.valid = 1;
        w.data = {6'(sidx[u]), 4'(u)};                                 drive(w, w, 0, 0);
        w.data = {4'b0, 1'(u == K - 1), acq, 4'($urandom)};            drive(w, w, 0, 0);
        w.data = 10'($urandom);                                        drive(w, w, 0, 0);
        w.data = 10'($urandom);                                        drive(w, w, 0, 0);
        w.data = pn[15:6];                                             drive(w, w, 0, 0);
        w.data = {4'b0, pn[5:0]};                                      drive(w, w, 0, 0);
        for (int n = 0; n < NB; n++) begin
          if ($urandom % 16 == 0) drive('0, '0, 0, 0);
          w = '0; w.valid = 1; wq = w;
          ci = (n % 8 == 0) ? ((n & 8) ? 511 : -512) : int'($urandom % 1024) - 512;
          cq = (n % 8 == 0) ? ((n & 16) ? 511 : -512) : int'($urandom % 1024) - 512;
          w.data = sample_t'(ci); wq.data = sample_t'(cq);
          strobe = (n % 64 == eidx);
          if (n == 0 && m_pe[u] == 63 && eidx == 0) begin strobe = 0; exp_skip++; end
          if (n == 0 && m_pe[u] == 0 && eidx == 63) begin strobe = 1; exp_extra++; end
          z = 0;
          if (strobe) begin
            z = ci * p_i[u] + cq * p_q[u];
            p_i[u] = ci; p_q[u] = cq;
          end
          drive(w, wq, strobe && acq, z >>> 11);
        end
        m_pe[u] = eidx;
        repeat (4) drive('0, '0, 0, 0);
      end
      sidx[1] = (sidx[1] + 1) % 64;
      sidx[2] = (sidx[2] + 63) % 64;
      sidx[3] = $urandom % 64;
    end
    repeat (4) drive('0, '0, 0, 0);
    check(exp_skip > 0 && exp_extra > 0, "both boundary cases exercised");
    check(got_skip == exp_skip && got_extra == exp_extra,
          $sformatf("events skip %0d/%0d extra %0d/%0d", got_skip, exp_skip, got_extra, exp_extra));
    check(n_dec > 500, "decisions checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
