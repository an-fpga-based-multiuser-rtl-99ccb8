// tb_regenerate: blocks of four user streams (header, then 1024 correlator
// words with random values; a few idle words mixed in) drive the
// regenerator. The symbol index in each user's header moves between blocks:
// user 0 stays at 10, user 1 steps up through 63 -> 0, user 2 steps down
// through 0 -> 63, user 3 jumps randomly and is sometimes not acquired.
// Reference: a symbol starts at every data index n with n mod 64 equal to
// the symbol index; when the index moved from 63 to 0 the symbol at n = 0
// is not taken (it was already used at the end of the previous block), and
// when it moved from 0 to 63 the word at n = 0 also starts a symbol. At a
// symbol start the word's value becomes the user's amplitude and the chip
// counter restarts; the counter and amplitude carry across blocks. Output
// (one clock later) = amplitude * code chip (counter / 4), negation
// saturated, or zero when the user is not acquired. The skip/extra event
// counts must match the reference.
module tb_regenerate;
  import pic_pkg::*;
  localparam int K = 4, NB = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  stream_t in, out;
  logic [1:0] events;
  regenerate dut (.*);

  int checks = 0, failures = 0;
  typedef struct { bit is_data; stream_t w; int val; } exp_t;
  exp_t expq [$];
  int m_amp [K], m_cnt [K], m_psidx [K];
  int exp_skip = 0, exp_extra = 0, got_skip = 0, got_extra = 0;

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
    if (expq.size() >= REGEN_LAT) begin
      exp_t e;
      e = expq.pop_front();
      if (e.is_data)
        check(out.valid && !out.prog && int'(out.data) == e.val,
              $sformatf("regenerated %0d expected %0d", out.data, e.val));
      else
        check(out == e.w, "non-data word passes unchanged");
    end
  end

  task automatic drive(input stream_t w, input bit d, input int v);
    exp_t e;
    @(negedge clk);
    in = w;
    e.is_data = d; e.w = w; e.val = v;
    expq.push_back(e);
  endtask

  initial begin
    int sidx [K];
    bit acq;
    logic [15:0] pn;
    stream_t w;
    int v, chip;
    bit strobe;
    in = '0;
    for (int u = 0; u < K; u++) begin m_amp[u] = 0; m_cnt[u] = 0; m_psidx[u] = 0; end
    sidx = '{10, 60, 3, 30};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 10; blk++) begin
      for (int u = 0; u < K; u++) begin
        acq = (u != 3) || (blk % 3 != 0);
        pn  = PN_TABLE[u + 4];
        w = '0; w.prog = 1; w.valid = 1;
        w.data = {6'(sidx[u]), 4'(u)};                                 drive(w, 0, 0);
        w.data = {4'b0, 1'(u == K - 1), acq, 4'($urandom)};            drive(w, 0, 0);
        w.data = 10'($urandom);                                        drive(w, 0, 0);
        w.data = 10'($urandom);                                        drive(w, 0, 0);
        w.data = pn[15:6];                                             drive(w, 0, 0);
        w.data = {4'b0, pn[5:0]};                                      drive(w, 0, 0);
        for (int n = 0; n < NB; n++) begin
          if ($urandom % 16 == 0) drive('0, 0, 0);
          w = '0; w.valid = 1;
          w.data = sample_t'((n % 64 == 0 && $urandom % 2) ? -512 : int'($urandom % 1024) - 512);
          strobe = (n % 64 == sidx[u]);
          if (n == 0 && m_psidx[u] == 63 && sidx[u] == 0) begin strobe = 0; exp_skip++; end
          if (n == 0 && m_psidx[u] == 0 && sidx[u] == 63) begin strobe = 1; exp_extra++; end
          if (strobe) begin
            m_amp[u] = int'($signed(w.data));
            m_cnt[u] = 0;
          end else m_cnt[u] = (m_cnt[u] + 1) % 64;
          chip = m_cnt[u] / 4;
          v = !acq ? 0 : pn[15 - chip] ? m_amp[u] : (m_amp[u] == -512 ? 511 : -m_amp[u]);
          drive(w, 1, v);
        end
        m_psidx[u] = sidx[u];
        repeat (4) drive('0, 0, 0);
      end
      sidx[1] = (sidx[1] + 1) % 64;
      sidx[2] = (sidx[2] + 63) % 64;
      sidx[3] = $urandom % 64;
    end
    repeat (4) drive('0, 0, 0);
    check(exp_skip > 0 && exp_extra > 0, "both boundary cases exercised");
    check(got_skip == exp_skip && got_extra == exp_extra,
          $sformatf("events skip %0d/%0d extra %0d/%0d", got_skip, exp_skip, got_extra, exp_extra));
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
