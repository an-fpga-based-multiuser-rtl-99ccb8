// tb_pic_ber: bit-error-rate sweep of the PIC receiver at its default
// parameters, in the two benchmark cases: no carrier offset (case 1) and a
// common 500 Hz carrier offset (case 2). For each case every combination of
// noise level (0..3) and backoff factor (0, 1/2, 3/4, 1) is held for
// CFG_BLOCKS blocks, and the errors of users 1..3 are counted.
// Transmitter model: four DPSK users of equal amplitude (perfect power
// control) at different carrier phases, length-16 codes at 4 samples per
// chip, and a slip of one extra sample every 8269, 8849, 9403 and 9973
// samples, so the multiple-access interference (MAI) keeps changing. The
// offset rotates every user's I/Q phase at OFFSET_HZ for a 2 MHz sample rate.
// Bits are counted only for symbols sent at least two blocks after a
// configuration change and two blocks before the next one (noise is added
// when a block is sampled, the backoff used when it is processed a block
// later). A host model reads all four FIFOs continuously; decoded bits are
// matched to the sent ones in runs of 32, allowing for bits lost when the
// tracking loop moves the sample index.
// Checks: every configuration measured and all users acquired at the end.
// For each case at noise levels 0 and 1, where MAI dominates, the
// conventional receiver (backoff 0) makes errors and full cancellation
// (backoff 1) makes at most a quarter as many. Prints the
// error table.
module tb_pic_ber;
  import pic_pkg::*;

  localparam int  K          = 4;
  localparam int  NB         = 1024;
  localparam int  SPS        = 5;
  localparam int  WARMUP     = 8;
  localparam int  CFG_BLOCKS = 300;
  localparam int  NCFG       = 32;        // 16 per case
  localparam int  BLOCKS     = WARMUP + NCFG * CFG_BLOCKS + 2;
  localparam int  MAXSYM     = BLOCKS * 16 + 64;
  localparam real OFFSET_HZ  = 500.0;
  localparam real TWO_PI     = 6.283185307179586;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sample_stb;
  sample_t rx_i, rx_q;
  logic [1:0] noise_level, backoff_sel;
  logic [1:0] host_sel;
  logic host_rd_data, host_rd_status;
  logic [15:0] host_data, host_status;
  logic block_start, stage2_trigger;
  logic [4:0] trk_events;
  logic [1:0] regen_events, demod_events;
  logic [3:0] overrun;

  pic_receiver dut (.*);

  int checks = 0, failures = 0;
  int n_blocks = 0;

  // ---------------- transmitter model ----------------
  int  tau  [K] = '{5, 21, 2, 62};
  real amp_i [K] = '{110.0, 0.0, 78.0, -78.0};
  real amp_q [K] = '{0.0, 110.0, 78.0, 78.0};
  int  slip_period [K] = '{8269, 8849, 9403, 9973};
  int  pos [K], sym [K], scnt [K];
  bit  dbit [K][MAXSYM];
  int  tag  [K][MAXSYM];     // configuration a symbol was sent under, -1 if none
  bit  cur_b [K];
  int  cur_tag = -1;
  real phase = 0.0, dphase = 0.0;

  function automatic int chip_val(int k, int p);
    return pn_chip(PN_TABLE[k], 4'(p / 4)) ? 1 : -1;
  endfunction

  task automatic tx_sample(output sample_t si, output sample_t sq);
    real acc_i, acc_q, c, s;
    acc_i = 0.0; acc_q = 0.0;
    c = $cos(phase); s = $sin(phase);
    for (int k = 0; k < K; k++) begin
      real v;
      v = real'(chip_val(k, pos[k]) * (cur_b[k] ? -1 : 1));
      acc_i += v * (amp_i[k] * c - amp_q[k] * s);
      acc_q += v * (amp_i[k] * s + amp_q[k] * c);
    end
    si = sample_t'($rtoi(acc_i + (acc_i >= 0.0 ? 0.5 : -0.5)));
    sq = sample_t'($rtoi(acc_q + (acc_q >= 0.0 ? 0.5 : -0.5)));
    phase += dphase;
    if (phase > TWO_PI) phase -= TWO_PI;
    for (int k = 0; k < K; k++) begin
      scnt[k]++;
      if (scnt[k] == slip_period[k]) scnt[k] = 0;   // repeat this sample
      else begin
        pos[k]++;
        if (pos[k] == 64) begin
          pos[k] = 0;
          sym[k]++;
          if (sym[k] < MAXSYM) begin
            dbit[k][sym[k]] = 1'($urandom);
            tag[k][sym[k]] = cur_tag;
            cur_b[k] = cur_b[k] ^ dbit[k][sym[k]];
          end
        end
      end
    end
  endtask

  initial begin
    sample_stb = 0; rx_i = '0; rx_q = '0;
    for (int k = 0; k < K; k++) begin
      pos[k] = (64 - tau[k]) % 64;
      sym[k] = 0; scnt[k] = 0; cur_b[k] = 0; dbit[k][0] = 0; tag[k][0] = -1;
    end
    @(posedge rst_n);
    forever begin
      repeat (SPS - 1) @(posedge clk);
      begin
        sample_t si, sq;
        tx_sample(si, sq);
        rx_i <= si; rx_q <= sq; sample_stb <= 1'b1;
      end
      @(posedge clk);
      sample_stb <= 1'b0;
    end
  end

  // ---------------- configuration schedule ----------------
  // Configuration c: case c/16, noise level (c%16)/4, backoff c%4.
  int cfg_seen [NCFG];
  always @(posedge clk) if (rst_n && block_start) begin
    int c, b;
    n_blocks++;
    if (n_blocks >= WARMUP && n_blocks < WARMUP + NCFG * CFG_BLOCKS) begin
      c = (n_blocks - WARMUP) / CFG_BLOCKS;
      b = (n_blocks - WARMUP) % CFG_BLOCKS;
      noise_level <= 2'((c % 16) / 4);
      backoff_sel <= 2'(c % 4);
      dphase = (c >= 16) ? TWO_PI * OFFSET_HZ / 2.0e6 : 0.0;
      cur_tag = (b >= 2 && b <= CFG_BLOCKS - 3) ? c : -1;
      cfg_seen[c]++;
    end else begin
      noise_level <= 2'd0;
      backoff_sel <= 2'd0;
      cur_tag = -1;
    end
  end

  // ---------------- host model ----------------
  bit rbits [K][$];
  initial begin
    host_sel = 0; host_rd_data = 0; host_rd_status = 0;
    @(posedge rst_n);
    forever begin
      repeat (700) @(posedge clk);
      for (int k = 0; k < K; k++) begin
        if (!host_status[k]) begin
          host_sel <= 2'(k);
          @(negedge clk);
          for (int b = 15; b >= 0; b--) rbits[k].push_back(host_data[b]);
          @(posedge clk);
          host_rd_data <= 1'b1;
          @(posedge clk);
          host_rd_data <= 1'b0;
        end
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int errs [NCFG], nbits [NCFG];
  int nresync = 0;

  function automatic int run_errors(int k, int j0, int off);
    int e;
    e = 0;
    for (int j = j0; j < j0 + 32; j++) begin
      int t;
      t = j + off;
      if (t < 1 || t >= MAXSYM) return 999;
      e += int'(rbits[k][j] != dbit[k][t]);
    end
    return e;
  endfunction

  // Match the decoded bits of user k with the sent bits, 32 at a time. The
  // offset is kept from one run to the next, moved by up to 3 when that
  // fits better, and searched afresh when a run is close to random.
  task automatic count_bits(input int k);
    int n, off, last_t;
    n = rbits[k].size();
    off = 0; last_t = 0;
    for (int j0 = 32; j0 + 32 <= n; j0 += 32) begin
      int best_off, best_err;
      best_off = off; best_err = run_errors(k, j0, off);
      for (int d = -3; d <= 3; d++) begin
        int e;
        e = run_errors(k, j0, off + d);
        if (e < best_err) begin best_err = e; best_off = off + d; end
      end
      if (best_err > 10) begin
        for (int o = off - 400; o < off + 400; o++) begin
          int e;
          e = run_errors(k, j0, o);
          if (e < best_err) begin best_err = e; best_off = o; end
        end
        if (best_off != off) nresync++;
      end
      off = best_off;
      for (int j = j0; j < j0 + 32; j++) begin
        int t;
        t = j + off;
        if (t > last_t && t < MAXSYM && tag[k][t] >= 0) begin
          nbits[tag[k][t]]++;
          errs[tag[k][t]] += int'(rbits[k][j] != dbit[k][t]);
        end
        if (t > last_t) last_t = t;
      end
    end
  endtask

  initial begin
    noise_level = 0; backoff_sel = 0;
    for (int c = 0; c < NCFG; c++) begin errs[c] = 0; nbits[c] = 0; cfg_seen[c] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (n_blocks == BLOCKS);
    repeat (50) @(posedge clk);
    for (int k = 0; k < K; k++)
      check(dut.u_acq.acq[k] == 1'b1, $sformatf("user %0d acquired", k));
    for (int k = 1; k < K; k++) count_bits(k);
    for (int cs = 0; cs < 2; cs++) begin
      $display("case %0d: carrier offset %0.0f Hz, bit errors of users 1..3 (errors / bits)",
               cs + 1, cs * OFFSET_HZ);
      $display("  noise   backoff 0       backoff 1/2     backoff 3/4     backoff 1");
      for (int l = 0; l < 4; l++) begin
        int c;
        c = 16 * cs + 4 * l;
        $display("    %0d   %5d/%6d   %5d/%6d   %5d/%6d   %5d/%6d", l,
                 errs[c], nbits[c], errs[c+1], nbits[c+1],
                 errs[c+2], nbits[c+2], errs[c+3], nbits[c+3]);
      end
      // Interference-limited region: noise levels 0 and 1.
      check(errs[16*cs] + errs[16*cs+4] > 0,
            $sformatf("case %0d: conventional receiver makes errors under MAI", cs + 1));
      check((errs[16*cs+3] + errs[16*cs+7]) * 4 <= errs[16*cs] + errs[16*cs+4],
            $sformatf("case %0d: full cancellation cuts the MAI errors at least fourfold", cs + 1));
    end
    $display("alignment searches: %0d", nresync);
    for (int c = 0; c < NCFG; c++)
      check(cfg_seen[c] == CFG_BLOCKS && nbits[c] > (CFG_BLOCKS - 4) * 16 * 3 / 2,
            $sformatf("configuration %0d measured", c));
    check(overrun == 4'b0, "no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((BLOCKS + 4) * NB * SPS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
