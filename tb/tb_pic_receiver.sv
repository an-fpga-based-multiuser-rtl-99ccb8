// tb_pic_receiver: end-to-end test of the PIC receiver.
//
// A behavioural transmitter sends four DBPSK DS/CDMA users (the receiver's
// own PN codes, sixteen chips of four samples, different delays and carrier
// phases). User 3 is periodically one sample late (its symbol lasts 65
// samples) and user 2 periodically one sample early, so their timing drifts
// across the symbol window and the tracking loop, including its window
// boundary handling, has to follow. A host model polls the status register
// and reads every non-empty FIFO. The test steps through all four backoff
// factors and a noise level, and at the end stops reading user 0 so its
// FIFO overflows.
// Checks: every user is locked and acquired; the bits read back from each
// user's FIFO match the transmitted data bits (after finding the bit
// offset once) with fewer than 1% errors; each mechanism (lock, tracking
// adjustment, index wrap, both boundary cases in the regenerator and the
// demodulator, acquired set, second-stage trigger, FIFO overflow, every
// backoff factor, noise) is seen at least once; no overrun.
// Reduced parameters keep it short: DET_BITS = 32, FIFO_DEPTH = 8.
module tb_pic_receiver;
  import pic_pkg::*;

  localparam int K        = 4;
  localparam int NB       = 1024;
  localparam int BLOCKS   = 64;
  localparam int SPS      = 5;          // clocks per sample
  localparam int MAXSYM   = 1200;

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

  pic_receiver #(.DET_BITS(32), .FIFO_DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;

  // ---------------- transmitter model ----------------
  int tau  [K] = '{5, 21, 2, 62};
  int amp_i[K] = '{60, 0, 42, -42};
  int amp_q[K] = '{0, 60, 42, 42};
  int slip_period [K] = '{0, 0, 3072, 2048};   // samples between timing moves
  int slip_dir    [K] = '{0, 0, -1, 1};        // -1 drop a sample, +1 repeat
  int pos [K];       // sample position in the current symbol (0..63)
  int sym [K];       // current symbol number
  int scnt[K];
  bit dbit[K][MAXSYM];
  bit cur_b[K];
  int nsamp = 0;

  function automatic int chip_val(int k, int p);
    return pn_chip(PN_TABLE[k], 4'(p / 4)) ? 1 : -1;
  endfunction

  task automatic tx_sample(output sample_t si, output sample_t sq);
    int acc_i = 0, acc_q = 0;
    for (int k = 0; k < K; k++) begin
      int s = chip_val(k, pos[k]) * (cur_b[k] ? -1 : 1);
      acc_i += s * amp_i[k];
      acc_q += s * amp_q[k];
    end
    si = sample_t'(acc_i);
    sq = sample_t'(acc_q);
    // Advance each user.
    for (int k = 0; k < K; k++) begin
      int step = 1;
      scnt[k]++;
      if (slip_period[k] != 0 && scnt[k] == slip_period[k]) begin
        scnt[k] = 0;
        step = 1 - slip_dir[k];   // +1: repeat (step 0), -1: drop (step 2)
      end
      repeat (step) begin
        pos[k]++;
        if (pos[k] == 64) begin
          pos[k] = 0;
          sym[k]++;
          if (sym[k] < MAXSYM) begin
            dbit[k][sym[k]] = 1'($urandom);
            cur_b[k] = cur_b[k] ^ dbit[k][sym[k]];
          end
        end
      end
    end
  endtask

  // Sample generation.
  initial begin
    sample_stb = 0; rx_i = '0; rx_q = '0;
    for (int k = 0; k < K; k++) begin
      pos[k] = (64 - tau[k]) % 64;   // symbol boundaries at t = tau (mod 64)
      sym[k] = 0; scnt[k] = 0; cur_b[k] = 0; dbit[k][0] = 0;
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
      nsamp++;
    end
  end

  // ---------------- host model ----------------
  bit rbits[K][$];
  bit starve0 = 0;
  int ovf_seen = 0;
  int words_read[K];

  initial begin
    host_sel = 0; host_rd_data = 0; host_rd_status = 0;
    @(posedge rst_n);
    forever begin
      repeat (700) @(posedge clk);
      if (host_status[11:8] != 0) ovf_seen++;
      host_rd_status <= 1'b1;
      @(posedge clk);
      host_rd_status <= 1'b0;
      for (int k = 0; k < K; k++) begin
        if (!(starve0 && k == 0) && !host_status[k]) begin
          host_sel <= 2'(k);
          @(negedge clk);
          for (int b = 15; b >= 0; b--) rbits[k].push_back(host_data[b]);
          words_read[k]++;
          @(posedge clk);
          host_rd_data <= 1'b1;
          @(posedge clk);
          host_rd_data <= 1'b0;
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_lock, n_adj, n_acq, n_lost, n_wrap, n_rg_extra, n_rg_skip, n_dm_extra, n_dm_skip, n_trig;
  int n_blocks;
  int bo_used[4];
  int nz_used;
  int nz_on = MAXSYM, nz_off = MAXSYM;   // transmitted symbols sent with noise
  always @(posedge clk) if (rst_n) begin
    n_lock     += int'(trk_events[0]);
    n_adj      += int'(trk_events[1]);
    n_acq      += int'(trk_events[2]);
    n_lost     += int'(trk_events[3]);
    n_wrap     += int'(trk_events[4]);
    n_rg_extra += int'(regen_events[0]);
    n_rg_skip  += int'(regen_events[1]);
    n_dm_extra += int'(demod_events[0]);
    n_dm_skip  += int'(demod_events[1]);
    n_trig     += int'(stage2_trigger);
    if (block_start) begin
      n_blocks++;
      bo_used[backoff_sel]++;
      if (noise_level != 0) nz_used++;
    end
  end

  // Configuration schedule, per block.
  always @(posedge clk) if (rst_n && block_start) begin
    case (n_blocks)
      20: backoff_sel <= 2'd1;
      28: backoff_sel <= 2'd2;
      36: backoff_sel <= 2'd3;
      44: begin noise_level <= 2'd1; nz_on  = sym[1]; end
      50: begin noise_level <= 2'd0; nz_off = sym[1]; end
      52: starve0 <= 1;
      default: ;
    endcase
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Bit comparison with a per-user offset found once.
  task automatic check_bits(input int k);
    int n = rbits[k].size();
    int best_off = -1, best_err = 1 << 30;
    int errs, nerr, nbits;
    if (n < 64) begin
      check(0, $sformatf("user %0d: only %0d bits read", k, n));
      return;
    end
    // Skip the first 32 bits (start-up), search the offset on 48 bits.
    for (int off = -32; off < MAXSYM - n; off++) begin
      int e = 0;
      for (int j = 32; j < 80; j++) begin
        int t = j + off;
        if (t < 1 || t >= MAXSYM) begin e = 999; break; end
        e += int'(rbits[k][j] != dbit[k][t]);
      end
      if (e < best_err) begin best_err = e; best_off = off; end
    end
    // Clean symbols must be error free (allowing 1%); symbols sent with
    // noise are counted separately with a looser limit.
    errs = 0;
    nerr = 0; nbits = 0;
    for (int j = 32; j < n; j++) begin
      int t = j + best_off;
      if (t >= nz_on - 2 && t <= nz_off + 2) begin
        nbits++;
        nerr += int'(rbits[k][j] != dbit[k][t]);
      end else if (t >= 1 && t < MAXSYM) errs += int'(rbits[k][j] != dbit[k][t]);
    end
    $display("user %0d: %0d bits read, offset %0d, %0d errors, %0d of %0d errors with noise",
             k, n, best_off, errs, nerr, nbits);
    check(errs * 100 < (n - 32 - nbits), $sformatf("user %0d bit errors %0d of %0d", k, errs, n - 32 - nbits));
    check(nbits > 0 && nerr * 4 < nbits, $sformatf("user %0d noisy bit errors %0d of %0d", k, nerr, nbits));
  endtask

  initial begin
    noise_level = 0; backoff_sel = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (n_blocks == BLOCKS);
    repeat (50) @(posedge clk);
    $display("events: lock %0d adj %0d acq %0d lost %0d wrap %0d rg_extra %0d rg_skip %0d dm_extra %0d dm_skip %0d trig %0d ovf %0d",
             n_lock, n_adj, n_acq, n_lost, n_wrap, n_rg_extra, n_rg_skip, n_dm_extra, n_dm_skip, n_trig, ovf_seen);
    for (int k = 0; k < K; k++) begin
      check(dut.u_acq.locked[k] == 1'b1, $sformatf("user %0d locked", k));
      check(dut.u_acq.acq[k] == 1'b1, $sformatf("user %0d acquired", k));
    end
    for (int k = 1; k < K; k++) check_bits(k);
    check(n_lock >= K, "lock events");
    check(n_acq >= K, "acquired events");
    check(n_adj > 0, "tracking adjustment seen");
    check(n_wrap > 0, "index wrap seen");
    check(n_rg_extra > 0, "regenerator boundary case 0->63 seen");
    check(n_rg_skip > 0, "regenerator boundary case 63->0 seen");
    check(n_dm_extra > 0, "demodulator boundary case 0->63 seen");
    check(n_dm_skip > 0, "demodulator boundary case 63->0 seen");
    check(n_trig >= BLOCKS - 3, "second-stage trigger every block");
    check(ovf_seen > 0, "FIFO overflow seen");
    for (int b = 0; b < 4; b++) check(bo_used[b] > 0, $sformatf("backoff %0d used", b));
    check(nz_used > 0, "noise used");
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
