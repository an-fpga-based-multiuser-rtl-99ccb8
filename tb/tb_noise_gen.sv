// tb_noise_gen: checks the noise generator two ways.
// 1. Exact: a bit-serial model of the four LFSRs (28, 29, 30 and 31 bits,
//    each advanced ten steps per uniform number and giving two numbers per
//    clock, low ten bits of the state taken as the number) builds the same sum of 40 uniforms per sample and
//    predicts every output: sat10(in + scaled(level, sum - 20460)).
// 2. Statistical: the mean of (out - in) must be near zero for each level,
//    and its spread must match that of a sum of forty independent ten-bit
//    uniform numbers (sigma = 1868) scaled by 0, 1/16, 3/32 and 1/8; at the
//    two higher levels clipping at full scale reduces the spread.
// Inputs are random, including values near full scale to check saturation.
module tb_noise_gen;
  import pic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sample_stb, out_stb;
  sample_t in, out;
  logic [1:0] level;
  localparam logic [30:0] SEED = 31'h1234_5678;
  noise_gen dut (.*);

  int checks = 0, failures = 0;

  // Reference LFSRs: shift left, feedback into bit 0.
  logic [27:0] m28; logic [28:0] m29; logic [29:0] m30; logic [30:0] m31;
  int unsigned msum;

  function automatic int unsigned u10(input logic [30:0] s);
    return int'(s[9:0]);
  endfunction

  task automatic model_clock(input bit stb);
    int unsigned st = 0;
    for (int r = 0; r < 2; r++) begin
      repeat (10) begin
        m28 = {m28[26:0], m28[27] ^ m28[24]};
        m29 = {m29[27:0], m29[28] ^ m29[26]};
        m30 = {m30[28:0], m30[29] ^ m30[5] ^ m30[3] ^ m30[0]};
        m31 = {m31[29:0], m31[30] ^ m31[27]};
      end
      st += u10(31'(m28)) + u10(31'(m29)) + u10(31'(m30)) + u10(m31);
    end
    msum = stb ? st : msum + st;
  endtask

  function automatic int scale(input int g, input logic [1:0] l);
    case (l)
      2'd0: return 0;
      2'd1: return g >>> 4;
      2'd2: return (g >>> 4) + (g >>> 5);
      default: return g >>> 3;
    endcase
  endfunction

  function automatic int sat(input int v);
    return v > 511 ? 511 : v < -512 ? -512 : v;
  endfunction

  longint s1 [4], s2 [4];
  int  n  [4];
  int  n_sat = 0;

  initial begin
    int expect_v, g, x;
    bit first;
    sample_stb = 0; in = '0; level = 0;
    m28 = SEED[27:0] | 28'd1;
    m29 = SEED[28:0] ^ 29'h0ABC_DEF1;
    m30 = SEED[29:0] ^ 30'h1357_9BDF;
    m31 = SEED ^ 31'h2468_ACE1;
    msum = 0;
    first = 1;
    repeat (2) @(posedge clk);
    for (int l = 0; l < 4; l++) begin s1[l] = 0; s2[l] = 0; n[l] = 0; end
    @(negedge clk) rst_n = 1;
    @(posedge clk) model_clock(1'b0);   // first clock after reset
    for (int i = 0; i < 40000; i++) begin
      if (i % 500 == 0) level = 2'(i / 500);
      for (int c = 0; c < 5; c++) begin
        @(negedge clk);
        sample_stb = (c == 4);
        if (sample_stb) begin
          x  = (i % 7 == 0) ? ((i & 8) ? 500 : -505) : int'($urandom % 301) - 150;
          in = sample_t'(x);
          g  = int'(msum) - 20460;
          expect_v = sat(x + scale(g, level));
        end
        @(posedge clk);
        model_clock(sample_stb);
        #1;
        if (c != 4 && out_stb) begin
          failures++;
          $display("FAIL: out_stb without a sample");
        end
        if (c == 4) begin
          checks++;
          if (!out_stb) begin failures++; $display("FAIL: out_stb missing"); end
          // The first sample has a partial sum; skip it.
          if (!first && int'(out) != expect_v) begin
            failures++;
            if (failures < 10) $display("FAIL: sample %0d level %0d in %0d out %0d expected %0d",
                                        i, level, x, out, expect_v);
          end
          if (!first && i % 7 != 0) begin
            s1[level] += longint'(int'(out) - x);
            s2[level] += longint'((int'(out) - x) * (int'(out) - x));
            n[level]++;
          end
          if (int'(out) == 511 || int'(out) == -512) n_sat++;
          first = 0;
        end
      end
    end
    begin
      // Expected spread of the sum: forty independent uniform numbers on
      // 0..1023, var = 40 * (1024^2 - 1) / 12.
      real sd_sum, sd_l [4];
      sd_sum = $sqrt(40.0 * (1024.0 * 1024.0 - 1.0) / 12.0);
      for (int l = 0; l < 4; l++) begin
        real mean;
        mean = real'(s1[l]) / real'(n[l]);
        sd_l[l] = $sqrt(real'(s2[l]) / real'(n[l]) - mean * mean);
        $display("level %0d: n %0d mean %f sd %f", l, n[l], mean, sd_l[l]);
        checks++;
        // Within three standard errors, plus one for the flooring shifts.
        if (!(mean <= 3.0 * sd_l[l] / $sqrt(real'(n[l])) + 1.0 &&
              mean >= -3.0 * sd_l[l] / $sqrt(real'(n[l])) - 1.0)) begin
          failures++;
          $display("FAIL: level %0d mean", l);
        end
      end
      $display("unclipped sd expected: %f %f %f", sd_sum / 16.0, sd_sum * 3.0 / 32.0, sd_sum / 8.0);
      checks += 3;
      if (sd_l[0] != 0.0) begin failures++; $display("FAIL: level 0 adds noise"); end
      // Level 1 is rarely clipped: within 5% of the expected value.
      if (!(sd_l[1] > sd_sum / 16.0 * 0.95 && sd_l[1] < sd_sum / 16.0 * 1.05)) begin
        failures++; $display("FAIL: level 1 spread");
      end
      // Levels 2 and 3 are clipped at full scale: larger than the level
      // below, smaller than the unclipped value.
      if (!(sd_l[2] > sd_l[1] * 1.2 && sd_l[2] < sd_sum * 3.0 / 32.0 * 1.02 &&
            sd_l[3] > sd_l[2] && sd_l[3] < sd_sum / 8.0 * 1.02)) begin
        failures++; $display("FAIL: level 2/3 spread");
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never reached"); end
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
