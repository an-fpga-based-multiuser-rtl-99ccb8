// tb_input_module: random samples arrive one every five clocks; after each
// block of 1024 samples the module must send, for each of the four users,
// ten idle words, six header words, 63 valid zero words and the 1024
// samples of the block just completed, in order, then stay idle until the
// next block. The header is decoded field by field (user id, symbol index
// 0, acquired 0, last flag on user 3, PN word from the user's code) and the
// correlator configuration is checked functionally: an add/subtract tree
// driven by the configuration bits must give sum_j w_j * x_j, w_j = +1 or
// -1 from the PN word, for random tap values x. Also checks block_start
// and that no overrun is flagged.
module tb_input_module;
  import pic_pkg::*;
  localparam int K = 4, NB = 1024, SPS = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sample_stb, block_start, overrun;
  sample_t sample;
  stream_t out;
  input_module dut (.*);

  localparam logic [15:0] CODES [4] = '{16'h06F6, 16'h971C, 16'hB4CA, 16'h3B92};

  int checks = 0, failures = 0;
  int blk_samples [$];      // samples of the block being written
  int prev_block [NB];
  int nblocks = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Tree as configured: node = A + B when the bit is 1, A - B otherwise.
  function automatic int tree(input logic [15:0] cfg, input int x [16]);
    int s1 [8], s2 [4], s3 [2], s4;
    for (int i = 0; i < 8; i++) s1[i] = cfg[i] ? x[2*i] + x[2*i+1] : x[2*i] - x[2*i+1];
    for (int i = 0; i < 4; i++) s2[i] = cfg[8+i] ? s1[2*i] + s1[2*i+1] : s1[2*i] - s1[2*i+1];
    for (int i = 0; i < 2; i++) s3[i] = cfg[12+i] ? s2[2*i] + s2[2*i+1] : s2[2*i] - s2[2*i+1];
    s4 = cfg[14] ? s3[0] + s3[1] : s3[0] - s3[1];
    return cfg[15] ? -s4 : s4;
  endfunction

  // Sample source.
  initial begin
    sample_stb = 0; sample = '0;
    @(posedge rst_n);
    forever begin
      repeat (SPS - 1) @(negedge clk);
      @(negedge clk);
      sample = sample_t'(int'($urandom % 1024) - 512);
      sample_stb = 1;
      @(posedge clk);
      #1;
      blk_samples.push_back(int'(sample));
      @(negedge clk) sample_stb = 0;
    end
  end

  // Checker: after each block_start, collect one block period of output.
  initial begin
    stream_t w [$];
    logic [9:0] hw [6];
    logic [15:0] cfg, pn;
    int x [16];
    int idx, scnt;
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      if (block_start) begin
        #2;   // after the sample source has recorded this sample
        check(blk_samples.size() == NB, $sformatf("block_start after %0d samples", blk_samples.size()));
        for (int n = 0; n < NB; n++) prev_block[n] = blk_samples[n];
        blk_samples.delete();
        w.delete();
        for (int c = 0; c < NB * SPS - 2; c++) begin
          @(posedge clk); #1;
          w.push_back(out);
          check(!block_start, "block_start only once per block");
        end
        nblocks++;
        idx = 0;
        for (int u = 0; u < K; u++) begin
          for (int i = 0; i < PRE_LEN; i++, idx++)
            check(w[idx] == NULL_WORD, $sformatf("user %0d preamble word %0d", u, i));
          for (int i = 0; i < HDR_LEN; i++, idx++) begin
            check(w[idx].prog && w[idx].valid, "header word flags");
            hw[i] = w[idx].data;
          end
          check(hw[0] == {6'd0, 4'(u)}, $sformatf("user %0d id/index word %h", u, hw[0]));
          check(hw[1][9:4] == {4'b0, 1'(u == K - 1), 1'b0}, $sformatf("user %0d flags", u));
          check(hw[3][9:2] == 0 && hw[5][9:6] == 0, "unused header bits zero");
          cfg = {hw[3][1:0], hw[2], hw[1][3:0]};
          pn  = {hw[4], hw[5][5:0]};
          check(pn == CODES[u], $sformatf("user %0d PN %h", u, pn));
          for (int r = 0; r < 20; r++) begin
            int want;
            want = 0;
            for (int j = 0; j < 16; j++) begin
              x[j] = int'($urandom % 200) - 100;
              want += pn[j] ? x[j] : -x[j];
            end
            check(tree(cfg, x) == want, $sformatf("user %0d correlator configuration", u));
          end
          for (int i = 0; i < INIT_LEN; i++, idx++)
            check(w[idx].valid && !w[idx].prog && w[idx].data == 0, "initialisation word");
          for (int n = 0; n < NB; n++, idx++)
            check(w[idx].valid && !w[idx].prog && int'(w[idx].data) == prev_block[n],
                  $sformatf("user %0d sample %0d", u, n));
        end
        while (idx < w.size()) begin
          check(w[idx] == NULL_WORD, "idle after the last user");
          idx++;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (6 * NB * SPS + 100) @(posedge clk);
    check(nblocks >= 4, "blocks checked");
    check(!overrun, "no overrun");
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
