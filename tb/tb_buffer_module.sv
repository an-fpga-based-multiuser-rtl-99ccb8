// tb_buffer_module: feeds blocks shaped like the Revised output (for each
// of four users: a header with random fields, 63 idle words where the
// initialisation words were, then 1024 data words that are valid only for
// the last user) and checks the stream sent after the next block's first
// header word: for each user, ten idle words, that user's six header words
// as received in the previous block, 63 valid zero words and the last
// user's 1024 data words of the previous block. Also checks the trigger
// (once per block, on the first header word) and that no overrun occurs.
module tb_buffer_module;
  import pic_pkg::*;
  localparam int K = 4, NB = 1024, PERIOD = 5120;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  stream_t in, out;
  logic trigger, overrun;
  buffer_module dut (.*);

  int checks = 0, failures = 0;
  logic [9:0] hdrs [2][K][6];     // headers per block parity
  int data [2][NB];               // last user's data per block parity
  int blk = 0, ntrig = 0, nchecked = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Stream source: one block every PERIOD clocks.
  initial begin
    int t;
    in = '0;
    @(posedge rst_n);
    for (blk = 0; blk < 7; blk++) begin
      t = 0;
      for (int u = 0; u < K; u++) begin
        hdrs[blk % 2][u][0] = {6'($urandom), 4'(u)};
        hdrs[blk % 2][u][1] = {4'b0, 1'(u == K - 1), 1'($urandom), 4'($urandom)};
        for (int k = 2; k < 6; k++) hdrs[blk % 2][u][k] = 10'($urandom);
        for (int k = 0; k < 6; k++) begin
          @(negedge clk); t++;
          in = '0; in.prog = 1; in.valid = 1; in.data = hdrs[blk % 2][u][k];
        end
        repeat (INIT_LEN) begin
          @(negedge clk); t++;
          in = '0; in.data = 10'($urandom);
        end
        for (int n = 0; n < NB; n++) begin
          @(negedge clk); t++;
          in = '0; in.valid = (u == K - 1); in.data = 10'($urandom);
          if (u == K - 1) data[blk % 2][n] = int'($signed(in.data));
        end
        repeat (10) begin
          @(negedge clk); t++;
          in = '0;
        end
      end
      while (t < PERIOD) begin
        @(negedge clk); t++;
        in = '0;
      end
    end
  end

  // Checker: after each trigger (except the first) the previous block must
  // come out.
  initial begin
    stream_t w [$];
    int pb, idx;
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      if (trigger) begin
        #1;
        ntrig++;
        check(in.prog && in.data[3:0] == 4'd0, "trigger on user 0's first header word");
        pb = (blk + 1) % 2;             // parity of the block now buffered
        w.delete();
        for (int c = 0; c < K * (PRE_LEN + HDR_LEN + INIT_LEN + NB) + 20; c++) begin
          @(posedge clk); #1;
          w.push_back(out);
        end
        if (ntrig > 1) begin
          idx = 0;
          nchecked++;
          for (int u = 0; u < K; u++) begin
            for (int i = 0; i < PRE_LEN; i++, idx++)
              check(w[idx] == NULL_WORD, $sformatf("user %0d preamble", u));
            for (int i = 0; i < HDR_LEN; i++, idx++)
              check(w[idx].prog && w[idx].valid && w[idx].data == hdrs[pb][u][i],
                    $sformatf("user %0d header word %0d: %h expected %h", u, i, w[idx].data, hdrs[pb][u][i]));
            for (int i = 0; i < INIT_LEN; i++, idx++)
              check(w[idx].valid && !w[idx].prog && w[idx].data == 0, "initialisation word");
            for (int n = 0; n < NB; n++, idx++)
              check(w[idx].valid && !w[idx].prog && int'(w[idx].data) == data[pb][n],
                    $sformatf("user %0d sample %0d", u, n));
          end
          while (idx < w.size()) begin
            check(w[idx] == NULL_WORD, "idle after the last user");
            idx++;
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (7 * PERIOD + 10) @(posedge clk);
    check(ntrig == 7, $sformatf("triggers %0d", ntrig));
    check(nchecked >= 5, "blocks checked");
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
