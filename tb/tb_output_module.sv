// tb_output_module: sends blocks of demodulated bits for four users (a
// header then 64 decision words per user, with idle words mixed in) and
// models the packing: the decision bit is the sign bit of the data field,
// sixteen bits per word, the oldest bit in bit 15. Between blocks a host
// model reads the status register and every FIFO and compares the words.
// User 1 is left unread for a while so its FIFO fills and overflows; the
// test checks the full flag, the sticky overflow flag, that a status read
// clears it, and that the words kept are the oldest ones.
module tb_output_module;
  import pic_pkg::*;
  localparam int K = 4, DEPTH = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  stream_t in;
  logic [1:0] host_sel;
  logic host_rd_data, host_rd_status;
  logic [15:0] host_data, host_status;
  output_module dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] q [K][$];
  int nbits [K];
  logic [15:0] acc [K];
  bit dropped [K];
  int n_ovf = 0, n_full = 0, n_words = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic word(input logic p, input logic v, input logic [9:0] d);
    @(negedge clk);
    in = '0; in.prog = p; in.valid = v; in.data = d;
    @(posedge clk);
  endtask

  task automatic send_user(input int u);
    word(1, 1, {6'($urandom), 4'(u)});
    word(1, 1, {4'b0, 1'(u == K - 1), 1'b1, 4'($urandom)});
    repeat (4) word(1, 1, 10'($urandom));
    for (int s = 0; s < 64; s++) begin
      logic [9:0] d;
      d = 10'($urandom);
      if ($urandom % 4 == 0) word(0, 0, 10'($urandom));   // idle word
      word(0, 1, d);
      acc[u] = {acc[u][14:0], d[9]};
      nbits[u]++;
      if (nbits[u] % 16 == 0) begin
        if (q[u].size() < DEPTH) q[u].push_back(acc[u]);
        else dropped[u] = 1;
      end
    end
    word(0, 0, '0);
  endtask

  task automatic host_read(input int u);
    @(negedge clk);
    host_sel = 2'(u);
    #1;
    check(host_status[u] == (q[u].size() == 0), $sformatf("empty flag user %0d", u));
    check(host_status[4 + u] == (q[u].size() == DEPTH), $sformatf("full flag user %0d", u));
    if (q[u].size() != 0) begin
      check(host_data == q[u][0], $sformatf("user %0d word %h expected %h", u, host_data, q[u][0]));
      void'(q[u].pop_front());
      n_words++;
      host_rd_data = 1;
      @(negedge clk);
      host_rd_data = 0;
    end
  endtask

  initial begin
    in = '0; host_sel = 0; host_rd_data = 0; host_rd_status = 0;
    for (int u = 0; u < K; u++) begin nbits[u] = 0; acc[u] = 0; dropped[u] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 60; blk++) begin
      for (int u = 0; u < K; u++) send_user(u);
      repeat (3) @(posedge clk);
      // Overflow flag: set only for a user that lost a word.
      for (int u = 0; u < K; u++)
        check(host_status[8 + u] == dropped[u], $sformatf("overflow flag user %0d", u));
      if (dropped[1]) begin
        n_ovf++;
        check(host_status[5], "user 1 full");
        n_full++;
        @(negedge clk) host_rd_status = 1;
        @(negedge clk) host_rd_status = 0;
        check(host_status[9] == 0, "overflow flag cleared by status read");
        dropped[1] = 0;
      end
      // Read everything except user 1 during blocks 10..49.
      for (int u = 0; u < K; u++)
        if (!(u == 1 && blk >= 10 && blk < 50))
          while (q[u].size() != 0) host_read(u);
      for (int u = 0; u < K; u++)
        if (!(u == 1 && blk >= 10 && blk < 50)) host_read(u);   // now empty
    end
    check(n_ovf > 0 && n_full > 0, "overflow exercised");
    check(n_words > 800, $sformatf("words read: %0d", n_words));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
