// tb_mfc: several blocks of the same received data are sent once per user
// (four users, each with its own code, configuration word built from the
// code), as the Input module would: header, 63 initialisation words, 1024
// data words. Reference: with x the delay-line input sequence of a user's
// stream (the previous block's last 63 samples, zero after reset, followed
// by the 1024 new samples) the correlator value at position n is
//   T(n) = sum_{j=0..15} w_j * x(n - 4j),  w_j = +1 if PN bit j is 1, else -1
// (a positive full-scale 8192 saturates to 8191) and the output for data
// word m (n = m + 63) is floor((T(n) + T(n-1) + T(n-2) + T(n-3)) / 64),
// eight clocks after the input word. Initialisation words must come out
// invalid; header and idle words unchanged. Blocks with full-scale data
// reach the extremes of the tree.
module tb_mfc;
  import pic_pkg::*;
  localparam int K = 4, NB = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  stream_t in, out;
  mfc dut (.*);

  int checks = 0, failures = 0;
  typedef struct { int kind; stream_t w; int val; } exp_t;   // kind 0 pass, 1 init, 2 data
  exp_t expq [$];
  int n_data = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    #1;
    if (expq.size() >= MFC_LAT) begin
      exp_t e;
      e = expq.pop_front();
      case (e.kind)
        0: check(out == e.w, "word passes unchanged");
        1: check(!out.valid && !out.prog, "initialisation word invalid");
        default: begin
          check(out.valid && !out.prog && int'($signed(out.data)) == e.val,
                $sformatf("correlation %0d expected %0d", $signed(out.data), e.val));
          n_data++;
        end
      endcase
    end
  end

  task automatic drive(input stream_t w, input int kind, input int val);
    exp_t e;
    @(negedge clk);
    in = w;
    e.kind = kind; e.w = w; e.val = val;
    expq.push_back(e);
  endtask

  initial begin
    int prev [NB], cur [NB], x [NB + INIT_LEN], t [NB + INIT_LEN];
    logic [15:0] pn, cfg;
    stream_t w;
    int acc, z;
    in = '0;
    for (int n = 0; n < NB; n++) prev[n] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 5; blk++) begin
      for (int n = 0; n < NB; n++)
        cur[n] = (blk == 3) ? ((n % 128 < 64) ? -512 : 511) : int'($urandom % 1024) - 512;
      repeat (20) drive('0, 0, 0);
      for (int u = 0; u < K; u++) begin
        pn  = PN_TABLE[(blk + u) % 16];
        cfg = corr_config(pn);
        for (int i = 0; i < INIT_LEN; i++) x[i] = prev[NB - INIT_LEN + i];
        for (int n = 0; n < NB; n++) x[INIT_LEN + n] = cur[n];
        for (int n = 0; n < NB + INIT_LEN; n++) begin
          acc = 0;
          for (int j = 0; j < 16; j++)
            if (n - 4 * j >= 0) acc += pn[j] ? x[n - 4 * j] : -x[n - 4 * j];
          t[n] = (acc == 8192) ? 8191 : acc;
        end
        w = '0; w.prog = 1; w.valid = 1;
        w.data = {6'($urandom), 4'(u)};                    drive(w, 0, 0);
        w.data = {4'b0, 1'(u == K - 1), 1'b1, cfg[3:0]};   drive(w, 0, 0);
        w.data = cfg[13:4];                                drive(w, 0, 0);
        w.data = {8'b0, cfg[15:14]};                       drive(w, 0, 0);
        w.data = pn[15:6];                                 drive(w, 0, 0);
        w.data = {4'b0, pn[5:0]};                          drive(w, 0, 0);
        w = '0; w.valid = 1;
        for (int i = 0; i < INIT_LEN; i++) drive(w, 1, 0);
        for (int m = 0; m < NB; m++) begin
          int n;
          n = m + INIT_LEN;
          z = t[n] + t[n - 1] + t[n - 2] + t[n - 3];
          w = '0; w.valid = 1; w.data = sample_t'(cur[m]);
          drive(w, 2, z >>> 6);
        end
        repeat (10) drive('0, 0, 0);
      end
      for (int n = 0; n < NB; n++) prev[n] = cur[n];
    end
    repeat (10) drive('0, 0, 0);
    check(n_data == 5 * K * NB, $sformatf("outputs checked %0d", n_data));
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
