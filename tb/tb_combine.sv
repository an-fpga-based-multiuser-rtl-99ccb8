// tb_combine: blocks of 2 to 4 user streams (random acquisition flags, the
// last user flagged in its header, random ten-bit data, idle words mixed in)
// go through the combiner. A per-index reference sum over the users whose
// acquired flag is set predicts the output: two clocks after each input
// word, header and idle words come out unchanged, data words of non-last
// users come out invalid, and data words of the last user come out valid
// carrying the saturated sum for that index.
module tb_combine;
  import pic_pkg::*;
  localparam int NB = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  stream_t in, out;
  combine dut (.*);

  int checks = 0, failures = 0;
  int ref_sum [NB];
  // Expected output per input word.
  typedef struct { bit is_data; bit last; stream_t w; int val; } exp_t;
  exp_t expq [$];
  int n_valid = 0, n_sat = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int sat(input int v);
    return v > 511 ? 511 : v < -512 ? -512 : v;
  endfunction

  task automatic drive(input stream_t w, input exp_t e);
    @(negedge clk);
    in = w;
    e.w = w;
    expq.push_back(e);
  endtask

  // Output checker: the output is two words behind the input.
  always @(posedge clk) if (rst_n) begin
    #1;
    if (expq.size() >= COMB_LAT) begin
      exp_t e;
      e = expq.pop_front();
      if (e.is_data) begin
        check(out.valid == e.last && !out.prog, "data word valid flag");
        if (e.last) begin
          check(int'(out.data) == sat(e.val),
                $sformatf("combined value %0d expected %0d", out.data, sat(e.val)));
          n_valid++;
          if (e.val > 511 || e.val < -512) n_sat++;
        end
      end else begin
        check(out == e.w, "non-data word passes unchanged");
      end
    end
  end

  initial begin
    stream_t w;
    exp_t e;
    int nusers;
    bit acq, big;
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 8; blk++) begin
      nusers = 2 + $urandom % 3;
      big = (blk % 2 == 1);          // large samples to reach saturation
      for (int n = 0; n < NB; n++) ref_sum[n] = 0;
      for (int u = 0; u < nusers; u++) begin
        acq = (u == 0) ? 1'b1 : 1'($urandom);
        for (int k = 0; k < 6; k++) begin
          w = '0; w.prog = 1; w.valid = 1;
          w.data = (k == 0) ? {6'($urandom), 4'(u)} :
                   (k == 1) ? {4'b0, 1'(u == nusers - 1), acq, 4'($urandom)} : 10'($urandom);
          e = '{default: 0};
          drive(w, e);
        end
        for (int n = 0; n < NB; n++) begin
          if ($urandom % 8 == 0) begin
            w = '0;
            e = '{default: 0};
            drive(w, e);
          end
          w = '0; w.valid = 1;
          w.data = big ? sample_t'(($urandom % 2) ? 400 + $urandom % 112 : -400 - $urandom % 113)
                       : sample_t'(int'($urandom % 257) - 128);
          if (acq) ref_sum[n] += int'($signed(w.data));
          e = '{default: 0};
          e.is_data = 1; e.last = (u == nusers - 1); e.val = ref_sum[n];
          drive(w, e);
        end
        repeat (3) begin
          e = '{default: 0};
          drive('0, e);
        end
      end
    end
    repeat (5) @(posedge clk);
    check(n_valid == 8 * NB, $sformatf("valid outputs %0d", n_valid));
    check(n_sat > 0, "saturation exercised");
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
