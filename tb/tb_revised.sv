// tb_revised: the estimated stream (headers, valid data words, idle words)
// and an aligned actual stream (a valid word wherever the estimate has a
// data word) drive the Revised module while the backoff factor changes
// between blocks. The reference keeps the actual samples seen on estimated
// data words; for the n-th such word it takes r = actual sample n-63 (zero
// before that), e = r - estimate and predicts
//   out = sat10(r + c * e), c = 0, 1/2, 3/4, 1 (each term rounded down),
// four clocks later. Other words must come out unchanged.
module tb_revised;
  import pic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  stream_t est, act, out;
  logic [1:0] backoff_sel;
  revised dut (.*);

  int checks = 0, failures = 0;
  int act_hist [$];
  typedef struct { bit is_data; stream_t w; int val; } exp_t;
  exp_t expq [$];
  int bo_cnt [4];
  int n_sat = 0;

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

  function automatic int fdiv(input int v, input int sh);   // floor(v / 2^sh)
    return (v >= 0) ? v / (1 << sh) : -((-v + (1 << sh) - 1) / (1 << sh));
  endfunction

  always @(posedge clk) if (rst_n) begin
    #1;
    if (expq.size() >= REV_LAT) begin
      exp_t e;
      e = expq.pop_front();
      if (e.is_data) begin
        check(out.valid && !out.prog && int'(out.data) == e.val,
              $sformatf("revised %0d expected %0d", out.data, e.val));
      end else begin
        check(out == e.w, "non-data word passes unchanged");
      end
    end
  end

  task automatic drive(input stream_t we, input stream_t wa, input exp_t e);
    @(negedge clk);
    est = we; act = wa;
    e.w = we;
    expq.push_back(e);
  endtask

  initial begin
    stream_t we, wa;
    int r, x, c, v, err;
    est = '0; act = '0; backoff_sel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 16; blk++) begin
      // Change the factor only while the pipeline holds no data.
      repeat (6) drive('0, '0, '{default: 0});
      @(negedge clk) backoff_sel = 2'(blk % 4);
      for (int k = 0; k < 6; k++) begin
        we = '0; we.prog = 1; we.valid = 1; we.data = 10'($urandom);
        drive(we, stream_t'(16'($urandom)), '{default: 0});
      end
      for (int n = 0; n < 300; n++) begin
        if ($urandom % 10 == 0) drive('0, '0, '{default: 0});
        we = '0; we.valid = 1;
        wa = '0; wa.valid = 1;
        x = (blk >= 12) ? int'($urandom % 1024) - 512 : int'($urandom % 401) - 200;
        we.data = sample_t'(x);
        wa.data = sample_t'(int'($urandom % 1024) - 512);
        act_hist.push_back(int'($signed(wa.data)));
        r = (act_hist.size() > 63) ? act_hist[act_hist.size() - 64] : 0;
        err = r - x;
        case (blk % 4)
          0: c = 0;
          1: c = fdiv(err, 1);
          2: c = fdiv(err, 1) + fdiv(err, 2);
          default: c = err;
        endcase
        v = r + c;
        if (v > 511 || v < -512) n_sat++;
        bo_cnt[blk % 4]++;
        begin
          exp_t ex;
          ex = '{default: 0};
          ex.is_data = 1; ex.val = sat(v);
          drive(we, wa, ex);
        end
      end
    end
    repeat (8) drive('0, '0, '{default: 0});
    check(n_sat > 0, "saturation exercised");
    for (int b = 0; b < 4; b++) check(bo_cnt[b] > 0, $sformatf("backoff %0d exercised", b));
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
