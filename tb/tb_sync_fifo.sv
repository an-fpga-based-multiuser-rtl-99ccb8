// tb_sync_fifo: random push/pop traffic against a queue model, with phases
// that fill the FIFO to the top (so pushes are dropped and flagged) and
// drain it to empty. Checks dout, empty, full and ovf every cycle.
module tb_sync_fifo;
  localparam int DEPTH = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, empty, full, ovf;
  logic [15:0] din, dout;
  sync_fifo dut (.*);

  logic [15:0] q [$];
  int checks = 0, failures = 0;
  int n_ovf = 0, n_full = 0;
  bit exp_ovf;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 30000; i++) begin
      int phase;
      phase = (i / 2000) % 3;   // 0 fill, 1 balanced, 2 drain
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      if (q.size() != 0) check(dout == q[0], $sformatf("dout %h expected %h", dout, q[0]));
      push = ($urandom % 4) < (phase == 0 ? 3 : phase == 1 ? 2 : 1);
      pop  = ($urandom % 4) < (phase == 0 ? 1 : phase == 1 ? 2 : 3);
      din  = 16'($urandom);
      exp_ovf = 0;
      if (pop && q.size() != 0) begin
        void'(q.pop_front());
        if (push) q.push_back(din);
      end else if (push) begin
        if (q.size() < DEPTH) q.push_back(din);
        else exp_ovf = 1;
      end
      if (q.size() == DEPTH) n_full++;
      @(posedge clk); #1;
      check(ovf == exp_ovf, "ovf flag");
      n_ovf += int'(exp_ovf);
    end
    check(n_ovf > 0, "overflow exercised");
    check(n_full > 0, "full exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
