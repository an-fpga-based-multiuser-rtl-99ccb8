// tb_ext_sram: random writes and reads against an array model.
// Checks the one-cycle read latency and that a read of the address being
// written in the same cycle returns the old contents.
module tb_ext_sram;
  localparam int DEPTH = 2048, WIDTH = 16, AW = 11;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [AW-1:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  ext_sram dut (.*);

  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] expect_q;
  int checks = 0, failures = 0;

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // Fill every word so nothing unwritten is ever read.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = 16'($urandom);
      model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = AW'($urandom);
      wdata = 16'($urandom);
      raddr = (i % 4 == 0) ? waddr : AW'($urandom);
      expect_q = model[raddr];          // old value on a collision
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %0d got %h expected %h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
