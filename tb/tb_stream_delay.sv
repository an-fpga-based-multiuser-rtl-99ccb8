// tb_stream_delay: random stream words in, each must come out exactly
// DELAY (12) clocks later; words that would come from before reset must
// read as null words.
module tb_stream_delay;
  import pic_pkg::*;
  localparam int D = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  stream_t in, out;
  stream_delay dut (.*);

  stream_t hist [$];
  int checks = 0, failures = 0;

  initial begin
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      in = stream_t'(16'($urandom));
      hist.push_back(in);
      @(posedge clk); #1;
      checks++;
      // After this edge the output holds the word applied D edges ago: a
      // single register (D = 1) would show the word applied just now.
      if (i >= D - 1) begin
        if (out !== hist[i - D + 1]) begin
          failures++;
          if (failures < 10) $display("FAIL: i=%0d got %h expected %h", i, out, hist[i - D + 1]);
        end
      end else if (out !== NULL_WORD) begin
        failures++;
        $display("FAIL: i=%0d not null after reset: %h", i, out);
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
