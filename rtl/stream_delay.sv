// stream_delay: RAM-based fixed delay for a stream, used to line the actual
// received-signal stream up with the estimated received-signal stream in
// front of the Revised module.
//
// A circular buffer of DELAY-1 words plus an output register: each cycle the
// oldest word is read out and the new word written in its place, so the
// output is the input of exactly DELAY cycles earlier (DELAY >= 2). Every
// word is delayed, whatever its PROG and VALID bits. The buffer is cleared
// at reset so that nothing stale leaves it.
module stream_delay
  import pic_pkg::*;
#(
  parameter int unsigned DELAY = EST_PATH_LAT
) (
  input  logic    clk,
  input  logic    rst_n,
  input  stream_t in,
  output stream_t out
);

  localparam int unsigned DEPTH = DELAY - 1;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  stream_t       mem [DEPTH];
  logic [AW-1:0] ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
      out <= NULL_WORD;
      for (int i = 0; i < DEPTH; i++) mem[i] <= NULL_WORD;
    end else begin
      out      <= mem[ptr];
      mem[ptr] <= in;
      ptr      <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
    end
  end

endmodule
