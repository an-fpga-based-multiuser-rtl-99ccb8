// noise_gen: digital noise generator placed in front of an Input module to
// test the receiver under noise.
//
// Gaussian noise by the central limit theorem: four maximal-length LFSRs of
// 28, 29, 30 and 31 bits each supply ten-bit uniform numbers (the low ten
// bits of the register). The original generators run at twice the
// processing rate, so here each LFSR delivers two numbers per clock, giving
// eight per cycle and forty per sample at one sample every five cycles.
// Between two numbers an LFSR advances ten steps (a small XOR network per
// clock), so successive numbers of one generator share no bits and the sum
// has the spread of forty independent uniforms (sigma ~ 1868); with only
// one step per number, overlapping windows would make the spread about 60%
// larger than the generator statistics the design is meant to reproduce
// (standard deviations of about 107, 160 and 213 at levels 1 to 3, the
// upper two reduced by clipping). The numbers are summed in a 16-bit
// accumulator between samples; at each sample_stb the sum, less its mean
// (40 * 511.5 ~ 20460), is scaled by the selected level (0: 0,
// 1: 1/16 = 0.0625, 2: 3/32 = 0.0938, 3: 1/8 = 0.125), added to the input
// sample and the result saturated to ten bits. out and out_stb follow
// sample_stb by one cycle.
// LFSR feedback taps (28:25, 29:27, 30:6:4:1, 31:28) and seeds are this
// design's choice; the document gives only the register lengths.
module noise_gen
  import pic_pkg::*;
#(
  parameter logic [30:0] SEED = 31'h1234_5678
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample_stb,
  input  sample_t    in,
  input  logic [1:0] level,
  output sample_t    out,
  output logic       out_stb
);

  logic [27:0] r28;
  logic [28:0] r29;
  logic [29:0] r30;
  logic [30:0] r31;
  logic [15:0] acc;

  function automatic logic [27:0] st28(input logic [27:0] s);
    return {s[26:0], s[27] ^ s[24]};
  endfunction
  function automatic logic [28:0] st29(input logic [28:0] s);
    return {s[27:0], s[28] ^ s[26]};
  endfunction
  function automatic logic [29:0] st30(input logic [29:0] s);
    return {s[28:0], s[29] ^ s[5] ^ s[3] ^ s[0]};
  endfunction
  function automatic logic [30:0] st31(input logic [30:0] s);
    return {s[29:0], s[30] ^ s[27]};
  endfunction

  logic [27:0] a28, b28;
  logic [28:0] a29, b29;
  logic [29:0] a30, b30;
  logic [30:0] a31, b31;
  logic [15:0] step_sum;
  logic signed [15:0] gauss, scaled;

  always_comb begin
    a28 = r28; a29 = r29; a30 = r30; a31 = r31;
    for (int i = 0; i < 10; i++) begin
      a28 = st28(a28); a29 = st29(a29); a30 = st30(a30); a31 = st31(a31);
    end
    b28 = a28; b29 = a29; b30 = a30; b31 = a31;
    for (int i = 0; i < 10; i++) begin
      b28 = st28(b28); b29 = st29(b29); b30 = st30(b30); b31 = st31(b31);
    end
    step_sum = 16'(a28[9:0]) + 16'(b28[9:0]) + 16'(a29[9:0]) + 16'(b29[9:0])
             + 16'(a30[9:0]) + 16'(b30[9:0]) + 16'(a31[9:0]) + 16'(b31[9:0]);
    gauss = $signed(acc) - 16'sd20460;
    unique case (level)
      2'd0: scaled = '0;
      2'd1: scaled = gauss >>> 4;
      2'd2: scaled = (gauss >>> 4) + (gauss >>> 5);
      2'd3: scaled = gauss >>> 3;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r28     <= SEED[27:0] | 28'd1;
      r29     <= SEED[28:0] ^ 29'h0ABC_DEF1;
      r30     <= SEED[29:0] ^ 30'h1357_9BDF;
      r31     <= SEED ^ 31'h2468_ACE1;
      acc     <= '0;
      out     <= '0;
      out_stb <= 1'b0;
    end else begin
      r28 <= b28;
      r29 <= b29;
      r30 <= b30;
      r31 <= b31;
      out_stb <= sample_stb;
      if (sample_stb) begin
        out <= sat10(32'(in) + 32'(scaled));
        acc <= step_sum;
      end else begin
        acc <= acc + step_sum;
      end
    end
  end

endmodule
