// combine: Combine module. Sums the regenerated signals of all acquired
// users, sample by sample, into the estimated received signal of a block.
//
// The running sum of the block lives in external SRAM (one 16-bit word per
// sample). For each data word n of a user's stream the module reads sum[n],
// adds the user's regenerated sample if the header says the user is
// acquired, and writes the result back (a two-cycle read-modify-write
// pipeline, COMB_LAT). The first user of a block (the user after the one
// flagged "last", or the first after reset) starts from zero instead of the
// stored sum. Only during the last user's stream are the data words marked
// valid at the output, carrying the complete sum saturated to ten bits;
// every other user's data words leave invalid. Programming words pass
// unchanged.
module combine
  import pic_pkg::*;
#(
  parameter int unsigned NB = 1024
) (
  input  logic    clk,
  input  logic    rst_n,
  input  stream_t in,
  output stream_t out
);

  localparam int unsigned BW = $clog2(NB);

  logic        is_data, is_prog, prog_en, proc_en;
  logic [2:0]  prog_idx;
  logic [10:0] data_idx;
  hdr_t        hdr;
  mod_state_t  state;

  stream_ctrl u_ctrl (
    .clk, .rst_n, .in, .state, .prog_en, .proc_en, .is_data, .is_prog,
    .prog_idx, .data_idx, .hdr
  );

  // first_user: the stream now passing is the first of its block.
  logic first_user;
  logic seen_last;

  // Pipeline stage 1 (SRAM read issued).
  stream_t       p1;
  logic          p1_data;
  logic [BW-1:0] p1_addr;
  logic          p1_first, p1_acq, p1_last;
  logic [15:0]   rdata;
  logic signed [15:0] sum;

  assign sum = (p1_first ? 16'sd0 : $signed(rdata)) + (p1_acq ? 16'(p1.data) : 16'sd0);

  ext_sram #(.DEPTH(NB), .WIDTH(16)) u_sram (
    .clk   (clk),
    .we    (p1_data),
    .waddr (p1_addr),
    .wdata (sum),
    .raddr (data_idx[BW-1:0]),
    .rdata (rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_user <= 1'b1;
      seen_last  <= 1'b1;
      p1         <= NULL_WORD;
      p1_data    <= 1'b0;
      p1_addr    <= '0;
      p1_first   <= 1'b0;
      p1_acq     <= 1'b0;
      p1_last    <= 1'b0;
      out        <= NULL_WORD;
    end else begin
      // A header after a last-user stream starts a new block.
      if (is_prog && prog_idx == 3'd0) first_user <= seen_last;
      if (is_prog && prog_idx == 3'd0) seen_last  <= 1'b0;
      if (is_data && hdr.last) seen_last <= 1'b1;

      p1       <= in;
      p1_data  <= is_data;
      p1_addr  <= data_idx[BW-1:0];
      p1_first <= first_user;
      p1_acq   <= hdr.acq;
      p1_last  <= hdr.last;

      out <= p1;
      if (p1_data) begin
        out.valid <= p1_last;
        out.data  <= sat10(32'(sum));
      end
    end
  end

endmodule
