// input_module: front of the I (or Q) processing pipeline. Turns the
// continuous low-rate sample stream from the downconverter into per-user
// streams at the processing rate.
//
// Two concurrent processes share a double-buffered external SRAM:
//  * write: every sample_stb the ten-bit sample is written to the WRITE bank;
//    after NB samples the banks swap and block_start pulses.
//  * read: on block_start the previous block is sent K times, once per user.
//    Each user's stream is PRE_LEN invalid preamble words, the six-word
//    programming header of that user (from an internal ROM, see
//    pic_pkg::rom_header), INIT_LEN valid filter-initialisation words (zero
//    payload: the correlators refresh their delay lines from their own
//    memory) and the NB samples of the block. Null words follow until the
//    next block.
// With NB=1024, K=4 and one sample every five clocks (2 MHz samples, 10 MHz
// clock) a block lasts 5120 cycles, of which 4*1103 = 4412 carry streams.
// If a new block arrives before all K streams are out, the read process
// restarts and the sticky overrun flag is set.
// The ROM content layout follows the document; the PN codes are this
// design's choice (pic_pkg::PN_TABLE).
module input_module
  import pic_pkg::*;
#(
  parameter int unsigned K  = 4,
  parameter int unsigned NB = 1024
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sample_stb,
  input  sample_t sample,
  output stream_t out,
  output logic    block_start,
  output logic    overrun
);

  localparam int unsigned BW = $clog2(NB);
  localparam int unsigned UW = (K > 1) ? $clog2(K) : 1;

  typedef enum logic [2:0] {OP_IDLE, OP_PRE, OP_HDR, OP_INIT, OP_DATA} phase_t;

  // Write process.
  logic          wbank;
  logic [BW-1:0] wcnt;
  logic          rbank;

  // Read process.
  phase_t        phase;
  logic [UW-1:0] user;
  logic [10:0]   cnt;

  // Descriptor of the word being read (registered, aligned with SRAM data).
  stream_t       desc_q;
  logic          from_ram_q;
  logic [DW-1:0] rdata;

  ext_sram #(.DEPTH(2 * NB), .WIDTH(DW)) u_sram (
    .clk   (clk),
    .we    (sample_stb),
    .waddr ({wbank, wcnt}),
    .wdata (sample),
    .raddr ({rbank, cnt[BW-1:0]}),
    .rdata (rdata)
  );

  assign block_start = sample_stb && (wcnt == BW'(NB - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank <= 1'b0;
      wcnt  <= '0;
    end else if (sample_stb) begin
      wcnt <= (wcnt == BW'(NB - 1)) ? '0 : wcnt + 1'b1;
      if (wcnt == BW'(NB - 1)) wbank <= ~wbank;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= OP_IDLE;
      user       <= '0;
      cnt        <= '0;
      rbank      <= 1'b1;
      overrun    <= 1'b0;
      desc_q     <= NULL_WORD;
      from_ram_q <= 1'b0;
    end else begin
      desc_q     <= NULL_WORD;
      from_ram_q <= 1'b0;
      if (block_start) begin
        if (phase != OP_IDLE) overrun <= 1'b1;
        rbank <= wbank;
        phase <= OP_PRE;
        user  <= '0;
        cnt   <= '0;
      end else begin
        unique case (phase)
          OP_IDLE: ;
          OP_PRE: begin
            cnt <= cnt + 1'b1;
            if (cnt == 11'(PRE_LEN - 1)) begin
              phase <= OP_HDR;
              cnt   <= '0;
            end
          end
          OP_HDR: begin
            desc_q.prog  <= 1'b1;
            desc_q.valid <= 1'b1;
            desc_q.data  <= hdr_word(rom_header(int'(user), K), int'(cnt));
            cnt <= cnt + 1'b1;
            if (cnt == 11'(HDR_LEN - 1)) begin
              phase <= OP_INIT;
              cnt   <= '0;
            end
          end
          OP_INIT: begin
            desc_q.valid <= 1'b1;
            cnt <= cnt + 1'b1;
            if (cnt == 11'(INIT_LEN - 1)) begin
              phase <= OP_DATA;
              cnt   <= '0;
            end
          end
          OP_DATA: begin
            desc_q.valid <= 1'b1;
            from_ram_q   <= 1'b1;
            cnt <= cnt + 1'b1;
            if (cnt == 11'(NB - 1)) begin
              cnt <= '0;
              if (user == UW'(K - 1)) begin
                phase <= OP_IDLE;
                user  <= '0;
              end else begin
                phase <= OP_PRE;
                user  <= user + 1'b1;
              end
            end
          end
          default: phase <= OP_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    out = desc_q;
    if (from_ram_q) out.data = sample_t'(rdata);
  end

endmodule
