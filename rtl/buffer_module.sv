// buffer_module: Buffer module at the head of the second stage. Works like
// the Input module but takes a stream instead of continuous samples.
//
// Input process: each user's programming header (as updated by the
// acquisition/tracking module) is stored in an internal header memory
// addressed by user ID; the valid data words (the revised signal, present
// only in the last user's stream) are written to the WRITE bank of a
// double-buffered external SRAM.
// Synchronisation: when the first user's header of a block arrives (the
// first header after a last-user stream, or after reset) the READ and WRITE
// banks of both memories swap and the output process starts.
// Output process: for each of the K users in turn, PRE_LEN invalid preamble
// words, that user's six header words from the header memory, INIT_LEN
// valid filter-initialisation words (zero payload) and the NB words of the
// READ bank. Null words follow until the next trigger; a trigger during
// output restarts it and sets the sticky overrun flag.
// Keeping the header memory double-buffered (so each block of revised data
// leaves with the headers it was produced under) is this design's choice.
module buffer_module
  import pic_pkg::*;
#(
  parameter int unsigned K  = 4,
  parameter int unsigned NB = 1024
) (
  input  logic    clk,
  input  logic    rst_n,
  input  stream_t in,
  output stream_t out,
  output logic    trigger,
  output logic    overrun
);

  localparam int unsigned BW = $clog2(NB);
  localparam int unsigned UW = (K > 1) ? $clog2(K) : 1;

  typedef enum logic [2:0] {OP_IDLE, OP_PRE, OP_HDR, OP_INIT, OP_DATA} phase_t;

  logic        is_data, is_prog, prog_en, proc_en;
  logic [2:0]  prog_idx;
  logic [10:0] data_idx;
  hdr_t        hdr;
  mod_state_t  state;

  stream_ctrl u_ctrl (
    .clk, .rst_n, .in, .state, .prog_en, .proc_en, .is_data, .is_prog,
    .prog_idx, .data_idx, .hdr
  );

  // ---------------- input process ----------------
  logic          wbank;          // WRITE bank (data and headers)
  logic          seen_last;
  logic [UW-1:0] cur;
  logic [DW-1:0] hmem [2 * K * 8];
  logic          hbank;

  assign trigger = is_prog && (prog_idx == 3'd0) && seen_last;
  assign hbank   = trigger ? ~wbank : wbank;

  logic [UW-1:0] wuid;
  assign wuid = (prog_idx == 3'd0) ? in.data[UW-1:0] : cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank     <= 1'b0;
      seen_last <= 1'b1;
      cur       <= '0;
      for (int i = 0; i < 2 * K * 8; i++) hmem[i] <= '0;
    end else begin
      if (trigger) wbank <= ~wbank;
      if (is_prog) begin
        if (prog_idx == 3'd0) begin
          cur       <= in.data[UW-1:0];
          seen_last <= 1'b0;
        end
        hmem[{hbank, wuid, prog_idx}] <= in.data;
      end
      if (is_data && hdr.last) seen_last <= 1'b1;
    end
  end

  // ---------------- output process ----------------
  phase_t        phase;
  logic [UW-1:0] user;
  logic [10:0]   cnt;
  logic          rbank;
  stream_t       desc_q;
  logic          from_ram_q;
  logic [DW-1:0] rdata;

  ext_sram #(.DEPTH(2 * NB), .WIDTH(DW)) u_sram (
    .clk   (clk),
    .we    (is_data && hdr.last),
    .waddr ({wbank, data_idx[BW-1:0]}),
    .wdata (in.data),
    .raddr ({rbank, cnt[BW-1:0]}),
    .rdata (rdata)
  );

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
      if (trigger) begin
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
            desc_q.data  <= hmem[{rbank, user, cnt[2:0]}];
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
