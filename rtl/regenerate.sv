// regenerate: Regenerate module. Rebuilds the current user's spread signal
// from its sampled amplitude estimate, on the I or Q branch.
//
// From the header it uses the user ID, sample index, acquired bit and PN
// code. A window counter (the data position modulo 64) is compared with the
// sample index; on a match the input sample (the correlator output at the
// symbol peak, i.e. the amplitude estimate) is latched and the user's chip
// counter restarts at 0. Otherwise the chip counter advances modulo 64. The
// upper four bits of the chip counter select a chip of the PN code, and the
// output is +amplitude or -amplitude accordingly; it is zero while the user
// is not acquired. Amplitude, chip counter and the last sample index are
// stored per user ID so each user continues where it left off in the
// previous block.
// Window boundary: when the sample index moved from 0 to 63 between blocks
// the first sample of the block is also taken as a symbol; when it moved
// from 63 to 0 the match on the first sample is suppressed. events pulses
// [0] for the first case and [1] for the second.
// Output: the stream delayed by one cycle (REGEN_LAT), data words replaced
// by the regenerated signal; -(-512) saturates to 511.
module regenerate
  import pic_pkg::*;
#(
  parameter int unsigned K  = 4,
  parameter int unsigned NB = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  stream_t    in,
  output stream_t    out,
  output logic [1:0] events
);

  localparam int unsigned UW = (K > 1) ? $clog2(K) : 1;

  logic        is_data, is_prog, prog_en, proc_en;
  logic [2:0]  prog_idx;
  logic [10:0] data_idx;
  hdr_t        hdr;
  mod_state_t  state;

  stream_ctrl u_ctrl (
    .clk, .rst_n, .in, .state, .prog_en, .proc_en, .is_data, .is_prog,
    .prog_idx, .data_idx, .hdr
  );

  sample_t    amp   [K];
  logic [5:0] cnt   [K];
  logic [5:0] psidx [K];

  logic [UW-1:0] u;
  logic          first, extra, skip, strobe;
  logic [5:0]    c_now;
  sample_t       a_now, regen;

  assign u      = hdr.uid[UW-1:0];
  assign first  = (data_idx == 11'd0);
  assign extra  = first && psidx[u] == 6'd0  && hdr.sidx == 6'd63;
  assign skip   = first && psidx[u] == 6'd63 && hdr.sidx == 6'd0;
  assign strobe = ((data_idx[5:0] == hdr.sidx) && !skip) || extra;
  assign c_now  = strobe ? 6'd0 : cnt[u] + 6'd1;
  assign a_now  = strobe ? in.data : amp[u];

  always_comb begin
    if (!hdr.acq)                         regen = '0;
    else if (pn_chip(hdr.pn, c_now[5:2])) regen = a_now;
    else                                  regen = sat10(-32'(a_now));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) begin
        amp[i]   <= '0;
        cnt[i]   <= '0;
        psidx[i] <= '0;
      end
      out    <= NULL_WORD;
      events <= '0;
    end else begin
      out    <= in;
      events <= '0;
      if (is_data) begin
        out.data <= regen;
        amp[u]   <= a_now;
        cnt[u]   <= c_now;
        events   <= {skip, extra};
        if (data_idx == 11'(NB - 1)) psidx[u] <= hdr.sidx;
      end
    end
  end

endmodule
