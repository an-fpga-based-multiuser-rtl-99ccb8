// output_module: Output module. Collects each user's decided bits and holds
// them for the host.
//
// Only the MSB of each valid data word from the demodulator is used (the
// hard decision). The user ID latched from the programming header selects
// the user: the bit is shifted into that user's serial-to-parallel register
// (oldest bit ends in bit 15, newest in bit 0) and every sixteenth bit the
// word is pushed into the user's FIFO (FIFO_DEPTH x 16). Shift registers and
// bit counts are kept per user so the bits of different users never mix.
// Host side (memory-mapped registers):
//   status (16 bits): [15:12] valid (unused, 0), [11:8] overflow,
//                     [7:4] full, [3:0] empty, bit k = user k;
//   data: the oldest word of the FIFO picked by host_sel. A host_rd_data
//   pulse completes a transfer and removes that word. Overflow flags are
//   sticky (a word arrived while the FIFO was full and was lost) and clear
//   on a host_rd_status pulse.
// The bus protocol between this register file and the host is not modelled.
module output_module
  import pic_pkg::*;
#(
  parameter int unsigned K          = 4,
  parameter int unsigned FIFO_DEPTH = 128,
  localparam int unsigned UW        = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  stream_t       in,
  input  logic [UW-1:0] host_sel,
  input  logic          host_rd_data,
  input  logic          host_rd_status,
  output logic [15:0]   host_data,
  output logic [15:0]   host_status
);

  logic        is_data, is_prog, prog_en, proc_en;
  logic [2:0]  prog_idx;
  logic [10:0] data_idx;
  hdr_t        hdr;
  mod_state_t  state;

  stream_ctrl u_ctrl (
    .clk, .rst_n, .in, .state, .prog_en, .proc_en, .is_data, .is_prog,
    .prog_idx, .data_idx, .hdr
  );

  logic [15:0] shreg [K];
  logic [3:0]  bcnt  [K];
  logic [UW-1:0] u;
  logic [15:0] nsh;

  assign u   = hdr.uid[UW-1:0];
  assign nsh = {shreg[u][14:0], in.data[DW-1]};

  logic [K-1:0] push, pop, empty, full, ovf;
  logic [K-1:0] ovf_sticky;
  logic [15:0]  dout [K];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) begin
        shreg[i] <= '0;
        bcnt[i]  <= '0;
      end
      ovf_sticky <= '0;
    end else begin
      if (is_data) begin
        shreg[u] <= nsh;
        bcnt[u]  <= bcnt[u] + 4'd1;
      end
      ovf_sticky <= (host_rd_status ? '0 : ovf_sticky) | ovf;
    end
  end

  for (genvar k = 0; k < K; k++) begin : g_fifo
    assign push[k] = is_data && (u == UW'(k)) && (bcnt[k] == 4'd15);
    assign pop[k]  = host_rd_data && (host_sel == UW'(k));
    sync_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(16)) u_fifo (
      .clk, .rst_n,
      .push (push[k]),
      .din  (nsh),
      .pop  (pop[k]),
      .dout (dout[k]),
      .empty(empty[k]),
      .full (full[k]),
      .ovf  (ovf[k])
    );
  end

  assign host_data = dout[host_sel];

  always_comb begin
    host_status        = '0;
    host_status[3:0]   = 4'(empty);
    host_status[7:4]   = 4'(full);
    host_status[11:8]  = 4'(ovf_sticky);
  end

endmodule
