// pic_receiver: two-stage multiuser DS/CDMA receiver with parallel
// interference cancellation (PIC) for differentially encoded BPSK, built as
// a chain of stream-processing modules.
//
// Users are processed one after another: every block of NB input samples is
// sent through each pipeline K times, each pass headed by the programming
// header of one user, so a single set of modules serves all users.
// Stage 1 (I and Q branches):
//   noise_gen -> input_module -> mfc -> acq_track (shared by I and Q)
//   -> regenerate -> combine           = estimated received signal
// The actual received signal is delayed (stream_delay) to meet the estimate,
// and revised forms the revised received signal with the selected common
// backoff factor. Stage 2 is a conventional receiver:
//   buffer_module -> mfc -> demod (shared by I and Q) -> output_module.
// Timing: one sample per sample_stb pulse, every fifth clock (2 MHz samples
// at a 10 MHz processing clock); a block of 1024 samples takes 5120 clocks and
// the K = 4 user streams of 1103 words fit in it. The first stage works on
// the previous input block, the second stage on the block before that, so a
// decided bit reaches the host FIFO about three blocks after its samples.
// Inputs rx_i/rx_q are the top ten bits of the downconverter's I and Q
// outputs. The host reads the Output module's status and data registers.
// Status outputs report the module events used for monitoring.
module pic_receiver
  import pic_pkg::*;
#(
  parameter int unsigned K          = 4,
  parameter int unsigned NB         = 1024,
  parameter int unsigned ACQ_M      = 8,
  parameter int unsigned DET_BITS   = 256,
  parameter int unsigned DET_THRESH = 48,
  parameter int unsigned FIFO_DEPTH = 128,
  localparam int unsigned UW        = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // Downconverter samples.
  input  logic          sample_stb,
  input  sample_t       rx_i,
  input  sample_t       rx_q,
  // Receiver configuration.
  input  logic [1:0]    noise_level,
  input  logic [1:0]    backoff_sel,
  // Host register interface.
  input  logic [UW-1:0] host_sel,
  input  logic          host_rd_data,
  input  logic          host_rd_status,
  output logic [15:0]   host_data,
  output logic [15:0]   host_status,
  // Monitoring.
  output logic          block_start,
  output logic [4:0]    trk_events,
  output logic [1:0]    regen_events,
  output logic [1:0]    demod_events,
  output logic          stage2_trigger,
  output logic [3:0]    overrun
);

  sample_t ni, nq;
  logic    nstb_i, nstb_q;
  stream_t act_i, act_q, f1_i, f1_q, t_i, t_q, g_i, g_q, e_i, e_q;
  stream_t ad_i, ad_q, v_i, v_q, b_i, b_q, f2_i, f2_q, dm;
  logic    bs_q, trig_q;
  logic [1:0] rge_q;

  // ---------------- stage 1 ----------------
  noise_gen #(.SEED(31'h1234_5678)) u_noise_i (
    .clk, .rst_n, .sample_stb, .in(rx_i), .level(noise_level),
    .out(ni), .out_stb(nstb_i)
  );
  noise_gen #(.SEED(31'h7654_3210)) u_noise_q (
    .clk, .rst_n, .sample_stb, .in(rx_q), .level(noise_level),
    .out(nq), .out_stb(nstb_q)
  );

  input_module #(.K(K), .NB(NB)) u_input_i (
    .clk, .rst_n, .sample_stb(nstb_i), .sample(ni), .out(act_i),
    .block_start(block_start), .overrun(overrun[0])
  );
  input_module #(.K(K), .NB(NB)) u_input_q (
    .clk, .rst_n, .sample_stb(nstb_q), .sample(nq), .out(act_q),
    .block_start(bs_q), .overrun(overrun[1])
  );

  mfc u_mfc1_i (.clk, .rst_n, .in(act_i), .out(f1_i));
  mfc u_mfc1_q (.clk, .rst_n, .in(act_q), .out(f1_q));

  acq_track #(
    .K(K), .NB(NB), .ACQ_M(ACQ_M), .DET_BITS(DET_BITS), .DET_THRESH(DET_THRESH)
  ) u_acq (
    .clk, .rst_n, .in_i(f1_i), .in_q(f1_q), .out_i(t_i), .out_q(t_q),
    .events(trk_events)
  );

  regenerate #(.K(K), .NB(NB)) u_regen_i (
    .clk, .rst_n, .in(t_i), .out(g_i), .events(regen_events)
  );
  regenerate #(.K(K), .NB(NB)) u_regen_q (
    .clk, .rst_n, .in(t_q), .out(g_q), .events(rge_q)
  );

  combine #(.NB(NB)) u_comb_i (.clk, .rst_n, .in(g_i), .out(e_i));
  combine #(.NB(NB)) u_comb_q (.clk, .rst_n, .in(g_q), .out(e_q));

  // ---------------- cancellation ----------------
  stream_delay #(.DELAY(EST_PATH_LAT)) u_dly_i (.clk, .rst_n, .in(act_i), .out(ad_i));
  stream_delay #(.DELAY(EST_PATH_LAT)) u_dly_q (.clk, .rst_n, .in(act_q), .out(ad_q));

  revised u_rev_i (.clk, .rst_n, .est(e_i), .act(ad_i), .backoff_sel, .out(v_i));
  revised u_rev_q (.clk, .rst_n, .est(e_q), .act(ad_q), .backoff_sel, .out(v_q));

  // ---------------- stage 2 ----------------
  buffer_module #(.K(K), .NB(NB)) u_buf_i (
    .clk, .rst_n, .in(v_i), .out(b_i), .trigger(stage2_trigger), .overrun(overrun[2])
  );
  buffer_module #(.K(K), .NB(NB)) u_buf_q (
    .clk, .rst_n, .in(v_q), .out(b_q), .trigger(trig_q), .overrun(overrun[3])
  );

  mfc u_mfc2_i (.clk, .rst_n, .in(b_i), .out(f2_i));
  mfc u_mfc2_q (.clk, .rst_n, .in(b_q), .out(f2_q));

  demod #(.K(K), .NB(NB)) u_demod (
    .clk, .rst_n, .in_i(f2_i), .in_q(f2_q), .out(dm), .events(demod_events)
  );

  output_module #(.K(K), .FIFO_DEPTH(FIFO_DEPTH)) u_out (
    .clk, .rst_n, .in(dm), .host_sel, .host_rd_data, .host_rd_status,
    .host_data, .host_status
  );

  // The I and Q branches run in lockstep.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (bs_q == block_start) && (trig_q == stage2_trigger) && (rge_q == regen_events))
    else $error("pic_receiver: I and Q branches out of step");

endmodule
