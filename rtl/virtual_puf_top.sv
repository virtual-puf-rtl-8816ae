// virtual_puf_top: the Virtual PUF.
//
// A Loop PUF answers a challenge c with the raw count difference delta_c, and
// non-monotonic quantisation (NMQ) with many levels Q turns that into a bit
// that machine-learning attacks cannot model, but also into a bit that noise
// flips often.  The Virtual PUF keeps the security and removes the noise: at
// power-up it measures the physical Loop PUF with the n Hadamard challenges,
// solves for the n delay differences (a Hadamard transform made of additions
// and a shift), estimates the response spread (the folded mean mu_Y), and from
// then on answers every challenge from that model, deterministically.
//
// Structure (the blocks and their connections follow the method):
//   model building : vpuf_control starts model_builder, which steps
//                    hadamard_gen through the rows; each row goes to the
//                    Loop PUF (loop_puf counting the loop_puf_ring
//                    oscillator); model_builder writes the delays into
//                    delay_mem and feeds abs_mean, which holds mu_Y.
//   model inference: virtual_puf walks delay_mem to form delta_c.
//   NMQ            : nmq quantises delta_c with thresholds from mu_Y.
//   interface      : puf_interface takes challenges and returns responses.
// The oscillator is a behavioural timing model (see loop_puf_ring); all other
// blocks are synthesizable.
//
// Ports: clock and active-low reset (reset release is power-up);
// cfg_log2_w / cfg_log2_iter set the counting window 2^cfg_log2_w cycles
// (at most 2^20) and the 2^cfg_log2_iter measurements per Hadamard row (at
// most 16), sampled when the build starts; model_ready rises when the model
// is built; challenges and responses use valid/ready handshakes, with
// chal_q selecting Q = 4 << chal_q.
// Parameters: LOG2_N_P (n = 64), LOG2_W_MAX_P (20), LOG2_ITER_MAX_P (4, i.e.
// 16 iterations), D_FRAC_P (fraction bits of the 12.x delay model, 4), and the
// RING_* numbers of the oscillator model.
// Timing: the build takes about 2 * n * iter * w cycles (21.5 s at 100 MHz for
// n = 64, iter = 16, w = 2^20); a challenge is answered within
// n + Q/2 + 8 cycles (at most 88 cycles, 0.88 us at 100 MHz, for n = 64, Q = 32).
module virtual_puf_top
  import vpuf_pkg::*;
#(
  parameter int unsigned LOG2_N_P        = LOG2_N,
  parameter int unsigned LOG2_W_MAX_P    = LOG2_W_MAX,
  parameter int unsigned LOG2_ITER_MAX_P = LOG2_ITER_MAX,
  parameter int unsigned D_FRAC_P        = D_FRAC,
  parameter int unsigned RING_BASE_DELAY = 400,
  parameter int unsigned RING_SPREAD     = 40,
  parameter int unsigned RING_JITTER     = 2,
  parameter int unsigned RING_SEED       = 32'h1234_5678
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [4:0]               cfg_log2_w,
  input  logic [2:0]               cfg_log2_iter,
  output logic                     model_ready,
  input  logic                     chal_valid,
  output logic                     chal_ready,
  input  logic [(1<<LOG2_N_P)-1:0] chal_data,
  input  logic [1:0]               chal_q,
  output logic                     resp_valid,
  input  logic                     resp_ready,
  output logic                     resp_data
);
  localparam int unsigned N      = 1 << LOG2_N_P;
  localparam int unsigned RESP_W = DELTA_W + LOG2_ITER_MAX_P;
  localparam int unsigned DW     = D_INT + D_FRAC_P;   // delay model width
  localparam int unsigned VD_W   = DW + LOG2_N_P;

  // configuration
  logic [4:0] log2_w;
  logic [2:0] log2_iter;

  // control
  logic mb_start, mb_done, mb_busy;
  logic req, vp_start, vp_done, vp_busy, nmq_start, nmq_done, nmq_busy, rsp_valid, rsp_bit;
  logic [N-1:0] req_challenge;
  q_sel_e req_q;

  // model building
  logic                       hg_load;
  logic [LOG2_N_P-1:0]        hg_row;
  logic [N-1:0]               hadamard_challenge;
  logic                       meas_start, meas_done, meas_busy;
  logic signed [DELTA_W-1:0]  meas_delta;
  logic                       ro_enable, ro_osc;
  logic [N-1:0]               ro_challenge;
  logic                       am_clear, am_valid;
  logic signed [RESP_W-1:0]   am_value;
  logic [DW-1:0]              mu_y;
  logic                       dm_we;
  logic [LOG2_N_P-1:0]        dm_waddr, dm_raddr;
  logic signed [DW-1:0]       dm_wdata, dm_rdata;
  logic signed [VD_W-1:0]     vp_delta;

  vpuf_control #(.LOG2_W_MAX_P(LOG2_W_MAX_P), .LOG2_ITER_MAX_P(LOG2_ITER_MAX_P)) u_ctrl (
    .clk, .rst_n, .cfg_log2_w, .cfg_log2_iter, .log2_w, .log2_iter,
    .mb_start, .mb_done, .model_ready,
    .req, .vp_start, .vp_done, .nmq_start, .nmq_done, .rsp_valid);

  model_builder #(.LOG2_N_P(LOG2_N_P), .LOG2_ITER_MAX_P(LOG2_ITER_MAX_P),
                  .D_W_P(DW), .D_FRAC_P(D_FRAC_P)) u_mb (
    .clk, .rst_n, .start(mb_start), .log2_iter, .busy(mb_busy), .done(mb_done),
    .hg_load, .hg_row, .meas_start, .meas_done, .meas_delta,
    .am_clear, .am_valid, .am_value,
    .dm_we, .dm_addr(dm_waddr), .dm_wdata);

  hadamard_gen #(.LOG2_N_P(LOG2_N_P)) u_hg (
    .clk, .rst_n, .load(hg_load), .row(hg_row), .challenge(hadamard_challenge));

  loop_puf #(.N(N), .LOG2_W_MAX_P(LOG2_W_MAX_P)) u_lpuf (
    .clk, .rst_n, .start(meas_start), .challenge(hadamard_challenge), .log2_w,
    .busy(meas_busy), .done(meas_done), .delta(meas_delta),
    .ro_enable, .ro_challenge, .ro_osc);

  loop_puf_ring #(.N(N), .BASE_DELAY(RING_BASE_DELAY), .SPREAD(RING_SPREAD),
                  .JITTER(RING_JITTER), .SEED(RING_SEED)) u_ring (
    .enable(ro_enable), .challenge(ro_challenge), .osc(ro_osc));

  abs_mean #(.LOG2_N_P(LOG2_N_P), .RESP_W(RESP_W), .FRAC_P(D_FRAC_P), .MU_W(DW)) u_am (
    .clk, .rst_n, .clear(am_clear), .valid(am_valid), .value(am_value), .log2_iter, .mu_y);

  delay_mem #(.LOG2_N_P(LOG2_N_P), .WIDTH(DW)) u_dm (
    .clk, .we(dm_we), .waddr(dm_waddr), .wdata(dm_wdata), .raddr(dm_raddr), .rdata(dm_rdata));

  virtual_puf #(.LOG2_N_P(LOG2_N_P), .D_W_P(DW)) u_vp (
    .clk, .rst_n, .start(vp_start), .challenge(req_challenge),
    .busy(vp_busy), .done(vp_done), .delta(vp_delta), .raddr(dm_raddr), .rdata(dm_rdata));

  nmq #(.DELTA_W_P(VD_W), .MU_W(DW)) u_nmq (
    .clk, .rst_n, .start(nmq_start), .delta(vp_delta), .mu_y, .q_sel(req_q),
    .busy(nmq_busy), .done(nmq_done), .resp(rsp_bit));

  puf_interface #(.N(N)) u_if (
    .clk, .rst_n, .model_ready,
    .chal_valid, .chal_ready, .chal_data, .chal_q(q_sel_e'(chal_q)),
    .resp_valid, .resp_ready, .resp_data,
    .req, .req_challenge, .req_q, .rsp_valid, .rsp_bit);

endmodule
