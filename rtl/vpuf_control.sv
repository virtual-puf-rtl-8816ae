// vpuf_control: sequencer of the Virtual PUF.
//
// After reset (power-up) it samples the measurement configuration, starts
// the model builder and waits for it: this is the only time the physical
// Loop PUF runs.  From then on the design answers challenges from the model:
// for each request from the interface it starts the virtual PUF, hands its
// raw response to the NMQ quantiser and returns the quantised bit.
//
// The window size w = 2^log2_w and the iteration count 2^log2_iter are
// sampled once, when the build starts, and clamped to the largest values the
// counters were sized for; they stay fixed until the next reset, since the
// stored model and the folded mean both depend on them.
// The method names this block and gives the order of operations (build at
// power-up, then inference and quantisation per challenge); the states and
// the configuration sampling are this design's choices.
//
// Timing: mb_start one cycle after reset release; per request, vp_start in
// the cycle after `req`, nmq_start in the cycle after vp_done, rsp_valid in
// the cycle after nmq_done.
module vpuf_control
  import vpuf_pkg::*;
#(
  parameter int unsigned LOG2_W_MAX_P    = LOG2_W_MAX,
  parameter int unsigned LOG2_ITER_MAX_P = LOG2_ITER_MAX
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] cfg_log2_w,
  input  logic [2:0] cfg_log2_iter,
  output logic [4:0] log2_w,
  output logic [2:0] log2_iter,
  // model builder
  output logic       mb_start,
  input  logic       mb_done,
  output logic       model_ready,
  // per-challenge pipeline
  input  logic       req,
  output logic       vp_start,
  input  logic       vp_done,
  output logic       nmq_start,
  input  logic       nmq_done,
  output logic       rsp_valid
);
  typedef enum logic [2:0] {BOOT, BUILD, IDLE, INFER, QUANT} state_e;
  state_e state;

  assign model_ready = (state == IDLE) || (state == INFER) || (state == QUANT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= BOOT;
      log2_w    <= '0;
      log2_iter <= '0;
      mb_start  <= 1'b0;
      vp_start  <= 1'b0;
      nmq_start <= 1'b0;
      rsp_valid <= 1'b0;
    end else begin
      mb_start  <= 1'b0;
      vp_start  <= 1'b0;
      nmq_start <= 1'b0;
      rsp_valid <= 1'b0;
      case (state)
        BOOT: begin
          log2_w    <= (32'(cfg_log2_w) > LOG2_W_MAX_P) ? 5'(LOG2_W_MAX_P) : cfg_log2_w;
          log2_iter <= (32'(cfg_log2_iter) > LOG2_ITER_MAX_P) ? 3'(LOG2_ITER_MAX_P) : cfg_log2_iter;
          mb_start  <= 1'b1;
          state     <= BUILD;
        end
        BUILD: if (mb_done) state <= IDLE;
        IDLE:  if (req) begin
          vp_start <= 1'b1;
          state    <= INFER;
        end
        INFER: if (vp_done) begin
          nmq_start <= 1'b1;
          state     <= QUANT;
        end
        QUANT: if (nmq_done) begin
          rsp_valid <= 1'b1;
          state     <= IDLE;
        end
        default: state <= BOOT;
      endcase
    end
  end

endmodule
