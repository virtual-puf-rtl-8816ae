// abs_mean: folded (absolute) mean of the Hadamard responses, mu_Y.
//
// The spread of the raw responses sets the NMQ thresholds.  Instead of the
// standard deviation, which is costly in hardware, the design uses the mean
// of the folded distribution, mu_Y = (1/n) * sum |delta_H|, which for a
// normal distribution is close to sigma (about 0.8 sigma).  The n Hadamard
// responses are summed in absolute value as the model builder produces them
// and the sum is divided by n with a shift (Algorithm 2 of the method).
//
// Each input `value` is the sum of 2^log2_iter repeated measurements of one
// Hadamard challenge, so this block also divides by the iteration count and
// keeps FRAC_P fraction bits: mu_y = (abs_sum << FRAC_P) >> (LOG2_N + log2_iter),
// saturated to the unsigned fixed-point width of the delay model (12.4 by
// default).  The merging of the iteration average into the shift and the
// saturation are this design's choices.
//
// Interface: `clear` resets the sum; each cycle with `valid` high adds
// |value|.  `mu_y` is combinational from the registered sum.
module abs_mean
  import vpuf_pkg::*;
#(
  parameter int unsigned LOG2_N_P    = LOG2_N,
  parameter int unsigned RESP_W      = DELTA_W + LOG2_ITER_MAX,
  parameter int unsigned FRAC_P      = D_FRAC,
  parameter int unsigned MU_W        = D_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     valid,
  input  logic signed [RESP_W-1:0] value,
  input  logic [2:0]               log2_iter,
  output logic [MU_W-1:0]          mu_y
);
  localparam int unsigned SUM_W    = RESP_W + LOG2_N_P;
  localparam int unsigned SCALED_W = SUM_W + FRAC_P;

  logic [SUM_W-1:0]    abs_sum;
  logic [RESP_W-1:0]   magnitude;
  logic [SCALED_W-1:0] scaled;

  assign magnitude = value[RESP_W-1] ? RESP_W'(-value) : RESP_W'(value);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      abs_sum <= '0;
    else if (clear)  abs_sum <= '0;
    else if (valid)  abs_sum <= abs_sum + SUM_W'(magnitude);
  end

  always_comb begin
    scaled = (SCALED_W'(abs_sum) << FRAC_P) >> (LOG2_N_P + 32'(log2_iter));
    mu_y   = (scaled > SCALED_W'({MU_W{1'b1}})) ? {MU_W{1'b1}} : MU_W'(scaled);
  end

endmodule
