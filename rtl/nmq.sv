// nmq: non-monotonic quantisation of the inferred raw response.
//
// The raw response axis is cut into Q intervals by Q-1 evenly spaced
// thresholds centred on 0, {-(Q/2-1)s, ..., -s, 0, s, ..., (Q/2-1)s}, and the
// intervals are labelled 0,1,0,1,... from the most negative one up, so the
// one-bit response jumps back and forth as delta grows and is hard to model.
// The spacing s is derived from the folded mean mu_Y of the Hadamard
// responses: s = mu_Y >> (log2 Q - 2), so for Q = 4 the thresholds are
// {-mu_Y, 0, mu_Y}.  The thresholds are never stored: the block compares
// |delta| with s, 2s, 3s, ... one per clock cycle and toggles the response
// each time a threshold is passed, starting from 1 for a negative delta and
// 0 otherwise (Algorithm 3 of the method, with Q/2-1 positive thresholds
// as in its definition of NMQ).  A value equal to a threshold belongs to
// the interval nearer 0.
//
// Interface: pulse `start` with `delta` (signed, DELTA_FRAC fraction bits),
// `mu_y` (unsigned, same fraction bits) and `q_sel` (Q = 4 << q_sel); `done`
// pulses with `resp` valid.
// Timing: at most Q/2 cycles from `start` to `done` (16 for Q = 32); one
// cycle when |delta| <= s.
module nmq
  import vpuf_pkg::*;
#(
  parameter int unsigned DELTA_W_P = D_W + LOG2_N,
  parameter int unsigned MU_W      = D_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic signed [DELTA_W_P-1:0] delta,
  input  logic [MU_W-1:0]             mu_y,
  input  q_sel_e                      q_sel,
  output logic                        busy,
  output logic                        done,
  output logic                        resp
);
  // thresholds reach at most 15 * mu_Y / 8 for Q = 32
  localparam int unsigned TH_W = (DELTA_W_P > MU_W + 1) ? DELTA_W_P : MU_W + 1;

  logic [DELTA_W_P-1:0] magnitude;
  logic [TH_W-1:0]      step, threshold;
  logic [4:0]           passed;      // thresholds passed so far
  logic [4:0]           n_pos;       // Q/2 - 1 positive thresholds
  logic                 r;

  assign n_pos = 5'((2 << q_sel) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      resp      <= 1'b0;
      magnitude <= '0;
      step      <= '0;
      threshold <= '0;
      passed    <= '0;
      r         <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy      <= 1'b1;
          magnitude <= delta[DELTA_W_P-1] ? DELTA_W_P'(-delta) : DELTA_W_P'(delta);
          step      <= TH_W'(mu_y >> q_sel);
          threshold <= TH_W'(mu_y >> q_sel);
          passed    <= '0;
          r         <= delta[DELTA_W_P-1];
        end
      end else begin
        if (TH_W'(magnitude) <= threshold || passed == n_pos) begin
          resp <= r;
          done <= 1'b1;
          busy <= 1'b0;
        end else begin
          threshold <= threshold + step;
          passed    <= passed + 1'b1;
          r         <= ~r;
        end
      end
    end
  end

endmodule
