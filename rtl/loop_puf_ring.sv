// loop_puf_ring: behavioural model of the Loop PUF oscillator (not synthesizable).
//
// The physical Loop PUF is a single ring oscillator: N delay elements in a
// chain, closed by an inverter.  Each element offers two paths and challenge
// bit k selects path 0 or path 1 of element k, so the loop delay, and with it
// the oscillation frequency, depends on the challenge.  The manufacturing
// mismatch between the two paths of each element is the PUF's entropy.
// Real delay elements are placed and routed cells whose delays only exist in
// silicon, so this file is a timing model for simulation, not logic.
//
// Model: path p of element k has delay BASE_DELAY + u(k,p), where u is a
// pseudo-random offset in [-SPREAD, +SPREAD] derived from SEED (a stand-in
// for process variation).  While `enable` is high the output toggles every
// sum_k delay(k, challenge[k]) picoseconds, plus a random jitter of up to
// +/-JITTER ps per half period (a stand-in for thermal noise).  With
// `enable` low the output rests at 0.
// Delays are given in picoseconds: with the defaults the loop runs at about
// 19.5 MHz, and a 2^20-cycle window at 100 MHz gives raw responses of a few
// hundred to a few thousand counts, the 12-bit range the method reports.
// The element structure follows the method; all delay numbers are this
// model's own.
module loop_puf_ring #(
  parameter int unsigned N          = 64,
  parameter int unsigned BASE_DELAY = 400,
  parameter int unsigned SPREAD     = 40,
  parameter int unsigned JITTER     = 2,
  parameter int unsigned SEED       = 32'h1234_5678
) (
  input  logic         enable,
  input  logic [N-1:0] challenge,
  output logic         osc
);
  int unsigned path_delay [N][2];
  int unsigned half_period;

  function automatic int unsigned mix(input int unsigned x);
    int unsigned h = x;
    h = h ^ (h << 13);
    h = h ^ (h >> 17);
    h = h ^ (h << 5);
    return h;
  endfunction

  initial begin
    int unsigned h;
    for (int unsigned k = 0; k < N; k++) begin
      for (int unsigned p = 0; p < 2; p++) begin
        h = mix(mix(SEED ^ (k * 2 + p + 1) * 32'h9E37_79B9));
        path_delay[k][p] = BASE_DELAY - SPREAD + h % (2 * SPREAD + 1);
      end
    end
  end

  // loop delay for the challenge applied at the start of each half period
  function automatic int unsigned loop_delay(input logic [N-1:0] c);
    int unsigned sum = 0;
    for (int unsigned k = 0; k < N; k++) sum += path_delay[k][c[k]];
    return sum;
  endfunction

  initial begin
    osc = 1'b0;
    forever begin
      if (!enable) begin
        osc = 1'b0;
        @(posedge enable);
      end else begin
        half_period = loop_delay(challenge);
        #((half_period - JITTER + $urandom_range(2 * JITTER)) * 1ps);
        osc = enable ? ~osc : 1'b0;
      end
    end
  end

endmodule
