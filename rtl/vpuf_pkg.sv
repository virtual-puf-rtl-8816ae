// vpuf_pkg: constants, types and helper functions shared by the Virtual PUF.
//
// The Virtual PUF measures a Loop PUF (a ring oscillator built from n
// challenge-controlled delay elements) at power-up with the n rows of a
// Hadamard matrix, solves for the n delay differences, and from then on
// answers challenges from that stored model instead of the oscillator.
//
// Sizes that follow the document: n = 64 delay elements, a delay model of
// fixed-point precision 12.4 (12 integer bits, 4 fraction bits), quantisation
// levels Q in {4, 8, 16, 32}, a counting window of up to 2^20 clock cycles and
// 16 repeated measurements.  The 16-bit width of one raw response and the
// 20-bit width of the stored (summed) responses are this design's choice; they
// are consistent with the 1280-bit response store (64 x 20) and the 1024-bit
// delay store (64 x 16) the document reports.
package vpuf_pkg;

  // Loop PUF length n = 2^LOG2_N
  localparam int unsigned LOG2_N        = 6;
  // Largest counting window, w = 2^LOG2_W_MAX clock cycles
  localparam int unsigned LOG2_W_MAX    = 20;
  // Largest iteration count, i = 2^LOG2_ITER_MAX
  localparam int unsigned LOG2_ITER_MAX = 4;
  // One raw response delta_c = count(c) - count(~c), signed
  localparam int unsigned DELTA_W       = 16;
  // Fixed-point delay model p = D_INT.D_FRAC
  localparam int unsigned D_INT         = 12;
  localparam int unsigned D_FRAC        = 4;
  localparam int unsigned D_W           = D_INT + D_FRAC;

  // Quantisation level select: Q = 4 << q_sel
  typedef enum logic [1:0] {
    Q4  = 2'd0,
    Q8  = 2'd1,
    Q16 = 2'd2,
    Q32 = 2'd3
  } q_sel_e;

  // Hadamard element of Algorithm 1 as a bit: 1 stands for +1, 0 for -1.
  // H[i][j] = XOR over l of (i_l AND j_l).
  function automatic logic hadamard_bit(input logic [31:0] i, input logic [31:0] j);
    return ^(i & j);
  endfunction

endpackage
