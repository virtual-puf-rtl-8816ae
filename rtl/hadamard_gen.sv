// hadamard_gen: Hadamard challenge generator.
//
// Produces row `row` of the N x N Hadamard matrix H_N (N = 2^LOG2_N) as an
// N-bit Loop PUF challenge.  Bit k of the challenge is the binary scalar
// product of the row index and the column index, XOR-reduce(row AND k), so a
// 1 stands for H = +1 and a 0 for H = -1 (Algorithm 1 of the method).  Each
// bit is a handful of AND/XOR gates; all N bits are formed in one cycle.
//
// Interface: when `load` is high the challenge of row `row` is registered and
// appears on `challenge` in the next cycle.  Bit 0 of every row is 0 (column 0
// of H is all -1), so that register bit is constant.
// Timing: one cycle from `load` to `challenge`.
// Registering the challenge is this design's choice.
module hadamard_gen
  import vpuf_pkg::*;
#(
  parameter int unsigned LOG2_N_P = LOG2_N
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  logic [LOG2_N_P-1:0]       row,
  output logic [(1<<LOG2_N_P)-1:0]  challenge
);
  localparam int unsigned N = 1 << LOG2_N_P;

  logic [N-1:0] row_bits;

  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      row_bits[k] = ^(row & LOG2_N_P'(k));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     challenge <= '0;
    else if (load)  challenge <= row_bits;
  end

endmodule
