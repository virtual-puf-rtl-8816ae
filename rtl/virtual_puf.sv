// virtual_puf: model inference (the "virtual" Loop PUF).
//
// Once the delay model D is stored, the raw response to a user challenge c is
// computed instead of measured:
//     delta_c = sum_k (c_k ? +D_k : -D_k),
// the vector product of the signed challenge with the delays.  Since every
// challenge element is +/-1 this is a chain of conditional additions, one
// delay per clock cycle, with no multiplier.  The result keeps the 4 fraction
// bits of the model (format (12 + log2 n).4, 22 bits for n = 64).
// The equation and the one-delay-per-cycle walk over the memory follow the
// method; the registered-read pipeline is this design's choice.
//
// Interface: pulse `start` with `challenge`; the block reads the delay memory
// through raddr/rdata (rdata one cycle after raddr) and pulses `done` with
// `delta` valid.  `busy` is high in between.
// Timing: `done` comes n + 2 cycles after `start` (66 cycles, 660 ns at
// 100 MHz, for n = 64).
module virtual_puf
  import vpuf_pkg::*;
#(
  parameter int unsigned LOG2_N_P = LOG2_N,
  parameter int unsigned D_W_P    = D_W,
  parameter int unsigned OUT_W    = D_W_P + LOG2_N_P
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [(1<<LOG2_N_P)-1:0] challenge,
  output logic                     busy,
  output logic                     done,
  output logic signed [OUT_W-1:0]  delta,
  // delay memory read port
  output logic [LOG2_N_P-1:0]      raddr,
  input  logic signed [D_W_P-1:0]  rdata
);
  localparam int unsigned N = 1 << LOG2_N_P;

  logic [N-1:0]         chal;
  logic [LOG2_N_P:0]    k;          // read index, N when all reads issued
  logic                 rd_valid;
  logic                 rd_plus;
  logic signed [OUT_W-1:0] acc, acc_next;

  assign raddr = k[LOG2_N_P-1:0];

  always_comb begin
    acc_next = acc;
    if (rd_valid) acc_next = rd_plus ? acc + OUT_W'(rdata) : acc - OUT_W'(rdata);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      delta    <= '0;
      chal     <= '0;
      k        <= '0;
      rd_valid <= 1'b0;
      rd_plus  <= 1'b0;
      acc      <= '0;
    end else begin
      done     <= 1'b0;
      rd_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          chal <= challenge;
          k    <= '0;
          acc  <= '0;
        end
      end else begin
        acc <= acc_next;
        if (k < (LOG2_N_P+1)'(N)) begin
          rd_valid <= 1'b1;
          rd_plus  <= chal[k[LOG2_N_P-1:0]];
          k        <= k + 1'b1;
        end else begin
          delta <= acc_next;
          done  <= 1'b1;
          busy  <= 1'b0;
        end
      end
    end
  end

endmodule
