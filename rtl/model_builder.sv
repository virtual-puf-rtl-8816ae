// model_builder: builds the delay model of the Loop PUF at power-up.
//
// The raw response of the Loop PUF is linear in the signed challenge,
// delta_c = c^ . D (c^ is c with 0 read as -1).  Measuring the n rows of a
// Hadamard matrix H therefore gives Delta_H = H D, and since H is symmetric
// with H H = n I, the delays follow without any matrix inversion:
//     D_i = (1/n) * sum_j ( H_ij = +1 ? +delta_Hj : -delta_Hj ).
// This block runs that procedure in two phases:
//
//  1. Measure.  For j = 0..n-1 it asks the Hadamard generator for row j and
//     runs 2^log2_iter Loop PUF measurements of it, summing the responses into
//     S_j (repeating measurements averages out noise).  S_j is written to a
//     response store of n words (64 x 20 bits by default) and passed to the
//     folded-mean block, which accumulates |S_j| at the same time.
//  2. Transform.  For each i it walks the response store once, adding or
//     subtracting S_j according to H_ij = XOR-reduce(i AND j), and writes
//         D_i = (sum << D_FRAC) >> (LOG2_N + log2_iter)
//     (arithmetic shift, so the fraction is truncated towards minus
//     infinity), saturated to the 12.4 fixed-point format, into the delay
//     memory.
//
// The method gives the Hadamard inversion, the conditional additions, the
// division by shifting and the 12.4 format.  Measuring each row i times in a
// row (rather than sweeping all rows i times), summing instead of averaging
// before the transform, and the saturation are this design's choices.
//
// Interface: pulse `start`; `busy` stays high until `done` pulses.  The
// Hadamard generator is driven with hg_load/hg_row and its registered
// challenge goes straight to the Loop PUF; meas_start/meas_done/meas_delta
// is the Loop PUF handshake.
// Timing: from `start` to `done`, n * (iter * (L + 2) + 2) + n * (n + 1) + 2
// cycles, where iter = 2^log2_iter and L is the Loop PUF's start-to-done time
// (2w + 2 cycles).  The measurements dominate: 2 * n * iter * w cycles, which
// is 21.47 s at 100 MHz for n = 64, iter = 16, w = 2^20.
module model_builder
  import vpuf_pkg::*;
#(
  parameter int unsigned LOG2_N_P        = LOG2_N,
  parameter int unsigned LOG2_ITER_MAX_P = LOG2_ITER_MAX,
  parameter int unsigned DELTA_W_P       = DELTA_W,
  parameter int unsigned D_W_P           = D_W,
  parameter int unsigned D_FRAC_P        = D_FRAC,
  parameter int unsigned RESP_W          = DELTA_W_P + LOG2_ITER_MAX_P
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [2:0]                  log2_iter,
  output logic                        busy,
  output logic                        done,
  // Hadamard challenge generator
  output logic                        hg_load,
  output logic [LOG2_N_P-1:0]         hg_row,
  // Loop PUF measurement
  output logic                        meas_start,
  input  logic                        meas_done,
  input  logic signed [DELTA_W_P-1:0] meas_delta,
  // folded mean accumulation
  output logic                        am_clear,
  output logic                        am_valid,
  output logic signed [RESP_W-1:0]    am_value,
  // delay memory write port
  output logic                        dm_we,
  output logic [LOG2_N_P-1:0]         dm_addr,
  output logic signed [D_W_P-1:0]     dm_wdata
);
  localparam int unsigned N        = 1 << LOG2_N_P;
  localparam int unsigned SUM_W    = RESP_W + LOG2_N_P;
  localparam int unsigned SCALED_W = SUM_W + D_FRAC_P;

  typedef enum logic [2:0] {IDLE, LOAD_ROW, MEAS, MEAS_WAIT, STORE, XFORM, FINISH} state_e;
  state_e state;

  logic signed [RESP_W-1:0] resp_mem [N];

  logic [LOG2_N_P-1:0]          row;       // Hadamard row being measured
  logic [LOG2_ITER_MAX_P:0]     iter;      // measurements done for that row
  logic signed [RESP_W-1:0]     acc;       // S_j being summed
  logic [LOG2_N_P-1:0]          xi;        // delay index being computed
  logic [LOG2_N_P:0]            xj;        // response index being read
  logic signed [RESP_W-1:0]     rd_data;   // registered response store output
  logic                         rd_plus;   // H_ij = +1 for rd_data
  logic                         rd_valid;
  logic signed [SUM_W-1:0]      dsum;      // running sum for D_xi
  logic signed [SUM_W-1:0]      dsum_next;
  logic signed [SCALED_W-1:0]   scaled;
  logic [LOG2_ITER_MAX_P:0]     iter_total;

  localparam logic signed [SCALED_W-1:0] DMAX = SCALED_W'(  (1 << (D_W_P-1)) - 1);
  localparam logic signed [SCALED_W-1:0] DMIN = SCALED_W'(-(1 << (D_W_P-1)));

  assign iter_total = (LOG2_ITER_MAX_P+1)'(1) << log2_iter;
  assign busy       = (state != IDLE);

  // running conditional sum including the word read this cycle
  always_comb begin
    dsum_next = dsum;
    if (rd_valid) dsum_next = rd_plus ? dsum + SUM_W'(rd_data) : dsum - SUM_W'(rd_data);
    scaled = (SCALED_W'(dsum_next) <<< D_FRAC_P) >>> (LOG2_N_P + 32'(log2_iter));
  end

  always_ff @(posedge clk) begin
    if (state == STORE) resp_mem[row] <= acc;
    rd_data <= resp_mem[xj[LOG2_N_P-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      row        <= '0;
      iter       <= '0;
      acc        <= '0;
      xi         <= '0;
      xj         <= '0;
      rd_plus    <= 1'b0;
      rd_valid   <= 1'b0;
      dsum       <= '0;
      done       <= 1'b0;
      hg_load    <= 1'b0;
      hg_row     <= '0;
      meas_start <= 1'b0;
      am_clear   <= 1'b0;
      am_valid   <= 1'b0;
      am_value   <= '0;
      dm_we      <= 1'b0;
      dm_addr    <= '0;
      dm_wdata   <= '0;
    end else begin
      done       <= 1'b0;
      hg_load    <= 1'b0;
      meas_start <= 1'b0;
      am_clear   <= 1'b0;
      am_valid   <= 1'b0;
      dm_we      <= 1'b0;
      rd_valid   <= 1'b0;
      case (state)
        IDLE: if (start) begin
          row      <= '0;
          am_clear <= 1'b1;
          state    <= LOAD_ROW;
        end
        LOAD_ROW: begin
          hg_load <= 1'b1;
          hg_row  <= row;
          iter    <= '0;
          acc     <= '0;
          state   <= MEAS;
        end
        MEAS: begin
          meas_start <= 1'b1;
          state      <= MEAS_WAIT;
        end
        MEAS_WAIT: if (meas_done) begin
          acc  <= acc + RESP_W'(meas_delta);
          iter <= iter + 1'b1;
          if (iter + 1'b1 == iter_total) state <= STORE;
          else                           state <= MEAS;
        end
        STORE: begin
          am_valid <= 1'b1;
          am_value <= acc;
          if (row == LOG2_N_P'(N - 1)) begin
            xi    <= '0;
            xj    <= '0;
            dsum  <= '0;
            state <= XFORM;
          end else begin
            row   <= row + 1'b1;
            state <= LOAD_ROW;
          end
        end
        XFORM: begin
          // cycle xj < N reads S_xj; the word arrives one cycle later
          rd_plus  <= hadamard_bit(32'(xi), 32'(xj));
          rd_valid <= (xj < (LOG2_N_P+1)'(N));
          if (xj == (LOG2_N_P+1)'(N)) begin
            dm_we   <= 1'b1;
            dm_addr <= xi;
            if      (scaled > DMAX) dm_wdata <= D_W_P'(DMAX);
            else if (scaled < DMIN) dm_wdata <= D_W_P'(DMIN);
            else                    dm_wdata <= D_W_P'(scaled);
            dsum <= '0;
            xj   <= '0;
            if (xi == LOG2_N_P'(N - 1)) state <= FINISH;
            else                        xi    <= xi + 1'b1;
          end else begin
            dsum <= dsum_next;
            xj   <= xj + 1'b1;
          end
        end
        FINISH: begin
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
