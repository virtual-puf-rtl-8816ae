// tb_vpuf_mismatch: the mismatch experiment, scaled down for simulation.
//
// A Virtual PUF is enrolled (first power-up: its responses to 1000 random
// challenges at each Q are recorded as the server's reference), then powered
// up again; the second model is built from fresh, noisy measurements and the
// same challenges are asked again.  The fraction of differing bits is the
// mismatch error.  Two copies of the same device (same oscillator seed,
// independent noise) run side by side: one with the 12.4 delay model, one
// with a 12.0 model (no fraction bits).  The oscillator is run with heavy
// jitter (+/-1 ns per half period) and short windows so that noise matters.
// Three settings are measured: (1 iteration, w = 2^13), (16, 2^13) and
// (16, 2^12).  A third copy, built for up to 64 iterations
// (LOG2_ITER_MAX_P = 6), runs along and is measured on its own in a fourth
// setting, (64, 2^12), where the two default copies clamp to 16.  Checks:
//  * perfect reliability: within one power-up the same challenge always gets
//    the same answer;
//  * for the 12.4 model, the mismatch grows with Q (Q = 32 above Q = 4) and
//    stays below 50%;
//  * at Q = 32, 16 iterations beat 1, the larger window beats the smaller
//    one, and the 12.4 model beats the 12.0 model;
//  * 64 iterations are no worse than 16 (within one point) at Q = 32, and
//    their mismatch also grows with Q and stays below 50%.
// The 12.0 copy is only reported otherwise: without fraction bits the folded
// mean at these small windows is a few units, so for large Q the threshold
// step rounds to 1 or 0 and its responses degenerate.
module tb_vpuf_mismatch;
  localparam int N = 64, NCH = 1000, NSET = 4, NDEV = 3;
  localparam int SET_ITER [NSET] = '{0, 4, 4, 6};     // log2 iterations
  localparam int SET_W    [NSET] = '{13, 13, 12, 12}; // log2 window
  localparam int DEV_FRAC [NDEV] = '{4, 0, 4};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5ns clk = ~clk;

  logic [4:0]   cfg_log2_w;
  logic [2:0]   cfg_log2_iter;
  logic         chal_valid, resp_ready;
  logic [N-1:0] chal_data;
  logic [1:0]   chal_q;
  logic [NDEV-1:0] model_ready, chal_ready, resp_valid, resp_data;
  localparam logic [NDEV-1:0] ALL = '1;

  // index 0: 12.4 model (default), 1: 12.0 model, 2: 12.4 model, up to 64
  // iterations
  virtual_puf_top #(.RING_JITTER(1000)) dut_p4 (
    .clk, .rst_n, .cfg_log2_w, .cfg_log2_iter, .model_ready(model_ready[0]),
    .chal_valid, .chal_ready(chal_ready[0]), .chal_data, .chal_q,
    .resp_valid(resp_valid[0]), .resp_ready, .resp_data(resp_data[0]));
  virtual_puf_top #(.RING_JITTER(1000), .D_FRAC_P(0)) dut_p0 (
    .clk, .rst_n, .cfg_log2_w, .cfg_log2_iter, .model_ready(model_ready[1]),
    .chal_valid, .chal_ready(chal_ready[1]), .chal_data, .chal_q,
    .resp_valid(resp_valid[1]), .resp_ready, .resp_data(resp_data[1]));
  virtual_puf_top #(.RING_JITTER(1000), .LOG2_ITER_MAX_P(6)) dut_i6 (
    .clk, .rst_n, .cfg_log2_w, .cfg_log2_iter, .model_ready(model_ready[2]),
    .chal_valid, .chal_ready(chal_ready[2]), .chal_data, .chal_q,
    .resp_valid(resp_valid[2]), .resp_ready, .resp_data(resp_data[2]));

  initial begin
    #5s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] chal [NCH];
  bit enrolled [NDEV][4][NCH];
  bit again    [NDEV][4][NCH];

  task automatic power_up(input int s);
    @(negedge clk); rst_n = 0; cfg_log2_w = 5'(SET_W[s]); cfg_log2_iter = 3'(SET_ITER[s]);
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (model_ready != ALL) @(negedge clk);
  endtask

  // all copies take the challenge in the same cycle (they are ready at the
  // same time); the responses are collected as each arrives
  task automatic ask(input logic [N-1:0] c, input int qs, output bit r [NDEV]);
    logic [NDEV-1:0] got;
    chal_valid = 1; chal_data = c; chal_q = 2'(qs);
    while (chal_ready != ALL) @(negedge clk);
    @(negedge clk); chal_valid = 0;
    got = '0;
    while (got != ALL) begin
      for (int d = 0; d < NDEV; d++) if (resp_valid[d] && !got[d]) begin r[d] = resp_data[d]; got[d] = 1; end
      if (got != ALL) @(negedge clk);
    end
    resp_ready = 1; @(negedge clk); resp_ready = 0;
  endtask

  task automatic collect(output bit res [NDEV][4][NCH]);
    bit r [NDEV];
    for (int qs = 0; qs < 4; qs++)
      for (int t = 0; t < NCH; t++) begin
        ask(chal[t], qs, r);
        for (int d = 0; d < NDEV; d++) res[d][qs][t] = r[d];
      end
  endtask

  real mm [NDEV][NSET][4];   // mismatch in percent: [copy][setting][Q]

  // the copy whose trend checks apply in a setting
  function automatic bit checked(int d, int s);
    return s < 3 ? d == 0 : d == 2;
  endfunction

  // the copies reported in a setting (the 64-iteration copy only in the last)
  function automatic bit shown(int d, int s);
    return s < 3 ? d < 2 : d == 2;
  endfunction

  initial begin
    bit r [NDEV];
    chal_valid = 0; chal_data = '0; chal_q = 0; resp_ready = 0;
    cfg_log2_w = 0; cfg_log2_iter = 0;
    foreach (chal[t]) chal[t] = {$urandom, $urandom};
    for (int s = 0; s < NSET; s++) begin
      power_up(s);
      collect(enrolled);
      // reliability: ask 200 of them again in the same power-up
      for (int t = 0; t < 200; t++) begin
        ask(chal[t], 3, r);
        for (int d = 0; d < NDEV; d++) begin
          checks++;
          if (r[d] != enrolled[d][3][t]) begin failures++; $display("response changed without a rebuild"); end
        end
      end
      power_up(s);
      collect(again);
      for (int d = 0; d < NDEV; d++) begin
        if (!shown(d, s)) continue;
        for (int qs = 0; qs < 4; qs++) begin
          int diff;
          diff = 0;
          for (int t = 0; t < NCH; t++) if (enrolled[d][qs][t] != again[d][qs][t]) diff++;
          mm[d][s][qs] = 100.0 * diff / NCH;
          if (checked(d, s)) begin
            checks++;
            if (mm[d][s][qs] >= 50.0) begin failures++; $display("mismatch at chance level"); end
          end
        end
        $display("p=12.%0d i=%0d w=2^%0d: mismatch Q=4 %0.1f%%  Q=8 %0.1f%%  Q=16 %0.1f%%  Q=32 %0.1f%%",
                 DEV_FRAC[d], 1 << SET_ITER[s], SET_W[s], mm[d][s][0], mm[d][s][1], mm[d][s][2], mm[d][s][3]);
        if (checked(d, s)) begin
          checks++;
          if (mm[d][s][3] < mm[d][s][0]) begin failures++; $display("mismatch does not grow with Q"); end
        end
      end
    end
    checks++;
    if (mm[0][1][3] > mm[0][0][3]) begin failures++; $display("iterations did not help at Q = 32"); end
    checks++;
    if (mm[0][1][3] > mm[0][2][3]) begin failures++; $display("larger window did not help at Q = 32"); end
    checks++;
    if (mm[0][1][3] > mm[1][1][3]) begin failures++; $display("fraction bits did not help at Q = 32"); end
    checks++;
    if (mm[2][3][3] > mm[0][2][3] + 1.0) begin failures++; $display("64 iterations worse than 16 at Q = 32"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
