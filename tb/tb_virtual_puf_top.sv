// tb_virtual_puf_top: end-to-end test of the Virtual PUF at its default
// sizes (n = 64, 12.4 delay model, oscillator model with default delays).
//
// Each phase releases reset (power-up), lets the design build its model from
// the oscillator, then sends random challenges at all four quantisation
// levels.  The testbench watches the raw Loop PUF measurements as they are
// made (the only physical input), and from them alone works out its own
// model: the summed Hadamard responses S_j, the delays
// D_i = floor(16 * sum_j (+/-S_j) / 2^(6 + log2 iter)) and the folded mean.
// Every response of the design must equal NMQ(sum_k (+/-D_k)) computed with
// that reference model.  It also checks that
//  * the recovered delays track the oscillator's real path-delay differences
//    (correlation above 0.9), i.e. the model describes the physical PUF;
//  * the build takes n * (iter * (2w + 4) + 2) + n * (n + 1) + 4 cycles, and a
//    challenge is answered within n + Q/2 + 8 cycles and 1.3 us;
//  * challenges are held off while the model is built, responses wait for
//    resp_ready, and both responses, every Q, the outermost quantile and
//    iteration averaging all occur.
// The counting window is 2^14 cycles (the design allows up to 2^20), which
// keeps a build at about two million cycles per iteration.
module tb_virtual_puf_top;
  import vpuf_pkg::*;
  localparam int N = 64, LN = 6, LW = 14;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5ns clk = ~clk;

  logic [4:0]   cfg_log2_w;
  logic [2:0]   cfg_log2_iter;
  logic         model_ready, chal_valid, chal_ready, resp_valid, resp_ready, resp_data;
  logic [N-1:0] chal_data;
  logic [1:0]   chal_q;

  virtual_puf_top dut (.clk, .rst_n, .cfg_log2_w, .cfg_log2_iter, .model_ready,
                       .chal_valid, .chal_ready, .chal_data, .chal_q,
                       .resp_valid, .resp_ready, .resp_data);

  // mechanism counters
  int n_build, n_stall, n_backpressure, n_resp0, n_resp1, n_outer, n_iter_avg;
  int n_q [4];

  initial begin
    #2s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- observe the physical measurements ----
  longint S [N];
  int     meas_count;
  always @(posedge clk) begin
    if (rst_n && dut.u_lpuf.done) begin
      logic [N-1:0] c;
      int row;
      c = dut.hadamard_challenge;
      row = {c[32], c[16], c[8], c[4], c[2], c[1]};
      S[row] += longint'(dut.u_lpuf.delta);
      meas_count++;
    end
  end

  longint D [N];
  longint mu;

  task automatic reference_model(input int li);
    longint sum, a;
    for (int i = 0; i < N; i++) begin
      sum = 0;
      for (int j = 0; j < N; j++) sum += ($countones(i & j) % 2) ? S[j] : -S[j];
      D[i] = (sum * 16) >>> (LN + li);
      if (D[i] > 32767) D[i] = 32767;
      if (D[i] < -32768) D[i] = -32768;
    end
    a = 0;
    for (int j = 0; j < N; j++) a += (S[j] < 0) ? -S[j] : S[j];
    mu = (a * 16) >> (LN + li);
    if (mu > 65535) mu = 65535;
  endtask

  // correlation of D_k with d0_k - d1_k of the oscillator model
  function automatic real correlation();
    real x [N], y [N];
    real mx = 0, my = 0, sxy = 0, sxx = 0, syy = 0;
    for (int k = 0; k < N; k++) begin
      x[k] = real'(D[k]);
      y[k] = real'(int'(dut.u_ring.path_delay[k][0]) - int'(dut.u_ring.path_delay[k][1]));
      mx += x[k] / N; my += y[k] / N;
    end
    for (int k = 0; k < N; k++) begin
      sxy += (x[k] - mx) * (y[k] - my);
      sxx += (x[k] - mx) * (x[k] - mx);
      syy += (y[k] - my) * (y[k] - my);
    end
    return sxy / $sqrt(sxx * syy);
  endfunction

  function automatic int expected_resp(input logic [N-1:0] c, input int qs, output bit outer);
    longint vd = 0, mag, s;
    int k = 0, q = 4 << qs;
    for (int i = 0; i < N; i++) vd += c[i] ? D[i] : -D[i];
    s = mu >> qs;
    mag = vd < 0 ? -vd : vd;
    for (int m = 1; m <= q / 2 - 1; m++) if (mag > m * s) k++;
    outer = (k == q / 2 - 1);
    return int'(vd < 0) ^ (k % 2);
  endfunction

  task automatic power_up(input int li);
    longint cycles;
    longint lo, hi;
    real r;
    for (int j = 0; j < N; j++) S[j] = 0;
    meas_count = 0;
    @(negedge clk); rst_n = 0; cfg_log2_w = 5'(LW); cfg_log2_iter = 3'(li);
    repeat (3) @(negedge clk);
    rst_n = 1;
    cycles = 0;
    // a challenge offered during the build must not be taken
    chal_valid = 1; chal_data = '1; chal_q = 0;
    while (!model_ready) begin
      @(negedge clk); cycles++;
      if (chal_ready && !model_ready) begin failures++; $display("challenge accepted during build"); end
      if (cycles == 100) begin checks++; n_stall++; end
    end
    chal_valid = 0;
    n_build++;
    if (li > 0) n_iter_avg++;
    checks++;
    if (meas_count != N << li) begin failures++; $display("%0d measurements", meas_count); end
    lo = 2 * N * (longint'(1) << li) * (longint'(1) << LW);
    // per measurement 2w + 4 cycles, per row 2, transform n + 1 per delay, 4 to start and end
    hi = N * ((longint'(1) << li) * (2 * (longint'(1) << LW) + 4) + 2) + N * (N + 1) + 4;
    checks++;
    if (cycles != hi) begin failures++; $display("build took %0d cycles, expected %0d", cycles, hi); end
    $display("build with %0d iterations: %0d cycles (2*n*i*w = %0d)", 1 << li, cycles, lo);
    reference_model(li);
    r = correlation();
    $display("mu_Y = %0d/16, correlation of model with oscillator = %f", mu, r);
    checks++;
    if (r < 0.9) begin failures++; $display("model does not follow the oscillator"); end
    checks++;
    if (longint'(dut.mu_y) != mu) begin failures++; $display("mu_y %0d vs %0d", dut.mu_y, mu); end
  endtask

  task automatic challenges(input int count);
    int cyc, max_cyc, exp_r, qs;
    bit outer;
    logic [N-1:0] c;
    for (int t = 0; t < count; t++) begin
      qs = t % 4;
      c = (t < 4) ? '0 : {$urandom, $urandom};
      @(negedge clk); chal_valid = 1; chal_data = c; chal_q = 2'(qs);
      while (!chal_ready) @(negedge clk);
      @(negedge clk); chal_valid = 0;
      cyc = 1;
      while (!resp_valid) begin @(negedge clk); cyc++; end
      // hold the response back now and then
      if (t % 5 == 0) begin
        repeat (3) @(negedge clk);
        checks++;
        if (!resp_valid) failures++;
        n_backpressure++;
      end
      exp_r = expected_resp(c, qs, outer);
      checks++;
      if (int'(resp_data) != exp_r) begin
        failures++; $display("challenge %h Q=%0d: resp %0d expected %0d (delta %0d mu %0d)", c, 4 << qs, resp_data, exp_r, dut.vp_delta, mu);
      end
      checks++;
      if (cyc > N + (2 << qs) + 8 || cyc > 130) begin failures++; $display("answer took %0d cycles", cyc); end
      n_q[qs]++;
      if (exp_r == 1) n_resp1++; else n_resp0++;
      if (outer) n_outer++;
      resp_ready = 1;
      @(negedge clk); resp_ready = 0;
    end
  endtask

  initial begin
    chal_valid = 0; chal_data = '0; chal_q = 0; resp_ready = 0;
    cfg_log2_w = 5'(LW); cfg_log2_iter = 0;
    power_up(0);
    challenges(300);
    power_up(1);
    challenges(200);
    // every mechanism must have occurred
    checks++; if (n_build < 2)        begin failures++; $display("model built %0d times", n_build); end
    checks++; if (n_stall == 0)       begin failures++; $display("no challenge held off"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("no response back-pressure"); end
    checks++; if (n_resp0 == 0 || n_resp1 == 0) begin failures++; $display("responses one-sided"); end
    checks++; if (n_outer == 0)       begin failures++; $display("outermost quantile never reached"); end
    checks++; if (n_iter_avg == 0)    begin failures++; $display("no iteration averaging"); end
    foreach (n_q[i]) begin checks++; if (n_q[i] == 0) begin failures++; $display("Q=%0d never used", 4 << i); end end
    $display("builds=%0d stalls=%0d backpressure=%0d resp0=%0d resp1=%0d outer=%0d Q4/8/16/32=%0d/%0d/%0d/%0d",
             n_build, n_stall, n_backpressure, n_resp0, n_resp1, n_outer, n_q[0], n_q[1], n_q[2], n_q[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
