// tb_vpuf_control: checks the sequence at power-up (configuration sampled and
// clamped, exactly one model-builder start, model_ready only after the build
// is done) and the order of the per-challenge steps (virtual PUF, then NMQ,
// then the response), with stand-ins answering after random delays.
module tb_vpuf_control;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0] cfg_log2_w, log2_w;
  logic [2:0] cfg_log2_iter, log2_iter;
  logic mb_start, mb_done, model_ready, req, vp_start, vp_done, nmq_start, nmq_done, rsp_valid;
  int mb_starts, vp_starts, nmq_starts, rsps;

  vpuf_control dut (.clk, .rst_n, .cfg_log2_w, .cfg_log2_iter, .log2_w, .log2_iter,
                    .mb_start, .mb_done, .model_ready, .req, .vp_start, .vp_done,
                    .nmq_start, .nmq_done, .rsp_valid);

  always @(negedge clk) begin
    if (mb_start) mb_starts++;
    if (vp_start) vp_starts++;
    if (nmq_start) nmq_starts++;
    if (rsp_valid) rsps++;
  end

  task automatic step;
    @(negedge clk); #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic boot(input int w, input int it, input int exp_w, input int exp_it);
    step; rst_n = 0; cfg_log2_w = 5'(w); cfg_log2_iter = 3'(it);
    mb_starts = 0;
    step; rst_n = 1;
    repeat (20) begin
      step;
      checks++; if (model_ready) failures++;
    end
    checks++;
    if (mb_starts != 1 || int'(log2_w) != exp_w || int'(log2_iter) != exp_it) begin
      failures++; $display("boot: starts=%0d w=%0d it=%0d", mb_starts, log2_w, log2_iter);
    end
    mb_done = 1; step; mb_done = 0;
    checks++; if (!model_ready) failures++;
  endtask

  initial begin
    cfg_log2_w = 0; cfg_log2_iter = 0; mb_done = 0; req = 0; vp_done = 0; nmq_done = 0;
    boot(12, 2, 12, 2);
    boot(31, 7, 20, 4);
    for (int t = 0; t < 30; t++) begin
      vp_starts = 0; nmq_starts = 0; rsps = 0;
      req = 1; step; req = 0;
      checks++; if (vp_starts != 1 || nmq_starts != 0) failures++;
      repeat ($urandom_range(1, 10)) step;
      checks++; if (nmq_starts != 0 || rsps != 0) failures++;
      vp_done = 1; step; vp_done = 0;
      checks++; if (nmq_starts != 1) failures++;
      repeat ($urandom_range(0, 16)) step;
      checks++; if (rsps != 0) failures++;
      nmq_done = 1; step; nmq_done = 0;
      checks++; if (rsps != 1 || vp_starts != 1 || !model_ready) begin failures++; $display("sequence wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
