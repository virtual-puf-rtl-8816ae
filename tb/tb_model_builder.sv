// tb_model_builder: runs the model builder against a stand-in Loop PUF that
// answers every measurement with a random raw response after a fixed delay.
// The testbench records the responses, forms the Hadamard transform itself
// (D_i = floor(16 * sum_j (+/-S_j) / 2^(log2 n + log2 iter)), sign from the
// parity of i AND j) and checks every delay word written, the folded mean
// from the abs_mean block, the row order sent to the Hadamard generator and
// the total cycle count, for n = 64 at 1, 4 and 16 iterations.
module tb_model_builder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- n = 64 instance ----------------
  localparam int LN = 6, N = 64, MEAS_LAT = 10;
  logic start, busy, done, hg_load, meas_start, meas_done, am_clear, am_valid, dm_we;
  logic [LN-1:0] hg_row, dm_addr;
  logic signed [15:0] meas_delta, dm_wdata;
  logic signed [19:0] am_value;
  logic [2:0] log2_iter;
  logic [15:0] mu_y;

  model_builder dut (.clk, .rst_n, .start, .log2_iter, .busy, .done, .hg_load, .hg_row,
                     .meas_start, .meas_done, .meas_delta, .am_clear, .am_valid, .am_value,
                     .dm_we, .dm_addr, .dm_wdata);
  abs_mean u_am (.clk, .rst_n, .clear(am_clear), .valid(am_valid), .value(am_value),
                 .log2_iter, .mu_y);

  // stand-in Loop PUF
  longint S [N];
  int cur_row, next_row;
  int row_errors;
  always @(posedge clk) begin
    if (hg_load) begin
      if (int'(hg_row) != next_row) row_errors++;
      cur_row = int'(hg_row);
      next_row++;
    end
  end
  initial begin
    meas_done = 0; meas_delta = 0;
    forever begin
      @(posedge clk);
      if (meas_start) begin
        int r;
        repeat (MEAS_LAT - 1) @(posedge clk);
        r = int'($urandom_range(4000)) - 2000;
        S[cur_row] += longint'(r);
        meas_delta <= 16'(r);
        meas_done  <= 1;
        @(posedge clk);
        meas_done  <= 0;
      end
    end
  end

  longint dw [N];
  int dw_count;
  always @(posedge clk) if (dm_we) begin dw[dm_addr] = longint'(dm_wdata); dw_count++; end

  task automatic build(input int li);
    int cycles;
    longint sum, expect_d, abs_sum, expect_mu;
    for (int j = 0; j < N; j++) S[j] = 0;
    next_row = 0; row_errors = 0; dw_count = 0;
    @(negedge clk); log2_iter = 3'(li); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (row_errors != 0 || next_row != N) begin failures++; $display("row order wrong"); end
    checks++;
    if (dw_count != N) begin failures++; $display("%0d delay writes", dw_count); end
    // exact cycle count: per measurement MEAS_LAT + 2, per row 2 more, transform n*(n+1)
    checks++;
    if (cycles != N * ((1 << li) * (MEAS_LAT + 2) + 2) + N * (N + 1) + 2) begin
      failures++; $display("build took %0d cycles", cycles);
    end
    for (int i = 0; i < N; i++) begin
      sum = 0;
      for (int j = 0; j < N; j++) sum += ($countones(i & j) % 2 == 1) ? S[j] : -S[j];
      expect_d = (sum * 16) >>> (LN + li);
      if (expect_d > 32767) expect_d = 32767;
      if (expect_d < -32768) expect_d = -32768;
      checks++;
      if (dw[i] != expect_d) begin
        failures++; $display("li=%0d D[%0d]=%0d expected %0d", li, i, dw[i], expect_d);
      end
    end
    abs_sum = 0;
    for (int j = 0; j < N; j++) abs_sum += (S[j] < 0) ? -S[j] : S[j];
    expect_mu = (abs_sum * 16) >> (LN + li);
    if (expect_mu > 65535) expect_mu = 65535;
    checks++;
    if (longint'(mu_y) != expect_mu) begin failures++; $display("mu_y=%0d expected %0d", mu_y, expect_mu); end
  endtask

  initial begin
    start = 0; log2_iter = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build(0);
    build(2);
    build(4);
    checks++; if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
