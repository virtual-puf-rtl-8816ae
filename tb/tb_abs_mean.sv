// tb_abs_mean: feeds n = 64 signed response sums, some at the extremes of
// their width, and checks mu_y = (16 * sum |S_j|) >> (6 + log2_iter) with
// saturation, for every iteration setting, and that `clear` restarts the sum.
module tb_abs_mean;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, valid;
  logic signed [19:0] value;
  logic [2:0] log2_iter;
  logic [15:0] mu_y;

  abs_mean dut (.clk, .rst_n, .clear, .valid, .value, .log2_iter, .mu_y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint abs_sum, expect_mu;
    clear = 0; valid = 0; value = 0; log2_iter = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      abs_sum = 0;
      for (int j = 0; j < 64; j++) begin
        int v;
        case (round)
          0: v = (j % 2) ? -524288 : 524287;              // extremes, saturates
          1: v = -int'($urandom_range(100));
          default: v = int'($urandom_range(2 * 32000 * round)) - 32000 * round;
        endcase
        abs_sum += (v < 0) ? -v : v;
        valid = 1; value = 20'(v);
        @(negedge clk);
        // gaps without valid must not add
        valid = 0; value = 20'(12345);
        @(negedge clk);
      end
      for (int li = 0; li <= 4; li++) begin
        log2_iter = 3'(li);
        #1;
        expect_mu = (abs_sum * 16) >> (6 + li);
        if (expect_mu > 65535) expect_mu = 65535;
        checks++;
        if (longint'(mu_y) != expect_mu) begin
          failures++; $display("round %0d li=%0d mu=%0d expected %0d", round, li, mu_y, expect_mu);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
