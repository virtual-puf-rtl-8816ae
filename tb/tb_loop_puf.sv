// tb_loop_puf: drives the measurement logic with an ideal square wave whose
// period depends on the challenge the logic applies (bit 0 selects a fast or
// a slow period), and checks delta = count(c) - count(~c) against the count
// expected from the periods, the 2*w + 2 cycle latency, and the handshake.
module tb_loop_puf;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, ro_enable, ro_osc;
  logic [N-1:0] challenge, ro_challenge;
  logic [4:0] log2_w;
  logic signed [15:0] delta;

  loop_puf #(.N(N)) dut (.clk, .rst_n, .start, .challenge, .log2_w, .busy, .done, .delta,
                         .ro_enable, .ro_challenge, .ro_osc);

  // oscillator stand-in: half period 23 or 37 time units
  initial begin
    ro_osc = 0;
    forever begin
      if (!ro_enable) begin ro_osc = 0; @(posedge ro_enable); end
      else begin
        #(ro_challenge[0] ? 23 : 37);
        ro_osc = ro_enable ? ~ro_osc : 1'b0;
      end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [N-1:0] c, input int lw);
    int cycles, w, expect_d;
    w = 1 << lw;
    // expected: periods of 46 or 74 units within w*10 units
    expect_d = c[0] ? (w*10/46 - w*10/74) : (w*10/74 - w*10/46);
    @(negedge clk); challenge = c; log2_w = 5'(lw); start = 1;
    @(negedge clk); start = 0;
    checks++; if (!busy) begin failures++; $display("busy not raised"); end
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 2*w + 2) begin failures++; $display("latency %0d expected %0d", cycles, 2*w+2); end
    checks++;
    if (delta > expect_d + 2 || delta < expect_d - 2) begin
      failures++; $display("w=%0d c=%b delta=%0d expected %0d", w, c, delta, expect_d);
    end
    @(negedge clk);
    checks++; if (busy || done) failures++;
  endtask

  initial begin
    start = 0; challenge = '0; log2_w = 5'd8;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(8'h01, 8);
    run(8'h00, 8);
    run(8'hA5, 10);
    run(8'h5A, 10);
    run(8'h33, 6);
    run(8'hFF, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
