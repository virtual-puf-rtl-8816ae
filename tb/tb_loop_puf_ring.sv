// tb_loop_puf_ring: checks the oscillator model.  The output must rest at 0
// while disabled; each half period must equal the sum of the selected path
// delays within the jitter bound; and because every element contributes one
// path under c and the other under ~c, half(c) + half(~c) must be the same
// for every challenge.  The period must also change with the challenge.
module tb_loop_puf_ring;
  localparam int N = 64;
  int checks = 0, failures = 0;
  logic enable;
  logic [N-1:0] challenge;
  logic osc;

  loop_puf_ring #(.N(N)) dut (.enable, .challenge, .osc);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sum of the selected path delays in ns, from the element delays of the model
  function automatic real sel_sum(input logic [N-1:0] c);
    real t = 0;
    for (int k = 0; k < N; k++) t += c[k] ? real'(dut.path_delay[k][1]) : real'(dut.path_delay[k][0]);
    return t / 1000.0;
  endfunction

  // measured mean half period over 16 half periods
  task automatic measure(output real half);
    real t0;
    @(posedge osc); t0 = $realtime;
    repeat (8) @(posedge osc);
    half = ($realtime - t0) / 16;
  endtask

  initial begin
    real h, hc, hcb, total_ref;
    real expect_h;
    int n_distinct = 0;
    enable = 0; challenge = '0;
    #1000;
    checks++; if (osc !== 1'b0) failures++;
    // all-zero challenge: 64 elements around 400 units each
    enable = 1;
    measure(h);
    checks++;
    if (h < 64*0.360 || h > 64*0.440) begin failures++; $display("half period %0d out of range", h); end
    expect_h = h;
    for (int t = 0; t < 12; t++) begin
      challenge = {$urandom, $urandom};
      measure(hc);
      challenge = ~challenge;
      measure(hcb);
      if (t == 0) total_ref = hc + hcb;
      checks++;
      if (hc + hcb > total_ref + 0.004 || hc + hcb + 0.004 < total_ref) begin
        failures++;
        $display("sum of complementary half periods %0d vs %0d", hc + hcb, total_ref);
      end
      // the measured half period must match the sum of the selected path delays
      checks++;
      if (hcb > sel_sum(challenge) + 0.004 || hcb + 0.004 < sel_sum(challenge)) begin
        failures++; $display("half period %f ns, selected paths sum to %f ns", hcb, sel_sum(challenge));
      end
      if (hc > hcb + 0.02 || hcb > hc + 0.02) n_distinct++;
    end
    checks++;
    if (n_distinct < 9) begin failures++; $display("challenge hardly changes the period"); end
    enable = 0;
    #1000;
    checks++; if (osc !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
