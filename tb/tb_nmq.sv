// tb_nmq: checks the quantiser against two independent references.
//  * Interval form: thresholds T_1..T_{Q-1} = m*s, m = -(Q/2-1)..(Q/2-1),
//    response 1 exactly on the intervals (T_1,T_2], (T_3,T_4], ... and above
//    T_{Q-1}.  Used for values that do not sit on a threshold.
//  * Closed form on every value: k = number of positive thresholds below
//    |delta|, response = sign(delta) XOR (k odd).
// Also checks the Q = 8 pattern 0 1 0 1 0 1 0 1 across the axis, and the
// cycle count (at most Q/2 cycles).
module tb_nmq;
  import vpuf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, resp;
  logic signed [21:0] delta;
  logic [15:0] mu_y;
  q_sel_e q_sel;

  nmq dut (.clk, .rst_n, .start, .delta, .mu_y, .q_sel, .busy, .done, .resp);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_interval(input longint d, input longint s, input int q, output bit on_edge);
    longint th [$];
    int idx;
    on_edge = 0;
    for (int m = -(q/2 - 1); m <= q/2 - 1; m++) th.push_back(m * s);
    foreach (th[t]) if (d == th[t]) on_edge = 1;
    // idx = number of thresholds strictly below d (0..Q-1); interval idx+1
    idx = 0;
    foreach (th[t]) if (th[t] < d) idx++;
    // intervals numbered 1..Q from the left: even-numbered ones give 1
    return ((idx + 1) % 2 == 0) ? 1 : 0;
  endfunction

  function automatic int ref_closed(input longint d, input longint s, input int q);
    longint mag = d < 0 ? -d : d;
    int k = 0;
    for (int m = 1; m <= q/2 - 1; m++) if (mag > m * s) k++;
    return (d < 0) ^ (k % 2);
  endfunction

  task automatic quantise(input longint d, input int unsigned mu, input int qs, output int r, output int cycles);
    @(negedge clk); delta = 22'(d); mu_y = 16'(mu); q_sel = q_sel_e'(qs); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    r = int'(resp);
  endtask

  initial begin
    int r, cyc, q, exp_r;
    bit edge_pt;
    longint d, s;
    int unsigned mu;
    int pattern [8];
    start = 0; delta = 0; mu_y = 0; q_sel = Q4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Q = 8 with mu = 16.0 (s = 8.0): one point inside each interval
    for (int t = 0; t < 8; t++) begin
      quantise(longint'((-28 + 8 * t) * 16), 16 * 16, 1, r, cyc);
      pattern[t] = r;
    end
    checks++;
    if (pattern != '{0, 1, 0, 1, 0, 1, 0, 1}) begin
      failures++; $display("Q=8 pattern %p", pattern);
    end
    // random sweep over all Q
    for (int n = 0; n < 3000; n++) begin
      int qs = n % 4;
      q = 4 << qs;
      mu = $urandom_range(30, 4000);
      s = longint'(mu >> qs);
      d = longint'($urandom_range(0, 2 * 2 * q * (s + 1))) - 2 * q * (s + 1);
      if (n % 7 == 0) d = ((n % 3) - 1) * (n % (q / 2)) * s;   // hit thresholds
      quantise(d, mu, qs, r, cyc);
      checks++;
      exp_r = ref_closed(d, s, q);
      if (r != exp_r) begin
        failures++; $display("Q=%0d mu=%0d d=%0d resp=%0d expected %0d", q, mu, d, r, exp_r);
      end
      exp_r = ref_interval(d, s, q, edge_pt);
      if (!edge_pt) begin
        checks++;
        if (r != exp_r) begin failures++; $display("interval ref: Q=%0d d=%0d resp=%0d", q, d, r); end
      end
      checks++;
      if (cyc > q / 2 + 1) begin failures++; $display("Q=%0d took %0d cycles", q, cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
