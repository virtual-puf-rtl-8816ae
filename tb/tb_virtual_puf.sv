// tb_virtual_puf: loads a delay memory with random 12.4 delays, asks the
// virtual PUF for random challenges and compares delta with the signed sum
// the testbench forms itself; checks the n + 2 cycle latency.  Runs at n = 64
// and at n = 8.
module tb_virtual_puf;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // n = 64
  logic we, start, busy, done;
  logic [5:0] waddr, raddr;
  logic signed [15:0] wdata, rdata;
  logic [63:0] challenge;
  logic signed [21:0] delta;
  delay_mem   u_mem (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  virtual_puf dut   (.clk, .rst_n, .start, .challenge, .busy, .done, .delta, .raddr, .rdata);

  // n = 8
  logic we8, start8, busy8, done8;
  logic [2:0] waddr8, raddr8;
  logic signed [15:0] wdata8, rdata8;
  logic [7:0] challenge8;
  logic signed [18:0] delta8;
  delay_mem   #(.LOG2_N_P(3)) u_mem8 (.clk, .we(we8), .waddr(waddr8), .wdata(wdata8), .raddr(raddr8), .rdata(rdata8));
  virtual_puf #(.LOG2_N_P(3)) dut8   (.clk, .rst_n, .start(start8), .challenge(challenge8), .busy(busy8),
                                      .done(done8), .delta(delta8), .raddr(raddr8), .rdata(rdata8));

  int D [64];
  int D8 [8];

  initial begin
    int cycles, expect_d;
    we = 0; start = 0; waddr = 0; wdata = 0; challenge = 0;
    we8 = 0; start8 = 0; waddr8 = 0; wdata8 = 0; challenge8 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 64; k++) begin
      D[k] = int'($urandom_range(65535)) - 32768;
      if (k < 8) D8[k] = D[k];
      @(negedge clk); we = 1; waddr = 6'(k); wdata = 16'(D[k]);
      we8 = (k < 8); waddr8 = 3'(k); wdata8 = 16'(D[k]);
    end
    @(negedge clk); we = 0; we8 = 0;
    for (int t = 0; t < 200; t++) begin
      challenge = (t == 0) ? '0 : (t == 1) ? '1 : {$urandom, $urandom};
      expect_d = 0;
      for (int k = 0; k < 64; k++) expect_d += challenge[k] ? D[k] : -D[k];
      start = 1;
      @(negedge clk); start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      checks++;
      if (int'(delta) != expect_d) begin failures++; $display("c=%h delta=%0d expected %0d", challenge, delta, expect_d); end
      checks++;
      if (cycles != 66) begin failures++; $display("latency %0d", cycles); end
    end
    for (int t = 0; t < 256; t++) begin
      challenge8 = 8'(t);
      expect_d = 0;
      for (int k = 0; k < 8; k++) expect_d += challenge8[k] ? D8[k] : -D8[k];
      start8 = 1;
      @(negedge clk); start8 = 0;
      while (!done8) @(negedge clk);
      checks++;
      if (int'(delta8) != expect_d) begin failures++; $display("n=8 c=%h delta=%0d expected %0d", challenge8, delta8, expect_d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
