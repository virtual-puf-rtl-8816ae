// tb_hadamard_gen: checks every row of H_8 against the matrix printed for
// n = 8 (rows written as bits, +1 -> 1, -1 -> 0), and every row of H_64
// for orthogonality: each pair of distinct rows agrees in exactly 32 places.
module tb_hadamard_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // H_8 rows from the n = 8 example, bit j = column j
  logic [7:0] h8_ref [8] = '{8'b0000_0000, 8'b1010_1010, 8'b1100_1100, 8'b0110_0110,
                             8'b1111_0000, 8'b0101_1010, 8'b0011_1100, 8'b1001_0110};

  logic load8, load64;
  logic [2:0] row8;
  logic [5:0] row64;
  logic [7:0]  ch8;
  logic [63:0] ch64;
  logic [63:0] rows64 [64];

  hadamard_gen #(.LOG2_N_P(3)) u8  (.clk, .rst_n, .load(load8),  .row(row8),  .challenge(ch8));
  hadamard_gen                 u64 (.clk, .rst_n, .load(load64), .row(row64), .challenge(ch64));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load8 = 0; load64 = 0; row8 = 0; row64 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 8; r++) begin
      @(negedge clk); load8 = 1; row8 = 3'(r);
      @(negedge clk); load8 = 0;
      checks++;
      if (ch8 !== h8_ref[r]) begin
        failures++;
        $display("H8 row %0d: got %b expected %b", r, ch8, h8_ref[r]);
      end
    end
    // hold: without load the register keeps its value
    row8 = 3'd1; @(negedge clk);
    checks++; if (ch8 !== h8_ref[7]) failures++;
    for (int r = 0; r < 64; r++) begin
      @(negedge clk); load64 = 1; row64 = 6'(r);
      @(negedge clk); load64 = 0;
      rows64[r] = ch64;
    end
    for (int a = 0; a < 64; a++)
      for (int b = a + 1; b < 64; b++) begin
        checks++;
        if ($countones(~(rows64[a] ^ rows64[b])) != 32) begin
          failures++;
          $display("rows %0d and %0d not orthogonal", a, b);
        end
      end
    // symmetry H = H^T
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++)
        if (rows64[a][b] != rows64[b][a]) begin failures++; checks++; end
    checks++;
    if (rows64[0] != 64'd0 || rows64[63][63] != 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
