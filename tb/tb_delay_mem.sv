// tb_delay_mem: writes random words to every address, reads them back in a
// shuffled order and checks the one-cycle read latency; also checks that a
// read in the cycle of a write returns the old word.
module tb_delay_mem;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [5:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [64];

  delay_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int k = 0; k < 64; k++) begin
      model[k] = 16'($urandom);
      @(negedge clk); we = 1; waddr = 6'(k); wdata = model[k];
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 300; t++) begin
      raddr = 6'($urandom);
      @(negedge clk);
      checks++;
      if (rdata !== model[raddr]) begin failures++; $display("addr %0d: %h vs %h", raddr, rdata, model[raddr]); end
    end
    // read-during-write: old data
    raddr = 6'd5; we = 1; waddr = 6'd5; wdata = ~model[5];
    @(negedge clk);
    checks++; if (rdata !== model[5]) failures++;
    we = 0; model[5] = ~model[5];
    @(negedge clk);
    checks++; if (rdata !== model[5]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
