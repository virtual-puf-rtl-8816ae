// tb_puf_interface: checks that no challenge is taken before model_ready,
// that an accepted challenge is passed on with one `req` pulse and held
// stable, that the response is held until resp_ready, and that a new
// challenge is refused while one is being answered.
module tb_puf_interface;
  import vpuf_pkg::*;
  localparam int N = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic model_ready, chal_valid, chal_ready, resp_valid, resp_ready, resp_data;
  logic req, rsp_valid, rsp_bit;
  logic [N-1:0] chal_data, req_challenge;
  q_sel_e chal_q, req_q;
  int req_count;

  puf_interface dut (.clk, .rst_n, .model_ready, .chal_valid, .chal_ready, .chal_data, .chal_q,
                     .resp_valid, .resp_ready, .resp_data, .req, .req_challenge, .req_q,
                     .rsp_valid, .rsp_bit);

  always @(posedge clk) if (req) req_count++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] c;
    logic b;
    model_ready = 0; chal_valid = 0; chal_data = '0; chal_q = Q4; resp_ready = 0;
    rsp_valid = 0; rsp_bit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // offered before the model exists: refused
    chal_valid = 1; chal_data = 64'hDEAD_BEEF_0000_0001;
    repeat (5) begin
      @(negedge clk);
      checks++; if (chal_ready || req) failures++;
    end
    model_ready = 1;
    for (int t = 0; t < 40; t++) begin
      c = {$urandom, $urandom}; b = 1'($urandom);
      chal_valid = 1; chal_data = c; chal_q = q_sel_e'(t % 4);
      #1;
      checks++; if (!chal_ready) begin failures++; $display("not ready"); end
      req_count = 0;
      @(negedge clk);
      chal_valid = 1; chal_data = ~c;          // must be refused while busy
      repeat (3) begin
        checks++; if (chal_ready) failures++;
        @(negedge clk);
      end
      checks++;
      if (req_count != 1 || req_challenge !== c || req_q != q_sel_e'(t % 4)) begin
        failures++; $display("request wrong: %0d pulses", req_count);
      end
      chal_valid = 0;
      rsp_valid = 1; rsp_bit = b;
      @(negedge clk);
      rsp_valid = 0; rsp_bit = ~b;
      repeat (t % 4) begin
        checks++; if (!resp_valid || resp_data !== b) failures++;
        @(negedge clk);
      end
      checks++; if (!resp_valid || resp_data !== b) begin failures++; $display("response lost"); end
      resp_ready = 1;
      @(negedge clk);
      resp_ready = 0;
      checks++; if (resp_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
