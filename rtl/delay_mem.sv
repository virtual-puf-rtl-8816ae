// delay_mem: storage of the delay model D.
//
// Holds the n fixed-point delay differences D_0..D_{n-1} computed by the model
// builder at power-up (n = 64 words of 16 bits, format 12.4, 1024 bits as in
// the method).  Nothing else in the design can read it: its only reader is the
// virtual PUF, which walks it once per challenge.
//
// Interface: one write port (we, waddr, wdata) used while the model is built,
// one read port with a registered output: rdata shows word raddr one cycle
// after raddr is presented.  The memory is written as an array so it maps to
// distributed or block RAM; it is not reset, and the rest of the design
// reads it only after all n words have been written.
module delay_mem
  import vpuf_pkg::*;
#(
  parameter int unsigned LOG2_N_P = LOG2_N,
  parameter int unsigned WIDTH    = D_W
) (
  input  logic                clk,
  input  logic                we,
  input  logic [LOG2_N_P-1:0] waddr,
  input  logic [WIDTH-1:0]    wdata,
  input  logic [LOG2_N_P-1:0] raddr,
  output logic [WIDTH-1:0]    rdata
);
  logic [WIDTH-1:0] mem [1 << LOG2_N_P];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
