// puf_interface: challenge/response port of the Virtual PUF.
//
// The user side is two valid/ready handshakes: a challenge (N bits plus the
// quantisation level select) goes in, a one-bit response comes out.  A
// challenge is accepted only when the model has been built and no other
// challenge is being answered, so `chal_ready` stays low during the whole
// power-up model building.  The accepted challenge is held in a register
// for the virtual PUF and the quantiser; `req` pulses once to start the
// computation, and the answer arriving on rsp_valid/rsp_bit is held on
// resp_valid/resp_data until the user takes it.
// The method only names this block (a link to the authentication server);
// the handshakes and the one-request-at-a-time policy are this design's.
// Timing: req one cycle after the challenge handshake; resp_valid one cycle
// after rsp_valid; the next challenge may be accepted the cycle after the
// response handshake.
module puf_interface
  import vpuf_pkg::*;
#(
  parameter int unsigned N = 1 << LOG2_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         model_ready,
  // user side
  input  logic         chal_valid,
  output logic         chal_ready,
  input  logic [N-1:0] chal_data,
  input  q_sel_e       chal_q,
  output logic         resp_valid,
  input  logic         resp_ready,
  output logic         resp_data,
  // design side
  output logic         req,
  output logic [N-1:0] req_challenge,
  output q_sel_e       req_q,
  input  logic         rsp_valid,
  input  logic         rsp_bit
);
  typedef enum logic [1:0] {WAIT_CHAL, COMPUTE, HOLD_RESP} state_e;
  state_e state;

  assign chal_ready = (state == WAIT_CHAL) && model_ready;
  assign resp_valid = (state == HOLD_RESP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= WAIT_CHAL;
      req           <= 1'b0;
      req_challenge <= '0;
      req_q         <= Q4;
      resp_data     <= 1'b0;
    end else begin
      req <= 1'b0;
      case (state)
        WAIT_CHAL: if (chal_valid && chal_ready) begin
          req_challenge <= chal_data;
          req_q         <= chal_q;
          req           <= 1'b1;
          state         <= COMPUTE;
        end
        COMPUTE: if (rsp_valid) begin
          resp_data <= rsp_bit;
          state     <= HOLD_RESP;
        end
        HOLD_RESP: if (resp_ready) state <= WAIT_CHAL;
        default: state <= WAIT_CHAL;
      endcase
    end
  end

  // a response once offered stays offered, unchanged, until taken
  a_resp_held: assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid && !resp_ready |=> resp_valid && $stable(resp_data));
  // no challenge is taken before the model exists
  a_no_early_chal: assert property (@(posedge clk) disable iff (!rst_n)
    chal_ready |-> model_ready);

endmodule
