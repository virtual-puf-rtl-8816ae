// loop_puf: Loop PUF measurement logic (oscillation counter and sequencer).
//
// One measurement of challenge c gives the raw response
//     delta_c = count(c) - count(~c),
// the number of oscillator periods seen in a window of w clock cycles with
// challenge c, minus the number seen in a second window of w cycles with the
// complementary challenge.  This follows the method; the counting scheme is
// this design's choice: the oscillator output is brought into the clock
// domain by a two-flop synchroniser and its rising edges are counted, which
// needs the oscillator to run below half the clock frequency (the default
// oscillator model runs at about 20 MHz against a 100 MHz clock).
//
// Interface: pulse `start` with `challenge` valid; `busy` is high during the
// measurement; `done` pulses for one cycle with `delta` valid, saturated to
// DELTA_W_P signed bits.  The window is w = 2^log2_w cycles, log2_w <= 20.
// The oscillator is enabled for the whole measurement and switched from c to
// ~c between the two windows.
// Timing: `done` comes exactly 2*w + 2 cycles after `start`.
module loop_puf
  import vpuf_pkg::*;
#(
  parameter int unsigned N            = 1 << LOG2_N,
  parameter int unsigned LOG2_W_MAX_P = LOG2_W_MAX,
  parameter int unsigned DELTA_W_P    = DELTA_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [N-1:0]                challenge,
  input  logic [4:0]                  log2_w,
  output logic                        busy,
  output logic                        done,
  output logic signed [DELTA_W_P-1:0] delta,
  // to / from the oscillator
  output logic                        ro_enable,
  output logic [N-1:0]                ro_challenge,
  input  logic                        ro_osc
);
  localparam int unsigned CNT_W = LOG2_W_MAX_P + 1;

  typedef enum logic [1:0] {IDLE, WIN_C, WIN_CB, FINISH} state_e;
  state_e state;

  logic [2:0]         sync;
  logic               edge_seen;
  logic [CNT_W-1:0]   win_cnt, win_last;
  logic [CNT_W-1:0]   cnt_c, cnt_cb;
  logic signed [CNT_W:0] diff;

  localparam logic signed [CNT_W:0] DMAX = (CNT_W+1)'(  (1 << (DELTA_W_P-1)) - 1);
  localparam logic signed [CNT_W:0] DMIN = (CNT_W+1)'(-(1 << (DELTA_W_P-1)));

  assign edge_seen = sync[1] & ~sync[2];
  assign win_last  = CNT_W'((1 << log2_w) - 1);
  assign busy      = (state != IDLE);
  assign ro_enable = busy;
  assign diff      = $signed({1'b0, cnt_c}) - $signed({1'b0, cnt_cb});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], ro_osc};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= IDLE;
      win_cnt      <= '0;
      cnt_c        <= '0;
      cnt_cb       <= '0;
      ro_challenge <= '0;
      done         <= 1'b0;
      delta        <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          ro_challenge <= challenge;
          win_cnt      <= '0;
          cnt_c        <= '0;
          cnt_cb       <= '0;
          state        <= WIN_C;
        end
        WIN_C: begin
          if (edge_seen) cnt_c <= cnt_c + 1'b1;
          if (win_cnt == win_last) begin
            win_cnt      <= '0;
            ro_challenge <= ~ro_challenge;
            state        <= WIN_CB;
          end else begin
            win_cnt <= win_cnt + 1'b1;
          end
        end
        WIN_CB: begin
          if (edge_seen) cnt_cb <= cnt_cb + 1'b1;
          if (win_cnt == win_last) state <= FINISH;
          else                     win_cnt <= win_cnt + 1'b1;
        end
        FINISH: begin
          if      (diff > DMAX) delta <= DELTA_W_P'(DMAX);
          else if (diff < DMIN) delta <= DELTA_W_P'(DMIN);
          else                  delta <= DELTA_W_P'(diff);
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
