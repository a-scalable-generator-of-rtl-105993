// lane_peak_detector: correlation-power peak detector for one parallel lane.
//
// Three states, following the document:
//   WAIT   - keep the sum of the last WS powers of this lane (the average is
//            sum/WS). A sample whose power exceeds threshold x average and
//            the lower bound starts a detection: it becomes the running
//            maximum and the FSM moves to DETECT.
//   DETECT - track the maximum over the next WS-1 samples, then go to DONE.
//   DONE   - the next sample is compared once more; the larger of it and
//            the maximum is output on pmax with done = 1, then back to WAIT.
// The threshold has one fraction bit (thr_x2 = 2 x threshold, range
// [0, 2^(B-1)) with step 0.5, as in the document); the test
// power > threshold * sum / WS is done without division as
// 2*WS*power > thr_x2*sum. The lower bound is compared with the power
// directly (its scaling is this implementation's choice). 'clear' returns
// the FSM to WAIT with an empty average (sequencer, at every slot start).
// 'done' is combinational: high in DONE while a valid sample is presented.
module lane_peak_detector
  import mimo_pkg::*;
#(
  parameter int unsigned WS = DEF_WS,
  parameter int unsigned PW = 30,
  parameter int unsigned TW = DEF_B
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clear,
  input  logic [PW-1:0] pwr,
  input  logic [TW-1:0] thr_x2,
  input  logic [PW-1:0] lower,
  output logic          detecting,
  output logic          done,
  output logic [PW-1:0] pmax
);
  typedef enum logic [1:0] {S_WAIT, S_DETECT, S_DONE} state_t;
  localparam int unsigned SW = PW + $clog2(WS) + 1;
  localparam int unsigned CNTW = $clog2(WS + 1);

  state_t          state;
  logic [PW-1:0]   win [WS];
  logic [SW-1:0]   sum;
  logic [PW-1:0]   pm;
  logic [CNTW-1:0] cnt;
  logic            hit;

  // 2*WS*pwr > thr_x2 * sum  (both sides well inside 64 bits)
  assign hit = (longint'(pwr) * longint'(2 * WS) > longint'(thr_x2) * longint'(sum))
               && (pwr > lower);

  assign detecting = (state != S_WAIT);
  assign done      = en && (state == S_DONE);
  assign pmax      = (pwr > pm) ? pwr : pm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_WAIT;
      sum   <= '0;
      pm    <= '0;
      cnt   <= '0;
      for (int k = 0; k < WS; k++) win[k] <= '0;
    end else if (clear) begin
      state <= S_WAIT;
      sum   <= '0;
      pm    <= '0;
      cnt   <= '0;
      for (int k = 0; k < WS; k++) win[k] <= '0;
    end else if (en) begin
      // moving window of the last WS powers
      win[0] <= pwr;
      for (int k = 1; k < WS; k++) win[k] <= win[k-1];
      sum <= sum + SW'(pwr) - SW'(win[WS-1]);
      unique case (state)
        S_WAIT: if (hit) begin
          pm    <= pwr;
          cnt   <= CNTW'(WS - 1);
          state <= S_DETECT;
        end
        S_DETECT: begin
          if (pwr > pm) pm <= pwr;
          cnt <= cnt - 1'b1;
          if (cnt == 1) state <= S_DONE;
        end
        S_DONE: state <= S_WAIT;
        default: state <= S_WAIT;
      endcase
    end
  end
endmodule
