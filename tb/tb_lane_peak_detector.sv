// tb_lane_peak_detector: a noise floor with random spikes is fed to one
// lane detector, and its 'done' and peak outputs are compared cycle by cycle
// with a behavioural model of the three-state detector written here
// (WAIT: power > threshold x window average and > lower bound; DETECT: track
// the maximum for WS-1 samples; DONE: one more comparison, output). A fixed
// scenario also checks that a spike 4 samples after the trigger is reported
// and that spikes below the lower bound are ignored.
`include "tb_util.svh"
module tb_lane_peak_detector;
  localparam int WS = 8, PW = 30, TW = 8;
  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  logic [PW-1:0] pwr, lower, pmax;
  logic [TW-1:0] thr_x2;
  logic detecting, done;
  int checks = 0, failures = 0, ndone = 0;

  lane_peak_detector #(.WS(WS), .PW(PW), .TW(TW)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(20000)

  // behavioural model
  int st = 0, cnt = 0;
  longint pm = 0, win [WS], sum = 0;

  task automatic model_step(longint p, output bit d, output longint out);
    d = 0; out = 0;
    if (st == 2) begin d = 1; out = (p > pm) ? p : pm; end
    case (st)
      0: if (p * 2 * WS > longint'(thr_x2) * sum && p > longint'(lower)) begin pm = p; cnt = WS - 1; st = 1; end
      1: begin if (p > pm) pm = p; cnt--; if (cnt == 0) st = 2; end
      2: st = 0;
      default: st = 0;
    endcase
    sum = sum + p - win[WS - 1];
    for (int k = WS - 1; k > 0; k--) win[k] = win[k - 1];
    win[0] = p;
  endtask

  task automatic feed(longint p);
    bit d;
    longint o;
    @(negedge clk);
    en = 1; pwr = PW'(p);
    #1;
    model_step(p, d, o);
    `CHECK_EQ(done, d, "done")
    if (d) begin
      ndone++;
      `CHECK_EQ(longint'(pmax), o, "pmax")
    end
  endtask

  initial begin
    for (int k = 0; k < WS; k++) win[k] = 0;
    pwr = 0; lower = PW'(1000); thr_x2 = TW'(8);   // threshold 4x average
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fixed scenario: floor ~100, trigger 5000, real peak 9000 four samples later
    for (int t = 0; t < 20; t++) feed(100);
    feed(5000); feed(300); feed(200); feed(100); feed(9000);
    for (int t = 0; t < 4; t++) feed(100);
    `CHECK_EQ(longint'(pmax), 9000, "peak of the window")
    `CHECK_EQ(ndone, 1, "one detection in the fixed scenario")
    // a spike under the lower bound is ignored
    for (int t = 0; t < 20; t++) feed(10);
    feed(900);
    for (int t = 0; t < 10; t++) feed(10);
    `CHECK_EQ(ndone, 1, "spike below the lower bound ignored")
    // random stream
    for (int t = 0; t < 5000; t++) begin
      if ($urandom_range(0, 40) == 0) feed($urandom_range(2000, 200000));
      else feed($urandom_range(0, 500));
    end
    @(negedge clk) en = 0;
    `CHECK_TRUE(ndone > 20, "many detections in the random stream")
    `TB_FINISH
  end
endmodule
