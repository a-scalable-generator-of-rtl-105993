// tb_global_peak_detector: random low-level correlation values with one
// strong sample at a random position; a lane 'done' is raised a few words
// later. The detector must report that sample's value, its position counted
// from 'clear', and the powers of its two neighbours. Cases where the peak is
// the newest sample of the triggering word exercise the OUTPUT state (one
// word of waiting); the others the direct DETECT & OUTPUT path.
`include "tb_util.svh"
module tb_global_peak_detector;
  localparam int P = 8, WS = 8, LL = 1, CW = 15, PW = 30;
  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  logic signed [CW-1:0] r_i [P], r_q [P], peak_i, peak_q;
  logic [PW-1:0] pwr [P], norms [3];
  logic [P-1:0] lane_done;
  logic peak_valid;
  logic [31:0] peak_pos;
  int checks = 0, failures = 0, n_direct = 0, n_wait = 0;
  int si [4096], sq [4096];

  global_peak_detector #(.P(P), .WS(WS), .LL(LL), .CW(CW), .PW(PW)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(30000)

  function automatic int pw(int s);
    return si[s] * si[s] + sq[s] * sq[s];
  endfunction

  initial begin
    lane_done = '0;
    for (int j = 0; j < P; j++) begin r_i[j] = 0; r_q[j] = 0; pwr[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      int pk, trig, nwords, got;
      nwords = 30;
      // peak sample; every third trial puts it in the last lane of the trigger word
      trig = 20;
      if (trial % 3 == 0) pk = trig * P + P - 1;
      else pk = (trig - $urandom_range(0, WS - 1)) * P + $urandom_range(0, P - 1);
      for (int s = 0; s < nwords * P; s++) begin
        si[s] = $urandom_range(0, 200) - 100;
        sq[s] = $urandom_range(0, 200) - 100;
      end
      si[pk] = 9000 + trial; sq[pk] = -5000;
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      got = 0;
      for (int w = 0; w < nwords; w++) begin
        @(negedge clk);
        if (peak_valid) begin
          got++;
          `CHECK_EQ(int'(peak_i), si[pk], "peak value I")
          `CHECK_EQ(int'(peak_q), sq[pk], "peak value Q")
          `CHECK_EQ(int'(peak_pos), pk, "peak position")
          for (int i = 0; i < 3; i++) `CHECK_EQ(int'(norms[i]), pw(pk - 1 + i), "neighbour power")
          if (w == trig + 1) n_direct++;
          else if (w == trig + 2) n_wait++;
          else begin failures++; $display("FAIL unexpected output time %0d", w); end
        end
        en = 1;
        lane_done = (w == trig) ? P'(1 << $urandom_range(0, P - 1)) : '0;
        for (int j = 0; j < P; j++) begin
          r_i[j] = CW'(si[w * P + j]); r_q[j] = CW'(sq[w * P + j]);
          pwr[j] = PW'(pw(w * P + j));
        end
      end
      @(negedge clk) en = 0; lane_done = '0;
      if (peak_valid) got++;
      `CHECK_EQ(got, 1, "exactly one report per trial")
    end
    `CHECK_TRUE(n_direct > 0, "direct output path used")
    `CHECK_TRUE(n_wait > 0, "one-word wait path used")
    `TB_FINISH
  end
endmodule
