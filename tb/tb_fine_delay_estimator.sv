// tb_fine_delay_estimator: (1) three samples of a parabola whose vertex is
// at s = q0/8 must give q0 exactly, for every q0 in -7..7 (the Lagrange
// interpolant of three points of a parabola is that parabola); (2) random
// triples: the chosen offset must reach the floating-point maximum of the
// interpolant over the grid to within 0.1 %.
`include "tb_util.svh"
module tb_fine_delay_estimator;
  localparam int PW = 30, QD = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [PW-1:0] norms [3];
  logic signed [4:0] q_out;
  int checks = 0, failures = 0;

  fine_delay_estimator #(.LL(1), .QD(QD), .PW(PW)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(3000)

  function automatic real lag(real c0, real c1, real c2, real s);
    return c0 * s * (s - 1) / 2.0 + c1 * (1 - s * s) + c2 * s * (s + 1) / 2.0;
  endfunction

  task automatic run(output int qv);
    @(negedge clk) in_valid = 1;
    @(negedge clk) in_valid = 0;
    `CHECK_TRUE(out_valid, "out_valid one cycle after in_valid")
    qv = int'(q_out);
  endtask

  initial begin
    int qv;
    real c [3];
    for (int i = 0; i < 3; i++) norms[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int q0 = -7; q0 <= 7; q0++) begin
      real s;
      s = real'(q0) / QD;
      for (int i = 0; i < 3; i++) begin
        c[i] = 1.0e6 - 2.0e5 * (real'(i - 1) - s) * (real'(i - 1) - s);
        norms[i] = PW'(longint'(c[i]));
      end
      run(qv);
      `CHECK_EQ(qv, q0, "parabola vertex")
    end
    for (int t = 0; t < 200; t++) begin
      real best, got;
      for (int i = 0; i < 3; i++) begin
        c[i] = real'($urandom_range(0, 1 << 28));
        norms[i] = PW'(longint'(c[i]));
      end
      best = -1.0e30;
      for (int qq = -QD; qq <= QD; qq++)
        if (lag(c[0], c[1], c[2], real'(qq) / QD) > best) best = lag(c[0], c[1], c[2], real'(qq) / QD);
      run(qv);
      got = lag(c[0], c[1], c[2], real'(qv) / QD);
      `CHECK_TRUE(qv >= -QD && qv <= QD && got >= best - 1.0e-3 * (best < 0 ? -best : best) - 1.0,
                  "random triple reaches the grid maximum")
    end
    `TB_FINISH
  end
endmodule
