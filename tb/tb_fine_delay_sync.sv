// tb_fine_delay_sync: random samples through the Lagrange fractional-delay
// filter for every fine delay q = -8..8 (steps of 1/8 sample). The reference
// computes the three-point Lagrange weights in floating point, rounds them to
// 8 fraction bits and forms y(n-1+s) = sum_i x(n-1+i) w_i(s). Output sample n
// therefore stands for input time n-1 (l = 1 sample look-ahead), with a
// latency of 2 valid words.
`include "tb_util.svh"
module tb_fine_delay_sync;
  import mimo_pkg::*;
  localparam int P = 8, B = 8, QD = 8, NW = 340;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [4:0] q;
  logic signed [B-1:0] in_i [P], in_q [P], out_i [P], out_q [P];
  int checks = 0, failures = 0, nin = 0, nout = 0;
  int xi [NW * P], xq [NW * P], qs [NW];

  fine_delay_sync #(.P(P), .B(B), .LL(1), .QD(QD)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(4000)

  function automatic int wgt(int qq, int i);
    real s, v;
    s = real'(qq) / QD;
    v = 1.0;
    for (int j = -1; j <= 1; j++) if (j != i) v = v * (s - j) / real'(i - j);
    return int'($floor(v * 256.0 + 0.5));
  endfunction

  function automatic int interp(int n, int qq, bit isq);
    longint acc;
    acc = 0;
    for (int i = -1; i <= 1; i++) begin
      int idx;
      idx = n - 1 + i;
      if (idx >= 0) acc += longint'(wgt(qq, i)) * (isq ? xq[idx] : xi[idx]);
    end
    return int'(sat(rnd_shift(acc, B), B));
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int j = 0; j < P; j++) begin
      `CHECK_EQ(int'(out_i[j]), interp(nout * P + j, qs[nout], 0), "out_i")
      `CHECK_EQ(int'(out_q[j]), interp(nout * P + j, qs[nout], 1), "out_q")
    end
    nout++;
  end

  initial begin
    q = 0;
    for (int j = 0; j < P; j++) begin in_i[j] = 0; in_q[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (nin < NW) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        // q is held for 20 words at a time and sweeps -8..8
        q = 5'((nin / 20) - QD);
        qs[nin] = int'(q);
        for (int j = 0; j < P; j++) begin
          xi[nin * P + j] = $urandom_range(0, 200) - 100;
          xq[nin * P + j] = $urandom_range(0, 200) - 100;
          in_i[j] = B'(xi[nin * P + j]);
          in_q[j] = B'(xq[nin * P + j]);
        end
        nin++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    `CHECK_EQ(nout, NW, "output words")
    `TB_FINISH
  end
endmodule
