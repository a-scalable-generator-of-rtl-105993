// tb_delay_estimator: the whole estimation chain at the default size
// (8 lanes, Golay length 64, oversampling 2). Each trial sends one pilot
// (random seeds, random complex channel, random start sample, a random
// fractional delay made by splitting every chip between two samples) in
// small noise. The testbench computes the matched-filter output itself and
// checks: one report per clear; the coarse position equals the sample of
// largest correlation power (plus the fixed correlator latency of
// log2(L) words); h equals that correlation divided by 2L (rounded); q is
// the arg max of the Lagrange interpolant of the three powers (computed in
// floating point, +-1 step); and the report arrives within 24 words of the
// end of the pilot.
`include "tb_util.svh"
module tb_delay_estimator;
  import mimo_pkg::*;
  localparam int P = 8, B = 8, L = 64, OS = 2, NS = 6, QD = 8, NW = 90;
  logic clk = 0, rst_n = 0, in_valid = 0, clear = 0;
  logic [NS-1:0] w_seed;
  logic [B-1:0] thr_x2;
  logic [2*(B+NS+1)-1:0] lower;
  logic signed [B-1:0] in_i [P], in_q [P], h_i, h_q;
  logic est_valid;
  logic [31:0] pos;
  logic signed [4:0] q;
  int checks = 0, failures = 0, nfrac = 0;
  int pilot [2 * L];
  int xi [NW * P], xq [NW * P];

  delay_estimator #(.P(P), .B(B), .L(L), .OS(OS)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(40000)

  task automatic make_pilot();
    int a [L], b [L], na [L], nb [L], d, w;
    for (int m = 0; m < L; m++) begin a[m] = (m == 0); b[m] = (m == 0); end
    for (int n = 0; n < NS; n++) begin
      d = 1 << n;
      w = w_seed[n] ? -1 : 1;
      for (int m = 0; m < L; m++) begin
        na[m] = w * a[m] + ((m >= d) ? b[m - d] : 0);
        nb[m] = w * a[m] - ((m >= d) ? b[m - d] : 0);
      end
      a = na; b = nb;
    end
    for (int c = 0; c < L; c++) begin pilot[c] = a[L - 1 - c]; pilot[L + c] = b[L - 1 - c]; end
  endtask

  function automatic void mf(int t, output int ri, output int rq);
    ri = 0; rq = 0;
    for (int c = 0; c < 2 * L; c++) begin
      int s;
      s = t - (2 * L - 1 - c) * OS;
      if (s >= 0) begin ri += pilot[c] * xi[s]; rq += pilot[c] * xq[s]; end
    end
  endfunction

  function automatic real lag(real c0, real c1, real c2, real s);
    return c0 * s * (s - 1) / 2.0 + c1 * (1 - s * s) + c2 * s * (s + 1) / 2.0;
  endfunction

  initial begin
    for (int j = 0; j < P; j++) begin in_i[j] = 0; in_q[j] = 0; end
    thr_x2 = 8'd16;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 12; trial++) begin
      int st, hi, hq, fr, bi, pbest, ri, rq, side, nrep, endw, repw;
      int pk_i, pk_q;
      real c [3], best;
      int qbest;
      w_seed = NS'($urandom);
      make_pilot();
      // largest sidelobe of the pilot autocorrelation sets the lower bound
      side = 0;
      for (int sh = 1; sh < 2 * L; sh++) begin
        int acc;
        acc = 0;
        for (int m = 0; m + sh < 2 * L; m++) acc += pilot[m] * pilot[m + sh];
        if (acc < 0) acc = -acc;
        if (acc > side) side = acc;
      end
      hi = $urandom_range(20, 50) * (($urandom_range(0, 1) != 0) ? 1 : -1);
      hq = $urandom_range(0, 50) - 25;
      fr = (trial % 4);                 // fraction in quarters of a sample
      if (fr != 0) nfrac++;
      st = 100 + $urandom_range(0, 60);
      for (int s = 0; s < NW * P; s++) begin
        xi[s] = $urandom_range(0, 4) - 2;
        xq[s] = $urandom_range(0, 4) - 2;
      end
      for (int cidx = 0; cidx < 2 * L; cidx++) begin
        int s0;
        s0 = st + cidx * OS;
        xi[s0]     += (hi * pilot[cidx] * (4 - fr)) / 4;
        xq[s0]     += (hq * pilot[cidx] * (4 - fr)) / 4;
        xi[s0 + 1] += (hi * pilot[cidx] * fr) / 4;
        xq[s0 + 1] += (hq * pilot[cidx] * fr) / 4;
      end
      lower = '0;
      lower = (2*(B+NS+1))'(((side + 2 * L) / 2 * 20) * ((side + 2 * L) / 2 * 20));
      // reference peak
      pbest = -1; bi = 0;
      for (int t = 0; t < NW * P; t++) begin
        mf(t, ri, rq);
        if (ri * ri + rq * rq > pbest) begin pbest = ri * ri + rq * rq; bi = t; pk_i = ri; pk_q = rq; end
      end
      for (int i = 0; i < 3; i++) begin mf(bi - 1 + i, ri, rq); c[i] = real'(ri * ri + rq * rq); end
      best = -1.0e30; qbest = 0;
      for (int qq = -QD; qq <= QD; qq++)
        if (lag(c[0], c[1], c[2], real'(qq) / QD) > best) begin best = lag(c[0], c[1], c[2], real'(qq) / QD); qbest = qq; end
      // run
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      nrep = 0; repw = -1;
      endw = (st + 2 * L * OS) / P;
      for (int w = 0; w < NW; w++) begin
        @(negedge clk);
        in_valid = 1;
        for (int j = 0; j < P; j++) begin in_i[j] = B'(xi[w * P + j]); in_q[j] = B'(xq[w * P + j]); end
        if (est_valid) begin
          nrep++;
          repw = w;
          `CHECK_EQ(int'(pos), bi + NS * P, "coarse position")
          `CHECK_EQ(int'(h_i), int'(sat(rnd_shift(pk_i, NS + 1), B)), "h_i = R/2L")
          `CHECK_EQ(int'(h_q), int'(sat(rnd_shift(pk_q, NS + 1), B)), "h_q = R/2L")
          `CHECK_TRUE(int'(q) >= qbest - 1 && int'(q) <= qbest + 1, "fine delay near the Lagrange maximum")
          if (!(int'(q) >= qbest - 1 && int'(q) <= qbest + 1)) $display("   q=%0d ref=%0d", q, qbest);
        end
      end
      @(negedge clk) in_valid = 0;
      `CHECK_EQ(nrep, 1, "one report per pilot")
      `CHECK_TRUE(repw >= 0 && repw - endw <= 24, "report latency")
    end
    `CHECK_TRUE(nfrac > 0, "fractional delays tested")
    `TB_FINISH
  end
endmodule
