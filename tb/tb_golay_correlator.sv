// tb_golay_correlator: the pipelined Golay correlator against a direct
// matched filter. A Golay pair of length 64 is built here from random seeds
// (recursion a' = w a + b(m-D), b' = w a - b(m-D), D = 1,2,4..); the pilot
// reverse(gA) . reverse(gB) is oversampled by 2 (zero stuffed), scaled by a
// complex channel value and embedded in random noise. Every output sample
// must equal sum_c pilot[c] * x[t - (2L-1-c)*OS] exactly, and the peak must
// be 2L times the channel value. The n-th output word carries input word
// n-log2(L) (latency log2(L)+1 cycles with continuous valid).
`include "tb_util.svh"
module tb_golay_correlator;
  localparam int P = 8, B = 8, L = 64, OS = 2, NS = 6, CW = B + NS + 1;
  localparam int NW = 160, PIL0 = 300;   // pilot start sample
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [NS-1:0] w_seed;
  logic signed [B-1:0] in_i [P], in_q [P];
  logic signed [CW-1:0] out_i [P], out_q [P];
  int checks = 0, failures = 0, nin = 0, nout = 0, peak_seen = 0;
  int xi [NW * P], xq [NW * P];
  int pilot [2 * L];
  int hi = 37, hq = -21;

  golay_correlator #(.P(P), .B(B), .L(L), .OS(OS)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(4000)

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
    for (int c = 0; c < L; c++) begin
      pilot[c]     = a[L - 1 - c];
      pilot[L + c] = b[L - 1 - c];
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    int src;
    src = nout - NS;
    if (src >= 0) for (int j = 0; j < P; j++) begin
      int t, ri, rq;
      t = src * P + j; ri = 0; rq = 0;
      for (int c = 0; c < 2 * L; c++) begin
        int s;
        s = t - (2 * L - 1 - c) * OS;
        if (s >= 0) begin ri += pilot[c] * xi[s]; rq += pilot[c] * xq[s]; end
      end
      `CHECK_EQ(int'(out_i[j]), ri, "R_i vs matched filter")
      `CHECK_EQ(int'(out_q[j]), rq, "R_q vs matched filter")
      if (t == PIL0 + (2 * L - 1) * OS) begin
        peak_seen++;
        `CHECK_TRUE(ri > 2 * L * hi - 300 && ri < 2 * L * hi + 300, "peak close to 2L*h (I)")
        `CHECK_TRUE(rq > 2 * L * hq - 300 && rq < 2 * L * hq + 300, "peak close to 2L*h (Q)")
      end
    end
    nout++;
  end

  initial begin
    int acf;
    w_seed = NS'($urandom);
    make_pilot();
    // complementary pair: the pilot halves' autocorrelations sum to a delta
    for (int sh = 1; sh < L; sh++) begin
      acf = 0;
      for (int m = 0; m + sh < L; m++) acf += pilot[m] * pilot[m + sh] + pilot[L + m] * pilot[L + m + sh];
      `CHECK_EQ(acf, 0, "complementary sidelobe")
    end
    for (int s = 0; s < NW * P; s++) begin
      xi[s] = $urandom_range(0, 6) - 3;
      xq[s] = $urandom_range(0, 6) - 3;
      if (s >= PIL0 && s < PIL0 + 2 * L * OS && ((s - PIL0) % OS == 0)) begin
        xi[s] += hi * pilot[(s - PIL0) / OS];
        xq[s] += hq * pilot[(s - PIL0) / OS];
      end
    end
    for (int j = 0; j < P; j++) begin in_i[j] = 0; in_q[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (nin < NW) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      if (in_valid) begin
        for (int j = 0; j < P; j++) begin in_i[j] = B'(xi[nin * P + j]); in_q[j] = B'(xq[nin * P + j]); end
        nin++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    `CHECK_EQ(nout, NW, "output words")
    `CHECK_EQ(peak_seen, 1, "pilot peak observed")
    `TB_FINISH
  end
endmodule
