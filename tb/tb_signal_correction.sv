// tb_signal_correction: one channel through RRC filter, IQ correction and DC
// removal at the default size (65 taps, 8 samples per word). The reference
// applies the three steps in scalar form to the whole record. Valid is
// continuous, so the n-th output word must appear exactly 4 cycles after
// the n-th input word.
`include "tb_util.svh"
module tb_signal_correction;
  import mimo_pkg::*;
  localparam int P = 8, B = 8, NT = 65, NC = (NT + 1) / 2, NW = 120;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [B-1:0] in_i [P], in_q [P], out_i [P], out_q [P];
  logic signed [B-1:0] rrc_coef [NC];
  logic signed [B-1:0] iq_a, iq_b, iq_c, iq_d, dc_i, dc_q;
  int checks = 0, failures = 0;
  int xi [NW * P], xq [NW * P];
  int nout = 0, cyc = 0, first_in = -1, first_out = -1;

  signal_correction #(.P(P), .B(B), .NT(NT)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  `TB_WATCHDOG(3000)

  function automatic int fir(int n, bit q);
    longint acc;
    int c;
    acc = 0;
    for (int k = 0; k < NT; k++) begin
      c = (k < NC) ? int'(rrc_coef[k]) : int'(rrc_coef[NT - 1 - k]);
      if (n - k >= 0) acc += longint'(c) * (q ? xq[n - k] : xi[n - k]);
    end
    return int'(sat(rnd_shift(acc, B - 1), B));
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    if (first_out < 0) first_out = cyc;
    for (int j = 0; j < P; j++) begin
      int fi, fq, ci, cq;
      fi = fir(nout * P + j, 0);
      fq = fir(nout * P + j, 1);
      ci = int'(sat(rnd_shift(longint'(iq_a) * fi + longint'(iq_b) * fq, B - 1), B));
      cq = int'(sat(rnd_shift(longint'(iq_c) * fi + longint'(iq_d) * fq, B - 1), B));
      `CHECK_EQ(int'(out_i[j]), int'(sat(ci - dc_i, B)), "out_i")
      `CHECK_EQ(int'(out_q[j]), int'(sat(cq - dc_q, B)), "out_q")
    end
    nout++;
  end

  initial begin
    for (int k = 0; k < NC; k++) rrc_coef[k] = B'($urandom_range(0, 40) - 20);
    rrc_coef[NC-1] = 8'sd100;
    iq_a = 8'sd120; iq_b = -8'sd9; iq_c = 8'sd14; iq_d = 8'sd110;
    dc_i = 8'sd3; dc_q = -8'sd5;
    for (int j = 0; j < P; j++) begin in_i[j] = 0; in_q[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NW; n++) begin
      @(negedge clk);
      in_valid = 1;
      if (first_in < 0) first_in = cyc + 1;
      for (int j = 0; j < P; j++) begin
        xi[n * P + j] = $urandom_range(0, 255) - 128;
        xq[n * P + j] = $urandom_range(0, 255) - 128;
        in_i[j] = B'(xi[n * P + j]);
        in_q[j] = B'(xq[n * P + j]);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (8) @(posedge clk);
    `CHECK_EQ(nout, NW, "output word count")
    `CHECK_EQ(first_out - first_in, 4, "latency in cycles")
    `TB_FINISH
  end
endmodule
