// tb_mrc_beamformer: random channel matrices and random channel samples at
// the default size (4 channels, 2 users, 8 lanes). Each user output is
// compared with sum_m conj(w_mk) x_m, rescaled by 2^-(B-1) with rounding and
// saturation, computed here directly. The n-th output word must carry input
// word n-(M+K-1), i.e. the latency is M+K valid words. The weights are
// reloaded half way; results are checked again once the array has refilled.
`include "tb_util.svh"
module tb_mrc_beamformer;
  import mimo_pkg::*;
  localparam int M = 4, K = 2, P = 8, B = 8, NW = 200, LAT = M + K;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, w_load = 0;
  logic signed [B-1:0] w_i [M][K], w_q [M][K];
  logic signed [B-1:0] in_i [M][P], in_q [M][P], out_i [K][P], out_q [K][P];
  int checks = 0, failures = 0, nout = 0, nin = 0, reload_at = -1;
  int xi [NW][M][P], xq [NW][M][P];
  int wi [2][M][K], wq [2][M][K];

  mrc_beamformer #(.M(M), .K(K), .P(P), .B(B)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(3000)

  always @(posedge clk) if (rst_n && out_valid) begin
    int src, set;
    src = nout - (LAT - 1);
    set = (reload_at >= 0 && src >= reload_at) ? 1 : 0;
    if (src >= 0 && !(reload_at >= 0 && src >= reload_at - LAT && src < reload_at)) begin
      for (int k = 0; k < K; k++) for (int j = 0; j < P; j++) begin
        longint acc_i, acc_q;
        acc_i = 0; acc_q = 0;
        for (int m = 0; m < M; m++) begin
          acc_i += longint'(wi[set][m][k]) * xi[src][m][j] + longint'(wq[set][m][k]) * xq[src][m][j];
          acc_q += longint'(wi[set][m][k]) * xq[src][m][j] - longint'(wq[set][m][k]) * xi[src][m][j];
        end
        `CHECK_EQ(int'(out_i[k][j]), int'(sat(rnd_shift(acc_i, B - 1), B)), "out_i")
        `CHECK_EQ(int'(out_q[k][j]), int'(sat(rnd_shift(acc_q, B - 1), B)), "out_q")
      end
    end else if (src < 0) begin
      `CHECK_EQ(int'(out_i[0][0]), 0, "pipeline fill is zero")
    end
    nout++;
  end

  task automatic load(int set);
    for (int m = 0; m < M; m++) for (int k = 0; k < K; k++) begin
      wi[set][m][k] = $urandom_range(0, 255) - 128;
      wq[set][m][k] = $urandom_range(0, 255) - 128;
      w_i[m][k] = B'(wi[set][m][k]);
      w_q[m][k] = B'(wq[set][m][k]);
    end
    w_load = 1;
    @(negedge clk) w_load = 0;
  endtask

  initial begin
    for (int m = 0; m < M; m++) for (int j = 0; j < P; j++) begin in_i[m][j] = 0; in_q[m][j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    load(0);
    while (nin < NW) begin
      if (nin == NW / 2) begin in_valid = 0; reload_at = nin; load(1); end
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        for (int m = 0; m < M; m++) for (int j = 0; j < P; j++) begin
          xi[nin][m][j] = $urandom_range(0, 255) - 128;
          xq[nin][m][j] = $urandom_range(0, 255) - 128;
          in_i[m][j] = B'(xi[nin][m][j]);
          in_q[m][j] = B'(xq[nin][m][j]);
        end
        nin++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(posedge clk);
    `CHECK_EQ(nout, NW, "output words")
    `TB_FINISH
  end
endmodule
