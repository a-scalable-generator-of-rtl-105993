// tb_sequencing_controller: three packets with continuous valid words and a
// behavioural stand-in for the estimators. In each Golay slot every channel
// reports a random coarse position, fine step and channel value, and every
// user estimator reports a position and step in its trailing slot. Checked:
// clear pulses at the beacon and at every slot start, the seed of the slot
// owner, the weights and the single w_load at the end of the slots, the
// coarse/fine channel settings (round(mean delay) aligned to the latest
// channel) and the user fine step, phase and payload window, all applied
// at the following beacon. One channel misses a pilot in packet 2 and must
// keep its settings.
`include "tb_util.svh"
module tb_sequencing_controller;
  import mimo_pkg::*;
  localparam int M = 4, K = 2, P = 8, B = 8, OS = 2, NS = 6, QD = 8, QW = 5, DW = 7;
  localparam int SLOT0 = 4, SLEN = 40, UOFS = 12, UREF = 300, PAYS = 1000, PAYL = 30, PKT = 200;
  logic clk = 0, rst_n = 0, in_valid = 0, beacon = 0, ds_valid = 0;
  logic [15:0] slot_start, slot_len, user_ofs, user_ref, pay_len;
  logic [31:0] pay_start;
  logic [NS-1:0] w_seed [K];
  logic ch_clear, w_load;
  logic [NS-1:0] ch_seed;
  logic [M-1:0] ch_est_valid = '0, ch_ok;
  logic signed [B-1:0] ch_h_i [M], ch_h_q [M];
  logic [31:0] ch_pos [M];
  logic signed [QW-1:0] ch_q [M];
  logic [DW-1:0] cs_delay [M];
  logic signed [QW-1:0] fs_q [M];
  logic signed [B-1:0] w_i [M][K], w_q [M][K];
  logic [K-1:0] u_clear, u_est_valid = '0, ds_en, u_ok;
  logic [31:0] u_pos [K];
  logic signed [QW-1:0] u_q [K], us_q [K];
  logic [0:0] ds_phase [K];
  int checks = 0, failures = 0;

  sequencing_controller #(.M(M), .K(K), .P(P), .B(B), .OS(OS), .L(64), .QD(QD), .MAXD(64)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(5000)

  int epos [M][K], eq [M][K], ehi [M][K], ehq [M][K], upos [K], uq [K];
  int exp_cs [M], exp_fs [M], exp_uq [K], exp_ph [K], exp_sw [K] = '{0, 0};
  bit miss;

  initial begin
    slot_start = 16'(SLOT0); slot_len = 16'(SLEN); user_ofs = 16'(UOFS); user_ref = 16'(UREF);
    pay_start = 32'(PAYS); pay_len = 16'(PAYL);
    w_seed[0] = 6'h15; w_seed[1] = 6'h2a;
    for (int m = 0; m < M; m++) begin ch_h_i[m] = 0; ch_h_q[m] = 0; ch_pos[m] = 0; ch_q[m] = 0; exp_cs[m] = 0; exp_fs[m] = 0; end
    for (int k = 0; k < K; k++) begin u_pos[k] = 0; u_q[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 3; pkt++) begin
      int nload;
      miss = (pkt == 1);
      for (int m = 0; m < M; m++) for (int k = 0; k < K; k++) begin
        epos[m][k] = 200 + $urandom_range(0, 40); eq[m][k] = $urandom_range(0, 16) - 8;
        ehi[m][k] = $urandom_range(0, 255) - 128; ehq[m][k] = $urandom_range(0, 255) - 128;
      end
      for (int k = 0; k < K; k++) begin upos[k] = UREF + $urandom_range(0, 9) + 8 * pkt; uq[k] = $urandom_range(0, 16) - 8; end
      nload = 0;
      for (int i = 0; i < PKT; i++) begin
        @(negedge clk);
        // checks on the registered outputs produced by word i-1
        if (i >= 1) begin
          bit edge_prev, uedge;
          edge_prev = (i - 1 == 0);
          for (int k = 0; k < K; k++) if (i - 1 == SLOT0 + k * SLEN) edge_prev = 1;
          `CHECK_EQ(ch_clear, edge_prev, "ch_clear at slot starts")
          for (int k = 0; k < K; k++) begin
            uedge = (i - 1 == 0) || (i - 1 == SLOT0 + UOFS + k * SLEN);
            `CHECK_EQ(u_clear[k], uedge, "u_clear at user slot starts")
          end
          if (w_load) begin
            nload++;
            `CHECK_EQ(i - 1, SLOT0 + K * SLEN, "w_load at end of slots")
            for (int m = 0; m < M; m++) for (int k = 0; k < K; k++)
              if (!(miss && m == 2 && k == 1)) begin
                `CHECK_EQ(int'(w_i[m][k]), ehi[m][k], "weight I")
                `CHECK_EQ(int'(w_q[m][k]), ehq[m][k], "weight Q")
              end
          end
          if (i >= 2) for (int k = 0; k < K; k++)
            `CHECK_EQ(ds_en[k], (i >= exp_sw[k] && i < exp_sw[k] + PAYL), "payload window")
        end
        for (int k = 0; k < K; k++)
          if (i >= SLOT0 + k * SLEN + 1 && i < SLOT0 + (k + 1) * SLEN)
            `CHECK_EQ(ch_seed, w_seed[k], "seed of the slot owner")
        // settings from the previous packet, applied at this packet's beacon
        if (i == 2 && pkt > 0) begin
          for (int m = 0; m < M; m++) begin
            `CHECK_EQ(int'(cs_delay[m]), exp_cs[m], "coarse channel delay")
            `CHECK_EQ(int'(fs_q[m]), exp_fs[m], "fine channel step")
            `CHECK_EQ(ch_ok[m], !(pkt == 2 && m == 2), "channel status")
          end
          for (int k = 0; k < K; k++) begin
            `CHECK_EQ(int'(us_q[k]), exp_uq[k], "user fine step")
            `CHECK_EQ(int'(ds_phase[k]), exp_ph[k], "user phase")
          end
        end
        // drive word i
        in_valid = 1; ds_valid = 1;
        beacon = (i == 0);
        ch_est_valid = '0; u_est_valid = '0;
        for (int k = 0; k < K; k++) begin
          if (i == SLOT0 + k * SLEN + 25) begin
            for (int m = 0; m < M; m++) begin
              if (!(miss && m == 2 && k == 1)) ch_est_valid[m] = 1;
              ch_pos[m] = epos[m][k]; ch_q[m] = QW'(eq[m][k]);
              ch_h_i[m] = B'(ehi[m][k]); ch_h_q[m] = B'(ehq[m][k]);
            end
          end
          if (i == SLOT0 + UOFS + k * SLEN + 25) begin
            u_est_valid[k] = 1; u_pos[k] = upos[k]; u_q[k] = QW'(uq[k]);
          end
        end
      end
      `CHECK_EQ(nload, 1, "one weight load per packet")
      // expected settings for the next packet
      begin
        int avg [M], latest;
        latest = 0;
        for (int m = 0; m < M; m++) begin
          int s;
          s = 0;
          for (int k = 0; k < K; k++) s += epos[m][k] * QD + eq[m][k];
          avg[m] = (s >= 0) ? (2 * s + K) / (2 * K) : -((-2 * s + K) / (2 * K));
        end
        for (int m = 0; m < M; m++) if (!(miss && m == 2) && avg[m] > latest) latest = avg[m];
        for (int m = 0; m < M; m++) if (!(miss && m == 2)) begin
          exp_cs[m] = (latest - avg[m]) / QD;
          exp_fs[m] = -((latest - avg[m]) % QD);
        end
        for (int k = 0; k < K; k++) begin
          int st;
          st = PAYS + upos[k] - UREF;
          exp_uq[k] = uq[k]; exp_ph[k] = st % OS; exp_sw[k] = st / P;
        end
      end
    end
    `TB_FINISH
  end
endmodule
