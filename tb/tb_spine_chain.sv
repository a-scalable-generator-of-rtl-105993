// tb_spine_chain: two Spines in a daisy chain (8 antennas, 2 users) at the
// default Spine size, with a 16-QAM payload. This is the scaling case of the
// design: a larger array is built by chaining Spines, and the chain output
// is the sum of every Spine's partial MRC result.
//
// Both Spines see the same two users (same pilots, same user delays, same
// payload symbols) through their own random channel coefficients and their
// own channel delays: Spine 0 {0,5,2,7}, Spine 1 {3,1,6,0} samples. The
// beacon and samples reach Spine 1 one clock later than Spine 0, the same
// one-clock step its panel_sum register adds to the chain, so both Spines'
// payload words meet in Spine 1's adder. Packets as in tb_spine:
//   packet 0 trains the weights, packet 1 aligns the channels and lets the
//   testbench calibrate each Spine's user reference, packet 2 carries the
//   checked payload.
// Checks: each Spine's weights and coarse settings, each Spine's downsampled
// payload sample by sample against the model, that the two Spines' payload
// windows carry the same symbols, and that the chain output equals the
// saturated sum of both partial results. Mechanisms counted: chain sums,
// payload words per Spine, all four 16-QAM amplitude levels sent.
`include "tb_util.svh"
module tb_spine_chain;
  import mimo_pkg::*;
  localparam int NSP = 2;
  localparam int M = 4, K = 2, P = 8, B = 8, OS = 2, L = 64, NC = 33;
  localparam int NS = 6, SW = 12, NO = P / OS, QW = 5;
  localparam int SLOT0 = 4, SLEN = 64, UOFS = 8, PAY0 = 140, NSYM = 64, PAYL = 20, PKT = 200;
  localparam int LAT0 = (4 + 1 + 2 + M + K + 2) * P + 32 + 1 + 1;

  logic clk = 0, rst_n = 0;
  logic adc_valid [NSP], beacon [NSP];
  logic signed [B-1:0] adc_i [NSP][M][P], adc_q [NSP][M][P];
  logic signed [B-1:0] rrc_coef [NC];
  logic signed [B-1:0] iq_a [M], iq_b [M], iq_c [M], iq_d [M], dc_i [M], dc_q [M];
  logic [B-1:0] thr;
  logic [2*(B+NS+1)-1:0] lower_ch, lower_u;
  logic [15:0] slot_start, slot_len, user_ofs, pay_len;
  logic [15:0] user_ref [NSP];
  logic [31:0] pay_start [NSP];
  logic [NS-1:0] w_seed [K];
  logic [K-1:0] top_valid = '0;
  logic signed [SW-1:0] top_i [K][NO], top_q [K][NO];
  logic [K-1:0] dn_valid [NSP];
  logic signed [SW-1:0] dn_i [NSP][K][NO], dn_q [NSP][K][NO];
  logic [M-1:0] ch_est_valid [NSP], ch_ok [NSP];
  logic [31:0] ch_pos [NSP][M], u_pos [NSP][K];
  logic signed [QW-1:0] ch_q [NSP][M], u_q [NSP][K], fs_q [NSP][M];
  logic [K-1:0] u_est_valid [NSP], u_ok [NSP];
  logic signed [B-1:0] w_i [NSP][M][K], w_q [NSP][M][K];
  logic [6:0] cs_delay [NSP][M];

  // Spine 1 gets its inputs one clock after Spine 0
  logic signed [B-1:0] adc1_i [M][P], adc1_q [M][P];
  logic adc1_valid = 0, beacon1 = 0;
  always @(posedge clk) begin
    adc_i[1] <= adc1_i; adc_q[1] <= adc1_q;
    adc_valid[1] <= adc1_valid; beacon[1] <= beacon1;
  end

  spine u_sp0 (
    .clk, .rst_n, .adc_valid(adc_valid[0]), .adc_i(adc_i[0]), .adc_q(adc_q[0]), .beacon(beacon[0]),
    .rrc_coef, .iq_a, .iq_b, .iq_c, .iq_d, .dc_i, .dc_q,
    .thr_ch(thr), .lower_ch, .thr_u(thr), .lower_u,
    .slot_start, .slot_len, .user_ofs, .user_ref(user_ref[0]), .pay_start(pay_start[0]), .pay_len,
    .w_seed, .up_valid(top_valid), .up_i(top_i), .up_q(top_q),
    .dn_valid(dn_valid[0]), .dn_i(dn_i[0]), .dn_q(dn_q[0]),
    .ch_est_valid(ch_est_valid[0]), .ch_pos(ch_pos[0]), .ch_q(ch_q[0]),
    .u_est_valid(u_est_valid[0]), .u_pos(u_pos[0]), .u_q(u_q[0]),
    .w_i(w_i[0]), .w_q(w_q[0]), .cs_delay(cs_delay[0]), .fs_q(fs_q[0]), .ch_ok(ch_ok[0]), .u_ok(u_ok[0])
  );
  spine u_sp1 (
    .clk, .rst_n, .adc_valid(adc_valid[1]), .adc_i(adc_i[1]), .adc_q(adc_q[1]), .beacon(beacon[1]),
    .rrc_coef, .iq_a, .iq_b, .iq_c, .iq_d, .dc_i, .dc_q,
    .thr_ch(thr), .lower_ch, .thr_u(thr), .lower_u,
    .slot_start, .slot_len, .user_ofs, .user_ref(user_ref[1]), .pay_start(pay_start[1]), .pay_len,
    .w_seed, .up_valid(dn_valid[0]), .up_i(dn_i[0]), .up_q(dn_q[0]),
    .dn_valid(dn_valid[1]), .dn_i(dn_i[1]), .dn_q(dn_q[1]),
    .ch_est_valid(ch_est_valid[1]), .ch_pos(ch_pos[1]), .ch_q(ch_q[1]),
    .u_est_valid(u_est_valid[1]), .u_pos(u_pos[1]), .u_q(u_q[1]),
    .w_i(w_i[1]), .w_q(w_q[1]), .cs_delay(cs_delay[1]), .fs_q(fs_q[1]), .ch_ok(ch_ok[1]), .u_ok(u_ok[1])
  );

  always #5 clk = ~clk;
  `TB_WATCHDOG(2000)

  int checks = 0, failures = 0;
  int pilot [K][2 * L];
  int hi [NSP][M][K], hq [NSP][M][K], ehi [NSP][M][K], ehq [NSP][M][K];
  int dm [NSP][M] = '{'{0, 5, 2, 7}, '{3, 1, 6, 0}};
  int maxd [NSP] = '{7, 6};
  int du [K] = '{0, 2};
  int xi [NSP][M][PKT * P], xq [NSP][M][PKT * P], zi [NSP][M][PKT * P], zq [NSP][M][PKT * P];
  int si [K][NSYM], sq [K][NSYM];
  int lvl_seen [4] = '{0, 0, 0, 0};
  int cur_pkt = 0;
  int n_chain = 0, n_same = 0;
  int n_pay [NSP][K];

  function automatic int f(int v);   // one 127/128 scaling with rounding
    return int'(sat(rnd_shift(longint'(v) * 127, 7), B));
  endfunction

  task automatic make_pilot(int k);
    int a [L], b [L], na [L], nb [L], d, w;
    for (int m = 0; m < L; m++) begin a[m] = (m == 0); b[m] = (m == 0); end
    for (int n = 0; n < NS; n++) begin
      d = 1 << n;
      w = w_seed[k][n] ? -1 : 1;
      for (int m = 0; m < L; m++) begin
        na[m] = w * a[m] + ((m >= d) ? b[m - d] : 0);
        nb[m] = w * a[m] - ((m >= d) ? b[m - d] : 0);
      end
      a = na; b = nb;
    end
    for (int c = 0; c < L; c++) begin pilot[k][c] = a[L - 1 - c]; pilot[k][L + c] = b[L - 1 - c]; end
  endtask

  function automatic int sidelobe(int k);
    int side, acc;
    side = 0;
    for (int sh = 1; sh < 2 * L; sh++) begin
      acc = 0;
      for (int m = 0; m + sh < 2 * L; m++) acc += pilot[k][m] * pilot[k][m + sh];
      if (acc < 0) acc = -acc;
      if (acc > side) side = acc;
    end
    return side;
  endfunction

  // 16-QAM level: +-1 or +-3, scaled by 13
  function automatic int qam16();
    int lv;
    lv = $urandom_range(0, 3);
    lvl_seen[lv]++;
    return (2 * lv - 3) * 13;
  endfunction

  task automatic make_packet();
    for (int k = 0; k < K; k++) for (int n = 0; n < NSYM; n++) begin
      si[k][n] = qam16();
      sq[k][n] = qam16();
    end
    for (int sp = 0; sp < NSP; sp++) begin
      for (int m = 0; m < M; m++) for (int s = 0; s < PKT * P; s++) begin xi[sp][m][s] = 0; xq[sp][m][s] = 0; end
      for (int m = 0; m < M; m++) for (int k = 0; k < K; k++) begin
        int base;
        base = (SLOT0 + k * SLEN) * P + du[k] + dm[sp][m];
        for (int c = 0; c < 2 * L; c++) begin
          xi[sp][m][base + c * OS] += hi[sp][m][k] * pilot[k][c];
          xq[sp][m][base + c * OS] += hq[sp][m][k] * pilot[k][c];
        end
        base = PAY0 * P + du[k] + dm[sp][m];
        for (int n = 0; n < NSYM; n++) begin
          xi[sp][m][base + n * OS] += (hi[sp][m][k] * si[k][n] - hq[sp][m][k] * sq[k][n]) / 128;
          xq[sp][m][base + n * OS] += (hi[sp][m][k] * sq[k][n] + hq[sp][m][k] * si[k][n]) / 128;
        end
      end
      for (int m = 0; m < M; m++) for (int s = 0; s < PKT * P; s++) begin
        xi[sp][m][s] = int'(sat(xi[sp][m][s], B)); xq[sp][m][s] = int'(sat(xq[sp][m][s], B));
        zi[sp][m][s] = f(f(xi[sp][m][s])); zq[sp][m][s] = f(f(xq[sp][m][s]));
      end
    end
  endtask

  task automatic expect_h();
    for (int sp = 0; sp < NSP; sp++)
      for (int m = 0; m < M; m++) for (int k = 0; k < K; k++) begin
        int pk, ri, rq;
        pk = (SLOT0 + k * SLEN) * P + du[k] + dm[sp][m] + (2 * L - 1) * OS;
        ri = 0; rq = 0;
        for (int c = 0; c < 2 * L; c++) begin
          ri += pilot[k][c] * zi[sp][m][pk - (2 * L - 1 - c) * OS];
          rq += pilot[k][c] * zq[sp][m][pk - (2 * L - 1 - c) * OS];
        end
        ehi[sp][m][k] = int'(sat(rnd_shift(ri, NS + 1), B));
        ehq[sp][m][k] = int'(sat(rnd_shift(rq, NS + 1), B));
      end
  endtask

  // expected beamformer output of Spine sp, user k, downsampler-input sample u
  function automatic void expect_y(int sp, int k, int u, output int yi, output int yq);
    longint acc_i, acc_q;
    acc_i = 0; acc_q = 0;
    for (int m = 0; m < M; m++) begin
      int s;
      s = u - LAT0 - maxd[sp] + dm[sp][m];
      if (s >= 0 && s < PKT * P) begin
        acc_i += longint'(ehi[sp][m][k]) * zi[sp][m][s] + longint'(ehq[sp][m][k]) * zq[sp][m][s];
        acc_q += longint'(ehi[sp][m][k]) * zq[sp][m][s] - longint'(ehq[sp][m][k]) * zi[sp][m][s];
      end
    end
    yi = int'(sat(rnd_shift(acc_i, B - 1), B));
    yq = int'(sat(rnd_shift(acc_q, B - 1), B));
  endfunction

  // per-Spine word tracking at the downsampler input (same rule as the
  // sequencer: word 0 is the one that arrives with the beacon)
  int us_word [NSP] = '{0, 0};
  int dsw [NSP][K];
  logic [K-1:0] ds_v [NSP], us_v [NSP], ds_en [NSP];
  logic signed [B-1:0] ds_i [NSP][K][NO], ds_q [NSP][K][NO];
  logic [0:0] ds_ph [NSP][K];
  assign ds_v[0] = u_sp0.ds_v;   assign ds_v[1] = u_sp1.ds_v;
  assign us_v[0] = u_sp0.us_v;   assign us_v[1] = u_sp1.us_v;
  assign ds_en[0] = u_sp0.ds_en; assign ds_en[1] = u_sp1.ds_en;
  assign ds_i[0] = u_sp0.ds_i;   assign ds_i[1] = u_sp1.ds_i;
  assign ds_q[0] = u_sp0.ds_q;   assign ds_q[1] = u_sp1.ds_q;
  assign ds_ph[0] = u_sp0.ds_phase; assign ds_ph[1] = u_sp1.ds_phase;

  always @(posedge clk) if (rst_n) begin
    for (int sp = 0; sp < NSP; sp++) begin
      if (beacon[sp]) us_word[sp] <= us_v[sp][0] ? 1 : 0;
      else if (us_v[sp][0]) us_word[sp] <= us_word[sp] + 1;
      for (int k = 0; k < K; k++)
        if (us_v[sp][k] && ds_en[sp][k]) dsw[sp][k] <= beacon[sp] ? 0 : us_word[sp];
    end
  end

  // payload of each Spine against the model, in packet 2
  always @(posedge clk) if (rst_n && cur_pkt == 2) begin
    for (int sp = 0; sp < NSP; sp++) for (int k = 0; k < K; k++) if (ds_v[sp][k]) begin
      n_pay[sp][k]++;
      for (int j = 0; j < NO; j++) begin
        int yi, yq;
        expect_y(sp, k, dsw[sp][k] * P + j * OS + int'(ds_ph[sp][k]), yi, yq);
        `CHECK_EQ(int'(ds_i[sp][k][j]), yi, "payload I")
        `CHECK_EQ(int'(ds_q[sp][k][j]), yq, "payload Q")
      end
    end
  end

  // chain: Spine 1's local word must meet Spine 0's word of the same symbols
  int dsw0_prev [K];
  int sum_i [K][NO], sum_q [K][NO];
  logic [K-1:0] sum_v = '0;
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < K; k++) begin
      dsw0_prev[k] <= dsw[0][k];
      sum_v[k] <= ds_v[1][k];
      if (ds_v[1][k] && cur_pkt == 2) begin
        `CHECK_TRUE(dn_valid[0][k], "upper word present when the lower Spine adds")
        `CHECK_EQ(dsw0_prev[k], dsw[1][k], "both Spines add the same payload word")
        if (dsw0_prev[k] == dsw[1][k]) n_same++;
      end
      for (int j = 0; j < NO; j++) begin
        sum_i[k][j] <= int'(sat(longint'(dn_i[0][k][j]) + ds_i[1][k][j], SW));
        sum_q[k][j] <= int'(sat(longint'(dn_q[0][k][j]) + ds_q[1][k][j], SW));
      end
      if (sum_v[k] && cur_pkt == 2) begin
        `CHECK_TRUE(dn_valid[1][k], "chain output valid")
        for (int j = 0; j < NO; j++) begin
          `CHECK_EQ(int'(dn_i[1][k][j]), sum_i[k][j], "chain sum I")
          `CHECK_EQ(int'(dn_q[1][k][j]), sum_q[k][j], "chain sum Q")
        end
        n_chain++;
      end
    end
  end

  task automatic send_packet(int p);
    cur_pkt = p;
    make_packet();
    for (int w = 0; w < PKT; w++) begin
      @(negedge clk);
      adc_valid[0] = 1; adc1_valid = 1;
      beacon[0] = (w == 0); beacon1 = (w == 0);
      for (int m = 0; m < M; m++) for (int j = 0; j < P; j++) begin
        adc_i[0][m][j] = B'(xi[0][m][w * P + j]);
        adc_q[0][m][j] = B'(xq[0][m][w * P + j]);
        adc1_i[m][j] = B'(xi[1][m][w * P + j]);
        adc1_q[m][j] = B'(xq[1][m][w * P + j]);
      end
    end
  endtask

  initial begin
    int tries;
    adc_valid[0] = 0; beacon[0] = 0;
    for (int m = 0; m < M; m++) for (int j = 0; j < P; j++) begin
      adc_i[0][m][j] = 0; adc_q[0][m][j] = 0; adc1_i[m][j] = 0; adc1_q[m][j] = 0;
    end
    for (int k = 0; k < K; k++) for (int j = 0; j < NO; j++) begin top_i[k][j] = 0; top_q[k][j] = 0; end
    for (int sp = 0; sp < NSP; sp++) for (int k = 0; k < K; k++) n_pay[sp][k] = 0;
    for (int c = 0; c < NC; c++) rrc_coef[c] = 0;
    rrc_coef[NC - 1] = 8'sd127;
    for (int m = 0; m < M; m++) begin
      iq_a[m] = 8'sd127; iq_b[m] = 0; iq_c[m] = 0; iq_d[m] = 8'sd127; dc_i[m] = 0; dc_q[m] = 0;
    end
    for (int k = 0; k < K; k++) begin
      tries = 0;
      do begin
        w_seed[k] = NS'($urandom);
        make_pilot(k);
        tries++;
      end while ((sidelobe(k) > 32 || (k == 1 && w_seed[1] == w_seed[0])) && tries < 200);
    end
    for (int sp = 0; sp < NSP; sp++) for (int m = 0; m < M; m++) for (int k = 0; k < K; k++) begin
      hi[sp][m][k] = $urandom_range(25, 35) * (($urandom_range(0, 1) != 0) ? 1 : -1);
      hq[sp][m][k] = $urandom_range(25, 35) * (($urandom_range(0, 1) != 0) ? 1 : -1);
    end
    thr = 8'd16;
    lower_ch = 30'(3000 * 3000); lower_u = 30'(3500 * 3500);
    slot_start = 16'(SLOT0); slot_len = 16'(SLEN); user_ofs = 16'(UOFS); pay_len = 16'(PAYL);
    for (int sp = 0; sp < NSP; sp++) begin user_ref[sp] = 0; pay_start[sp] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    send_packet(0);
    expect_h();
    repeat (2) @(negedge clk);    // Spine 1 is one clock behind
    for (int sp = 0; sp < NSP; sp++) for (int m = 0; m < M; m++) for (int k = 0; k < K; k++) begin
      `CHECK_EQ(int'(w_i[sp][m][k]), ehi[sp][m][k], "channel estimate I")
      `CHECK_EQ(int'(w_q[sp][m][k]), ehq[sp][m][k], "channel estimate Q")
    end
    send_packet(1);
    repeat (2) @(negedge clk);
    for (int sp = 0; sp < NSP; sp++) begin
      for (int m = 0; m < M; m++)
        `CHECK_EQ(int'(cs_delay[sp][m]), maxd[sp] - dm[sp][m], "coarse channel delay")
      `CHECK_EQ(int'(u_pos[sp][1]) - int'(u_pos[sp][0]), du[1] - du[0], "relative user delay")
      user_ref[sp]  = 16'(u_pos[sp][0]);
      pay_start[sp] = 32'(PAY0 * P + maxd[sp] + LAT0);
    end
    send_packet(2);
    repeat (2) @(negedge clk);
    for (int sp = 0; sp < NSP; sp++) begin
      `CHECK_EQ(int'(u_ok[sp]), 3, "both users found after beamforming")
      for (int k = 0; k < K; k++) `CHECK_EQ(n_pay[sp][k], PAYL, "payload words per user and Spine")
    end
    `CHECK_TRUE(n_chain == K * PAYL, "chain sums")
    `CHECK_TRUE(n_same == K * PAYL, "aligned payload words")
    for (int lv = 0; lv < 4; lv++) `CHECK_TRUE(lvl_seen[lv] > 0, "16-QAM amplitude level used")
    $display("mechanisms: chain_sums=%0d aligned_words=%0d payload=%0d/%0d/%0d/%0d qam_levels=%0d/%0d/%0d/%0d",
             n_chain, n_same, n_pay[0][0], n_pay[0][1], n_pay[1][0], n_pay[1][1],
             lvl_seen[0], lvl_seen[1], lvl_seen[2], lvl_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
