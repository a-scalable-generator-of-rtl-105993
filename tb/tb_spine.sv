// tb_spine: end-to-end test of one Spine at the default size (4 channels,
// 2 users, 8 bits, 8 samples per clock, oversampling 2, Golay length 64,
// 65-tap RRC filter). No parameter of the Spine is overridden.
//
// Each packet: a beacon, two time-interleaved Golay pilot slots (one per
// user, 64 words each, pilots zero-stuffed at oversampling 2), then 64 QPSK
// symbols from both users at once. Channel m sees the users through h_mk
// and a channel delay d_m; user 1 arrives 2 samples after user 0. The RRC
// filter is set to a single tap and the IQ matrix to the identity (both
// 127/128, modelled exactly), DC to 0, so every value can be predicted.
//   packet 0: channel estimates -> weights; channel delays measured.
//   packet 1: channels aligned; users' pilots found after the beamformer;
//             the testbench reads the user-0 peak position once to calibrate
//             the user reference (the system's one-time calibration).
//   packet 2: payload checked sample by sample at the daisy-chain output:
//             dn = up + sat(round(sum_m conj(h_mk) z_m / 128)), with z the
//             corrected samples, the channels aligned by d_max - d_m.
//   packets 3-4: channel 0's pilot is sent on two adjacent samples (a peak
//             half a sample later); the fine channel
//             synchronizer must then be set to a non-zero step.
// Mechanisms counted (each must occur): slot seed switch, channel peak
// reports, user peak reports, weight load, non-zero coarse delay, non-zero
// fine step, both payload windows, daisy-chain add, symbol rate P/OS per
// clock per user.
`include "tb_util.svh"
module tb_spine;
  import mimo_pkg::*;
  localparam int M = 4, K = 2, P = 8, B = 8, OS = 2, L = 64, NT = 65, NC = 33;
  localparam int NS = 6, SW = 12, NO = P / OS, QW = 5;
  localparam int SLOT0 = 4, SLEN = 64, UOFS = 8, PAY0 = 140, NSYM = 64, PAYL = 20, PKT = 200;
  // ADC-to-downsampler-input latency of a channel with zero coarse delay, in
  // samples: correction 4 words + RRC centre tap 32, coarse sync 1 word,
  // fine sync 2 words + 1, beamformer M+K words, user fine sync 2 words + 1.
  localparam int LAT0 = (4 + 1 + 2 + M + K + 2) * P + 32 + 1 + 1;

  logic clk = 0, rst_n = 0, adc_valid = 0, beacon = 0;
  logic signed [B-1:0] adc_i [M][P], adc_q [M][P];
  logic signed [B-1:0] rrc_coef [NC];
  logic signed [B-1:0] iq_a [M], iq_b [M], iq_c [M], iq_d [M], dc_i [M], dc_q [M];
  logic [B-1:0] thr_ch, thr_u;
  logic [2*(B+NS+1)-1:0] lower_ch, lower_u;
  logic [15:0] slot_start, slot_len, user_ofs, user_ref, pay_len;
  logic [31:0] pay_start;
  logic [NS-1:0] w_seed [K];
  logic [K-1:0] up_valid = '0, dn_valid;
  logic signed [SW-1:0] up_i [K][NO], up_q [K][NO], dn_i [K][NO], dn_q [K][NO];
  logic [M-1:0] ch_est_valid, ch_ok;
  logic [31:0] ch_pos [M], u_pos [K];
  logic signed [QW-1:0] ch_q [M], u_q [K], fs_q [M];
  logic [K-1:0] u_est_valid, u_ok;
  logic signed [B-1:0] w_i [M][K], w_q [M][K];
  logic [6:0] cs_delay [M];

  spine dut (.*);

  always #5 clk = ~clk;
  `TB_WATCHDOG(3000)

  int checks = 0, failures = 0;
  int pilot [K][2 * L];
  int hi [M][K], hq [M][K], ehi [M][K], ehq [M][K];
  int dm [M] = '{0, 5, 2, 7};
  int du [K] = '{0, 2};
  int maxd = 7;
  int xi [M][PKT * P], xq [M][PKT * P], zi [M][PKT * P], zq [M][PKT * P];
  int si [K][NSYM], sq [K][NSYM];
  int cur_pkt = 0, frac0 = 0;
  // mechanism counters
  int n_seed_sw = 0, n_ch_rep = 0, n_u_rep = 0, n_wload = 0, n_cs_nz = 0, n_fs_nz = 0;
  int n_pay [K] = '{0, 0}, n_add = 0, n_pay_checked = 0;

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

  // received samples of one packet (users' pilots in their slots, payload)
  task automatic make_packet(bit half0);
    for (int m = 0; m < M; m++) for (int s = 0; s < PKT * P; s++) begin xi[m][s] = 0; xq[m][s] = 0; end
    for (int k = 0; k < K; k++) for (int n = 0; n < NSYM; n++) begin
      si[k][n] = ($urandom_range(0, 1) != 0) ? 40 : -40;
      sq[k][n] = ($urandom_range(0, 1) != 0) ? 40 : -40;
    end
    for (int m = 0; m < M; m++) for (int k = 0; k < K; k++) begin
      int base, split;
      split = (half0 && m == 0) ? 1 : 0;
      base = (SLOT0 + k * SLEN) * P + du[k] + dm[m];
      for (int c = 0; c < 2 * L; c++) begin
        int s;
        s = base + c * OS;
        if (split) begin
          xi[m][s] += hi[m][k] * pilot[k][c]; xq[m][s] += hq[m][k] * pilot[k][c];
          xi[m][s + 1] += hi[m][k] * pilot[k][c]; xq[m][s + 1] += hq[m][k] * pilot[k][c];
        end else begin
          xi[m][s] += hi[m][k] * pilot[k][c]; xq[m][s] += hq[m][k] * pilot[k][c];
        end
      end
      base = PAY0 * P + du[k] + dm[m];
      for (int n = 0; n < NSYM; n++) begin
        int s;
        s = base + n * OS;
        // (hi + j hq)(si + j sq) / 128
        xi[m][s] += (hi[m][k] * si[k][n] - hq[m][k] * sq[k][n]) / 128;
        xq[m][s] += (hi[m][k] * sq[k][n] + hq[m][k] * si[k][n]) / 128;
      end
    end
    for (int m = 0; m < M; m++) for (int s = 0; s < PKT * P; s++) begin
      xi[m][s] = int'(sat(xi[m][s], B)); xq[m][s] = int'(sat(xq[m][s], B));
      zi[m][s] = f(f(xi[m][s])); zq[m][s] = f(f(xq[m][s]));
    end
  endtask

  // expected channel estimate: matched filter on z at the pilot peak / 2L
  task automatic expect_h();
    for (int m = 0; m < M; m++) for (int k = 0; k < K; k++) begin
      int pk, ri, rq;
      pk = (SLOT0 + k * SLEN) * P + du[k] + dm[m] + (2 * L - 1) * OS;
      ri = 0; rq = 0;
      for (int c = 0; c < 2 * L; c++) begin
        ri += pilot[k][c] * zi[m][pk - (2 * L - 1 - c) * OS];
        rq += pilot[k][c] * zq[m][pk - (2 * L - 1 - c) * OS];
      end
      ehi[m][k] = int'(sat(rnd_shift(ri, NS + 1), B));
      ehq[m][k] = int'(sat(rnd_shift(rq, NS + 1), B));
    end
  endtask

  // expected beamformer output of user k at downsampler-input sample u
  function automatic void expect_y(int k, int u, output int yi, output int yq);
    longint acc_i, acc_q;
    acc_i = 0; acc_q = 0;
    for (int m = 0; m < M; m++) begin
      int s;
      s = u - LAT0 - maxd + dm[m];
      if (s >= 0 && s < PKT * P) begin
        acc_i += longint'(ehi[m][k]) * zi[m][s] + longint'(ehq[m][k]) * zq[m][s];
        acc_q += longint'(ehi[m][k]) * zq[m][s] - longint'(ehq[m][k]) * zi[m][s];
      end
    end
    yi = int'(sat(rnd_shift(acc_i, B - 1), B));
    yq = int'(sat(rnd_shift(acc_q, B - 1), B));
  endfunction

  logic [NS-1:0] last_seed;

  always @(posedge clk) if (rst_n) begin
    if (dut.ch_seed != last_seed) n_seed_sw++;
    last_seed <= dut.ch_seed;
    n_ch_rep += $countones(ch_est_valid);
    n_u_rep  += $countones(u_est_valid);
    if (dut.w_load) n_wload++;
    for (int m = 0; m < M; m++) begin
      if (cs_delay[m] != 0 && beacon) n_cs_nz++;
      if (fs_q[m] != 0 && beacon) n_fs_nz++;
    end
  end

  // payload check in packet 2: each downsampler output word is compared
  // with the model; the daisy-chain output one clock later must be the
  // saturated sum of the upper input and the local word.
  int dsw [K];        // downsampler-input word index held by each output
  int us_word = 0;
  int upi_prev [K][NO], upq_prev [K][NO], lci_prev [K][NO], lcq_prev [K][NO];
  logic [K-1:0] upv_prev = '0, lcv_prev = '0;

  always @(posedge clk) if (rst_n) begin
    if (beacon) us_word <= dut.us_v[0] ? 1 : 0;
    else if (dut.us_v[0]) us_word <= us_word + 1;
    for (int k = 0; k < K; k++) if (dut.us_v[k] && dut.ds_en[k]) dsw[k] <= beacon ? 0 : us_word;
  end

  always @(posedge clk) if (rst_n && cur_pkt == 2) begin
    for (int k = 0; k < K; k++) begin
      if (dut.ds_v[k]) begin
        n_pay[k]++;
        for (int j = 0; j < NO; j++) begin
          int yi, yq;
          expect_y(k, dsw[k] * P + j * OS + int'(dut.ds_phase[k]), yi, yq);
          `CHECK_EQ(int'(dut.ds_i[k][j]), yi, "payload I")
          `CHECK_EQ(int'(dut.ds_q[k][j]), yq, "payload Q")
          n_pay_checked++;
        end
      end
      if (dn_valid[k] && upv_prev[k]) begin
        for (int j = 0; j < NO; j++) begin
          `CHECK_EQ(int'(dn_i[k][j]), int'(sat(upi_prev[k][j] + (lcv_prev[k] ? lci_prev[k][j] : 0), SW)), "chain sum I")
          `CHECK_EQ(int'(dn_q[k][j]), int'(sat(upq_prev[k][j] + (lcv_prev[k] ? lcq_prev[k][j] : 0), SW)), "chain sum Q")
        end
        if (lcv_prev[k]) n_add++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    upv_prev <= up_valid;
    lcv_prev <= dut.ds_v;
    for (int k = 0; k < K; k++) for (int j = 0; j < NO; j++) begin
      upi_prev[k][j] <= int'(up_i[k][j]);
      upq_prev[k][j] <= int'(up_q[k][j]);
      lci_prev[k][j] <= int'(dut.ds_i[k][j]);
      lcq_prev[k][j] <= int'(dut.ds_q[k][j]);
    end
  end

  task automatic send_packet(int p, bit half0);
    cur_pkt = p;
    make_packet(half0);
    for (int w = 0; w < PKT; w++) begin
      @(negedge clk);
      adc_valid = 1;
      beacon = (w == 0);
      for (int m = 0; m < M; m++) for (int j = 0; j < P; j++) begin
        adc_i[m][j] = B'(xi[m][w * P + j]);
        adc_q[m][j] = B'(xq[m][w * P + j]);
      end
      up_valid = (p == 2) ? '1 : '0;
      for (int k = 0; k < K; k++) for (int j = 0; j < NO; j++) begin
        up_i[k][j] = (p == 2) ? SW'($urandom_range(0, 400) - 200) : '0;
        up_q[k][j] = (p == 2) ? SW'($urandom_range(0, 400) - 200) : '0;
      end
    end
  endtask

  initial begin
    int tries;
    for (int m = 0; m < M; m++) for (int j = 0; j < P; j++) begin adc_i[m][j] = 0; adc_q[m][j] = 0; end
    for (int k = 0; k < K; k++) for (int j = 0; j < NO; j++) begin up_i[k][j] = 0; up_q[k][j] = 0; end
    for (int c = 0; c < NC; c++) rrc_coef[c] = 0;
    rrc_coef[NC - 1] = 8'sd127;
    for (int m = 0; m < M; m++) begin
      iq_a[m] = 8'sd127; iq_b[m] = 0; iq_c[m] = 0; iq_d[m] = 8'sd127; dc_i[m] = 0; dc_q[m] = 0;
    end
    // seeds with low pilot sidelobes, different per user
    for (int k = 0; k < K; k++) begin
      tries = 0;
      do begin
        w_seed[k] = NS'($urandom);
        make_pilot(k);
        tries++;
      end while ((sidelobe(k) > 32 || (k == 1 && w_seed[1] == w_seed[0])) && tries < 200);
    end
    for (int m = 0; m < M; m++) for (int k = 0; k < K; k++) begin
      hi[m][k] = $urandom_range(25, 35) * (($urandom_range(0, 1) != 0) ? 1 : -1);
      hq[m][k] = $urandom_range(25, 35) * (($urandom_range(0, 1) != 0) ? 1 : -1);
    end
    thr_ch = 8'd16; thr_u = 8'd16;
    lower_ch = 30'(3000 * 3000); lower_u = 30'(3500 * 3500);
    slot_start = 16'(SLOT0); slot_len = 16'(SLEN); user_ofs = 16'(UOFS);
    user_ref = 0; pay_start = 0; pay_len = 16'(PAYL);
    last_seed = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // packet 0: channel estimation
    send_packet(0, 0);
    expect_h();
    for (int m = 0; m < M; m++) for (int k = 0; k < K; k++) begin
      `CHECK_EQ(int'(w_i[m][k]), ehi[m][k], "channel estimate I")
      `CHECK_EQ(int'(w_q[m][k]), ehq[m][k], "channel estimate Q")
    end
    // packet 1: aligned channels, user delays
    send_packet(1, 0);
    for (int m = 0; m < M; m++) begin
      `CHECK_EQ(int'(cs_delay[m]), maxd - dm[m], "coarse channel delay")
      `CHECK_EQ(int'(fs_q[m]), 0, "fine channel step")
    end
    `CHECK_EQ(int'(ch_ok), 15, "all channels found their pilots")
    `CHECK_EQ(int'(u_pos[1]) - int'(u_pos[0]), du[1] - du[0], "relative user delay")
    `CHECK_EQ(int'(u_q[0]), 0, "user 0 fine delay")
    user_ref  = 16'(u_pos[0]);
    pay_start = 32'(PAY0 * P + maxd + LAT0);
    // packet 2: payload through the daisy chain
    send_packet(2, 0);
    `CHECK_EQ(int'(u_ok), 3, "both users found after beamforming")
    for (int k = 0; k < K; k++) `CHECK_EQ(n_pay[k], PAYL, "payload words per user (P/OS symbols per word)")
    // packets 3 and 4: half-sample extra delay on channel 0
    send_packet(3, 1);
    send_packet(4, 1);
    @(negedge clk) adc_valid = 0; beacon = 1;
    @(negedge clk) beacon = 0;
    `CHECK_TRUE(fs_q[0] != 0, "fine channel step after a half-sample delay")
    if (fs_q[0] != 0) n_fs_nz++;
    // mechanisms
    `CHECK_TRUE(n_seed_sw >= 5, "slot seed switches")
    `CHECK_TRUE(n_ch_rep >= M * K * 5, "channel peak reports")
    `CHECK_TRUE(n_u_rep >= K * 3, "user peak reports")
    `CHECK_TRUE(n_wload == 5, "one weight load per packet")
    `CHECK_TRUE(n_cs_nz > 0, "non-zero coarse delay")
    `CHECK_TRUE(n_fs_nz > 0, "non-zero fine step")
    `CHECK_TRUE(n_add > 0, "daisy-chain additions")
    `CHECK_TRUE(n_pay_checked == K * PAYL * NO, "payload samples checked")
    $display("mechanisms: seed_switch=%0d ch_reports=%0d user_reports=%0d w_load=%0d coarse_nz=%0d fine_nz=%0d chain_adds=%0d payload=%0d/%0d",
             n_seed_sw, n_ch_rep, n_u_rep, n_wload, n_cs_nz, n_fs_nz, n_add, n_pay[0], n_pay[1]);
    `TB_FINISH
  end
endmodule
