// spine: one panel of a distributed massive-MIMO uplink receiver.
//
// M antenna channels enter as P complex samples per clock (B bits, Q0.(B-1)).
// Per channel: signal_correction (RRC filter, IQ correction, DC removal),
// then two branches:
//   - delay_estimator: Golay correlation during the pilot slots gives the
//     frequency-flat channel coefficient h_mk of every user and the channel
//     delay;
//   - coarse_delay_sync + fine_delay_sync: align the channel in time with
//     the settings derived from the previous packet.
// The aligned channels feed the mrc_beamformer, which forms the K user
// streams y_k = sum_m conj(h_mk) x_m. Per user: a delay_estimator finds the
// user's delay on its beamformed pilot, fine_delay_sync resamples it, the
// downsampler keeps one sample in OS inside the user's payload window, and
// panel_sum adds the result to the stream from the upper panel of the daisy
// chain and passes it on. The sequencing_controller runs the packet timing
// from the beacon and moves estimates into settings.
//
// Configuration values are plain input ports; the estimates and settings
// are brought out as debug/status ports. Defaults are the FPGA instance:
// 4 channels, 2 users, 8 bits, 8 samples per clock, oversampling 2, Golay
// length 64, 65-tap RRC. Output throughput is K*P/OS complex symbols per
// clock (2*f*B*P*K/OS bit/s; 6.4 Gb/s at 50 MHz).
// Latency, ADC to the downsampler input, in words: 4 (correction)
// + 1 + coarse delay (coarse sync) + 2 (fine sync, +l samples)
// + M+K (beamformer) + 2 (user fine sync, +l samples).
module spine
  import mimo_pkg::*;
#(
  parameter int unsigned M    = DEF_M,
  parameter int unsigned K    = DEF_K,
  parameter int unsigned P    = DEF_P,
  parameter int unsigned B    = DEF_B,
  parameter int unsigned OS   = DEF_OS,
  parameter int unsigned L    = DEF_L,
  parameter int unsigned NT   = DEF_NT,
  parameter int unsigned WS   = DEF_WS,
  parameter int unsigned LL   = DEF_LL,
  parameter int unsigned QD   = DEF_QD,
  parameter int unsigned MAXD = 64,
  parameter int unsigned SW   = DEF_B + 4,
  localparam int unsigned NC  = (NT + 1) / 2,
  localparam int unsigned NSD = $clog2(L),
  localparam int unsigned CW  = B + NSD + 1,
  localparam int unsigned PW  = 2 * CW,
  localparam int unsigned QW  = $clog2(QD + 1) + 1,
  localparam int unsigned DW  = $clog2(MAXD + 1),
  localparam int unsigned NO  = P / OS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // ADC samples
  input  logic                 adc_valid,
  input  logic signed [B-1:0]  adc_i [M][P],
  input  logic signed [B-1:0]  adc_q [M][P],
  input  logic                 beacon,
  // configuration
  input  logic signed [B-1:0]  rrc_coef [NC],
  input  logic signed [B-1:0]  iq_a [M],
  input  logic signed [B-1:0]  iq_b [M],
  input  logic signed [B-1:0]  iq_c [M],
  input  logic signed [B-1:0]  iq_d [M],
  input  logic signed [B-1:0]  dc_i [M],
  input  logic signed [B-1:0]  dc_q [M],
  input  logic [B-1:0]         thr_ch,
  input  logic [PW-1:0]        lower_ch,
  input  logic [B-1:0]         thr_u,
  input  logic [PW-1:0]        lower_u,
  input  logic [15:0]          slot_start,
  input  logic [15:0]          slot_len,
  input  logic [15:0]          user_ofs,
  input  logic [15:0]          user_ref,
  input  logic [31:0]          pay_start,
  input  logic [15:0]          pay_len,
  input  logic [NSD-1:0]       w_seed [K],
  // daisy chain
  input  logic [K-1:0]         up_valid,
  input  logic signed [SW-1:0] up_i [K][NO],
  input  logic signed [SW-1:0] up_q [K][NO],
  output logic [K-1:0]         dn_valid,
  output logic signed [SW-1:0] dn_i [K][NO],
  output logic signed [SW-1:0] dn_q [K][NO],
  // debug / status
  output logic [M-1:0]         ch_est_valid,
  output logic [31:0]          ch_pos [M],
  output logic signed [QW-1:0] ch_q   [M],
  output logic [K-1:0]         u_est_valid,
  output logic [31:0]          u_pos [K],
  output logic signed [QW-1:0] u_q   [K],
  output logic signed [B-1:0]  w_i [M][K],
  output logic signed [B-1:0]  w_q [M][K],
  output logic [DW-1:0]        cs_delay [M],
  output logic signed [QW-1:0] fs_q [M],
  output logic [M-1:0]         ch_ok,
  output logic [K-1:0]         u_ok
);
  // ---------------- per channel ----------------
  logic                ch_clear, w_load;
  logic [NSD-1:0]      ch_seed;
  logic [K-1:0]        u_clear, ds_en;
  logic [M-1:0]        sc_v, cs_v, fs_v;
  logic signed [B-1:0] sc_i [M][P];
  logic signed [B-1:0] sc_q [M][P];
  logic signed [B-1:0] cs_i [M][P];
  logic signed [B-1:0] cs_q [M][P];
  logic signed [B-1:0] fs_i [M][P];
  logic signed [B-1:0] fs_qd [M][P];
  logic signed [B-1:0] ch_h_i [M];
  logic signed [B-1:0] ch_h_q [M];

  for (genvar m = 0; m < M; m++) begin : g_ch
    signal_correction #(.P(P), .B(B), .NT(NT)) u_sc (
      .clk, .rst_n, .in_valid(adc_valid), .in_i(adc_i[m]), .in_q(adc_q[m]),
      .rrc_coef, .iq_a(iq_a[m]), .iq_b(iq_b[m]), .iq_c(iq_c[m]), .iq_d(iq_d[m]),
      .dc_i(dc_i[m]), .dc_q(dc_q[m]),
      .out_valid(sc_v[m]), .out_i(sc_i[m]), .out_q(sc_q[m])
    );

    delay_estimator #(.P(P), .B(B), .L(L), .OS(OS), .WS(WS), .LL(LL), .QD(QD)) u_ce (
      .clk, .rst_n, .in_valid(sc_v[m]), .clear(ch_clear), .w_seed(ch_seed),
      .thr_x2(thr_ch), .lower(lower_ch), .in_i(sc_i[m]), .in_q(sc_q[m]),
      .est_valid(ch_est_valid[m]), .h_i(ch_h_i[m]), .h_q(ch_h_q[m]),
      .pos(ch_pos[m]), .q(ch_q[m])
    );

    coarse_delay_sync #(.P(P), .B(B), .MAXD(MAXD)) u_cs (
      .clk, .rst_n, .in_valid(sc_v[m]), .delay(cs_delay[m]),
      .in_i(sc_i[m]), .in_q(sc_q[m]),
      .out_valid(cs_v[m]), .out_i(cs_i[m]), .out_q(cs_q[m])
    );

    fine_delay_sync #(.P(P), .B(B), .LL(LL), .QD(QD)) u_fs (
      .clk, .rst_n, .in_valid(cs_v[m]), .q(fs_q[m]),
      .in_i(cs_i[m]), .in_q(cs_q[m]),
      .out_valid(fs_v[m]), .out_i(fs_i[m]), .out_q(fs_qd[m])
    );
  end

  // ---------------- beamformer ----------------
  logic                bf_v;
  logic signed [B-1:0] bf_i [K][P];
  logic signed [B-1:0] bf_q [K][P];

  mrc_beamformer #(.M(M), .K(K), .P(P), .B(B)) u_mrc (
    .clk, .rst_n, .w_load, .w_i, .w_q,
    .in_valid(&fs_v), .in_i(fs_i), .in_q(fs_qd),
    .out_valid(bf_v), .out_i(bf_i), .out_q(bf_q)
  );

  // ---------------- per user ----------------
  logic signed [QW-1:0]       us_q [K];
  logic [(OS>1?$clog2(OS):1)-1:0] ds_phase [K];
  logic [K-1:0]               us_v, ds_v;
  logic signed [B-1:0]        us_i [K][P];
  logic signed [B-1:0]        us_qd [K][P];
  logic signed [B-1:0]        ds_i [K][NO];
  logic signed [B-1:0]        ds_q [K][NO];

  for (genvar k = 0; k < K; k++) begin : g_user
    delay_estimator #(.P(P), .B(B), .L(L), .OS(OS), .WS(WS), .LL(LL), .QD(QD)) u_ue (
      .clk, .rst_n, .in_valid(bf_v), .clear(u_clear[k]), .w_seed(w_seed[k]),
      .thr_x2(thr_u), .lower(lower_u), .in_i(bf_i[k]), .in_q(bf_q[k]),
      .est_valid(u_est_valid[k]), .h_i(), .h_q(), .pos(u_pos[k]), .q(u_q[k])
    );

    fine_delay_sync #(.P(P), .B(B), .LL(LL), .QD(QD)) u_us (
      .clk, .rst_n, .in_valid(bf_v), .q(us_q[k]), .in_i(bf_i[k]), .in_q(bf_q[k]),
      .out_valid(us_v[k]), .out_i(us_i[k]), .out_q(us_qd[k])
    );

    downsampler #(.P(P), .B(B), .OS(OS)) u_ds (
      .clk, .rst_n, .in_valid(us_v[k]), .enable(ds_en[k]), .phase(ds_phase[k]),
      .in_i(us_i[k]), .in_q(us_qd[k]),
      .out_valid(ds_v[k]), .out_i(ds_i[k]), .out_q(ds_q[k])
    );
  end

  panel_sum #(.K(K), .NS(NO), .B(B), .SW(SW)) u_sum (
    .clk, .rst_n, .loc_valid(ds_v), .loc_i(ds_i), .loc_q(ds_q),
    .up_valid, .up_i, .up_q, .dn_valid, .dn_i, .dn_q
  );

  // ---------------- control ----------------
  sequencing_controller #(.M(M), .K(K), .P(P), .B(B), .OS(OS), .L(L), .QD(QD), .MAXD(MAXD)) u_seq (
    .clk, .rst_n, .in_valid(adc_valid), .beacon, .ds_valid(us_v[0]),
    .slot_start, .slot_len, .user_ofs, .user_ref, .pay_start, .pay_len, .w_seed,
    .ch_clear, .ch_seed, .ch_est_valid, .ch_h_i, .ch_h_q, .ch_pos, .ch_q,
    .cs_delay, .fs_q, .w_load, .w_i, .w_q,
    .u_clear, .u_est_valid, .u_pos, .u_q,
    .us_q, .ds_phase, .ds_en, .ch_ok, .u_ok
  );
endmodule
