// delay_estimator: Golay-pilot channel and delay estimation of one stream.
//
// Used once per antenna channel (frequency-flat channel coefficient and
// channel delay) and once per beamformed user stream (user delay), since the
// document uses the same algorithm for both. Chain:
//   golay_correlator -> power |R|^2 -> P lane_peak_detectors
//   -> global_peak_detector -> fine_delay_estimator.
// After each 'clear' (start of a pilot slot) the first peak found is
// reported once with est_valid:
//   h_i/h_q  channel coefficient R/(2L), rounded and saturated to B bits;
//   pos      coarse position of the peak in samples since the clear;
//   q        fine delay of the true peak, in units of 1/QD sample.
// Latency from the last pilot sample to est_valid is about log2(L)+WS+4
// valid words (the lane detectors watch WS samples per lane after the
// threshold is crossed).
module delay_estimator
  import mimo_pkg::*;
#(
  parameter int unsigned P  = DEF_P,
  parameter int unsigned B  = DEF_B,
  parameter int unsigned L  = DEF_L,
  parameter int unsigned OS = DEF_OS,
  parameter int unsigned WS = DEF_WS,
  parameter int unsigned LL = DEF_LL,
  parameter int unsigned QD = DEF_QD,
  localparam int unsigned NS = $clog2(L),
  localparam int unsigned CW = B + NS + 1,
  localparam int unsigned PW = 2 * CW,
  localparam int unsigned QW = $clog2(QD + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 clear,
  input  logic [NS-1:0]        w_seed,
  input  logic [B-1:0]         thr_x2,
  input  logic [PW-1:0]        lower,
  input  logic signed [B-1:0]  in_i [P],
  input  logic signed [B-1:0]  in_q [P],
  output logic                 est_valid,
  output logic signed [B-1:0]  h_i,
  output logic signed [B-1:0]  h_q,
  output logic [31:0]          pos,
  output logic signed [QW-1:0] q
);
  localparam int unsigned NPT = 2 * LL + 1;

  logic                 cv, pv;
  logic signed [CW-1:0] c_i [P];
  logic signed [CW-1:0] c_q [P];
  logic signed [CW-1:0] r_i [P];
  logic signed [CW-1:0] r_q [P];
  logic        [PW-1:0] pwr [P];
  logic        [P-1:0]  lane_done;

  golay_correlator #(.P(P), .B(B), .L(L), .OS(OS)) u_corr (
    .clk, .rst_n, .in_valid, .w_seed, .in_i, .in_q,
    .out_valid(cv), .out_i(c_i), .out_q(c_q)
  );

  // correlation power
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv <= 1'b0;
      for (int j = 0; j < P; j++) begin
        r_i[j] <= '0;
        r_q[j] <= '0;
        pwr[j] <= '0;
      end
    end else begin
      pv <= cv;
      if (cv) begin
        for (int j = 0; j < P; j++) begin
          r_i[j] <= c_i[j];
          r_q[j] <= c_q[j];
          pwr[j] <= PW'(longint'(c_i[j]) * longint'(c_i[j]) + longint'(c_q[j]) * longint'(c_q[j]));
        end
      end
    end
  end

  for (genvar j = 0; j < P; j++) begin : g_lane
    lane_peak_detector #(.WS(WS), .PW(PW), .TW(B)) u_lane (
      .clk, .rst_n, .en(pv), .clear, .pwr(pwr[j]), .thr_x2, .lower,
      .detecting(), .done(lane_done[j]), .pmax()
    );
  end

  logic                 pk_valid;
  logic signed [CW-1:0] pk_i, pk_q;
  logic [31:0]          pk_pos;
  logic [PW-1:0]        pk_norms [NPT];

  global_peak_detector #(.P(P), .WS(WS), .LL(LL), .CW(CW), .PW(PW)) u_glob (
    .clk, .rst_n, .en(pv), .clear, .r_i, .r_q, .pwr, .lane_done,
    .peak_valid(pk_valid), .peak_i(pk_i), .peak_q(pk_q), .peak_pos(pk_pos),
    .norms(pk_norms)
  );

  logic                 fv;
  logic signed [QW-1:0] fq;

  fine_delay_estimator #(.LL(LL), .QD(QD), .PW(PW)) u_fine (
    .clk, .rst_n, .in_valid(pk_valid), .norms(pk_norms), .out_valid(fv), .q_out(fq)
  );

  // report only the first peak after a clear
  logic got, pend;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got       <= 1'b0;
      pend      <= 1'b0;
      est_valid <= 1'b0;
      h_i       <= '0;
      h_q       <= '0;
      pos       <= '0;
      q         <= '0;
    end else if (clear) begin
      got       <= 1'b0;
      pend      <= 1'b0;
      est_valid <= 1'b0;
    end else begin
      est_valid <= 1'b0;
      if (pk_valid && !got && !pend) begin
        pend <= 1'b1;
        h_i  <= B'(sat(rnd_shift(longint'(pk_i), int'(NS) + 1), int'(B)));
        h_q  <= B'(sat(rnd_shift(longint'(pk_q), int'(NS) + 1), int'(B)));
        pos  <= pk_pos;
      end
      if (fv && pend) begin
        pend      <= 1'b0;
        got       <= 1'b1;
        q         <= fq;
        est_valid <= 1'b1;
      end
    end
  end
endmodule
