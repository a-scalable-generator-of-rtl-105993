// fine_delay_sync: fractional-delay resampler.
//
// Resamples the stream at t + s with s = q/QD (|s| <= 1) by Lagrange
// interpolation over 2l+1 neighbours:
//   y'(t) = sum_{i=-l..l} y(t+i) * prod_{j != i} (s - j)/(i - j).
// The weights for all 2*QD+1 possible q are constants computed at
// elaboration (B fraction bits, B+2 bits wide so that 1.0 is exact); the
// runtime q selects one set, which feeds a non-symmetric FIR filter (the same
// FIR generator as the RRC filter) on I and on Q. Because the sum uses l
// future samples, output sample t is produced for input time t+l: latency is
// 2 valid words plus l samples.
module fine_delay_sync
  import mimo_pkg::*;
#(
  parameter int unsigned P  = DEF_P,
  parameter int unsigned B  = DEF_B,
  parameter int unsigned LL = DEF_LL,
  parameter int unsigned QD = DEF_QD,
  localparam int unsigned QW = $clog2(QD + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [QW-1:0] q,
  input  logic signed [B-1:0]  in_i [P],
  input  logic signed [B-1:0]  in_q [P],
  output logic                 out_valid,
  output logic signed [B-1:0]  out_i [P],
  output logic signed [B-1:0]  out_q [P]
);
  localparam int unsigned NT = 2 * LL + 1;
  localparam int unsigned NQ = 2 * QD + 1;
  localparam int unsigned CW = B + 2;

  // tap k (age k) multiplies y(t_out + LL - k): point i = LL - k
  logic signed [CW-1:0] tab  [NQ][NT];
  logic signed [CW-1:0] coef [NT];
  logic signed [QW-1:0] qc;

  for (genvar qq = 0; qq < NQ; qq++) begin : g_q
    for (genvar k = 0; k < NT; k++) begin : g_k
      assign tab[qq][k] = CW'(lagrange_coef(qq - QD, LL - k, LL, QD, B));
    end
  end

  always_comb begin
    qc = q;
    if (q > $signed(QW'(QD)))  qc = $signed(QW'(QD));
    if (q < -$signed(QW'(QD))) qc = -$signed(QW'(QD));
    coef = tab[int'(qc) + int'(QD)];
  end

  logic vi, vq;
  fir_filter #(.NT(NT), .P(P), .W(B), .CW(CW), .CF(B), .SYM(1'b0)) u_fi (
    .clk, .rst_n, .in_valid, .in_data(in_i), .coef, .out_valid(vi), .out_data(out_i)
  );
  fir_filter #(.NT(NT), .P(P), .W(B), .CW(CW), .CF(B), .SYM(1'b0)) u_fq (
    .clk, .rst_n, .in_valid, .in_data(in_q), .coef, .out_valid(vq), .out_data(out_q)
  );
  assign out_valid = vi & vq;   // the two filters run in lockstep
endmodule
