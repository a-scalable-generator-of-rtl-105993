// signal_correction: front-end correction of one antenna channel.
//
// The ADC samples of one channel pass, in this order, through a symmetric
// root-raised-cosine FIR filter (one filter for I and one for Q, sharing the
// runtime coefficient array), the IQ imbalance correction and the DC offset
// cancellation, as in the Spine datapath of the document. P samples per
// valid word; latency 4 valid words (FIR 2, IQ 1, DC 1).
module signal_correction
  import mimo_pkg::*;
#(
  parameter int unsigned P  = DEF_P,
  parameter int unsigned B  = DEF_B,
  parameter int unsigned NT = DEF_NT,
  localparam int unsigned NC = (NT + 1) / 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [B-1:0] in_i [P],
  input  logic signed [B-1:0] in_q [P],
  input  logic signed [B-1:0] rrc_coef [NC],
  input  logic signed [B-1:0] iq_a,
  input  logic signed [B-1:0] iq_b,
  input  logic signed [B-1:0] iq_c,
  input  logic signed [B-1:0] iq_d,
  input  logic signed [B-1:0] dc_i,
  input  logic signed [B-1:0] dc_q,
  output logic                out_valid,
  output logic signed [B-1:0] out_i [P],
  output logic signed [B-1:0] out_q [P]
);
  logic                f_valid, fq_valid, iq_valid;
  logic signed [B-1:0] f_i [P];
  logic signed [B-1:0] f_q [P];
  logic signed [B-1:0] c_i [P];
  logic signed [B-1:0] c_q [P];

  fir_filter #(.NT(NT), .P(P), .W(B), .SYM(1'b1)) u_rrc_i (
    .clk, .rst_n, .in_valid, .in_data(in_i), .coef(rrc_coef),
    .out_valid(f_valid), .out_data(f_i)
  );
  fir_filter #(.NT(NT), .P(P), .W(B), .SYM(1'b1)) u_rrc_q (
    .clk, .rst_n, .in_valid, .in_data(in_q), .coef(rrc_coef),
    .out_valid(fq_valid), .out_data(f_q)
  );

  iq_correction #(.P(P), .B(B)) u_iq (
    .clk, .rst_n, .in_valid(f_valid & fq_valid), .in_i(f_i), .in_q(f_q),
    .coef_a(iq_a), .coef_b(iq_b), .coef_c(iq_c), .coef_d(iq_d),
    .out_valid(iq_valid), .out_i(c_i), .out_q(c_q)
  );

  dc_cancel #(.P(P), .B(B)) u_dc (
    .clk, .rst_n, .in_valid(iq_valid), .in_i(c_i), .in_q(c_q),
    .dc_i, .dc_q, .out_valid, .out_i, .out_q
  );
endmodule
