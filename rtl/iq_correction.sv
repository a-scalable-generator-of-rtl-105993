// iq_correction: IQ imbalance correction.
//
// The front end mixes I and Q through a gain/phase matrix P; this block
// multiplies every complex sample by the inverse matrix [a b; c d]:
//   out_i = a*in_i + b*in_q,  out_q = c*in_i + d*in_q.
// The four entries are runtime inputs in Q1.(B-1) (range (-1,1)), calibrated
// outside the core, as in the document. Results are rounded to B bits and
// saturated (this implementation's choice). One register stage: output word
// n belongs to input word n-1.
module iq_correction
  import mimo_pkg::*;
#(
  parameter int unsigned P = DEF_P,
  parameter int unsigned B = DEF_B
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [B-1:0] in_i [P],
  input  logic signed [B-1:0] in_q [P],
  input  logic signed [B-1:0] coef_a,
  input  logic signed [B-1:0] coef_b,
  input  logic signed [B-1:0] coef_c,
  input  logic signed [B-1:0] coef_d,
  output logic                out_valid,
  output logic signed [B-1:0] out_i [P],
  output logic signed [B-1:0] out_q [P]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int j = 0; j < P; j++) begin
        out_i[j] <= '0;
        out_q[j] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int j = 0; j < P; j++) begin
          out_i[j] <= B'(sat(rnd_shift(longint'(coef_a) * longint'(in_i[j])
                                       + longint'(coef_b) * longint'(in_q[j]), int'(B) - 1), int'(B)));
          out_q[j] <= B'(sat(rnd_shift(longint'(coef_c) * longint'(in_i[j])
                                       + longint'(coef_d) * longint'(in_q[j]), int'(B) - 1), int'(B)));
        end
      end
    end
  end
endmodule
