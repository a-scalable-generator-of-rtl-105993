// fir_filter: parallel FIR filter with runtime coefficients.
//
// Computes y[n] = sum_k coef[k] * x[n-k] for P samples per valid word. With
// SYM = 1 the coefficients are taken as symmetric (coef[k] = coef[NT-1-k], as
// for a root-raised-cosine filter) and only the first (NT+1)/2 are supplied:
// samples k and NT-1-k are added before the single multiplier they share, so
// the filter needs half the multipliers. With SYM = 0 all NT coefficients are
// used as given (the fractional-delay filters use this).
//
// Coefficients are signed with CF fraction bits (default Q1.(W-1), range
// (-1,1)); the output is rounded back to the input format and saturated.
// The datapath advances only on valid words. Pipeline: products are
// registered, then the adder result is registered, so output word n belongs
// to input word n-2 (latency 2 valid words). The document describes a
// pipelined adder tree without its depth; the two-stage pipeline is this
// implementation's choice.
module fir_filter
  import mimo_pkg::*;
#(
  parameter int unsigned NT  = DEF_NT,
  parameter int unsigned P   = DEF_P,
  parameter int unsigned W   = DEF_B,
  parameter int unsigned CW  = W,
  parameter int unsigned CF  = CW - 1,
  parameter bit          SYM = 1'b1,
  localparam int unsigned NC = SYM ? (NT + 1) / 2 : NT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_data [P],
  input  logic signed [CW-1:0] coef    [NC],
  output logic                 out_valid,
  output logic signed [W-1:0]  out_data [P]
);
  localparam int unsigned NA = P + NT - 1;
  localparam int unsigned PW = W + CW + 1;          // product width
  localparam int unsigned SW = PW + $clog2(NC + 1); // sum width

  logic signed [W-1:0]  age  [NA];
  logic signed [PW-1:0] prod_d [P][NC];
  logic signed [PW-1:0] prod_q [P][NC];
  logic                 v1;
  logic signed [W-1:0]  y_d [P];

  par_history #(.P(P), .W(W), .NA(NA)) u_hist (
    .clk, .rst_n, .en(in_valid), .din(in_data), .age(age)
  );

  // Lane j of the current word has age P-1-j; tap k adds k to the age.
  always_comb begin
    for (int j = 0; j < P; j++) begin
      for (int k = 0; k < NC; k++) begin
        if (SYM && (k != NT - 1 - k))
          prod_d[j][k] = PW'((longint'(age[P-1-j+k]) + longint'(age[P-1-j+NT-1-k]))
                             * longint'(coef[k]));
        else
          prod_d[j][k] = PW'(longint'(age[P-1-j+k]) * longint'(coef[k]));
      end
    end
  end

  // adder over the registered products, rounding and saturation
  always_comb begin
    for (int j = 0; j < P; j++) begin
      logic signed [SW-1:0] acc;
      acc = '0;
      for (int k = 0; k < NC; k++) acc = acc + SW'(prod_q[j][k]);
      y_d[j] = W'(sat(rnd_shift(longint'(acc), int'(CF)), int'(W)));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      for (int j = 0; j < P; j++) begin
        out_data[j] <= '0;
        for (int k = 0; k < NC; k++) prod_q[j][k] <= '0;
      end
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) prod_q <= prod_d;
      if (v1) out_data <= y_d;
    end
  end
endmodule
