// fine_delay_estimator: loop-free sub-sample peak search.
//
// Given the 2l+1 correlation powers c(-l..l) around the coarse peak, the
// Lagrange interpolant through them is evaluated at the 2*QD+1 offsets
// s_q = q/QD, q = -QD..QD (resolution r = 1/QD), and the q with the largest
// value is returned. The Lagrange weights of every candidate are constants
// computed at elaboration (14 fraction bits), so the search is a bank of
// constant multiplies, adders and a comparator with no iteration. Ties go
// to the smaller q. One register stage (out_valid one cycle after in_valid).
module fine_delay_estimator
  import mimo_pkg::*;
#(
  parameter int unsigned LL = DEF_LL,
  parameter int unsigned QD = DEF_QD,
  parameter int unsigned PW = 30,
  localparam int unsigned NPT = 2 * LL + 1,
  localparam int unsigned QW  = $clog2(QD + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic        [PW-1:0] norms [NPT],
  output logic                 out_valid,
  output logic signed [QW-1:0] q_out
);
  localparam int unsigned NQ = 2 * QD + 1;
  localparam int unsigned FR = 14;
  localparam int unsigned YW = PW + FR + 4;

  logic signed [FR+2:0] cf [NQ][NPT];
  logic signed [YW-1:0] yq [NQ];

  for (genvar qq = 0; qq < NQ; qq++) begin : g_q
    for (genvar i = 0; i < NPT; i++) begin : g_i
      assign cf[qq][i] = (FR + 3)'(lagrange_coef(qq - QD, i - LL, LL, QD, FR));
    end
    always_comb begin
      yq[qq] = '0;
      for (int i = 0; i < NPT; i++)
        yq[qq] = yq[qq] + YW'(cf[qq][i]) * YW'($signed({1'b0, norms[i]}));
    end
  end

  logic signed [QW-1:0] best;
  always_comb begin
    int bi;
    bi = 0;
    for (int qq = 1; qq < NQ; qq++)
      if (yq[qq] > yq[bi]) bi = qq;
    best = QW'(bi - int'(QD));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      q_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) q_out <= best;
    end
  end
endmodule
