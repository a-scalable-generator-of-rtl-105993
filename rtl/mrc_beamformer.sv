// mrc_beamformer: weight-stationary systolic MRC beamformer.
//
// Computes, for every sample of the P lanes,
//   y_k = sum_{m=0..M-1} conj(w_mk) * x_m,   k = 0..K-1,
// i.e. the Spine's share H_i^H y_i of the maximum-ratio combiner. An M x K
// array of processing elements (PE) each hold one channel estimate w_mk
// (loaded with w_load) and contain a complex multiplier and an adder per
// lane. Channel m's samples enter row m, skewed by m words, and travel
// along the row to the K user columns (with a register between columns
// when KPIPE = 1); partial sums travel down each column. Column outputs are
// deskewed so all users leave together, then rescaled to the B-bit datapath
// format (shift by B-1, rounding, saturation), following the document's
// rule that inputs, weights and outputs share the datapath format.
// Latency: M + (K-1)*KPIPE + 1 valid words.
module mrc_beamformer
  import mimo_pkg::*;
#(
  parameter int unsigned M     = DEF_M,
  parameter int unsigned K     = DEF_K,
  parameter int unsigned P     = DEF_P,
  parameter int unsigned B     = DEF_B,
  parameter bit          KPIPE = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                w_load,
  input  logic signed [B-1:0] w_i   [M][K],
  input  logic signed [B-1:0] w_q   [M][K],
  input  logic                in_valid,
  input  logic signed [B-1:0] in_i  [M][P],
  input  logic signed [B-1:0] in_q  [M][P],
  output logic                out_valid,
  output logic signed [B-1:0] out_i [K][P],
  output logic signed [B-1:0] out_q [K][P]
);
  localparam int unsigned SW  = 2 * B + $clog2(M) + 2;  // partial sum width

  // stationary weights
  logic signed [B-1:0] wr_i [M][K];
  logic signed [B-1:0] wr_q [M][K];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < M; m++)
        for (int k = 0; k < K; k++) begin
          wr_i[m][k] <= '0;
          wr_q[m][k] <= '0;
        end
    end else if (w_load) begin
      wr_i <= w_i;
      wr_q <= w_q;
    end
  end

  // row input skew: row m delayed by m words
  logic signed [B-1:0] xs_i [M][P];
  logic signed [B-1:0] xs_q [M][P];
  for (genvar m = 0; m < M; m++) begin : g_skew
    if (m == 0) begin : g_0
      assign xs_i[m] = in_i[m];
      assign xs_q[m] = in_q[m];
    end else begin : g_d
      logic signed [B-1:0] sk_i [m][P];
      logic signed [B-1:0] sk_q [m][P];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int s = 0; s < m; s++)
            for (int j = 0; j < P; j++) begin
              sk_i[s][j] <= '0;
              sk_q[s][j] <= '0;
            end
        end else if (in_valid) begin
          sk_i[0] <= in_i[m];
          sk_q[0] <= in_q[m];
          for (int s = 1; s < m; s++) begin
            sk_i[s] <= sk_i[s-1];
            sk_q[s] <= sk_q[s-1];
          end
        end
      end
      assign xs_i[m] = sk_i[m-1];
      assign xs_q[m] = sk_q[m-1];
    end
  end

  // systolic array
  logic signed [B-1:0]  xr_i [M][K][P];   // sample seen by PE (m,k)
  logic signed [B-1:0]  xr_q [M][K][P];
  logic signed [SW-1:0] ps_i [M][K][P];   // partial sum leaving PE (m,k)
  logic signed [SW-1:0] ps_q [M][K][P];

  for (genvar m = 0; m < M; m++) begin : g_row
    for (genvar k = 0; k < K; k++) begin : g_col
      if (k == 0) begin : g_x0
        assign xr_i[m][k] = xs_i[m];
        assign xr_q[m][k] = xs_q[m];
      end else if (KPIPE) begin : g_xr
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) begin
            for (int j = 0; j < P; j++) begin
              xr_i[m][k][j] <= '0;
              xr_q[m][k][j] <= '0;
            end
          end else if (in_valid) begin
            xr_i[m][k] <= xr_i[m][k-1];
            xr_q[m][k] <= xr_q[m][k-1];
          end
        end
      end else begin : g_xw
        assign xr_i[m][k] = xr_i[m][k-1];
        assign xr_q[m][k] = xr_q[m][k-1];
      end

      // PE: psum += conj(w) * x
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int j = 0; j < P; j++) begin
            ps_i[m][k][j] <= '0;
            ps_q[m][k][j] <= '0;
          end
        end else if (in_valid) begin
          for (int j = 0; j < P; j++) begin
            ps_i[m][k][j] <= ((m == 0) ? SW'(0) : ps_i[(m == 0) ? 0 : m-1][k][j]) + SW'(wr_i[m][k] * xr_i[m][k][j])
                                   + SW'(wr_q[m][k] * xr_q[m][k][j]);
            ps_q[m][k][j] <= ((m == 0) ? SW'(0) : ps_q[(m == 0) ? 0 : m-1][k][j]) + SW'(wr_i[m][k] * xr_q[m][k][j])
                                   - SW'(wr_q[m][k] * xr_i[m][k][j]);
          end
        end
      end
    end
  end

  // output deskew: column k delayed by (K-1-k)*KPIPE words, then rescale
  logic signed [SW-1:0] col_i [K][P];
  logic signed [SW-1:0] col_q [K][P];
  for (genvar k = 0; k < K; k++) begin : g_desk
    localparam int unsigned DK = (K - 1 - k) * KPIPE;
    if (DK == 0) begin : g_0
      assign col_i[k] = ps_i[M-1][k];
      assign col_q[k] = ps_q[M-1][k];
    end else begin : g_d
      logic signed [SW-1:0] dk_i [DK][P];
      logic signed [SW-1:0] dk_q [DK][P];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int s = 0; s < DK; s++)
            for (int j = 0; j < P; j++) begin
              dk_i[s][j] <= '0;
              dk_q[s][j] <= '0;
            end
        end else if (in_valid) begin
          dk_i[0] <= ps_i[M-1][k];
          dk_q[0] <= ps_q[M-1][k];
          for (int s = 1; s < DK; s++) begin
            dk_i[s] <= dk_i[s-1];
            dk_q[s] <= dk_q[s-1];
          end
        end
      end
      assign col_i[k] = dk_i[DK-1];
      assign col_q[k] = dk_q[DK-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < K; k++)
        for (int j = 0; j < P; j++) begin
          out_i[k][j] <= '0;
          out_q[k][j] <= '0;
        end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < K; k++)
          for (int j = 0; j < P; j++) begin
            out_i[k][j] <= B'(sat(rnd_shift(longint'(col_i[k][j]), int'(B) - 1), int'(B)));
            out_q[k][j] <= B'(sat(rnd_shift(longint'(col_q[k][j]), int'(B) - 1), int'(B)));
          end
      end
    end
  end
endmodule
