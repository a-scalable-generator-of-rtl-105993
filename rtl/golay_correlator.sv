// golay_correlator: pipelined, parallel, multiplier-free Golay correlator.
//
// A Golay complementary pair (gA, gB) of length L is built by log2(L)
// stages of the recursion
//   a[n+1](t) = w[n]*a[n](t) + b[n](t - D[n]),
//   b[n+1](t) = w[n]*a[n](t) - b[n](t - D[n]),
// started from a unit impulse. Running the received samples through the same
// recursion therefore filters them with impulse responses gA and gB, i.e.
// correlates them with the time-reversed sequences. A pilot transmitted as
// reverse(gA) followed by reverse(gB) is matched by summing the A output,
// delayed by L chips, with the B output:  R(t) = a_N(t - L) + b_N(t).
// For a noiseless pilot scaled by h the peak of R equals 2*L*h.
//
// D[n] = 2^n chips is used (the document allows any permutation of the
// powers of two). With oversampling OS every chip delay becomes OS samples,
// so the correlator works on the oversampled stream at one sample per chip
// phase. The seeds are a runtime input (bit n set means w[n] = -1), changed
// by the sequencing controller per user slot. Parallelism P is handled by
// reading the delayed operand from the sample history of the stream.
//
// Widths grow one bit per stage; everything is kept at the final width
// B + log2(2L). Latency: log2(L) stage registers plus one output register
// (7 valid words at L = 64).
module golay_correlator
  import mimo_pkg::*;
#(
  parameter int unsigned P  = DEF_P,
  parameter int unsigned B  = DEF_B,
  parameter int unsigned L  = DEF_L,
  parameter int unsigned OS = DEF_OS,
  localparam int unsigned NS = $clog2(L),
  localparam int unsigned CW = B + NS + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [NS-1:0]        w_seed,
  input  logic signed [B-1:0]  in_i [P],
  input  logic signed [B-1:0]  in_q [P],
  output logic                 out_valid,
  output logic signed [CW-1:0] out_i [P],
  output logic signed [CW-1:0] out_q [P]
);
  // Stage signals: index n is the input of stage n, NS the final result.
  logic signed [CW-1:0] a_i [NS+1][P];
  logic signed [CW-1:0] a_q [NS+1][P];
  logic signed [CW-1:0] b_i [NS+1][P];
  logic signed [CW-1:0] b_q [NS+1][P];

  for (genvar j = 0; j < P; j++) begin : g_in
    assign a_i[0][j] = CW'(in_i[j]);
    assign a_q[0][j] = CW'(in_q[j]);
    assign b_i[0][j] = CW'(in_i[j]);
    assign b_q[0][j] = CW'(in_q[j]);
  end

  for (genvar n = 0; n < NS; n++) begin : g_stage
    localparam int unsigned DS = (1 << n) * OS;   // delay in samples
    logic signed [CW-1:0] hi [P + DS];
    logic signed [CW-1:0] hq [P + DS];

    par_history #(.P(P), .W(CW), .NA(P + DS)) u_hi (
      .clk, .rst_n, .en(in_valid), .din(b_i[n]), .age(hi)
    );
    par_history #(.P(P), .W(CW), .NA(P + DS)) u_hq (
      .clk, .rst_n, .en(in_valid), .din(b_q[n]), .age(hq)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int j = 0; j < P; j++) begin
          a_i[n+1][j] <= '0;
          a_q[n+1][j] <= '0;
          b_i[n+1][j] <= '0;
          b_q[n+1][j] <= '0;
        end
      end else if (in_valid) begin
        for (int j = 0; j < P; j++) begin
          a_i[n+1][j] <= (w_seed[n] ? -a_i[n][j] : a_i[n][j]) + hi[P-1-j+DS];
          a_q[n+1][j] <= (w_seed[n] ? -a_q[n][j] : a_q[n][j]) + hq[P-1-j+DS];
          b_i[n+1][j] <= (w_seed[n] ? -a_i[n][j] : a_i[n][j]) - hi[P-1-j+DS];
          b_q[n+1][j] <= (w_seed[n] ? -a_q[n][j] : a_q[n][j]) - hq[P-1-j+DS];
        end
      end
    end
  end

  // A output delayed by L chips, added to the B output.
  localparam int unsigned DL = L * OS;
  logic signed [CW-1:0] dai [P + DL];
  logic signed [CW-1:0] daq [P + DL];

  par_history #(.P(P), .W(CW), .NA(P + DL)) u_ai (
    .clk, .rst_n, .en(in_valid), .din(a_i[NS]), .age(dai)
  );
  par_history #(.P(P), .W(CW), .NA(P + DL)) u_aq (
    .clk, .rst_n, .en(in_valid), .din(a_q[NS]), .age(daq)
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
          out_i[j] <= dai[P-1-j+DL] + b_i[NS][j];
          out_q[j] <= daq[P-1-j+DL] + b_q[NS][j];
        end
      end
    end
  end
endmodule
