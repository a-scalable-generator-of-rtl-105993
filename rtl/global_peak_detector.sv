// global_peak_detector: peak search across all parallel lanes.
//
// Keeps the correlation results (complex R and power) of the last WS+2
// words of all P lanes. When any lane detector reports DONE, a comparator
// search over the last WS+1 words finds the sample with the largest power.
// The outputs are that sample's correlation value, its position (samples
// since 'clear') and the 2l+1 powers c(-l..l) around it for the fine delay
// estimator (c(+1) is the later neighbour).
//   WAIT            - wait for a lane to report a peak.
//   DETECT & OUTPUT - search; if the later neighbours of the maximum are
//                     already in the buffer, output at once and stay in WAIT.
//   OUTPUT          - otherwise wait for one more word and output then.
// The document describes the same three steps; the exact buffer depth and
// the linear comparator scan (instead of a tree) are this implementation's
// choices. peak_valid is a one-cycle registered pulse.
module global_peak_detector
  import mimo_pkg::*;
#(
  parameter int unsigned P  = DEF_P,
  parameter int unsigned WS = DEF_WS,
  parameter int unsigned LL = DEF_LL,
  parameter int unsigned CW = 15,
  parameter int unsigned PW = 30,
  localparam int unsigned NPT = 2 * LL + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 clear,
  input  logic signed [CW-1:0] r_i  [P],
  input  logic signed [CW-1:0] r_q  [P],
  input  logic        [PW-1:0] pwr  [P],
  input  logic        [P-1:0]  lane_done,
  output logic                 peak_valid,
  output logic signed [CW-1:0] peak_i,
  output logic signed [CW-1:0] peak_q,
  output logic        [31:0]   peak_pos,
  output logic        [PW-1:0] norms [NPT]
);
  typedef enum logic {S_WAIT, S_OUT} state_t;
  localparam int unsigned NA = (WS + 2) * P;   // buffered samples
  localparam int unsigned NS = (WS + 1) * P;   // searched samples
  localparam int unsigned AW = $clog2(NA);

  logic signed [CW-1:0] hi [NA];
  logic signed [CW-1:0] hq [NA];
  logic        [PW-1:0] hp [NA];
  logic signed [PW:0]   pwr_s [P];
  logic signed [PW:0]   hp_s  [NA];

  for (genvar j = 0; j < P; j++) begin : g_s
    assign pwr_s[j] = {1'b0, pwr[j]};
  end
  for (genvar a = 0; a < NA; a++) begin : g_u
    assign hp[a] = hp_s[a][PW-1:0];
  end

  par_history #(.P(P), .W(CW), .NA(NA)) u_hi (.clk, .rst_n, .en, .din(r_i), .age(hi));
  par_history #(.P(P), .W(CW), .NA(NA)) u_hq (.clk, .rst_n, .en, .din(r_q), .age(hq));
  par_history #(.P(P), .W(PW + 1), .NA(NA)) u_hp (.clk, .rst_n, .en, .din(pwr_s), .age(hp_s));

  state_t        state;
  logic [31:0]   wcnt;
  logic [AW-1:0] amax, ahold, asel;
  logic          fire;

  // comparator search over the searched part of the buffer
  always_comb begin
    amax = '0;
    for (int a = 1; a < NS; a++)
      if (hp[a] > hp[amax]) amax = AW'(a);
  end

  always_comb begin
    fire = 1'b0;
    asel = amax;
    if (en) begin
      if (state == S_WAIT && (|lane_done) && (amax >= AW'(LL))) fire = 1'b1;
      if (state == S_OUT) begin
        fire = 1'b1;
        asel = ahold;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_WAIT;
      wcnt       <= '0;
      ahold      <= '0;
      peak_valid <= 1'b0;
      peak_i     <= '0;
      peak_q     <= '0;
      peak_pos   <= '0;
      for (int i = 0; i < NPT; i++) norms[i] <= '0;
    end else if (clear) begin
      state      <= S_WAIT;
      wcnt       <= '0;
      peak_valid <= 1'b0;
    end else begin
      peak_valid <= fire;
      if (fire) begin
        peak_i   <= hi[asel];
        peak_q   <= hq[asel];
        peak_pos <= (wcnt * P) + 32'(P - 1) - 32'(asel);
        for (int i = 0; i < NPT; i++) norms[i] <= hp[32'(asel) + LL - i];
      end
      if (en) begin
        wcnt <= wcnt + 1;
        if (state == S_WAIT && (|lane_done) && (amax < AW'(LL))) begin
          ahold <= amax + AW'(P);
          state <= S_OUT;
        end else if (state == S_OUT) begin
          state <= S_WAIT;
        end
      end
    end
  end
endmodule
