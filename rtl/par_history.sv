// par_history: sample history of a parallel stream.
//
// The stream carries P samples per valid word; lane 0 is the oldest sample of
// the word. The module keeps enough past words to present the last NA samples
// as one array indexed by age: age[0] is lane P-1 of the current input word,
// age[P] is lane P-1 of the previous word, and so on. The current word is
// passed through combinationally; older words are registers that shift on
// every valid word. Delay lines, FIR taps and peak buffers of the datapath
// are all built on this view.
module par_history #(
  parameter int unsigned P  = 8,
  parameter int unsigned W  = 8,
  parameter int unsigned NA = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din [P],
  output logic signed [W-1:0] age [NA]
);
  localparam int unsigned NWD = (NA > P) ? (NA - 1) / P : 1;

  logic signed [W-1:0] hist [NWD][P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < NWD; w++)
        for (int j = 0; j < P; j++) hist[w][j] <= '0;
    end else if (en) begin
      hist[0] <= din;
      for (int w = 1; w < NWD; w++) hist[w] <= hist[w-1];
    end
  end

  for (genvar a = 0; a < NA; a++) begin : g_age
    if (a < P) begin : g_cur
      assign age[a] = din[P-1-a];
    end else begin : g_old
      assign age[a] = hist[(a-P)/P][P-1-((a-P)%P)];
    end
  end
endmodule
