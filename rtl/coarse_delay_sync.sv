// coarse_delay_sync: runtime integer delay of one channel.
//
// Delays the complex stream by 'delay' samples (0..MAXD) so that every
// channel lines up with the channel that arrives last. The sequencing
// controller sets 'delay' once per packet from the averaged channel delay
// estimates. Built as a sample history with a per-lane select; the maximum
// delay is this implementation's choice. One output register: latency is
// one valid word plus 'delay' samples.
module coarse_delay_sync
  import mimo_pkg::*;
#(
  parameter int unsigned P    = DEF_P,
  parameter int unsigned B    = DEF_B,
  parameter int unsigned MAXD = 64,
  localparam int unsigned DW  = $clog2(MAXD + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [DW-1:0]       delay,
  input  logic signed [B-1:0] in_i [P],
  input  logic signed [B-1:0] in_q [P],
  output logic                out_valid,
  output logic signed [B-1:0] out_i [P],
  output logic signed [B-1:0] out_q [P]
);
  localparam int unsigned NA = P + MAXD;
  logic signed [B-1:0] hi [NA];
  logic signed [B-1:0] hq [NA];
  logic [DW-1:0] d;

  assign d = (delay > DW'(MAXD)) ? DW'(MAXD) : delay;

  par_history #(.P(P), .W(B), .NA(NA)) u_hi (.clk, .rst_n, .en(in_valid), .din(in_i), .age(hi));
  par_history #(.P(P), .W(B), .NA(NA)) u_hq (.clk, .rst_n, .en(in_valid), .din(in_q), .age(hq));

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
          out_i[j] <= hi[P - 1 - j + int'(d)];
          out_q[j] <= hq[P - 1 - j + int'(d)];
        end
      end
    end
  end
endmodule
