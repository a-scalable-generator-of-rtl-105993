// downsampler: oversampled user stream to symbol rate.
//
// Keeps one sample in OS: output lane j is input lane j*OS + phase, so a
// word of P samples becomes P/OS symbols. The phase and the 'enable' window
// (the user's payload) come from the sequencing controller, which derives
// them from the user's coarse delay. Words outside the window are dropped
// (out_valid low). One register stage.
module downsampler
  import mimo_pkg::*;
#(
  parameter int unsigned P  = DEF_P,
  parameter int unsigned B  = DEF_B,
  parameter int unsigned OS = DEF_OS,
  localparam int unsigned NS = P / OS,
  localparam int unsigned PHW = (OS > 1) ? $clog2(OS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                enable,
  input  logic [PHW-1:0]      phase,
  input  logic signed [B-1:0] in_i [P],
  input  logic signed [B-1:0] in_q [P],
  output logic                out_valid,
  output logic signed [B-1:0] out_i [NS],
  output logic signed [B-1:0] out_q [NS]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int j = 0; j < NS; j++) begin
        out_i[j] <= '0;
        out_q[j] <= '0;
      end
    end else begin
      out_valid <= in_valid && enable;
      if (in_valid && enable) begin
        for (int j = 0; j < NS; j++) begin
          out_i[j] <= in_i[j * OS + int'(phase)];
          out_q[j] <= in_q[j * OS + int'(phase)];
        end
      end
    end
  end
endmodule
