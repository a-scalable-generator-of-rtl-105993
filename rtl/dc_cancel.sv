// dc_cancel: DC offset cancellation.
//
// Subtracts a calibrated DC offset (dc_i, dc_q, same format as the samples)
// from every sample and saturates to B bits. The document states only that
// the offset is calibrated by hand; the saturating subtraction is this
// implementation's choice. One register stage (latency 1 valid word).
module dc_cancel
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
  input  logic signed [B-1:0] dc_i,
  input  logic signed [B-1:0] dc_q,
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
          out_i[j] <= B'(sat(longint'(in_i[j]) - longint'(dc_i), int'(B)));
          out_q[j] <= B'(sat(longint'(in_q[j]) - longint'(dc_q), int'(B)));
        end
      end
    end
  end
endmodule
