// panel_sum: daisy-chain accumulation of the beamformed users.
//
// Adds this Spine's downsampled users (B bits) to the running sum received
// from the upper neighbour (SW bits) and passes the result to the lower
// neighbour. The chain width SW = B+4 keeps full precision for up to 16
// panels; beyond that the sum saturates (the width is this implementation's
// choice). The upper stream is taken to be word-aligned with the local one;
// when no local word is present, the upper word is forwarded unchanged.
// Valids are per user, since each user's payload window is placed by its
// own delay. One register stage.
module panel_sum
  import mimo_pkg::*;
#(
  parameter int unsigned K  = DEF_K,
  parameter int unsigned NS = DEF_P / DEF_OS,
  parameter int unsigned B  = DEF_B,
  parameter int unsigned SW = DEF_B + 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [K-1:0]         loc_valid,
  input  logic signed [B-1:0]  loc_i [K][NS],
  input  logic signed [B-1:0]  loc_q [K][NS],
  input  logic [K-1:0]         up_valid,
  input  logic signed [SW-1:0] up_i  [K][NS],
  input  logic signed [SW-1:0] up_q  [K][NS],
  output logic [K-1:0]         dn_valid,
  output logic signed [SW-1:0] dn_i  [K][NS],
  output logic signed [SW-1:0] dn_q  [K][NS]
);
  // a word that is not valid counts as zero
  logic signed [SW-1:0] sum_i [K][NS], sum_q [K][NS];
  always_comb begin
    for (int k = 0; k < K; k++)
      for (int j = 0; j < NS; j++) begin
        sum_i[k][j] = SW'(sat((up_valid[k] ? longint'(up_i[k][j]) : 0) + (loc_valid[k] ? longint'(loc_i[k][j]) : 0), int'(SW)));
        sum_q[k][j] = SW'(sat((up_valid[k] ? longint'(up_q[k][j]) : 0) + (loc_valid[k] ? longint'(loc_q[k][j]) : 0), int'(SW)));
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn_valid <= '0;
      for (int k = 0; k < K; k++)
        for (int j = 0; j < NS; j++) begin
          dn_i[k][j] <= '0;
          dn_q[k][j] <= '0;
        end
    end else begin
      dn_valid <= loc_valid | up_valid;
      dn_i     <= sum_i;
      dn_q     <= sum_q;
    end
  end
endmodule
