// tb_panel_sum: random local and upper-neighbour words with random per-user
// valids; the chained sum must be the saturated sum of the valid operands,
// one cycle later. Large upper values make saturation happen.
`include "tb_util.svh"
module tb_panel_sum;
  import mimo_pkg::*;
  localparam int K = 2, NS = 4, B = 8, SW = 12;
  logic clk = 0, rst_n = 0;
  logic [K-1:0] loc_valid = '0, up_valid = '0, dn_valid;
  logic signed [B-1:0]  loc_i [K][NS], loc_q [K][NS];
  logic signed [SW-1:0] up_i [K][NS], up_q [K][NS], dn_i [K][NS], dn_q [K][NS];
  int checks = 0, failures = 0, nsat = 0;
  int ei [K][NS], eq [K][NS];
  logic [K-1:0] ev = '0;

  panel_sum #(.K(K), .NS(NS), .B(B), .SW(SW)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(2000)

  initial begin
    for (int k = 0; k < K; k++) for (int j = 0; j < NS; j++) begin
      loc_i[k][j] = 0; loc_q[k][j] = 0; up_i[k][j] = 0; up_q[k][j] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (n > 0) begin
        `CHECK_EQ(dn_valid, ev, "dn_valid")
        for (int k = 0; k < K; k++) if (ev[k]) for (int j = 0; j < NS; j++) begin
          `CHECK_EQ(int'(dn_i[k][j]), ei[k][j], "dn_i")
          `CHECK_EQ(int'(dn_q[k][j]), eq[k][j], "dn_q")
        end
      end
      loc_valid = K'($urandom); up_valid = K'($urandom);
      ev = loc_valid | up_valid;
      for (int k = 0; k < K; k++) for (int j = 0; j < NS; j++) begin
        loc_i[k][j] = B'($urandom); loc_q[k][j] = B'($urandom);
        up_i[k][j] = SW'($urandom); up_q[k][j] = SW'($urandom);
        ei[k][j] = int'(sat((up_valid[k] ? longint'(up_i[k][j]) : 0) + (loc_valid[k] ? longint'(loc_i[k][j]) : 0), SW));
        eq[k][j] = int'(sat((up_valid[k] ? longint'(up_q[k][j]) : 0) + (loc_valid[k] ? longint'(loc_q[k][j]) : 0), SW));
        if (ei[k][j] == 2047 || ei[k][j] == -2048) nsat++;
      end
    end
    `CHECK_TRUE(nsat > 0, "saturation exercised")
    `TB_FINISH
  end
endmodule
