// tb_dc_cancel: random samples and offsets, including values that drive the
// subtraction into saturation; outputs compared one cycle later.
`include "tb_util.svh"
module tb_dc_cancel;
  import mimo_pkg::*;
  localparam int P = 8, B = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [B-1:0] in_i [P], in_q [P], out_i [P], out_q [P];
  logic signed [B-1:0] dc_i, dc_q;
  int checks = 0, failures = 0, nsat = 0;
  int ei [P], eq [P];
  logic pend = 0;

  dc_cancel #(.P(P), .B(B)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(2000)

  initial begin
    for (int j = 0; j < P; j++) begin in_i[j] = 0; in_q[j] = 0; end
    dc_i = 0; dc_q = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (pend) begin
        `CHECK_TRUE(out_valid, "out_valid one cycle after in_valid")
        for (int j = 0; j < P; j++) begin
          `CHECK_EQ(int'(out_i[j]), ei[j], "out_i")
          `CHECK_EQ(int'(out_q[j]), eq[j], "out_q")
        end
      end
      if (n % 20 == 0) begin dc_i = B'($urandom); dc_q = B'($urandom); end
      in_valid = ($urandom_range(0, 4) != 0);
      pend = in_valid;
      for (int j = 0; j < P; j++) begin
        in_i[j] = B'($urandom); in_q[j] = B'($urandom);
        ei[j] = int'(sat(longint'(in_i[j]) - dc_i, B));
        eq[j] = int'(sat(longint'(in_q[j]) - dc_q, B));
        if (ei[j] == 127 || ei[j] == -128) nsat++;
      end
    end
    `CHECK_TRUE(nsat > 0, "saturation exercised")
    `TB_FINISH
  end
endmodule
