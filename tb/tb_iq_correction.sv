// tb_iq_correction: random samples and random matrices through the IQ
// correction; each output word is compared with the 2x2 product computed
// here with rounding and saturation. Latency must be exactly one cycle.
`include "tb_util.svh"
module tb_iq_correction;
  import mimo_pkg::*;
  localparam int P = 8, B = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [B-1:0] in_i [P], in_q [P], out_i [P], out_q [P];
  logic signed [B-1:0] coef_a, coef_b, coef_c, coef_d;
  int checks = 0, failures = 0;
  int ei [P], eq [P];
  logic pend = 0;

  iq_correction #(.P(P), .B(B)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(2000)

  initial begin
    for (int j = 0; j < P; j++) begin in_i[j] = 0; in_q[j] = 0; end
    {coef_a, coef_b, coef_c, coef_d} = '0;
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
      if (n % 50 == 0) begin
        coef_a = B'($urandom); coef_b = B'($urandom); coef_c = B'($urandom); coef_d = B'($urandom);
        if (n == 0) begin coef_a = 8'sd127; coef_d = 8'sd127; coef_b = -8'sd128; coef_c = -8'sd128; end
      end
      in_valid = ($urandom_range(0, 4) != 0);
      pend = in_valid;
      for (int j = 0; j < P; j++) begin
        in_i[j] = B'($urandom); in_q[j] = B'($urandom);
        ei[j] = int'(sat(rnd_shift(longint'(coef_a) * in_i[j] + longint'(coef_b) * in_q[j], B - 1), B));
        eq[j] = int'(sat(rnd_shift(longint'(coef_c) * in_i[j] + longint'(coef_d) * in_q[j], B - 1), B));
      end
    end
    `TB_FINISH
  end
endmodule
