// tb_downsampler: checks that lane j of the output is input lane j*OS+phase
// for both phases, and that words outside the enable window are dropped.
`include "tb_util.svh"
module tb_downsampler;
  localparam int P = 8, B = 8, OS = 2, NS = P / OS;
  logic clk = 0, rst_n = 0, in_valid = 0, enable = 0, out_valid;
  logic [0:0] phase;
  logic signed [B-1:0] in_i [P], in_q [P], out_i [NS], out_q [NS];
  int checks = 0, failures = 0, nv = 0, nexp = 0;
  int ei [NS], eq [NS];
  logic pend = 0;

  downsampler #(.P(P), .B(B), .OS(OS)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(2000)

  initial begin
    phase = 0;
    for (int j = 0; j < P; j++) begin in_i[j] = 0; in_q[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      `CHECK_EQ(out_valid, pend, "out_valid")
      if (pend) begin
        nv++;
        for (int j = 0; j < NS; j++) begin
          `CHECK_EQ(int'(out_i[j]), ei[j], "out_i")
          `CHECK_EQ(int'(out_q[j]), eq[j], "out_q")
        end
      end
      if (n % 40 == 0) phase = 1'($urandom);
      if (n == 40) phase = 1;
      enable   = ((n % 30) < 20);
      in_valid = ($urandom_range(0, 3) != 0);
      pend = in_valid && enable;
      if (pend) nexp++;
      for (int j = 0; j < P; j++) begin in_i[j] = 8'($urandom); in_q[j] = 8'($urandom); end
      for (int j = 0; j < NS; j++) begin ei[j] = int'(in_i[j * OS + phase]); eq[j] = int'(in_q[j * OS + phase]); end
    end
    @(negedge clk);
    if (pend) nv++;
    `CHECK_EQ(nv, nexp, "number of output words")
    `TB_FINISH
  end
endmodule
