// tb_coarse_delay_sync: a random stream through the variable delay with the
// delay changed every 25 words over 0..64 samples (including values that
// are not multiples of the 8 lanes). Output word n lane j must equal input
// sample n*8+j-d, with d the delay applied when word n entered.
`include "tb_util.svh"
module tb_coarse_delay_sync;
  localparam int P = 8, B = 8, MAXD = 64, NW = 300;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [6:0] delay;
  logic signed [B-1:0] in_i [P], in_q [P], out_i [P], out_q [P];
  int checks = 0, failures = 0;
  int xi [NW * P], xq [NW * P], dly [NW];
  int nin = 0, nout = 0;

  coarse_delay_sync #(.P(P), .B(B), .MAXD(MAXD)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(3000)

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int j = 0; j < P; j++) begin
      int s;
      s = nout * P + j - dly[nout];
      `CHECK_EQ(int'(out_i[j]), (s >= 0) ? xi[s] : 0, "out_i")
      `CHECK_EQ(int'(out_q[j]), (s >= 0) ? xq[s] : 0, "out_q")
    end
    nout++;
  end

  initial begin
    delay = 0;
    for (int j = 0; j < P; j++) begin in_i[j] = 0; in_q[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (nin < NW) begin
      @(negedge clk);
      if (nin % 25 == 0) delay = 7'((nin == 275) ? MAXD : $urandom_range(0, MAXD));
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        dly[nin] = int'(delay);
        for (int j = 0; j < P; j++) begin
          xi[nin * P + j] = $urandom_range(0, 255) - 128;
          xq[nin * P + j] = $urandom_range(0, 255) - 128;
          in_i[j] = B'(xi[nin * P + j]);
          in_q[j] = B'(xq[nin * P + j]);
        end
        nin++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    `CHECK_EQ(nout, NW, "output word count")
    `TB_FINISH
  end
endmodule
