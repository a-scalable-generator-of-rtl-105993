// tb_fir_filter: self-checking test of the parallel symmetric FIR filter.
// Random samples and symmetric coefficients at the default size (65 taps,
// 8 samples per word), with random gaps in the valid signal. The reference
// is a plain scalar convolution over the whole sample history; every output
// word is compared, and the latency (2 valid words) is checked by pairing
// the n-th output word with the n-th input word.
module tb_fir_filter;
  import mimo_pkg::*;
  localparam int NT = 65, P = 8, W = 8, NC = (NT + 1) / 2, NWORDS = 200;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [W-1:0] in_data [P];
  logic signed [W-1:0] coef [NC];
  logic signed [W-1:0] out_data [P];
  int checks = 0, failures = 0;
  int xs [NWORDS * P];
  int nin = 0, nout = 0;

  fir_filter #(.NT(NT), .P(P), .W(W), .SYM(1'b1)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_out(int n);
    longint acc;
    int c;
    acc = 0;
    for (int k = 0; k < NT; k++) begin
      c = (k < NC) ? int'(coef[k]) : int'(coef[NT - 1 - k]);
      if (n - k >= 0) acc += longint'(c) * xs[n - k];
    end
    return int'(sat(rnd_shift(acc, W - 1), W));
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int j = 0; j < P; j++) begin
      int e;
      e = ref_out(nout * P + j);
      checks++;
      if (int'(out_data[j]) != e) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d lane %0d: got %0d exp %0d", nout, j, out_data[j], e);
      end
    end
    nout++;
  end

  initial begin
    for (int k = 0; k < NC; k++) coef[k] = W'($urandom_range(0, 255));
    for (int j = 0; j < P; j++) in_data[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (nin < NWORDS) begin
      @(negedge clk);
      if ($urandom_range(0, 3) != 0) begin
        in_valid = 1;
        for (int j = 0; j < P; j++) begin
          xs[nin * P + j] = $urandom_range(0, 255) - 128;
          in_data[j] = W'(xs[nin * P + j]);
        end
        nin++;
      end else in_valid = 0;
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (nout != NWORDS) begin failures++; $display("FAIL: %0d output words, expected %0d", nout, NWORDS); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
