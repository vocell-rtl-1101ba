// tb_gauss_accum: adds random sets of log2 probabilities (as 2^floor(lp))
// and compares the returned log2 sum with log2 of the exact sum of powers
// of two; the mantissa is linear-approximated, so the tolerance is 0.09
// (in log2 units) plus truncation of terms more than 15 octaves smaller.
// An empty sum must report the floor value.
module tb_gauss_accum;
  logic clk = 0, rst_n = 0;
  logic clear, add, empty;
  logic signed [31:0] log_p, log_sum;
  int checks = 0, failures = 0;

  gauss_accum dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; add = 0; log_p = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); checks++;
    if (!empty || log_sum != 32'sh8000_0000) begin failures++; $display("empty sum wrong"); end
    for (int n = 0; n < 300; n++) begin
      real s, got, ex;
      int cnt, center;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      s = 0.0; cnt = $urandom_range(1, 40); center = $urandom_range(0, 2000) - 1000;
      for (int i = 0; i < cnt; i++) begin
        int lp;
        lp = center * 64 + $urandom_range(0, 6 * 64) - 3 * 64;
        @(negedge clk); add = 1; log_p = lp;
        s += 2.0 ** real'((lp >>> 6) - center);
      end
      @(negedge clk); add = 0;
      ex  = $ln(s) / $ln(2.0) + center;
      got = real'(log_sum) / 64.0;
      checks++;
      if (got - ex > 0.1 || got - ex < -0.1) begin
        failures++; $display("n=%0d got %f expected %f", n, got, ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
