// tb_dct_unit: random log-mel vectors for DCT sizes 32, 16 and 8; each
// coefficient is compared with the real-valued DCT-II
// s_k*sum l_n cos(pi k(2n+1)/2N) / 2^shift (s_0 = 1/sqrt 2) within 2 LSB
// before saturation; coefficients beyond n_mfcc must be zero. The run time
// must be N*n_mfcc cycles plus one.
module tb_dct_unit;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [2:0] logn;
  logic [5:0] n_mfcc;
  logic [3:0] out_shift;
  logic [9:0] l_in [32];
  logic signed [7:0] mfcc [32];
  int checks = 0, failures = 0;

  dct_unit #(.MAXN(32), .LW(10)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int ln, input int nm, input int sh);
    int nsz, cyc;
    nsz = 1 << ln;
    for (int i = 0; i < 32; i++) l_in[i] = 10'($urandom_range(0, 1023));
    logn = 3'(ln); n_mfcc = 6'(nm); out_shift = 4'(sh);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != nsz * nm + 1) begin failures++; $display("cycles %0d", cyc); end
    for (int k = 0; k < 32; k++) begin
      real s, e;
      s = 0.0;
      for (int n = 0; n < nsz; n++) s += real'(l_in[n]) * $cos(3.141592653589793 * k * (2 * n + 1) / (2.0 * nsz));
      if (k == 0) s = s / $sqrt(2.0);
      s = s / real'(1 << sh);
      if (s > 127.0) s = 127.0;
      if (s < -128.0) s = -128.0;
      if (k >= nm) s = 0.0;
      e = s - real'(mfcc[k]);
      checks++;
      if (e > 2.0 || e < -2.0) begin
        failures++; $display("N=%0d k=%0d: %0d ref %f", nsz, k, mfcc[k], s);
      end
    end
  endtask

  initial begin
    start = 0; logn = 5; n_mfcc = 32; out_shift = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    run(5, 32, 7);
    run(5, 13, 6);
    run(4, 16, 6);
    run(3, 8, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
