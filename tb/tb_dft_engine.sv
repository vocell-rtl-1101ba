// tb_dft_engine: loads random and single-tone inputs, runs the DFT and reads
// every bin in natural order.
//  - bit-exact check against an integer model of the same radix-2
//    decimation-in-frequency schedule (sum/2, difference*W/2, twiddles
//    rounded from cos/sin here, result reordered by bit reversal);
//  - spectral check: a complex tone at bin b must give |X_b| close to the
//    tone amplitude and leave all other bins near zero;
//  - cycle check: start-to-done equals logm*(M/2+1) cycles.
// Sizes 8, 32 and 512 points (the largest supported).
module tb_dft_engine;
  logic clk = 0, rst_n = 0;
  logic [3:0] logm;
  logic start, busy, done, ld_we;
  logic [8:0] ld_addr, rd_bin_a, rd_bin_b;
  logic signed [9:0] ld_re, ld_im, rd_a_re, rd_a_im, rd_b_re, rd_b_im;
  int checks = 0, failures = 0;

  dft_engine #(.DW(10), .LOGM_MAX(9)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [512], xi [512];

  function automatic int wrap10(longint v);
    logic signed [9:0] t; t = 10'(v); return int'(t);
  endfunction

  task automatic ref_dft(input int lm);
    int m, span;
    m = 1 << lm;
    for (int s = 1; s <= lm; s++) begin
      span = m >> s;
      for (int c = 0; c < m / 2; c++) begin
        int k, aa, bb, e, wr, wi;
        longint dr, di;
        real ang;
        k  = c % span;
        aa = (c / span) * 2 * span + k;
        bb = aa + span;
        e  = (k << (s - 1)) * (1024 / m);
        ang = 2.0 * 3.141592653589793 * e / 1024.0;
        wr = $rtoi(1024.0 * $cos(ang) + ($cos(ang) >= 0 ? 0.5 : -0.5));
        wi = $rtoi(-1024.0 * $sin(ang) + (-$sin(ang) >= 0 ? 0.5 : -0.5));
        dr = longint'(xr[aa]) - xr[bb];
        di = longint'(xi[aa]) - xi[bb];
        xr[aa] = wrap10((longint'(xr[aa]) + xr[bb]) >>> 1);
        xi[aa] = wrap10((longint'(xi[aa]) + xi[bb]) >>> 1);
        xr[bb] = wrap10((dr * wr - di * wi) >>> 11);
        xi[bb] = wrap10((dr * wi + di * wr) >>> 11);
      end
    end
  endtask

  function automatic int brev(int v, int n);
    int r = 0;
    for (int i = 0; i < n; i++) if (v & (1 << i)) r |= 1 << (n - 1 - i);
    return r;
  endfunction

  task automatic run(input int lm, input int mode, input int tone);
    int m, cyc;
    m = 1 << lm;
    logm = 4'(lm);
    for (int n = 0; n < m; n++) begin
      if (mode == 0) begin
        xr[n] = $urandom_range(0, 1023) - 512; xi[n] = $urandom_range(0, 1023) - 512;
      end else begin
        real a; a = 2.0 * 3.141592653589793 * tone * n / m;
        xr[n] = $rtoi(400.0 * $cos(a)); xi[n] = $rtoi(400.0 * $sin(a));
      end
      @(negedge clk); ld_we = 1; ld_addr = 9'(n); ld_re = 10'(xr[n]); ld_im = 10'(xi[n]);
    end
    @(negedge clk); ld_we = 0; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != lm * (m / 2 + 1) + 1) begin
      failures++; $display("M=%0d: %0d cycles, expected %0d", m, cyc, lm * (m / 2 + 1) + 1);
    end
    ref_dft(lm);
    for (int k = 0; k < m; k++) begin
      @(negedge clk); rd_bin_a = 9'(k); rd_bin_b = 9'((m - k) % m);
      @(posedge clk); #1;
      checks++;
      if (int'(rd_a_re) != xr[brev(k, lm)] || int'(rd_a_im) != xi[brev(k, lm)] ||
          int'(rd_b_re) != xr[brev((m - k) % m, lm)]) begin
        failures++;
        if (failures < 6) $display("M=%0d bin %0d: %0d,%0d ref %0d,%0d", m, k, rd_a_re, rd_a_im,
                                   xr[brev(k, lm)], xi[brev(k, lm)]);
      end
      if (mode == 1) begin
        real mag;
        mag = $sqrt(real'(rd_a_re) ** 2 + real'(rd_a_im) ** 2);
        checks++;
        if ((k == tone && (mag < 360.0 || mag > 440.0)) || (k != tone && mag > 12.0)) begin
          failures++; $display("tone M=%0d bin %0d magnitude %f", m, k, mag);
        end
      end
    end
  endtask

  initial begin
    start = 0; ld_we = 0; ld_addr = 0; ld_re = 0; ld_im = 0; rd_bin_a = 0; rd_bin_b = 0; logm = 3;
    repeat (3) @(posedge clk); rst_n = 1;
    run(3, 0, 0);
    run(5, 0, 0);
    run(5, 1, 3);
    run(9, 0, 0);
    run(9, 1, 37);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
