// tb_gmm_accel: a speaker model and a UBM of 6 Gaussians each over 7
// dimensions score 32 random frames as four decisions of two 8-frame
// batches. The reference model recomputes every Gaussian per vector
// (log weight minus squared normalized distances, abort above Dist_th),
// the floating-point accumulation of 2^floor(log2 P), the per-batch
// log-likelihood ratio and the decision sum > th*16. Thresholds are set so
// that both accept and reject occur. Also checked: the number of Gaussians
// abandoned early because all eight vectors aborted, and the cycle count
// of a batch (one cycle per evaluated Gaussian dimension plus a fixed
// overhead), which shows the skipped reads.
module tb_gmm_accel;
  localparam int NG = 6, ND = 7, NB = 2;
  logic clk = 0, rst_n = 0;
  logic enable, clear, feat_valid, model_we, w_we, busy, ready, sv_accept;
  logic signed [7:0] feat [60];
  logic [14:0] model_addr;
  logic [15:0] model_wdata, w_wdata, dist_th;
  logic [8:0] w_addr;
  logic signed [23:0] sv_th;
  logic signed [39:0] llr_sum;
  logic [31:0] gauss_evals, gauss_skips;
  int checks = 0, failures = 0, accepts = 0, rejects = 0;

  gmm_accel dut (.clk, .rst_n, .enable, .clear, .feat_valid, .feat,
    .n_gauss(10'(NG)), .n_dim(6'(ND)), .n_mod(2'd2), .n_batch(3'(NB)), .dist_th, .sv_th,
    .model_we, .model_addr, .model_wdata, .w_we, .w_addr, .w_wdata,
    .busy, .ready, .sv_accept, .llr_sum, .gauss_evals, .gauss_skips);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mu [2*NG][ND], sg [2*NG][ND], wt [2*NG];
  int fr [32][ND];
  int ref_skips = 0, ref_dims = 0;
  int run_cycles = 0;

  // bit-level model of the floating-point accumulation
  function automatic longint acc_log(int ex [$]);
    int mant, expo, s, e;
    if (ex.size() == 0) return -64'sd2147483648;
    mant = 0; expo = 0;
    foreach (ex[i]) begin
      if (i == 0) begin s = 32'h8000; e = ex[i]; end
      else if (ex[i] > expo) begin
        s = ((ex[i] - expo > 15) ? 0 : (mant >> (ex[i] - expo))) + 32'h8000; e = ex[i];
      end else begin
        s = mant + ((expo - ex[i] > 15) ? 0 : (32'h8000 >> (expo - ex[i]))); e = expo;
      end
      if (s >= 32'h10000) begin mant = s >> 1; expo = e + 1; end
      else begin mant = s; expo = e; end
    end
    return longint'(expo) * 64 + ((mant >> 9) & 63);
  endfunction

  function automatic longint fl(longint v);
    return (v < -4194304) ? -4194304 : v;
  endfunction

  function automatic longint batch_llr(int b);
    longint lp [2][8];
    for (int m = 0; m < 2; m++) begin
      int ex [8][$];
      for (int g = 0; g < NG; g++) begin
        int gi; bit al [8]; longint a [8]; bit any;
        gi = m * NG + g;
        for (int v = 0; v < 8; v++) begin al[v] = 1; a[v] = wt[gi]; end
        for (int d = 0; d < ND; d++) begin
          any = 0;
          ref_dims++;
          for (int v = 0; v < 8; v++) if (al[v]) begin
            int ds; ds = (fr[8*b+v][d] - mu[gi][d]) * sg[gi][d];
            if ((ds < 0 ? -ds : ds) > int'(dist_th)) al[v] = 0;
            else a[v] -= (longint'(ds) * ds) >>> 6;
            any |= al[v];
          end
          if (!any) begin if (d < ND - 1) ref_skips++; break; end
        end
        for (int v = 0; v < 8; v++) if (al[v]) ex[v].push_back(int'(a[v] >>> 6));
      end
      for (int v = 0; v < 8; v++) lp[m][v] = acc_log(ex[v]);
    end
    batch_llr = 0;
    for (int v = 0; v < 8; v++) batch_llr += fl(lp[0][v]) - fl(lp[1][v]);
  endfunction

  initial begin
    enable = 1; clear = 0; feat_valid = 0; model_we = 0; w_we = 0; model_addr = 0;
    model_wdata = 0; w_addr = 0; w_wdata = 0; dist_th = 272; sv_th = 0;
    for (int i = 0; i < 60; i++) feat[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int gi = 0; gi < 2 * NG; gi++) begin
      wt[gi] = $urandom_range(0, 1000) - 500;
      @(negedge clk); w_we = 1; w_addr = 9'(gi); w_wdata = 16'(wt[gi]);
      for (int d = 0; d < ND; d++) begin
        mu[gi][d] = $urandom_range(0, 60) - 30 + ((gi < NG) ? 5 : -5);
        sg[gi][d] = (gi % 3 == 2) ? 200 : $urandom_range(3, 10);
        @(negedge clk); w_we = 0; model_we = 1; model_addr = 15'(gi * ND + d);
        model_wdata = {8'(mu[gi][d]), 8'(sg[gi][d])};
      end
      @(negedge clk); model_we = 0;
    end
    for (int t = 0; t < 32; t++) for (int d = 0; d < ND; d++) fr[t][d] = $urandom_range(0, 60) - 30;
    for (int dec = 0; dec < 4; dec++) begin
      longint tot, b0; int cyc;
      b0  = batch_llr(2 * dec);
      tot = b0 + batch_llr(2 * dec + 1);
      sv_th = (dec % 2 == 0) ? 24'(tot / 16 - 2) : 24'(tot / 16 + 2);
      for (int t = 16 * dec; t < 16 * dec + 16; t++) begin
        if (t == 16 * dec + 8) begin
          while (dut.batch_cnt != 3'd1) @(negedge clk);
          checks++;
          if (llr_sum != 40'(b0)) begin failures++; $display("batch llr %0d ref %0d", llr_sum, b0); end
        end
        @(negedge clk); feat_valid = 1;
        for (int d = 0; d < 60; d++) feat[d] = (d < ND) ? 8'(fr[t % 32][d]) : 8'sd0;
        @(negedge clk); feat_valid = 0;
        repeat (3) @(negedge clk);
      end
      cyc = 0;
      while (!ready) begin @(negedge clk); cyc++; end
      checks++;
      if (sv_accept != (dec % 2 == 0)) begin
        failures++; $display("decision %0d: accept %0d, reference total %0d", dec, sv_accept, tot);
      end
      if (sv_accept) accepts++; else rejects++;
    end
    checks++;
    if (int'(gauss_skips) != ref_skips || ref_skips == 0) begin
      failures++; $display("skips %0d ref %0d", gauss_skips, ref_skips);
    end
    checks++;
    if (int'(gauss_evals) != 8 * 2 * NG) begin
      failures++; $display("evaluations %0d ref %0d", gauss_evals, 8 * 2 * NG);
    end
    checks++;
    if (run_cycles != ref_dims) begin failures++; $display("run cycles %0d, reference dims %0d", run_cycles, ref_dims); end
    $display("accepts %0d rejects %0d, Gaussians abandoned early %0d of %0d, dimensions read %0d of %0d",
             accepts, rejects, ref_skips, 8 * 2 * NG, ref_dims, 8 * 2 * NG * ND);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model-memory reads: cycles spent in the scoring state equal the
  // Gaussian dimensions the reference evaluated.
  always @(posedge clk) if (dut.st == dut.G_RUN) run_cycles++;
endmodule
