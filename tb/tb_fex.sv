// tb_fex: feature extraction on a 32-sample window (16-point complex DFT),
// 8 mel bands of two DFT bins each (unit weights), 8 MFCCs. Samples arrive
// every 16 clocks, the sample-to-clock ratio of 16 kHz audio on a 250 kHz
// clock. A real cosine at DFT bin b is fed for each of several b; checks:
//  - one feature vector per hop once enabled, and no window dropped
//    (processing fits inside one hop);
//  - the strongest mel band is the band holding bin b, and its energy is
//    within 15% of the analytic value A*N/2 / M (the DFT halves at every stage);
//  - the log stage equals round(64*log2(min(band >> shift, 1023)));
//  - the MFCCs equal the real-valued DCT-II of the log energies (+-2 LSB);
//  - nothing is produced while disabled.
module tb_fex;
  localparam int LOGM = 4, M = 16, NMEL = 8, SH = 4, DSH = 5;
  logic clk = 0, rst_n = 0;
  logic enable, sample_valid, mel_wr_en, feat_valid, busy;
  logic signed [9:0] sample;
  logic [8:0] mel_wr_addr;
  logic [28:0] mel_wr_data;
  logic signed [7:0] kws_vec [39];
  logic signed [7:0] sv_vec [60];
  logic [15:0] windows_dropped;
  int checks = 0, failures = 0, feats = 0, max_busy = 0;

  fex dut (.clk, .rst_n, .enable, .sample, .sample_valid, .logm(4'(LOGM)), .n_mel(6'(NMEL)),
    .mel_shift(5'(SH)), .n_mfcc(6'd8), .dct_shift(4'(DSH)),
    .mel_wr_en, .mel_wr_addr, .mel_wr_data, .feat_valid, .kws_vec, .sv_vec, .busy,
    .windows_dropped);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && feat_valid) feats++;
  int bcnt = 0;
  always @(posedge clk) begin
    if (busy) bcnt++; else bcnt = 0;
    if (bcnt > max_busy) max_busy = bcnt;
  end

  int tone = 1, n_smp = 0;
  // sample source: one sample every 16 clocks
  initial begin
    sample = 0; sample_valid = 0;
    wait (rst_n);
    forever begin
      repeat (15) @(negedge clk);
      sample = 10'($rtoi(400.0 * $cos(2.0 * 3.141592653589793 * tone * n_smp / (2.0 * M))));
      sample_valid = 1; n_smp++;
      @(negedge clk); sample_valid = 0;
    end
  end

  task automatic check_frame(input int b);
    int best, bv; real expect_e;
    // mel energies
    best = 0; bv = 0;
    for (int i = 0; i < NMEL; i++)
      if (int'(dut.u_mel.acc[i]) > bv) begin bv = int'(dut.u_mel.acc[i]); best = i; end
    expect_e = 400.0 * (2 * M) / 2.0 / M * 2048.0;   // A*N/2 scaled by 1/M, weight 1.0 (Q.11)
    checks++;
    if (best != b / 2 || real'(bv) < 0.85 * expect_e || real'(bv) > 1.15 * expect_e) begin
      failures++; $display("tone %0d: peak band %0d energy %0d expected band %0d energy %f", b, best, bv, b / 2, expect_e);
    end
    for (int i = 0; i < NMEL; i++) begin
      int a, lg; real s;
      a = int'(dut.u_mel.acc[i]) >>> SH; if (a > 1023) a = 1023;
      lg = (a == 0) ? 0 : $rtoi(64.0 * $ln(real'(a)) / $ln(2.0) + 0.5);
      checks++;
      if (int'(dut.l_reg[i]) != lg) begin failures++; $display("log band %0d: %0d ref %0d", i, dut.l_reg[i], lg); end
    end
    for (int k = 0; k < 8; k++) begin
      real s, e;
      s = 0.0;
      for (int n = 0; n < NMEL; n++) s += real'(dut.l_reg[n]) * $cos(3.141592653589793 * k * (2 * n + 1) / (2.0 * NMEL));
      if (k == 0) s = s / $sqrt(2.0);
      s = s / real'(1 << DSH);
      if (s > 127.0) s = 127.0; if (s < -128.0) s = -128.0;
      e = s - real'(dut.mfcc[k]);
      checks++;
      if (e > 2.0 || e < -2.0) begin failures++; $display("mfcc %0d: %0d ref %f", k, dut.mfcc[k], s); end
    end
  endtask

  initial begin
    enable = 0; mel_wr_en = 0; mel_wr_addr = 0; mel_wr_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // bin k -> band k/2 with weight 1.0
    for (int k = 0; k < M; k++) begin
      int bd; bd = k / 2;
      @(negedge clk); mel_wr_en = 1; mel_wr_addr = 9'(k);
      mel_wr_data = (bd % 2 == 0) ? {5'(bd), 12'd2048, 12'd0} : {5'(bd), 12'd0, 12'd2048};
    end
    @(negedge clk); mel_wr_en = 0;
    // disabled: nothing may be produced
    repeat (16 * M * 3) @(negedge clk);
    checks++;
    if (feats != 0) begin failures++; $display("features while disabled"); end
    enable = 1;
    for (int b = 1; b < M; b += 3) begin
      int f0;
      tone = b;
      // let two full windows of the new tone pass, then check the next frame
      repeat (3) @(posedge dut.u_abuf.win_ready);
      f0 = feats;
      @(posedge feat_valid); @(negedge clk);
      check_frame(b);
    end
    begin
      int hops, f1;
      f1 = feats; hops = 0;
      repeat (6) begin @(posedge dut.u_abuf.win_ready); hops++; end
      @(posedge feat_valid); @(negedge clk);
      checks++;
      if (feats - f1 < 6 || windows_dropped != 0) begin
        failures++; $display("%0d features in %0d hops, %0d dropped", feats - f1, hops, windows_dropped);
      end
    end
    $display("longest busy period %0d cycles of %0d per hop", max_busy, 16 * M);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
