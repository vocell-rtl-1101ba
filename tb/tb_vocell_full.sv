// tb_vocell_full: the wake-up chain at its full size, with every
// configuration register at its reset value: 512-sample windows every 256
// samples (16 ms at 16 kHz), 32 mel bands, 32 MFCCs, a 64-neuron LSTM on the
// 39-D KWS vector with 16 classes, and 256 Gaussians per model over the 60-D
// SV vector, decisions every 4 batches of 8 frames. The clock runs at 16
// clocks per audio sample (8x oversampled ADC, one ADC sample every two
// clocks), i.e. 4096 clocks per hop - about the 250 kHz / 16 kHz ratio.
// Models: neuron 0 of the LSTM follows the sign of MFCC 1 and drives
// class 1 (low tone -> no keyword, high tone -> keyword); the speaker model
// has 256 wide Gaussians, the UBM 128 wide ones with a log weight 4 lower
// and 128 narrow ones that every vector rejects in the first dimension.
// Checks: real time - no window is ever dropped, the feature extractor and
// the LSTM (which work as a pipeline, the LSTM on the previous vector)
// each finish a frame inside one hop, and the GMM returns each decision
// less than one batch time (8 hops) after its last frame, so it keeps up; the keyword decisions of
// frames inside a tone; SV decisions arrive and accept; the FSM runs
// IDLE -> KWS -> SV -> KWS -> IDLE.
module tb_vocell_full
  import vocell_pkg::*;
;
  localparam int HOP = 4096;
  logic clk = 0, rst_n = 0;
  logic signed [9:0] adc_data;
  logic adc_valid, cfg_we;
  logic [2:0] cfg_sel;
  logic [15:0] cfg_addr;
  logic [63:0] cfg_wdata;
  logic [1:0] state;
  logic sound_detected, feat_valid, kws_done, keyword, sv_ready, sv_accept;
  logic [3:0] kws_class;
  logic [15:0] windows_dropped;
  logic [31:0] gauss_skips;
  int checks = 0, failures = 0;

  vocell_top dut (.clk, .rst_n, .adc_data, .adc_valid, .cfg_we, .cfg_sel, .cfg_addr,
    .cfg_wdata, .state, .sound_detected, .feat_valid, .kws_done, .keyword, .kws_class,
    .sv_ready, .sv_accept, .windows_dropped, .gauss_skips);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tone = 0, hops_same = 0, n_adc = 0;
  initial begin
    adc_data = 0; adc_valid = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (tone == 0) adc_data = 10'($urandom_range(0, 6) - 3);
      else adc_data = 10'($rtoi(400.0 * $cos(2.0 * 3.141592653589793 * tone * n_adc / 4096.0)));
      n_adc++;
      adc_valid = 1;
      @(negedge clk); adc_valid = 0;
    end
  end
  always @(posedge dut.u_sd.frame_valid) if (rst_n) hops_same++;
  task automatic play(input int t, input int hops);
    tone = t; hops_same = 0;
    repeat (hops) @(posedge dut.u_sd.frame_valid);
  endtask

  int fex_run = 0, fex_max = 0, lstm_run = 0, lstm_max = 0, gmm_lat = -1, gmm_lat_max = 0;
  int n_kw = 0, n_nokw = 0, n_accept = 0, n_reject = 0, n_feat = 0, n_sv_frames = 0;
  int tone_at_feat = 0, same_at_feat = 0;
  int n_trans [4][4];
  logic [1:0] st_q = 0;
  always @(posedge clk) if (rst_n) begin
    fex_run  = dut.u_fex.busy ? fex_run + 1 : 0;
    lstm_run = dut.lstm_busy ? lstm_run + 1 : 0;
    if (fex_run > fex_max) fex_max = fex_run;
    if (lstm_run > lstm_max) lstm_max = lstm_run;
    if (feat_valid) begin
      n_feat++; tone_at_feat = tone; same_at_feat = hops_same;
      if (dut.en_sv) begin
        n_sv_frames++;
        if (n_sv_frames % 32 == 0) gmm_lat = 0;   // last frame of a decision
      end
    end
    if (gmm_lat >= 0) gmm_lat++;
    if (state != st_q) n_trans[st_q][state]++;
    if (state == ST_IDLE) n_sv_frames = 0;
    st_q <= state;
    if (kws_done) begin
      if (keyword) n_kw++; else n_nokw++;
      if (tone_at_feat != 0 && same_at_feat >= 8) begin
        checks++;
        if (keyword != (tone_at_feat > 100)) begin
          failures++; $display("%0t tone %0d: keyword %0d class %0d", $time, tone_at_feat, keyword, kws_class);
        end
      end
    end
    if (sv_ready) begin
      checks++;
      if (sv_accept) n_accept++; else begin n_reject++; failures++; $display("%0t SV reject", $time); end
      if (gmm_lat > gmm_lat_max) gmm_lat_max = gmm_lat;
      gmm_lat = -1;
      n_sv_frames = 0;
    end
  end

  task automatic wr(input cfg_sel_t s, input int a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_sel = 3'(s); cfg_addr = 16'(a); cfg_wdata = d;
  endtask

  localparam int ND = 39, NN = 64, NK = 16, P = (ND + NN + 2) / 2, PF = (NN + 2) / 2;
  localparam int NG = 256, GD = 60;

  initial begin
    cfg_we = 0; cfg_sel = 0; cfg_addr = 0; cfg_wdata = 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) n_trans[i][j] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // mel rows: bin k -> band k/8, weight 1.0
    for (int k = 0; k < 256; k++) begin
      int bd; bd = k / 8;
      wr(SEL_MEL_MEM, k, (bd % 2 == 0) ? {35'd0, 5'(bd), 12'd2048, 12'd0} : {35'd0, 5'(bd), 12'd0, 12'd2048});
    end
    for (int a = 0; a < NN * P + 4 * PF; a++) begin
      logic [63:0] d; d = '0;
      if (a == 0) d[8*(2*3+1) +: 8] = -8'sd64;                 // W_g(x1) = -2.0
      if (a == P - 1) begin                                     // bias element ND+NN
        d[8*(2*0+1) +: 8] = -8'sd96;
        d[8*(2*1+1) +: 8] = 8'sd96;
        d[8*(2*2+1) +: 8] = 8'sd96;
      end
      if (a == NN * P) d[8*(2*1+0) +: 8] = 8'sd64;              // class 1 <- 2.0 h0
      if (a >= NN * P && (a - NN * P) % PF == PF - 1)           // FC biases (element NN)
        for (int o = 0; o < 4; o++)
          if (a - NN * P >= PF || o >= 2) d[8*(2*o+0) +: 8] = -8'sd96;
      wr(SEL_LSTM_MEM, a, d);
    end
    for (int gi = 0; gi < 2 * NG; gi++) begin
      logic narrow; narrow = gi >= NG + NG / 2;
      wr(SEL_GMM_W, gi, (gi < NG) ? 64'd0 : 64'(16'(-256)));
      for (int d = 0; d < GD; d++)
        wr(SEL_GMM_MODEL, gi * GD + d, narrow ? {48'd0, 8'h80, 8'd255} : {48'd0, 8'd0, 8'd2});
    end
    @(negedge clk); cfg_we = 0;

    play(0, 10);
    checks++;
    if (state != ST_IDLE || n_feat != 0) begin failures++; $display("not idle in silence"); end
    play(16, 16);
    play(200, 100);
    play(0, 24);

    $display("FEx longest %0d, LSTM longest %0d cycles of %0d per hop; GMM decision latency %0d",
      fex_max, lstm_max, HOP, gmm_lat_max);
    $display("features %0d keyword %0d none %0d accept %0d reject %0d skips %0d dropped %0d",
      n_feat, n_kw, n_nokw, n_accept, n_reject, gauss_skips, windows_dropped);
    checks++;
    if (windows_dropped != 0) begin failures++; $display("windows dropped"); end
    checks++;
    if (fex_max >= HOP || lstm_max >= HOP) begin failures++; $display("FEx or LSTM exceed one hop"); end
    checks++;
    if (gmm_lat_max >= 8 * HOP || n_accept < 2) begin failures++; $display("SV too slow or missing"); end
    checks++;
    if (n_kw == 0 || n_nokw == 0) begin failures++; $display("keyword decisions missing"); end
    checks++;
    if (n_trans[ST_IDLE][ST_KWS] == 0 || n_trans[ST_KWS][ST_SV] == 0 || n_trans[ST_SV][ST_KWS] == 0
        || n_trans[ST_KWS][ST_IDLE] == 0 || state != ST_IDLE) begin
      failures++; $display("FSM path incomplete");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
