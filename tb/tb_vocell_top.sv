// tb_vocell_top: end-to-end test of the wake-up chain at a reduced size set
// through the configuration registers: 32-sample windows (16-point complex
// DFT), 8 mel bands, an LSTM of 4 neurons on the 13 static MFCCs with 4
// classes, and a GMM pair of 4 Gaussians over 8 dimensions deciding on two
// batches (16 frames). ADC samples arrive every 2 clocks (8x oversampling,
// so one audio sample per 16 clocks).
// Stimulus: silence, a low tone (band 1, "not a keyword"), a high tone
// (band 6, "keyword") and silence again, in several modes:
//   A  act_kws + act_sv, SV threshold low   -> accept decisions
//   B  act_kws + act_kws_sv, threshold high -> concurrent KWS+SV, rejects
//   C  act_sv only                          -> SV straight from IDLE
//   D  ADC twice as fast                    -> windows dropped by the FEx
//   E  two LSTM layers and two FC layers    -> same keyword decisions
// The LSTM model is built so that neuron 0 follows the sign of MFCC 1 (low
// tone positive, high tone negative) and class 1 wins when h0 > 0; in mode
// E the second LSTM layer, the hidden FC layer and the class layer each
// pass that sign on through their unit 0. The UBM
// has a log weight 4 below the speaker model on the same wide Gaussians,
// plus one very narrow Gaussian that every vector rejects (early skip).
// Checked per event: the keyword decision of every LSTM frame whose
// vector lies well inside a tone (the vectors are five hops behind the
// newest window), each SV decision against the mode's expectation, no
// feature vector once IDLE has lasted longer than one frame's processing,
// and the FSM transitions. Each mechanism is counted and the test fails if
// any of them never happened.
module tb_vocell_top
  import vocell_pkg::*;
;
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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- audio source ----------------
  int tone = 0;            // 0 silence, otherwise DFT bin of the tone
  int adc_div = 2;         // clocks per ADC sample
  int hops_same = 0;       // half windows since the tone last changed
  int n_adc = 0;
  initial begin
    adc_data = 0; adc_valid = 0;
    wait (rst_n);
    forever begin
      repeat (adc_div - 1) @(negedge clk);
      if (tone == 0) adc_data = 10'($urandom_range(0, 6) - 3);
      else adc_data = 10'($rtoi(400.0 * $cos(2.0 * 3.141592653589793 * tone * n_adc / 256.0)));
      n_adc++;
      adc_valid = 1;
      @(negedge clk); adc_valid = 0;
    end
  end
  task automatic play(input int t, input int hops);
    tone = t; hops_same = 0;
    repeat (hops) @(posedge dut.u_sd.frame_valid);
  endtask

  // ---------------- mechanism counters ----------------
  int n_sd_frames = 0, n_sd_above = 0, n_hangover = 0, n_detect = 0;
  int n_idle_to_kws = 0, n_kws_to_sv = 0, n_kws_to_kwssv = 0, n_sv_to_kws = 0;
  int n_kwssv_to_kws = 0, n_kws_to_idle = 0, n_idle_to_sv = 0, n_sv_to_idle = 0;
  int n_feat = 0, n_kws_frames = 0, n_kw = 0, n_nokw = 0, n_accept = 0, n_reject = 0;
  int n_feat_idle = 0, idle_cycles = 0, n_kw2 = 0, n_nokw2 = 0;
  logic [1:0] st_q = 0;
  logic sd_q = 0;
  int exp_accept = 1;
  int tone_at_feat = 0, same_at_feat = 0;

  always @(posedge dut.u_sd.frame_valid) if (rst_n) hops_same++;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_sd.frame_valid) begin
      n_sd_frames++;
      if (dut.u_sd.frame_above) n_sd_above++;
      else if (sound_detected) n_hangover++;
    end
    if (sound_detected && !sd_q) n_detect++;
    sd_q <= sound_detected;
    if (feat_valid) begin
      n_feat++;
      if (idle_cycles > 1000) n_feat_idle++;
      tone_at_feat = tone; same_at_feat = hops_same;
    end
    if (state != st_q) begin
      case ({st_q, state})
        {ST_IDLE, ST_KWS}:   n_idle_to_kws++;
        {ST_KWS, ST_SV}:     n_kws_to_sv++;
        {ST_KWS, ST_KWS_SV}: n_kws_to_kwssv++;
        {ST_SV, ST_KWS}:     n_sv_to_kws++;
        {ST_KWS_SV, ST_KWS}: n_kwssv_to_kws++;
        {ST_KWS, ST_IDLE}:   n_kws_to_idle++;
        {ST_IDLE, ST_SV}:    n_idle_to_sv++;
        {ST_SV, ST_IDLE}:    n_sv_to_idle++;
        default: begin
          failures++; $display("%0t unexpected transition %0d -> %0d", $time, st_q, state);
        end
      endcase
      checks++;
    end
    st_q <= state;
    idle_cycles = (state == ST_IDLE) ? idle_cycles + 1 : 0;
    if (kws_done) begin
      n_kws_frames++;
      if (keyword) n_kw++; else n_nokw++;
      if (dut.cfg.lstm_two) begin if (keyword) n_kw2++; else n_nokw2++; end
      if (tone_at_feat != 0 && same_at_feat >= 8) begin
        checks++;
        if (keyword != (tone_at_feat > 8)) begin
          failures++; $display("%0t tone %0d: keyword %0d class %0d st %0d same %0d x1 %0d h0 %0d s0 %0d s1 %0d", $time, tone_at_feat, keyword, kws_class, state, same_at_feat, dut.kws_vec[1], dut.u_lstm.h_prev[0], dut.scores[0], dut.scores[1]);
        end
      end
    end
    if (sv_ready) begin
      checks++;
      if (sv_accept) n_accept++; else n_reject++;
      if (sv_accept != exp_accept[0]) begin
        failures++; $display("%0t SV decision %0d expected %0d (llr %0d)", $time, sv_accept, exp_accept, dut.llr);
      end
    end
  end

  // ---------------- configuration ----------------
  task automatic wr(input cfg_sel_t s, input int a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_sel = 3'(s); cfg_addr = 16'(a); cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  localparam int ND = 13, NN = 4, NK = 4, P = (ND + NN + 2) / 2, PF = (NN + 2) / 2;
  localparam int P2 = (2 * NN + 2) / 2;
  localparam int NG = 4, GD = 8;

  task automatic configure();
    wr(SEL_REG, 1, 1000);        // E_th
    wr(SEL_REG, 2, 4);           // hangover
    wr(SEL_REG, 3, 4);           // 16-point complex DFT
    wr(SEL_REG, 4, 8);           // mel bands
    wr(SEL_REG, 5, 10);          // mel shift
    wr(SEL_REG, 6, 8);           // MFCCs
    wr(SEL_REG, 7, 5);           // DCT shift
    wr(SEL_REG, 8, ND);
    wr(SEL_REG, 9, NN);
    wr(SEL_REG, 10, NK);
    wr(SEL_REG, 12, NG);
    wr(SEL_REG, 13, GD);
    wr(SEL_REG, 14, 2);
    wr(SEL_REG, 15, 2);          // two batches per decision
    // mel rows: bin k -> band k/2, weight 1.0
    for (int k = 0; k < 16; k++) begin
      int bd; bd = k / 2;
      wr(SEL_MEL_MEM, k, (bd % 2 == 0) ? {35'd0, 5'(bd), 12'd2048, 12'd0} : {35'd0, 5'(bd), 12'd0, 12'd2048});
    end
    // LSTM: all weights zero except neuron 0 and the FC biases
    for (int a = 0; a < NN * P + PF; a++) begin
      logic [63:0] d; d = '0;
      if (a == 0) d[8*(2*3+1) +: 8] = -8'sd64;                 // W_g(x1) = -2.0
      if (a == P - 1) begin                                     // bias element ND+NN
        d[8*(2*0+1) +: 8] = -8'sd96;                            // f bias -3
        d[8*(2*1+1) +: 8] = 8'sd96;                             // i bias +3
        d[8*(2*2+1) +: 8] = 8'sd96;                             // o bias +3
      end
      if (a == NN * P) d[8*(2*1+0) +: 8] = 8'sd64;              // class 1 <- 2.0 h0
      if (a == NN * P + PF - 1) begin                           // FC biases
        d[8*(2*2+0) +: 8] = -8'sd96;
        d[8*(2*3+0) +: 8] = -8'sd96;
      end
      wr(SEL_LSTM_MEM, a, d);
    end
    // GMM: speaker g0..3 and UBM g0..2 wide (sigma' = 2/64), UBM g3 narrow
    for (int gi = 0; gi < 2 * NG; gi++) begin
      wr(SEL_GMM_W, gi, (gi < NG) ? 64'd0 : 64'(16'(-256)));
      for (int d = 0; d < GD; d++)
        wr(SEL_GMM_MODEL, gi * GD + d, (gi == 2 * NG - 1) ? {48'd0, 8'h80, 8'd255} : {48'd0, 8'd0, 8'd2});
    end
  endtask

  task automatic mode(input int act, input int th);
    wr(SEL_REG, 0, 64'(act));
    wr(SEL_REG, 17, 64'(th));
  endtask

  initial begin
    int dropped0;
    cfg_we = 0; cfg_sel = 0; cfg_addr = 0; cfg_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    configure();
    // A: KWS then SV, accept
    mode(3'b011, 2 * 64); exp_accept = 1;
    play(0, 12);
    checks++;
    if (state != ST_IDLE || n_feat != 0) begin failures++; $display("not idle in silence"); end
    play(2, 16);
    play(13, 60);
    play(0, 16);
    checks++;
    if (state != ST_IDLE) begin failures++; $display("no return to IDLE"); end
    // B: KWS + SV concurrently, reject
    mode(3'b101, 10 * 64); exp_accept = 0;
    play(2, 10);
    play(13, 40);
    play(0, 16);
    // C: SV only, accept
    mode(3'b010, 2 * 64); exp_accept = 1;
    play(5, 30);
    play(0, 16);
    // D: audio faster than the FEx can process
    mode(3'b001, 2 * 64);
    dropped0 = int'(windows_dropped);
    adc_div = 1;
    play(2, 20);
    play(0, 16);
    adc_div = 2;
    // E: second LSTM layer (4 cells) and hidden FC layer (4 outputs)
    for (int a = NN * P; a < NN * P + NN * P2 + 2 * PF; a++) begin
      logic [63:0] d; d = '0;
      if (a == NN * P) d[8*(2*3+0) +: 8] = 8'sd64;               // layer 2 W_g(h1_0) = 2.0
      if (a == NN * P + P2 - 1) begin                             // layer 2 biases
        d[8*(2*0+0) +: 8] = -8'sd96;
        d[8*(2*1+0) +: 8] = 8'sd96;
        d[8*(2*2+0) +: 8] = 8'sd96;
      end
      if (a == NN * P + NN * P2) d[8*(2*0+0) +: 8] = 8'sd64;      // hidden 0 <- 2.0 h2_0
      if (a == NN * P + NN * P2 + PF) d[8*(2*1+0) +: 8] = 8'sd64; // class 1 <- 2.0 hidden 0
      if (a == NN * P + NN * P2 + 2 * PF - 1) begin               // class biases
        d[8*(2*2+0) +: 8] = -8'sd96;
        d[8*(2*3+0) +: 8] = -8'sd96;
      end
      wr(SEL_LSTM_MEM, a, d);
    end
    wr(SEL_REG, 18, 1);
    wr(SEL_REG, 19, 1);
    wr(SEL_REG, 20, 4);
    play(2, 16);
    play(13, 16);
    play(0, 16);
    checks++;
    if (n_feat_idle != 0) begin failures++; $display("features produced in IDLE"); end

    $display("SD frames %0d above %0d hangover %0d detections %0d", n_sd_frames, n_sd_above, n_hangover, n_detect);
    $display("IDLE>KWS %0d KWS>SV %0d KWS>KWS+SV %0d SV>KWS %0d KWS+SV>KWS %0d KWS>IDLE %0d IDLE>SV %0d SV>IDLE %0d",
      n_idle_to_kws, n_kws_to_sv, n_kws_to_kwssv, n_sv_to_kws, n_kwssv_to_kws, n_kws_to_idle, n_idle_to_sv, n_sv_to_idle);
    $display("features %0d LSTM frames %0d keyword %0d none %0d accept %0d reject %0d skips %0d dropped %0d",
      n_feat, n_kws_frames, n_kw, n_nokw, n_accept, n_reject, gauss_skips, windows_dropped);
    begin
      int m [string];
      m["sound frame above threshold"] = n_sd_above;
      m["hangover frame"] = n_hangover;
      m["sound detection"] = n_detect;
      m["IDLE->KWS"] = n_idle_to_kws;
      m["KWS->SV"] = n_kws_to_sv;
      m["KWS->KWS+SV"] = n_kws_to_kwssv;
      m["SV->KWS"] = n_sv_to_kws;
      m["KWS+SV->KWS"] = n_kwssv_to_kws;
      m["KWS->IDLE"] = n_kws_to_idle;
      m["IDLE->SV"] = n_idle_to_sv;
      m["SV->IDLE"] = n_sv_to_idle;
      m["feature vector"] = n_feat;
      m["keyword"] = n_kw;
      m["no keyword"] = n_nokw;
      m["keyword, two-layer network"] = n_kw2;
      m["no keyword, two-layer network"] = n_nokw2;
      m["SV accept"] = n_accept;
      m["SV reject"] = n_reject;
      m["Gaussian skipped early"] = int'(gauss_skips);
      m["window dropped"] = int'(windows_dropped) - dropped0;
      foreach (m[k]) begin
        checks++;
        if (m[k] == 0) begin failures++; $display("mechanism never happened: %s", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
