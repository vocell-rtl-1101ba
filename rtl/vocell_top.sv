// vocell_top: digital back end of a hierarchical speech-triggered wake-up SoC.
//
// Audio from the analog front end's 8x oversampled 10-bit ADC is decimated
// to 16 kHz and feeds two always-on consumers: the energy-based sound
// detector and the three audio buffers of the feature extractor. The master
// FSM keeps everything else idle until sound is detected; then the feature
// extractor computes MFCCs with derivatives every half window, the LSTM
// accelerator spots keywords on the 39-D KWS vectors, and, depending on the
// act_kws / act_sv / act_kws_sv registers, a spotted keyword starts the
// GMM speaker verifier on the 60-D SV vectors (alone or concurrently with
// KWS). This three-stage hierarchy SD -> KWS -> SV and the block set follow
// the design's architecture.
//
// Configuration (this design's own register map; the chip's host link is a
// SPI port whose format is not part of this RTL): a parallel write bus,
// cfg_sel selects the target (vocell_pkg::cfg_sel_t):
//   SEL_REG       cfg_addr = register index, cfg_wdata[23:0] = value
//                  0 {act_kws_sv, act_sv, act_kws}  1 E_th  2 L_h
//                  3 log2 complex DFT size  4 mel filters  5 mel shift
//                  6 MFCCs  7 DCT shift  8 LSTM inputs  9 LSTM neurons
//                  10 keyword classes  11 NLQ on  12 Gaussians per model
//                  13 GMM dimensions  14 models  15 batches per decision
//                  16 Dist_th  17 SV threshold th  18 second LSTM layer
//                  19 hidden FC layer  20 hidden FC outputs
//   SEL_LSTM_MEM  64-bit model words       SEL_NLQ_LUT  4b->8b table
//   SEL_MEL_MEM   mel weight rows          SEL_GMM_MODEL {mu, sigma'}
//   SEL_GMM_W     Gaussian log weights
// Register reset values are the main configuration: 512-point real DFT
// (32 ms at 16 kHz), 32 mel filters, 64-neuron LSTM on 39 inputs with
// 16 classes, 256 Gaussians per model on 60 dimensions, Dist_th = 4.25.
module vocell_top
  import vocell_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // analog front end (ADC) samples
  input  logic signed [9:0] adc_data,
  input  logic              adc_valid,
  // configuration / memory write bus
  input  logic              cfg_we,
  input  logic [2:0]        cfg_sel,
  input  logic [15:0]       cfg_addr,
  input  logic [63:0]       cfg_wdata,
  // status and decisions
  output logic [1:0]        state,
  output logic              sound_detected,
  output logic              feat_valid,
  output logic              kws_done,
  output logic              keyword,
  output logic [3:0]        kws_class,
  output logic              sv_ready,
  output logic              sv_accept,
  output logic [15:0]       windows_dropped,
  output logic [31:0]       gauss_skips
);
  // ---------------- configuration registers ----------------
  cfg_t cfg;
  logic reg_we;
  assign reg_we = cfg_we && (cfg_sel_t'(cfg_sel) == SEL_REG);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.act_kws     <= 1'b1;
      cfg.act_sv      <= 1'b1;
      cfg.act_kws_sv  <= 1'b0;
      cfg.sd_eth      <= 20'd20000;
      cfg.sd_hang     <= 8'd8;
      cfg.fft_logn    <= 4'd8;
      cfg.n_mel       <= 6'd32;
      cfg.mel_shift   <= 5'd8;
      cfg.n_mfcc      <= 6'd32;
      cfg.dct_shift   <= 4'd4;
      cfg.lstm_ndim   <= 6'd39;
      cfg.lstm_nneur  <= 7'd64;
      cfg.lstm_nkw    <= 5'd16;
      cfg.lstm_nlq    <= 1'b0;
      cfg.lstm_two    <= 1'b0;
      cfg.lstm_fc2    <= 1'b0;
      cfg.lstm_nhid   <= 7'd32;
      cfg.gmm_ngauss  <= 10'd256;
      cfg.gmm_ndim    <= 6'd60;
      cfg.gmm_nmod    <= 2'd2;
      cfg.gmm_nbatch  <= 3'd4;
      cfg.gmm_dist_th <= 16'd272;
      cfg.gmm_sv_th   <= 24'sd0;
    end else if (reg_we) begin
      unique case (cfg_addr[4:0])
        5'd0:  {cfg.act_kws_sv, cfg.act_sv, cfg.act_kws} <= cfg_wdata[2:0];
        5'd1:  cfg.sd_eth      <= cfg_wdata[19:0];
        5'd2:  cfg.sd_hang     <= cfg_wdata[7:0];
        5'd3:  cfg.fft_logn    <= cfg_wdata[3:0];
        5'd4:  cfg.n_mel       <= cfg_wdata[5:0];
        5'd5:  cfg.mel_shift   <= cfg_wdata[4:0];
        5'd6:  cfg.n_mfcc      <= cfg_wdata[5:0];
        5'd7:  cfg.dct_shift   <= cfg_wdata[3:0];
        5'd8:  cfg.lstm_ndim   <= cfg_wdata[5:0];
        5'd9:  cfg.lstm_nneur  <= cfg_wdata[6:0];
        5'd10: cfg.lstm_nkw    <= cfg_wdata[4:0];
        5'd11: cfg.lstm_nlq    <= cfg_wdata[0];
        5'd12: cfg.gmm_ngauss  <= cfg_wdata[9:0];
        5'd13: cfg.gmm_ndim    <= cfg_wdata[5:0];
        5'd14: cfg.gmm_nmod    <= cfg_wdata[1:0];
        5'd15: cfg.gmm_nbatch  <= cfg_wdata[2:0];
        5'd16: cfg.gmm_dist_th <= cfg_wdata[15:0];
        5'd17: cfg.gmm_sv_th   <= cfg_wdata[23:0];
        5'd18: cfg.lstm_two    <= cfg_wdata[0];
        5'd19: cfg.lstm_fc2    <= cfg_wdata[0];
        5'd20: cfg.lstm_nhid   <= cfg_wdata[6:0];
        default: ;
      endcase
    end
  end

  // ---------------- audio path ----------------
  logic signed [9:0] smp;
  logic              smp_valid;
  decimator #(.W(10), .OSR(8)) u_dec (
    .clk, .rst_n, .adc_data, .adc_valid, .out_data(smp), .out_valid(smp_valid));

  logic        sd_frame, sd_above;
  logic [20:0] sd_energy;
  sound_detector #(.W(10), .HALF_MAX(512)) u_sd (
    .clk, .rst_n, .sample(smp), .sample_valid(smp_valid),
    .half_len(10'(1) << cfg.fft_logn),
    .e_th(21'(cfg.sd_eth)), .hangover(cfg.sd_hang),
    .frame_valid(sd_frame), .frame_above(sd_above), .sound(sound_detected),
    .energy(sd_energy));

  // ---------------- master control ----------------
  ctrl_state_t cstate;
  logic        en_fex, en_kws, en_sv, kws_entry;
  control_unit u_ctrl (
    .clk, .rst_n,
    .act_kws(cfg.act_kws), .act_sv(cfg.act_sv), .act_kws_sv(cfg.act_kws_sv),
    .start(sound_detected), .keyword(kws_done && keyword), .sv_ready,
    .state(cstate), .en_fex, .en_kws, .en_sv, .kws_entry);
  assign state = cstate;

  // ---------------- feature extraction ----------------
  logic signed [7:0] kws_vec [39];
  logic signed [7:0] sv_vec [60];
  logic              fex_busy;
  fex #(.W(10), .LOGM_MAX(9), .DW(10), .NMEL_MAX(32)) u_fex (
    .clk, .rst_n, .enable(en_fex), .sample(smp), .sample_valid(smp_valid),
    .logm(cfg.fft_logn), .n_mel(cfg.n_mel), .mel_shift(cfg.mel_shift),
    .n_mfcc(cfg.n_mfcc), .dct_shift(cfg.dct_shift),
    .mel_wr_en(cfg_we && cfg_sel_t'(cfg_sel) == SEL_MEL_MEM),
    .mel_wr_addr(cfg_addr[8:0]), .mel_wr_data(cfg_wdata[28:0]),
    .feat_valid, .kws_vec, .sv_vec, .busy(fex_busy), .windows_dropped);

  // ---------------- keyword spotting ----------------
  logic              lstm_busy;
  logic signed [7:0] scores [16];
  lstm_accel #(.NDIM_MAX(39), .NNEUR_MAX(64), .NKW_MAX(16), .MEM_WORDS(4096)) u_lstm (
    .clk, .rst_n, .clear_state(kws_entry),
    .start(feat_valid && en_kws && !lstm_busy), .x(kws_vec),
    .n_dim(cfg.lstm_ndim), .n_neur(cfg.lstm_nneur), .n_kw(cfg.lstm_nkw), .nlq(cfg.lstm_nlq),
    .two_lstm(cfg.lstm_two), .two_fc(cfg.lstm_fc2), .n_hid(cfg.lstm_nhid),
    .mem_we(cfg_we && cfg_sel_t'(cfg_sel) == SEL_LSTM_MEM), .mem_addr(cfg_addr[11:0]),
    .mem_wdata(cfg_wdata),
    .lut_we(cfg_we && cfg_sel_t'(cfg_sel) == SEL_NLQ_LUT), .lut_addr(cfg_addr[3:0]),
    .lut_wdata(cfg_wdata[7:0]),
    .busy(lstm_busy), .done(kws_done), .scores, .kw_class(kws_class), .keyword);

  // ---------------- speaker verification ----------------
  logic en_sv_q, gmm_busy;
  logic signed [39:0] llr;
  logic [31:0]        gauss_evals;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) en_sv_q <= 1'b0;
    else        en_sv_q <= en_sv;

  gmm_accel #(.NV(8), .DMAX(60), .NFRAMES(32), .MWORDS(32768), .GMAX(512)) u_gmm (
    .clk, .rst_n, .enable(en_sv), .clear(en_sv && !en_sv_q),
    .feat_valid, .feat(sv_vec),
    .n_gauss(cfg.gmm_ngauss), .n_dim(cfg.gmm_ndim), .n_mod(cfg.gmm_nmod),
    .n_batch(cfg.gmm_nbatch), .dist_th(cfg.gmm_dist_th), .sv_th(cfg.gmm_sv_th),
    .model_we(cfg_we && cfg_sel_t'(cfg_sel) == SEL_GMM_MODEL), .model_addr(cfg_addr[14:0]),
    .model_wdata(cfg_wdata[15:0]),
    .w_we(cfg_we && cfg_sel_t'(cfg_sel) == SEL_GMM_W), .w_addr(cfg_addr[8:0]),
    .w_wdata(cfg_wdata[15:0]),
    .busy(gmm_busy), .ready(sv_ready), .sv_accept, .llr_sum(llr),
    .gauss_evals, .gauss_skips);

endmodule
