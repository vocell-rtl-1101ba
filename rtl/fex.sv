// fex: MFCC feature extraction engine and its sequencing FSM.
//
// Every half window (hop) the audio buffers hand over a window of N = 2M
// samples (M = 2^logm, up to 512). When enabled, the engine:
//   1. LOAD  packs the real window as an M-point complex sequence, even
//            samples as real and odd samples as imaginary part, into the DFT
//            memory (two samples read per cycle);
//   2. DFT   runs the M-point complex DFT on the butterfly engine;
//   3. POST  applies the real-DFT correction
//            X_k = 1/2[(Z_k + Z*_{M-k}) - j(Z_k - Z*_{M-k}) W_N^k],
//            takes |X_k| (max + min/2, this design's choice of magnitude)
//            and streams it into the mel filter bank;
//   4. LOG   scales each mel energy to 10 bits (right shift mel_shift,
//            saturate) and takes its logarithm through the 1024-entry LUT;
//   5. DCT   computes n_mfcc cepstral coefficients of the n_mel log energies;
//   6. DELTA pushes them into the derivative unit, which delivers the KWS
//            (39-D) and SV (60-D) feature vectors with feat_valid.
// Steps 1-6 and their order follow the design's feature extractor; steps
// 1 and 3 are its real-DFT-as-half-size-complex-DFT method. This design's
// own choices: an explicit LOAD pass (the design feeds the first DFT layer
// from the audio buffers directly), no analysis window weighting (none is
// mentioned), the DCT on its own multiply-accumulate unit instead of the
// DFT engine, bins 0..M-1 only (Nyquist bin dropped), n_mel a power of two.
// A window that arrives while the engine is busy is skipped (counted in
// windows_dropped).
module fex #(
  parameter int unsigned W        = 10,   // audio sample width
  parameter int unsigned LOGM_MAX = 9,    // 512-point complex / 1024-point real DFT
  parameter int unsigned DW       = 10,   // DFT data width
  parameter int unsigned NMEL_MAX = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic signed [W-1:0] sample,
  input  logic                sample_valid,
  input  logic [3:0]          logm,
  input  logic [5:0]          n_mel,
  input  logic [4:0]          mel_shift,
  input  logic [5:0]          n_mfcc,
  input  logic [3:0]          dct_shift,
  // mel weight memory write port
  input  logic                mel_wr_en,
  input  logic [LOGM_MAX-1:0] mel_wr_addr,
  input  logic [28:0]         mel_wr_data,
  // features
  output logic                feat_valid,
  output logic signed [7:0]   kws_vec [39],
  output logic signed [7:0]   sv_vec [60],
  output logic                busy,
  output logic [15:0]         windows_dropped
);
  localparam int unsigned MMAX = 1 << LOGM_MAX;
  localparam int unsigned NMAX = 2 * MMAX;
  localparam int unsigned HW   = $clog2(MMAX + 1);
  localparam int unsigned MW   = DW + 2;          // magnitude width

  typedef enum logic [2:0] {F_IDLE, F_LOAD, F_DFT, F_POST, F_LOG, F_DCT, F_DELTA} fstate_t;
  fstate_t st;

  logic [HW-1:0] half_len;
  assign half_len = HW'(1) << logm;

  // ---------------- audio buffers ----------------
  logic                win_ready;
  logic [LOGM_MAX:0]   ab_idx_a, ab_idx_b;
  logic signed [W-1:0] ab_a, ab_b;

  audio_buffers #(.W(W), .HALF_MAX(MMAX)) u_abuf (
    .clk, .rst_n, .sample, .sample_valid, .half_len,
    .win_ready,
    .rd_idx_a(ab_idx_a), .rd_idx_b(ab_idx_b),
    .rd_data_a(ab_a), .rd_data_b(ab_b));

  // ---------------- DFT engine ----------------
  logic                  dft_start, dft_busy, dft_done;
  logic                  ld_we;
  logic [LOGM_MAX-1:0]   ld_addr;
  logic [LOGM_MAX-1:0]   bin_a, bin_b;
  logic signed [DW-1:0]  za_re, za_im, zb_re, zb_im;

  dft_engine #(.DW(DW), .LOGM_MAX(LOGM_MAX)) u_dft (
    .clk, .rst_n, .logm, .start(dft_start), .busy(dft_busy), .done(dft_done),
    .ld_we, .ld_addr, .ld_re(DW'(ab_a)), .ld_im(DW'(ab_b)),
    .rd_bin_a(bin_a), .rd_bin_b(bin_b),
    .rd_a_re(za_re), .rd_a_im(za_im), .rd_b_re(zb_re), .rd_b_im(zb_im));

  // ---------------- real-DFT correction ----------------
  logic [LOGM_MAX-1:0]  post_k;       // bin whose data is on the read ports
  logic                 post_v;
  logic signed [11:0]   w_re, w_im;
  twiddle_rom #(.NMAX(NMAX), .TW(12), .TF(10)) u_tw (
    .addr(LOGM_MAX'(post_k << (4'(LOGM_MAX) - logm))), .w_re(w_re), .w_im(w_im));

  logic signed [DW+1:0]  a_re, a_im, b_re, b_im;   // A = Zk + Z*_{M-k}, B = Zk - Z*_{M-k}
  logic signed [DW+14:0] p_re, p_im;                // B * W
  logic signed [DW+2:0]  x_re, x_im;
  logic [MW-1:0]         ax, ay, mag;
  always_comb begin
    a_re = (DW+2)'(za_re) + (DW+2)'(zb_re);
    a_im = (DW+2)'(za_im) - (DW+2)'(zb_im);
    b_re = (DW+2)'(za_re) - (DW+2)'(zb_re);
    b_im = (DW+2)'(za_im) + (DW+2)'(zb_im);
    p_re = (DW+15)'(b_re) * (DW+15)'(w_re) - (DW+15)'(b_im) * (DW+15)'(w_im);
    p_im = (DW+15)'(b_re) * (DW+15)'(w_im) + (DW+15)'(b_im) * (DW+15)'(w_re);
    // X = (A - jP)/2 : re = (A_re + P_im)/2, im = (A_im - P_re)/2
    x_re = (DW+3)'(((DW+15)'(a_re) + (p_im >>> 10)) >>> 1);
    x_im = (DW+3)'(((DW+15)'(a_im) - (p_re >>> 10)) >>> 1);
    ax   = x_re[DW+2] ? MW'(-x_re) : MW'(x_re);
    ay   = x_im[DW+2] ? MW'(-x_im) : MW'(x_im);
    mag  = (ax > ay) ? ax + (ay >> 1) : ay + (ax >> 1);
  end

  // ---------------- mel filter, log ----------------
  logic        mel_clear;
  logic [4:0]  band;
  logic [31:0] band_acc;
  logic [9:0]  log_addr, log_val;

  mel_filter #(.MW(MW), .BIN_AW(LOGM_MAX), .MAX_BANDS(NMEL_MAX)) u_mel (
    .clk, .rst_n, .clear(mel_clear),
    .in_valid(post_v), .in_bin(post_k), .in_mag(mag), .n_mel,
    .wr_en(mel_wr_en), .wr_addr(mel_wr_addr), .wr_data(mel_wr_data),
    .rd_band(band), .rd_acc(band_acc));

  always_comb begin
    logic [31:0] s;
    s        = band_acc >> mel_shift;
    log_addr = (s > 32'd1023) ? 10'd1023 : s[9:0];
  end
  log_lut u_log (.addr(log_addr), .log_out(log_val));

  // ---------------- DCT, derivatives ----------------
  logic [9:0]        l_reg [NMEL_MAX];
  logic              dct_start, dct_busy, dct_done;
  logic signed [7:0] mfcc [NMEL_MAX];
  logic [2:0]        dct_logn;

  always_comb begin
    dct_logn = 3'd3;
    if (n_mel >= 6'd16) dct_logn = 3'd4;
    if (n_mel >= 6'd32) dct_logn = 3'd5;
  end

  dct_unit #(.MAXN(NMEL_MAX), .LW(10)) u_dct (
    .clk, .rst_n, .start(dct_start), .logn(dct_logn), .n_mfcc, .out_shift(dct_shift),
    .l_in(l_reg), .mfcc, .busy(dct_busy), .done(dct_done));

  logic delta_push;
  delta_unit #(.NC(NMEL_MAX)) u_delta (
    .clk, .rst_n, .in_valid(delta_push), .c_in(mfcc),
    .out_valid(feat_valid), .kws_vec, .sv_vec);

  // ---------------- sequencing ----------------
  logic [LOGM_MAX:0] cnt;       // step counter
  logic              ld_pend;   // buffer read issued last cycle
  logic [LOGM_MAX-1:0] ld_pend_addr;
  logic [1:0]        drain;

  assign ab_idx_a = (LOGM_MAX+1)'({cnt[LOGM_MAX-1:0], 1'b0});
  assign ab_idx_b = (LOGM_MAX+1)'({cnt[LOGM_MAX-1:0], 1'b1});
  assign ld_we    = ld_pend;
  assign ld_addr  = ld_pend_addr;
  assign bin_a    = cnt[LOGM_MAX-1:0];
  assign bin_b    = LOGM_MAX'((half_len - HW'(cnt[LOGM_MAX-1:0])) & (half_len - 1'b1));
  assign band     = cnt[4:0];
  assign busy     = (st != F_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st              <= F_IDLE;
      cnt             <= '0;
      ld_pend         <= 1'b0;
      ld_pend_addr    <= '0;
      drain           <= '0;
      dft_start       <= 1'b0;
      dct_start       <= 1'b0;
      delta_push      <= 1'b0;
      mel_clear       <= 1'b0;
      post_v          <= 1'b0;
      post_k          <= '0;
      windows_dropped <= '0;
      for (int i = 0; i < int'(NMEL_MAX); i++) l_reg[i] <= '0;
    end else begin
      dft_start  <= 1'b0;
      dct_start  <= 1'b0;
      delta_push <= 1'b0;
      mel_clear  <= 1'b0;
      ld_pend    <= 1'b0;
      post_v     <= 1'b0;
      if (win_ready && enable && st != F_IDLE)
        windows_dropped <= windows_dropped + 1'b1;
      unique case (st)
        F_IDLE: if (win_ready && enable) begin
          st        <= F_LOAD;
          cnt       <= '0;
          mel_clear <= 1'b1;
        end
        F_LOAD: begin
          if (cnt < (LOGM_MAX+1)'(half_len)) begin
            ld_pend      <= 1'b1;
            ld_pend_addr <= cnt[LOGM_MAX-1:0];
            cnt          <= cnt + 1'b1;
          end else begin
            // last write lands this cycle
            st        <= F_DFT;
            dft_start <= 1'b1;
          end
        end
        F_DFT: if (dft_done) begin
          st  <= F_POST;
          cnt <= '0;
          drain <= '0;
        end
        F_POST: begin
          // bin cnt is read now; its data is on the ports next cycle
          if (cnt < (LOGM_MAX+1)'(half_len)) begin
            post_k <= cnt[LOGM_MAX-1:0];
            post_v <= 1'b1;
            cnt    <= cnt + 1'b1;
          end else begin
            drain <= drain + 1'b1;
            if (drain == 2'd3) begin
              st  <= F_LOG;
              cnt <= '0;
            end
          end
        end
        F_LOG: begin
          l_reg[cnt[4:0]] <= log_val;
          if (cnt == (LOGM_MAX+1)'(n_mel - 1'b1) || cnt == (LOGM_MAX+1)'(NMEL_MAX - 1)) begin
            st        <= F_DCT;
            dct_start <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        F_DCT: if (dct_done) begin
          st         <= F_DELTA;
          delta_push <= 1'b1;
        end
        F_DELTA: if (feat_valid) st <= F_IDLE;
        default: st <= F_IDLE;
      endcase
    end
  end
endmodule
