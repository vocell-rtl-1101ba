// gmm_accel: GMM-UBM speaker verification engine.
//
// Scores batches of NV = 8 feature vectors at once against a speaker GMM
// and a universal background model (UBM), and decides whether the averaged
// log-likelihood ratio  sum(log2 P_spk - log2 P_ubm) / frames  exceeds the
// threshold th. The model parameters of one Gaussian dimension
// (mu, sigma') are read once and shared by eight Gaussian accelerators, one
// per vector of the batch, which cuts model-memory reads by eight. Each
// accelerator aborts a Gaussian whose normalized distance exceeds Dist_th;
// when all eight have aborted, the controller jumps to the next Gaussian
// and saves the remaining reads. Finished log-probabilities are added, as
// powers of two, into one floating-point accumulator per vector. Feature
// vectors arrive from the feature extractor into a 32-frame buffer that is
// filled batch by batch while earlier batches are scored. Memories: model
// memory 32768 x 16 bit (64 kB, {mu, sigma'} per Gaussian dimension,
// Gaussian-major, speaker model first, UBM after it), Gaussian weight memory
// 512 x 16 bit (1 kB, log2 weight w'). These sizes, the eight-vector
// batching, the shared parameter reads, the abort rule, the jump to the next
// Gaussian and the floating-point accumulation follow the design.
// This design's choices: model 0 is the speaker and model 1 the UBM
// (n_mod = 1 scores the speaker model alone); a decision covers n_batch
// batches (8*n_batch frames, about 0.5 s at 4 batches); the average is
// compared as sum > th * frames; a vector no Gaussian accepted counts with
// log2 P = LP_FLOOR.
// Timing: one Gaussian dimension per cycle; ready pulses with sv_accept
// valid when a decision is made.
module gmm_accel #(
  parameter int unsigned NV      = 8,      // vectors per batch
  parameter int unsigned DMAX    = 60,     // feature dimensions
  parameter int unsigned NFRAMES = 32,     // feature buffer frames
  parameter int unsigned MWORDS  = 32768,  // model memory words
  parameter int unsigned GMAX    = 512     // Gaussians (all models)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic                clear,
  input  logic                feat_valid,
  input  logic signed [7:0]   feat [DMAX],
  input  logic [9:0]          n_gauss,
  input  logic [5:0]          n_dim,
  input  logic [1:0]          n_mod,
  input  logic [2:0]          n_batch,
  input  logic [15:0]         dist_th,
  input  logic signed [23:0]  sv_th,
  // memory write ports
  input  logic                         model_we,
  input  logic [$clog2(MWORDS)-1:0]    model_addr,
  input  logic [15:0]                  model_wdata,   // {mu, sigma'}
  input  logic                         w_we,
  input  logic [$clog2(GMAX)-1:0]      w_addr,
  input  logic [15:0]                  w_wdata,
  // results
  output logic                busy,
  output logic                ready,
  output logic                sv_accept,
  output logic signed [39:0]  llr_sum,
  output logic [31:0]         gauss_evals,   // Gaussians started
  output logic [31:0]         gauss_skips    // Gaussians left early (all vectors aborted)
);
  localparam int unsigned MAW = $clog2(MWORDS);
  localparam int unsigned GAW = $clog2(GMAX);
  localparam int unsigned FAW = $clog2(NFRAMES);
  localparam int unsigned BAW = FAW - $clog2(NV);
  localparam logic signed [31:0] LP_FLOOR = -32'sd4194304;

  logic [15:0]       model_mem [MWORDS];
  logic [15:0]       w_mem [GMAX];
  logic signed [7:0] fbuf [NFRAMES][DMAX];

  typedef enum logic [2:0] {G_IDLE, G_PRIME, G_RUN, G_MODEND, G_CAP, G_BATCH} gstate_t;
  gstate_t st;

  logic [FAW-1:0] wr_frame;
  logic [BAW-1:0] rd_batch;
  logic [BAW:0]   pending;       // complete batches not yet scored
  logic [2:0]     batch_cnt;
  logic [1:0]     m;
  logic [9:0]     g;
  logic [5:0]     d;
  logic [MAW-1:0] gbase;         // first word of the current Gaussian
  logic [GAW-1:0] gidx;          // current Gaussian, all models
  logic [15:0]    mq, wq;        // memory outputs for (g, d)

  // ---------------- feature buffer ----------------
  logic batch_full;
  assign batch_full = enable && feat_valid && (wr_frame[$clog2(NV)-1:0] == '1);

  always_ff @(posedge clk) begin
    if (enable && feat_valid) fbuf[wr_frame] <= feat;
    if (model_we) model_mem[model_addr] <= model_wdata;
    if (w_we)     w_mem[w_addr] <= w_wdata;
  end

  // ---------------- Gaussian accelerators ----------------
  logic               step, first, last_d, any_alive, end_g;
  logic [NV-1:0]      alive_next, alive_q;
  logic signed [31:0] acc_next [NV];
  logic signed [31:0] acc_q [NV];
  logic signed [31:0] lsum [NV];
  logic [NV-1:0]      empty;
  logic               acc_clear;
  logic signed [31:0] lp [2][NV];

  assign step   = (st == G_RUN);
  assign first  = (d == 6'd0);
  assign last_d = (d == n_dim - 1'b1);

  for (genvar v = 0; v < int'(NV); v++) begin : g_vec
    gauss_accel u_ga (
      .clk, .rst_n, .step, .first,
      .f(fbuf[{rd_batch, ($clog2(NV))'(v)}][d]),
      .mu(signed'(mq[15:8])), .sigma_p(mq[7:0]), .w_p(signed'(wq)),
      .dist_th,
      .acc_next(acc_next[v]), .alive_next(alive_next[v]),
      .acc(acc_q[v]), .alive(alive_q[v]));

    gauss_accum u_acc (
      .clk, .rst_n, .clear(acc_clear),
      .add(step && last_d && alive_next[v]),
      .log_p(acc_next[v]),
      .log_sum(lsum[v]), .empty(empty[v]));
  end

  assign any_alive = |alive_next;
  assign end_g     = last_d || !any_alive;
  assign acc_clear = (st == G_CAP) || clear;

  // ---------------- next read address ----------------
  logic [MAW-1:0] gbase_n;
  logic [GAW-1:0] gidx_n;
  logic [5:0]     d_n;
  always_comb begin
    gbase_n = gbase;
    gidx_n  = gidx;
    d_n     = d;
    if (st == G_RUN) begin
      if (end_g) begin
        gbase_n = gbase + MAW'(n_dim);
        gidx_n  = gidx + 1'b1;
        d_n     = '0;
      end else begin
        d_n = d + 1'b1;
      end
    end else if (st == G_IDLE) begin
      gbase_n = '0;
      gidx_n  = '0;
      d_n     = '0;
    end
  end

  always_ff @(posedge clk) begin
    mq <= model_mem[gbase_n + MAW'(d_n)];
    wq <= w_mem[gidx_n];
  end

  // ---------------- batch result ----------------
  function automatic logic signed [39:0] floor_lp(input logic signed [31:0] v);
    return (v < LP_FLOOR) ? 40'(LP_FLOOR) : 40'(v);
  endfunction

  logic signed [39:0] batch_llr;
  always_comb begin
    batch_llr = '0;
    for (int v = 0; v < int'(NV); v++)
      batch_llr = batch_llr + floor_lp(lp[0][v]) - ((n_mod == 2'd2) ? floor_lp(lp[1][v]) : 40'sd0);
  end

  logic signed [39:0] th_total;
  assign th_total = 40'(sv_th) * 40'(signed'({1'b0, n_batch, 3'b000}));   // th * 8 * n_batch

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= G_IDLE;
      wr_frame    <= '0;
      rd_batch    <= '0;
      pending     <= '0;
      batch_cnt   <= '0;
      m           <= '0;
      g           <= '0;
      d           <= '0;
      gbase       <= '0;
      gidx        <= '0;
      ready       <= 1'b0;
      sv_accept   <= 1'b0;
      llr_sum     <= '0;
      gauss_evals <= '0;
      gauss_skips <= '0;
      for (int k = 0; k < 2; k++) for (int v = 0; v < int'(NV); v++) lp[k][v] <= '0;
    end else if (clear) begin
      st        <= G_IDLE;
      wr_frame  <= '0;
      rd_batch  <= '0;
      pending   <= '0;
      batch_cnt <= '0;
      llr_sum   <= '0;
      ready     <= 1'b0;
    end else begin
      ready <= 1'b0;
      if (enable && feat_valid) wr_frame <= wr_frame + 1'b1;
      // pending: +1 on a full batch, -1 when a batch finishes scoring
      if (batch_full && !(st == G_BATCH)) pending <= pending + 1'b1;
      else if (!batch_full && st == G_BATCH) pending <= pending - 1'b1;

      gbase <= gbase_n;
      gidx  <= gidx_n;
      d     <= d_n;

      unique case (st)
        G_IDLE: if (pending != 0) begin
          st <= G_PRIME;
          m  <= '0;
          g  <= '0;
        end
        G_PRIME: begin
          st          <= G_RUN;
          gauss_evals <= gauss_evals + 1'b1;
        end
        G_RUN: if (end_g) begin
          if (!last_d) gauss_skips <= gauss_skips + 1'b1;
          if (g == n_gauss - 1'b1) st <= G_MODEND;
          else begin
            g           <= g + 1'b1;
            gauss_evals <= gauss_evals + 1'b1;
          end
        end
        G_MODEND: st <= G_CAP;              // last accumulation lands
        G_CAP: begin
          for (int v = 0; v < int'(NV); v++) lp[m[0]][v] <= lsum[v];
          if (m + 1'b1 < n_mod) begin
            m  <= m + 1'b1;
            g  <= '0;
            st <= G_PRIME;
          end else begin
            st <= G_BATCH;
          end
        end
        G_BATCH: begin
          rd_batch <= rd_batch + 1'b1;
          if (batch_cnt + 1'b1 >= n_batch) begin
            sv_accept <= (llr_sum + batch_llr) > th_total;
            llr_sum   <= '0;
            batch_cnt <= '0;
            ready     <= 1'b1;
          end else begin
            llr_sum   <= llr_sum + batch_llr;
            batch_cnt <= batch_cnt + 1'b1;
          end
          st <= G_IDLE;
        end
        default: st <= G_IDLE;
      endcase
    end
  end

  assign busy = (st != G_IDLE);
endmodule
