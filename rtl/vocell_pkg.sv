// vocell_pkg: types and constants shared by the wake-up SoC back end.
//
// Holds the master-FSM state encoding, the configuration-register record
// that the top decodes from its write bus, the target select of that bus,
// and the corner tables of the 8-segment piecewise-linear sigmoid and tanh.
// Number formats used throughout (all this design's choice, the text only
// fixes the 8-bit operand width of the neural network):
//   - audio samples: signed 10 bit, two's complement
//   - LSTM weights, activations, cell state: signed 8 bit Q2.5 (scale 32)
//   - GMM log-domain values: signed fixed point with 6 fractional bits
package vocell_pkg;

  // Master control FSM states (the four states drawn in the control diagram).
  typedef enum logic [1:0] {
    ST_IDLE   = 2'd0,
    ST_KWS    = 2'd1,
    ST_SV     = 2'd2,
    ST_KWS_SV = 2'd3
  } ctrl_state_t;

  // Target of the top-level configuration / memory write bus.
  typedef enum logic [2:0] {
    SEL_REG       = 3'd0,  // configuration register, addr = register index
    SEL_LSTM_MEM  = 3'd1,  // LSTM model memory, 64-bit words
    SEL_NLQ_LUT   = 3'd2,  // 16-entry 4b->8b weight decoding table
    SEL_MEL_MEM   = 3'd3,  // mel filter weight rows
    SEL_GMM_MODEL = 3'd4,  // GMM {mu, sigma'} pairs
    SEL_GMM_W     = 3'd5   // GMM per-Gaussian log weights
  } cfg_sel_t;

  // Configuration registers (one field per register index, see vocell_top).
  typedef struct packed {
    logic        act_kws;
    logic        act_sv;
    logic        act_kws_sv;
    logic [19:0] sd_eth;       // sound detection energy threshold E_th
    logic [7:0]  sd_hang;      // hangover length L_h in frames
    logic [3:0]  fft_logn;     // log2 of the complex DFT size M (real DFT N = 2M)
    logic [5:0]  n_mel;        // number of mel filters (<= 32)
    logic [4:0]  mel_shift;    // right shift from mel accumulator to 10-bit log address
    logic [5:0]  n_mfcc;       // number of DCT outputs computed (<= 32)
    logic [3:0]  dct_shift;    // right shift from DCT accumulator to 8-bit MFCC
    logic [5:0]  lstm_ndim;    // LSTM input dimension (<= 39)
    logic [6:0]  lstm_nneur;   // LSTM neurons (<= 64)
    logic [4:0]  lstm_nkw;     // FC outputs / keyword classes (<= 16)
    logic        lstm_nlq;     // weights stored as 4-bit codes
    logic        lstm_two;     // second LSTM layer
    logic        lstm_fc2;     // hidden FC layer before the class layer
    logic [6:0]  lstm_nhid;    // hidden FC outputs (<= 64)
    logic [9:0]  gmm_ngauss;   // Gaussians per model
    logic [5:0]  gmm_ndim;     // feature dimensions used (<= 60)
    logic [1:0]  gmm_nmod;     // 1: speaker model only, 2: speaker + UBM
    logic [2:0]  gmm_nbatch;   // batches of 8 frames per decision (<= 4)
    logic [15:0] gmm_dist_th;  // Dist_th, unsigned, 6 fractional bits
    logic signed [23:0] gmm_sv_th; // decision threshold th, 6 fractional bits
  } cfg_t;

  // Piecewise-linear activation corners at x = -4,-3,...,+4, Q2.5.
  localparam logic signed [7:0] SIGMOID_CORNERS [9] =
    '{8'sd1, 8'sd2, 8'sd4, 8'sd9, 8'sd16, 8'sd23, 8'sd28, 8'sd30, 8'sd31};
  localparam logic signed [7:0] TANH_CORNERS [9] =
    '{-8'sd32, -8'sd32, -8'sd31, -8'sd24, 8'sd0, 8'sd24, 8'sd31, 8'sd32, 8'sd32};

  // Saturate a wide signed value to signed 8 bit.
  function automatic logic signed [7:0] sat8(input logic signed [39:0] v);
    if (v > 40'sd127) return 8'sd127;
    if (v < -40'sd128) return -8'sd128;
    return v[7:0];
  endfunction

endpackage
