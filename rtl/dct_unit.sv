// dct_unit: DCT-II of the log mel energies, giving the cepstral coefficients.
//
// Computes X_k = s_k * sum_n l_n * cos(pi*k*(2n+1)/(2N)) for k < n_mfcc and
// a DCT size N = 2^logn (8, 16 or 32 mel bands), with s_0 = 1/sqrt(2) and
// s_k = 1 otherwise, as in the design's DCT correction step; the common
// 2/sqrt(2N) factor and the 8-bit output scaling are folded into the
// arithmetic right shift out_shift, then the result saturates to 8 bits.
// This design's departure: the document computes the DCT on the DFT engine
// (reshuffle, complex DFT, correction); here a single multiply-accumulate
// walks a 128-entry cosine table, N*n_mfcc cycles per frame, which gives the
// same transform with separate hardware. Reason: the DFT engine keeps 10-bit
// words halved at every stage, which would cost about two bits of MFCC
// precision on log energies of up to 640.
// Timing: start (one cycle) with l_in stable until done pulses.
module dct_unit #(
  parameter int unsigned MAXN = 32,   // largest DCT size
  parameter int unsigned LW   = 10    // log-mel input width (unsigned)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [2:0]           logn,        // 3..5
  input  logic [5:0]           n_mfcc,
  input  logic [3:0]           out_shift,
  input  logic [LW-1:0]        l_in [MAXN],
  output logic signed [7:0]    mfcc [MAXN],
  output logic                 busy,
  output logic                 done
);
  import vocell_pkg::sat8;

  localparam real PI = 3.14159265358979323846;
  typedef logic signed [11:0] ctab_t [128];

  // cos(pi*m/64), m = 0..127, 10 fractional bits.
  function automatic ctab_t make_cos();
    ctab_t t;
    for (int m = 0; m < 128; m++) begin
      real v;
      v = $cos(PI * real'(m) / 64.0);
      t[m] = 12'($rtoi(v * 1024.0 + (v >= 0.0 ? 0.5 : -0.5)));
    end
    return t;
  endfunction
  localparam ctab_t COS_TAB = make_cos();

  logic [5:0]         k, n;
  logic signed [31:0] acc;
  logic [6:0]         m;
  logic signed [11:0] c;
  logic [5:0]         nsize;

  always_comb begin
    nsize = 6'd1 << logn;
    // k*(2n+1) scaled to the 32-point table period, modulo 128
    m = 7'((32'(k) * (32'(n) * 2 + 1)) << (3'd5 - logn));
    c = COS_TAB[m];
  end

  logic signed [31:0] acc_next;
  logic signed [39:0] scaled;
  always_comb begin
    acc_next = acc + 32'(signed'({1'b0, l_in[n[4:0]]})) * 32'(c);
    // k = 0 carries the extra 1/sqrt(2) (181/256)
    scaled   = (k == 6'd0) ? (40'(acc_next) * 40'sd181) >>> 8 : 40'(acc_next);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k    <= '0;
      n    <= '0;
      acc  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      for (int i = 0; i < int'(MAXN); i++) mfcc[i] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          k    <= '0;
          n    <= '0;
          acc  <= '0;
          for (int i = 0; i < int'(MAXN); i++) mfcc[i] <= '0;
        end
      end else if (n == nsize - 1'b1) begin
        mfcc[k[4:0]] <= sat8(scaled >>> (5'(out_shift) + 5'd10));
        acc          <= '0;
        n            <= '0;
        if (k == n_mfcc - 1'b1 || k == 6'(MAXN - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end else begin
        acc <= acc_next;
        n   <= n + 1'b1;
      end
    end
  end
endmodule
