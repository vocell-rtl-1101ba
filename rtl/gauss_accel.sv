// gauss_accel: log2-probability of one Gaussian for one feature vector.
//
// Evaluates, one dimension per step,
//   log2 P(f | g) = w'_g - sum_d ((f_d - mu_{g,d}) * sigma'_{g,d})^2
// with sigma' = 1/(sqrt(2 ln 2) sigma) and w'_g the precomputed log weight,
// the base-2, log-domain form of the Gaussian used by the design. At the
// first dimension the accumulator is loaded with w'_g (the start mux of the
// design's Gaussian accelerator). In every step the normalized distance
// |(f_d - mu) * sigma'| is compared with Dist_th; once it is exceeded the
// Gaussian is discarded for this vector and the unit stops updating
// (alive = 0) until the next first step.
// Number formats (this design's choice): f and mu signed 8 bit, sigma'
// unsigned 8 bit with 6 fractional bits, Dist_th, w' and the result with
// 6 fractional bits. The updated accumulator and alive flag are also given
// combinationally (acc_next, alive_next) so the controller can skip a
// Gaussian in the same cycle.
module gauss_accel (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               step,       // one dimension presented
  input  logic               first,      // dimension 0 of a Gaussian
  input  logic signed [7:0]  f,
  input  logic signed [7:0]  mu,
  input  logic [7:0]         sigma_p,
  input  logic signed [15:0] w_p,
  input  logic [15:0]        dist_th,
  output logic signed [31:0] acc_next,
  output logic               alive_next,
  output logic signed [31:0] acc,
  output logic               alive
);
  logic signed [8:0]  diff;
  logic signed [17:0] ndist;
  logic [17:0]        adist;
  logic signed [35:0] sq;
  logic               live_in;
  logic signed [31:0] base;

  always_comb begin
    diff    = 9'(f) - 9'(mu);
    ndist    = 18'(diff) * 18'(signed'({1'b0, sigma_p}));   // 6 fractional bits
    adist   = ndist[17] ? 18'(-ndist) : 18'(ndist);
    sq      = 36'(ndist) * 36'(ndist);                        // 12 fractional bits
    live_in = first ? 1'b1 : alive;
    base    = first ? 32'(w_p) : acc;
    if (step && live_in) begin
      alive_next = (adist <= 18'(dist_th));
      acc_next   = alive_next ? base - 32'(sq >>> 6) : base;
    end else begin
      alive_next = step ? 1'b0 : alive;
      acc_next   = acc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      alive <= 1'b0;
    end else if (step) begin
      acc   <= acc_next;
      alive <= alive_next;
    end
  end
endmodule
