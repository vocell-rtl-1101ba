// gauss_accum: floating-point sum of Gaussian probabilities, log2 output.
//
// The probability of a feature vector under a GMM is the sum over its
// Gaussians of 2^(log2 P_g). Each finished Gaussian's log2 probability is
// used as the exponent of a floating-point number with mantissa 1, which is
// added to the running floating-point sum (the design's Gauss accumulation
// unit). Here the exponent is the integer part (floor) of the fixed-point
// log probability, the sum keeps a 16-bit normalized mantissa (1.15) and a
// signed exponent, and the result is returned again in log2 form:
// exponent + (mantissa - 1) as a linear approximation of log2(mantissa),
// with 6 fractional bits. An empty sum returns the most negative value.
// These formats and the log approximation are this design's choices.
// Timing: add takes one cycle; clear empties the sum.
module gauss_accum (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               add,
  input  logic signed [31:0] log_p,     // 6 fractional bits
  output logic signed [31:0] log_sum,   // 6 fractional bits
  output logic               empty
);
  logic [15:0]        mant;   // 1.15, bit 15 set when not empty
  logic signed [25:0] expo;

  logic signed [25:0] e_in;
  logic [16:0]        sum;
  logic [25:0]        dsh;
  logic [15:0]        m_add, m_old;
  logic signed [25:0] e_res;
  always_comb begin
    e_in  = 26'(log_p >>> 6);
    dsh   = '0;
    m_old = '0;
    m_add = '0;
    if (empty) begin
      sum   = 17'h08000;
      e_res = e_in;
    end else if (e_in > expo) begin
      dsh   = 26'(e_in - expo);
      m_old = (dsh > 26'd15) ? 16'd0 : mant >> dsh;
      sum   = 17'(m_old) + 17'h08000;
      e_res = e_in;
    end else begin
      dsh   = 26'(expo - e_in);
      m_add = (dsh > 26'd15) ? 16'd0 : 16'h8000 >> dsh;
      sum   = 17'(mant) + 17'(m_add);
      e_res = expo;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mant  <= '0;
      expo  <= '0;
      empty <= 1'b1;
    end else if (clear) begin
      mant  <= '0;
      expo  <= '0;
      empty <= 1'b1;
    end else if (add) begin
      empty <= 1'b0;
      if (sum[16]) begin
        mant <= sum[16:1];
        expo <= e_res + 26'sd1;
      end else begin
        mant <= sum[15:0];
        expo <= e_res;
      end
    end
  end

  assign log_sum = empty ? 32'sh8000_0000
                         : (32'(expo) <<< 6) + 32'({1'b0, mant[14:9]});
endmodule
