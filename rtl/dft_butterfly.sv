// dft_butterfly: one radix-2 decimation-in-frequency butterfly.
//
// Takes the pair X(a), X(b) of one DFT stage and the stage twiddle W and
// produces the two results of the next stage:
//   y_a = (x_a + x_b) / 2
//   y_b = (x_a - x_b) * W / 2
// which is the butterfly drawn for the design's DFT/DCT stage (sum on the
// upper branch, difference times W_N^(k*2^(i-1)) on the lower one). The
// halving in every stage keeps the result inside DW bits over up to nine
// stages; that scaling, the truncating rounding and the word widths are this
// design's choices. Purely combinational.
module dft_butterfly #(
  parameter int unsigned DW = 10,   // real/imag data width
  parameter int unsigned TW = 12,   // twiddle width
  parameter int unsigned TF = 10    // twiddle fractional bits
) (
  input  logic signed [DW-1:0] a_re, a_im,
  input  logic signed [DW-1:0] b_re, b_im,
  input  logic signed [TW-1:0] w_re, w_im,
  output logic signed [DW-1:0] ya_re, ya_im,
  output logic signed [DW-1:0] yb_re, yb_im
);
  localparam int unsigned PW = DW + 1 + TW + 1;

  logic signed [DW:0]   s_re, s_im, d_re, d_im;
  logic signed [PW-1:0] p_re, p_im;

  always_comb begin
    s_re = (DW+1)'(a_re) + (DW+1)'(b_re);
    s_im = (DW+1)'(a_im) + (DW+1)'(b_im);
    d_re = (DW+1)'(a_re) - (DW+1)'(b_re);
    d_im = (DW+1)'(a_im) - (DW+1)'(b_im);
    p_re = PW'(d_re) * PW'(w_re) - PW'(d_im) * PW'(w_im);
    p_im = PW'(d_re) * PW'(w_im) + PW'(d_im) * PW'(w_re);
    ya_re = DW'(s_re >>> 1);
    ya_im = DW'(s_im >>> 1);
    yb_re = DW'(p_re >>> (TF + 1));
    yb_im = DW'(p_im >>> (TF + 1));
  end
endmodule
