// pwl_act: 8-segment piecewise-linear sigmoid / tanh generator.
//
// The LSTM non-linearities are approximated by eight linear segments whose
// corner values are stored in a table per function; at run time the output
// is interpolated linearly between the two corners around the input, as the
// design's nonlinear function generator does. This design's choices: the
// segments are uniform, one unit wide, over [-4, 4); inputs outside
// saturate to the end corners; values are Q2.5 (corner tables in
// vocell_pkg). Purely combinational.
module pwl_act
  import vocell_pkg::*;
(
  input  logic signed [15:0] x,        // Q.5
  input  logic               is_tanh,  // 0: sigmoid, 1: tanh
  output logic signed [7:0]  y         // Q2.5
);
  logic [3:0]         seg;
  logic [4:0]         frac;
  logic signed [7:0]  y0, y1;
  logic signed [15:0] xs;
  logic signed [15:0] interp;

  always_comb begin
    xs   = x + 16'sd128;                    // shift [-4,4) to [0,8)
    seg  = xs[8:5];
    frac = xs[4:0];
    y0   = is_tanh ? TANH_CORNERS[seg]        : SIGMOID_CORNERS[seg];
    y1   = is_tanh ? TANH_CORNERS[seg + 4'd1] : SIGMOID_CORNERS[seg + 4'd1];
    interp = 16'(y0) + (((16'(y1) - 16'(y0)) * 16'(signed'({1'b0, frac}))) >>> 5);
    if (x < -16'sd128)      y = is_tanh ? TANH_CORNERS[0] : SIGMOID_CORNERS[0];
    else if (x >= 16'sd128) y = is_tanh ? TANH_CORNERS[8] : SIGMOID_CORNERS[8];
    else                    y = interp[7:0];
  end
endmodule
