// twiddle_rom: twiddle factors for the radix-2 DFT and the real-DFT split.
//
// Holds W_NMAX^k = exp(-j*2*pi*k/NMAX) for k = 0 .. NMAX/2-1, with NMAX the
// largest real DFT (1024 points). A complex DFT of size M uses
// W_M^e = W_NMAX^(e*NMAX/M), so one table serves every configured size and
// also the final correction step of the real DFT. The table is computed at
// elaboration from cos/sin and rounded to TW-bit signed values with TF
// fractional bits (word widths are this design's choice; the document only
// names a twiddle ROM). Read is combinational (a ROM).
module twiddle_rom #(
  parameter int unsigned NMAX = 1024,
  parameter int unsigned TW   = 12,
  parameter int unsigned TF   = 10
) (
  input  logic [$clog2(NMAX)-2:0] addr,
  output logic signed [TW-1:0]    w_re,
  output logic signed [TW-1:0]    w_im
);
  localparam int unsigned DEPTH = NMAX / 2;
  localparam real PI = 3.14159265358979323846;

  typedef logic signed [TW-1:0] tab_t [DEPTH];

  function automatic tab_t make_tab(input bit imag);
    tab_t t;
    for (int k = 0; k < int'(DEPTH); k++) begin
      real a, v;
      a = 2.0 * PI * real'(k) / real'(NMAX);
      v = imag ? -$sin(a) : $cos(a);
      t[k] = TW'($rtoi(v * real'(1 << TF) + (v >= 0.0 ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam tab_t RE_TAB = make_tab(1'b0);
  localparam tab_t IM_TAB = make_tab(1'b1);

  assign w_re = RE_TAB[addr];
  assign w_im = IM_TAB[addr];
endmodule
