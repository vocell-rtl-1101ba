// log_lut: 1024-entry logarithm look-up table for dynamic range compression.
//
// The 10-bit mel filter output addresses the table directly, so no CORDIC
// or iterative logarithm is needed; table size and addressing follow the
// design. Contents (this design's choice of scale): entry a holds
// round(64 * log2(a)) for a >= 1 and 0 for a = 0, a 10-bit unsigned value
// with 6 fractional bits. Computed at elaboration; read is combinational.
module log_lut (
  input  logic [9:0] addr,
  output logic [9:0] log_out
);
  typedef logic [9:0] tab_t [1024];

  function automatic tab_t make_tab();
    tab_t t;
    t[0] = '0;
    for (int a = 1; a < 1024; a++)
      t[a] = 10'($rtoi(64.0 * $ln(real'(a)) / $ln(2.0) + 0.5));
    return t;
  endfunction

  localparam tab_t TAB = make_tab();

  assign log_out = TAB[addr];
endmodule
