// tb_twiddle_rom: every entry must be within one LSB of
// round(1024*cos(2*pi*k/1024)) and round(-1024*sin(2*pi*k/1024)).
module tb_twiddle_rom;
  logic [8:0] addr;
  logic signed [11:0] w_re, w_im;
  int checks = 0, failures = 0;
  twiddle_rom #(.NMAX(1024), .TW(12), .TF(10)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 512; k++) begin
      real a, er, ei;
      addr = 9'(k); #1;
      a  = 2.0 * 3.141592653589793 * k / 1024.0;
      er = 1024.0 * $cos(a) - real'(w_re);
      ei = -1024.0 * $sin(a) - real'(w_im);
      checks++;
      if (er > 1.0 || er < -1.0 || ei > 1.0 || ei < -1.0) begin
        failures++; $display("k=%0d re %0d im %0d", k, w_re, w_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
