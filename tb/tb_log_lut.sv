// tb_log_lut: every address a >= 1 must give 64*log2(a) rounded to the
// nearest integer (error at most half an LSB), address 0 must give 0,
// and the table must be monotonic.
module tb_log_lut;
  logic [9:0] addr, log_out;
  int checks = 0, failures = 0;
  log_lut dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int prev = 0;
    addr = 0; #1;
    checks++; if (log_out != 0) failures++;
    for (int a = 1; a < 1024; a++) begin
      real r;
      addr = 10'(a); #1;
      r = 64.0 * $ln(real'(a)) / $ln(2.0) - real'(log_out);
      checks++;
      if (r > 0.5001 || r < -0.5001 || int'(log_out) < prev) begin
        failures++; $display("a=%0d log %0d", a, log_out);
      end
      prev = int'(log_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
