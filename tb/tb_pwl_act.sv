// tb_pwl_act: sweeps the input over [-8, 8) in Q.5 steps; the output must
// equal the linear interpolation between the stored corners at x = -4..4
// (within 1 LSB of floor rounding), saturate outside, stay monotonic, and
// stay within 0.12 of the exact sigmoid / tanh.
module tb_pwl_act;
  import vocell_pkg::*;
  logic signed [15:0] x;
  logic is_tanh;
  logic signed [7:0] y;
  int checks = 0, failures = 0;
  pwl_act dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int f = 0; f < 2; f++) begin
      int prev;
      prev = -1000;
      is_tanh = f[0];
      for (int xi = -256; xi < 256; xi++) begin
        real xr, ex, lin;
        x = 16'(xi); #1;
        xr = real'(xi) / 32.0;
        ex = f ? (($exp(xr) - $exp(-xr)) / ($exp(xr) + $exp(-xr))) : 1.0 / (1.0 + $exp(-xr));
        if (xi < -128) lin = f ? TANH_CORNERS[0] : SIGMOID_CORNERS[0];
        else if (xi >= 128) lin = f ? TANH_CORNERS[8] : SIGMOID_CORNERS[8];
        else begin
          int s; real fr, y0, y1;
          s = (xi + 128) / 32; fr = real'((xi + 128) % 32) / 32.0;
          y0 = f ? TANH_CORNERS[s] : SIGMOID_CORNERS[s];
          y1 = f ? TANH_CORNERS[s+1] : SIGMOID_CORNERS[s+1];
          lin = y0 + (y1 - y0) * fr;
        end
        checks++;
        if (real'(y) > lin + 0.01 || real'(y) < lin - 1.01 || int'(y) < prev ||
            real'(y) / 32.0 - ex > 0.12 || real'(y) / 32.0 - ex < -0.12) begin
          failures++; $display("tanh=%0d x=%0d y=%0d lin=%f exact=%f", f, xi, y, lin, ex);
        end
        prev = int'(y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
