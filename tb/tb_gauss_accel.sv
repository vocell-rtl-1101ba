// tb_gauss_accel: random Gaussians over 20 dimensions; a reference computes
// w' - sum(((f-mu)*sigma')^2 >> 6) and aborts at the first dimension whose
// |(f-mu)*sigma'| exceeds Dist_th. Checks the final value and alive flag,
// and that both kept and discarded Gaussians occur.
module tb_gauss_accel;
  logic clk = 0, rst_n = 0;
  logic step, first, alive_next, alive;
  logic signed [7:0] f, mu;
  logic [7:0] sigma_p;
  logic signed [15:0] w_p;
  logic [15:0] dist_th;
  logic signed [31:0] acc_next, acc;
  int checks = 0, failures = 0, kept = 0, dropped = 0;

  gauss_accel dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step = 0; first = 0; f = 0; mu = 0; sigma_p = 0; w_p = 0; dist_th = 272;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      longint r; bit al;
      r = 0; al = 1;
      for (int d = 0; d < 20; d++) begin
        int df, ds;
        @(negedge clk);
        step = 1; first = (d == 0);
        f = 8'($urandom_range(0, 255)); mu = f + 8'($urandom_range(0, 2 * (n % 9) + 2) - (n % 9) - 1);
        sigma_p = 8'($urandom_range(16, 80)); w_p = 16'($urandom_range(0, 4000) - 2000);
        if (d == 0) r = w_p;
        df = int'(f) - int'(mu); ds = df * int'(sigma_p);
        if (al) begin
          if ((ds < 0 ? -ds : ds) > int'(dist_th)) al = 0;
          else r -= (longint'(ds) * ds) >>> 6;
        end
      end
      @(negedge clk); step = 0;
      checks++;
      if (alive != al || (al && longint'(acc) != r)) begin
        failures++; $display("n=%0d alive %0d/%0d acc %0d ref %0d", n, alive, al, acc, r);
      end
      if (al) kept++; else dropped++;
    end
    checks++;
    if (kept == 0 || dropped == 0) begin failures++; $display("kept %0d dropped %0d", kept, dropped); end
    $display("kept %0d dropped %0d", kept, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
