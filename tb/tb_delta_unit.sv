// tb_delta_unit: pushes 30 random MFCC frames; a reference keeps the frame
// history and computes, for the frame five behind the newest, the 9-tap
// first derivative [-1 -1 -1 -1 0 1 1 1 1], the 3-tap second derivative
// [-1 0 1] of the first derivative (both saturated to 8 bits) and the KWS
// (first 13) and SV (0..7 plus pairwise means of 8..31) selections.
module tb_delta_unit;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic signed [7:0] c_in [32];
  logic signed [7:0] kws_vec [39];
  logic signed [7:0] sv_vec [60];
  int checks = 0, failures = 0;

  delta_unit #(.NC(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fr [40][32];     // frames, index = time
  int dl [40][32];     // first derivative per time
  function automatic int s8(int v);
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction
  function automatic int getc(int t, int i);
    return (t < 0) ? 0 : fr[t][i];
  endfunction
  function automatic int getd(int t, int i);
    return (t < 0) ? 0 : dl[t][i];
  endfunction

  initial begin
    in_valid = 0;
    for (int i = 0; i < 32; i++) c_in[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < 32; i++) begin
        fr[t][i] = (t % 7 == 3) ? ((i % 2) ? 127 : -128) : $urandom_range(0, 200) - 100;
        c_in[i] = 8'(fr[t][i]);
      end
      // first derivative of frame t-4
      for (int i = 0; i < 32; i++) begin
        int s;
        s = 0;
        for (int j = 1; j <= 4; j++) s += getc(t - 4 + j, i) - getc(t - 4 - j, i);
        dl[t][i] = s8(s);   // stored by push time t (frame t-4)
      end
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
      while (!out_valid) @(negedge clk);
      // aligned frame t-5: static fr[t-5], delta dl[t-1], delta-delta dl[t]-dl[t-2]
      begin
        int cs [32], ds [32], dd [32];
        for (int i = 0; i < 32; i++) begin
          cs[i] = getc(t - 5, i); ds[i] = getd(t - 1, i); dd[i] = s8(getd(t, i) - getd(t - 2, i));
        end
        for (int i = 0; i < 13; i++) begin
          checks++;
          if (kws_vec[i] != 8'(cs[i]) || kws_vec[13+i] != 8'(ds[i]) || kws_vec[26+i] != 8'(dd[i])) begin
            failures++; $display("t=%0d kws %0d: %0d %0d %0d ref %0d %0d %0d", t, i, kws_vec[i], kws_vec[13+i], kws_vec[26+i], cs[i], ds[i], dd[i]);
          end
        end
        for (int i = 0; i < 20; i++) begin
          int a, b, c;
          if (i < 8) begin a = cs[i]; b = ds[i]; c = dd[i]; end
          else begin
            a = (cs[2*i-8] + cs[2*i-7]) >>> 1; b = (ds[2*i-8] + ds[2*i-7]) >>> 1;
            c = (dd[2*i-8] + dd[2*i-7]) >>> 1;
          end
          checks++;
          if (sv_vec[i] != 8'(a) || sv_vec[20+i] != 8'(b) || sv_vec[40+i] != 8'(c)) begin
            failures++; $display("t=%0d sv %0d: %0d/%0d %0d/%0d %0d/%0d", t, i, sv_vec[i], a, sv_vec[20+i], b, sv_vec[40+i], c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
