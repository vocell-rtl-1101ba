// tb_dft_butterfly: random operands and twiddles; outputs compared with
// floor((a+b)/2) and floor(((a-b)*W)/2^11) computed in plain integers.
module tb_dft_butterfly;
  logic signed [9:0] a_re, a_im, b_re, b_im, ya_re, ya_im, yb_re, yb_im;
  logic signed [11:0] w_re, w_im;
  int checks = 0, failures = 0;
  dft_butterfly #(.DW(10), .TW(12), .TF(10)) dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int fl(longint v, int sh);  // floor division by 2^sh
    return int'(v >>> sh);
  endfunction
  initial begin
    for (int n = 0; n < 5000; n++) begin
      longint dr, di, pr, pi;
      a_re = 10'($urandom); a_im = 10'($urandom); b_re = 10'($urandom); b_im = 10'($urandom);
      w_re = 12'($urandom_range(0, 2048) - 1024); w_im = 12'($urandom_range(0, 2048) - 1024);
      #1;
      dr = longint'(a_re) - b_re; di = longint'(a_im) - b_im;
      pr = dr * w_re - di * w_im; pi = dr * w_im + di * w_re;
      checks++;
      // outputs are DW bits wide: compare modulo 2^10 (wrap-around on overflow)
      if (ya_re != 10'(fl(longint'(a_re) + b_re, 1)) || ya_im != 10'(fl(longint'(a_im) + b_im, 1)) ||
          yb_re != 10'(fl(pr, 11)) || yb_im != 10'(fl(pi, 11))) begin
        failures++;
        if (failures < 5) $display("n=%0d ya %0d %0d yb %0d %0d", n, ya_re, ya_im, yb_re, yb_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
