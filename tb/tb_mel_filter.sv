// tb_mel_filter: programs 64 random weight rows (random highest index,
// weights), streams random magnitudes and compares every band accumulator
// with a reference that applies the even/odd weight rule; n_mel = 20 so
// bands 20..31 must stay zero. Repeated after a clear.
module tb_mel_filter;
  logic clk = 0, rst_n = 0;
  logic clear, in_valid, wr_en;
  logic [8:0] in_bin, wr_addr;
  logic [11:0] in_mag;
  logic [5:0] n_mel;
  logic [28:0] wr_data;
  logic [4:0] rd_band;
  logic [31:0] rd_acc;
  int checks = 0, failures = 0;

  mel_filter #(.MW(12), .BIN_AW(9), .MAX_BANDS(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hi [64], w0 [64], w1 [64];
  longint acc [32];
  initial begin
    clear = 0; in_valid = 0; wr_en = 0; in_bin = 0; wr_addr = 0; in_mag = 0; wr_data = 0;
    rd_band = 0; n_mel = 20;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int b = 0; b < 64; b++) begin
      hi[b] = $urandom_range(0, 31); w0[b] = $urandom_range(0, 4095); w1[b] = $urandom_range(0, 4095);
      @(negedge clk); wr_en = 1; wr_addr = 9'(b); wr_data = {5'(hi[b]), 12'(w0[b]), 12'(w1[b])};
    end
    @(negedge clk); wr_en = 0;
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int i = 0; i < 32; i++) acc[i] = 0;
      for (int b = 0; b < 64; b++) begin
        int mg, ev, od;
        mg = $urandom_range(0, 4095);
        @(negedge clk); in_valid = 1; in_bin = 9'(b); in_mag = 12'(mg);
        ev = (hi[b] % 2 == 0) ? hi[b] : hi[b] - 1;
        od = (hi[b] % 2 == 1) ? hi[b] : hi[b] - 1;
        if (ev >= 0 && ev < 20) acc[ev] += longint'(mg) * w0[b];
        if (od >= 0 && od < 20) acc[od] += longint'(mg) * w1[b];
      end
      @(negedge clk); in_valid = 0;
      repeat (3) @(negedge clk);
      for (int i = 0; i < 32; i++) begin
        rd_band = 5'(i); #1;
        checks++;
        if (rd_acc != 32'(acc[i])) begin
          failures++; $display("band %0d: %0d ref %0d", i, rd_acc, acc[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
