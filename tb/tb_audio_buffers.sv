// tb_audio_buffers: writes a counting-plus-random sample stream with a
// 32-sample half window; after each win_ready the full 64-sample window is
// read back through both ports and compared with the last 64 samples written.
module tb_audio_buffers;
  logic clk = 0, rst_n = 0;
  logic signed [9:0] sample, rd_data_a, rd_data_b;
  logic sample_valid, win_ready;
  logic [9:0] rd_idx_a, rd_idx_b;
  localparam int HL = 32;
  int checks = 0, failures = 0, windows = 0;

  audio_buffers #(.W(10), .HALF_MAX(512)) dut (
    .clk, .rst_n, .sample, .sample_valid, .half_len(10'(HL)), .win_ready,
    .rd_idx_a, .rd_idx_b, .rd_data_a, .rd_data_b);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [$];
  initial begin
    sample = 0; sample_valid = 0; rd_idx_a = 0; rd_idx_b = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 12 * HL; n++) begin
      @(negedge clk);
      sample = 10'($urandom); sample_valid = 1;
      hist.push_back(int'(sample));
      @(posedge clk); #1; sample_valid = 0;
      if (win_ready && hist.size() >= 2 * HL) begin
        windows++;
        for (int i = 0; i < 2 * HL; i += 2) begin
          @(negedge clk); rd_idx_a = 10'(i); rd_idx_b = 10'(i + 1);
          @(posedge clk); #1;
          checks += 2;
          if (int'(rd_data_a) != hist[hist.size() - 2*HL + i] ||
              int'(rd_data_b) != hist[hist.size() - 2*HL + i + 1]) begin
            failures++;
            $display("window %0d idx %0d: %0d %0d", windows, i, rd_data_a, rd_data_b);
          end
        end
      end
    end
    checks++; if (windows < 8) begin failures++; $display("too few windows %0d", windows); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
