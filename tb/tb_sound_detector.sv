// tb_sound_detector: bursts of loud and quiet audio with a 16-sample half
// window. A reference computes each window energy (sum |x| over the last two
// half windows), the threshold decision and the hangover; the detector's
// energy, frame flag and sound flag must match at every frame. Also checks
// that hangover frames (sound with energy below threshold) occur.
module tb_sound_detector;
  logic clk = 0, rst_n = 0;
  logic signed [9:0] sample;
  logic sample_valid;
  logic frame_valid, frame_above, sound;
  logic [20:0] energy;
  localparam int HL = 16, HANG = 3, ETH = 2000;
  int checks = 0, failures = 0, hang_frames = 0, above_frames = 0;

  sound_detector #(.W(10), .HALF_MAX(512)) dut (
    .clk, .rst_n, .sample, .sample_valid, .half_len(10'(HL)), .e_th(21'(ETH)),
    .hangover(8'(HANG)), .frame_valid, .frame_above, .sound, .energy);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int halves [$];
  int cur, cnt, hang;
  int exp_e [$]; int exp_s [$];
  initial begin
    sample = 0; sample_valid = 0; cur = 0; cnt = 0; hang = 0;
    halves.push_back(0);
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200 * HL; n++) begin
      int amp;
      amp = ((n / (HL * 10)) % 3 == 1) ? 300 : 20;
      @(negedge clk);
      sample_valid = 1;
      sample = 10'($urandom_range(0, 2 * amp) - amp);
      cur += (sample < 0) ? -int'(sample) : int'(sample);
      cnt++;
      if (cnt == HL) begin
        int e;
        e = cur + halves[$];
        halves.push_back(cur);
        cur = 0; cnt = 0;
        exp_e.push_back(e);
        if (e > ETH) begin hang = HANG; exp_s.push_back(1); end
        else if (hang > 0) begin hang--; exp_s.push_back(1); end
        else exp_s.push_back(0);
      end
      @(negedge clk); sample_valid = 0;
    end
    repeat (4) @(posedge clk);
    checks++;
    if (exp_e.size() != 0) begin failures++; $display("frames missing"); end
    checks++;
    if (hang_frames == 0 || above_frames == 0) begin failures++; $display("no hangover / no sound"); end
    $display("frames above threshold %0d, hangover frames %0d", above_frames, hang_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && frame_valid) begin
    int e, s;
    e = exp_e.pop_front(); s = exp_s.pop_front();
    checks++;
    if (int'(energy) != e || sound != s[0] || frame_above != (e > ETH)) begin
      failures++;
      $display("frame: energy %0d/%0d sound %0d/%0d", energy, e, sound, s);
    end
    if (e > ETH) above_frames++;
    else if (s != 0) hang_frames++;
  end
endmodule
