// tb_decimator: random ADC words; every 8th strobe the output must equal the
// floor of the mean of the last 8 inputs, one cycle later, and no other
// output strobes may appear.
module tb_decimator;
  logic clk = 0, rst_n = 0;
  logic signed [9:0] adc_data, out_data;
  logic adc_valid, out_valid;
  int checks = 0, failures = 0;

  decimator #(.W(10), .OSR(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sum, cnt, expect_q [$];
  initial begin
    adc_valid = 0; adc_data = 0; sum = 0; cnt = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      adc_valid = ($urandom_range(0, 2) != 0);
      adc_data  = 10'($urandom);
      if (adc_valid) begin
        sum += int'(adc_data); cnt++;
        if (cnt == 8) begin
          expect_q.push_back(sum >>> 3);
          sum = 0; cnt = 0;
        end
      end
    end
    @(negedge clk); adc_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (expect_q.size() != 0) begin failures++; $display("missing outputs %0d", expect_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (expect_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      int e; e = expect_q.pop_front();
      if (int'(out_data) != e) begin failures++; $display("got %0d expected %0d", out_data, e); end
    end
  end
endmodule
