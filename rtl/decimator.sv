// decimator: reduces the 8x oversampled ADC stream to the audio rate.
//
// The front end's SAR converter oversamples by OSR; the digital back end
// decimates before feature extraction. The document gives only that the
// stream is decimated; the filter here is this design's simplest choice: a
// boxcar that sums OSR consecutive samples and divides by OSR (arithmetic
// right shift, OSR a power of two).
// Interface: adc_data/adc_valid in (signed, one sample per strobe);
// out_data/out_valid one cycle after every OSR-th input strobe.
module decimator #(
  parameter int unsigned W   = 10,  // ADC resolution
  parameter int unsigned OSR = 8    // oversampling ratio
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] adc_data,
  input  logic                adc_valid,
  output logic signed [W-1:0] out_data,
  output logic                out_valid
);
  localparam int unsigned CW = $clog2(OSR);
  localparam int unsigned AW = W + CW;

  logic [CW-1:0]        cnt;
  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] sum;

  assign sum = acc + AW'(adc_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      acc       <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (adc_valid) begin
        if (cnt == CW'(OSR - 1)) begin
          cnt       <= '0;
          acc       <= '0;
          out_data  <= W'(sum >>> CW);
          out_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
          acc <= sum;
        end
      end
    end
  end
endmodule
