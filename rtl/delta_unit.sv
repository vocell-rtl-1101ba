// delta_unit: time derivatives of the MFCCs and the KWS / SV feature vectors.
//
// Keeps the last nine MFCC vectors and the last three first-order
// derivatives. The first derivative uses the 9-tap response
// [-1 -1 -1 -1 0 1 1 1 1] (oldest frame first), the second derivative the
// 3-tap response [-1 0 1] applied to the first derivative, both as given in
// the design. Outputs are aligned to one frame, five frames behind the
// newest input: the static MFCCs, their delta and their delta-delta.
// Two vectors are built from them as the design specifies: KWS uses
// MFCC 0..12 (39 values), SV uses MFCC 0..7 plus the twelve pairwise means
// of MFCC 8..31 (20 values, 60 with derivatives). Derivatives saturate to
// 8 bits (this design's choice). History starts at zero after reset.
// Timing: out_valid pulses two cycles after in_valid.
module delta_unit #(
  parameter int unsigned NC = 32    // MFCCs per frame
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic signed [7:0] c_in [NC],
  output logic              out_valid,
  output logic signed [7:0] kws_vec [39],
  output logic signed [7:0] sv_vec [60]
);
  import vocell_pkg::sat8;

  logic signed [7:0] ch [9][NC];   // ch[0] newest
  logic signed [7:0] dh [3][NC];   // dh[0] newest
  logic              v1, v2;

  // Static, delta and delta-delta of the aligned frame.
  logic signed [7:0] cs [NC], ds [NC], dds [NC];
  always_comb begin
    for (int i = 0; i < int'(NC); i++) begin
      cs[i]  = ch[5][i];
      ds[i]  = dh[1][i];
      dds[i] = sat8(40'(dh[0][i]) - 40'(dh[2][i]));
    end
  end

  function automatic logic signed [7:0] pair_mean(input logic signed [7:0] a,
                                                   input logic signed [7:0] b);
    logic signed [8:0] s;
    s = 9'(a) + 9'(b);
    return 8'(s >>> 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < 9; f++) for (int i = 0; i < int'(NC); i++) ch[f][i] <= '0;
      for (int f = 0; f < 3; f++) for (int i = 0; i < int'(NC); i++) dh[f][i] <= '0;
      for (int i = 0; i < 39; i++) kws_vec[i] <= '0;
      for (int i = 0; i < 60; i++) sv_vec[i] <= '0;
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      out_valid <= v2;
      if (in_valid) begin
        for (int f = 8; f > 0; f--) ch[f] <= ch[f-1];
        ch[0] <= c_in;
      end
      if (v1) begin
        for (int f = 2; f > 0; f--) dh[f] <= dh[f-1];
        for (int i = 0; i < int'(NC); i++)
          dh[0][i] <= sat8(40'(ch[0][i]) + 40'(ch[1][i]) + 40'(ch[2][i]) + 40'(ch[3][i])
                         - 40'(ch[5][i]) - 40'(ch[6][i]) - 40'(ch[7][i]) - 40'(ch[8][i]));
      end
      if (v2) begin
        for (int i = 0; i < 13; i++) begin
          kws_vec[i]      <= cs[i];
          kws_vec[13 + i] <= ds[i];
          kws_vec[26 + i] <= dds[i];
        end
        for (int i = 0; i < 8; i++) begin
          sv_vec[i]      <= cs[i];
          sv_vec[20 + i] <= ds[i];
          sv_vec[40 + i] <= dds[i];
        end
        for (int j = 0; j < 12; j++) begin
          sv_vec[8 + j]  <= pair_mean(cs[8 + 2*j],  cs[9 + 2*j]);
          sv_vec[28 + j] <= pair_mean(ds[8 + 2*j],  ds[9 + 2*j]);
          sv_vec[48 + j] <= pair_mean(dds[8 + 2*j], dds[9 + 2*j]);
        end
      end
    end
  end
endmodule
