// mel_filter: triangular mel filter bank with a three-field weight memory.
//
// Each DFT bin overlaps at most two neighbouring triangular filters, one with
// an even and one with an odd index. The weight memory therefore holds one
// row per bin: the highest filter index the bin contributes to, the weight
// for the even filter (weight 0) and the weight for the odd filter
// (weight 1). A bin with highest index h feeds filters h and h-1; the even
// one of the two gets weight 0, the odd one weight 1 (h = 0 feeds only
// filter 0). Row format {5b index, 12b, 12b} follows the design. Weights
// are unsigned with 11 fractional bits (this design's choice; the filters
// drawn peak at 2). Up to MAX_BANDS accumulators collect
// sum(|X_k| * weight); bands at or above n_mel are ignored.
// Timing: a bin presented with in_valid is accumulated two cycles later
// (one cycle of synchronous weight read). clear zeroes all bands.
module mel_filter #(
  parameter int unsigned MW        = 12,   // magnitude width
  parameter int unsigned BIN_AW    = 9,    // log2 of weight-memory rows (512 bins)
  parameter int unsigned MAX_BANDS = 32,
  parameter int unsigned AccW      = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  in_valid,
  input  logic [BIN_AW-1:0]     in_bin,
  input  logic [MW-1:0]         in_mag,
  input  logic [5:0]            n_mel,
  // weight memory write port: {hi_idx[4:0], w0[11:0], w1[11:0]}
  input  logic                  wr_en,
  input  logic [BIN_AW-1:0]     wr_addr,
  input  logic [28:0]           wr_data,
  // band read port (combinational)
  input  logic [4:0]            rd_band,
  output logic [AccW-1:0]       rd_acc
);
  logic [28:0]     wmem [1 << BIN_AW];
  logic [28:0]     row;
  logic [MW-1:0]   mag_d;
  logic            v_d;
  logic [AccW-1:0] acc [MAX_BANDS];

  always_ff @(posedge clk) begin
    if (wr_en) wmem[wr_addr] <= wr_data;
    row <= wmem[in_bin];
  end

  logic [4:0]  hi, even_b, odd_b;
  logic        has_second;
  logic [11:0] w0, w1;
  always_comb begin
    hi         = row[28:24];
    w0         = row[23:12];
    w1         = row[11:0];
    has_second = (hi != 5'd0);
    even_b     = hi[0] ? hi - 5'd1 : hi;
    odd_b      = hi[0] ? hi : hi - 5'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mag_d <= '0;
      v_d   <= 1'b0;
      for (int b = 0; b < int'(MAX_BANDS); b++) acc[b] <= '0;
    end else begin
      mag_d <= in_mag;
      v_d   <= in_valid;
      if (clear) begin
        for (int b = 0; b < int'(MAX_BANDS); b++) acc[b] <= '0;
      end else if (v_d) begin
        if ({1'b0, even_b} < n_mel && (even_b == hi || has_second))
          acc[even_b] <= acc[even_b] + AccW'(mag_d * w0);
        if ({1'b0, odd_b} < n_mel && (odd_b == hi || has_second))
          acc[odd_b]  <= acc[odd_b]  + AccW'(mag_d * w1);
      end
    end
  end

  assign rd_acc = acc[rd_band];
endmodule
