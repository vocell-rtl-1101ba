// audio_buffers: three half-window audio buffers between ADC and DFT.
//
// Consecutive analysis windows overlap by half. Three buffers, each one half
// window long (up to HALF_MAX samples), are written round-robin: while one
// fills with new samples, the other two hold the current window and can be
// read by the DFT. When a buffer becomes full, win_ready pulses and the
// window (older buffer first, then the newer one) is frozen for the next
// half-window period. Three buffers, their size and the rotating window
// select follow the design's feature extraction block; the two read ports
// (even and odd sample of the window in the same cycle) feed the packed
// real-DFT input.
// Timing: reads are synchronous, data one cycle after the address.
module audio_buffers #(
  parameter int unsigned W        = 10,
  parameter int unsigned HALF_MAX = 512
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic signed [W-1:0]           sample,
  input  logic                          sample_valid,
  input  logic [$clog2(HALF_MAX+1)-1:0] half_len,
  output logic                          win_ready,
  // window read ports, index 0 .. 2*half_len-1
  input  logic [$clog2(HALF_MAX):0]     rd_idx_a,
  input  logic [$clog2(HALF_MAX):0]     rd_idx_b,
  output logic signed [W-1:0]           rd_data_a,
  output logic signed [W-1:0]           rd_data_b
);
  localparam int unsigned AW = $clog2(HALF_MAX);
  localparam int unsigned CW = $clog2(HALF_MAX + 1);

  logic signed [W-1:0] buf0 [HALF_MAX];
  logic signed [W-1:0] buf1 [HALF_MAX];
  logic signed [W-1:0] buf2 [HALF_MAX];

  logic [1:0]    wsel;        // buffer being filled
  logic [1:0]    first_q;     // older half of the frozen window
  logic [1:0]    second_q;    // newer half of the frozen window
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel      <= 2'd0;
      first_q   <= 2'd1;
      second_q  <= 2'd2;
      cnt       <= '0;
      win_ready <= 1'b0;
    end else begin
      win_ready <= 1'b0;
      if (sample_valid) begin
        if (cnt == half_len - 1'b1) begin
          cnt       <= '0;
          second_q  <= wsel;
          first_q   <= second_q;
          wsel      <= (wsel == 2'd2) ? 2'd0 : wsel + 2'd1;
          win_ready <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // Sample writes (memory arrays, no reset).
  always_ff @(posedge clk) begin
    if (sample_valid) begin
      unique case (wsel)
        2'd0:    buf0[cnt[AW-1:0]] <= sample;
        2'd1:    buf1[cnt[AW-1:0]] <= sample;
        default: buf2[cnt[AW-1:0]] <= sample;
      endcase
    end
  end

  function automatic logic [1:0] pick(input logic [AW:0] idx, input logic [CW-1:0] hl,
                                      input logic [1:0] f, input logic [1:0] s);
    return ({1'b0, idx} < {1'b0, hl}) ? f : s;
  endfunction

  logic [1:0]    bsel_a, bsel_b;
  logic [AW:0]   off_a, off_b;
  assign bsel_a = pick(rd_idx_a, half_len, first_q, second_q);
  assign bsel_b = pick(rd_idx_b, half_len, first_q, second_q);
  assign off_a  = ({1'b0, rd_idx_a} < {1'b0, half_len}) ? rd_idx_a : rd_idx_a - (AW+1)'(half_len);
  assign off_b  = ({1'b0, rd_idx_b} < {1'b0, half_len}) ? rd_idx_b : rd_idx_b - (AW+1)'(half_len);

  always_ff @(posedge clk) begin
    unique case (bsel_a)
      2'd0:    rd_data_a <= buf0[off_a[AW-1:0]];
      2'd1:    rd_data_a <= buf1[off_a[AW-1:0]];
      default: rd_data_a <= buf2[off_a[AW-1:0]];
    endcase
    unique case (bsel_b)
      2'd0:    rd_data_b <= buf0[off_b[AW-1:0]];
      2'd1:    rd_data_b <= buf1[off_b[AW-1:0]];
      default: rd_data_b <= buf2[off_b[AW-1:0]];
    endcase
  end
endmodule
