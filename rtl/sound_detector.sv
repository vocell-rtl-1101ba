// sound_detector: energy-based sound detection with hangover.
//
// The frame energy is the sum of |x| over a window. Consecutive windows
// overlap by half, so the detector keeps the energy of each half window in
// one of three D registers: the register chosen by the window pointer
// accumulates the incoming |x|, the two others hold the last two complete
// halves. When a half window completes, the sum of it and the previous half
// (one full window) is compared with E_th. A window above threshold marks
// the frame as sound and reloads a hangover counter, which keeps the sound
// flag up for L_h further frames. This datapath (|x|, accumulate into a
// selected D, sum of two D's, compare) follows the design's detector.
// Choices of this design: the energy is taken over the newest complete
// window; the comparison is strict (E > E_th); a frame is one half window.
// Timing: frame_valid pulses one cycle after the last sample of a half
// window; sound is registered with it and holds between frames.
module sound_detector #(
  parameter int unsigned W        = 10,   // sample width
  parameter int unsigned HALF_MAX = 512   // largest half window, samples
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [W-1:0]  sample,
  input  logic                 sample_valid,
  input  logic [$clog2(HALF_MAX+1)-1:0] half_len,  // samples per half window
  input  logic [W+$clog2(HALF_MAX)+1:0]  e_th,     // threshold E_th
  input  logic [7:0]           hangover,           // L_h, frames
  output logic                 frame_valid,
  output logic                 frame_above,        // this window alone exceeded E_th
  output logic                 sound,              // detection incl. hangover
  output logic [W+$clog2(HALF_MAX)+1:0]  energy    // last window energy
);
  localparam int unsigned EW = W + $clog2(HALF_MAX) + 2;
  localparam int unsigned CW = $clog2(HALF_MAX + 1);

  logic [EW-1:0] d_reg [3];
  logic [1:0]    wsel;      // D register accumulating now
  logic [1:0]    wprev;     // D register holding the previous half
  logic [CW-1:0] cnt;
  logic [7:0]    hang_cnt;
  logic [W-1:0]  mag;
  logic [EW-1:0] d_new;
  logic [EW-1:0] e_win;

  assign mag   = sample[W-1] ? W'(-sample) : W'(sample);
  assign d_new = d_reg[wsel] + EW'(mag);
  assign wprev = (wsel == 2'd0) ? 2'd2 : wsel - 2'd1;
  assign e_win = d_new + d_reg[wprev];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) d_reg[i] <= '0;
      wsel        <= 2'd0;
      cnt         <= '0;
      hang_cnt    <= '0;
      frame_valid <= 1'b0;
      frame_above <= 1'b0;
      sound       <= 1'b0;
      energy      <= '0;
    end else begin
      frame_valid <= 1'b0;
      if (sample_valid) begin
        if (cnt == half_len - 1'b1) begin
          // Half window complete: evaluate one full window.
          logic [1:0] wnext;
          wnext         = (wsel == 2'd2) ? 2'd0 : wsel + 2'd1;
          d_reg[wsel]  <= d_new;
          d_reg[wnext] <= '0;
          wsel         <= wnext;
          cnt          <= '0;
          energy       <= e_win;
          frame_valid  <= 1'b1;
          frame_above  <= (e_win > e_th);
          if (e_win > e_th) begin
            hang_cnt <= hangover;
            sound    <= 1'b1;
          end else if (hang_cnt != 0) begin
            hang_cnt <= hang_cnt - 1'b1;
            sound    <= 1'b1;
          end else begin
            sound    <= 1'b0;
          end
        end else begin
          d_reg[wsel] <= d_new;
          cnt         <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
