// dft_engine: in-place radix-2 complex DFT on two ping-pong compute memories.
//
// An M-point complex DFT (M = 2^logm, up to 2^LOGM_MAX) is computed with a
// single butterfly in log2(M) stages of M/2 butterflies. Stage i reads the
// pair at k + 2*alpha*M/2^i and k + (2*alpha+1)*M/2^i from one dual-port
// compute memory, applies the butterfly with twiddle W_M^(k*2^(i-1)), and
// writes the results to the same addresses of the other memory; the next
// stage reads them back from there. The input is loaded into memory 0; the
// result sits in memory logm[0] in bit-reversed order, and the read ports
// take natural-order bin numbers. The single butterfly, the two dual-port
// compute memories, the twiddle ROM and the stage formula follow the design.
// This design's own choice: memories alternate per stage (the design
// alternates them cycle by cycle), and one idle cycle per stage drains the
// read-to-write pipeline, so a DFT takes logm*(M/2+1) cycles.
// Timing: start (one cycle) -> busy; done pulses when the result is ready.
// Reads: synchronous, data one cycle after the address.
module dft_engine #(
  parameter int unsigned DW       = 10,   // real/imag width in the compute memories
  parameter int unsigned LOGM_MAX = 9,    // largest complex DFT: 512 points
  parameter int unsigned TW       = 12,
  parameter int unsigned TF       = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [3:0]             logm,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  // load port (memory 0)
  input  logic                   ld_we,
  input  logic [LOGM_MAX-1:0]    ld_addr,
  input  logic signed [DW-1:0]   ld_re, ld_im,
  // result read ports, natural bin order
  input  logic [LOGM_MAX-1:0]    rd_bin_a, rd_bin_b,
  output logic signed [DW-1:0]   rd_a_re, rd_a_im, rd_b_re, rd_b_im
);
  localparam int unsigned MMAX = 1 << LOGM_MAX;
  localparam int unsigned NMAX = 2 * MMAX;         // twiddle table for real DFTs
  localparam int unsigned AW   = LOGM_MAX;

  logic [2*DW-1:0] mem0 [MMAX];
  logic [2*DW-1:0] mem1 [MMAX];

  typedef enum logic [1:0] {E_IDLE, E_RUN, E_DRAIN} estate_t;
  estate_t     st;
  logic [3:0]  stage;        // 1 .. logm
  logic [AW-1:0] cnt;        // butterfly within stage
  logic [AW-1:0] half_m;     // M/2

  // Pipeline register: the butterfly issued last cycle.
  logic          p_valid;
  logic [AW-1:0] p_addr_a, p_addr_b;
  logic          p_dst1;     // destination is memory 1
  logic [AW-1:0] p_tw;

  logic [2*DW-1:0] rdat_a, rdat_b;

  // Address generation for the current issue.
  logic [3:0]    sh;
  logic [AW-1:0] span, kk, addr_a, addr_b;
  logic [AW-1:0] tw_idx;
  logic          src1;
  always_comb begin
    sh     = logm - stage;
    span   = AW'(1) << sh;
    kk     = cnt & (span - 1'b1);
    addr_a = ((cnt >> sh) << (sh + 1'b1)) | kk;
    addr_b = addr_a | span;
    tw_idx = AW'((kk << (stage - 1'b1)) << (4'(LOGM_MAX) + 4'd1 - logm));
    src1   = ~stage[0];      // odd stages read memory 0
  end

  // Twiddle and butterfly on the pipeline stage.
  logic signed [TW-1:0] w_re, w_im;
  logic signed [DW-1:0] ya_re, ya_im, yb_re, yb_im;

  twiddle_rom #(.NMAX(NMAX), .TW(TW), .TF(TF)) u_tw (
    .addr(p_tw), .w_re(w_re), .w_im(w_im));

  dft_butterfly #(.DW(DW), .TW(TW), .TF(TF)) u_bf (
    .a_re(rdat_a[2*DW-1:DW]), .a_im(rdat_a[DW-1:0]),
    .b_re(rdat_b[2*DW-1:DW]), .b_im(rdat_b[DW-1:0]),
    .w_re(w_re), .w_im(w_im),
    .ya_re(ya_re), .ya_im(ya_im), .yb_re(yb_re), .yb_im(yb_im));

  // Control.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= E_IDLE;
      stage    <= 4'd1;
      cnt      <= '0;
      half_m   <= '0;
      done     <= 1'b0;
      p_valid  <= 1'b0;
      p_addr_a <= '0;
      p_addr_b <= '0;
      p_dst1   <= 1'b0;
      p_tw     <= '0;
    end else begin
      done    <= 1'b0;
      p_valid <= 1'b0;
      unique case (st)
        E_IDLE: if (start) begin
          st     <= E_RUN;
          stage  <= 4'd1;
          cnt    <= '0;
          half_m <= AW'((1 << logm) >> 1);
        end
        E_RUN: begin
          p_valid  <= 1'b1;
          p_addr_a <= addr_a;
          p_addr_b <= addr_b;
          p_dst1   <= ~src1;
          p_tw     <= tw_idx;
          if (cnt == half_m - 1'b1) begin
            cnt <= '0;
            st  <= E_DRAIN;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        E_DRAIN: begin
          if (stage == logm) begin
            st   <= E_IDLE;
            done <= 1'b1;
          end else begin
            stage <= stage + 1'b1;
            st    <= E_RUN;
          end
        end
        default: st <= E_IDLE;
      endcase
    end
  end

  assign busy = (st != E_IDLE);

  // Bit reversal of a natural bin number over logm bits.
  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] v, input logic [3:0] n);
    logic [AW-1:0] r;
    r = '0;
    for (int i = 0; i < int'(AW); i++)
      if (i < int'(n)) r[int'(n) - 1 - i] = v[i];
    return r;
  endfunction

  // Memory ports. Reads: stage source while running, result memory otherwise.
  logic [AW-1:0] ra, rb;
  logic          rsel1;
  always_comb begin
    if (st == E_RUN) begin
      ra = addr_a;  rb = addr_b;  rsel1 = src1;
    end else begin
      ra = bitrev(rd_bin_a, logm);  rb = bitrev(rd_bin_b, logm);  rsel1 = logm[0];
    end
  end

  always_ff @(posedge clk) begin
    rdat_a <= rsel1 ? mem1[ra] : mem0[ra];
    rdat_b <= rsel1 ? mem1[rb] : mem0[rb];
    if (p_valid && !p_dst1) begin
      mem0[p_addr_a] <= {ya_re, ya_im};
      mem0[p_addr_b] <= {yb_re, yb_im};
    end else if (ld_we && !busy) begin
      mem0[ld_addr] <= {ld_re, ld_im};
    end
    if (p_valid && p_dst1) begin
      mem1[p_addr_a] <= {ya_re, ya_im};
      mem1[p_addr_b] <= {yb_re, yb_im};
    end
  end

  assign rd_a_re = rdat_a[2*DW-1:DW];
  assign rd_a_im = rdat_a[DW-1:0];
  assign rd_b_re = rdat_b[2*DW-1:DW];
  assign rd_b_im = rdat_b[DW-1:0];

endmodule
