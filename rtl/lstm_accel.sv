// lstm_accel: keyword-spotting LSTM accelerator (one or two LSTM layers
// followed by one or two fully connected layers).
//
// For every incoming feature vector x_t each LSTM layer updates its state
//   f,i,o = sigmoid(W x_t + U h_{t-1} + b),  g = tanh(...)
//   c_t = f*c_{t-1} + i*g,  h_t = o*tanh(c_t)
// (the second layer, if enabled, takes h_t of the first as its input) and
// then the FC layers compute n_kw keyword scores from the last h_t, through
// an optional hidden FC layer of n_hid tanh outputs.
// Four processing elements, one per gate kernel, each with two multipliers,
// an adder and a 32-bit accumulator, compute the four gate dot products of
// one neuron concurrently, two vector elements per cycle. Weights come from
// a 32 kB model memory (4096 x 64 bit), either as 8-bit values or as 4-bit
// codes decoded through a 16-entry LUT (nonlinear quantization); a single
// 8-segment piecewise-linear generator evaluates sigmoid and tanh. The FC
// layers reuse the four PEs, four outputs at a time. Scores go to a 16-entry
// output buffer. The layer counts (1 or 2 LSTM, 1 or 2 FC, up to 64 cells),
// the PE-per-gate organisation, the NLQ table and the PWL activations follow
// the design's LSTM accelerator.
// This design's own choices:
//  - each operand vector ends in a constant 1 that multiplies the bias,
//    stored as one more weight: [x (n_dim), h1_{t-1} (n_neur), 1] for
//    layer 1, [h1_t, h2_{t-1}, 1] for layer 2, [h_t, 1] for the first FC
//    layer, [hidden (n_hid), 1] for the second;
//  - memory layout, in this order: layer-1 neurons, layer-2 neurons, first
//    FC layer, second FC layer. A neuron takes P = ceil(len/2) words for an
//    operand vector of len elements (8-bit mode: byte 2*gate+e of word t is
//    the weight of gate f,i,o,g = 0..3 for element 2t+e), or ceil(P/2) words
//    in 4-bit mode (half t[0] of the word, nibble 2*gate+e). An FC layer
//    takes one such block per group of four outputs, byte 2*output+e;
//  - the hidden FC layer uses tanh (the generator's other function);
//  - all values Q2.5; products summed at Q.10 and shifted back with
//    saturation; the element-wise products use their own multipliers;
//  - decision: keyword = 1 when the highest score is not class 0
//    (class 0 is the filler / no-keyword class).
// Timing: start with x stable until done; about n_neur*(P+7) cycles per
// LSTM layer plus ceil(outputs/4)*(P+2) per FC layer (+4 for the hidden one).
module lstm_accel
  import vocell_pkg::*;
#(
  parameter int unsigned NDIM_MAX  = 39,
  parameter int unsigned NNEUR_MAX = 64,
  parameter int unsigned NKW_MAX   = 16,
  parameter int unsigned MEM_WORDS = 4096    // 32 kB of 64-bit words
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear_state,
  input  logic              start,
  input  logic signed [7:0] x [NDIM_MAX],
  input  logic [5:0]        n_dim,
  input  logic [6:0]        n_neur,
  input  logic [4:0]        n_kw,
  input  logic              nlq,
  input  logic              two_lstm,   // second LSTM layer (n_neur cells on h of layer 1)
  input  logic              two_fc,     // hidden FC layer of n_hid outputs before the class layer
  input  logic [6:0]        n_hid,
  // model memory and NLQ table write ports
  input  logic                         mem_we,
  input  logic [$clog2(MEM_WORDS)-1:0] mem_addr,
  input  logic [63:0]                  mem_wdata,
  input  logic                         lut_we,
  input  logic [3:0]                   lut_addr,
  input  logic signed [7:0]            lut_wdata,
  // results
  output logic              busy,
  output logic              done,
  output logic signed [7:0] scores [NKW_MAX],
  output logic [3:0]        kw_class,
  output logic              keyword
);
  localparam int unsigned MAW = $clog2(MEM_WORDS);

  logic [63:0]       mem [MEM_WORDS];
  logic signed [7:0] nlq_lut [16];
  logic signed [7:0] h_prev [2][NNEUR_MAX];   // per LSTM layer
  logic signed [7:0] h_next [NNEUR_MAX];
  logic signed [7:0] c_mem  [2][NNEUR_MAX];
  logic signed [7:0] fc_h   [NNEUR_MAX];      // hidden FC layer outputs

  typedef enum logic [3:0] {L_IDLE, L_MAC, L_MACW, L_ACT, L_CELL, L_HACT,
                            L_FOUT, L_FACT, L_DEC} lstate_t;
  lstate_t st;

  // Phase: 0 LSTM layer 1, 1 LSTM layer 2, 2 first FC layer, 3 second FC layer.
  logic [1:0]        ph;
  logic              fc;
  logic              ly;          // LSTM layer of the current phase
  assign fc = ph[1];
  assign ly = ph[0];
  logic [6:0]        j;           // neuron (LSTM) or output group (FC)
  logic [6:0]        t;           // element pair being issued
  logic [6:0]        npairs;      // pairs in the current dot product
  logic [MAW-1:0]    base;        // first word of the current neuron / group
  logic [MAW-1:0]    stride;
  logic [1:0]        ai;          // activation step
  logic signed [31:0] acc [4];
  logic signed [7:0]  gate [4];   // f, i, o, g

  // Memory read (synchronous) and pipeline tag.
  logic [63:0] wq;
  logic        mv;
  logic [6:0]  td;
  logic [MAW-1:0] rd_addr;
  assign rd_addr = base + (nlq ? MAW'(t >> 1) : MAW'(t));

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    if (lut_we) nlq_lut[lut_addr] <= lut_wdata;
    wq <= mem[rd_addr];
  end

  // Operand vector element e.
  function automatic logic signed [7:0] vec_el(input logic [7:0] e);
    logic [7:0] nd, nn, nh;
    nd = 8'(n_dim);
    nn = 8'(n_neur);
    nh = 8'(n_hid);
    unique case (ph)
      2'd0: begin
        if (e < nd)            return x[e[5:0]];
        else if (e < nd + nn)  return h_prev[0][6'(e - nd)];
        else if (e == nd + nn) return 8'sd32;
        else                   return 8'sd0;
      end
      2'd1: begin
        if (e < nn)            return h_prev[0][6'(e)];
        else if (e < nn + nn)  return h_prev[1][6'(e - nn)];
        else if (e == nn + nn) return 8'sd32;
        else                   return 8'sd0;
      end
      2'd2: begin
        if (e < nn)            return h_prev[two_lstm][6'(e)];
        else if (e == nn)      return 8'sd32;
        else                   return 8'sd0;
      end
      default: begin
        if (e < nh)            return fc_h[6'(e)];
        else if (e == nh)      return 8'sd32;
        else                   return 8'sd0;
      end
    endcase
  endfunction

  // Weight of PE g for element e (0/1) of pair td.
  function automatic logic signed [7:0] weight(input int g, input int e);
    logic [3:0] code;
    if (!nlq) return wq[8*(2*g+e) +: 8];
    code = td[0] ? wq[32 + 4*(2*g+e) +: 4] : wq[4*(2*g+e) +: 4];
    return nlq_lut[code];
  endfunction

  logic signed [7:0] v0, v1;
  assign v0 = vec_el({td, 1'b0});
  assign v1 = vec_el({td, 1'b1});

  // Activation generator.
  logic signed [15:0] act_in;
  logic               act_tanh;
  logic signed [7:0]  act_out;
  function automatic logic signed [15:0] sat16(input logic signed [31:0] v);
    if (v > 32'sd32767)  return 16'sd32767;
    if (v < -32'sd32768) return -16'sd32768;
    return v[15:0];
  endfunction
  always_comb begin
    if (st == L_HACT) begin
      act_in   = 16'(c_mem[ly][j[5:0]]);
      act_tanh = 1'b1;
    end else if (st == L_FACT) begin
      act_in   = sat16(acc[ai] >>> 5);
      act_tanh = 1'b1;
    end else begin
      act_in   = sat16(acc[ai] >>> 5);
      act_tanh = (ai == 2'd3);
    end
  end
  pwl_act u_act (.x(act_in), .is_tanh(act_tanh), .y(act_out));

  logic signed [7:0] c_new;
  assign c_new = sat8((40'(gate[0]) * 40'(c_mem[ly][j[5:0]]) + 40'(gate[1]) * 40'(gate[3])) >>> 5);

  // Words per neuron / per FC group (element pairs of each operand vector).
  logic [6:0] p_lstm, p_lstm2, p_fc, p_fc2, n_out;
  assign p_lstm  = 7'((8'(n_dim) + 8'(n_neur) + 8'd2) >> 1);
  assign p_lstm2 = 7'((8'(n_neur) + 8'(n_neur) + 8'd2) >> 1);
  assign p_fc    = 7'((8'(n_neur) + 8'd2) >> 1);
  assign p_fc2   = 7'((8'(n_hid) + 8'd2) >> 1);
  assign n_out   = (ph == 2'd2 && two_fc) ? n_hid : 7'(n_kw);
  function automatic logic [MAW-1:0] words(input logic [6:0] pairs);
    return nlq ? MAW'(8'((8'(pairs) + 8'd1) >> 1)) : MAW'(pairs);
  endfunction

  // Argmax over the scores.
  logic [3:0] best;
  always_comb begin
    best = 4'd0;
    for (int k = 1; k < int'(NKW_MAX); k++)
      if (k < int'(n_kw) && scores[k] > scores[best]) best = 4'(k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= L_IDLE;
      ph       <= '0;
      j        <= '0;
      t        <= '0;
      npairs   <= '0;
      base     <= '0;
      stride   <= '0;
      ai       <= '0;
      mv       <= 1'b0;
      td       <= '0;
      done     <= 1'b0;
      kw_class <= '0;
      keyword  <= 1'b0;
      for (int g = 0; g < 4; g++) begin acc[g] <= '0; gate[g] <= '0; end
      for (int n = 0; n < int'(NNEUR_MAX); n++) begin
        h_prev[0][n] <= '0; h_prev[1][n] <= '0; h_next[n] <= '0;
        c_mem[0][n] <= '0; c_mem[1][n] <= '0; fc_h[n] <= '0;
      end
      for (int k = 0; k < int'(NKW_MAX); k++) scores[k] <= '0;
    end else begin
      done <= 1'b0;
      mv   <= 1'b0;
      // Processing elements: two MACs per gate per cycle.
      if (mv)
        for (int g = 0; g < 4; g++)
          acc[g] <= acc[g] + 32'(weight(g, 0)) * 32'(v0) + 32'(weight(g, 1)) * 32'(v1);

      unique case (st)
        L_IDLE: begin
          if (clear_state)
            for (int n = 0; n < int'(NNEUR_MAX); n++) begin
              h_prev[0][n] <= '0; h_prev[1][n] <= '0; c_mem[0][n] <= '0; c_mem[1][n] <= '0;
            end
          if (start) begin
            st     <= L_MAC;
            ph     <= 2'd0;
            j      <= '0;
            t      <= '0;
            base   <= '0;
            npairs <= p_lstm;
            stride <= words(p_lstm);
            for (int g = 0; g < 4; g++) acc[g] <= '0;
          end
        end
        L_MAC: begin
          mv <= 1'b1;
          td <= t;
          if (t == npairs - 1'b1) st <= L_MACW;
          else                    t  <= t + 1'b1;
        end
        L_MACW: begin                   // last pair accumulates this cycle
          ai <= '0;
          st <= fc ? L_FOUT : L_ACT;
        end
        L_ACT: begin
          gate[ai] <= act_out;
          ai       <= ai + 1'b1;
          if (ai == 2'd3) st <= L_CELL;
        end
        L_CELL: begin
          c_mem[ly][j[5:0]] <= c_new;
          st            <= L_HACT;
        end
        L_HACT: begin
          h_next[j[5:0]] <= sat8((40'(gate[2]) * 40'(act_out)) >>> 5);
          t    <= '0;
          base <= base + stride;
          for (int g = 0; g < 4; g++) acc[g] <= '0;
          if (j == n_neur - 1'b1) begin
            // layer done: h_next becomes the state, FC follows
            for (int n = 0; n < int'(NNEUR_MAX); n++)
              h_prev[ly][n] <= (n == int'(j)) ? sat8((40'(gate[2]) * 40'(act_out)) >>> 5) : h_next[n];
            j <= '0;
            if (ph == 2'd0 && two_lstm) begin
              ph     <= 2'd1;
              npairs <= p_lstm2;
              stride <= words(p_lstm2);
            end else begin
              ph     <= 2'd2;
              npairs <= p_fc;
              stride <= words(p_fc);
            end
          end else begin
            j <= j + 1'b1;
          end
          st <= L_MAC;
        end
        L_FOUT: begin
          if (ph == 2'd2 && two_fc) begin
            ai <= '0;
            st <= L_FACT;             // hidden layer: tanh of the four sums
          end else begin
            for (int g = 0; g < 4; g++)
              if (4 * int'(j) + g < int'(n_kw) && 4 * int'(j) + g < int'(NKW_MAX))
                scores[4 * int'(j) + g] <= sat8(40'(acc[g] >>> 5));
            for (int g = 0; g < 4; g++) acc[g] <= '0;
            t    <= '0;
            base <= base + stride;
            if (4 * (int'(j) + 1) >= int'(n_kw)) st <= L_DEC;
            else begin
              j  <= j + 1'b1;
              st <= L_MAC;
            end
          end
        end
        L_FACT: begin
          if (4 * int'(j) + int'(ai) < int'(NNEUR_MAX)) fc_h[6'(4 * j + 7'(ai))] <= act_out;
          ai <= ai + 1'b1;
          if (ai == 2'd3) begin
            for (int g = 0; g < 4; g++) acc[g] <= '0;
            t    <= '0;
            base <= base + stride;
            st   <= L_MAC;
            if (4 * (int'(j) + 1) >= int'(n_out)) begin
              ph     <= 2'd3;
              j      <= '0;
              npairs <= p_fc2;
              stride <= words(p_fc2);
            end else begin
              j <= j + 1'b1;
            end
          end
        end
        L_DEC: begin
          kw_class <= best;
          keyword  <= (best != 4'd0);
          done     <= 1'b1;
          st       <= L_IDLE;
        end
        default: st <= L_IDLE;
      endcase
    end
  end

  assign busy = (st != L_IDLE);
endmodule
