// tb_lstm_accel: a small network (5 inputs, 6 LSTM cells per layer, 7
// hidden FC outputs, 6 classes) with random weights is run for several
// frames in four configurations: one LSTM + one FC layer with 8-bit
// weights, the same with 4-bit codes through a random decoding table, two
// LSTM + two FC layers with 8-bit weights and the same with 4-bit codes.
// An integer reference model (gate sums, shift to Q.5, piecewise-linear
// sigmoid/tanh from the corner tables, cell and hidden update per layer,
// tanh hidden FC layer, class layer, argmax) gives the expected scores,
// class, keyword flag and hidden state of every layer after every frame.
// The recurrent state must carry over between frames and clear on
// clear_state. The cycle count of a frame is checked against the
// documented estimate (within 10%).
module tb_lstm_accel;
  import vocell_pkg::*;
  localparam int ND = 5, NN = 6, NH = 7, NK = 6, LMAX = 16;
  logic clk = 0, rst_n = 0;
  logic clear_state, start, nlq, two_lstm, two_fc, mem_we, lut_we, busy, done, keyword;
  logic signed [7:0] x [39];
  logic [11:0] mem_addr;
  logic [63:0] mem_wdata;
  logic [3:0] lut_addr, kw_class;
  logic signed [7:0] lut_wdata;
  logic signed [7:0] scores [16];
  int checks = 0, failures = 0, kw_seen = 0, nokw_seen = 0;

  lstm_accel dut (.clk, .rst_n, .clear_state, .start, .x, .n_dim(6'(ND)), .n_neur(7'(NN)),
    .n_kw(5'(NK)), .nlq, .two_lstm, .two_fc, .n_hid(7'(NH)), .mem_we, .mem_addr, .mem_wdata,
    .lut_we, .lut_addr, .lut_wdata, .busy, .done, .scores, .kw_class, .keyword);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Weights per phase (0 LSTM 1, 1 LSTM 2, 2 first FC, 3 second FC),
  // group (neuron or group of four outputs), lane (gate or output in group)
  // and operand element; the last element of each vector is the bias.
  int wt [4][16][4][LMAX];
  int code [4][16][4][LMAX];
  int lut [16];
  int h [2][NN], c [2][NN];

  function automatic int s8(longint v); return v > 127 ? 127 : (v < -128 ? -128 : int'(v)); endfunction
  function automatic int s16(longint v); return v > 32767 ? 32767 : (v < -32768 ? -32768 : int'(v)); endfunction
  function automatic int pwl(int xi, int th);
    int s, fr, y0, y1;
    if (xi < -128) return th ? TANH_CORNERS[0] : SIGMOID_CORNERS[0];
    if (xi >= 128) return th ? TANH_CORNERS[8] : SIGMOID_CORNERS[8];
    s = (xi + 128) >> 5; fr = (xi + 128) & 31;
    y0 = th ? TANH_CORNERS[s] : SIGMOID_CORNERS[s];
    y1 = th ? TANH_CORNERS[s+1] : SIGMOID_CORNERS[s+1];
    return y0 + (((y1 - y0) * fr) >>> 5);
  endfunction

  // Shape of each phase for the configuration (two layers or not).
  function automatic int plen(int ph);           // operand vector length incl. bias
    case (ph) 0: return ND + NN + 1; 1: return 2 * NN + 1; 2: return NN + 1; default: return NH + 1; endcase
  endfunction
  function automatic int pgroups(int ph, int two);
    case (ph) 0, 1: return NN; 2: return ((two ? NH : NK) + 3) / 4; default: return (NK + 3) / 4; endcase
  endfunction
  function automatic int plane_ok(int ph, int two, int q, int g);
    if (ph < 2) return 1;
    return 4 * q + g < ((ph == 2 && two) ? NH : NK);
  endfunction

  task automatic write_mem(input int addr, input logic [63:0] d);
    @(negedge clk); mem_we = 1; mem_addr = 12'(addr); mem_wdata = d;
    @(negedge clk); mem_we = 0;
  endtask

  // Memory image: phases in order, groups in order, P or ceil(P/2) words each.
  task automatic load_model(input int m, input int two);
    int base; base = 0;
    for (int ph = 0; ph < 4; ph++) begin
      int p, sw;
      if (!two && (ph == 1 || ph == 3)) continue;
      p = (plen(ph) + 1) / 2; sw = m ? (p + 1) / 2 : p;
      for (int q = 0; q < pgroups(ph, two); q++)
        for (int w = 0; w < sw; w++) begin
          logic [63:0] d; d = '0;
          for (int hf = 0; hf < (m ? 2 : 1); hf++) begin
            int t; t = m ? 2 * w + hf : w;
            for (int g = 0; g < 4; g++) for (int e = 0; e < 2; e++) begin
              int el; el = 2 * t + e;
              if (el < plen(ph) && plane_ok(ph, two, q, g)) begin
                if (m) d[32*hf + 4*(2*g+e) +: 4] = 4'(code[ph][q][g][el]);
                else   d[8*(2*g+e) +: 8] = 8'(wt[ph][q][g][el]);
              end
            end
          end
          write_mem(base + q * sw + w, d);
        end
      base += pgroups(ph, two) * sw;
    end
  endtask

  function automatic longint dot(int ph, int q, int g, int v [LMAX]);
    longint a; a = 0;
    for (int e = 0; e < plen(ph); e++) a += longint'(wt[ph][q][g][e]) * v[e];
    return a;
  endfunction

  task automatic frame(input int two);
    int v [LMAX], hid [NH], sc [NK], best, est, cyc;
    for (int l = 0; l < (two ? 2 : 1); l++) begin
      int hn [NN];
      for (int e = 0; e < LMAX; e++) v[e] = 0;
      if (l == 0) begin
        for (int i = 0; i < ND; i++) begin v[i] = $urandom_range(0, 127) - 64; x[i] = 8'(v[i]); end
        for (int i = 0; i < NN; i++) v[ND + i] = h[0][i];
        v[ND + NN] = 32;
      end else begin
        for (int i = 0; i < NN; i++) begin v[i] = h[0][i]; v[NN + i] = h[1][i]; end
        v[2 * NN] = 32;
      end
      for (int j = 0; j < NN; j++) begin
        int gt [4];
        for (int g = 0; g < 4; g++) gt[g] = pwl(s16(dot(l, j, g, v) >>> 5), g == 3);
        c[l][j] = s8((longint'(gt[0]) * c[l][j] + longint'(gt[1]) * gt[3]) >>> 5);
        hn[j] = s8((longint'(gt[2]) * pwl(c[l][j], 1)) >>> 5);
      end
      h[l] = hn;
    end
    for (int e = 0; e < LMAX; e++) v[e] = 0;
    for (int i = 0; i < NN; i++) v[i] = h[two ? 1 : 0][i];
    v[NN] = 32;
    for (int o = 0; o < (two ? NH : NK); o++) begin
      longint a; a = dot(2, o / 4, o % 4, v);
      if (two) hid[o] = pwl(s16(a >>> 5), 1); else sc[o] = s8(a >>> 5);
    end
    if (two) begin
      for (int e = 0; e < LMAX; e++) v[e] = 0;
      for (int i = 0; i < NH; i++) v[i] = hid[i];
      v[NH] = 32;
      for (int o = 0; o < NK; o++) sc[o] = s8(dot(3, o / 4, o % 4, v) >>> 5);
    end
    best = 0;
    for (int k = 1; k < NK; k++) if (sc[k] > sc[best]) best = k;
    // documented estimate: n_neur*(P+7) per LSTM layer, groups*(P+2) per FC layer, +4 hidden
    est = NN * ((ND + NN + 2) / 2 + 7) + ((two ? NH : NK) + 3) / 4 * ((NN + 2) / 2 + 2);
    if (two) est += NN * ((2 * NN + 2) / 2 + 7) + (NK + 3) / 4 * ((NH + 2) / 2 + 2) + 4 * ((NH + 3) / 4);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    for (int k = 0; k < NK; k++) begin
      checks++;
      if (int'(scores[k]) != sc[k]) begin failures++; $display("score %0d: %0d ref %0d", k, scores[k], sc[k]); end
    end
    for (int l = 0; l < (two ? 2 : 1); l++)
      for (int j = 0; j < NN; j++) begin
        checks++;
        if (int'(dut.h_prev[l][j]) != h[l][j]) begin
          failures++; $display("layer %0d h %0d: %0d ref %0d", l, j, dut.h_prev[l][j], h[l][j]);
        end
      end
    checks++;
    if (int'(kw_class) != best || keyword != (best != 0)) begin
      failures++; $display("class %0d ref %0d", kw_class, best);
    end
    checks++;
    if (cyc > est + est / 10 || cyc < est - est / 10) begin
      failures++; $display("frame took %0d cycles, estimate %0d", cyc, est);
    end
    if (best != 0) kw_seen++; else nokw_seen++;
  endtask

  initial begin
    clear_state = 0; start = 0; nlq = 0; two_lstm = 0; two_fc = 0; mem_we = 0; lut_we = 0;
    mem_addr = 0; mem_wdata = 0; lut_addr = 0; lut_wdata = 0;
    for (int i = 0; i < 39; i++) x[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int cfg = 0; cfg < 4; cfg++) begin
      int m, two;
      m = cfg % 2; two = cfg / 2;
      for (int i = 0; i < 16; i++) lut[i] = $urandom_range(0, 100) - 50;
      for (int ph = 0; ph < 4; ph++) for (int q = 0; q < 16; q++) for (int g = 0; g < 4; g++)
        for (int e = 0; e < LMAX; e++) begin
          code[ph][q][g][e] = $urandom_range(0, 15);
          wt[ph][q][g][e] = m ? lut[code[ph][q][g][e]] : $urandom_range(0, 100) - 50;
        end
      for (int i = 0; i < 16; i++) begin
        @(negedge clk); lut_we = 1; lut_addr = 4'(i); lut_wdata = 8'(lut[i]);
      end
      @(negedge clk); lut_we = 0; nlq = m[0]; two_lstm = two[0]; two_fc = two[0];
      load_model(m, two);
      @(negedge clk); clear_state = 1;
      @(negedge clk); clear_state = 0;
      for (int l = 0; l < 2; l++) for (int j = 0; j < NN; j++) begin h[l][j] = 0; c[l][j] = 0; end
      for (int f = 0; f < 10; f++) frame(two);
    end
    checks++;
    if (kw_seen == 0 || nokw_seen == 0) begin failures++; $display("keyword decisions not both seen"); end
    $display("keyword frames %0d, filler frames %0d", kw_seen, nokw_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
