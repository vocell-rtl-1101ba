// tb_control_unit: checks the master FSM against a reference transition table.
// Random act_* settings and random start/keyword/ready stimuli; every cycle the
// state and the stage enables are compared with an independent model.
// Also requires every state and every drawn transition to occur.
module tb_control_unit;
  import vocell_pkg::*;
  logic clk = 0, rst_n = 0;
  logic act_kws, act_sv, act_kws_sv, start, keyword, sv_ready;
  ctrl_state_t state;
  logic en_fex, en_kws, en_sv, kws_entry;
  int checks = 0, failures = 0;
  int seen [4];
  int tr_kws_sv = 0, tr_kws_kwssv = 0, tr_ready_back = 0, tr_idle_sv = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ctrl_state_t ref_st;
  initial begin
    act_kws = 0; act_sv = 0; act_kws_sv = 0; start = 0; keyword = 0; sv_ready = 0;
    ref_st = ST_IDLE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (n % 500 == 0) begin
        act_kws = $urandom_range(0, 1); act_sv = $urandom_range(0, 1);
        act_kws_sv = $urandom_range(0, 1);
      end
      start    = ($urandom_range(0, 9) != 0);
      keyword  = ($urandom_range(0, 19) == 0);
      sv_ready = ($urandom_range(0, 19) == 0);
      // reference next state
      begin
        ctrl_state_t nx;
        nx = ref_st;
        case (ref_st)
          ST_IDLE: if (start && act_kws) nx = ST_KWS;
                   else if (start && act_sv) begin nx = ST_SV; tr_idle_sv++; end
          ST_KWS:  if (keyword && act_kws_sv) begin nx = ST_KWS_SV; tr_kws_kwssv++; end
                   else if (keyword && act_sv) begin nx = ST_SV; tr_kws_sv++; end
                   else if (!start) nx = ST_IDLE;
          ST_SV:   if (sv_ready) begin nx = act_kws ? ST_KWS : ST_IDLE; if (act_kws) tr_ready_back++; end
          ST_KWS_SV: if (sv_ready) begin nx = ST_KWS; tr_ready_back++; end
          default: nx = ST_IDLE;
        endcase
        @(posedge clk); #1;
        ref_st = nx;
      end
      checks++;
      if (state != ref_st || en_fex != (ref_st != ST_IDLE) ||
          en_kws != (ref_st == ST_KWS || ref_st == ST_KWS_SV) ||
          en_sv != (ref_st == ST_SV || ref_st == ST_KWS_SV)) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: dut %0d ref %0d", n, state, ref_st);
      end
      seen[state]++;
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("state %0d never reached", s); end
    end
    checks++; if (tr_kws_sv == 0 || tr_kws_kwssv == 0 || tr_ready_back == 0 || tr_idle_sv == 0) begin
      failures++; $display("a transition never happened");
    end
    $display("transitions: KWS->SV %0d KWS->KWS+SV %0d ready->KWS %0d IDLE->SV %0d",
             tr_kws_sv, tr_kws_kwssv, tr_ready_back, tr_idle_sv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
