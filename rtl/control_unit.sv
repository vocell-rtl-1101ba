// control_unit: configurable master FSM of the wake-up hierarchy.
//
// Decides which processing stages run. In IDLE only the analog front end
// and the sound detector work. A sound detection (start) moves the FSM to
// KWS when act_kws is set, or straight to SV when only act_sv is set. From
// KWS a detected keyword moves it to SV (act_kws & act_sv) or to KWS+SV
// (act_kws_sv), where both classifiers run concurrently. The ready pulse of
// the speaker verifier returns it to KWS. These transitions and their
// conditions follow the control diagram of the design.
// This design's own additions: KWS returns to IDLE when the sound detector
// drops its sound flag (no transition back to IDLE is drawn), and SV entered
// without keyword spotting returns to IDLE on ready. act_kws_sv takes
// priority over act_sv on a keyword.
// Outputs are registered state plus the enables derived from it; all
// transitions take one clock.
module control_unit
  import vocell_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        act_kws,
  input  logic        act_sv,
  input  logic        act_kws_sv,
  input  logic        start,      // sound detected (level from the detector)
  input  logic        keyword,    // pulse: keyword spotted
  input  logic        sv_ready,   // pulse: speaker verification finished
  output ctrl_state_t state,
  output logic        en_fex,
  output logic        en_kws,
  output logic        en_sv,
  output logic        kws_entry   // pulse: KWS entered from IDLE (clears LSTM state)
);

  ctrl_state_t nxt;

  always_comb begin
    nxt = state;
    unique case (state)
      ST_IDLE: begin
        if (start && act_kws)                nxt = ST_KWS;
        else if (start && !act_kws && act_sv) nxt = ST_SV;
      end
      ST_KWS: begin
        if (keyword && act_kws_sv)           nxt = ST_KWS_SV;
        else if (keyword && act_sv)          nxt = ST_SV;
        else if (!start)                     nxt = ST_IDLE;
      end
      ST_SV: begin
        if (sv_ready)                        nxt = act_kws ? ST_KWS : ST_IDLE;
      end
      ST_KWS_SV: begin
        if (sv_ready)                        nxt = ST_KWS;
      end
      default:                               nxt = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      kws_entry <= 1'b0;
    end else begin
      state     <= nxt;
      kws_entry <= (state == ST_IDLE) && (nxt == ST_KWS);
    end
  end

  assign en_fex = (state != ST_IDLE);
  assign en_kws = (state == ST_KWS) || (state == ST_KWS_SV);
  assign en_sv  = (state == ST_SV)  || (state == ST_KWS_SV);

endmodule
