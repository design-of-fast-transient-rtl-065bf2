// Sequencer of the event-driven adaptive two-step search.
//
// The continuous-time window comparator raises up (output below V_REFL) or
// dn (output above V_REFH). ed_ctrl then runs the linear search: every clk
// cycle with a request it issues one step to the 2D-CSR, in fast-tracking
// mode when the comparator also flags a large error (en_fast) and the LCO
// detector has not locked. When both requests fall (output back inside the
// window) it pulses sar_dump for one cycle, which loads the subrange SAR, and
// then holds sar_en until the SAR reports done; search_done then clears the
// LCO detector, so UP/DN reversals are counted across SAR aborts.
// A new request at any point returns to the linear search. Nothing runs
// while the output stays inside the window (event-driven).
//
// Timing: request to CSR step is combinational, so a step happens on the
// first clk edge after the request. States are in dldo_pkg::ed_state_t. The
// sequence linear search, SAR_DUMP, SAR_EN and the fast-mode override by
// EN_LOCK follow the description; the single-cycle dump and the abort rule
// are this design's choices.
module ed_ctrl
  import dldo_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      up,
  input  logic      dn,
  input  logic      en_fast,
  input  logic      en_lock,
  input  logic      sar_done,
  output logic      step_up,
  output logic      step_dn,
  output logic      fast,
  output logic      sar_dump,
  output logic      sar_en,
  output logic      search_done,
  output ed_state_t state
);

  ed_state_t state_d;
  logic      req;

  assign req = up ^ dn;

  always_comb begin
    state_d = state;
    case (state)
      ED_IDLE:   if (req) state_d = ED_LINEAR;
      ED_LINEAR: if (!req) state_d = ED_DUMP;
      ED_DUMP:   state_d = req ? ED_LINEAR : ED_SAR;
      ED_SAR:    if (req) state_d = ED_LINEAR;
                 else if (sar_done) state_d = ED_IDLE;
      default:   state_d = ED_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ED_IDLE;
    else        state <= state_d;
  end

  // Steps are issued as soon as a request is seen, in any state.
  assign step_up  = up && !dn;
  assign step_dn  = dn && !up;
  assign fast     = en_fast && !en_lock;
  assign sar_dump = (state == ED_DUMP);
  assign sar_en   = (state == ED_SAR);
  // The whole two-step search ends when the SAR finishes undisturbed.
  assign search_done = (state == ED_SAR) && sar_done && !req;

endmodule
