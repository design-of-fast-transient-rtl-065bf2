// Coarse controller of the slope-detector DLDO: decides which loop owns the
// pass gates.
//
// FINE: the fine loop regulates. A slope compensation (slope_busy) moves to
// SLOPE, which keeps the fine latches disabled and clears their speed
// counter, and returns to FINE SLOPE_HOLD cycles after the last slope shift.
// When the fine code is stuck at an end of its range while the error still
// points past that end (all 64 fine gates on and the load still below
// target, or all off and the load above it) the controller enters the
// false-lock state FLOCK: it holds a replica of the stuck code on the pass
// gates (fl_hold), resets the fine code to mid-range (fine_rst) and lets the
// fine loop run unseen, and steps the coarse code one unit every
// COARSE_WAIT cycles in the direction of the stuck code. Once the load
// crosses the target the replica is released and the fine code drives the
// pass gates again. FLOCK is neither entered nor kept when the coarse code
// has no unit left in the needed direction (c_full / c_empty); the fine loop
// then keeps the pass gates at its end of range. Coarse steps are suppressed while a slope shift is
// pending, so the two never collide in the shared shift register.
//
// Interface: ud = 1 means the load is below the target voltage. shift_u /
// shift_d are one-cycle SHIFT_UorD requests. Timing: all on clk (CMP_CLK).
// The false-lock sequence and the gating of the coarse loop during slope
// compensation follow the description; SLOPE_HOLD, COARSE_WAIT and the
// exact entry conditions are this design's choices.
module coarse_ctrl
  import dldo_pkg::*;
#(
  parameter int COARSE_WAIT = 8,
  parameter int SLOPE_HOLD  = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ud,
  input  logic       slope_busy,
  input  logic       stuck_lo,   // fine code all zeros: every fine gate on
  input  logic       stuck_hi,   // fine code all ones: every fine gate off
  input  logic       c_full,     // every coarse gate on
  input  logic       c_empty,    // every coarse gate off
  output logic       shift_u,
  output logic       shift_d,
  output logic       fine_en,
  output logic       fine_rst,
  output logic       cnt_clr,
  output logic       fl_hold,
  output sdc_state_t state
);

  localparam int WW = $clog2(COARSE_WAIT + SLOPE_HOLD + 1);

  sdc_state_t state_d;
  logic       dir_up, dir_up_d;
  logic [WW-1:0] timer, timer_d;
  logic       step;

  always_comb begin
    state_d  = state;
    dir_up_d = dir_up;
    timer_d  = (timer != '0) ? timer - 1'b1 : '0;
    fine_rst = 1'b0;
    step     = 1'b0;
    case (state)
      SDC_FINE: begin
        if (slope_busy) begin
          state_d = SDC_SLOPE;
          timer_d = WW'(SLOPE_HOLD);
        end else if ((stuck_lo && ud && !c_full) || (stuck_hi && !ud && !c_empty)) begin
          state_d  = SDC_FLOCK;
          dir_up_d = stuck_lo;
          fine_rst = 1'b1;
          timer_d  = '0;
        end
      end
      SDC_SLOPE: begin
        if (slope_busy)          timer_d = WW'(SLOPE_HOLD);
        else if (timer == '0)    state_d = SDC_FINE;
      end
      SDC_FLOCK: begin
        if (dir_up ? !ud : ud)   state_d = SDC_FINE;       // target reached
        else if (dir_up ? c_full : c_empty) state_d = SDC_FINE;  // coarse range used up
        else if (!slope_busy && timer == '0) begin
          step    = 1'b1;
          timer_d = WW'(COARSE_WAIT - 1);
        end
      end
      default: state_d = SDC_FINE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= SDC_FINE;
      dir_up <= 1'b1;
      timer  <= '0;
    end else begin
      state  <= state_d;
      dir_up <= dir_up_d;
      timer  <= timer_d;
    end
  end

  assign shift_u = step && dir_up;
  assign shift_d = step && !dir_up;
  assign fine_en = (state != SDC_SLOPE);
  assign cnt_clr = (state == SDC_SLOPE);
  assign fl_hold = (state == SDC_FLOCK);

endmodule
