// Digital controller of the slope-detector DLDO with multi-step control.
//
// The regulator targets digital loads whose current jumps at every edge of a
// tens-to-hundreds-of-MHz clock. Instead of a separate feed-forward path it
// makes the main loop itself react within a few oscillator periods: three
// comparator-triggered oscillators watching REF_L1..REF_L3 clock a slope
// detector (slope_detector), whose measurement indexes a table that shifts
// the 32-bit coarse code in one step (lut_sr). Afterwards a 64-stage
// bi-directional latch driver (fine_driver) trims the remaining error,
// slowing down at each target crossing until it stops. If the fine range
// runs out, the false-lock scheme (coarse_ctrl, false_lock) parks a replica
// of the stuck fine code on the gates and steps the coarse code until the
// target is crossed.
//
// Interface: clk is the target comparator's self-timed clock CMP_CLK (3 to
// 5 GHz in silicon); c[2:0] are the REF_L1..REF_L3 oscillator outputs, which
// toggle while the load is below the reference; lvl_l1 is the REF_L1
// decision as a level (1 = below), used to re-arm the slope detector; ud is
// the target comparator decision (1 = below target); os flags an overshoot.
// ctr_c drives the coarse gates (1 = on), ctr_f the fine gates (0 = on).
// Timing: everything runs on clk except the slope detector, which runs on
// the c[] oscillator clocks.
//
// This design's choice: the fine speed counter is also cleared while the
// output is outside the band between REF_L1 and the overshoot level (os or
// lvl_l1 high), so that a finished fine loop (CNT=111) wakes up again after
// a load change too slow or too small for the slope detector, and, if its
// range runs out, hands over to the false-lock coarse steps.
module sdc_dldo
  import dldo_pkg::*;
#(
  parameter int N_COARSE    = 32,
  parameter int N_FINE      = 64,
  parameter int T_BITS      = 6,
  parameter int S2_BITS     = 4,
  parameter int COARSE_WAIT = 8,
  parameter int SLOPE_HOLD  = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [2:0]                c,
  input  logic                      lvl_l1,
  input  logic                      ud,
  input  logic                      os,
  input  logic [1:0]                ctr_pwl,
  input  logic [2:0]                ctr_os,
  output logic [N_COARSE-1:0]       ctr_c,
  output logic [N_FINE-1:0]         ctr_f,
  output logic [S2_BITS+T_BITS-1:0] slope,
  output logic [1:0]                slope_vld,
  output logic [2:0]                fine_cnt,
  output logic                      fine_done,
  output logic                      fl_hold,
  output logic                      slope_shift,
  output sdc_state_t                state
);

  logic              shift_u, shift_d, clk_f_en, slope_busy;
  logic              fine_en, fine_rst, cnt_clr, stuck_lo, stuck_hi;
  logic [N_FINE-1:0] f_out;

  slope_detector #(.T_BITS(T_BITS), .S2_BITS(S2_BITS)) u_slope (
    .rst_n, .rearm(!lvl_l1), .c, .slope, .vld(slope_vld)
  );

  lut_sr #(.N_COARSE(N_COARSE), .T_BITS(T_BITS), .S2_BITS(S2_BITS)) u_lut_sr (
    .clk, .rst_n, .slope, .slope_vld, .shift_u, .shift_d, .os, .ctr_pwl, .ctr_os,
    .ctr_c, .clk_f_en, .slope_busy, .slope_shift
  );

  coarse_ctrl #(.COARSE_WAIT(COARSE_WAIT), .SLOPE_HOLD(SLOPE_HOLD)) u_coarse (
    .clk, .rst_n, .ud, .slope_busy, .stuck_lo, .stuck_hi,
    .c_full(&ctr_c), .c_empty(~|ctr_c),
    .shift_u, .shift_d, .fine_en, .fine_rst, .cnt_clr, .fl_hold, .state
  );

  fine_driver #(.N_FINE(N_FINE)) u_fine (
    .clk, .rst_n, .en(fine_en && clk_f_en), .ud, .frst(fine_rst), .cnt_clr(cnt_clr || os || lvl_l1),
    .f_out, .cnt(fine_cnt), .done(fine_done)
  );

  false_lock #(.N_FINE(N_FINE)) u_flock (
    .clk, .rst_n, .f_out, .hold(fl_hold), .ctr_f, .stuck_lo, .stuck_hi
  );

endmodule
