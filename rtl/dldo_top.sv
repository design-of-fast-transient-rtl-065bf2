// Top level: the digital controllers of the two proposed regulators side by
// side.
//
// u_ed is the event-driven DLDO with adaptive linear/binary two-step search
// (ring of thermometer counters plus subrange SAR) meant for memory arrays
// with a slow clock and a small on-chip capacitor. u_sdc is the
// slope-detector DLDO with LUT-based coarse shifting and a bi-directional
// latch fine loop, meant for digital loads switching at every clock edge.
// The two share nothing; each keeps its own ports, prefixed ed_ and sdc_.
// Their comparators, oscillators and pass-gate arrays are analog and connect
// through these ports.
module dldo_top
  import dldo_pkg::*;
(
  // Event-driven two-step search DLDO
  input  logic        ed_clk,
  input  logic        ed_rst_n,
  input  logic        ed_up,
  input  logic        ed_dn,
  input  logic        ed_en_fast,
  input  logic [3:0]  ed_osc,
  input  logic        ed_sar_comp,
  output logic [79:0] ed_csr_code,
  output logic [6:0]  ed_csr_count,
  output logic [9:0]  ed_sar_out,
  output logic [9:0]  ed_sar_outb,
  output logic [9:0]  ed_sar_eval,
  output logic        ed_sar_dump,
  output logic        ed_sar_en,
  output logic        ed_en_lock,
  output logic        ed_fast,
  output ed_state_t   ed_state,
  // Slope-detector multi-step DLDO
  input  logic        sdc_clk,
  input  logic        sdc_rst_n,
  input  logic [2:0]  sdc_c,
  input  logic        sdc_lvl_l1,
  input  logic        sdc_ud,
  input  logic        sdc_os,
  input  logic [1:0]  sdc_ctr_pwl,
  input  logic [2:0]  sdc_ctr_os,
  output logic [31:0] sdc_ctr_c,
  output logic [63:0] sdc_ctr_f,
  output logic [9:0]  sdc_slope,
  output logic [1:0]  sdc_slope_vld,
  output logic [2:0]  sdc_fine_cnt,
  output logic        sdc_fine_done,
  output logic        sdc_fl_hold,
  output logic        sdc_slope_shift,
  output sdc_state_t  sdc_state
);

  ed_dldo u_ed (
    .clk(ed_clk), .rst_n(ed_rst_n), .up(ed_up), .dn(ed_dn), .en_fast(ed_en_fast),
    .osc(ed_osc), .sar_comp(ed_sar_comp), .csr_code(ed_csr_code),
    .csr_count(ed_csr_count), .sar_out(ed_sar_out), .sar_outb(ed_sar_outb),
    .sar_eval(ed_sar_eval), .sar_dump(ed_sar_dump), .sar_en(ed_sar_en),
    .en_lock(ed_en_lock), .fast(ed_fast), .state(ed_state)
  );

  sdc_dldo u_sdc (
    .clk(sdc_clk), .rst_n(sdc_rst_n), .c(sdc_c), .lvl_l1(sdc_lvl_l1), .ud(sdc_ud),
    .os(sdc_os), .ctr_pwl(sdc_ctr_pwl), .ctr_os(sdc_ctr_os), .ctr_c(sdc_ctr_c),
    .ctr_f(sdc_ctr_f), .slope(sdc_slope), .slope_vld(sdc_slope_vld),
    .fine_cnt(sdc_fine_cnt), .fine_done(sdc_fine_done), .fl_hold(sdc_fl_hold),
    .slope_shift(sdc_slope_shift), .state(sdc_state)
  );

endmodule
