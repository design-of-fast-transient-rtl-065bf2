// Digital controller of the event-driven DLDO with adaptive linear/binary
// two-step search.
//
// The regulator fights the large, steep load steps of a memory bank access
// with a slow external clock and a small on-chip output capacitor. A
// continuous-time window comparator (outside this module) reports up, dn and
// en_fast the moment the output leaves the window, without waiting for a
// clock. The coarse step is an adaptive linear search in a ring of eight
// 10-bit thermometer counters (csr_2d): one unit per update normally, eight
// units per update in fast-tracking mode. An LCO detector turns fast
// tracking off when the search starts to oscillate. When the output is back
// inside the window the counter of CSR[0] is dumped into a 10-bit subrange
// SAR (sub_sar), which trims a binary-weighted array with as many steps as
// CSR[0] has turned-on bits.
//
// Interface: clk stands for the self-timed update rate (about one update per
// nanosecond in silicon; the regulator itself needs no system clock). csr_code
// drives the unary coarse array (1 = segment on), sar_outb the
// binary-weighted fine array (active low). sar_eval strobes the latch
// comparator whose answer comes back on sar_comp (1 = output below V_REF).
// osc programs the number of allowed UP/DN reversals.
module ed_dldo
  import dldo_pkg::*;
#(
  parameter int N_CSR    = 8,
  parameter int TC_BITS  = 10,
  parameter int SAR_BITS = 10,
  parameter int OSC_BITS = 4,
  parameter int SETTLE   = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     up,
  input  logic                     dn,
  input  logic                     en_fast,
  input  logic [OSC_BITS-1:0]      osc,
  input  logic                     sar_comp,
  output logic [N_CSR*TC_BITS-1:0] csr_code,
  output logic [$clog2(N_CSR*TC_BITS+1)-1:0] csr_count,
  output logic [SAR_BITS-1:0]      sar_out,
  output logic [SAR_BITS-1:0]      sar_outb,
  output logic [SAR_BITS-1:0]      sar_eval,
  output logic                     sar_dump,
  output logic                     sar_en,
  output logic                     en_lock,
  output logic                     fast,
  output ed_state_t                state
);

  logic                step_up, step_dn, sar_done, search_done;
  logic [TC_BITS-1:0]  tc_cnt0;
  logic [SAR_BITS-1:0] step;
  logic [N_CSR-1:0]    ptr;
  logic                full, empty;

  ed_ctrl u_ctrl (
    .clk, .rst_n, .up, .dn, .en_fast, .en_lock, .sar_done,
    .step_up, .step_dn, .fast, .sar_dump, .sar_en, .search_done, .state
  );

  csr_2d #(.N_CSR(N_CSR), .TC_BITS(TC_BITS)) u_alsc (
    .clk, .rst_n, .step_up, .step_dn, .fast,
    .code(csr_code), .count(csr_count), .tc_cnt0, .ptr, .full, .empty
  );

  lco_detector #(.OSC_BITS(OSC_BITS)) u_lco (
    .clk, .rst_n, .up, .dn, .clr(search_done), .osc, .en_lock
  );

  sub_sar #(.SAR_BITS(SAR_BITS), .SETTLE(SETTLE)) u_sar (
    .clk, .rst_n, .dump(sar_dump), .en(sar_en), .tc_cnt(tc_cnt0[SAR_BITS-1:0]),
    .comp(sar_comp), .step, .sar_eval, .sar_out, .sar_outb, .done(sar_done)
  );

endmodule
