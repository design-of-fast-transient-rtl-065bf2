// LUT-based shift register (SR) that drives the 32 coarse pass gates.
//
// Two kinds of request move the coarse code CTR_C: a slope measurement from
// the slope detector, and single up/down steps from the coarse controller
// (SHIFT_UorD). A new slope sample (rising vld[0] or vld[1]) is turned into
// a shift amount by a pre-configured look-up table, so no arithmetic sits
// between the measurement and the pass gates: the S1 group is looked up by
// the number of ones it holds in LUT1, the S2 group in LUT2 (fewer ones =
// steeper droop = larger shift). The OS filter gives slope requests priority
// over coarse steps and blocks slope requests entirely while the overshoot
// flag os is high. The clock generator (clk_gen) turns the winning request
// into a CLK_C strobe that loads the shifted code into the register.
//
// CTR_C is a thermometer code, bit i = 1 turns coarse segment i on; a shift
// up by k fills k more ones from the bottom, a coarse step down removes one.
// Timing: a slope sample is looked up in the cycle after vld rises and
// applied on the following CLK_C strobe (two clk cycles); coarse steps are
// applied on the strobe of their own cycle. slope_busy is high while a slope
// shift is pending or being applied; it gates the coarse controller.
//
// The LUT, OS filter, clock generator and CTR_C register with RSTB follow
// the block diagram; the LUT contents, the thermometer coding and the
// pending-request register are this design's choices.
module lut_sr #(
  parameter int N_COARSE = 32,
  parameter int T_BITS   = 6,
  parameter int S2_BITS  = 4,
  parameter int SH_BITS  = 5,
  // Shift amounts indexed by the ones count of S1 (0..T_BITS) and S2.
  parameter int LUT1 [T_BITS+1]  = '{12, 10, 8, 6, 4, 3, 2},
  parameter int LUT2 [S2_BITS+1] = '{8, 6, 4, 3, 2},
  parameter int PWL_BITS = 2,
  parameter int OS_BITS  = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [S2_BITS+T_BITS-1:0] slope,
  input  logic [1:0]                slope_vld,
  input  logic                      shift_u,
  input  logic                      shift_d,
  input  logic                      os,
  input  logic [PWL_BITS-1:0]       ctr_pwl,
  input  logic [OS_BITS-1:0]        ctr_os,
  output logic [N_COARSE-1:0]       ctr_c,
  output logic                      clk_f_en,
  output logic                      slope_busy,
  output logic                      slope_shift
);

  logic [1:0]          vld_q;
  logic [1:0]          evt;
  logic                pend;
  logic [SH_BITS-1:0]  pend_amt;
  logic [SH_BITS-1:0]  lut_amt;
  logic                req_u, req_d;
  logic                shiftp_u, shiftp_d, shift, clk_c_en;
  int                  n1, n2;

  // OS filter: new slope samples, dropped during overshoot.
  assign evt = slope_vld & ~vld_q & {2{!os}};

  always_comb begin
    n1 = 0;
    n2 = 0;
    for (int b = 0; b < T_BITS; b++)  n1 += int'(slope[b]);
    for (int b = 0; b < S2_BITS; b++) n2 += int'(slope[T_BITS+b]);
    lut_amt = '0;
    if (evt[0]) lut_amt = SH_BITS'(LUT1[n1]);
    if (evt[1]) lut_amt = SH_BITS'(LUT2[n2]);   // deeper droop wins
  end

  // Slope requests have priority; coarse steps pass only without one.
  assign req_u = pend || (shift_u && !shift_d);
  assign req_d = !pend && shift_d && !shift_u;

  clk_gen #(.PWL_BITS(PWL_BITS), .OS_BITS(OS_BITS)) u_clk_gen (
    .clk, .rst_n, .req_u, .req_d, .ctr_pwl, .os, .ctr_os,
    .shiftp_u, .shiftp_d, .shift, .clk_c_en, .clk_f_en
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q    <= '0;
      pend     <= 1'b0;
      pend_amt <= '0;
      ctr_c    <= '0;
    end else begin
      vld_q <= slope_vld;
      if (clk_c_en) begin
        if (pend)         ctr_c <= ~((~ctr_c) << pend_amt);
        else if (req_u)   ctr_c <= {ctr_c[N_COARSE-2:0], 1'b1};
        else if (req_d)   ctr_c <= {1'b0, ctr_c[N_COARSE-1:1]};
      end
      if (evt != '0) begin
        pend     <= 1'b1;
        pend_amt <= lut_amt;
      end else if (clk_c_en && pend) begin
        pend     <= 1'b0;
      end
    end
  end

  assign slope_shift = clk_c_en && pend;
  assign slope_busy  = pend || (evt != '0);

endmodule
