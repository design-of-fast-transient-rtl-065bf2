// Behavioural model (not synthesizable) of the analog side of the
// slope-detector regulator, for testbenches: 32 coarse and 64 fine pass
// gates, output capacitor with a resistive load, and the
// comparator-triggered oscillators.
//
// Units are abstract: current in fine-gate units (a coarse gate is CU fine
// gates), the output error v in voltage steps relative to the target. Each
// clk (the oscillator clock) v integrates the current mismatch divided by
// K and relaxes by v/R. The REF_L1..REF_L3 oscillator outputs c[i] are clk
// gated by "v below -L1/-L2/-L3" (flags change on the falling edge, so the
// gated clocks are clean); ud = v < 0, os = v > OS.
module sdc_load_model #(
  parameter int CU = 16,
  parameter int K  = 4,
  parameter int R  = 4,
  parameter int L1 = 40,
  parameter int L2 = 80,
  parameter int L3 = 120,
  parameter int OS = 60
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] ctr_c,
  input  logic [63:0] ctr_f,
  input  int          i_load,
  output logic [2:0]  c,
  output logic        lvl_l1,
  output logic        ud,
  output logic        os,
  output int          v
);
  int i_pass;
  logic [2:0] below;

  always_comb begin
    i_pass = 0;
    for (int b = 0; b < 32; b++) i_pass += int'(ctr_c[b]) * CU;
    for (int b = 0; b < 64; b++) i_pass += int'(!ctr_f[b]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= 0;
    else        v <= v + (i_pass - i_load) / K - v / R;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) below <= '0;
    else        below <= {v < -L3, v < -L2, v < -L1};
  end

  assign c      = {3{clk}} & below;
  assign lvl_l1 = below[0];
  assign ud     = v < 0;
  assign os     = v > OS;
endmodule
