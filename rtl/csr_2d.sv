// Adaptive linear-search controller (ALSC) built on the two-dimensional
// circular shifting register (2D-CSR).
//
// N_CSR elements, each with a pointer and a TC_BITS thermometer counter,
// are joined in a ring (csr_element). With step_up / step_dn high for a
// cycle the ring takes one linear-search step: in normal mode one element
// gains or loses one turn-on bit (the total code moves by one unit and the
// pointer walks round the ring, so the elements fill evenly); in
// fast-tracking mode (fast=1) all N_CSR elements step together, so the
// code moves by N_CSR units in one update. Steps that would overflow or
// underflow the addressed element are dropped in normal mode; in fast mode
// each element saturates on its own.
//
// Outputs: code is the complete unary control word, element k occupying
// bits [k*TC_BITS +: TC_BITS] (1 = pass-gate segment on); count is the
// number of turned-on segments; tc_cnt0 is the counter of CSR[0], handed to
// the subrange SAR. One update per clk edge stands for the ~1 ns
// asynchronous update of the silicon.
//
// The ring of eight 10-bit elements and the single/eight-element update
// follow the regulator description; the overflow rule is this design's own.
module csr_2d #(
  parameter int N_CSR   = 8,
  parameter int TC_BITS = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       step_up,
  input  logic                       step_dn,
  input  logic                       fast,
  output logic [N_CSR*TC_BITS-1:0]   code,
  output logic [$clog2(N_CSR*TC_BITS+1)-1:0] count,
  output logic [TC_BITS-1:0]         tc_cnt0,
  output logic [N_CSR-1:0]           ptr,
  output logic                       full,
  output logic                       empty
);

  logic [TC_BITS-1:0] tc [N_CSR];
  logic               blk_up, blk_dn;
  logic               upd_up, upd_dn;

  // Normal-mode saturation: the element holding the pointer cannot grow, or
  // the element behind the pointer cannot shrink.
  always_comb begin
    blk_up = 1'b0;
    blk_dn = 1'b0;
    for (int k = 0; k < N_CSR; k++) begin
      if (ptr[k] && tc[k][TC_BITS-1]) blk_up = 1'b1;
      if (ptr[(k+1) % N_CSR] && !tc[k][0]) blk_dn = 1'b1;
    end
  end

  assign upd_up = step_up && !step_dn && (fast ? !full  : !blk_up);
  assign upd_dn = step_dn && !step_up && (fast ? !empty : !blk_dn);

  for (genvar k = 0; k < N_CSR; k++) begin : g_elem
    csr_element #(.TC_BITS(TC_BITS), .IS_HOME(k == 0)) u_elem (
      .clk      (clk),
      .rst_n    (rst_n),
      .upd_up   (upd_up),
      .upd_dn   (upd_dn),
      .fast     (fast),
      .ptr_prev (ptr[(k+N_CSR-1) % N_CSR]),
      .ptr_next (ptr[(k+1) % N_CSR]),
      .ptr      (ptr[k]),
      .tc_cnt   (tc[k])
    );
    assign code[k*TC_BITS +: TC_BITS] = tc[k];
  end

  always_comb begin
    count = '0;
    full  = 1'b1;
    empty = 1'b1;
    for (int k = 0; k < N_CSR; k++) begin
      for (int b = 0; b < TC_BITS; b++) count = count + $bits(count)'(tc[k][b]);
      if (!tc[k][TC_BITS-1]) full  = 1'b0;
      if (tc[k][0])          empty = 1'b0;
    end
  end

  assign tc_cnt0 = tc[0];

  // The pointer must stay one-hot.
  a_ptr_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(ptr));

endmodule
