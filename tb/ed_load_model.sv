// Behavioural model (not synthesizable) of the analog side of the
// event-driven regulator, for testbenches: pass-gate arrays, output
// capacitor with a resistive load, the 1.5b window comparator with its
// large-error (EN_FAST) detector, and the latch comparator of the SAR.
//
// Units are abstract: current in SAR LSBs (a CSR segment is CU LSBs), the
// output error v in arbitrary voltage steps relative to V_REF. Each clk the
// error integrates the current mismatch divided by K and relaxes by v/R.
// up = v < -WIN, dn = v > WIN, en_fast = |v| > FAST, sar_comp = v < 0.
module ed_load_model #(
  parameter int CU   = 128,
  parameter int K    = 16,
  parameter int R    = 4,
  parameter int WIN  = 100,
  parameter int FAST = 400
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] csr_count,
  input  logic [9:0] sar_out,
  input  int         i_load,
  output logic       up,
  output logic       dn,
  output logic       en_fast,
  output logic       sar_comp,
  output int         v
);
  int i_pass;
  assign i_pass = int'(csr_count) * CU + int'(sar_out);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= 0;
    else        v <= v + (i_pass - i_load) / K - v / R;
  end

  assign up       = v < -WIN;
  assign dn       = v > WIN;
  assign en_fast  = (v < -FAST) || (v > FAST);
  assign sar_comp = v < 0;
endmodule
