// Subrange successive-approximation register (Sub-SAR) of the event-driven
// regulator's fine step.
//
// On dump the thermometer code TC-CNT of CSR[0] is copied into STEP: the
// turned-on bits mark the subrange that will be searched and the turned-off
// (overflow) bits are skipped, and the SAR output word is cleared. While en
// is high the SAR resolves one bit at a time, starting at the highest set
// STEP bit N: it turns SAR_OUT[N] on as a trial and raises SAR_EVAL[N]; after
// SETTLE clock cycles it samples the latch comparator (comp = 1: output still
// below the reference, keep the bit) and clears STEP[N], which moves the
// search to STEP[N-1]. The number of steps therefore equals the number of
// turn-on bits of CSR[0] instead of a fixed ten.
//
// Interface: sar_out is the binary word (1 = segment on); sar_outb is its
// active-low copy that drives the binary-weighted PMOS array. done is high
// when no STEP bit is left. Timing: 1 + SETTLE clk cycles per resolved bit;
// one clk stands for the self-timed EVAL/COMP/DONE handshake of the silicon.
//
// The dump of TC-CNT into STEP, the subrange start at the turn-on/turn-off
// boundary and the EVAL-COMP-DONE order follow the description; clearing
// SAR_OUT at dump and the SETTLE wait are this design's choices.
module sub_sar #(
  parameter int SAR_BITS = 10,
  parameter int SETTLE   = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                dump,
  input  logic                en,
  input  logic [SAR_BITS-1:0] tc_cnt,
  input  logic                comp,
  output logic [SAR_BITS-1:0] step,
  output logic [SAR_BITS-1:0] sar_eval,
  output logic [SAR_BITS-1:0] sar_out,
  output logic [SAR_BITS-1:0] sar_outb,
  output logic                done
);

  localparam int CW = (SETTLE > 1) ? $clog2(SETTLE) : 1;

  logic                evaluating;
  logic [CW-1:0]       wait_cnt;
  logic [SAR_BITS-1:0] cur;   // one-hot: highest set bit of step

  always_comb begin
    cur = '0;
    for (int b = 0; b < SAR_BITS; b++)
      if (step[b] && (step >> (b + 1)) == '0) cur[b] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step       <= '0;
      sar_out    <= '0;
      evaluating <= 1'b0;
      wait_cnt   <= '0;
    end else if (dump) begin
      step       <= tc_cnt;
      sar_out    <= '0;
      evaluating <= 1'b0;
      wait_cnt   <= '0;
    end else if (en && step != '0) begin
      if (!evaluating) begin
        evaluating <= 1'b1;
        wait_cnt   <= '0;
        sar_out    <= sar_out | cur;           // trial bit on
      end else if (int'(wait_cnt) < SETTLE - 1) begin
        wait_cnt   <= wait_cnt + 1'b1;
      end else begin
        evaluating <= 1'b0;
        if (!comp) sar_out <= sar_out & ~cur;  // output high: drop the bit
        step       <= step & ~cur;
      end
    end
  end

  assign sar_eval = evaluating ? cur : '0;
  assign sar_outb = ~sar_out;
  assign done     = (step == '0);

endmodule
