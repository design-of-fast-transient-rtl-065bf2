// Limit-cycle-oscillation (LCO) detector of the ALSC.
//
// Fast-tracking steps of eight units can make the linear search overshoot
// back and forth, alternating UP and DN. The detector is a chain of
// flip-flops that shifts in a one each time the requested direction reverses
// (an UP step after a DN step, or a DN step after an UP step). When the
// chain position selected by osc holds a one, that is after osc+1 reversals,
// en_lock rises and stays high until clr; the ALSC then forces fast-tracking
// off so the search continues in single steps and leaves the oscillation.
//
// Interface: up / dn are the comparator requests seen by the ALSC, sampled
// on clk (one clk = one asynchronous update). clr is synchronous and is
// driven when a complete two-step search has ended. Programming through OSC[3:0] and
// the flip-flop chain follow the regulator description; counting reversals
// (rather than raw UP/DN pulses) and the clear point are this design's
// reading of it.
module lco_detector #(
  parameter int OSC_BITS = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                up,
  input  logic                dn,
  input  logic                clr,
  input  logic [OSC_BITS-1:0] osc,
  output logic                en_lock
);

  localparam int DEPTH = 2**OSC_BITS;

  logic             last_up, last_vld;
  logic [DEPTH-1:0] chain;
  logic             rev;

  assign rev = last_vld && ((up && !dn && !last_up) || (dn && !up && last_up));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_up  <= 1'b0;
      last_vld <= 1'b0;
      chain    <= '0;
    end else if (clr) begin
      last_up  <= 1'b0;
      last_vld <= 1'b0;
      chain    <= '0;
    end else begin
      if (up ^ dn) begin
        last_up  <= up;
        last_vld <= 1'b1;
      end
      if (rev) chain <= {chain[DEPTH-2:0], 1'b1};
    end
  end

  assign en_lock = chain[osc];

endmodule
