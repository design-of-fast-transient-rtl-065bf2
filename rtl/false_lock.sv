// False-lock filter between the fine latch driver and the fine pass gates.
//
// It flags a fine code stuck at either end of its range (stuck_lo: all
// zeros, every fine gate on; stuck_hi: all ones, every gate off). While the
// coarse controller raises hold, the filter disconnects the latch driver
// and keeps a replica of the code captured when hold rose on the pass
// gates, so the fine latches can be reset and run without disturbing the
// output. When hold falls the driver's code is passed through again.
//
// Timing: the replica is registered on the clk edge where hold is first
// seen and drives ctr_f from the next cycle until one cycle after hold
// falls; in the first hold cycle ctr_f still shows the driver's (stuck)
// code, so the pass gates see no gap. Detection of both stuck ends, the
// replica and its release follow the description; the registered replica
// and the one-cycle overlaps are this design's choices.
module false_lock #(
  parameter int N_FINE = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_FINE-1:0] f_out,
  input  logic              hold,
  output logic [N_FINE-1:0] ctr_f,
  output logic              stuck_lo,
  output logic              stuck_hi
);

  logic [N_FINE-1:0] replica;
  logic              hold_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_q  <= 1'b0;
      replica <= '0;
    end else begin
      hold_q <= hold;
      if (hold && !hold_q) replica <= f_out;
    end
  end

  assign ctr_f    = hold_q ? replica : f_out;
  assign stuck_lo = (f_out == '0);
  assign stuck_hi = (f_out == '1);

endmodule
