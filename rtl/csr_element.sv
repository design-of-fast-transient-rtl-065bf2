// One element of the two-dimensional circular shifting register (2D-CSR).
//
// An element holds a 1-bit pointer and a 10-bit thermometer-coded counter
// (TC-CNT). Eight elements form a ring. In normal mode one update moves the
// pointer one place round the ring: on UP the element that holds the pointer
// adds a turn-on bit and hands the pointer clockwise to the next element; on
// DN the pointer comes back counter-clockwise and the element receiving it
// removes a bit. In fast-tracking mode every element adds or removes one bit
// at once and the pointer stays where it is. The element's own asynchronous
// timing controller (ATC) is represented by the update rule below: it reacts
// to the pointer of its neighbours while UP or DN is active.
//
// Timing: the silicon element is built from C-elements and updates about
// 1 ns after a neighbour changes. Here one rising edge of clk stands for one
// such update; upd_up / upd_dn must be one-hot or idle and already qualified
// (saturation is handled by csr_2d). Reset clears the counter; the element
// with IS_HOME=1 resets holding the pointer.
//
// The pointer, the 10-bit counter, the clockwise/counter-clockwise moves and
// the all-element fast update follow the description of the regulator; the
// clocked update and the reset values are this design's choices.
module csr_element #(
  parameter int  TC_BITS = 10,
  parameter bit  IS_HOME = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               upd_up,    // one step up this cycle
  input  logic               upd_dn,    // one step down this cycle
  input  logic               fast,      // fast-tracking: all elements step
  input  logic               ptr_prev,  // pointer of the counter-clockwise neighbour
  input  logic               ptr_next,  // pointer of the clockwise neighbour
  output logic               ptr,
  output logic [TC_BITS-1:0] tc_cnt
);

  logic               ptr_d;
  logic [TC_BITS-1:0] cnt_d;
  logic               inc, dec;

  always_comb begin
    ptr_d = ptr;
    inc   = 1'b0;
    dec   = 1'b0;
    if (upd_up) begin
      if (fast) inc = 1'b1;
      else begin
        inc   = ptr;
        ptr_d = ptr_prev;
      end
    end else if (upd_dn) begin
      if (fast) dec = 1'b1;
      else begin
        dec   = ptr_next;
        ptr_d = ptr_next;
      end
    end
    cnt_d = tc_cnt;
    if (inc)      cnt_d = {tc_cnt[TC_BITS-2:0], 1'b1};
    else if (dec) cnt_d = {1'b0, tc_cnt[TC_BITS-1:1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= IS_HOME;
      tc_cnt <= '0;
    end else begin
      ptr    <= ptr_d;
      tc_cnt <= cnt_d;
    end
  end

endmodule
