// Bi-directional latch-based driver of the fine-control loop.
//
// N_FINE set/reset latch stages drive the unary fine pass gates (f_out[n] =
// 0: gate n on). The code is a thermometer: stages below the boundary are 0,
// stages above it are 1. Each stage looks at its three lower neighbours
// (reset path) and its three upper neighbours (set path). With ud = 1 (load
// below target) stage n is reset when any enabled lower tap is 0; with
// ud = 0 it is set when any enabled upper tap is 1. With all three taps
// enabled the boundary therefore moves three stages per update, in either
// direction.
//
// A 3-bit counter CNT sets the speed: every crossing of the target (a
// change of ud between two enabled updates) fills CNT with one more 1 from the MSB (000, 100, 110,
// 111). CNT[2] disables the farthest tap, CNT[1] the middle one, CNT[0] the
// nearest one, so the boundary moves 3, 2, 1 and finally 0 stages per
// update; at 111 the fine regulation is finished (done). A disabled tap
// reads as "no information", which is the MUX forcing a constant in the
// stage.
//
// Reset (rst_n, and the synchronous frst) loads the mid-range code, upper
// half 1 and lower half 0 (64'hFFFFFFFF_00000000 at the default size), and
// clears CNT; cnt_clr clears only CNT. Taps beyond the ends read 0 below
// stage 0 and 1 above the top stage. Timing: the silicon latches ripple
// asynchronously at gate speed; here one clk edge (with en high) is one
// latch update. The 64 stages, three taps per side, the 3-bit speed counter
// filling from the MSB and the mid-range reset code follow the description;
// the tap-to-CNT-bit order and the clocked update are this design's
// choices.
module fine_driver #(
  parameter int N_FINE = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              ud,
  input  logic              frst,
  input  logic              cnt_clr,
  output logic [N_FINE-1:0] f_out,
  output logic [2:0]        cnt,
  output logic              done
);

  localparam logic [N_FINE-1:0] MID = {{(N_FINE - N_FINE/2){1'b1}}, {(N_FINE/2){1'b0}}};

  logic [N_FINE-1:0] f_d;
  logic              ud_q, ud_vld;

  // Tap k (1..3) is enabled while CNT[k-1] is 0.
  always_comb begin
    for (int n = 0; n < N_FINE; n++) begin
      logic lo_all1, hi_all0;
      lo_all1 = 1'b1;
      hi_all0 = 1'b1;
      for (int k = 1; k <= 3; k++) begin
        logic lo, hi;
        lo = (n - k >= 0)     ? f_out[(n - k >= 0) ? n - k : 0] : 1'b0;
        hi = (n + k < N_FINE) ? f_out[(n + k < N_FINE) ? n + k : 0] : 1'b1;
        lo_all1 &= cnt[k-1] | lo;     // MUX: constant 1 when disabled
        hi_all0 &= cnt[k-1] | !hi;    // same MUX on the inverted upper taps
      end
      f_d[n] = f_out[n];
      if (en && ud && !lo_all1)  f_d[n] = 1'b0;   // reset path
      if (en && !ud && !hi_all0) f_d[n] = 1'b1;   // set path
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_out <= MID;
      cnt    <= '0;
      ud_q   <= 1'b0;
      ud_vld <= 1'b0;
    end else if (frst) begin
      f_out  <= MID;
      cnt    <= '0;
      ud_vld <= 1'b0;
    end else begin
      f_out <= f_d;
      if (cnt_clr) begin
        cnt    <= '0;
        ud_vld <= 1'b0;
      end else if (en) begin
        ud_q   <= ud;
        ud_vld <= 1'b1;
        if (ud_vld && ud != ud_q) cnt <= {1'b1, cnt[2:1]};
      end
    end
  end

  assign done = (cnt == 3'b111);

endmodule
