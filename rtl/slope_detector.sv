// Slope detector: a flip-flop time-to-digital converter that measures how
// fast the load voltage falls.
//
// Three comparator-triggered oscillators compare the load voltage with
// REF_L1 > REF_L2 > REF_L3. Each one's output c[i] starts toggling (at the
// oscillator rate, several GHz) once the load falls below its reference and
// is used here directly as a flip-flop clock. A thermometer chain T counts
// the c[0] edges after the REF_L1 crossing. The first c[1] edge samples T into
// S1 (T_BITS flip-flops) and the first c[2] edge samples T[S2_BITS-1:0] into
// S2. Few ones in S1 mean that the load went from REF_L1 to REF_L2 in few
// oscillator periods, i.e. a steep slope; ones missing in S2 mean that even
// REF_L3 was reached within a few periods. The counts are thermometer codes:
// slope = {S2, S1}; vld[0] / vld[1] flag that S1 / S2 hold a sample.
//
// rearm (async, active high) clears the detector; it is driven by the
// REF_L1 comparator decision, so a new measurement starts after every
// recovery above REF_L1. T stops counting once S2 has sampled.
//
// The flip-flop TDC clocked by C[0], sampled by C[1] (T[N-1] inputs) and by
// C[2] (T[3:0]) follows the description; the split of the 10-bit Slope word
// into 6 + 4 bits, the vld flags and the rearm rule are this design's
// choices.
module slope_detector #(
  parameter int T_BITS  = 6,
  parameter int S2_BITS = 4
) (
  input  logic                        rst_n,
  input  logic                        rearm,
  input  logic [2:0]                  c,
  output logic [S2_BITS+T_BITS-1:0]   slope,
  output logic [1:0]                  vld
);

  logic               clr_n;
  logic [T_BITS-1:0]  t;
  logic [T_BITS-1:0]  s1;
  logic [S2_BITS-1:0] s2;
  logic               v1, v2;

  assign clr_n = rst_n && !rearm;

  // T chain: one more turn-on bit per c[0] edge.
  always_ff @(posedge c[0] or negedge clr_n) begin
    if (!clr_n)       t <= '0;
    else if (!v2) t <= {t[T_BITS-2:0], 1'b1};
  end

  // C[1] group: capture T once.
  always_ff @(posedge c[1] or negedge clr_n) begin
    if (!clr_n) begin
      s1 <= '0;
      v1 <= 1'b0;
    end else if (!v1) begin
      s1 <= t;
      v1 <= 1'b1;
    end
  end

  // C[2] group: capture T[S2_BITS-1:0] once.
  always_ff @(posedge c[2] or negedge clr_n) begin
    if (!clr_n) begin
      s2 <= '0;
      v2 <= 1'b0;
    end else if (!v2) begin
      s2 <= t[S2_BITS-1:0];
      v2 <= 1'b1;
    end
  end

  assign slope = {s2, s1};
  assign vld   = {v2, v1};

endmodule
