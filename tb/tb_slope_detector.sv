// Testbench for slope_detector: the three oscillator outputs are modelled as
// the base clock gated by "load below REF_Li" flags. For every combination
// of delays between the REF_L1, REF_L2 and REF_L3 crossings it checks that S1
// holds min(n,6) ones and S2 min(m,4) ones (n, m = oscillator periods
// after the REF_L1 crossing), the valid flags, that the samples are not
// overwritten by later edges, and that rearm clears everything.
module tb_slope_detector;
  logic clk = 0, rst_n = 0, rearm = 0;
  logic [2:0] below = 0, c;
  logic [9:0] slope;
  logic [1:0] vld;
  int checks = 0, failures = 0;

  slope_detector #(.T_BITS(6), .S2_BITS(4)) dut (.*);

  always #5 clk = ~clk;
  assign c = {3{clk}} & below;

  function automatic int ones(input logic [9:0] v, input int lo, input int n);
    int s = 0;
    for (int b = lo; b < lo + n; b++) s += int'(v[b]);
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n <= 8; n++) begin
      for (int m = n; m <= n + 6; m += 2) begin
        @(negedge clk); rearm = 1; below = 0;
        @(negedge clk); rearm = 0;
        checks++;
        if (vld != 0 || slope != 0) begin failures++; $display("FAIL rearm"); end
        for (int t = 0; t <= m + 3; t++) begin
          if (t == 0) below[0] = 1;
          if (t == n) below[1] = 1;
          if (t == m) below[2] = 1;
          @(negedge clk);
        end
        checks++;
        if (vld != 2'b11) begin failures++; $display("FAIL vld n=%0d m=%0d: %b", n, m, vld); end
        checks++;
        if (ones(slope, 0, 6) != ((n < 6) ? n : 6) || slope[5:0] != 6'((1 << ((n < 6) ? n : 6)) - 1)) begin
          failures++; $display("FAIL S1 n=%0d: %b", n, slope[5:0]);
        end
        checks++;
        if (ones(slope, 6, 4) != ((m < 4) ? m : 4)) begin
          failures++; $display("FAIL S2 n=%0d m=%0d: %b", n, m, slope[9:6]);
        end
        // Samples hold while the oscillators keep running.
        repeat (5) @(negedge clk);
        checks++;
        if (ones(slope, 0, 6) != ((n < 6) ? n : 6)) begin failures++; $display("FAIL S1 hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
