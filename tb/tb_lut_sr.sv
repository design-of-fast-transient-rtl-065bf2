// Testbench for lut_sr: a slope sample must shift CTR_C up by the table
// entry of its ones count two cycles after vld rises; coarse requests move
// CTR_C by one; the overshoot flag blocks slope samples; a slope request
// wins over a coarse request in the same cycle; the code saturates.
module tb_lut_sr;
  localparam int L1 [7] = '{12, 10, 8, 6, 4, 3, 2};
  localparam int L2 [5] = '{8, 6, 4, 3, 2};
  logic clk = 0, rst_n = 0;
  logic [9:0] slope = 0;
  logic [1:0] slope_vld = 0;
  logic shift_u = 0, shift_d = 0, os = 0;
  logic [1:0] ctr_pwl = 0;
  logic [2:0] ctr_os = 0;
  logic [31:0] ctr_c;
  logic clk_f_en, slope_busy, slope_shift;
  int checks = 0, failures = 0;
  int model;

  lut_sr dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] therm(input int n);
    return (n >= 32) ? '1 : 32'((64'd1 << n) - 1);
  endfunction

  task automatic chk(input string what);
    checks++;
    if (ctr_c !== therm(model)) begin
      failures++; $display("FAIL %s: ctr_c=%h expected %0d ones", what, ctr_c, model);
    end
  endtask

  task automatic coarse(input logic u);
    shift_u = u; shift_d = !u; @(negedge clk); shift_u = 0; shift_d = 0;
    model = u ? ((model < 32) ? model + 1 : 32) : ((model > 0) ? model - 1 : 0);
    chk(u ? "coarse up" : "coarse down");
  endtask

  task automatic slope_event(input int n1, input int n2, input bit group2, input bit blocked);
    slope = {4'((1 << n2) - 1), 6'((1 << n1) - 1)};
    slope_vld = group2 ? 2'b11 : 2'b01;
    @(negedge clk);
    chk("no change one cycle after vld");
    @(negedge clk);
    if (!blocked) begin
      model += group2 ? L2[n2] : L1[n1];
      if (model > 32) model = 32;
    end
    chk($sformatf("slope n1=%0d n2=%0d g2=%0b os=%0b", n1, n2, group2, blocked));
    slope_vld = 0; slope = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk("reset");
    for (int n = 0; n <= 6; n++) begin
      slope_event(n, 0, 0, 0);
      while (model > 0) coarse(0);
    end
    for (int n = 0; n <= 4; n++) begin
      slope_event(6, n, 1, 0);
      while (model > 0) coarse(0);
    end
    // Overshoot blocks the slope sample, coarse steps still work.
    os = 1;
    slope_event(0, 0, 0, 1);
    os = 0;
    repeat (8) @(negedge clk);
    repeat (5) coarse(1);
    // Slope wins over a simultaneous coarse step down.
    slope = 10'b0000000011; slope_vld = 2'b01;
    @(negedge clk);
    shift_d = 1;
    @(negedge clk);
    shift_d = 0;
    model += L1[2];
    chk("slope priority");
    checks++;
    if (slope_busy) begin failures++; $display("FAIL slope_busy stays high"); end
    slope_vld = 0;
    // Saturation.
    repeat (40) coarse(1);
    repeat (40) coarse(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
