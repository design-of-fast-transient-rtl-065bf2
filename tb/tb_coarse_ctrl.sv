// Testbench for coarse_ctrl: checks the slope state (fine loop disabled,
// counter cleared, exit SLOPE_HOLD cycles after the last slope shift), the
// false-lock entry conditions for both stuck ends, the fine reset pulse,
// coarse steps every COARSE_WAIT cycles in the right direction, their
// suppression during a slope shift, the release when the target is
// crossed, and the coarse-range limits (no false lock, or its release,
// when no coarse unit is left in the needed direction).
module tb_coarse_ctrl;
  import dldo_pkg::*;
  localparam int CW = 4, SH = 2;
  logic clk = 0, rst_n = 0, ud = 0, slope_busy = 0, stuck_lo = 0, stuck_hi = 0, c_full = 0, c_empty = 0;
  logic shift_u, shift_d, fine_en, fine_rst, cnt_clr, fl_hold;
  sdc_state_t state;
  int checks = 0, failures = 0;

  coarse_ctrl #(.COARSE_WAIT(CW), .SLOPE_HOLD(SH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input sdc_state_t s, input string what);
    checks++;
    if (state !== s || fine_en !== (s != SDC_SLOPE) || fl_hold !== (s == SDC_FLOCK)
        || cnt_clr !== (s == SDC_SLOPE)) begin
      failures++; $display("FAIL %s: state=%0d en=%0b hold=%0b", what, state, fine_en, fl_hold);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; #1;
    chk(SDC_FINE, "reset");
    // Slope compensation.
    slope_busy = 1; @(negedge clk); slope_busy = 0; #1;
    chk(SDC_SLOPE, "slope");
    repeat (SH) begin @(negedge clk); #1; chk(SDC_SLOPE, "slope hold"); end
    @(negedge clk); #1;
    chk(SDC_FINE, "slope over");
    // Stuck low but load above target: no false lock.
    stuck_lo = 1; ud = 0; @(negedge clk); #1;
    chk(SDC_FINE, "stuck low, load high");
    for (int dir = 1; dir >= 0; dir--) begin
      automatic int ups = 0, dns = 0, steps_at[$];
      stuck_lo = dir; stuck_hi = !dir; ud = dir; #1;
      checks++;
      if (!fine_rst) begin failures++; $display("FAIL fine_rst pulse"); end
      @(negedge clk); stuck_lo = 0; stuck_hi = 0; #1;
      chk(SDC_FLOCK, "false lock");
      for (int t = 0; t < 20; t++) begin
        if (t == 9) slope_busy = 1;
        if (t == 12) slope_busy = 0;
        #1;
        if (shift_u) begin ups++; steps_at.push_back(t); end
        if (shift_d) begin dns++; steps_at.push_back(t); end
        checks++;
        if (fine_rst) begin failures++; $display("FAIL extra fine_rst"); end
        @(negedge clk);
      end
      // steps at t=0,4,8, suppressed at 12 by slope, then 12,16 once busy clears
      checks++;
      if ((dir ? ups : dns) != 5 || (dir ? dns : ups) != 0 || steps_at[1] - steps_at[0] != CW) begin
        failures++; $display("FAIL coarse steps dir=%0d ups=%0d dns=%0d", dir, ups, dns);
      end
      ud = !dir; @(negedge clk); #1;
      chk(SDC_FINE, "target crossed, released");
    end
    // Coarse range used up: no false lock at the matching end ...
    for (int dir = 1; dir >= 0; dir--) begin
      c_full = dir; c_empty = !dir; stuck_lo = dir; stuck_hi = !dir; ud = dir; #1;
      checks++;
      if (fine_rst || shift_u || shift_d) begin failures++; $display("FAIL action at range end dir=%0d", dir); end
      @(negedge clk); #1;
      chk(SDC_FINE, "no false lock at range end");
      c_full = 0; c_empty = 0; stuck_lo = 0; stuck_hi = 0; ud = 0; #1;
    end
    // ... and release once the last unit has been stepped.
    stuck_hi = 1; ud = 0; @(negedge clk); stuck_hi = 0; #1;
    chk(SDC_FLOCK, "false lock down");
    repeat (2) @(negedge clk);
    c_empty = 1; @(negedge clk); #1;
    chk(SDC_FINE, "released at empty coarse code");
    c_empty = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
