// Testbench for clk_gen: checks the SHIFT strobe on a request, the minimum
// spacing of ctr_pwl+1 cycles between strobes, the direction of the SHIFTP
// pulses and their width, and the hold window of ctr_os cycles that an
// overshoot edge opens on CLK_F and CLK_C.
module tb_clk_gen;
  logic clk = 0, rst_n = 0, req_u = 0, req_d = 0, os = 0;
  logic [1:0] ctr_pwl = 0;
  logic [2:0] ctr_os = 0;
  logic shiftp_u, shiftp_d, shift, clk_c_en, clk_f_en;
  int checks = 0, failures = 0;

  clk_gen #(.PWL_BITS(2), .OS_BITS(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Held request: strobes every ctr_pwl+1 cycles.
    for (int pwl = 0; pwl < 4; pwl++) begin
      automatic int strobes = 0, pu = 0;
      ctr_pwl = 2'(pwl);
      repeat (6) @(negedge clk);
      req_u = 1;
      for (int t = 0; t < 24; t++) begin
        #1;
        if (shift) strobes++;
        if (shiftp_u) pu++;
        checks++;
        if (shift != (t % (pwl + 1) == 0) || clk_c_en != shift || shiftp_d) begin
          failures++; $display("FAIL pwl=%0d t=%0d shift=%0b", pwl, t, shift);
        end
        @(negedge clk);
      end
      req_u = 0;
      checks++;
      if (strobes != (24 + pwl) / (pwl + 1) || pu != 24) begin
        failures++; $display("FAIL pwl=%0d strobes=%0d shiftp_u cycles=%0d", pwl, strobes, pu);
      end
    end
    // Down request: SHIFTP_d for ctr_pwl+1 cycles.
    ctr_pwl = 2;
    repeat (4) @(negedge clk);
    req_d = 1; #1;
    checks++;
    if (!shift || !shiftp_d || shiftp_u) begin failures++; $display("FAIL down strobe"); end
    @(negedge clk); req_d = 0; #1;
    checks++;
    if (!shiftp_d || shift) begin failures++; $display("FAIL down pulse width 1"); end
    @(negedge clk); #1;
    checks++;
    if (!shiftp_d) begin failures++; $display("FAIL down pulse width 2"); end
    @(negedge clk); #1;
    checks++;
    if (shiftp_d) begin failures++; $display("FAIL down pulse too long"); end
    // Overshoot hold window.
    ctr_pwl = 0;
    for (int w = 1; w < 8; w += 3) begin
      ctr_os = 3'(w);
      repeat (3) @(negedge clk);
      os = 1; req_u = 1; #1;
      checks++;
      if (!clk_f_en || !clk_c_en) begin failures++; $display("FAIL enable before edge is seen"); end
      for (int t = 1; t <= w + 2; t++) begin
        @(negedge clk); #1;
        checks++;
        if (clk_f_en != (t > w) || clk_c_en != (t > w)) begin
          failures++; $display("FAIL os window w=%0d t=%0d f=%0b c=%0b", w, t, clk_f_en, clk_c_en);
        end
      end
      os = 0; req_u = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
