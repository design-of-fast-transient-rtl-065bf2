// Testbench for lco_detector: counts UP/DN reversals and checks that
// en_lock rises exactly after osc+1 reversals, ignores repeated requests in
// one direction, and clears on clr.
module tb_lco_detector;
  logic clk = 0, rst_n = 0, up = 0, dn = 0, clr = 0;
  logic [3:0] osc = 0;
  logic en_lock;
  int checks = 0, failures = 0;

  lco_detector #(.OSC_BITS(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic req(input logic u, input logic d);
    up = u; dn = d; @(posedge clk); #1; up = 0; dn = 0;
  endtask

  task automatic chk(input logic e, input string what);
    checks++;
    if (en_lock !== e) begin failures++; $display("FAIL %s: en_lock=%0b", what, en_lock); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int o = 0; o < 16; o += (o < 4) ? 1 : 5) begin
      osc = 4'(o);
      clr = 1; @(posedge clk); #1; clr = 0;
      chk(0, "after clr");
      // Same direction repeatedly: no reversal.
      repeat (5) req(1, 0);
      chk(0, "no reversal");
      for (int r = 1; r <= o + 1; r++) begin
        if (r % 2) req(0, 1); else req(1, 0);
        // idle cycles between requests do not count
        @(posedge clk); #1;
        chk(r == o + 1, $sformatf("osc=%0d after %0d reversals", o, r));
      end
      req(1, 1);   // both at once is not a request
      chk(1, "lock holds");
    end
    clr = 1; @(posedge clk); #1; clr = 0;
    chk(0, "final clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
