// Testbench for false_lock: checks stuck detection at both ends, that the
// replica of the stuck code stays on ctr_f while hold is high even though
// the driver code changes, and that the driver code returns after release.
module tb_false_lock;
  logic clk = 0, rst_n = 0, hold = 0;
  logic [63:0] f_out = 64'hFFFFFFFF_00000000;
  logic [63:0] ctr_f;
  logic stuck_lo, stuck_hi;
  int checks = 0, failures = 0;

  false_lock #(.N_FINE(64)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic [63:0] e, input logic lo, input logic hi, input string what);
    checks++;
    if (ctr_f !== e || stuck_lo !== lo || stuck_hi !== hi) begin
      failures++; $display("FAIL %s: ctr_f=%h lo=%0b hi=%0b", what, ctr_f, stuck_lo, stuck_hi);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 chk(64'hFFFFFFFF_00000000, 0, 0, "pass through");
    for (int side = 0; side < 2; side++) begin
      automatic logic [63:0] stuck = side ? '1 : '0;
      f_out = stuck; #1;
      chk(stuck, !side, side, "stuck detected");
      @(negedge clk); hold = 1; #1;
      chk(stuck, !side, side, "first hold cycle");
      @(negedge clk); f_out = 64'hFFFFFFFF_00000000; #1;
      chk(stuck, 0, 0, "replica while driver resets");
      repeat (5) begin
        @(negedge clk); f_out = {$urandom, $urandom}; #1;
        checks++;
        if (ctr_f !== stuck) begin failures++; $display("FAIL replica lost"); end
      end
      hold = 0;
      @(negedge clk); f_out = 64'h0000FFFF_FFFF0000; #1;
      chk(64'h0000FFFF_FFFF0000, 0, 0, "released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
