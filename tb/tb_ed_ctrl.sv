// Testbench for ed_ctrl: walks the sequencer through idle, linear search,
// SAR_DUMP and SAR, checks the step outputs, the fast/lock override, the
// one-cycle dump, the return to idle on sar_done and the abort to linear
// search on a new request.
module tb_ed_ctrl;
  import dldo_pkg::*;
  logic clk = 0, rst_n = 0, up = 0, dn = 0, en_fast = 0, en_lock = 0, sar_done = 0;
  logic step_up, step_dn, fast, sar_dump, sar_en, search_done;
  ed_state_t state;
  int checks = 0, failures = 0;

  ed_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input ed_state_t s, input logic su, input logic sd, input logic f,
                     input logic d, input logic e, input string what);
    checks++;
    if (state !== s || step_up !== su || step_dn !== sd || fast !== f || sar_dump !== d || sar_en !== e) begin
      failures++;
      $display("FAIL %s: state=%0d up=%0b dn=%0b fast=%0b dump=%0b en=%0b", what, state, step_up, step_dn, fast, sar_dump, sar_en);
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
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    chk(ED_IDLE, 0, 0, 0, 0, 0, "idle");
    up = 1; en_fast = 1; #1;
    chk(ED_IDLE, 1, 0, 1, 0, 0, "request steps at once");
    @(posedge clk); #1;
    chk(ED_LINEAR, 1, 0, 1, 0, 0, "linear fast");
    en_lock = 1; #1;
    chk(ED_LINEAR, 1, 0, 0, 0, 0, "lock forces normal mode");
    up = 0; dn = 1; en_fast = 0; en_lock = 0;
    @(posedge clk); #1;
    chk(ED_LINEAR, 0, 1, 0, 0, 0, "linear down");
    dn = 0;
    @(posedge clk); #1;
    chk(ED_DUMP, 0, 0, 0, 1, 0, "dump");
    @(posedge clk); #1;
    chk(ED_SAR, 0, 0, 0, 0, 1, "sar");
    @(posedge clk); #1;
    chk(ED_SAR, 0, 0, 0, 0, 1, "sar holds");
    sar_done = 1; #1;
    checks++;
    if (!search_done) begin failures++; $display("FAIL search_done"); end
    @(posedge clk); #1;
    chk(ED_IDLE, 0, 0, 0, 0, 0, "back to idle");
    sar_done = 0;
    // Abort of the SAR by a new event.
    dn = 1; @(posedge clk); #1; dn = 0;
    @(posedge clk); #1;
    chk(ED_DUMP, 0, 0, 0, 1, 0, "dump 2");
    @(posedge clk); #1;
    chk(ED_SAR, 0, 0, 0, 0, 1, "sar 2");
    up = 1; #1;
    chk(ED_SAR, 1, 0, 0, 0, 1, "event during sar");
    @(posedge clk); #1;
    chk(ED_LINEAR, 1, 0, 0, 0, 0, "abort to linear");
    // Both requests at once is not an event.
    up = 1; dn = 1; #1;
    chk(ED_LINEAR, 0, 0, 0, 0, 0, "up and dn together");
    up = 0; dn = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
