// Closed-loop testbench for ed_dldo with a behavioural load model.
//
// A sequence of load steps (up and down, large and small) is applied. For
// each one the regulator must bring the output back inside the comparator
// window and end idle with the SAR finished. Every cycle checks that the
// CSR word is a per-element thermometer matching csr_count, that SAR_OUTB
// is the inverse of SAR_OUT, and that fast-tracking is never used while the
// LCO detector is locked. The test counts each mechanism (normal and fast
// linear steps, LCO lock, SAR dump, SAR bit trials, SAR abort) and fails if
// one never happened. Recovery time (cycles until the output is back in the
// window) is printed for each step.
module tb_ed_dldo;
  import dldo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic up, dn, en_fast, sar_comp;
  logic [3:0] osc = 4'd2;
  logic [79:0] csr_code;
  logic [6:0] csr_count;
  logic [9:0] sar_out, sar_outb, sar_eval;
  logic sar_dump, sar_en, en_lock, fast;
  ed_state_t state;
  int i_load = 0, v;
  int checks = 0, failures = 0;
  int n_norm = 0, n_fast = 0, n_lock = 0, n_dump = 0, n_eval = 0, n_abort = 0, n_up = 0, n_dn = 0;

  ed_dldo dut (.*);
  ed_load_model plant (.clk, .rst_n, .csr_count, .sar_out, .i_load, .up, .dn, .en_fast, .sar_comp, .v);

  always #5 clk = ~clk;

  // Per-cycle invariants and mechanism counters.
  always @(posedge clk) if (rst_n) begin
    automatic int tot = 0;
    automatic bit therm_ok = 1;
    for (int k = 0; k < 8; k++) begin
      automatic logic [9:0] e = csr_code[k*10 +: 10];
      if ((e & (e + 10'd1)) != 0) therm_ok = 0;
      for (int b = 0; b < 10; b++) tot += int'(e[b]);
    end
    checks++;
    if (!therm_ok || tot != int'(csr_count) || sar_outb !== ~sar_out || (fast && en_lock)) begin
      failures++; $display("FAIL invariant at %0t: count=%0d tot=%0d", $time, csr_count, tot);
    end
    if ((up ^ dn) && !fast) n_norm++;
    if ((up ^ dn) && fast) n_fast++;
    if (up && !dn) n_up++;
    if (dn && !up) n_dn++;
    if (en_lock && (up ^ dn) && en_fast) n_lock++;
    if (sar_dump) n_dump++;
    if (sar_eval != 0) n_eval++;
    if (state == ED_SAR && (up ^ dn)) n_abort++;
  end

  task automatic settle(input int load, input string what);
    int t = 0, rec = -1, quiet = 0;
    i_load = load;
    @(posedge clk);
    while (t < 3000) begin
      @(posedge clk); t++;
      if (rec < 0 && t > 3 && !up && !dn) rec = t;
      quiet = (state == ED_IDLE && !up && !dn) ? quiet + 1 : 0;
      if (quiet >= 60) break;
    end
    checks++;
    if (state != ED_IDLE || up || dn) begin
      failures++; $display("FAIL %s: not settled, v=%0d state=%0d", what, v, state);
    end else
      $display("%s: load %0d, back in window after %0d cycles, quiet since %0d, code %0d + sar %0d, v=%0d",
               what, load, rec, t - quiet, csr_count, sar_out, v);
    repeat (20) @(posedge clk);
    checks++;
    if (state != ED_IDLE) begin failures++; $display("FAIL %s: left idle without an event", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    settle(6000, "step up large");
    settle(6600, "step up small");
    settle(1600, "step down large");
    settle(9500, "step up to near full");
    osc = 4'd0;
    settle(3000, "step down, lock after one reversal");
    settle(5200, "step up");
    $display("mechanisms: normal=%0d fast=%0d lock=%0d dump=%0d eval=%0d abort=%0d up=%0d dn=%0d",
             n_norm, n_fast, n_lock, n_dump, n_eval, n_abort, n_up, n_dn);
    checks++; if (n_norm == 0) begin failures++; $display("FAIL no normal linear step"); end
    checks++; if (n_fast == 0) begin failures++; $display("FAIL no fast-tracking step"); end
    checks++; if (n_lock == 0) begin failures++; $display("FAIL LCO lock never overrode fast mode"); end
    checks++; if (n_dump == 0) begin failures++; $display("FAIL no SAR dump"); end
    checks++; if (n_eval == 0) begin failures++; $display("FAIL no SAR trial"); end
    checks++; if (n_up == 0 || n_dn == 0) begin failures++; $display("FAIL missing up or down search"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
