// Testbench for csr_2d (ALSC ring): random UP/DN/fast steps compared cycle
// by cycle with an integer model of eight counters and a pointer; also
// checks that one update takes one cycle and that fast mode moves the code
// by eight units.
module tb_csr_2d;
  localparam int N = 8, TB = 10;
  logic clk = 0, rst_n = 0;
  logic step_up = 0, step_dn = 0, fast = 0;
  logic [N*TB-1:0] code;
  logic [6:0] count;
  logic [TB-1:0] tc_cnt0;
  logic [N-1:0] ptr;
  logic full, empty;
  int checks = 0, failures = 0;
  int cnt_m [N];
  int p_m;

  csr_2d #(.N_CSR(N), .TC_BITS(TB)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [TB-1:0] therm(input int n);
    return TB'((1 << n) - 1);
  endfunction

  task automatic model_step(input logic u, input logic d, input logic f);
    bit all_full = 1, all_empty = 1;
    foreach (cnt_m[k]) begin
      if (cnt_m[k] != TB) all_full = 0;
      if (cnt_m[k] != 0) all_empty = 0;
    end
    if (u && !d) begin
      if (f) begin
        if (!all_full) foreach (cnt_m[k]) if (cnt_m[k] < TB) cnt_m[k]++;
      end else if (cnt_m[p_m] < TB) begin
        cnt_m[p_m]++;
        p_m = (p_m + 1) % N;
      end
    end else if (d && !u) begin
      if (f) begin
        if (!all_empty) foreach (cnt_m[k]) if (cnt_m[k] > 0) cnt_m[k]--;
      end else if (cnt_m[(p_m + N - 1) % N] > 0) begin
        p_m = (p_m + N - 1) % N;
        cnt_m[p_m]--;
      end
    end
  endtask

  task automatic compare(input string what);
    int tot = 0;
    checks++;
    foreach (cnt_m[k]) begin
      tot += cnt_m[k];
      if (code[k*TB +: TB] !== therm(cnt_m[k])) begin
        failures++;
        $display("FAIL %s: element %0d = %b, expected %0d ones", what, k, code[k*TB +: TB], cnt_m[k]);
        return;
      end
    end
    if (int'(count) != tot || ptr !== N'(1 << p_m) || tc_cnt0 !== therm(cnt_m[0])) begin
      failures++;
      $display("FAIL %s: count=%0d ptr=%b expected %0d / pointer %0d", what, count, ptr, tot, p_m);
    end
  endtask

  task automatic do_step(input logic u, input logic d, input logic f);
    step_up = u; step_dn = d; fast = f;
    @(posedge clk); #1;
    model_step(u, d, f);
    compare("step");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (cnt_m[k]) cnt_m[k] = 0;
    p_m = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    compare("reset");
    // Normal mode fills the ring evenly: 13 ups -> 5 elements with 2, 3 with 1.
    repeat (13) do_step(1, 0, 0);
    checks++;
    if (count != 13 || code[0 +: TB] != 10'b11 || code[7*TB +: TB] != 10'b1) begin
      failures++; $display("FAIL even fill");
    end
    // One fast step adds eight units in a single cycle.
    begin
      int prev_cnt;
      prev_cnt = count;
      do_step(1, 0, 1);
      checks++;
      if (int'(count) != prev_cnt + N) begin failures++; $display("FAIL fast +8"); end
    end
    // Random traffic including saturation at both ends.
    for (int i = 0; i < 3000; i++) begin
      automatic int r = $urandom_range(0, 99);
      automatic logic bias = (i / 500) % 2 == 0;
      automatic logic u = (r < 45) ? bias : (r < 90) ? !bias : 1'b1;
      automatic logic d = (r < 45) ? !bias : (r < 90) ? bias : (r < 95);
      do_step(u, d, $urandom_range(0, 3) == 0);
    end
    // Drive to full and empty.
    repeat (100) do_step(1, 0, 0);
    checks++; if (!full || count != 80) begin failures++; $display("FAIL full"); end
    repeat (100) do_step(0, 1, 1);
    checks++; if (!empty || count != 0) begin failures++; $display("FAIL empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
