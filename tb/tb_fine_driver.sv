// Testbench for fine_driver: an integer model keeps the thermometer boundary
// (number of fine gates on) and moves it by 3, 2, 1 or 0 stages per update
// as the speed counter fills from the MSB at every change of ud. Random ud
// sequences, enable gating, counter clear and the synchronous mid-range
// reset are compared with the 64-bit code every cycle.
module tb_fine_driver;
  localparam int N = 64;
  logic clk = 0, rst_n = 0, en = 0, ud = 0, frst = 0, cnt_clr = 0;
  logic [N-1:0] f_out;
  logic [2:0] cnt;
  logic done;
  int checks = 0, failures = 0;
  int b_m, cnt_m, ud_prev;
  bit have_prev;

  fine_driver #(.N_FINE(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] code_of(input int b);   // b lower bits are 0
    return (b >= N) ? '0 : ~N'((65'd1 << b) - 1);
  endfunction

  task automatic cycle(input logic e, input logic u, input logic fr, input logic cc);
    int speed;
    en = e; ud = u; frst = fr; cnt_clr = cc;
    @(posedge clk); #1;
    speed = 3 - cnt_m;
    if (fr) begin
      b_m = N / 2; cnt_m = 0; have_prev = 0;
    end else begin
      if (e) b_m = u ? b_m + speed : b_m - speed;
      if (b_m > N) b_m = N;
      if (b_m < 0) b_m = 0;
      if (cc) begin
        cnt_m = 0; have_prev = 0;
      end else if (e) begin
        if (have_prev && int'(u) != ud_prev && cnt_m < 3) cnt_m++;
        ud_prev = u; have_prev = 1;
      end
    end
    checks++;
    if (f_out !== code_of(b_m) || int'(cnt[2]) + int'(cnt[1]) + int'(cnt[0]) != cnt_m
        || cnt !== (cnt_m == 0 ? 3'b000 : cnt_m == 1 ? 3'b100 : cnt_m == 2 ? 3'b110 : 3'b111)
        || done != (cnt_m == 3)) begin
      failures++;
      $display("FAIL f_out=%h cnt=%b expected boundary %0d cnt %0d", f_out, cnt, b_m, cnt_m);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b_m = N / 2; cnt_m = 0; ud_prev = 0; have_prev = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (f_out !== 64'hFFFFFFFF_00000000) begin failures++; $display("FAIL reset code %h", f_out); end
    rst_n = 1;
    // Full-speed run to the bottom end: 32 gates in 11 updates.
    repeat (12) cycle(1, 1, 0, 0);
    checks++;
    if (f_out !== '0) begin failures++; $display("FAIL did not reach all-on"); end
    cycle(0, 1, 1, 0);
    // Three crossings slow the driver to a stop.
    repeat (3) cycle(1, 0, 0, 0);
    repeat (3) cycle(1, 1, 0, 0);
    repeat (3) cycle(1, 0, 0, 0);
    repeat (3) cycle(1, 1, 0, 0);
    checks++;
    if (!done) begin failures++; $display("FAIL not done after three crossings"); end
    // Random traffic.
    for (int i = 0; i < 4000; i++) begin
      automatic int r = $urandom_range(0, 99);
      cycle(r < 90, $urandom_range(0, 7) < ((i / 200) % 2 ? 6 : 2), r == 95, r == 96 || r == 97);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
