// Testbench for csr_element: drives one element with hand-made neighbour
// pointers and checks the pointer hand-over, thermometer increment and
// decrement, fast-mode update and saturation against expected values.
module tb_csr_element;
  logic clk = 0, rst_n = 0;
  logic upd_up = 0, upd_dn = 0, fast = 0, ptr_prev = 0, ptr_next = 0;
  logic ptr;
  logic [9:0] tc_cnt;
  int checks = 0, failures = 0;

  csr_element #(.TC_BITS(10), .IS_HOME(1'b1)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic e_ptr, input logic [9:0] e_cnt, input string what);
    checks++;
    if (ptr !== e_ptr || tc_cnt !== e_cnt) begin
      failures++;
      $display("FAIL %s: ptr=%0b cnt=%b expected ptr=%0b cnt=%b", what, ptr, tc_cnt, e_ptr, e_cnt);
    end
  endtask

  task automatic step(input logic u, input logic d, input logic f, input logic pp, input logic pn);
    upd_up = u; upd_dn = d; fast = f; ptr_prev = pp; ptr_next = pn;
    @(posedge clk); #1;
    upd_up = 0; upd_dn = 0; fast = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 chk(1'b1, 10'b0, "in reset");   // asynchronous reset holds counter at 0
    rst_n = 1; #1;
    chk(1'b1, 10'b0, "home element after reset");
    // UP with pointer here: add one bit, pointer leaves (prev had none).
    step(1, 0, 0, 0, 0);
    chk(1'b0, 10'b0000000001, "up with pointer");
    // UP without pointer, prev holds pointer: pointer arrives, no bit.
    step(1, 0, 0, 1, 0);
    chk(1'b1, 10'b0000000001, "pointer arrives clockwise");
    // DN: the element behind the pointer shrinks; here next holds it.
    step(0, 1, 0, 0, 1);
    chk(1'b1, 10'b0000000000, "dn: pointer comes back, bit removed");
    // DN with pointer here and no pointer next: pointer leaves, no change.
    step(0, 1, 0, 0, 0);
    chk(1'b0, 10'b0000000000, "dn: pointer moves away");
    // Fast mode: every element steps, pointer stays.
    for (int i = 1; i <= 12; i++) begin
      step(1, 0, 1, 1, 1);
      chk(1'b0, (i >= 10) ? 10'h3FF : 10'((1 << i) - 1), "fast up");
    end
    for (int i = 9; i >= -2; i--) begin
      step(0, 1, 1, 1, 1);
      chk(1'b0, (i <= 0) ? 10'h000 : 10'((1 << i) - 1), "fast dn");
    end
    // Idle: nothing changes.
    step(0, 0, 0, 1, 1);
    chk(1'b0, 10'h000, "idle holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
