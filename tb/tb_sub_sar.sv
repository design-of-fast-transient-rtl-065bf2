// Testbench for sub_sar: a comparator model answers "output below reference"
// when the trial word does not exceed a hidden target. For random targets
// and random CSR[0] thermometer counts it checks the final word (largest
// word within the subrange not above the target), the number of cycles
// ((1+SETTLE) per turned-on bit), that SAR_EVAL is one-hot on the bit under
// test, walks from the top of the subrange down, and that SAR_OUTB is the
// inverse of SAR_OUT.
module tb_sub_sar;
  localparam int SETTLE = 2;
  logic clk = 0, rst_n = 0, dump = 0, en = 0, comp;
  logic [9:0] tc_cnt = 0, step, sar_eval, sar_out, sar_outb;
  logic done;
  int checks = 0, failures = 0;
  int target;

  sub_sar #(.SAR_BITS(10), .SETTLE(SETTLE)) dut (.*);

  always #5 clk = ~clk;
  assign comp = (int'(sar_out) <= target);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      automatic int n = (it < 11) ? it : $urandom_range(0, 10);
      automatic int cycles = 0, expect_word, last_bit = 10;
      automatic bit order_ok = 1, eval_ok = 1;
      target = $urandom_range(0, 1023);
      tc_cnt = 10'((1 << n) - 1);
      @(negedge clk); dump = 1; @(negedge clk); dump = 0;
      checks++;
      if (step !== tc_cnt || sar_out !== 0) begin
        failures++; $display("FAIL dump: step=%b", step);
      end
      en = 1;
      while (!done) begin
        @(posedge clk); #1;
        cycles++;
        if (sar_eval != 0) begin
          if (!$onehot(sar_eval)) eval_ok = 0;
          for (int b = 0; b < 10; b++) if (sar_eval[b]) begin
            if (b > last_bit) order_ok = 0;
            last_bit = b;
            if (!sar_out[b]) eval_ok = 0;   // trial bit must be on
          end
        end
        if (cycles > 100) break;
      end
      en = 0;
      expect_word = (target >= (1 << n)) ? (1 << n) - 1 : target;
      checks++;
      if (int'(sar_out) != expect_word) begin
        failures++; $display("FAIL n=%0d target=%0d word=%0d expected %0d", n, target, sar_out, expect_word);
      end
      checks++;
      if (cycles != n * (1 + SETTLE)) begin
        failures++; $display("FAIL n=%0d took %0d cycles, expected %0d", n, cycles, n * (1 + SETTLE));
      end
      checks++;
      if (!order_ok || !eval_ok || sar_outb !== ~sar_out) begin
        failures++; $display("FAIL n=%0d eval order/one-hot/outb", n);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
