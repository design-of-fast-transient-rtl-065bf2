// Closed-loop testbench for sdc_dldo with a behavioural load model.
//
// Load steps of several sizes and slopes are applied (sharp steps up, a
// ramp, steps down). After each the output must return to the band between
// REF_L1 and the overshoot level, the false-lock hold must be released and the coarse controller must
// be back in the fine state. Every cycle checks that CTR_C is a thermometer
// code, that CTR_F does not change while the false-lock replica is held,
// and that the fine latches stay disabled during slope compensation. The
// test counts each mechanism (slope shift from each detector group, coarse
// steps up and down, false lock in both directions, fine loop reaching
// CNT=111, overshoot hold window) and fails if one never happened. The
// response time (cycles from the step to the first slope shift) is printed.
module tb_sdc_dldo;
  import dldo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] c;
  logic lvl_l1, ud, os;
  logic [1:0] ctr_pwl = 2'd1;
  logic [2:0] ctr_os = 3'd3;
  logic [31:0] ctr_c;
  logic [63:0] ctr_f;
  logic [9:0] slope;
  logic [1:0] slope_vld;
  logic [2:0] fine_cnt;
  logic fine_done, fl_hold, slope_shift;
  sdc_state_t state;
  int i_load = 32, v;
  int checks = 0, failures = 0;
  int n_slope = 0, n_g2 = 0, n_cu = 0, n_cd = 0, n_flu = 0, n_fld = 0, n_done = 0, n_osh = 0;
  logic [63:0] ctr_f_q;
  logic fl_q, done_q, vld1_q;

  sdc_dldo dut (.*);
  sdc_load_model plant (.clk, .rst_n, .ctr_c, .ctr_f, .i_load, .c, .lvl_l1, .ud, .os, .v);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if ((ctr_c & (ctr_c + 32'd1)) != 0 || (fl_q && fl_hold && ctr_f !== ctr_f_q)
        || (state == SDC_SLOPE && dut.fine_en)) begin
      failures++; $display("FAIL invariant at %0t: ctr_c=%h state=%0d", $time, ctr_c, state);
    end
    if ($test$plusargs("trace"))
      $display("t=%0t load=%0d v=%0d st=%0d c=%0d f_on=%0d cnt=%b vld=%b sl=%b hold=%0b os=%0b", $time, i_load, v,
               state, $countones(ctr_c), 64 - $countones(ctr_f), fine_cnt, slope_vld, slope, fl_hold, os);
    if (slope_shift) n_slope++;
    if (slope_vld[1] && !vld1_q) n_g2++;
    if (dut.shift_u) n_cu++;
    if (dut.shift_d) n_cd++;
    if (fl_hold && !fl_q && dut.u_coarse.dir_up_d) n_flu++;
    if (fl_hold && !fl_q && !dut.u_coarse.dir_up_d) n_fld++;
    if (fine_done && !done_q) n_done++;
    if (!dut.clk_f_en) n_osh++;
    ctr_f_q <= ctr_f;
    fl_q    <= fl_hold;
    done_q  <= fine_done;
    vld1_q  <= slope_vld[1];
  end

  task automatic apply(input int load, input int ramp, input string what);
    int t = 0, quiet = 0, resp = -1, s0 = n_slope;
    while (i_load != load) begin
      if (ramp == 0) i_load = load;
      else i_load = (load > i_load) ? ((i_load + ramp < load) ? i_load + ramp : load)
                                    : ((i_load - ramp > load) ? i_load - ramp : load);
      @(posedge clk); t++;
      if (resp < 0 && n_slope != s0) resp = t;
    end
    while (t < 4000) begin
      @(posedge clk); t++;
      if (resp < 0 && n_slope != s0) resp = t;
      quiet = (state == SDC_FINE && !fl_hold && v >= -40 && v <= 60) ? quiet + 1 : 0;
      if (quiet >= 150) break;
    end
    checks++;
    if (quiet < 150) begin
      failures++; $display("FAIL %s: not settled, v=%0d state=%0d", what, v, state);
    end else
      $display("%s: load %0d, first slope shift after %0s cycles, settled by %0d, coarse %0d, fine cnt %b, v=%0d",
               what, load, resp < 0 ? "(none)" : $sformatf("%0d", resp), t - quiet, $countones(ctr_c), fine_cnt, v);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctr_f_q = '0; fl_q = 0; done_q = 0; vld1_q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    apply(192, 0, "sharp step up");
    apply(420, 0, "large sharp step up");
    apply(300, 0, "step down");
    apply(450, 4, "ramp up");
    apply(60, 0, "large step down");
    apply(380, 40, "fast ramp up");
    $display("mechanisms: slope=%0d group2=%0d coarse_up=%0d coarse_dn=%0d flock_up=%0d flock_dn=%0d fine_done=%0d os_hold=%0d",
             n_slope, n_g2, n_cu, n_cd, n_flu, n_fld, n_done, n_osh);
    checks++; if (n_slope == 0) begin failures++; $display("FAIL no slope shift"); end
    checks++; if (n_g2 == 0) begin failures++; $display("FAIL REF_L3 group never sampled"); end
    checks++; if (n_cu == 0 || n_cd == 0) begin failures++; $display("FAIL coarse steps missing"); end
    checks++; if (n_flu == 0 || n_fld == 0) begin failures++; $display("FAIL false lock missing"); end
    checks++; if (n_done == 0) begin failures++; $display("FAIL fine loop never finished"); end
    checks++; if (n_osh == 0) begin failures++; $display("FAIL no overshoot hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
