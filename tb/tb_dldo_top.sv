// End-to-end testbench for dldo_top at its default parameters.
//
// Both regulators run at the same time, each closed through its own
// behavioural load model and on its own clock (the event-driven design on a
// 10 ns loop clock, the slope-detector design on a 4 ns oscillator clock).
// Each gets a fixed list of load steps followed by steps drawn with
// $urandom. After every step the output must return to regulation: for the
// event-driven design back inside the comparator window and idle, for the
// slope-detector design between REF_L1 and the overshoot level, in the
// fine state with the false-lock hold released. Every cycle checks the code invariants of both
// designs (per-element thermometer words matching the count, SAR_OUTB the
// inverse of SAR_OUT, no fast tracking while locked; a thermometer coarse
// code, a frozen fine code during the false-lock hold, no fine update in
// slope compensation). Each mechanism of both designs is counted and the
// test fails if one never happened.
module tb_dldo_top;
  import dldo_pkg::*;
  // event-driven side
  logic        ed_clk = 0, ed_rst_n = 0;
  logic        ed_up, ed_dn, ed_en_fast, ed_sar_comp;
  logic [3:0]  ed_osc = 4'd2;
  logic [79:0] ed_csr_code;
  logic [6:0]  ed_csr_count;
  logic [9:0]  ed_sar_out, ed_sar_outb, ed_sar_eval;
  logic        ed_sar_dump, ed_sar_en, ed_en_lock, ed_fast;
  ed_state_t   ed_state;
  int          ed_load = 0, ed_v;
  // slope-detector side
  logic        sdc_clk = 0, sdc_rst_n = 0;
  logic [2:0]  sdc_c;
  logic        sdc_lvl_l1, sdc_ud, sdc_os;
  logic [1:0]  sdc_ctr_pwl = 2'd1;
  logic [2:0]  sdc_ctr_os = 3'd3;
  logic [31:0] sdc_ctr_c;
  logic [63:0] sdc_ctr_f;
  logic [9:0]  sdc_slope;
  logic [1:0]  sdc_slope_vld;
  logic [2:0]  sdc_fine_cnt;
  logic        sdc_fine_done, sdc_fl_hold, sdc_slope_shift;
  sdc_state_t  sdc_state;
  int          sdc_load = 32, sdc_v;

  int checks = 0, failures = 0;
  int e_norm = 0, e_fast = 0, e_lock = 0, e_dump = 0, e_eval = 0, e_abort = 0, e_up = 0, e_dn = 0;
  int s_slope = 0, s_g2 = 0, s_cu = 0, s_cd = 0, s_flu = 0, s_fld = 0, s_done = 0, s_osh = 0;
  logic [63:0] f_q;
  logic fl_q = 0, done_q = 0, vld1_q = 0;

  dldo_top dut (.*);

  ed_load_model ed_plant (
    .clk(ed_clk), .rst_n(ed_rst_n), .csr_count(ed_csr_count), .sar_out(ed_sar_out),
    .i_load(ed_load), .up(ed_up), .dn(ed_dn), .en_fast(ed_en_fast), .sar_comp(ed_sar_comp), .v(ed_v)
  );
  sdc_load_model sdc_plant (
    .clk(sdc_clk), .rst_n(sdc_rst_n), .ctr_c(sdc_ctr_c), .ctr_f(sdc_ctr_f), .i_load(sdc_load),
    .c(sdc_c), .lvl_l1(sdc_lvl_l1), .ud(sdc_ud), .os(sdc_os), .v(sdc_v)
  );

  always #5 ed_clk  = ~ed_clk;
  always #2 sdc_clk = ~sdc_clk;

  always @(posedge ed_clk) if (ed_rst_n) begin
    automatic int tot = 0;
    automatic bit therm_ok = 1;
    for (int k = 0; k < 8; k++) begin
      automatic logic [9:0] e = ed_csr_code[k*10 +: 10];
      if ((e & (e + 10'd1)) != 0) therm_ok = 0;
      tot += $countones(e);
    end
    checks++;
    if (!therm_ok || tot != int'(ed_csr_count) || ed_sar_outb !== ~ed_sar_out || (ed_fast && ed_en_lock)) begin
      failures++; $display("FAIL ED invariant at %0t", $time);
    end
    if ((ed_up ^ ed_dn) && !ed_fast) e_norm++;
    if ((ed_up ^ ed_dn) && ed_fast) e_fast++;
    if (ed_up && !ed_dn) e_up++;
    if (ed_dn && !ed_up) e_dn++;
    if (ed_en_lock && (ed_up ^ ed_dn) && ed_en_fast) e_lock++;
    if (ed_sar_dump) e_dump++;
    if (ed_sar_eval != 0) e_eval++;
    if (ed_state == ED_SAR && (ed_up ^ ed_dn)) e_abort++;
  end

  always @(posedge sdc_clk) if (sdc_rst_n) begin
    checks++;
    if ((sdc_ctr_c & (sdc_ctr_c + 32'd1)) != 0 || (fl_q && sdc_fl_hold && sdc_ctr_f !== f_q)
        || (sdc_state == SDC_SLOPE && dut.u_sdc.fine_en)) begin
      failures++; $display("FAIL SDC invariant at %0t", $time);
    end
    if ($test$plusargs("trace")) $display("t=%0t load=%0d v=%0d st=%0d c=%0d f_on=%0d cnt=%b hold=%0b os=%0b ud=%0b", $time, sdc_load, sdc_v, sdc_state, $countones(sdc_ctr_c), 64-$countones(sdc_ctr_f), sdc_fine_cnt, sdc_fl_hold, sdc_os, sdc_ud);
    if (sdc_slope_shift) s_slope++;
    if (sdc_slope_vld[1] && !vld1_q) s_g2++;
    if (dut.u_sdc.shift_u) s_cu++;
    if (dut.u_sdc.shift_d) s_cd++;
    if (sdc_fl_hold && !fl_q && dut.u_sdc.u_coarse.dir_up_d) s_flu++;
    if (sdc_fl_hold && !fl_q && !dut.u_sdc.u_coarse.dir_up_d) s_fld++;
    if (sdc_fine_done && !done_q) s_done++;
    if (!dut.u_sdc.clk_f_en) s_osh++;
    f_q    <= sdc_ctr_f;
    fl_q   <= sdc_fl_hold;
    done_q <= sdc_fine_done;
    vld1_q <= sdc_slope_vld[1];
  end

  task automatic ed_step(input int load, input string what);
    int t = 0, quiet = 0;
    ed_load = load;
    while (t < 3000 && quiet < 60) begin
      @(posedge ed_clk); t++;
      quiet = (ed_state == ED_IDLE && !ed_up && !ed_dn) ? quiet + 1 : 0;
    end
    checks++;
    if (quiet < 60) begin
      failures++; $display("FAIL ED %s: load %0d not settled, v=%0d", what, load, ed_v);
    end else
      $display("ED  %-22s load %5d settled by %4d cycles, code %0d + sar %0d", what, load, t - quiet,
               ed_csr_count, ed_sar_out);
  endtask

  task automatic sdc_step(input int load, input int ramp, input string what);
    int t = 0, quiet = 0;
    while (sdc_load != load) begin
      if (ramp == 0) sdc_load = load;
      else sdc_load = (load > sdc_load) ? ((sdc_load + ramp < load) ? sdc_load + ramp : load)
                                        : ((sdc_load - ramp > load) ? sdc_load - ramp : load);
      @(posedge sdc_clk); t++;
    end
    while (t < 4000 && quiet < 150) begin
      @(posedge sdc_clk); t++;
      quiet = (sdc_state == SDC_FINE && !sdc_fl_hold && sdc_v >= -40 && sdc_v <= 60) ? quiet + 1 : 0;
    end
    checks++;
    if (quiet < 150) begin
      failures++; $display("FAIL SDC %s: load %0d not settled, v=%0d", what, load, sdc_v);
    end else
      $display("SDC %-22s load %5d settled by %4d cycles, coarse %0d, fine cnt %b", what, load, t - quiet,
               $countones(sdc_ctr_c), sdc_fine_cnt);
  endtask

  initial begin
    repeat (400000) @(posedge sdc_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f_q = '0;
    repeat (3) @(posedge ed_clk);
    ed_rst_n = 1; sdc_rst_n = 1;
    fork
      begin
        ed_step(6000, "step up large");
        ed_step(6600, "step up small");
        ed_step(1600, "step down large");
        ed_step(9500, "step up to near full");
        ed_osc = 4'd0;
        ed_step(3000, "step down, lock");
        ed_osc = 4'd2;
        repeat (6) ed_step(1000 + int'($urandom_range(8000)), "random step");
      end
      begin
        repeat (20) @(posedge sdc_clk);
        sdc_step(192, 0, "sharp step up");
        sdc_step(420, 0, "large sharp step up");
        sdc_step(300, 0, "step down");
        sdc_step(450, 4, "ramp up");
        sdc_step(60, 0, "large step down");
        sdc_step(380, 40, "fast ramp up");
        repeat (6) sdc_step(40 + int'($urandom_range(440)), int'($urandom_range(3)) * 8, "random step");
      end
    join
    $display("ED  mechanisms: normal=%0d fast=%0d lock=%0d dump=%0d eval=%0d abort=%0d up=%0d dn=%0d",
             e_norm, e_fast, e_lock, e_dump, e_eval, e_abort, e_up, e_dn);
    $display("SDC mechanisms: slope=%0d group2=%0d coarse_up=%0d coarse_dn=%0d flock_up=%0d flock_dn=%0d fine_done=%0d os_hold=%0d",
             s_slope, s_g2, s_cu, s_cd, s_flu, s_fld, s_done, s_osh);
    checks++; if (e_norm == 0) begin failures++; $display("FAIL ED no normal linear step"); end
    checks++; if (e_fast == 0) begin failures++; $display("FAIL ED no fast-tracking step"); end
    checks++; if (e_lock == 0) begin failures++; $display("FAIL ED LCO lock never overrode fast mode"); end
    checks++; if (e_dump == 0) begin failures++; $display("FAIL ED no SAR dump"); end
    checks++; if (e_eval == 0) begin failures++; $display("FAIL ED no SAR trial"); end
    checks++; if (e_abort == 0) begin failures++; $display("FAIL ED no SAR abort"); end
    checks++; if (e_up == 0 || e_dn == 0) begin failures++; $display("FAIL ED missing up or down search"); end
    checks++; if (s_slope == 0) begin failures++; $display("FAIL SDC no slope shift"); end
    checks++; if (s_g2 == 0) begin failures++; $display("FAIL SDC REF_L3 group never sampled"); end
    checks++; if (s_cu == 0 || s_cd == 0) begin failures++; $display("FAIL SDC coarse steps missing"); end
    checks++; if (s_flu == 0 || s_fld == 0) begin failures++; $display("FAIL SDC false lock missing"); end
    checks++; if (s_done == 0) begin failures++; $display("FAIL SDC fine loop never finished"); end
    checks++; if (s_osh == 0) begin failures++; $display("FAIL SDC no overshoot hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
