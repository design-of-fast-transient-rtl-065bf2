// Workload testbench: the load steps used to evaluate both regulators,
// run through dldo_top at its default parameters with the behavioural
// plants.
//
// Currents are scaled to the plants' units by taking the full-load current
// of each regulator (200 mA) as all pass gates on: 80 x 128 + 1023 units for
// the event-driven design, 32 x 16 + 64 units for the slope-detector
// design. One event-driven update stands for about 1 ns, one CMP_CLK cycle
// for 0.25 ns (4 GHz).
//
// Event-driven design:
//   * 104.2 mA step within one update;
//   * 28.2 mA step;
//   * 101.6 mA over 10 updates and 70 mA within one update, each run twice,
//     with and without fast tracking.
// For each, the cycles until the output is back inside the window are
// printed. The test checks that every step recovers, and that fast
// tracking recovers the large steps in fewer updates than single steps do.
//
// Slope-detector design: 150 mA up within 2 ns (8 cycles), then 150 mA
// down. The test checks that the slope compensation of the step up acts
// within 8 cycles (2 ns) of the start of the step, and that the loop
// settles after both steps. The first coarse action (the slope shift going
// up, a coarse step going down) and the settling cycles are printed.
// The plant constants are abstract, so only the control-logic latencies are
// meaningful.
module tb_workloads;
  import dldo_pkg::*;
  localparam int ED_FULL = 80 * 128 + 1023;
  localparam int SDC_FULL = 32 * 16 + 64;

  logic        ed_clk = 0, ed_rst_n = 0;
  logic        ed_up, ed_dn, ed_en_fast_raw, ed_en_fast, ed_sar_comp;
  logic [3:0]  ed_osc = 4'd2;
  logic [79:0] ed_csr_code;
  logic [6:0]  ed_csr_count;
  logic [9:0]  ed_sar_out, ed_sar_outb, ed_sar_eval;
  logic        ed_sar_dump, ed_sar_en, ed_en_lock, ed_fast;
  ed_state_t   ed_state;
  int          ed_load = 0, ed_v;
  bit          allow_fast = 1;

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

  assign ed_en_fast = ed_en_fast_raw && allow_fast;

  dldo_top dut (.*);
  ed_load_model ed_plant (
    .clk(ed_clk), .rst_n(ed_rst_n), .csr_count(ed_csr_count), .sar_out(ed_sar_out),
    .i_load(ed_load), .up(ed_up), .dn(ed_dn), .en_fast(ed_en_fast_raw), .sar_comp(ed_sar_comp), .v(ed_v)
  );
  sdc_load_model sdc_plant (
    .clk(sdc_clk), .rst_n(sdc_rst_n), .ctr_c(sdc_ctr_c), .ctr_f(sdc_ctr_f), .i_load(sdc_load),
    .c(sdc_c), .lvl_l1(sdc_lvl_l1), .ud(sdc_ud), .os(sdc_os), .v(sdc_v)
  );

  always #5 ed_clk  = ~ed_clk;
  always #2 sdc_clk = ~sdc_clk;

  function automatic int ed_ma(input real ma);
    return int'(ma / 200.0 * ED_FULL);
  endfunction

  function automatic int sdc_ma(input real ma);
    return int'(ma / 200.0 * SDC_FULL);
  endfunction

  // Apply a load change over `edge_n` updates; return the update count until
  // the output is back in the window, and wait until the search is over.
  task automatic ed_run(input int from, input int to, input int edge_n, input string what, output int rec);
    int t = 0, quiet = 0;
    ed_load = from;
    repeat (200) @(posedge ed_clk);
    rec = -1;
    for (int k = 1; k <= edge_n; k++) begin
      ed_load = from + (to - from) * k / edge_n;
      @(posedge ed_clk); t++;
    end
    while (t < 3000 && quiet < 60) begin
      @(posedge ed_clk); t++;
      if (rec < 0 && !ed_up && !ed_dn) rec = t;
      quiet = (ed_state == ED_IDLE && !ed_up && !ed_dn) ? quiet + 1 : 0;
    end
    checks++;
    if (quiet < 60) begin
      failures++; $display("FAIL ED %s: not settled, v=%0d", what, ed_v);
    end else
      $display("ED  %-36s %5d -> %5d units: back in window after %0d updates, settled after %0d",
               what, from, to, rec, t - quiet);
  endtask

  task automatic sdc_run(input int to, input int edge_n, input bit up_step, input string what);
    int t = 0, quiet = 0, first = -1, from = sdc_load;
    int s0 = 0;
    for (int k = 1; k <= edge_n; k++) begin
      sdc_load = from + (to - from) * k / edge_n;
      @(posedge sdc_clk); t++;
      if (first < 0 && (up_step ? sdc_slope_shift : dut.u_sdc.shift_d)) first = t;
    end
    while (t < 4000 && quiet < 150) begin
      @(posedge sdc_clk); t++;
      if (first < 0 && (up_step ? sdc_slope_shift : dut.u_sdc.shift_d)) first = t;
      quiet = (sdc_state == SDC_FINE && !sdc_fl_hold && sdc_v >= -40 && sdc_v <= 60) ? quiet + 1 : 0;
    end
    s0 = t - quiet;
    checks++;
    if (quiet < 150) begin
      failures++; $display("FAIL SDC %s: not settled, v=%0d", what, sdc_v);
    end else
      $display("SDC %-36s %4d -> %4d units: first coarse action after %0d cycles, settled after %0d cycles",
               what, from, to, first, s0);
    checks++;
    if (up_step && (first < 0 || first > 8)) begin
      failures++; $display("FAIL SDC %s: first coarse action after %0d cycles (limit 8)", what, first);
    end
  endtask

  initial begin
    repeat (400000) @(posedge sdc_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge ed_clk);
    ed_rst_n = 1; sdc_rst_n = 1;
    fork
      begin
        int r, r_fast, r_slow;
        ed_run(ed_ma(5.0), ed_ma(109.2), 1, "104.2 mA step, edge < 1 ns", r);
        ed_run(ed_ma(5.0), ed_ma(33.2), 1, "28.2 mA step", r);
        for (int m = 0; m < 2; m++) begin
          allow_fast = 1;
          ed_run(ed_ma(5.0), ed_ma(5.0) + ed_ma(m ? 70.0 : 101.6), m ? 1 : 10,
                 m ? "70 mA/1 ns, fast tracking on" : "101.6 mA/10 ns, fast tracking on", r_fast);
          allow_fast = 0;
          ed_run(ed_ma(5.0), ed_ma(5.0) + ed_ma(m ? 70.0 : 101.6), m ? 1 : 10,
                 m ? "70 mA/1 ns, fast tracking off" : "101.6 mA/10 ns, fast tracking off", r_slow);
          allow_fast = 1;
          checks++;
          if (!(r_fast > 0 && r_fast < r_slow)) begin
            failures++; $display("FAIL ED fast tracking did not shorten recovery (%0d vs %0d)", r_fast, r_slow);
          end
        end
      end
      begin
        repeat (200) @(posedge sdc_clk);
        sdc_run(32 + sdc_ma(150.0), 8, 1, "150 mA step up, edge 2 ns");
        repeat (200) @(posedge sdc_clk);
        sdc_run(32, 8, 0, "150 mA step down, edge 2 ns");
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
