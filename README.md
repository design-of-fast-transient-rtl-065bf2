# Fast-transient digital LDO controllers

A digital low-dropout regulator (DLDO) turns pass transistors on and off
to supply a load. Its weak point is a sudden load step. A regulator clocked
at a few hundred MHz needs tens of cycles to add enough current, and the
output droops in the meantime. This repository holds the digital
controllers of two regulators that attack that problem in different ways:

* **Event-driven two-step search** (`ed_dldo`). This one is meant for memory
  arrays with a slow system clock and a small on-chip capacitor. A
  continuous-time window comparator starts the loop the moment the output
  leaves the window, so no clock edge is waited for. A linear search then
  runs in a ring of thermometer counters, and it can move one unit or eight
  units per update. A subrange SAR then trims the rest with only as many
  binary steps as the linear search left open.
* **Slope detector with multi-step control** (`sdc_dldo`). This one is meant
  for digital loads whose current jumps at every clock edge. Comparators that
  oscillate at several GHz measure how fast the output falls. A look-up table
  turns that slope into one large jump of the coarse code. A bi-directional
  latch chain then trims the remainder and slows down at every crossing of
  the target until it stops. When the fine range runs out, a "false lock"
  parks a replica of the stuck fine code on the gates while the coarse code
  steps.

`dldo_top` instantiates both controllers side by side. They share nothing.
Comparators, oscillators, pass gates and output capacitors are analog and
are not in the RTL; they connect through ports. The testbenches close the
loops with small behavioural plant models.

## Event-driven regulator (`ed_dldo`)

```
 up/dn/en_fast ──> ed_ctrl ──step──> csr_2d (8 x csr_element) ──> csr_code[79:0]
                     │   └─fast──────┘   │ tc_cnt0 (CSR[0])
                     │ lco_detector      v
                     └─sar_dump/sar_en─> sub_sar ──> sar_outb[9:0], sar_eval ──> comparator ──> sar_comp
```

**Sequencing (`ed_ctrl`).** The states are IDLE, LINEAR, DUMP and SAR. Any
`up` or `dn` starts the linear search, one step per update. When both drop,
meaning the output is back inside the window, a one-cycle `sar_dump` loads
the SAR, and `sar_en` then holds until the SAR is done. A request during
DUMP or SAR goes back to LINEAR. With nothing requested nothing toggles:
this is what makes the design event driven.

**Linear search in a 2D circular shift register (`csr_2d`, `csr_element`).**
The 80 unary coarse segments are organised as eight elements. Each element
has a 10-bit thermometer counter and a pointer bit.
* Normal mode: the element holding the pointer adds a segment, then passes
  the pointer clockwise, so the eight counters fill evenly. A step down walks
  the pointer back.
* Fast-tracking mode: the comparator reports a large error (`en_fast`).
  Every element then steps at once, so one update moves eight units, and the
  pointer stays put.
* Saturation: in normal mode a step that would overflow the addressed
  element is dropped. In fast mode each element saturates on its own.

**LCO detector (`lco_detector`).** Eight-unit steps can overshoot back and
forth. A flip-flop chain shifts in a one at each reversal of direction. After
`osc+1` reversals (`osc` is the OSC[3:0] input) it raises `en_lock`, which
forces single steps. The lock is cleared when a whole search has finished,
so SAR aborts inside one event do not reset the count.

**Subrange SAR (`sub_sar`).** On dump, the thermometer counter of CSR[0] is
copied into STEP. Its ones mark the subrange to search; zero (overflow) bits
are skipped. The SAR then resolves bits from the highest set STEP bit down:
1. Turn the trial bit on.
2. Strobe `sar_eval`.
3. After `SETTLE` cycles, keep the bit if `sar_comp` still says the output
   is low.
4. Clear that STEP bit.

A nearly empty CSR[0] therefore costs only a few trials. `sar_outb` is the
active-low word for the binary-weighted PMOS array.

**Timing model.** The silicon ALSC/SBSC is asynchronous (C-elements, about
1 ns per update). Here one rising edge of `clk` is one such update. Every
state change is one clock; there are no multi-cycle paths.

## Slope-detector regulator (`sdc_dldo`)

```
 c[2:0] ──> slope_detector ──slope,vld──> lut_sr (LUT, OS filter, clk_gen, CTR_C reg) ──> ctr_c[31:0]
 os ─────────────────────────────────────────┘  ^ shift_u/d    │ clk_f_en, slope_busy
 ud ──> coarse_ctrl (FINE / SLOPE / FLOCK) ─────┘              v
          │ fine_en, fine_rst, cnt_clr, fl_hold        fine_driver ──f_out──> false_lock ──> ctr_f[63:0]
          └──────────────── stuck_lo / stuck_hi <───────────────────────────────┘
```

`clk` is the target comparator's self-timed clock (CMP_CLK, 3 to 5 GHz in
silicon). Everything runs on it except the slope detector, which is clocked
by the oscillator outputs themselves.

### Measuring the slope (`slope_detector`)

There are three comparators, against REF_L1 > REF_L2 > REF_L3. Each one
oscillates (`c[i]`) while the output is below its reference.
* A thermometer chain T counts `c[0]` edges from the REF_L1 crossing.
* The first `c[1]` edge samples T into S1 (6 bits).
* The first `c[2]` edge samples T[3:0] into S2 (4 bits).

Few ones mean the output fell from one reference to the next within few
oscillator periods, which is a steep droop. `slope = {S2, S1}` is 10 bits,
and `vld` flags which group holds a sample. The detector is cleared
asynchronously whenever the output is back above REF_L1 (`lvl_l1` low).

### Turning the slope into current (`lut_sr`, `clk_gen`)

A new sample is looked up by its ones count:
* S1: `LUT1 = {12,10,8,6,4,3,2}` segments for 0..6 ones.
* S2: `LUT2 = {8,6,4,3,2}` for 0..4 ones. S2 wins when both are new.

The amount waits in a pending register and is applied on the next SHIFT
strobe: the 32-bit thermometer code CTR_C fills that many ones at once.
Coarse up/down steps from `coarse_ctrl` share the same register, one segment
per strobe.

The OS filter gives slope requests priority over coarse steps and drops
them while the overshoot flag `os` is high. `clk_gen` spaces strobes by
`ctr_pwl+1` cycles (the SHIFTP pulse). It also holds both derived clocks
(CLK_C for the register, CLK_F for the fine loop) for `ctr_os` cycles after
`os` rises. In this RTL both clocks are clock enables on CMP_CLK. From a
sample to new gate current takes two cycles.

### Handing over between loops (`coarse_ctrl`, `false_lock`)

This is the subtle part, and the place where the loops can fight.
`coarse_ctrl` has three states:
* **FINE**: the fine latch chain regulates.
* **SLOPE**: entered on any slope request (`slope_busy`). The fine latches
  are disabled and their speed counter is cleared. The controller returns to
  FINE `SLOPE_HOLD` cycles after the last slope shift.
* **FLOCK**: entered from FINE when the fine code is stuck at an end of its
  range while the error still points past that end. Examples: all 64 fine
  gates on and the output still low, or all off and the output still high.
  On entry:
  * `false_lock` captures the stuck code and keeps it on the gates
    (`fl_hold`).
  * The fine chain is reset to mid-range and keeps running unseen.
  * The coarse code steps once every `COARSE_WAIT` cycles toward the stuck
    end.

  When `ud` flips, meaning the target is crossed, the replica is released
  and the fine code takes over again. Coarse steps never overlap a pending
  slope shift.

  FLOCK is not entered, and is left, once the coarse code has no unit left
  in the needed direction (all 32 on, or all off). The fine loop then holds
  its end of range, as a real regulator at the end of its range must.

`COARSE_WAIT` matters for stability. The coarse step must be slower than the
output stage responds. Otherwise the false lock overshoots by several
segments, releases with the fine code near the opposite end, and falls into
a false lock the other way. The default of 8 cycles is settled in the
closed-loop tests.

### Fine trimming (`fine_driver`)

The fine code is a 64-bit thermometer of set/reset latches (0 = gate on).
Reset loads mid-range, `64'hFFFFFFFF_00000000`. Each stage looks at three
neighbours on each side:
* With `ud = 1` (output low) a stage turns on if an enabled lower tap is on.
* With `ud = 0` a stage turns off if an enabled upper tap is off.

With all taps enabled the boundary therefore moves three stages per update.

The 3-bit counter CNT fills from the MSB at each crossing of the target:
000 → 100 → 110 → 111. CNT[2] disables the farthest tap, CNT[1] the middle
one and CNT[0] the nearest one, so the speed goes 3, 2, 1, 0. At 111 the
loop has finished (`fine_done`).

A finished loop must wake up again. Here CNT is cleared during slope
compensation, and also whenever the output is outside the band between
REF_L1 and the overshoot level (`lvl_l1` or `os` high). The second rule is
this design's.

## Where this RTL departs from the original circuit

* The whole design is synchronous. The asynchronous C-element logic of the
  event-driven design runs at one update per clock. The delay cells and
  pulse generators of the slope-detector design are counted in CMP_CLK
  cycles, and CLK_C and CLK_F are clock enables. Only the slope detector
  keeps its oscillator clocks.
* Numbers not published and chosen here:
  * the LUT contents;
  * the 6 + 4 split of the 10-bit slope word;
  * the 2-bit `ctr_pwl`;
  * `COARSE_WAIT = 8` (the original steps the coarse code once per clock);
  * `SLOPE_HOLD = 2`;
  * `SETTLE = 1`.
* Behaviour not published and chosen here:
  * the CNT-bit-to-tap order;
  * SAR_OUT cleared at dump;
  * the SAR abort on a new request;
  * when the LCO lock clears;
  * the restart of a finished fine loop;
  * the detector re-arm at REF_L1.
* Two descriptions of when the coarse loop runs disagree: right after slope
  compensation, or only once the fine range is exhausted. The RTL follows the
  second, the false-lock sequence.
* Left to the analog side and not modelled in RTL:
  * the ring-amplifier window comparator and its trip-point out-of-range
    detector;
  * the Strong-ARM SAR comparator;
  * the comparator-triggered oscillators with their glitch filter and
    external clock gating;
  * the dynamic comparator;
  * the pass-gate arrays.

## Files

| file | role |
|---|---|
| `rtl/dldo_pkg.sv` | state enums of both controllers |
| `rtl/csr_element.sv`, `rtl/csr_2d.sv` | 2D circular shift register (linear search) |
| `rtl/lco_detector.sv`, `rtl/sub_sar.sv`, `rtl/ed_ctrl.sv` | LCO lock, subrange SAR, sequencer |
| `rtl/ed_dldo.sv` | event-driven controller |
| `rtl/slope_detector.sv`, `rtl/clk_gen.sv`, `rtl/lut_sr.sv` | slope TDC, clock generator, LUT shift register |
| `rtl/coarse_ctrl.sv`, `rtl/fine_driver.sv`, `rtl/false_lock.sv` | loop handover, fine latch chain, replica filter |
| `rtl/sdc_dldo.sv` | slope-detector controller |
| `rtl/dldo_top.sv` | both controllers side by side |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_workloads.sv` | the evaluated load steps through `dldo_top` |
| `tb/ed_load_model.sv`, `tb/sdc_load_model.sv` | behavioural plants (pass gates, capacitor, load, comparators), not synthesizable |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself, and
each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_dldo_top -y rtl -y tb rtl/dldo_pkg.sv tb/tb_dldo_top.sv
obj_dir/Vtb_dldo_top
```

Use any `tb_<module>` in place of `tb_dldo_top`.

**Unit testbenches.** These compare each block against an independent model
in the testbench, for example:
* thermometer and pointer bookkeeping of the ring over thousands of random
  steps;
* SAR results against the binary search they should perform;
* latch-chain speeds per CNT value;
* SHIFT spacing and OS hold widths.

**Closed-loop testbenches** (`tb_ed_dldo`, `tb_sdc_dldo`, `tb_dldo_top`).
These drive the controllers through the plant models with load steps, ramps
and `$urandom` steps. They check that the output returns to regulation and
check code invariants every cycle. They count every mechanism and fail if
one never occurs:
* event-driven design: normal and fast steps, LCO lock, dump, SAR trials,
  SAR abort;
* slope-detector design: slope shifts, the REF_L3 group, coarse steps both
  ways, false lock both ways, fine loop finished, overshoot hold.

`tb_dldo_top` runs both designs at their default sizes in well under a
minute.

**Workload testbench** (`tb_workloads`). This runs the evaluated load steps
through `dldo_top`. Currents are scaled so that 200 mA means every pass gate
is on.
* Event-driven design: 104.2 mA step, 28.2 mA step, and 101.6 mA over 10 ns
  and 70 mA in 1 ns. The last two are run with and without fast tracking.
  The test checks that fast tracking shortens the recovery. Typical
  recovery is about 14 against 49 updates and 9 against 34 updates.
* Slope-detector design: 150 mA up, then 150 mA down, each with a 2 ns edge.
  The test checks that the slope shift comes within 8 cycles (2 ns at
  4 GHz); it comes after 6. It also checks that both steps settle.

The plant constants are abstract units tuned for stable loops. They are not
silicon values, so the cycle counts printed say how the control logic
sequences, not what the chip achieves. The main rate that can be checked is
the time to the first slope shift: 5 to 7 CMP_CLK cycles from the step in
the closed-loop runs. At 3.3 to 5 GHz that is about 1 to 2 ns.
