# Adaptive and resilient domino register file

A 1-read/1-write register file built from 8-transistor cells with a domino
(precharge/evaluate) read normally has to run at a voltage and frequency that
stay safe for the worst case: the slowest cell, the deepest supply droop, the
highest temperature and end-of-life ageing. Most of that guardband is wasted
most of the time. This design watches the read path itself. Each read-data
bit has two small detectors, so the chip can run close to the real limit:

* a **timing margin detector (TMD)** reports when read data arrives within a
  programmable window before the sampling clock edge. This drives slow
  adaptation of V/F for temperature and ageing;
* a **timing error detector (TED)** reports when read data arrives *after* the
  edge, during the following high clock phase. The read is then repeated at
  half frequency or at a raised supply. This handles fast droops and rare slow
  access patterns.

The RTL describes a 14 KB array: 28 sub-arrays of 128 entries x 32 bits. It
also contains the control loops around the array. The clock generator and the
voltage regulator are outside; the top only sends them requests.

## Read path and clock phases (`rf_subarray`)

Per bit column, 16 cells share a local bitline (LBL). A NAND merges two LBLs
(its output is NAOUT). The NAOUTs of half the entries pull down one of two
global bitlines (GBL). Both GBLs set a set-dominant latch (SDL), whose output
is SDLOUT. A stored 1 discharges the bitline, so SDLOUT rises for a 1 and
stays low for a 0.

One read per cycle:

| when | what happens |
|---|---|
| rising edge 0 | address registered; bitlines precharge during the high phase |
| low phase | read word line up; bitlines evaluate; SDLOUT sets |
| rising edge 1 | DOUT (read data) and DEL_DOUT (TMD sample) taken |
| falling edge 1 | TED latch closes (DOUT_LAT); SDL reset starts shortly after |
| rising edge 2 | ERROR COMPACT flop captures the OR of the 32 selected detector outputs |

* **TED** = DOUT xor DOUT_LAT. It fires if SDLOUT rose during the high phase
  after edge 1. The detection window is therefore half a cycle. SDLOUT still
  holds the correct value.
* **TMD** = DOUT xor DEL_DOUT. DEL_DOUT samples SDLOUT delayed by the margin
  window (2-bit setting). It fires if the data arrived less than one window
  before edge 1.
* **Conditional delayed precharge** (`bl_precharge_sel`): the precharge
  transistors use a clock whose rise is delayed (2-bit setting). The
  equalizers normally use the same delayed clock. Once NAOUT (or SDLOUT) is 1,
  they switch to the on-time clock, which starts charge sharing early. A slow
  read therefore keeps evaluating into the high phase, where TED can see it.
  `pch_mode = 1` forces on-time equalizing; a late read is then lost.
* **Error compaction** (`error_compaction`): per bit, a mux picks TED
  (mode 0) or TMD (mode 1). Two 16-bit NOR error bitlines are combined by a
  NAND and then registered.

## Control loops (`resilient_rf_top`)

* `error_resp_ctrl` issues reads and returns responses in order. Data is
  available 2 cycles after issue, the error flag 3 cycles after issue, and the
  registered response 4 cycles after issue. On a TED error it discards the
  failing read and the two reads behind it. It then asks for F/2
  (`clk_div2_sel`, which switches without glitches) or for `v_boost`, waits
  `SETTLE_CYCLES`, and replays the reads one at a time.
* `error_rate_tracker` counts errors over `SAMPLE_CYCLES`. It pulses `erte`
  when the count exceeds `ert_threshold`.
* `vf_adapt_ctrl` repeats a cycle of three phases:
  1. `RUN_CYCLES` cycles in TED mode;
  2. a TMDa window with setting `mdw_a_sel` (the "MDW2" window);
  3. a TMDb window with setting `mdw_b_sel` (the "MDW1+MDW2" window).

  Then it decides from TMDa/TMDb: 00 → speed up, 01 → hold, 1x → slow down.
  `erte` also forces a slow-down. The requests leave as `f_up/f_down` or
  `v_down/v_up`, chosen by `adjust_v`.

## What is modelled, not designed

The delays are analog, so three pieces are behavioural:
* `prog_delay_line`: the delay chains for precharge, margin window and SDL
  reset;
* `lbl_eval_model`: how long the bitline takes to evaluate;
* the top input `sim_eval_delay_ps`, which stands for the silicon's present
  evaluate delay. A testbench raises it to mimic a droop.

Synthesis treats these as plain wires. Everything else is synthesizable RTL.

## Departures and limits

* The sub-arrays share one compaction output. During the short TMD probing
  windows, read timing errors are therefore not detected.
* The clock-phase assignment, the address layout `{sub-array[4:0],
  entry[6:0]}`, the request/response handshake, the replay queue, the window
  lengths and all picosecond values are this design's own choices.
* The NAOUT-to-SDL path has no delay of its own.
* The SDL reset runs from shortly after the falling edge to the rising edge.
* The TED latch is modelled by its closed value, sampled at the falling edge.
* Not included: the clock generator, voltage regulator, noise injector, scan
  chain, and the flip-flop logic with replica/error-detecting sequentials
  around the array.
* Verification: the end-to-end testbench runs with 2 sub-arrays. No
  simulation at the full 28 sub-arrays was run.

## Simulating

```
verilator --binary --timing -Wno-fatal --top-module tb_resilient_rf_top \
  rtl/rf_pkg.sv rtl/*.sv tb/tb_resilient_rf_top.sv && obj_dir/Vtb_resilient_rf_top
```

That test writes and reads data and creates droops that must be caught and
replayed, both at F/2 and at raised V. It also drives the TMD decisions for
speed up, hold and slow down, and triggers the error rate alarm. It counts
each of these events. Unit testbenches for the leaf blocks are in `tb/` and
print `TB_RESULT checks=N failures=M`. All files use `timescale 1ps/1ps`.
