# Aging-tolerant STT-MRAM: on-line aging detection and reference adjustment

An STT-MRAM stores each bit in a magnetic tunnel junction (MTJ). An MTJ in the
anti-parallel (AP) state has a high resistance and stores a 1. An MTJ in the
parallel (P) state has a low resistance and stores a 0. A sense amplifier reads
a bit by comparing the cell's resistance with a reference resistance placed
between the two.

Over time, time-dependent dielectric breakdown (TDDB) opens pinholes in the
MTJ's tunnel barrier. Both resistances drop, and R_AP drops faster than R_P.
Once R_AP falls below the read reference, a stored 1 reads as 0.

This design fixes that while the memory is in use:

* **Detection.** On every read, a detection circuit watches the read current
  of each cell and sorts the word into one of four health levels.
* **Recording.** Words that are aged but still usable go into a small look-up
  table (LUT) of aged words.
* **Tolerance.** Later reads of a word in the LUT use a lowered reference:
  2/3 or 1/2 of the nominal one. The aged AP cells then still read above the
  reference.

The default configuration is a 32K-bit array of 1024 words × 32 bits. Its LUT
has 205 rows, enough for 20 % of the words.

## Health levels

R_REF0 is the nominal read reference. This RTL sets it to 4.0 kΩ.

| Level     | AP resistance band           | Detection voltage V_aged | W | S | Read reference     |
|-----------|------------------------------|--------------------------|---|---|--------------------|
| nominal   | R_AP > R_REF0 (≥ 4.1 kΩ)     | ≥ 520 mV                 | 0 | 0 | R_REF0 (4.0 kΩ)    |
| weak      | 2/3 R_REF0 … R_REF0 (3.01–3.91 kΩ) | 475–514 mV         | 1 | 0 | 2/3 R_REF0 (2.67 kΩ) |
| strong    | 1/2 R_REF0 … 2/3 R_REF0 (2.05–2.87 kΩ) | 422–468 mV     | 1 | 1 | 1/2 R_REF0 (2.0 kΩ) |
| breakdown | R_AP < 1/2 R_REF0            | < 419 mV (extrapolated)  | 1 | 1 | none works; word flagged uncorrectable |

The corresponding P resistances are ≥ 1.94 kΩ (nominal), 1.58–1.89 kΩ (weak)
and 1.22–1.53 kΩ (strong). All of them stay below the lowest reference, so a
stored 0 still reads as 0 at every setting.

The bands, the voltages, the W/S encoding and the three reference fractions
come from the original framework. The value R_REF0 = 4.0 kΩ is this design's
own choice. It is the value that puts the published resistance bands into the
published reference ranges.

A word's level is the level of its worst cell.

## Read and write sequence (`aging_ctrl`)

The controller takes one request at a time, with a valid/ready handshake. It
answers with a one-cycle `rsp_valid` pulse. The response cannot be stalled.

```
write:  IDLE --accept--> WRITE --> RESP
read:   IDLE --accept--> SENSE --> RESP
                           |
                           +-- detection worse than the LUT level -->
                               RESENSE (lowered reference) --> RESP
```

1. **Accept (IDLE).** The request address is looked up in the LUT in the
   same cycle. A hit gives the word's recorded level, and so its reference.
   A miss means nominal, so R_REF0 is used.
2. **SENSE.** The array drives the word onto the bit lines. The sense
   amplifiers compare each cell with the chosen reference. The detection
   circuit grades the word.
   * If the grade is worse than the recorded level, the LUT is updated in
     this cycle: a new row, or weak raised to strong. Breakdown is recorded
     as strong.
3. **RESENSE.** This step runs only when the detection found more aging than
   the LUT recorded. The word is sensed again with the newly lowered
   reference. The read that first finds the aging therefore already returns
   correct data, and does not just prepare the next read.
4. **RESP.** The response carries:
   * the data;
   * the detected level;
   * the reference used last;
   * whether the address hit in the LUT;
   * whether a second sensing happened;
   * whether the LUT update was dropped because the LUT was full;
   * whether a cell is in breakdown.

Timing: for a request accepted at rising edge k, `rsp_valid` is high at edge
k+2. When a second sensing is needed, it is high at edge k+3.

Assertions in `aging_ctrl` check the handshake rules. A response lasts one
cycle. No request is accepted while another is in flight. Only reads update
the LUT. In `aging_lut`, assertions check that the row count never exceeds
the table size, and that an update is dropped only when the table is full.

Writes do no detection. A write to an aged word keeps the word's LUT row, so
the next read uses the lowered reference at once.

If the LUT is full, a newly aged word is not recorded. Each read of that word
then detects the aging again, gets the second sensing and reports
`rsp_lut_drop`. The data is still correct, but the read takes one cycle longer.

## The LUT of aged words (`aging_lut`)

Each row holds three fields:

* **Valid.**
* **Address.** The word index: row and column of the array, concatenated.
* **W/S.** 0 for weak, 1 for strong.

Every row is compared with the lookup address at once, so the LUT works as a
content-addressable table. A new aged word takes the lowest free row. A word
already in the table can only move from weak to strong.

There is no replacement: once all rows are valid, further new words are
dropped, and `full` and `upd_drop` report it. Reset clears all Valid bits.
The LUT is ordinary registers, so it is lost at power-down.

The row count is `ceil(COV_PCT % × words)`. Coverage is the knob the original
framework trades against area. At 32 bits/word, 10 % gives 103 rows and 20 %
gives 205 rows.

## Analog parts as behavioural models

The array, the sense amplifiers and the detection circuit are analog. Here
they are behavioural models: plain SystemVerilog that lint and synthesis
tools accept, but that stands for circuits, not for gates to build.
Resistances travel between them as 16-bit integers in ohms.

* **`stt_array`: the cell array.**
  * It holds, per cell, the stored state, R_AP and R_P. Fresh cells have
    4.5 kΩ and 1.96 kΩ, a choice inside the nominal band.
  * It produces the cell's operation conditions on `wl`, `bl_drv` and
    `sl_drv`. Write 1: BL at GND, SL at VDD. Write 0: BL at VDD, SL at GND.
    Read: BL at V_read, SL at GND. The word line is at VDD for all three.
    A cell switches according to the direction of the current through it.
  * When a word is read, it shows each cell's present resistance on
    `bl_res`.
  * It also shows each cell's AP resistance on `mtj_rap`. This is the
    quantity that tracks aging, and it feeds the detector.
  * The `age_*` port stands for the wear-out process. It sets one MTJ's
    resistances to the values a given pinhole size would produce. The RTL
    does not evaluate the pinhole equations; a testbench picks the
    resulting resistances. A fabricated array has no such port.
* **`sa_refgen`: sense amplifiers and reference generator.**
  * Each bit reads `R_cell > R_REF`.
  * R_REF is R_REF0, ⌊2/3 R_REF0⌋ = 2666 Ω or 1/2 R_REF0 = 2000 Ω.
  * The current-mirror amplifier itself is reduced to this comparison.
* **`aging_detector`: the detection circuit.**
  * It turns each cell's R_AP into V_aged. It interpolates linearly through
    the published corner points (4.10 k/520, 3.91 k/514, 3.01 k/475,
    2.87 k/468, 2.05 k/422 mV) and extends the end segments.
  * It compares V_aged with three thresholds, in 0.1 mV units:
    * 517.0 mV and 471.5 mV, each midway in a gap between published bands;
    * 419.2 mV, which is V_aged at R_AP = 1/2 R_REF0.
  * The thresholds are this design's choice.
  * The weak threshold trips at about R_AP = 4.0 kΩ. That is just before a
    nominal-reference read would fail, so detection comes early.
  * Detection does not depend on the stored data.

`aging_lut` and `aging_ctrl` are synthesizable RTL. The top, `stt_aging_top`,
wires the five parts together. Because it contains the models, it is a
simulation model of the whole memory.

## Parameters

| Module          | Parameter    | Default | Meaning |
|-----------------|--------------|---------|---------|
| `stt_aging_top` | `WORD_W`     | 32      | bits per word (16 and 64 also evaluated by the original work) |
|                 | `TOTAL_BITS` | 32768   | array size |
|                 | `COV_PCT`    | 20      | LUT coverage in percent of words (must give at least 1 row) |
| `stt_array`     | `R_AP_FRESH`, `R_P_FRESH` | 4500, 1960 | fresh resistances, Ω |
| `sa_refgen`     | `R_REF0`     | 4000    | nominal reference, Ω |
| `aging_detector`| `V_W_TH`, `V_S_TH`, `V_B_TH` | 5170, 4715, 4192 | thresholds, 0.1 mV |

Shared types (`health_e`, `ref_sel_e`, `ohm_t`) and the level → reference
mapping are in `stt_aging_pkg`.

## Departures from the original framework, and gaps

* **Second sensing.** The original flow detects the aging, records it and
  reads with the adjusted reference. Its exact sequence and timing are not
  available. The second sensing in the same access, and all cycle counts,
  are this design's.
* **Cell level to word level.** A word takes the level of its worst bit.
* **Breakdown.** Words with a breakdown cell are read with the 1/2 reference
  and flagged. Their broken AP cells read as 0; no reference can save them.
* **Coverage 0 %.** The baseline without a LUT cannot be built; the LUT has
  at least one row.
* **No process variation.** The models have no device variation. The
  original work's Monte-Carlo detection rate (99 % under 5 % variation) and
  its reliability-over-time analysis are not reproduced by simulation here.
* **Peripheral circuits are ideal**, as in the original problem statement:
  decoders, write drivers and reference generation have no timing or
  failures of their own.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| Testbench            | What it checks |
|----------------------|----------------|
| `aging_lut_tb`       | 4-row LUT: insert, weak → strong upgrade, no downgrade, full table and drop, reset; then random updates against a reference table |
| `sa_refgen_tb`       | every reference setting against random and boundary resistances |
| `aging_detector_tb`  | corner resistances of each band, breakdown bound, worst-bit word level, W/S flags |
| `stt_array_tb`       | random writes, wear-out and reads: AP/P resistance per stored bit, idle bit lines |
| `aging_ctrl_tb`      | controller against a stand-in memory and LUT: reference chosen, second sensing, data, flags, LUT contents, 2/3-cycle latency |
| `stt_aging_top_tb`   | whole memory at default size (1024 × 32 bits, 205-row LUT) |
| `stt_aging_cov_tb`   | the other evaluated configurations side by side: 16-bit words at 10 %/20 % coverage (205/410 rows), 32-bit at 10 % (103), 64-bit at 10 %/20 % (52/103); each must record exactly that many aged words, drop the rest and read all of them correctly (uses `cov_run`) |

The last testbench fills the memory and ages single cells into the weak,
strong and breakdown bands. It ages 230 words, more than the LUT holds, and
then runs 3000 random accesses. It predicts every response from its own copy
of the cell resistances. It counts each mechanism and fails if one never
occurs:

* second sensing;
* weak and strong LUT hits;
* weak → strong upgrade;
* breakdown;
* a full LUT and a dropped word;
* aged reads that a nominal reference would have got wrong.

Running one with Verilator (any testbench; list the package first):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/stt_aging_pkg.sv tb/stt_aging_top_tb.sv --top-module stt_aging_top_tb
./obj_dir/Vstt_aging_top_tb
```

`-Wno-fatal` keeps Verilator's width warnings on the testbenches' checking
tasks from stopping the build.

The full-size run takes well under a minute.
