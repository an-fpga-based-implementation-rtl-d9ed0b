# B-ACOSD CFAR radar target detector

A radar return is declared a target when it stands out from the clutter around it. Clutter power varies from range cell to range cell, so a fixed threshold gives either missed targets or a flood of false alarms. A CFAR (constant false alarm rate) detector therefore computes a new threshold for every cell from the cells that surround it.

This RTL implements the **B-ACOSD** detector: Backward Automatic Censored Ordered Statistics Detector. It is intended for log-normal clutter, and it copes with an unknown number of interfering targets in the reference window. It first decides how many of the largest reference cells are other targets and discards them. Only then does it set the detection threshold from what is left.

The design processes a block of 256 16-bit samples. It uses 16 reference cells, one guard cell on each side of the cell under test, and the order statistic p = 12. It writes one decision bit per cell. At most 15 clocks are spent per cell.

## The algorithm, as built

For each cell under test X0, the 16 reference cells are sorted in ascending order: X(1) ≤ X(2) ≤ … ≤ X(16).

**Censoring (backward).** The algorithm starts with k = 0 and walks down from the largest sample. At each step it tests:

    X(N-k)  >  T_ck = X(1)^(1-α_k) · X(p)^α_k

- If the sample exceeds T_ck, it is taken as an interfering target. It is censored and k grows by one.
- The walk stops at the first sample that does not exceed its threshold.
- It also stops when all N − p = 4 highest samples have been censored (k = 4).

The result k is the number of interferers in the window (0 to 4).

**Detection.** The cell under test is a target when:

    X0  >  T_ak = X(1)^(1-β_k) · X(N-k)^β_k

This threshold is taken between the smallest sample and the largest sample that survived censoring.

**Log domain.** The powers become products when every quantity is taken as a logarithm:

    log T = (1 - c)·log X(1) + c·log X  =  log X(1) + c·(log X - log X(1))

The right-hand form is what the hardware computes (`log_threshold`). It needs one multiplier and two adders, and the same unit serves both thresholds.

The two weights (1 − c) and c sum to one. As a result, neither the base of the logarithm nor the physical scale of a sample code affects any decision. The design therefore uses log2 of the integer sample code.

**Coefficients.** These are for (N, p) = (16, 12), false-censoring probability 0.01 and false-alarm probability 0.001. They are stored as unsigned 4.12 fixed point, i.e. round(c · 4096), in `bacosd_pkg`:

| k | 0 | 1 | 2 | 3 | 4 |
|---|---|---|---|---|---|
| α_k (censoring test k) | 2.596 | 2.038 | 1.709 | 1.443 | – |
| β_k (k interferers found) | 1.635 | 1.889 | 2.12 | 2.37 | 2.64 |

Note that α_k > 1. The censoring threshold therefore lies above X(p), extrapolated away from X(1). In wide-spread clutter, where X(p) is far above X(1), the first test is hard to pass, so large k occurs mainly in homogeneous clutter. The end-to-end testbench includes such a stretch so that every k is exercised.

## Number formats and the log table

| quantity | format |
|---|---|
| sample | unsigned 16 bit; one code step is nominally 0.061 amplitude units |
| log | unsigned 4.8 fixed point, `floor(log2(x)·256)`, 12 bits |
| coefficient | unsigned 4.12, 16 bits |
| threshold | signed 16 bit, same scale as a log |

`log_lut` is a 2000-entry synchronous ROM addressed by the sample code.
- Entry x holds `floor(log2(x)·256)`. Entry 0 holds the value for x = 1.
- Samples of 2000 or more read the last entry, so the log saturates at log2(1999).
- With a 0.061 step, the table spans amplitudes 0 to 122. That covers a log-normal clutter distribution with μ = 1, σ = 1.1 with ample margin.
- Strong interferers above that range are all seen as equally strong. Censoring still removes them, because they still exceed the censoring threshold.

The table is computed at elaboration by `bacosd_pkg::log2_fix`, not loaded from a file. That function shifts x so that its leading one is at bit 30. It then squares the mantissa once per fraction bit, and each squaring that overflows 2 yields a one bit.

## Data path and timing

```
 host bus ──► cfar_avalon_slave ──► sample_mem (256 x 16)
                  │   ▲                  │ read port B
                  ▼   │                  ▼
            cfar_sequencer ──shift──► ref_window (16 ref + 2 guard + CUT)
                  │                      │ 16 ref cells          │ X0
          cell_start                     ▼                       │
                  └──────────────►  prc_sorter ──sorted──► censor_unit ◄──► log_lut (2000 x 12)
                                                               │ k, log X(1), log X(N-k), log X0
                                                               ▼
                    result_ram (256 x 1) ◄── decision ──── detector
```

The `cfar_sequencer` reads the samples in order and shifts each into the window.

- Once 19 samples are in, every new sample brings a new cell into the test position: the cell 9 places behind it.
- For each such cell the sequencer starts the sorter. The sorter's done starts the censor unit, and the censor unit's done starts the detector.
- The sequencer waits for the detector and stores the decision.
- The window does not move while a cell is in flight.

Clocks per cell with k censored interferers:

| step | clocks |
|---|---|
| read sample, shift window | 2 |
| start cell | 1 |
| PRC sort | 1 |
| censor: latch, read log X(1), log X(p), log X0 | 4 |
| censor: k + 1 tests, one per clock (the last test is the one that stops) | k + 1 |
| censor: register result | 1 |
| detector: threshold, compare, register | 1 |
| **total** | **11 + k** |

The first and last 9 cells of the block have no full reference window. They are written as "no target" and cost 2 clocks (leading) or 1 clock (trailing). A 256-sample run takes 2 · 18 + Σ(11 + k) + 10 clocks, about 2,800 in practice. That is 11.7 clocks or 47 ns per cell at 250 MHz, against a real-time budget of 0.5 µs per cell. Timing closure at 250 MHz has not been checked.

### PRC sorter

The sorter uses Parallel Range Computing. Every cell's rank is computed at once:

    rank(i) = #{ j : x_j < x_i } + #{ j < i : x_j = x_i }

The second term breaks ties, so the ranks form a permutation. Each cell is then steered to output slot rank(i). This costs 240 comparators and 16 sixteen-way selectors in one clock.

### Censor unit

The censor unit is a small state machine that shares the single log-ROM port.

1. It reads log X(1), log X(p) and log X0.
2. It then streams log X(N), log X(N−1), … in consecutive clocks.
3. Each arriving log is compared with T_ck for the current k. While the comparison says "interferer", the next address is already issued.
4. When k reaches N − p, the sample in hand is X(p) and the search stops.

## Using it from a host

The detector can be driven in two ways.

- **Block mode.** The host loads all 256 samples and lets the hardware sequencer step through every cell.
- **Per-cell mode.** Software steps through the cells itself. It hands each cell's reference cells to the sorting logic, then the sorted cells and X0 to the censoring/detection logic. This is the software/hardware split of the system the design comes from.

Both modes share one sorter, one censor unit and one detector. While a block run is busy, per-cell starts are ignored and the per-cell status words show bit 1 set. Do not start a block run while a per-cell operation is still in flight; its results would be lost.

All ports are memory-mapped slaves. They use word addresses, 32-bit data, and a fixed read latency of one clock signalled by `*_readdatavalid`. There are no wait states. Do not assert read and write together; assertions check this.

**Block port `avs_*`:**

| address | access | content |
|---|---|---|
| 0x000–0x0FF | R/W | sample memory, bits 15:0 |
| 0x100–0x1FF | R | decision of cell i, bit 0 (1 = target) |
| 0x200 | W | bit 0 = 1: start a run (ignored while busy) |
| 0x200 | R | bit 0 busy, bit 1 done (sticky until the next start) |
| 0x201 | R | number of targets in the last run |
| 0x202 | R | clock cycles of the last run |

A block run goes like this:
1. Write 256 samples.
2. Write 1 to 0x200.
3. Poll 0x200 until bit 1 is set, or wait for the `run_done_o` pulse.
4. Read 0x100–0x1FF.

**Sorting logic `cl1_*`:**

| address | access | content |
|---|---|---|
| 0x00–0x0F | W | reference cell i |
| 0x00–0x0F | R | sorted cell X(i+1), ascending |
| 0x10 | W | bit 0 = 1: start |
| 0x10 | R | bit 0 done, bit 1 locked by a block run |

**Censoring/detection logic `cl2_*`:**

| address | access | content |
|---|---|---|
| 0x00–0x0F | W | sorted cell X(i+1) |
| 0x10 | W | X0 |
| 0x11 | W | bit 0 = 1: start |
| 0x00 | R | bit 0 done, bit 1 locked |
| 0x01 | R | k |
| 0x02 | R | decision |
| 0x03 | R | log T_ak (signed, 8 fraction bits) |

A sort is done 1 clock after its start. Censoring and detection are done 7 + k clocks after theirs.

**Log table `lut_*`:** read only. The address is a sample code, and the data is `floor(log2(x)·256)`. It uses the second read port of the log ROM, so it can be read at any time.

The top also carries the host processor's instruction RAM (128K × 32, `imem_*`) and data RAM (64K × 16, `dmem_*`), each with the same slave timing.

## What is not in this RTL

The system this design comes from is a processor-based system-on-chip. In it, a soft processor runs the outer loop in software and calls the sorter and the censoring logic as two custom hardware blocks. The blocks communicate over the vendor's memory-mapped bus, with a JTAG UART for download and trace. The following parts of that system are vendor cores and are not reproduced:

- the processor;
- the bus fabric with its arbiter;
- the JTAG UART;
- the envelope detector of the radar front end.

Their connections appear as the top-level slave ports, and the samples are assumed to be already envelope-detected.

The per-cell slave ports let a processor run the detector the way the source system does. The block mode, with `cfar_sequencer` doing the loop in hardware, is an addition so the detector also works without a processor. In the source system the two custom blocks are also reached as processor custom instructions. No custom-instruction interface is provided here: its operand protocol for passing 16 samples is not specified.

## Choices that are this design's own

The algorithm, the coefficients, N, p, the guard cells, the sizes (16-bit samples, 256 samples, 2000-entry log table, 128K × 32 and 64K × 16 RAMs) and the log-domain thresholds come from the source design. The following were chosen here:

- base-2 logs in 4.8 fixed point; 4.12 coefficients; products rounded toward minus infinity;
- the threshold rearranged to one multiplier;
- saturation of the log table at 1999, and log(0) taken as log(1);
- one guard cell on each side of the cell under test;
- the ranking rule and the single-clock latency of the sorter;
- the sequential censor unit and its read order;
- the final comparison done in hardware, with ">" strict in both tests;
- edge cells reported as "no target";
- the register maps, the bus timing, and the cycle counter as the run timer;
- the block mode with its hardware sequencer, and sharing the datapath with the per-cell ports;
- a second read port on the log ROM for the bus;
- the sample memory writable from the bus, rather than a preloaded ROM;
- the assignment of the 128K × 32 RAM to instructions and the 64K × 16 RAM to data;
- active-low asynchronous reset throughout.

Coefficient tables exist only for N − p = 4. Changing `N_REF` or `P_RANK` in `bacosd_pkg` requires new α and β values; an elaboration-time assertion guards this.

## Files

`rtl/`:

| file | block |
|---|---|
| `bacosd_pkg.sv` | sizes, formats, α/β tables, log2 routine |
| `bacosd_top.sv` | the system |
| `ref_window.sv` | tapped delay line |
| `prc_sorter.sv` | PRC sorter |
| `log_lut.sv` | log ROM |
| `log_threshold.sv` | log-domain threshold |
| `censor_unit.sv` | backward censoring |
| `detector.sv` | T_ak and the final decision |
| `cfar_sequencer.sv` | per-cell control |
| `cfar_avalon_slave.sv` | block-mode register map |
| `sort_slave.sv` | sorting logic slave port |
| `censor_slave.sv` | censoring/detection slave port |
| `sample_mem.sv` | sample memory |
| `result_ram.sv` | result memory |
| `run_timer.sv` | run cycle counter |
| `onchip_ram.sv` | processor RAMs |

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, and `tb_ref_pkg.sv`. The package is an independent reference model. It takes logs from real-valued `$ln`, sorts by insertion sort and computes thresholds in real arithmetic.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself; a watchdog ends a hung run. For example, the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/bacosd_pkg.sv tb/tb_ref_pkg.sv tb/tb_bacosd_top.sv --top-module tb_bacosd_top
./obj_dir/Vtb_bacosd_top
```

`tb_bacosd_top` runs the full-size design with no parameter overrides. It performs four 256-sample runs: two with log-normal clutter and two with exponential clutter. Point targets and clusters of strong returns are injected, plus a homogeneous stretch with a cluster of four returns.

Every decision, the target count and the exact cycle count are compared with the reference model. The testbench also requires each of the following to occur at least once:

- every k from 0 to 4;
- detections and non-detections;
- edge cells;
- samples beyond the log table;
- tied samples;
- a start while busy, and the per-cell ports locked during a run;
- traffic on the processor RAM ports.

After each run, some cells are processed again through the per-cell ports. In later runs this includes the whole homogeneous stretch, so k = 0 and k = 4 both occur there. The sorted order, k, the decision and the threshold are all checked. The log-table port is read at 200 addresses.

It finishes in well under a second. The unit testbenches do the following:
- cover the whole log table;
- sort 600 random vectors, including ties;
- check the censor latency of 6 + k clocks for every k;
- check all thresholds against the real-valued formula.
