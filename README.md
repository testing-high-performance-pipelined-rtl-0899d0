# Delay-testing a fast pipeline from a slow tester by shifting one register clock

A pipeline that runs at 1.4 GHz normally needs a tester that can place clock
edges with picosecond accuracy to check that every stage meets its timing.
This design avoids that. Every pipeline register gets its own clock. In test
mode the tester supplies a slow clock, for example 100 MHz. An on-chip *clock
timing circuit* then delays the clock of one register, Ri+1, by a programmable
Td of 250 to 1000 ps, in 50 ps steps. The stage between Ri and Ri+1 gets only
Td to settle, as it would at full speed. All other stages get a whole slow
period, so their delay faults cannot mask the stage under test. The data path
holds no test logic at all: the registers are ordinary flip-flops.

The repository holds:

* the **test vehicle**: a 16 x 16-bit unsigned multiplier in five pipeline
  stages, with registers R0..R5 on separate clocks CK0..CK5. It is
  synthesizable RTL.
* the **clock timing circuit**: a PLL, three voltage-controlled delay lines, a
  phase splitter, a DLL that calibrates the lines, and the multiplexers M1..M7.
  The multiplexers and the mode decoder are synthesizable RTL. The PLL, DLL,
  delay elements and phase splitter are analog parts, so they are
  behavioural models with real-valued control voltages.
* the **self-test** of the clock timing circuit. The tester closes the DLL
  around different node pairs and compares the control voltage Vn reached in
  each case. This procedure runs in the end-to-end testbench.

## Why shifting one clock tests one stage

Take stage i, between registers Ri and Ri+1. It has to cover the clock-to-Q
time of Ri, its own logic delay, the setup time of Ri+1 and the skew between
the two register clocks:

    t_d(i) = t_prop(i) + t_comb(i) + t_setup(i+1) + (t_CK(i) - t_CK(i+1))

At full speed the clock period must be at least the largest t_d(i). In DUT
test mode, every register is clocked by CLK except Ri+1, which is clocked by
DCLK = CLK + Td. Ri launches data on a CLK edge and Ri+1 captures it Td later.
A stage slower than Td, for example because of a small delay defect, captures
a wrong value, and the tester reads that value at the slow rate once it has
moved through the pipeline. With Td just above a path's fault-free delay, even
a 50 ps excess is caught.

In zero-delay simulation this shows as a change in latency. With one register
on DCLK, the data crosses the tested stage on the same edge that launched it.
A product therefore appears four slow clock edges after its operands instead
of five. Both testbenches of the multiplier check this.

## The multiplier (`pipelined_multiplier`)

| stage | between | module | work |
|---|---|---|---|
| SN_L1 | R0 -> R1 | `sn_l1` | 16 partial products (A AND B[j], shifted by j, no recoding), four 4-2 compressors: 16 -> 8 |
| SN_L2 | R1 -> R2 | `sn_l2` | two 4-2 compressors: 8 -> 4 |
| SN_L3 | R2 -> R3 | `sn_l3` | one 4-2 compressor: 4 -> 2 |
| CLA_L1 | R3 -> R4 | `cla_l1` | per 4-bit block: sums for carry-in 0 and 1, block generate and propagate |
| CLA_L2 | R4 -> R5 | `cla_l2` | block carries by a 3-level parallel prefix, selection of each block's sum |

All words are 32 bits wide. Carries out of bit 31 are dropped, which is exact
because the product fits in 32 bits. `compressor_4_2` is the usual 4-2 cell
built from two full adders per bit column. Its lateral carry does not depend
on the column's carry-in, so no carry ripples more than one column.

The following are this design's own choices:

* how the words are grouped into compressors (consecutive fours);
* the 4-bit block size of the adder;
* how the adder's work is split between its two pipeline stages.

The architecture fixes only the stage boundaries and the kinds of circuit:
4-2 compressors, then a carry-lookahead adder with conditional sum select. The
registers have no reset, so the first five outputs after power-up are
meaningless.

## The clock timing circuit (`clock_timing_circuit`)

```
IPCLK ──┬─> PLL (x10) ── HFCLK ──┬──────────────> C ── DL0 (10 el.) ── H
        │                        │
        └─> M1 (2:1) <───────────┘
             │ J
             v
        phase splitter ── U ─────────────────────────────> CLK
             │             └─ delay element ──> A ── DL2 (10 el.) ── E
             └── V ─ inverting half element ──> B ── DL1 (11 el.) ── G (el. 10), F (el. 11)
        DL1/DL2 elements 2..9 ── M2 (16:1) ── DCLK
        CLK, DCLK ── M5 (6 x 2:1) ── CK0..CK5 ──> registers
        CK0..5 ── M6 ── D,  CK0..5 ── M7 ── I
        {A,B,C,D} ── M3 ── X ─┐
        {E,F,G,H,I} ── M4 ── Y ─┴─> DLL ── Vp, Vn ──> every delay element; Vn to a pin
```

**Calibration.** A delay element is nominally 100 ps. The DLL is closed
around DL0, which is fed with HFCLK (1 GHz). It moves Vn until the ten
elements of DL0 delay HFCLK by exactly one period, 1 ns. All three lines
share Vp and Vn, so every element in the circuit becomes 100 ps. This holds
across process, voltage and temperature. Calibrating at 1 GHz rather than at
the 100 MHz tester rate needs ten elements instead of a hundred. The PLL also
keeps the tester's clock jitter out of the calibration loop.

**50 ps steps from 100 ps elements.** The phase splitter makes U = J and
V = NOT J. Node B is V through an inverting half element (J + 50 ps). Node A
is U through a whole element (J + 100 ps). So DL2, fed from A, runs half an
element behind DL1, fed from B. CLK is taken from U. Measured from CLK:

| M2 input m | tap | Td |
|---|---|---|
| even, 0..14 | DL1 element 2 + m/2 | 250, 350, ..., 950 ps |
| odd, 1..15 | DL2 element 2 + (m-1)/2 | 300, 400, ..., 1000 ps |

The result is Td = 250 ps + 50 ps x m. The tap assignment is derived here
from the 250..1000 ps range and from input 15 giving 1 ns. Tester jitter on
IPCLK reaches CLK and DCLK alike, so it does not change Td. In silicon a
buffer between U and CLK matches the delay of M2. Here every multiplexer has
zero delay, so the buffer is left out.

### Control inputs (`ctc_control`, encodings in `ctc_pkg`)

| mode | M1 (J) | M5 | M2 | DLL loop (X, Y) | PLL/DLL |
|---|---|---|---|---|---|
| `MODE_NORMAL` | IPCLK | all CLK | - | - | off |
| `MODE_DUT_TEST` | IPCLK | DCLK on CK(stage+1) | `td_code` | C, H (calibrate on DL0) | on |
| `MODE_CTC_TEST` | HFCLK | per step | per step | per `step` | on |

| `step` | X | Y | elements in loop | purpose |
|---|---|---|---|---|
| `STEP_DL0` | C | H | 10 | phase 1, Vn0 |
| `STEP_DL1` | B | G | 10 | phase 1, Vn1 |
| `STEP_DL2` | A | E | 10 | phase 1, Vn2 |
| `STEP_PSD_A` | A | F | 10.5 | phase 2, Vn3 |
| `STEP_PSD_B` | B | E | 10.5 | phase 2, Vn4 |
| `STEP_M5` | D = CK(stage) on CLK | I = CK(stage+1) on DCLK, M2 = 15 | Td = 1 ns | phase 3, Vn(5+stage) |

`stage` 0..4 names the pipeline stage under test. In DUT test mode the stage
sits between registers `stage` and `stage+1`. The numbering of the
multiplexer inputs and all encodings are this design's own; the select lines
of the original circuit are not published.

### Self-test

The self-test checks that the circuit's delays can be trusted. It works
because the DLL converts any extra delay in its loop into a change of Vn,
which can be measured at a pin.

* **Phase 1.** The C-H, B-G and A-E loops each hold ten elements, so they must
  lock at the same Vn. A slow element in one line raises that line's Vn.
* **Phase 2.** The A-F and B-E loops both span 10.5 elements, but only if A
  is exactly half an element behind B. A fault on the J-A path pushes Vn3 and
  Vn4 apart in one direction. A fault on the J-B path pushes them apart in the
  other.
* **Phase 3.** With Td = 1 ns, the loop from CK(i) (through CLK) to CK(i+1)
  (through DCLK) is again one HFCLK period. It must lock at Vn0. This exercises
  M5, M6, M7, input 15 of M2 and the D and I paths.

The end-to-end testbench runs the procedure on the fault-free circuit and with
fifteen inserted faults, one at a time. The behavioural model gives:

| case | Vn0 | Vn1 | Vn2 | Vn3 | Vn4 | verdict |
|---|---|---|---|---|---|---|
| fault-free | 611.5 | 611.5 | 611.5 | 630.3 | 630.3 | fault-free |
| +60 ps in DL0 | 635.6 | 611.5 | 611.5 | | | phase 1 |
| +100 ps in DL1 | 611.5 | 654.1 | 611.5 | | | phase 1 |
| +200 ps in DL2 | 611.5 | 611.5 | 714.1 | | | phase 1 |
| +60 ps on J-A | 611.5 | 611.5 | 611.5 | 608.0 | 656.4 | phase 2 |
| +100 ps on J-B | 611.5 | 611.5 | 611.5 | 676.9 | 594.9 | phase 2 |
| +60 ps on M3 path A-X | 611.5 | 611.5 | 590.8 | | | phase 1 |
| +100 ps on M3 path B-X | 611.5 | 578.5 | 611.5 | | | phase 1 |
| +200 ps on M3 path C-X | 551.5 | 611.5 | 611.5 | | | phase 1 |
| +60 ps on M4 path E-Y | 611.5 | 611.5 | 635.6 | | | phase 1 |
| +100 ps on M4 path G-Y | 611.5 | 654.1 | 611.5 | | | phase 1 |
| +200 ps on M4 path H-Y | 714.1 | 611.5 | 611.5 | | | phase 1 |
| +200 ps on M4 path F-Y | 611.5 | 611.5 | 611.5 | 745.4 | 630.3 | phase 2 |
| +60 ps on M2 tap 15-DCLK | 611.5 | 611.5 | 611.5 | 630.3 | 630.3 | phase 3 (Vn5 = 635.5) |
| +100 ps on M5 DCLK-CK4 | 611.5 | 611.5 | 611.5 | 630.3 | 630.3 | phase 3 (Vn8 = 654.1) |
| +200 ps on U-CLK buffer | 611.5 | 611.5 | 611.5 | 630.3 | 630.3 | phase 3 (Vn5 = 551.5) |

A delay on the X side of the loop lowers Vn, and a delay on the Y side raises
it. Phase 1 names the faulty line or path; phase 3 names the register pair.
Two values come from the original characterisation: 611.5 mV, the locked Vn
at 100 ps per element, and the 60 ps minimum element delay. The shape of the
delay-versus-Vn curve is this model's own (see below). Even so, the shifts
come out close to the published transistor-level results, for example
633 mV for the DL0 fault, 609.8 / 651.5 mV for the J-A fault and 554 mV for
the C-X fault. The multiplexers and the CLK path have zero delay in the RTL,
so their faults are made by the testbench: it forces the node a multiplexer
drives (X, Y, DCLK or the CK bus) to a copy in which only the faulty path's
source is delayed.

## Analog models and their limits

* `half_delay_element`: an inverting stage with delay
  `30 + 20 * exp(-(Vn_eff - 611.5) / 148)` ps, where
  `Vn_eff = (Vn + VDD - Vp) / 2` and VDD = 1800 mV. A `delay_element` is two
  halves in series: 60 ps at full drive, 100 ps at 611.5 mV. Both edges have
  the same delay, although the real element is asymmetric. Each half has a
  variable `extra_ps`, 0 by default, that a testbench sets through the
  hierarchy to insert a delay fault.
* Each model holds only one edge in flight, so input edges must be further
  apart than the element delay. That is always true at the clock rates used,
  where the half period is at least 350 ps.
* Computed delays are built from constant binary-weighted waits
  (`ctc_pkg::wait_fs`), which gives 1 fs resolution. All sources use
  `timeunit 1ps; timeprecision 1fs`.
* `dll`: on each rising edge of Y it takes the time to the nearest rising edge
  of X as the phase error. It changes Vn by 0.1 mV per ps of error and sets
  Vp = VDD - Vn. It starts at 900 mV. `locked` goes high after 16 errors in a
  row below 0.5 ps. Locking from scratch takes under 2 µs; moving between
  self-test loops takes a few hundred ns.
* `pll`: measures the IPCLK period through a 1/8-weight filter. On each IPCLK
  rising edge it emits ten pulses at one tenth of the filtered period. It is
  disabled, with no output, in normal mode.

## Simulating

Every file is one module or package. `rtl/mult_pkg.sv` and `rtl/ctc_pkg.sv`
must come first. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/mult_pkg.sv rtl/ctc_pkg.sv rtl/*.sv tb/tb_pipeline_test_top.sv \
  --top-module tb_pipeline_test_top
./obj_dir/Vtb_pipeline_test_top
```

Every testbench ends with `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_pipeline_test_top` | End to end, all defaults, about 15 s. Normal mode at about 1.4 GHz; DUT test mode on every stage with the published init/activation vector pairs, with Td and the 4-edge latency measured; the self-test on a fault-free circuit and with the fifteen faults above; counts each mechanism |
| `tb_delay_fault_detection` | The delay-fault experiment at 100 MHz: the stage modules with registers on CK0..CK5 of the clock timing circuit and a delay on each stage output. For the eight published target paths, the product is right at the path's own delay, wrong with 50 ps added at the same Td, and right again one Td step higher. The slack limits: a 20 ps fault is found on a path 15 ps below Td, a 40 ps fault is missed on one 45 ps below. Binning: a Td sweep per stage finds 750/700/700/700/650 ps, and normal mode then runs at 750 ps and fails at 700 ps |
| `tb_clock_timing_circuit` | PLL and DLL lock; all 80 pairs of stage and Td code measured to 0.1 ps; normal-mode routing; all self-test loops |
| `tb_pipelined_multiplier` | products and latency 5 with one clock, latency 4 with each register's clock delayed |
| `tb_sn_l1`, `tb_sn_l2`, `tb_sn_l3`, `tb_compressor_4_2`, `tb_cla_l1`, `tb_cla_l2` | arithmetic of each stage against `*` and `+` |
| `tb_ctc_control`, `tb_clock_mux`, `tb_reg_clock_select` | multiplexer routing for every mode and select value |
| `tb_delay_element`, `tb_delay_line`, `tb_psd`, `tb_pll`, `tb_dll` | delays, taps, the 50 ps A/B offset, x10 multiplication, DLL lock points |

## Where this design departs from the original circuit, and what it leaves out

* The stage delays are not modelled in the RTL, which is zero-delay.
  `tb_delay_fault_detection` adds one delay per stage output, taken from the
  published path delays. A late stage then passes on its whole previous
  output, so the faulty product is the product of the initialisation vector.
  In the original gate-level simulation only the target path is late, so
  the faulty products there differ from the right ones in one or two bits.
  Both are printed; the check is only that the product is wrong.
* The CLK compensation buffer and the clock-tree buffers are physical delays
  with no logic function, so they are omitted.
* The multiplexers have no delay, so faults on their paths (M2-M5 and the
  buffer) are inserted by forcing nodes from the testbench, not through a
  hook in the RTL.
* The element delay curve, the DLL loop gain and the PLL filter are modelling
  choices, not circuit data.
* The tester's part of the self-test, comparing Vn values within a tolerance
  set by characterisation, is done by the testbench with a 5 mV tolerance.
  There is no on-chip sequencer, because Vn is measured off chip.
