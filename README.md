# WCDMA multipath searcher on a single wave-pipelined CMAC

In a WCDMA downlink, the signal reaches the handset along several paths, each
with its own delay. A Rake receiver combines these paths, but first it must
know where they are. This design is the **multipath searcher** that finds
them. It correlates the received samples with shifted copies of the
cell's pilot scrambling code and reports the delays where the correlation
energy shows a real path.

The design has two central ideas:

1. **A three-stage detector.**
   - A coarse first dwell scans every offset.
   - A stricter second dwell re-tests the candidates on fresh data.
   - A verification stage removes the false peaks that filtering and
     sampling leave next to each real peak.
2. **One very fast complex multiplier-accumulator (CMAC).** All of this
   arithmetic, about a million multiply-accumulates per 5-slot search period,
   runs on one CMAC. In silicon it is a wave-pipelined circuit of dual-rail
   pass-transistor logic that runs at several hundred MHz. A chip-rate
   design would need dozens of CMACs for the same work.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). It has been
checked with Verilator (lint and simulation) and the Yosys/slang front end.

## The search, step by step

Time is counted in **chips** (3.84 Mchip/s, 2560 per slot, 256 per pilot
symbol) and **samples** (4 per chip). A delay is measured in samples, so it
has quarter-chip resolution.

The searcher works on **search periods of 5 slots** (12,800 chips, 51,200
samples). A two-bank store holds one period while the next is being
written. Processing a period runs three stages. Each stage works on what
the stage before it produced in the previous period:

| Stage | Input | Work | Output |
|---|---|---|---|
| Verification | detected delays D_d from the previous second dwell | rule-based peak cleanup | verified paths on `path_*` |
| Second dwell | candidates C_d from the previous first dwell | 5 correlations of 1024 chips each, one per slot of the *current* period | D_d |
| First dwell | current period | 768 offsets × 2 correlations of 512 chips | C_d (at most 36) |

A path therefore comes out two periods after the one in which it was first
seen. Because the second dwell re-tests candidates on newer data, a
spurious candidate caused by noise or by a path that has just faded gets a
fresh chance to be rejected.

### First dwell: offset interleaving

The first dwell covers ±96 chips at 4 sample phases: 768 offsets.
- **Symbols.** In each slot it uses the first 8 pilot symbols. Symbols 9
  and 10 stay free, so a 512-chip correlation never spills into the next
  slot.
- **Tests per symbol.** Symbol p (1..8) makes 24 tests:
  - chips +p, +p+8, …, +p+88;
  - the same 12 chips negated.
- **Sample phase.** Slot k of the window uses sample phase k−1.
- **Coverage.** Four slots therefore cover every offset once.
- **Second window.** The whole pattern is repeated one slot later (slots
  2–5) to give a second, independent correlation per offset.

The energy of an offset is |R|² + |R′|² over the two windows.
- **Noise floor.** The mean of the 768 energies.
- **TH1.** 1.5 × noise floor when the SNR is 4 dB or less, 1.75 × above
  that. An unknown SNR counts as 4 dB.
- **Candidates.** Offsets above TH1 enter a 36-entry list kept in order of
  decreasing energy. When it is full, a newcomer pushes out the weakest
  entry only if it is stronger.

`dwell1_offsets` turns (window, slot, symbol, test) into the delay, the
first code chip and the first sample of the correlation. Negative offsets
correlate against the code of the *following* symbol, so every sample a
correlation reads lies inside the stored period.

### Second dwell: interleaved verification

ψ candidates are split into groups of ⌈ψ/6⌉. The test order walks the list
with a stride of ⌈ψ/⌈ψ/6⌉⌉: for ψ = 36 it is 0, 6, 12, …, 30, 1, 7, ….
Each group is tested in its own pilot symbol (symbols 1–6). Each test is a
1024-chip correlation, repeated in each of the 5 slots.

The five energies are summed. The candidate is a detection when their mean
exceeds TH2, which is set from the same noise floor:
- 1 × noise floor below 4 dB SNR;
- 1.5 × from 4 dB up to 8 dB;
- 1.75 × from 8 dB up to 12 dB;
- 2.25 × from 12 dB up.

### Verification logic

With quarter-chip resolution, one real path lights up several adjacent
offsets. The verification stage applies three rules to the detected delays:

1. **Local maxima.** A delay is a local maximum when it is stronger than
   each immediate neighbour (±1 sample) that is present.
2. **Side lobes.** A weaker delay within ±2 samples of a local maximum is
   removed. The window grows to ±3 on a side where no other local maximum
   lies within 8 samples.
3. **Close survivors.** Of two survivors less than 3 samples apart, the
   weaker is removed.

Example: with real paths at 3 and 9 and a false local maximum at 7, only 3
and 9 survive. The block does all comparisons in parallel, in four pipeline
steps, so it is ready five clocks after `start`.

## The CMAC and how the searcher feeds it

`cmac` is the arithmetic engine. Its datapath, in order:

1. **Multipliers.** Four 8×8 sign-magnitude multipliers
   (`wp_multiplier`). Each is a 7×7 carry-save array of `csa_pe` cells
   (an AND gate plus a full adder) with a ripple-carry final adder. The
   sign comes from an XOR. A negative result is one's-complemented, and a
   second ripple-carry adder adds the sign bit. The product is 16 bits.
2. **Adders.** Two 16-bit adders form `A·B + C·D` and `E·F + G·H`. The
   sums are sign-extended to 22 bits.
3. **Accumulators.** Two 22-bit accumulators. Each bit goes through an
   `accum_latch`: three flip-flops on a late clock, on the inverted clock
   and on the clock, gated by RESET.
4. **Controls.** RESET starts a new accumulation with the current input.
   SAMPLE copies out the accumulation that ends with the current input.

The gates of the multipliers and adders are all built from one dual-rail
cell, `npcpl_cell`. It is a
pass-transistor multiplexer, `q = B ? A_i : A_j`, on both rails; with
different input wiring it becomes AND, OR, XOR, SUM or CARRY.

**Wave pipelining.** In silicon the multiplier-adder block is one deep
combinational circuit that holds 4 operand sets ("waves") at once. In RTL
this becomes a 4-stage delay line that carries data, RESET and SAMPLE
together. The RTL therefore matches the circuit clock for clock: a result
appears 4 clock edges after its last input. The transistor-level delay
balancing (buffers and deskew elements) has no RTL counterpart and is
absent.

**Two modes, five FIFOs.** The CMAC's eight inputs come from five FIFOs
through `cmac_input_demux`:

| mode | FIFO 1..5 hold | A B C D E F G H | CMAC computes |
|---|---|---|---|
| 1 correlation | code_r, −code_i, r_r, r_i, code_i | 1 3 5 4 1 4 2 3 | Σ conj(code)·r |
| 2 energy | R_r[n], R_i[n], R_r[n+1], R_i[n+1], — | 1 1 2 2 3 3 4 4 | two \|R\|² side by side |

**Clock domains.** The FIFOs are written on the control clock `clk` and
read on the CMAC clock `clk_cmac`, with Gray-coded pointers (`cdc_fifo`).
- Word tag: FIFO 1 also carries each word's mode, RESET and SAMPLE.
- Results: a sixth FIFO brings them back to `clk`.
- Flow control: the sequencer writes only while the operand FIFOs are not
  almost full. The CMAC side reads only while all five hold data and the
  result FIFO has room.
- Rates: either clock may be the faster one. In the end-to-end test the
  CMAC is the slower, so back-pressure is exercised.

**Word widths.**
- 512- and 1024-chip correlations reach about 2^17 in the 22-bit
  accumulator.
- The 8-bit CMAC inputs of the energy pass take them shifted right by
  `energy_shift` (one bit more for the 1024-chip correlations), saturated
  to ±127.
- The TH2 test compares 4 × (sum of five energies) with 5 × TH2, which
  accounts for that extra bit.
- Choose `energy_shift` so that the strongest expected correlation stays
  below 127 after the shift. With 8-bit input samples of peak value near
  100, 8 is a good start.

## Top level: `mp_searcher`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | control clock: sequencer, store, thresholds, lists |
| `clk_cmac`, `clk_cmac_late` | in | 1, 1 | CMAC clock and its delayed copy (rises after `clk_cmac`, before it falls) |
| `rst_n` | in | 1 | asynchronous reset, release synchronously to both clocks |
| `in_valid`, `in_i`, `in_q` | in | 1, 8, 8 | one received sample, two's complement, 4 per chip |
| `snr_db`, `snr_known` | in | 7 (signed), 1 | SNR estimate in dB; unknown counts as 4 dB |
| `energy_shift` | in | 5 | scaling of correlations to 8-bit CMAC inputs |
| `path_valid`, `path_delay`, `path_energy` | out | 1, 11 (signed), 20 | one verified path per strobe: delay in samples, summed second-dwell energy |
| `paths_done` | out | 1 | end of one period's list |
| `busy`, `overrun` | out | 1, 1 | processing a period; a period was complete while the previous was still being processed (sticky) |

**Local code.** The pilot code reference is generated inside the searcher
by `scrambling_code_gen`:
- Structure: the 3GPP downlink Gold code from two 18-bit shift registers,
  restarting every 38,400 chips.
- Code used: number 0, with x starting at 1 and y at all ones.
- Rate: one chip per 4 input samples.
- Alignment: it starts with the first sample after reset, so delays are
  measured against that instant.

**Input rate.** Samples may arrive at most every 3 control clocks. Each
period is processed while the next one arrives. With 36 candidates,
processing takes 971,610 CMAC cycles (1536 × 512 + 768 + 36 × 5 × 1024 +
5 × 18). The CMAC must therefore run at 292 MHz or more for real-time
operation at 15.36 Msample/s. The sequencer issues one chip per control
clock, so `clk` must keep pace as well. A period that completes while the
previous one is still in progress is dropped, and `overrun` is raised.

## Files

Arithmetic (`rtl/`):
- `mps_pkg`: shared constants, dual-rail type, mode enum.
- `npcpl_cell` and `pl_full_adder`: the dual-rail cell and the adder built
  from it.
- `pl_rca`: ripple-carry adder built from `pl_full_adder`.
- `csa_pe`, `wp_multiplier`, `accum_latch`, `cmac`.

Control and glue (`rtl/`):
- `cmac_input_demux` and `cdc_fifo`: CMAC input routing and the
  two-clock FIFOs.
- `sample_buffer`: the two-bank period store.
- `scrambling_code_gen`: the local code generator.
- `dwell1_offsets`, `threshold_unit`, `candidate_list`, `dwell2_order`,
  `verification_logic`: the search stages.
- `mp_searcher`: the top level.

Each module begins with a comment describing its function, interface and
timing. The comment also says which parts follow the published design and
which are this implementation's own choices.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
ends by printing `TB_RESULT checks=N failures=M`. A testbench for a leaf
module needs the package, the module itself and its sub-modules. The
simplest way to build one is to pass all of `rtl/`, for example:

```
verilator --binary --timing --assert -Wno-fatal rtl/mps_pkg.sv \
    $(ls rtl/*.sv | grep -v mps_pkg) tb/tb_cmac.sv --top-module tb_cmac -Mdir obj_cmac
obj_cmac/Vtb_cmac
```

Testbench coverage:
- **`wp_multiplier`:** exhaustive over all 65,536 operand pairs.
- **`cmac`:** random operands and control, against a 22-bit reference
  model. Each result must appear exactly 4 edges after its last input.
- **Order and control blocks:** `dwell1_offsets` is checked exhaustively:
  all 768 offsets per window, each exactly once. The verification-logic
  test runs the example profile described above plus 400 random profiles
  against a reference written directly from the rules.

`tb_mp_searcher` runs the whole searcher at full size, with no parameter
changes, in about 45 s of Verilator time:
- **Channel:** 9 paths with different gains and phases.
- **Waveform:** linearly interpolated between chips, so that each path's
  correlation peak is a triangle.
- **Path changes:** one path exists only in the first period and one
  appears from the second period on.
- **Run:** 4 periods.

It checks that both output lists contain exactly the live paths, each
within one sample of its delay (in practice they come out exact). It also checks the CMAC word counts of each period, and it
counts every mechanism: bank swap, both CMAC modes, FIFO back-pressure,
both TH1 rules, candidate-list overflow, second-dwell pass and rejection,
verification deletions. It fails if any count is zero.

`tb_mp_searcher_close` runs the closely spaced profile the searcher was
specified for, also at full size:
- **Channel:** four paths one chip apart (40, 44, 48 and 52 samples), at
  about 0, −3, −6 and −9 dB, with fixed gains.
- **Result:** the second dwell detects 18 delays. Verification keeps exactly
  the four paths and removes the 14 side-lobe detections.

## Where this design departs from, or adds to, the published one

- **Circuit level not modelled.** Transistor-level detail has no RTL
  counterpart: pass-transistor sizing, delay buffers, deskew elements,
  the transmission-gate variant of the cell (same logic as `npcpl_cell`)
  and the test-chip pads. The wave pipeline is modelled by its cycle
  behaviour (4 waves).
- **Own additions.** These are implementation choices:
  - the two-bank period store;
  - the result FIFO and the control tag carried in FIFO 1;
  - the `energy_shift` scaling;
  - the stage order within a period;
  - the fixed group/symbol placement of second-dwell tests.
- **Offset range.** The first dwell covers chips ±1..±96 with sample
  phases 0–3, i.e. delays −384..−1 and +4..+387 samples. Delays 0..3 (a
  path exactly at the reference) are not tested.
- **Conjugate code.** The searcher loads the conjugate of the code, so the
  CMAC computes conj(code)·r.
- **Not built.** The SNR estimator is an external module; its result
  enters on `snr_db`/`snr_known`.
- **Noise floor.** It is computed by an adder outside the CMAC. The
  published cycle budget spends 768 CMAC cycles on it, so the CMAC load
  here is 1,536 cycles lower.
- **Not simulated.** Detection statistics under fading (false-alarm and
  miss rates against SNR) were not simulated. The end-to-end test uses
  fixed path gains and bounded noise.
