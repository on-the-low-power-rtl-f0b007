# Low-power FIR filtering on a single-multiplier DSP

On a DSP with one multiplier, an N-tap FIR filter performs N multiplications
per output sample. Most of the multiplier's dynamic power comes from bits
toggling at its two inputs. This design arranges the filter so that those
inputs toggle as little as possible, without changing the numbers it computes.
There are two levers:

* **Structure.** In the *direct form* (DF), every multiplication takes a
  different delayed sample `x(n-k)`, so the data input changes every cycle. In
  the *transposed direct form* (TDF), all N multiplications of one sample use
  the same `x(n)`. The data input then changes once per sample. The price is
  that the partial sums between the TDF adders, the *precalculated values*
  (PCVs), must be kept in memory from one sample to the next.
* **Coefficient order.** The N multiplications can run in any order. If
  successive coefficients differ in few bits (small Hamming distance), the
  coefficient input toggles less. The order is found once, off-line, and loaded
  with the coefficients.

Combining the two gives three schemes:

| scheme | structure | coefficient order | hardware |
|---|---|---|---|
| I   | TDF | stage order 0..L-1     | modified DSP with a PCV memory (`tdf_fir_dsp`) |
| II  | TDF | low-Hamming-distance order | same hardware, different load |
| III | DF  | low-Hamming-distance order | ordinary MAC datapath (`df_fir_mac`) |

The top level, `fir_lowpower_dsp`, contains both engines behind a mode input.
The defaults are a 16x16-bit two's complement multiplier, filters of up to 89
taps, and 40-bit partial sums.

## The TDF engine and its PCV memory

Stage `k` of an L-tap TDF filter computes

    PCV_k(n) = h(k)·x(n) + PCV_{k+1}(n-1),      PCV_L = 0,   y(n) = PCV_0(n)

For each coefficient, the engine multiplies the held sample `x(n)` by `h(k)`,
reads `PCV_{k+1}(n-1)` from the PCV memory (PCVM), adds the two, and writes
`PCV_k(n)` back. The PCVM has one read port and a separate write-back port, so
this multiply-add-store takes a single cycle. A conventional MAC cannot do this
job, because each stage's result must go back to memory, not into an
accumulator.

### Reordering and the save transfer

This is the part that takes most thought. If stage `k` runs *before* stage
`k-1` within a sample, stage `k` overwrites `PCV_k(n-1)`, but stage `k-1` still
needs that old value. Before writing, the engine therefore copies the old value
to a second location, where stage `k-1` will read it. This is the *save
transfer*. If stage `k-1` has already run, a plain overwrite is enough. Stage
order (Scheme I) never needs a save transfer. The fully reversed order needs
one for every stage except stage 0.

The controller (`tdf_control`) turns any execution order into a fixed memory
layout, once, before filtering starts:

    save[k] = (k > 0) and (stage k-1 runs after stage k)
    base[k] = k + save[1] + save[2] + ... + save[k]

With that layout, stage `k`:

1. if `save[k]` is set, first copies `PCVM[base[k]]` to `PCVM[base[k]-1]`
   (one extra cycle);
2. reads `PCV_{k+1}(n-1)` from `PCVM[base[k]+1]`;
3. writes `PCV_k(n)` to `PCVM[base[k]]`.

Step 2 always reads `base[k]+1`. That location is either stage `k+1`'s own
location, not yet overwritten because stage `k+1` runs later, or the copy that
stage `k+1`'s save transfer left there. The location just above the last stage
is never written and reads as zero, which supplies `PCV_L = 0`. The worst
order needs 2L locations, so the PCVM has `2*N_MAX` words. `y(n)` is always
read from `PCVM[0]`.

**Worked example.** Take a 4-tap filter with `h = 60, 22, 15, 78`, run in the
order `h(2), h(3), h(1), h(0)`. Stages 2 and 1 need saves, so the layout uses
seven locations:

| stage | save | saves to | writes | reads |
|---|---|---|---|---|
| 2 | yes | 3 | 4 | 5 |
| 3 | no  | – | 5 | 6 (always 0) |
| 1 | yes | 1 | 2 | 3 |
| 0 | no  | – | 0 | 1 |

For the input `x = 2, 9, 6, 5` the output is `y = 120, 584, 588, 723`. After the
fourth sample the PCVM holds `723, 423, 902, 792, 543, 390, 0`. The testbenches
check every one of these values.

### Set-up and timing

After the coefficients are loaded and `cfg_start` is pulsed, the controller
makes three passes:

| pass | cycles | what it does |
|---|---|---|
| SCAN  | L  | records each stage's execution position |
| PLAN  | L  | computes `save[k]` and `base[k]` |
| CLEAR | 2L | zeroes the PCVM (all PCVs are 0 before the first sample) |

`ready` rises after these 4L cycles.

Each sample then takes **L + S + 2 cycles**, where S is the number of stages
with `save[k]` set:

* one cycle to accept `x(n)`;
* one cycle per coefficient;
* one extra cycle per save transfer;
* one cycle to read `y(n)`.

`y_valid` pulses for one cycle, and the next sample can be accepted in that
same cycle.

The sample register on the multiplier's data input is loaded only when a sample
is accepted. The coefficient address holds still between samples and during a
save transfer. As a result, the multiplier inputs move only when the schedule
requires it.

## The DF engine (Scheme III)

`df_fir_mac` is a plain multiply-accumulate datapath. It is built from:

* a circular-buffer delay line (`sample_delay_line`);
* the same coefficient memory, multiplier and adder as the TDF engine;
* a 40-bit accumulator.

For each sample it pushes `x(n)` into the delay line and clears the
accumulator. Then, for each entry in execution order, it multiplies `h(k)` by
`x(n-k)` and accumulates. A sample takes **L + 2 cycles**.

Set-up clears the delay line in one cycle. Samples before the first one
therefore count as zero.

## Blocks

| module | role |
|---|---|
| `fir_lp_pkg` | default sizes; encoding of the PCVM write-data source |
| `bw_multiplier` | W x W two's complement array multiplier, modified Baugh-Wooley: sign-row/column bits inverted, correction ones at 2^W and 2^(2W-1), carry-save row reduction, final carry-propagate add |
| `pcv_adder` | adds the sign-extended product to a PCV or to the accumulator |
| `coef_memory` | coefficients in execution order, each tagged with its stage index; combinational read |
| `pcvm` | PCV memory: 2·N_MAX words, combinational read, separate write port |
| `tdf_control` | set-up passes, per-sample schedule, save transfers |
| `tdf_fir_dsp` | TDF engine (see the bus list below) |
| `sample_delay_line` | DF data memory: circular buffer, reads `x(n-k)` |
| `df_fir_mac` | DF engine |
| `fir_lowpower_dsp` | top: both engines, mode select, shared sample and output ports |

Inside `tdf_fir_dsp`, the datapath is organised as three buses:

* **data bus I** carries `x(n)` into a register that feeds the multiplier;
* the **coefficient bus** carries coefficients from memory to the multiplier;
* **data bus II** links the PCVM read port, the adder and the output register,
  plus a separate write-back path into the PCVM.

These buses are multiplexed point-to-point nets, not shared tri-state lines.

## Interface of `fir_lowpower_dsp`

| parameter | default | meaning |
|---|---|---|
| `MULT_W` | 16 | multiplier, sample and coefficient width |
| `N_MAX`  | 89 | longest filter |
| `PCV_W`  | 40 | partial sums, accumulator and output width |

All ports are synchronous to `clk`. `rst_n` is an active-low asynchronous
reset; the memories are not reset.

* **Loading.** Set `scheme_sel` to 0 for the TDF engine or 1 for the DF engine.
  For every position `i = 0..L-1`, pulse `cfg_we` with `cfg_pos = i`,
  `cfg_stage = k` (the stage that runs at position i) and `cfg_coef = h(k)`.
  The entries must be a permutation of `0..L-1`. Then pulse `cfg_start` with
  `cfg_taps = L`. This latches `scheme_sel` as the active mode (`mode_df`).
  Wait for `ready`. Changing scheme means a reload and a new `cfg_start`.
  Pulse `cfg_start` only while `ready` is high (or before the first set-up).
* **Samples.** `x_valid`/`x_ready`/`x_data` form a valid/ready handshake;
  `x_ready` is high only while the active engine is idle. `y_valid` is a
  one-cycle pulse with the full-precision `y_data` (two's complement,
  `PCV_W` bits). There is no back-pressure on the output.
* **Activity outputs.** `mac_step` is high in each multiply cycle; `save_step`
  is high in each save-transfer cycle.

The analog-to-digital and digital-to-analog converters at either end are
outside this RTL. Connect their digital sides to the `x_*` and `y_*` ports.

## What the simulations show

`tb_fir_lowpower_dsp` runs the whole processor at its default sizes. It uses
five linear-phase filters of its own design:

* three low-pass filters of 54, 71 and 89 taps;
* two band-pass filters of 62 and 80 taps;
* Hamming-windowed, quantised to 16 bits.

Each filter runs with 1000 uniform random samples in four combinations:
DF/TDF × stage order/minimised order. The minimised order comes from a greedy
nearest-neighbour search over Hamming distance. That search is a simple
stand-in for a better off-line optimiser such as a genetic algorithm.

The bench checks every output against a direct convolution and checks the
cycle counts. It also counts four kinds of activity per output sample:

* bit transitions at the multiplier's data input;
* bit transitions at its coefficient input;
* transitions of the W x W AND-gate partial-product bits `a[i]&b[j]` inside
  the multiplier, as a rough gate-level proxy;
* writes to the engine's data memory.

Typical 16-bit results:

| filter | combination | data in | coef in | partial products | memory writes | memory bits |
|---|---|---|---|---|---|---|
| LP 54 taps | DF/norm  | 424 | 374 | 4963 | 1   | 8    |
|            | DF/min   | 424 | 126 | 3995 | 1   | 8    |
|            | TDF/norm | 8   | 374 | 3040 | 54  | 898  |
|            | TDF/min  | 8   | 126 | 1037 | 80  | 1516 |
| LP 89 taps | DF/norm  | 690 | 514 | 7183 | 1   | 8    |
|            | DF/min   | 696 | 172 | 5932 | 1   | 8    |
|            | TDF/norm | 8   | 514 | 4150 | 89  | 1397 |
|            | TDF/min  | 8   | 172 | 1394 | 133 | 2483 |

"Memory bits" counts the bits that change between successive words written
to the engine's data memory: 16-bit samples for DF, 40-bit PCVs for TDF.

The results show:

* TDF cuts data-input activity to one sample change per output, about 98%
  less than DF.
* Reordering cuts coefficient-input activity by 65–80% in either structure.
* Reordering leaves data-input activity in the DF engine roughly unchanged:
  it rose slightly in these runs.
* Partial-product activity is always highest for DF/norm and lowest for
  TDF/min, at 8, 16 and 24 bits. TDF/norm usually lies below DF/min, but not
  for the 80-tap band-pass filter at 8 and 24 bits. For the 54-tap filter the
  reductions against DF/norm are about 20% (DF/min), 39% (TDF/norm) and 79%
  (TDF/min).
* The TDF engine pays in memory traffic: one PCV write per stage, plus one per
  save transfer in a reordered order. The DF engine writes one sample. Each
  PCV write changes about 16–19 of its 40 bits, so TDF/min writes more
  memory bits per sample than the multiplier-input buses save. Whether TDF
  wins overall depends on the real capacitance of the memory, the buses and
  the multiplier's internal nodes. The partial-product count is far smaller
  than a gate-level multiplier's real switching, so no weighted total is
  given here.

The bench fails in any of these cases:

* TDF data-input activity is above a tenth of DF's;
* reordering does not lower coefficient-input activity;
* DF/norm is not the highest or TDF/min not the lowest in partial-product
  activity;
* the memory-write counts differ from one per stage plus one per save (TDF)
  or one per sample (DF).

`tb_fir_word_sizes` repeats the workload on 8x8-bit and 24x24-bit builds, with
fewer samples. The 24-bit build uses `PCV_W = 56`.

All these are transitions of settled values, counted once per clock at the
register-transfer level, with no glitches. They are not power figures.
Power would need a gate-level netlist and extracted
capacitances.

## Departures and choices

* **PCVM layout.** The layout rule and the set-up passes that derive it in
  hardware belong to this design. For the example order, the rule produces
  the seven locations shown above. An alternative is to compile the addresses
  into the program or a microcode table.
* **Stage tags.** The coefficient memory stores a stage index with each
  coefficient, so any order can be loaded without recomputing addresses
  outside the chip.
* **Widths.** The 40-bit partial-sum width and the absence of saturation or
  output scaling are choices of this design. `y_data` is the exact sum; scale
  or round it outside if a narrower output is needed. 40 bits hold 89
  full-scale 16x16 products. Wider multipliers need a larger `PCV_W`: at least
  `2*MULT_W + ceil(log2 N_MAX)` bits.
* **Timing and handshake.** Single-cycle multiply-add, combinational memory
  reads, the valid/ready handshake and the cycle counts are choices of this
  design. The critical path runs from the coefficient-memory read, through the
  stage-table lookup, PCVM read, multiplier and adder, to the PCVM write. A
  faster clock would pipeline it.
* **Two engines in one top.** Putting Schemes I/II and Scheme III side by side
  behind a mode bit is a packaging choice. Scheme III is meant for processors
  without the PCV memory, and either engine can be used on its own.
* **Not built.** The converters are not built, and neither is the ordering
  search, which is a one-time software step.
* **Verilator warnings.** The assertions use a synchronous `disable iff
  (!rst_n)` while the flops reset asynchronously, so Verilator warns
  `SYNCASYNCNET`. This is harmless.

## Simulating

Each `tb/tb_*.sv` is self-checking. It prints `TB_RESULT checks=N failures=M`
and stops, and includes a watchdog. For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/fir_lp_pkg.sv tb/tb_fir_lowpower_dsp.sv --top-module tb_fir_lowpower_dsp
    ./obj_dir/Vtb_fir_lowpower_dsp

| bench | what it covers |
|---|---|
| `tb_bw_multiplier` | exhaustive at 8 bits; corners and random operands at 16 and 24 bits |
| `tb_pcv_adder`, `tb_coef_memory`, `tb_pcvm`, `tb_sample_delay_line` | the datapath blocks and memories |
| `tb_tdf_control` | the example's exact PCVM address sequence; random orders against a bench model |
| `tb_tdf_fir_dsp`, `tb_df_fir_mac` | each engine at default size: worked examples, random filters up to 89 taps, cycle counts |
| `tb_fir_lowpower_dsp` | the full workload at default size (about 2 s); every mechanism — save transfers, scheme switches, input stalls, Scheme I — must occur |
| `tb_fir_word_sizes` | the workload on 8-bit and 24-bit builds |

The shared stimulus and checking code is in `tb/fir_workload_runner.sv`.
