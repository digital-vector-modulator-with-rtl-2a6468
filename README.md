# fast_vm: a digital vector modulator built on a circular sample buffer

`fast_vm` takes a complex control vector (I, Q) and plays out a stream of DAC
samples of a sine wave. The sine's amplitude and phase follow the vector. Its
frequency is `f_clk / N`, where N is the number of samples per period. With the
default N = 10 and a 100 MHz clock the output is 10 MHz. In an accelerator RF
control system, a signal like this (typically 9 MHz or 13 MHz) is mixed with a
local oscillator and up-converted to the cavity frequency, around 1.3 GHz. The
analog chain that does this (DAC, mixer, filters) is outside this RTL.

The main idea is to avoid multiplying on every clock. A direct modulator
computes `I*cos(wt) - Q*sin(wt)` for every output sample. Its clock is then
limited by the hardware multipliers, which on the FPGA family this design
targets run at about 100 MHz. This design instead computes one whole period of
N samples only when the vector changes. The period is stored in an N-word
circular shift register. That register turns over every clock and feeds the
DAC, so the output clock depends only on a register and a 2:1 multiplexer. The
multipliers get several clock periods to settle. The cost is latency: a new
vector shows up at the output some tens of clocks after it is applied.

## Structure

```
            i,q ──┬──────────────► comparator ◄──── cache ◄── (store: cache_load)
                  │                   │ not_equal     │ I,Q
                  └──► cache          ▼               ▼
                                   machine ◄── ready ─ calculator (N samples in parallel)
                                   │  │  │                │
                      cache_load ◄─┘  │  └► loader_load ─► loader (parallel in, serial out)
                                      │                    │ in1
                                  mux_select ───────────► mux ──► shifter (N-word ring) ──► sample
                                                           ▲ in2          │        │
                                                           └──────────────┘      sync ──► machine
```

| module | role |
|---|---|
| `vm_cache` | register of the vector the ring currently represents, cleared by reset |
| `vm_comparator` | `not_equal`: input vector differs from the cached one (combinational) |
| `vm_calculator` | 2N combinational multipliers and the sine/cosine tables. A settle counter raises `ready` CALC_CYCLES clocks after start |
| `vm_loader` | takes the N new samples in parallel, then hands them out one per clock, sample 0 first |
| `vm_mux` | chooses what is written into the ring: its own head (recirculate) or the loader's next sample |
| `vm_shifter` | the N-word ring. Its head word is the DAC sample. A phase counter raises `sync` on the last sample of each period |
| `vm_machine` | six-state controller: READY, UPLOAD, CALCULATE, LOAD, SYNC, LOAD_WAIT |
| `vm_pkg` | state enum and the constant functions that build the tables |
| `fast_vm` | top level; wires the above together |

## Samples and number format

Sample k of a period (k = 0 … N-1) is

```
s[k] = clip( (I*C[k] - Q*S[k]) >>> (2*IQ_BITS - SAMPLE_BITS - 1) )
C[k] = round(cos(2*pi*k/N) * (2^(IQ_BITS-1) - 1))
S[k] = round(sin(2*pi*k/N) * (2^(IQ_BITS-1) - 1))
```

- I, Q and the samples are signed two's complement.
- Rounding is half away from zero. The shift truncates towards minus infinity.
- `clip` saturates to the sample range.
- With the defaults (IQ_BITS = 18, SAMPLE_BITS = 14), the table peak is
  131071. The shift is 21. A vector of magnitude 2^17 gives an amplitude of
  about 8192, the full 14-bit range.
- Vectors longer than full scale, such as I = Q = full scale, clip at the
  peaks of the wave.
- For N = 8 the sine table is 0, 92681, 131071, 92681, 0, −92681, −131071,
  −92681.

The tables are computed during elaboration by constant functions in `vm_pkg`,
using `$sin`/`$cos` on reals. Any N works without a data file.

## The update sequence and its timing

This is the part that needs care. The ring never stops turning. New data is
slipped into it so that the old period plays to its end and the new period
starts exactly at a period boundary. The output never contains a period made
of mixed old and new samples.

Cycle by cycle, starting from a READY cycle r in which the comparator reports
a difference:

| state | cycles | what happens |
|---|---|---|
| READY | 1 (cycle r) | `not_equal` seen |
| UPLOAD | 1 | `cache_load`: the cache takes the input as it stands **in this cycle**. The calculator's settle counter is armed |
| CALCULATE | CALC_CYCLES | the multipliers settle from the cache output. `ready` is high in the last cycle |
| LOAD | 1 | `loader_load`: all N samples are captured in the loader |
| SYNC | T_sync = 1 … N | wait until `sync`, i.e. until the ring's head holds sample N-1 |
| LOAD_WAIT | N | `mux_select` is high. The loader shifts out samples 0 … N-1, each written into the tail of the ring |
| READY | | the ring now holds only the new period |

A word written into the tail reaches the head N clocks later, at the same
position in the period. The first word written in LOAD_WAIT therefore lands at
position 0. The new sample 0 appears on `sample` in the first READY cycle after
LOAD_WAIT, which is the first cycle of a period. The total latency from cycle r
to the first new output sample is

```
T_update = 1 + 1 + CALC_CYCLES + 1 + T_sync + N   clocks,  T_sync in 1..N
```

With the defaults this is 17 to 26 clocks. That is 68 to 104 ns at 250 MHz.

Consequences to keep in mind:

- The comparator is only acted on in READY. A vector that changes during an
  update is picked up after the update finishes, as a second update.
- The cache stores the input one clock after the change was seen. If the input
  moves again in that one cycle, the later value is the one used.
- If the input settles back to the value being loaded before the update ends,
  no second update follows.
- The inputs are assumed to be synchronous to `int_clk`. There is no
  synchronizer. A vector set from switches or another clock domain needs one
  in front of `fast_vm`.
- The multiplier path from the cache to the loader is a multicycle path of
  CALC_CYCLES + 1 clocks. A timing constraint must say so. The default of 3
  assumes 100 MHz multipliers in a 250 MHz design.

## Interface of `fast_vm`

| port | dir | width | meaning |
|---|---|---|---|
| `int_clk` | in | 1 | sample clock |
| `int_rst` | in | 1 | synchronous, active high. Clears cache, loader and ring; the output is then 0 |
| `i`, `q` | in | NUMBER_OF_BITS_PER_IQVALUE | the vector, signed |
| `sample` | out | NUMBER_OF_BITS_PER_SAMPLE | DAC word, signed, straight from a register |
| `debug` | out | 8 | `[5:0]` state one-hot (bit 0 READY … bit 5 LOAD_WAIT), `[6]` sync, `[7]` not_equal. Meant for LEDs during slow-clock bring-up |

| parameter | default | |
|---|---|---|
| `NUMBER_OF_BITS_PER_SAMPLE` | 14 | sample width |
| `NUMBER_OF_SAMPLES_PER_PERIOD` | 10 | N |
| `NUMBER_OF_BITS_PER_IQVALUE` | 18 | width of I and of Q, and of the table words |
| `CALC_CYCLES` | 3 | clocks allowed for the multipliers (at least 1) |

The port names and the three width parameters are those of the original
core's interface. `CALC_CYCLES` is an addition.

## Where this RTL follows its source and where it chooses

Taken from the original description:
- the block set and the wiring between blocks
- the six states and their order
- the cache cleared at start
- parallel calculation of all samples from internal sine and cosine tables
- the one-cycle UPLOAD and LOAD steps
- the SYNC wait of 1 to N cycles and the N-cycle LOAD_WAIT
- the table peak of 2^(IQ_BITS-1) − 1 and nearest rounding
- the three generics and their defaults
- an 8-bit debug port

Own choices, where the description is silent:
- The formula `I*cos − Q*sin`, the scaling shift, truncation and clipping.
- Signed output coding. The DAC's input code is unknown; an offset-binary DAC
  needs the MSB inverted.
- The settle counter and `CALC_CYCLES`. The description only says the
  calculation takes at least one cycle and depends on the multipliers.
- The loader's `load`/`shift` controls and the calculator's `start`. These
  control lines are not part of the published block wiring.
- The phase counter in the ring and the exact cycle of `sync`.
- Synchronous active-high reset.
- The binary state encoding and the debug bit assignment.

Departures worth knowing:
- The published state diagram leaves LOAD_WAIT on any clock. The prose and
  the latency formula give it N cycles. The RTL uses N cycles, because the
  transfer needs them.
- The published latency formula counts LOAD as N cycles. Here LOAD is one
  cycle, as the step list states, and the N-cycle transfer is LOAD_WAIT. The
  latency above is therefore shorter by N − 1 clocks than that formula.

Not in this RTL: the analog and board-level parts around the modulator. These
are the DAC, mixer and band-pass filter of the up-converter, and the
diagnostic board (13 MHz filter, relay bypasses, digital-potentiometer
attenuator, buffer, RMS and RF power detectors). Also left out are the
microcontroller acquisition board and its PC software. `sample` is the
interface to the DAC.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares against
values computed independently in the testbench and ends with a
`TB_RESULT checks=… failures=…` line.

- `tb_fast_vm` runs the top level at its default parameters. A cycle-level
  reference model tracks the phase, the cache and the playing period. Each
  cycle it checks every DAC sample and the debug state. It also checks each
  update's latency against the formula above. It covers:
  - a four-entry vector table
  - updates started at every phase, giving T_sync from 1 to N
  - deferred updates and clipping
  - a glitch during an update that must not cause a second update
  - random vectors at random times
  
  It fails if any of these never happens.
- `tb_vm_calculator` checks the default configuration against a reference. An
  8-sample, zero-shift instance reproduces the sine and cosine tables listed
  above.
- `tb_vm_machine` runs the controller against a reference state machine under
  random stimulus.
- The leaf testbenches cover the ring's delay and `sync` position, the
  loader's order, the cache, the comparator and the mux.

Not verified: behaviour at speed, the multicycle timing of the multiplier
path, and anything analog.

Running with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/vm_pkg.sv tb/tb_fast_vm.sv --top-module tb_fast_vm -o sim
./obj_dir/sim
```

Use the same command for the other testbenches, with the testbench name
changed. To lint a module: `verilator --lint-only -Wall -Irtl -y rtl
rtl/vm_pkg.sv rtl/<module>.sv`.

To change the size, set the parameters on `fast_vm`. The tables, the counters
and the shift follow automatically. `SAMPLE_BITS` must stay below
`2*IQ_BITS`. The testbenches hold their sizes in local parameters at the top.
