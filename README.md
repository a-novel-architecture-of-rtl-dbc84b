# IQ/MC core: inverse quantization and multichannel dematrixing for MPEG-2 audio

This is a small fixed-function processor core for the part of an MPEG-2
audio (Layer I/II) decoder that sits between the bitstream parser and the
synthesis filter bank. For one subband it takes the quantized samples of
the five transmission channels T0..T4 and returns the five reconstructed
audio channels L, R, C, LS and RS. Three jobs are done on the way:

* **Inverse quantization**: requantize (`Q = C·(Q' + D)`) and rescale
  (`T = SF·Q`).
* **Multichannel processing**: dynamic crosstalk, transmission channel
  switching (`tc_allocation`) and dematrixing. Dematrixing rebuilds the two
  channels that were not transmitted from the compatible stereo pair
  L0 = T0 and R0 = T1.
* **Denormalisation**: `A = A^w·N`.

The main idea is that all of this is done by **one multiplier, two
adder/subtractors and fifteen registers**, used in a fixed 47-cycle
schedule. There is no program, no data RAM and no address generator. A
granule is 5 channels × 3 samples = 15 samples. One granule goes in every
47 cycles, and 15 results come out at the same rate.

## The arithmetic, reordered

Every step is a multiplication, an addition, or both:

| phase | step | operation |
|---|---|---|
| I   | requantization | `Q = C·Q' + D'`, where `D' = C·D` |
| II  | rescaling + crosstalk | `T = SF·Q` (the SF may be borrowed from another channel) |
| II  | switching + dematrixing | `X = L0 − T2 − T3`, `Y = R0 − T2 − T4` (accumulated) |
| III | denormalisation | `A = N·A^w` |

The requantization formula adds before it multiplies. Here it is rewritten
as `C·Q' + C·D`, and `C·D` is kept in its own table (`D'`). After that,
every phase is "multiply, then add", and one two-stage pipeline serves all
three:

    stage 1:  R0   <= table_coefficient * operand
    stage 2:  FIFO <= R0 (+/-) second_operand

## Datapath

    in_sample ─┐
               ├─mux─► MPY ──► R0 ──────────────────────────────► out_sample
    FIFO4 out ─┘       ▲       │
             coefficient table │
                               ├─► ADD/SUB0 ─► FIFO0 ─┬──► (mux) FIFO1 ─┬──► (mux) FIFO2 ─► FIFO3 ─► FIFO4 ─► back to MPY
               D' table / FIFO0┘        ▲             │        ▲        │        ▲
                                        └─────────────┘        │        │        └── R0
                               └─► ADD/SUB1 ───────────────────┘        │
                                        ▲                               │
                                        └───────────────────────────────┘  (FIFO1 feedback)

* Each FIFO is three registers in a row (`iqmc_fifo3`). A granule has
  three samples per channel, so one FIFO holds exactly one channel.
* A value that leaves a FIFO and is fed back into it returns after three
  cycles. It then meets the next channel's sample for the same time slot.
  This is what lets FIFO0 and FIFO1 act as accumulators for the
  dematrixing sums.
* The datapath storage is 16 registers (15 FIFO registers plus R0). There
  are 4 multiplexers: the multiplier operand, the ADD/SUB0 operand, the
  FIFO1 input and the FIFO2 input.

## The 47-cycle schedule

`c` is the cycle within a granule. Stage 1 is the multiplier; stage 2 is
the ADD/SUB units and the FIFO writes, one cycle later.

| c | stage 1 (MPY → R0) | stage 2 (→ FIFOs) |
|---|---|---|
| 0–14  | `Q'(c) · C[class]` from the input | (c = 1–15) FIFO0 ← R0 + D'; all five FIFOs shift as one 15-register chain |
| 15    | bubble | last Phase I write; FIFO4 now holds T0's samples, …, FIFO0 holds T4's |
| 16–30 | `FIFO4 · SF[...]`, so R0 = T0, T0, T0, T1, …, T4 | (c = 17–31) dematrixing, see below |
| 31    | bubble | last Phase II write |
| 32–46 | `FIFO4 · N[channel]`; the chain shifts again | – |
| 33–47 | R0 is valid: `out_valid`, `out_chan` | |

In Phase II, the requantized samples are still draining out of the chain
into the multiplier while new results are written behind them. A FIFO may
stop taking chain data only once the last Phase I sample has passed its
first register:

* FIFO0 is free from cycle 16.
* FIFO1 is free from cycle 19. It starts accumulating at 20.
* FIFO2 is free from cycle 22. It takes R0 from 23.

From cycle 23, T2, T3 and T4 enter FIFO2 in turn and shift on. At the end
of Phase II:

| FIFO4 | FIFO3 | FIFO2 | FIFO1 | FIFO0 |
|---|---|---|---|---|
| T2 | T3 | T4 | Y-side result | X-side result |

Phase III reads them in that order, FIFO4 first. The output order of a
granule is therefore: T2's channel, T3's, T4's, then the two dematrixed
channels, each as s0, s1, s2. `out_chan` names the audio channel of every
sample.

The two bubbles are where the multiplier waits for the chain to present
the first sample of the next phase. So 45 of the 47 cycles are
multiplications.

## Dematrixing in a fixed order

R0 delivers T0, T1, T2, T3, T4 in this order, three samples each. Each
accumulator applies one operation per group: load R0, keep, add, subtract,
or reverse-subtract (`R0 − FIFO`). FIFO1 cannot use T0: during T0 it is
still passing Phase I data along.

In the 3/2 configuration, `tc_allocation` (0..7) chooses which audio
channels travel in T2..T4. The two missing channels follow from
`L0 = L + C + LS` and `R0 = R + C + RS`, using weighted channels.

**Modes 0, 3, 4 and 5** are independent:

    FIFO0 = L0 − T2 − T3
    FIFO1 = R0 − T2 − T4

**Modes 1, 2, 6 and 7** are dependent: one result is the centre channel,
and the other result needs it. Substituting C turns each dependent sum into
a plain sequence of T's:

* **Modes 2 and 6** (C = R0 − T2 − T4):

      FIFO1 = R0 − T2 − T4                  (= C)
      FIFO0 = L0 − R0 + T2 − T3 + T4        (= L0 − C − T3)

* **Modes 1 and 7** (C = L0 − T2 − T3). Both results need T0, but FIFO1
  cannot take it. So while R0 holds T1:
  * FIFO1 copies L0 from FIFO0's output;
  * FIFO0 becomes `T1 − L0` (reverse subtraction).

      FIFO1 = L0 − T2 − T3                  (= C)
      FIFO0 = R0 − L0 + T2 + T3 − T4        (= R0 − C − T4)

`iqmc_dem_decode` turns `tc_allocation` into this per-group programme, and
gives the audio channel left in each FIFO. Dematrix procedure 3 means no
matrixing. It is also the setting for plain two-channel MPEG-1 use. With
it, FIFO0 = T0 and FIFO1 = T1.

## Number format and tables

All words are 24-bit two's complement with 20 fraction bits, so the range
is [−8, 8).

* **Multiplier:** the product is truncated toward −∞ and saturated.
* **ADD/SUB:** results saturate.
* **Input:** `Q'` is the quantized code with its MSB inverted, read as a
  fraction in [−1, 1), as in the MPEG audio standards.

The tables are computed at elaboration from these formulas and rounded to
nearest:

| table | index | value |
|---|---|---|
| C  | class q = 0..16 (steps 3, 5, 7, 9, 15, 31, …, 65535) | `2^bits / steps` |
| D' | class q | `(2^bits − steps + 1) / steps` |
| SF | index i = 0..62 | `round(2^(1 − (i mod 3)/3)) >> (i div 3)` |
| N  | {procedure, channel} | `1/α` (L, R); `1/(αβ)` (C); `1/(αγ)` (LS, RS) |

For N, (α, β, γ) is:

* procedure 0 or 2: (1/(1+√2), 1/√2, 1/√2)
* procedure 1: (1/(1.5+0.5√2), 1/√2, 1/2)
* procedure 3: (1, 1, 1)

Here `bits` is the code width before grouping (2, 3, 3, 4 for 3, 5, 7, 9
steps; otherwise q).

**Dynamic crosstalk:** channel y is rescaled with the scale factor index of
channel `sf_src[y]`. A value above 4 means the channel's own index.

## Interface and timing (`iqmc_core`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous reset, active low |
| `in_valid` / `in_ready` | in / out | a granule starts on a cycle with both high |
| `in_info` | in | `gran_info_t`: `qclass[5]`, `sf_idx[5]`, `sf_src[5]`, `tc_alloc`, `dematrix`; taken in the start cycle |
| `in_sample` | in | Q', one per cycle: T0 s0..s2, T1 s0..s2, …, T4 s0..s2 |
| `out_valid`, `out_chan`, `out_sample` | out | reconstructed samples for the synthesis filter bank |

* `in_ready` is high whenever the core is idle.
* After the start cycle, the remaining 14 samples must follow on
  consecutive cycles. An assertion in `iqmc_ctrl` checks this.
* The first output comes 33 cycles after the first input; the last comes
  47 cycles after it.
* Back-to-back granules start every 47 cycles. The next granule may start
  in the cycle that carries the previous granule's last output.

Layer I data uses the same core: its classes are a subset of the C/D'
tables. The parser hands over each channel's samples in groups of three.

## Files

| file | contents |
|---|---|
| `rtl/iqmc_pkg.sv` | word type, enums (channels, ADD/SUB operations, tables), `gran_info_t`, `dem_prog_t` |
| `rtl/iqmc_core.sv` | top: the datapath above |
| `rtl/iqmc_ctrl.sv` | cycle counter, phase decode, table addressing, selects, handshake |
| `rtl/iqmc_dem_decode.sv` | `tc_allocation` → dematrixing programme and channel tags |
| `rtl/iqmc_mpy.sv` | multiplier + R0 |
| `rtl/iqmc_addsub.sv` | adder/subtractor |
| `rtl/iqmc_fifo3.sv` | three-register FIFO |
| `rtl/iqmc_coef_rom.sv`, `rtl/iqmc_offset_rom.sv`, `rtl/iqmc_qclass.svh` | C/SF/N and D' tables |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, for the whole core:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/iqmc_pkg.sv tb/tb_iqmc_core.sv --top-module tb_iqmc_core -o sim
    ./obj_dir/sim

Replace `tb_iqmc_core` with any other testbench in `tb/`. All of them
finish in well under a second.

## How far it is verified

* `tb_iqmc_core` runs 96 granules through the core at its default size:
  * every `tc_allocation` under every dematrix procedure;
  * a third of them with dynamic crosstalk;
  * both back to back and with idle gaps.

  It checks every output sample and channel tag against a reference model.
  The model solves the MPEG-2 channel equations directly, with tables
  computed in floating point. It also checks the 33-cycle latency, the 15
  consecutive output cycles, and the 47-cycle period.
* Each unit has its own testbench:
  * multiplier: saturation;
  * FIFO: delay and hold;
  * tables: every entry;
  * `tb_iqmc_dem_decode`: runs the decoder's programme on random channel
    values for every mode and checks that the five channels come out under
    the right tags;
  * `tb_iqmc_ctrl`: checks every select in every cycle of the schedule.
* Every testbench has been shown to fail on a deliberately broken copy of
  its module.
* The saturating paths are checked only at unit level. With real audio
  levels the end-to-end test never saturates.

## Choices made here, and limits

* **Departure from the standard's naming.** For `tc_allocation = 3`, the
  original architecture's worked example names the results L^w and R^w.
  With the MPEG-2 channel table, mode 3 carries L in T3, so the first
  result is LS^w. The arithmetic is identical; the tags follow the
  standard.
* **Implementation choices:**
  * the binary point, rounding and saturation;
  * the handshake and side-information format;
  * the exact cycle of each select;
  * the reverse subtraction and the copy path used for modes 1 and 7;
  * the crosstalk encoding;
  * reset.
* **Crosstalk is limited.** It only substitutes the scale factor. Copying
  requantized samples from one channel to another is not built.
* **Procedure 2 has no phase shift.** MPEG-2 dematrix procedure 2 also
  phase-shifts the surround signal. That is not built, and procedure 2
  uses the magnitudes of procedure 0.
* **Out of scope:** the bitstream parser and the synthesis filter bank.
  `out_*` is the interface to the filter bank.
