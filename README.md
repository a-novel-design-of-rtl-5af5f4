# Divide-by-127/128 dual-modulus prescaler with a fast divide-by-3/4 counter

A dual-modulus prescaler (DMP) sits in the feedback loop of a PLL frequency
synthesizer. It divides the oscillator frequency by one of two neighbouring
ratios, here 128 or 127, chosen by a modulus input. Only the first,
synchronous stage runs at the full input frequency, so that stage sets the
top speed. This design uses a small synchronous **divide-by-3/4 counter** as
that first stage, followed by an **asynchronous divide-by-32 ripple
counter**:

    128 = 32 periods of 4 cycles
    127 = 31 periods of 4 cycles + 1 period of 3 cycles

The counter's speed comes from where the mode-selection logic sits. It is
reduced to a single two-input selection, S = MC ? 1 : QB2. That selection is
done by a pair of transmission gates. Its AND with the data bit is merged
into the input stage of the second flip-flop, a "NAND flip-flop". So only one
transmission gate lies in the critical path, and no separate gate lies in the
feedback path. This RTL captures that structure and its cycle behaviour. The
circuit techniques behind the speed (TSPC ratioed flip-flops, transmission
gates, device sizing) have no RTL counterpart.

## The divide-by-3/4 counter

Two flip-flops share the input clock:

| cell       | input              | outputs   |
|------------|--------------------|-----------|
| `DFF1`     | D1 = QB2           | Q1, QB1   |
| `NAND-FF2` | D2 = Q1, S         | Q2, QB2   |
| TG mux     | MC, QB2            | S         |

NAND-FF2 stores `Q1 AND S`. With S = 1 the two flops form a 2-bit Johnson
counter. The state is written as Q1Q2:

    MC = 1, divide by 4:  00 -> 10 -> 11 -> 01 -> 00
    MC = 0, divide by 3:  00 -> 10 -> 11 -> 00      (01 skipped)

With MC = 0, S follows QB2. When the counter leaves 11, QB2 is 0, so
NAND-FF2 loads 0 instead of 1 and the state 01 is skipped. At every other
state the two values of S give the same next state. **MC therefore matters
only on the clock edge that leaves state 11.** It may change at any other
time.

In silicon, QB2 must reach S through the transmission gate within one
cycle. That path is the critical path the design shortens. In RTL,
`tg_mux` is a plain combinational select and `nand_ff` a register storing
`d2 & s`.

The counter needs no reset: from any of the four states it falls into its
cycle. A reset to 00 is provided anyway so that simulation is deterministic.

## The prescaler around it

```
 clk ──► div34_counter ──Q1──► async_counter (5 T flip-flops) ──► fout
            ▲ mc                      │ cnt[4:0]
            └──── modulus_ctrl ◄──────┘◄── mode
```

* **Ripple counter.** `async_counter` is a chain of toggle flip-flops. Stage
  0 is clocked by Q1 of the 3/4 counter. Each later stage is clocked by the
  inverted output of the stage before it, so `cnt` counts up once per 3/4
  period. `fout = cnt[4]`.
* **Modulus control.** `modulus_ctrl` sets `mc = mode | ~&cnt`. In mode 0
  (divide by 127), MC drops to 0 during the one 3/4 period in which the ripple
  count is 31. That period is 3 cycles long. Each count value occurs once per
  output period, so exactly one cycle is removed.
* **Settling time.** The ripple count changes on the edge that enters state
  10. MC is used two edges later, on the edge that leaves 11. The ripple
  chain and the control gate therefore have at least one full input cycle
  to settle.

Output timing, per input clock cycle:

* `fout` is low for 64 cycles (counts 0 to 15).
* It is then high for 64 cycles in mode 1, or 63 cycles in mode 0 (counts
  16 to 31, which include the terminal count).
* Each `fout` edge in mode 0 therefore comes one input cycle earlier than it
  would in mode 1.
* The terminal count lies at the end of the high phase. So the value of
  `mode` when `fout` rises sets the length of the period that begins there,
  as long as `mode` only changes while `fout` is low.
* After reset, `fout` first rises on the 61st clock edge.

## Modules

| file | role |
|------|------|
| `rtl/prescaler_pkg.sv` | MC encoding (`MC_DIV3 = 0`, `MC_DIV4 = 1`), default stage count, `{Q1,Q2}` state enum |
| `rtl/dff_q_qb.sv`      | DFF1: D flip-flop with Q and QB |
| `rtl/nand_ff.sv`       | NAND-FF2: flip-flop storing `d2 & s` |
| `rtl/tg_mux.sv`        | transmission-gate select, `s = mc ? 1 : qb2` |
| `rtl/div34_counter.sv` | the divide-by-3/4 counter |
| `rtl/tff.sv`           | toggle stage of the ripple counter |
| `rtl/async_counter.sv` | ripple counter, divide by `2**STAGES` |
| `rtl/modulus_ctrl.sv`  | MC generation from `mode` and the ripple count |
| `rtl/dmp_127_128.sv`   | top: the 127/128 prescaler |

Top-level ports of `dmp_127_128`:

* `clk` is the input clock.
* `rst_n` is an asynchronous reset, active low.
* `mode` selects the ratio: 1 = 128, 0 = 127.
* `fout` is the divided output.
* `cnt` is the ripple counter state. It is brought out only so it can be
  observed.

The parameter `ASYNC_STAGES` (default 5) sets the ratios to
`4*2**ASYNC_STAGES` and one less.

## Where this RTL follows the source design and where it chooses

Taken from the published design:

* the counter's cells and how they are wired
* the MC polarity (1 = divide by 4)
* both state sequences
* the split into a synchronous 3/4 counter and an asynchronous divide-by-32
  counter
* the use of toggle flip-flops in the ripple counter

This design's own choices, which the source does not specify:

* the ripple counter is clocked from Q1, and its stages count up
* the all-ones terminal-count decode in `modulus_ctrl`
* the polarity of `mode`
* the asynchronous resets
* the rising active clock edge

The two alternative 3/4 counters that the source compares against are not
included. One puts transmission gates in both the critical and feedback
paths; the other uses NOR gates. Neither is part of this design.

How far to trust it:

* The logic is the whole of what the counter does, and the testbenches check
  it cycle by cycle.
* Nothing here says anything about the speed or power of a transistor-level
  implementation. The reported figures belong to a 0.18 µm TSPC circuit:
  7.0 GHz maximum input frequency and 2.4 mW at 1.8 V.
* `async_counter` is a true ripple counter: each stage is clocked by a
  flip-flop output. This is what the architecture intends. A standard-cell
  flow will see several generated clocks, which need clock constraints.

## Simulating

Each block has a self-checking testbench in `tb/`. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/prescaler_pkg.sv tb/tb_dmp_127_128.sv --top tb_dmp_127_128
./obj_dir/Vtb_dmp_127_128
```

Replace the testbench name to run another one.

* `tb_dmp_127_128` runs the prescaler at its default size. It checks:
  * the first output edge after reset
  * about 60 output periods, with `mode` changed at random times, each one
    128 or 127 cycles as expected
  * 64 cycles low in every period
  * exactly one skipped 01 state per divide-by-127 period, and none per
    divide-by-128 period

  It also counts both division ratios, the skips and the mode switches, and
  fails if any of them never happened.
* `tb_div34_counter` compares every state with the two published cycles
  while MC is held and while it changes at random. It also checks the 3- and
  4-cycle spacing of Q1.
* The remaining testbenches check their cells exhaustively or with random
  stimulus: `tb_dff_q_qb`, `tb_nand_ff`, `tb_tg_mux`, `tb_tff`,
  `tb_async_counter` and `tb_modulus_ctrl`.

All testbenches run in well under a second.
