# Pipelined phase accumulator with sequential clock gating

A direct digital frequency synthesiser (DDFS) makes a sine wave by adding a
frequency control word (FCW) to a phase register every clock cycle and
converting the phase to an amplitude. At high clock rates the N-bit phase
adder has to be pipelined, and the pipeline needs a triangle of
*pre-skewing* flip-flops that delay each slice of the FCW to meet its
accumulator stage. For a 32-bit, 8-stage accumulator that triangle holds 144
flip-flops, more than the accumulator itself, and clocking them every cycle
makes it the largest power consumer in the phase accumulator (PACC), even
though its contents only change when a new FCW is loaded.

This design clocks the pre-skewing register column by column. When a new FCW
is loaded, column 0 is clocked on that cycle, column 1 on the next, and so
on. Each column sees exactly one clock pulse per FCW update and none
otherwise. The FCW may still be updated every cycle.

Default configuration: N = 32-bit phase and FCW, M = 8 pipeline blocks of 4
bits, and a K = 12-bit truncated phase output.

## Structure

```
            load ──► seq_gck_gen ──gck[0..M-1]──┐
                                                ▼
 fcw[N-1:0] ─────────────────────────────► preskew_array ──skew_fcw──► pipelined_acc ──acc_skew[N-1 -: K]──► postskew ──► phase[K-1:0]
                                          (column clocks)               (clk)                                  (clk)
```

| module           | role                                                        | flip-flops (default) |
|------------------|-------------------------------------------------------------|----------------------|
| `pacc_seqcg`     | top level: wires the four parts together                    | 202 + 8 latches      |
| `seq_gck_gen`    | shift register of `load` plus one clock gate per column     | 7 + 8 latches        |
| `clock_gate`     | latch + AND gate (integrated clock-gating cell)             | 1 latch              |
| `preskew_array`  | triangular FCW delay array, one clock per column            | 144 = N(M+1)/2       |
| `pipelined_acc`  | M blocks of N/M-bit adder, register and carry flip-flop     | 32 + 7 carries       |
| `postskew`       | re-aligns the K output bits                                 | 12 = K(KM/N-1)/2     |
| `pacc_pkg`       | default sizes and flip-flop count formulas                  | –                    |

The phase-to-amplitude converter and the D/A converter that follow a PACC in
a DDFS are not part of this design. `phase` is the port where a converter
would connect.

## The pipeline and its skew

The N-bit accumulator is cut into M blocks of W = N/M bits. Block j adds its
W-bit slice of the FCW and the carry that block j-1 produced one cycle
earlier. So block j works on the same phase step j cycles after block 0. The
critical path is one W-bit adder. The carry out of the top block is dropped,
so the phase wraps modulo 2^N.

For the sum to be right, FCW slice j must reach block j j cycles late, and it
must stay in step with the carries. The pre-skewing array does this:

* column 0 holds all M slices;
* column c holds slices c..M-1 and copies them from column c-1;
* slice j leaves the array from column j.

Slice j therefore passes through j+1 registers. At the output, only the top K
bits are kept. These are the top S = K/W blocks. Block j of them is delayed
M-1-j more cycles by `postskew`, and the top block goes straight to the
output. K must be a multiple of W. Each module stops elaboration with an
error if a size does not divide evenly.

## Sequential gated clocks

The array's contents only move when the FCW changes. A new word must be
copied into column 0, then one column to the right per cycle, and after M
cycles the array is still again. `seq_gck_gen` produces one clock per
column, `gck[c]`:

* `col_en[0] = load`;
* `col_en[c]` is `load` delayed c cycles by a shift register of M-1
  flip-flops on the free-running clock;
* `gck[c] = clk AND latch(col_en[c])`, where the latch is transparent while
  `clk` is low.

A load sampled on rising edge t gives one pulse on `gck[0]` at edge t, one
on `gck[1]` at edge t+1, ..., and one on `gck[M-1]` at edge t+M-1. That is
exactly when column c has to take the word over from column c-1. A second
load one cycle later starts a second wave one column behind the first, so
back-to-back updates work. In that case every column is clocked every cycle,
as in an ungated array.

The latch in front of each AND gate is a choice of this design. The enables
come from flip-flops that change just after the rising edge, while `clk` is
still high. A bare AND gate would then pass a glitch or cut a pulse short.
The latch holds the enable through the high phase. A synthesis flow would
normally map `clock_gate` onto the library's integrated clock-gating cell.
Tools report its latch on purpose.

Reset is asynchronous, active low, and clears every register: the state
registers, the pre-skewing columns, the accumulator, the carries, the
post-skew register and the shift register. It has to be asynchronous because
the gated columns get no clock edges while the design is in reset.

In simulation the column flip-flops and the accumulator flip-flops trigger in
the same time step. The gated clocks are continuous assignments from `clk`,
so a register on `gck[c]` samples the values from before the edge, just like
a register on `clk`. The testbenches check this every cycle.

## Interface and timing (`pacc_seqcg`)

| port     | dir | width | meaning                                                       |
|----------|-----|-------|---------------------------------------------------------------|
| `clk`    | in  | 1     | free-running clock                                            |
| `rst_n`  | in  | 1     | asynchronous reset, active low                                |
| `load`   | in  | 1     | high for one cycle with a new `fcw`; may be high every cycle  |
| `fcw`    | in  | N     | frequency control word, sampled only when `load` is high     |
| `phase`  | out | K     | truncated phase                                               |
| `col_en` | out | M     | columns that the next edge will clock (for activity monitoring) |

Let F be the FCW last sampled (on an edge with `load` high). The internal
phase follows P(e) = P(e-1) + F(e-1). After edge e, `phase` holds the top K
bits of P(e-M+1). The first effect of a new FCW shows on `phase` M cycles
after the edge on which it was loaded, which is 8 cycles by default.

## Clock activity against FCW update rate

`tb_pacc_update_rates` loads a new FCW every R cycles and counts flip-flop
clock events in the pre-skewing register. The design is compared with two
references worked out in the testbench: an ungated array, and a single gate
that clocks the whole array for M cycles after each load. In steady state,
with the default sizes:

| update period R | ungated | single gate | sequential (this design) |
|-----------------|---------|-------------|--------------------------|
| 1               | 144     | 144         | 144                      |
| 2               | 144     | 144         | 72                       |
| 4               | 144     | 144         | 36                       |
| 8               | 144     | 144         | 18                       |
| 16              | 144     | 72          | 9                        |
| 32              | 144     | 36          | 4.5                      |
| 64              | 144     | 18          | 2.25                     |

(Clock events per cycle.) The single gate saves nothing until updates are
more than M cycles apart. The sequential scheme uses 144 clock events per
update whatever the rate, so its activity equals the ungated array only when
the FCW changes every cycle. These are clock-event counts, not power: the
shift register, the latches, the clock buffers and the rest of the
accumulator are not included. The scheme was first evaluated for power at
800 MHz in a 0.18 µm CMOS process. Those physical results cannot be
reproduced in RTL simulation.

## Where this RTL makes its own choices

* `load` comes with the FCW on the same cycle. Column 0 is enabled by `load`
  directly, so the shift register has M-1 stages.
* Each AND gate has a latch in front of it (see above).
* Reset is asynchronous and active low.
* The phase wraps modulo 2^N, and the top block's carry is dropped.
* `col_en` is an extra output for observing the gating.
* Only the gated design is built. The ungated and single-gate variants exist
  only as counting models in `tb_pacc_update_rates`.
* Clock-tree buffering, timing closure at the target clock rate and power
  are outside the RTL.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_seq_gck_gen`       | `gck[c]` pulses exactly at edges t+c after each load, stays low while `clk` is low, and never pulses during reset; `col_en`; pulses per column equal the number of loads |
| `tb_preskew_array`     | every cycle, slice j equals the word loaded j or more cycles earlier, with sparse, back-to-back and random loads |
| `tb_pipelined_acc`     | every cycle against an unpipelined accumulator, with wrap-arounds and carries across every block boundary |
| `tb_postskew`          | the delay of each output block and the reset value |
| `tb_pacc_seqcg`        | the whole design at its default sizes, every cycle against an unpipelined reference; the load-to-output latency of M cycles; one clock per column per load; that idle columns, overlapping load waves, back-to-back loads and phase wrap-around all occur; an asynchronous reset in the middle of a load wave |
| `tb_pacc_update_rates` | the update-rate sweep above: exact activity counts and phase correctness |

To simulate with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_pacc_seqcg rtl/pacc_pkg.sv tb/tb_pacc_seqcg.sv
./obj_dir/Vtb_pacc_seqcg
```

Replace `tb_pacc_seqcg` with any other testbench name to run that one. Every
testbench finishes in well under a second.

## Changing the sizes

N, M and K are parameters of `pacc_seqcg` and its submodules. Their defaults
come from `pacc_pkg`. N must be a multiple of M, and K a multiple of N/M. The
testbenches take their sizes from `pacc_pkg`, so changing the package
changes both the design and its tests.
