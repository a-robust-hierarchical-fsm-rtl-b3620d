# HFSM chip lock for active IC metering

A foundry that holds a design's masks can make more chips than it was
ordered to. Active metering stops those extra chips from working: every chip
powers up **locked**, and only the design house can tell the foundry how to
unlock one particular chip. This RTL implements such a lock as a
**hierarchical finite state machine (HFSM)** placed in front of the design's
own FSM, with a **physically unclonable function (PUF)** that makes the way
out different on every chip.

All chips from the same masks power up in the same state, `S_R`. From there
the lock must be walked through N layers, two clock steps per layer, to reach
`S_0`, the reset state of the original FSM. In each layer the chip's PUF picks
one of four paths. Each path accepts only one secret input value per step, and
that value is different on every path. So the key and the input sequence that
open one chip do not open another. A brute-force attacker has to guess
N·(2m−2) bits, where m is the width of the FSM's input.

## Structure

```
                  +------------------- metered_ic_top ---------------------+
puf_challenge --->| puf_model --4N bits--+--------------------------------->|---> puf_response
                  |                      v                                 |
key (2N) -------->|               hfsm_lock (N layers)                     |
in_bits (m) ----->|    layer 0: hfsm_layer ... layer N-1: hfsm_layer       |---> unlocked, lock_state
                  |               state register (layer, phase, path)      |
                  |                         | unlocked                     |
                  |                         v                              |
                  |    orig_fsm_rst_n = unlocked; orig_fsm_in gated  ------|---> to the original FSM
                  +--------------------------------------------------------+
```

| file | role |
|---|---|
| `rtl/hfsm_pkg.sv` | defaults, state type, and the functions that generate the lock's edge labels |
| `rtl/hfsm_layer.sv` | combinational transition logic of one five-state layer |
| `rtl/hfsm_lock.sv` | N layers plus the lock's state register; this is the lock |
| `rtl/puf_model.sv` | **behavioural model** of the PUF (not a circuit) |
| `rtl/metered_ic_top.sv` | the metered chip: PUF, lock and hand-over to the original FSM |

The original FSM is not included. The top only brings out the signals it
would use.

## How one layer works

A layer has a top state and four middle states S1..S4. While the chip is
locked, the m-bit transitional input `{b1 b2 b3 … bm}` is split in two
(`b1` is the MSB of `in_bits`):

* `{b1 b2}` selects an edge. It does **not** come from the input pins.
  The lock builds it from the PUF, so the two `b1 b2` pins are ignored while
  the chip is locked.
* `{b3 … bm}`, the remaining m−2 bits, must equal a secret value written on
  that edge. Only the design house knows these values.

**Step 1 (top → middle).** `{b1 b2}` is the layer's first PUF pair. The four
edges out of the top carry four different 2-bit codes, so whatever the PUF
says, exactly one edge is chosen. The step is taken only if `{b3 … bm}`
matches that edge's secret value.

**Step 2 (middle → next layer's top).** `{b1 b2}` is the layer's second PUF
pair XOR the layer's 2-bit key. Only one edge leaves each middle state. It is
taken only if `{b1 b2}` equals its code and `{b3 … bm}` equals its secret
value. The key therefore has to be the PUF pair XOR that edge's code, which
depends on the chip.

A step whose condition fails is not taken: the state holds, and the next
clock can try again. Nothing punishes a wrong guess. Guessing stays hopeless
only because there are so many bits to guess.

Layer 1 uses these edge codes:

| middle state | S1 | S2 | S3 | S4 |
|---|---|---|---|---|
| step-1 code `{b1 b2}` | 11 | 01 | 10 | 00 |
| step-2 code `{b1 b2}` | 01 | 10 | 11 | 00 |

For example, if the first PUF pair is `01`, step 1 goes to S2. If the second
pair is `10`, S2's code `10` needs key `00`.

## Where the secret comes from

In a real flow, the edge codes and the (m−2)-bit values are constants that
the designer writes into the state transition graph. They end up as
hard-wired logic in the netlist. Here they are produced from one 64-bit
parameter, `SECRET`, by pure functions in `hfsm_pkg`, so any N and m get a
full table without storing one:

* Layers 2..N: the step codes are `((path + h[1:0]) mod 4) XOR h[3:2]`,
  where `h = mix64(SECRET ^ {layer, step})`. This is always a permutation of
  the four codes.
* The secret inputs are `mix64(mix64(SECRET) ^ {layer, step, path})`,
  truncated to m−2 bits. `mix64` is the SplitMix64 finaliser.

These functions are evaluated only at elaboration time and reduce to
constants. Change `SECRET` to get a different lock. Replace the functions if
the design house has its own labelling. m must be between 3 and 66, and N
between 1 and 255.

## Unlocking protocol

1. The foundry applies the chip's PUF inputs (`puf_challenge`) and reads the
   4N-bit `puf_response`. Layer i uses response bits `[4i+3:4i]`:
   `[4i+3:4i+2]` picks the step-1 path and `[4i+1:4i]` is XORed with the key.
2. The design house finds, for each layer, the edge whose step-1 code equals
   the path pair. It returns three things:
   * the key, which is the XOR pair XOR the step-2 code of that edge, sent as
     `key[2i+1:2i]`;
   * the step-1 secret input of that edge;
   * the step-2 secret input of that edge.
   The testbench package `tb/unlock_calc_pkg.sv` does exactly this.
3. The foundry holds `key` and clocks in the 2N inputs, one per cycle. With
   every input right, `unlocked` rises **2N clocks** after reset is
   released.

The secret is 2N key bits plus 2N·(m−2) input bits, which is N·(2m−2) bits.
For the eight benchmark input widths (m = 9, 8, 11, 7, 19, 3, 8, 18), that
is 2^(16N), 2^(14N), 2^(20N), 2^(12N), 2^(36N), 2^(4N), 2^(14N) and 2^(34N)
guesses.

## Interface and timing (`metered_ic_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low power-up reset to `S_R` |
| `puf_challenge` | in | CW | PUF inputs |
| `puf_response` | out | 4N | PUF readout |
| `key` | in | 2N | unlock key, held during unlocking |
| `in_bits` | in | M | transitional input, sampled on every rising edge |
| `unlocked` | out | 1 | lock is in `S_0` |
| `lock_state` | out | 12 | `{layer[7:0], phase[1:0], path[1:0]}` (`lock_state_t`) |
| `lock_step`, `lock_b12` | out | 1, 2 | a step is taken this clock; the `{b1 b2}` formed |
| `orig_fsm_rst_n` | out | 1 | original FSM held in reset (its `S_0`) until unlocked |
| `orig_fsm_in` | out | M | `in_bits` once unlocked, zero while locked |

The parameters are N = 10 layers, M = 9 and CW = 64, plus `SECRET` and
`CHIP_ID`. N = 10 is the largest number of layers evaluated for the scheme,
and m = 9 is the first benchmark's (styr) input width. Once reached, `S_0`
is left only through reset. The lock itself has 12 flip-flops and about 280
word-level cells.

## Design choices beyond the scheme

The scheme fixes the five-state layers, the split of the input, the
PUF-selected path, the XOR of the second PUF pair with a 2-bit key, the 4N
PUF bits and 2N key bits, the fixed power-up state and the 2N steps to `S_0`.
This RTL chose the following itself:

* **Separate lock.** The scheme merges the lock into the original FSM's state
  graph. Here the lock is a separate FSM that holds the original FSM in reset
  and gates its input until unlocked.
* **State encoding.** The lock stores (layer, phase, path) instead of one
  code per state.
* **Wrong inputs.** A step with a wrong input holds the state. There is no
  trap state and no retry limit.
* **Bit numbering.** The numbering of PUF and key bits per layer, and b1 as
  the MSB of the input, are this design's choice.
* **Key entry.** The key is a plain 2N-bit input. How it enters the chip
  (pins, fuses, a register) is left open.
* **Edge labels.** The labels of layers 2..N and all secret input values are
  generated as described above.
* **PUF model.** The PUF is a noise-free model, `mix64` over
  (`CHIP_ID`, challenge). `CHIP_ID` stands in for process variation. A real
  chip needs a real PUF macro with stable (error-corrected) responses. The
  64-bit challenge width is arbitrary.

## Verification

Each testbench prints `TB_RESULT checks=… failures=…`:

| testbench | what it shows |
|---|---|
| `tb/hfsm_layer_tb.sv` | the layer-1 worked example above; four distinct codes per step; 4000 random stimuli against a reference model |
| `tb/hfsm_lock_tb.sv` | 40 unlocks at N=10, m=9 with the exact state checked each clock and 2N-clock latency; holds on wrong input or key; `S_0` sticks; reset relocks; another chip's key fails; brute force on N=1, m=3: exactly 1 of 16 guesses opens |
| `tb/puf_model_tb.sv` | stable responses, different chips differ (about 50 % Hamming distance), balanced bits, every challenge bit matters |
| `tb/metered_ic_top_tb.sv` | full protocol on two chips: readout, key computation, unlock with wrong tries mixed in, hand-over, foreign key rejected, relock; counts every mechanism |
| `tb/metered_ic_top_full_tb.sv` | one complete unlock of the top at its default parameters |
| `tb/hfsm_workloads_tb.sv` | all eight benchmark widths × N = 1, 5, 10: unlock in 2N clocks, and each of the N·(2m−2) secret bits is checked by the lock |

To run one with plain Verilator:

```
verilator --binary --timing --assert --top-module hfsm_lock_tb \
    -y rtl -y tb +libext+.sv rtl/hfsm_pkg.sv tb/unlock_calc_pkg.sv tb/hfsm_lock_tb.sv
./obj_dir/Vhfsm_lock_tb
```

`hfsm_lock` also carries assertions: the layer index stays in range, `S_0`
sticks, and no two steps fire in one clock.

## Not included

* **The original FSM.** This is the protected design itself; connect it to
  `orig_fsm_rst_n` and `orig_fsm_in`.
* **The design house's path calculation.** This is software and lives at the
  design house. A model of it is in `tb/unlock_calc_pkg.sv`.
* **A physical PUF.** Only the behavioural model is provided.
