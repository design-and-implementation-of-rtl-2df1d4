# BZ-FAD: a low-power shift-and-add multiplier with a Hot-Block ring counter

A shift-and-add multiplier needs very little area: one adder, a few
registers and one cycle per multiplier bit. It is also slow, and most of its
power goes into switching that produces nothing useful. Each cycle the
multiplier register B shifts, a binary counter counts, the adder runs even
when the multiplier bit is zero, a 0/A multiplexer toggles, and the whole
product register shifts.

**BZ-FAD ("Bypass Zero, Feed A Directly")** keeps the one-bit-per-cycle
schedule and removes most of that switching:

| Conventional datapath | BZ-FAD |
|---|---|
| B shifts right so that B(0) is the current bit | B stays put. A multiplexer with a one-hot select (M1) picks B(n). |
| Binary counter (5 bits for 32-bit operands) | One-hot ring counter, as wide as the operand, partitioned so that only one block is clocked per cycle |
| 0/A multiplexer in front of the adder | A goes straight into the adder |
| Adder works every cycle | Adder is bypassed when B(n)=0. The partial product waits in a Bypass register. |
| Product register shifts right every cycle | Each bit that leaves the partial product is written in place into the low half (M2) |

This design trades speed for power. An N-bit product takes N cycles. It
is meant for low-power uses where speed does not matter much.

The RTL is SystemVerilog, parameterised by the operand width `N`. The
default is 16 bits. Operands are unsigned.

## How a multiplication runs

Registers: `A` and `B` (operands), `Feeder` and `Bypass` (N bits each, the
high half of the partial product) and `P_low` (N bits, the low half of the
product). A one-hot counter `q` holds position n.

In step cycle n (n = 0 … N-1):

1. M1 gives `B(n) = |(B & q)`. A second copy of M1, with `q` rotated by
   one, gives `B(n+1)`, which is forced to 0 in the last cycle.
2. The current partial product is `pp = B(n) ? Feeder + A : Bypass`. It is
   N+1 bits wide, including the carry.
3. `pp[0]` is final. M2 writes it into `P_low[n]`. No other bit of `P_low`
   is clocked.
4. `pp[N:1]` (pp shifted right, by wiring) goes to:
   * the **Feeder** register if `B(n+1)=1`, because the adder will need it
     next cycle;
   * the **Bypass** register if `B(n+1)=0`, because the adder will be
     skipped.

   Only one of the two registers is clocked.
5. The counter moves the '1' to position n+1.

Why this works: in cycle n the Feeder register holds the partial product
exactly when B(n)=1, because that is where cycle n-1 put it, and the Bypass
register holds it exactly when B(n)=0. Both are cleared when a
multiplication starts, so cycle 0 also works. The adder's inputs (A and
Feeder) change only when a nonzero bit is coming, so in runs of zero bits
the adder does not switch at all.

After the last cycle, `B(n+1)` was forced to 0, so the final high half is
in Bypass, and `product = {Bypass, P_low}`. The counter has wrapped back to
position 0, ready for the next multiplication, without a reset.

Worked example, N=4, A=0b1011 (11), B=0b0110 (6):

| n | B(n) | pp | P_low[n] | B(n+1) | stored in |
|---|---|---|---|---|---|
| 0 | 0 | Bypass=0 → 0 | 0 | 1 | Feeder=0 |
| 1 | 1 | 0+11 = 01011 | 1 | 1 | Feeder=0101 |
| 2 | 1 | 5+11 = 10000 | 0 | 0 | Bypass=1000 |
| 3 | 0 | Bypass=8 → 01000 | 0 | (forced 0) | Bypass=0100 |

Product = {0100, 0010} = 66.

## The low-power one-hot counter (Hot Block)

In a plain N-bit ring counter all N flip-flops are clocked every cycle,
although only two of them change. `lp_ring_counter` cuts the ring into
`N/BLOCK` blocks (default: 4 blocks of 4 bits). Only two kinds of block get
a clock enable:

* the **Hot Block**, which holds the '1';
* the next block, but only in the cycle when the '1' sits in the last bit
  of the previous block and is about to cross over.

So one block is clocked per cycle, and two at a hand-over.

The design avoids OR-ing a block's bits to find out whether it is hot.
Each block keeps a one-bit hot flag instead, which is set when the '1'
enters and cleared when it leaves. The only counter bit that feeds another
block's clock condition is the last bit of each block.

The clock condition of each block is `blk_en[i] = adv & (hot[i] | last bit
of block i-1)`. In the RTL it is a flip-flop enable, and a synthesis flow
maps it onto clock-gating cells. It is also brought out of the top as
`cnt_blk_en`, so the switching activity can be observed in simulation.

Note on the name: the design calls this a Johnson counter, but it relies on
the output being one-hot, with exactly one '1' circulating. That is a ring
counter, and that is what is built. A twisted-ring Johnson counter would
need a decoder to produce the one-hot select.

## Modules

| Module | Role |
|---|---|
| `bzfad_multiplier` | Top. Holds the operand registers and wires the blocks below. |
| `bzfad_ctrl` | IDLE/RUN sequencer: `load`, `step`, `busy`, `done` |
| `lp_ring_counter` | Partitioned one-hot counter with Hot Block enables |
| `onehot_mux` | M1: AND-OR mux with a one-hot select, used for B(n) and B(n+1) |
| `bzfad_adder` | N-bit + N-bit → N+1-bit adder (A + Feeder) |
| `feeder_bypass` | Feeder and Bypass registers, the adder/bypass mux, the shift by wiring |
| `product_low_reg` | M2 and the low product half, one enabled flip-flop per bit |

Parameters of the top: `N` (operand width, default 16) and `CNT_BLOCK`
(counter block size, default 4). `N` must be a multiple of `CNT_BLOCK`, and
`CNT_BLOCK` must be at least 2.

## Interface and timing (top)

```
clk, rst_n (async, active low)
start            sampled when busy is low; captures a and b
a[N-1:0], b[N-1:0]
busy             high during the N step cycles
done             one-cycle pulse; product = a*b from this cycle on
product[2N-1:0]  held until the next start
cnt_blk_en       per-block clock enables of the counter (observation)
```

Timeline:

* Edge 0 samples `start`. Operands are loaded, and Feeder and Bypass are
  cleared.
* Edges 1 … N perform the N steps.
* `done` is high in the cycle after edge N, which is N+1 cycles after
  `start` was sampled.

A `start` that arrives while `busy` is high is ignored. Reset puts the
counter at position 0, empties Feeder, Bypass, A and B, and leaves
the sequencer idle. `P_low` has no reset. Every bit of it is written during
each multiplication.

After synthesis at N=16 the design has 102 flip-flops: A, B, Feeder,
Bypass, P_low and the counter at 16 bits each, 4 hot flags, 1 state bit
and 1 done bit. It also has a single 17-bit adder.

## Where this RTL goes beyond the design description

The datapath structure follows the BZ-FAD description: M1, M2, the direct
A feed, Feeder/Bypass selection by B(n+1) and the Hot-Block counter. The
following are choices made here:

* **Controller and handshake.** No controller is specified. The
  start/busy/done protocol and the N+1-cycle latency are this
  implementation's own.
* **Adder/Bypass multiplexer select.** B(n) selects between the adder
  output and the Bypass register. This follows from the bypass rule.
* **Last cycle.** B(n+1) is forced to 0 so that the result lands in Bypass.
* **Counter details.** The block size of 4, the hot flag flip-flops and
  modelling clock gating as enables are choices made here. The actual gated
  clock generator circuit is not part of this RTL.
* **Adder.** A plain behavioural `+`. No particular adder architecture is
  specified.
* **Signedness.** Unsigned only.
* **Not built.** The conventional shift-and-add multiplier used as the power
  baseline is not part of this RTL. No power figures are reproduced: a
  20 % power reduction is claimed for the design, but the RTL does not
  measure power.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_onehot_mux` | every select position against direct indexing |
| `tb_bzfad_adder` | corner and random sums, including carry out |
| `tb_product_low_reg` | random writes against a reference array; `we` low leaves bits unchanged |
| `tb_lp_ring_counter` | count is exactly `1<<p`; `blk_en` is exactly the Hot Block plus, at a crossing, the next block; crossings and wraps are counted |
| `tb_feeder_bypass` | plays the rest of the datapath and checks the final product; the register not chosen must not change |
| `tb_bzfad_ctrl` | N steps, `done` after N+1 cycles, start while busy ignored |
| `tb_bzfad_multiplier` | default 16-bit top, 306 multiplications |
| `tb_bzfad_widths` | the same top at N=8 and N=32, 200 multiplications each |

`tb_bzfad_multiplier` checks more than the product. It checks:

* the exact latency and busy length;
* that `product` is held after `done`;
* that at most two counter blocks are ever enabled.

It also counts each mechanism and fails if one never occurs: adder
cycles, bypassed cycles, Feeder stores, Bypass stores, Hot-Block hand-overs
and ignored starts.

Assertions are used in two places: the counter checks that it stays
one-hot, and the controller checks that it never loads while busy.

Run a testbench with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_bzfad_multiplier.sv rtl/*.sv \
          --top-module tb_bzfad_multiplier
./obj_dir/Vtb_bzfad_multiplier
```

For `tb_bzfad_widths`, add `tb/bzfad_width_check.sv`. The simulator is
two-state, and the testbenches do not rely on x values.
