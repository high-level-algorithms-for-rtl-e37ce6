# Digit-serial shift-adds multiple constant multiplication

Many DSP blocks multiply one input by a fixed set of constants at the same
time. The transposed FIR filter is the usual example: every coefficient
multiplies the same sample. This is called multiple constant multiplication
(MCM). Constant multipliers are replaced by a network of additions,
subtractions and shifts, and intermediate products are shared between
constants. For example, 29x and 43x both come from 7x:

    7x  = (x << 3) - x
    29x = (7x << 2) + x
    43x = (7x << 1) + 29x

In a bit-parallel datapath the shifts are wires. In a **digit-serial**
datapath the input arrives D bits per clock cycle, least significant digit
first. An adder is then only D full adders and one carry flip-flop,
independent of the word length. A shift is no longer free, though: shifting
left by s bits means delaying bits into later digits, which costs s
flip-flops. So the area of a digit-serial MCM depends on how many additions,
subtractions *and* shift flip-flops the network uses, and shifts taken from
the same node should share one flip-flop chain.

This repository holds synthesizable SystemVerilog for that architecture:
- the three digit-serial primitives;
- a network generator that builds any list of shift-add operations with
  shared shift chains;
- a complete MCM unit that returns all products as parallel words;
- a transposed-form digit-serial FIR filter built on the same network.

The algorithms that *choose* a good operation list are software and are not
part of this RTL. The network takes the chosen list as a parameter.

## Words, digits and word boundaries

All datapath signals are D-bit digits, least significant first. One operand
word is L digits long. Its first digit is on the wires in the first cycle of
the word and its last digit in cycle L-1. Every cell in the network is
combinational from its input digits to its output digit, apart from its
flip-flops. Digit j of every product therefore leaves the network in the same
cycle as digit j of the input. The network adds no pipeline latency.

Each word must be long enough to hold the largest result. The input is
extended to D·L bits, with sign bits for a signed input or zeros for an
unsigned one. For an MCM the word length is

    L = ceil((bw + N) / D)

where `bw` is the bit width of the largest constant and `N` the input width.
For 29 and 43 with a 16-bit input, L = 22 at D = 1.

The flip-flops inside adders, subtracters and shifters must start every word
at a known value:
- 0 for an adder's carry;
- 1 for a subtracter's carry;
- 0 for every shift flip-flop, so that zeros enter the low end of a shifted
  word.

All these cells have an `init` input. It is high during the **last digit
cycle** of a word, and on that clock edge the flip-flops load their initial
value instead of the next state. The next word then starts clean, even when
words follow back to back. The asynchronous active-low `rst_n` loads the
same values.

## The primitives

| module | function | hardware |
|---|---|---|
| `ds_add` | s = a + b | D full adders in a ripple chain, carry flip-flop initialised to 0 |
| `ds_sub` | s = a − b | b inverted (D inverters), D full adders, carry flip-flop initialised to 1 (the +1 of two's complement) |
| `ds_lshift` | c = a << LS | D layers; bit i goes to output bit (i+LS) mod D through a chain of flip-flops |

In the shifter, layer i has floor(LS/D) flip-flops when i < D − (LS mod D),
and ceil(LS/D) otherwise. Layers with no flip-flop are wires. The total is
exactly LS flip-flops for any D. Example, D = 3 and LS = 4:
- a0 reaches c1 through one flip-flop;
- a1 reaches c2 through one flip-flop;
- a2 reaches c0 through two flip-flops.

## The shift-adds network (`ds_mcm_network`)

The network is described by a parameter list of operations, type
`ds_pkg::aop_t`:

    node[k+1] = (node[u] << l1) + (node[v] << l2)     sub = 0
    node[k+1] = (node[u] << l1) - (node[v] << l2)     sub = 1

Node 0 is the input x. Operation k may only read nodes 0..k. An elaboration
error flags a list that breaks this rule. There is no right shift. Intermediate
and target products are always built without one, because a right-shifted
result would need extra control in the serial domain.

How shifts are shared: every node gets **one** chain of unit shifters
(`ds_lshift` with LS = 1). The chain is as long as the largest shift any
operation takes from that node. Each operation taps the chain at the depth it
needs. For the default list:
- x is shifted by 3, which costs 3 flip-flops;
- 7x is shifted by 2 and by 1, which share a 2-flip-flop chain;
- the two adders and the subtracter add one carry flip-flop each.

That is 5 shift flip-flops and 3 carry flip-flops in total. For D > 1, a
chain of s unit shifts also costs s flip-flops, the same as one direct shift
by s. Sharing taps therefore never costs more than separate shifters.

The hardware cost of a list is:
- D full adders per operation;
- D inverters per subtraction;
- one carry flip-flop per operation;
- for each node, flip-flops equal to the largest shift taken from it.

The localparams `NUM_ADD`, `NUM_SUB`, `NUM_FA`, `NUM_INV`, `NUM_CARRY_FF` and
`NUM_SHIFT_FF` of `ds_mcm_network` give these counts for the list in use. An
area estimate is the sum of the counts, each weighted by its cell's area.

To map another constant set, give `NOPS` and `OPS`. The node-index and shift
fields are 16 bits. The arrays are packed (`aop_t [0:NOPS-1]`), so a
constant function can compute them.

## The MCM unit (`ds_mcm`)

`ds_mcm` wraps the network for one-shot computations with parallel results:

- `ds_serializer` loads x when `start` is accepted. It sends x out as
  L digits, sign- or zero-extended.
- `mcm_ctrl` holds a ceil(log2 L)-bit counter that steps once per digit
  cycle. It also holds one constant comparator per product.
- `ds_storage` is one per product: D layers of K = ceil(bw_cx / D)
  flip-flops, with bw_cx = ceil(log2 c) + N. A shift enable lets the
  product's digits in.

Products have different widths. Product t's comparator enables its storage
only while the count is below K_t, so each block ends up holding exactly its
own digits, least significant digit at the far end.

Timing:
- pulse `start` with `x` while `ready` is high;
- `busy` is high for L cycles;
- `done` pulses L + 1 cycles after `start`.

From then on, `prod[t]` holds the product, sign-extended (or zero-extended)
to bw + N bits, until the next `start`. With the default configuration
(29x, 43x, N = 16, D = 1), `done` arrives 23 cycles after `start`. The
products are 21 and 22 bits wide.

Only odd positive multiples come out of the network. Even or negative
versions come from a left shift or a two's complement. `ds_coef` does both
digit-serially: a shift, then an optional subtraction from zero. The FIR
filter uses it.

## The FIR filter (`ds_fir`)

`ds_fir` is the transposed form: y(n) = Σ h_k·x(n−k).
- The multiplier block is a `ds_mcm_network` that makes the odd fundamentals
  of all coefficients, followed by one `ds_coef` per tap.
- h_(NTAP−1)'s product passes a one-sample delay (`ds_word_delay`).
- Each following tap's product is added to it in a `ds_add`, and the sum
  passes the next delay. The last adder gives y(n).

Every word is P = ceil(WOUT / D) digits, so the WOUT-bit output fits. With a
35-bit output that is 35, 18, 9 and 5 cycles per sample at D = 1, 2, 4 and 8.

A free-running digit counter marks the word boundaries:
- `x_take` is high in the cycle whose closing clock edge samples `x_in`;
- digit j of the corresponding output is on `y_dig` j + 1 cycles later;
- `y_out` (signed) is updated, and `y_valid` pulses, P + 2 cycles after the
  `x_take` cycle.

The one-sample delays are plain P-stage digit registers. Unlike the shift
flip-flops they are *not* cleared at word boundaries, because they carry the
partial sums from sample to sample.

The default coefficients are {−14, 29, 43, 29, −14}. They are a small
example built from the fundamentals 7, 29 and 43, not a designed frequency
response. Replace `NOPS`, `OPS`, `NTAP` and `TAPS` for a real filter.
`tb/fir200_pkg.sv` shows how constant functions can generate both lists for
a 200-tap filter.

## Top level (`ds_top`)

`ds_top` places the MCM unit (`mcm_*` ports) and the FIR filter (`fir_*`
ports) side by side, at their default parameters. They share only the clock
and reset.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `D` | 1 | digit size in bits (1 = bit-serial; 2, 4, 8 give 2×, 4×, 8× the throughput) |
| `N` | 16 | input width |
| `SIGNED_X` | 1 | input is two's complement (ds_mcm, ds_serializer) |
| `NOPS`, `OPS` | 3, the 7/29/43 list | shift-adds operations |
| `NT`, `TGT` | 2, {2, 3} | stored products of ds_mcm (network node of each) |
| `WOUT` | 35 | FIR output width; sets the word length P |
| `NTAP`, `TAPS` | 5, example | FIR taps: node, left shift, negate |

Derived parameters (`BW`, `L`, `PW` in ds_mcm, `P` in ds_fir) are computed
from the others and should not be overridden.

## Verification

Each module has a self-checking testbench in `tb/` (named `tb_<module>`).
It compares the outputs with arithmetic done in the testbench, and checks
the cycle counts where the design defines them:
- the MCM latency of ceil((bw+N)/D) + 1 cycles;
- the FIR sample periods of 35/18/9/5 cycles;
- the flip-flop count of each shifter.

The testbenches sweep digit sizes 1, 2, 3, 4 and 8 (plus word-wide digits of 22 and 35 bits), signed and unsigned
inputs, and full-scale values.

- `tb_ds_top` runs the whole top level, unmodified, end to end. It counts
  the mechanisms it exercised: subtraction, a storage block held by its
  comparator, negative inputs, negative and even coefficients, outputs that
  depend on earlier samples, and full-scale inputs.
- `tb_mcm_random` runs `ds_mcm` on random sets of distinct odd constants:
  10 and 50 constants of 12 bits, and 10 and 30 constants of 16 bits, at
  D = 1. A linear congruential generator makes each set, and each constant
  is built from its canonical signed-digit form (one addition or subtraction
  per further nonzero digit). Sets of 100 constants work the same way but
  take minutes to elaborate, because the operation list is computed by
  constant functions.
- `tb_fir_200` runs a 200-tap filter with 16-bit coefficients at D = 1 and
  D = 8. Its 207-operation network is generated by binary recoding, and the
  outputs reach about 2^33.

Run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/ds_pkg.sv tb/fir200_pkg.sv tb/tb_ds_top.sv --top-module tb_ds_top
    ./obj_dir/Vtb_ds_top

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.
Lint a module with `verilator --lint-only -Wall -Irtl -y rtl rtl/ds_pkg.sv
rtl/<module>.sv`. The only remaining warnings are unused bits of
elaboration-time function arguments, and `ds_coef`'s unused clock when it
reduces to a wire.

## Design choices and limits

- **Storage control sense.** Each product's storage shifts while the digit
  count is *below* its digit count, then holds. This is what produces the
  register contents of a digit-serial-to-parallel converter. The comparator
  is a plain `<`.
- **Word-boundary initialisation** (`init` in the last digit cycle, no dead
  cycle between words), the start/ready/done handshake, the asynchronous
  reset, the parallel-load serializer and the common output width of the MCM
  products are this design's own choices.
- **Bit-parallel case.** The latency formula assumes D < N. If the digit is
  made as wide as the whole word (D = bw + N for ds_mcm, D = WOUT for
  ds_fir), a word is one digit and the design computes in one cycle per
  input; the testbenches cover D = 22 and D = 35. The shift flip-flops then
  only ever hold bits beyond the word and are cleared every cycle, so a
  dedicated bit-parallel design would be smaller. D = 16 on a 35-bit FIR
  word gives 3 cycles per sample, not 1.
- **Operation lists.** No area-optimising algorithm is included. The default
  list is the three-operation solution for 29x and 43x. For large filters the
  list must come from an external tool (the 200-tap testbench uses naive
  binary recoding, which is valid but not area-optimal).
- **Reference filter.** The 200-tap, 16-bit-coefficient filter of the
  reference evaluation is not reproduced: its coefficients are not available
  here. The filter RTL accepts it once its operation and tap lists are given.
- **Generic digit-serial constant multipliers.** The alternative
  architecture, with one serial multiplier per coefficient, is not included.
