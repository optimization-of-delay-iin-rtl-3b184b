# Pipelined MAC with a carry-save accumulator and a Wallace tree

A multiply-accumulate (MAC) unit normally multiplies, adds the product to the
accumulator with a carry-propagate adder, and repeats. That costs two long
carry chains per cycle: one at the end of the multiplier and one in the
accumulator. This unit spends no full-width carry chain inside the
accumulation loop. The running sum is kept in carry-save form. Each cycle it
is fed back into the partial product matrix of the next multiplication, so a
single Wallace tree does the multiplication and the accumulation together.
Only a short adder on the least significant columns propagates carries every
cycle. The upper columns are resolved by one parallel prefix adder in a
second pipeline stage, and that adder runs only while a result is wanted.

The design follows P. Samreen Aalia and K. Yogitha Bali, "Optimization of
Delay in Pipeline MAC Unit Using Wallace Tree Multiplier" (IJRASET, vol. 10,
no. XI, 2022). That paper builds on an earlier pipelined MAC that used a
Dadda tree and ripple-carry adders. It replaces them with a Wallace tree
and parallel prefix adders. Where that paper leaves something open, the
choice made here is listed under "Departures and open points".

Default configuration: 16-bit operands (`N = 16`), unsigned or two's
complement, a 39-bit result (`2N + ALPHA - 1`, with `ALPHA = 8`) and one
operand pair accepted every clock.

## Datapath

```
 x, y, tc ──► REG_X, REG_Y, tc_q                          (edge 1)
                  │
          partial product generation (pp_gen)
                  │  N x N bits
                  ▼
   ┌──► Wallace reduction + L-bit prefix adder (pp_reduction) ──┐
   │              │ reg1_d (2N-1)  reg2_d (K)  reg3_d (1)        │ car (NOV bits)
   │              ▼                                             ▼
   └───────── REG1, REG2, REG3                       alpha-bit adder → REG4  (edge 2)
                  │                                             │
                  └──────── AND with en ──────┬──── AND with en ┘
                                              ▼
                           (K+ALPHA)-bit prefix adder
                                              ▼
                                         REG_Result              (edge 3)
```

The pipeline has no stall, handshake or valid signal. Every clock accumulates
the product of the pair held in REG_X/REG_Y. Drive zeros on `x` or `y` to add
nothing. A pair applied before rising edge *t* is part of `result` after
edge *t + 2*. `result` always shows the sum of every pair applied up to two
edges earlier, or 0 while `en` is low.

## The accumulator in carry-save form

This is the part of the design that needs the most care. Let
`L = 2N - 1 - K`. Column *c* of the partial product matrix has weight 2^c.
The accumulator state is spread over four registers:

| register | bits | columns | content |
|---|---|---|---|
| REG1 | 2N-1 | 0 .. 2N-2 | bits 0..L-1: fully added low part of the sum. Bits L..2N-2: first carry-save row of the upper part |
| REG2 | K | L .. 2N-2 | second carry-save row of the upper part |
| REG3 | 1 | L | carry out of the low-part adder, not yet added in |
| REG4 | ALPHA | 2N-1 .. 2N+ALPHA-2 | count of the carries that left column 2N-2 |

The accumulated sum, modulo 2^(2N+ALPHA-1), is

```
S = REG1 + (REG2 + REG3) * 2^L + REG4 * 2^(2N-1)
```

Every cycle the matrix that is reduced holds:
- the N x N partial products;
- REG1 in every column 0..2N-2;
- REG2 in columns L..2N-2;
- REG3 in column L;
- in signed mode, one constant bit in column N.

The reduction ends with two rows in columns 0..2N-2. A prefix adder of L
bits adds the two rows in the lowest L columns. Its sum becomes the low part
of the next REG1 and its carry-out becomes the next REG3. The two upper rows
go to REG1's upper bits and to REG2 unchanged. So per cycle the only carry
chain is L bits long (14 bits at the defaults), not 2N + ALPHA - 1.

The state fed back is bounded. REG1 + (REG2 + REG3)·2^L is below 2^(2N).
The product is below 2^(2N) too. So the matrix never holds more than
2^(2N+1), and what leaves column 2N-2 is a handful of carries of weight
2^(2N-1). These carries are not added in the tree. They come out as
separate wires (`car`, `NOV` of them).

## Wallace reduction

`pp_reduction` builds the tree in column form. In every stage, each column
puts every group of three bits into a full adder and a leftover pair into a
half adder, and passes a single bit through. Sums stay in the column and
carries move to the next column. Stages repeat until columns 0..2N-2 hold at
most two bits. Column 2N-1 is never compressed: it only collects the carries
that leave column 2N-2.

The column heights, the number of stages and `NOV` depend on `N` and `K`.
They are computed while the design elaborates, by constant functions in
`mac_pkg` (`wt_heights`, `wt_stages`, `wt_ovf`). The generate loops in
`pp_reduction` then place one `fa` or `ha` cell per group. At the defaults
the tree has 6 stages, the tallest column holds 18 bits and `NOV = 6`.

## Overflow counter (REG4)

`alpha_adder` counts the ones on `car` and adds the count to REG4 through a
ripple chain: a half adder in bit 0, full adders above and an XOR in the top
bit. The carry out of the top bit is dropped, so the whole accumulator wraps
modulo 2^(2N+ALPHA-1). With `ALPHA = 8` the unit holds the sum of at least
128 products of two full-scale 16-bit operands before it wraps
((2^16-1)^2 · 128 < 2^39). There is no saturation and no overflow flag.

## Final addition and enable gating

`result` bits 0..L-1 are REG1's low bits as they are. Bits L and up come from
a (K+ALPHA)-bit prefix adder with these inputs:
- operand A: {REG4, REG1[2N-2:L]};
- operand B: REG2, zero-extended;
- carry-in: REG3.

Every operand of this adder first goes through an AND gate with `en`. While
`en` is low the adder sees constant zeros and does not toggle, and REG_Result
loads 0. Raise `en` for at least one cycle to read the sum. The accumulation
itself goes on whatever `en` does.

## Signed operands

One datapath serves both formats. The `tc` input goes with each operand pair
and is registered next to it, so the mode can change from pair to pair. In
signed mode `pp_gen` produces the Baugh-Wooley matrix: the 2(N-1) partial
products with exactly one sign bit among their factors are inverted. The
correction term +2^N - 2^(2N-1) is split in two:
- the tree adds +2^N as a bit in column N;
- the overflow counter adds −2^(2N−1) as "subtract one from REG4".

In signed mode `result` is a two's complement number of 2N+ALPHA-1 bits.

## Parallel prefix adder

`prefix_adder` is a Sklansky (divide-and-conquer) prefix adder of any width
`W`. It works in three steps:
1. Pre-computation: p = a ^ b and g = a & b.
2. Carry generation: ceil(log2(W+1)) levels of cells. At level *l*, every
   position with bit *l* set merges with the last position of the block
   below it. The other positions only buffer.
   - `black_cell` produces group generate and propagate.
   - `gray_cell` produces only the generate. It is used where the lower
     group already reaches the carry-in.
3. Final step: s_i = p_i ^ c_(i-1).

The carry-in is added as an extra position 0 with g = cin and p = 0. The MAC
uses the adder twice: for L bits (14) in the reduction stage and for K+ALPHA
bits (25) in the final stage.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | operand width |
| `K` | 17 | upper columns kept in carry-save form (REG2 width); `L = 2N-1-K` must be at least 1 |
| `ALPHA` | 8 | width of REG4, the overflow counter |

The defaults live in `mac_pkg` (`MAC_N`, `MAC_K`, `MAC_ALPHA`). `K` sets the
trade-off between the two stages. A larger `K` shortens the per-cycle LSB
adder and lengthens the final adder. The tree functions support `N` up to
64.

## Interface of `mac_pipelined`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous, active low; clears every register and so the sum |
| `en` | in | 1 | show the sum in `result` (otherwise `result` is 0) |
| `tc` | in | 1 | 1: `x`, `y` are two's complement; 0: unsigned |
| `x`, `y` | in | N | operands |
| `result` | out | 2N+ALPHA-1 | accumulated sum, registered |

A new accumulation starts with a reset. The unit has no separate clear input.

## Files

- `rtl/mac_pkg.sv`: default sizes; functions that lay out the Wallace tree.
- `rtl/mac_pipelined.sv`: top level, registers, gating, final adder.
- `rtl/pp_gen.sv`: partial products, unsigned and Baugh-Wooley.
- `rtl/pp_reduction.sv`: Wallace tree with accumulator feedback, LSB adder.
- `rtl/alpha_adder.sv`: carry counter and REG4.
- `rtl/prefix_adder.sv`, `rtl/black_cell.sv`, `rtl/gray_cell.sv`: Sklansky adder.
- `rtl/fa.sv`, `rtl/ha.sv`: full and half adder cells.
- `tb/tb_*.sv`: one self-checking testbench per block, plus `tb_mac_pipelined`
  for the whole unit.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
Each also has a watchdog that counts a failure if the run hangs. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mac_pkg.sv \
          tb/tb_mac_pipelined.sv --top tb_mac_pipelined -Mdir obj_mac
./obj_mac/Vtb_mac_pipelined
```

Swap in `tb_pp_reduction`, `tb_pp_gen`, `tb_alpha_adder` or
`tb_prefix_adder` to test one block. All of them run in well under a second.

What the tests cover:
- `tb_prefix_adder`: all 8-bit operand pairs with both carry-in values, and
  random 14-bit and 25-bit additions.
- `tb_pp_gen`: the weighted matrix sum plus the correction equals the
  product, in both modes.
- `tb_pp_reduction`: the value that leaves the network equals the value that
  enters it, for random matrices and random accumulator rows, at N = 16
  and at N = 8, and the
  overflow carries are used.
- `tb_alpha_adder`: REG4 against a reference counter, including wrap-around
  in both directions and an asynchronous reset.
- `tb_mac_pipelined`, run at the default sizes, compares `result` after
  every clock edge with an integer reference model. It also checks:
  - the three-edge latency;
  - the two-pair example 62760·1280 + 690·655 = 80784750;
  - random signed and unsigned pairs with `en` toggling;
  - long runs that wrap the sum up and down;
  - a reset during operation.

  It also counts that en gating, overflow carries, LSB-adder carries,
  wrap-around, both modes and reset each occur.

Only simulation and lint have been run. No timing, area or power figures
were produced for this RTL.

## Departures and open points

- **Value of K.** The source gives no number for K. K = 17 matches the
  17-bit and 31-bit internal signals of the published 16-bit simulation.
  It is a parameter.
- **Number of overflow carries.** The earlier Dadda-tree design sends exactly
  two carries to the alpha-bit adder. The Wallace tree used here sends six
  at the defaults, so the alpha-bit adder counts any number of carries.
- **Carry pair gating.** The source adds the two top-column carries with an
  OR gate and an AND gate. That adds 3 when both carries are 1. The carries
  are counted exactly here instead.
- **Final adder width.** It is named both a (k+α)-bit and a (k+α−1)-bit
  adder in the source. With the register split above it must produce K+ALPHA
  bits to fill the 2N+ALPHA-1-bit result, so it is K+ALPHA bits wide.
- **Choices of this design where the source is silent:**
  - the LSB adder is also a Sklansky prefix adder;
  - reset is asynchronous and active low;
  - REG_Result shows 0 while `en` is low;
  - the mode input `tc` travels with each pair;
  - the result wraps around.
- **Not built.** The 16-bit top-level symbol of the source also shows two
  further 16-bit inputs (c, d) whose function is never described. They are
  not built.
