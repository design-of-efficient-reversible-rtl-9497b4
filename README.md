# A 4 x 4 multiplier built only from reversible gates

A reversible gate has as many outputs as inputs, and it maps input patterns to output patterns
one-to-one, so its inputs can always be recovered from its outputs. Circuits made only of such
gates destroy no information. That is the precondition for computing below the
kT·ln2-per-erased-bit energy bound, and it is how quantum and some optical logic has to be built.
The price is extra wires. Some inputs must be held at a constant ("constant inputs"). Some outputs
exist only to keep the mapping one-to-one ("garbage outputs"). A signal cannot fan out: it has to
be copied through a gate.

This RTL models one such design, a 4 x 4 unsigned multiplier, at gate level, with the gates'
constant inputs and garbage outputs kept. It uses two gate types:

* the **Toffoli gate** (3 in, 3 out), used as an AND gate to form the partial products;
* the **SCG gate** (4 in, 4 out), used as a full adder to sum them.

The SCG gate can also act as a full subtractor or as several logic functions. Those
configurations are here too, as separate small circuits, with an N-bit adder/subtractor made of
N SCG gates. Everything is combinational: there is no clock and no register anywhere.

All of it is synthesizable SystemVerilog. Simulation or synthesis computes the same Boolean
functions that the reversible circuit would. This code does not make anything physically
reversible.

## The SCG gate (`rtl/scg_gate.sv`)

The gate's inputs are the terminals D, C, B, A (terminals 1 to 4). Its outputs are P, Q, R, S:

    P = B·C' + C·D'
    Q = (A + C)·(B ⊕ D) + A·C
    R = D ⊕ C ⊕ A
    S = D ⊕ C ⊕ B

As a truth table, with row index {D,C,B,A} and D as the most significant bit:

| output | rows where it is 1 |
|---|---|
| P | 2, 3, 4, 5, 6, 7, 10, 11 |
| Q | 3, 5, 6, 7, 9, 12, 13, 15 |
| R | 1, 3, 4, 6, 8, 10, 13, 15 |
| S | 2, 3, 4, 5, 8, 9, 14, 15 |

The 16 output patterns are all different, so the gate is reversible. Its testbench checks this
property.

Everything else in this RTL relies on one fact about Q. Q is the majority function of
A, C and (B ⊕ D):

    Q = maj(A, C, B ⊕ D)

Terminal B works as a control bit. With B = 0, Q is the majority of the other three inputs, which
is a full adder's carry, while R is their XOR, the sum. With B = 1, the D input enters the
majority inverted. If D carries the minuend, Q becomes a full subtractor's borrow, and R is still
the difference bit.

## The multiplier (`rev_multiplier_4x4`)

`p = x * y` for 4-bit unsigned `x` and `y` and an 8-bit `p`. It has 16 port bits and is built in
two stages:

    x, y ──► toffoli_ppg (16 Toffoli) ──pp[15:0]──► scg_pp_adder (13 SCG) ──► p[7:0]

### Partial products (`toffoli_ppg`)

A Toffoli gate outputs P = A, Q = B, R = A·B ⊕ C. With C tied to 0, R = A·B. A 4 x 4 grid of
these gates forms every x[i]·y[j] at once, and `pp[4*i + j] = x[i]·y[j]`.

Fan-out is not allowed, so the operands travel through the gates themselves:

* x[i] enters the first gate of row i and leaves each gate on P to feed the next one;
* y[j] leaves each gate on Q to feed the gate below.

The operands come out of the last gate of each row and column unchanged. These 8 bits are garbage
and appear as the ports `x_pass` and `y_pass`.

### Final addition (`scg_pp_adder`)

This is the part that needs the most care. There are 13 SCG full adders in three rows. Column k
holds the partial products of weight 2^k:

| column | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|---|
| products | x0y0 | x0y1 x1y0 | x0y2 x1y1 x2y0 | x0y3 x1y2 x2y1 x3y0 | x1y3 x2y2 x3y1 | x2y3 x3y2 | x3y3 |

```
 top row, right half (ripple, carry-in 0)      top row, left half (ripple, carry-in 0)
   col1: x0y1 + x1y0        -> p1                col2: x1y1
   col2: x0y2 + x2y0 + c                         col3: x1y2 + x2y1 + c
   col3: x0y3 + x3y0 + c                         col4: x1y3 + x2y2 + c
   col4: x3y1        + c    -> carry into col5   col5: x2y3 + x3y2 + c -> carry into col6

 middle row (ripple, carry-in 0): col2..col5 = right sum + left sum + c -> p2..p5
   (in col5, the "right sum" is the right half's carry)
 bottom gate, col6: x3y3 + middle-row carry + left-half carry -> p6 (sum), p7 (carry)
 p0 = x0y0
```

Each row is an exact ripple-carry addition, and nothing is dropped. The largest possible total,
with all 16 inputs set to 1, is 225, which fits in 8 bits. So the network returns
`sum(pp[4i+j] · 2^(i+j))` for *any* 16-bit input, not only for real partial products. Its
testbench relies on that and tries all 65536 input patterns.

The longest path runs through 7 SCG gates: the first two gates of the top row's right half, all
4 gates of the middle row, then the bottom gate.

The gate count, the three rows of 8, 4 and 1 gates, and which row produces which product bits
follow the published architecture. So do the operand pairs x0y1/x1y0, x0y2/x2y0, x0y3/x3y0,
x1y3/x2y2 and the x3y3 input of the bottom gate. The published drawing does not fix where every
other operand goes. The grouping above is this design's own, chosen so that every addition is
exact.

### Cost of the whole multiplier

These figures are counted from this RTL:

| | Toffoli stage | SCG stage | total |
|---|---|---|---|
| gates | 16 | 13 | 29 |
| constant inputs | 16 | 13 on terminal 3, plus 5 unused adder inputs tied to 0 = 18 | 34 |
| garbage outputs | 8 (x_pass, y_pass) | 13 × 2 (P and S) = 26 | 34 |

Inputs equal outputs, as they must: 8 operand bits + 34 constants = 8 product bits + 34 garbage
bits. The garbage outputs inside `scg_pp_adder` and `scg_addsub` are left unconnected. Lint
reports them as unused signals. They are kept on purpose, because they are the gates' real outputs.

## Other SCG configurations

| module | terminals (D, C, B, A) | outputs (P, Q, R, S) |
|---|---|---|
| `scg_full_adder` | (cin, b, 0, a) | b·cin', **cout**, **sum**, b ⊕ cin |
| `scg_full_subtractor` | (a, b, 1, bin) | (a·b)', **bout**, **diff** = a ⊕ b ⊕ bin, (a ⊕ b)' |
| `scg_and_or_xor` | (0, a, b, 0) | a + b, a·b, a, a ⊕ b |
| `scg_nand_xnor` | (a, b, 1, 0) | (a·b)', b·a', a ⊕ b, (a ⊕ b)' |
| `scg_not_copy` | (0, a, 1, 0) | 1, a, a, a' |

`scg_full_subtractor` computes a − b − bin. The minuend has to go on terminal 1 and the borrow-in
on terminal 4. With those two swapped, Q is the borrow of bin − a − b instead. For example,
a=1, b=0, bin=0 would then report a borrow. Its testbench checks the borrow against integer
subtraction.

`scg_addsub` (parameter `N`, default 4) chains N gates. Gate i takes (a[i], b[i], mode, k[i]), its
Q output is k[i+1], and its R output is result[i]. `mode = 0` adds (`a + b + cin`, `cout` = carry).
`mode = 1` subtracts (`a − b − cin` mod 2^N, `cout` = borrow). One gate per bit is all it takes,
because the gate's constant terminal acts as the add/subtract control. The ripple path is N gates
long.

The top level `scg_reversible_top` places all of these beside the multiplier. Each has its own
ports, and they share no signals. Its `ADDSUB_N` parameter (default 4) sets the adder/subtractor
width. The outputs of the three logic cells come out as one struct, `rev_pkg::logic_out_t`.

## How far to trust it, and where it departs from the original description

* **Verified:** every testbench compares the RTL with arithmetic computed independently:
  * the SCG gate against its truth table, including the one-to-one property;
  * the multiplier on all 256 operand pairs;
  * the adder network on all 65536 input patterns;
  * the adder/subtractor exhaustively at N = 4 and with random inputs at N = 12;
  * the other cells exhaustively.
* **The SCG gate's P output** is P = B·C' + C·D'. The truth table fixes which variables carry
  the complements.
* **The full subtractor's operand placement** departs from the most literal reading of the
  source configuration, as explained above. The published output roles are kept: borrow on
  terminal 2, difference on terminal 3, constant 1 on terminal 3.
* **The adder network's operand grouping** is partly this design's own (see above). Gate count,
  row structure and outputs match.
* **Parity preservation.** The design was presented as parity-preserving, that is, with output
  parity always equal to input parity. Neither gate has this property as defined:
  * SCG input (D,C,B,A) = (0,0,1,0) gives (P,Q,R,S) = (1,0,0,1);
  * Toffoli input (1,1,0) gives (1,1,1).

  The multiplier built from them is therefore not parity-preserving either. The RTL implements
  the gates exactly as defined and makes no fault-detection claim.
* **Not built:** a single-gate 1-bit comparator is claimed for the SCG gate, but its wiring is not
  given. One gate yields b·a' and a XNOR b, but not all three relations at once. The carry
  look-ahead use of the AND/OR cell (generate = a·b, propagate = a + b) is provided only as the
  cell itself, not as an adder.
* **FPGA numbers:** a reference implementation of this multiplier was reported at 21 LUTs, no
  registers and 16 I/Os on a small FPGA. The I/O and register counts agree with this RTL.
  The LUT count has not been reproduced.

## Simulating

Each module `rtl/<m>.sv` has a testbench `tb/tb_<m>.sv`. The testbench prints
`TB_RESULT checks=N failures=F` and stops on its own; a built-in time-out counts as a failure.
With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rev_pkg.sv tb/tb_rev_multiplier_4x4.sv \
          --top-module tb_rev_multiplier_4x4 -Mdir obj && ./obj/Vtb_rev_multiplier_4x4
```

`rev_pkg.sv` must be read first, because it holds the shared types. `tb_scg_reversible_top` runs
the whole top level at its default parameters. It also counts how often each mechanism occurs
(product reaching bit 7, carry-out, borrow-out, add/subtract switch) and fails if any never does.

## Files

| file | contents |
|---|---|
| `rtl/rev_pkg.sv` | operand/product types, `logic_out_t` |
| `rtl/scg_gate.sv`, `rtl/toffoli_gate.sv` | the two reversible gates |
| `rtl/toffoli_ppg.sv` | 16-gate partial-product array |
| `rtl/scg_pp_adder.sv` | 13-gate final-addition network |
| `rtl/rev_multiplier_4x4.sv` | the multiplier |
| `rtl/scg_full_adder.sv`, `rtl/scg_full_subtractor.sv` | single-gate adder and subtractor |
| `rtl/scg_addsub.sv` | N-bit adder/subtractor |
| `rtl/scg_and_or_xor.sv`, `rtl/scg_nand_xnor.sv`, `rtl/scg_not_copy.sv` | single-gate logic cells |
| `rtl/scg_reversible_top.sv` | everything side by side |
