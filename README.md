# Parity preserving reversible adders built on the NMG gate

A reversible gate maps each input pattern to its own output pattern, so no
information is lost. If every gate in a network also *keeps parity* (the XOR of
its output lines equals the XOR of its input lines), then the whole network
keeps parity. A single wrong line anywhere in it then shows up as a parity
mismatch between the circuit's inputs and the full set of its outputs. No
checking is needed inside the circuit.

The common Toffoli gate `(A, B, C) -> (A, B, C ^ AB)` does not keep parity.
Whenever `A & B` is 1 it flips one line. The design here is built around a 4x4
gate, NMG, that keeps parity and acts as a Toffoli gate by itself when one
input is tied to 0. It then builds a full adder, an n-bit ripple carry adder
and a 4-bit carry skip block from NMG and two other parity preserving gates:
the Feynman double gate (F2G) and the Fredkin gate (FRG).

All of it is combinational logic with no clock and no reset. The RTL models the
logic function of each reversible gate, line for line. Every garbage line is
kept and brought out, because the parity check needs all of them.

## The gates

| gate | lines | outputs | role |
|------|-------|---------|------|
| NMG (`nmg`)  | 4x4 | `P=A`, `Q=B^D`, `R=~A&D ^ A&B`, `S=R^C` | Toffoli with parity, AND, majority-style carry |
| F2G (`f2g`)  | 3x3 | `P=A`, `Q=A^B`, `R=A^C` | XOR, and copying a line (fan-out is not allowed in reversible logic) |
| FRG (`frg`)  | 3x3 | `P=A`, `Q=~A&B ^ A&C`, `R=~A&C ^ A&B` | controlled swap: AND (with `B=0`) and 2:1 multiplexer |

Reading NMG: `R` is a multiplexer (`A ? B : D`), and `S` adds `C` to it. Since
`R ^ S = C`, the XOR of all four outputs is `A ^ (B^D) ^ C`, which is the input
parity. With `D = 0` the outputs are `A, B, AB, AB^C`. Three of them are the
Toffoli outputs, and the fourth, `AB`, is the garbage line that restores the
parity (`pp_toffoli`).

NMG truth table, `{A,B,C,D} -> {P,Q,R,S}`:

```
0000 0000   0100 0100   1000 1000   1100 1111
0001 0111   0101 0011   1001 1100   1101 1011
0010 0001   0110 0101   1010 1001   1110 1110
0011 0110   0111 0010   1011 1101   1111 1010
```

## The full adder: where each line goes

This is the part that takes most care to follow. The adder (`pp_full_adder`)
has 3 data inputs and 5 constant-0 inputs, so 8 lines go in and 8 come out.

```
NMG #1 (A,   B,   0,  0) -> P=A  Q=B    R=AB (garbage)     S=AB
F2G #1 (A,   B,   0)     -> P=A (garbage) Q=A^B  R=A (garbage)
NMG #2 (A^B, Cin, AB, 0) -> P=A^B Q=Cin R=(A^B)Cin (garbage) S=(A^B)Cin ^ AB = Cout
F2G #2 (A^B, Cin, 0)     -> P=A^B (propagate) Q=A^B^Cin = Sum  R=A^B (garbage)
```

In the first and last NMG, `D = 0`, so each works as a Toffoli gate.
`(A^B)Cin ^ AB` is the carry: the two terms are never both 1, so the XOR is an OR.
The adder uses 4 gates and has a depth of 4 gates. Besides sum and carry it has 6
output lines. One of them, the propagate signal `P = A^B`, is used by the carry
skip block. The other five form the packed struct `pp_pkg::fa_garbage_t`:
`ab_r`, `a_p`, `a_r`, `pc_r`, `p_r`.

## Ripple carry adder

`pp_ripple_carry_adder #(WIDTH)` chains `WIDTH` full adders, carry to carry.
It has `2n+1` data inputs and `5n` constant inputs. It gives `n` sums, a carry out,
`n` propagate lines and `5n` garbage lines, which is `7n+1` output lines in all.
The default `WIDTH = 4` is a free choice, since the structure works for any n.

## Carry skip block

`pp_csa_block` adds two 4-bit numbers and a carry with 21 gates:

1. `F2G(Cin, 0, 0)` copies the block carry-in. `Q` goes to the first full adder
   and `R` goes to the skip selector.
2. Four full adders ripple `C0..C3` and produce `S0..S3` and `P0..P3`.
3. Three Fredkin gates with a constant 0 in the middle input act as AND gates:
   `FRG(P3,0,P2).Q = P3P2`, `FRG(P1,0,P0).Q = P1P0` and
   `FRG(P3P2,0,P1P0).Q = PB`, the block propagate.
4. `FRG(PB, C3, Cin).Q` is the carry out. It equals `Cin` when `PB = 1` (the
   carry skips the block) and `C3` otherwise.

When `PB = 1`, `C3` equals `Cin` anyway. So the selector never changes the
value, only the path length from `Cin` to `Cout`. One side effect is that
the selector's `R` output always equals `Cin`. The block has 9 data inputs and
25 constants, and gives 4 sums, the carry and 29 garbage lines
(`pp_pkg::csa_garbage_t`). The block propagate `PB` is the garbage field
`sel_p`.

`pp_carry_skip_adder #(BLOCKS)` chains such blocks, with each block's carry out
going to the next block's carry in. Its `skip` output shows `PB` of each block.
The default `BLOCKS = 2` (8 bits) is a free choice.

## Error detection

`parity_checker #(IN_W, OUT_W)` computes
`error = ^in_lines ^ ^out_lines`. Its inputs are the data inputs of a
circuit and all of the circuit's output lines, garbage included. Constant-0
inputs are left out, since they add nothing to the parity. The flag rises
for any odd number of wrong lines, and so for any single wrong line. It
cannot see two errors at once.

Note that in a fault-free netlist every error flag is logically constant 0.
Synthesis and simulators may therefore fold the checker away. To see it work,
inject the fault on the checker's own inputs or in a gate-level netlist. The
top-level testbench forces one bit of the checker's `out_lines`.

## Top level

`pp_adders_top #(RCA_WIDTH = 4, CSA_BLOCKS = 2)` places three independent
circuits side by side, each with its own checker:

| prefix | circuit | outputs |
|--------|---------|---------|
| `tg_`  | `pp_toffoli` | `tg_p`, `tg_q`, `tg_t = AB^C`, `tg_parity_err` |
| `rca_` | `pp_ripple_carry_adder` | `rca_sum`, `rca_cout`, `rca_prop`, `rca_parity_err` |
| `csa_` | `pp_carry_skip_adder` | `csa_sum`, `csa_cout`, `csa_skip`, `csa_parity_err` |

Garbage lines stay inside the top and feed only the checkers.

## Costs, as built

| circuit | gates | garbage outputs | gate depth |
|---------|-------|-----------------|------------|
| Toffoli with parity | 1 NMG | 1 | 1 |
| full adder | 2 NMG + 2 F2G | 6 (counting `P`) | 4 |
| n-bit ripple adder | 4n | 6n | 4n |
| 4-bit skip block | 1 F2G + 16 + 4 FRG = 21 | 29 | - |

In reversible-logic cost terms, NMG has quantum cost 7, F2G 2 and FRG 5. The
full adder is therefore 18. The quantum-gate decomposition of NMG (CNOT and
controlled square-root-of-NOT gates) has no two-valued logic form, so it is
not modelled. Only its overall function, the NMG equations, is.

## Choices and departures

- The carry skip block draws its Fredkin gates without clear input order. Here
  each AND gate is wired control = one operand, middle = 0, last = the other
  operand, and the AND is taken from `Q`. The skip selector is wired with
  `PB` as control and `Q` as carry out, so that `PB = 1` selects `Cin`.
- F2G is fed `(Cin, 0, 0)` with `Cin` on the control input. That is the only
  wiring that gives copies of `Cin`.
- NMG #1 of the full adder gives `AB` on both `R` and `S`. Here `S` feeds NMG #2.
- The F2G equations are the usual ones for this gate.
- Chaining 4-bit blocks into a wider carry skip adder, the default widths,
  and the parity checkers are this design's own choices.
- There are no clocks, registers or timing. Gate depth is a property of the
  netlist, not something the RTL models in cycles.

## Simulating

Every testbench in `tb/` is self-checking and ends with a
`TB_RESULT checks=N failures=M` line. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/pp_pkg.sv tb/pp_adders_top_tb.sv --top-module pp_adders_top_tb -o sim
./obj_dir/sim
```

To run another test, replace `pp_adders_top_tb` with `nmg_tb`, `f2g_tb`,
`frg_tb`, `pp_toffoli_tb`, `pp_full_adder_tb`, `pp_ripple_carry_adder_tb`,
`pp_csa_block_tb`, `pp_carry_skip_adder_tb` or `parity_checker_tb`.

What they cover:

- **Gates and the full adder** are tested exhaustively. The tests check the
  truth tables, the parity of each line and, for the gates, that no output
  pattern repeats.
- **`pp_ripple_carry_adder_tb`** tests every input at 4 bits, and random inputs
  plus full-length carry chains at 16 bits.
- **`pp_csa_block_tb` and `pp_carry_skip_adder_tb`** test every input of the
  4-bit block and of the 8-bit adder, and random inputs at 32 bits. They count
  how often a block is skipped, how often it ripples, and how often a carry
  skips two blocks in a row.
- **`pp_adders_top_tb`** runs the top at its default sizes. It applies every
  input of all three circuits, then injects single-line faults and checks that
  each circuit's error flag detects them.

All tests take well under a second.
