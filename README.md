# Reversible ripple-block carry adder

A reversible circuit loses no information: every gate has as many outputs as
inputs, and its function is a bijection. Such circuits can in principle compute
without the heat that erasing bits costs, and they are the form arithmetic
must take on a quantum computer. Addition as usually built is not reversible,
since `2 + 3` and `1 + 4` both give `5`. The reversible form keeps one operand
and overwrites the other:

    (A, B)  ->  (A, A + B mod 2^n)

The classic circuit for this is the CDKM ripple-carry adder (Cuccaro, Draper,
Kutin, Moulton). It is small, with a constant number of helper lines, but slow.
Its carry ripples up through all n bits and then back down, about 5n gate
delays. This design is the **ripple-block carry adder** (RBCA). It cuts the n
bits into m blocks that do their ripples at the same time. It then repairs the
carries that each block guessed wrong, and finally erases, reversibly, the
block carries it needed along the way. Every helper line returns to 0, so the
circuit leaves no garbage.

The RTL models the reversible circuit at the level of its lines. Each signal
is the value on one circuit line between two gates, and each gate module
computes what the gate does to its target line. The result is synthesizable
combinational logic that behaves exactly like the gate network. It is not a
transistor-level or quantum implementation.

## Gates

All of the adder's gates are **n-bit controlled-NOT** gates (`rev_mcx`). The
target line is inverted when all n-1 control lines are active. The controls
pass through unchanged.

| controls | name | used for |
|---|---|---|
| 0 | NOT | (gate set) |
| 1 | Feynman / CNOT | copying a line onto a 0 line, XOR of one line into another |
| 2 | Toffoli | carry generation in MAJ and UMS |
| k+1 | generalised Toffoli | block-wide carry propagation |

A control can be *negated*: it is then active when the line is 0 (an open
circle in circuit notation; the `NEG` mask in `rev_mcx`). Fan-out is not
allowed in a reversible circuit. A line may be read by a later gate, but a
value is duplicated only by a CNOT onto a 0 line. The RTL follows this:
a signal that a gate changes is never used again after that gate.

`rev_fredkin`, the controlled-swap gate, completes the usual gate set. It
exchanges lines A and B when its control is 1. With `NCTRL` > 1 it becomes the
n-bit controlled swap, which swaps when all controls are 1. The adder does not
use it. It sits beside the adder in the top level with its own ports.

## The CDKM bit slice

Bit i of the CDKM adder has three lines: a carry line holding `C_i`, and the
lines `B_i` and `A_i`.

**MAJ** (`rev_maj`) applies CNOT A→B, then CNOT A→C, then Toffoli (C,B)→A.
Afterwards the lines hold

    C_i ^ A_i,   A_i ^ B_i,   C_{i+1} = majority(A_i, B_i, C_i)

The A line now carries `C_{i+1}` and serves as the carry line of bit i+1.
A chain of MAJ circuits (`maj_block`) therefore ripples the carry up through
the block, and the block's carry-out ends on the top A line.

**UMS** (`rev_ums`, unmajority and sum) reverses this and adds the sum. It
applies Toffoli (C,B)→A, which restores `A_i`, then CNOT A→C, which restores
`C_i`, then CNOT C→B, which leaves `S_i = A_i ^ B_i ^ C_i` on the B line. A
chain of UMS circuits (`ums_block`) runs from the top bit down. Each one hands
the restored carry line to the bit below as its A line. This is the
two-CNOT form of UMS: a separate unmajority circuit followed by a sum circuit
would apply CNOT A→B twice in a row, and those two CNOTs cancel.

With one block (`M = 1`), `rbca` is exactly this MAJ chain followed by this
UMS chain: the plain CDKM adder.

## The ripple-block adder, stage by stage

Take n = 16 and m = 4 (the default), so blocks are k = 4 bits wide. Block j
covers bits `i = jk .. jk+k-1`. Each block has its own ancilla line, which
starts at 0. Block 0's ancilla is the adder's carry-in line `C_0 = 0`.

**1. Local MAJ chains, all blocks at once.** Each block runs its MAJ chain with
its ancilla as carry-in, that is, as if the carry into the block were 0. Block
0's result is correct. Each other block now holds *local* carries `iC_t`, the
carries of its own bits alone, and its lines hold `A_t ^ B_t` and
`A_{t+1} ^ iC_{t+1}`.

**2. Block-carry ripple.** The true carries follow from the *carry-correction
rule*. For bit positions i < j:

    C_j = C_i · (A_i^B_i)(A_{i+1}^B_{i+1})···(A_{j-1}^B_{j-1})  ^  iC_j

A carry entering at i reaches j exactly when every bit in between propagates.
Since the two terms can never both be 1, XOR equals OR here. For j = 1 to m-1,
in order, one generalised Toffoli takes as controls the true carry out of
block j-1 and the k propagate lines `A^B` of block j. Its target is block j's
local carry-out, which it turns into the true carry-out. This chain of m-1
gates is the only long serial path in the adder.

**3. Carry correction** (`carry_correct`, blocks 1..m-1, all at once). With its
true carry-in `C_i` now known, each block applies the same rule to its internal
lines:

* a CNOT from `C_i` onto the ancilla line turns `A_i` into `A_i ^ C_i`;
* for each internal carry line, a generalised Toffoli controlled by `C_i` and
  the propagate lines below it turns `A_{t} ^ iC_{t}` into `A_{t} ^ C_{t}`.

No target of these gates is a control of another, so they form a single gate
level. Every block now looks exactly as if its MAJ chain had run with the true
carry-in.

**4. Local UMS chains, all blocks at once.** Each block produces its sum bits
and its A bits. Each UMS chain leaves the block's carry-in `C_i` on the
block's ancilla line. Block 0 leaves `C_0 = 0`. The carry out of bit n-1 is
uncomputed by the top block's chain, which is why the result is modulo 2^n.

**5. Uncomputing the block carries.** Blocks 1..m-1 now hold their carry-ins
`C_k, C_2k, …` on their ancillae. These must return to 0, but the inputs they
were computed from have been overwritten. The *carry-sum dependency* recovers
a block's carry-out from its own A and S alone. For a k-bit block with
carry-in `C_0` and carry-out `C_k`:

    C_k = C_0 · (A == S)  ^  (S < A)

The reasoning: `S = A + B + C_0 mod 2^k`. The sum wrapped around (a carry-out)
exactly when `S < A`. The one exception is `S == A`, which happens when
`B + C_0 = 2^k`, and then the carry-out equals `C_0`. The erasure runs in four
steps:

* **a.** CNOT A→S on blocks 0..m-2, so those lines hold `A ^ S`. `A == S` then
  means all of them are 0.
* **b.** From the top block down to block 2, a generalised Toffoli with the
  carry-in of block j-1 as a plain control and the `A^S` lines of block j-1 as
  negated controls flips block j's ancilla. This removes the `C·(A == S)`
  term. The highest block goes first, because each gate reads the ancilla of
  the block below before that ancilla is itself changed. Block 1 needs no
  such gate, because its term is multiplied by `C_0 = 0`.
* **c.** `slt` on each block 0..m-2 XORs `S < A` into the ancilla of the block
  above, which clears it to 0.
* **d.** CNOT A→(A^S) restores the sum lines.

The outputs are A unchanged, S = A + B mod 2^n, and all ancillae at 0.

## Interface

`rbca #(N, M)` with `N % M == 0`:

| port | dir | width | meaning |
|---|---|---|---|
| `a_i` | in | N | operand A |
| `b_i` | in | N | operand B |
| `anc_i` | in | M | ancilla lines, drive with 0 (`anc_i[0]` is the carry-in line) |
| `a_o` | out | N | A, restored |
| `s_o` | out | N | A + B mod 2^N |
| `anc_o` | out | M | ancillae, back to 0 |

The ancillae are ports so that their return to 0 can be observed. With
nonzero ancillae the circuit is still a bijection, but the outputs are not a
plain sum. The one exception is `M = 1`, where `anc_i[0]` is a true carry-in.
`rbca_top` holds `rbca` at N = 16, M = 4, plus the Fredkin gate on the `fk_*`
ports. Everything is combinational: there is no clock, reset or handshake.

## Sizes and cost

The circuit is drawn at 16 bits in four 4-bit blocks, which are the defaults
(`rbca_pkg`). Published cost estimates for a pass-transistor realisation count
delay in gate levels and transistors per gate: 8 per CNOT, 16 per Toffoli,
8(n-1) per n-bit CNOT. By those estimates the delay-optimal split is m = 8 for
16 bits, 8 for 32 bits and 16 for 64 bits. The RBCA delay is then 30, 44 and
60 gate levels, against 81, 161 and 321 for the CDKM adder, at roughly twice
the transistors. The plain CDKM figures follow from the slices above: 64
transistors per bit (two CNOTs and a Toffoli each in MAJ and UMS) and
5n + 1 gate levels.

The RTL does not reproduce the RBCA cost figures, because `slt` is built as a
plain comparator. The gate-level structure of the SLT circuit is not
specified; only its function is. All other stages are built from the same
gates as the reference circuit, in the same order.

Any n divisible by m works. `tb/rbca_table_tb.sv` runs every configuration
from those cost estimates: n = 8 to 128, m = 2 to 32.

## Where this RTL departs from the reference circuit, and how far to trust it

* `slt`: its function is as specified, but its inside is this design's own
  (a magnitude comparator instead of reversible gates).
* Gate modules output only the lines they change. Controls are reused
  downstream as the same signal, which is equivalent because a control passes
  through a reversible gate unchanged.
* The NOT gate is `rev_mcx` with zero controls. Negated controls are a bit
  mask.
* The ancilla lines are ports, and `N % M == 0` is required (checked at
  elaboration).
* The n-bit controlled swap is this design's generalisation: an AND of all
  controls, by analogy with the controlled-NOT. Only the 3-line gate has a
  published truth table.
* There are no timing figures to check: the circuit is combinational, and
  delays are gate levels, not clock cycles.

What is checked: every gate and block exhaustively against truth tables or
integer arithmetic, and reversibility (no two inputs with the same output)
exhaustively for small adders, with the ancillae included. The adder is
checked exhaustively for 8-bit sizes, and with corner cases and random
operands from 16 to 128 bits. At the default size, 200,000 random additions
plus directed cases are run. That test also counts each mechanism and fails if
one never occurs: the block-carry ripple, carry correction, the equality term
of the uncomputation, SLT clearing, overflow wrap-around and the Fredkin swap.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing -y rtl -y tb +libext+.sv rtl/rbca_pkg.sv \
        tb/rbca_top_tb.sv --top-module rbca_top_tb
    ./obj_dir/Vrbca_top_tb

Substitute any testbench in `tb/`:

| testbench | covers |
|---|---|
| `rbca_top_tb` | top level at default size, mechanism counts |
| `rbca_tb` (with `rbca_cfg_run`) | adder at many sizes, reversibility, M = 1 carry-in |
| `rbca_table_tb` | all 22 (n, m) configurations of the cost tables |
| `maj_block_tb`, `ums_block_tb`, `carry_correct_tb`, `slt_tb` | block stages |
| `rev_mcx_tb`, `rev_fredkin_tb`, `rev_maj_tb`, `rev_ums_tb` | gates |

To change the size, set `N` and `M` on `rbca` or `rbca_top`, or change the
defaults in `rtl/rbca_pkg.sv`.

## Files

`rtl/rbca_top.sv` is the top. It holds `rbca.sv` (the adder), which uses
`maj_block`/`ums_block` (built from `rev_maj`/`rev_ums`), `carry_correct`,
`slt` and `rev_mcx`. `rev_fredkin.sv` is the controlled-swap gate, and
`rbca_pkg.sv` holds the default sizes.
