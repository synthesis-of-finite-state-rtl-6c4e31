# Multi-level Mealy FSM structures for FPGAs with memory blocks

A Mealy finite state machine is normally built as one combinational circuit P
(look-up tables in an FPGA) followed by a state register. P has to produce every
output and every excitation function, R + N functions for R state bits and N
outputs. Most FPGAs also hold embedded memory blocks that such a design leaves
unused. The idea here is to split the machine over more levels. P produces only
short **codes**, and the memory blocks, used as read-only tables, **decode** these
codes into outputs and next states. This uses fewer LUTs and puts the idle memory
blocks to work.

The codes are short because of **multiple encoding**. The same code means
different things in different current states (or under different
microinstructions). The decoder tells them apart because its address also holds
the current-state code. Say no state has more than four outgoing microinstructions.
Then two bits of P output are enough to pick one, whatever the machine's total
number of microinstructions.

This RTL implements seven such structures for a small example machine, S1. It also
implements a fragment of a second machine, S2, which shows the shared encoding
with Karnaugh-map codes. A behavioural reference model checks all of them.

## The example machine S1

S1 has inputs x1..x3, microoperations (outputs) y1..y5 and states a1..a5. The
state codes are binary on R = 3 bits: a1 = 000, a2 = 001, a3 = 010, a4 = 011,
a5 = 100. The reset state is a1. Its 13 transitions:

| h | from | condition (x1 x2 x3) | to | outputs y1..y5 |
|---|------|----------------------|----|----------------|
| 1 | a1 | 1 1 - | a2 | 10000 |
| 2 | a1 | 0 1 - | a3 | 11000 |
| 3 | a1 | - 0 - | a4 | 01000 |
| 4 | a2 | - 1 - | a3 | 11000 |
| 5 | a2 | - 0 - | a4 | 01000 |
| 6 | a3 | - 1 - | a3 | 01000 |
| 7 | a3 | - 0 0 | a4 | 01000 |
| 8 | a3 | - 0 1 | a5 | 01100 |
| 9 | a4 | - - 1 | a5 | 00110 |
| 10 | a4 | - - 0 | a3 | 00000 |
| 11 | a5 | 1 - - | a1 | 10001 |
| 12 | a5 | 0 - 1 | a5 | 00110 |
| 13 | a5 | 0 - 0 | a4 | 01100 |

A *microinstruction* is the set of outputs raised by one transition. S1 has
seven of them. With the maximal (plain binary) encoding, on N1 = 3 bits z1 z2 z3,
they are: Y1 = {y1} = 000, Y2 = {y1,y2} = 001, Y3 = {y2} = 010,
Y4 = {y2,y3} = 011, Y5 = {y3,y4} = 100, Y6 = {} = 101, Y7 = {y1,y5} = 110.

## The structures

Every structure has the same three kinds of parts:

* **circuit P** (`circuit_p`). This is the combinational first level. Each line h
  of the table becomes a product term F_h = (state code = K(a_m)) AND (input
  cube X_h). Each output bit of P is the OR of the terms whose line carries that
  bit. Which bits a line carries depends on the structure.
* **register RG** (`register_rg`). This holds the state code. It loads on the
  rising edge and has an asynchronous, active-high reset to a1.
* **memory blocks** (`memory_decoder`). These are synchronous read-only tables
  on the second level: decoder **Y** (outputs), code converter **CC** (next
  state) or common decoder **YCC** (both).

| structure | P produces | second level | P functions for S1 |
|---|---|---|---|
| single-level P (for comparison, not built) | y, D | none | 8 |
| `s1_py0` **PY0** | psi (2 bits), D | Y at address {Q, psi} | 5 |
| `s1_pa` **PA** | y, tau (2 bits) | CC at address {Q, tau} | 7 |
| `s1_pay` **PAY** | z (3 bits), tau (2 bits) | Y at address z; CC at address {Q, tau} | 5 |
| `s1_pyy` **PYY** | z (3 bits), tau (1 bit) | Y at address z; CC at address {z, tau} | 4 |
| `s1_pay0` **PAY0** | psi (2 bits), tau (2 bits) | Y at address {Q, psi}; CC at address {Q, tau} | 4 |
| `s1_pays` **PAY_S** | one identifier code psi (2 bits) | Y and CC, both at address {Q, psi} | 2 |
| `s1_paysc` **PAY_SC** | one identifier code psi (2 bits) | YCC at address {Q, psi} | 2 |

The codes:

* **psi (microinstructions, PY0 and PAY0).** The microinstructions used when
  leaving each state are numbered separately. a1 uses Y1, Y2 and Y3, which get
  00, 01 and 10. a2 uses Y2 and Y3, which get 00 and 01. And so on. The widest
  state needs N2 = ceil(log2 3) = 2 bits.
* **tau by current state (PA, PAY, PAY0).** The next states of each state are
  numbered separately. From a1: a2 = 00, a3 = 01, a4 = 10. From a4: a5 = 00,
  a3 = 01. From a5: a1 = 00, a4 = 01, a5 = 10. This needs R1 = 2 bits.
* **tau by microinstruction (PYY).** The next states reached under each
  microinstruction are numbered separately. Under Y3: a3 = 0, a4 = 1. Under Y4:
  a4 = 0, a5 = 1. Every other microinstruction leads to a single state. One bit
  is enough, and CC needs z and tau but not the state code.
* **identifier (PAY_S, PAY_SC).** Each transition is the pair <next state,
  microinstruction>. The pairs leaving each state are numbered separately, so
  one 2-bit code stands for both. In S1 no two transitions from the same state
  share a next state or a microinstruction. Y and CC therefore both read the
  whole code. The codes are given in table order within each state (00, 01, 10).

The tables are in `rtl/s1_pkg.sv`: the structural table, the code that each
method puts on each line, and the memory contents. Decoder contents for PY, PY0,
PA and PYY are written out entry by entry. For the shared encodings they are
built from the lines: word[{K(a_m), code}] = outputs and/or next state of that
line. Addresses that no line uses are don't-care and hold zero.

## Timing: why the memories use the other clock edge

FPGA memory blocks are synchronous. Here they are clocked on the **falling**
edge of the same clock that loads RG on the **rising** edge. One cycle runs like
this:

1. Rising edge: RG takes the new state. Soon afterwards the inputs x may change.
2. First half of the cycle: P settles to the codes for (state, x).
3. Falling edge: each memory block reads its word. Y's word becomes the output
   y. CC's or YCC's word is the next-state code D.
4. Next rising edge: RG loads D.

So a structure with a CC still takes one clock per transition. The decoder Y is
also the output register. In every structure except PA, y is glitch-free. It
shows the microinstruction of the transition taken at the next rising edge, and
it is held from one falling edge to the next. In PA, y comes straight from P,
so it is combinational and can glitch while x or Q settle. **Inputs must be
stable from some time after the rising edge until the falling edge.**

Hold reset across at least one falling edge. The memories have no reset, and
RG loads whatever CC read during reset at the first rising edge after release.
Because CC was addressed by the reset state, that word is already correct.

## The S2 fragment: codes that serve two decoders

The second example shows the main point of the shared encoding PAY_S. It uses 14
transitions of a larger machine S2: those that leave states a5 = 0101,
a6 = 0110 and a7 = 0111. They go to a6..a10 under six microinstructions. Each
identifier gets a 3-bit code psi1 psi2 psi3. The codes are placed in a Karnaugh
map so that:

* identifiers with the same microinstruction fall in a subcube where psi3 is
  free, so decoder Y needs only {Q, psi1 psi2};
* identifiers with the same next state fall in a subcube where psi1 is free, so
  CC needs only {Q, psi2 psi3}.

Each memory block then has 2^6 words instead of 2^7. The codes are in
`rtl/s2_pkg.sv`:

* from a5: 000, 011, 111
* from a6: 000, 100, 001, 110, 010, 011
* from a7: 000, 100, 011, 111, 110

`s2_pays_frag` builds this with the separate Y and CC. `s2_paysc_frag` builds
the same fragment with one common decoder YCC at address {Q, psi}.

The rest of S2 is unknown: its other states, its initial state, and inputs x1
and x2. Neither fragment can therefore be a complete machine. Each takes the
current state code `q` as an input and gives the next-state code `d` as an
output, for an external register to close the loop. For a state other than
a5..a7, P gives psi = 000 and the memories give zero.

## Where this implementation makes its own choices

* **Reset.** Active-high and asynchronous. It loads a1 = 000 into RG.
* **A register RG in every structure.** For PA, a synchronous CC could itself
  serve as the state register. The RG is kept so that all structures share the
  timing described above.
* **Conflicting S1 table entries.** The published tables disagree on the PA
  converter entries for state a4. One reads "tau = 00 gives a3", the other
  "tau = 00 gives a5". The code here uses a5 = 00 and a3 = 01, which matches the
  transformed tables of PA and PAY0. For PYY, the lines that leave a1 and a2
  for a4 under Y3 carry tau = 1, as the converter table requires. Both choices
  are confirmed by simulation against the plain state table.
* **Code for a7 to a8 under Y6 (S2).** This transition uses code 100, the code
  its decoder tables and Karnaugh map give (001 would collide with a7 to a8
  under Y2 at decoder Y).
* **Identifier codes for S1.** The codes for PAY_S and PAY_SC are this design's
  own: table order within each state.
* **Circuit P.** Written as a table-driven sum of products, not as hand-minimised
  equations. Synthesis minimises it in either case.
* **Not included.** The classical single-level P, PY and PD structures, which
  serve only for comparison. The dk14 benchmark and the other benchmark
  machines, whose state tables are not part of this design.

## Files

| file | contents |
|---|---|
| `rtl/circuit_p.sv` | generic first-level circuit P (table given as parameters; defaults to the single-level table of S1) |
| `rtl/register_rg.sv` | state register with asynchronous reset |
| `rtl/memory_decoder.sv` | falling-edge read-only memory (decoder Y / CC / YCC; defaults to Y of PY0 for S1) |
| `rtl/s1_pkg.sv` | S1: structural table, per-method codes, memory contents |
| `rtl/s1_py0.sv` … `rtl/s1_paysc.sv` | the seven S1 structures, ports `clk res x[2:0] y[4:0] q[2:0]` |
| `rtl/s2_pkg.sv` | S2 fragment: table, identifier codes, decoder contents |
| `rtl/s2_pays_frag.sv`, `rtl/s2_paysc_frag.sv` | S2 fragment in PAY_S and PAY_SC |
| `rtl/multilevel_fsm_top.sv` | all of the above side by side |
| `tb/s1_ref_pkg.sv`, `tb/s2_ref_pkg.sv` | behavioural references written from the state tables |
| `tb/tb_*.sv` | one self-checking testbench per module |

In every vector, the variable with index 1 is the most significant bit: `x[2]`
is x1, `y[4]` is y1 and `q[2]` is Q1. A KISS2 cube such as `01-` therefore
reads straight across x[2:0].

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
To run one with Verilator:

```
verilator --binary --timing -Irtl -Itb \
  tb/s1_ref_pkg.sv tb/s2_ref_pkg.sv rtl/s1_pkg.sv rtl/s2_pkg.sv \
  tb/tb_multilevel_fsm_top.sv --top-module tb_multilevel_fsm_top -o sim
./obj_dir/sim
```

The same command works for any `tb/tb_<module>.sv` after changing the top module.
Packages must come before the files that import them.

What the testbenches check:

* **Structure testbenches.** Each runs 2000 random cycles against the
  behavioural model. It checks the state after every rising edge and y after
  every falling edge. It also checks that registered outputs do not change
  before the falling edge. It applies asynchronous resets mid-cycle and requires
  all 13 transitions to occur.
* **Top-level testbench.** It runs all seven S1 structures and both S2 fragments
  together for 3000 cycles, at the design's only size. It counts every S1 and S2
  transition and the mid-run reset. It also counts the cycles in which the
  registered outputs hold while PA's combinational output has already changed.
  Each of these must occur at least once.

## Using the structures for another machine

The structure modules are thin wiring around the generic blocks. All
machine-specific content sits in a package. To implement another Mealy machine,
write a package like `s1_pkg` with:

* its structural table: per line, the state code, the input mask and value, the
  next state and the outputs;
* the codes chosen by the method you pick;
* the decoder contents.

Then instantiate `circuit_p`, `register_rg` and one or two `memory_decoder`s as
in the matching `s1_*` module. Choosing the codes is the synthesis step. The
rules are those above: number within each current state (or microinstruction),
on ceil(log2 of the largest group) bits. The memory size is 2^(address bits)
words, for example 2^(R+N2) x N bits for the Y of PY0. It should fit the
target's block (4 Kb on many small FPGAs).
