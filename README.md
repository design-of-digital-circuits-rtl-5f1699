# Reversible-logic adder, multiplier and GCD processor

Reversible logic builds a circuit only from gates whose inputs can be recovered
from their outputs, so each gate is a one-to-one mapping with as many outputs
as inputs. Three rules follow, and all of this RTL is written to them:

* every gate is one of a small set of reversible gates (Feynman, Fredkin, Peres,
  Toffoli, TSG);
* a signal drives at most one gate input (fan-out of one). A signal needed in
  several places is first copied with Feynman gates, or is passed along a row
  of gates through their pass-through outputs;
* outputs that nothing needs are *garbage outputs*. They are left unconnected
  and kept as few as the structure allows.

On these gates the design builds three independent circuits:

| circuit | size | gates | type |
|---|---|---|---|
| ripple-carry adder | 4 bit | 4 TSG | combinational |
| Wallace tree multiplier | 8 x 8 -> 16 bit, unsigned | 64 Toffoli, 52 TSG, 25 Peres | combinational |
| GCD processor | 16 bit | Feynman, Fredkin, TSG; 68 latches (34 flip-flops) | sequential |

`rev_circuits_top` places the three circuits side by side with separate ports.
They share no signals.

All RTL is SystemVerilog in `rtl/`, one module per file. Self-checking
testbenches are in `tb/`.

## The gate library

| module | inputs | outputs | used as |
|---|---|---|---|
| `rev_feynman` | A, B | P = A, Q = A ^ B | copy (B = 0), inverter (B = 1) |
| `rev_fredkin` | A, B, C | P = A, Q = A'B + AC, R = AB + A'C | 2:1 mux Q = A ? C : B; AND (B = 0); OR (C = 1) |
| `rev_peres` | A, B, C | P = A, Q = A ^ B, R = AB ^ C | half adder (C = 0) |
| `rev_toffoli` | A, B, C | P = A, Q = B, R = AB ^ C | AND (C = 0) |
| `rev_tsg` | A, B, C, D | P = A, Q = A ^ B, R = A ^ B ^ D, S = (A ^ B)D ^ AB ^ C | full adder (C = 0; R = sum, S = carry) |

The TSG gate is the one to look at closely. Its carry output S has a product
term (A ^ B)·D. With C = 0 this makes S the majority of A, B and D, which is
the full-adder carry. The mapping is still a bijection: A and B follow from P
and Q, D from R, and C from S. If every operator in S were an XOR instead, the
gate would not add. The gate is meant to work as a full adder, so this RTL
uses the AND reading.

## Ripple-carry adder (`rev_ripple_adder`)

Each bit is one TSG gate with A = a[i], B = b[i], C = 0 and D = the carry in.
R is sum[i], and S carries into the next gate. The first gate takes `cin` and
the last S is `cout`. P and Q of each gate are garbage. The adder is 4 bits
wide by default. Its width is a parameter, and the GCD datapath uses it at
16 bits as a subtractor and as a comparator.

## Wallace tree multiplier (`rev_wallace_mult`)

The multiplier follows the three classic Wallace steps:

1. **Partial products.** An 8 x 8 grid of Toffoli gates with C = 0 forms each
   bit a[i]·b[j], of weight 2^(i+j). Bit a[i] passes along its row of gates
   through the P outputs, and b[j] down its column through the Q outputs. Each
   operand pin therefore drives exactly one gate.
2. **Reduction.** Each layer takes every column's bits in groups of three into
   a TSG full adder. The sum stays in the column and the carry moves one
   column left. A leftover pair goes into a Peres half adder, and a leftover
   single bit passes straight to the next layer. For 8 x 8 the column heights
   shrink as follows, in four layers using 36 TSG and 25 Peres gates:
   `8 -> 6 -> 4 -> 3 -> 2` (the tallest column).
3. **Final addition.** The two rows that remain go through a 16-bit TSG ripple
   adder.

Constant functions work out the column heights, the number of layers and the
position of every carry at elaboration time. Generate loops then build the
tree, so `WIDTH` can be changed (WIDTH >= 2). The grouping of bits into gates
is the plain Wallace rule. Other valid trees (Dadda, or an array-like
arrangement) would use the same gate kinds with different wiring. Carries out
of the top column are always 0 for an unsigned product and are dropped.

## GCD processor (`rev_gcd`)

The processor computes gcd(X, Y) by Euclid's subtraction method. It loads the
operands into registers A and B. On each clock it subtracts the smaller
register from the larger (A <= A - B if A > B, or B <= B - A if A < B). When
A = B, that value is the result. No swap is needed, because the datapath can
subtract in either direction.

### Ports and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `RESETn` | in | 1 | active-low, synchronous reset of the control state |
| `GO` | in | 1 | start; sampled on a rising edge while idle or finished |
| `X`, `Y` | in | 16 | operands; sampled only at the GO edge; both must be non-zero |
| `Z` | out | 16 | always the contents of register A; the result once `DONE` = 1 |
| `DONE` | out | 1 | 1 from the edge at which A = B is seen until the next GO |

The run takes one cycle to load, one cycle per subtraction and one cycle to
detect A = B. From the GO edge, `DONE` therefore rises after *2 + s* rising
edges, where *s* is the number of subtractions. For example:

* gcd(13, 4): Z goes 13, 9, 5, 1, then B goes 4, 3, 2, 1. That is 6
  subtractions, so 8 cycles.
* gcd(4, 2) = 2 takes 1 subtraction, so 3 cycles.

The worst case at 16 bits is gcd(65535, 1): 65,534 subtractions.

`DONE` is asserted for every finished computation, including a result of 1
(coprime operands). With a zero operand, A = B is never reached and the
processor keeps running until reset. If `GO` is still high when `DONE`
appears, the finished state reloads X and Y at once, so `DONE` lasts one cycle.

### Datapath (`gcd_datapath`)

The datapath is made entirely of reversible gates and reversible flip-flops.
Each bit has the following parts:

* **Input multiplexers:** `A_in = SA ? X : D` and `B_in = SB ? Y : D`, where
  D is the subtractor output. Each is one Fredkin gate.
* **Load enables:** `A_next = LA ? A_in : A`, likewise for B. Each is one
  Fredkin gate.
* **Operand multiplexers:** `minuend = SMinuend ? B : A` and
  `subtrahend = SSubtrahend ? A : B`.
* **Subtractor:** a 16-bit TSG ripple adder computing
  minuend + ~subtrahend + 1. Feynman gates with B = 1 do the inversion.
* **Comparator:** a second TSG ripple adder computing A + ~B + 1. Its carry out
  means A >= B. A chain of Fredkin OR gates over its sum means A != B. These
  two give `GT`, `EQ` and `LT`. `LT` is an output but the controller does not
  use it.
* **Fan-out:** Feynman copies feed each register bit to its five users. Each
  control line travels along its row of 16 Fredkin gates through their P
  outputs.

### Control unit (`gcd_control`)

The control unit has three parts:

* **State register:** two reversible D flip-flops hold a binary-encoded state
  `{s1,s0}`.
* **Regeneration module (`gcd_regen`):** Feynman gates make one copy of GO,
  GT, EQ, s0 and s1 for each gate that reads them (4, 2, 3, 7 and 6 copies).
* **Output module (`gcd_output`):** Fredkin gates used as multiplexers and AND
  gates, plus Feynman inverters, produce the outputs and the next state.

| state | condition | actions | next |
|---|---|---|---|
| IDLE 00 | GO | LA = LB = 1, SA = SB = 1 (load X, Y) | RUN |
| IDLE 00 | !GO | SA = SB = 1 | IDLE |
| RUN 01 | EQ | none | FIN |
| RUN 01 | GT | LA = 1, SA = 0, SMinuend = SSubtrahend = 0 (A <= A - B) | RUN |
| RUN 01 | LT | LB = 1, SB = 0, SMinuend = SSubtrahend = 1 (B <= B - A) | RUN |
| FIN 10 | GO | DONE = 1, load X, Y as in IDLE | RUN |
| FIN 10 | !GO | DONE = 1 | FIN |
| 11 | any | none | IDLE |

The equations the gates implement (`gcd_output.sv` lists them gate by gate):

```
ns0  = RESETn & (s0 ? ~s1 & ~EQ : GO)
ns1  = RESETn & (s0 ? ~s1 &  EQ : s1 & ~GO)
LA   = s0 ? ~s1 & GT : GO
LB   = s0 ? ~s1 & ~GT & ~EQ : GO
SMinuend = SSubtrahend = s0 & ~s1 & ~GT & ~EQ
SA = SB = ~s0
DONE = s1 & ~s0
```

Reset works only on the next state. At the edge that samples `RESETn` low,
the current state's step is still carried out, for example one more
subtraction.

### Reversible flip-flop (`rev_dff`, `rev_dlatch`)

Each flip-flop is two reversible D latches in master-slave arrangement. The
master is open while clk = 0 and the slave while clk = 1. A Feynman gate with
B = 1 makes the inverted clock.

Each latch uses a Fredkin gate with A = en, B = the stored bit and C = d. Its Q
output, `en ? d : stored`, is the next value. A Feynman gate copies the stored
bit, once for the feedback and once for the output.

Lint and synthesis report these latches, and the loops through them, as
latches and combinational loops. That is intentional. The two latches of a
flip-flop are never open at the same time, so no loop is ever transparent.

The one net that breaks the fan-out-of-one rule is `clk`, which is
distributed to all 34 flip-flops as an ordinary clock net.

## Where this RTL makes its own choices

The gate equations, the adder's structure and the gate kinds in each circuit
come from the design description. Beyond that, the design description gives
only names and interfaces, so the following are choices made here:

* the AND reading of the TSG carry term (see above);
* the exact wiring of the Wallace tree (the plain Wallace grouping);
* everything inside the GCD datapath: multiplexer polarities, subtraction and
  comparison on TSG adders, and Z = register A. Z = A matches the published
  waveform example (Z = 13, 9, 5, 1 for X = 13, Y = 4);
* the state table, the state encoding and the synchronous reset of the
  control unit;
* the rising clock edge, and the internal wiring of the D latch;
* `DONE` for a result of 1. The design description says DONE stays low when
  the operands have no common divisor. Its control unit, however, only sees
  GO, GT and EQ, and cannot tell a result of 1 from any other. Here `DONE`
  rises for every finished computation.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    tb/tb_rev_circuits_top.sv --top-module tb_rev_circuits_top
./obj_dir/Vtb_rev_circuits_top
```

| testbench | what it checks |
|---|---|
| `tb_rev_feynman`, `tb_rev_fredkin`, `tb_rev_peres`, `tb_rev_toffoli`, `tb_rev_tsg` | full truth tables |
| `tb_rev_ripple_adder` | all 512 input combinations, and 3 + 9 = 12 |
| `tb_rev_wallace_mult` | all 65,536 products, and the 18-step reference operand sequence (be·aa = 7e2c ... c5·c6 = 985e) |
| `tb_rev_dlatch`, `tb_rev_dff` | transparency and hold; edge sampling and hold between edges |
| `tb_gcd_regen`, `tb_gcd_output` | every copy; the whole state table |
| `tb_gcd_control` | 5,000 random cycles against a reference state machine |
| `tb_gcd_datapath` | 4,000 random control sequences against reference registers |
| `tb_rev_gcd` | 13,4 (Z = 13, 9, 5, 1, ...) and 4,2 step by step; corner cases and 40 random pairs: result and exact cycle count; reset abort; back-to-back runs |
| `tb_rev_circuits_top` | the whole top at default sizes: adder and multiplier on random operands every cycle while the GCD runs 36 computations; counts carries, loads, both subtraction directions, finishes, a restart and a reset abort |

Every testbench drives inputs on the falling clock edge. Each of them runs in
well under a second.
