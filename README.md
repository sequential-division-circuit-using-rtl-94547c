# Sequential restoring divider from reversible logic gates

This is an unsigned integer divider that works one quotient bit at a time. Every
combinational part is written as a network of reversible gates: Fredkin, Feynman,
double Feynman (F2G), HNFG, SRK, MTSG and TS-3. A reversible gate has as many
outputs as inputs, and its inputs can always be recovered from its outputs.
Outputs that the circuit does not need are left as "garbage", and inputs that
are tied to 0 or 1 are "constant inputs". Fan-out is done with Feynman gates
whose second input is 0. Storage uses ordinary edge-triggered flip-flops.

The RTL simulates and synthesizes like any other design. The reversible-gate
structure appears as the module hierarchy, so each gate is an instance you can
count and inspect.

## How a division runs

Two `WIDTH`-bit registers hold the state:

* **A**, which becomes the remainder;
* **Q**, which starts as the dividend and becomes the quotient.

Both are parallel-in/parallel-out left-shift registers (`rev_shift_reg`). Each
has a load/shift control `E` and a `HOLD` input. During a shift, Q's most
significant bit moves into bit 0 of A, so {A,Q} acts as one `2*WIDTH`-bit
register. A subtractor keeps forming `P = A - divisor`, and its top bit
`P[WIDTH-1]` is used as the sign.

| pulse | phase (`phase_t`) | E | SELECT | M | what happens |
|---|---|---|---|---|---|
| 0 | `PH_LOAD` | 1 | 1 | 1 | A ← 0, Q ← dividend |
| 1, 3, …, 2n−1 | `PH_SHIFT` | 0 | 0 | 0 | {A,Q} shift left one place; Q bit 0 becomes 0 |
| 2, 4, …, 2n | `PH_STEP` | 1 | 0 | 0 | if P ≥ 0: A ← P, q0 ← 1; otherwise A is kept (restored), q0 ← 0 |
| after 2n+1 | `PH_DONE` | – | – | – | K = 1 drives HOLD of both registers |

A division therefore takes **2·WIDTH+1 clock pulses**. When it ends, `done`
(the control unit's K) rises, and the quotient and remainder stay in Q and A
for as long as you like. A negative difference is never written into A. This
makes the divider "non-performing": the restore step costs no extra
operation.

Here is the 4-bit example 10 ÷ 2 (the state after each pulse):

| pulse | A | Q | |
|---|---|---|---|
| 0 | 0000 | 1010 | load |
| 1 | 0001 | 0100 | shift |
| 2 | 0001 | 0100 | 0001−0010 < 0: keep A, q0=0 |
| 3 | 0010 | 1000 | shift |
| 4 | 0000 | 1001 | 0010−0010 = 0: A ← 0, q0=1 |
| 5 | 0001 | 0010 | shift |
| 6 | 0001 | 0010 | negative: q0=0 |
| 7 | 0010 | 0100 | shift |
| 8 | 0000 | 0101 | q0=1 → quotient 5, remainder 0 |

### Operand range

The subtractor is `WIDTH` bits wide, and its MSB is read as the sign. That
test is exact when **1 ≤ divisor ≤ 2^(WIDTH−1)**, for any dividend. Here is
why. After a shift, A is less than 2·divisor, so the difference lies in
[−divisor, divisor). That interval fits a `WIDTH`-bit two's-complement number
only under the bound above.

* Larger divisors give wrong results.
* Division by zero is not detected, and its result has no meaning.

If you need the full range, widen A and the subtractor by one bit.

## How the datapath selects A and Q

Two multiplexers decide what gets loaded:

* The **3-input MUX** (`rev_mux3`) feeds A with `M ? 0 : (N ? P : A)`.
* The **2-input MUX** (`rev_mux2`) feeds Q with
  `SELECT ? dividend : {Q[WIDTH-1:1], N}`. The new quotient bit is N, and it
  enters Q through this MUX's bit-0 input.

N is the inverted sign of the difference, `N = ~P[WIDTH-1]`. A Feynman gate
with constant input 1 does the inversion. A Fredkin gate then forces N to 1
while M = 1, so the initial load picks the 0 input.

Both MUXes are made of SRK gates. The SRK gate's third output,
`~A·C ⊕ A·B`, is a 2:1 multiplexer with A as the select:

* `rev_mux2` uses one SRK per bit.
* `rev_mux3_cell` cascades two SRKs per bit (`sel2 ? (sel1 ? b : c) : d`).

In each case the select line passes from gate to gate through output P.

The register cell (`rev_shift_cell`) works like this:

* A Fredkin gate on E picks the parallel input (E = 1) or the neighbouring
  bit (E = 0).
* A second Fredkin gate on HOLD keeps the stored bit when HOLD = 1.
* A flip-flop stores the bit.
* A Feynman gate and an HNFG make the copies for the next cell and for the
  parallel output.

The subtractor (`rev_subtractor`) computes `a + ~b + 1`:

* NOT gates invert b.
* MTSG gates with D = 0 act as full adders on bits 0…WIDTH−2, starting from a
  carry-in of 1.
* A TS-3 gate gives the sum bit alone on the MSB, since no carry out is
  needed.

## Gate library

| module | inputs | outputs |
|---|---|---|
| `rev_not` | A | ~A |
| `rev_feynman` | A, B | A, A⊕B |
| `rev_f2g` | A, B, C | A, A⊕B, A⊕C |
| `rev_fredkin` | A, B, C | A, ~A·B+A·C, A·B+~A·C |
| `rev_hnfg` | A, B, C, D | A, A⊕C, B, B⊕D |
| `rev_ts3` | A, B, C | A, B, A⊕B⊕C |
| `rev_mtsg` | A, B, C, D | A, A⊕B, A⊕B⊕C, (A⊕B)·C⊕A·B⊕D |
| `rev_srk` | A, B, C | A, A⊕B⊕C, ~A·C⊕A·B |

## Gate count at width n

| part | gates |
|---|---|
| two shift registers | 8n (per bit: 2 Fredkin, 1 Feynman, 1 HNFG) |
| 2-input MUX | n SRK |
| 3-input MUX | 2n SRK |
| subtractor | n−1 MTSG + 1 TS-3, plus n NOT |
| fan-out and sign | n F2G + (n+1) Feynman + 1 Fredkin |

The published cost table for this divider counts 5 gates per register bit. It
also stores the bit in a clock-gated Fredkin loop. Here that storage gate is a
flip-flop: this is why the registers count 8n gates rather than 10n.

## Where this RTL departs from the original circuit or fills gaps

* **Storage.** Each bit is a rising-edge flip-flop with an asynchronous
  active-low reset. It is not a Fredkin gate gated by the clock level. This
  lets a chain of cells move exactly one place per pulse.
* **Control unit.** The original control unit is a counter and a comparator
  that produce K after 2n+1 pulses, and that is what `rev_div_control` does.
  It also decodes E, SELECT and M from the count. That decoding, the `start`
  input and the reset behaviour are this design's own.
* **Starting a division.**
  * Releasing reset starts a division.
  * A one-cycle `start` pulse starts a new division on the next edge.
  * The dividend is sampled on pulse 0, and the divisor is read on every
    `PH_STEP` pulse. Keep both steady until `done`.
* **Quotient bit.** The new bit enters through the bit-0 input of the
  2-input MUX. The Q register's serial input is 0.
* **Forcing N.** The Fredkin gate that forces N = 1 during the initial load
  is an addition. Without it, the load would depend on a stale sign bit.
* **Subtractor stages.** The subtractor is `WIDTH` bits wide, built from
  MTSG full adders with TS-3 as its top stage.

## Interface (`rev_divider`)

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | asynchronous active-low reset; a division starts when it is released |
| `start` | in | 1 | one-cycle pulse: restart with the present operands |
| `dividend` | in | WIDTH | |
| `divisor` | in | WIDTH | 1 … 2^(WIDTH−1) |
| `quotient` | out | WIDTH | Q register |
| `remainder` | out | WIDTH | A register |
| `done` | out | 1 | high 2·WIDTH+1 pulses after the start, until the next start |

The one parameter is `WIDTH` (default 4, the size of the worked example). It
must be at least 2. Types shared between the control unit and the top level
are in `rev_div_pkg` (`phase_t`). Two assertions check the design:

* the cycle counter never passes 2n+1;
* the registers stay stable while `done` is high.

## Hierarchy

```
rev_divider
├── rev_div_control            counter, comparator, E/SELECT/M decode
├── rev_shift_reg  ×2 (A, Q)   └── rev_shift_cell ×WIDTH (rev_fredkin ×2, rev_feynman, rev_hnfg)
├── rev_subtractor             rev_not ×WIDTH, rev_mtsg ×(WIDTH−1), rev_ts3
├── rev_mux3                   └── rev_mux3_cell ×WIDTH (rev_srk ×2)
├── rev_mux2                   rev_srk ×WIDTH
└── rev_f2g ×WIDTH, rev_feynman ×(WIDTH+1), rev_fredkin   fan-out and N
```

## Simulating

Every testbench checks itself. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog. To run one:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/rev_div_pkg.sv \
          tb/tb_rev_divider.sv --top-module tb_rev_divider -o sim
./obj_dir/sim
```

The whole-design testbenches:

* `tb_rev_divider` runs at the default width. It follows the 10 ÷ 2 example
  above pulse by pulse. It then divides every dividend 0…15 by every divisor
  1…8, and checks:
  * the quotient and the remainder;
  * that `done` rises after exactly 9 pulses;
  * that the registers hold afterwards.

  It also counts the subtract steps, restore steps, holds, reset starts and
  `start` starts, and fails if any of them never happened.
* `tb_rev_divider_w8` runs 405 divisions at WIDTH = 8.

Each block also has its own testbench, `tb/tb_<module>.sv`:

* the gates are tested exhaustively against their equations;
* the MUXes and the subtractor are tested against behavioural references;
* the register cell, the register and the control unit are tested cycle by
  cycle.
