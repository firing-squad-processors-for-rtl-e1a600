# Firing-squad multiply-add processors

A bit-serial processor that computes `x*y + z` for n-bit operands, either two's
complement or unsigned. It is built as a row of identical small machines, and each
machine talks only to its two neighbours. Operand bits go into the left end, lowest bit
first, one bit of each operand per clock. The bits of the 2n-bit result come out of the
same end one clock later, lowest bit first. One operation takes 2n+1 clocks, including a
one-clock reset, and operations can follow each other with no gap. The clock period
does not depend on n: no signal crosses more than one machine per clock. There is no
carry chain across the word and no multiplier array. The cost is a row of about n/2
machines of eleven flip-flops each.

The design contains:

* the **straight processor**: floor(n/2)+1 machines, all with the same structure, and
  nothing but nearest-neighbour wiring;
* the **queer processor**: n even simpler machines that all read a two-bit broadcast
  rail carrying the current operand bits;
* a **scalar-product unit**: k straight processors chained, computing
  `z + sum x_l*y_l` in 2n+k clocks;
* a **matrix multiply-add unit**: k x k scalar-product units in parallel, computing
  `C = A*B + D` in the same 2n+k clocks;
* word-level front ends that turn parallel words into the bit streams and collect the
  result.

The defaults are n = `N` = 16 and k = `K` = 4.

## Operand and result streams

An operation occupies clock times 0 to 2n:

| clock time t | into the processor | out of the processor |
|---|---|---|
| 0 .. n-1 | bit t of x, y, z; `run`=1 | bit t-1 of the result (t >= 1) |
| n .. 2n-1 | sign bit of x, y, z again (two's complement), or 0 (unsigned); `run`=1 | bit t-1 of the result |
| 2n | `run`=0 (reset) | bit 2n-1 of the result |

The next operation may start at clock 2n+1. The result is the full 2n-bit product plus
addend, and it cannot overflow: for signed operands |xy+z| < 2^(2n-1), and for unsigned
ones xy+z < 2^(2n). Since the result leaves one clock after its inputs, it can feed the
z input of another processor directly. This is how the scalar-product unit works.

## The straight processor

### State of one machine

Each machine (`fsq_straight_cell`) has these registers:

* `p0,q0`: the first operand-bit pair it keeps;
* `p1,q1`: the second pair it keeps;
* `p,q`: a one-clock stage that passes the x and y streams to the right;
* `r = {r2,r1,r0}`: a 3-bit accumulator;
* `s`: a 2-bit switch. 0 means reset or waiting, 1 and 2 mean taking its two operand
  pairs, and 3 means running.

It reads `p, q, r2, s` of its left neighbour (written `pL, qL, r2L, sL` below) and `r0`
of its right neighbour (`r0R`). For the leftmost machine the environment is the left
neighbour. `pL`, `qL` and `r2L` are the x, y and z streams, and `sL` is 3 while
`run`=1 and 0 while `run`=0. The rightmost machine sees `r0R` = 0.

### What machine j does

The streams move right one machine per clock. So machine j sees bit i of x and y at
clock i+j. Its switch starts counting at clock 3j, when its left neighbour reaches 3.
It therefore keeps bits **2j** (in `p0,q0`) and **2j+1** (in `p1,q1`) of x and y. All
higher bits stream past it through `p,q` to machine j+1.

Machine j forms every partial product `x_a*y_b` whose smaller index is 2j or 2j+1.
Written as separate cases per switch value, the sum going into the accumulator is:

| s | terms added to `r1 + r2L (+ r0R)` | products |
|---|---|---|
| 0 | `pL*qL` | x_2j*y_2j |
| 1 | `p0*qL + pL*q0` | x_2j*y_(2j+1), x_(2j+1)*y_2j |
| 2 | `p0*qL + p1*q1 + pL*q0` | x_2j*y_(2j+2), x_(2j+1)*y_(2j+1), x_(2j+2)*y_2j |
| 3 | `p0*qL + p1*q + p*q1 + pL*q0` | every remaining product with x_2j, y_2j, x_(2j+1) or y_(2j+1) |

All the products added in one clock have the same weight. The accumulator value in
machine j at clock t has weight 2^(t+j-1). Three paths keep the bits in line:

* `r1` becomes next clock's `r0` in the same machine (weight doubles with time);
* `r2` is read by the right neighbour next clock (carry moves right);
* `r0` is read by the left neighbour next clock (sum bit moves left).

The accumulator never exceeds 7: at most four products plus three carry bits. The
leftmost machine's `r0` is therefore result bit t-1 at clock t.

### Hardware form of the next-state rule

`fsq_straight_cell` computes the four cases above with one formula:

    r <= s1*r0R + r1 + r2L + P*qL + pL*q0 + p1*q + p*q1,   P = (s==0) ? pL : p0

This form has two differences from the case table:

* `p` also loads from the left when s=1, not only when s >= 2. At s=2 the term `p*q1`
  then supplies the diagonal product `x_(2j+1)*y_(2j+1)`, while `p1*q` is still zero
  because `q` has not been loaded yet.
* `r0R` is added only when `s1` is set, that is, at s >= 2.

Only `P` needs a multiplexer. The adder is a 7-input, 1-bit-wide counter, which sets
the clock period.

Switch and data transfers:

* `sL`=0 clears the whole machine (switch, data bits and accumulator).
* `sL`=3 advances `s` by one, saturating at 3.
* `sL`=1 or 2 holds `s` at 0.
* s=0 loads `p0,q0`, s=1 loads `p1,q1`, s >= 1 loads `p`, and s >= 2 loads `q`.

### Reset sweep and back-to-back operation

No global reset reaches the machines. When `run` is 0 for a clock, the leftmost machine
is cleared. From the next clock each machine clears its right neighbour, one machine per
clock. The computation wave moves at one machine per three clocks, because machine j
starts at clock 3j. So the reset always stays ahead of the computation, and the next
operation can start on the clock right after the reset. This is why one operation costs
2n+1 clocks, and why one reset clock is needed after power-up.

Clearing the data bits and the accumulator on reset, not only the switch, is essential
in this design. The single formula assumes that the bits a machine has not loaded yet
are zero. Gating `r0R` with `s1` keeps a machine from reading a right neighbour that the
reset has not reached yet. Machine j+1 starts exactly when machine j reaches s=3, and
before that its `r0` carries nothing of the current operation.

floor(n/2)+1 machines is the minimum. Simulating this rule set gives wrong results with
one machine fewer, for every n from 2 to 8. This is also why the squad testbench's fault
copy (one machine fewer) fails.

## The queer processor

`fsq_queer_cell` keeps only a 1-bit switch `s`, one operand pair `p0,q0` and the 3-bit
accumulator. The x and y bits are not passed from machine to machine. They are put on a
two-bit rail that every machine reads in the same clock.

* Machine j starts at clock j, when its left neighbour's switch becomes 1. It stores the
  rail bits, x_j and y_j, and adds `r2L + x_j*y_j`.
* After that it adds `r0R + r1 + r2L + p0*q + p*q0` every clock. That is
  `x_j*y_t + x_t*y_j` for the bits t now on the rail.
* As a single formula: `r <= s*r0R + r1 + r2L + P*q + p*q0`, with `P = s ? p0 : p`.
* `sL`=0 clears the machine, as in the straight version.

Each machine has six flip-flops and a 5-input counter. It needs n machines instead of
n/2+1, and the rail must reach all of them within one clock. The clock period therefore
grows with n, and the processor is not truly linear-time. The RTL treats the rail as an
ordinary broadcast net. Stream timing, machine-to-machine protocol and the front end are
the same as for the straight processor.

## Chained processors: scalar products and matrices

`fsq_dot_product` puts K straight processors in a chain. Processor l computes
`x_l*y_l + (output of processor l-1)`, and processor 0 adds the external z. Result bits
of processor l-1 leave one clock after its inputs arrive, so processor l runs one clock
behind it. A flip-flop chain delays `run` by one clock per processor. The caller skews
lane l's operand bits by l clocks. Result bit t appears at clock t+K, so a full scalar
product takes 2n+K clocks. Processor 0 is free again after 2n+1 clocks, so a new scalar
product can start every 2n+1 clocks. The testbench checks this overlapped use.

`fsq_matrix_mac` instantiates K*K scalar-product units, one per element of C.

* A counter makes the lane skew: in count c, lane l carries bit c-l of its operand.
* `A[i][l]` is streamed on lane l of every unit in row i, and `B[l][j]` on lane l of
  every unit in column j.
* The whole `C = A*B + D` is ready after 2n+K clocks.

Results of both units are taken modulo 2^(2n), the width that one processor produces.
A sum of K products can need up to log2(K) more bits, and those are lost.

## Word-level interfaces

`fsq_serial_io` (one per processor in the top) and `fsq_matrix_mac` share the same
handshake:

* `start` is taken in a cycle where `ready` is high, and the operand words are latched
  at that edge.
* `ready` is also high in the last cycle of a running operation. Holding `start` high
  therefore issues operations back to back: every 2n+1 clocks for a single processor,
  every 2n+K clocks for the matrix unit.
* `done` pulses one cycle after the last result bit has been registered. For a single
  processor this is the cycle after the (2n+1)-th edge following the accepting edge.
  For the matrix unit it is the cycle after the (2n+K)-th edge.
* The result stays valid until the next `done`.
* `is_signed` picks sign replicas or zero extension.
* `rst_n` is an asynchronous active-low reset of the front ends only. While idle they
  hold `run` low, which keeps the processors in reset.

`fsq_top` puts the straight processor with its front end (`s_*` ports), the queer
processor with its front end (`q_*`) and the matrix unit (`m_*`) side by side. The three
share only clock and reset.

## Where this design makes its own choices

* **Reset of a machine.** The data bits and the accumulator are cleared together with
  the switch when the left neighbour shows 0. A switch of 1 or 2 on the left holds the
  switch at 0. Both are needed for the single-formula rules to be exact.
* **Single formula rather than the case table.** The cells implement the single formula
  for both versions. Taken literally, the straight case table adds `r0R` at every switch
  value and loads `p` only from s=2. With a reset that arrives from the left, that would
  let a stale bit from a right neighbour not yet reset into the sum.
* **Sizes.** N=16 and K=4 are chosen defaults. Both are parameters, and any N from 1 to
  64 works (64 is the limit of `fsq_pkg::stream_bit`).
* **Wrap-around** of scalar-product and matrix results modulo 2^(2N).
* **Front ends.** The handshake, the operand latches and the counter-generated lane
  skew are this design's own.
* **Not built.** The base-4 (two-bit digit) variant of either processor, which would
  halve machines and clocks, is not built. No rules for it are available to build from.

## Files

| file | contents |
|---|---|
| `rtl/fsq_pkg.sv` | link structs, switch values, `stream_bit()` |
| `rtl/fsq_straight_cell.sv`, `rtl/fsq_straight_squad.sv` | straight machine and processor |
| `rtl/fsq_queer_cell.sv`, `rtl/fsq_queer_squad.sv` | queer machine and processor with rail |
| `rtl/fsq_serial_io.sv` | word-level front end of one processor |
| `rtl/fsq_dot_product.sv` | K chained processors |
| `rtl/fsq_matrix_mac.sv` | K x K matrix multiply-add |
| `rtl/fsq_top.sv` | everything side by side |
| `tb/tb_<module>.sv` | a self-checking testbench per module |

## Verification and simulation

Each testbench computes the expected values itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`:

* **Cell testbenches.** They compare every output against a per-case reference model
  under random neighbour inputs, every clock.
* **Squad testbenches.** They run hundreds of random and corner-case operations (most
  negative value, all ones), signed and unsigned, at N=5 and N=16. At N=3 they run
  every combination of x, y and z. Every result bit is checked in the exact clock it
  must appear.
* **Scalar-product and matrix testbenches.** They check values, the 2n+K latency and
  back-to-back issue, at small sizes and at the defaults.
* **`tb_fsq_top`.** It runs the whole design at its default sizes. The straight and
  queer processors get identical operations and must agree, while matrix operations run
  at the same time. It also counts the mechanisms it has exercised: back-to-back issue
  and issue after idle for each unit, signed, unsigned, negative operands and results
  wider than N bits. It fails if one of them never happened.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/fsq_pkg.sv tb/tb_fsq_top.sv --top-module tb_fsq_top -Mdir obj -o sim
    ./obj/sim

All of them finish in well under a second. To change a size, override `N` or `K` on
the instance. The squad and dot-product testbenches show how.

Not verified: timing and area after synthesis, and the effect of rail delay on the
queer processor's clock period.
