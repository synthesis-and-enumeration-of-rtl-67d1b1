# Strongly secure SR-equivalent scan registers

A scan chain lets a tester shift any state into a chip and shift any state
out. That is what makes scan design so good for testing. It is also what makes
it a side channel: someone with access to the scan pins can read secret
register contents or plant chosen ones. The circuits here replace plain
shift-register scan segments with registers that look the same from outside
but hide their state.

* **SR-equivalent.** A k-stage register is *SR-equivalent* if every bit
  shifted in at `x` comes out at `z` exactly k clock cycles later,
  `z(t+k) = x(t)`, as in a k-stage shift register. Test patterns
  therefore pass through it unchanged, and the rest of the scan flow does not
  need to know it is there.
* **Different inside.** Inside, the stages do not hold the shifted bits. XOR
  terms mixed into the chain scramble them and cancel again by the time a bit
  reaches the output. Without the gate-level netlist, the state cannot be read
  or written.
* **Strongly secure.** A register is *scan-in secure* if loading a given state
  always takes a different input sequence from the one a shift register would
  need. It is *scan-out secure* if the output sequence that reveals a state
  always differs from a shift register's. It is *strongly secure* if it is
  both. For an SR-equivalent register the two properties imply each other.

The RTL provides both general register families, generic and configured by
truth tables. It also provides the small worked examples of the family as
fixed gate-level modules, and the "dummy flip-flop" hardening step.

## The two register families

Both families are chains of k D flip-flops `y1..yk`. Each flip-flop is fed
through an XOR that mixes in an arbitrary Boolean function `f_i`. A last XOR
at the output mixes in `f_k`.

**Generalized feed-forward shift register, GF2SR** (`rtl/gf2sr.sv`). The
functions look *back* toward the input:

```
y1     <= x ^ f0                       f0 has no input: a constant (NOT gate if 1)
y(i+1) <= y(i) ^ f_i(x, y1..y(i-1))
z       = yk ^ fk(x, y1..y(k-1))
```

Unrolled over k cycles, this always gives `z(t+k) = x(t) ^ g(x(t+1)..x(t+k))`
for some function `g`. The register is SR-equivalent exactly when `g` is 0.

**Generalized feedback shift register, GFSR** (`rtl/gfsr.sv`). The functions
look *forward* toward the output:

```
y1     <= x ^ f0(y1..yk)
y(i+1) <= y(i) ^ f_i(y(i+1)..yk)
z       = yk ^ fk                      fk has no input: a constant
```

In both families, `f_i` has `i` inputs (GF2SR) or `k-i` inputs (GFSR). All
tables together therefore hold `2^(k+1) - 1` bits. The generic modules take
them as one packed parameter `F` of that width, laid out by `rtl/gsr_pkg.sv`:

| family | f_i starts at bit         | address bit 0 | address bit j |
|--------|---------------------------|---------------|---------------|
| GF2SR  | `2^i - 1`                 | `x`           | `y_j`         |
| GFSR   | `2^(k+1) - 2^(k-i+1)`     | `y(i+1)`      | `y(i+1+j)`    |

So a 3-stage GF2SR table is `{f3[7:0], f2[3:0], f1[1:0], f0}`, and a 3-stage
GFSR table is `{f3, f2[1:0], f1[3:0], f0[7:0]}`. The all-zero table is a plain
shift register. Every other table is a distinct member of the family, which
gives a family size of `2^(2^(k+1)-1) - 1`.

The package also defines the tables of the example circuits: `GF2SR_R1`,
`GF2SR_R2`, `GF2SR_R3`, `GF2SR_R6`, `GFSR_R4` and `GFSR_R5`.

## The worked examples, R1 to R6

Each 3-stage example is a fixed gate-level module. Each one also matches a
table of the generic module.

| module      | circuit | equations                                                     | pin behaviour                           |
|-------------|---------|---------------------------------------------------------------|-----------------------------------------|
| `sreq_r1`   | R1      | `y1<=x, y2<=y1, y3<=y2^x&y1, z=y3^y1&y2`                      | `z(t+3)=x(t)`: SR-equivalent            |
| `gf2sr_r2`  | R2      | `y1<=x, y2<=y1, y3<=y2^x&y1, z=y3`                            | `z(t+3)=x(t)^x(t+1)x(t+2)`              |
| `gf2sr_r3`  | R3      | R2 with `y2<=~y1`, `z=~y3`                                    | `z(t+3)=x(t)^x(t+1)x(t+2)`              |
| `gf2sr_r6`  | R6      | R3 with `z=~y3 ^ (y1&~y2)`                                    | `z(t+3)=x(t)`: SR-equivalent and strongly secure |
| `gfsr_r4`   | R4      | `y1<=x, y2<=y1^y2&y3, y3<=y2, z=y3`                           | `z(t+3)=x(t)^z(t+2)z(t+1)`              |
| `gfsr_r5`   | R5      | `y1<=~x, y2<=y1^y2&~y3, y3<=y2, z=~y3`                        | `z(t+3)=x(t)^~z(t+2)z(t+1)`             |

R2, R3 and R6 are three steps of one repair. R2 has no inversions, so its
state can be loaded and read back exactly as in a shift register: it is not
secure. It is also not SR-equivalent. Adding NOT gates in front of `y2` and
at the output gives R3, which is strongly secure. Those NOT gates do not fix
its output, though. Tracing R3 symbolically from a state `(y1,y2,y3)` at time
t:

```
cycle   y1        y2          y3                         z
t       y1        y2          y3                         ~y3
t+1     x(t)      ~y1         y2 ^ x(t)y1                ...
t+2     x(t+1)    ~x(t)       ~y1 ^ x(t+1)x(t)           ...
t+3     x(t+2)    ~x(t+1)     ~x(t) ^ x(t+2)x(t+1)       x(t) ^ x(t+2)x(t+1)
```

At t+3 the stages hold `y1 = x(t+2)` and `~y2 = x(t+1)`. The error term
`x(t+2)x(t+1)` is therefore available as `y1 & ~y2` at the same moment, and
R6 XORs it into the output. The product cancels and `z(t+3) = x(t)`. The
repair only adds logic after the last flip-flop. It cannot change how states
are loaded, so scan-in security is kept, and SR-equivalence then brings
scan-out security with it. The same reasoning holds for a GFSR with the roles
swapped: logic added at the input cannot change how states are read out.

`gf2sr_r6` exposes the added term as the signal `ff_fix`. `gfsr_r4` and
`gfsr_r5` expose their feedback term as `fb`.

## Hardening with a dummy flip-flop

The other way to harden a register is to make it SR-equivalent first and
then add one dummy stage: a flip-flop between two NOT gates (`dummy_ff`). The
dummy flip-flop always holds the *complement* of the bit passing through it.
At the pins it is still a one-cycle delay. An SR-equivalent register with
such a stage at either end is therefore a (k+1)-stage SR-equivalent. No state
of it can be loaded or read as if it were a plain shift register, so no
second repair is needed.

`secure_sreq` builds this from a generic GF2SR. `DUMMY_AT_INPUT` selects the
end where the dummy stage goes. The default core is R1, giving a 4-stage
SR-equivalent. Any other `F` must itself describe an SR-equivalent GF2SR; the
module does not check this.

## How many such registers exist

The security argument rests on the number of candidate structures an attacker
must choose between. The number of k-stage SR-equivalent GF2SRs and of k-stage
SR-equivalent GFSRs is `2^(2^k - 1) - 1` in each case. The number that are
both SR-equivalent and strongly secure is larger than half of that. The lower
bound comes from the members with an inverter at the secure end: f0 = 1 for a
GF2SR (scan-in secure) and fk = 1 for a GFSR (scan-out secure).

`tb/tb_enum_sreq.sv` checks this by brute force for k = 1 and k = 2. It builds
every table setting of both families (8 and 128 instances) and drives them
all with one random stream, with periodic resets. It then counts the
instances whose output never departs from `x(t-k)`. The results are:

* SR-equivalent members, all-zero table excluded: 1 per family for k = 1, 7 per
  family for k = 2, as predicted.
* SR-equivalent 2-stage members with the inverter at the secure end: 4 per
  family, above the bound of 3.5.

k = 3 would need 32768 instances per family and is not simulated. A random
stream is a strong test here, but it is not a proof.

## Top level

`gsr_top` places every circuit side by side. Each circuit is an independent
scan segment with its own `x_*` input and `z_*` output. They share only `clk`
and `rst_n`:

| lane       | circuit                                  | latency / relation                     |
|------------|------------------------------------------|----------------------------------------|
| `r1`       | `sreq_r1`                                | `z = x` delayed 3                      |
| `r2`, `r3` | `gf2sr_r2`, `gf2sr_r3`                   | `x(t) ^ x(t+1)x(t+2)` after 3          |
| `r6`       | `gf2sr_r6`                               | `z = x` delayed 3                      |
| `r4`, `r5` | `gfsr_r4`, `gfsr_r5`                     | see table above                        |
| `gf2sr`    | `gf2sr`, default tables (R6)             | `z = x` delayed 3                      |
| `gfsr`     | `gfsr`, default tables (R5)              | same as `r5`                           |
| `sec_in`   | `secure_sreq`, dummy stage at the input  | `z = x` delayed 4                      |
| `sec_out`  | `secure_sreq`, dummy stage at the output | `z = x` delayed 4                      |

**Timing.** All flip-flops are rising-edge D flip-flops. One bit shifts per
cycle. `z` is combinational from the stages, and in the generic GF2SR also
from `x`. Sample it before the next rising edge.

**Reset.** `rst_n` is asynchronous and active low, and clears every flip-flop
to 0. With the inversions this does not always mean `z = 0`: R3, R5, R6 and
the output-side dummy stage show a 1 right after reset.

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_gsr_top rtl/gsr_pkg.sv tb/tb_gsr_top.sv
./obj_dir/Vtb_gsr_top
```

Replace `tb_gsr_top` with any other testbench in `tb/`:

* There is one testbench per module (`tb_<module>`).
* `tb_gsr_top` runs the whole top at its default parameters for 2000 cycles.
  It also counts how often each mechanism acts: R6's correction term, R3's
  uncorrected error, the R4/R5 feedback, R1's state departing from a shift
  register's, and the dummy stage's inversion.
* `tb_enum_sreq` runs the enumeration described above.

All of them finish in well under a second.

To build a different register, instantiate `gf2sr` or `gfsr` with your own
`K` and `F`. `rtl/gsr_pkg.sv` documents the table layout.

## Assumptions and departures

* **Reset, clocking and scan control.** Nothing here defines a reset value, a
  clock edge or a scan-enable/capture path. Asynchronous active-low reset to
  0, rising-edge flip-flops and an always-shifting register are choices made
  for this RTL. There is no functional-mode capture multiplexer.
* **R5's feedback tap.** The feedback AND of R5 is read as taking the
  *inverted* last stage (the value on `z`). Its exact tap point relative to
  the output inverter is the one detail of the examples not confirmed by a
  symbolic trace. Each fixed example module and the generic module loaded
  with that example's table are tested against the same pin relation.
* **Which input of R6's added AND is inverted.** It is the `y2` input. This
  is the only choice that cancels R3's error term, as shown above.
* **Truth-table packing.** The packed-table format and the default tables of
  the generic modules (R6 for `gf2sr`, R5 for `gfsr`, R1 inside
  `secure_sreq`) are this design's own.
* **GFSR repair example.** No GFSR example is given that is both
  SR-equivalent and strongly secure. The package adds one, `GFSR_R5_SREQ`,
  derived here the same way R6 is derived from R3. R5's output error
  `~z(t+2)z(t+1)` equals `y1(t) & ~y2(t)`, a function of the state one cycle
  after `x(t)` is applied. Feeding that term back into `y1` together with
  `x(t)` (f0 = `1 ^ y1&~y2`) cancels it, and `tb_gfsr` confirms
  `z(t+3) = x(t)`. It is used only as a table of `gfsr`, not as a fixed module.
* **Security is not checked in hardware.** The testbenches check pin
  behaviour, inverted dummy storage and class counts. Scan-in and scan-out
  security are properties of the structure, argued above, and no testbench
  verifies them in general.
* **Design flow not in RTL.** The flows that turn an arbitrary register into
  a strongly secure SR-equivalent one are design-time procedures: symbolic
  simulation, then adding NOT gates, a dummy stage or output/input logic.
  They are represented here only by their results (R3, R6, `secure_sreq`).
* **No plain shift register.** The plain shift register the circuits replace
  is not a separate module. It is the all-zero table of `gf2sr` or `gfsr`.

## Files

* `rtl/gsr_pkg.sv`: table-layout helpers and the example tables.
* `rtl/gf2sr.sv`, `rtl/gfsr.sv`: the generic families.
* `rtl/sreq_r1.sv`, `rtl/gf2sr_r2.sv`, `rtl/gf2sr_r3.sv`, `rtl/gf2sr_r6.sv`,
  `rtl/gfsr_r4.sv`, `rtl/gfsr_r5.sv`: the examples.
* `rtl/dummy_ff.sv`, `rtl/secure_sreq.sv`: dummy-stage hardening.
* `rtl/gsr_top.sv`: everything side by side.
* `tb/`: one self-checking testbench per module, plus `tb_enum_sreq.sv`.
