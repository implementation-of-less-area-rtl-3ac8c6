# Pipelined inexact speculative adder (ISA), carry look-ahead and Brent-Kung variants

A conventional adder is as slow as its longest carry chain. The inexact
speculative adder (ISA) cuts an N-bit addition into independent blocks and
gives every block except the lowest a *predicted* carry-in, so that all
blocks add at the same time and the critical path is only one short block
long. Most predictions are right and the result is exact. When one is wrong,
a compensation stage detects it and either repairs it exactly or, where a
repair would ripple out of the block, shrinks the error to a small value.
The result is an adder that is usually exact and, when not, has a bounded
error.

This RTL builds a 16-bit ISA with four 4-bit blocks. The speculator,
the block adders and the compensation each take two pipeline stages, so the
adder accepts a new addition every clock cycle. Two versions of the block
adder are provided:

* **carry look-ahead** (`pcla4`), the main design, and
* **Brent-Kung** (`pbka4`), a parallel-prefix drop-in replacement with the
  same ports and timing.

The top level `isa_top` runs both versions side by side on one operand
stream.

## Structure

```
            a[15:0], b[15:0], cin
                    |
              rank 0: input register
                    |
   +-----------+----+-------+--------------+
   |           |            |              |
 block 0    pspec 1      pspec 2        pspec 3      ranks 1-2:
 (cin)      guesses c04  guesses c08    guesses c12  speculate (from block i-1's
   |           |            |              |         operand bits) and add
 pcla4/     pcla4/       pcla4/         pcla4/
 pbka4      pbka4        pbka4          pbka4
 bits 3:0   bits 7:4     bits 11:8      bits 15:12
   |           |            |              |
   +---- sums, block carry-outs, guesses --+
                    |
                  pcomp                               ranks 3-4: detect, then
                    |                                 correct or balance
   sum[16:0], spec_c, real_c, err, bal, out_valid
```

| Module      | Role |
|-------------|------|
| `isa_pkg`   | Shared constants (N=16, BLK=4, SPEC_BITS=2, latency 5), the adder-kind enum, the carry operator on (generate, propagate) pairs |
| `pspec`     | Carry speculator for one block boundary |
| `pcla4`     | 4-bit carry look-ahead block adder, two stages |
| `pbka4`     | 4-bit Brent-Kung block adder, two stages |
| `pcomp`     | Error detection and bidirectional compensation for the whole word, two stages |
| `isa_adder` | One complete ISA; parameter `ADDER` chooses `ADDER_CLA` or `ADDER_BKA` |
| `isa_top`   | Both ISA variants on shared inputs |

## How a carry is guessed

The speculator for the boundary into block *i* sees only the operand bits of
block *i-1*. It takes the `SPEC_BITS` most significant bit pairs of that block
(the *window*, 2 bits by default) and computes their group generate and
propagate:

* window generates: guess 1;
* window kills: guess 0;
* every bit of the window propagates: guess bit `a[BLK-SPEC_BITS-1]` of block
  *i-1*, the operand-a bit just below the window.

The last rule makes the guess right whenever that bit generates or kills (for
a bit that does not propagate, `a` equals its generate). A wrong guess needs
the whole window *and* the bit below it to propagate, or a carry chain from
further down. With `SPEC_BITS = BLK` the window is the whole block below and
the fallback guess is 0.

The guess is computed in two stages: the window's (G, P) and the fallback bit
are registered first, then `spec = G | P & guess` is formed and fed straight
into the second stage of the block adder. A copy is registered for the
compensation stage.

## Block adders

Both block adders register, in stage 1, the bitwise propagate `p = a ^ b` and
the group terms (G, P) of every prefix `k:0` of the block, computed as if the
carry-in were 0. The carry-in (real for block 0, guessed for the others)
arrives one cycle after the operands and is used only in stage 2:

```
c[k+1] = G[k:0] | P[k:0] & cin,    sum[k] = p[k] ^ c[k],    cout = c[W]
```

They differ only in how the prefix terms are built.

* `pcla4` writes each `G[k:0]` as a flat sum of products
  (`g[k] | p[k]g[k-1] | ... | p[k]..p[1]g[0]`): a classic look-ahead unit.
* `pbka4` builds them with a Brent-Kung tree of two-input carry operators
  `(g, p) o (g', p') = (g | p g', p p')`. For 4 bits:

  | level | nodes |
  |-------|-------|
  | 1     | `[1:0] = (1) o (0)`, `[3:2] = (3) o (2)` |
  | 2     | `[3:0] = [3:2] o [1:0]`, `[2:0] = (2) o [1:0]` |

  `G0, G[1:0], G[2:0], G[3:0]` are the carries out of bits 0 to 3, and
  `G[3:0]` is the block carry-out. Other power-of-two widths use the same
  up-sweep/down-sweep pattern.

The two variants compute the same function. The testbenches check that they
produce identical outputs cycle by cycle.

## Compensation: correct or balance

This is the least obvious part of the design. At boundary *i* the
compensation unit compares the guess `spec[i]` with the carry block *i-1*
actually produced, `real_c[i]`. Block *i-1* itself used a guessed carry-in, so
`real_c` is its carry-out as computed. A mismatch means block *i*'s sum is off
by exactly one unit of block *i*, that is 2^(4i):

* **error up** (`spec=0`, `real=1`): the block is one too small;
* **error down** (`spec=1`, `real=0`): the block is one too big.

Stage 1 flags the error, its direction, and whether a one-step fix stays
inside the block: the block sum must not be `1111` for an up error or `0000`
for a down error. Stage 2 then does one of two things:

* **Correction.** Block *i* is incremented or decremented. This removes the
  error exactly.
* **Balancing.** The fix would overflow into block *i+1*. Block *i* is left
  alone, and block *i-1*'s sum is forced to all ones (error up) or all zeros
  (error down). This moves the result towards the true value, usually to
  within less than one unit of block *i*.

The top block is fixed together with the final carry-out, as a 5-bit value.
For operands that can occur, that value cannot wrap, so the top boundary is
always corrected exactly. Boundaries are processed from the lowest up. If
block *i* balances block *i-1*, this overrides block *i-1*'s own correction.

Two worked cases (16-bit, cin = 0):

| a + b | what happens | result | exact |
|-------|--------------|--------|-------|
| `0x00C8 + 0x0038` | At bit 8 the window (`11`/`00`) propagates and the fallback bit is 0, so the guess is 0. Block 1 really carries out. Block 2's sum is `0`, so it is incremented. | `0x0100` | `0x0100` |
| `0x0FC8 + 0x0038` | The same error up at bit 8, but block 2's sum is `F`. Block 1 is balanced to `F`. At bit 12 the guess is 1 but block 2 really produces no carry, so block 3 is decremented. | `0x0FF0` | `0x1000` |

The outputs `err` and `bal` report, per boundary, whether the guess was wrong
and whether balancing was used instead of correction. A result is exact
whenever `err` is all zeros. In the top-level test's traffic, random operands
with many propagating blocks, about 45% of results see some misprediction.
Correction makes about half of those exact again.

## Timing and interface

`isa_adder` (and each half of `isa_top`):

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous, active-low reset of all registers |
| `in_valid` | in | 1 | `a`, `b`, `cin` are valid this cycle |
| `a`, `b` | in | N | operands |
| `cin` | in | 1 | carry-in |
| `out_valid` | out | 1 | result valid |
| `sum` | out | N+1 | `{carry-out, sum}` after compensation |
| `spec_c` | out | N/BLK-1 | guessed carries into blocks 1.. (`[1]` = bit 4, `[2]` = bit 8, `[3]` = bit 12) |
| `real_c` | out | N/BLK-1 | carries the blocks below produced |
| `err`, `bal` | out | N/BLK-1 | mis-speculation and balancing flags |

Rank by rank:

```
cycle    0        1          2            3           4          5
       operands  rank 0     rank 1       rank 2      rank 3     rank 4
       driven    input reg  spec st.1    spec st.2   detect     correct/
                            adder st.1   adder st.2  (pcomp 1)  balance
                                                                -> out_valid
```

Operands driven with `in_valid` during cycle 0 produce `out_valid` and the
result during cycle 5. Every cycle can carry a new addition. There is no
back-pressure.

Each rank loads only when the data arriving at it is valid: a valid bit
travels alongside the data and serves as that rank's clock enable, which is
the usual form of clock gating. When the adder is idle, its datapath
registers and outputs hold their last values.

`isa_top` has the same inputs. It brings out one set of outputs per variant,
prefixed `cla_` and `bka_`.

## Parameters

| Parameter | Default | Where |
|-----------|---------|-------|
| `N` | 16 | `isa_adder`, `pcomp`, `isa_top`: operand width, a multiple of `BLK` with at least two blocks |
| `BLK` | 4 | block width (Brent-Kung requires a power of two) |
| `SPEC_BITS` | 2 | speculation window, 1..`BLK` |
| `ADDER` | `ADDER_CLA` | `isa_adder` only: block adder kind |
| `W` | 4 | `pcla4`/`pbka4`: block width |

The 16-bit width, the 4-bit blocks and the choice between carry look-ahead and
Brent-Kung blocks come from the design this RTL implements. The tests also
run a 32-bit adder with 8-bit blocks and a 3-bit window, and 2- and 8-bit
block adders.

## What is this implementation's own choice

The published design names its parts and their structure, but several
details are not specified. Where a detail was not given, the choices below
were made. Change them if your reference differs.

* The speculation rule: window width 2, and the fallback bit `a` below the
  window.
* The correct-or-balance rule and its priorities, including the 5-bit
  handling of the top block.
* The placement of the pipeline cut inside each sub-block. Speculator, block
  adders and compensation each span two stages as in the original. Adding an
  input register gives five ranks.
* Stage depth. The original aims at about two gate levels per pipeline
  stage. Here the compensation stage, with its 4-bit increment and decrement,
  is deeper than that. No stage has been balanced for gate depth.
* Clock gating realised as per-rank load enables driven by a valid bit, and
  the valid-bit handshake itself.
* The Brent-Kung diagram is drawn with a carry-in of 0. Here the carry-in is
  applied after the tree, as `G | P & cin`.
* A synchronous, active-low reset of every register.

Two example additions from the original simulations (42282 + 19026 and
21801 + 21824) are reproduced. Both see no misprediction and give the exact
sums 61308 and 43625. Other values shown in those simulations could not be
reproduced and are not used as references.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Testbench | What it covers |
|-----------|----------------|
| `tb_pspec` | Random block operands against the arithmetic guess for two window sizes, the combinational and registered outputs, and gating |
| `tb_pcla4`, `tb_pbka4` | All 4-bit operand pairs with both carry-ins, random 8- and 2-bit instances, the delayed carry-in, and gating |
| `tb_pcomp` | Random sums and carries, biased towards all-ones and all-zeros blocks so that balancing occurs, against the model, and gating |
| `tb_isa_adder` | Three adders (16-bit CLA, 16-bit BKA, 32-bit/8-bit-block BKA) against the model: results, flags, 5-cycle latency, idle holding |
| `tb_isa_top` | The top at default size: the example and worked additions, 20,000 random and propagate-heavy additions, both variants compared against the model and each other |

`tb_isa_adder` and `tb_isa_top` count every mechanism and fail if any never
occurs: error-free results, errors up and down, correction, balancing,
results made exact by correction, gated idle cycles and full-rate streaming.

The reference model, `tb/isa_ref_pkg.sv`, works on integers rather than
gates. A guess is the carry out of `window(a) + window(b) + fallback`, and
each block sum is an ordinary addition. `tb/isa_scoreboard.sv` applies the
model to a stream of additions and checks results in order.

To simulate with Verilator 5, for example the top level:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/isa_pkg.sv rtl/pspec.sv rtl/pcla4.sv rtl/pbka4.sv rtl/pcomp.sv \
    rtl/isa_adder.sv rtl/isa_top.sv \
    tb/isa_ref_pkg.sv tb/isa_scoreboard.sv tb/tb_isa_top.sv \
    --top-module tb_isa_top -o sim && ./obj_dir/sim
```

For a single unit, list `rtl/isa_pkg.sv`, the unit's file,
`tb/isa_ref_pkg.sv` and its testbench. The RTL is synthesizable
SystemVerilog-2017 and lints cleanly with `verilator --lint-only -Wall`. The
only warnings are package constants unused by some modules. At the default
size the top level (both variants) synthesizes to about 320 flip-flops.

## Limits

* The adder is inexact by design. When any `err` bit is set the result may
  differ from `a + b + cin`. Balancing never moves the result away from the
  true value, and usually leaves less than one unit of block *i*. It leaves a
  full unit when block *i-1* already holds the forced value. Errors at
  neighbouring boundaries can combine.
* `real_c` is the carry the lower block produced from its own guessed
  carry-in. A misprediction further down can therefore go undetected at a
  higher boundary.
* No timing, area or power figures are claimed. Nothing here has been
  characterised on an FPGA or in a cell library.
