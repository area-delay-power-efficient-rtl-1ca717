# Square-root carry-select adder with carry-word selection

A carry-select adder (CSLA) speeds up addition by guessing. Each block of
bits is added twice, once assuming the carry from below is 0 and once
assuming it is 1. When the real carry arrives, a multiplexer picks the right
sum. The cost is almost two adders per block. The usual cheaper variants keep
the second adder but shrink it, for example with a binary-to-excess-1
converter.

This adder keeps the guess but moves it. Each block does not compute two
*sums*. It computes two *carry words*, the carry out of every bit position
under each assumption, and selects between those. The sum is formed only
once, after the selection, with one XOR per bit. Two properties make this
cheap:

* Both carry words come from the same half-sum and half-carry words, so the
  operand bits are combined only once.
* A carry-in of 1 can only add carries, never remove them. Every bit set in
  the carry-in-0 word is therefore also set in the carry-in-1 word. The
  2:1 selection then reduces to one AND and one OR gate per bit, with no
  multiplexer.

The blocks are chained as a *square-root* CSLA. A short ripple-carry adder
handles the lowest bits, and the blocks above it grow by one bit each. The
16-bit adder is laid out like this:

| stage | bits  | width | carry in | carry out |
|-------|-------|-------|----------|-----------|
| RCA   | 1:0   | 2     | `cin`    | c1        |
| CSLA  | 3:2   | 2     | c1       | c2        |
| CSLA  | 6:4   | 3     | c2       | c3        |
| CSLA  | 10:7  | 4     | c3       | c4        |
| CSLA  | 15:11 | 5     | c4       | `cout`    |

A wider block needs longer to form its carry words. It also sits further
from the ripple part, so its carry-in arrives later. The growing widths let
each block finish its carry words at about the time its carry-in arrives.

## Inside one carry-select block (`prop_csla`)

For an N-bit block with operands `a`, `b` and carry-in `cin`, bit index
`i = 0 .. N-1`:

| unit      | module    | output       | logic                                              |
|-----------|-----------|--------------|----------------------------------------------------|
| half-sum  | `hsg`     | `s0`, `c0`   | `s0(i) = a(i) ^ b(i)`, `c0(i) = a(i) & b(i)`       |
| carry, 0  | `cg0`     | `c10`        | `c10(0) = c0(0)`; `c10(i) = c0(i) \| s0(i) & c10(i-1)` |
| carry, 1  | `cg1`     | `c11`        | `c11(0) = c0(0) \| s0(0)`; `c11(i) = c0(i) \| s0(i) & c11(i-1)` |
| select    | `cs_unit` | `c`          | `c(i) = c10(i) \| cin & c11(i)`                    |
| final sum | `fsg`     | `s`          | `s(0) = s0(0) ^ cin`; `s(i) = s0(i) ^ c(i-1)`      |

The block's carry-out is `c(N-1)`. The two carry generators differ only at
bit 0. With carry-in 0, bit 0 carries only when both operand bits are 1.
With carry-in 1, it carries when either one is. Above bit 0, both are the
same AND-OR ripple.

### Why the selection needs no multiplexer

A multiplexer would compute `c = cin ? c11 : c10`. The generators guarantee
`c10(i) -> c11(i)`: by induction from bit 0, a carry that exists without the
incoming 1 still exists with it. Then:

* with `cin = 0`, `c10 | 0 = c10`;
* with `cin = 1`, `c10 | c11 = c11`, because `c10` adds no bit that `c11`
  lacks.

`cs_unit` is correct only for input pairs with this property. It has a
deferred assertion (`a_carry_pattern`) that reports any pair without it. Do
not reuse `cs_unit` as a general multiplexer.

### Where the time goes

The carry words depend only on the operands. They are ready long before the
carry from lower blocks arrives. Once `cin` arrives, the block's carry-out
is one AND-OR stage away, and the sum one XOR beyond that. The critical path
of the whole adder is therefore the ripple part plus one AND-OR per block,
with one XOR at the end. This holds as long as each block's own carry
ripple is no slower than the chain below it, which is what the group sizes
are chosen for. The RTL is plain combinational logic and models no gate
delays. A synthesis tool is free to restructure it.

## Files

| file                 | contents                                                             |
|----------------------|----------------------------------------------------------------------|
| `rtl/sqrt_csla.sv`   | top: ripple part plus the chain of carry-select blocks               |
| `rtl/csla_pkg.sv`    | constant functions giving the number, position and width of blocks   |
| `rtl/prop_csla.sv`   | one carry-select block                                               |
| `rtl/hsg.sv`, `rtl/cg0.sv`, `rtl/cg1.sv`, `rtl/cs_unit.sv`, `rtl/fsg.sv` | the five units of a block |
| `rtl/rca.sv`, `rtl/full_adder.sv` | ripple-carry adder for the low bits                     |
| `tb/tb_<module>.sv`  | self-checking testbench for each module above                         |
| `tb/tb_sqrt_csla_widths.sv` | 32-bit and 64-bit adders                                       |

## Interface and parameters

`sqrt_csla` has the ports `a`, `b` (`WIDTH` bits), `cin` in, and `fs`
(`WIDTH` bits), `cout` out, with `{cout, fs} = a + b + cin`. There is no
clock and no reset, and no register anywhere in the design. Register the
inputs or outputs outside if a pipeline stage is needed.

| parameter   | default | meaning                                              |
|-------------|---------|------------------------------------------------------|
| `WIDTH`     | 16      | operand width                                        |
| `RCA_WIDTH` | 2       | bits in the ripple-carry part; also the width of the first block |

Block `g` (counting from 0) nominally has `RCA_WIDTH + g` bits, and the last
block takes whatever bits remain. `WIDTH` must exceed `RCA_WIDTH`; an
elaboration-time assertion enforces this. Examples of the resulting layout:

| `WIDTH` | ripple | blocks                       |
|---------|--------|------------------------------|
| 16      | 2      | 2, 3, 4, 5                   |
| 32      | 2      | 2, 3, 4, 5, 6, 7, 3          |
| 64      | 2      | 2, 3, 4, 5, 6, 7, 8, 9, 10, 8 |

The sub-modules take a width parameter `N` (default 4; the ripple adder
defaults to 2).

## How closely this follows the published design

Taken from the published design:

* the five units of a block and how they connect;
* the gate types of each unit;
* the equations above;
* the 16-bit layout (2-bit ripple part, then blocks of 2, 3, 4 and 5 bits).

Choices made here:

* **Wider adders.** The layout rule for widths other than 16 bits is an
  extension made here. The 32- and 64-bit layouts in the table follow from
  it and are not published layouts. A different partition changes only
  timing, not results.
* **Ripple-carry part.** It is a plain chain of full adders.
* **Final-sum input width.** `fsg` takes the full N-bit carry word and
  ignores its top bit, so the block can wire it straight through. Lint
  reports that bit as unused; `cg0` likewise leaves `s0(0)` unused.
* **Comparison adders.** The conventional dual-RCA CSLA and the
  excess-1-converter CSLA are not included. They serve only as
  comparisons for this design.
* **Timing.** Gate delays are not modelled.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog if it hangs. Expected values come from integer addition in the
testbench, never from the design's own equations.

* `hsg`, `cg0`, `cg1`, `cs_unit`, `fsg`: exhaustive at N = 4. Each carry-word
  bit is compared with the carry out of that bit position in `a + b + k`.
* `rca`: exhaustive at 2 and 5 bits.
* `prop_csla`: exhaustive at 2, 3, 4 and 5 bits, the four block widths of the
  16-bit adder. It also counts the cases where each carry word is selected.
* `sqrt_csla` at the default 16 bits:
  * directed vectors, including a carry rippling from bit 0 to `cout`, and
    F0F0 + FF00 + 0 = 1_EFF0;
  * 200 000 random vectors.

  Besides the sum, it checks the carry entering every block, read back as
  `fs[lsb] ^ a[lsb] ^ b[lsb]`. For every block, it requires that both the
  carry-in-0 and the carry-in-1 word were selected while they differed. It
  also requires at least one carry that crossed every block.
* `tb_sqrt_csla_widths`: 100 000 random vectors and directed carry chains on
  32- and 64-bit adders.

Each testbench was also run against a deliberately broken copy of its
module, for example a block whose carry-in is tied to 0, and it reported
failures.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/csla_pkg.sv \
        tb/tb_sqrt_csla.sv --top-module tb_sqrt_csla -Mdir obj_top
    ./obj_top/Vtb_sqrt_csla

Any other testbench runs the same way, with its name in place of
`tb_sqrt_csla`. Pass `-Wall` for full lint. The expected warnings are the
two unused bits described above. Every testbench finishes in well under a
second.
