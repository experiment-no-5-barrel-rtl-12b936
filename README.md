# 8-bit arithmetic barrel shifter

A barrel shifter moves a data word by any number of bit positions in one
combinational pass, rather than one position per pass. This one is an
**arithmetic** shifter for 8-bit two's-complement words:

- **left shift** by *n*: zeros go into the vacated low bits and bits shifted
  out of the top are lost. The result is the word multiplied by 2^n, modulo 2^8.
- **right shift** by *n*: the sign bit is copied into the vacated high bits.
  The result is the signed word divided by 2^n, rounded towards minus infinity
  (for example, -7 >> 1 = -4).

*n* is any value from 0 to 7. One input bit chooses the direction.

## Structure

```
            +-------------------- shift_left_chain ------------------+
            |  [<<1 | pass] -> [<<2 | pass] -> [<<4 | pass]          |--+ b
 i[7:0] ----+  sel sh[0]       sel sh[1]       sel sh[2]             |  |
            |                                                        |  [mux2] -> os[7:0]
            +-------------------- shift_right_chain -----------------+  |   sel d
            |  [>>>1 | pass] -> [>>>2 | pass] -> [>>>4 | pass]       |--+ a
            +--------------------------------------------------------+
```

Each bracket is one `mux2`, a plain vector 2:1 multiplexer. In each stage,
one mux input gets the word shifted by a fixed 2^k and the other gets the word
unchanged. Three stages of 1, 2 and 4 can add up to any amount from 0 to 7,
so each path needs only three multiplexers in series. This is a logarithmic
shifter, not a crossbar of 8 x 8 switches.

Both chains work in parallel on the same input. A final `mux2` selects one of
them by `d`. The whole design uses seven 8-bit 2:1 multiplexers and has no
clock and no state. The path from any input to `os` is four multiplexers deep.

Why the sign fill is right at every stage of the right-shift chain: each
stage copies the MSB of its own input into the vacated positions. A right
shift that copies the sign never changes the MSB. So every stage sees the
original sign bit in its MSB, and the final MSB always equals `i[7]`. This is
also why synthesis reports the MSB of `shift_right_chain`'s output as a plain
wire from the input.

## Interface and the shift-amount polarity

| port | dir | width | meaning |
|------|-----|-------|---------|
| `i`  | in  | 8 | data word |
| `sh` | in  | 3 | shift amount, **active low**: bit k = 0 enables the 2^k stage |
| `d`  | in  | 1 | direction: 1 = left (`DIR_LEFT`), 0 = right (`DIR_RIGHT`) |
| `os` | out | 8 | result |

The active-low `sh` is the easiest thing to get wrong. `mux2` passes input
`a` when its select is 0, and every stage wires the *shifted* word to `a`.
So a stage shifts when its `sh` bit is **0**:

| `sh` | shift amount |
|------|------|
| `111` | 0 |
| `110` | 1 |
| `101` | 2 |
| `011` | 4 |
| `000` | 7 |

In general, amount = `~sh`. The polarity is kept as the original circuit
wires it. It suits board switches that read 1 when open. To drive the
shifter with a binary amount, invert the amount first: `.sh(~amount)`.

`d` selects the same way: `a` is the right-shift result and `b` is the
left-shift result. `shifter_pkg::dir_e` names both values.

Example: with `i = 8'b1111_1111`, `d = 1` and `sh = 3'b011`, the shifter
shifts left by 4, so `os = 8'hF0`. With `i = 8'h7F`, `d = 0` and
`sh = 3'b101`, it shifts right by 2, so `os = 8'h1F`.

## Files

| file | contents |
|------|----------|
| `rtl/shifter_pkg.sv` | `dir_e` direction enum |
| `rtl/mux2.sv` | vector 2:1 multiplexer, `WIDTH` parameter |
| `rtl/shift_left_chain.sv` | `SHW` stages of left shift by 2^k, zero fill |
| `rtl/shift_right_chain.sv` | `SHW` stages of right shift by 2^k, sign fill |
| `rtl/barrel_shifter.sv` | top: both chains plus the direction mux |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters are `WIDTH` (data width, default 8) and `SHW` (number of stages,
default 3). The original circuit is fixed at 8 and 3. The parameters are an
addition of this RTL. Keep `WIDTH <= 2**SHW` so that the stages can reach
every amount up to `WIDTH-1`. With the defaults, every amount 0..7 is
reachable and no amount is larger than the word.

## What departs from the original circuit

- Only the arithmetic shift is built. Logical shifts (zero fill both ways)
  and circular shifts (rotate) are variants the original circuit does not
  implement.
- The left and right chains are modules of their own here. In the original
  they are six multiplexers inside the top-level entity. The structure and
  the fill bits are the same.
- The original multiplexer keeps its output when the select is neither 0
  nor 1, which is a VHDL metavalue case. With two-valued logic this case
  does not exist. `mux2` is a plain combinational select and infers no latch.
- There is no pin assignment for an FPGA board. The shifter's ports are the
  top-level ports.

## Verification

Each testbench computes its expected values independently of the RTL and
ends with a `TB_RESULT checks=N failures=M` line.

- `tb_mux2`: runs a directed select/data toggle sequence, then 2000 random
  words, then all cases of a 1-bit instance.
- `tb_shift_left_chain`, `tb_shift_right_chain`: check every
  (word, amount) pair at 8 bits and 4000 random pairs at 16 bits with 4
  stages. The expected result is built bit by bit. The right-shift bench
  also checks each result as a signed floor division by 2^n.
- `tb_barrel_shifter` runs the top at its default size, with no parameters
  overridden:
  - It replays the reference sequence: 0xFF shifted left by 0, 1, 2, 2, 2
    and 4, then 0x7F shifted right by 0, 1, 2 and 4. The expected results
    were worked out by hand.
  - It then checks all 4096 combinations of word, amount and direction.
  - It counts left and right shifts, zero shifts, sign fill with ones and
    with zeros, left shifts that lose set bits, and the use of each stage. A
    mechanism that never happens counts as a failure.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/shifter_pkg.sv tb/tb_barrel_shifter.sv --top-module tb_barrel_shifter
./obj_dir/Vtb_barrel_shifter
```

Every testbench finishes in well under a second.
