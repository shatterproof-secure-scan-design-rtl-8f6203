# Shatterproof secure scan (SSS)

A scan chain lets a tester set and read every flip-flop of a chip. In a crypto
core the same chain is a side channel. An attacker can run chosen plaintexts,
stop the core mid-computation, shift its state out, and compare the bit
differences between related runs to recover the key. In ordinary scan, the
Hamming distance between two scanned-out words always equals the distance
between the two captured states, so these differential attacks work directly
on the scan data.

The shatterproof secure scan design keeps ordinary scan testing but encodes
what leaves the chain. Some pairs of neighbouring scan flip-flops are replaced
by a *shatterproof secure scan flip-flop* (SSSF). An SSSF is the same two
registers with one inverter and two XOR gates on the scan path. The functional
path is not touched, so normal-mode timing and behaviour do not change. A tester
who knows where the SSSFs sit can undo the encoding. Anyone else sees scan-outs
whose bit differences no longer match those of the real responses.

This repository holds synthesizable SystemVerilog for:

- the ordinary scan cell;
- the SSSF;
- a scan chain of any length with SSSFs at any non-overlapping positions;
- a worked example: a 4-bit adder whose registers all form one secure chain.

## The SSSF encoding

An SSSF covers two chain positions: a first cell **A**, nearer the scan input,
and a second cell **B**, nearer the scan output. In shift mode the two
registers move data exactly like ordinary cells (`A <= si`, `B <= A`). Only
the bit that leaves the pair is encoded:

```
so_a = Q_A xor (not si)        -- inverter on the pair's scan input, XOR of cell A
so   = Q_B xor so_a            -- XOR of cell B
     = not (Q_B xor Q_A xor si)
```

Each bit that leaves an SSSF is therefore the inverted parity of three
consecutive chain bits: its own, the one behind it, and the one about to enter
the pair. The scan-out depends on the scan-in as well as on the state. So an
attacker who does not know the structure cannot tell which scanned-out bit
belongs to which register.

### Worked example: four cells, SSSF on the last pair

Take a 4-cell chain `SI -> R3 -> R2 -> R1 -> R0 -> SO` with the SSSF on R1/R0,
and shift out with scan-in held at 0. Clock `t` then shows
`not(x_t xor x_t+1 xor x_t+2)`, where `x` is the stream `R0, R1, R2, R3, 0, 0`:

| captured R3..R0 | traditional scan-out | SSS scan-out (R3..R0 columns) |
|---|---|---|
| 0000 | 0000 | 1111 |
| 0001 | 0001 | 1110 |
| 0010 | 0010 | 1100 |
| 0111 | 0111 | 1010 |
| 1000 | 1000 | 0001 |
| 1111 | 1111 | 0100 |

The mapping is a bijection on all 16 responses, so no information is lost for
the tester. Take the 136 pairs of responses, counting each response paired with
itself. For 96 of them the Hamming distance of the scan-outs differs from that
of the responses. For 16 more the distance is the same but the differing bits
move. Only 24 pairs look the same as in ordinary scan. `tb_sss_chain` checks
all 16 rows and these three counts.

### Decoding by an authorised tester

The scan-in bits shifted in behind the state are known. So the tester works
backwards from the end of the stream:

```
x_t = not out_t xor x_t+1 xor x_t+2
```

This recovers every captured bit. `tb_sss_adder_top` decodes every unload this
way and compares the result with the adder's expected response.

### SSSFs in the middle of a chain

The SSSF's scan output drives the next cell's scan input. An SSSF that is not
at the end of the chain therefore stores the encoded bits in the cells after
it. The next shift carries them on, and any further SSSF encodes them again. Loading a
chosen state through such a chain needs the same knowledge of the structure.
This is what makes it hard to set, for example, round-counter flip-flops to a
chosen value.

## The scan chain (`sss_chain`)

- `N` cells, numbered from the scan input (`N-1`) to the scan output (`0`).
- `SSSF_MASK` bit `i` set means cells `i+1` (A) and `i` (B) form one SSSF.
  Mask bits may not be adjacent, and bit `N-1` must be clear. Both rules are
  checked at elaboration.
- Defaults: `N = 8`, `SSSF_MASK = 8'b0000_0100`. This is the eight-cell example
  with the SSSF in place of cells 3 and 2.
- `se = 0`: every cell captures `di[i]`. `se = 1`: shift one cell towards 0
  per clock. `dout[i]` is cell `i`'s state, and `so` is combinational from the
  last cells and, through an SSSF, from the bit entering it.

The cost of each SSSF is one inverter and two XOR gates, and only on the scan
path. The design's rule of thumb is that fewer than half of the cells need to
be covered.

## Example: a 4-bit adder under secure scan (`sss_adder_top`)

All 14 registers of the example are scan cells of one chain:

```
scan_in -> a_r[3..0] -> b_r[3..0] -> cin_r -> cout_r -> sum_r[3..0] -> scan_out
```

The default placement is one SSSF on `sum_r[1]`/`sum_r[0]`, the last pair
before `scan_out` (`SSSF_MASK = 14'b1`).

- **Normal mode (`c = 0`):** each clock loads `a`, `b`, `cin` into the operand
  registers, and the adder result of the previous operands into `sum_r`/`cout_r`.
  The `sum`/`cout` pins show the result two clocks after the operands.
- **Shift-register mode (`c = 1`):** the 14 cells shift, with `scan_out`
  encoded.

A test follows the usual scan procedure:

1. With `c = 1`, check the chain as a shift register and shift in a start state.
2. Set `c = 0` for one clock to apply the test inputs and capture the response.
3. Set `c = 1` and shift the response out while the next state shifts in.
4. Repeat from step 2.

## Departures and open points

- **Where the inverter sits.** The published drawing of the cell puts the
  inverter in front of cell A's multiplexer, so the stored scan bit would be
  inverted. No wiring of that form reproduces the published 4-cell
  response/scan-out table. Here the inverter feeds cell A's XOR instead. This
  matches every row of the table. Two things are inferred, not copied from the
  drawing: which signal each XOR takes as its second input, and that the stored
  bits shift unchanged inside the pair. To get the drawn variant, change
  `q_a <= si` to `q_a <= ~si` in `rtl/sssf.sv`. The chain testbench's table
  check will then fail.
- **Pair statistics.** The source describes the 4-cell example as 80 changed,
  29 moved and 27 unchanged pairs. Its own table gives 96, 16 and 24. The
  testbench follows the table.
- **Adder example.** The source only says that a 4-bit adder is scanned. The
  following are choices of this design: which registers exist, the carry-in
  and carry-out, the chain order and the SSSF placement.
- **Reset.** Every cell has an asynchronous active-low clear, `rst_n`.
- **Not built.** The evaluation applies differential attacks to an AES core
  taken from earlier work. Neither that core nor its chain is given, so it is
  not included. `sss_chain` accepts any length and placement for such an
  experiment.

## Files

| file | content |
|---|---|
| `rtl/sss_pkg.sv` | `scan_mode_e`: `NORMAL_MODE = 0`, `SHIFT_MODE = 1` |
| `rtl/sff.sv` | traditional scan flip-flop |
| `rtl/sssf.sv` | shatterproof secure scan flip-flop (two cells) |
| `rtl/sss_chain.sv` | parameterised chain of `sff` and `sssf` cells |
| `rtl/full_adder.sv`, `rtl/adder4.sv` | ripple-carry adder of the example |
| `rtl/sss_adder_top.sv` | adder with its secure scan chain (top) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/sss_pkg.sv tb/tb_sss_adder_top.sv \
          --top-module tb_sss_adder_top -Mdir obj && ./obj/Vtb_sss_adder_top
```

Swap in `tb_sss_chain`, `tb_sssf`, `tb_sff` or `tb_adder4` to run the others.
All of them finish in well under a second.

- `tb_sss_adder_top` runs the top at its default parameters. It checks every
  scan-out bit against a model, decodes 60 unloads, and runs a free normal-mode
  phase. It counts shift clocks, captures, bits changed by the SSSF and
  carry-outs, and fails if any of them never occurs.
- `tb_sss_chain` covers four chains: a plain 4-cell chain, the 4-cell chain of
  the worked example, the 8-cell default, and an 8-cell chain with two SSSFs.
