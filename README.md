# Vedic multiply-accumulate unit for a neural-network processing element

A neuron in an artificial neural network mostly computes a dot product:
Z = Σ xᵢ·wᵢ. This RTL implements the processing element that does it: a
multiply-accumulate (MAC) unit that does one `Z ← Z + A·B` each clock. Two
arithmetic choices make up its datapath:

* an **8×8 Vedic multiplier**. It splits both operands into nibbles and forms
  the four nibble products in parallel with 4×4 Vedic multipliers. It then
  adds them with three 8-bit adders instead of a Booth recoder and a
  partial-product tree;
* a **square-root carry select adder (SQRT-CSLA) based on binary-to-excess-1
  converters (BEC)**. It serves both inside the multiplier and as the 16-bit
  accumulating adder.

```
            a[7:0]  b[7:0]                         z_in[15:0] (partial sum from memory)
               \    /                                   |
        +------------------+                            |
        | vedic_mult_8x8   |--- product[15:0]           |
        +------------------+        |                   |
                                    v       clear / psum_load select
                              +-----------+   +-----------------------+
                              | sqrt_csla |<--| 0 | z_in | z (fedback)|
                              |  16-bit   |   +-----------------------+
                              +-----------+                 ^
                               sum | cout                   |
                              +-------------+               |
                              | accumulator |---- z[15:0] --+--> (to memory)
                              +-------------+---- z_cout
```

The unit is unsigned, with 8-bit operands, a 16-bit product and a 16-bit
accumulator. The multiply and the add share one combinational path, so a MAC
finishes in a single clock.

## The 8×8 Vedic multiplier (`vedic_mult_8x8`)

With `a = aH·16 + aL` and `b = bH·16 + bL`, four 4×4 multipliers compute, at
the same time:

| product | operands  | weight |
|---------|-----------|--------|
| q0      | aL · bL   | 2⁰     |
| q1      | aH · bL   | 2⁴     |
| q2      | aL · bH   | 2⁴     |
| q3      | aH · bH   | 2⁸     |

Three 8-bit SQRT-CSLA adders then combine the four products:

| adder | adds                           | result   | gives            |
|-------|--------------------------------|----------|------------------|
| 1     | q1 + q2                        | s1, Co1  |                  |
| 2     | s1 + {0000, q0[7:4]}           | s2, Co2  | p[7:4] = s2[3:0] |
| 3     | q3 + {000, Co1∣Co2, s2[7:4]}   | p[15:8]  |                  |

The low four bits need no adder: p[3:0] = q0[3:0].

The step that is easiest to get wrong is where the two middle carries go.
Adder 2's result sits at bit offset 4, so Co1 and Co2 both weigh 2¹², which is
bit 4 of adder 3's second operand. Neither of them can go into adder 3's
carry input, which weighs 2⁸. The two carries are never 1 together. Adder 1
only carries when q1 + q2 ≥ 256, and since q1 + q2 ≤ 450 its low byte is then
at most 194. Adding q0[7:4] ≤ 14 to that cannot carry again. A single OR gate
therefore merges the two carries. Adder 3 never carries out, because the
product fits in 16 bits. An assertion in the module checks both facts in
simulation.

`vedic_mult_4x4` uses the same scheme one level down. Four 2×2
Urdhva-Tiryagbhyam ("vertically and crosswise") multipliers
(`vedic_mult_2x2`, four AND gates and two half adders) feed three 4-bit
SQRT-CSLAs. There the two middle carries weigh 2⁶ and are merged the same
way.

## The BEC-based square-root carry select adder (`sqrt_csla`)

The adder splits its operands into groups whose widths grow towards the most
significant end. At 16 bits the groups are:

| bits  | width | carry-in-0 adder | carry-in-1 result | selector |
|-------|-------|------------------|-------------------|----------|
| 1:0   | 2     | 2-bit RCA, cin   | none              | none     |
| 3:2   | 2     | 2-bit RCA        | 3-bit BEC         | 6:3 mux  |
| 6:4   | 3     | 3-bit RCA        | 4-bit BEC         | 8:4 mux  |
| 10:7  | 4     | 4-bit RCA        | 5-bit BEC         | 10:5 mux |
| 15:11 | 5     | 5-bit RCA        | 6-bit BEC         | 12:6 mux |

Each upper group adds its bits once, with carry-in 0. The carry-in-1 result is
that sum plus one, so it is produced by a BEC (`bec`, x = b + 1) instead of a
second ripple carry adder. The BEC is one bit wider than the group, so the
group's carry is converted too. The carry out of the group below selects
between the two results. All groups work in parallel, and only the short
multiplexer chain is serial. The widths grow because a higher group's select
arrives later, which leaves it time to ripple through more bits.

Other widths use the same sequence of group widths (2, 2, 3, 4, 5, …), with
the last group cut to fit: 8 bits become 2, 2, 3, 1 and 4 bits become 2, 2.
The group boundaries are constant functions in `mac_pkg`. The lowest group
has a carry input, which is 0 in every use here.

## Accumulation, partial sums and timing (`mac_unit`, `accumulator`)

On each rising edge with `en` high, the accumulator stores
`sum = feedback + product` and the adder's carry out. The `feedback` operand
is chosen by two controls:

| `en` | `clear` | `psum_load` | new `z`                   | use                          |
|------|---------|-------------|---------------------------|------------------------------|
| 0    | x       | x           | unchanged                 | idle                         |
| 1    | 1       | x           | `a*b`                     | first term of a new neuron   |
| 1    | 0       | 1           | `z_in + a*b`              | update a partial sum in memory |
| 1    | 0       | 0           | `z + a*b`                 | next term of the dot product |

`psum_load` supports the memory-based use of the unit. A partial sum Z is read
from memory, arrives on `z_in`, is updated with A·B, and is written back from
`z`. Several neurons can then share one MAC, tile by tile.

Timing:

* Operands and controls are sampled at the rising edge, and `z`/`z_cout` show
  the result right after that edge. The unit does one MAC per clock, with one
  clock of latency.
* `z_cout` is the carry of the addition that produced `z`. When it is 1, the
  16-bit sum has wrapped around.
* `product` is the multiplier's combinational output.
* `rst_n` is an asynchronous, active-low reset that clears `z` and `z_cout`.

Ports: `clk`, `rst_n`, `en`, `clear`, `psum_load`, `a[7:0]`, `b[7:0]`,
`z_in[ACC_W-1:0]`, `z[ACC_W-1:0]`, `z_cout`, `product[15:0]`.

## Sizes and limits

* Operands are **unsigned** 8-bit values. Signed neuron inputs or weights need
  a sign/magnitude wrapper or a different multiplier.
* The accumulator is 16 bits, as wide as the product, so a dot product wraps
  as soon as its sum reaches 65,536. A single 255×255 product already comes
  close. `z_cout` reports each wrap. `mac_unit` has a parameter `ACC_W`
  (default 16, minimum 16): raising it to 16 + ⌈log₂ N⌉ holds an N-term dot
  product exactly. The adder and accumulator follow that width, and the
  product is zero-extended.
* The operand width is fixed at 8 by the multiplier's structure (`mac_pkg::DATA_W`).
  4-bit operands can be zero-extended. 12- or 16-bit operands would need a
  larger multiplier that is not built here.
* After synthesis the unit is about 465 word-level cells and 17 flip-flops.
  No FPGA area or delay figures have been measured for this RTL.

## Where this RTL departs from or adds to the architecture it implements

These follow the architecture: the multiplier → adder → accumulator loop, the
partial-sum read/update/write use, single-clock operation, the nibble split
into four 4×4 Vedic multipliers with three 8-bit SQRT-CSLAs and zero-filled
inputs, and the 16-bit BEC adder's grouping with its RCA/BEC/multiplexer
structure.

These are choices made for this RTL:

* The insides of the 4×4 multiplier: 2×2 Urdhva leaves and 4-bit SQRT-CSLAs.
* The OR that merges the two middle carries.
* The grouping of the 8- and 4-bit SQRT-CSLAs.
* The BEC gate equations.
* The `en`/`clear`/`psum_load` controls, with `clear` taking priority.
* The reset style.
* The stored carry flag.
* The 16-bit accumulator width, taken from the width of the accumulating adder.

The architecture describes its multiplier as signed but draws it unsigned.
This RTL follows the drawing.

Not included:

* The memory that holds operands and partial sums. Its organisation is
  unspecified, so its read and write data are the ports `a`, `b`, `z_in` and
  `z`.
* The neuron's activation function, which is also unspecified.

## Files

| file | contents |
|------|----------|
| `rtl/mac_pkg.sv` | widths and the SQRT-CSLA group-layout functions |
| `rtl/rca.sv` | ripple carry adder (full-adder chain) |
| `rtl/bec.sv` | binary to excess-1 converter |
| `rtl/sqrt_csla.sv` | BEC-based square-root carry select adder, `WIDTH` default 16 |
| `rtl/vedic_mult_2x2.sv` | 2×2 Urdhva-Tiryagbhyam multiplier |
| `rtl/vedic_mult_4x4.sv` | 4×4 Vedic multiplier |
| `rtl/vedic_mult_8x8.sv` | 8×8 Vedic multiplier |
| `rtl/accumulator.sv` | sum and carry register |
| `rtl/mac_unit.sv` | top level: the MAC unit |
| `tb/tb_<module>.sv` | a self-checking testbench per module |

## Verification and simulation

Every testbench compares the hardware with integer arithmetic computed in the
testbench. Each prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog if it hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_vedic_mult_2x2`, `tb_vedic_mult_4x4`, `tb_vedic_mult_8x8` | exhaustive: all 16, 256 and 65,536 operand pairs |
| `tb_rca`, `tb_bec` | exhaustive at every group width used |
| `tb_sqrt_csla` | 16 bits: carry-chain patterns across every group boundary plus 20,000 random sums; 8 and 4 bits: exhaustive, both carry-in values |
| `tb_accumulator` | enable, hold, and synchronous and asynchronous reset |
| `tb_mac_unit` | see below |

`tb_mac_unit` runs the whole unit at its default sizes, in three phases:

1. Six 16-input neuron dot products, including one that wraps.
2. The same neurons computed tile by tile. A small array in the testbench
   stands for the partial-sum memory, read through `z_in` and written back
   from `z`.
3. 3,000 clocks of random controls.

After every clock it checks `z`, `z_cout` and `product`, which also confirms
the one-clock latency. It counts every mechanism (accumulate, clear,
partial-sum load, hold, clear overriding `psum_load`, wrap-around), and a
mechanism that never happened counts as a failure.

To run a testbench with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl rtl/mac_pkg.sv tb/tb_mac_unit.sv --top tb_mac_unit -o sim
./obj_dir/sim
```

Replace `tb_mac_unit` with any other testbench name. The testbenches use
`$urandom` and need no external files. To change the accumulator width, set
`ACC_W` on `mac_unit`. To use the adder at another width, set `WIDTH` on
`sqrt_csla`: the group layout follows automatically.
