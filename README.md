# 8-bit Booth / Wallace multiplier in Gate Diffusion Input logic

This is a signed 8 × 8-bit multiplier of the kind found in the integer and
floating-point units of GPU cores. It is organised to use few transistors and
little power. There are three ideas in it:

* **Radix-2 Booth recoding.** Each bit of the multiplier MR becomes a digit of
  −1, 0 or +1. Each digit then selects −MD, 0 or +MD (MD is the multiplicand)
  as one of eight partial products.
* **A Wallace tree** of half and full adders sums those partial products.
* **Every gate is a Gate Diffusion Input (GDI) cell.** A GDI cell is a single
  pMOS/nMOS pair. Besides the shared gate, its two source terminals are also
  inputs. So one cell, two transistors, gives AND, OR, inverter or a 2:1
  multiplexer.

The RTL describes this circuit at the level of GDI cells. Each cell is modelled
by its logic function, a multiplexer. The design is purely combinational: there
is no clock, register or reset. The 16-bit product is valid one propagation
delay after the operands settle.

```
              md ──────────────┬──────────────────────┐
                               ▼                      │ MD
                      twos_complement ── −MD ──┐      │
                                               ▼      ▼
  mr ──► booth_encoder ── x[7:0], z[7:0] ──► partial_product_generator
                                               │ 8 sets × 15 bits (120 bits)
                                               ▼
                                        wallace_tree_adder ──► product[15:0]
```

## The GDI cell (`gdi_cell`)

The cell has three inputs: G drives both transistor gates, P is the pMOS
source and N is the nMOS source. When G is 0 the pMOS conducts and `out = P`.
When G is 1 the nMOS conducts and `out = N`. In logic, `out = G ? N : P`.
Tying P and N to constants or signals gives the basic gates:

| N | P | G | out        |
|---|---|---|------------|
| 0 | B | A | ¬A·B       |
| B | 1 | A | ¬A + B     |
| 1 | B | A | A + B      |
| B | 0 | A | A·B        |
| C | B | A | ¬A·B + A·C |
| 0 | 1 | A | ¬A         |

Every other module is a netlist of `gdi_cell` instances, so the cell count of a
block is directly its transistor budget (two per cell). The model is logic
only. It does not capture the weak levels that a real GDI cell passes, which
come from the threshold-voltage drop. It also does not capture the buffering
that restores those levels.

## Adders made of GDI cells

* `gdi_half_adder` uses three cells: an inverter on b, `sum = a ? ~b : b`, and
  `cout = a ? b : 0`.
* `gdi_full_adder` uses five cells (ten transistors):
  * an inverter on b;
  * `p = a ^ b`;
  * an inverter on cin;
  * `sum = p ? ~cin : cin`;
  * `cout = p ? cin : a`. When a and b differ the carry is cin; otherwise it
    is a.

The source design uses a ten-transistor GDI full adder, which it preferred over
9- and 11-transistor versions. Its wiring is not reproduced here. The five-cell
arrangement above is this design's own, chosen to have the same transistor
count.

## Booth recoding and partial products

`booth_encoder` looks at each bit pair (MR[i], MR[i−1]), with MR[−1] = 0. It
produces two control bits per digit:

| MR[i] MR[i−1] | digit | x[i] = MR[i] ⊕ MR[i−1] | z[i] = MR[i] · ¬MR[i−1] |
|---------------|-------|-------------------------|--------------------------|
| 0 0           | 0     | 0                       | 0                        |
| 0 1           | +1    | 1                       | 0                        |
| 1 0           | −1    | 1                       | 1                        |
| 1 1           | 0     | 0                       | 0                        |

MR is read as two's complement, so eight digits cover its whole range. The
source design says only that the encoder is built from XOR gates, inverters
and AND gates, and that it emits eight x and eight z signals. The exact
equations above are this design's choice.

`twos_complement` forms −MD as ~MD + 1, using eight inverters and a ripple
chain of eight half adders. The carry out of the top half adder is dropped.

`partial_product_generator` computes each bit as
`pp[i][j] = x[i] · (z[i] ? −MD[j] : MD[j])`, using one mux cell and one AND
cell per bit. It then sign-extends each 8-bit set by 7 bits to 15 bits. The
output is 8 × 15 = 120 bits. The sets are not shifted: set i has weight 2^i,
and the Wallace tree applies that weight through its column wiring.

### The operand range (important)

−MD is 8 bits wide, as in the source design. So MD = −128 cannot be negated:
−(−128) = +128 does not fit in 8 signed bits. The multiplier is exact for:

* **MD in −127 … 127, and**
* **any MR in −128 … 127.**

That is 65,280 of the 65,536 operand pairs. With MD = −128 the product is
wrong whenever a Booth digit is non-zero. The caller must keep MD in range.
Full range would need a 9-bit −MD and 9-bit partial products. That is a
departure from the source design and is not made here.

## The Wallace tree (`wallace_tree_adder`)

This block is the hardest part to follow in the code.

**Which bits are summed.** Bit k of set i lands in column i + k. The 120 bits
would fill columns 0 … 21. Only columns 0 … 14 are summed. They hold 92 bits:

* columns 0–7 hold 1, 2, …, 8 bits;
* columns 8–14 hold 8 bits each.

The other 28 bits, in columns 15 … 21, are inputs the tree leaves unconnected.
Carries out of column 14 are dropped too. So the tree computes the product
modulo 2^15, and `product[15]` is a copy of `product[14]`. This is exact because
|MD · MR| ≤ 127 · 128 < 2^14 over the valid range. The source design keeps the
same 92 bits but does not say how bit 15 is formed. The sign copy is this
design's choice.

**How the adders are arranged.** The rule is this design's own:

1. **Wallace stages.** In each stage, every column is split into groups of
   three bits, and each group goes to a full adder. A leftover pair goes to a
   half adder, and a single leftover bit passes through. Sums stay in their
   column; carries move to the next column up. Stages repeat until no column
   holds more than two bits. For 8 bits that takes four stages: column
   heights fall 8 → 6 → 4 → 3 → 2.
2. **Final ripple.** A ripple of half and full adders from column 0 upwards
   resolves the last two rows.

This rule matches what is known of the source design. Column 0's single bit
goes straight to the product LSB. Column 1's two bits meet in one half adder,
whose sum is product bit 1. At WIDTH = 8 the tree has:

* 65 full adders and 23 half adders (394 GDI cells);
* 14 adder levels on its longest path.

**How the netlist is built.** The netlist is not written out by hand. A
constant function, `wt_build`, runs the rule above while the module
elaborates. It returns a packed table: the adder count, the number of logic
levels, and for each adder its level, its type and three input "slots". The
slots are numbered as follows:

* 0 … 91 are the partial product bits;
* 92 is a constant 0, which fills the third input of a half adder;
* adder n writes its sum to slot 93 + 2n and its carry to slot 94 + 2n.

The generate loop `g_lvl[L]` holds one copy of the whole slot vector per logic
level L. Level L instantiates the adders whose level is L. It reads their
inputs from `g_lvl[L-1].v` and passes every other slot up unchanged. Because
of this layering, no signal appears to feed itself, so simulators and
synthesis see a plain acyclic netlist. If you change the reduction rule in
`wt_build`, the netlist follows.

## Size

Built from GDI cells, the default design has:

| block                       | GDI cells (structural) |
|-----------------------------|------------------------|
| twos_complement             | 32                     |
| booth_encoder               | 24                     |
| partial_product_generator   | 128                    |
| wallace_tree_adder          | 394                    |
| **multiplier**              | **578** (1,156 transistors) |

Some of these cells have constant inputs, for example the inverter on MR[−1] = 0
and the +1 carry of the negator. Synthesis folds those away and leaves 514 2:1
multiplexers. These counts come from the logic model. They are not a
transistor-level device count. The power and area advantages claimed for GDI
over static CMOS are circuit-level effects that RTL cannot show.

## Parameters

Every parameterised module takes `int WIDTH = 8`, the operand width:

* partial products are 2·WIDTH−1 bits;
* the product is 2·WIDTH bits;
* the tree sums columns 0 … 2·WIDTH−2.

The top module keeps the name `gdi_multiplier8` at every width. Widths 3 to 7
are tested exhaustively, and the tree is regenerated for each. The valid
multiplicand range is always −(2^(WIDTH−1)−1) … 2^(WIDTH−1)−1.

## Files

| file | contents |
|------|----------|
| `rtl/gdi_cell.sv` | GDI cell, `out = g ? n : p` |
| `rtl/gdi_half_adder.sv`, `rtl/gdi_full_adder.sv` | 3-cell half adder, 5-cell full adder |
| `rtl/twos_complement.sv` | −MD generator |
| `rtl/booth_encoder.sv` | x/z Booth control signals |
| `rtl/partial_product_generator.sv` | MD / −MD / 0 selection and sign extension |
| `rtl/wallace_tree_adder.sv` | generated Wallace tree and final ripple |
| `rtl/gdi_multiplier8.sv` | top: `md`, `mr` in, `product` out |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_multiplier_widths.sv` | the top at WIDTH = 3 … 7 |

## Simulating

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl --top-module tb_gdi_multiplier8 \
          tb/tb_gdi_multiplier8.sv -o sim
./obj_dir/sim
```

Lint a module alone with `verilator --lint-only -Wall -Irtl rtl/<module>.sv`.

What the testbenches cover:

* **`tb_gdi_multiplier8`** runs at the default size. It multiplies every valid
  pair, 65,280 products, and compares each with the integer product. It also
  counts how often each mechanism occurred:
  * Booth digits +1, −1 and 0;
  * negative (sign-extended) partial products;
  * partial product bits falling in the dropped columns;
  * negative, positive and zero products;
  * the two extreme products ±16,256.

  It fails if any mechanism never occurred. The whole run takes well under a
  second.
* **Exhaustive block tests:**
  * the cell, with every row of its gate table;
  * both adders;
  * the negator, over all 256 values;
  * the encoder, over all 256 values of MR, also checking that the digits
    add back up to MR.
* **`tb_partial_product_generator`** pairs all 256 multiplicands with random
  x/z words.
* **`tb_wallace_tree_adder`** feeds 20,000 random 15-bit sets, random upper
  bits included, plus directed patterns. It checks the low 15 bits against the
  weighted sum and checks that bit 15 repeats bit 14.

The simulation is two-state. Inputs driven from an `initial` block should
change after time 0: with Verilator, a `#0` at time 0 can leave combinational
outputs unsettled at the first sample.

## Where this design departs from, or adds to, the source design

* The **operand encoding** (two's complement for both operands) is inferred.
  It follows from the eight-digit Booth recoding and the −MD generator.
* The **Booth control equations**, the **cell-level netlists** of the adders
  and the **arrangement of the Wallace tree** are this design's own. The
  source design gives only their function, their gate types or their
  transistor count.
* The **multiplicand −128** is outside the valid range, a consequence of the
  8-bit −MD.
* **Product bit 15** is a copy of bit 14.
* The **22-bit full column sum** that the source design mentions is not
  computed. Only the 16 bits of the product are produced.
* **Not modelled:**
  * the transistor-level behaviour of GDI (level degradation, sizing);
  * the 180 nm layout;
  * power;
  * the CMOS comparison circuit and the alternative 9- and 11-transistor full
    adders;
  * the surrounding GPU streaming multiprocessor.
