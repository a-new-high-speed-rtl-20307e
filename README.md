# 7-2 compressor with a truth-table-driven 5-4 front end

A 7-2 compressor adds seven bits of the same weight plus two carries from the
columns below. It gives back two bits that stay in the column and two carries
that move up:

    a1 + a2 + ... + a7 + cin1 + cin2  =  sum + 2*(carry + cout1) + 4*cout2

A multiplier's reduction tree (Wallace or Dadda) uses such compressors to cut
many partial-product rows down to two. The textbook cell chains five full
adders and costs four full-adder delays. This design does it with one 5-4
arithmetic unit and two 3-2 counters. The slow XOR chains are replaced by a
small truth table that transmission-gate multiplexers look up. The carry
outputs also never depend on the carry inputs. So a row of these compressors
has no carry ripple: each column settles in one compressor delay, whatever the
row's width.

The original cell is a 124-transistor circuit in 0.18 um CMOS. It mixes static
gates with transmission gates (TGs). It was reported at 470 ps total latency
and 670 uW at a 250 MHz input rate, in a 58.33 um x 38.21 um layout.
This RTL models that circuit at gate level, one module per sub-circuit. It
keeps the circuit's structure, including complementary select pairs and output
inverters, so that the logic can be simulated, synthesised and checked against
the arithmetic. It holds no electrical or timing model.

## Structure

    compressor_row   (COLUMNS x compressor_7_2, carry links between columns)
      compressor_7_2
        arith_5_4                    a1..a7 -> So1, Co1, Co2, Co3
          ctrl_gen                   X, Z/Z_n, Y/Y_n
            xor_xnor  x2
          xor_xnor                   E/F cell
          so1_gen                    tg_mux2 x3 + inverter
          co1_gen                    tg_mux2 x3 + inverter
          maj3_carry  x2             Co2, Co3
        counter_3_2                  Co2, Co3, Co1 -> cout1, cout2
        counter_3_2                  cin1, cin2, So1 -> sum, carry
          xor_xnor, tg_mux2
    comp72_pkg       col_in_t (7 operand bits), c72_out_t (sum, carry, cout1, cout2)

All modules are combinational. Operand bit a(k) sits in bit k-1 of `col_in_t`.

## How the compressor splits the work

The 5-4 unit turns seven weight-1 bits into one weight-1 bit and three
weight-2 bits:

| output | weight | function |
|---|---|---|
| So1 | 1 | a1 ^ a2 ^ ... ^ a7 |
| Co1 | 2 | majority(a1^a2^a3, a4^a5^a6, a7) |
| Co2 | 2 | majority(a1, a2, a3) |
| Co3 | 2 | majority(a4, a5, a6) |

Why this is exact: a1+a2+a3 = (a1^a2^a3) + 2*Co2, and likewise for a4..a6.
What remains is the three weight-1 bits a1^a2^a3, a4^a5^a6 and a7. Their
parity is So1 and their majority is Co1.

The two 3-2 counters then finish the job:

- **Carry-out counter:** Co2 + Co3 + Co1 = cout1 + 2*cout2. This uses only
  a1..a7, which is why the carry outputs are independent of cin1/cin2.
- **Output counter:** cin1 + cin2 + So1 = sum + 2*carry.

The critical path runs a -> X -> E/F -> two TGs -> inverter -> So1 ->
XOR-XNOR/TG of the output counter -> sum. That is three gate delays and two
TGs, plus two TGs whose channels are already open when their data arrive.

## The 5-4 unit's truth table (the hard part)

A direct So1 is a seven-input XOR, three levels deep. Instead, the unit forms
three control signals in parallel, one gate delay after the inputs:

    X = a2 ^ a3        Z = a4 ^ a5        Y = a6 ^ a7

Z and Y are made in both polarities, because they drive TG selects. X feeds
one XOR-XNOR cell together with a1. That cell gives

    F = a1 ^ X         E = ~F

So1 and Co1 then depend only on (Y, Z, X), on a1 and on a7:

| Y | Z | X | So1 | Co1 |
|---|---|---|---|---|
| 0 | 0 | 0 | a1  | a7  |
| 0 | 0 | 1 | ~a1 | a7  |
| 0 | 1 | 0 | ~a1 | a1  |
| 0 | 1 | 1 | a1  | ~a1 |
| 1 | 0 | 0 | ~a1 | a1  |
| 1 | 0 | 1 | a1  | ~a1 |
| 1 | 1 | 0 | a1  | a7  |
| 1 | 1 | 1 | ~a1 | a7  |

In closed form:

    ~So1 = (Y ^ Z) ? F : E
    ~Co1 = (Y ^ Z) ? E : ~a7

The Co1 line holds for this reason. Y ^ Z is 1 exactly when a4^a5^a6 differs
from a7. Then the majority of the three remaining bits is decided by
a1^a2^a3 = F = ~E. Otherwise it is a7.

Y ^ Z is never computed as a signal. Each output uses a two-level TG tree
(`so1_gen`, `co1_gen`):

    m0   = Z ? F : E        first level, steered by Z / Z_n
    m1   = Z ? E : F        first level, select pair swapped
    ~So1 = Y ? m1 : m0      second level, steered by Y / Y_n
    So1  = ~(~So1)          output inverter, restores drive

For Co1 the data inputs are E and ~a7 instead of F and E. Z and Y arrive one
gate delay before E and F, so every TG in the path is already open when the
data arrive. That is where the speed comes from.

`tg_mux2` takes the select and its complement as separate ports, as a TG pair
does. An assertion checks that the two stay complementary.

## Building blocks

- `xor_xnor`: XOR and XNOR of two inputs at once. In silicon it is a
  pass-transistor cell whose feedback pair restores full swing. It is used for
  Z, Y, E/F and in both counters.
- `tg_mux2`: `out = sel ? a : b`, two transmission gates.
- `maj3_carry`: an inverting mirror-carry complex gate followed by an output
  inverter, `co = a&b | c&(a|b)`.
- `counter_3_2`: an XOR-XNOR cell on inputs a and b, then:
  - carry is a TG mux that passes c when a != b and a when a == b;
  - sum is a pass-transistor XOR steered by c: a^b when c = 0, ~(a^b) when
    c = 1.

  In the circuit a second TG also drives the sum node, with the same value.
  The model writes the sum as one select expression.

## The compressor row

`compressor_row #(COLUMNS)` places compressors on adjacent columns, column 0
least significant.

- cout1 of column i drives cin1 of column i+1.
- cout2 of column i drives cin2 of column i+2.
- Carry inputs with no neighbour in the row are ports: `cin1_in` (column 0)
  and `cin2_in[1:0]` (columns 0 and 1).
- The carries that leave the row are `col_out[COLUMNS-1].cout1`,
  `col_out[COLUMNS-2].cout2` and `col_out[COLUMNS-1].cout2`.
- Every column's cout bits are brought out in `col_out` so that they can be
  observed.

The default, `COLUMNS = 3`, matches the three-compressor arrangement the
original cell was characterised in. `COLUMNS` must be at least 2.

## Interpretation and departures

- **Y input pair.** The control signal Y is formed from a6 and a7. Only with
  that choice is So1 the parity of all seven operands, and only then are the
  couts independent of the carry inputs. Forming Y from the carry inputs
  would count them twice, because they already enter the output counter.
- **Co1 equation.** The select term is the complemented multiplexer form
  `(s1^s2)·a7 + ~(s1^s2)·s1`, with s1 = a1^a2^a3 and s2 = a4^a5^a6. This is
  the form the truth table gives.
- **E/F polarity.** F is the XOR output of the E/F cell and E the XNOR output.
- **~a7 inverter.** ~a7 comes from a local inverter.
- **Measurement buffers.** The buffers that drove the inputs and loaded the
  outputs during measurement are not modelled.
- **No electrical behaviour.** The RTL does not represent transistor sizing,
  charge sharing or the measured delay and power. Synthesis maps it to
  ordinary library cells, not to the 124-transistor circuit.
- **No pipeline.** There are no registers; the cell is purely combinational.
  Any pipelining belongs to the multiplier that uses it.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- **Leaf cells and the 5-4 unit:** all input combinations, checked against
  values worked out by counting ones.
- **`tb_compressor_7_2`:** all 512 inputs. It checks the weighted identity,
  the sum parity, cout1 + 2*cout2 = floor(ones(a)/2), and that the couts do
  not change when cin1/cin2 do.
- **`tb_compressor_row`:** the default three-column row, all 2^24 input
  combinations (about 6 s). A bit-exact arithmetic reference predicts every
  output. The test also counts each mechanism and fails if any never occurs:
  - all eight truth-table rows;
  - Co1 taken from each of its two sources;
  - carries crossing cin1 and cin2 links;
  - carries leaving the row, and full columns;
  - carry-input flips with all couts held.
- **`tb_compressor_row_wide`:** a 16-column row with 200,000 biased random
  vectors. It requires every carry link to be exercised.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/comp72_pkg.sv tb/tb_compressor_row.sv --top-module tb_compressor_row
    ./obj_dir/Vtb_compressor_row

Replace the testbench name to run another. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/comp72_pkg.sv rtl/<module>.sv`.

## Using and changing it

- For a row of any width, instantiate `compressor_row` with the `COLUMNS` you
  need, or instantiate `compressor_7_2` per column in your own tree.
- A tree stage needs its column's inputs grouped seven at a time. It also
  needs the cin1/cin2 wiring shown above, continued across stage boundaries
  as your tree requires.
- `arith_5_4` is usable on its own as a 7-input counter front end. It
  satisfies ones(a) = So1 + 2*(Co1 + Co2 + Co3).
