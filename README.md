# A 16-bit adder made of 2-bit units with five-input equations

On an FPGA built from 4-input look-up tables (LUTs), the cost and delay of a
logic function depend mostly on how many inputs it has. A 1-bit full adder
uses two 3-input functions, a sum and a carry. Each one takes a LUT and wastes
a LUT input, and the carry crosses only one bit per LUT level. A
carry-lookahead adder is shallower, but its carry equations grow very wide and
cost many times more LUTs.

This adder takes a middle course. It cuts the operands into **2-bit slices**
and computes each slice's two sum bits and carry-out directly from the slice's
five inputs (two bits of each operand plus the incoming carry). No output of a
slice depends on more than five inputs. A 5-input function fits two 4-input
LUTs joined by the slice multiplexer and still counts as one LUT level. So the
carry crosses **two bits per logic level**. That halves the depth of a
ripple-carry chain for about 25% more LUTs. For 16 bits, the figures are 8
levels and 40 LUTs, against 16 levels and 32 LUTs for a full-adder chain.

The RTL is plain synthesizable SystemVerilog. It does not depend on any
vendor: the equations are written so that a LUT mapper can see the
five-input structure, but nothing forces the mapping.

## The 2-bit unit (`rtl/adder2_unit.sv`)

Inputs: `x = {x1, x0}`, `y = {y1, y0}` and carry-in `ci`. Outputs:
`s = {s1, s0}` and the carry out of the upper bit, `co`. Each output is a
single XOR of AND terms:

```
s0 = x0 ^ y0 ^ ci                                          3 inputs
s1 = x1 ^ y1 ^ x0y0 ^ x0ci ^ y0ci                          5 inputs
co = x1y1 ^ x1x0y0 ^ x1x0ci ^ x1y0ci ^ y1x0y0 ^ y1x0ci ^ y1y0ci
                                                           5 inputs
```

The key to reading these equations: `x0y0 ^ x0ci ^ y0ci` is the majority of
`x0, y0, ci`. That is the carry from bit 0 into bit 1. For three bits, the XOR
of the pairwise products equals their OR, because when all three are 1 the
three products XOR to 1. So:

* `s1` is `x1 ^ y1 ^ c1` with `c1` expanded in place. The unit never builds
  `c1` as a separate signal, and so pays no second LUT level for it.
* `co` is `maj(x1, y1, c1) = x1y1 ^ x1c1 ^ y1c1`. Expanding `c1` gives six
  three-input terms, plus `x1y1`.

A product term `x0y0ci` might seem to belong in `co`. It does not. With
`x1 = y1 = 0` and `x0 = y0 = ci = 1`, the slice sum is 3 (binary `011`), so
there is no carry out, but that term would produce one. The unit's testbench
checks all 32 input combinations against `x + y + ci`.

On a 4-input-LUT device, `s0` takes one LUT, and `s1` and `co` take two LUTs
each: 5 LUTs per unit, all one level deep.

## The 16-bit chain (`rtl/proposed_adder.sv`)

`proposed_adder #(WIDTH = 16)` instantiates `WIDTH/2` units. Unit `k` adds
bits `2k+1 .. 2k`. It takes its carry from unit `k-1`, and unit 0 takes
`cin`. The last unit's carry is `cout`, so `{cout, s} = x + y + cin`.
The block is purely combinational. Its critical path is the carry through all
`WIDTH/2` units. Each unit is one LUT level, so a 16-bit adder has 8 levels.
At roughly 2.5 ns per level on a Virtex-class part, that is about 20 ns.
`WIDTH` may be any positive even number. An odd width stops elaboration with
an error.

| Adder, 16 bits           | LUT levels | 4-input LUTs | LUT inputs used |
|--------------------------|-----------:|-------------:|----------------:|
| 1-bit full-adder chain   | 16         | 32           | 75%             |
| this adder (2-bit units) | 8          | 40           | about 95%       |

(The figures for the full-adder chain are for comparison only. That design is
not part of this RTL.)

## Use in a synchronous pipeline (`rtl/sync_adder_top.sv`, `rtl/storage_layer.sv`)

A synchronous system alternates *storage layers* (registers on a common
clock) with *process layers* (combinational logic). The clock period must
cover the slowest process layer plus the register overhead. So a shallower
adder directly raises the clock rate of the system around it.

`sync_adder_top` places the adder as one process layer:

```
x, y, cin -> [storage_layer: {x,y,cin}] -> proposed_adder -> [storage_layer: {cout,s}] -> s, cout
```

* **Timing.** Operands presented before rising edge *n* appear on `s`/`cout`
  after edge *n+1*. That is a latency of two edges, with a new addition
  accepted every clock. There is no handshake and no stall.
* **Reset.** `rst_n` is an asynchronous, active-low reset that clears both
  layers, so `s = 0` and `cout = 0`.
* `storage_layer #(WIDTH)` is a rising-edge register bank with that reset.
  The top's ports are plain vectors. Inside, the top packs the layers'
  contents into the structs `operands_t` and `result_t`.

`adder_pkg` holds the shared constants: the unit width 2 and the default
operand width 16.

## Where this design makes its own choices

* **The unit's carry equation.** It leaves out the term `x0y0ci`, for the
  reason given above. With that term, the unit is not an adder.
* **The pipeline wrapper.** The source method only says that the adder serves
  as a process layer between storage layers. These choices are this design's
  own: one input and one output layer, the reset, the two-edge latency and
  the struct packing.
* **The width parameter.** The method is worked out for 16 bits. `WIDTH` is
  generalised to any even width, and its default is 16.
* **Timing is not verified.** The nanosecond and LUT figures above are
  estimates for a Virtex-class FPGA with 4-input LUTs. The testbenches check
  function and cycle latency only. Whether a synthesis tool maps each unit to
  5 LUTs in one level depends on the tool.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `adder2_unit_tb`: all 32 input combinations against integer addition.
* `proposed_adder_tb`: corner cases, then 20,000 random vectors at 16 bits.
  The corner cases include a carry rippling through all eight units and a
  carry generated in each unit. The test requires that a full-length ripple
  and a carry-out both occur.
* `storage_layer_tb`: reset, capture on the edge, holding through the cycle,
  and asynchronous clear.
* `sync_adder_top_tb`: the top at its default parameters. It applies 5,000
  back-to-back additions, checks each against a scoreboard with the two-edge
  latency, and checks reset before and during traffic. It counts full-length
  carry ripples, carry-outs, carry-in use and resets, and fails if any of
  them never happened.

Run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/adder_pkg.sv \
  rtl/adder2_unit.sv rtl/proposed_adder.sv rtl/storage_layer.sv \
  rtl/sync_adder_top.sv tb/sync_adder_top_tb.sv --top-module sync_adder_top_tb
./obj_dir/Vsync_adder_top_tb
```

For another testbench, change the last file and the top module. To lint the
RTL, use `verilator --lint-only -Wall -Irtl rtl/adder_pkg.sv rtl/<module>.sv`
with the modules it instantiates.
