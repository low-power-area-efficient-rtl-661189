# BEC carry-select adders with a boosted differential logic output stage

A carry-select adder (CSLA) hides the carry ripple of a long addition by
computing every upper slice of the word twice, once as if the carry into the
slice were 0 and once as if it were 1, and picking the right result as soon
as the real carry arrives. The price is area: the slice adders are doubled.

This RTL builds the two ways a published low-power adder design reduces that
price, and the logic behaviour of the circuit family it targets:

* **The binary-to-excess-1 converter (BEC).** A slice's "carry in = 1"
  result is exactly its "carry in = 0" result plus one. Instead of a second
  ripple-carry adder, an (n+1)-bit incrementer made of one inverter and a
  chain of AND/XOR gates produces it from the n-bit adder's {carry, sum}.
  The 16-bit adder `csla16_bec` is built this way.
* **A 64-bit carry-select adder** (`adder64_bcdl_bec`) organised in eight
  8-bit slices, with two ripple carry chains per upper slice and a row of
  carry-select cells that forms all slice carries in one or two levels.
* **Boosted CMOS differential logic (BCDL).** A precharged dual-rail
  dynamic gate whose foot node is pushed below ground during evaluation so
  that it switches fast at low supply voltage. Only its logic behaviour can
  be expressed in RTL: outputs low during precharge, true and complement
  rails during evaluation (`bcdl_gate`). The top level delivers the 64-bit
  adder's result through such a row of gates.

Everything is combinational except for the precharge/evaluate phasing of
the BCDL output stage, which follows `clk`.

## The binary-to-excess-1 converter

For a W-bit input `b` the converter gives `x = b + 1 mod 2^W`:

```
x[0] = ~b[0]
x[i] =  b[i] ^ (b[0] & b[1] & ... & b[i-1])      for i >= 1
```

For W = 4 this is one inverter, three XOR gates and two AND gates (the AND
terms are shared as a running chain). `1111` wraps to `0000`.

`bec_mux` puts the converter next to a 2:1 multiplexer: select 0 passes `b`
through, select 1 passes `b + 1`. In a carry-select slice, `b` is the
slice's `{carry out, sum}` computed with carry in 0 and the select is the
real carry into the slice. An n-bit slice therefore needs an (n+1)-bit
converter and a 2(n+1):(n+1) multiplexer, e.g. the "8:4 mux" of a 3-bit
slice.

## The 16-bit adder (`csla16_bec`)

Five slices of growing size, so that each slice's local addition finishes
about when the carry from below reaches it:

| slice | bits  | carry-in-0 adder | converter | multiplexer |
|-------|-------|------------------|-----------|-------------|
| 0     | 1:0   | 2-bit RCA, real carry in | none | none |
| 1     | 3:2   | 2-bit RCA, cin 0 | 3-bit BEC | 6:3  |
| 2     | 6:4   | 3-bit RCA, cin 0 | 4-bit BEC | 8:4  |
| 3     | 10:7  | 4-bit RCA, cin 0 | 5-bit BEC | 10:5 |
| 4     | 15:11 | 5-bit RCA, cin 0 | 6-bit BEC | 12:6 |

The multiplexer of slice k is selected by the carry out of slice k-1 (the
top bit of that slice's multiplexer output), so the carry path is one
multiplexer per slice once the ripple adders have settled. The top bit of
the last multiplexer is the carry out. Slice sizes live in `bcdl_pkg`
(`CSLA16_GW`).

## The 64-bit adder (`adder64_bcdl_bec`)

This is the largest part of the design and the one whose carry logic needs
the most explanation.

### Slices and their two results

A propagation block forms `p = a ^ b` and `g = a & b` for all 64 bits. The
word is then cut into eight 8-bit slices (`WIDTH = 64`, `GW = 8`):

* Slice 0 (bits 7:0) has a single 8-bit ripple carry chain, fed by the
  real carry in, and one sum block (`s = p ^ c`). Its carry out is c[8].
* Slices 1 to 7 each have two carry chains, one started with carry in 0 and
  one with carry in 1, and two sum blocks. A multiplexer chooses one of the
  two 8-bit sums with the real carry into the slice, c[8k].

Each upper slice k thus offers two carry outs, `c0` (carry in 0) and `c1`
(carry in 1). Because the chains share p and g, `c0` can only be 1 if `c1`
is, so the real carry out of a slice is

```
c[8(k+1)] = c0_k | (c1_k & c[8k])
```

### The carry-select row

Chaining that expression slice by slice would put seven levels of selection
between c[8] and c[64]. The design instead gives each slice boundary its
own cell (`carry_sel_bec`) that looks at all the slices below it at once.
Expanding the chain for a run of N slices gives a single sum of products:

```
cout = c0[N-1]
     | c1[N-1] & c0[N-2]
     | ...
     | c1[N-1] & ... & c1[1] & c0[0]
     | c1[N-1] & ... & c1[0] & cin
```

The cells are arranged in two halves:

* **Lower half** (slices 1-3). One cell per slice. The cell at slice k
  spans slices 1..k and takes c[8] as its carry in; it produces c[16],
  c[24] and c[32].
* **Upper half** (slices 4-7). A pair of cells per slice. Both span slices
  4..k, one assuming the carry into the upper half is 0, the other that it
  is 1. These work in parallel with the lower half. When c[32] is known it
  selects one cell of each pair, giving c[40], c[48], c[56] and c[64].

So once the slice chains have settled, the path from c[8] to any slice carry
is one sum-of-products cell, plus one 2:1 selection for the upper half.
A sum multiplexer follows. The carry out of the adder is c[64].

The module is parameterised. `WIDTH` must be a multiple of `GW`, with at
least two slices. The lower half is the first `WIDTH/GW/2` slices, rounded
down. The testbench also runs a 20-bit adder with five 4-bit slices.

### Naming

In the published block diagram the carry-select cells are labelled "BEC",
like the converter. They combine slice carry outs rather than increment a
word. The module name `carry_sel_bec` keeps the diagram's label, and the
cell is built from the described function (slice carry outs in, selected
carry out). The equation above is this implementation's own: the source
gives none for these cells.

## BCDL gates and the top level

A BCDL gate has a differential pull-down tree between two nodes P and PB.
Both nodes are precharged to the supply while the clock is low, and a clocked
foot transistor lets the tree discharge one of them while the clock is high.
Two inverters turn P and PB into OUTB and OUT. Under the foot sits a
boosting stage: a capacitor and three transistors that pull the foot node
below ground at the start of evaluation, which raises the gate drive at low
supply voltages. One boosting stage serves both rails.

`bcdl_gate` models W such gates at the logic level:

| clk | out   | outb  |
|-----|-------|-------|
| 0 (precharge)  | 0 | 0 |
| 1 (evaluation) | f | ~f |

Voltages, boosting and speed have no logic-level equivalent and are not
modelled. Inputs must stay stable while `clk` is high, as for any
precharged logic; the model's assertion `a_inputs_stable` flags a change
during evaluation.

`bcdl_bec_top` has two independent halves:

* The 64-bit adder, with `{cout, s}` driven through a 65-bit `bcdl_gate`
  row. Outputs `sum_t` and `sum_f` are both zero while `clk` is low. While
  `clk` is high, `sum_t = a + b + cin` and `sum_f = ~sum_t`. Change operands
  while `clk` is low.
* The 16-bit adder, with its own plain ports (`a16`, `b16`, `cin16`,
  `s16`, `cout16`).

## How far this follows the published design

Taken from the source:

* The converter equations and table.
* The converter-plus-multiplexer cell.
* The 16-bit slice sizes, converter widths and multiplexer sizes.
* The 64-bit organisation: 8-bit ripple chains, dual chains and dual sums in
  the upper slices, single cells in the lower half, and paired cells in the
  upper half selected by the carry from the lower half.
* The two BCDL phases and the low outputs during precharge.

This implementation's own choices:

* The equation of the carry-select cells. The source gives only their
  inputs and outputs.
* The inside of the propagation block, the carry chains, the sum blocks and
  the ripple adders. These are standard textbook forms.
* A carry input on the 16-bit adder. The published diagram shows none; tie
  `cin` to 0 to match it.
* Where the BCDL gates sit. The source describes the gate family and a
  "BCDL adder" but not a gate-level mapping of the adder. Here a single
  BCDL row forms the output stage of a logic-level adder. This is not a
  netlist of dynamic gates.

Differences worth knowing:

* The source's central idea is to replace the carry-in-1 adder by a
  converter. Its 64-bit block diagram nevertheless draws two carry chains
  and two sum blocks per upper slice. The 64-bit adder here follows that
  diagram. The converter scheme appears in the 16-bit adder.
* The boosting stage is not modelled at all.

### Published results

The published adder was written in VHDL and mapped to a Xilinx FPGA. For the
64-bit adder the source reports:

* 480 equivalent gates, in 80 four-input LUTs.
* 10.535 ns delay.
* 56 mW.

These compare with 774 gates, 100.032 ns and 72 mW for the conventional
design it compares against. None of these numbers is reproduced by, or
claimed for, this RTL.

## Files

| file | content |
|------|---------|
| `rtl/bcdl_pkg.sv` | widths of the 64-bit adder, slice sizes of the 16-bit adder |
| `rtl/bec.sv` | binary-to-excess-1 converter, W bits (default 4) |
| `rtl/bec_mux.sv` | converter with 2:1 multiplexer |
| `rtl/rca.sv` | ripple carry adder (default 2 bits) |
| `rtl/csla16_bec.sv` | 16-bit BEC carry-select adder |
| `rtl/prop_block.sv` | p and g for every bit |
| `rtl/carry_chain.sv` | 8-bit ripple carry chain |
| `rtl/sum_block.sv` | s = p ^ c |
| `rtl/carry_sel_bec.sv` | slice carry-select cell |
| `rtl/adder64_bcdl_bec.sv` | 64-bit carry-select adder |
| `rtl/bcdl_gate.sv` | logic-level model of BCDL gates |
| `rtl/bcdl_bec_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. A watchdog counts a failure if the run stalls. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/bcdl_pkg.sv tb/tb_bcdl_bec_top.sv --top-module tb_bcdl_bec_top
./obj_dir/Vtb_bcdl_bec_top
```

Replace the testbench name to run another one. Every testbench finishes
within a second.

The testbenches work out expected values from integer arithmetic, not from
the RTL's own structure:

* `tb_bec`, `tb_bec_mux`, `tb_rca`, `tb_carry_chain`, `tb_sum_block` and
  `tb_carry_sel_bec` are exhaustive. `tb_carry_sel_bec` covers every legal
  input, where c0 implies c1.
* `tb_csla16_bec` checks 200,000 random operands plus corner cases. It
  requires every slice to have seen carry in 0 and 1, and a carry to have
  been produced by a converter alone.
* `tb_adder64_bcdl_bec` checks random operands, long propagate runs and
  single-generate patterns, at 64 bits and at 20 bits with 4-bit slices. It
  requires both carry values into every slice and a carry through all
  slices.
* `tb_bcdl_bec_top` runs the top at its default size for 20,000 clock
  cycles. It checks both rails in both phases and the 16-bit adder. It
  counts:
  * precharge and evaluation phases;
  * c[32] = 0 and c[32] = 1;
  * 64-bit carry out;
  * a full-length carry ripple;
  * both carry values into every 16-bit slice;
  * a converter-made carry.

  A condition that never occurs counts as a failure.
