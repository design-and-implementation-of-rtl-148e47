# Hybrid LUT / MUX4 FPGA logic clusters

A 6-input lookup table is a 64-to-1 multiplexer fed by 64 configuration
SRAM cells, yet the largest multiplexer it can implement is a 4-to-1 one
(4 data + 2 select inputs). Multiplexers and small 2- and 3-input functions
are very common in mapped netlists. This RTL implements FPGA logic clusters
in which some of the 6-LUTs are replaced by a hardened **MUX4** element: a
4-to-1 multiplexer with an optional inverter on each data input, controlled
by only four SRAM cells. The MUX4 has the same pin count as a 6-LUT, so
the cluster's local routing is unchanged, but it costs roughly a tenth of
the area (about 95 minimum-width transistors against about 930 for an
area-delay-optimised 6-LUT, at a worst-case delay of about 204 ps against
261 ps, in a predictive 22 nm process). Mixing four MUX4s with six 6-LUTs
in a ten-element cluster was found to reduce total FPGA area by about 8%
for nonfracturable clusters and about 2% for fracturable ones, with little
effect on Fmax.

Two cluster architectures are provided and instantiated side by side in
`hybrid_fpga_top`:

| | nonfracturable (`clb_nonfrac`) | fracturable (`clb_frac`) |
|---|---|---|
| cluster inputs | 40 | 80 |
| BLEs | 10 | 10 |
| inputs / outputs per BLE | 6 / 1 | 8 / 2 |
| MUX-type element | MUX4 | Dual MUX4 |
| LUT-type element | 6-LUT | fracturable 6-LUT (one 6-LUT or two 5-LUTs) |
| registers per BLE | 1, bypassable | 2, each bypassable |
| local crossbar | 50% populated | 50% populated |
| default mix (MUX:LUT) | 4:6 | 4:6 |

## What a MUX4 can implement

`mux4_le` computes `out = d[{in[5], in[4]}]` with `d[i] = in[i] ^ inv[i]`.

* **Any 2-input function**: the two variables drive the selects and the
  four truth-table values are applied as constants on the data inputs. A
  constant 1 is a constant 0 with its inversion bit set, so the cluster
  only needs to route logic 0 (the crossbar has a select code for that).
* **Any 3-input function**: Shannon-expand around two variables (on the
  selects); each of the four cofactors depends on at most the third
  variable, so it is one of `0`, `1`, `x`, `~x`, all of which the data
  input plus its inverter provide.
* **Some 4-, 5- and 6-input functions**: those for which some pair of
  variables leaves cofactors that each depend on at most one variable.
  The 6-input 4:1 multiplexer itself (with any data inputs inverted) is one.

The element is seven 2-to-1 multiplexers (four inversion muxes, three in
the 4:1 tree), four inverters and four SRAM cells.

## Dual MUX4 and the fracturable LUT

The fracturable BLE has eight inputs and two outputs, modelled on the
adaptive logic modules of recent commercial FPGAs. Its two flavours:

* **`dual_mux4_le`**: two MUX4s. Each has its own two select pins
  (`in[5:4]` for output 0, `in[7:6]` for output 1) and they share the four
  data pins `in[3:0]`. In the second MUX4 each shared data input first goes
  through a multiplexer that can replace it with logic 0 (`gnd_b`), and only
  then through the inversion stage. That lets the second MUX4 build its
  constants internally, so two independent 3-input functions fit in one
  element: the first uses shared data pins for its cofactors, the second
  uses grounded/inverted constants plus any shared pin it needs. Larger
  function pairs fit only when they share inputs.
* **`frac_lut6`**: 64 truth-table bits seen as two 5-LUT halves
  (`tt[31:0]` = A, `tt[63:32]` = B). With `frac = 0` it is one 6-LUT on
  `in[5:0]` (`in[5]` picks the half) on output 0. With `frac = 1` it is two
  5-LUTs: A on `in[4:0]` to output 0, B on `{in[7:5], in[1:0]}` to
  output 1, i.e. the two halves share `in[1:0]`. This particular split is
  this design's choice; it realises "a 6-LUT that can be broken into two
  smaller LUTs with some restrictions on their inputs" with eight pins.

## Cluster structure

Each BLE (`ble`, `ble_frac`) is a logic element whose output(s) go to a
D flip-flop and to a 2-to-1 bypass multiplexer set by one configuration
bit (`cfg_reg = 1` selects the flip-flop). The flip-flops have a clock
enable `ce` and an asynchronous active-low reset `rst_n` that clears them.

The cluster (`clb_nonfrac`, `clb_frac`) feeds the BLE input pins from an
`xbar` whose sources are the cluster inputs followed by all BLE outputs
(local feedback). The crossbar is 50% populated: input pin `p` can reach
only the sources whose index has the parity of `p`. Its select word `k`
picks source `2k + (p mod 2)`; a code that names no source drives logic 0.

| cluster | sources | pins | candidates per pin | select width |
|---|---|---|---|---|
| nonfracturable | 40 + 10 = 50 | 60 | 25 | 5 bits |
| fracturable | 80 + 20 = 100 | 80 | 50 | 6 bits |

BLEs `0 .. N_MUX4-1` hold the MUX-type element, the rest the LUT-type one.
`N_MUX4` may be set from 0 to 10; the architecture study swept 1:9 to 5:5.

Because BLE outputs feed back into the crossbar, the netlist contains a
static combinational loop (the linter and synthesis report it). A
configuration must not close a loop through bypassed (unregistered) BLEs;
this is the same rule as for any FPGA fabric. The testbenches only
generate acyclic configurations.

## Configuration ports

The configuration SRAM is not modelled as a memory with a load mechanism;
every configuration bit is a port, so any loader (scan chain, frame
addressing) can be put in front of it. Types are in `fpga_pkg`.

| port | width | meaning |
|---|---|---|
| `cfg_le[b]` (nonfrac) | 64 | 6-LUT truth table, `out = cfg[in]`; a MUX4 BLE uses bits `[3:0]` as inversion bits |
| `cfg_le[b]` (frac) | 65 | `frac_lut_cfg_t {frac, tt[63:0]}`; a Dual MUX4 BLE uses bits `[11:0]` as `dual_mux4_cfg_t {inv_a, gnd_b, inv_b}` |
| `cfg_reg[b]` | 1 or 2 | per-output register select |
| `cfg_xbar[b*K + i]` | 5 or 6 | crossbar code of BLE `b` input `i` |

Cluster output `b` (nonfracturable) or `2b + j` (fracturable, output `j`
of BLE `b`) is the BLE output.

## Timing

All logic elements and the crossbar are combinational. A bypassed BLE
output follows its inputs in the same cycle; a registered one shows the
value the element had at the last rising `clk` edge with `ce = 1`, so a
register adds exactly one cycle. There is no other pipelining.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fpga_pkg.sv tb/tb_hybrid_fpga_top.sv --top-module tb_hybrid_fpga_top -o sim
./obj_dir/sim
```

* `tb_lut6`, `tb_mux4_le`, `tb_dual_mux4_le`, `tb_frac_lut6`: exhaustive
  over the inputs for many configurations, plus hand-mapped functions
  (XOR, majority, two independent functions in one Dual MUX4, an AND5 and
  XOR5 sharing a fractured LUT). `tb_mux4_le` also maps every 2- and
  3-input function onto the MUX4 by Shannon expansion.
* `tb_ble`, `tb_ble_frac`: register, bypass, clock enable and reset, with
  the one-cycle latency checked on both sides of the clock edge.
* `tb_xbar`: every select code on every pin and the 50% reachability.
* `tb_clb_nonfrac`, `tb_clb_frac`: one cluster for each mix from 1:9 to
  5:5, random configurations compared every cycle with a reference model
  (`clb_nonfrac_chk`, `clb_frac_chk`).
* `tb_clb_mapped_counter`: a 4-bit counter with load, enable and a
  terminal-count output, hand-mapped onto the nonfracturable cluster with
  the MUX4-embeddable functions (bit 0, the carry AND, the terminal count)
  in MUX4 BLEs and the wider next-state functions in 6-LUTs, honouring the
  crossbar's parity rule.
* `tb_clb_frac_mapped`: a 4x2 switch in one Dual MUX4 (shared data,
  dedicated selects), ground gating and inversion in another, two 5-input
  functions in one fractured LUT and a 6-input function in a whole one.
* `tb_hybrid_fpga_top`: both clusters at the default parameters through
  the top-level ports, and a count that every mechanism (inversion, ground
  gating, fractured and whole LUT, registered and bypassed outputs,
  feedback, constant inputs, clock-enable hold) occurred.

## Departures and choices

Follows the architecture description: the MUX4 structure and its
inversion SRAM bits; the Dual MUX4 with dedicated selects, shared data and
ground gating on the second MUX4; 6- and 8-input BLEs with one and two
bypassable registers; 40/80 inputs and ten BLEs per cluster; a 50%
depopulated crossbar; the 4:6 mix for the nonfracturable cluster.

This design's own choices: pin numbering and select bit order of every
element; how the fracturable LUT splits; the crossbar's parity pattern, its
constant-0 code and the local feedback; clock enable and asynchronous
reset on the flip-flops; configuration as ports; MUX-type BLEs at the low
indices; a 4:6 mix for the fracturable cluster (the study swept the same
range there without naming a best ratio).

Not included: the inter-cluster routing fabric, the configuration loading
circuitry, and the technology-mapping and packing tools that decide which
functions go into MUX4s (identifying MUX4-embeddable cuts, biasing the
mapper toward them, and packing them preferentially into MUX4 elements).
Also not built: a variant that splits the MUX4 into two 2-to-1
multiplexers, which was considered only as an alternative.
The area and delay figures quoted above (and about 249 minimum-width
transistors for the Dual MUX4) come from transistor-level
modelling and are not reproduced by this RTL.

How far to trust it: every module is checked exhaustively or against an
independent reference model, and each testbench was shown to catch a
deliberately broken copy of its module. The reference models encode the
same reading of the architecture as the RTL, so they prove the RTL matches
the behaviour described here; where this README names a choice as the
design's own, another reading is equally possible.
