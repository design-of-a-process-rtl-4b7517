# Ring-oscillator characterisation test chip (45 nm) in SystemVerilog

This chip measures how standard-cell libraries behave on silicon. It compares a
reference library with three litho-friendly libraries, a rotated copy of one of
them, and an ultra-low-power library. The measuring tool is the ring
oscillator (RingO): its frequency is set by the delay of the gates in it. So
measuring many identical rings gives the mean and the spread of the gate delay.
The chip also carries a small digital core, meant to be run both at nominal
supply and in the subthreshold regime, and a lithography monitor. The monitor
reports pass/fail on whether minimum-size transistors print with equal channel
lengths.

The RTL models the chip's logic: selectors, multiplexers, dividers, scan chains
and the digital core. The analog parts are behavioural models: the ring
oscillators and the monitor's sense latch.

## Structure

```
testchip_top
├── main_core ×6          one per library: REF, LF1, LF2, LF3, LF2 rotated, ULP
│   ├── cfg_scan_chain    15-bit configuration (SI, CLKs, SO)
│   ├── c2_block          four C-blocks: INV, NAND, NOR, MXD rings
│   │   └── c_block ×4
│   │       ├── ringo_array ×2   128 rings, 7 and 11 gates deep  (behavioural)
│   │       │   └── ringo ×128                                  (behavioural)
│   │       └── selex
│   │           ├── selector: dec_nand → bsc → dec_nor → be_array
│   │           └── fd_mux    2x4x4x8 mux with divide-by-2
│   └── freq_divider      10 toggle flip-flops, ÷1024 → OUT pin
├── digital_core          4 × ffcomb_chain (20 × ffcomb_block + output register)
└── monitor_block         400 × 2 monitor_cell (behavioural) + 800-bit scan chain
```

`testchip_pkg` holds the shared constants and the configuration word type
`core_cfg_t`. It also holds the digital core's path truth tables.

## Selecting one ring out of 256: the selex

Each C-block has 256 rings. These are two arrays of 128, one 7 gates deep (the
fast array) and one 11 deep. The 11-deep array is there in case the fast rings
run faster than the divider can follow. One address decoder serves both the
ring start signals and the output multiplexer.

* **dec_nand** splits the 7-bit address into three fields and fully decodes
  each one. This gives 16 active-low lines: 8 for ADD<6:4> (bits 7..0), 4 for
  ADD<3:2> (bits 11..8) and 4 for ADD<1:0> (bits 15..12).
* **bsc** applies the block-select code `bsb` (active low, thermometer).
  `1111` is normal mode: exactly one ring runs. `1110`, `1100`, `1000` and
  `0000` start 25, 50, 75 or 100 % of the chosen array. To do this it forces
  all high and middle lines active, plus one to four of the low lines. These
  modes are for measuring power against activity. The address plays no part in
  them.
* **dec_nor** has one 3-input NOR per ring, so ring *i* gets
  `add_dec[i]`. Normally this is one-hot.
* **be_array** combines the decoded lines with `dis` (C-block disable) and
  `en11` (the array). Rings whose first gate is a NAND (INV and NAND blocks)
  start on a high select. Rings that start with a NOR (NOR and MXD blocks)
  start on a low select. The `FIRST` parameter sets this polarity.

The multiplexer takes the 16 lines from *before* the BSC, inverted. So it
always follows the address, even while a special mode starts many rings. Its
last stage is gated off unless the mode is normal and the block is enabled.

## Forwarding a 4–12 GHz signal: the FD mux and the divider

One wide multiplexer would put too much load on a single switch. The mux is
therefore hierarchical: 2 × 4 × 4 × 8.

1. Pass gates choose the 7-deep or the 11-deep ring (`en11`).
2. Thirty-two 4:1 muxes use the low address lines.
3. Eight 4:1 muxes use the middle lines.
4. Each of the 8 results clocks a toggle flip-flop. The flip-flop restores the
   signal and halves its frequency. An 8:1 pass-gate stage on the high lines
   then picks one flip-flop.

A 10-stage ripple divider follows the mux. `OUT` therefore runs at
f_ring / 2048, a few MHz. This is well below the 100 MHz the test equipment
accepts. None of these flip-flops has a reset, because the core has no reset
pin. Their phase is arbitrary; their frequency is not.

In this two-valued model, a switch that is off drives 0.

## The main core and its scan word

Each main core has four pins: `si`, `clks`, `so` and `out`. Its 15-bit scan
register holds `core_cfg_t` = `{en11, bsb[3:0], add[9:0]}`. Shift it in most
significant bit first. The previous word comes out at `so` as the new one goes
in. The register drives the core directly; there is no separate update latch.

* `add[6:0]` is the ring address. All four C-blocks share it, along with `bsb`
  and `en11`.
* `add[9:7]` is the coded disable. A value of 0..3 enables C-block 0..3
  (INV, NAND, NOR, MXD). A value of 4..7 disables all four, which is the 0 %
  activity point.

Each core has its own scan pins. The chip could share the scan clock, or chain
all six cores, to save pins. That is a top-level wiring change.

## Ring oscillator model

`ringo` is not gate-level. A started ring changes its output every
DEPTH × `GATE_DELAY_FS`. A stopped ring settles at its rest level: high for
NAND-first rings, low for NOR-first ones. The default gate delay of 16.2 ps
reproduces the post-layout frequencies: about 4.4 GHz for the 7-deep ring and
2.8 GHz for the 11-deep one.

`ringo_array` adds an artificial per-ring offset of
`SPREAD_FS × ((37·i) mod 128)`. This gives every ring a distinct period, so a
simulation can tell which ring reached the output. It is not a model of real
mismatch. Set `SPREAD_FS = 0` for identical rings.

## Digital core

The core has four independent FF-Comb chains. Chain *c* maps inputs
`din[4c+3:4c]` to outputs `dout[4c+3:4c]`. Each output is a fixed 4-input
function of its group, available 21 clocks after the inputs are registered.
Each of the 20 blocks in a chain is a 4-bit scannable register with
asynchronous reset (`rst_n`, active low) followed by four combinational nets.
A final register closes the chain.

All 336 flip-flops form one scan chain. The bit order is chain 0..3, then
register 0..20 within a chain, then bit 0..3 within a register. On the chip
the core is driven through SI/SE/CLK/Reset/SO alone: load by scan, clock with
`se` low, unload by scan.

The 16 path functions (`PATH_LUT` in `testchip_pkg`) are the chip's specified
end-to-end behaviour. Bit *i* of a table is the output for the input group
value *i*, where the group's lowest-numbered input is bit 0. The gate-level
netlist of the nets was not available. In this RTL, the first block of each
chain computes the whole function and the other 19 pass their bits on.
Latency and scan length are unchanged, but the gate depth and critical paths
of the real core (up to 20 gates per net) are not reproduced. Two readings
behind the tables are uncertain:

* Path 16: one entry, input group value 8 (inputs 1..3 low, input 4 high),
  is taken as 1. If it should be 0, the table is `16'h1022` without bit 8.
* Path 9 is confirmed by a second, independent copy of its table.

## Litho monitor

Each monitor compares one transistor with the reference M2 of a group of three
closely spaced minimum-size transistors. M1 sits next to a contact and M3 at a
poly line end. The comparison uses a latch that is released when `en` rises.
After 22.5 ns, node `b` is 0 if the transistor under test is longer (weaker)
than the reference, and 1 if it is shorter. Equal lengths settle at random.

The block holds 400 elements of two monitors each. A clock with `se` low
captures all 800 `b` bits. Element *e* gives bits 2e (M1) and 2e+1 (M3). With
`se` high the bits shift out at `so`.

The length errors given to the models are placeholders: a systematic part
(`DL_M1_PM`, `DL_M3_PM`) plus a fixed pattern (`SPREAD_PM`).

## Simulating

Every file starts with `timeunit 1ps; timeprecision 1fs;`. The ring and monitor
models use delays, so build with `--timing`. Example, from the repository
root:

```
verilator --binary --timing -Wno-fatal --top-module tb_c_block \
  -y rtl -y tb +libext+.sv rtl/testchip_pkg.sv tb/dc_ref_pkg.sv tb/tb_c_block.sv
./obj_dir/Vtb_c_block
```

Each `tb/tb_<block>.sv` checks its block against values it computes itself and
ends with `TB_RESULT checks=N failures=M`. The digital-core benches take the
expected functions from Karnaugh maps in `tb/dc_ref_pkg.sv`, not from the
design package. Ring-based benches check the measured periods against
2 × depth × delay.

`tb_testchip_top` runs the whole chip: ring measurements through the scan
interface on both arrays and all four C-block types, the four special modes,
the all-disabled code, a digital-core stream and scan test, and a monitor
read-out. It counts each mechanism. It runs with two main cores instead of
six (`N_CORES = 2`), because six cores' worth of ring processes make the
simulation too slow. The cores are identical, so nothing is lost in function.
No simulation of the full six-core top has been completed.

## Departures and limits

* Analog behaviour is not modelled: no supplies, back-bias, power or
  variability. Frequencies come from the chosen gate delay. The libraries
  differ only in the silicon, so all six cores are functionally identical
  here.
* The digital core is implemented from its truth tables, not its netlist (see
  above).
* The following are this design's own choices:
  * the code of the disable field
  * the positions of the address groups in the 16 hierarchical lines
  * the order of the scan word
  * the reset polarity
  * the point where the mux is silenced outside normal mode
  * all scan-chain orders
* Yosys synthesis does not accept `$urandom` in `monitor_cell`. That model is
  not meant for synthesis.
