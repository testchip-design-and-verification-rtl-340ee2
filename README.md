# Standard-cell and memory test chip

This is a test chip that characterises a standard-cell library and its memories. The chip has four kinds of test block. One register bank and a shared set of pins control all of them:

- **ALLCELL**: every logic cell of the library, run functionally, by scan or in an operating life test (OLT).
- **FDD**: 1024 units, each holding 36 flip-flops under test, for defect-density measurement.
- **Retention block**: the FDD structure built from retention flops, with a sleep input.
- **Memblocks**: a single-port SRAM, a dual-port type 1 (one read port and one write port) and a dual-port type 2 (two read/write ports). Each memblock has input gating and a March C- BIST.

## Top level (`testchip_top`)

- `top_regbank` holds the registers. Address 0 is the block select (one bit per block: ALLCELL, FDD, RET, MEM_SP, MEM_DP1, MEM_DP2). Address 1 is the library select. Address 2 holds the mode bits: mem_tm, mem_init, bist_start, mem_sleep, ig, ret_sleep, fdd_tm and olt_en. Address 3 holds the background select in bits [1:0] and the per-block clock select in bits [13:8].
- `clk_assembly` gives each block either the pin clock or a second clock pin. The second pin stands in for the PLL.
- `input_muxing` passes the 80 input pins only to selected blocks. Unselected blocks see zeros.
- `output_muxing` puts the lowest selected block on the 40 output pins.
- The pin map of every block is given in the header of `rtl/testchip_top.sv`.

## ALLCELL

ALLCELL has two groups. Each group has an OLT controller and two halves: R0, and R90, the rotated copy. Each half holds NINST library instances (default 4: two libraries with two instances each). Each instance holds four units:

- COMBO: 12 combinational cells.
- SEQ: flip-flops on the rising edge, with reset, on the falling edge, and with scan.
- TRI: tri-state drivers with a bus keeper.
- CBUF: latch-based clock gates.

Every cell under test feeds a reference cell. A reference cell is a bypass mux in front of a scan flop. A cell's output can be observed in four ways:

- directly through the func mux;
- through the bypass mux (`bypass_sel`, `bypass_data`);
- by scanning the reference flops out (SCAN0/SCAN1);
- by scanning a bypass value through the chain.

The reference flops are chained Q to TI in the order COMBO → SEQ → TRI → CBUF, then across instances, halves and groups.

`MUX_CTRL` (14 bits) has three fields:

- `[3:0]` selects the cell.
- `[11:10]` selects the unit type in the output mux wrapper.
- `[13:8]` selects the FDD cell.

`CUT_DATA2` bits: 0 rstn, 1 tri enable, 2 clock-gate enable, 3 clock-gate test enable, 4 FDD test enable, 5 Q/TQ select. `CUT_DATA1` is 10 bits.

In OLT mode the controller walks every value of CUT_DATA1 for every cell and unit type, two clocks per setting. It forces scan off and bypass off, and compares the R0 outputs against the R90 outputs. Any mismatch sets a sticky BBAD. BEND goes high at the end of the loop.

## FDD and retention

Each FDD unit has four parts:

- an interface, which gates the clock by block select (or by test mode) and selects Q or TQ;
- the FDS library of 36 flip-flops (a repeating mix of dual-edge, rising-edge-with-reset and falling-edge cells);
- an FDD mux on `MUX_CTRL[13:8]`;
- a reference cell.

Each unit's TI comes from the previous unit's QOUT. Because a dual-edge cell captures on both clock edges, its chain advances two units per clock. A single-edge chain advances one unit per clock. The retention block is the same RTL built with `RETENTION=1`: all its cells are retention flops that hold state while `sleep` is high.

## Memory BIST

`mbist_controller` runs March C- in six elements. Elements M3 and M4 run downwards from the top address; the others run upwards from address 0. A full run is 10 operations per address. `pipe_mbg` generates the data background (solid zeros, checkerboard, row stripes or column stripes, chosen by bg_sel) and adds a pipeline stage. `memblock` compares each read against the expected data and raises a sticky fail flag. `ig_gating` blocks the memory inputs while IG is set.

The memory models are behavioural, 256 × 16 by default, with a sleep mode that blocks reads and writes.

## Deviations and parts not built

- The chip was not simulated at full size. The top-level testbench uses reduced sizes: two instances per half, a 2-bit OLT data width, 8 FDD units and 4 retention units. The FDD block was simulated with 8 units. Building the default-size top (1024-unit FDD and retention blocks) for simulation took too long, so that run was not done.
- Cell behaviour is modelled with SystemVerilog operators, and the dual-edge flop is modelled as two flops whose outputs are XORed.
- The following are not built:
  - PLL, ring oscillators, analog block and pad frame: these have no digital function to model.
  - Boundary scan: named only, with no description to build from.
  - BIST repair output, and the INI/GLOBAL_CELL parts of the FDD interface: not described closely enough.
  - The reference buffer and AND/OR gate of the reference unit: not described closely enough.
  - The ALLCELL input buffers: these are plain wires.
- Memory sizes, cell counts per unit, the register map and the pin map are this design's own choices.

## Simulating

Each testbench is in `tb/` and is named `tb_<module>`. Each one prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tc_pkg.sv tb/tb_testchip_top.sv \
  --top-module tb_testchip_top -y rtl -Mdir obj && obj/Vtb_testchip_top
```

The top testbench counts 14 mechanisms and checks that each one occurred: BLOCKSEL, ALLCELL_FUNC, BYPASS, SCAN, OLT_LOOP, OLT_BBAD, FDD_SHIFT, FDD_GATED, RET_SLEEP, MEM_RW, IG, CLKSEL, BIST_PASS and BIST_FAIL.
