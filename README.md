# TC25 test chip and its FPGA validation bench in SystemVerilog

TC25 is a radiation-hardened test chip. It carries three experiments that share one set of pads:
- a hardened MIPS32-class processor called HERMES;
- an SRAM block with two 1 Mb 6T arrays and one 1 Mb 8T array, including a "PUF" read mode that turns the 6T cells into a chip fingerprint;
- a DDR PLL with a triple-redundant configuration.

After fabrication the chip is validated by an FPGA board. The board:
- clocks the chip;
- drives its inputs from small test sequencers;
- records every pin into block RAMs, one sample per half cycle;
- stalls the chip while a host PC empties those RAMs over USB.

This repository models both sides in synthesizable SystemVerilog: the chip's digital logic and the FPGA test bench. The analog parts (SRAM cells, the PLL oscillator) are behavioural models. The HERMES processor itself is **not** included. Its pins are brought out as ports, and the processor's memory-side test bench is built.

## Overall structure

```
tc25_system                      (top: FPGA bench + chip)
 ├─ tb_clk_gen                   divide-by-2 test clock, stopped while the trace is full
 ├─ sram_tester                  SRAM test sequencer (register set-up, address sweeps, patterns, PUF)
 ├─ tc25                         the chip
 │   ├─ xor_clk_mult             8-input XOR clock multiplier
 │   ├─ clk_mux2                 CLK_SEL: XOR clock or PLL clock
 │   ├─ clk_div8                 CLK_DIV_OUT = chip clock / 8
 │   ├─ sram_block               special registers + 2 x sram6t_array + sram8t_array
 │   │   └─ sram6t_array         8 banks, each clk_gater + sram_bank
 │   ├─ ddr_pll                  pll_cfg_regs (tmr_reg x3) + pll_x16 + pll_clk_div
 │   └─ blk_out_mux              BLK_SEL: HERMES / SRAM / PLL / off onto 79 pads
 ├─ trace_memory (SRAM)          2 x trace_bram (512 x 72) + trace_write_logic + trace_read_logic
 ├─ trace_memory (HERMES)        3 x trace_bram, same logic
 └─ hermes_tb_sys                processor bench: hermes_reset_gen, hermes_imem, hermes_dmem, hermes_ctrl
```

Shared types and constants live in `rtl/tc25_pkg.sv`:
- the SRAM address layout;
- the encodings of BLK_SEL and SRAM_Sel;
- the data patterns;
- the 128-bit SRAM and 192-bit HERMES trace-line structs.

## Clocking of the chip

The chip clock is chosen by `CLK_SEL`:
- **0: the XOR clock multiplier.** It XORs eight input clocks through a balanced tree. If the inputs are copies of one clock shifted by 1/16 of a period each, the output runs at 8x the input frequency. With only input 0 toggling, it is the input clock.
- **1: the DDR PLL's divided clock.**

The selected clock, divided by 8, appears on `CLK_DIV_OUT`, so the clock can be measured from outside. Inside the system top, XOR input 0 is the FPGA test clock and inputs 7:1 are top-level ports.

## The SRAM block

### Address layout

Address bits `{bank[2:0], half, wordline[6:0], column[2:0]}` make 16384 words of 64 bits per array.

The 32-bit `datain` pins feed both halves of the 64-bit word. They also feed the special registers.

When the arrays are built with fewer rows, this layout stays the same and the upper wordline bits are ignored. This is the `ROWS` parameter, and it is used only to shorten simulations.

### 6T bank timing

Each 16 kB bank (`sram_bank`) is accessed on the rising clock edge. Its output flops load on the falling edge. Controls are expected to change just after a falling edge. Each bank has its own latch-based clock gate (`clk_gater`), so only the addressed bank sees a clock edge. The 6T array's output mux switches bank on the same falling edge that delivers the new bank's data, so a bank change never shows stale data.

### Special registers

Three 32-bit registers are written with `spreg_addr` = 1, 2 or 3 and a rising edge on `spreg_clk`. Register 1 holds:

| Bits | Meaning |
|---|---|
| 31 | PUF mode |
| 30 | satest enable |
| 29 | DAT enable |
| 15:0 | sense-amplifier delay (0x00FF is the longest) |

Registers 2 and 3 are only brought out, for the DAT mode. Bit 31 is the only position fixed by the original design; the others are choices made here.

### PUF mode and its model

In the real chip, a PUF read fires the sense amplifier on bit lines the cell has barely moved. The result depends on each cell's manufacturing mismatch, and sometimes on noise. `sram_bank` models this per bit with a hash of the bank seed, the address and the bit:
- about 26 % of the cells (`GREY_PER_256` = 67) resolve at random from an LFSR;
- the rest resolve to a fixed per-cell value;
- a `STABLE_PER_256` share keeps the stored value.

A PUF read also writes the resolved value back. Sense-amplifier timing is not modelled, so the delay register has no effect in simulation.

### 8T array

The 8T array is a plain memory with separate read and write ports and the same timing.

## The DDR PLL

**Configuration registers.** Three registers: coarse (32 bits, address 0), fine (32 bits, address 1) and divset (6 bits, address 2). Each is a self-correcting triple-redundant register (`tmr_reg`). It keeps three copies, outputs their bitwise majority, and reloads every copy with the vote on every clock. A single upset therefore lasts one cycle and never reaches the output. `inj_copy`/`inj_mask` let a testbench flip bits in chosen copies.

**Divider.** `pll_clk_div` divides the PLL clock by divset (minimum 2). Its counter and output flop are triple-redundant as well.

**Oscillator model.** `pll_x16` is a behavioural model. In open loop, its half period is
200 ps + 40 ps x (ones in coarse) + 5 ps x (ones in fine).
In closed loop (`loop_cntrl` = 1) it runs at 16x the reference clock. `tdc_sel` is a thermometer code of the PLL phase, taken at each reference edge. These numbers are placeholders: the real oscillator is analog and its characteristics are not given. Only the register widths and the signal names follow the original design.

## The FPGA trace path

### tb_clk_gen

The test clock is the system clock divided by 2. Its flop loads `~Q` while there is room in the trace and 0 otherwise. So the chip, the SRAM tester and the HERMES bench all freeze while a trace memory waits to be read.

### trace_memory

The SRAM trace memory writes its 128-bit trace line into two 512 x 72 BRAMs on every falling edge of the BRAM clock. Each BRAM line holds 64 data bits and 8 byte-parity bits.

After line 511:
- `bram_full` goes **low**;
- writing stops and the address is held.

The host then reads each BRAM through its own `pipe_read` strobe. The strobe is sampled on the falling host-clock edge, and the data is valid after the next rising edge. Then the host pulses `program_clk_enable`:
- its rising edge returns the write address to 0;
- its falling edge raises `bram_full` again, and capture and the test clock resume.

`parity_err` flags a line whose stored parity does not match its data.

A second, identical trace memory with three BRAMs records the HERMES side in 192-bit lines:
- the external bus (address, write data, read data, byte enables, strobes, `EB_RdVal`);
- the two resets;
- the 79 processor outputs.

It has its own pipes (`pipe_read_h`, `pipe_data_h`). Both memories fill in step and share `program_clk_enable`, and the test clock runs only while both have room.

### sram_tester

The tester runs on the falling edge of the test clock. It proceeds in this order:
1. It writes special registers 1 and 2 (with the PUF bit cleared).
2. It raises `start_write_read` when its start-up counter reaches 15.
3. It sweeps all 16384 addresses.

The sweep counter is XORed with 0x0400, so the first address is 0x0400 and the last 0x3BFF, and every address is still visited exactly once.

Data patterns: all ones, all zeros, the address, or the inverted address.

| Mode | Sequence |
|---|---|
| WR_RD | write sweep, then read sweep |
| WR | write sweep only |
| RD | read sweep only |
| PUF | write sweep, set the PUF bit, read sweep, clear the PUF bit, normal read sweep |

`stop_test` rises after the last read.

## The HERMES memory bench

`hermes_tb_sys` stands in for the board-side world of the processor. Its memory BRAMs run on the **inverted** bus clock. A request presented at a rising bus-clock edge is therefore read at the falling edge and returned on `EB_RData` at the next rising edge, with `EB_RdVal` high for that one cycle.

**Reset generator.** A 4-bit counter raises the PLL reset for two cycles (counts 1-2) and holds ColdReset high until count 7.

**Instruction memory.** Five 512-word BRAMs, selected by physical address bits [29:16] = 0x1FC0 (boot, reached through the kseg1 reset vector 0xBFC00000), 0x0000, 0x0FFF, 0x1000 or 0x1FFF. The select is flopped on the BRAM clock to steer the output mux.

**Data memory.** Two BRAMs at 0x0000 and 0x1000, with byte enables.

**Control.** The control block decodes `EB_AValid`/`EB_Instr`/`EB_Write` and drives a 4:1 mux onto `EB_RData`:
- instruction word;
- data word;
- zero;
- during ColdReset, the bus-to-core clock ratio (parameter `CLK_RATIO`, 4 here).

Memory contents can be preloaded with `$readmemh` files given as parameters. `tb/hermes_boot.hex` and `tb/hermes_hello.hex` are small examples.

## Where this model departs from the original design

- **HERMES processor.** The processor and its units are absent, so no program actually runs. The bench is exercised by testbenches that act as the processor's bus.
- **Pads.** The real chip shares its input pads between the experiments. Here each block has its own inputs, because the pad map is not available. Level shifters, power muxes and pads are not modelled.
- **Trace memories.** The SRAM and HERMES trace memories sit side by side in one top. On the original board each experiment had its own FPGA configuration.
- **FPGA vendor blocks.** The USB host interface and the FPGA PLL primitive are replaced by top-level clock and pipe ports.
- **Choices not fixed by the original description:**
  - the BLK_SEL, SRAM_Sel and CLK_SEL encodings;
  - register bits other than the PUF bit;
  - the PLL register map;
  - the parity code;
  - the tester's register-write timing;
  - the reset-generator counts;
  - the clock-ratio value;
  - the PLL timing numbers;
  - the PUF statistics.

  Each is a parameter or a package constant where practical.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each prints `TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv -Irtl \
  --top-module tb_sram_tester rtl/tc25_pkg.sv tb/tb_sram_tester.sv
./obj_dir/Vtb_sram_tester
```

Run from the repository root, because the HERMES testbenches read `tb/*.hex` by relative path.

`tb/tb_tc25_system.sv` is the end-to-end test at full size: every parameter is at its default, and it takes about 15 s of simulation. It plays the host PC and checks the following:
- **Run 1.** Writes all 16384 words of 6T array A with the address pattern and reads them back through the trace path. That is 129 trace fills, each drained and re-armed. Every read value must match its address, and only array A's bank clocks may pulse.
- **Run 2.** Writes array B with ones and reads it in PUF mode. It checks that a plausible share of bits resolve to 0 and that the PUF bit is cleared afterwards.
- **Clocks.** Times `CLK_DIV_OUT` with 1, 2 and 8 phase-shifted XOR inputs, and with the PLL selected in open and closed loop.
- **PLL upset.** Upsets one copy of the PLL registers and checks that the frequency holds and the upset is scrubbed.
- **Pads.** Steps the output mux through all four selections.
- **HERMES bench.** Reads the clock ratio during ColdReset, fetches boot words and writes and reads data memory. These bus cycles must then show up in the HERMES trace.

It counts each of these events and fails if one never happened. `tb/tb_tc25.sv` exercises the chip alone with the arrays cut down to 8 rows.
