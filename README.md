# RISC32-LP power management hardware

A small FPGA-based sensor node spends most of its time doing two things.
It crunches data (sampling, encryption), which wants a fast core. It also
waits on slow serial links (UART, SPI), where the core is mostly idle. This
design is the hardware that lets such a node save energy in both phases,
without stopping the processor:

* **Clock gating.** Seven clock buffers switch off the clocks of the GPIO,
  UART and SPI controllers, the stack and data RAMs, the multiplier and the
  register file whenever the pipeline does not need them.
* **Dynamic voltage and frequency scaling (DVFS).** Software writes an index
  into a register and the core moves to one of six frequency-voltage pairs,
  from 40 MHz at 1.00 V down to 20 MHz at 0.90 V. The core keeps running
  during the change. The supply is never too low for the clock in use.
* **Microarchitecture switching by partial reconfiguration (PR).** A TMA
  ("toggle microarchitecture") instruction reloads the processor's
  reconfigurable region from flash. It swaps between a pipelined datapath
  (PE) and a cheaper multi-cycle one (ME).
* **Clock-domain crossing.** The core clock now varies while the IO units
  keep a fixed clock. Small asynchronous FIFOs carry bytes from the core to
  the UART and SPI units.

The processor core, memories, IO controllers, flash controller, voltage
regulator and FPGA configuration port are not part of this RTL. They
connect through the ports of the top module, `risc32lp_pm_top`.

## Module map

| Module | Role |
|---|---|
| `risc32lp_pm_top` | PMU, seven gated clock buffers, two CDC FIFOs, PR controller |
| `pmu` | Power management unit: clock-gating control plus the whole DVFS path |
| `io_cgcu`, `core_cgcu` | Combinational clock-enable logic for IO/RAM and for multiplier/register file |
| `bufhce` | Model of the FPGA's gated clock buffer (enable latched while the clock is low) |
| `dvfs_fir` | DVFS frequency index register (DVFSFIR), a Wishbone slave in the core clock domain |
| `dvfs_cu` | DVFS control unit: the eight-state sequencer at 100 MHz |
| `dvfs_pll` | Model of the PLL: six clocks at 40, 36, 32, 28, 24 and 20 MHz |
| `clk_mux6` | Six-to-one selector with a hold-low reset; two of them make clk1 and clk2 |
| `bufgmux_ctrl` | Model of the FPGA's glitch-free two-input clock multiplexer |
| `vreg_ctrl` | Voltage sequencer: steps the regulator one level at a time over SPI |
| `spi_master` | 16-bit, mode 0, MSB-first SPI transmitter |
| `sync2ff` | Two-flop synchroniser |
| `cdc_fifo` | Four-entry asynchronous FIFO with Gray-coded pointers |
| `pr_controller` | Streams a partial bitstream from flash to the configuration port on TMA |
| `pmu_pkg` | f-v table, index type, request codes and DVFS state type |

## The frequency-voltage pairs

| Index | Core clock | Supply | Potentiometer SPI word |
|---|---|---|---|
| 0 (reset) | 40 MHz | 1.00 V | `16'h12F9` |
| 1 | 36 MHz | 0.98 V | `16'h1277` |
| 2 | 32 MHz | 0.96 V | `16'h1242` |
| 3 | 28 MHz | 0.94 V | `16'h1229` |
| 4 | 24 MHz | 0.92 V | `16'h1218` |
| 5 | 20 MHz | 0.90 V | `16'h120D` |

The frequency is 40 − 4·i MHz and the voltage 1000 − 20·i mV. The SPI words
are calibration values for one board: they set an MCP42100-style digital
potentiometer in the feedback path of an external regulator. Software
selects a pair with one byte store to DVFSFIR, at `0xBFFF_FF3F`. Values 6
and 7 are clamped to 5. A read returns the index zero-extended to 32 bits.

## Changing the f-v pair without stopping the core

This is the subtle part of the design.

### Two clocks and a glitch-free multiplexer

The core clock (`uopm_dvfs_clk`) is the output of a glitch-free two-input
clock multiplexer (`bufgmux_ctrl`). Its inputs are **clk1** and **clk2**.
Each is a six-to-one selector on the PLL outputs with its own 3-bit select
register and its own "hold low" reset. At rest the core runs on clk1 and
clk2 is held low. A selector is only re-loaded while its clock is held low
and not driving the core. This means the core never sees a selector change
mid-cycle.

### The sequence

`dvfs_cu` runs at 100 MHz. It compares the requested index with the index of
clk1 (the current one): `10` means slower, `11` means faster, `00` means
equal. Its states, with the time each one takes:

| State | What happens | Leaves after |
|---|---|---|
| RESET_CLK2 | Idle. clk2 held low; its selector follows the request | a request differs from the current index |
| SET_CLK2 | clk2 released at the new frequency | 4 cycles |
| WAIT_VOLT1 | (faster only) voltage sequencer raises the supply | the requested level is applied |
| SOURCE_CLK2 | multiplexer moved to clk2; core now on the new frequency | 9 cycles |
| RESET_CLK1 | clk1 held low and its selector loaded from clk2's | 1 cycle |
| SET_CLK1 | clk1 released at the new frequency | 4 cycles |
| SOURCE_CLK1 | multiplexer moved back to clk1 | 9 cycles |
| WAIT_VOLT2 | (slower only) voltage sequencer lowers the supply | the requested level is applied |

For a faster pair, SET_CLK2 goes to WAIT_VOLT1. For a slower pair it goes
straight to SOURCE_CLK2. WAIT_VOLT2 is passed through at once for a faster
pair, because the voltage already matches. The result is the rule that keeps
the core safe: **the voltage rises before the frequency rises, and falls
after the frequency falls.**

`sbofs_clkssel`, the multiplexer select, is high from SOURCE_CLK2 to
SET_CLK1. `sbofs_busy` is high in every state but RESET_CLK2.
`sbofs_holdcmd` is low only in the two WAIT_VOLT states, so the regulator
command can change only there.

### Voltage sequencer

`vreg_ctrl` keeps the applied level `vidx` (reset: 0, i.e. 1.00 V). While
`holdcmd` is low and `vidx` differs from the target, it sends the SPI word
of the next level toward the target. When that word is out, it records the
new level. So a change of n pairs costs n SPI frames. `cmd_sent`, the
acknowledge of the WAIT_VOLT states, is high when the level equals the target
and no frame is in flight. A frame takes 33·SCLK_DIV + 1 = 166 clocks at
100 MHz (SCLK 10 MHz). With the state overhead, a change over n levels keeps
`uopm_dvfs_busy` high for about 29 + 167·n cycles of 100 MHz. That is about
8.6 µs for 40 → 20 MHz.

### Getting the request across

DVFSFIR is written in the core clock domain. Its 3-bit value reaches the
100 MHz domain through a two-flop synchroniser. It is accepted only when two
successive samples agree, so a value caught mid-change is never used.

### Timing and reset

* `uipm_dvfs_clk_rst` resets the DVFS path and DVFSFIR. The core clock
  returns to 40 MHz.
* `uipm_dvfs_rst` resets the rest: the index synchroniser, the FIFOs and the
  PR controller.
* The clock-gating logic is combinational and has no reset.
* `uopm_dvfs_clk_slowest` is the 20 MHz PLL output. It is always running and
  drives the IO units.

## Clock gating

Each gated module has a `bufhce`: the enable is latched while the clock is
low, so a gated clock has only whole pulses. The buffer adds one cycle of
enable latency. The enable logic therefore wakes a unit one stage early.

| Buffer(s) | Clock | Enable |
|---|---|---|
| GPIO | 20 MHz IO clock | execute-stage store, GPIO busy, or (GPIO selected and memory-stage store) |
| UART | 20 MHz IO clock | execute-stage store, UART busy, or UART selected |
| SPI | 20 MHz IO clock | execute-stage store, SPI busy, or SPI selected |
| stack RAM, data RAM (one shared enable) | core clock | execute-stage store, RAM busy, or RAM selected |
| multiplier | core clock | multiply in execute, or multiplier busy in memory stage |
| register file | core clock | write-back write, or register write enable |

The execute-stage store term is there because the target of the store is not
decoded yet.

The IO selects are bits of `uipm_cg_dpmem_io_en`: [1] GPIO, [3] SPI,
[4] UART. An ADC clock is not gated, because the source names no enable for
it.

## Core-to-IO FIFOs

`cdc_fifo` has four entries. Each side has a pointer one bit wider than the
address. The pointers cross through two-flop synchronisers in Gray code.

* **Write side** (core clock): `wput` is accepted while `wrdy` (not full) is
  high.
* **Read side** (20 MHz IO clock): `data_out` is valid while `rrdy` (not
  empty) is high, and `rget` pops it.

The flags are conservative by the synchroniser delay. If the core writes
faster than the serial unit drains, `wrdy` falls and the core must wait.
This is the normal state during a transmit.

The read sides run on the ungated IO clock rather than the gated unit clocks.
The flags are therefore always valid, and a reset always completes.

## Partial reconfiguration

When the core decodes TMA, it raises `tma`. `pr_controller` raises `pr_stall`
in the same cycle. It then reads 43,906 32-bit words (175,624 bytes), one at
a time: `flash_req` is held with the address until `flash_valid` returns the
word. Each word is written to the configuration port the next cycle
(`icap_csib` low, `icap_rdwrb` low).

The image comes from `0x00A0_0000` (the multi-cycle image) when the core is
pipelined, and from `0x00A8_0000` (the pipelined image) when it is
multi-cycle. After the last word, `pr_mode_pe` flips and the stall is
released, so the stalled instruction continues on the new datapath.

The duration is set by the flash:

* With a flash that answers in one cycle, an operation takes 2·43,906 + 1
  core cycles, which is about 4.4 ms at 20 MHz.
* A serial flash that needs about 20 cycles per word stretches this to the
  order of 44 ms.

The controller assumes the stored bitstream already contains the
configuration-port sync and desync words in the right bit order. Reset puts
the core in pipeline mode.

## Behavioural models and synthesis

Three parts stand for FPGA primitives and are timed behavioural models:

* `dvfs_pll`: six free-running oscillators.
* `bufhce`: a latch and an AND gate.
* `bufgmux_ctrl`: each input is enabled only on its own falling edge, after
  the other input has been released.

For an FPGA build, replace them with the vendor primitives (PLL/MMCM, BUFHCE,
BUFGMUX_CTRL), which have the same roles. Synthesis of the model files
behaves as follows:

* Synthesising the PLL model leaves its clock wires undriven, and the tools
  say so.
* The gated buffers synthesise to a latch each.

All other modules are ordinary synchronous RTL with synchronous active-high
resets.

## Where this design departs from, or fills in, its source

* **WAIT_VOLT2.** It waits in itself until the voltage is reached. One
  description of the state machine sends it back to WAIT_VOLT1 instead. That
  would leave an unfinished sequence with no way back, and the state diagram
  shows a self-loop.
* **clk1 hold-low.** clk1 is held low in RESET_CLK1. The published output
  table raises that signal in no state, although RESET_CLK1 is described as
  resetting clk1.
* **Multiplexer select.** The select is already high in SOURCE_CLK2, the
  state that moves the core to clk2. The output table raises it only from
  the next state on.
* **Selector loading.** The selectors are loaded in RESET_CLK2 and
  RESET_CLK1 through two extra control-unit outputs. The source does not say
  how they are loaded.
* **IO clock.** The IO units run on the 20 MHz slowest PLL clock, as the pin
  list and the clock-gating diagram show. One sentence of the source speaks
  of a 10 MHz IO clock.
* **Bitstream size.** It is 175,624 bytes. A table elsewhere lists a much
  larger size that would not fit between the two image addresses.
* **Choices of this design.** The following are not given by the source:
  * Gray-coded FIFO pointers.
  * The FIFO width (8 bits).
  * The SPI mode and rate (mode 0, 10 MHz).
  * The two-sample index filter.
  * The flash handshake.
  * The reset mode (pipeline).
* **Observation ports.** `uopm_dvfs_busy`, `uopm_dvfs_cur_idx` and
  `uopm_dvfs_vidx` are added outputs of the PMU.

Not included:

* The RISC32 core with its two datapaths, the caches, memories and boot ROM,
  and the GPIO/UART/SPI/ADC controllers. These are an existing design that is
  only named.
* The logic-delay measurement circuit used once to calibrate the f-v table.
* The regulator itself and the FPGA configuration port.
* The offline program analyser that inserts DVFS and TMA instructions into
  firmware.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>`.

* `tb/mcp42100_model.sv` models the potentiometer. It decodes the SPI frames
  into a voltage level.
* `tb_risc32lp_pm_top` runs the whole design with every parameter at its
  default. It runs a compute burst with gated multiplier and register-file
  clocks, then a full PR to the multi-cycle datapath. Next it changes to
  20 MHz and sends 64 bytes through each FIFO while the FIFOs fill and stall
  the writer. Finally it changes back to 40 MHz and runs a full PR back to
  the pipeline.
* It checks bitstream data, clock periods, voltage ordering, PR duration and
  byte order, and that each mechanism occurred at least once.

With Verilator 5 (run from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/pmu_pkg.sv \
    tb/tb_risc32lp_pm_top.sv --top-module tb_risc32lp_pm_top -Mdir obj
./obj/Vtb_risc32lp_pm_top
```

Replace the testbench name for the others:

* `tb_pmu` covers seven f-v changes, a voltage-safety monitor, a clock
  glitch monitor and the gating enables.
* `tb_dvfs_cu` checks state dwell times and the output table.
* `tb_cdc_fifo` uses random traffic on unrelated clocks.
* The remaining testbenches are `tb_io_cgcu`, `tb_core_cgcu`, `tb_bufhce`,
  `tb_bufgmux_ctrl`, `tb_dvfs_pll`, `tb_clk_mux6`, `tb_dvfs_fir`,
  `tb_spi_master`, `tb_vreg_ctrl`, `tb_pr_controller` and `tb_pmu_pkg`.

The full-size top-level run takes a few seconds.

Parameters worth changing:

* `SCLK_DIV` (SPI clock = 100 MHz / 2·SCLK_DIV).
* `BITSTREAM_WORDS`, `ME_BITSTREAM_ADDR` and `PE_BITSTREAM_ADDR` in
  `pr_controller`.
* `CDC_DATA_SIZE` for the FIFOs.
* `BUFGMUX_CYCLES` and `CLKCOUNTER_CYCLES` in `dvfs_cu`. These are the 9- and
  4-cycle waits; lengthen them if the target's clock primitives need more
  settling time.
* For another board, recalibrate the f-v table and SPI words in `pmu_pkg`.
