# PACE1750A processor interface module

This is the glue logic that sits between a PACE1750A processor and the rest of
a spacecraft bus management unit. The PACE1750A is a 16-bit MIL-STD-1750A CPU.
Its single 16-bit bus carries the address first and then the data, so the
module has to separate the two. It then turns the address into chip selects
for PROM, RAM, a MIL-STD-1553 protocol chip and two IO devices, stretches each
bus cycle with wait states to suit the slower parts, protects RAM with an
error-correcting code, and routes the right word back to the processor on
reads. A small divider also makes a 12 MHz clock from a 24 MHz board clock.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). It is glue logic
only: the processor, the MMU, the memories and the 1553 chip are outside the
module, and their signals are ports of the top level `p1750a_pim`.

## Block overview

| module | role |
|---|---|
| `addr_data_demux` | latches the address (`ia`) and the write data (`id`) off the multiplexed bus, and drives read data back onto it |
| `latch_mmu` | 20-bit expanded address `{mmua[7:0], addr[11:0]}`, held in a register clocked by the MMU strobe |
| `mem_decoder` | picks the MMU address or the plain 16-bit address, and contains `prom_decoder` and `ram_decoder` |
| `prom_decoder` | four PROM chip selects |
| `ram_decoder` | four RAM chip selects and the 1553 chip select |
| `io_dec` | IO chip selects for the BMU (002Dh) and the AOCE (0100h) |
| `wait_st_logic` | wait-state counter, processor ready, memory and IO strobes |
| `edac_inf` | SEC-DED check bits for RAM, correction of reads, error flags |
| `data_bus_routing` | picks the source of read data |
| `config_word` | 16-bit system configuration latch, read by the processor's XIO RCW command |
| `io_port` | 6-bit IO data latch |
| `inf_1553` | read/write strobes for the 1553 chip |
| `clk_gen` | divides 24 MHz by two |
| `pim_pkg` | shared constants and types |

## The bus cycle

The active-high strobes `strba` and `strbd` mark the two phases of a cycle:

1. **Address phase.** The processor drives the address on `ad_i` with `strba`
   high and `strbd` low. On each rising `pclk` edge where `rdya` is also high,
   the address goes into `ia`. `rdya` comes from outside the module. Tie it high
   if no address-phase wait states are needed.
2. **Data phase.** `strbd` goes high. `ia` now drives the decoders, so the chip
   selects, `mem_addr` and the strobes (`mwr_n`, `mrd_n`, `iowr_n`) settle.
   `wait_st_logic` counts clocks from the start of `strbd`. Once the count
   reaches the selected number of wait states, `rdyd` goes high. The cycle ends
   on the first rising `pclk` edge where `strbd` and `rdyd` are both high.
   - On a write, `id` takes the bus data on that edge. The memories also get
     the data on `ram_wdata`, with check bits on `ram_wcheck`.
   - On a read (`rd_n` low), `ad_oe` is high and `ad_o` carries the word that
     `data_bus_routing` picked.

The bidirectional AD bus is split into `ad_i`, `ad_o` and `ad_oe`. The pad
driver belongs at the chip level. `start_cycle` is high during the first clock
of each data strobe. `m_ion` is high for memory cycles and low for IO cycles.
All chip selects also need `npu` high.

The processor's basic bus cycle is 4 clocks. The module does not depend on
that: all its timing counts from the strobes.

## Wait states

Each kind of access has its own two-bit wait select, giving 0 to 3 wait
states:

| access | condition | wait clocks |
|---|---|---|
| IO | `m_ion` = 0 | `iwsel` |
| 1553 chip | `cs1553_n` = 0 | until the chip pulls `rdy_1553_n` low |
| RAM | any `ram_cs_n` low | `ramwsel` + 1 (`EDAC_WAIT`) |
| PROM, other memory | otherwise | `promwsel` |

"Wait clocks" means the number of rising `pclk` edges, while `strbd` is high,
on which `rdyd` is still low. With a select of 0, `rdyd` is high in the first
data clock. The extra RAM wait state gives the EDAC time to encode the word on
writes, or to check and correct it on reads.

## Memory map

Addresses are word addresses. Without the MMU (`mmu_en` = 0) the decoders see
`{4'h0, ia}`. With the MMU they see `{mmua, ia[11:0]}`, captured on the rising
edge of `mmu_strobe`. `mem_addr` brings the selected address out.

PROM (`prom_cs_n`, decoded from address bits 19..14):

| select | windows |
|---|---|
| `prom_cs_n[0]` | 64000-67FFF and 00000-03FFF |
| `prom_cs_n[1]` | 04000-07FFF and 14000-17FFF |
| `prom_cs_n[2]` | 24000-27FFF and 34000-37FFF |
| `prom_cs_n[3]` | 44000-47FFF and 54000-57FFF |

RAM and 1553 (`ram_cs_n`, `cs1553_n`, decoded from address bits 19..12; the
RAM windows repeat in every 64 KW page, marked X):

| select | window |
|---|---|
| `ram_cs_n[0]` | XA000-XBFFF |
| `ram_cs_n[1]` | XC000-XDFFF |
| `ram_cs_n[2]` | XE000-XFFFF |
| `cs1553_n` | 08000-08FFF, only when `ext_ram_en` = 1 |
| `ram_cs_n[3]` | X8000-X9FFF, only when `ext_ram_en` = 0 (external RAM) |

IO space (`iocs_n`, full 16-bit IO address, `m_ion` = 0 and `strbd` high):
with `io_sel` = 0 only the BMU at 002Dh answers (`iocs_n[0]`). With `io_sel` =
1 only the AOCE at 0100h answers (`iocs_n[1]`).

All chip selects are active low.

## Error correction (EDAC)

Each RAM word stores 16 data bits and 6 check bits. The code is an extended
Hamming code that corrects any single-bit error and detects any double-bit
error:

- Data bit *i* takes the *i*-th position of a 21-bit Hamming codeword that is
  not a power of two: 3, 5, 6, 7, 9, ..., 15, 17, ..., 21.
- Check bit *k* (k = 0..4) is the XOR of the data bits whose position has bit
  *k* set.
- Check bit 5 makes the parity of all 22 bits even.

On a read the module recomputes the check bits and XORs them with the stored
ones to get a syndrome:

- **Odd overall parity, syndrome 1..21:** a single error. If the syndrome is a
  data position, that data bit is flipped. If it is a check position, nothing
  is flipped.
- **Odd parity, syndrome 0:** the overall parity bit itself was hit. The data
  is good.
- **Even parity with a nonzero syndrome, or odd parity with a syndrome above
  21:** an uncorrectable double error.

`edac_sec` and `edac_ded` show the state of the word being read. The sticky
flags `edac_sec_flag` and `edac_ded_flag` are set when a RAM read completes.
`por` or `edac_flag_clr` clears them. The corrected word is what the processor
receives.

## Read data routing and configuration word

On a read, `data_bus_routing` picks the first selected source in this order:

1. configuration latch (while `conf_n` is low)
2. PROM
3. RAM, after EDAC correction
4. the 1553 chip
5. the IO devices

If nothing is selected it returns 0. An assertion flags a read that completes
with no source.

The configuration latch is a real level-sensitive latch. It is transparent
while `por` is high and keeps the strap inputs `cfg_in` after that. The
processor reads it with its XIO RCW instruction, which pulls `conf_n` low
during an IO read. The bit meanings depend on the system (for example, an "MMU
fitted" bit), so they are left to the straps. Synthesis reports the 16 latch
bits on purpose.

## IO latch, 1553 strobes, clock

- `io_port` latches `ad_i[5:0]` on the completing clock of an IO write to a
  decoded IO device and holds it on `io_out`.
- `inf_1553` gives the 1553 chip `rd_1553_n` and `wr_1553_n` during the data
  strobe of a 1553 access. It also gives a buffer enable (`buf_1553_oe_n`) and
  a `busy_1553` indication while the chip's ready is pending.
- `clk_gen` is a toggle flip-flop that turns `clk_24m` into `clk_12m`. `por`
  clears it. It is a separate clock for peripherals that cannot run at 24 MHz.
  The bus logic itself runs on `pclk`.

## How far this follows its source, and where it departs

The following parts follow a published design description closely:

- the demultiplexer load conditions
- the 6-bit IO latch
- the divide-by-two clock
- the PROM, RAM, 1553 and IO address windows
- the EXT_RAM_EN rule
- the MMU address layout
- the four selectable wait states and the extra EDAC wait state
- the list of blocks

The following are this design's own choices, because the description gives
only a block name or function:

- **EDAC.** The description names it and says it costs one wait state. The
  SEC-DED code, the 6 check bits and the flag behaviour were chosen here.
- **Data bus routing and the 1553 interface.** Only named. The priority
  multiplexer and the strobe equations are the simplest logic that does the
  job.
- **Wait-state timing.** The exact counting, the timing of `start_cycle` and
  the strobe equations are not specified.
- **Configuration latch.** Loading from straps during reset is assumed.

Other departures and readings:

- The low window of `prom_cs_n[0]` is taken as 00000-03FFF, the processor's
  reset area. The other windows are given explicitly.
- The address of `ram_cs_n[3]` is not given. It is taken to be the 8000-9FFF
  window that the 1553 chip gives up when `ext_ram_en` is low.
- The address-state inputs (AS0-AS3) of the original decoders are not used,
  because their role is not described.
- The IO latch has separate clock and enable pins.
- `io_dec` has an address input and a two-bit output.
- The dual-port-RAM write strobe of an earlier interface for the MA31750
  processor is left out, since this module has no dual-port RAM.
- The address space is 20 bits (1 MW), as the MMU interface gives. The
  PACE1750A can address 2 MW of segmented memory, but nothing here produces a
  21st address bit.
- "Miscellaneous signals" of the original interface are not specified and are
  not implemented.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Time units
in the testbenches are arbitrary. Only clock ratios and cycle counts are
checked. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_p1750a_pim \
    rtl/pim_pkg.sv tb/tb_p1750a_pim.sv -y rtl
./obj_dir/Vtb_p1750a_pim
```

`tb_p1750a_pim` runs the whole module at its default parameters. It acts as
the processor and models the PROM, the RAM (with a fault injector for one or
two flipped bits), the 1553 chip (with a programmable ready delay) and the two
IO devices. It checks the latched address, `mem_addr`, the read data and the
wait-clock count of every cycle, and counts each mechanism: IO, PROM and RAM
wait states, the EDAC wait state, a corrected single error, a detected double
error, 1553 ready waits, MMU expansion, the `ext_ram_en` switch, the
configuration read, BMU and AOCE selection, the IO latch load and the clock
division. A mechanism that never happens counts as a failure.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `addr_data_demux` | `WIDTH` | 16 | bus width |
| `io_port` | `WIDTH` | 6 | latch width |
| `io_dec` | `BMU_ADDR`, `AOCE_ADDR` | 16'h002D, 16'h0100 | IO device addresses |
| `wait_st_logic` | `EDAC_WAIT` | 1 | extra RAM wait states for the EDAC |
