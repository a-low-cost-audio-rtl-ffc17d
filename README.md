# LIT: digital core of a low-cost audio computer

LIT is a single-chip audio computer meant to cost under a dollar. It plays,
records and passes on spoken information for people who cannot read, and it
runs for a long time on carbon-zinc cells. Two ideas keep it cheap:

* **No NOR Flash, no DRAM.** Program code and data live in a cheap NAND Flash
  chip. NAND cannot be executed in place, so the processor (an ARM Cortex-M0)
  runs out of a 128 kB on-chip cache. There is no hardware line fill. A cache
  miss becomes a bus error. A fault handler, kept in a part of the cache that
  is never evicted, copies the line from NAND Flash and installs it.
* **Aggressive power management on a 32 kHz clock.** A small wakeup
  controller moves the chip between Active, Standby and Deep Sleep. It
  switches the regulators and the clock generator, gates the core clock and
  power-gates the cache in 8 kB slices. It watches the touch sensors, GPIO
  pins and a wake timer while everything else is off. A brown-out detector
  with *lock-off* stops a sagging battery from cycling the chip in and out of
  reset.

This repository holds synthesizable SystemVerilog for the digital part of
the chip, plus self-checking testbenches. The processor, the boot ROM
contents, the NAND Flash controller and every analog circuit (regulators,
converters, clock generator, touch-sensor converters, ADC, audio amplifier)
are outside it. They connect to `lit_top` through ports.

## Block map

| Module | Role |
|---|---|
| `lit_top` | Wires everything together; ports for the core, ROM, NAND controller and analog parts |
| `ahb_lite_mux` | AHB-Lite address decoder and response mux for one master and five slaves, with a default slave that answers ERROR |
| `ahb_slave_bridge` | Turns an AHB transfer into a one-shot request; a slave `fault` becomes the two-cycle ERROR response |
| `lit_cache` | 128 kB, 4-way, true-LRU cache, filled by software, with pinning and bank power gating |
| `true_lru` | Pairwise-order LRU word for four ways: update on use, pick a victim that skips excluded ways |
| `sram_sp` | Single-port SRAM bank with byte mask and a power switch (a powered-down bank reads 0) |
| `lit_dsram` | 2 kB Deep Sleep code memory (512 x 32), never power gated |
| `lit_sysctrl` | Register block: cache control, fault address, clocks, converter, doubler, link; hosts the WIC, timer and GPIO registers |
| `lit_wic` | Wakeup interrupt controller: mode state machine on 32 kHz, wake sequence, power and clock enables |
| `lit_wake_timer` | 32-bit counter on the 32 kHz clock with an alarm |
| `lit_gpio` | 27-bit GPIO with a per-pin wake enable and wake level |
| `bod_lockoff` | Lock-off logic of the power-on reset / brown-out detector (asynchronous, no clock) |
| `bod_comparators` | Behavioural model of the two analog threshold comparators (1.7 V and 1.2 V) |
| `lit_clkdiv` | 512 MHz → /2 → /n → /2 system clock chain, with a slow setting for Standby |
| `clk_gate` | Latch-based clock gate for the core clock |
| `scn_switch_ctrl` | Switch drive of the switched-capacitor boost converter: one schedule per step-down ratio, bypass, power gating |
| `doubler_clk_ctrl` | Voltage doubler clock: glitch-free choice between the core clock and the doubler's oscillator, then two non-overlapping phases |
| `clk_mux_gf`, `nonoverlap_gen`, `sync2` | Helpers: glitch-free clock mux, two-phase generator, two-flop synchroniser |
| `manchester_codec` | Manchester encoder and decoder for the near-field coil link |
| `lit_pkg` | Shared constants, the power-mode and converter enums, and the converter switch table |

Everything on the bus runs on the divided system clock. The wakeup
controller's state machine and the wake timer run on the 32 kHz crystal
clock. Reset everywhere is the lock-off circuit's RESETn, applied
asynchronously.

## The software-filled cache

### Organisation

| Item | Value |
|---|---|
| Capacity | 128 kB = 512 sets x 4 ways x 64-byte lines |
| Address (byte, within the cache window) | `tag[19:15]` `set[14:6]` `word[5:2]` `byte[1:0]` |
| Data banks | 16 banks of 2048 x 32 bit (8 kB). Bank number = `{way, set[8:7]}`, so each way owns four banks |
| Tag banks | 4 banks of 512 x 5 bit, one per way |
| LRU bank | 1 bank of 512 x 6 bit |
| Valid bits | 2048 flip-flops, one per line |

The tag is 5 bits wide. So the cache can tell apart the lines of a 1 MB
window, mapped at `0x1000_0000` on the bus. The chip was aimed at code
spaces of up to 16 MB. Setting `TAG_W = 9` covers that with no other
change, but the default stays at the 5-bit tag of the original bank layout.

Valid bits are flip-flops rather than a seventh bank. That lets a bank that
is powered down invalidate its 128 lines in a single clock.

### What a miss looks like to software

1. A load or store to the cache window misses. The cache completes the
   request with `fault` and changes nothing. The bridge answers the core with
   the two-cycle AHB ERROR response, which the Cortex-M0 takes as a precise
   bus fault.
2. The fault handler reads `FAULT_STAT` (bit 0: a miss happened; bit 1: it
   was below the pin line; reading clears it). It then reads `FAULT_ADDR`,
   the offset of the access that missed.
3. The handler writes the line's offset to `CACHE_ALLOC`. The bus stalls for
   a few clocks while the cache picks a victim:
   * an invalid way first;
   * otherwise the least recently used way that is not pinned;
   * failing that, the next oldest, and so on.

   The cache installs the new tag, marks the line valid and most recently
   used, and reports what it displaced.
4. The handler reads `CACHE_ALLOC`: `[0]` ok, `[1]` a valid line was evicted,
   `[3:2]` the way. If a line was evicted, `EVICT_ADDR` holds its offset.
   Nothing is ever written back by hardware. If the evicted line held data
   that matters, software saves it.
5. The handler copies the 16 words from NAND Flash with ordinary stores into
   the cache window. These stores now hit. Then it returns, and the faulting
   instruction runs again and hits.

If all four ways of the set are pinned, `CACHE_ALLOC` reads back with
`ok = 0` and nothing changes.

### Pinning

`CACHE_PIN` holds a byte offset. Every line that starts below it is never
chosen as a victim. The handler itself, the flash translation layer and
anything else that must not miss live there. Software loads them once after
boot.

### Access timing

The cache takes a request while `idle`. It reads the tag, LRU and data banks
in that cycle, and answers in the next cycle with `done` plus `fault` or
read data. A write that hits takes effect in the same cycle, under its byte
enables. Seen from the bus, a hit costs one wait state. A miss costs one wait
state plus the two ERROR cycles.

### Power gating

`bank_pwr[15:0]` switches the data banks and `tag_pwr` switches the tag and
LRU banks; both come from the wakeup controller. A bank that loses power
loses its lines: their valid bits clear. The tag and LRU banks stay powered
whenever any data bank is, so the surviving lines stay usable.

## Power modes and the wakeup controller

| Mode | Active LDO | Clock generator | Core clock | Cache | Left by |
|---|---|---|---|---|---|
| Active | on | running at `div_act` | running | on | `CMD` write |
| Standby | on | slowed to `div_slow` (4 MHz after reset) | gated | on | any enabled wake event |
| Deep Sleep | off (`sleep_mode` = 1), Dirty LDO off | stopped | gated | only the banks set in `BANKS` | enabled touch-sensor, GPIO or timer event |

Software enters a mode by writing `WIC CMD` (1 = Standby, 2 = Deep Sleep).
The state machine runs on the 32 kHz clock. The command crosses into that
domain through a toggle synchroniser. Each wake source passes through a
two-flop synchroniser before it is seen.

Leaving Deep Sleep takes four steps, so that the whole chip does not start
drawing current at once:

1. **WAKE_LDO.** Turn the Active LDO on. Wait `wake_delay` 32 kHz cycles
   (`CTRL[7:0]`, reset value 4).
2. **WAKE_CLK.** Start the clock generator.
3. **WAKE_MEM.** One 32 kHz cycle later, power the whole cache.
4. **ACTIVE.** One 32 kHz cycle later, ungate the core clock.

`STATUS[6:4]` records which sources caused the last wakeup (timer, GPIO,
touch sensor). `CTRL[11]` enables the Dirty LDO (the I/O supply for a 1.8 V
NAND Flash). `CTRL[12]` connects the core supply straight to the battery.
Software sets it once the ADC shows the battery too low for the regulator.

The ten touch-sensor converters each raise an event line (`cdc_event`). The
controller ORs them into one wake source. Which sensor fired is left to the
converters' own registers, outside this design.

## Brown-out lock-off

A carbon-zinc cell recovers a little once its load goes away. A plain
brown-out detector would release reset, load the cell, drop it below the
threshold again, and oscillate. `bod_lockoff` prevents that with three
storage elements:

| Element | Set when | Cleared when |
|---|---|---|
| FF1 | both comparators are low (battery below 1.2 V) | RESETn is high |
| FF2 (edge-triggered) | captures FF1 when `comp_hi & comp_lo` rises | RESETn is high |
| FF3 = RESETn | FF2 is 1 | `comp_hi` is low (battery below 1.7 V) |

* **Fresh battery.** FF1 is set. The battery rising past 1.7 V clocks a 1
  into FF2, which releases reset.
* **Dip below 1.7 V that recovers.** The rising edge finds FF1 clear, so the
  chip stays in reset.
* **Start again.** The battery has to fall below 1.2 V first (a removed or
  exhausted cell).

FF1 and FF3 are written as latches on purpose. There is no clock in this
circuit.

## Clocks

`lit_clkdiv` divides the 512 MHz generator output by 2 (`clk_half`, 256 MHz,
for the audio amplifier and NAND controller), then by n, then by 2:

* n = 2 gives 64 MHz, the speed needed for time-stretched playback;
* n = 32 gives 4 MHz for light loads.

`CLK_CFG[7:0]` is n in Active and `[15:8]` is n in Standby. Each stage is a
registered counter, so changing n never makes a glitch. The core clock is the
system clock through a latch-based clock gate that the wakeup controller
closes in Standby and Deep Sleep.

The voltage doubler's charge pump runs from the core clock when off-chip
traffic is heavy, or from its own slow oscillator otherwise (`DBL_CFG[0]`).
The choice goes through a glitch-free clock multiplexer. A two-phase
non-overlapping generator then drives the pump switches.

## Switched-capacitor boost converter

The converter keeps a 3.2 V rail (for a 3.2 V NAND Flash and the radio)
within about 10 % while the battery falls from 3.2 V to 1.7 V, using no
inductor:

* a step-down network of capacitors and eleven switches (ck1 to ck11) makes
  25, 33, 50, 66, 75 or 100 % of the battery voltage;
* a step-up stage adds the battery voltage on top of that.

`scn_switch_ctrl` drives the eleven switches. For each ratio, every switch is
always open, always closed, closed in phase 1 or closed in phase 2. The table
is `scn_switch_mode()` in `lit_pkg`. The switch outputs are registered one
clock after the phases, so the two phases never overlap at the switches.
`SCN_CFG` selects the ratio, enables the converter, or bypasses it (all
network switches open, the battery straight to the output). Choosing the
ratio from the battery voltage is software's job. Roughly:

| Battery | Setting | Output |
|---|---|---|
| above 2.88 V | bypass | the battery voltage |
| 2.3–2.8 V | 25 % | 1.25 x battery |
| 2.2–2.6 V | 33 % | 1.33 x battery |
| 1.9–2.3 V | 50 % | 1.5 x battery |
| 1.75–2.1 V | 66 % | 1.66 x battery |
| 1.65–2.0 V | 75 % | 1.75 x battery |
| below 1.75 V | 100 % | 2 x battery |

Between about 2.82 V and 2.88 V the nearest setting lands up to about 1 %
outside the ±10 % band.

## Near-field coil link

Two devices exchange content over a coil traced on the board.
`manchester_codec` sends and receives bytes:

* each bit has a transition in its middle: 0 is high-then-low, 1 is
  low-then-high;
* a frame is a start bit (a 0), eight data bits LSB first, and at least one
  idle bit time;
* the line idles low.

`CLK_PER_BIT = 96` gives 667 kbit/s at 64 MHz. The decoder samples each half
bit in its middle. It reports `rx_err` for a bit without a mid-bit
transition. In the register block, a write to `LINK_TX` stalls the bus until
the encoder takes the byte. `LINK_RX` returns the last byte with "new" and
"error" flags, which clear on read.

## Memory map and registers

| Base | Size | Slave |
|---|---|---|
| `0x0000_0000` | 512 B | boot ROM (outside, `rom_h*` ports) |
| `0x1000_0000` | 1 MB | cache window |
| `0x2000_0000` | 2 kB | Deep Sleep code memory |
| `0x4000_0000` | 4 kB | system control registers |
| `0x4001_0000` | 64 kB | NAND Flash controller (outside, `nand_h*` ports) |
| anything else | | ERROR response |

System control registers (offsets from `0x4000_0000`):

| Offset | Name | Contents |
|---|---|---|
| 0x000 | WIC CTRL | `[7:0]` wake delay, `[10:8]` wake enables (timer, GPIO, touch), `[11]` Dirty LDO, `[12]` battery bypass |
| 0x004 | WIC BANKS | `[15:0]` data banks kept powered in Deep Sleep |
| 0x008 | WIC CMD | write 1: Standby, 2: Deep Sleep |
| 0x00C | WIC STATUS | `[2:0]` mode, `[6:4]` last wake causes |
| 0x010 | CACHE_PIN | pin line (byte offset) |
| 0x014 | CACHE_ALLOC | write: allocate the line with this offset; read: `[0]` ok, `[1]` evicted, `[3:2]` way |
| 0x018 | EVICT_ADDR | offset of the evicted line |
| 0x01C | FAULT_ADDR | offset of the last miss |
| 0x020 | FAULT_STAT | `[0]` miss seen, `[1]` below the pin line; read clears |
| 0x024 | CLK_CFG | `[7:0]` n in Active (2), `[15:8]` n in Standby (32) |
| 0x028 | SCN_CFG | `[2:0]` ratio (0 = 25 %, 1 = 33 %, 2 = 50 %, 3 = 66 %, 4 = 75 %, 5 = 100 %), `[3]` enable, `[4]` bypass |
| 0x02C | DBL_CFG | `[0]` use the doubler's oscillator, `[1]` enable (reset 1) |
| 0x030 | TIMER ALARM | alarm count; takes effect at the next CTRL write |
| 0x034 | TIMER NOW | current 32 kHz count |
| 0x038 | TIMER CTRL | write `[0]` arm, `[1]` clear; read `[0]` armed, `[1]` pending, `[2]` a write still crossing to 32 kHz |
| 0x040–0x050 | GPIO | OUT, OE, IN, WAKE_EN, WAKE_LVL |
| 0x060 | LINK_TX | byte to send |
| 0x064 | LINK_RX | `[7:0]` byte, `[8]` new, `[9]` framing error; read clears the flags |

Configuration writes that cross into the 32 kHz domain take about three
32 kHz cycles. Software polls the timer's `CTRL[2]` before it relies on a
change.

## Where this design departs from the original chip

* **Design choices of this RTL**, each needed because the original
  description does not give it:
  * the allocation command and eviction report;
  * the register map and memory map;
  * the two-cycle cache timing;
  * the frame format of the coil link;
  * the phase lengths of the converter and doubler clocks;
  * the wake timer's width;
  * all reset values.
* **Cache window of 1 MB.** The original stores 5 tag bits per line, which
  spans 1 MB, yet aims at code spaces up to 16 MB. This RTL keeps the 5-bit
  tag as the default. `TAG_W` widens it.
* **LRU storage.** One 512 x 6 bank holds the six pairwise order bits of
  each set.
* **Touch-sensor events are ORed** into one wake source.
* **Comparators.** `bod_comparators` is a behavioural stand-in for the
  analog comparators, with no hysteresis.
* **Converter clock.** The converter's switch control runs on the system
  clock. The original does not say which clock it uses.
* **Not here:**
  * the Cortex-M0;
  * the boot ROM contents (including the refill routine);
  * the NAND Flash controller;
  * SPI, I2S, the general timers and watchdog, JTAG, the LED drivers;
  * the ADC and the touch-sensor converters;
  * the class-D amplifier and the microphone amplifier;
  * the 512 MHz and 32 kHz oscillators;
  * all regulators, references and power stages.

  Their connections are ports of `lit_top`.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops. The simulator needs timing
support:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_lit_top -y rtl -y tb +libext+.sv rtl/lit_pkg.sv tb/tb_lit_top.sv
./obj_dir/Vtb_lit_top
```

Replace `tb_lit_top` with any other testbench name. Testbenches initialise
everything they read, so two-state simulation with random initial values is
fine (`+verilator+rand+reset+2`).

`tb_lit_top` is the end-to-end test. It runs the full-size design, with no
parameters changed, for about 2.3 ms of simulated time (about a second of
run time). Its parts:

* `ahb_master_bfm`, a pipelined AHB master, plays the processor and the
  software;
* small models answer for the boot ROM and a NAND Flash controller that
  streams a known flash image;
* the coil output is looped back to the coil input.

It runs:

* the battery ramp-up;
* hundreds of random loads and stores over a working set larger than the
  associativity. Each miss goes through the full handler sequence above. A
  reference list of resident lines, kept from the eviction reports, predicts
  hit or miss and the data of every access;
* a fully pinned set that refuses allocation;
* Standby with a GPIO wake;
* Deep Sleep with one way's banks kept and a timer wake (checking the wake
  order and which lines survive);
* Deep Sleep with a touch-sensor wake;
* clock changes, the converter and bypass, both doubler clocks and the coil
  link;
* a brown-out with lock-off and restart.

At the end it lists how often each mechanism happened. It counts a failure
for any that never did.

`tb_lit_top_retention` runs the Deep Sleep retention options at full size.
The options are no bank kept, 8 kB, 32 kB, 64 kB (two patterns) and 128 kB.
For each option it:

1. fills lines into all sixteen banks;
2. sleeps and wakes on a GPIO pin;
3. checks that exactly the lines in kept banks survive, and that the 2 kB
   Deep Sleep memory keeps its contents.

The block testbenches compare against reference models written in the
testbench:

| Testbench | Reference |
|---|---|
| `tb_lit_cache` | a full cache model with the LRU order |
| `tb_scn_switch_ctrl` | a second copy of the switch table |
| `tb_manchester_codec` | a line monitor that decodes the waveform on its own |
