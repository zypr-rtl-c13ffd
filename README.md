# A static shell for partially reconfigured Zynq accelerators

On a Zynq or Zynq UltraScale+ SoC, a common setup keeps a fixed "static"
part of the programmable logic and swaps accelerators in and out of a few
reconfigurable regions while Linux keeps running on the ARM cores. The
static part has two jobs:

- It loads partial bitstreams quickly. Here the bitstream is pushed through
  the internal configuration port (ICAP) by DMA at one 32-bit word per
  clock, instead of going through the slow processor configuration path.
- It moves data to and from whatever accelerator is loaded at the moment.
  It can also chain several accelerators back to back inside the fabric,
  so a video stream passes through all of them without going back to DRAM.

This repository holds that static shell as parameterised, synthesizable
SystemVerilog. It is built around one idea. A single DMA engine and a
software-routed AXI-Stream switch do every stream transfer:

- To reconfigure a region, software points the switch's ICAP sink at the
  DMA and starts a DMA transfer of the bitstream.
- To run an accelerator, or a chain of them, software points the region
  inputs at the DMA, at the external input or at another region's output.

Software decides all routing. The hardware only guarantees that a new
route never cuts a packet in half.

## Block diagram

```
            AXI4-Lite (from the processor)
                    |
            axil_interconnect ----------------------------------+
           /        |          \            \                   |
   slot 0 /   slot 1|     slot 2 \      slot 3 \           slot 4 \
 axis_switch   icap_ctrl   pr_region_wrapper[0]  [1]            [2]
   ^  |          ^  |  \          ^  |            ^ |            ^ |
   |  |          |  |   ICAP pins rm_* ports of the reconfigurable modules
   |  +--- sinks: DMA S2MM, ICAP, ext out, region inputs
   +------ sources: DMA MM2S, ICAP readback, ext in, region outputs
```

The modules are:

- `zypr_shell`, the top.
- `axil_interconnect` splits processor accesses into 64 KiB windows.
- `axis_switch` is the stream crossbar.
- `icap_ctrl` is the PR controller.
- `pr_region_wrapper` gives every region the same outward interface,
  whatever the loaded module looks like.
- `axis_width_conv` converts between the 32-bit shell streams and a 64-bit
  (or other integer-multiple) module stream.
- `axil_regif` turns AXI4-Lite into simple register accesses. It is a
  helper used by the switch and the PR controller.
- `zypr_pkg` holds the shared types: `axil_req_t`/`axil_rsp_t` for AXI4-Lite
  and `axis_t` {tdata, tkeep, tlast, tvalid} for 32-bit AXI-Stream, with
  tready kept separate.

Everything runs on one clock with an asynchronous active-low reset. That
clock is 200 MHz on UltraScale+, where the ICAPE3 is rated for it.

### Address map

| Window | Address | Block |
|---|---|---|
| slot 0 | `BASE_ADDR + 0x0_0000` | stream switch |
| slot 1 | `BASE_ADDR + 0x1_0000` | PR controller |
| slot 2 + r | `BASE_ADDR + (2+r)*0x1_0000` | control port of region r |

- `BASE_ADDR` defaults to `0xA000_0000` and the window size is
  `2**SLOT_BITS` bytes.
- Addresses outside every window get `DECERR` and reach no slave.
- The interconnect forwards one transaction per channel at a time, with
  registered request and response.

### Stream endpoints

| index | source (into the switch) | sink (out of the switch) |
|---|---|---|
| 0 | DMA MM2S (memory to fabric) | DMA S2MM (fabric to memory) |
| 1 | ICAP readback data | ICAP bitstream input |
| 2 | external input `s_ext` | external output `m_ext` |
| 3 + r | output of region r | input of region r |

With three regions that makes six sources and six sinks. One to four
regions are supported, so the switch stays far below the 16-port limit of
the usual vendor switch. The limit is checked at elaboration.

## The stream switch and its commit rule

The switch holds one routing entry per sink:

| Offset | Register |
|---|---|
| `0x040 + 4k` | entry for sink k: bits [3:0] source index, bit 31 disable |
| `0x000` | CTRL, bit 1 COMMIT |
| `0x004` | IN_PKT: one bit per sink that is inside a packet |

Software writes the entries into a staging copy, then writes 1 to COMMIT.
Reading CTRL returns 1 while the commit is pending. The staged table does
not take effect at once:

1. From the commit request on, a sink that is between packets accepts no
   new first beat.
2. A sink that is inside a packet finishes it, up to and including tlast.
3. In the first cycle in which no sink is inside a packet, the whole staged
   table is copied into the active table.

A reroute therefore never splices two packets together. This matters most
when the DMA is moved from an accelerator to the ICAP: a half-delivered
image line must not be written into the configuration memory. The cost is
that one stalled packet anywhere delays the commit everywhere. To avoid
that, software should drain a stream before reconfiguring the path it uses.

Other rules:

- If two enabled sinks name the same source, only the lower-numbered sink
  is connected. There is no broadcast.
- After reset every sink is disabled.
- Data, keep, last and valid go straight through combinationally, and ready
  comes straight back, so a connection adds no latency and no bubbles.
- An assertion checks that no route changes while its sink is inside a
  packet.

### Chaining

A chain is nothing more than routing. For DMA → region 0 → region 1 →
region 2 → DMA:

```
sink 3 (region 0 in)  <- source 0 (DMA MM2S)
sink 4 (region 1 in)  <- source 3 (region 0 out)
sink 5 (region 2 in)  <- source 4 (region 1 out)
sink 0 (DMA S2MM)     <- source 5 (region 2 out)
```

Replace source 0 with source 2 and the chain is fed by a PL peripheral
such as a camera interface. The DMA is then free to load a bitstream into
a region that is not in the chain, at the same time.

## The PR controller (`icap_ctrl`)

### Writing a bitstream

- Every word accepted on `s_axis` is registered and driven onto the ICAP on
  the next cycle (CSIB and RDWRB low).
- The port takes one word per clock. At 200 MHz that is 800 MB/s, or 762.9
  MiB/s.
- `tkeep` is ignored, since bitstreams are whole words.
- With `BITSWAP=1` (the default) the bits inside every byte are reversed.
  This is the usual ordering for raw `.bin` bitstream files on the ICAP. Set
  `BITSWAP=0` if the files are already swapped.

### ICAP type

`ICAP_TYPE` selects the primitive and how completion is reported:

| ICAP_TYPE | Stall | DONE | ERROR |
|---|---|---|---|
| 3 (ICAPE3) | while AVAIL is low | rising edge of PRDONE | rising edge of PRERROR |
| 2 (ICAPE2) | no stall input | on the edge at which the port takes the `tlast` word | never |

DONE and ERROR are sticky.

### Registers

| Offset | Name | Bits |
|---|---|---|
| 0x00 | CTRL | [0] IRQ_EN; [1] RD_START (write 1); [2] CLEAR (write 1) |
| 0x04 | STATUS | [0] WR_BUSY; [1] DONE (W1C); [2] ERROR (W1C); [3] RD_BUSY; [4] AVAIL; [5] PRDONE; [6] PRERROR; [7] RD_DONE (W1C) |
| 0x08 | WORDS | words in the current or last bitstream |
| 0x0C | CYCLES | clock cycles from its first word to its last |
| 0x10 | RD_WORDS | readback length in words |
| 0x14 | RD_COUNT | words returned so far |
| 0x18 | INFO | ICAP_TYPE |

- CLEAR resets the sticky flags and the counters.
- `irq = IRQ_EN & (DONE | ERROR | RD_DONE)`, as a level.
- WORDS/CYCLES is the measured throughput. It is 1.0 whenever the DMA
  keeps up and AVAIL stays high.

A typical load:

1. Route sink 1 to source 0 and commit.
2. Set IRQ_EN.
3. Start the DMA for the bitstream buffer.
4. Return to other work, and take the interrupt.
5. Check DONE against ERROR, then write 1 to clear the flags.

### Readback

1. Write the readback command sequence to the ICAP as an ordinary
   bitstream.
2. Route sink 0 (DMA S2MM) to source 1 and set RD_WORDS.
3. Write RD_START.

The controller then:

- deselects the port for one cycle, switches RDWRB high and issues
  RD_WORDS reads;
- deselects the port again for one cycle before going back to write mode;
- returns the data on `m_axis`, with tlast on the last word.

Data arrive `READ_LAT` cycles (default 3) after a read is issued. The
controller issues a read only while its `RD_FIFO_DEPTH`-entry output FIFO
(default 8) has room for every word in flight. Back-pressure from the DMA
therefore loses nothing. While a readback runs, `s_axis` is not ready.

## Region wrappers (`pr_region_wrapper`)

Every region presents the same outward interface to the shell: one
AXI4-Lite slave and one 32-bit stream in each direction. On the module side
the wrapper has:

- A stream of `RM_AXIS_W` bits. If that differs from 32, an
  `axis_width_conv` is placed in each direction.
  - The upsizer fills the least significant lane first.
  - `tlast` closes a wide beat early; the empty lanes get tkeep=0 and zero
    data.
  - The downsizer drops trailing lanes whose keep is 0 and moves `tlast`
    to the last lane it sends.
  - Both keep the 32-bit side at one beat per clock.
- Tie-offs for interfaces that none of the region's modules uses:
  - `HAS_AXIS=0`: incoming data are accepted and discarded, so a mistaken
    route cannot hang the DMA, and the output never asserts valid.
  - `HAS_AXIL=0`: control accesses answer DECERR.

In the top, the `rm_*` ports are sized `RM_MAX_W` (64). Only the low
`REGION_AXIS_W[r]` bits of region r are used.

## Parameters of the top

| Parameter | Default | Meaning |
|---|---|---|
| `N_REGIONS` | 3 | reconfigurable regions, 1 to 4 |
| `REGION_AXIS_W` | `'{32,32,32,32}` | module stream width of each region, in bits (a multiple or divisor of 32) |
| `REGION_HAS_AXIS` / `REGION_HAS_AXIL` | `4'hF` | per-region interface presence |
| `ICAP_TYPE` | 3 | 3 = ICAPE3 (UltraScale+), 2 = ICAPE2 (7-series) |
| `BASE_ADDR`, `SLOT_BITS` | `0xA000_0000`, 16 | MMIO windows |
| `RM_MAX_W` | 64 | width of the `rm_*` stream ports |

## Where this design is its own

The overall structure follows the published ZyPR framework:

- one shared DMA;
- AXI-Stream switching controlled by software;
- a DMA-fed ICAP controller at 200 MHz (ICAPE3) or 100 MHz (ICAPE2) with
  status over AXI-Lite, an interrupt and readback;
- generated wrappers that tie off unused interfaces and convert widths;
- region chaining and external stream IO;
- one to four regions, 32-bit AXI4-Lite and AXI4-Stream buses.

The following are choices of this implementation:

- **This RTL replaces vendor IP.** The framework uses the vendor's AXI
  interconnect and AXI-Stream switch. This RTL implements both, and its
  switch register layout imitates the vendor switch's. The DMA engine, the
  processor system and the ICAP primitive are not part of the RTL; their
  signals are ports of the top.
- **One clock.** The framework can run the accelerators on a slower clock
  than the ICAP. This shell has no clock-domain crossing, so slower modules
  need their own crossing logic inside the region.
- **No separate reconfiguration DMA.** The framework can optionally give
  the ICAP its own DMA engine; this shell always shares one.
- **No decoupler.** Region outputs are not isolated during
  reconfiguration. Software must not route a region that is being
  reconfigured (a disabled switch entry is enough). A region whose outputs
  glitch while it is loaded can still raise valid. Nothing is connected to
  it, so no data are taken.
- **The stream switch is always present.** The framework leaves the
  switch out when no accelerator has a stream interface. Here the switch
  also steers the shared DMA to the ICAP, so it is kept in every
  configuration; with `REGION_HAS_AXIS = 0` it only serves the DMA, the
  ICAP and the external stream.
- **Only AXI4-Lite and AXI-Stream.** The framework's wrappers can also
  carry GPIO, interrupt and clock/reset interfaces of the modules. These
  wrappers cannot.
- **Choices made where the framework says nothing:** the register maps,
  the endpoint numbering, the commit rule, the bit reversal, the readback
  latency and FIFO, and DECERR for unmapped addresses.

## Simulating

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it tests |
|---|---|
| `tb_icap_ctrl` | ICAPE3 and ICAPE2 loads, checksums, AVAIL stalls, PRDONE/PRERROR, interrupt, readback under back-pressure, cycle count |
| `tb_axis_switch` | random routing, packet integrity, commit deferred to packet boundaries, source priority |
| `tb_axil_interconnect` | decoding, DECERR, random slave stalls |
| `tb_axis_width_conv` | 32↔64 random packets with stalls; full rate |
| `tb_pr_region_wrapper` | 64-bit module behind the wrapper, and the tie-offs |
| `tb_zypr_shell` | end to end, with a 64-bit region (details below) |
| `tb_zypr_full` | the top at its default parameters and full size (details below) |
| `tb_zypr_lite` | two control-only regions (no stream port) with an ICAPE2 at 100 MHz: load rate and DONE timing, per-region control windows, the stream tie-off, DECERR |

`tb_zypr_shell` runs the whole system with a 64-bit region and counts each
mechanism:

- bitstream loads with AVAIL stalls;
- a mode switch by reloading a region;
- chained video frames;
- a deferred commit;
- a load while a chain streams from the external input;
- readback;
- a PR error;
- a decode error.

It fails if any of them never happens.

`tb_zypr_full` runs the top at its default parameters, clocked at 200 MHz:

- It loads bitstreams of 5.430, 2.565 and 1.330 MiB: 1,423,442, 672,399
  and 348,652 words. Each takes exactly as many cycles as it has words,
  which is 762.9 MiB/s. The 1.330 MiB one takes 1.743 ms.
- It then sends one 1920×1080 frame of 32-bit pixels, one packet per line,
  through all three regions in a chain. This takes 12.4 ms with random gaps
  at the source and stalls at the sink, inside the 33.3 ms period of a
  30 frame/s camera.

The testbenches use these behavioural models:

- `icape3_model`, an ICAP with sync-word detection, PRDONE/PRERROR, AVAIL
  stalls and readback;
- `rm_model`, a keyed XOR/ADD stream module with a control register;
- `axil_mem_slave`;
- `axil_bfm`.

The simulator finds these models through the library path (`-y tb`).
With Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  --top-module tb_zypr_shell rtl/zypr_pkg.sv tb/tb_zypr_shell.sv
./obj_dir/Vtb_zypr_shell
```

Swap in any other testbench name. `tb_zypr_full` runs for a few seconds.
To lint or synthesize the shell alone, use `--lint-only -Wall` with
`--top-module zypr_shell rtl/zypr_pkg.sv rtl/zypr_shell.sv`. With the
default three 32-bit regions, a generic synthesis gives about 580 cells and
500 flip-flops, plus a 256-bit readback FIFO.

### Known lint messages

- Verilator reports `SYNCASYNCNET` for `rst_n` because the route-stability
  assertion samples it. The assertion is not synthesized and the warning
  is harmless.
- Unused-bit warnings remain on the register-interface helper.
- A `UNOPTFLAT` warning in `tb_zypr_shell` comes from the combinational
  ready path through the switch and the modules. This path has no real
  loop, because every stream is only ever routed between different
  endpoints.
