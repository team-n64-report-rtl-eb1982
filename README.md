# An FPGA Nintendo 64 without the graphics co-processor

This is a Nintendo 64 console system rebuilt for a Nexys 4 class FPGA board, minus the
Reality Co-Processor. The on-board parts stand in for the original hardware:

- A 16 MB Micron cellular RAM (pseudo-SRAM) replaces the 4 MB Rambus RDRAM.
- A microSD card in SPI mode replaces the cartridge.
- A VGA connector replaces the composite output.
- An I2S PCM DAC (a Pmod) replaces the audio DAC.
- Original controllers still connect through their one-wire serial line.

The heart of it is a 64-bit MIPS (VR4300-style) five-stage pipeline with split L1 caches. Its
only path to the outside world is one memory controller, which owns the whole physical address
map.

Everything is in synthesizable SystemVerilog in `rtl/`. Self-checking testbenches and
behavioural models of the external chips are in `tb/`.

## Block diagram

```
            +--------------------------- n64_top ---------------------------+
            |                                                               |
            |  n64_cpu --- n64_icache --+                                   |
            |     |                     +-- n64_cpu_memif --+               |
            |     +------- n64_dcache --+                   |               |
            |                                               v               |
 cellular   |  n64_cellram_ctrl <------------------- n64_mem_ctrl ---------------> PIF ROM load
 RAM  <---------------------------------------------  |  |  |  |  |         |
            |          n64_framebuffer (BRAM) <--------+  |  |  |  +-- n64_dma
            |              | port B                      |  |  |              |
            |  n64_vga_timing -> n64_vi -----------------|--|--|-------------------> VGA
            |                  n64_pifrom, SP DMEM/IMEM -+  |  |              |
            |  n64_pifram <------------------------------ --+  |              |
            |      | port B                                   |              |
            |  n64_si (50 MHz) <-> n64_joybus x2 (4 MHz) ---------------------------> controllers
            |  n64_pi (512-byte sector cache) <- n64_sd_spi ----------------------> SD card
            |  n64_ai = n64_fifo -> n64_i2s_tx ----------------------------------> PCM DAC
            +---------------------------------------------------------------+
```

## The system bus

Every memory-side interface uses the two structs in `n64_pkg`:

- `mem_req_t {req, we, addr[31:0], wdata[63:0], be[7:0]}`
- `mem_rsp_t {ack, rdata[63:0]}`

The bus rules:

- A master raises `req` and holds all request fields until it sees `ack`.
- `ack` is a one-cycle pulse, and `rdata` is valid in that same cycle.
- The bus is big-endian, as the MIPS core is. Byte `k` of a doubleword is `[63-8k -: 8]` and is enabled by `be[7-k]`.
- A 32-bit register at an address with `addr[2]==0` sits in the upper half.

Some slaves answer in the cycle they see the request (a cache hit, a PI sector hit). Others
answer a fixed number of cycles later (block RAM, registers) or when an external device is done
(cellular RAM, SD card).

`n64_cpu_memif` puts the instruction-cache and data-cache refills onto the single bus:

- The data side has priority.
- A grant is held until its `ack`.

## Memory controller and address map

`n64_mem_ctrl` serves one access at a time:

| physical range               | what                                           |
|------------------------------|------------------------------------------------|
| 0x0000_0000 – 0x03EF_FFFF    | RDRAM, held in cellular RAM (minus the frame-buffer window) |
| frame-buffer window (VI_ORIGIN, 153,600 bytes) | dual-port block RAM                  |
| 0x0400_0000 / 0x0400_1000    | SP DMEM / SP IMEM, 1 KB each                    |
| 0x0440_0000 VI, 0x0450_0000 AI, 0x0460_0000 PI, 0x0480_0000 SI | registers    |
| 0x1000_0000 – 0x1FBF_FFFF    | cartridge, through the peripheral interface     |
| 0x1FC0_0000 – 0x1FC0_07BF    | PIF boot ROM                                    |
| 0x1FC0_07C0 – 0x1FC0_07FF    | PIF RAM (64 bytes)                              |

### The frame buffer

The cellular RAM is too slow to stream a 320x240 picture at 16 bits per pixel to VGA. So the
frame buffer lives in block RAM, outside main memory:

- A write that falls into the window starting at the VI_ORIGIN register goes to block RAM, not to RAM.
- The first VI_ORIGIN write after reset is ignored (`SKIP_ORIGIN`). A game that boots with one buffer and then moves to a second one is shown from the second.
- Real double buffering is not modelled: later VI_ORIGIN writes move the window, but the block RAM keeps its contents.

### DMA

`n64_dma` copies in 32-byte chunks: four 64-bit reads into a small buffer, then four writes. Both
addresses advance each chunk.

Two DMAs are started through registers:

- The PI DMA copies cartridge to RDRAM. It starts on a write to PI_WR_LEN and copies length+1 bytes.
- The SI DMA moves 64 bytes between PIF RAM and RDRAM, in either direction.

While a DMA runs, the CPU is held. From the program's point of view the DMA finishes instantly.

### Cellular RAM controller

`n64_cellram_ctrl` drives the chip in its asynchronous mode:

- The chip's clock and ADV# are held inactive, so the chip never tries to run synchronously.
- Each 16-bit access holds its address and strobes for `ACCESS_CYC` = 4 cycles (80 ns against a 70 ns part).
- One recovery cycle follows each access.
- A 64-bit bus word is four such accesses, most significant half-word first. That is 21 cycles from request to `ack`.

The synchronous burst mode (up to 104 MHz) is not used.

## CPU

`n64_cpu` is a scalar in-order pipeline with five stages:

- **IF** fetches through the instruction cache.
- **RF** decodes and reads the 32×64-bit register file. The register file passes through a value being written back in the same cycle.
- **EX** does ALU work, computes branch targets and addresses.
- **DC** accesses the data cache.
- **WB** writes the register file.

Points that are easy to get wrong:

- **Forwarding.** Results in DC (non-loads) and WB forward into EX. A destination of r0 is never forwarded. While EX is stalled, its operands keep picking up forwarded values, so none is lost.
- **Load-use.** An instruction that needs a value still being loaded in DC waits one cycle and takes the value from WB. If a data-cache stall leaves EX empty, EX refills during the stall, so no bubble is wasted.
- **Branches.** Every branch and jump has one delay slot. The branch-likely forms (BEQL, BNEL, …) cancel the delay-slot instruction when the branch is not taken.
- **Multiply/divide.** MULT/DIV/DMULT/DDIV and their unsigned forms run in `n64_muldiv`. Multiply takes one cycle; divide is a restoring divider that produces one quotient bit per cycle. MFHI/MFLO stall until the result is there.
- **Segments.** kseg0 (0x8000_0000–0x9FFF_FFFF) is cached and kseg1 (0xA000_0000–) is uncached. In both, the physical address is `vaddr[28:0]`. There is no TLB.
- **COP0.** MTC0/MFC0 reach a small COP0 register file, and CACHE operations are passed to the caches.

**Not built:** interrupts, exceptions, the TLB and the FPU (COP1). Without interrupts a
commercial game leaves the correct path at its first interrupt. The original system's FPU was
built from vendor floating-point cores and was never joined to the CPU.

### Caches

Both caches are direct mapped, and a miss stalls the pipeline.

- `n64_icache`: 16 KB with 32-byte lines, filled with four 64-bit bus reads.
- `n64_dcache`: 8 KB with 16-byte lines, write-back and write-allocate. A dirty victim goes into a write-back buffer (below).

Both caches also behave as follows:

- They sit in front of the bus as slaves. A hit is answered in the cycle after the request.
- Uncached accesses pass straight through.
- A CACHE instruction invalidates an instruction line. For a data line it writes the line back if dirty, then invalidates it.

### Write-back buffer

A dirty victim is not written to memory before the refill. Instead:

1. The cache copies the victim into a one-line buffer. This reads its own RAM and uses no bus cycles.
2. It fetches the missing line, and the CPU restarts.
3. The buffer then drains to memory in the background, while cache hits go on.

The buffer never loses or returns stale data:

- A second miss, an uncached access or a CACHE operation waits until the buffer is empty. So a drain's bus request is never cut off, and memory is never read before the drain lands.
- The victim line is gone from the cache, so a hit cannot see it either.

The original design sized this buffer at up to 32 bytes. One miss evicts only a 16-byte line,
so one line is all this buffer holds.

## Cartridge: peripheral interface and SD card

The SD card holds a raw ROM image, starting at card byte 0.

`n64_sd_spi` brings the card up in SPI mode:

- Wait for power-up, then send 80 dummy clocks at about 390 kHz.
- Send CMD0, then CMD55/ACMD41 until the card leaves idle, then CMD16 (512-byte blocks).
- Switch to clk/2 (25 MHz) and serve 512-byte CMD17 block reads.

`n64_pi` keeps one 512-byte sector in a cache:

- A cartridge read that hits returns 64 bits in the same cycle.
- On a miss the whole cache is cleared and the sector is refilled from the card.
- A doubleword that straddles two sectors keeps the bytes it already found and refills for the rest.
- PI status bit 1 stays high until the card is ready.

## Controllers: serial interface and joybus

Controllers use one open-drain line at 250 kbit/s:

- A 0 bit is 3 µs low then 1 µs high; a 1 bit is 1 µs low then 3 µs high.
- A message ends with a stop bit.

`n64_joybus` runs at 4 MHz:

- It sends an 8-bit command, then releases the line.
- It samples each response bit 7 cycles (1.75 µs) after the bit's falling edge.
- It reports "no response" after `TIMEOUT_CYC` quiet cycles.

`n64_si` runs at 50 MHz. On a start (PIF RAM word 15, bit 0, written by the CPU or by SI DMA):

- It reads one command word per channel from PIF RAM: 0x00 identify, 0x01 poll, 0xFF reset.
- It hands each command to that channel's joybus across the clock domains. The hand-off is a toggle flag with two-flop synchronisers; the command is held stable while the flag crosses.
- It writes the 24- or 32-bit response back.

A channel is never polled again within `POLL_GAP` system cycles (18,750, i.e. 0.375 ms) of its
last command, because a controller polled too quickly does not answer. The CIC seed 0x3F3F sits in
PIF RAM word 9 after reset; it is the value a CIC-6102 cartridge expects.

## Video

`n64_vga_timing` produces standard 640x480 at 60 Hz with a pixel enable of clk/2.

`n64_vi`:

- It places the 320x240 frame buffer in the centre of the screen, at offset (160,120), one screen pixel per frame-buffer pixel.
- It reads four 5:5:5:1 pixels per block-RAM word and sends the top four bits of each colour to the 12-bit VGA port.
- Sync is delayed to match the two-cycle read.

## Audio

The AI data register pushes a 32-bit stereo sample (left in the upper half) into a 16-deep
`n64_fifo`.

`n64_i2s_tx` serialises it:

- MCLK = clk/4, SCLK = MCLK/8, LRCK = SCLK/32. That gives a 48.8 kHz frame at 50 MHz.
- It flags an underrun when the FIFO is empty at a frame start.

AI status reads `{full, level}`.

## Departures from the original system

- The system clock is 50 MHz throughout. The original CPU aimed at 75 MHz.
- There are no interrupts, TLB, FPU, RSP or RDP.
- The write-back buffer holds one 16-byte line rather than 32 bytes.
- The cellular RAM runs only in asynchronous mode.
- The frame buffer sits outside RAM, and the first VI_ORIGIN write is skipped.
- Register offsets follow the public N64 map. Only the registers listed above do anything; the rest only hold what is written.
- The SD controller is written from the SD SPI protocol. The original used a third-party core.
- The PIF boot code is not included. The ROM is filled through the `rom_ld_*` port while reset is held, or from `INIT_FILE` in `n64_pifrom`.

## What fits

- Both small games written for this machine fit: a Tron-like game and Pong. They need the 153,600-byte frame buffer (320×240×2), the CPU, VI and controllers, all of which are here.
- Namco Museum 64 fits in memory: 4 MB of RDRAM in 16 MB of cellular RAM, with the cartridge streamed through 512-byte sectors. It cannot run, because it needs the FPU and interrupts.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It ends by printing
`TB_RESULT checks=N failures=M`, and its watchdog counts a failure if the test hangs. The
external chips are behavioural models in `tb/`:

- `n64_tb_cellram` (with 70 ns access checks)
- `n64_tb_sdcard` (SPI-mode card)
- `n64_tb_controller`
- `n64_tb_i2s_rx`
- `n64_tb_mem` (bus slave)

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/n64_pkg.sv tb/n64_tb_pkg.sv \
  tb/tb_n64_top.sv --top-module tb_n64_top -o sim
obj_dir/sim +verilator+rand+reset+2
```

`tb_n64_top` runs the whole system at its default parameters, in about 10 s of host time:

- It loads a test program into the PIF ROM, boots from 0xBFC0_0000, and jumps to cached code.
- It works the load/add, branch-likely and multiply/divide paths.
- It forces data-cache conflict misses and CACHE write-backs.
- It runs a PI DMA from the SD card that straddles a sector boundary, with a CPU load during the DMA.
- It writes VI_ORIGIN twice and draws white pixels. It checks that they appear on the VGA output.
- It streams audio samples and checks them on the I2S line.
- It polls two controllers and runs an SI DMA.

It counts every mechanism: forwards, load-use stalls, taken and nullified branches, multiply/divide
stalls, cache hits/misses/write-backs, DMAs and DMA stalls, sector fills and splits, SI transfers,
VI_ORIGIN writes and audio underruns. Any that never happened counts as a failure.

`tb_n64_tron` runs a small two-player light-cycle game, also at the default parameters, in
about 10 s:

- Each turn polls both controllers through PIF RAM.
- Each rider moves one pixel in the direction of the D-pad button held.
- Each rider's trail is drawn into the frame buffer with halfword stores.

It checks three things:

- The trails are at the right place in the frame buffer and on the VGA output.
- There is one poll per rider per turn.
- The poll gap paces the turns.

Simulation is two-state. Everything that is read is reset or initialised.
