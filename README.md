# virtexsquared: the system around an ARM-like core

virtexsquared is a small system-on-chip for a Xilinx Virtex-5 board. An ARM-like CPU draws
640x480 true-colour frames to a DVI monitor, plays sound through an AC'97 codec, reads a PS/2
keyboard, loads programs from a CompactFlash card through a SystemACE controller and prints to a
serial console. Everything the CPU and its peripherals use lives in one DDR2 memory.

This RTL is everything in that system except the CPU pipeline. It covers:

- the two buses that connect the parts;
- the memory controller in front of the vendor DDR2 controller;
- the instruction and data caches;
- a reusable DMA engine, with the framebuffer and audio blocks built on it;
- fill and copy accelerators;
- the slow peripherals;
- the boot preloader.

It is written in synthesizable SystemVerilog-2017. Each block has a self-checking testbench. A
full-system testbench boots the system, drives the cache ports the way a CPU would and checks a
whole video frame.

## Two buses

Traffic splits into two kinds, and each kind gets its own bus.

**FSAB, the fast system access bus**, carries bulk traffic to main memory.

- Several masters share one slave, the memory controller `fsab_memory`.
- The masters are the preloader, the framebuffer DMA, the audio DMA, the instruction cache, the
  data cache, the blit accelerator and the clear accelerator.
- A master sends *packets* of type `fsabo_t` (see `rtl/vs_pkg.sv`).
- A read is one packet giving the address and a length of 1 to 8 64-bit words.
- A write is `len` packets on consecutive cycles. Each packet carries one word and a byte mask
  where 1 means "write this byte".
- Addresses are byte addresses, 31 bits wide and word aligned.
- Flow control uses credits. A master starts with 4 credits, spends one per transaction (not per
  word) and gets one back on each `fsabo_credit` pulse. No transaction is ever refused.
- Read data come back on one inbound bus, `fsabi_t`, that every master sees. Each master keeps
  only the words tagged with its own device id (`did`). The ids are listed in `vs_pkg`.

**SPAM** carries control-register accesses.

- The data cache is the only master. Every CPU access with address bit 31 set goes to SPAM.
- Address bits 27:24 pick the device and bits 23:0 are the address inside it.
- A request is valid for exactly one cycle.
- The device that owns it answers later with a one-cycle `busy_b` pulse and, for a read, the data.
- All devices' answers are ORed together. An idle device must drive zeros.
- If no device answers within 256 cycles, the data cache gives up. A read then returns
  `0xDEADDEAD`.

The SPAM devices are:

| Address | Device |
|---|---|
| `0x8000_0000` | console |
| `0x8200_0000` | framebuffer |
| `0x8300_0000` | SystemACE |
| `0x8400_0000` | audio |
| `0x8500_0000` | PS/2 |
| `0x8600_0000` | timer |
| `0x8700_0000` | clear accelerator |
| `0x8800_0000` | blit accelerator |

## Clock domains and how they are crossed

The system has five clocks:

- the core clock;
- the FSAB/memory clock;
- the pixel clock;
- the AC'97 bit clock;
- the SystemACE clock.

Every crossing is built from four parts.

- **`csr_async_write` / `csr_async_read`** move one control-register access between the core
  clock and a target clock.
  - The request is a toggle flag that passes through two flip-flops.
  - The far side waits one cycle, samples the held value ("hold and sample") and flips an
    acknowledge flag back.
  - The done strobe on the core side is shaped so that a peripheral can OR it straight onto SPAM.
  - The latency is a few cycles of each clock.
- **`async_fifo`** is a dual-clock FIFO.
  - Each pointer has a Gray-coded copy that crosses through two flip-flops.
  - The flags are only ever pessimistic: empty may clear late, and full may clear late.
- **`fsab_arbiter_fifo`** is one master's "virtual slave" inside the arbiter.
  - It takes FSAB packets on the master's clock and buffers them in an `async_fifo`.
  - It offers a transaction to the arbiter only once every packet of it has arrived, so a write
    always leaves on consecutive cycles however slow the master's clock is.
  - Credits go back as a Gray-coded count of finished transactions.
- **Caches** cross with their own request/acknowledge toggles (`cache_fill_port`). The line
  buffer is read only after the acknowledge has crossed, so it is stable.

## Memory controller (`fsab_memory`)

`fsab_memory` translates FSAB into the user interface of a vendor DDR2 controller (MIG), which
is not part of this RTL. The MIG side is as follows.

- It takes 128-bit data entries with a 16-bit mask, where 1 means "do not write".
- A burst is four entries, 64 bytes.
- Addresses and commands go into a separate FIFO. Command 000 is write and 001 is read.

On the write path, FSAB words are paired into 128-bit entries.

- A write that starts on an odd word gets a masked word in front.
- A write that ends on an even word gets a masked word behind.
- When a whole transaction is stored, the controller does four things:
  - it notes the transaction in a request FIFO;
  - it issues one MIG command;
  - it writes the four burst entries, masking everything beyond the transaction;
  - it returns the credit.

On the read path, the MIG returns four entries. The controller unpacks them into 64-bit words,
skips the first word when the address was odd, sends `len` words on `fsabi` with the requester's
`did`/`subdid`, and returns the credit.

## Arbiter (`fsab_arbiter`)

The arbiter has one `fsab_arbiter_fifo` per master.

- It counts the slave's credits.
- When idle, it starts the lowest-numbered master that has a whole transaction waiting. That
  transaction goes through unchanged before the next choice.
- Priority is strictly fixed, with no fairness: preloader, framebuffer, audio, instruction cache,
  data cache, blit, clear. The streaming devices come first so that a long fill cannot starve
  the display.

## Caches (`icache`, `dcache`, `cache_fill_port`)

Both caches run their lookup on the core clock and use 64-byte lines. A line fill is one 8-word
FSAB read issued by a `cache_fill_port` on the FSAB clock.

**`icache`**

- It is set associative. `WAYS` is a parameter with a default of 2, and there are 64 sets.
- Replacement is round robin.
- A hit is known in the request cycle. The word appears one cycle later.

**`dcache`**

- It is direct mapped and write through.
- A write goes to memory as a one-word FSAB write with a 4-byte mask. It also updates the line if
  the line is present.
- It does not allocate a line on a write miss.
- It is also the SPAM master and holds the 256-cycle timeout.

## The DMA engine (`simple_dma_read`) and its users

`simple_dma_read` streams a linear range of memory to a device that has its own clock. Its
registers are:

| Offset | Register | Access |
|---|---|---|
| 0x00 | next start address | write only |
| 0x04 | next length in bytes | write only |
| 0x08 | command: stop, trigger once, or auto-trigger | write only |
| 0x0c | bytes fetched since trigger | read only |
| 0x10 | bytes delivered since reset | read only |
| 0x14 | start address of the current transfer | read only |

Reads of the write-only registers are answered with 0.

On a trigger, the engine does the following.

- It copies the "next" values into the current transfer.
- It issues 8-word FSAB reads whenever it holds a credit and its FIFO has room for a whole block.
- It makes the new FIFO contents visible to the reader only one whole 64-byte block at a time.
- With auto-trigger, the engine restarts from the next start address when a transfer ends. That
  lets software flip buffers by writing a single register.

**`framebuffer`**

- It reads 640x480 pixels of 4 bytes each. Byte 0 is red, byte 1 green and byte 2 blue, with two
  pixels per word.
- It uses an auto-triggered DMA and a `sync_gen` with standard 640x480 at 60 Hz timing.
- The timing generator waits in reset until the first word has arrived, so the image starts at the
  top-left pixel.
- If the DMA falls behind, the framebuffer pops the missed words during vertical blanking, so the
  next frame is aligned again.

**`audio`**

- It reads 16-bit stereo samples, two stereo frames per word, low address first.
- It sends them on AC'97 slots 3 and 4 through `ac97_link`.
- When the FIFO is empty it sends silence.
- Seven mixer settings (SPAM offsets 0x100–0x118) are rewritten to the codec round robin by
  `ac97_conf`.

## Accelerators

**`accel_clear`** fills memory with a 32-bit value, sending writes of up to 8 packets.

| Offset | Register |
|---|---|
| 0x0 | fill value |
| 0x4 | start address |
| 0x8 | packet count |

- Writing a non-zero packet count starts the fill.
- Reading the count returns what is still to be sent.

**`accel_blit`** copies a packed image into a window of a larger one.

- It repeatedly reads 64 bytes, writes them, and advances the write address.
- After "row length" blocks it moves the write address to the start of the next row plus the
  stride.
- Register 0x14 counts the blocks written.

## Slow peripherals

- **`spam_timer`** returns the number of core cycles since reset, in 32 bits.
- **`ps2`** receives 11-bit keyboard frames {start, 8 data bits, odd parity, stop}.
  - It oversamples the PS/2 clock on the core clock and keeps frames with good parity in a FIFO.
  - A SPAM read pops one scancode. It returns `0xFFFF_FFFF` when the FIFO is empty.
- **`spam_console_io`** sends the low byte of each SPAM write through `rs232_tx` (8N1).
  - A write is acknowledged only once the transmitter has taken the byte.
- **`spam_sysace`** bridges SPAM to the SystemACE microprocessor port.
  - Each 16-bit SystemACE register sits at a 4-byte SPAM address.
  - A seven-state sequencer on the SystemACE clock orders address, chip enable, strobe, sampling
    and release, so that setup and hold times are met.
  - The data bus is split into in, out and output-enable for an I/O buffer outside.

## Boot (`fsab_preload`)

The preloader holds a 16 KB ROM (2048 64-bit words). After reset it writes the ROM to address 0 in
8-word transactions while `core_rst_b` holds the CPU in reset. `core_rst_b` rises once every
transaction has been sent and its credit has come back, so the memory controller has taken all of
them.

The ROM is loaded with `$readmemh` from `ROM_FILE`. With no file it holds the pattern
`word[i] = {i ^ 32'hA5A5_5A5A, i}`, which the system testbench checks.

## Top level (`system`)

`system` connects all of the above. The CPU core is not included, so the caches' core-side ports
are top-level ports. The following are also ports:

- the MIG user interface;
- the DVI pixel bus;
- the AC'97, PS/2, RS-232 and SystemACE pins.

`core_rst_b` is the reset the core must use.

## Departures from the published design, and choices made here

**Not built**

- The CPU pipeline. Its function was never specified, so the caches' core ports are brought out
  instead.
- The vendor DDR2 controller. `tb/mig_model.sv` is a behavioural model of its user interface.
- The DVI encoder's I2C setup and a character LCD, which are only named.

**Choices made here where the original gives no number or mechanism**

- Cache sizes: 2-way instruction cache and 64 sets. The replacement policy.
- Four credits everywhere.
- The priority order of blit against clear.
- The FIFO depths of PS/2 (16) and of the generic FIFOs.
- Video porch timing.
- The 115200-baud console at 100 MHz.
- Audio sample packing.
- The register layouts of the console and of the audio mixer block.
- The toggle encoding of every clock-crossing handshake.

**Deliberate behaviour**

- The framebuffer's catch-up after an underrun is an addition.
- The preloader releases the core only after its credits have returned. The original only says
  that the core is released when the preloader completes.
- The PS/2 "empty" value is all ones in 32 bits.
- Console device 0, clear 7 and blit 8 are this design's assignments. The framebuffer,
  SystemACE, audio, PS/2 and timer addresses are the original ones.

## Simulating

Every testbench is self-checking and ends with a line

```
TB_RESULT checks=<n> failures=<n>
```

Each testbench has a watchdog and needs no input files. With Verilator 5, run for example:

```
verilator --binary --timing -Wall -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/vs_pkg.sv tb/tb_system.sv --top-module tb_system -o sim
./obj_dir/sim
```

`tb_system` is the full-size run. It performs these steps:

- boots the system with the 16 KB preload;
- checks the boot image through the instruction and data caches;
- exercises every SPAM device, including a timeout;
- runs the clear and blit accelerators and the audio stream;
- compares every pixel of a whole 640x480 frame against memory.

It takes about ten seconds. The other `tb_<block>.sv` files test one block each.
`tb/mig_model.sv` models the DDR2 controller's user interface, and `tb/fsab_slave_model.sv` is a
simple FSAB memory used by the block tests.
