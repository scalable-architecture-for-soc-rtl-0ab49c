# Scalable master/slave video encoder SoC

This is a system-on-chip skeleton for a video encoder that gets faster by
adding identical processors. A frame is cut into slices of whole macroblock
rows. Each slave processing unit encodes one slice with the same program
(single program, multiple data). A master processing unit:

- buffers the incoming frames,
- hands out the slices,
- collects and merges the slaves' bitstreams,
- runs the global rate control.

An I/O module brings raw YUV video in and takes the compressed stream out.
Every unit sits behind its own HIBI wrapper on one shared 32-bit bus
segment. HIBI is a bus with distributed arbitration: no central arbiter.

```
          +-----------+   +-----------+   +-----------+       +-----------+
          |  master   |   |    I/O    |   |  slave 1  |  ...  |  slave N  |
          | proc_unit |   | io_module |   | proc_unit |       | proc_unit |
          +-----+-----+   +-----+-----+   +-----+-----+       +-----+-----+
          | wrapper 0 |   | wrapper 1 |   | wrapper 2 |       |wrapper N+1|
          +-----+-----+   +-----+-----+   +-----+-----+       +-----+-----+
                |               |               |                   |
          ======+===============+===============+=========...=======+=====
                                 hibi_segment (bus_clk)
```

The processors themselves are ARM7TDMI cores in the original design. They
are **not** part of this RTL. Each processing unit brings its processor
memory bus (request, write, byte enables, address, data, one-cycle read
data), its interrupt and a program-load port out to the top. Whatever drives
those ports plays the processor. The encoder itself is C software and is not
hardware here either.

Default top configuration (`video_encoder_top`):

| Parameter | Default | Why |
|---|---|---|
| `N_SLAVES` | 9 | one slave per QCIF macroblock row, the largest configuration |
| `SLAVE_DMEM_WORDS` | 9728 (38912 B) | local-memory approach, QCIF, 9 slaves: 38691 B needed |
| `MASTER_DMEM_WORDS` | 23040 (92160 B) | 2 bitstreams + 2 frames + 6000 B = 92032 B needed |
| `SLAVE_PMEM_WORDS` | 6250 (25 kB) | slave program size |
| `MASTER_PMEM_WORDS` | 2500 (10 kB) | master program size |
| `N_RX_CH` | 4 | receive DMA channels per unit (own choice) |
| `FIFO_DEPTH` | 8 | wrapper FIFO depth in words (own choice) |

Agent numbers on the segment:

- 0 is the master.
- 1 is the I/O module.
- 2 .. N_SLAVES+1 are the slaves.

The agent number is the top byte of every HIBI address that belongs to that
unit. The low byte selects a receive DMA channel.

## The HIBI wrapper (`hibi_wrapper`)

This is the hardest part of the design, and most of the behaviour on the bus
is decided here.

### IP side and clock domains

The IP side has four FIFOs:

- a high-priority transmit FIFO,
- a low-priority transmit FIFO,
- a high-priority receive FIFO,
- a low-priority receive FIFO.

Each is a Gray-code asynchronous FIFO (`async_fifo`) between `ip_clk` and
`bus_clk`, so every unit and every segment may run at its own frequency.
Receive FIFOs are first-word-fall-through.

A HIBI word (`hibi_word_t`, 35 bits) carries:

- `av`: this is an address word,
- `hi`: high priority,
- `cmd`: write or read request,
- 32 data bits.

A transfer is one address word followed by any number of data words.

### Bus signals

Each wrapper drives the following onto the segment:

- `valid`, `lock` and a word;
- one request bit in a 32-bit request vector;
- a `full` flag.

`hibi_segment` ORs the contributions of all wrappers and returns the result
to all of them. Only the bus owner drives a non-zero word. An assertion in
the segment checks that at most one wrapper drives.

### Distributed arbitration

Every wrapper holds an identical copy of the arbiter. The copies stay in
step because they all see the same inputs:

- the same runtime configuration, written to all wrappers in the same cycle;
- the same TDMA slot counter and round-robin pointer, which advance on the
  same events;
- the same request vector and lock signal.

Each copy computes the same winner, and only the winner starts driving.

Arbitration has two levels:

1. **TDMA.** Time is divided into `n_slots_m1+1` slots of `slot_len+1`
   cycles each. A 16-entry table names the owner of each slot. If the owner
   of the current slot is requesting, it gets the bus.
2. **Competition.** If the slot owner is not requesting, or TDMA is off, the
   requesting agents compete. The mode is set at run time:
   - round-robin, where the search starts after the last winner;
   - fixed priority, where the lower agent number wins.

### Timing

Everything on the bus side runs on `bus_clk`.

- The owner keeps `lock` high while it holds the bus.
- The cycle in which `lock` is low carries the owner's last word. That
  cycle is also the arbitration cycle, so the next owner drives in the very
  next cycle and no cycle is lost between owners.
- An owner gives up the bus in any of these cases:
  - its queue is about to run dry;
  - it has sent `max_send` words;
  - the next cycle starts a TDMA slot whose owner is requesting.
- At the start of each ownership the high-priority FIFO goes first.

### Flow control

A receiver whose FIFO cannot take the word raises `full` in the same cycle.
The sender keeps the word and drives it again in the next cycle. No word is
ever dropped.

When a transfer is interrupted because the owner lost the bus, the wrapper
sends the transfer's address word again before the rest of its data. The
receiver therefore always knows where a word belongs.

### Runtime configuration

The configuration is written through the `cfg` port on `bus_clk`:

| cfg address | Contents |
|---|---|
| 0 | `arb_cfg_t`: mode, tdma_en, slot_len, n_slots_m1, max_send (0 = no limit) |
| 16..31 | owner of TDMA slot 0..15 |

A configuration write restarts the TDMA frame. After reset:

- round-robin competition,
- TDMA off,
- `max_send` 16,
- slot *s* owned by agent *s* mod `N_AGENTS`.

### Address decoding

A wrapper accepts a transfer whose address word falls in the inclusive range
`ADDR_LO..ADDR_HI`. By default that is its own agent byte.

### Cost of resent address words

Because an owner releases as soon as its queue runs dry, a processing unit
whose DMA engine fills the FIFO a little slower than the bus empties it
loses the bus often. Each time, its address word is sent again. In the
end-to-end run about a third of all bus words (21108 of 58176) were address
words, most of them resends.
The bus is lightly loaded in this design, so this costs time but not
correctness. A longer hold-off before releasing would reduce it.

## DMA and interrupt controller (`dma_ctrl`)

The DMA and interrupt controller sits between the processor data bus, port B
of the data memory and the wrapper's IP side. The processor programs it
through memory-mapped registers and goes on computing while transfers run.

It has three kinds of work:

- **Transmit.** One engine sends a single word or a block from local memory
  as a HIBI write, on the high- or low-priority FIFO.
- **Read request.** With the read-request bit set, the engine instead sends
  a read request `[remote address, length, return address]`.
- **Receive.** `N_RX_CH` receive channels, all active at once, each store
  the data addressed to them into memory and raise a done bit.

Data for a channel that is not enabled stays in the wrapper FIFO. The sender
then sees `full` and retries, so a receiver is never overrun. Words for a
channel number at or above `N_RX_CH` are discarded.

Remote reads: an incoming read request is served by the transmit engine
without the processor, ahead of the processor's next job. This is how slaves
read the master's memory in the shared-memory approach.

Register map (word offsets):

| Offset | Name | Meaning |
|---|---|---|
| 0 | TX_MEM | local word address of the block |
| 1 | TX_LEN | words |
| 2 | TX_DST | HIBI destination address |
| 3 | TX_RET | return address of a read request |
| 4 | TX_CTRL | write: bit0 start, bit1 high priority, bit2 read request; read: bit0 busy |
| 5 | STATUS | [N_RX_CH-1:0] channel done, bit 8 transmit done, bit 9 remote read served; write 1 to clear |
| 6 | IRQ_MASK | `irq = \|(STATUS & IRQ_MASK)` |
| 8+4c | RXc_MEM | channel c memory address |
| 9+4c | RXc_LEN | expected words |
| 10+4c | RXc_CTRL | bit0 enable; cleared when the channel completes |
| 11+4c | RXc_CNT | words received (read only) |

The high-priority receive FIFO is always served first. On the memory port,
receive writes take precedence over transmit reads.

## Processing unit (`proc_unit`)

Master and slave units are the same module with different memory sizes. A
unit contains a program memory (`prog_rom`), a dual-port data memory
(`dpsram`), the DMA controller and the processor-bus decoder.

The decoder uses the top address nibble:

| Address | Target | Notes |
|---|---|---|
| `0x0xxx_xxxx` | program memory | read only from the processor, loaded through the load port |
| `0x1xxx_xxxx` | data memory, port A | byte enables |
| `0x2xxx_xxxx` | DMA registers | |

Timing:

- Reads return `cpu_rdata` with `cpu_rvalid` one cycle after the request.
- The DMA controller uses data-memory port B.
- If both ports write the same word in the same cycle, port B wins.

## I/O module (`io_module`)

Input side:

- Takes a byte stream with a start-of-frame flag (`cam_*`).
- Sends one address word (`in_dst`) at each frame start.
- Packs four bytes per word, least significant byte first.
- Writes the words on the low-priority FIFO.

Output side:

- Receives words from the bus and unpacks them to a byte stream (`bs_*`),
  least significant byte first.
- Ignores address words and read requests.

Frames must be a whole number of words. A QCIF 4:2:0 frame is 38016 bytes.

## Segment bridge (`hibi_bridge`)

A bridge joins two bus segments, which may run on unrelated clocks. It is
two wrappers back to back:

- Side A accepts the address range of segment B.
- Side B accepts the address range of segment A.

Each side forwards every received word, address words included, to the
other side's transmit FIFO of the same priority, high priority first. The
bridge is tested on its own. The single-segment encoder top does not use
it.

## Memory sizing and supported configurations

The data memories are sized for the main configuration: QCIF, local data
memory, nine slaves.

Other configurations need the parameters changed:

- **Fewer slaves.** Each slave needs more memory: 125048 B with one slave,
  47326 B with five. Raise `SLAVE_DMEM_WORDS` and set `N_SLAVES`.
- **Shared-memory approach.** The master keeps three frames: 130048 B, so
  `MASTER_DMEM_WORDS` ≥ 32512. Each slave needs only about 15 kB. No other
  hardware is needed, because the remote-read path is already built.
- **CIF and 4CIF.** These need far larger memories: CIF with 18 slaves needs
  73 kB per slave and 330 kB in the master.
- **More than 16 slaves.** Up to 30 slaves fit in the 32-bit request vector.
  Only 16 agents can have TDMA slots; the rest are served by competition.
- **Narrower buses.** The bus width is fixed at 32 bits (`HIBI_DW`). The
  narrower buses (1 to 16 bits) explored for lower cost are not built.

## Where this follows the original design and where it does not

Taken from the original design:

- the master/slave/I-O structure on one HIBI segment;
- a wrapper per unit with FIFO interface, two priorities with parallel
  FIFOs, and multiple clock domains;
- two-level TDMA plus round-robin-or-priority arbitration, configurable at
  run time;
- processing units made of processor, program memory, dual-port data memory
  and DMA/interrupt controller with memory-mapped registers, single and
  block writes and reads, simultaneous transfers and prioritized transfers;
- identical slave programs;
- the shared memory living in the master's data memory;
- the memory sizes.

Choices made here:

- the signal-level bus protocol: OR-bus, lock, request vector, same-cycle
  full with retry, address resend;
- the owner release rules and the priority order within competition;
- the configuration register map;
- the FIFO depths;
- the DMA register map, channel addressing and read-request format;
- the processor address map;
- the I/O byte interfaces;
- the bridge forwarding scheme;
- the shared program-load port for the slaves.

Not built:

- the ARM7TDMI cores;
- the encoder software;
- bus widths other than 32 bits;
- any interface other than the plain FIFO one.

## Testbenches

Each module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_video_encoder_top` runs the top at its default size. The test plays the
processors' software on the memory buses and takes one QCIF frame through
the whole flow:

1. Load the slave program into all slaves at once.
2. Bring the raw frame in through the I/O module into the master's memory.
3. Send slice parameters (high priority) and slices to the nine slaves.
4. Exchange boundary rows between neighbouring slaves.
5. Have one slave fetch a motion-estimation window from the master by remote
   read.
6. Compute stand-in bitstreams. These are checksums of what each slave
   received.
7. Collect and merge the bitstreams in the master.
8. Compare the byte stream that comes out of the I/O module with the
   expected stream.

The bus configuration changes during the run:

- It starts with TDMA on, using the reset slot table, and round-robin
  competition.
- Halfway through the slice distribution it switches to priority competition
  with TDMA off.
- For the collection it returns to TDMA plus round-robin, with a four-word
  send limit. The test counts TDMA, round-robin and priority
grants, full retries, high-priority words, resent address words, interrupts
and remote reads. It fails if any of these never happens.

All testbenches run with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/hibi_pkg.sv tb/tb_video_encoder_top.sv --top-module tb_video_encoder_top
./obj_dir/Vtb_video_encoder_top
```

## Tool messages that remain

- `hibi_wrapper`: only some bits of the cfg data word are used.
- `hibi_wrapper`: with `ADDR_LO = 0` the lower range comparison is always
  true.
- `video_encoder_top`: the reset is seen both synchronously and
  asynchronously. The synchronous use is only the disable condition of the
  segment's one-driver assertion.
- `proc_unit`: address bits 27:16 and 1:0 are not decoded.
- `io_module`: the priority bit of received words is not used.
- `hibi_pkg`, linted alone: its constants are reported as unused.

None of these affect the circuit.
