# SpyBuffers and Fast Monitoring for FPGA firmware

Debugging a large FPGA algorithm on real hardware is hard: the interesting
data lives on internal connections between firmware blocks, at full clock
rate, and a logic analyser sees only a few thousand samples of a few signals.
Fast Monitoring puts a small block, the **SpyBuffer**, on selected connections
between firmware blocks. A SpyBuffer passes every word on unchanged and with
no added latency. It also keeps a copy of the most recent words in a circular
buffer that software on a SoC can read at any time. In the other direction,
the software can load words into that buffer and have the SpyBuffer send them
downstream in place of the real data. That way a block can be fed test input,
or stand in for a block or a detector that is not there yet.

One **FM control block** drives all SpyBuffers of a design. It provides a
global *freeze* and a global *playback* command, plus per-SpyBuffer masks that
choose which SpyBuffers obey them. It also maps every SpyBuffer's memory into
the SoC's register space.

This repository is SystemVerilog RTL for the SpyBuffer, the FM control block,
a generic FM block holding N SpyBuffers, and a two-SpyBuffer demonstrator. It
is plain RTL: no vendor primitives, the memories are arrays.

```
                 control path (spy_clock)  --  SoC register bus
                                   |
                             +-----------+
                             | fm_control|  SPY_CTRL, masks, memory windows
                             +-----------+
                 freeze, playback |  ^ spy memory I/O, status
                                  v  |
  block A --write_data--> +------------------------------------------+ --read_data--> block B
          --write_enable->|  spybuffer                               | <-read_enable--
          <-almost_full-- |   in --+---------------> playback --> FIFO| --empty------->
                          |        |                 mux   ^         |
                          |        v                       |         |
                          |  write controller -> spy memory -> playback controller
                          +------------------------------------------+
```

## The SpyBuffer (`rtl/spybuffer.sv`)

### Data path

Block A presents `write_data` with `write_enable`. The word goes through the
playback mux to the output. In the same clock edge the write controller
stores a copy at the write pointer and advances it. The pointer wraps, so the
spy memory always holds the last `2**SPY_MEM_WIDTH_A` words. Nothing on this
path waits for the memory, so monitoring adds no latency.

The output depends on `PASSTHROUGH`:

* `PASSTHROUGH = 0`: a dual-clock FIFO follows the mux. Block B reads it in
  `rclock` with `read_enable`. It is first-word-fall-through: `read_data`
  shows the head word whenever `empty` is low. `almost_full` (4 or fewer
  free entries out of 32) tells block A to pause. A word offered to a full
  FIFO is lost, and an assertion reports it.
* `PASSTHROUGH = 1`: there is no FIFO, and `wclock` and `rclock` must be the
  same clock. `read_data` is the mux output and `empty` is its inverted valid,
  in the same cycle. `almost_full` is 0 and `read_enable` is ignored.

### The spy memory: two views of the same bits

The memory (`spy_memory.sv`) is a true dual-port RAM whose ports have
different widths:

| port | clock | width | address |
|---|---|---|---|
| A, data path | `wclock` | `DATA_WIDTH_A` | `SPY_MEM_WIDTH_A` bits |
| B, control path | `spy_clock` | `DATA_WIDTH_B` | `SPY_MEM_WIDTH_B` bits |

Both ports cover the same storage. This requires
`SPY_MEM_WIDTH_B = SPY_MEM_WIDTH_A + log2(DATA_WIDTH_A / DATA_WIDTH_B)`, and
elaboration stops if it does not hold. With the defaults (128/32 and 9/11)
there are 512 entries of 128 bits, seen from the control side as 2048 words
of 32 bits. Control word `a*R + k` (with `R = DATA_WIDTH_A/DATA_WIDTH_B`) is
lane `k`, bits `k*DATA_WIDTH_B` upwards, of entry `a`. So an entry's lowest
32 bits sit at the lowest address. Both ports read synchronously, with one
cycle of latency.

### Freeze

While `freeze` is high, no incoming word is written to the memory and the
write pointer holds. Data keeps flowing from A to B. The memory is a snapshot
of the words that passed just before the freeze, which the SoC reads through
`spy_en`/`spy_addr`/`spy_data`. The snapshot is in circular order: the oldest
word is at the write pointer. The pointer is not exported, but the entry after
the one break in a known sequence marks it.

### Playback: the part that needs care

`playback` is a two-bit mode (`spybuffer_pkg::playback_mode_e`):

| value | mode | effect |
|---|---|---|
| 0 | NONE | normal operation |
| 1 | ONCE | memory contents replace A's words, one pass |
| 2 | LOOP | memory contents replace A's words, repeated |
| 3 | WRITE | the SoC is loading test words through the spy port |

Monitoring is off in every mode other than NONE. Without that rule, loaded test
words would be overwritten by live data as soon as the SpyBuffer was
unfrozen. In practice the SoC freezes first anyway.

**How many words a playback sends.** While the mode is WRITE, the SpyBuffer
records the highest entry written through the spy port. Entering WRITE
clears the record. A ONCE or LOOP playback covers entries 0 up to that
entry. If nothing was loaded since the last WRITE entry or initialise, it
covers the whole memory. So loading ten words and playing them once sends
exactly ten words. A playback always starts at entry 0 when the mode changes
to ONCE or LOOP.

**Timing.** The playback controller reads one entry per `wclock` cycle, and
pauses while the output FIFO is almost full. The word reaches the mux one
cycle after its read. A's words that arrive while ONCE or LOOP is set are
dropped, including after a ONCE pass has ended. Words that arrived before
the mode change reached `wclock` are still passed on. To get a clean
hand-over, pause block A, or accept a few live words ahead of the played
ones.

**Loading.** Enter WRITE and write the words from control address 0 upwards
(lane by lane). Then switch to ONCE or LOOP. Spy-port writes are accepted in
any mode. Only WRITE records the extent, so words written in other modes
are stored but do not change the length of the next playback.

### Clock domains and crossings

There are three domains: `wclock` (block A, memory port A, mux, FIFO write
side), `rclock` (FIFO read side) and `spy_clock` (control, memory port B).
`freeze`, `playback` and `initialize` are levels from `spy_clock`. Each
crosses into `wclock` through a two-flop synchroniser. The two playback bits
are taken only after they have agreed for two cycles, so a change from LOOP
(2) to ONCE (1) never shows an intermediate code. A control change acts three
to four `wclock` edges after it is made.

The recorded playback length crosses from `spy_clock` without synchronising.
This is safe because it only changes in WRITE mode, and it is sampled when a
playback starts, which is at least two cycles after the mode left WRITE.
Software must not load words and start a playback in the same bus cycle.
The FIFO uses Gray-coded pointers.

The `spy_clock` domain has no reset port. Its only state, the playback-length
record, is cleared by `initialize`.

### Ports

| port | dir | domain | meaning |
|---|---|---|---|
| `wclock`, `wresetbar` | in | W | data clock, active-low async reset |
| `write_data[DATA_WIDTH_A]`, `write_enable` | in | W | word from block A |
| `almost_full` | out | W | pause block A |
| `playback_busy` | out | W | a playback is running (status) |
| `rclock`, `rresetbar` | in | R | read clock and reset (FIFO only) |
| `read_enable` | in | R | pop the head word (FIFO only) |
| `read_data[DATA_WIDTH_A]`, `empty` | out | R | word for block B |
| `spy_clock` | in | S | control clock |
| `freeze`, `playback[2]`, `initialize` | in | S | control levels |
| `spy_en`, `spy_addr[SPY_MEM_WIDTH_B]`, `spy_write_enable`, `spy_write_data[DATA_WIDTH_B]` | in | S | memory access |
| `spy_data[DATA_WIDTH_B]` | out | S | read data, one cycle after `spy_en` |

`initialize` holds the write pointer at 0, stops monitoring and clears the
playback-length record.

## FM control block (`rtl/fm_control.sv`)

The register map uses 32-bit word addresses, as on IPbus:

| address | register | reset | fields |
|---|---|---|---|
| 0x2000 | SPY_CTRL | 0x9 | bit 0 GLOBAL_FREEZE, bits 2:1 GLOBAL_PLAYBACK_MODE, bit 3 INITIALIZE_SPY_MEMORY |
| 0x2001, 0x2002 | FREEZE_MASK_0/1 | 0 | bit i of word k: SpyBuffer 32k+i |
| 0x2003, 0x2004 | PLAYBACK_MASK_0/1 | 0xF7FFFFFF, 0xFFFFFFFF | same layout |
| 0x2005 | STATUS (ro) | – | bit 0: error freeze active |
| 0x2006, 0x2007 | PLAYBACK_BUSY_0/1 (ro) | – | per-SpyBuffer playback running |
| 0x1440 + 0x20·i + a | SpyBuffer i memory | – | control word a |

The mask registers are active low. A mask bit of **0** makes the SpyBuffer
follow the global signal; a 1 makes it ignore the signal (not frozen,
playback NONE):

```
freeze_i   = (GLOBAL_FREEZE & ~FREEZE_MASK[i]) | error_freeze
playback_i = PLAYBACK_MASK[i] ? NONE : GLOBAL_PLAYBACK_MODE
```

For example, to freeze only SpyBuffer 109 in a design with four mask words,
clear bit 13 of FREEZE_MASK_3 and set GLOBAL_FREEZE. After reset every
SpyBuffer is frozen and initialising, so the firmware starts quiet until
software clears SPY_CTRL.

**Error freeze.** A rising edge on `error_in` (any clock; it is synchronised
inside) freezes every SpyBuffer whatever the masks, and raises `irq`. The
SoC can then read out the data around the error. Writing SPY_CTRL with
GLOBAL_FREEZE = 0 (the unfreeze command) clears it.

**Bus.** `bus_req` / `bus_rsp` (structs in `spybuffer_pkg`) form a simple
synchronous bus on `spy_clock`. A request is taken in one cycle and answered
with `ack` and `rdata` in the next; back-to-back requests are allowed.
Unmapped reads return 0. Writes to read-only or unmapped addresses are
ignored. Memory windows are `2**SPY_MEM_WIDTH_B` words each, placed one after
the other from `SB_BASE`. An AXI or IPbus slave in front of this bus is
outside this design.

## FM block and the demonstrator

`fm_block.sv` combines one `fm_control` with `N_SB` SpyBuffers. The SpyBuffers
share the control lines and their widths and clocks. Each one's data ports
are an element of a packed array.

`fm_dummy_top.sv` is the two-SpyBuffer demonstrator:

```
fm_dummy_master -> SB_DUMMY0 -> fm_dummy_slave -> SB_DUMMY1 -> out_data/out_empty/out_read_enable
```

* The master repeats five 48-bit words (…0BAD, …0BEE, …D0E5, …0FAB, …DEED),
  zero-extended to 64 bits, one per clock unless stalled by `almost_full`.
* The slave pops SB_DUMMY0 whenever SB_DUMMY1 has room and forwards the word
  after one register stage.
* Each SpyBuffer has a 0x20-word window (16 entries of 64 bits): SB_DUMMY0 at
  0x1440, SB_DUMMY1 at 0x1460. Mask bit 0 is SB_DUMMY0, bit 1 is SB_DUMMY1.
* Master, slave and both FIFO sides share `clk`. Control runs on `spy_clock`.

A typical session, as register writes:

```
0x2001 <= 0xFFFFFFFE   # only SB_DUMMY0 follows GLOBAL_FREEZE
0x2000 <= 0x1          # freeze on, initialise off: SB_DUMMY0 frozen, SB_DUMMY1 monitoring
read 0x1440..0x145F    # snapshot of the master's words
0x2003 <= 0xFFFFFFFE   # only SB_DUMMY0 follows GLOBAL_PLAYBACK_MODE
0x2000 <= 0x7          # freeze + PLAYBACK_WRITE
write 0x1440..0x1453   # ten 64-bit test words, low half first
0x2000 <= 0x3          # freeze + PLAYBACK_ONCE: the ten words go to the slave
0x2001 <= 0xFFFFFFFC   # freeze SB_DUMMY1 as well
read 0x1460..0x147F    # the ten words are now in SB_DUMMY1
0x2000 <= 0x0          # unfreeze, playback off
```

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| spybuffer | DATA_WIDTH_A | 128 | data-path word |
| | DATA_WIDTH_B | 32 | control word |
| | SPY_MEM_WIDTH_A | 9 | 512 entries |
| | SPY_MEM_WIDTH_B | 11 | must be SPY_MEM_WIDTH_A + log2(A/B) |
| | PASSTHROUGH | 0 | 0 = FIFO, 1 = direct |
| | FIFO_ADDR_WIDTH | 5 | 32-entry FIFO |
| spy_async_fifo | AF_MARGIN | 4 | free entries at which almost_full rises |
| fm_control / fm_block | N_SB | 2 | up to 32·N_MASK_REGS |
| | N_MASK_REGS | 2 | mask words per kind |
| | CTRL_BASE, SB_BASE | 0x2000, 0x1440 | |
| | PLAYBACK_MASK_DEFAULT | 0xFFFFFFFF_F7FFFFFF | |
| fm_block | DATA_WIDTH_A, SPY_MEM_WIDTH_A/B | 64, 4, 5 | demonstrator sizes |
| fm_dummy_top | DATA_WIDTH | 64 | a multiple of 32 |

The SpyBuffer defaults reproduce the reference resource measurement: one
SpyBuffer with 128-bit words, 512 entries and a FIFO. On a device whose block
RAM is at most 32 bits wide, the 128-bit port needs four RAMs side by side.
Synthesis of `spybuffer` here gives 65,536 memory bits and about 100
flip-flops.

## Where this design makes its own choices

The overall structure, the port names and parameters, the freeze and playback
behaviour, the mode codes, and the register map with its reset values and
mask polarity follow a published description of SpyBuffers. The following
are not specified there and were chosen here:

* read latency of the memory (one cycle) and lane order of the two views;
* FIFO depth (32), almost_full margin (4) and first-word-fall-through reads;
* playback length (up to the highest entry loaded in WRITE mode), restart at
  entry 0, dropping of block A's words during playback, and no monitoring in
  any playback mode;
* the `initialize` and `playback_busy` ports, the STATUS and PLAYBACK_BUSY
  registers, and clearing the error freeze by an unfreeze write;
* the control bus protocol;
* the demonstrator's 64-bit data width, its word values (read from a printed
  memory dump, so the upper bits are uncertain), the master's one word per
  clock, and the slave's register stage.

Not included: the SoC software, the AXI interconnect and chip-to-chip link,
and the firmware of real applications that use Fast Monitoring.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| tb_spy_memory | both views against a reference array, lane order, enables |
| tb_spy_write_controller | pointer, wrap, freeze/mode/initialize gating, cycle by cycle |
| tb_spy_playback_controller | ONCE/LOOP sequences, stall, one word per clock, whole-memory default |
| tb_playback_mux | selection |
| tb_spy_async_fifo | ordering across unrelated clocks, almost_full and full thresholds |
| tb_spybuffer | default-size SpyBuffer: flow, freeze snapshot of 512 entries, once, loop, memory kept, resume, initialise, zero-latency pass-through |
| tb_fm_control | reset values, all mask/global combinations, windows, error freeze, status |
| tb_fm_block | two streams, per-SpyBuffer freeze and playback through the masks, error freeze of both and its release |
| tb_fm_control_sb109 | control block sized for 128 SpyBuffers: FREEZE_MASK_3 = 0xFFFFDFFF with GLOBAL_FREEZE freezes SpyBuffer 109 alone |
| tb_fm_dummy_master, tb_fm_dummy_slave | the demonstrator's two blocks |
| tb_fm_dummy_top | the demonstrator at its default parameters, end to end through the bus: initialise, flow, stall, freeze/readout, load without playback, playback once into SB_DUMMY1, loop, error freeze; each must occur |

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/spybuffer_pkg.sv tb/tb_fm_dummy_top.sv --top-module tb_fm_dummy_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another. For lint, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/spybuffer_pkg.sv rtl/<module>.sv`.
The one lint warning that remains is intended: the spy memory array is
written from two clock domains, which is the true dual-port RAM itself. It
is written with two plain `always` processes, because SystemVerilog forbids
two `always_ff` processes writing one variable.

All testbenches finish in seconds. The demonstrator testbench runs at full
default size. The clock crossings are checked only in a simulator with fixed
clock ratios, not for metastability.
