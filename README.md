# Hardware context switching over SelectMAP

This design lets a dynamically partially reconfigurable FPGA system pause a
hardware task, save the values of its flip-flops, give the region to another
task, and later put the first task back where it left off. It does all of this
from outside the task, through the FPGA's own configuration port (SelectMAP on a
Virtex-II XC2V1000). The task's logic gets no extra access logic.

The engine never reads whole columns of configuration memory. An off-line step
turns the task's logic allocation file into a small **database**. The database
lists:

- the CLB columns that hold the task's registers;
- for every used slice, its row and whether it sits in the odd or the even
  slice column.

Within a CLB column, every register bit sits in one of two adjacent frames:

- the XQ frame, at minor address 1;
- the YQ frame, at minor address 2.

So a single frame address and a three-frame read fetch everything a column
holds. That read returns a pad frame, which flushes the device's frame buffer,
and then the two register frames. A **state filter** picks the register bits
out of the read stream as it goes by, and writes them to a one-bit-per-register
**state memory**. On swap-in, the same filter writes the saved bits back into
the task's bitstream as it is downloaded.

## Block diagram

```
             +-------------+      +------------------------------+
 host ------>| db_mem      |----->| ctx_controller               |
 (load,      | (database)  |      |  readback sequencer          |    SelectMAP
  swap_out,  +-------------+      |  configuration sequencer     |   +-----------+
  swap_in)   +-------------+      |  + bitstream packet tracker  |<->| smap_port |<-> CCLK, CS_B,
 host ------>| bitstream_  |----->|                              |   +-----------+    RDWR_B, D[7:0],
             | mem (task.bit)     +------------------------------+                    BUSY, INIT_B
             +-------------+        |   ^ tagged words    ^ cmd_rom
                                    v   |
                           +----------------------------+
                           | state_filter               |
                           |  para_ram (bit-index para) |----> state_mem
                           |  bitidx_calc               |<---- (1 bit per FF)
                           +----------------------------+
```

`ctx_switch_top` wires these together. It has one clock and a synchronous
active-low reset. CCLK runs at half the system clock, so a 100 MHz clock gives
the 50 MHz SelectMAP rate the method assumes.

## Where a register lives

**Frame address (32 bits).** The layout is:

| bits | 31-27 | 26-25 | 24-17 | 16-9 | 8-0 |
|---|---|---|---|---|---|
| field | 0 | block type (BA, 0 for CLB) | major address (MJA, the column) | minor address (MNA, the frame in the column) | byte number (0) |

- CLB column *C* (slice columns X = 2C-2 and 2C-1) has MJA = X_even/2 + 3.
- The first CLB column has MJA 3. The device has 32 CLB columns, so the
  largest MJA is 34, and 6 bits hold it.

**Bit index.** This is the bit's position inside a frame of 106 32-bit words
(3392 bits). Bit 0 is the most significant bit of the first word. For slice row
Y (0 to 79):

```
odd  slice column:  index = 116 + 40 * (79 - Y)
even slice column:  index = 118 + 40 * (79 - Y)
```

The XQ and YQ registers of a slice share the same index, one in each frame.
`bitidx_calc` computes the index and splits it into a word number (index / 32)
and a bit number counted from the MSB (index mod 32).

**Database entry (10 bits).**

| bits 9-8 (Bit_Share_Flag) | bits 7-0 | meaning |
|---|---|---|
| 00 | MJA[5:0], MNA[1:0] | frame address of the column's first register frame |
| 01 | X_oe, Y_row[6:0] | a register in the first (XQ) frame only |
| 10 | X_oe, Y_row[6:0] | a register in the second (YQ) frame only |
| 11 | X_oe, Y_row[6:0] | registers in both frames |

X_oe is 1 for an odd slice column. A frame-address entry is followed by the
entries of its column, in ascending bit-index order (descending Y_row; at equal
row the odd column comes first).

For example, the 28-flip-flop up-counter example takes 16 entries (160 bits):

```
0000101001   frame address MJA 10, MNA 1  (0x00140200)
1111001111   both frames, odd column, row 79   -> bit 116
1101001111   both frames, even column, row 79  -> bit 118
0000110101   frame address MJA 13, MNA 1  (0x001A0200)
1101001111 ... 1101000100   both frames, even column, rows 79 down to 68
```

## Swap-out (readback)

`ctx_controller` sends these words. The fixed words come from `cmd_rom`. Each
word goes out as four bytes, most significant byte first.

| step | words | purpose |
|---|---|---|
| 1 | `AA995566` | synchronise |
| 2 | `30008001 0000000B` | SHUTDOWN: the task stops |
| 3 | `30008001 00000007` | RCRC |
| 4 | `20000000` x 4 | NOOPs while shutdown completes |
| 5 | `30008001 0000000C` | CAPTURE: flip-flop values into configuration memory |
| 6 | `30008001 00000004` | RCFG: read configuration |
| 7-10 | `30002001 <FA> 28006000 4800013E 20000000 20000000` | per column: FAR, Type 1 read of FDRO, Type 2 read of 318 words, two NOOPs |
| 11 | read 318 words | pad frame, XQ frame, YQ frame |
| 12-15 | `30008001 00000005 30008001 00000007 30008001 0000000D 20000000 20000000` | START, RCRC, DESYNCH, NOOPs |

Steps 7 to 11 repeat for every frame-address entry in the database. The words
read back go to the state filter, tagged as pad frame, frame 1 or frame 2.
Because START ends the sequence, the task runs again after a swap-out. A
scheduler that wants to evict it simply reconfigures the region afterwards.

**Cost.** A swap-out of *N* columns moves:

- 4 x (21 + 6N) command bytes;
- 3 x 424 x N read bytes.

At one byte per CCLK, the up-counter (N = 2) is 132 + 2544 bytes. The
simulation takes 5372 system clocks, which is 2.0 clocks per byte.

Larger tasks cost the same per column. These figures are simulated by
`tb_workloads`, with a generated placement that has the stated number of
flip-flops, columns and database entries. Times are for a 50 MHz CCLK.

| task | flip-flops | columns | database bits | frames read | read bytes | command bytes | readback | swap-in | both |
|---|---|---|---|---|---|---|---|---|---|
| up-counter | 28 | 2 | 160 | 6 | 2544 | 132 | 53.7 us | 391.9 us | 445.6 us |
| 16-bit divider | 40 | 10 | 420 | 30 | 12720 | 324 | 261.8 us | 1956.0 us | 2217.8 us |
| LED display control | 46 | 9 | 400 | 27 | 11448 | 300 | 235.8 us | 1760.5 us | 1996.3 us |
| 32-bit divider | 73 | 14 | 680 | 42 | 17808 | 420 | 365.8 us | 2738.1 us | 3104.0 us |

Each readback time is within 0.4 % of (command bytes + read bytes) / 50 MHz.
The small excess is the turnaround between writing and reading. The swap-in
bitstream used here rewrites 23 frames per column: the 22 frames of the column
plus a pad frame to flush the frame buffer. That costs about 5 % more than
22 x 424 bytes per column.

## Swap-in (configuration with restore)

The host keeps the task's bitstream in `bitstream_mem`. On swap_in the
controller streams it through the state filter to the port:

1. A **packet tracker** follows the bitstream: the sync word, Type 1 and
   Type 2 headers, writes to FAR and FDRI, and DESYNCH.
2. It counts FDRI words in frames of 106. After each frame it steps the frame
   address: MNA runs from 0 to 21, then the next MJA.
3. It compares the address of each frame with the next frame-address entry in
   the database. A match tags that frame as frame 1 and the next frame as
   frame 2.
4. The filter then overwrites the register bits of the two frames with the
   saved state, in the order it saved them.
5. The START command in the bitstream then loads the flip-flops.

This scheme relies on three assumptions:

- The bitstream writes the register columns in the same ascending order as
  the database. Frame 2 follows frame 1 directly, as in a normal column write.
- On start-up, a flip-flop is loaded from the same bit position that readback
  shows after CAPTURE. If a device keeps the captured value and the
  initialisation value in different bits, the database needs a second set of
  positions. That is not built here.
- Only CLB frame addressing is tracked. Block RAM contents are not saved.

A swap-in runs at one byte per CCLK plus BUSY bytes. In the simulation, a
19592-byte bitstream took 39187 clocks.

## The state filter

This is the part that needs the closest reading (`rtl/state_filter.sv`).

**Word flow.**

- Each word enters a one-word holding register with three tags: frame 0/1/2,
  first word of a frame, and (implicitly) its word number.
- Words of frame 0 pass straight through.
- The first word of frame 1 starts a walk over the database entries that
  follow the column's frame address. The filter takes one entry per clock.

**What each entry does.**

- If flag bit 0 is set, the entry's bit is in frame 1. The filter waits until
  the held word is the one holding that bit. It then copies the bit to state
  memory on swap-out, or replaces it with the next saved bit on swap-in.
- If flag bit 1 is set, the filter copies the parameter into `para_ram` for
  frame 2. This happens in the same clock.
- An entry with only flag bit 1 needs no word and takes one clock.

**End of a walk.**

- The walk stops at the next frame-address entry or at the end of the
  database. This leaves the database pointer on the next column.
- Frame 2 repeats the walk over `para_ram`. So the state memory order for each
  column is: frame-1 bits in database order, then frame-2 bits in database
  order.

**When a word leaves.** A word leaves as soon as no pending entry points into
it.

**Throughput.** A frame word holds at most two register bits of one frame,
because entries come in pairs 2 bits apart, and pairs are 40 bits apart. So the
filter needs at most three clocks per word. The port delivers one word every
eight clocks.

**Errors.** An entry is skipped and `err` is set if:

- its word has already passed (an out-of-order database), or
- its row is above 79.

## SelectMAP timing (`smap_port`)

- A byte is set up while CCLK is low.
- The device samples it, or drives read data, at the rising edge.
- The port samples BUSY and D at the next falling edge, one system clock
  later.
- A write byte that came back BUSY is sent again. A read byte that came back
  BUSY is dropped and read again.
- RDWR_B changes only while CS_B is high.
- Reads and writes both run back to back at 8 clocks per word.
- Before the last byte of a read word, the port stalls if the previous word has
  not been taken yet.
- D is split into `d_o`/`d_oe`/`d_i`. The tristate buffer is at the pads, and
  so is the device's bit order on D[0:7] (D0 carries the byte's MSB).
- INIT_B is watched by the controller. If INIT_B is low, a start request is
  refused. If INIT_B goes low during an operation, `err` is set.

## Host interface (`ctx_switch_top`)

| port | meaning |
|---|---|
| `db_we, db_waddr[7:0], db_wdata[9:0], db_len[8:0]` | load the database; `db_len` = number of entries |
| `bs_we, bs_waddr[15:0], bs_wdata[31:0], bs_len[16:0]` | load the bitstream; `bs_len` = words |
| `swap_out, swap_in` | one-clock start pulses |
| `busy, done, err` | status; `done` pulses for one clock |
| `nregs[10:0], cols[7:0]` | state bits handled and columns handled in the last operation |
| `wr_byte, rd_byte` | one strobe per byte moved on SelectMAP |
| `st_raddr[9:0], st_rdata` | read the saved state while idle |
| `cclk, cs_b, rdwr_b, d_o[7:0], d_oe, d_i[7:0], busy_pin, init_b` | SelectMAP pins |

Parameters and their defaults:

| parameter | default | notes |
|---|---|---|
| `DB_DEPTH` | 256 entries | the largest example task needs 68 |
| `SM_DEPTH` | 1024 state bits | |
| `PARA_DEPTH` | 160 | slices in one CLB column: 80 rows x 2 |
| `BS_DEPTH` | 65536 words | a full column rewrite is 2438 words (22 frames + pad); the largest example, 14 columns, needs about 34000 |

The device geometry is in `rtl/ctx_pkg.sv`: 106 words per frame, 22 frames per
CLB column, the bit-index constants, and the command words. All memories have
synchronous writes and combinational reads.

## Departures and open points

- **Command count.** Each column block is sent as six words: FAR header, frame
  address, Type 1 read, Type 2 read, and two NOOPs. The published command-byte
  figures for this method count five words per column: 124 bytes instead of
  132 for the up-counter. The design keeps the full packet sequence.
- **Swap-in.** The method says only that the bitstream is downloaded again and
  the saved values are restored. The streaming merge, the packet tracker and
  the same-position assumption are this design's.
- **Design choices without a source.** These are all this design's own: the
  host handshake, the memory depths, the byte timing, the BUSY handling, and
  the one-word filter buffer.
- **Off-line database generation is not hardware.** This covers running
  BitGen to get the logic allocation file and parsing the file. The testbench
  writes the example database directly.
- **The FPGA's configuration logic is part of the device.** It appears only as
  a behavioural model in `tb/v2_config_model.sv`.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ctx_pkg.sv tb/tb_ctx_switch_top.sv --top-module tb_ctx_switch_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_ctx_switch_top` | the whole engine at default sizes against `v2_config_model`, in two rounds (see below) |
| `tb_workloads` | the four task sizes above end to end: database size, frames, bytes, saved and restored state, readback time |
| `tb_ctx_controller` | exact readback word sequence, 318-word reads, frame tags; swap-in tagging of frames 1/2 only; INIT_B refusal |
| `tb_state_filter` | all four flag codes, saved-bit order and positions, restore merge, pass-through, bad-row error |
| `tb_smap_port` | byte order, 8 clocks per word in both directions, BUSY retries, RDWR_B turnaround |
| `tb_bitidx_calc` | every row and parity against the equations, plus the example column's reference values |
| `tb_cmd_rom` | every command word |
| `tb_db_mem`, `tb_para_ram`, `tb_state_mem`, `tb_bitstream_mem` | write and read back against a reference copy |

The two rounds of `tb_ctx_switch_top`:

- **Round 1** uses the up-counter database. It checks:
  - the saved state against the frozen flip-flops;
  - the byte counts and the clock count;
  - after the region is wiped and the task swapped back in, the restored
    flip-flops and every configuration word.
- **Round 2** adds a column with first-only, second-only and shared registers,
  and random BUSY.

The whole test runs at default sizes in well under a second. It counts how
often each mechanism occurred: BUSY on writes and on reads, pad frames,
each flag code, multi-column reads, and restored bits. It fails if any of them
never happened.
