# Out-of-order, two-plane NAND flash controller

A raw NAND flash chip is slow per operation but has a lot of internal
parallelism. A page read keeps a die busy for up to 50 µs, a page program for
about 0.9 ms, a block erase for about 3.5 ms. Meanwhile the 8-bit bus could
move 40 MB/s, and every chip has two dies with two planes each. A controller
that sends one command and waits for it leaves almost all of that unused.

This controller keeps up to eight commands in a queue. It sends each one to
its chip and die as soon as that is safe, even ahead of older commands, but it
reports results strictly in the order the commands arrived. Three mechanisms
recover the parallelism:

1. **Out-of-order issue across chips and dies.** Commands to different dies
   run at the same time. Commands to the same die stay in order.
2. **Two-plane commands.** Two consecutive pages become one two-plane read,
   program or erase, which costs about the same array time as a single page.
   A small change of address layout lets the controller spot such pairs
   without comparing addresses.
3. **Interleaving within a chip.** Each die has its own small state machine.
   The chip's bus can therefore serve one die while the other is busy in its
   array.

With four chips at 80 MHz, the full-size simulation reaches 30.7 MB/s for
sequential reads and 30–35 MB/s for random reads. A one-command-at-a-time
controller reaches 26 MB/s on the same chips. Measured figures are in
[Measured throughput](#measured-throughput).

The RTL is SystemVerilog-2017. It is synthesizable except for the flash-chip
model in `tb/`. All parameters default to the full-size configuration.

## Block structure

```
                 flash transfer layer (commands, program data, read data, commits)
                                   |
  nand_ctrl_top  +-----------------v------------------------------------------+
                 | sequencer                                                  |
                 |   cmd_queue (8 entries)  issue_logic   io_data_buffer      |
                 +---+--------------+--------------+--------------+-----------+
                     | issue / transfer / finish per chip
          interface_controller x4 (one per chip, own NAND bus)
            two_plane_addr_map -> chip_fsm (bus engine) ; die_fsm x2
                     |
                NAND chip (2 dies x 2 planes)
```

| File | Role |
|---|---|
| `rtl/nand_pkg.sv` | Sizes, opcodes, status bits, command and queue-entry structs, the two-plane pairing test |
| `rtl/nand_ctrl_top.sv` | One sequencer and `NCHIP_P` interface controllers |
| `rtl/sequencer.sv` | Queue, issue, in-order transfer and commit |
| `rtl/cmd_queue.sv` | Circular queue; entry flags and two-plane pairing |
| `rtl/issue_logic.sv` | Combinational choice of the next command to send |
| `rtl/io_data_buffer.sv` | One input page slot per queue entry plus a read-data FIFO |
| `rtl/interface_controller.sv` | Per-chip control: address mapping, die FSMs, chip FSM, background polling |
| `rtl/chip_fsm.sv` | Drives CE#, CLE, ALE, WE#, RE# and DQ for every command sequence |
| `rtl/die_fsm.sv` | Tracks one die: idle, read busy, read data waiting, write busy |
| `rtl/two_plane_addr_map.sv` | Logical-to-physical row rotation (wiring only) |

## Commands and the flash transfer layer interface

The layer above (called the flash transfer layer here) sends physical page
commands. A command is a `cmd_t`:

- `op`: READ, PROGRAM or ERASE.
- `chip`: 2 bits.
- `row`: 20 bits, `{die, block[11:1], page[6:0], block[0]}`.
- `seq`: "the next command continues this access".

The handshakes:

- **Commands** use `cmd_valid`/`cmd_ready`.
- **Program data.** Each PROGRAM command is followed by its 4314 data bytes on
  `wdata_valid`/`wdata_ready`/`wdata`. The next command is accepted only after
  those bytes have arrived.
- **Read data** leaves on `rdata_valid`/`rdata_ready`/`rdata`. Pages come out
  whole, one byte per accepted cycle, in command order.
- **Commits.** `cmt_valid` pulses once per command, in command order, with the
  command on `cmt_cmd`.
  - A read commits after its last byte has been transferred from the chip.
  - A program or erase commits once its confirm opcode has gone out on the
    bus. The array operation is then still running, and the die stays busy
    until a status poll sees it ready.

The status outputs are:

- `init_done`: reset of each chip is complete.
- `die_busy` and `die_data_ready`, per chip and die.
- `proto_err`: a die FSM saw an impossible event.
- `ev_*` pulses for observation: an issue, an out-of-order issue, a two-plane
  issue, a write held by the write-after-read rule, a command held by die
  ordering, and a finished command waiting to commit.

## Issue rules (the hard part)

Commands fall into two groups:

- reads;
- writes, which are programs and erases.

Every cycle, the issue logic walks the queue from the oldest entry. It picks
the first entry for which all of the following hold:

- The entry is valid and not yet issued, and it is not the second half of a
  two-plane pair (that half goes out with the first).
- For a program, its data, and its partner's, is already in the input buffer.
- It is not waiting for its sequential successor (see the next section).
- Its chip's interface controller is idle and not about to transfer a page.
- Its die is idle according to that die's FSM.
- **Same-die order:** no older command for the same die is still waiting.
  - No issued command for the same die is still uncommitted.
  - A die therefore holds one command at a time, from issue to commit.
  - This keeps a read's page in the die's data register until it has been
    transferred.
- **Write-after-read:** a write waits while any older read is still in the
  queue, on any chip or die.
  - Same-die order alone would let a program on chip 1 pass an older read on
    chip 0.
  - That program's data may be the result of that read, so every write waits
    for all older reads.

Only chip and die numbers are compared, never full addresses. A die executes
one operation at a time, so nothing finer would gain speed. The logic is
purely combinational over the eight entries.

**In-order commit.** The sequencer asks a chip to transfer a read page only
when that read is the oldest command in the queue and its die reports the
page ready. Read data therefore reaches the output FIFO in command order.
Reads on other chips may have finished their array phase long before. Their
pages simply wait in the dies' data registers. This is the cost of the simple
in-order interface: a page transfer (108 µs at 4314 bytes) is never
overlapped with another page transfer.

## Two-plane addressing

A two-plane operation needs two pages with the same page number in blocks
`2k` and `2k+1`, one per plane. In the usual layout, consecutive row numbers
are consecutive pages of one block, so consecutive accesses never form a
pair.

The interface controller therefore reads the row as
`{die, block[11:1], page[6:0], block[0]}`. It moves `block[0]` up to its
physical place, so the row on the bus is `{die, block[11:0], page[6:0]}`.
Logical rows `2n` and `2n+1` are then the same page in the two blocks of a
pair. The layer above still sees a plain linear page space.

Pairs are formed in the queue:

1. The layer above sets `seq` on an even row whose successor belongs to the
   same access.
2. That entry waits (`wait_seq`) until the next command arrives.
3. If the new command pairs with it, both issue as one two-plane command. To
   pair, it must have the same op, chip, die and block pair, the same page
   (not compared for erase), and odd row bit 0.
4. Otherwise the waiting entry issues alone.

## The per-chip interface controller

Each chip has:

- one `chip_fsm`, which owns the bus;
- two `die_fsm`s, which record each die's state.

The chip FSM takes one job at a time:

- **Issue.** Sends a read, program or erase, single or two-plane.
- **Transfer.** Reads one page out of a die's data register.
- **Poll.** Sends one status read.

A transfer request wins over a new issue.

Bus sequences (bracketed parts only for a two-plane pair):

| Job | Sequence |
|---|---|
| reset | FFh, wait tWB, wait for R/B# high |
| read | 78h + row, status until RDY; 00h, 5 address cycles, [32h, 00h, 5 address cycles], 30h |
| program | 78h poll; 80h, 5 address cycles, page data, [11h, 80h, 5 address cycles, page data], 10h |
| erase | 78h poll; 60h, 3 row cycles, [D1h, 60h, 3 row cycles], D0h |
| transfer | 78h + row of the plane (selects die and plane for output), status; 00h; 4314 RE# cycles |
| poll | 78h + row, one status read |

Address cycles are column low, column high (always 0, whole pages), then
three row bytes.

Every access starts with the enhanced status command 78h and the target row.
It tells a two-die chip which die the next command is for, and confirms that
die is ready. The die FSMs learn about each state change from pulses the chip
FSM gives:

- confirm opcode sent;
- status poll found RDY;
- page transferred.

**Background polling.** While a die works on its array and the chip has
nothing else to send, the interface controller polls that die. It sends 78h
and reads one status byte, at most every `POLL_GAP` clocks, alternating
between busy dies. This is how a finished read becomes `die_data_ready` and a
finished program or erase makes the die idle again. The sequencer uses those
two signals, so a command never sits in a chip FSM waiting for a busy die
while the other die could have been used.

**Timing.**

- The controller clock is 80 MHz (12.5 ns). Every bus cycle is two clocks,
  WE# or RE# low for one and high for one, which gives the chip's 25 ns cycle
  time.
- `WHR_CYC` = 6 clocks separate the last address cycle from the first RE#
  (tWHR).
- `WB_CYC` = 8 clocks separate FFh from the first R/B# sample (tWB).
- Read data are sampled on the clock edge that raises RE#.
- Measured at full size, one read takes 12674 clocks from issue to last byte:
  4000 clocks of tR plus 8628 clocks of transfer plus 46 clocks of overhead.

**Pins.** The pins are separate per chip:

- `dq_out`/`dq_oe`/`dq_in` stand for the bidirectional DQ bus; the pad is
  outside this RTL.
- `wp_n` is tied high.
- The read stream inside `chip_fsm` is `dq_in` itself.

These outputs are therefore constants or wires after synthesis.

## I/O data buffer

The buffer has separate input and output halves, so program data can come in
while read data goes out.

- **Input half.** One 4314-byte page slot per queue entry, 276,224 bits in
  all. It is written by the layer above and has one synchronous read port per
  channel, because any chip may program any slot.
- **Output half.** A 16-byte FIFO.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NCHIP_P` | 4 | chips (channels) |
| `QDEPTH_P` | 8 | command queue entries |
| `PAGE_BYTES_P` | 4314 | bytes per page including spare area |
| `OFIFO_DEPTH` | 16 | read-data FIFO bytes |
| `WHR_CYC`, `WB_CYC` | 6, 8 | tWHR and tWB in clocks |
| `POLL_GAP` | 16 | clocks between background polls |

The chip geometry is fixed in `nand_pkg`: 2 dies, 4096 blocks per die, 128
pages per block. The chip field of a command is 2 bits wide.

## Where this design departs from the evaluated controller

The original controller was evaluated with a Micron MT29F32G08Q model. The
following points are this design's own reading or choice:

- **Die bit position.** The die is row bit 19, directly above the block
  field.
- **Two-plane opcodes.** Not specified; the ONFI 1.0 opcodes 32h, 11h and D1h
  are used.
- **Status checks.**
  - There is no wait for tDBSY between the planes of a two-plane command.
  - The pass/fail status bit is not checked after a program or erase.
  - A 78h poll is sent before every access, including before a program or an
    erase.
- **Die reservation.** A die is held from issue until commit, not only until
  its operation finishes.
- **Transfer order.** A read is transferred only at the head of the queue.
  The evaluated design also waited for older commands before transferring
  read data.
- **Program data timing.** Program data must follow their command
  immediately.
- **Buffer sizes.** The input buffer has one page slot per queue entry, and
  the output FIFO is 16 bytes.
- **Background polling.** It is this design's way of letting a chip accept
  commands for an idle die while the other die is busy.

## Measured throughput

Full-size configuration, with the chip model using the datasheet times:

- tR 50 µs
- tPROG 0.9 ms
- tBERS 3.5 ms

Throughput counts 4096 user bytes per page. "Reference" is the figure
published for the evaluated controller. "Single-command" is a controller that
runs one command at a time.

| Pattern | Measured MB/s | Reference MB/s | Single-command MB/s |
|---|---|---|---|
| sequential read, 1 block | 30.7 | 30.84 | 25.99 |
| random read, 1 / 2 / 4 / 8 / 16 pages | 35.1 / 32.8 / 31.9 / 30.9 / 30.4 | 35.7 / 36.83 / 33.52 / 32.09 / 31.41 | 25.99 |
| sequential program, 2 blocks with erase | 7.2 | 7.67 | 4.02 |
| random program, 2 / 8 / 32 pages with erase | 3.4 / 7.2 / 6.8 | 9.59 / 12.47 / 10.8 | 2.05 / 3.27 / 3.84 |

Sequential reads come within 1% of the reference. Random reads come within
5%, except 2-page random reads, which are 11% lower. The remaining gap is
mostly the in-order page transfer described above.

Programs are slower than the reference, because every access here includes a
full 3.5 ms block erase:

- One 2-page program access on one die takes at least 3.5 + 0.9 + 0.2 =
  4.6 ms.
- The reference single-command figure of 2.05 MB/s means 4.0 ms per 2 pages.
  That is only possible with an erase near 2 ms.
- So the reference numbers appear to use a shorter erase than the datasheet
  value used here.
- Even with a 2 ms erase in the chip model, this design reaches only 4.8 /
  7.9 / 7.1 MB/s for 2 / 8 / 32 pages.
- The rest of the gap is queue occupancy. A short program access takes four
  queue entries: two for the erase pair and two for the program pair. With
  eight entries, only about two accesses are in flight, so about two dies
  work at a time.
- A queue that stored a two-plane pair in a single entry would hold twice as
  many accesses. How the evaluated design counted entries is not known.

Sequential program of one whole block pair comes within 6% of the reference.
Its limit is one die programming two planes at a time.

## Simulation

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Build and run one with
plain Verilator:

```
verilator --binary --timing -Wno-fatal rtl/nand_pkg.sv rtl/*.sv \
    tb/nand_flash_model.sv tb/tb_nand_ctrl_top.sv --top-module tb_nand_ctrl_top
./obj_dir/Vtb_nand_ctrl_top
```

Leave out `tb/nand_flash_model.sv` for testbenches that do not use the chip
model. Those are `tb_die_fsm`, `tb_two_plane_addr_map`, `tb_issue_logic`,
`tb_io_data_buffer`, `tb_cmd_queue` and `tb_sequencer`.

| Testbench | What it checks |
|---|---|
| `tb_two_plane_addr_map` | Row rotation and plane pairing, exhaustive over the low byte |
| `tb_die_fsm` | Random event sequences against a reference die model, including error pulses |
| `tb_cmd_queue` | Random enqueue/mark/pop against a reference queue, including pairing and `wait_seq` |
| `tb_issue_logic` | Random queue contents against a reference of the issue rules |
| `tb_io_data_buffer` | Page slots on all ports; FIFO order, full and empty |
| `tb_chip_fsm` | Every bus sequence against the chip model; exact clock counts of an erase job, a page transfer and a status-poll job |
| `tb_interface_controller` | Interleaving on both dies, two-plane forms, transfer priority, data placement in the model's array |
| `tb_sequencer` | Random command streams with fake channels: issue rules, in-order commit, read data order |
| `tb_nand_ctrl_top` | End to end, four chips, with small pages. It counts every mechanism (out-of-order issue, two-plane, write-after-read hold, die hold, commit wait, interleave) and fails if one never happens. Directed cases cover write-after-read across chips and reads overtaking a waiting program but committing after it |
| `tb_nand_ctrl_full` | All defaults: erase, program, read of a pair, read latency within bounds |
| `tb_nand_ctrl_workload` | All defaults: the throughput table above; data integrity and protocol checks |

`tb/nand_flash_model.sv` is a behavioural chip model, not synthesizable. It
has 2 dies and 2 planes, tracks R/B# and status per die, and supports the
command set above. It counts protocol violations, such as a command to a busy
die, programming a page that is not erased, or out-of-order pages within a
block. It also counts each kind of operation. The model stores pages sparsely,
so the full 32 Gb address space can be used.

`tb_nand_ctrl_workload` takes about half a minute. The longer reference
patterns (sequential reads of 2–8 blocks, sequential programs of 4–8
blocks) were not run. Their throughput
hardly changes once the queue is in steady state.

## Not included

The controller sits below a flash transfer layer and above the chips. The
following are outside it:

- logical-to-physical address translation;
- wear levelling;
- bad-block management;
- ECC;
- the host interface;
- the NAND chip itself, which appears only as the simulation model.
