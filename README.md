# C-HEAP channels between a PCI prototyping board and its host

A hardware task running in an FPGA on a PCI prototyping board exchanges
streams of data with software on the host PC. It does this through
C-HEAP channels: bounded FIFO channels in which producer and consumer each
keep their own copy of a semaphore and tell the other side when they have
moved it. The board cannot become a master on the PCI bus. Because of that,
the channels live in the board's own SRAM: the hardware reads and writes
that memory directly, and the host reaches the same memory over the
board's local bus, polling the semaphores the hardware leaves there.

This repository holds the SystemVerilog for the FPGA side of that
arrangement: the per-channel synchronisation hardware (the C-HEAP Block),
the shell that groups several of them, the bus fabric of the board FPGA,
a producer and a consumer application, and self-checking testbenches. The
host side is played by the testbenches.

## How a channel works

A channel has `Nbuf` tokens of `Size_buf` bytes each. They sit in a ring
buffer at `Buf_ptr`. The producer fills tokens in order and the consumer
empties them in the same order. Each side counts the tokens it has finished
in a semaphore word:

```
bit 31      roll-over flag, toggles each time the count wraps
bits 30..0  count modulo Nbuf
```

Each side keeps its own semaphore (LSMPR, local) and reads the other
side's (RSMPR, remote). The flag tells a full ring from an empty one, since
the two counts are then equal.

| side     | flags equal            | flags differ           |
|----------|------------------------|------------------------|
| consumer | tokens to read = R − L | = Nbuf − (L − R)       |
| producer | free tokens = Nbuf − (L − R) | = R − L          |

When a side releases a token, its count goes up by one. At `Nbuf` the count
goes back to 0 and the flag flips. The new value must then reach the other
side. Two ways are built:

* **Polling hardware–software** (`HW_SW = 1`). After each release the block
  writes its LSMPR to `Mem_LSMPR_addr`, a word in shared memory. Whenever
  the block has no token to offer, it re-reads the other side's semaphore
  from `RSMPR_addr`. The host does the same thing from its side. Nobody
  interrupts anybody. This is the mode the board uses for both channels.
* **Hardware–hardware** (`HW_SW = 0`). After each release the block writes
  its `sgnl_value` to `sgnl_reg_addr`, which is the signalling register in
  the other task's shell. It re-reads the remote semaphore only after its
  own shell's signalling register has been written with its own
  `sgnl_value` (a wake-up). It also reads it once after start-up.

Releases made while a notification is still pending are merged into one
write that carries the latest semaphore.

## The C-HEAP Block (`cheap_block`)

The task sees one block per channel through a four-signal handshake:

| signal             | dir | meaning |
|--------------------|-----|---------|
| `chp_ptr_valid`    | out | a token is available; its address is on `chp_buf_ptr` |
| `chp_buf_ptr`      | out | `Buf_ptr + index × Size_buf` |
| `chp_ptr_ack`      | in  | one cycle: the task claims the offered token |
| `chp_released_buf` | in  | one cycle: the task is done with its oldest claimed token |

A task may claim several tokens before it releases any. The block offers
the next token as soon as the count of available tokens is larger than the
count of claimed ones. A release always frees the oldest claimed token.
Assertions check that the task never releases more than it claimed and
never acknowledges a pointer that is not valid. A further assertion in
every multiplexer checks that each initiator holds a command, unchanged,
until it is accepted.

The block's registers sit at these byte offsets in its 32-byte window:

| offset | register         | access | meaning |
|--------|------------------|--------|---------|
| 0x00   | `sgnl_reg_addr`  | r/w | where to write the wake-up (HW–HW mode) |
| 0x04   | `sgnl_value`     | r/w | wake-up value, sent and matched |
| 0x08   | `RSMPR_addr`     | r/w | address of the remote semaphore |
| 0x0C   | `Nbuf`           | r/w | number of tokens; **0 = channel off** |
| 0x10   | `Buf_ptr`        | r/w | base address of the ring buffer |
| 0x14   | `Mem_LSMPR_addr` | r/w | where to copy LSMPR (polling mode) |
| 0x18   | `LSMPR`          | r   | the local semaphore |

The direction (`INPUT`) and the token size (`SIZE_BUF`) are parameters, not
registers. Write `Nbuf` last. Until it is non-zero the block makes no bus
traffic, so the other registers can be set in any order.

Inside, the block has one small bus controller with states idle, command,
write data and read data. Pending notifications go first. After them
comes the refresh of the remote semaphore, which runs when the block has
nothing to offer and (in hardware–hardware mode) has been woken up. Every
bus access is a single word.

## Shell, signalling register and arbitration

`cheap_shell` puts the signalling register and `NB` blocks behind one DTL
target port and one DTL initiator port. Target accesses are steered by
address bits 6..5:

| bits 6..5 | target |
|-----------|--------|
| 00 | signalling register (`sgnl_reg`) |
| 01 | block 1 (register offset in bits 4..0) |
| 10 | block 2 |
| 11 | spare |

A write to the signalling register stores the value and raises `chg_sgnl`
for one cycle. Every block compares that value with its own `sgnl_value`.
The blocks' initiator ports share the shell's one initiator port through
a round-robin arbiter (`dtl_arb_mux`). It grants an uncontested request in
the same cycle and keeps the grant until the data phase of that command
has finished.

Spare address ranges never hang the bus. `dtl_addr_demux` accepts accesses
to them, returns 0 on reads, and counts them (`unmapped_cnt`).

## The bus: a minimal DTL

All internal connections use a small subset of DTL, packed in two structs
(`chp_pkg`):

```
dtl_req_t: cmd_valid, cmd_addr[31:0], cmd_read, wr_valid, wr_data[31:0], rd_accept
dtl_rsp_t: cmd_accept, wr_accept, rd_valid, rd_data[31:0]
```

Each command carries exactly one word. The command completes with
`cmd_valid && cmd_accept`. Then comes its data phase: for a write,
`wr_valid && wr_accept`; for a read, `rd_valid && rd_accept`. A target does
not accept a new command until the data phase is over. There are no byte
enables and no error response.

## The board FPGA (`cheap_board_top`)

```
 local bus ──> LB target (registers, LB_BA[3]) ──> de-mux 3 (bits 12..11)
                                                     00 decoder 4 base register
                                                     01 decoder 5 base register
                                                     10 shell  (bits 10..0)
                                                     11 task   (bits 10..0)
 local bus ──> LB target (memory, LB_BA[2]) ────────────────┐
 shell initiator ──> decoder 4 ──> memory ──────────────────┤ mux 7 ──> SRAM interface ──> 2 SRAMs
                               └─> off-board ──┐            │
 task initiator  ──> decoder 5 ──> memory ─────┼────────────┘
                               └─> off-board ──┴─ mux 6 ──> lbm_req / lbm_rsp
```

* **Local-bus targets** (`lb_target_dtl`). On `LB_Sadr` every target
  copies the address from `LB_D`. After that, the one-hot `LB_BA` selects
  one target. A word moves on each clock where `LB_Mrdy` (or `LB_Mgrdy`)
  is 1 and `LB_TBusy` is 0. During a burst the address goes up by one
  word per transfer. A write is turned into a DTL write. A read is fetched
  only while the initiator signals ready, and `LB_TBusy` stays high until
  the word is there. The wrapper never reads ahead. The tri-state lines
  are split into `_i`, `_o` and `_oe`.
* **Decoders 4 and 5** (`mem_lb_demux`) compare address bits 31..18 with
  the PCI address at which the host sees the board memory. Software must
  write that address to both decoders first (offset 0 of their 2 KB
  ranges). A match goes to the SRAM. Anything else goes to the local-bus
  master port, which is how a block can put its semaphore copy in host
  memory.
* **Memory interface** (`dtl_sram_if`) drives two 32-bit SRAMs, 2^17
  lines each (1 MB together). Byte address bits 18..2 select the line and
  bit 19 the chip. The model is a synchronous SRAM with a one-cycle read.
  A DTL read returns its data two cycles after the command.
* **Task** (`app_task`). The producer writes 0, 1, 2, … (a 32-bit counter)
  into the tokens of channel 1. The consumer reads the tokens of channel 2.
  It keeps the last word, the word count and the word sum in read-only
  registers: 0x000 last word, 0x004 tokens produced, 0x008 tokens
  consumed, 0x00C sum.

### Start-up, as the host does it

1. Write the PCI memory base to decoder 4 (register space 0x0000) and
   decoder 5 (0x0800).
2. For each block (block 1 at 0x1020, block 2 at 0x1040) write
   `RSMPR_addr`, `Buf_ptr`, `Mem_LSMPR_addr` (and in HW–HW mode
   `sgnl_reg_addr` and `sgnl_value`). Finish with `Nbuf`.
3. Run the software side of each channel: poll the hardware's semaphore
   copy, read or write the tokens in board memory, and write your own
   semaphore to the word that the block's `RSMPR_addr` points to.

## Where this design departs from the original board design

* The original board connects the applications to DTL through FIFO
  adapters. Here the producer and consumer drive DTL themselves, one token
  at a time and one word per bus access.
* The board cannot master the PCI bus. The local-bus master wrapper and
  its address look-up table are left out. Their DTL side comes out of the
  top as `lbm_req`/`lbm_rsp`.
* Decoders 4 and 5 compare bits 31..18, so hardware initiators reach a
  256 KB window of the 1 MB memory. The host reaches all of it through its
  own local-bus wrapper.
* These choices are this design's own:
  * which of decoders 4 and 5 serves the shell;
  * the two `LB_BA` bits (2 and 3);
  * the token size (4 bytes);
  * `Nbuf = 0` meaning "off";
  * merged notifications;
  * the reads-as-zero spare ranges;
  * the task's register layout.
* There are no byte enables: `LB_BEn` is ignored and the SRAMs are written
  as whole words. The local-bus DMA, interrupt and spare lines are unused.
* The interrupt-driven hardware-to-software variant is not built. It
  needs an interrupt register and an interrupt controller on a processor
  platform; the board uses polling.

## Size

Yosys, before technology mapping, gives about 950 generic cells and 1713
flip-flop bits for the whole FPGA at default parameters. A FLEX 10K logic
cell count needs the vendor flow. For comparison, the original
implementation did not fit a 2880-LC device.

## How far it has been checked

Everything here has been simulated with Verilator 5 and synthesised with
Yosys for generic cells. None of it has run on a board. Several parts are
testbench models written from the protocol descriptions, not from vendor
data:

* the local-bus side of the PCI core;
* the SRAM timing;
* host memory behind the master port.

Check the local-bus cycle timing and the SRAM interface against the real
parts before taking the design to hardware. The interaction of the blocks,
the channels and the address maps is covered end to end.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog. For example,
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_cheap_board_top rtl/chp_pkg.sv tb/tb_cheap_board_top.sv
./obj_dir/Vtb_cheap_board_top
```

`tb_cheap_board_top` runs the whole FPGA at default parameters. It acts
as the host on the local bus. It models the SRAMs (`tb_sram_model`) and
host memory behind the master port (`tb_dtl_mem`). The test does this:

* configures everything through the register space;
* moves 11 tokens from the hardware producer through a 4-token channel;
* moves 7 tokens from software to the hardware consumer through a 2-token
  channel;
* checks every word, the task registers, the semaphores and a spare
  access.

It also counts mechanisms and fails if one never happened:

* producer and consumer blocking;
* semaphore polling;
* memory arbitration between the host and a block;
* writes through the master port;
* semaphore roll-over;
* `LB_TBusy` waits.

| testbench | what it checks |
|-----------|----------------|
| `tb_sgnl_reg` | stored value, one-cycle `chg_sgnl` |
| `tb_cheap_block` | output block in polling mode (claims all tokens before releasing, pointers, blocking, polling, LSMPR copy, roll-over flag) and input block in HW–HW mode (no bus reads while blocked, wake-up matching, signalling write after release) |
| `tb_cheap_shell` | address map, wake-up through the shell's own signalling register, wrong wake-up value ignored, both blocks working at once through the shared initiator, spare range |
| `tb_dtl_arb_mux` | three initiators on a stalling memory: data integrity and round-robin order against a reference |
| `tb_dtl_addr_demux` | routing, spare sink, selection held during a data phase |
| `tb_mem_lb_demux` | base register, window edges, random addresses against a reference decision, moving the window |
| `tb_lb_target_dtl` | write and read bursts (also random), incrementing addresses, `LB_TBusy` during stalls, no fetch before the initiator is ready, `LB_Mgrdy` reads, other base addresses ignored |
| `tb_dtl_sram_if` | both chips, line addressing, read latency |
| `tb_producer_task`, `tb_consumer_task`, `tb_app_task` | data sequence, handshake order, registers |

`tb_board_split_apps` runs each application alone on the full FPGA, as on
a board that carries only the producer or only the consumer. The other
block stays switched off. Each application moves 200 tokens through an
8-token channel with random host pauses.
