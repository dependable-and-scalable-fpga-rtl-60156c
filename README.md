# Checkpoint/restart hardware for FPGA designs

A long-running FPGA accelerator loses all its work when the board fails, and
cannot be swapped out for another task or moved to another node. The usual
way to fix this on a CPU is checkpoint/restart: stop the program, save its
state, and later load it back and go on. This RTL adds that ability to an
FPGA design at the HDL level. Extra circuits wrapped around the user logic can
pause it, stream its complete state out to memory as 32-bit words, and later
stream that state back and resume. The saved state can be restored after
the FPGA has been reset or reconfigured, or on another board.

Two questions make this harder than "dump every flip-flop":

* **Consistency.** The FPGA talks to memory and to a host over AXI. A snapshot
  taken while a read burst is half delivered cannot be resumed: the rest of
  the burst is gone. The design therefore stops *new* bus requests first. It
  waits until every request already issued has completed, and only then
  pauses the logic and captures.
* **What to save.** Registers and RAM contents are state, but so is the
  output of a block RAM or a pipelined DSP. That output depends on an input
  one or more cycles earlier and cannot be read back or written. Instead the
  design keeps a copy of those *inputs* (the "additional registers"), saves
  it with the rest, and on resume replays it for as many cycles as the block
  is deep. The block then produces its old output again. This set of
  registers, RAMs and replayed inputs is the *reduced set of state-holding
  elements*: it is exactly what must be saved and nothing more.

The RTL implements the architecture of H.-G. Vu, *Dependable and Scalable
FPGA Computing Using HDL-based Checkpointing* (doctoral thesis, NAIST, 2018),
in both of its forms:

* **CPRtree**: every module of the user design gets a checkpoint node, and
  the nodes form a tree along the module hierarchy.
* **CPRflatten**: the design is flattened, all register bits form one
  shifting ring, and every RAM is wired straight to the FIFOs.

Each form comes with a small demonstration application. The applications,
all widths except the 32-bit checkpoint path, the register map and several
control details are this implementation's own; they are listed under
*Departures* below.

## The four host operations

The host controls everything through a 4-register AXI4-Lite slave
(`cpr_sw_dma`):

| offset | register | access |
|---|---|---|
| 0x0 | command: 1 PREPARE, 2 CAPTURE, 3 RESTORE, 4 RESUME | write |
| 0x4 | status: bit0 prepared, bit1 captured, bit2 restored, bit3 running | read |
| 0x8 | byte address of the checkpoint in memory | read/write |
| 0xC | context size in 32-bit words (a build-time constant) | read |

A checkpoint is PREPARE then CAPTURE then RESUME. A restart is PREPARE, then
RESTORE, then RESUME. A task switch captures one task and restores another in
between. The host polls the status register after each command.

* **PREPARE**: the manager drops `req_en`. The request throttles then block
  every new AR/AW request. The user logic keeps running until the channel
  FSMs report that all requests issued before have finished. This can take
  as long as the longest outstanding burst. Then `prepared` is set. The logic
  still runs after this point, but it can no longer start a bus transaction.
* **CAPTURE**: `DRIVE` goes low (every user register and RAM port holds). The
  root of the checkpoint structure is asked to stream its words into the
  Capture FIFO, and the memory DMA writes them out. `captured` is set when
  the root is done and the last write response has arrived. The logic stays
  paused.
* **RESTORE**: the logic is paused. The DMA reads the context into the
  Restore FIFO, and the manager feeds it into the root one word per cycle
  while the FIFO has data. `restored` is set when the structure reports done.
* **RESUME**: `virt` is raised for `VIRT_CYCLES` cycles to replay the saved
  inputs of the dedicated blocks. That is the longest delay among them: 4 in
  the tree design (a four-stage pipelined multiplier), 1 in the flattened
  design (block RAM only). Then `DRIVE` and `req_en` return high in the same
  cycle.

## Consistent snapshots: channel FSMs and request throttling

`cpr_channel_fsm` watches one AXI channel. A request starts on
`valid && ready` of AR (AW) and finishes on the `rvalid && rready && rlast`
(`bvalid && bready`) handshake. The FSM has two states, Idle and Active, and
a counter of outstanding requests. A start and a finish in the same cycle
leave the count unchanged. The top has one FSM for the read channel and one
for the write channel. `channels_idle` is the AND of both.

`cpr_req_throttle` sits on the request channel. With `req_en` low it forces
both the `valid` toward the accepting side and the `ready` toward the
requesting side to 0. So no request is issued on a master port, or accepted
on a slave port, and neither side sees a half handshake. Only the AR and AW
channels are throttled. Data and responses of requests already accepted flow
on, which is what lets the channels drain.

While a capture or restore moves the registers, the user logic's own outputs
are meaningless: a phase field rotating through the ring can look like any
state. The throttle keeps that off the request channels. The demo logic also
qualifies all of its AXI4 handshake outputs with `DRIVE`. A paused state
machine cannot take a beat. And AXI4 allows a slave to accept write data
before the address, so a stray `wvalid` would do harm too.

## What a context looks like

All state moves as a stream of 32-bit words with no handshake. Every counter
in the design knows at build time how many words each part holds.

**Registers (`cpr_reg_ring`).** The registers of a module are concatenated and
cut into K 32-bit words, Reg_0 to Reg_{K-1}, with the last one padded. In
normal operation (`DRIVE` high) they load the next user state. While
capturing, the K words rotate by one word per step: Reg_0 leaves at the top
(`tail`) and also comes back in as Reg_{K-1}. After K steps the registers
hold their old values again, so capture does not disturb a checkpoint that
is followed by RESUME. While restoring, each word shifts in at the top and
the words move down; after K words the first word sent is in Reg_0. Capture
and restore share one set of multiplexers.

`cpr_reg_mux` is the other register circuit, with the same ports and the same
word order and timing. The registers stay in place. A word pointer picks the
one shown on `tail` (a K-input multiplexer) and the one a restore word is
written into. It costs 2K multiplexer inputs against K + 2 for the ring, so
the ring is used for more than two words. `cpr_reg_mux` is used for the
two-word register set of the demo's child, whose second word is mostly
padding. For one word the two circuits are the same.

**Block RAMs (`cpr_ram_ckpt` around `cpr_bram`).** This is the least obvious
part.

* Three registers `we_0`, `addr_0`, `wdata_0` and a 2-input multiplexer on
  each RAM input let the checkpoint circuit own the port while `DRIVE` is
  low. Read data is shared.
* The additional register `hist = {we, addr, wdata}` copies the user's RAM
  inputs every running cycle. When the logic pauses, `hist` holds the inputs
  of the last running cycle. The RAM's registered output (`rdata`) is what
  those inputs produced.
* **Capture**: the circuit sends `hist` first (⌈(1+AW+DW)/32⌉ words), then
  every entry, low word first (⌈DW/32⌉ words each). An entry is read by
  stepping `addr_0`; its word is valid one cycle later.
* **Restore**: the same words come back in the same order. `hist` is
  shifted in, and each entry is written one cycle after its last word
  arrives (a `we_0` pulse).
* **Resume**: `virt` drives the saved `hist` onto the port. The RAM redoes
  the last access, so its output register again shows what the user logic
  was looking at when it paused. The RAM is write-first, so this works even
  when the last access was a write. Without the replay, `rdata` would show
  whatever the restore touched last. If `virt` lasts longer than one cycle
  (because a deeper block shares the window), the same access is repeated,
  which changes nothing.

**Pipelined blocks (`cpr_pipe_ckpt` around `cpr_pipe_mul`).** A dedicated
multiplier with four internal stages has the same problem, four cycles
deep: its output depends on the inputs of the last four running cycles, and
its stages cannot be read or written.

* The additional registers are a four-slot history of the block's inputs
  `{valid, a, b}`. Every running cycle shifts the current inputs in. So
  4 × 65 bits are kept, stored as 9 words: the four valid bits in word 0,
  then `a` and `b` of each slot, newest slot first.
* **Capture and restore**: the 9 words go out and come back through a
  `cpr_reg_ring`, like any register segment.
* **Resume**: during the four `virt` cycles, a multiplexer in front of the
  multiplier feeds it the oldest slot, and the history rotates by one slot
  each cycle. After four cycles the pipeline holds exactly what it held at
  the pause. The history is also back in its original order, so a second
  capture sees the same words.
* `busy` tells the owner that valid inputs are still in flight.

In a CPRtree node the segment is: K register words, then the RAM segment,
then each child's segment in order. In the flattened design it is: C ring
words, then each RAM segment in order.

## CPRtree: a checkpoint node per module

`cpr_node` is the control part of one tree node. Its port toward the parent
is the *CPR gate*:

| signal | dir | meaning |
|---|---|---|
| `CPR_request[2:0]` | in | NONE / CAPTURE / RESTORE, broadcast to the whole tree |
| `CPR_state[2:0]` | out | IDLE / BUSY / DONE |
| `capture_flag` | in | token from the parent: it is this node's turn to send |
| `cpr_out_almost_full` | in | Capture FIFO almost-full flag, broadcast |
| `D_cp`, `D_cp_valid` | out | captured word toward the parent |
| `Q_r`, `Q_r_valid` | in | restore word from the parent |

Toward each child there is a matching CPR interface (`a_CPR_state`,
`a_capture_flag`, `a_D_r`, `a_D_r_valid`, `a_Q_cp`, `a_Q_cp_valid`).

**Capture.** With the token, a node steps its own sources one word per cycle,
but only while `cpr_out_almost_full` is low. A word is valid one cycle after
its step and is registered into `D_cp` the next. It then gives the token to
each child with a non-empty segment in turn. It copies every word the child
sends into its own `D_cp` at once, *without* looking at almost_full. That is
the point of the scheme: a word already on its way up the tree is never
stopped, so no level needs a handshake. The cost is that the Capture FIFO
must keep spare room. After almost_full rises, the words already in flight
still arrive: one per level of the tree, plus the node's own two-stage
pipeline. The FIFO's guard gap (`AF_GAP`, 6 entries) must be larger than
that. With the 16-entry FIFO this leaves 10 entries of useful buffering.

**Restore.** A node takes words from `Q_r` for its own registers and RAM. It
passes the rest through a register to the child whose turn it is. It reports
DONE only when its own words are placed and all children are DONE. Removing
the request (NONE) sends every node back to IDLE.

**Timing.** With a memory that keeps up, a capture or restore moves one word
per cycle plus a fixed overhead. In `tb_cpr_top` a 33-word capture takes
about 75 cycles from the host's command write to the status read that
reports it done. Most of that is host polling over AXI4-Lite.

## CPRflatten: one ring and direct RAM paths

In the flattened form there are no levels. All B register bits of the design
are packed into one W-by-C matrix (W = 32, C = ⌈B/W⌉, padded). It is
rotated through its output back into its input: the same circuit as
`cpr_reg_ring` with K = C. Every RAM keeps its own `cpr_ram_ckpt`.
`cpr_flat_ctrl` holds the capture and restore FSMs for the whole design. It
uses one word counter over the layout (ring, then RAM 0, RAM 1, …):

* Capture: one multiplexer in front of the Capture FIFO picks the ring tail or
  the RAM circuit the counter points to. A word is stepped only while the FIFO
  is not almost full. There is nothing in flight beyond the two-stage
  pipeline.
* Restore: comparators on the counter decide whether a Restore FIFO word is
  shifted into the ring or loaded into a RAM.

The controller's gate is the same as the CPRtree root gate, so the same
static part drives both forms.

## Static part

These blocks do not depend on the user design:

* `cpr_sw_dma`: the host register slave above.
* `cpr_manager`: the operation sequencer above.
* `cpr_fifo` ×2: Capture and Restore FIFO, 16 × 32 bits, first-word
  fall-through, with `almost_full` at `DEPTH - AF_GAP`.
* `cpr_mem_dma`: an AXI4 master for the checkpoint memory. On capture it
  starts a write burst as soon as the Capture FIFO holds one word; it does
  not wait for the FIFO to fill. The burst length is the words present,
  capped by the words left and by 16, so every beat is available when the
  burst starts. On restore it issues read bursts no longer than the free
  space in the Restore FIFO, so the FIFO cannot overflow. Bursts are INCR
  with 4-byte beats.

## The two demonstration designs

`cpr_top` holds both designs side by side. They share the clock and reset;
each has its own ports. The flattened one's ports carry the prefix `f_`.

**CPRtree demo (`app_sum` with child `app_sq`).** A job reads `N_WORDS` (16)
words from `src_addr` in one AXI4 read burst and sums them. It stores the
words in a 16-entry block RAM and reads them back into a rotate-and-XOR
checksum. On the way back, a child module sums their squares through the
four-stage pipelined multiplier. Finally it writes the sum to `dst_addr`. The
root node has 4 register words (the control word with phase/index/flags is
Reg_0), a RAM segment of 2 history words and 16 entries, and the child's 11
words: 2 register words (the sum of squares, and a 16-bit count of squares
with padding) and 9 multiplier history words. That makes a 33-word context
over two tree levels. During the readback, words enter the child's
multiplier, and the job waits until the child has counted all 16 squares. A
checkpoint there catches both the RAM output and products still in flight.
The job uses the read and write channels, both kinds of delayed block and a
child node, so each mechanism has a reason to work.

**CPRflatten demo (`app_flat` in `cpr_flat_sys`).** A moving sum over the
last 16 samples of a valid/ready stream, plus a running total and a count.
The window lives in a block RAM, read in a sample's first cycle and written
in its second. Its 133 register bits form a 32 × 5 ring. With the RAM
segment (2 + 16 words) the context is 23 words. The stream holds no
outstanding transactions, so this design has no channel FSM: PREPARE
completes at once, and `DRIVE` low simply closes the stream.

Context sizes follow from the parameters. For the tree demo,
`CTX_WORDS = 4 + ⌈(1+AW+32)/32⌉ + 2^AW + 11` with `AW = log2(N_WORDS)`.

## Files

| file | contents |
|---|---|
| `rtl/cpr_pkg.sv` | request, state and command encodings, status bit positions |
| `rtl/cpr_channel_fsm.sv`, `rtl/cpr_req_throttle.sv` | consistency logic |
| `rtl/cpr_sw_dma.sv`, `rtl/cpr_manager.sv`, `rtl/cpr_fifo.sv`, `rtl/cpr_mem_dma.sv` | static part |
| `rtl/cpr_node.sv`, `rtl/cpr_reg_ring.sv`, `rtl/cpr_reg_mux.sv`, `rtl/cpr_ram_ckpt.sv`, `rtl/cpr_bram.sv` | CPRtree node and capture/restore circuits |
| `rtl/cpr_pipe_mul.sv`, `rtl/cpr_pipe_ckpt.sv` | pipelined multiplier and its additional registers |
| `rtl/cpr_flat_ctrl.sv` | CPRflatten FSMs |
| `rtl/app_sum.sv`, `rtl/app_sq.sv`, `rtl/app_flat.sv`, `rtl/cpr_flat_sys.sv` | demonstration designs |
| `rtl/cpr_top.sv` | both designs side by side |
| `tb/tb_*.sv` | one self-checking testbench per block |
| `tb/tb_axi_mem.sv` | AXI4 memory model with random stalls (testbench only) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. It
has a watchdog. For example, the whole system at default parameters:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cpr_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/cpr_pkg.sv tb/tb_cpr_top.sv -o sim
./obj_dir/sim
```

Replace `tb_cpr_top` with any other testbench name.

What the testbenches establish:

* `tb_cpr_top` runs both designs at their default parameters.
  * CPRtree: a checkpoint of a job whose read burst is in flight. PREPARE
    must wait for the channel, and the job must finish correctly after
    RESUME.
  * CPRtree: a job captured in the middle of its RAM readback, then an FPGA
    reset. A second job is started after PREPARE, so its read request is
    held by the throttle. It is captured in that state. The first job is
    restored and finishes; then the second is restored and finishes.
  * CPRflatten: a checkpoint, a reset and a restart with the producer
    rewound.
  * It counts each mechanism and fails if one never happened: channel wait,
    throttled request, paused cycles, captured and restored words,
    Capture-FIFO backpressure, child forwarding, RAM capture/restore and
    replay.
* `tb_app_sum` and `tb_cpr_flat_sys` do the same per design, at more
  capture points.
* The block testbenches check each circuit against a model:
  * `tb_cpr_node`: a parent with two children, and backpressure.
  * `tb_cpr_ram_ckpt`: a 40-bit RAM, so two words per entry, and a replay
    after both a read and a write.
  * `tb_cpr_flat_ctrl`: a ring and two RAMs with random almost_full.
  * `tb_cpr_reg_mux`: banks of 2 and 3 words, capture twice in a row,
    pointer wrap-around.
  * `tb_cpr_pipe_ckpt`: every product must match the inputs of four running
    cycles before, also across pauses, replays and a reset with restore.
  * `tb_cpr_mem_dma`: bursts with stalls on every channel.

The memory model stalls at random, so FIFO levels and burst lengths change
from run to run.

## Departures and limits

* **No insertion tool.** The checkpoint circuits here are written by hand for
  the demonstration designs. Word counts are fixed parameters. The original
  flow generates them from the user's HDL and, for CPRflatten, orders ring
  bits along existing register-to-register paths to save multiplexers
  ("graph-aware mapping"). That mapping is a design-time step; the ring here
  uses declaration order.
* **Demonstration applications only.** The matrix multiply, Dijkstra,
  stencil and string-search designs of the original evaluation are not
  included. Their contexts (about 2065, 279, 3671 and 727 words, in trees 4,
  2, 4 and 3 levels deep) are within what the static part handles. Its word
  counter is 32 bits, and the 6-entry guard gap exceeds every one of those
  depths.
* **Pause after CAPTURE.** After CAPTURE the logic stays paused until the
  host sends RESUME, even for a plain checkpoint. A checkpoint is therefore
  always three commands.
* **Host protocol.** The register map and command codes are this design's.
  The host software (prepare/capture/restore/resume calls) is modelled by
  testbench tasks.
* **Memories.** Application memory and checkpoint memory are separate AXI4
  ports here; in the original system they are one unified memory.
* **AXI simplifications.** The memory DMA does not split bursts at 4 KB
  boundaries, so the checkpoint address should be aligned. It does not check
  write or read responses.
* **Master side only.** Only master-side throttling is instantiated, because
  the demo logic has no AXI slave port. The throttle module itself covers
  both sides.
* **Status register.** The status bits are levels that a new PREPARE clears.
  A command sent in the wrong state is ignored silently.
* **Dedicated blocks covered.** Block RAMs (delay 1) and a pipelined
  multiplier (delay 4) have checkpoint circuits. A distributed RAM, whose
  read is combinational, needs no additional registers: only its contents
  would be captured. That variant is not built. One `virt` window of
  `VIRT_CYCLES` serves all blocks of a design, so a shallower block repeats
  its last access for the extra cycles. This is harmless for the write-first
  block RAM used here.
* **Register circuit choice.** Which register circuit a module uses is fixed
  by hand here: the ring for more than two words, the MUX-based bank for the
  child's two words.
