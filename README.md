# MBP-light: a memory-management processor for a distributed shared memory cluster

MBP-light sits in each cluster of a large distributed-shared-memory (DSM)
multiprocessor. A cluster has four application processors with L2 caches on a
shared cluster bus, a cluster memory, and a router into the inter-cluster
network. MBP-light runs the coherence protocol: it
- answers L2 misses from cluster memory;
- turns misses it cannot serve locally into network packets;
- handles the protocol packets that arrive from other clusters.

The design rests on one idea: **the packet buffers are the processor's
operands**. A small programmable core runs the protocol in software. Packet
buffers (68-bit flits) sit in a register file that the core addresses
directly, so software can read, edit and forward a packet without copying it.
The frequent, simple cases need no software at all, because hardwired logic
takes them:
- a bus access to a line the cluster may use is served from cluster memory;
- a coherent network message whose answer is known from a small cache gets an
  acknowledgment packet.

```
              cluster bus (4 x L2)        cluster memory (data SDRAM, tag SRAM)
                        |                          |
                 round-robin arbiter               |
                        |                          |
                 +------+--------------------------+------+
                 |      Main Memory Controller (mmc)      |--- irq --+
                 +-------------------+--------------------+          |
                                     | block transfers               v
   local memory (21b x 64K) --- +----+-----------------------------------+
   I/O space (64K)          --- |  MBP Core (mbp_core)                   |
                                |  16 GPRs x 16b | 112 PBRs x 68b        |
                                +----+-----------------------------------+
                                     | PBR sets 0..2 (cyclic rx buffer)
                 +-------------------+--------------------+
                 |  RDT Interface (rdt_interface)         |
                 |  Packet Handler | Ack Generator        |
                 |                 |  Net Cache, Ackmap   |
                 |                 | Ack Collector        |
                 +-------------------+--------------------+
                                     |
                               network router
```

The top module is `rtl/mbp_light.sv`.

## Buffer-register architecture

The core has two register files:

| file | count x width | addressed by | module |
|------|---------------|--------------|--------|
| GPR  | 16 x 16 bit   | 4-bit field of the instruction | `gpr_file` |
| PBR (packet buffer register) | 112 x 68 bit | the *contents* of a GPR | `pbr_file` |

A PBR holds one network flit. Bits [63:0] are data and bits [67:64] are four
protocol tag bits. PBRs are never named in the instruction word. An
instruction names a GPR, and that GPR holds the PBR number (0..111). A loop
can therefore walk a packet flit by flit with an ordinary ADDI.

The 112 PBRs are grouped into four *sets* of 28 flits:
- Sets 0, 1 and 2 form a cyclic receive buffer owned by the RDT Interface.
  While the core works on the packet in one set, the next packet lands in
  another.
- Set 3 belongs to the core, for building packets of its own.

Any set can be handed back to the RDT Interface to be sent. A packet is never
copied between the network side and the core.

The PBR file has three independent read/write ports: core, RDT Interface and
MMC. If two agents write the same PBR in the same cycle, the MMC wins over
the RDT Interface, and the RDT Interface wins over the core. Software is
expected to avoid this. The core's write port has a five-bit field mask: four
16-bit fields plus the tag bits.

## MBP Core pipeline

`mbp_core` is a four-stage in-order pipeline with 21-bit instructions and a
16-bit data path:

1. **IF**: fetch from local memory. The fetch port is a synchronous RAM port,
   so the instruction arrives in the next cycle.
2. **RF**: decode, read the GPRs, forward results, resolve branches and check
   hazards. Interrupts are taken here.
3. **LM / EX / GM**: three units side by side; each instruction uses one.
   - LM: local memory or I/O space load/store.
   - EX: the ALU.
   - GM: PBR access. PLD, PST, PEQ and PMOV are done here, and XFER is issued
     to the MMC here.
4. **WB**: write one GPR.

Hazards:
- **Forwarding**: results reach RF from stage 3 (except load data) and from
  WB.
- **Load-use**: a load (LD, IN) followed directly by a use of its result
  stalls one cycle.
- **Branches**: BEQZ, BNEZ, JMP, JR and RETI resolve in RF. A taken branch
  costs one bubble (the instruction already fetched is discarded).
- **Busy PBRs (scoreboard)**: see below.

### Block transfers and out-of-order completion

`XFER` moves a run of 1 to 31 consecutive PBRs (a length of 0 moves one), one flit per beat, through
the MMC. The six directions are:
- cluster memory → PBRs;
- PBRs → cluster memory;
- PBRs → cluster bus (the data of a held read);
- cluster bus → PBRs (the data of a held write);
- tag SRAM → PBRs (the tags of consecutive lines, one per PBR, in bits [1:0]);
- PBRs → tag SRAM.

Such a transfer takes tens of cycles, and the core does not wait for it:
1. XFER hands the request to the MMC.
2. Its PBR range is marked busy in a 112-bit scoreboard.
3. The pipeline moves on.
4. When the MMC finishes, it reports the range and the bits are cleared.

Only an instruction that touches a busy PBR stalls: PLD, PST, PEQ, PMOV, or
another XFER. Every other instruction completes while the transfer runs, so
later instructions finish before the earlier XFER. The MMC queues one command.
A second XFER waits in RF until the queue is free.

### Interrupts

The MMC raises `irq` while it holds a bus request that software must handle.
When interrupts are enabled, the core takes the interrupt in RF:
1. The instruction in RF is replaced by a jump to address `0x0004`.
2. That instruction's address is saved.
3. Interrupts are disabled.

`RETI` returns to the saved address and enables interrupts again. The handler
must acknowledge the MMC before `RETI`, or the interrupt is taken again. The
core has one level of interrupt and no nesting.

## Instruction set

Fields: `[20:16]` opcode, `[15:12]` rd, `[11:8]` ra, `[7:4]` rb, `[7:0]` imm8
(sign-extended where it is an offset). In the PBR instructions, `PBR[ra]`
means the PBR whose number is held in GPR ra. The PBR field select `f` in `[2:0]`
is 0..3 for the 16-bit fields (bits 16f+15:16f) and 4 for the tag bits.

| op | mnemonic | effect |
|----|----------|--------|
| 0 | NOP | |
| 1-7 | ADD SUB AND OR XOR SHL SHR | rd = ra op rb (shifts by rb[3:0]) |
| 8 | ADDI | rd = ra + sext(imm8) |
| 9 | LDI | rd = zext(imm12) |
| 10 | LDIH | rd = {imm8, ra[7:0]} |
| 11 / 12 | LD / ST | rd = LM[ra + sext(imm8)] / LM[...] = rd |
| 13 / 14 | IN / OUT | the same on the I/O space |
| 15 / 16 | BEQZ / BNEZ | if ra ==/!= 0: pc = pc + sext(imm8) |
| 17 / 18 | JMP / JR | pc = imm16 / pc = ra |
| 19 | PLD | rd = field f of PBR[ra] |
| 20 | PST | field f of PBR[ra] = rd |
| 21 | PMOV | PBR[rd] = PBR[ra] (whole 68 bits) |
| 22 | XFER | transfer: command `[7:5]`, length `[4:0]`, first PBR in ra, cluster memory line in rd |
| 23 | RETI | return from interrupt |
| 24 | HALT | stop fetching |
| 25 | PEQ | rd = (field f of PBR[ra] == rb) |

`tb/tb_asm_pkg.sv` has small functions that build these instruction words.
The testbenches use them to write their programs.

## RDT Interface

`rdt_interface` joins the network router to the core. It has three parts.

### Packet Handler

`packet_handler` receives and sends packets. Each 68-bit flit is moved with a
valid/ready handshake, and `last` marks the final flit. The first flit is the
header:

| bits | field |
|------|-------|
| 67:64 | protocol tags |
| 63:60 | type: 0 data, 1 coherent message, 2 ack, 3 nack |
| 59:52 | source cluster |
| 51:44 | destination cluster |
| 43:40 | Ack Collector slot |
| 39:32 | reserved |
| 31:0  | DSM line address |

Receiving:
- An ack or nack packet goes to the Ack Collector and is not stored.
- Any other packet is written into the next receive set, 0 → 1 → 2 → 0.
- If that set is still in use, the link is held: `in_ready` stays low.
- Flits past the 28th are dropped.

Each set is in one of three states: FREE (may receive), FULL (holds a packet
for the core) or SEND (being sent). The core reads the oldest FULL set from
`RX_STATUS`. It then does one of two things:
- releases the set with `RX_RELEASE`;
- or, having edited the packet in place, sends it with `TX_SEND` (set and
  length).

Set 3 is sent the same way.

Sending takes one flit per cycle. Between packets, a waiting hardware reply
from the Ack Generator goes first. After that, SEND sets go in round-robin
order.

### Ack Generator: Net Cache and Ackmap Cache

When a coherent-message header arrives, the Ack Generator (`ack_generator`)
looks up two caches in the same cycle:
- **Net Cache** (`net_cache`): direct mapped, 512 entries, indexed by the DSM
  line address. It says whether this cluster holds the line.
- **Ackmap Cache** (`ackmap_cache`): direct mapped, 64 entries, indexed by the
  source cluster number. It gives the 16-bit bitmap of the return path
  through the network.

If both hit, the hardware builds a two-flit reply and sends it back to the
source:
- flit 0 is the header: ack if the line is cached here, nack if not;
- flit 1 carries the bitmap.

If either cache misses, no reply is built and the core's software answers.
The message itself is always stored in a PBR set as well. The core fills both
caches through I/O registers.

### Ack Collector

`ack_collector` counts replies for multicast requests. Software arms one of
16 slots with the number of replies it expects. Each incoming ack or nack for
that slot is counted, and a nack is remembered. The slot reports *done* when
the count is reached.

## Main Memory Controller

`mmc` owns the cluster memory (64-bit data beats, 4 beats per line) and the
tag SRAM (2 bits per line). It is the slave on the cluster bus.

| tag state | bus read | bus write |
|-----------|----------|-----------|
| INVALID   | held, irq | held, irq |
| SHARED    | served | held, irq |
| EXCLUSIVE | served | served |
| TRAP      | held, irq | held, irq |

A *served* request is the L3-hit case. The MMC streams the line between the
bus and cluster memory with no software involved. A *held* request is left
pending on the bus (`bus_held`), its line and kind appear in the
`MMC_REQ_*` registers, and `irq` rises. A typical handler for a held read:

1. Read `MMC_REQ_LO/HI` to learn the line and whether it is a write.
2. Run the protocol. This may mean sending packets through the RDT Interface
   and waiting for replies. It may also mean fetching the line with
   `XFER cm→PBR`.
3. `XFER PBR→bus` returns the line to the waiting processor, and the bus
   transaction ends. For a held write, `XFER bus→PBR` takes the data, and
   `XFER PBR→cm` can then store it.
4. Optionally write the new tag state. The next access to the line is then
   served in hardware. There are two ways to do it: through the `MMC_TAG_LO/HI`
   and `MMC_TAG_WR` registers for one line, or with `XFER PBR→tag` for a run
   of lines.
5. Write `MMC_IRQACK`, then `RETI`.

Instead of steps 3-4, software may update the tag and write `MMC_RESUME`. The
held request is then checked again and served in hardware.

When the MMC is idle, it picks its next job in this order: a pending tag
write, a queued XFER, a resume, then a new bus request.

### Cluster bus arbitration

Four L2 caches share the cluster bus, and `bus_arbiter` decides which one
the MMC hears:
- Grants are round robin, starting after the last owner.
- The grant is registered. A request on an idle bus therefore reaches the
  MMC one cycle after it is raised.
- The owner keeps the bus for its whole transaction. This includes a request
  held for software, which can last many cycles.
- The bus is released in the cycle the MMC signals the last beat.

The response lines (beat number, read data, done, held) are shared by all
masters. Each master treats them as its own while its `bus_gnt` bit is set.

## I/O space

The core's 64K I/O space is separate from local memory. Addresses
`0xFF00-0xFFFF` are decoded inside the chip. All others appear on the `io_*`
pins, where other devices can be attached. Internal registers:

| addr | name | access | meaning |
|------|------|--------|---------|
| FF00 | RX_STATUS | r | [15] a packet waits, [9:8] its set, [4:0] its length |
| FF01 | RX_RELEASE | w | [1:0] set to free |
| FF02 | TX_SEND | w | [1:0] set, [12:8] length in flits |
| FF03 | SET_STATE | r | 2 bits per set |
| FF10/11 | NC_ADDR_LO/HI | w | Net Cache fill address |
| FF12 | NC_WRITE | w | [1] valid, [0] cached: write the entry |
| FF13 | AM_BITMAP | w | Ackmap fill bitmap |
| FF14 | AM_WRITE | w | [8] valid, [7:0] cluster: write the entry |
| FF15 | AG_COUNT | r | [15:8] acks, [7:0] nacks generated |
| FF18 | AC_ARM | w | [15:12] slot, [7:0] expected replies |
| FF19 | AC_DONE | r | done bit per slot |
| FF1A | AC_NACK | r | nack-seen bit per slot |
| FF20 | MMC_REQ_LO | r | held request line [15:0] |
| FF21 | MMC_REQ_HI | r | [15] held, [14] write, [5:0] line [21:16] |
| FF22/23 | MMC_TAG_LO/HI | w | line whose tag to write |
| FF24 | MMC_TAG_WR | w | [1:0] new state; starts the write |
| FF26 | MMC_RESUME | w | re-check the held request |
| FF27 | MMC_IRQACK | w | drop irq for the current held request |

An I/O read returns its data one cycle after the request, just like a
local memory read.

## Top-level ports

`mbp_light` brings out:
- `rdt_in_*`, `rdt_out_*`: the router link;
- `bus_*`: the cluster bus. Requests come in as four-entry arrays, one per
  L2 cache. `bus_gnt` says which cache owns the shared response lines;
- `cm_*`: cluster memory (request held until `cm_ack`);
- `tag_*`: tag SRAM (one cycle read latency);
- `io_*`: external I/O;
- `lm_boot_*`: local memory loader, used while `rst` is high;
- `halted`, `irq` and `xfer_busy`: status;
- `stats`: event counters, for observation only.

The local memory (21 bits x 64K, two ports) is inside the top. This keeps the
design self-contained. In a real chip it would be an external part.

## Sizes

| quantity | value | origin |
|----------|-------|--------|
| data path, GPRs | 16 bit, 16 registers | design description |
| instruction | 21 bit | design description |
| PBRs | 112 x 68 bit | design description |
| receive sets | 3, used cyclically | design description |
| local memory, I/O space | 64K words each | design description |
| Net Cache | 512 entries, direct mapped | design description |
| clusters | 256 (8-bit cluster number) | design description |
| processors (L2 caches) on the cluster bus | 4 | design description |
| PBR set size | 4 sets x 28 | own choice |
| Ackmap Cache | 64 entries, 16-bit bitmap | own choice |
| Ack Collector | 16 slots, 8-bit counters | own choice |
| cache line | 4 x 64-bit beats, 22-bit line number | own choice |
| tag | 2 bits, 4 states | own choice |

Everything runs at these default sizes.

The on-chip tables total 21,888 bits:

| table | bits |
|-------|------|
| PBRs | 7,616 |
| GPRs | 256 |
| Net Cache | 12,800 |
| Ackmap Cache | 1,216 |

The original chip reports 44,848 bits of internal memory.

## What follows the original design and what does not

Taken from the original design:
- the buffer-register architecture: 16 GPRs, 112 PBRs addressed through GPRs;
- the four pipeline stages, with LM/EX/GM side by side;
- 21-bit instructions, a 16-bit data path and an I/O-mapped 64K space;
- three PBR sets used as a cyclic receive buffer;
- XFER block transfers with out-of-order completion, for cluster memory data
  and tags as well as for the cluster bus;
- the split of the RDT Interface into Packet Handler, Ack Generator and Ack
  Collector;
- a 512-entry direct-mapped Net Cache and an Ackmap Cache indexed by source
  cluster;
- an MMC that controls a cluster bus shared by four processors;
- an MMC that checks the tag on an L2 miss and interrupts the core.

This design's own choices:
- the instruction set and its encoding;
- forwarding, branch timing and the interrupt scheme;
- the header layout and the link handshake;
- the set states and send arbitration;
- the Ackmap Cache and Ack Collector sizes;
- the tag states and line size;
- the bus and memory handshakes, and round-robin bus arbitration;
- the register map.

Known departures:
- **Local memory on chip**: the original connects the 21-bit x 64K local
  memory from outside. Here it is inside the top, so that the design is
  self-contained.
- **Barrier hardware**: the original puts dedicated barrier hardware in the
  I/O space. Its function is not specified, so it is not built. External
  I/O addresses are brought out to the pins for it.
- **Multi-flit headers**: only the first flit of a header is decoded in
  hardware. The core reads the rest from the PBRs.

## Verification

Each block has a self-checking testbench in `tb/`, named `tb_<block>.sv`.
Each ends by printing `TB_RESULT checks=N failures=M`. The end-to-end test
`tb/tb_mbp_light.sv` runs the whole chip at its default sizes:
- Protocol firmware is assembled into local memory through the boot port.
- A router model sends coherent messages (hardware ack, hardware nack, cache
  miss), ack packets and data packets. It also stalls its output so that all
  three receive sets fill up.
- Four cluster bus masters issue reads and writes to lines in different tag
  states. Some are served by the MMC alone. Others are held, interrupt the
  core, and are served by its handler with XFER transfers. One handler sets
  the new tag through the tag registers, the other through a PBR→tag
  transfer. At the end, all four masters request the bus at once.
- Every packet and every bus beat is checked against models.
- Each mechanism is counted, and a count of zero is a failure. The
  mechanisms are: hardware acks and nacks, Ack Generator misses, receive
  stalls, interrupts, held requests, scoreboard stalls, load-use stalls,
  instructions completing while a transfer is in flight, and bus grants made
  under contention.

In this test, an L3 hit completes in 11 bus cycles, counting arbitration, and
it is checked to stay within 38 cycles. That is the original chip's 760 ns at 50 MHz, measured with
a 1-4 cycle memory model. A miss handled by software takes about 31 cycles
before the network part of the protocol. The network part is not modelled.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/mbp_pkg.sv tb/tb_asm_pkg.sv tb/tb_mbp_light.sv --top-module tb_mbp_light
./obj_dir/Vtb_mbp_light
```

Replace `tb_mbp_light` with any other testbench to run a single block. The
`p_*` properties in the RTL check handshake rules during simulation.

## Limits

- XFER takes its cluster memory line number from a 16-bit GPR. It therefore
  reaches only the first 64K of the 4M lines that the bus and the tag
  registers can address. A wider line register would lift this.
- The protocol software in the testbench is a demonstration. It is not a
  full coherence protocol, and no protocol-processing times are claimed
  beyond the L3-hit case.
- The `io_*` data read back from the external I/O space has no wait state.
  A slow device would need one added.
- The local memory and the PBR file are written as plain arrays. A
  synthesis flow would map them to RAM macros.
