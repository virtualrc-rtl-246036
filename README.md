# VirtualRC virtual FPGA platform

FPGA boards from different vendors all offer roughly the same resources: an
FPGA, a host bus, a way for software to reach registers and block RAM on the
chip, and one or more external memories. But each board wraps them in its own
interfaces, so application RTL written for one board has to be rewritten for
the next. A *virtual platform* fixes one set of interfaces to those resources.
The application is written against that fixed set. A thin layer of
board-specific logic then maps it onto each physical board.

This repository holds synthesizable SystemVerilog for the board-independent
part of such a platform:

* **virtual memories.** You choose how many there are. Each has any number of
  read and write ports, and each port has its own width. A round-robin arbiter
  shares one physical memory port among a memory's ports. Width-changing
  buffers convert between the application's element width and the memory's
  native word.
* **FPGA communication controllers.** They give host software access to
  application registers and to a shared block RAM.
* **a platform-bus decoder.** It lets the host reach the controllers and the
  virtual memories.
* **a choice of mapping for each virtual memory.** It can go to on-chip block
  RAM or to the board's external memory port.

The board-specific side is left outside this RTL: the host, the PCIe/PCI-X bus
IP, the external memory controller, and the software API. Its signals are
brought out as ports.

## The default configuration

`vrc_virtual_platform` is the top-level entity an application is written
against. Parameters set all of these:

* the number of virtual memories;
* where each memory is mapped, and its size when on-chip;
* the list of read ports and the list of write ports. Each port names the
  memory it attaches to and its element width;
* the number and width of the communication controllers.

The defaults give this example configuration:

| resource | configuration |
|---|---|
| virtual memory 0 | one 32-bit read port (e.g. streaming floating-point inputs); mapped to external memory (`ext_*[0]` ports) |
| virtual memory 1 | one 16-bit write port (e.g. fixed-point results); mapped to 8 KB of on-chip block RAM |
| communication controller | one, 32-bit data, 8 control + 8 status registers, 256-word block RAM |
| native memory word | 64 bits |

The source example places both memories in external memory. Here memory 1 is
mapped on-chip by default, so the default build contains both kinds of
mapping. Set `VM_ONCHIP = 2'b00` to match the example exactly.

```
 host ──platform bus──► vrc_bus_decoder ─┬─► vrc_comm_ctrl ◄──► app registers / block RAM
                                         ├─► vrc_virtual_memory 0 ◄── vrc_vmem_rd_port ◄─► app rd_*[0] (32 bit)
                                         │        └─ round-robin ─► ext_*[0] (external memory)
                                         └─► vrc_virtual_memory 1 ◄── vrc_vmem_wr_port ◄─► app wr_*[0] (16 bit)
                                                  └─ round-robin ─► vrc_onchip_mem
```

## Virtual memory ports: streams of elements over native words

Both directions use the same kind of command. The application pulses `start`
with a byte address and an element count. The port stays `busy` until the
transfer is done. Then:

* **read port** (`vrc_vmem_rd_port`): the elements come out on a valid/ready
  stream.
* **write port** (`vrc_vmem_wr_port`): the application supplies the elements
  on a valid/ready stream.

Rules for the command:

* The start address must be aligned to the element size, not to the memory
  word.
* The count can be any value. Transfers are not limited to whole words or to
  fixed burst sizes.

An NW-bit memory word holds NW/PW elements, called lanes, lowest lane first.

**Read side.** The port works out the first lane and how many words the
transfer covers. It issues one word read per word and pushes the returned
words into a FIFO. It then hands out lanes from the head word, and pops the
word after its last lane, or after the last element of the transfer.

The read port never over-fills its buffer, which is the subtle part. It counts
words that have been requested but not yet consumed ("in flight"), and issues a
new read only while that count is below the FIFO depth. Every answer therefore
has a reserved slot, whatever the memory latency and however long the
application holds `rd_ready` low. With a memory that answers in one cycle, the
port streams one element per cycle.

**Write side.** The port collects elements into an accumulator word and sets
the byte enables of each lane it fills. It queues {address, data, enables} in
the FIFO when the last lane fills or the transfer ends. A transfer that starts
or ends in mid-word therefore writes only its own bytes. The rest of that word
in memory is untouched. Writes are posted. `busy` falls once the memory has
taken the last queued word.

## Sharing one memory: arbitration and read routing

Each `vrc_virtual_memory` is the meeting point of one memory's requesters.
In the top, its requester slots come in this order:

1. every read port;
2. every write port;
3. the host.

Only the ports attached to that memory, and the host when it addresses that
memory, ever raise their request there. The other slots stay low, and
synthesis removes them.

`vrc_rr_arbiter` grants one requester per cycle. It searches upward from a
pointer, and after each accepted grant the pointer moves just past the winner.
With all requesters busy, each is served once every N grants.

The memory port returns read data **in request order**, with any latency. When
a read is granted, the requester's index goes into a tag FIFO. Each returning
word goes to the requester at the head of that FIFO. Reads are held back
(writes are not) while the tag FIFO is full.

Memory port protocol:

* a request is `m_req`, `m_we`, word address, data and byte enables;
* it is taken in the cycle `m_gnt` is high;
* read data returns later on `m_rvalid` / `m_rdata`.

`vrc_onchip_mem` always grants and answers after one cycle. An external memory
controller may stall and answer later, as long as it keeps the order.

## Host access: address map and registers

The platform bus carries 64-bit word requests (`vrc_pkg::host_req_t`) with
`host_valid` / `host_gnt`, and read data on `host_rvalid` / `host_rdata`.
`vrc_bus_decoder` allows one outstanding read. It takes no new request until
the data is back.

| address bits [31:28] | target |
|---|---|
| 0 … NUM_CC-1 | communication controller |
| NUM_CC + v | virtual memory v (low bits = word address) |
| other | unmapped: writes are dropped, reads return 0 |

Inside a communication controller (`vrc_comm_ctrl`), word address bits [15:0]:

| address | meaning |
|---|---|
| `0x0000 + i` | control register i. The host writes it and the application sees it on `cc_regs`; each write also pulses `cc_reg_wr[i]` for one cycle (e.g. a "go" bit) |
| `0x4000 + i` | status register i, read-only, driven by the application on `cc_status` |
| `0x8000 + i` | block RAM word i, shared with the application's own port (`cc_bram_*`) |

Controller reads answer one cycle after the request. The application's block
RAM port also has one cycle of read latency. If both sides write the same word
in one cycle, the application's value is kept.

## Parameters

Top (`vrc_virtual_platform`):

* `NUM_VM`: number of virtual memories, 2.
* `VM_ONCHIP`: mapping of each memory, one bit per memory, bit v for memory
  v. The default `2'b10` maps memory 1 on-chip.
* `VM_DEPTH`: on-chip size of each memory in words, 1024 each (8 KB).
* `NUM_RDP`, `RDP_VM`, `RDP_W`: the read ports. For each one, the memory it
  attaches to and its width. The default is one 32-bit port on memory 0.
* `NUM_WRP`, `WRP_VM`, `WRP_W`: the same for write ports. The default is one
  16-bit port on memory 1.
* `RD_DW`, `WR_DW`: width of the read and write data arrays on the top's
  ports, 32 and 16. A narrower port uses the low bits.
* `NW`: native memory width, 64. It must not exceed the 64-bit host bus.
* `AW`: byte-address width, 32.
* `MAW`: memory word-address width, 26.
* `LW`: element-count width, 32.
* `FIFO_DEPTH`: port buffer depth, 8 words.
* `TAG_DEPTH`: outstanding reads per memory, 32.
* `NUM_CC`, `CC_W`, `NUM_REGS`, `BRAM_DEPTH`: communication controllers.

The per-memory and per-port lists are packed vectors with 32-bit entries,
entry 0 in the lowest bits. For example, three read ports of 8, 32 and 64
bits are `.RDP_W({32'd64, 32'd32, 32'd8})`. The top stops elaboration with an
error if a port is wider than its data array or names a memory that does not
exist.

Port widths must divide `NW` and be whole bytes. Assertions check this, the
start-address alignment, and the handshake rules:

* the arbiter's grant is one-hot;
* no response arrives without a tag;
* no FIFO overflows;
* no second read starts on the bus.

## What follows the source design and what is this design's own

**From the architecture:**

* the four resources: FPGAs, platform bus, communication controller, external
  memories;
* the configuration options: number of virtual memories, size, number and
  direction of ports, port widths, number and width of controllers;
* round-robin arbitration among a memory's ports;
* width-changing stream buffers;
* the choice of on-chip or external mapping for each memory;
* transfers of any size;
* host access to the virtual memories over the platform bus;
* the 32-bit-read / 16-bit-write example configuration.

**Chosen here,** because the architecture does not define them:

* every protocol (valid/ready streams, start/address/count commands, req/gnt
  memory requests with in-order responses);
* the credit scheme and the tag FIFO;
* byte-enabled partial writes;
* the bus format and address map;
* the register map;
* all sizes not listed above: native width, FIFO depths, on-chip memory size,
  register count, block RAM size.

Reset is synchronous and active high. It clears control state but not memory
contents.

**Departures and limits:**

* Every memory's arbiter has a slot for every port of the platform. This
  keeps the wiring regular; synthesis removes the unused slots.
* A virtual FPGA is just this top-level entity. A multi-FPGA platform
  instantiates one per physical FPGA.
* A FIFO-style interface between host and application is not provided. Host
  data moves through the memories, the registers and the block RAM.
* All communication controllers share one data width, `CC_W`. The source
  design can configure "different data widths"; here that means choosing
  `CC_W`, not a separate width for each controller.
* The port widths must divide the native width. A port wider than the memory
  word is not supported.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_vrc_rr_arbiter`: compares the grant with a reference round-robin model
  under random traffic, and checks fairness with all requesters active.
* `tb_vrc_vmem_rd_port` / `tb_vrc_vmem_wr_port`:
  * random start lanes and counts against a stalling, random-latency memory,
    with random back-pressure;
  * byte-exact contents, including the untouched neighbours of partial
    words;
  * one element per cycle against an ideal memory.
* `tb_vrc_onchip_mem`, `tb_vrc_comm_ctrl`, `tb_vrc_bus_decoder`: contents,
  strobes, latency, and the one-outstanding-read rule.
* `tb_vrc_virtual_memory`: two read ports, two write ports and the host,
  running concurrently on one memory. It requires three things to happen:
  * arbitration conflicts;
  * service of every port;
  * reads held back while the tag FIFO is full.
* `tb_vrc_platform_multi`: the top in a larger configuration:
  * three memories (one external, two on-chip of different sizes);
  * two controllers;
  * read ports of 8, 32 and 64 bits and write ports of 16, 64 and 8 bits,
    spread over the memories and running concurrently.

  All data is checked at byte level.
* `tb_vrc_virtual_platform`: runs end to end at the default parameters.
  * A small application in the testbench starts on a register strobe, fetches
    an addend from block RAM, and streams 32-bit elements from external memory
    0. It writes 16-bit results to on-chip memory 1 and reports a checksum.
  * The host does everything over the platform bus, and also reads memory 0
    during the job to force arbitration.
  * The test counts, and requires, each of these at least once: arbitration
    conflict, memory stall, stream back-pressure, read-credit exhaustion,
    partial-word write, register strobe, block RAM access, and both mappings.
* `tb_vrc_mem_bandwidth`: the top configured with one external memory and
  native-width (64-bit) read and write ports, against an ideal memory, for transfers of 16 B, 1 KB, 16 KB, 256 KB and
  1 MB. Every word is checked, and each transfer must finish within its word
  count + 8 cycles. The fixed cost is 1 cycle per write and 3 per read. That
  is 50–150 % of a 16 B transfer, and it rounds to 0 % from 256 KB.

`tb/vrc_ext_mem_model.sv` is a behavioural model of external memory, for
simulation only. It stalls at random, answers in order after random latency,
and holds a known pattern in unwritten words.

### Running a testbench

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_vrc_virtual_platform \
    -y rtl -y tb +libext+.sv rtl/vrc_pkg.sv tb/tb_vrc_virtual_platform.sv
./obj_dir/Vtb_vrc_virtual_platform
```

Replace the module name to run another testbench. Everything that is read
must be initialised, because the testbenches do not rely on X values.

## Files

| file | contents |
|---|---|
| `rtl/vrc_pkg.sv` | bus request type, host bus widths, address-map constants |
| `rtl/vrc_virtual_platform.sv` | top: decoder, controllers, ports, virtual memories, mapping |
| `rtl/vrc_virtual_memory.sv` | requester arbitration and in-order read routing for one memory |
| `rtl/vrc_vmem_rd_port.sv`, `rtl/vrc_vmem_wr_port.sv` | width-changing read and write interfaces |
| `rtl/vrc_rr_arbiter.sv` | round-robin arbiter |
| `rtl/vrc_sync_fifo.sv` | first-word-fall-through FIFO |
| `rtl/vrc_onchip_mem.sv` | on-chip memory target |
| `rtl/vrc_comm_ctrl.sv` | communication controller |
| `rtl/vrc_bus_decoder.sv` | platform-bus decoder |
