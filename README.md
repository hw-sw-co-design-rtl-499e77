# RSoC Bridge: streaming accelerators behind a Zynq processing system

A hardware accelerator in the programmable logic of a Zynq-class chip usually
needs three kinds of plumbing before it does anything useful: a register bus
so software can configure it, a path that moves data between main memory and
the accelerator, and a way for a Linux driver to find out what is where. This
RTL provides that plumbing once, for any number of accelerators, so an
accelerator only has to implement one small, fixed interface:

* an AXI4-Lite **configuration bus** whose addresses start at 0,
* an AXI4-Stream **input stream** and an **output stream** carrying *frames*,
* a 32-byte **information vector** that identifies it (last byte zero).

A frame is a sequence of 32-bit beats ending with TLAST. TUSER of the first
beat carries the frame size in bytes; TKEEP marks the valid bytes of the last
beat.

The **RSoC Bridge** sits between the processor and the accelerators. Each
accelerator slot gets its own *controller*, which turns software register
accesses into frames and frames back into something software can collect.
There are two kinds of controller:

* **FIFO Interface**: software pushes and pops single beats through
  registers. It is small and has low latency, but it is slow.
* **Simple DMA Interface (SDMA)**: software queues (address, size, id)
  requests. An AXI4 master then copies frames between memory and the
  accelerator on its own and reports a (status, size, id) response for each.

A read-only **RSoC Info** block at the bridge's base address describes every
accelerator and controller region. A driver therefore needs only one address
to discover the whole system.

The top level, `rsoc_system`, is the reference configuration. It has four
Loopback Accelerators:

* slots 0 and 1 are on FIFO Interfaces,
* slot 2 is on an SDMA Interface that reaches memory through a non-coherent
  high-performance port (HP0),
* slot 3 is on an SDMA Interface that reaches memory through the
  cache-coherent ACP.

Beside the bridge, and not connected to it, the top also holds a *frame
filter* with its own stream ports. It is built from the framework's stream
helpers:

1. `axis_sof` marks the first beat of each frame.
2. `axis_capture` hands the word at `FILTER_OFFSET` (default 0) of every
   frame to outside logic.
3. An `axis_fifo` of `FILTER_DEPTH` (default 16) beats holds the frame while
   that logic decides.
4. `axis_discard` then transmits or drops the frame on a command.

`FILTER_DEPTH` must be larger than `FILTER_OFFSET`. Otherwise the captured
word could never reach the buffer and the filter would deadlock. The
decision logic must take each capture before it commands that frame.

## Block diagram

```
 PS GP master (AXI4-Lite)                           PS HP0   PS ACP   IRQ lines
        |                                             ^        ^         ^
        v                                             |        |         |
 +------------------- rsoc_bridge ------------------------------------------------+
 |  slave_bus                                  master_bus            irq_mapper   |
 |   axi_1ton --+-- rsoc_info                  axi_nto1 per port       ^          |
 |   (+ addr_   +-- acc cfg 0..N-1 ----------.    ^        ^            |          |
 |    rebase)   +-- ctrl 0..N-1 --.          |    |        |            |          |
 |                                v          |    |        |            |          |
 |            fifo_if 0, fifo_if 1, sdma_if 2 (HP0), sdma_if 3 (ACP) -- irq --'    |
 |                 |  ^                      |                                    |
 +-----------------|--|----------------------|------------------------------------+
                   v  |  streams             v configuration
              loopback_acc 0..3 (one per slot)

 flt_s_axis -> axis_sof -> axis_capture -> axis_fifo -> axis_discard -> flt_m_axis
                 |             |  cap_data                   ^  cmd
                 v flt_sof     v  (to decision logic) -------'
```

## Source files

The SystemVerilog is split into packages, reusable parts, the bridge, and the
test system.

| File | Role |
|---|---|
| `plat_pkg` | Address type (32 bit) and `compute_next_base`, which lays out the address map |
| `misc_pkg` | `apply_be` (byte-enable merge) and `count_keep` |
| `axi_pkg` | Bus widths, AXI4 / AXI4-Lite / AXI4-Stream structs, response codes, `MAX_BURST` = 16 |
| `rsoc_pkg` | Framework version, register offsets, controller types, DMA request/response structs |
| `rr_arbiter`, `req_ack`, `change_detector`, `addr_rebase`, `onehot_decoder`, `gen_mux`, `sync_fifo` | General helpers |
| `axis_fifo`, `axis_sof`, `axis_capture`, `axis_discard` | Stream helpers |
| `axi_lite_endpoint`, `axi_1ton`, `axi_nto1` | Bus components |
| `rsoc_info`, `fifo_if`, `sdma_control`, `sdma_engine`, `sdma_if`, `irq_mapper` | Bridge pieces |
| `slave_bus`, `master_bus`, `rsoc_bridge` | Bus generators and the bridge itself |
| `loopback_acc`, `rsoc_system` | Test accelerator and the top level |

All interfaces are packed structs rather than SystemVerilog `interface`s:
`axil_req_t`/`axil_resp_t`, `axi_req_t`/`axi_resp_t` and `axis_t`. An
array of them is how the generators connect a variable number of slots.

Everything runs in one clock domain. Reset is synchronous and active low
(`rst_n`).

## Address map

The slave bus builds its map during elaboration, in this order:

1. RSoC Info
2. the configuration regions of accelerators 0..N-1
3. the controller regions 0..N-1

Each region is rounded up to a power of two of at least 4 KiB. It is then
placed at the first address after the previous region that is aligned to its
own size. The AXI 1-to-N router decodes exactly these regions, and any other
address gets DECERR. An Address Rebase in front of every slave subtracts the
region base, so every slave sees addresses from 0.

Default map of `rsoc_system` (base 0x4000_0000, all regions 4 KiB):

| Address | Region |
|---|---|
| 0x4000_0000 | RSoC Info |
| 0x4000_1000 .. 0x4000_4000 | Loopback 0..3 configuration (FRAMES at +0, BEATS at +4) |
| 0x4000_5000, 0x4000_6000 | FIFO Interface, slots 0 and 1 |
| 0x4000_7000 | SDMA Interface, slot 2 (HP0) |
| 0x4000_8000 | SDMA Interface, slot 3 (ACP) |

### RSoC Info

| Offset | Register |
|---|---|
| 0x00 NEG | Read/write. Reads return the bitwise NOT of the last value written, which lets a driver check that the block is alive. |
| 0x04 VERSION | 0x0000_0001: major 0 in the high half, minor 1 in the low half |
| 0x08 REGIONS | 2N: N accelerator regions, then N controller regions |
| 0x0C REGION_OFF | 0x10, the offset of the first descriptor |
| 0x10 + 16·i | Descriptor i: INFO, BASE, SIZE, padding |

Accelerator i belongs to controller i+N. The INFO word encodes the region:

* bits [7:0] give the kind: 1 for an accelerator, 2 for a controller;
* bits [15:8] give the slot;
* for controllers, bits [23:16] give the type: 1 for FIFO, 2 for SDMA.

## Controllers

Every controller region starts with 32 bytes that read back the attached
accelerator's information vector. The controller's own registers start at
offset 0x20.

### FIFO Interface (`fifo_if`)

| Offset | Write | Read |
|---|---|---|
| 0x20 STATUS | – | [0] TX full, [1] TX empty, [2] RX beat waiting, [3] TLAST of that beat |
| 0x24 DATA | Sends a beat with the current KEEP/LAST/USER | TDATA of the RX head, which is then popped (0 if empty) |
| 0x28 KEEP | [3:0] TKEEP, [8] TLAST for the following DATA writes | Same fields of the RX head |
| 0x2C USER | TUSER for the following DATA writes | TUSER of the RX head |

To send a frame, write USER = size and KEEP, then one DATA write per beat.
Set bit 8 of KEEP before writing the last beat.

A DATA write while the TX queue is full is not lost. The controller delays
the write response until there is space, which stalls the processor. The
interrupt line stays high while the RX queue holds data.

Each queue holds 16 beats. With the 4-beat loopback FIFO, the FIFO path holds
at most 36 beats before the TX queue reports full.

### Simple DMA Interface (`sdma_if` = `sdma_control` + `sdma_engine`)

| Offset | Register |
|---|---|
| 0x20 STATUS | [0] s-request queue full, [1] s-response waiting, [2] d-request queue full, [3] d-response waiting |
| 0x24 / 0x28 / 0x2C | REQ_SADDR / REQ_SSIZE / REQ_SID. Memory → accelerator; writing REQ_SID queues the request. |
| 0x30 / 0x34 | RES_SSTATUS / RES_SID. Reading RES_SID removes the response. |
| 0x38 / 0x3C / 0x40 | REQ_DADDR / REQ_DSIZE / REQ_DID. Accelerator → memory: buffer address, buffer size, id. |
| 0x44 / 0x48 / 0x4C | RES_DSTATUS / RES_DSIZE / RES_DID. Reading RES_DID removes the response. |

Status bits:

* bits [1:0] hold the worst AXI response seen during the transfer;
* RES_DSTATUS bit 16 means the frame was larger than the buffer and was
  truncated.

Requests and responses are strictly ordered. Each direction has a 4-entry
request queue and a 4-entry response queue. The id is only a label that the
driver chooses. The interrupt is high while any response waits.

How the engine works:

* **Memory → accelerator.** The engine reads `size` bytes in INCR bursts of
  at most 16 beats (the AXI3 limit of the Zynq ports). No burst crosses a
  4 KiB boundary. The data leaves as one frame, with TUSER = size on the
  first beat and TKEEP trimmed on the last beat.
* **Accelerator → memory.** The engine collects up to one burst of the
  incoming frame, writes it, and repeats until TLAST. If the buffer fills
  first, the rest of the frame is consumed and dropped, and the truncation
  bit is set. RES_DSIZE is the number of bytes actually written.
* **Concurrency.** The two directions run independently, each with one burst
  in flight. Addresses must be word aligned and buffer sizes a multiple of 4.

A typical driver sequence for one loop-through is:

1. Queue the d-request (the receive buffer).
2. Queue the s-request (the frame to send).
3. Wait for the interrupt.
4. Read both responses.

### Data ports and coherency (`master_bus`)

The AXI4 masters of the SDMA controllers are grouped per PS port by
`PORT_OF`. Each port with at least one controller gets a round-robin
`axi_nto1`, so several controllers can share one port.

On a port marked coherent (the ACP), the bus drives ARUSER/AWUSER = 1 and
sets AxCACHE[1]. This is the combination the ACP treats as a coherent
access. A non-coherent port gets USER = 0 and CACHE = 0.

## Reusable parts in brief

* `axi_lite_endpoint`: turns AXI4-Lite into a one-hot write-request and
  read-request per 32-bit register, each answered by an acknowledge. Paired
  with `req_ack`, which acknowledges one cycle later, a register read
  completes three cycles after the address handshake. Out-of-range
  registers get SLVERR. Its request lines come from two `onehot_decoder`s
  and its read data from a `gen_mux`.
* `axi_1ton`: address router for AXI4-Lite, with the map given as
  parameters. Unmapped addresses get DECERR.
* `axi_nto1`: AXI4 arbiter. A read grant is held until RLAST and a write
  grant until B.
* `rr_arbiter`: linear round-robin. The pointer moves past the winner on
  `ack`.
* `change_detector`: a registered "signal differs from IDLE" output, used
  for every interrupt.
* `axis_sof`: flags the first beat of each frame.
* `axis_capture`: copies the beat at a fixed offset of every frame to a side
  output. It stalls the stream instead of losing a capture.
* `axis_discard`: holds each frame until it is told to transmit or discard
  it.

## Where this RTL departs from its source description

* **The SDMA engine is an original design.** The reference implementation
  uses a vendor data-mover core. This engine keeps the same request and
  response interface, but its bursting, buffering and truncation behaviour
  are described above and are this design's own.
* **The stream FIFO is a plain single-clock FIFO.** The reference uses a
  third-party library FIFO that can also cross clock domains.
* **Several details are choices made for this RTL:**
  * register bit layouts for STATUS/KEEP,
  * the INFO encoding,
  * queue depths (16 beats, 4 requests),
  * the region alignment rule,
  * the loopback register offsets and clear-on-write,
  * the interrupt conditions,
  * the bridge base 0x4000_0000.
* **RSoC Info descriptor order.** The descriptor field order is INFO, BASE,
  SIZE. The prose description lists BASE, SIZE, INFO, but the register
  figure's order was followed.
* **The frame filter in the top is an addition.** The reference test system
  has only the bridge and its four loops. The stream helpers are described
  there as parts for building accelerators, without a system that uses
  them. The filter shows one way to combine them.
* **The multiplexor and one-hot decoder are only named in the source.**
  Their ports, and their zero output for an out-of-range select, are
  choices made for this RTL.
* **No AXI Remap module.** Channel remapping is pure wiring and is expressed
  by array indexing in the generators.
* **Not built:**
  * the scatter-gather DMA controller and the central-DMA controller, both
    future extensions built around vendor engines;
  * the Zynq processing system itself (GP/HP/ACP ports, DDR, interrupt
    inputs), which appears only as the top's ports;
  * dynamic partial reconfiguration.
* **AXI4-Lite only for configuration.** The configuration buses are
  AXI4-Lite. An accelerator that wants full AXI4 configuration would need a
  different router.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. Each also has a watchdog that counts a failure if the test hangs.
To build and run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
  rtl/plat_pkg.sv rtl/misc_pkg.sv rtl/axi_pkg.sv rtl/rsoc_pkg.sv \
  tb/rsoc_system_tb.sv --top-module rsoc_system_tb -o sim
./obj_dir/sim
```

Replace `rsoc_system_tb` with any `<block>_tb`.

The testbench helpers in `tb/` are:

* `axil_bfm`: an AXI4-Lite master with `write`/`read` tasks;
* `axi_master_bfm`: an AXI4 burst master;
* `axi_mem_model`: an AXI4 memory with random stalls. It also counts
  protocol errors: bursts over 16 beats, 4 KiB crossings and a wrong WLAST.
* `axil_slave_model`: a tagged register slave.

`rsoc_system_tb` is the end-to-end test. It runs the top at its default
parameters, and the processor and memories are the behavioural models. It
performs, and counts:

* the NEG/VERSION probe and a walk over all regions and information vectors;
* FIFO Interface frames on slots 0 and 1;
* filling the FIFO path until TX reports full, then draining it;
* queued SDMA transfers on HP0 and the ACP, including transfers across 4 KiB
  boundaries and truncated frames;
* every interrupt line;
* the coherency attributes on both ports;
* the loopback frame and beat counters;
* the frame filter: start-of-frame marks, captures, capture stalls,
  hold-buffer back pressure, and both transmitted and discarded frames.
  Frames whose first word is odd are discarded. The output is checked beat
  by beat against the transmitted frames.

A mechanism that never happens counts as a failure. The run covers about
150 µs of simulated time. On a desktop machine, most of its roughly 15 s
goes to compiling.

`rsoc_workload_tb` runs the frame sizes the framework was evaluated with,
again through the top at its default parameters. It sends a 32-byte frame
through every loop. It then sends an 8 KiB frame and a 1 MiB frame through
each SDMA slot, and compares every byte. With a memory that never stalls,
a 1 MiB frame takes 589,851 cycles, about 1.78 bytes per cycle. The limit
is the engine's write side. It collects a burst of up to 16 beats before
it issues the write, and it waits for the write response before it starts
the next burst. The test runs in about 15 s.

`rsoc_bridge_tb` uses a different configuration:

* two SDMA slots share one port and one interrupt line;
* slot 2 uses a FIFO Interface;
* plain stream loops stand in for accelerators.

The unit testbenches compare each block against expected values computed in
the testbench. Examples are hand-computed address maps, reference queues for
streams, and byte comparisons of memory.
