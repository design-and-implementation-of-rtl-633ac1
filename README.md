# AXI upsizer/downsizer: one 256-bit AXI4 master on two 128-bit slaves

A GPU can issue 256-bit AXI transactions, but the coherent interconnect it
talks to only has 128-bit slave ports. It does have two of them. This block
sits between the two. It gives the GPU one 256-bit AXI4 slave port and
drives both 128-bit interconnect ports in parallel:

- Every request the master issues goes to **both** slaves.
- Slave 1 carries data bits 255:128 and slave 2 carries bits 127:0.
- The two slaves answer independently and at different times. The block
  collects both answers for each transaction and hands the master a single
  merged 256-bit response.

No transaction is serialised. A 256-bit beat costs one beat on each slave,
in parallel, so bandwidth doubles. The price is a second slave port.

Default configuration:

| | |
|---|---|
| master data | 256 bits |
| slave data | 2 × 128 bits |
| address | 40 bits |
| ID | 12 bits |
| outstanding reads | 64 |
| outstanding writes | 64 |
| read burst length | up to 8 beats |
| performance counters | eight 64-bit counters behind an APB4 port |

The protocol is AXI4 without user signals. There is no WID and no ACE snoop
channel.

```
                 +-------------------------------------------------------+
   256-bit       |  request_controller                                   |   128-bit
   AXI4  AR ---->|   addr_channel (AR) ----------------------------------+--> s1_ar / s2_ar
   master AW --->|   addr_channel (AW) ----------------------------------+--> s1_aw / s2_aw
          W ---->|   write_data_channel --- [255:128] / [127:0] ---------+--> s1_w  / s2_w
                 |        | alloc                | alloc                 |
                 |        v                      v                       |
                 |  read_buffer_controller   write_buffer_controller <---+--- s1_b / s2_b
                 |  (64 entries, 2 x 128b    (64 entries, 2 BRESP)       |
                 |   data per beat)  <-----------------------------------+--- s1_r / s2_r
                 |        | avail / select / send|flush                  |
                 |        v                      v                       |
          R <----|  response_controller: read_response, write_response   |
          B <----|                                                       |
   APB4 <------->|  perf_counters (8 x 64 bit)                           |
                 +-------------------------------------------------------+
```

## Splitting a request

`addr_channel` is used twice, once for AR and once for AW. `write_data_channel`
handles W. All three use the same handshake, here called "dual valid":

- A master request raises a separate VALID towards each slave.
- Each slave's VALID drops in the cycle after that slave accepts, so the
  faster slave never sees the same request twice.
- The master gets READY only in the cycle in which the second slave accepts,
  or in which both accept together.
- No extra cycle is added: if both slaves are ready, the request passes in
  the cycle it is offered.

For the request-stall counters, an address channel counts a stall in every
cycle in which slave 1 has accepted and slave 2 has not.

Payload mapping:

- **Data and strobes.** Slave 1 gets WDATA[255:128] and WSTRB[31:16]. Slave 2
  gets WDATA[127:0] and WSTRB[15:0]. WLAST goes to both.
- **Address.** Slave 1 gets the master address unchanged. Slave 2 gets it with
  bit 39 inverted, so the two halves of each 256-bit word live in the two
  halves of the address space.
- **AxSIZE.** Passed on, but limited to 4 (16 bytes), the widest beat a 128-bit
  port accepts.
- **Other fields.** ID, LEN, BURST, LOCK, CACHE, PROT, QOS and REGION are
  copied to both slaves.

Before an address channel shows a request to the slaves, it reserves an entry
in its buffer controller. `alloc` pulses in the first cycle the request is
shown. This guarantees that every response has an entry waiting for it, so
RREADY and BREADY to the slaves are tied high. While a buffer is full, the
request is not shown and the master simply waits.

## Collecting the two halves: the buffer controllers

This is the heart of the design, and the part most worth reading slowly.

### Entry queue

Each buffer controller keeps its entries in a queue ordered by arrival:

- Position 0 is the oldest entry and has the highest priority.
- A new request is appended behind the youngest entry.
- When an entry is finished, it is flushed and every younger entry moves up
  one position.

This keeps the priority order equal to the request order without any age
counters. Each entry is tagged with the request's ID.

### Matching a slave response to its entry

A response with ID *x* from slave *n* goes to the **oldest** entry that has ID
*x* and is not yet complete for slave *n*.

AXI keeps responses of one ID in order, so this always finds the right entry.
It works even when each slave returns different IDs out of order and the two
slaves are at different points in their streams.

### Read entries

A read entry holds:

- the ID;
- the number of beats (ARLEN+1);
- for each slave, the number of beats it has returned and whether its RLAST
  has arrived;
- a send count: how many beats have gone to the master.

The rules:

- **Resolved.** Beat *k* is resolved when both slaves' beat counts are above
  *k*.
- **Available.** An entry is available when its send count is below both
  beat counts. Beats therefore leave as soon as both halves are in; the
  block does not wait for the whole burst.

Data does not move with the queue. The 256-bit beats live in two memories,
one per 128-bit half, of DEPTH × MAX_BEATS words each. Each entry owns a fixed
data slot, which it records. Only the small control word moves when the queue
shifts.

Default size:

- 64 slots × 8 beats × 256 bits of data, plus 2 bits of RRESP per half.
- 64 entries × 37 control bits.

### Write entries

A write entry is 21 bits:

- valid;
- the 12-bit ID;
- for each slave, a "response seen" flag and its 2-bit BRESP;
- a resolved flag;
- a sent flag.

The entry is resolved when both slaves have answered.

### Merging two responses

The merged RRESP or BRESP is:

- DECERR if either half reports DECERR;
- otherwise SLVERR if either half reports SLVERR;
- EXOKAY only if both report EXOKAY;
- otherwise OKAY.

An error from one half is never lost.

## Returning responses to the master

`response_controller` contains `read_response` and `write_response`. Each
one:

1. Scans its buffer's entries from position 0 and picks the first available
   one, using a priority encoder.
2. Loads that entry's next beat or its merged B response into a registered
   master output, whenever the register is empty or being emptied in the
   same cycle.
3. Tells the buffer controller what it sent. For a read, the beat count
   advances, and the last beat flushes the entry. For a write, the entry is
   flushed.

One item can leave per cycle on R and on B. Timing: a read beat or a write
response reaches the master two cycles after the later of the two slave
halves is accepted. Beats and responses are held stable while the master
withholds READY.

Ordering:

- Transactions with the same ID complete in request order. Slave beats fill
  the oldest entry of an ID first, so a younger entry with the same ID cannot
  become available before the older one is done.
- Read bursts of **different** IDs may interleave on the master R channel.
  AXI4 allows this.
- Responses to different IDs may come back in a different order from the
  requests, which AXI also allows.

## Performance counters

Eight 64-bit counters each count the cycles or handshakes of one event. They
appear as sixteen 32-bit APB4 registers.

| offset | counter | counts |
|---|---|---|
| 0x00 / 0x04 | read request stall | cycles in which slave 1 has accepted an AR and slave 2 has not |
| 0x08 / 0x0C | write request stall | the same for AW |
| 0x10 / 0x14 | read response stall | cycles in which an outstanding read has RLAST from slave 1 but not from slave 2 |
| 0x18 / 0x1C | write response stall | cycles in which an outstanding write has BRESP from slave 1 but not from slave 2 |
| 0x20 / 0x24 | read request number | AR handshakes on the master port |
| 0x28 / 0x2C | write request number | AW handshakes on the master port |
| 0x30 / 0x34 | read beat number | R handshakes on the master port (256-bit beats) |
| 0x38 / 0x3C | write beat number | W handshakes on the master port |

The first offset of each pair holds the lower 32 bits and the second the
upper 32 bits.

APB behaviour:

- There are no wait states: PREADY is always 1.
- An access above 0x3C gets PSLVERR.
- A write loads the addressed 32-bit word, which takes priority over an event
  in the same cycle. Writing 0 to both words clears a counter.
- The counters run on the AXI clock and reset.

## Parameters

| parameter | default | where |
|---|---|---|
| `MST_DATA_W`, `SLV_DATA_W` | 256, 128 | `axi_ud_pkg` |
| `ADDR_W`, `ID_W` | 40, 12 | `axi_ud_pkg` |
| `DEPTH` | 64 | `axi_top`, buffer and response controllers: outstanding reads and writes |
| `MAX_BEATS` | 8 | `axi_top`, `read_buffer_controller`: longest read burst |
| `NUM_CNT`, `CNT_W` | 8, 64 | `perf_counters` |

`DEPTH` must be a power of two.

## What is this design's own choice

The following are given by the description this design was built from:

- the overall split into request controller, buffer controllers, response
  controller and counters;
- the dual-valid request handshake;
- the data-half assignment;
- the buffer depth of 64 and the 21-bit write entry;
- ID tagging, per-slave beat counting, the resolved and send bookkeeping, and
  flush with reprioritisation;
- the eight counters.

The following are decisions made here:

- **Slave 2 address.** Bit 39 inverted, as the example addresses in the
  description show. Its text only says the second slave gets "the second half"
  of memory.
- **Response merge rule.** The description does not say how two differing
  responses combine.
- **Burst length.** Limited to 8 beats (ARLEN ≤ 7). This matches the bursts
  in the description's examples. An assertion in `read_buffer_controller`
  fires on longer bursts. To support longer bursts, raise `MAX_BEATS`; read
  data storage grows linearly.
- **AxSIZE.** Clamped to 16 bytes for the slaves.
- **Early reservation.** Entries are reserved in the first cycle a request is
  shown, and RREADY and BREADY to the slaves are permanently high.
- **Storage layout.** Read data lives in fixed slots with slot indirection.
  Only the control word shifts. The description gives a read entry as one
  2122-bit word: 2048 bits of data plus control. Here the same information is
  split into 2 × 1024 data bits with 2-bit responses per half, and a 37-bit
  control word.
- **Master outputs.** The R and B outputs are registered.
- **Counter registers.** The register map and the writable counter registers.
- **Reset.** A synchronous, active-low reset clears all control state. Data
  storage is not reset.

Not included:

- **ACE snoop channels.** The description leaves them for later work.
- **Narrow transfers.** No special handling: a narrow transfer is passed to
  both slaves as it is, with its byte lanes split like any other beat.

## Files

`rtl/`:

- `axi_ud_pkg.sv`: widths, channel structs, response merge function.
- `axi_top.sv`: the top level, with flat AXI4 and APB4 ports.
- `request_controller.sv`, `addr_channel.sv`, `write_data_channel.sv`
- `read_buffer_controller.sv`, `write_buffer_controller.sv`
- `response_controller.sv`, `read_response.sv`, `write_response.sv`
- `perf_counters.sv`

`tb/`:

- **Self-checking testbench per module** (`tb_<module>.sv`). Each compares
  against an independent reference model and prints
  `TB_RESULT checks=N failures=M`.
- **`tb_axi_top.sv`.** Runs the top level at its default parameters. A 256-bit
  master model drives 1600 write bursts and 2000 read bursts of 1 to 8 beats
  with random IDs. Two slave models answer with random latency, random READY
  and out-of-order responses across IDs. The testbench checks:
  - every response against a model of the 256-bit memory;
  - the halves held in each slave memory;
  - all eight counters over APB.

  It also counts how often each mechanism occurs and fails if one never does:
  - request stall;
  - response stall;
  - a full buffer;
  - out-of-order responses;
  - flush of an entry that is not the oldest;
  - merged error responses;
  - master back-pressure.
- **`tb_paper_examples.sv`.** A directed replay, at default parameters, of
  three reference transactions with fixed IDs, addresses and data:
  - a single-beat write;
  - a single-beat read whose halves arrive four cycles apart;
  - an 8-beat read burst.

  The testbench plays both slaves with scripted timing. It checks:
  - the exact slave addresses, data halves and copied fields;
  - the dual-valid handshake cycle by cycle;
  - the two-cycle response latency;
  - the exact value of every counter.
- **`tb_axi_slave_model.sv`.** The behavioural 128-bit slave memory used by
  the top-level test.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/axi_ud_pkg.sv tb/tb_axi_top.sv \
  --top-module tb_axi_top --Mdir obj_tb_axi_top
./obj_tb_axi_top/Vtb_axi_top
```

Replace `tb_axi_top` with any other testbench name to run that one. The
full-size top-level test runs in well under a minute. The unit tests take a
few seconds each.
