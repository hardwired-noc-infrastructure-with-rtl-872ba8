# HWNOC: one hardwired network-on-chip for FPGA configuration and functional data

An FPGA usually has two separate interconnects. A serial configuration path
(SelectMAP, JTAG and the like) loads bitstreams, and the programmable routing
fabric carries data between IP cores. HWNOC replaces both with one hard,
pre-verified network-on-chip. The same routers and network interfaces (NIs)
carry three kinds of traffic:

* **programming** traffic: writes to the NI registers that set up connections;
* **configuration** traffic: bitstream frames for a configuration functional
  region (CFR);
* **functional** traffic: data words between IP cores running in the regions.

Configuration connections are guaranteed-throughput (GT) connections built on
TDMA slots. A region can therefore be loaded at a fixed rate while IPs in
other regions keep exchanging data. This RTL models the 2x2 instance of the
architecture, with one boot processor, three regions and two DCT IP
instances. It runs a complete flow, from reset to programmed network to
configured and running IPs.

```
          CFR1 (IP2)                    CFR2 (IP1)
         [shell|DCT]                   [shell|DCT]
         [config   ]                   [config   ]
              |                             |
          NI kernel                     NI kernel
              |                             |
             R6 ---------------------------- R5
              |                             |
              |                             |
             R4 ---------------------------- R3
              |                             |
          NI kernel                        NI ---- Boot processor <- configuration IO
              |
         CFR0 (DPro: ports of the top level)
```

| node | router | NI client | role |
|------|--------|-----------|------|
| 0 | R3 | `hwnoc_boot_pro` | boot processor: programs the NOC, sends bitstreams |
| 1 | R4 | CFR0 | data processor (DPro); its channels are top-level ports |
| 2 | R6 | CFR1 | DCT instance IP2 |
| 3 | R5 | CFR2 | DCT instance IP1 |

Router ports: 0 is the local NI, 1 the horizontal neighbour (R3-R4, R6-R5),
2 the vertical neighbour (R3-R5, R4-R6). In the RTL the horizontal neighbour
of node n is n^1 and the vertical one is n^3.

## Flits and source routes

Every packet is a single flit (`hwnoc_pkg::flit_t`, 50 bits):

| field | bits | meaning |
|-------|------|---------|
| `gt` | 1 | traffic class: 1 = GT, 0 = BE |
| `path` | 8 | remaining route, 2 bits per hop, lowest field first |
| `qid` | 2 | destination channel in the receiving NI kernel |
| `credit` | 5 | credits returned to the destination channel |
| `has_data` | 1 | 0 for a credit-only flit |
| `data` | 32 | one data word |

Each router forwards a flit to the port named by `path[1:0]` and shifts
`path` right by two bits. A remaining path of zero means port 0, so the flit
leaves at the local NI. These are the routes the test uses:

| route | hops | `path` |
|-------|------|--------|
| R3 -> R4 | h, local | `8'h01` |
| R3 -> R5 | v, local | `8'h02` |
| R3 -> R5 -> R6 | v, h, local | `8'h06` |
| R6 -> R5 -> R3 | h, v, local | `8'h09` |
| R4 -> R3 -> R5 | h, v, local | `8'h09` |
| R5 -> R3 -> R4 | v, h, local | `8'h06` |
| R4 <-> R6 | v, local | `8'h02` |

## Guaranteed throughput: TDMA slots and fixed latency

This is the part of the design that needs the most care when you use it.

Each NI kernel has a slot counter that runs through `SLOTS` (8) slots, one
slot per clock cycle. All kernels leave reset in the same cycle, so all slot
counters agree. Each kernel also has a slot table, with one entry per slot:
a reserved bit and a channel number. In a reserved slot, the owning channel
sends a GT flit if it has a word and credits, or credits to return. In every
other cycle, the kernel's BE channels take turns.

In the router, each input has a one-flit GT register and a two-entry BE
FIFO. A GT flit always wins its output and is never stalled. It therefore
moves exactly one hop per cycle, and its latency is fixed. This holds only if
**no two GT flits ever want the same router output in the same cycle**. The
hardware does not arbitrate between GT flits. An assertion in
`hwnoc_router` reports a collision. Slot allocation is a design-time job, and
the rule is:

> A flit sent in slot *s* uses the output of the *h*-th router on its route
> during slot (*s* + *h*) mod `SLOTS`. Two GT connections must not share a
> router output at the same slot, counted this way.

Example from the end-to-end test, in which configuration and execution run
together:

* configuration R3 -> R5 -> R6 in slots {0, 3, 6} uses R3.v at {1, 4, 7},
  R5.h at {2, 5, 0} and R6.local at {3, 6, 1};
* DPro -> IP1, R4 -> R3 -> R5, uses R3.v at *s*+2. It must therefore avoid
  slots {7, 2, 5}, so it gets {0, 1, 3, 4, 6};
* IP1 -> DPro, R5 -> R3 -> R4, shares no output with either and may use all
  8 slots.

BE flits fill the gaps. They wait behind GT flits (the router's `be_blocked`
output) and use link-level `be_ready` flow control. Their latency is not
bounded.

Timing of a GT word on a route of *k* routers: it is pushed into the NI TX
queue in cycle *t*. It leaves the NI in the first owned slot from *t*+1. It
takes one cycle per router, and it is in the receiving RX queue *k* cycles
after it leaves.

## Credit-based end-to-end flow control

A connection is a pair of channels, channel *c* in NI A and channel *r* in
NI B. Each channel is programmed with the other end's `path` and `rqid`.
Channel *c* may send a data word only while its remote credit counter
(`rcred`) is above zero. The counter starts at the free space of B's RX queue
(16 words) and goes down by one per word sent. Each word the client takes out
of B's RX queue adds one owed credit at B. Owed credits go back in the
`credit` field of B's next flit on channel *r*, or in a credit-only flit, and
are added to A's `rcred`. RX queues therefore cannot overflow, and a kernel
accepts whatever the router delivers. The reverse channel must be enabled
even if it carries no data, as for the configuration channel of a CFR.

With 16-word RX queues the credit round trip is about 10 cycles in this mesh,
so one connection can keep up one word per cycle.

## NI registers and programming over the NOC

Registers are reached through the MMIO port of each kernel. The same 32-bit
word format is used locally and over the NOC:
`{write, addr[6:0], data[23:0]}`. A read response is `{0, addr, data}`.

| address | register | data fields |
|---------|----------|-------------|
| `0x00+c` | channel *c* | `[7:0]` path, `[9:8]` remote channel, `[10]` GT, `[11]` enable, `[17:12]` credits (write: initial value of `rcred`; read: current `rcred`) |
| `0x10+s` | slot *s* | `[0]` reserved, `[2:1]` channel |
| `0x20` | status | `[2:0]` current slot |

Channel use, the same in every NI: 0 = programming (requests in, responses
out), 1 = configuration, 2 and 3 = functional data. In each CFR,
`hwnoc_mmio_shell` executes the words arriving on channel 0 against the
kernel's registers. It answers reads on channel 0 and holds off new requests
until the answer is queued.

The boot processor (`hwnoc_boot_pro`) works through a command stream from the
configuration IO. Each command is `{op[1:0], word[31:0]}`:

| op | meaning |
|----|---------|
| `BOP_LOCAL` | MMIO access to the boot NI itself |
| `BOP_REMOTE` | send the word on channel 0 (a request to the remote NI currently targeted) |
| `BOP_BITS` | send the word on channel 1 (bitstream) |
| `BOP_WAIT` | wait until `word[15:0]` more responses have arrived |

The sequence that programs one remote NI:

1. `LOCAL`: write boot channel 0 with the path to the target, remote channel
   0, BE, 16 credits.
2. `REMOTE`: write the target's channel 0 with the path back, remote channel
   0, BE, 16 credits. The response channel now exists, and credits start to
   flow back.
3. `REMOTE`: write the target's channel 1 (path back, remote channel 1, BE,
   0 credits), then its functional channels and slot table.
4. `REMOTE` read of any register, then `WAIT 1`. When the answer arrives,
   every earlier request has been applied.
5. Before pointing channel 0 (or 1) at another node, read the local channel
   register until its credit field is back at 16. Rewriting it loads the
   credit counter again.

## Loading and starting a region

Channel 1 of a CFR kernel feeds the region's configuration port
(`hwnoc_cfr_config`). The port takes one word per cycle and recognises these
command words:

| word | action |
|------|--------|
| `{4'hA, ..., frame[15:0]}` FAR | set the frame address |
| `{4'hB, ..., n[15:0]}` FDRI | the next *n* x 41 words are frame data; the frame address advances after each frame |
| `{4'hC, ...}` START | turn on the region clock enable; release the region reset 2 cycles later |
| `{4'hD, ...}` SHUT | clock enable off, reset on (before reconfiguring) |

A frame address outside the region (`FRAMES` = 256 frames) or an unknown
command sets the sticky `cfg_error`, and the frame data is dropped. The frames
go into a configuration memory with a readback port. The memory stands for
the region's configuration cells. What those cells would configure (LUTs,
switch boxes) is FPGA fabric and is not modelled. The IP in the region runs
only while its clock enable is on and its reset is released.

## IP execution

In CFR1 and CFR2, channel 2 connects through `hwnoc_ni_shell` to a
`hwnoc_dct4x4`. The shell collects 8 words into a 4x4 block of 16-bit
residuals (element (r,c) at bit 16(4r+c), two per word, low half first). It
passes the block on with valid/ready, and it sends the 16 coefficients back
as 8 words. The transform is the H.264 4x4 forward core transform
Y = C X C^T, with C = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1], and
one cycle of latency. Results normally go back on channel 2, to whoever sent the block. When the
region's `cfr_ip_fwd` input is set, they leave on channel 3 instead, towards
the next IP of a processing chain. This setting belongs to the soft shell, so
it is static. The end-to-end test uses it to pass blocks through
DPro -> IP1 -> IP2 -> DPro. A chain needs its own connection for each link,
because credits always return over the paired channel of the same connection.
The data processor is outside this RTL. Its channels 2
(by convention to IP1) and 3 (to IP2) are the `dpro_*` ports of `hwnoc_top`.

## Measured behaviour

All timing below assumes a 250 MHz clock. That is 8 Gb/s for one 32-bit word
per cycle, the configuration throughput the architecture is quoted at.
`tb_hwnoc_top` runs at the default sizes:

| case | words | cycles | time | reference figure |
|------|-------|--------|------|------------------|
| DCT bitstream, configuration only (8/8 slots) | 7216 (176 frames x 41) | 7218 | 28.9 us | about 29 us; 0.165 us per frame |
| the same while IP1 computes (3/8 slots) | 7216 | 19247 | 77.0 us | about 76 us; 0.44 us per frame |
| SelectMAP, 32 bits at 60 MHz (not built) | 7216 | - | 120 us | about 123 us; 0.7 us per frame |

The 8/3 ratio between the first two rows comes straight from the slot share.
During the second run IP1 processes about 1500 blocks, and every result is
checked against a reference model. The test then reprograms the IPs into a
chain, passes 40 blocks through both transforms, and configures and starts
CFR0 with 4 frames. Finally it shuts CFR1 down.

## Where this RTL departs from the original description, or goes beyond it

The original architecture is given at block level. The following are
choices made here:

* Routers, single-flit packets, path encoding, queue depths, the register map,
  the credit transport, the configuration command words, the boot command
  format and the channel assignment are all choices of this design. They
  follow the usual structure of TDMA-slot NOCs with GT and BE traffic.
* The slot table size of 8 is not given in the original description. It is
  consistent with the reported ratio 0.44/0.165 = 8/3.
* The design is single-clock. The original description allows the DPro and
  the IPs to sit in different clock domains. No clock-domain crossing is
  modelled.
* The NI shell moves whole blocks with valid/ready. AXI or DTL transaction
  protocols are not implemented.
* "Activating the clock" is a clock enable, not a gated clock.
* Slot allocation is not computed in hardware. The user must supply a
  conflict-free allocation, as a design-time tool flow would.
* Not modelled: the data processor, the FPGA fabric and its frame format,
  the fabric link between CFR1 and CFR0, and the LUT-area studies (number of
  IPs that fit, soft versus hard NOC area).

## Files

| file | content |
|------|---------|
| `rtl/hwnoc_pkg.sv` | flit, link and channel types, MMIO and configuration word formats |
| `rtl/hwnoc_fifo.sv` | FIFO used by routers and NIs |
| `rtl/hwnoc_router.sv` | 3-port router, GT priority, BE round-robin |
| `rtl/hwnoc_ni_kernel.sv` | NI kernel: channels, slot table, credits, MMIO registers |
| `rtl/hwnoc_mmio_shell.sv` | remote register access over channel 0 |
| `rtl/hwnoc_cfr_config.sv` | configuration port and configuration memory of a region |
| `rtl/hwnoc_ni_shell.sv` | word stream to block conversion for an IP |
| `rtl/hwnoc_dct4x4.sv` | H.264 4x4 forward transform |
| `rtl/hwnoc_boot_pro.sv` | boot processor command sequencer |
| `rtl/hwnoc_top.sv` | 2x2 mesh, four NIs, three regions, two IPs |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_hwnoc_top` end to end |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Inputs change at the falling clock edge, and monitors sample just after it.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/hwnoc_pkg.sv tb/tb_hwnoc_top.sv \
          --top-module tb_hwnoc_top -o sim
./obj_dir/sim
```

Replace `tb_hwnoc_top` with `tb_hwnoc_router`, `tb_hwnoc_ni_kernel`,
`tb_hwnoc_mmio_shell`, `tb_hwnoc_cfr_config`, `tb_hwnoc_ni_shell`,
`tb_hwnoc_dct4x4` or `tb_hwnoc_boot_pro` to run a single block. The
end-to-end test takes well under a second. For a lint run:
`verilator --lint-only -Wall -Irtl rtl/hwnoc_pkg.sv rtl/hwnoc_top.sv`.

To build a different use case, edit the command sequence in the `initial`
block of `tb_hwnoc_top`: routes (`P_TO`, `P_BACK`), slot tables and
bitstreams. Check every new GT allocation against the slot rule above. The
router assertion catches violations only when they happen in simulation.
