# Early Verification Suite: a root-side PCI Express model in RTL

An endpoint device for PCI Express cannot be tested on its own the way a
PCI target can be tested with a bus functional model: before the first memory
read reaches it, the link has to train, both data link layers have to
exchange flow-control credits, and every packet has to carry a sequence
number and a CRC and be acknowledged. This design is the other end of that
link. It plays the root complex and its host system: it trains the link,
brings up the data link layer, configures the endpoint, issues memory, I/O
and configuration requests, answers the endpoint's own requests to host
memory, and checks every response. It is written as synthesizable
SystemVerilog, so it runs in any simulator that takes the RTL of the device
and can also be placed in an emulator next to it.

The suite follows a four-step procedure:

1. physical link set-up (training with TS1/TS2 ordered sets),
2. data link flow-control initialisation (InitFC1, InitFC2, DL_Active),
3. configuration of the endpoint, each write and read checked,
4. memory and I/O transactions, each completion checked.

Steps 1 and 2 happen by themselves after reset; steps 3 and 4 are the test
commands the user feeds in.

## Structure

```
                 evs_top
 test commands  +-----------------------------------------------------------+
 ------------>  | host_model -- model_mem (host memory, 4 KB)               |
                |     |      -- config_reg (shadow of the endpoint's        |
                |     |                     configuration space)            |
                |  pcie_port                                                |
                |   transaction layer:  tlp_send  cpl_tracker              |
                |                       tlp_rcv   cpl_gen                   |
                |   data link layer:    fc_init  fc_credit  dll_tx  dll_rx  |
                |                       (lcrc32 inside dll_tx and dll_rx)   |
                |   physical layer:     phy_layer                           |
                |                                   tx_sym_o / rx_sym_i ----+--> endpoint
                | evs_monitor x2 (one per link direction)                   |
                +-----------------------------------------------------------+
```

All files are in `rtl/`, one module per file; `pcie_pkg.sv` holds the shared
types (request descriptor `req_t`, packet `tlp_t`, symbol `sym_t`, link byte
`lbyte_t`, monitor counts) and the encodings. Every file begins with a
comment that gives its interface and timing.

The link leaves the design as two symbol streams, one 9-bit symbol (a control
flag and a byte) per clock in each direction. A single lane is modelled, with
no 8b/10b coding, scrambling or serialiser: an endpoint whose RTL has a
symbol-level interface connects directly, otherwise a SerDes model goes in
between.

## How a request travels

A test command is a `req_t` descriptor whose fields are those of a PCI
Express request header: kind (MRd, MWr, IORd, IOWr, CfgRd, CfgWr, or a
message without data with its routing and message code), 32- or
64-bit address, traffic class, TD/EP, attributes, length, first and last
byte enables, bus/device/function, register and extended register number.
One extra field, `host_addr`, is a DWORD address in host memory: write
payloads are taken from there, and read data is put there.

1. **Scenario queue** (`host_model`). Commands wait in an 8-entry FIFO. None
   is issued before the data link layer is up.
2. **Fill** (`host_model`). The payload of a write is read from host memory
   into the transmit buffer (TxBuf, 2 entries). A configuration write also
   records the written bytes in `config_reg` as the values expected back.
3. **Header build** (`tlp_send`). The descriptor becomes a TLP with 3- or
   4-DWORD header. A non-posted request (everything except a memory write)
   first takes a tag from `cpl_tracker`, which records the request under it;
   with no free tag the request waits. Messages are posted like memory
   writes and use the posted credits.
4. **Credit gate** (`fc_credit`). The TLP leaves only if the partner has
   advertised enough header and data credits of its class (posted,
   non-posted, completion). Otherwise `fc_stall` is raised and it waits for an
   UpdateFC.
5. **Data link transmit** (`dll_tx`). The TLP gets the next 12-bit sequence
   number and an LCRC, is copied into the replay buffer and handed to the
   physical layer byte by byte.
6. **Framing** (`phy_layer`). The bytes go out between STP and END symbols.
7. On the way back, `phy_layer` strips the framing, `dll_rx` checks the LCRC,
   length and sequence number, `tlp_rcv` queues the TLP and sorts it:
   completions go to `cpl_tracker`, requests go to `cpl_gen`, and messages
   are counted (`msgs_rcvd_o`, `msg_code_o`).
8. **Completion check** (`cpl_tracker`). The completion is matched by tag and
   checked for requester ID, status, and byte count and length against the
   request. The result (pass, or a 4-bit failure code: unexpected,
   status, length/type, ID) goes to the host model's receive buffer (RxBuf).
9. **Drain** (`host_model`). Read data goes to host memory at `host_addr`
   (memory and I/O reads) or to `config_reg` (configuration reads), which
   compares it byte by byte with what was written before. Counters record
   good and bad completions, timeouts and configuration mismatches.

Requests from the endpoint take the other path: `cpl_gen` executes them
against host memory through a target port and sends a completion. Memory
writes and reads are supported. I/O and configuration requests addressed to
the root get an Unsupported Request completion.

## Data link layer: credits, acknowledgements and replay

**Flow-control initialisation** (`fc_init`). When the physical layer reports
L0, the block sends InitFC1 DLLPs for posted, non-posted and completion
credits, in that order and over and over. It moves to FC_INIT2 once it has
received all three from the partner. In FC_INIT2 it sends InitFC2 in the same
way. It becomes DL_Active after it has seen the partner finish: an InitFC2,
an UpdateFC or a TLP (the "FI2" flag). The partner's advertised limits are
recorded; a value of zero means infinite credit. Once active, freeing a slot
of the receive queue sends an UpdateFC with the new credit limit of that
class. The root advertises infinite completion credit, as a root port does.

**Credit gate** (`fc_credit`). Consumed header and data credits are counted
per class, modulo 256 and 4096. A TLP may go when the limit minus (consumed +
needed) is at most half the counter range. This is the wrap-safe comparison of
the PCI Express specification. One data credit is four DWORDs.

**Acknowledgement** (`dll_rx`). Every good TLP in sequence is delivered and
acknowledged with an Ack carrying its sequence number. A TLP with a bad LCRC,
a bad length or a framing error gets one Nak. No further Nak is sent until a
good TLP has arrived. A duplicate (a sequence number already accepted) is
dropped and answered with an Ack for the last good one. DLLPs have their
16-bit CRC checked; bad ones are dropped and counted.

**Replay** (`dll_tx`). The replay buffer holds up to `RB_DEPTH` unacknowledged
TLPs. An Ack frees all entries up to its sequence number. A Nak frees those
and then resends all the rest. The replay timer runs while anything is
unacknowledged and restarts whenever an Ack frees entries. When it reaches `REPLAY_TIMEOUT`
cycles, everything in the buffer is resent. When a new TLP cannot be taken
because the buffer is full, the transaction layer waits. The transmitter's
DLLP priority is: Ack/Nak, then flow-control DLLPs, then replays, then new
TLPs.

Both CRCs follow PCI Express 1.0a:
- **LCRC** (`lcrc32`): polynomial 04C11DB7 processed LSB first, all-ones seed,
  inverted result. It covers the sequence-number bytes and the TLP, and is
  sent low byte first.
- **DLLP CRC**: polynomial 100B, seed FFFF, inverted, MSB first, computed by
  `pcie_pkg::dllp_crc16`.

## Physical layer

`phy_layer` trains the link with a reduced version of the specification's
state machine:

- **Polling.Active**: it sends TS1 ordered sets (COM followed by fifteen TS1
  identifier symbols). It moves on once it has sent `TS1_MIN` sets and has
  received 8 consecutive TS1 or TS2 sets.
- **Polling.Configuration**: it sends TS2 sets. It moves on once it has
  received 8 TS2 sets and sent 16 after the first one arrived.
- **L0**: the link is up. Between packets it sends a data symbol 00.

Detect, the Configuration substates (link and lane numbers) and Recovery are
not modelled, so a link that drops out of L0 is not retrained.

In L0:
- **Framing**: TLPs go out as STP … END and DLLPs as SDP … END.
- **Deframing**: the receiver holds back one byte so that it can mark the
  last byte of each packet.
- **Errors**: an EDB, or a control symbol in the wrong place, ends the packet
  and raises `frame_err`. The data link layer then treats the packet as bad
  and sends a Nak.

## Monitors

Two `evs_monitor` instances watch the transmitted and the received symbol
streams. Each decodes the framing on its own and counts:
- TS1 and TS2 sets and framing violations (physical layer);
- Ack, Nak, InitFC1, InitFC2 and UpdateFC DLLPs (data link layer);
- memory reads, memory writes, I/O, configuration, completion and
  completion-with-data and message TLPs (transaction layer).

The counts are brought out as `mon_tx_o` and `mon_rx_o`.

## Parameters (evs_top)

| parameter | default | meaning |
|---|---|---|
| `MEM_DEPTH` | 1024 | host memory in DWORDs |
| `NTAGS` | 4 | outstanding non-posted requests |
| `RB_DEPTH` | 4 | replay buffer entries |
| `RXQ_DEPTH` | 8 | receive queue entries |
| `TS1_MIN` | 1024 | TS1 sets sent before leaving Polling.Active |
| `REPLAY_TIMEOUT` | 2048 | cycles without an Ack before a replay |
| `CPL_TIMEOUT` | 65535 | cycles before an outstanding request is abandoned |

The credits the root advertises are parameters of `pcie_port`: 2 posted
headers, 16 posted data credits, 2 non-posted headers and 2 non-posted data
credits, with infinite completion credit. The largest payload is 32 DWORDs
(`pcie_pkg::MAX_PAYLOAD_DW`, 128 bytes, the smallest Max_Payload_Size a
device must support). A TLP is carried as one wide struct of up to 36
DWORDs, so this number sets the width of the TLP paths.

## Where this design departs from PCI Express or leaves things out

- **Transactions**:
  - Only messages without data are sent. Received messages are counted and
    the code of the last one is kept; the suite does not act on them.
  - No ECRC (TD is sent as 0).
  - Locked reads are not issued.
  - Requests above 32 DWORDs are not split.
  - A read must be completed by a single completion.
- **Data link layer**:
  - One Ack per TLP; there is no Ack coalescing timer.
  - No periodic UpdateFC timer.
  - No REPLAY_NUM count that would force retraining.
  - Only virtual channel 0.
- **Physical layer**: reduced training (see above), one lane, no 8b/10b, no
  scrambling, no skip ordered sets, no electrical idle.
- **Host model**:
  - Test stimuli arrive as descriptors on a port instead of as calls to
    procedures.
  - Write data comes from host memory, so a test first places its data there
    (or has the endpoint write it).
  - The host serves its receive buffer before its transmit buffer, because
    both use one memory port.
- **Timeouts** are cycle counts, not the specification's microsecond values.

## Relation to the published description

The suite follows a published description of an "Early Verification Suite"
for PCI Express endpoints. That description gives:
- the layering: a host model over a downstream port with transaction, data
  link and physical layers, plus per-layer monitors;
- the blocks of the host side: host memory, configuration space model,
  transmit and receive buffers, send and receive procedures, completion
  generation and checking, flow-control initialisation, Ack/Nak and CRC;
- the four-step procedure and the request procedures with their arguments;
- the simulations it shows: flow-control initialisation, a configuration
  write and a 32-bit memory read.

It gives no encodings, sizes, timing or internal structure. Those come from
the PCI Express 1.0a specification or are this design's own choices, as
listed above.

The original implemented the host and the upper two layers as simulator
procedures and state machines, with only the physical layer in RTL. Here
every layer is RTL. Test stimuli therefore arrive as descriptors on a port,
not as procedure calls.

The root-complex duties the description lists are not automated:
- topology discovery and enumeration;
- assigning bus numbers and BARs.

A test issues those configuration requests itself, as commands.

## Testbenches

Every block has a self-checking testbench in `tb/` named `tb_<module>`. Each
prints `TB_RESULT checks=N failures=M` at the end and has a watchdog.
`tb/ep_model.sv` is the link partner the system-level tests use. It is a
second `pcie_port` configured as an endpoint (ID 01:00.0), with small
memory, I/O and configuration arrays behind it. Its configuration register 0
is a read-only ID, ABCD1234. It advertises only one posted header and 8
posted data credits, so the root's credit gate stalls on long writes.

- `tb_evs_top` runs the whole suite against `ep_model` with training
  shortened to 16 TS1 sets. It covers:
  - training and flow-control initialisation;
  - configuration writes and reads with comparison;
  - endpoint writes to and reads from host memory;
  - memory writes larger than the endpoint's credits (credit stall and
    UpdateFC);
  - 32- and 64-bit reads and I/O;
  - Unsupported Request in both directions;
  - messages in both directions;
  - a corrupted TLP (Nak and replay);
  - a stretch where the endpoint's transmitter is silenced (replay timer,
    duplicates, completion timeout and a late completion reported as
    unexpected).

  It checks that each of these mechanisms was seen at least once.
- `tb_evs_full` runs `evs_top` with every parameter at its default: 1024 TS1
  sets, link up, configuration read, configuration write with read-back,
  a 32-DWORD memory write and read-back, and I/O.

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_evs_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/pcie_pkg.sv tb/tb_evs_top.sv
./obj_dir/Vtb_evs_top
```

Stimulus changes on the falling clock edge throughout, so that a handshake
sampled at the rising edge is never raced. Write a new test the same way:
- drive `cmd_i` and `cmd_valid_i` and wait for `cmd_ready_o`;
- wait for `host_idle_o`;
- read host memory through `peek_addr_i` / `peek_mem_o` and compare.
