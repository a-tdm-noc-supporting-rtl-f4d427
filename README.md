# dAElite-style TDM network on chip

This is a network on chip that guarantees bandwidth and latency without arbitration.
Link time is cut into slots, and a global schedule gives each connection its own slots on
every link it crosses, so two words never compete for a link. Routers carry no packet
headers and make no routing decisions. Each output port has a small slot table that names
the input port it copies in each slot. The schedule is spread across all routers and
network interfaces (NIs). A host sets it up at run time over a separate, narrow
configuration tree, using broadcast packets that every element reads and then acts on in
its own way. A connection is set up in a few tens of cycles. Multicast costs nothing
extra: two outputs may name the same input.

The RTL is generic SystemVerilog (IEEE 1800-2017) with no vendor primitives. The default
build is a 2x2 mesh with 32 TDM slots and 3 channels per NI.

## Files

| file | block |
|---|---|
| `rtl/dael_pkg.sv` | shared constants, link and configuration-word types, ID and width functions |
| `rtl/dael_slot_counter.sv` | TDM wheel position (slot, word in slot) |
| `rtl/dael_router.sv` | router: per-output slot table, registered crossbar, node of the configuration tree |
| `rtl/dael_ni.sv` | network interface: channel queues, send/receive slot table, credit flow control |
| `rtl/dael_fifo.sv` | channel queue used by the NI |
| `rtl/dael_cfg_parser.sv` | configuration submodule inside every router and NI |
| `rtl/dael_cfg_module.sv` | host-side configuration module: serializer, cool-down, read-back |
| `rtl/dael_noc_top.sv` | 2x2 mesh: 4 routers, 4 NIs, configuration module, configuration tree |

## TDM timing: slots, hops and the wheel

- A slot is `SLOT_WORDS = 2` cycles. `NSLOTS = 32` slots make one turn of the wheel.
- Every element has a `dael_slot_counter` and leaves reset in the same cycle, so all
  elements agree on the slot number without talking to each other.
- A hop costs exactly two cycles:
  - the link, which is the input register of the next element;
  - the crossbar, which is the router's output register.
- So a word that enters a router in slot `s` leaves it in slot `s+1`, in the same word
  position. Each hop of a path uses the next slot on the wheel (modulo `NSLOTS`).
- The router fills its output register from `in_q[tab[next_slot][p]]`, so table entry
  `s+1` belongs to the slot in which the word leaves.
- NIs use the same two registers on their receive side. The NI's receive entry is
  therefore one slot after the last router's entry.
- A link (`dael_pkg::link_t`) carries:
  - `valid`;
  - a 32-bit `data` word;
  - 3 `credit` wires. Over the two words of a slot they carry one 6-bit credit value,
    upper half first.

Example: a word sent by NI10 in slot 1 through R10 and R11 to NI11 is forwarded by R10 in
slot 2 and by R11 in slot 3, and NI11 takes it in slot 4. The mesh testbench checks the
exact arrival cycle of such a word.

## Path set-up packets (the hard part)

All configuration travels as 7-bit words:

- `{flag, payload[5:0]}`;
- flag clear means a header, and the payload is the operation code;
- flag set means a payload word;
- an all-zero word is padding and may appear anywhere.

A path set-up packet (operation code 4) contains, in order:

1. the header;
2. `ceil(NSLOTS/6)` mask words. Their payloads, first word most significant, form an
   `NSLOTS`-bit mask. Bit `s` means "slot `s` is used at the destination NI";
3. pairs of (element ID, port word), one per element on the path, **listed from the
   destination back to the source**.

Every router and NI sees every word, because the tree broadcasts. Each element keeps its
own copy of the mask and walks through the pairs:

- **ID mismatch:** the element rotates its mask down by one slot (bit `s+1` moves to bit
  `s`). The next pair is one hop closer to the source, so it uses slots one earlier.
- **ID match:** the element writes the port word into every marked entry of its slot table.

So one packet describes the whole path, and each element works out its own slots without
any per-element arithmetic at the host. Port word formats:

- **router:** `{input, output}`, 2 bits each for 3 ports. Input code `2'b11` means "no
  input" and is used for tear-down.
- **NI:** `{dir, channel}`. `dir = 1` selects the receive entry and `dir = 0` the send
  entry. The all-ones channel clears the entry.

Worked example. The slot table has 8 entries; this is also the first part of
`tb_dael_cfg_parser`. The path runs NI10 → R10 → R11 → NI11, and the destination uses
slots 7 and 4. The host writes three words. The configuration module sends the four 7-bit
fields of each word least significant first:

| host word | 7-bit words sent | meaning |
|---|---|---|
| `0x0142104` | `04 42 50 00` | header "path", mask `000010 010000` = slots 7 and 4, padding |
| `0x8d0e263` | `63 44 43 46` | NI11 (ID 35): receive on channel 0; R11 (ID 3): input 1 → output 2 |
| `0x818a4c2` | `42 49 62 40` | R10 (ID 2): input 2 → output 1; NI10 (ID 34): send on channel 0 |

Each element ends up with these slots:

| element | slots written |
|---|---|
| NI11 | 7, 4 |
| R11 | 6, 3 |
| R10 | 5, 2 |
| NI10 | 4, 1 |

Points that are easy to get wrong:

- Rotation happens only on a mismatch. An element that matches writes its table and does
  not rotate. It keeps rotating on the pairs that follow, but it occurs only once on a
  path, so that has no effect.
- At 32 slots the mask is 6 words, not 2.
- The table is written in one cycle. Even so, the configuration module enforces a
  **cool-down** of `COOLDOWN = 9` cycles after the last word of a path packet before it
  sends the next header.
- A packet has no end marker: it ends at the next header.
- Tear-down uses the same packet, with "no input" or "no channel" as the port words.

Set-up time follows from the word count:

- one path of `h` hops has `h+1` elements, so it takes `1 + 6 + 2(h+1) = 2h+9` words;
- a connection has two paths, one each way, so it takes `4h+18` words plus two cool-downs,
  which is `4h+36` cycles;
- that gives 60, 68, 76 and 84 cycles for 6, 8, 10 and 12 hops;
- `tb_dael_setup_time` measures 48, 52 and 56 cycles for the 3, 4 and 5 hops the 2x2 mesh
  allows. Each extra hop adds 4 cycles.

## Multicast

- An output's table entry names an input, and nothing stops two outputs from naming the
  same input in the same slot. That is a multicast tree.
- A tree is set up as one full path from the source to the first destination, plus
  *partial* paths. A partial path starts at a branching router and uses the same slots
  that the full path uses there.
- `tb_dael_noc_top` builds NI00 → R00 → R01 → NI01 plus the branch R01 → R11 → NI11. Both
  destinations receive the same stream. The tree's slots wrap around the end of the wheel.
- A source has one credit counter per channel, which cannot track several receivers. So a
  multicast source turns its credit check off (flag bit 1). The receivers must then keep
  up; an assertion in the NI reports a receive queue overflow otherwise.

## Several paths for one connection

The same mechanism spreads one connection over several paths.

- Each path is an ordinary path set-up packet. The paths end in the same channel of the
  destination NI, in different slots.
- The destination NI only sees its receive table, so it does not care which way a word
  came.
- Words stay in order if the paths have the same length. With unequal lengths, the
  schedule must make sure that a word sent later also arrives later.
- `tb_dael_multipath` sends NI00 → NI11 over both 3-router routes of the mesh. The
  connection gets exactly twice the bandwidth of one path.

## Credit flow control in the NI

Each channel has two counters:

- `credits` is the free space in the peer's receive queue. It goes down by one for each
  word sent and up by each credit value received.
- `cback` counts words the local IP has taken from the receive queue that have not yet
  been reported back.

In every slot the channel owns for sending, the NI:

1. takes a snapshot of `cback` (at most 63);
2. sends the snapshot on the credit wires of both words of the slot;
3. subtracts the snapshot from `cback`.

Connections are bidirectional. Credits for words sent on channel `c` come back with the
words received on channel `c`, so both ends of a connection use the same channel number.
A channel sends a word only when all of these hold:

- it is enabled (flag bit 0);
- its transmit queue is not empty;
- `credits > 0`, unless flag bit 1 turns the check off.

The host sets the counters and flags through the configuration tree. For a connection,
`credits` at each end must be the depth of the peer's receive queue (8 by default).

## Configuration tree and configuration module

- The tree is made of 7-bit links.
- Forward, each router registers the word twice and copies it to all of its children.
- In reverse, each router ORs the answers of its children and registers the result twice.
- The answers are not arbitrated, so only one request may be active at a time.
  `dael_cfg_module` enforces this: after a read request it holds the next header until
  the answer comes back, or until `RSP_TIMEOUT` cycles have passed.
- An answer is a reverse-tree word with its flag bit set. The module keeps it on
  `rsp_valid`/`rsp_data` until the host pulses `rsp_ack`.
- Path set-up and tear-down change only the table entries of the marked slots, so
  connections in other slots keep running meanwhile. `tb_dael_noc_top` checks this.
- The host port is `wr_valid`/`wr_ready`/`wr_data`, with a queue of `HOSTQ` words. Each
  host word carries four configuration words in its low 28 bits.

Beyond path set-up, the configuration module and parser support these operations:

| code | operation | words after the header |
|---|---|---|
| 1 | write | ID, select, value |
| 2 | read | ID, select (the answer returns on the reverse tree) |
| 3 | bus | ID, then seven payloads, shifted into a 37-bit word on the NI's `bus_word` |

`select[5:4]` picks the register: 0 = credits, 1 = cback, 2 = flags. `select[3:0]` is the
channel.

## The 2x2 mesh (`dael_noc_top`)

```
    NI10 - R10 - R11 - NI11        row 1
            |     |
    NI00 - R00 - R01 - NI01        row 0
```

- Router ports: 0 is the vertical neighbour, 1 the horizontal neighbour, 2 the local NI.
- Element IDs:
  - router `Rrc` is `2r+c`;
  - `NIrc` is `32+2r+c`.
- Configuration tree: cfg → R00 → {NI00, R01}, R01 → {NI01, R11}, R11 → {NI11, R10},
  R10 → {NI10}.
- Top-level ports:
  - the host port of the configuration module;
  - for each NI `k = 2r+c`: `NCH` transmit streams (`tx_valid/tx_ready/tx_data[k][ch]`),
    `NCH` receive streams (`rx_*`), and the bus configuration output
    (`bus_valid/bus_word[k]`).
- Parameters and defaults: `NCH = 3`, `NSLOTS = 32`, `TXQ_DEPTH = RXQ_DEPTH = 8`,
  `COOLDOWN = 9`.

## Departures from the original design and choices of this RTL

Choices where the original description is silent:

- The data width is 32 bits, and every link word has a valid bit.
- Reset is active-low and asserted asynchronously. All elements must leave it in the same
  clock cycle.
- The encodings of the write, read and bus operations, the register select field, the NI
  flag bits and the read answer format are this design's own. Only path set-up is
  specified in detail.
- The OR that merges answers on the reverse tree and the read time-out are this design's
  own.
- In the queues, a push into a full queue is refused. Queue depth 8 is chosen; up to 63 is
  possible with the 6-bit counters.
- Credits travel upper half first. Credit returns are paired with data by channel number.
- The cool-down value 9 is inferred, not given: it is the value that makes the analytic
  set-up times come out as stated.
  This RTL writes a slot table in one cycle, so it would need less.
- The configuration tree is a chain through the four routers, as drawn in the original
  path set-up example. The original text asks for a tree that keeps every node as close
  to the host as possible, which would hang R10 directly below R00. The chain makes R10
  and NI10 two router hops deeper than necessary. It changes only when configuration
  words arrive, not what they do.
- Nothing checks that multicast receivers keep up. An overflow of a receive queue is
  reported by a simulation assertion only.

Not built:

- The protocol shells that turn bus transactions into channel streams. The NI exposes
  plain ready/valid channel streams instead.
- The shell that turns the 37-bit bus configuration word into bus transactions.
- The host processor, the IPs and the memories.

Other limits:

- Routers with 8 or more ports cannot be configured with 7-bit words. Two 4-bit port
  fields do not fit in a 6-bit payload.
- The mesh has paths of at most 5 hops.

## Simulating with verilator

The testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M` and has a
cycle watchdog. The package must be read first, and `-y rtl` finds everything else.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/dael_pkg.sv tb/tb_dael_noc_top.sv --top-module tb_dael_noc_top -Mdir build -o sim
./build/sim
```

| testbench | what it checks |
|---|---|
| `tb_dael_slot_counter` | wheel counting and wrap |
| `tb_dael_fifo` | queue against a reference model, full and empty, simultaneous push and pop |
| `tb_dael_cfg_parser` | the worked example above (at 8 slots), random 32-slot packets against a reference rotation, write/read/bus decoding |
| `tb_dael_router` | forwarding against a reference model, multicast, tear-down, configuration-tree delay and answer merging |
| `tb_dael_ni` | two NIs back to back: data in order, credit stall and credit return, read-back timing, bus word |
| `tb_dael_cfg_module` | word order, the cool-down gap, waiting for a read answer, the time-out |
| `tb_dael_noc_top` | the whole mesh at default size, configured only through the host port: a bidirectional connection, a multicast tree, a second connection set up while the first two carry traffic, credit stalls, read-back, bus word, exact arrival cycle, tear-down. Each mechanism must occur at least once |
| `tb_dael_example_path` | the worked example's three host words on the whole mesh at 8 slots: words arrive only in slots 4 and 7, at exactly the reserved rate |
| `tb_dael_multipath` | one connection over two equal-length paths at once: order kept, both paths used, twice the rate of one path |
| `tb_dael_setup_time` | connection set-up time `4h+36` for 3, 4 and 5 hops |

The full mesh test builds and runs in a few seconds.

To change the design:

- `NSLOTS` may be any size. The mask length follows from it.
- `NCH` must stay below `2**port_w(NPORTS)`, so at most 3 channels with 3-port routers,
  because the channel field of the NI port word is as wide as a router port field.
- Port fields grow with `NPORTS` and must fit the 6-bit payload.
