# Broadcast packet switch fabric: switch element and broadcast translation chip

This is synthesizable SystemVerilog for a self-routing packet switch that
carries both point-to-point and broadcast (multi-point) traffic. A switch
fabric with 16 input and 16 output lines is built from two chips:

- **Packet switch element (PSE).** A 2×2 switch with a one-packet buffer on
  each input. Three operating modes make it usable in three different
  networks: *route*, *distribute* and *copy*.
- **Broadcast translation chip (BTC).** It sits on each line between the
  copy network and the distribution network. It rewrites the header of every
  broadcast copy from a table, so that each copy gets its own destination and
  logical channel. It also reads and writes those tables on command.

A broadcast packet names only a *fanout* (how many copies are wanted) and a
*broadcast channel number*. The copy network splits it into exactly that
many copies, on distinct lines. Each copy lands on a different BTC, and that
chip's table says where this channel's copy goes. The distribution network
then spreads the load evenly. The routing network delivers every packet to
the output named in its header.

Everything runs on one clock. Packets move in fixed *packet cycles*. Each
packet is 80 nibbles long (four bits each), and one nibble moves per clock on
a 4-bit data lead plus a parity lead. Flow control is one grant bit per link
and packet cycle: a sender may use a link in the next cycle only if the
receiver granted it.

## Packet format

| nibble | name | meaning |
|---|---|---|
| 0 | RC | routing control: `0000` empty slot, `0001` point-to-point, `0011` broadcast, `0111` test |
| 1 | FAN / ADR | broadcast: number of copies wanted; otherwise: output address |
| 2, 3 | BCN / LCN | broadcast channel number (broadcast), or outgoing logical channel number |
| 4 | CTL | 0 data, 5 switch test, 6 read BTT block, 7 write BTT block, 8 update BTT entry, 9 read BCIT, A write BCIT (1–4 are for a line card chip not described here) |
| 5 | SRC | input line the packet came from |
| 6..79 | I | information field; I[0] is nibble 6 |

Every nibble carries odd parity on its own lead. Parity is checked on every
chip input and regenerated on every chip output.

## The switch element (`pse`)

### Structure and timing

```
 ud0/up0 ──► IC0 ──┐  en0                dd0/dp0
                   ├───── OR per port ──►
 ud1/up1 ──► IC1 ──┘  en1                dd1/dp1
              │ req         ▲
              └──► NCC ─────┘   ◄── dg0, dg1, gt
                    └──► ug0, ug1
```

Each **input circuit** (`pse_ic`) works as follows:
- It checks parity and shifts the packet through a two-stage shift register.
- A packet that got an output port in this cycle is cut straight through.
- A packet that did not is written into the 80-nibble `pse_buffer`. It is
  offered again in later cycles.
- The buffer is read and written at the same nibble index. So a stored
  packet can leave while the next packet is written into the same buffer
  behind it.
- After the buffer/cut-through multiplexer, the **header modification
  circuit** (`pse_hmc`) edits the header.
- The IC's enable bits then gate the stream onto output port 0 and/or 1.

Timing, counted from the clock in which `pt` is high and nibble 0 is on `ud`:

- clock 1: the arriving packet's port request goes to the NCC. RC comes from
  the shift register and ADR/FAN still from `ud`.
- clock 2: the enables are final. The IC either sends its buffered packet and
  stores the new one, or cuts the new one through, or stores it.
- clock 4 + k: nibble k leaves on `dd`. So the element's latency is
  exactly 4 clocks, as the chip's pin timing requires.
- `gt` marks valid downstream grants (`dg`). The upstream grants `ug` are
  valid from the next clock, well inside the 2 clocks allowed.

`err` pulses for one clock on each of these errors:
- an input parity error;
- a packet that arrives while the buffer is still occupied. The upstream
  sent without a grant, so that packet is dropped.

### Port requests (`bpn_pkg::classify`)

| mode (`om`) | RC | request |
|---|---|---|
| route (1) | any non-empty | port given by ADR bit `3-sn` (sn = 0 selects the MSB) |
| distribute (2) | data or broadcast | either port |
| copy (3) | broadcast with FAN > 2^sn | both ports |
| copy (3) | other data | either port |
| any | test (`0111`) | port given by ADR bit `3-sn` |

The requests are 3-bit codes: `100` either, `101` port 0, `110` port 1,
`111` both.

### Output-port allocation (`pse_ncc`)

The node control circuit allocates in two phases:

1. **Grant phase (at `gt`).** Packets already held in buffers request ports.
   They are allocated from the downstream grants. The upstream grant of an
   input is raised when its buffer will be free in the next cycle: it is
   empty, or its packet has just been given its ports.
2. **Start phase (one clock after `pt`).** Newly arriving packets request
   ports. They get whatever ports the grant phase left over. An IC that
   requested in the grant phase does not request again.

When the two requests conflict, the NCC decides as follows:
- **Priority:** `111` (copy) beats `101`/`110` (routed), which beat `100`
  (either).
- **Equal priority:** the input that last sent while the other was idle
  (state bit `in`) waits.
- **Claims:** a higher-priority request blocks the ports it asks for even
  when it cannot be served, as the allocation equations have it.
- **Spreading a lone `100` request:** with both ports free, it goes to the
  port opposite the one that last carried traffic alone (state bit `out`).
  The `in` and `out` updates follow the allocation equations.

An "either" request has one shortcut: with two of them and both ports free,
they split, and the favoured input takes port 0.

### Header modification (`pse_hmc`)

- **Copying.** When a broadcast packet is copied, FAN is halved: one copy
  gets ⌈FAN/2⌉ and the other ⌊FAN/2⌋. If the low bit of BCN is 0, port 0
  gets the larger half; otherwise port 1 does.
- **Rotation.** When `rrf` is set, a test packet's nibbles 1, 2, 3 are
  rotated: nibble 1 takes the old nibble 2, nibble 2 the old nibble 3, and
  nibble 3 the old nibble 1. A two-clock pipeline gives the circuit the
  look-ahead this needs.

## The broadcast translation chip (`btc`)

Every packet passes through with a fixed delay of 16 clocks. The chip holds
two tables. Each nibble is stored with its parity, and the parity is checked
when the nibble is read.
- **BTT** (`btc_btt`): 64 entries of four nibbles.
- **BCIT** (`btc_bcit`): 32 nibbles.

What the chip does depends on the packet:

| packet | action |
|---|---|
| broadcast, CTL 0 | header nibbles 0–3 are replaced by `BTT[BCN]`. If the new ADR equals SRC, the copy is dropped. |
| CTL 6 | BTT block `I[0]` (16 entries) is copied into `I[1..64]`, and the packet goes on. |
| CTL 7 | `I[1..64]` is written into BTT block `I[0]`. The packet is dropped. |
| CTL 8 | `j = BCIT[2·I[0] + BCN bit 0]`, then `I[4j+1..4j+4]` is written into `BTT[BCN]`. The packet is dropped. |
| CTL 9 | the BCIT is copied into `I[0..31]`, and the packet goes on. |
| CTL A | `I[0..31]` is written into the BCIT. The packet is dropped. |
| anything else | the packet passes unchanged |

Writes happen on the input side, as the nibbles arrive. Reads and header
replacement happen on the output side, 16 clocks later. A packet that is not
passed on leaves as an empty slot: all nibbles are zero, with correct
parity.

An update packet (CTL 8) carries up to 16 four-nibble entries in its I
field. Each chip chooses which entry it takes through its own BCIT, indexed
by I[0] and the low bit of BCN. So one update can give a different entry to
each chip it reaches.

## The fabric (`bpn_fabric`, `bpn_network`)

```
in ─► copy network ─► 16 × BTC ─► distribution network ─► routing network ─► out
      (om=3)          (16 clk)    (om=2)                  (om=1)
```

- **Networks.** Each network (`bpn_network`) has four columns of eight
  switch elements. They are joined as an omega network: a perfect shuffle
  (line x goes to x rotated left by one bit) in front of every column.
  Element e of a column serves lines 2e and 2e+1.
- **Routing.** In the routing network, column c selects ADR bit 3−c, so a
  packet reaches output line ADR.
- **Copying.** The copy network numbers its columns the other way round
  (sn = 3−c). Its first column therefore copies only packets with FAN > 8,
  and the last column copies those with FAN > 1. A packet with fanout F
  comes out as exactly F copies on distinct lines.
- **Test packets.** A test packet carries one routing nibble per network.
  The last column of each network rotates those nibbles, so after three
  networks they are back in their original order. Nibble 1 selects the copy
  network's output line (the BTC), with its bits reversed because that
  network's stage numbers count down. Nibble 2 selects the distribution
  network's output line, and nibble 3 the output port. A test packet sent to
  BTC k with CTL 6–A is how the tables of chip k are read and written.

**Timing.**
- `frame` marks nibble 0 on the input lines, once every `PKT_PERIOD`
  (default 96) clocks.
- Forward latency: 4 clocks per column and 16 in the BTC, so packets leave at
  `out_frame` = `frame` + 64.
- Grants run backwards: 2 clocks per column. The grant time of the last
  routing column is `GT_OFFSET` (default 65) clocks after `frame`. The
  receivers' `out_dg` are sampled there.
- The BTC has no grant leads. So the copy network's downstream grants come
  straight from the distribution network's upstream grants. This is sound
  because the BTC holds no packet: it always passes on or drops within the
  same cycle.
- `in_ug` tells each input line whether it may send in the next cycle.
- `err` is the OR of every chip's error lead.

## Where this design makes its own choices

The two chips' leads and behaviour follow their specification. These points
are this design's own:

- **Clock.** One clock `clk` replaces the two-phase non-overlapping clock,
  and the active-high synchronous `rst` replaces R. Power and ground pins are
  not modelled.
- **Internal structure.** The pipeline split inside the input circuit is this
  design's: 2 shift-register clocks and 2 header-modification clocks make up
  the 4-clock latency. So are the overflow error and the exact buffer
  addressing.
- **Ambiguous equations.** A few terms of the allocation equations cannot be
  meant as they stand. In those cases the prose rules were followed:
  - In the port-1 enable, the term printed for a port-0 request (`101`) is
    read as the port-1 request (`110`).
  - The update of `in` holds its value when neither input sends.
  - `ug` means "buffer free next cycle".
  - A lone `either` request goes to the port opposite `out`.
- **BTC details.**
  - BCN indexes the 64-entry BTT with its low six bits.
  - I[0] selects a block with its low two bits.
  - Control packets act whenever RC is not empty.
  - "Read BCIT" fills the I field, as the chip's program says.
- **Fabric.** The fabric around the chips is this design's reading of the
  system the chips are made for. That covers the network order, the omega
  wiring, `sn`/`rrf` per column, the strobe generator and the packet period.
  - The packet period is 96 clocks, where the chips allow any period of 80
    or more. Grants must reach the inputs before the next frame. They start
    at the last routing column 65 clocks after `frame`, after the forward
    pipeline has filled, and then take 24 more clocks through the three
    networks.
- **Not built.** The line card chips that use CTL 1–4 are outside this
  design.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_pse_buffer` | write/read at every address, read-before-write |
| `tb_pse_ncc` | random requests and grants, against an independent model of the allocation equations, including the `in`/`out` state |
| `tb_pse_hmc` | FAN halving for all FAN/BCN combinations, test-packet rotation, latency |
| `tb_pse_ic` | cut-through, storing, sending a stored packet while storing the next, overflow, parity errors, 4-clock latency |
| `tb_pse` | all three modes with random traffic and grants; every packet delivered with the right header, latency pt+4 |
| `tb_btc_btt`, `tb_btc_bcit` | table writes and both read ports |
| `tb_btc` | every CTL action, dropping, parity errors on input and on table reads, 16-clock delay |
| `tb_bpn_network` | a 16-line routing network under random load: delivery to ADR, test-packet rotation, `pt_out`/`gt_out` latency, buffering, withheld grants |
| `tb_bpn_fabric` | the whole fabric at its default size (see below) |

`tb_bpn_fabric` runs the complete fabric with every parameter at its default:

1. It programs all 16 BTCs through test packets, writing the BCIT and all
   four BTT blocks of each chip.
2. It sends random point-to-point, broadcast and test traffic under random
   output grants.
3. It sends a broadcast whose translations all point back to its source, so
   every copy must be dropped.
4. It reads back the BCIT and BTT blocks and updates BTT entries with CTL 8.
5. Finally it injects a parity error.

A table model predicts every delivery. Each packet must arrive exactly as
often as expected, with the right contents and header. The `out_frame`
latency is checked. The testbench also counts each mechanism, and a count of
zero is a failure: replication, translation, drop to source, test routing,
table reads, table update, buffering, straight-through delivery, withheld
input grants and the error lead.

To simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bpn_pkg.sv tb/tb_pkt_pkg.sv tb/tb_bpn_fabric.sv \
    --top-module tb_bpn_fabric -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_bpn_fabric` with any other testbench name. Testbenches that do
not use packets (`tb_pse_buffer`, `tb_pse_ncc`, `tb_btc_btt`, `tb_btc_bcit`)
do not need `tb/tb_pkt_pkg.sv`, but it does no harm.

## Files

| file | contents |
|---|---|
| `rtl/bpn_pkg.sv` | nibble and parity types, header field positions, RC/CTL codes, request codes, `odd_par`, `classify` |
| `rtl/pse_buffer.sv` | one-packet buffer (80 × 5 bits) |
| `rtl/pse_ncc.sv` | node control circuit |
| `rtl/pse_hmc.sv` | header modification circuit |
| `rtl/pse_ic.sv` | input circuit |
| `rtl/pse.sv` | switch element |
| `rtl/btc_btt.sv`, `rtl/btc_bcit.sv` | the BTC's two tables |
| `rtl/btc.sv` | broadcast translation chip |
| `rtl/bpn_delay.sv` | strobe delay line |
| `rtl/bpn_network.sv` | one four-column network |
| `rtl/bpn_fabric.sv` | the fabric (top level) |
| `tb/tb_pkt_pkg.sv` | packet helpers for the testbenches |
| `tb/tb_*.sv` | testbenches, one per block |

The main parameters and their defaults:

| parameter | default |
|---|---|
| `PKT_NIBBLES` | 80 nibbles per packet |
| `BTT_ENTRIES` | 64 |
| `BCIT_ENTRIES` | 32 |
| `DELAY` (BTC) | 16 clocks |
| `LOG_PORTS` | 4 (16 lines, four columns per network) |
| `PKT_PERIOD` | 96 clocks |
| `GT_OFFSET` | 65 clocks |
