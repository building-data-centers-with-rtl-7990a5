# Optically connected memory over a circuit-switched optical network

This RTL describes a memory system in which the electrical bus between a
processor and its main memory is replaced by an optical network. The processor
node has no local memory. Every access goes over a 4 × 2.5 Gb/s
wavelength-striped link: four payload wavelengths carry the data, and four
low-speed header wavelengths carry a frame and three routing bits. The link
passes through a 4×4 network of 2×2 photonic switches to one of two *memory
nodes*. Each memory node is an FPGA in front of commercial SDRAM chips, with no
network logic of its own. All lightpaths in both directions are set up and torn
down by the processor's memory controller. It treats the network as a
circuit-switched bus: it opens a lightpath, moves one long burst, and closes the
lightpath again.

The design mirrors a laboratory system. That system has one processor node,
two memory nodes, a 250 MHz fabric clock, 32-bit memory words, 1024-word
bursts (one full SDRAM row), 128 MB per node, and an emulated processor that
fills memory with test patterns and verifies them on read-back.

```
                      port 0                                   port 2
 +-------------- proc_node ---------------+        +-------- ocm_node ---------+
 | traffic_gen -> mem_ctrl -> serdes -----+--link--+--> +---------+            |
 |   (CPU)         |   ^        ^          |  delay | b |  serdes  |-> ocm_ctrl -+-> SDRAM
 |                 v   |        |          |        | a +---------+     |       |   (outside)
 |             net_ctrl|        +----------+--------+ n <-----------------+       |
 |            hdr_fwd / hdr_ret            |        | y  <-link delay--           |
 +-----------------------------------------+        | a        +-------- ocm_node (port 3)
                                                    | n
                          spare port 1 <----------->| _net (6 x switch_node)
```

## A memory transaction, step by step

A transaction is always a whole burst of `BURST_LEN` = 1024 words to or from
one memory node. `mem_ctrl` runs it as follows.

**Write.**
1. Raise the forward header at the processor's network port: frame = 1, with
   the route bits of the memory node.
2. Wait `SETUP_CYCLES` while the switches close their gates. The processor is
   stalled during this wait (`setup_wait`).
3. Send one command word, with the control flag set on all four lanes. It holds
   the operation and the burst address.
4. Pulse `wr_go`. The processor then streams 1024 data words on the same four
   lanes.
5. Drop the frame. This tears the lightpath down.

So the four lanes are time-multiplexed: the command and address first, then
data. No lane is set aside for control.

**Read.**
1. Raise the forward header and also the *return* header. The return header
   is applied at the memory node's network input and routed back to port 0.
2. Wait `SETUP_CYCLES`, then send the read command word.
3. Drop the forward header at once. Only the return lightpath stays open.
4. Pulse `rd_go`. Read words are delivered to the processor as they arrive.
5. After 1024 words, drop the return header.

The memory node never has to know about the network. When its read data leave
the SDRAM, the lightpath they need already exists.

At the default sizes, measured in 250 MHz cycles from the cycle in which the
command word is sent:

| transaction | cycles | where the time goes |
|---|---|---|
| write | `1 + BURST_LEN` = 1025 | command word, 1024 data words |
| read | `2·LINK_DELAY + (T_RCD + CL + 4) + BURST_LEN + 3` = 1149 | command out through one link, row activation and CAS latency in the node, data back through a second link, 1024 words |

Before the command word comes the setup wait: `SETUP_CYCLES` (8) normally,
longer when it falls inside the spacing after a write burst (see below), and
none on lightpaths that are already held. The end-to-end testbench checks both
formulas exactly.

## Holding lightpaths, and spacing write bursts

**Pre-allocation.** Setting a memory node aside for a processor ahead of time
removes the setup wait. `keep_paths` does this. When it is high as a request
is accepted, `mem_ctrl` sets up *both* lightpaths (forward and return), even
for a write. It then keeps both after the burst instead of tearing them down.
The next request to the same node goes straight to the command word and pulses
`path_reuse`. Two things drop the held paths for one cycle (state `S_DROP`)
before anything else happens:
- a request to a different node, which then sets up new paths as usual;
- `keep_paths` going low while the controller is idle.

While paths are held, the forward path also stays up during reads.

**Write spacing.** The memory node cannot hold the processor off. A write
burst costs it `BURST_LEN + T_RCD + T_WR + T_RP + 2` cycles: open the row,
1024 writes, write recovery, precharge. The link delivers the burst in
`BURST_LEN + 1` cycles. With back-to-back writes on held lightpaths, the
difference would pile up in the node's receive FIFO, 13 words per burst, and
overflow it within a few bursts. So after every write burst `mem_ctrl` waits
`BURST_GAP` cycles (default 14) before it sends the next command word. A normal
setup wait runs during this gap, so it only costs time when the gap is longer
than the setup. The end-to-end test fills one node with 24 back-to-back bursts
on held lightpaths and checks that the FIFO never holds more than a few words.

## The network and its header

`banyan_net` has six `switch_node`s in three stages of two. Node *k* of a stage
serves lines 2k and 2k+1. Between stages, the two middle lines cross: output
line 1 feeds input line 2 of the next stage, and line 2 feeds line 1.

The header travels on the same fibre as the payload. It is a `header_t`:
`frame` plus `addr[2:0]`, and stage *s* looks only at `addr[s]` (0 = upper
output, 1 = lower output). With this wiring a message from any input port
reaches output port *d* when

```
A1 = d[1],  A2 = d[0],  A0 = don't care (net_ctrl drives 0)
```

The first stage adds path redundancy but does not change the destination. The
testbench of `banyan_net` checks all 4 × 4 source/destination pairs with both
values of A0.

In each `switch_node`, four gates (one per input/output pair) stand for the
node's four SOAs. On a rising frame the node closes the gate named by its
address bit, if that output is free. The gate stays closed until the frame
falls. The decision is registered, so a path through the three stages opens
three cycles after the frame and closes one cycle per stage after the frame
falls. The data path is transparent and has no delay. Payload sent before a
path is open is lost, which is why the controller waits `SETUP_CYCLES` (default
8; at least 3 are needed, one per stage).

Contention cannot occur with a single memory controller, but the switch still
handles it:
- An output that is already held keeps its path.
- Input 0 wins a tie.
- A losing input keeps trying while its frame is high, and shows `blocked`.

Nothing tells the sender that a path was refused. A second controller on the
spare port would have to coordinate with the first.

## Lanes, symbols and the command word

Each lane carries one 10-bit `lane_sym_t` per 250 MHz cycle: a valid bit, a
control bit and 8 data bits. This is exactly 2.5 Gb/s per lane, or 10 Gb/s over
four lanes, of which 8 Gb/s is data. `serdes` puts byte *l* of a 32-bit word on
lane *l*. The lanes are assumed to arrive aligned; `rx_lane_err` flags a cycle
in which their flags disagree. The actual serializers, clock recovery and
optics belong to the FPGA transceivers and are not part of this RTL.

The command word (`cmd_word_t`):

| bits | field |
|---|---|
| 31:30 | operation: 1 write, 2 read |
| 29:25 | reserved, 0 |
| 24:0 | word address of the burst inside the node (column bits 0) |

## The memory node

`ocm_node` = `serdes` + `ocm_ctrl`. `ocm_ctrl` pushes every received word,
command or data, into a 32-entry FIFO, and a sequencer pops it:

- **command** → `ACT` (open the row) → wait `T_RCD`
- **write** → one `WR` per data word, columns 0…1023, then wait `T_WR`, then `PRE`, then wait `T_RP`
- **read** → one `RD` per cycle over columns 0…1023. Each word goes straight to
  the lanes `CL` cycles after its `RD`. Then `PRE`.

The FIFO serves two purposes. It absorbs the write data that arrive while the
row is being opened: data start streaming one cycle after the command, and the
first `WR` can only follow `T_RCD` later. It also lets a following command wait
behind the end of a burst. The end-to-end test checks that each SDRAM receives
1024 back-to-back `WR`s, one word per cycle.

The 25-bit word address splits as `{cs, bank[1:0], row[11:0], col[9:0]}`. That
gives 2²⁵ words × 32 bits = 128 MB per node. `cs` picks one of two pairs of
16-bit chips, and the two chips of a pair together form the 32-bit word. The
SDRAM port (`sd_req_t`) is command-level: one command per cycle and one 32-bit
word per `RD`/`WR`. The DDR2 double-rate I/O, strobes and native burst handling
would sit in a PHY below it and are not part of this design. No refresh is
issued.

## The emulated processor

`traffic_gen` is a self-checking traffic source. On `start` it writes a range
of bursts on a range of memory nodes: nodes are the outer loop and bursts the
inner one. It then reads them all back in the same order. There are four
patterns:

| `pattern` | data word |
|---|---|
| `PAT_ONES` | all ones |
| `PAT_ZEROS` | all zeros |
| `PAT_PRBS` | 2³¹−1 PRBS, x³¹+x²⁸+1, 32 bits per word, restarted from all ones at the start of the write pass and of the read pass |
| `PAT_ADDR` | `{node[1:0], 5'b0, word_address[24:0]}` |

Every read word is compared with its expected value. `words_checked`,
`bit_errors` and `word_errors` are 64-bit counters that add up across passes
and are cleared by `clear`. The effective memory bit-error rate is
`bit_errors / (32 · words_checked)`. Showing an error rate below 10⁻¹² takes
more than 3.1·10¹⁰ verified words, which the counters hold easily.

## Modules

| module | role |
|---|---|
| `ocm_pkg` | shared types: `lane_sym_t`, `lane_bus_t`, `header_t`, `net_sig_t`, `cmd_word_t`, `sd_req_t`, enums, PRBS31 step function |
| `ocm_system` | top: processor node, `N_OCM` memory nodes, network, link latencies |
| `proc_node` | `traffic_gen` + `mem_ctrl` + `net_ctrl` + `serdes` |
| `traffic_gen` | emulated processor, patterns, error counters |
| `mem_ctrl` | transaction flow (setup, command, data, teardown) |
| `net_ctrl` | header wavelengths for forward and return lightpaths |
| `serdes` | word ↔ four lane symbols |
| `ocm_node` | `serdes` + `ocm_ctrl` |
| `ocm_ctrl` | command decode, receive FIFO, SDRAM sequencing |
| `banyan_net` | 4×4 network, three stages of `switch_node` |
| `switch_node` | 2×2 switch: header decode and four gates |
| `link_delay` | fixed latency of one unidirectional path |

Port map in `ocm_system`: the processor node is on port 0, memory node *i* is
on port 2 + *i*, and port 1 is a spare brought out as `spare_in`/`spare_out`.
The return header from `proc_node` is applied at the network input of the port
it names. Each node's transmitter reaches the network through a `link_delay`
of `LINK_DELAY` cycles. The default of 55 is about 100 ns of transceiver logic
plus about 120 ns of time of flight over some 24 m of fibre, at 250 MHz. Header
and payload get the same delay.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `BURST_LEN` | 1024 | words per transaction (one SDRAM row) |
| `N_OCM` | 2 | memory nodes (1 or 2 with this port map) |
| `LINK_DELAY` | 55 | cycles per unidirectional path |
| `SETUP_CYCLES` | 8 | wait after raising a header; must be ≥ 3 |
| `BURST_GAP` | 14 | minimum cycles from the end of a write burst to the next command word (inside `mem_ctrl`, default only) |
| `FIFO_DEPTH` | 32 | memory-node receive FIFO |
| `T_RCD`, `CL`, `T_WR`, `T_RP` | 4 each | SDRAM timing in cycles |

## What is outside the RTL

- The 2.5 Gb/s FPGA transceivers: serializers and clock recovery.
- The photonic parts: modulators, the SOAs that drive the header wavelengths,
  WDM multiplexers, and photodiode receivers.
- The optical switch hardware itself. `switch_node` models only its routing
  logic and represents each SOA as a gate on the digital symbols.
- The SDRAM chips. `tb/sdram_model.sv` is a behavioural model used by the
  testbenches. It stores words sparsely, returns read data after `CL` cycles,
  and counts protocol violations: an access to a closed bank, an `ACT` to an
  open bank, or a `RD`/`WR` sooner than `T_RCD` after `ACT`.

## Where this design makes its own choices

These points are not fixed by the system this RTL follows, and were chosen
here:

- **Lightpath setup** is a fixed wait, not an acknowledgement.
- **Pre-allocation control.** Holding lightpaths between bursts follows the
  idea of allocating memory nodes to a processor in advance; the `keep_paths`
  input and its rules are this design's.
- **Write spacing** (`BURST_GAP`) replaces flow control, which the link does not
  have.
- **The return-path header** is generated by the processor node and reaches the
  memory node's network input directly. How it gets there physically is left
  open.
- **Route bit A0** is always 0.
- **Contention rule** in the switch, as described above.
- **Lane symbol layout, command word layout and address split.**
- **The memory-node FIFO, SDRAM timing values, and the absence of refresh.** A
  real node needs a refresh timer if data must outlive the SDRAM retention time.
- **Bandwidth.** A 1024-word burst occupies 1024 cycles = 4.1 µs of link time.
  32 kbit at the full 10 Gb/s would be 3.3 µs, but 2 of every 10 lane bits here
  are flags.
- **Multicast is not implemented.** The switch can be configured to copy a
  message to several outputs, but here each input drives at most one output.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ocm_pkg.sv tb/tb_ocm_system.sv --top-module tb_ocm_system -o sim
./obj_dir/sim
```

Replace `tb_ocm_system` with any of the unit testbenches:

- `tb_serdes`, `tb_link_delay`, `tb_switch_node`, `tb_banyan_net`, `tb_net_ctrl`
- `tb_mem_ctrl`, `tb_traffic_gen`, `tb_ocm_ctrl`, `tb_ocm_node`, `tb_proc_node`

`tb_ocm_system` runs the whole system at its default parameters in a few
seconds (about 140,000 cycles):
- four patterns over two bursts of both memory nodes
- a fifth pass with two bits corrupted inside the SDRAM model, which must
  produce exactly two counted bit errors
- a pass with held lightpaths over both nodes (reuse and drop on a change of
  node), and a 24-burst fill of one node on held lightpaths
- exact transaction timing
- counts showing that every mechanism occurred: write and read transactions,
  setup stalls, transactions on held lightpaths, dropped paths, read data
  flowing after the forward teardown, three-stage lightpaths, write data
  buffered in the FIFO, and error detection

`tb_ocm_workload` runs the fill-and-verify workload at the default sizes, as
far as simulation time allows. A whole node is 32768 bursts, about 70 million
cycles, so each of the four patterns instead covers three regions of four
bursts on both nodes. The regions sit where the address fields roll over:
- row 4095 into the next bank;
- the last bank of one chip pair into the first of the other;
- the last rows of the node.

The counters are cleared once, so at the end they cover all four patterns. The
test also checks that no two addresses alias onto the same SDRAM word.

Unit testbenches shrink `BURST_LEN` to 8–32 words to stay short.
