# FEVCBI: frequent-value and bus-invert coding for a shared on-chip data bus

On a multi-core chip, a large share of the dynamic energy goes into charging
and discharging the long wires of the shared data bus, and that energy grows
with the number of lines that toggle from one transfer to the next. FEVCBI
(Frequent Exchange Value Cache + Bus Invert) reduces the toggles with two
simple codes used together:

* **Frequent values go as an index.** A few 32-bit values (0, 1, all-ones, ...)
  make up much of the traffic between caches. Every node on the bus keeps
  the same small table of them, the FEVC. When the word to send is in the
  table, only its 2-bit index is sent and an extra indicator line, `fvEN`,
  is raised. The receiver reads the value back out of its own FEVC.
* **Everything else goes bus-invert coded.** If more than half of the 32 data
  lines would toggle, the inverted word is sent instead and a second extra
  line, `inv`, is raised. At most 16 data lines then toggle for any word.

This repository holds synthesizable SystemVerilog for the coded bus of a
four-core chip: a node per core's L1 pair and one for the shared L2, five
nodes in all, on one bus of 32+2 lines.

## How one word is coded

The bus has 34 physical lines (`fevcbi_pkg::bus_lines_t`):

| line       | meaning                                               |
|------------|-------------------------------------------------------|
| `data[31:0]` | the word, its complement, or an FEVC index in `[1:0]` |
| `fv_en`    | 1: the data lines carry an FEVC index                 |
| `inv`      | 1: the data lines carry the complement of the word    |

The sender codes each word against the lines as they stand now, `prev`:

1. **FEVC hit** (the word equals a loaded entry `k`):
   `fv_en = 1`, `data[1:0] = k`, and `data[31:2]` and `inv` keep their present
   values. At most the two index lines and `fv_en` toggle.
2. **Miss:** `fv_en = 0`. Let `h` be the number of lines where the word and
   `prev.data` differ. If `h > 16`, drive `~word` and `inv = 1`; otherwise
   drive `word` and `inv = 0`. Because the comparison is made with the lines
   themselves, a previously inverted word is already accounted for.

The receiver reverses it: with `fv_en = 1` it reads FEVC entry `data[1:0]`,
otherwise it takes `data`, complemented when `inv = 1`.

Some choices here are this design's and not part of the scheme as it was
proposed. Where the index sits on the lines, holding the other lines during an
index transfer, and not inverting index transfers are all such choices. So
are the threshold `h > 16` rather than `h >= 16` (the rule is "more than half
the word width") and leaving `inv` itself out of the count.

The scheme also assumes that all FEVCs hold **identical contents that never
change while a program runs**. The tables are loaded through a broadcast
write port (`cfg_we`, `cfg_idx`, `cfg_value`) before any traffic. Writing an
entry while words are in flight would let a receiver decode an index with a
different value than the sender meant. Nothing stops this in hardware; the
system around the bus has to avoid it.

## The FEVC (`fevc`)

Four 32-bit registers FEV0..FEV3, each with a valid bit. The search port has
one equality comparator per entry. An encoder turns the match lines into
`search_idx`, and `search_hit` is their OR. An entry matches only when it is
valid; when two entries hold the same value, the lower index wins. The read
port is a decoder and a multiplexer (`rd_idx` to `rd_value`). Both ports are
combinational. Each node has one FEVC: its encoder uses the search port and
its decoder uses the read port, so n cores need n+1 FEVCs.

## Pipelining and timing

Each node's coder is pipelined so that a block costs only one extra cycle at
each end. While word k is on the bus, word k+1 is being looked up.

| cycle | sender (`fevcbi_encoder`)          | bus register | receiver (`fevcbi_decoder`) |
|-------|------------------------------------|--------------|-----------------------------|
| t     | word accepted, FEVC searched       |              |                             |
| t+1   | lookup registered, coded vs lines  | ← driven     |                             |
| t+2   |                                    | word on lines | FEVC read / un-invert      |
| t+3   |                                    |              | word on `rx_*`              |

So a word accepted at cycle t shows up at the receiver at t+3. A 16-word block
(one 64-byte cache line) takes 18 cycles from its first accepted word to its
last delivered word. The next block can follow with no idle cycle, even when
it comes from a different node.

## Sharing the bus (`bus_arbiter`, `fevcbi_bus_system`)

The nodes use the bus in turn. `bus_arbiter` grants the bus round robin, one
whole block per grant. A free bus is granted in the same cycle the request
appears. The grant is held until the owner's word marked `tx_last` is
accepted, and then the round-robin pointer moves past the owner. The sender's
`tx_ready` is its grant. It may drop `tx_valid` for a cycle inside a block; the
bus then idles without losing its owner.

The bus lines are modelled as one register, `bus_lines`. It is loaded from
whichever node offers a coded word. At most one node can offer one in a given
cycle, and an assertion checks this. When no node drives, the register keeps
its value, so an idle bus does not toggle. The source, destination, last-flag
and valid bits are a registered sideband next to the 34 lines. They stand in
for the address and control bus, which the scheme does not cover, and they
are not coded.

Node numbering in the top: nodes 0-3 are the cores' L1 caches, node 4 is the
L2. Any node may send to any other: L1 to L2, L2 to L1, or L1 to L1.

## Top-level interface (`fevcbi_bus_system`)

Parameters: `NODES_P = 5`, `N = 4` FEVC entries, `IDX_W = $clog2(N)`, and
`DST_W = $clog2(NODES_P)`.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `cfg_we`, `cfg_idx`, `cfg_value` | in | 1, IDX_W, 32 | write one FEVC entry in every node |
| `tx_valid[i]`, `tx_ready[i]` | in/out | 1 | send handshake of node i |
| `tx_data[i]`, `tx_last[i]`, `tx_dst[i]` | in | 32, 1, DST_W | word, end of block, receiving node |
| `rx_valid[i]`, `rx_data[i]`, `rx_last[i]`, `rx_src[i]` | out | 1, 32, 1, DST_W | received word and its sender |
| `bus_lines`, `bus_valid` | out | 34, 1 | the physical lines, for measuring activity |

Receivers cannot push back: a node's cache must take every word it is sent.

## What lies outside this RTL

The rest of the chip is not included: the MIPS-II cores, the 32 KB 4-way
write-through IL1/DL1 caches, the 1 MB 16-way write-back inclusive L2 with its
banks, the off-chip bus and main memory. Only their configuration is known, not
their design. They would attach at the `tx_*`/`rx_*` ports; the testbenches
stand in for them with random block traffic.

## Module map

| file | contents |
|------|----------|
| `rtl/fevcbi_pkg.sv` | constants (32-bit words, 4 entries, 5 nodes, 16-word blocks), `bus_lines_t`, `popcount` |
| `rtl/fevc.sv` | frequent exchange value cache |
| `rtl/bus_invert_encoder.sv` | Hamming distance and invert decision |
| `rtl/fevcbi_encoder.sv` | sender pipeline: lookup register, index-or-BI coding |
| `rtl/fevcbi_decoder.sv` | receiver: FEVC read or un-invert, output register |
| `rtl/fevcbi_node.sv` | one FEVC + encoder + decoder |
| `rtl/bus_arbiter.sv` | block round-robin arbiter |
| `rtl/fevcbi_bus_system.sv` | top: five nodes, arbiter, bus register |

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module against values the testbench works out itself and has a watchdog.

* `tb_fevc`: loading, hits, misses one bit away, unloaded entries,
  duplicate entries and reads.
* `tb_bus_invert_encoder`: 2000 random pairs plus the 16/17 boundary. Never
  more than 16 data lines toggle.
* `tb_fevcbi_encoder`, `tb_fevcbi_decoder`: the coding rules and the one-cycle
  latency of each half.
* `tb_fevcbi_node`: loop-back through one node, with a 3-cycle word latency.
* `tb_bus_arbiter`: a reference model of the grant sequence.
* `tb_fevcbi_bus_system`: end-to-end test at the default sizes. All five nodes
  send random 16-word blocks. It checks data, order, sender, per-word latency
  (3 cycles), block latency (18 cycles), the toggle bounds, and that idle lines
  hold. It also checks that each mechanism occurs at least once: index transfers,
  inverted and plain words, contention, hand-over between senders, bubbles
  inside a block, and L1-L2, L2-L1 and L1-L1 blocks. In a typical run the
  coded bus toggles about half as many lines as an uncoded one carrying the same
  words. That traffic is biased on purpose, so the figure says nothing about
  real programs.
* `tb_fevcbi_workload` runs a 4-entry and an 8-entry system side by side on the
  same synthetic stream of 400 blocks. About half of the words come from eight
  frequent values with falling weights. Both systems must deliver every word
  intact. The testbench prints an energy estimate:
  `phi = 1 - E_X/E_O`, where line energy is 11.6 pJ per line toggle and FEVC
  energy is 18.6 pJ per access. It counts one search per word sent and one
  read per index received. This stream gives about 15% for 4 entries and 19%
  for 8. These are properties of a synthetic stream, not a benchmark result.

None of the benchmark programs the scheme was evaluated with can run here,
because the cores and caches are not part of this RTL.

## Simulating

With Verilator 5 (two-state, so everything that is read is reset or
initialised):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fevcbi_pkg.sv tb/tb_fevcbi_bus_system.sv --top-module tb_fevcbi_bus_system
./obj_dir/Vtb_fevcbi_bus_system
```

Substitute any other testbench name. Each one prints
`TB_RESULT checks=N failures=M`. For lint, run
`verilator --lint-only -Wall -Irtl rtl/fevcbi_pkg.sv rtl/<module>.sv`.
Verilator warns about `rst_n`, which is used both as an asynchronous reset and
in the assertions' `disable iff`. That warning is expected.

To change the FEVC size, set `N` on `fevcbi_bus_system` (for example `N = 8`).
`IDX_W` follows, and the index then takes data lines `[IDX_W-1:0]`. The number
of nodes is `NODES_P`. The word width is fixed at 32 by `fevcbi_pkg::WORD_W`.
