# Packet-data-transfer micronetwork and a VLIW processor built on it

A chip with many processing elements (PEs) usually joins them with a multi-bus switch
matrix. Its area grows with the square of the PE count: there are N switch boxes, and each
one multiplexes N buses. This design replaces the buses with a *micronetwork*. The
micronetwork is two bit-parallel transmission lines, one running left to right and one
right to left, with one very small router per PE. Data moves as packets that carry the
**source** address, not the destination. Each router is programmed with a *selection
address* and keeps every packet whose source address matches it. One packet can
therefore be received by several routers (broadcast), and sending needs no routing
decision.

The routers need no arbitration, buffering or flow control. Two rules make this work:

1. **Transfer happens in two modes, one after the other.** In the *PE-router* cycle every
   PE places its packet on both lines at its own router. In the following *router-router*
   cycles, every line register passes its packet to the next router. Each register has
   exactly one writer in every cycle, so packets cannot collide. A packet has reached
   every router after N cycles in total: one injection cycle plus at most N-1 shifts.
2. **Everything is scheduled statically.** The algorithm's data-flow graph is scheduled
   and allocated offline. A VLIW program then states, for each step, which PEs send,
   which source each router selects, what each PE computes, and how many cycles the
   step's transfers need. That cycle count is the longest transfer distance of the step
   plus one.

The processor is an application of this scheme to multi-operand multiply-add. It has
32 PEs with 32-bit words. Each PE has a carry-lookahead adder, a Wallace-tree multiplier,
a 256-word local memory, and its own 256-word slice of the VLIW control store.

## Files

| file | contents |
|---|---|
| `rtl/pdta_pkg.sv` | sizes, `packet_t`, `mode_e`, `pe_op_e`, control-word layout `ctrl_word_t`, `host_target_e` |
| `rtl/router_line.sv` | one line's multiplexer and pipeline registers inside a router |
| `rtl/router_rx.sv` | comparator and receive register (Register1) for one selection address |
| `rtl/router.sv` | the router: two `router_line` and two `router_rx` |
| `rtl/micronetwork.sv` | N routers chained on the two lines |
| `rtl/cla_adder.sv`, `rtl/wallace_mul.sv` | the PE's arithmetic |
| `rtl/local_memory.sv`, `rtl/control_memory.sv` | 32 x 256 memories |
| `rtl/pe.sv` | processing element |
| `rtl/vliw_sequencer.sv` | step counter, step-length memory and mode control |
| `rtl/pdta_processor.sv` | top level: the whole processor |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## The router

Each line inside a router (`router_line`) is a 2:1 multiplexer followed by a pipeline
register:

```
            mode==RR
 from router i-1 ──►┌─────┐   mux_pkt   ┌───────────────┐
                    │ MUX ├────┬──────►│ Reg3 src      ├──► to router i+1
 from PE i ────────►└─────┘    │       │ Reg2 data     │
                               │       └───────────────┘
                               ▼
              comparator (src == selection address) ──► load Register1 ──► to PE i
```

A bidirectional router has one such line for TL1 (left to right) and one for TL2 (right
to left). It also has **two** receive registers. Each has its own selection address and
enable, and each compares against the multiplexer outputs of both lines. Two receive
registers let an adder or multiplier collect both operands in one step. The data of a
packet that matches is latched into the receive register, which then holds it until the
next match. Comparison happens on the multiplexer output, in both transfer modes. So in
the PE-router cycle a router that selects its own address receives its own PE's word.

A packet also carries a `valid` bit. It lets a PE stay silent in a step, and it marks the
empty line inputs at both ends of the network.

## Timing of a transfer

Number the cycles of a transfer phase t0 (PE-router) and t1, t2, … (router-router). A
packet sent by router *s* passes router *d* in cycle t|d−s|. It is in *d*'s receive
register after the clock edge that ends that cycle, and `rx_hit` is high in the cycle
after. With four routers, all four packets have reached all routers after t3 (4 Tc). In
general an N-router network completes any exchange in N cycles.

`mode_e` has three values. `MODE_PE` and `MODE_RR` are the two transfer modes.
`MODE_IDLE` empties the line registers and disables capture. This design uses it during
the PE operation and when the processor is idle.

## Steps and the VLIW program

`vliw_sequencer` runs a step of length L (L ≥ 1) as follows:

| cycle | mode | what happens |
|---|---|---|
| 1 | `MODE_PE` | PEs with `send` set inject their result |
| 2 … L | `MODE_RR` | packets shift; receive registers capture matches |
| L+1 | `MODE_IDLE`, `exec` | every PE executes its operation |

A step therefore takes L+1 cycles. A step length of 0 ends the program: that step's first
cycle is idle, and `done` pulses at its end. The program also ends after step 255.

The VLIW word of a step is split across memories:

* The step length (8 bits) is in the sequencer's step-length memory.
* Each PE/router module's fields are in that module's `control_memory`, at the step's
  address. The layout is `ctrl_word_t`:

| bits | field | meaning |
|---|---|---|
| 2:0 | `op` | `OP_NOP`, `OP_MUL` (rx0·rx1), `OP_ADD` (rx0+rx1), `OP_LOAD` (result ← mem[maddr]), `OP_STORE` (mem[maddr] ← rx0) |
| 3 | `send` | offer the PE's result as a packet in this step's PE-router cycle |
| 8:4 | `sel0` | selection address of receive register 0 |
| 9 | `sel0_en` | receive register 0 listens this step |
| 14:10 | `sel1` | selection address of receive register 1 |
| 15 | `sel1_en` | receive register 1 listens this step |
| 23:16 | `maddr` | local-memory address |
| 31:24 | reserved | |

PE *i* (counting from 0) has source address *i*. The PE's result is the latest MUL, ADD or
LOAD result. A LOAD result is sent directly from the memory's read register. Products are
truncated to 32 bits.

### Example: o = a·b + c·d on six PEs

PE1 and PE3 multiply, PE5 adds, and PE2, PE4 and PE6 are memory PEs. Numbering is from 1
here, so PE*k* has address *k*−1.

| step | length | transfers | PE operations |
|---|---|---|---|
| 0 | 1 | none | PE2 loads a, PE4 loads c |
| 1 | 2 | a: PE2→PE1 (reg0), c: PE4→PE3 (reg0) | PE2 loads b, PE4 loads d |
| 2 | 2 | b: PE2→PE1 (reg1), d: PE4→PE3 (reg1) | PE1 e=a·b, PE3 f=c·d |
| 3 | 5 | e: PE1→PE5 (reg0), f: PE3→PE5 (reg1) | PE5 o=e+f |
| 4 | 2 | o: PE5→PE6 | PE6 stores o |
| 5 | 0 | end | |

The lengths are each step's farthest distance plus one: 1+1, 1+1, 4+1, 1+1. The run takes
19 cycles from `start` to `done`. `tb_pdta_processor` runs this program.

## Top-level interface (`pdta_processor`)

* `start`, `busy`, `done`: run the program from step 0. `done` is a one-cycle pulse.
* Host port, honoured only while `busy` is low:
  * `host_target` picks a PE's local memory, a PE's control memory, or the step-length
    memory (`HOST_LOCAL`, `HOST_CTRL`, `HOST_STEP`).
  * `host_pe` picks the PE and `host_addr` the word.
  * `host_we` writes `host_wdata`.
  * `host_re` reads a local-memory word, which appears on `host_rdata` one cycle later.
  * A host read replaces a PE's memory read register. A LOAD result therefore does not
    survive a host read of the same PE.
* Reset (`rst_n`, asynchronous, active low) clears all registers except the memories.

## How far to trust it, and where it is this design's own

These parts follow the architecture as described:

* the two-line network;
* the two transfer modes and their cycle timing;
* matching on the source address, including broadcast;
* the router's multiplexer, pipeline registers, comparator and receive register;
* the PE's adder, multiplier and local memory;
* the 32-bit word, the 32 × 256 memories, and 32 PEs with 5-bit addresses;
* a VLIW word holding per-router selection addresses and the cycle count of each step.

These are this design's own choices:

* **Two receive registers per router**, each with an enable. The architecture's VLIW
  format lists one selection address per router. Its own multiply-add schedule, however,
  delivers two operands to the adder in the same step, so this design gives each router
  two.
* The `valid` bit and `MODE_IDLE`.
* The step as L transfer cycles plus one operation cycle.
* The operation set and its encoding, the `send` bit, and the control-word layout.
* Keeping the step length in its own memory, and length 0 as the end marker.
* Truncating products to one word.
* The adder's group sizes and the multiplier's reduction order. Only their types are
  given.
* The host port, and the asynchronous control-memory read.
* Addresses count from 0.

Not built:

* **The hierarchical micronetwork.** Basic networks would be used as macro modules in a
  tree, joined by PEs that park waiting packets in local memory. This is described only
  as an extension, without saying how a bridging PE is attached or controlled.
* The multi-bus baseline, which serves only as a comparison.
* Larger chips. The address field is 5 bits wide (`ADDR_W` in `pdta_pkg`), so `N_PE` can
  be lowered but not raised above 32 without widening it and the control word. Step
  lengths are limited to 255 cycles.

## Verification

Every module has a self-checking testbench that prints
`TB_RESULT checks=<n> failures=<n>`. Each testbench also has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_cla_adder`, `tb_wallace_mul` | corner cases and thousands of random operands against the simulator's `+` and `*` |
| `tb_local_memory`, `tb_control_memory` | all words; read-before-write; read-port timing |
| `tb_router` | directed cases, then 3000 random cycles against a cycle model of the router |
| `tb_micronetwork` | 21 random all-to-all rounds on 32 routers, with data and arrival cycle t\|d−s\| checked for every receive register (including distance 31 and broadcasts); the 4-router two-broadcast example, cycle by cycle |
| `tb_pe` | MUL, ADD, LOAD, STORE, NOP, the send bit and host access |
| `tb_vliw_sequencer` | mode, exec and pc in every cycle; the end marker; total cycles |
| `tb_pdta_processor` | the full default-size processor: the multiply-add program (result and 19 cycles), a worst-case exchange in which every PE sends and every router receives over up to 31 hops plus a broadcast source, a self-receive step, and an empty program; it counts each mechanism and fails if one never occurs |
| `tb_multiply_add_tree` | the sum of 32 products on all 32 PEs: each PE multiplies its own pair, then a five-level adder tree (transfer lengths 2, 3, 5, 9, 17) gathers the sum in PE 0; it checks every partial sum, the total and the cycle count (51) |

To simulate with Verilator, for example the whole processor:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/pdta_pkg.sv tb/tb_pdta_processor.sv --top-module tb_pdta_processor -o sim
./obj_dir/sim
```

The other testbenches run the same way. The top-level run at full size finishes in
seconds.
