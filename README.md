# StreamWorks: a dataflow co-processor for stream programs

Stream programs are graphs of small kernels connected by FIFOs. Examples are
filters, transforms and codecs written in StreamIt style. A conventional core
runs each kernel as a loop. For every operation of every iteration it fetches,
decodes and retires an instruction again, and that instruction delivery costs
more energy than the arithmetic itself. StreamWorks removes it. Each kernel is
mapped onto a **StreamEngine (SE)**. The kernel's instructions are written once
into the engine's **reservation stations (RS)** and stay there for the whole
run. Every RS fires whenever its operands for the next loop iteration have
arrived. Loop iterations become **contexts**: an RS holds its current context
number, fires once per context and then moves to the next. Many iterations are
in flight at once, and their order is kept by context numbers instead of a
reorder buffer.

Kernels on different engines exchange data through **channels**. Each SE has
an input memory that other engines write with packets over a small network.
Flow control is by credits. Eight engines and a 9-port router form a
**StreamCluster**. The top level joins clusters and has one external stream
port.

This repository holds synthesizable SystemVerilog (IEEE 1800-2017) for the
whole dataplane. That is the engines, the cluster, the fabric and the
configuration path, with self-checking testbenches for every block. Only the
control-plane processor that writes the configuration is outside. The
arithmetic is 32-bit integer.

## The engine at a glance

```
            cfg (from the control-plane processor)
              |
   +----------v-----------------------------------------------------------+
   |  SIG x4 --+                                                          |
   |           |   TDN: 13 token slots, broadcast to every operand        |
   |  stream RSB x2 (4 RS) --> input channel (2 kB, 2 read ports) --+     |
   |  ALU RSB  x3 (8 RS)  --> ALU  (4-stage) --------------------+  |     |
   |  MUL RSB  x2 (4 RS)  --> MUL  (4-stage, accumulator) ----+  |  |     |
   |  LD/ST RSB x2 (4 RS) --> scratchpad (2 kB, 2 ports) --+  |  |  |     |
   |           ^   results return as tokens on the TDN     |  |  |  |     |
   |           +-------------------------------------------+--+--+--+     |
   |  dataflow monitor (stall requests -> producer stalls)                |
   |  push unit (8 entries) --> packets out    credit RSB (4) <-- reads   |
   +----------------------------------------------------------------------+
```

| Parameter (`rtl/sw_pkg.sv`) | Value | Meaning |
|---|---|---|
| `DATA_W` | 32 | datapath width |
| `N_ALU`, `RS_ALU` | 3, 8 | ALUs, RSs per ALU bank |
| `N_MUL`, `RS_MUL` | 2, 4 | multipliers, RSs per MUL bank |
| `N_STR`, `RS_STR` | 2, 4 | channel read ports (stream banks), RSs each |
| `N_LDST`, `RS_LDST` | 2, 4 | scratchpad ports (LD/ST banks), RSs each |
| `N_RS` | 48 | RSs per engine |
| `NBUF` | 5 | operand buffers per operand |
| `FU_DEPTH` | 4 | ALU / multiplier pipeline depth |
| `N_SIG` | 4 | stream index generators |
| `CH_WORDS`, `SPM_WORDS` | 512, 512 | input channel and scratchpad (2 kB each) |
| `N_PUSH`, `PUSH_Q`, `N_CREDIT` | 8, 8, 4 | push entries, reorder window, credit entries |
| `SE_PER_CLUSTER` | 8 | engines per cluster |
| `TAG_W`, `CTX_W` | 6, 8 | instruction tag and context widths |

The first twelve numbers are the engine configuration of the published
StreamWorks architecture. The widths and the communication-unit sizes are
choices made here.

## Tokens, tags and contexts

Every value moving inside an engine is a **token** with four fields: valid,
tag, context and data. The *tag* names the instruction that produced the
value. The *context* is the loop iteration it belongs to. Producers drive
tokens onto the **tag distribution network (TDN)**. The TDN has 13 slots, one
per token source:

| Slot | Source |
|---|---|
| 0-3 | SIGs |
| 4-5 | channel read ports |
| 6-8 | ALUs |
| 9-10 | multipliers |
| 11-12 | scratchpad load ports |

Every operand of every RS has a static slot select, so an operand listens to
one slot and the TDN is simply a mux per operand (`rtl/tdn.sv`). An operand
takes a token when the token's tag equals the tag it waits for.

An RS (`rtl/reservation_station.sv`) holds one configured instruction. That
is the opcode, its own tag, up to three operands (A, B and a control
operand), an immediate that replaces B when B is unused, and a path bit. Each
operand (`rtl/rs_operand.sv`) has a main register for the RS's current
context and five buffers. A token for the current context goes to the main
register. A token for a later context waits in a free buffer together with its
context. When the RS advances, the main register is refilled from the buffer
holding the new context, in the same cycle. Early operands therefore never
block the producer, and an RS fed by a fast and a slow producer stays in
step.

An RS requests issue when all its enabled operands are present for its
context. The bank's round-robin arbiter (`rtl/rs_bank.sv`) grants one RS per
cycle, and the RS sends opcode, tag, context and operands to its unit. Each
unit returns the result as a token on its TDN slot. The ALU and multiplier
return it `FU_DEPTH` = 4 cycles after issue; channel reads, scratchpad loads
and SIG indices return it one cycle after. All tokens are registered, so no
combinational path runs from one RS to another.

## Back pressure: the dataflow monitor

Contexts let producers run ahead. A producer that runs too far ahead would
overflow its consumers' operand buffers. Every operand therefore raises a
**stall request** when its free buffers fall to `FU_DEPTH`, which is as many
tokens as can still be in the producer's pipeline. The request carries the
producer tag it waits for and the consumer's context. The **dataflow monitor**
(`rtl/dfm.sv`) collects all 152 requests: 144 from the RSs and 8 from the push
unit. It stalls a producer when some request names its tag **and the
producer's context is later than the requester's**.

The context rule matters at the join of branch paths. Several RSs there
carry the same tag, and only the one on the consumer's current context may
go on. Stalling by tag alone would deadlock such a join. Contexts are
compared modulo 256 (`ctx_gt` in `rtl/sw_pkg.sv`), so the 8-bit counters may
wrap. The three requests of one RS share its context, so the monitor compares
contexts once per RS and producer instead of once per operand. This keeps it
small; see the comment in `rtl/dfm.sv`.

A stalled RS does not issue. A stalled SIG does not emit. Idling on an untaken
path (next section) is never stalled, because it produces nothing. If a token
ever finds no free buffer, the RS raises `drop`; with the threshold above
that cannot happen, and the engine, cluster and system tests check it.

## Predication: paths, idling and BR_SKIP

Branches are evaluated as data. A branch opcode (BEQ, BNE, BGE, BLT and the
compare-with-zero forms) makes the ALU produce 0 or 1 as a normal token. An
instruction inside an if/else gets that token as its **control operand** and
has a **path** bit. When the control value equals the path, the RS issues
normally. Otherwise it **idles**: it clears its operands, advances its context
and issues nothing. Every instruction thus passes every context exactly once,
and the contexts stay aligned across both paths.

Nested conditionals need one more step. An inner branch on the untaken path
of an outer branch must still give its own dependents a control token, or
they could never advance. Such a branch RS therefore issues the opcode
**BR_SKIP** instead of idling. The ALU turns BR_SKIP into the value 3 (binary
11), which matches neither path, so everything under the inner branch idles
for that context.

The end-to-end test runs this kernel:

```
out = a > b ? a : (a == b ? a + b : b)
```

It uses `bge`, then `beq` predicated on it, and three tag-7 instructions
(two moves and an add) on different paths, all joined by the push unit.

## Stream index generators

A **SIG** (`rtl/sig.sv`) replaces a loop counter. It is configured with base,
stride, length and offset. It emits base, base+stride, and so on while the
index stays ≤ length. Then base and length both grow by offset, and it starts
again from the new base. Offset 0 repeats the same window (a circular buffer).
A non-zero offset walks through a 2-D block. The SIG emits one index per
cycle, each with the next context, unless the monitor stalls it. Channel
reads, loads and stores take their addresses from SIG tokens.

## Streams between engines

**Input channel** (`rtl/input_channel.sv`). This is 512 words with one valid
bit per word. Packets from the fabric write words and set their valid bits.
Stream RSs read with **RD** (the word stays valid) or **RMV** (the read
clears the valid bit, which frees the word). A stream RS requests issue only
when its word is valid: the bank looks each RS's address up in the valid bits
before arbitration. The read token returns one cycle after issue. A write
wins over an RMV of the same word in the same cycle.

**Push unit** (`rtl/push_unit.sv`). Each of the 8 entries watches one TDN slot
for one tag and one range of iterations, `[iter_lo, iter_hi]`. It sends each
value as a DATA packet to word `index` of a consumer SE's channel. `index`
then advances by `stride` and wraps from `ch_end` to `ch_start`. Several
entries with the same tag and disjoint iteration ranges split a stream, and
entries on several engines writing disjoint ranges of one channel join
streams. One hardware channel can hold several software FIFOs this way.

The producers of a tag may finish iterations out of order, for example a
move on one path and an add on the other, sharing a bank. Each entry
therefore keeps a reorder window of `PUSH_Q` values indexed by context and
always sends its next iteration first. It asks the monitor to stall producers
of its tag beyond the window.

**Credits** (`rtl/credit_rsb.sv`). A push entry spends one credit each time
its index wraps, that is once per filled range, and does not push with zero
credits. On the consumer side, a credit entry counts reads inside an address
range. After `max_cnt` reads it sends a CREDIT packet back to the producer
SE, carrying the range start and the producer's tag. The push entry that
matches tag, source SE and range takes it. With one credit and a 16-word
range, the producer can be at most one range ahead of the consumer.

## Cluster, fabric and configuration

`rtl/stream_cluster.sv` holds eight engines and a 9-port `rtl/router.sv`, so
any engine reaches any other in one hop. Port 8 leads to the level above.
SE numbers are `{cluster, se[2:0]}`. `rtl/streamworks.sv` joins `N_CLUSTERS`
clusters (default 1) with a router of `N_CLUSTERS+1` ports. The extra port is
the external stream port: packets from outside enter there, and packets for an
SE number beyond the last cluster leave there. Each router output has a
two-place FIFO and a round-robin arbiter. A packet moves one router per
cycle, and each output passes one packet per cycle. Input readiness depends
only on registered state, so routers can be chained in any shape without
combinational loops.

The packet format (`pkt_t`) is kind (DATA or CREDIT), destination SE, source
SE, 9-bit channel address and 32-bit data. For a CREDIT packet, the address
is the range start and the data is the tag.

The control-plane processor writes `cfg` words (`cfg_t`). Each word names an
SE, a kind (RS, SIG, PUSH, CREDIT, SPM, CHAN, CTRL), an index, a bank bit and
128 data bits holding the matching configuration struct from `sw_pkg`. The
kinds do the following:

- **RS writes** fill one of two configuration banks of an RS.
- **CTRL** sets `run` and `active`, and can pulse `clear`.
  - `active` chooses which bank the RSs execute. This is the **shadow RS**:
    the next kernel is loaded while the current one runs, then started by one
    CTRL write that flips `active` and clears all contexts.
  - `clear` restarts the SIGs, RS contexts, push windows and credit counters.
- **SPM and CHAN writes** preload memory words.
- The host reads any scratchpad through `host_rd_se`/`host_raddr`, with the
  data one cycle later.

`tb/sw_tb_pkg.sv` has functions that build every configuration word (`rs`,
`w_rs`, `w_sig`, `w_push`, `w_credit`, `w_mem`, `w_ctrl`). The testbenches
are the best examples of how to program the machine.

## Where this design departs from the architecture

- **Integer only.** The original SE is a single-precision floating-point
  core. Here the ALU and multiplier are 32-bit integer. The floating-point
  benchmarks (filters, FFT, DCT, autocorrelation) therefore cannot run as
  they are, while integer kernels such as CRC or motion-vector decoding can.
- **Cluster-shared scratchpads are not built.** In the original architecture
  every SE of a cluster can address the scratchpads of the others. Here each
  scratchpad belongs to its SE, and engines share data only through channels.
- **Own choices where the architecture is silent.** These are:
  - the stall threshold, which is free buffers ≤ pipeline depth;
  - the TDN slot order;
  - bank arbitration and router arbitration, both round-robin;
  - the packet and configuration formats;
  - the push unit's reorder window;
  - host-write priority on scratchpad port 0 and on the channel write port.
- **Split/join by iteration range only.** A push entry selects a contiguous
  range of iterations. Patterns such as "every fourth iteration" need one
  entry per iteration or a restructured kernel.
- **Memories are written as arrays**, not SRAM macros.

## Measured behaviour

- **One engine, difference-of-squares kernel** (`tb_stream_engine`).
  - Two SIGs drive two channel reads, then an add, a subtract, a multiply and
    a masked store.
  - 64 iterations complete in 124 cycles, which is 2.13 compute instructions
    per cycle.
  - The first store comes 157 cycles after start, most of which is
    configuration writes.
- **Full system at default size** (`tb_streamworks`).
  - Two kernels run as a pipeline: the nested conditional on SE0, then
    square-store-push on SE1, fed and drained through the external port with
    credits in both directions.
  - After 96 results, SE1 switches to its shadow configuration (multiply by
    3), and 48 more results follow.
  - All 144 results and 16 scratchpad words are checked in 884 cycles.
  - Every mechanism occurs and is counted: firing, idling, BR_SKIP,
    contention, RS and SIG stalls, push, index wrap, credit stall, credits
    sent and received, and the kernel switch. No token is dropped.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops through a
watchdog if it hangs. With Verilator 5, list the package first:

```
verilator --binary --timing -Wno-fatal -Mdir obj \
  rtl/sw_pkg.sv $(ls rtl/*.sv | grep -v sw_pkg) tb/sw_tb_pkg.sv \
  tb/tb_streamworks.sv --top-module tb_streamworks
obj/Vtb_streamworks
```

Replace the last testbench and top name for any other test:

| Testbench | What it covers |
|---|---|
| `tb_alu` | ALU ops and latency |
| `tb_mul` | multiplier ops and latency |
| `tb_sig` | index generator |
| `tb_dfm` | dataflow monitor |
| `tb_tdn` | token distribution network |
| `tb_router` | cluster router |
| `tb_input_channel` | input channel |
| `tb_credit_rsb` | credit returns |
| `tb_push_unit` | push unit |
| `tb_spm` | scratchpad |
| `tb_reservation_station` | one RS |
| `tb_rs_bank` | RS bank and arbitration |
| `tb_stream_engine` | one engine |
| `tb_stream_cluster` | one cluster |
| `tb_streamworks` | whole system, end to end |

The full system compiles in about three minutes and simulates in about one
second.

## Files

| File | Contents |
|---|---|
| `rtl/sw_pkg.sv` | sizes, opcodes, token, configuration and packet types |
| `rtl/streamworks.sv` | top: clusters, cluster-level router, external port |
| `rtl/stream_cluster.sv` | eight engines and the 9-port router |
| `rtl/router.sv` | N-port router |
| `rtl/stream_engine.sv` | one engine: configuration decode and wiring |
| `rtl/rs_bank.sv` | RSs sharing one unit; round-robin issue |
| `rtl/reservation_station.sv` | one RS with two configuration banks |
| `rtl/rs_operand.sv` | one operand with its context buffers |
| `rtl/tdn.sv` | token distribution network |
| `rtl/dfm.sv` | dataflow monitor |
| `rtl/alu.sv` | integer ALU |
| `rtl/mul.sv` | integer multiplier with accumulator |
| `rtl/sig.sv` | stream index generator |
| `rtl/input_channel.sv` | input channel |
| `rtl/credit_rsb.sv` | credit entries |
| `rtl/push_unit.sv` | push entries |
| `rtl/spm.sv` | scratchpad |
| `tb/sw_tb_pkg.sv` | configuration helpers for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per block |
