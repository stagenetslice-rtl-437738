# StageNetSlice array in SystemVerilog

A conventional in-order pipeline is wired stage to stage. If one stage breaks for good, the whole core is lost, even though its other three stages still work. The StageNetSlice (SNS) idea removes those fixed wires. Every stage of every core talks to the next stage through a crossbar switch. A core is then just a *route* through four stage columns. When a stage fails, its core is re-routed to borrow a working stage of the same type from a neighbour.

This repository holds synthesizable RTL for such an array: five slices of four stages each (fetch, decode, issue, execute/memory) and five 5×5 crossbars with 64-bit channels. A configuration table decides which physical stage serves each slice. It runs real programs end to end. The test checks every program against an instruction-set model.

Removing the fixed wires costs something. Three parts of the design exist only to pay for it:

* **Stream ids** replace the global flush signal.
* **A scoreboard plus a small bypass cache** replace the forwarding wires.
* **Macro-ops** amortise the multi-cycle crossbar transfer over several instructions.

Each one is described below.

## The array and its five crossbars

```
        FD             DI             IE
 fetch ───▶ decode ───▶ issue ───▶ exmem
   ▲                      ▲          │
   │          EF          │   EI     │
   └──────────────────────┴──────────┘
      (branch feedback)  (register writeback)
```

`sns_stagenet` instantiates `N_SLICE` of each stage (`sns_fetch`, `sns_decode`, `sns_issue`, `sns_exmem`) and five `sns_xbar` switches:

| Crossbar | Direction | Carries |
|---|---|---|
| FD | fetch → decode | instructions |
| DI | decode → issue | macro-ops |
| IE | issue → exmem | macro-ops with operand values |
| EF | exmem → fetch | branch outcomes and redirects |
| EI | exmem → issue | register writebacks |

Nothing else connects the stages. There is no stall wire and no flush wire.

Physical stage *p* owns memory port *p*: the instruction port for fetch *p* and the data port for exmem *p*. The caches sit outside this RTL, behind those ports.

### Configuration

`sns_config_manager` holds `phys[slice][stage]`, the physical unit serving each stage of each logical slice, plus an *active* bit per slice. From this table it works out the select of every crossbar output:

* The decode used by slice *s* listens to the fetch of slice *s*.
* Issue listens to decode.
* Exmem listens to issue.
* Fetch listens to exmem (branch feedback).
* Issue also listens to exmem (writeback).

After reset the table is the identity map and every slice is inactive.

The table is written one entry at a time through the `cfg_*` port. The expected flow is:

1. Reset.
2. Program the routing.
3. Set the slice's active bit. Fetch starts once it is set.

Change an entry only while the stages it touches are drained (for example, halted). A change while a multi-flit message is crossing a switch would split that message. `cfg_conflict` is raised when two active slices claim the same physical stage. Time-sharing one stage between two slices is not supported.

The end-to-end test runs a typical repaired configuration:

* Slices 0–2 use their own stages.
* Slice 3 uses decode 4, as if its own decode had failed.
* Slice 4 is switched off and lends that decode.

## Links: flits and double buffering

A crossbar channel is `CH_W` = 64 bits wide. Messages are wider than that, so each stage input and output is a link:

* `sns_link_tx` cuts a message into flits. It sends the most significant flit first and marks the last one.
* `sns_link_rx` reassembles the flits.

Each link holds two messages. A stage can therefore finish its next job while the previous result is still being sent, and a full receiver stops the switch, which stops the sender. That back-pressure chain is the only stall mechanism in the design.

The sender chooses how many flits to send. Macro-ops use a compact wire format (`mop_pack` / `mop_unpack` in `sns_pkg`), sent in this order:

1. the fixed fields;
2. the live-in values that actually travel, packed together;
3. the operations that exist.

Nothing after that is sent, and the receiver fills the missing bits with zeros. Decode sends no values, since none have been read yet. Issue sends only the values it read from the register file. An operand left to the bypass cache costs no wire bits, which is the point of selective operand fetch.

Message sizes at the default parameters:

| Message | Bits | 64-bit flits |
|---|---|---|
| instruction (fetch → decode) | 82 | 2 |
| macro-op, decode → issue | 141 + 35 per operation | 3 to 7 |
| macro-op, issue → exmem | the same + 32 per register-file value | 3 to 9 |
| writeback | 173 | 3 |
| branch outcome | 52 | 1 |

Each crossbar output is a register, so every hop costs one cycle per flit on top of this.

## Stream ids instead of a flush wire

Every stage keeps a one-bit stream id (`sid`), and every instruction and macro-op carries the id it was fetched under. One bit is enough: the pipeline is in order, so only one resolved mispredict can be pending at a time.

**Execute/memory** resolves branches. On a mispredict it toggles its own `sid` and sends two messages:

* the redirect to fetch, over EF;
* a writeback carrying the new id to issue, over EI. This is sent even when the branch has no register results.

From then on, exmem squashes any macro-op that still carries the old id.

**Fetch** toggles its `sid` when the redirect arrives and restarts at the correct pc. Later instructions carry the new id.

**Decode** copies the id of each arriving instruction. When the id changes, it drops its instruction buffer and the macro-op being packed. The arriving instruction is kept.

**Issue** keeps two bits: `sid`, taken from the last writeback, and `last_sid`, taken from the last issued macro-op. For a macro-op carrying id *m*:

| Condition | Action |
|---|---|
| *m* = `last_sid` = `sid` | normal path: issue when operands allow |
| *m* = `last_sid` ≠ `sid` | the branch has written back a new stream: squash |
| *m* ≠ `last_sid` | first macro-op of a new stream: wait until `sid` = *m*, wipe the scoreboard for one cycle, then issue |

The wait matters. The corrected path may arrive before the mispredicted branch's writeback. It must not issue against scoreboard entries made by the wrong path.

## Scoreboard and bypass cache instead of forwarding wires

Results reach issue's register file only after a trip through exmem's output link, the EI crossbar and issue's input link. A consumer that waited for that trip would stall for many cycles. To avoid this, exmem keeps a **bypass cache** (`sns_bypass_cache`):

* It stores (register, value) pairs from the `BYP_DEPTH` = 6 most recent destinations.
* Replacement is FIFO.
* Lookup is associative and returns the newest match.

Issue therefore needs to know whether a pending value is guaranteed to still be in that cache. `sns_scoreboard` keeps, for each register, a valid bit and the **write id** of its last pending writer.

* Write ids count destinations, not macro-ops. A macro-op with three live-outs takes three consecutive ids. This keeps the distance rule correct for multi-destination macro-ops.
* If `next_wid − wid ≤ BYP_DEPTH`, the value is among the newest `BYP_DEPTH` cache entries when the consumer executes. The operand is marked "from bypass" in the macro-op (`li_byp`) and the macro-op issues at once.
* If the distance is greater, issue stalls until the writeback arrives. The value then comes from the register file.

Writebacks clear a register's pending bit only if the write id still matches. An older writeback cannot un-pend a newer writer.

## Macro-ops

Each crossbar hop costs several flits, so sending one instruction at a time would leave the execute stage idle. Decode's **packer** (`sns_packer`) groups consecutive instructions into a macro-op (`mop_t` in `sns_pkg`). A macro-op contains:

* a MID (macro-op id), its length and its stream id;
* the branch information of its last instruction;
* up to 4 **live-ins**: the registers it reads from outside. Issue fills in their values, two per cycle through the register file's two read ports.
* up to 4 **live-outs**: the registers it leaves behind, each naming the operation that produces it;
* up to 8 operations. Each operation's sources name either a live-in or an earlier operation's result, so values inside the macro-op never touch the register file.

The packer closes a macro-op in three cases:

* after an instruction with bit 31 set (a compiler hint);
* after any control instruction;
* when the next instruction would exceed 8 operations, 4 live-ins or 4 live-outs.

Live-ins and live-outs are worked out from the register names as instructions are added. Every register written in the macro-op becomes a live-out.

Exmem steps through the operations one per cycle. Loads and stores wait for the data port. When the macro-op completes, exmem does three things in the same cycle:

* writes all live-outs into the bypass cache;
* sends them to issue as one writeback;
* if the macro-op ends in a branch, sends the branch outcome to fetch.

## Fetch and branch prediction

Fetch has one instruction-memory request outstanding at a time. It pre-decodes each returned word:

* Conditional branches follow `sns_gshare`: 2^16 two-bit counters indexed by pc xor 16-bit global history.
* JAL is always taken.
* JALR is predicted to fall through, because there is no target buffer.
* HALT stops fetching until a redirect arrives.

The predictor trains when exmem reports an outcome. After reset it spends 2^16 cycles clearing its table. Fetch must not start before then (the top exposes no busy flag; the test waits).

## Instruction set

The original proposal's compiler target is not specified at bit level, so the ISA here is this design's own. Instructions are 32 bits wide and there are 64 registers; r0 reads as zero.

| Bits | Field |
|---|---|
| 31 | end-of-macro-op hint |
| 30:25 | opcode |
| 24:19 | rd |
| 18:13 | rs1 |
| 12:7 | rs2 |
| 12:0 | 13-bit immediate |

* Stores and branches put their 13-bit offset in {24:19, 6:0}.
* JAL and LUI use a 19-bit immediate in bits 18:0.
* Branch and JAL offsets count words.

Operations: ADD SUB AND OR XOR SLL SRL SRA SLT SLTU MUL, ADDI ANDI ORI XORI SLTI SLLI SRLI LUI, LW SW, BEQ BNE BLT BGE, JAL JALR, NOP and HALT. The package has encoder functions (`enc_r`, `enc_i`, `enc_s`, `enc_j`) for building programs in testbenches.

## Memory ports

Every port uses request valid/ready, and each accepted request gets exactly one response pulse later.

* Instruction port: word address in, instruction out.
* Data port: `we`, word address and write data. A load returns its data with the response. A store also gets a response, which acts as its acknowledgement.

## Where this departs from the original proposal

* **Bypass distance uses ≤, not "less than".** The original states that an operand is safe in the bypass cache when the id difference is less than the cache depth, and it assumes one destination per instruction. With ids counting destinations, a difference equal to the depth still lies inside the cache, so this design allows it.
* **Bypass cache is filled per macro-op.** The original saves each result as it is computed. Here all live-outs are inserted when the macro-op completes. Values inside a macro-op already travel through its operation results, so consumers see no difference.
* **Packer derives live-ins and live-outs in hardware.** The original has the compiler embed them in the binary. Here only the end-of-macro-op hint comes from the program. There is no dead-value analysis, so every written register is a live-out.
* **One crossbar per boundary.** The original allows spare switches to tolerate a failed switch; none are built here.
* **No fault detection or diagnosis.** Routing is written from outside. The original also leaves these mechanisms out of scope.
* **No caches.** L1/L2 caches and main memory are represented only by the memory ports.
* **Own choices where the original is silent:**
  * MAX_OPS = 8;
  * two register-file read ports, so a macro-op with three or four live-ins spends one extra cycle in issue;
  * 8-bit MIDs and write ids;
  * the flit format;
  * an 8-entry instruction buffer;
  * one register stage per crossbar output;
  * the predictor's table-clearing sweep.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_sns_link_tx`, `tb_sns_link_rx` | flit slicing, last marker and variable flit counts under random back pressure; two-message buffering |
| `tb_sns_xbar` | random permutations and back pressure; every output gets its selected input's flits in order, one cycle after they are taken |
| `tb_sns_config_manager` | crossbar selects for identity and borrowed-stage maps, conflict flag, reset state |
| `tb_sns_gshare` | reset state, training, history indexing, saturating counters (with an 8-bit history for speed) |
| `tb_sns_fetch` | sequential fetch, branch prediction, JAL, HALT, redirect and sid toggle (with a 4-bit history) |
| `tb_sns_packer` | grouping, live-in/live-out lists, operation sources, immediates, closing rules, MIDs |
| `tb_sns_decode` | flits in and out, macro-op length, flush on a stream change |
| `tb_sns_regfile`, `tb_sns_bypass_cache` | random traffic against a model |
| `tb_sns_scoreboard` | bypass window, stall beyond it, writebacks with current and stale ids, wipe, r0 |
| `tb_sns_issue` | operand values, "from bypass" flag, dependency stall, squash, wait-and-wipe on a new stream, three- and four-live-in macro-ops read over two cycles |
| `tb_sns_exmem` | chained operations, store/load, bypass operand, mispredict and redirect, squash, JAL, HALT |
| `tb_sns_stagenet` | the whole array at its default parameters (below) |

`tb_sns_stagenet` builds a test program with loops, a data-dependent branch pattern, calls, long dependency chains and memory traffic. It runs the program on four slices at once, one of them through a borrowed decode stage, with random ready on every memory port. Afterwards it checks:

* each slice's executed operation count and every data-memory word, against an instruction-set model;
* that the idle slice stayed idle;
* that every stage of each slice agrees on the final stream id;
* that each mechanism happened at least once.

The mechanisms counted are mispredicts, squashes in issue and exmem, decode flushes, scoreboard wipes, dependency stalls, bypass-cache operands, multi-operation macro-ops and memory stalls. One run takes about 70,000 cycles, most of them the predictor's clearing sweep.

`tb_sns_kernels` runs four small benchmark-style kernels, one per slice, plus a second Sobel on the fifth slice:

* RC4 key schedule and keystream;
* Sobel edge magnitude;
* an 8-point DCT-style butterfly;
* an ADPCM-style encoder.

It runs them on the full-size array and checks each result against the interpreter. The RC4 and Sobel outputs are also checked against direct computations. `tb_sns_kernel_sweep` repeats the kernels at three other points of the design space and checks that the cycle counts move the expected way. Cycles for the five kernels together:

| Channel | Bypass depth | Cycles |
|---|---|---|
| 64-bit | 6 (default) | ≈16,000 |
| 64-bit | 8 | ≈15,900 |
| 64-bit | 2 | ≈19,400 |
| 32-bit | 6 | ≈22,200 |

Both testbenches use the shared `tb/sns_kernel_bench.sv`, which holds the programs and the interpreter. The inputs are small and generated; they are not the original benchmark data.

Synthesis of the top with the yosys slang front end gives:

* about 11,200 cells;
* 63 K flip-flop bits;
* 660 K memory bits, almost all of it the five 2^16-entry predictor tables.

## Simulating

Each testbench is a top-level module. Give verilator the package and the testbench; it finds the other modules in `rtl/` and `tb/` by name. `-Wno-fatal` keeps width warnings in the testbenches from stopping the build.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          rtl/sns_pkg.sv tb/tb_sns_stagenet.sv --top-module tb_sns_stagenet -o sim
./obj_dir/sim
```

Swap in any other `tb/tb_sns_*.sv` and its top-module name to run another test. All state that is read is reset, and the checkers wait for reset, so results do not depend on initial values (`+verilator+rand+reset+2` randomises them).

## Files

* `rtl/sns_pkg.sv` — types, message formats, ISA helpers and the instruction decoder function
* `rtl/sns_stagenet.sv` — the array (top)
* Stages: `rtl/sns_fetch.sv`, `rtl/sns_decode.sv`, `rtl/sns_issue.sv`, `rtl/sns_exmem.sv`
* Stage internals: `sns_gshare`, `sns_packer`, `sns_scoreboard`, `sns_regfile`, `sns_bypass_cache`
* Interconnect: `sns_link_tx`, `sns_link_rx`, `sns_xbar`, `sns_config_manager`
