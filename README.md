# Branch trace for a dual-commit RISC-V core (E-Trace encoder + CVA6 connector)

A processor trace lets a debugger reconstruct every instruction a core executed
without stopping it. Recording every program counter costs far too much bandwidth,
so this design implements *branch trace* from the RISC-V Efficient Trace (E-Trace)
scheme. The decoder on the other side has a copy of the program binary. The encoder
only reports what the decoder cannot work out for itself:

- the outcome of each conditional branch, as one bit;
- the target of each jump whose destination is not in the instruction encoding
  (indirect jumps, exception returns);
- traps, with their cause;
- periodic full addresses, so the decoder can start or recover.

Typical programs produce a few bytes of trace per hundred instructions.

The RTL has two halves, joined in the top module `te_system`:

1. `cva6_te_connector` watches the commit stage of a CVA6 core. CVA6 can retire two
   instructions per cycle. The connector turns the stream of retired instructions
   into E-Trace *blocks*. A block is a run of instructions that ends in a
   discontinuity or a trap.
2. `trace_encoder` takes up to N blocks per cycle. It filters them, decides which
   packet (if any) each needs, compresses it and hands it to an encapsulator for
   transport.

```
 CVA6 commit ports ─► cva6_te_connector ─► trace_encoder ─► packets (to an encapsulator)
 branch unit, CSRs ─►  (blocks, ≤NRET/cycle)     ▲
                                   APB configuration, trace on/off
```

The core, the encapsulator and the transport are outside this RTL. Their signals
are ports of `te_system`. In a multicore system, instantiate one `te_system` per core.

## Blocks: the encoder's unit of work

A block is described by these fields:

| field | meaning |
|---|---|
| `itype` | how the block ends: 0 none/standard, 1 exception, 2 interrupt, 3 exception return, 4 branch not taken, 5 branch taken, 6 uninferable jump |
| `iaddr` | address of its first instruction |
| `iretire` | its length in halfwords |
| `ilastsize` | size of its last instruction: 0 = 2 bytes, 1 = 4 bytes |

`cause`, `tval` and the privilege level come with each group of blocks.
`block_t` and the encodings are defined in `te_pkg.sv`.

## cva6_te_connector: from commit ports to blocks

Blocks do not line up with clock cycles. A block can span many cycles, and one
cycle can close two blocks. The connector therefore handles one instruction at a
time in four steps:

1. **itype detection** (`itype_detector`, one per port). The itype comes from the
   operation class on each commit port (branch, `jal`, `jalr`, `eret`, other) and
   from the shared exception and interrupt signals. A trap wins, on every port.
   CVA6 resolves a branch several cycles before it commits it. So the outcome of
   the last branch the branch unit resolved is kept in a register and used when
   the branch commits. A counter adds up how many blocks end in the cycle. It
   counts the itypes other than 0, or 1 for a trap. That number goes into a
   block-count FIFO.
2. **Serialization.** When any port commits, or a trap is signalled, every port
   pushes one entry (committed flag, itype, pc, compressed flag, privilege) into its
   own FIFO. The FIFOs therefore stay in step. Cause and tval go into a separate
   trap FIFO. Each cycle a selector feeds one entry to the FSM, in program order.
   Entries from ports that committed nothing are skipped without costing a cycle.
   A trap entry is taken from FIFO 0 and pops all FIFOs.
3. **Block FSM** (`idle`, `count`):
   - In `idle`, an instruction opens a block: `iaddr` = pc, and `iretire` = 1 or
     2 halfwords.
   - A standard instruction moves the FSM to `count`. A special instruction
     closes a one-instruction block at once.
   - In `count`, the FSM adds instructions until a special instruction or a trap
     closes the block.
   - A trap that arrives with no instruction in the current block gives a block
     with `iretire` = 0, the trapping pc as its address, and the `ilastsize` of the
     last retired instruction.
4. **Deserialization.** A counter steers each finished block into output slot 0, 1,
   and so on. When the slot count reaches the value at the head of the block-count
   FIFO, the matching `valid_o` bits go high for one cycle.

Timing:
- Throughput is one committed instruction (or one trap) per cycle. A cycle that
  commits on both ports costs two cycles, and the FIFOs (16 deep) absorb such
  bursts.
- Latency is one cycle per instruction in the group, plus the output register,
  plus any wait behind earlier groups.
- The connector itself has no back-pressure to the core. An assertion reports a
  FIFO overflow. The only stall comes from the encoder in lossless mode (see
  Back-pressure); while it holds, the connector pauses.

## trace_encoder: deciding and building packets

This is the "branches only" multiple-retirement encoder. It accepts up to N blocks
per cycle, of which at most one ends in something other than a branch. So at most
one packet is produced per cycle. The core must respect this: it may retire at most
one indirect jump or exception return per cycle. An assertion in `trace_encoder`
reports a cycle that breaks the rule. Such a cycle would leave one jump target
unreported.

| submodule | job |
|---|---|
| `te_reg` | APB registers, trace enable, gated clock for everything else |
| `te_filter` (one per port) | marks each block qualified or not |
| `te_branch_map` | counts branches and records their outcomes (31 max), N per cycle |
| `te_priority` | chooses the packet; computes how many address bits matter |
| `te_packet_emitter` | assembles the payload, its length in bytes and its type |
| `te_resync_counter` | counts packets and forces a periodic synchronisation |

### The three-stage view

E-Trace decides the packet for the *current* block by also looking at the
*previous* block and the *next* block. An exception in the previous block means the
current one starts at a trap handler. An unqualified next block means the current
one is the last that will be traced. The encoder keeps three registered stages:
`nc` (next), `tc` (current) and `lc` (last). They advance whenever a new block
group arrives.

A group entering `nc` at edge *t* is decided one cycle after the following group
arrives. Its packet appears at the outputs one cycle after that. A group's
reported address is that of its first block. Every qualified branch in the group
goes into the branch map, in port order.

### Packet decision (te_priority)

The checks run in this order:

1. **Support packet** (format 3, subformat 3). Sent when tracing was switched on or
   off, the address mode changed, packets were lost, or the previous block was the
   last qualified one. These events are sticky flags. They are checked before
   anything else, so nothing else is sent while one is pending.
2. An unqualified block produces nothing.
3. The previous block ended in a trap:
   - if the current block retires nothing, a trap packet (3/1) with `thaddr` = 0;
   - otherwise a trap packet with `thaddr` = 1, giving the handler address;
   - if that trap was already reported, a synchronisation packet (3/0) instead.
4. First qualified block, a privilege change, or the resync counter past its
   limit: synchronisation packet (3/0).
5. The previous block ended in an uninferable jump: an address packet.
6. An address packet also when:
   - the resync counter is at its limit with branches pending;
   - the current block traps after retiring instructions;
   - the next block traps before retiring anything;
   - the next block changes privilege while branches are pending;
   - the next block is unqualified.
7. Branch map full: a format 1 packet with no address, carrying 31 branches.
8. Context reporting on (`nocontext` clear) and the block's context differs from
   the context last sent: a context packet (3/2).

An address packet is format 1 (branch map + address) when branches are pending,
and format 2 (address only) otherwise. Synchronisation and trap packets restart the
resync counter.

### Address compression

In delta mode the address sent is the difference from the last address sent. Small
jumps therefore produce values with long runs of equal top bits. Two leading-zero
counters measure that run, one on the value and one on its complement. All of the
run but one bit is dropped, because the receiver sign-extends:
`keep = 64 − max(lz0, lz1) + 1`, rounded up to whole bytes.

The one-bit fields that follow the address (`notify`, `updiscon`, `irreport`)
repeat the sign bit. A receiver can therefore sign-extend the whole payload from
its last byte. The exception is the "this is the address before a trap, privilege
change or resync" case, which inverts `updiscon` and `irreport`.

### Payload layout

Fields are packed from bit 0 in this order. `packet_type_o` = `{format, subformat}`.
`payload_length_o` is in bytes.

| packet | fields (LSB first) |
|---|---|
| 3/0 sync | format(2)=3, subformat(2)=0, branch(1), priv(2), [time 64], [context 32], address |
| 3/1 trap | format, subformat=1, branch, priv, [time], [context], ecause(64), interrupt(1), thaddr(1), address, tval(64, not for interrupts) |
| 3/2 context | format, subformat=2, priv(2), [time], [context] |
| 3/3 support | format, subformat=3, ienable(1), encoder_mode(1), qual_status(2), ioptions(3)={lossless, shallow, full-address}, denable(1)=0, dloss(1)=0 |
| 2 addr-only | format(2)=2, address, notify, updiscon, irreport |
| 1 with address | format(2)=1, branches(5), branch_map(1/3/7/15/31 bits), address, notify, updiscon, irreport |
| 1 without address | format=1, branches(5)=0, branch_map(31) |

Notes on the fields:
- The address is always a whole number of bytes.
- In sync and trap packets, and in full-address mode, the address is the full
  address. Otherwise it is the difference from the last address sent.
- Branch map bit 0 is the oldest branch. A 1 means not taken.
- Time and context are only present when `notime` or `nocontext` is cleared.

### Branch map

`te_branch_map` takes up to N branches per clock. When the map reaches 31 entries
it asks for a packet and holds that request until the emitter flushes the map.
Branches that do not fit go into a left-over store (2N entries) and are added first
in a later cycle. A flush in the same cycle as new branches clears the old contents
first.

The map is flushed by every format 1 packet. With `shallow_trace` set, every
packet flushes it.

### Resynchronisation counter

`te_resync_counter` counts emitted packets (MODE 0) or clock cycles (MODE 1) while
tracing is on.
- `et_resync_max_o` is high while the count equals `MAX_VALUE`, default 255.
- `gt_resync_max_o` is high once the count has gone past `MAX_VALUE`. It stays high
  until a synchronisation or trap packet restarts the count.
- The count saturates at `MAX_VALUE+1`. Counts are ignored while the request is
  pending.

### Back-pressure

- If the encapsulator is not ready when a packet comes out and `lossless_trace` is
  clear, the packet is lost. A support packet with `qual_status` = trace_lost
  follows.
- With `lossless_trace` set, `stall_o` asks the core to stall instead, and
  nothing is lost:
  - `te_reg` samples the stall request on the falling clock edge and stops the
    encoder's gated clock, so the packet waits on the outputs until it is taken;
  - `hold_o` tells the connector to keep its outputs and stop draining its FIFOs;
  - the FIFOs absorb the instructions the core still commits before it stops.

  `encapsulator_ready_i` must therefore be stable by the middle of the cycle, as
  it is when it comes from a flip-flop.

## Configuration registers (te_reg, APB)

The interface is 32-bit APB with no wait states. Byte address = 4 × word.

| word | register | content |
|---|---|---|
| 0 | CTRL | [0] trace_activated, [1] nocontext, [2] notime, [3] encoder_mode, [6:4] configuration (0 delta, 1 full address), [7] lossless_trace, [8] shallow_trace. Reset value 0x6 |
| 1 | FILTER | bit 2k = enable, bit 2k+1 = mode of comparator k (k = 0 cause, 1 tvec, 2 tval, 3 priv, 4 iaddr) |
| 2+6k … 7+6k | comparator k | upper lo/hi, lower lo/hi, match lo/hi |
| 32 | STATUS | [0] trace_enable (read only) |

Other words return `pslverr`.

Each comparator works as follows:
- With its enable bit clear, it passes everything.
- In mode 0 it passes values in `[lower, upper]`.
- In mode 1 it passes values equal to `match`.

A block is qualified when all five comparators pass and tracing is enabled.

Tracing turns on with a `trace_req_on_i` pulse while `trace_activated` is set and
the encapsulator is ready. `trace_req_off_i` or clearing `trace_activated` turns it
off. The encoder's clock is gated by `trace_activated`. The gate enable is sampled
on the falling edge.

Typical bring-up:
1. Write FILTER and the comparators.
2. Write CTRL = 0x7 (activated, no time, no context, delta addresses).
3. Pulse `trace_req_on_i`.

## Departures and choices

These points are not fixed by the E-Trace scheme or by the design this RTL follows.
They are decided here:

- **Connector FSM edge.** A standard instruction (itype 0) moves the FSM from
  `idle` to `count`. The original state chart labels that edge with itype 1; the
  written description, which says "standard instruction", is followed.
- **Trap cycles.** No instruction may commit in the same cycle as a trap.
- **Skipped lanes.** The serializer skips lanes with no instruction. A serializer
  that visits every lane would spend NRET cycles per commit and overflow on
  steady single-issue code.
- **Pipeline advance.** The encoder's three stages advance per block group, not
  per clock. Reporting the group's first block and sending the others' branches
  to the map is how the "branches only" architecture is realised here.
- **Support packet priority.** The support-packet check sits before the rest of
  the decision.
- **Context packets.** The encoder keeps the context it last sent, in a sync, trap
  or context packet. A change is reported on the first qualified block that needs
  no other packet, so it never displaces an address or a branch map. If a sync or
  trap packet comes first, it carries the new context and no context packet follows.
  The context is sampled when the block leaves the connector, not when the core
  commits it.
- **The "reported" flag.** It is set by a trap packet with `thaddr` = 0 and cleared
  by any other packet.
- **Not implemented:**
  - format 0 (branch prediction and jump-target-cache extensions);
  - the implicit-return stack (`irdepth` is omitted, and `irreport` only carries
    the flag above);
  - address modes other than delta and full;
  - data trace.
- **Other multiple-retirement architecture.** The alternative architecture, where
  several ports can end in uninferable jumps in one cycle and several packets are
  emitted per cycle, is not built.
- **Trap vector.** The `tvec` comparator input is tied to 0 in `te_system`,
  because the connector does not produce it.
- **Sizes chosen here:** FIFO depth 16, `MAX_VALUE` 255, `iretire` 32 bits,
  context 32 bits. The payload register is 320 bits, enough for the longest trap
  packet with time and context.

## Compression rate

Rate = 1 − (packet bytes × 8) / (instructions × 32).

On programs from a dual-core CVA6 SoC, the original evaluation reports 85–99.8 %
(average about 95 %):
- short I/O and interrupt-heavy tests are at the low end;
- long compute loops are at the high end.

Those programs are not reproduced here. `tb_te_workloads` runs the two shapes
that set the ends of that range. A nested counted loop (4,656 instructions, 680
branches) compresses to 123 bytes, 99.3 %. It is almost all full branch maps. A
loop calling a short function 300 times compresses to 93.6 %, since every return
costs an address packet of about 3 bytes.

The random stream of `tb_te_system` has far more indirect jumps and traps than
real code, and it gives about 85 %.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=… failures=…`:

| testbench | what it checks |
|---|---|
| `tb_te_resync_counter` | random packet counts against a reference count: saturation, ignore-while-pending, reset priority |
| `tb_te_branch_map` | random branches, flushes and full maps against a queue model, map polarity and order |
| `tb_te_filter` | random settings and values against a reference comparator |
| `tb_te_reg` | APB reads and writes, reset values, error response, trace on/off rules, clock gating, stall freeze |
| `tb_te_priority` | directed cases of each decision branch, including when a context packet waits; compression length against a reference |
| `tb_te_packet_emitter` | payload bit layouts, lengths and flush for each packet type |
| `tb_itype_detector` | every operation class, with and without traps |
| `tb_cva6_te_connector` | random commit streams (1–2 commits, traps, compressed code) against a block model; random hold cycles; a one-commit-per-cycle phase must never fill a FIFO |
| `tb_trace_encoder` | encoder with a short resync period: sync, trap, address, branch-map, full-map, support, lost and off packets |
| `tb_te_system` | the whole system at default parameters (see below) |
| `tb_te_workloads` | the whole system on a nested-loop kernel and a call-heavy kernel; every decoded branch bit is compared with the program's branch outcomes, in order |

`tb_te_system` runs a random program through the commit ports. The program
includes:
- indirect jumps and exception returns;
- exceptions and interrupts with privilege changes;
- excursions into a range the address filter excludes;
- a branch-only stretch that fills the map;
- a busy encapsulator, first losing packets, then in lossless mode, where the
  core obeys `stall_o` and the waiting packet must be held and delivered once;
- a long trap-free run that reaches the periodic resynchronisation;
- a phase with context reporting on and the context input changing every 200
  cycles. Every reported context must be one that was driven, and every context
  packet must report a change;
- a phase in full-address mode, where address packets carry whole addresses and
  a support packet announces the mode;
- trace off at the end.

It decodes every packet and rebuilds the addresses: full addresses from
sync and trap packets and in full-address mode, sums of sign-extended differences
otherwise. Each rebuilt
address must be the first address of a block the program executed. It also checks
that the full branch maps from the branch-only stretch are all "not taken". It
counts every mechanism and fails if any of them never happened.

To run a testbench with Verilator 5:

```
cd tb
verilator --binary --timing ../rtl/te_pkg.sv ../rtl/*.sv tb_te_system.sv \
          --top-module tb_te_system -Mdir obj -o sim
./obj/sim
```

`te_pkg.sv` must come first. Every file in `rtl/` is synthesizable. All flip-flops,
including the FIFO storage, are reset asynchronously by `rst_ni` (active low).

## Files

- `rtl/te_pkg.sv`: widths, itype and packet codes, block and comparator types.
- `rtl/te_system.sv`: top level (connector + encoder).
- `rtl/cva6_te_connector.sv`, `rtl/itype_detector.sv`, `rtl/te_fifo.sv`: the connector.
- `rtl/trace_encoder.sv`, `rtl/te_reg.sv`, `rtl/te_filter.sv`, `rtl/te_branch_map.sv`,
  `rtl/te_priority.sv`, `rtl/te_lzc.sv`, `rtl/te_packet_emitter.sv`,
  `rtl/te_resync_counter.sv`: the encoder.
- `tb/tb_*.sv`: one testbench per module, plus the system test.
