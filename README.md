# Return-address guard between cache and main memory

A stack-smashing attack overflows a buffer in a function's stack frame and
overwrites the saved return address, so that the function's return jumps into
code the attacker chose. This design stops that without touching the processor:
a small hardware module, the *guard*, sits on the bus between the processor's
cache and main memory and keeps its own copy of every return address where the
processor cannot write it. Protected code returns *through the guard*, and the
guard decides where the return really goes.

The scheme follows the paper "A Technique Against Buffer Overflow Attacks for
Embedded Systems via Hardware/Software". The paper gives the guard's structure
(an RA stack plus control logic), its two commands and their flow charts. It
gives no register map, bus protocol, stack depth, timeout value or rule for
judging a fetch, so this RTL chooses those. Each choice is listed below under
"Choices made here".

## How a protected call and return work

A compiler pass adds two memory-mapped commands to every function:

1. **push_guard**, before each call: the return address (RET_Addr) is written
   to the guard's `PUSH` register, and the guard pushes it onto its RA stack.
   Software then reads `PUSH` back. The read returns `pop_ret_addr`, a fixed
   non-cacheable address inside the guard's window. Software stores that
   value, not the real return address, in the return-address register, so it
   is also what ends up in the stack frame.
2. **guard_attention**, before each return: software writes the current PC to
   `ATTN_PC`, then the frame pointer to `ATTN_FP`. The `ATTN_FP` write makes the
   guard pop the saved RET_Addr, *arm* itself and start a timeout counter.
3. The return instruction jumps to whatever the frame holds. When nothing was
   overwritten, that is `pop_ret_addr`. Because the address is non-cacheable,
   the instruction fetch reaches the guard. The guard answers it with an ARM
   `B RET_Addr` instruction, which the processor executes, so it continues at
   the address the guard saved.

A typical ARM sequence (register use is illustrative):

```
    ldr  r12, =GUARD_BASE
    str  r4,  [r12, #0x00]   @ push_guard: r4 = address after the call
    ldr  r4,  [r12, #0x00]   @ r4 = pop_ret_addr, used as the return address
    ...
    str  pc,  [r12, #0x04]   @ guard_attention, part 1: PC
    str  fp,  [r12, #0x08]   @ guard_attention, part 2: FP; guard arms
    ...epilogue...
    bx   lr                  @ lands on pop_ret_addr -> guard supplies B RET_Addr
```

## What the guard does with each request while armed

The guard does its work in how it treats the cache's requests between
guard_attention and the return. Each request taken while armed is handled by
the first rule that applies:

| request | guard's answer | result |
|---|---|---|
| read of `pop_ret_addr` | `B RET_Addr`, one clock later | normal return (`events.return_ok`); disarm |
| instruction fetch that is **invalid**: within `FRAME_WIN` bytes either side of FP (code on the stack), or outside the `EPI_WIN` bytes after the PC given to guard_attention | `B RET_Addr`, placed at the fetched address, instead of the memory contents | attack (`events.attack_invalid`, `status.attack`, `attack_irq`); disarm |
| any instruction fetch after `TIMEOUT` guard clocks | as above | attack found by the time threshold (`events.attack_timeout`, `status.timeout_attack`); disarm |
| anything else (data accesses; epilogue fetches) | passed on to memory | the guard stays armed |

So a diverted return is not just reported. The first instruction fetched
after it is replaced by a branch back to the correct return address. An attack
whose target code is already in the cache produces no fetch at the guard. It is
caught by the timeout on the next instruction fetch that reaches the guard. A
late `pop_ret_addr` fetch is still treated as a normal return.

Outside a return, two more rules apply:

* A read of `pop_ret_addr` while not armed is refused (`err` set in the
  response, `status.violation`).
* Any access to the spill area is refused the same way.

Every other access is passed on to memory unchanged.

## The RA stack and its spill area

The on-chip RA stack (`ra_stack`) holds `DEPTH` return addresses. When a push
leaves it full, the controller copies all `DEPTH` entries, oldest first, into
the next free block of a **spill area** in main memory and empties the stack.
When a return leaves the stack empty and blocks are saved, the last block is
read back, also oldest first. The processor's own accesses to the spill area
are refused, so the saved return addresses are as safe as the on-chip ones.

Two corner cases:

* A push onto a stack that a restore has just filled first saves the stack,
  then pushes.
* A guard_attention that finds the stack empty (right after a save) first
  restores, then pops.

The spill area holds `SPILL_BLOCKS` blocks. Nesting can therefore reach
`DEPTH × (SPILL_BLOCKS + 1)` calls, 1040 at the defaults. A push beyond that
is refused with `err` and sets `status.ra_overflow`. A guard_attention with
nothing saved at all answers with `err` and sets `status.underflow`.

## Register map

The window is 256 bytes at `GUARD_BASE` (default `0xFFFF_0000`) and must be
mapped non-cacheable.

| offset | write | read |
|---|---|---|
| 0x00 `PUSH` | push_guard(RET_Addr) | `pop_ret_addr` |
| 0x04 `ATTN_PC` | PC for guard_attention | error |
| 0x08 `ATTN_FP` | FP; starts guard_attention | error |
| 0x0C `STATUS` | clears the sticky flags | status word |
| 0x10 `pop_ret_addr` | error | while armed: `B RET_Addr`; otherwise error |

Status word: `[0]` armed, `[1]` attack, `[2]` timeout attack, `[3]` violation,
`[4]` RA overflow, `[5]` underflow, `[19:12]` entries in the on-chip stack,
`[31:20]` blocks held in the spill area. Bits 1–5 stay set until `STATUS` is
written. The same word is on the `status` port, and `attack_irq` mirrors bit 1.
The `events` port gives one-clock pulses for push, pop, spill, restore,
return_ok, attack_invalid, attack_timeout, violation and forward, for counters
or tracing.

The supplied instruction is `0xEA000000 | ((RET_Addr − (fetch_address + 8)) >> 2)[23:0]`.
This is an ARM branch, so its reach is ±32 MiB. Code, stack and the guard window
must lie within that reach of each other. The default window at `0xFFFF_0000`
reaches the low 32 MiB by wrap-around.

## Bus and timing

Both ports carry the same simple protocol, defined in `guard_pkg`:

* A request is a `bus_req_t` (`write`, `ifetch`, `addr`, `wdata`). It is
  offered with `*_req_valid` and taken when `*_req_ready` is high in the same
  clock. The requester holds it until it is taken.
* Every request, reads and writes alike, gets exactly one `bus_resp_t`
  (`err`, `rdata`), marked by a one-clock `*_resp_valid`.
* One transaction is in flight at a time.
* The `ifetch` bit marks instruction fetches, as most embedded buses do.
  Without it the guard could not tell a diverted return from a data access.

The logic runs on the guard clock. The bus runs on a slower clock that is
synchronous to it. The input `bus_en` is high in the last guard clock of each
bus clock period, and every bus handshake happens only in those cycles: a
request is taken, memory is ready, a response is taken. The scheme's own
figures are a 200 MHz guard on a 100 MHz bus, so `bus_en` is high every other
guard clock. Tie it high when the bus runs on the guard clock.

In guard clocks from the edge that takes a request:

* stack commands, register reads and the verified return fetch are done **1**
  clock later. This matches the one guard clock per stack access and per
  verification in the scheme's cost model. The response is then held until the
  next `bus_en` cycle, so at 2:1 the processor sees it one bus clock after its
  request;
* a passed-on access is offered to memory 1 clock later, and memory's response
  is passed back in the same clock it arrives;
* a save or restore costs `DEPTH` memory transactions, and the cache side
  waits (`up_req_ready` low) until it is done.

## Cost of protection

Each call adds two guard commands: the push, and the read-back of
`pop_ret_addr`. Each return adds three: the PC write, the FP write, and the
`pop_ret_addr` fetch. Each command is done one guard clock after it is taken
and answered at the next bus clock edge. Each passed-on miss costs at most one
extra guard clock. A save or a restore costs `DEPTH` memory round trips.

`guard_workload_tb` uses the call rates measured for six embedded benchmarks.
The rates are calls per 100 processor clocks, with the processor at twice the
guard clock and the bus at half the guard clock. It reports two shares of a
40,000-clock run: the time the processor waits on guard commands, and the extra
wait for saving and restoring the stack:

| benchmark | bitcount | crc | dijkstra | fft | sha | stringsearch |
|---|---|---|---|---|---|---|
| calls per 100 processor clocks | 0.7 | 3.0 | 0.12 | 1.0 | 0.6 | 0.5 |
| command wait | 14.2% | 26.0% | 2.6% | 16.7% | 11.2% | 11.0% |
| save/restore wait | 11.6% | 37.4% | 3.2% | 16.0% | 16.3% | 7.8% |

The testbench's nesting walk goes up to 40 frames. The stack is saved whole
when it fills and restored whole when it empties. A program whose depth hovers
around a multiple of `DEPTH` therefore moves `DEPTH` words at nearly every call
or return across that boundary. These shares come from this testbench's call
pattern, miss rate and memory latency. They are not a prediction for real
programs.

## Parameters (module `guard`)

| parameter | default | meaning |
|---|---|---|
| `DEPTH` | 16 | on-chip RA stack entries (power of two) |
| `GUARD_BASE` | `0xFFFF_0000` | register window base; `pop_ret_addr` is `GUARD_BASE + 0x10` |
| `SPILL_BASE` | `0x0FFF_0000` | start of the spill area in main memory |
| `SPILL_BLOCKS` | 64 | blocks of `DEPTH` words in the spill area |
| `TIMEOUT` | 64 | time threshold for the return fetch, guard clocks |
| `FRAME_WIN` | `0x400` | bytes either side of FP where a fetch counts as code on the stack |
| `EPI_WIN` | `0x40` | bytes after the attention PC where fetches are the epilogue |

The address and data widths are 32 bits (`guard_pkg::AW`, `DW`).

## Files

* `rtl/guard_pkg.sv`: bus structs, status and event structs, register offsets,
  and the branch encoder.
* `rtl/ra_stack.sv`: the on-chip RA stack.
* `rtl/guard_ctrl.sv`: the control logic, a single state machine covering
  take request, answer, pass on, save block, restore block, and the deferred
  push and pop.
* `rtl/guard.sv`: the top. It joins the stack to the controller.
* `tb/mem_model.sv`: behavioural main memory (sparse, fixed latency, optional
  random wait states), for the testbenches only.
* `tb/ra_stack_tb.sv`: random push/pop/clear against a queue.
* `tb/guard_ctrl_tb.sv`: directed scenarios at small sizes (depth 4, two spill
  blocks, 8-clock threshold). It checks every rule above, the latencies and the
  spill area's contents.
* `tb/guard_tb.sv`: end to end at the default parameters. A random walk of
  nested calls and returns, about 11% of them attacked in one of three ways,
  with the bus at half the guard clock and random memory wait states, then a
  call chain that fills the whole spill area. It decodes every supplied branch and checks its target against its own
  copy of the call stack. It also counts each mechanism (push, pop, spill,
  restore, verified return, invalid-fetch attack, timeout attack, violation,
  pass-through, spill area full) and fails if one never occurs.
* `tb/guard_workload_tb.sv`: runs call patterns at the call rates measured for
  six embedded benchmarks and reports the clocks spent waiting on guard
  commands.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module guard_tb \
  rtl/guard_pkg.sv rtl/ra_stack.sv rtl/guard_ctrl.sv rtl/guard.sv \
  tb/mem_model.sv tb/guard_tb.sv
./obj_dir/Vguard_tb
```

Replace the top and testbench file for the others: `ra_stack_tb` needs only
`guard_pkg.sv` and `ra_stack.sv`. The end-to-end run takes a few seconds.

## Choices made here, and how far to trust them

These follow the published scheme:

* the guard's place between cache and memory, and its two parts;
* push_guard before a call and guard_attention (with PC and FP) before a
  return;
* `pop_ret_addr` as a non-cacheable address loaded into the return-address
  register;
* the injected branch to the saved return address;
* the time threshold;
* saving the RA stack into memory when it is full and restoring it when
  needed;
* keeping the saved copy out of the processor's reach;
* one guard clock each for a stack access and for the verification.

These are this design's own:

* the bus protocol, including the `ifetch` bit;
* the register map, and returning `pop_ret_addr` from a read of `PUSH`;
* all parameter values;
* the invalid-fetch rule, built from request address, PC and FP;
* the ARM `B` encoding and its ±32 MiB reach;
* whole-stack save and restore in blocks of `DEPTH`;
* treating a late `pop_ret_addr` fetch as a normal return;
* the error and flag behaviour for overflow, underflow and violations;
* the `bus_en` scheme. The scheme runs the guard at twice the bus clock. Here
  the two clocks are assumed synchronous, with the bus clock marked by an
  enable rather than carried by a clock-domain crossing.

The flow chart for guard_attention, read literally, ends without answering when
the request *is* `pop_ret_addr`. This RTL answers it with the branch, because
that is the purpose of `pop_ret_addr` in the scheme.

Not covered:

* The processor, cache, bus fabric and memory are outside this RTL.
* The compiler pass is software.
* The invalid-fetch rule is only as good as the windows it is given. A
  diverted return that stays within `EPI_WIN` of the attention PC, and arrives
  before the timeout, is passed on.
* Only return-address attacks are addressed. Overwritten function pointers and
  other data are not.
* At the default sizes these status bits are always zero: bits `[11:6]`, and
  the upper bits of the depth and block fields.
