# Precise exception unit with two return addresses

A single-issue, in-order pipeline with delayed branches cannot always resume
after an exception from one saved program counter. If the faulting
instruction sits in the delay slot of a taken branch, the instruction that
must follow it on return is the branch target, not the next sequential
address. And since stalls leave bubbles in the pipeline, the stage next to
the faulting one may hold nothing, or an address that has long since left.

This unit saves two addresses when it takes an exception:

* **FADR**: the first instruction that has not completed. Execution resumes
  here.
* **NADR**: the instruction that must follow FADR.

Both are picked by hardware from the instructions that are really in the
pipeline. Bubbles are skipped, and the PC logic's knowledge of a resolved
branch fills the gap when every stage is empty. A return from exception
fetches FADR and then NADR. Handler software therefore never has to decode
the instruction before FADR to work out where to go. That software fix-up
(read FADR and NADR, compare them, load the previous instruction, test
whether it is a branch, patch NADR) would add at least eleven cycles to
every handler.

The RTL is the exception unit of a small processing-in-memory node processor
in the style of the DIVA PIM chip. It contains:

* the PC state machine;
* a tracker of in-flight instructions;
* the FADR/NADR priority encoder;
* the unit that builds the exception source word (ESW) and the unit that
  detects exceptions;
* the protected register file;
* the ELO/CLO bit-scan function that handlers use.

The arithmetic units, the caches and the rest of the core are not included.
The testbench models them.

## Choosing FADR and NADR

When an exception is recognized in the memory stage, `prio_enc` lists the
pipeline slots from oldest to youngest:

    ME, pc-array slot 0, slot 1, ... slot 10, EX, ID, then the fetch pc

The fetch `pc` is the address about to be fetched, and it always counts as
valid. The encoder then applies these rules:

| valid entries in the list | FADR | NADR |
|---|---|---|
| two or more (the fetch pc included) | first valid | second valid |
| only the fetch pc, with a branch target pending in the PC logic | pc | pending target |
| only the fetch pc, nothing pending | pc | pc + 4 |

The order of the list is what makes "first" and "second" mean program order.
The list is in program order for two reasons:

* The pipeline issues in order and never fetches down a wrong path. Branches
  have one delay slot and are resolved in decode.
* The issue logic never lets a younger instruction reach the memory stage
  before an older one.

The second rule is a contract with the surrounding core. `pipe_tracker`
asserts it.

The "pending target" case covers a taken branch that left decode while fetch
was stalled, so its delay slot was not fetched yet. If the branch then
completes and every stage drains, the pipeline holds no trace of the target.
Only `pc_unit` still knows it. The same register holds NADR right after a
return from exception. In that cycle pc is FADR and the next fetch must be
NADR, even if NADR is a branch target.

`tb_ehu_top` checks the claim directly. It keeps the architectural state as a
pair (pc, npc) of a delayed-branch machine and updates it only from
instructions that complete. At every exception, FADR must equal pc and NADR
must equal npc. All three rows of the table, exceptions in delay slots, and
exceptions with a 12-cycle divide still in flight all occur in that test.

## The pipeline the unit expects

    IF (pc) -> ID (id_s) -> EX (ex_s) -> pc array slots 10..0 -> ME (me_s)

* An instruction of latency L spends L cycles in execute:
  * L = 1 goes from EX to ME at the next edge.
  * L >= 2 enters slot L-2 and moves down one slot per cycle.
* With 11 slots the longest latency is 12. The latencies are:

  | unit | latency |
  |---|---|
  | integer | 1 |
  | FP pipe | 5 |
  | FP divider | 12 |

* Each slot carries:
  * a valid bit;
  * the address;
  * the register-write flag (the "regwrite array");
  * the synchronous exception flags raised so far.
* Flags are added where they arise:

  | stage | port | source |
  |---|---|---|
  | fetch | `if_exc` | instruction access |
  | decode | `id_undef`, `id_src` | undefined opcode, system call, privilege |
  | entry to EX/ME | `ex_exc` | FP result |
  | ME | `me_src` | data access |

* The core supplies these handshakes:
  * `fetch`: the instruction at `pc` is taken into decode. This is allowed
    only when decode is empty or issuing.
  * `issue` with `issue_lat`, `issue_regwrite`, and `br_valid`, `br_taken`,
    `br_target` for a branch.
  * `pr_wr_*`: the ME instruction is an MTPR.
  * `rfe`: the ME instruction is a return from exception.
  * `hold`: freezes every stage for a cycle.
* The unit drives:
  * `me_commit` and `me_regwrite`, which gate the ME instruction's state
    update;
  * `flush`.

## Exception sources, masking and priority

Every source except reset and the undefined instruction has one bit in the
32-bit Exception Source Word (ESW). The same bit position is used in EMR
(mask, 1 = enabled), ESR (write 1 to set) and ERR (write 1 to clear).
Priority is fixed by bit position, with bit 31 highest. The layout is this
design's own. It lists the sources in the order memory access, then
execution, then communication:

| bits | sources |
|---|---|
| 31-28 | unmapped / invalid instruction access, unmapped / invalid data access |
| 27 | address fault fix-up (SW) |
| 26-16 | interval timer, WideWord n/a, FP n/a, FP divide by zero, FP invalid, FP over/underflow, FP inexact, system call, privilege violation, integer ALU, WideWord ALU |
| 15-8 | context swap, integer fix-up, WW fix-up, FP fix-up, lock buzzer, thread reschedule, thread dispatch, return to user (all SW) |
| 7-5 | parcel buffer interrupt, send error (SW), parcel doorbell (SW) |
| 4-0 | reserved |

Detection happens in the memory stage (`edu`):

* **Undefined instruction (incl. BRK)**: taken whenever a valid ME
  instruction has the flag. It goes to `0x0800_0100`.
* **All others**: taken when PSW.EE = 1 and (ESW & EMR) is non-zero. They go
  to `0x0800_0200`.
* **Reset**: fetch starts at `0x0800_0000`.

The word the detector sees has two parts:

* the ESW register;
* this cycle's new hardware events: the ME instruction's carried flags, the
  interval timer and the parcel-buffer interrupt.

So a faulting instruction is stopped before it completes. A software set
through ESR, or a clear through ERR, reaches the detector one cycle later,
after the MTPR that wrote it has completed. A software-requested exception
therefore returns to the instruction after the MTPR. An event that is masked,
or that arrives while EE = 0, stays pending in ESW. It is taken as soon as it
is enabled.

A handler services the pending sources in priority order:

1. Read ESW with MFPR.
2. Use ELO (index of the leftmost one; 32 if none) to find the next source.
3. Service it.
4. Use CLO (clear that bit) and repeat from step 2.
5. Write the serviced bits to ERR.

## Protected registers (MFPR / MTPR)

| # | name | behaviour |
|---|---|---|
| 0 | PSW | bit 0 EE (exception enable), bit 1 supervisor mode; reset: supervisor, EE = 0 |
| 1 | SSW | copy of PSW taken on exception entry |
| 2 | - | reserved, reads 0 |
| 3 | FADR | first return address |
| 4-7 | SCR0-3 | scratch |
| 8 | ESW | exception source word (read-only) |
| 9 | EMR | mask |
| 10 / 11 | ESR / ERR | set / clear strobes, read 0 |
| 12 | MADR | data address of the ME instruction at exception entry |
| 13 | TIMER | counts down while non-zero; reaching 0 raises the interval-timer source |
| 14 / 15 | RCL / RCH | 64-bit cycle counter; each half writable |
| 16 | NADR | second return address |

Reads are combinational (the registers sit at decode). Writes land on the
clock edge.

## Entering and leaving a handler

When an exception is recognized in cycle t (with `hold` low), at the edge
that ends t:

* every stage is flushed, and the ME instruction does not complete;
* `pc` <= vector, and any pending target is dropped;
* FADR and NADR are loaded from the encoder, and MADR from `me_maddr`;
* SSW <= PSW;
* PSW.EE <= 0 and PSW.supervisor <= 1.

Clearing PSW.EE blocks nested exceptions until the handler has saved FADR,
NADR and SSW and set EE again. A write through MTPR in the same cycle is
dropped.

When an RFE completes in ME:

* the younger stages are flushed;
* `pc` <= FADR, and NADR becomes the pending target;
* PSW <= SSW.

If an enabled source is still pending, the exception is taken again in the
very next cycle. At that point only the fetch pc is valid, and the encoder
returns (FADR, NADR) unchanged.

A handler for an instruction that must not be re-executed skips it by
writing FADR <= NADR and NADR <= NADR + 4 before the RFE. Undefined
instructions and system calls are such instructions. The skip is correct even
when the skipped instruction was a delay slot, because NADR then already
holds the branch target.

## Files

| file | content |
|---|---|
| `rtl/ehu_pkg.sv` | widths, vectors, register numbers, PSW/ESW bit positions, slot type |
| `rtl/ehu_top.sv` | the unit: all blocks wired together, ELO/CLO beside them |
| `rtl/pc_unit.sv` | PC state machine with the pending-target register |
| `rtl/pipe_tracker.sv` | ID/EX, the 11-slot pc/regwrite array, EX/ME; flush, hold, flag merging |
| `rtl/prio_enc.sv` | FADR/NADR selection |
| `rtl/ecu.sv` | ESW formation (hardware events, ESR set, ERR clear) |
| `rtl/edu.sv` | exception detection and vector choice |
| `rtl/prot_regs.sv` | protected registers, timer, cycle counter |
| `rtl/elo_clo.sv` | encode / clear leftmost one |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

`ehu_top` has one parameter, `NSLOT = 11`, the pc-array depth. Its default
sets the 12-cycle maximum latency. A smaller value shortens the longest
operation the tracker can hold.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. To
build and run one with Verilator 5:

    verilator --binary --timing --assert --top-module tb_ehu_top \
        -y rtl -y tb +libext+.sv -Irtl rtl/ehu_pkg.sv tb/tb_ehu_top.sv
    ./obj_dir/Vtb_ehu_top

`tb_ehu_top` runs the unit at its default size for 40,000 cycles, in well
under a second.

The testbench plays the core:

* It fetches a hash-generated program of integer, FP, divide, branch, memory,
  undefined, system-call and ESR-writing instructions.
* It stalls fetch (including long instruction-cache misses) and issue at
  random.
* It resolves branches at random and injects every kind of fault and
  interrupt.
* It runs real handler sequences at the three vectors through the pipeline.

It checks:

* the completion order against the architectural model;
* FADR, NADR, MADR, PSW and the vector at every exception;
* the exact cycle of every exception against a model of ESW, EMR, EE and the
  timer;
* the MFPR reads;
* ELO/CLO on ESW.

It also counts each mechanism: the three encoder rules, exceptions in delay
slots, divides flushed in flight, and each exception source. A mechanism
that never occurred counts as a failure.

The per-module testbenches compare each block against an independent
reference model:

* `tb_prio_enc`: the queue of valid addresses.
* `tb_pc_unit`: a (pc, follower) pair.
* `tb_pipe_tracker`: arrival times, which also checks every latency to the
  cycle.
* `tb_ecu`, `tb_edu`, `tb_elo_clo`: bit-by-bit references.
* `tb_prot_regs`: a register model, including the exact timer expiry cycle.

## Where this design fills in detail

The FADR/NADR rules, the search order from the memory stage backwards, the
protected register set and numbering, and the vectors come from the DIVA
exception architecture. So do the ESW/EMR/ESR/ERR semantics, the clearing of
EE and entry to supervisor mode, the ELO/CLO functions and the 11-entry pc
and regwrite arrays beside a 5-stage FP pipe and a 12-stage divider.

The following are choices of this design:

* the port conventions towards the core, and branch resolution in decode;
* how the pc array is filled (latency-indexed slots) and its valid bits;
* the ESW bit positions and the fixed priority. The original allows a
  configurable priority assignment, which is not modelled.
* the PSW bit positions and reset value;
* the timer and cycle-counter behaviour;
* MADR loading on every exception;
* PSW <= SSW on return;
* taking undefined instructions regardless of EE, and preferring them when
  both kinds are raised;
* the one-cycle delay of software ESR/ERR writes on detection.

Hardware-malfunction and I/O-device interrupts are named as asynchronous
sources in the original. They have no ESW bit and no port here. Privilege
checking of MFPR/MTPR belongs to the decoder; the unit only offers the
privilege-violation source bit.
