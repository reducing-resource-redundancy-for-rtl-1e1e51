# Cheaper redundant multithreading: register bits reuse and friends

A core that detects soft errors by redundant multithreading (RMT) runs every
instruction twice. A *leading* copy runs ahead; a *trailing* copy of the same
instruction follows a fixed number of instructions later (the *slack*, 64
here), and the two results are compared before the instruction is allowed to
change architectural state. Done naively, the trailing thread needs as much
of the machine as the leading one: its own physical registers, ROB entries,
load and store buffer entries. Those duplicated structures are what limits
the performance of such a core.

This RTL is the part of the core that cuts that duplication. It watches what
the leading copy produced and gives the trailing copy as little as it can
get away with, without giving up the check:

* **Register bits reuse (RBR).** Most integer results are *narrow*: 16 of
  their 32 bits are only a sign or zero extension. A narrow leading result is
  stored compressed in the low half of its register, and the trailing copy
  writes its own result into the high half of the *same* register. No second
  register is used, and both results are still kept for the compare.
* **ROB reduction.** A trailing copy that uses the same register as its
  leading copy, and every branch or jump, does not take an entry of the
  trailing ROB section: it is checked through the leading entry. The
  trailing section is therefore 32 entries instead of 64.
* **LSB reduction.** A trailing load never takes a load buffer entry, and a
  trailing store takes one of 5 trailing store buffer entries only when it
  cannot be checked in the leading entry.
* **Register value reuse (RVR).** When a normal-width leading result equals a
  value already held in another register, the trailing copy is pointed at
  that register instead of getting a new one.
* **Load value buffer reduction (LVBR).** The trailing load gets its value
  from the leading load through a load value buffer; a narrow loaded value is
  replicated into the register instead and needs no buffer entry.

All checks that were done by comparing full copies are still done, either
by comparing the two halves of a shared register, or by extra status and
parity bits described below.

## Sizes

The package `rtl/rbr_pkg.sv` holds the default sizes, those of the machine
this design was sized for (an 8-wide out-of-order core running a 32-bit
RISC instruction set with 32 architectural registers):

| item | size |
|---|---|
| integer physical registers | 128 |
| ROB, leading / trailing section | 160 / 32 |
| load buffer, leading / trailing | 40 / 0 |
| store buffer, leading / trailing | 35 / 5 |
| RVR CAM | 8 entries |
| load value buffer | 16 entries |
| slack | 64 instructions |
| commit budget | 4 ROB entries per cycle |

These come from a base RMT machine with a 192-entry ROB split 128/64 and
40-entry load and store buffers split 30/10 between the threads. RBR lets
the trailing parts shrink to 32, 0 and 5 entries, and the freed entries go
to the leading thread.

## The narrow encoding

A 32-bit value is narrow when its upper 16 bits, or its lower 16 bits, are
all zeros or all ones. Three status bits are kept next to each physical
register (`narrow_detect`, `rbr_regfile`):

* `width` - the register holds a compressed narrow value;
* `location` - 1 if the redundant half is the upper one, 0 if it is the
  lower one;
* `value` - 1 if the redundant half is all ones.

So `0xfa25ffff` has status `101` and its significant part is `0xfa25`. The
leading copy's significant part goes in bits 15:0; a trailing copy sharing
the register writes its own significant part in bits 31:16, so a correct
pair leaves `0xfa25fa25` in the register. A reconstruct stage after register
read (`value_reconstruct`) puts the redundant half back, taking the
significant part from the low half for leading readers and from the high
half for trailing readers. The status bits carry a parity bit; a parity
error on read is reported.

The trailing copy does not know in advance that its result will be narrow;
it only knows that the leading one was. If the trailing result does not fit
in 16 bits, or its status bits differ from the leading ones, the register
file flags it (`tw_fault_o`) and the instruction is marked faulty in the
ROB.

## Who gets which register

`reg_usage` keeps two usage bit vectors, one per thread, plus a parity
vector over them. A register is free only when neither thread uses it,
which is how one register can be owned by both copies at once. The
trailing copy is renamed at the ROB's *replica pointer*, the next leading
entry whose copy has not been renamed. Its register is chosen in this order:

1. **shared** - the leading result was narrow (size bit set in the ROB): use
   the leading register, high half;
2. **reused** - the RVR CAM found the leading result in another register:
   use that register;
3. **own** - take a free register.

The trailing map table records, per architectural register, whether the
trailing mapping is the leading copy's own register (the *map bit*, kept
twice; both copies must agree) and whether trailing readers must take the
high half. A branch misprediction clears all map bits.

## The ROB and its checks

`rbr_rob` has a leading section (160) and a trailing section (32). A
trailing copy needs a trailing entry only when it has a register of its own
or a reused one; shared copies and all control instructions ride on the
leading entry. Because the trailing thread then never writes that entry,
three pieces of protection are added:

* a **check bit** in each trailing entry says whether the trailing copy was
  given the leading register. At commit the leading and trailing register
  identifiers must match when the bit is set and differ when it is clear;
* a **parity-bits buffer**: the parity of a leading entry is generated by
  the trailing copy, from its own view of the instruction, and checked
  against the entry at commit. A *valid-parity* bit, kept twice, says that
  the parity has been written;
* the **size bit** of the leading entry, which drives the sharing decision.

Results of both copies are kept in `value_buffer` and compared at commit; a
shared register is one word holding both halves.

**Commit width.** The commit logic reads at most four ROB entries per cycle
(`commit_limiter`). A pair that shares its entry costs one, a pair with a
separate trailing entry costs two, so four shared pairs, or three pairs when
some are separate, or two separate pairs retire per cycle. The decision is
made combinationally in the commit cycle (the original scheme makes it one
cycle earlier).

## Load/store buffer

`lsb_check` has an LSB pointer to the next leading memory instruction whose
trailing copy is to be dispatched. When the trailing copy dispatches:

| situation | mode | what happens |
|---|---|---|
| leading address known | SHARE | no entry; the trailing address (and store value) is compared with the leading entry |
| load, leading address not yet known, one address operand | DEPEND | no entry; waits on the leading load |
| load with two register operands, leading address unknown | STALL | dispatch stalls |
| store whose value is not narrow, or leading address unknown | SEP | takes one of the 5 trailing store entries |

Once checked, a shared store entry's address is protected by a parity bit
until it commits.

## RVR

`rvr_cam` is an 8-entry fully associative CAM of (value, register). A normal
leading result is looked up; on a hit the register in the entry becomes the
trailing copy's *candidate* and the entry is moved to the new register; on a
miss the least recently filled entry is replaced. An entry is invalidated
when the leading instruction that redefines its register commits. A
candidate-valid bit vector in `reg_usage` marks candidates; a leading
instruction that allocates a register with that bit set does not access the
CAM.

## Load value buffer

`load_value_buffer` is fully associative, 16 entries of (leading register,
loaded value). The trailing load broadcasts the leading load's register and
reads the value (freeing the entry), or waits. A narrow loaded value whose
trailing copy is not yet renamed is not buffered: the trailing copy will
share the register, where the value is already replicated.

## Slack control

`slack_ctrl` lets the trailing thread rename when the leading thread is 64
instructions ahead, and also (with `violate_en`) when the leading thread is
stalled, so the slack is violated only when the leading thread could not
use the cycle anyway. When nothing trailing is in flight and the leading
thread is stuck, an escape releases the trailing thread regardless of the
slack; at the end of a program `drain` lets it catch up.

## Where this design departs from the scheme

* **One instruction per thread and cycle** enters each port of
  `rbr_rmt_top`; the machine the sizes come from is 8 wide. Commit is four
  pairs wide as described.
* **No squash.** The scheme escapes a deadlock (a full resource and no
  trailing instruction in flight) by squashing younger leading
  instructions. Squash and branch recovery are not built (a mispredict only
  clears the map bits). Instead the leading thread keeps a reserve of free
  registers for trailing copies that may need one, dropped when a leading
  result turns out narrow; and the load value buffer keeps its last entry for
  the oldest instruction in flight.
* **Candidate pinning.** A register with its RVR candidate bit set stays out
  of the free pool until it is reused, so it cannot be reallocated and
  overwritten before the trailing copy points at it.
* **Integer only.** The floating-point register file and its datapath have
  the same structure and are not built; the RVR CAM carries a type bit.
* Backend (committed) map tables, the issue queue, functional units, caches
  and the fetch/decode front end are outside this unit; the unit's ports are
  where they would connect. The load/store buffer is reached through its own
  `m_*` port group.
* Free-register selection, the port handshakes and the reset state
  (registers 0..31 map the architectural registers of both threads) are this
  design's own.

## Files

| file | block |
|---|---|
| `rtl/rbr_pkg.sv` | sizes, status-bit struct, trailing allocation kinds |
| `rtl/narrow_detect.sv` | narrow test, status bits, significant half |
| `rtl/value_reconstruct.sv` | rebuild 32 bits from a register half and its status |
| `rtl/rbr_regfile.sv` | register file with status and parity vectors |
| `rtl/reg_usage.sv` | usage vectors, parity, candidate-valid, free lists |
| `rtl/rvr_cam.sv` | RVR CAM |
| `rtl/rbr_rename.sv` | leading and trailing map tables, map bits |
| `rtl/rbr_rob.sv` | two-section ROB, replica pointer, commit checks |
| `rtl/commit_limiter.sv` | commit count under the 4-entry budget |
| `rtl/value_buffer.sv` | results of both copies for the commit compare |
| `rtl/slack_ctrl.sv` | slack, violation, deadlock escape, drain |
| `rtl/load_value_buffer.sv` | load value forwarding with LVBR |
| `rtl/lsb_check.sv` | load/store buffer sharing and checks |
| `rtl/rbr_rmt_top.sv` | the whole unit |

Every block has a self-checking testbench `tb/tb_<block>.sv` that compares
against a model written independently in the testbench and ends with a
`TB_RESULT checks=N failures=M` line.

`tb/rmt_driver.sv` plays the rest of the core for the top: it generates a
random program (ALU, loads, stores, branches; mostly narrow values, some
repeated ones), runs it through both threads, injects faults into some
trailing results, and checks every forwarded value, every operand read and
the commit stream (each injected fault must be reported, and nothing else).
It counts each mechanism (shared, reused and own registers, shared and
separate ROB entries, CAM hits, every slack reason, LVB skips and full
stalls, four-wide commits, every LSB mode, mispredicts) and counts a failure
for any that never happened. `+trace` prints every event.

* `tb/tb_rbr_rmt_top.sv` - a small configuration (64 registers, 16/4 ROB,
  2-entry load value buffer) that drives the unit into its corner cases,
  including the deadlock escape, for 8000 instructions.
* `tb/tb_rbr_rmt_full.sv` - the unit at its default sizes, 4000
  instructions.
* `tb/tb_rbr_rmt_sens.sv` - six copies of the unit side by side
  (`tb/rmt_system.sv` wraps one unit and its driver) at the sizes of a
  sensitivity study, each changed alone: 96 and 164 physical registers;
  ROBs of 128 and 256 entries in total (112 + 16 and 208 + 48); load/store
  buffers of 32 and 24 entries in total (32 load and 28 + 4 store entries,
  24 load and 21 + 3 store entries). With 96 registers the register file
  becomes the bottleneck and the deadlock escape is used hundreds of times.

No size has to be a power of two.

## Simulating

With Verilator 5:

    verilator --binary --timing -Wno-fatal rtl/rbr_pkg.sv $(ls rtl/*.sv | grep -v rbr_pkg) \
        tb/rmt_driver.sv tb/tb_rbr_rmt_top.sv --top-module tb_rbr_rmt_top
    ./obj_dir/Vtb_rbr_rmt_top +verilator+seed+7

For a unit testbench, list `rtl/rbr_pkg.sv`, the block's file(s) and its
testbench. The sizes are parameters of each module, with the package
values as defaults; the top passes its parameters down.
