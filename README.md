# CCTAG tag unit: combinable memory-tag policies for a RISC-V core

Tagged memory attaches a few hidden bits to every piece of data and lets the
hardware check or change those bits on each load and store. A tag is useful for
many defences: colouring heap chunks against overflow and use-after-free,
write-protecting return addresses, marking code pointers, tracking tainted
data. Each defence usually wants its own tag width, its own granularity and
its own check rules. This design lets up to **four such policies run at once
on the same tag storage**, without fixed tag semantics in hardware.

The key idea is a fixed *ratio* instead of a fixed tag format. Every 64-byte
line carries 16 tag bits, so one tag bit stands for 4 bytes of data. A
policy chooses:

* a **granularity** from 4 to 64 bytes. Coarser granules give more bits per
  granule: 1 bit per 4 B, 2 per 8 B, 8 per 32 B, 16 per 64 B;
* a **16-bit policy mask**, which says which of the line's tag bits belong to
  this policy;
* a **check rule** and check value for loads and, separately, for stores;
* an **update rule** for stores, a load-propagate flag and an ALU
  propagation rule for register tags.

Policies whose masks are disjoint never disturb each other. Policies enabled
on different pages may even share bits. Each page enables a subset of the
four policies through a 4-bit bitmap held in its TLB entry.

The SystemVerilog here is the tag machinery that sits beside an in-order
core's data cache: policy registers, TLB bitmap, tag control logic, line-tag
store, register tags, pointer tags and a tag path to memory with its own
small cache. The core pipeline, the data array of the cache, the on-chip bus
and DRAM are outside; their connections are ports of `cctag_top`.

## Three kinds of tags

| tag | width | where | set by |
|---|---|---|---|
| memory tag | 16 bits per 64-byte line | L1 line-tag store, then a reserved DRAM region | stores (update rules), `mt*` instructions |
| pointer tag | 8 bits, pointer bits 55..48 | the pointer itself | `ptw` / `pts` / `ptc` |
| register tag | 2 bits per integer register | register-tag file | loads (propagation), ALU ops, `rtr/rtw/rts/rtc` |

Address generation ignores pointer bits 55..48 (top-bits-ignore). The tag
bits are replaced by copies of bit 47 before translation.

## How one access is checked: masks

For every policy `p` that is enabled globally **and** in the page's bitmap,
`cctag_tag_ctrl` builds a mask in three steps:

1. It finds the effective block size `eff = max(4 B, access size, 2^gran)`.
2. The **access mask** is the set of tag bits covering the aligned
   `eff`-byte block that contains the address (`cctag_access_mask`). An
   8-byte store into a policy with 32-byte granularity therefore touches the
   whole 32-byte granule.
3. The **final mask** is the access mask AND the policy mask.

Under its final mask each policy yields four things. The four policies'
results are ORed together; disjoint masks make that exact.

* **Check mask and value.** The rules are:

  | rule | bits checked | expected value |
  |---|---|---|
  | `NONE` | none | |
  | `EQUAL` | all masked bits | the pointer tag, repeated to 16 bits (bit `i` compares with pointer-tag bit `i mod 8`) |
  | `UNCOND` | all masked bits | the configured 0 or 1 |
  | `COND` | only where the repeated pointer-tag bit is 1 | the configured 0 or 1 |

* **Update mask and value** (stores only). `SET` writes 1 and `UNSET`
  writes 0. `PROP` writes the stored register's 2-bit tag, repeated 8 times.
* **Load-propagate mask.** Under it, the loaded word's tag bits go to the
  destination register tag. Every other register-tag bit of a load is 0.
* **needs_tag.** Set if this policy has any work on the access.

`cctag_tag_check` then does the work on the line tag:

* `bad = (line_tag ^ chk_val) & chk_mask`;
* a non-zero `bad` is a tag fault, and the access changes nothing;
* otherwise the new tag is `(line_tag & ~upd_mask) | (upd_val & upd_mask)`.

The example in `tb_cctag_tag_ctrl` is a configuration of this kind:

* heap colouring with 4 bits per 32 B on the even tag bits;
* return-address protection with 1 bit per 8 B, also on the even bits but
  only on stack pages;
* code-pointer marking with 1 bit per 8 B on the odd bits, on all data
  pages.

## ALU propagation of register tags

Each register-tag bit `j` follows one policy: the lowest-numbered enabled
policy with an ALU rule whose mask owns a tag bit `i` with `i mod 2 = j`.
This mapping works because a register is 8 bytes and so corresponds to 2 tag
bits. The two rules are:

* `OR` on every arithmetic or logic instruction (taint tracking);
* `XOR` on ADD and SUB only (pointer tracking). A pointer plus an offset
  stays a pointer, and a pointer minus a pointer is a plain number.

Immediate operands carry tag 0. Instructions of class `NONE` (for example
`lui`) produce tag 0.

## Explicit tag operations (`req_op`)

| op | effect |
|---|---|
| `LOAD` / `STORE` | policy checks and updates as above |
| `LDP` / `SDP` | as LOAD/STORE, but the addressed 8-byte word's 2 tag bits always move to/from the register tag, whatever the page enables |
| `MTRD` / `MTWD` / `MTSD` / `MTCD` | read / write / set / clear the 2 tag bits of an 8-byte word. The operand is `req_val[1:0]` |
| `MTR` / `MTW` | read / write all 16 bits of a line tag |

Explicit operations skip policy checks. A tag fault reports the failing bits
in `resp_bad_bits`; the core turns it into an exception.

## Where memory tags live

Tags are kept in a reserved region that is 1/32 of physical memory.

* With 32-bit physical addresses, the region is `TAG_BASE = 0xF800_0000`
  up to the top of memory.
* Data line `L` (address bits 31..6) has its 16-bit tag at byte address
  `TAG_BASE + 2*L`.
* One 64-byte tag line therefore covers 32 data lines, or 2 KiB of data.

Tags move between three levels:

1. **L1 line tags** (`cctag_l1_tags`). These mirror the data cache:
   256 sets × 4 ways × 64 B = 64 KiB of data, with tree pseudo-LRU
   replacement. Each line holds its 16-bit tag plus two bits:
   * **tag-valid** means the tag was fetched;
   * **tag-dirty** means it was changed.
2. **Data tagger** (`cctag_data_tagger`). It accepts line transfers with a
   *need-tag* bit and a *need-data* bit, does the data part on the data
   port and the tag part through the tag cache, and answers when both are
   done.
3. **Tag cache** (`cctag_tag_cache`). This is 4-way with 64-byte lines,
   8 sets (2 KiB), write-back and write-allocate, with pseudo-LRU. A hit
   answers two cycles after the request is accepted. A miss writes back a
   dirty victim and then refills from the tag region.

Traffic is avoided wherever possible:

* A miss whose access needs no tag work fills data only and leaves the line
  tag-invalid.
* Only a dirty tag is written back; a clean or invalid tag costs nothing on
  eviction.
* `MTW` overwrites the whole tag, so its fill does not fetch the old one.
* A later hit that does need the tag fetches **only** the tag.

## `cctag_top`: one access, cycle by cycle

The unit handles one request at a time, in step with a blocking data cache.

| state | what happens |
|---|---|
| `IDLE` | accept `req_*`, strip the pointer tag |
| `XLATE` | TLB lookup. On a miss, answer `resp_tlb_miss`; the host refills through `refill_*` and replays the access |
| `L1` | look up the line tag. If usable, do the check and update and go to `RESP`. Otherwise go to `WB` and/or `FETCH` |
| `WB` | tag-only write-back of a dirty victim |
| `FETCH` | fill the line (data and, if needed, tag) or fetch the tag alone, then return to `L1` |
| `RESP` | one-cycle `resp_valid` |

Latency:

* An L1 hit answers three cycles after acceptance.
* A tag-cache hit adds two cycles per transfer.
* A miss adds the memory latency of the `dmem_*` / `tmem_*` ports.

`perf_evt` pulses once per event, for hardware performance counters. The
events are: TLB miss, L1 tag work, fill with tag, fill without tag, tag-only
fetch, tag write-back, tag-cache hit and tag-cache miss.

### Other interfaces of the top

**CSRs.**

* `0x5C0`–`0x5C3` hold the four policies. The bit layout is in
  `cctag_pkg::policy_cfg_t`: enable, mask, granularity, load rule, load value,
  store rule, store value, load-propagate, store update and ALU rule.
* `0x5C8` holds all 32 register tags, so a trap handler can save and restore
  them.
* Reset disables every policy.

**Register-tag instructions.** `rt_*` is combinational for reads and takes
effect at the clock edge for writes.

**ALU write-back.** `alu_*` writes the result tag of an ALU instruction. A
load's tag write-back and an ALU write-back never happen in the same cycle
(an assertion checks this).

**Pointer-tag instructions.** `pt_*` is combinational.

## Files

| file | contents |
|---|---|
| `rtl/cctag_pkg.sv` | widths, CSR numbers, rule encodings, `policy_cfg_t`, mask and PLRU helpers |
| `rtl/cctag_access_mask.sv` | per-policy access mask |
| `rtl/cctag_policy_csr.sv` | four policy CSRs |
| `rtl/cctag_tag_ctrl.sv` | masks and rules of all policies → check / update / propagate vectors |
| `rtl/cctag_tag_check.sv` | masked compare and masked update of a line tag |
| `rtl/cctag_tlb.sv` | fully associative TLB with a policy bitmap per entry |
| `rtl/cctag_ptr_tag.sv` | top-bits-ignore and `ptw/pts/ptc` |
| `rtl/cctag_alu_tag_prop.sv` | OR / XOR register-tag propagation |
| `rtl/cctag_regtag_file.sv` | 32 × 2-bit register tags |
| `rtl/cctag_l1_tags.sv` | L1 line-tag store with valid / dirty bits |
| `rtl/cctag_tag_cache.sv` | tag cache |
| `rtl/cctag_data_tagger.sv` | tag-region addressing and transfer sequencing |
| `rtl/cctag_top.sv` | everything wired together |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_cctag_scenarios.sv` | protection scenarios run on the full top |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
For example:

```
verilator --binary --timing --assert -Irtl --top-module tb_cctag_top \
    rtl/cctag_pkg.sv $(ls rtl/cctag_*.sv | grep -v _pkg) tb/tb_cctag_top.sv -o sim
./obj_dir/sim
```

The package must come first on the command line.

`tb_cctag_top` runs at the full default sizes in well under a second. It
contains three pieces.

* **Memory model.** A behavioural memory with random latencies.
* **Page table.** 40 pages, more than the TLB holds, mapped so that every
  page lands on the same quarter of the L1 sets. This makes evictions and
  dirty write-backs frequent.
* **Reference model.** It holds every line tag and register tag. For each
  of 6000 random operations it predicts the fault, the read data and the
  new tags bit by bit.

Four policies are active in that test:

| policy | pages | tag bits | rules |
|---|---|---|---|
| heap colouring | heap | even bits, 32 B granules | `EQUAL` check |
| return addresses | stack | even bits, 8 B | `UNCOND` check against 0 |
| pointer marking | heap and stack | odd bits | `COND` load check, stores clear, `XOR` ALU rule |
| information flow | flow-tracking pages | even bits | load and store propagation, `OR` ALU rule |

The run also walks through a return-address save, protect and reload
sequence. It counts every mechanism (TLB miss, each fill kind, tag-only
fetch, tag write-back, tag-cache hit and miss, each check rule firing, each
update rule, propagation, CSR save and restore, pointer ops) and fails if
any of them never happened.

`tb_cctag_scenarios` runs the defences as code patterns, also at full
size. Each scenario checks both sides: benign steps never fault, and every
attack step faults. The scenarios are:

* no protection, with no tag traffic at all;
* return-address protection over nested call frames, with overflow writes
  onto the saved return address;
* code and vtable pointers marked by a trusted writer, then overwritten or
  forged;
* heap colouring, with overflow into the neighbouring chunk and use after
  free;
* a dangling-pointer sweep that finds exactly the memory slots holding
  heap pointers and clears them;
* all three protections together on shared tag bits.

The TLB, L1, tag-cache and data-tagger testbenches use small sizes to reach
replacement quickly. The others run at their only size.

## Departures, choices and what is not here

The document fixes these points, and this design follows them:

* the 1:32 tag ratio;
* 16-bit line tags;
* 8-bit pointer tags in bits 55..48;
* 2-bit register tags;
* four policies and the 4-bit page bitmap;
* the check and update rules and the access-mask rule;
* the tag-valid and tag-dirty optimisations;
* a 4-way, 64-byte-line tag cache of 2 KiB with a 2-cycle hit;
* a 64 KiB data cache with PLRU.

This design chose the following itself:

* **Number formats.** CSR numbers, CSR field layout, opcode encodings and
  operand formats of the tag instructions.
* **Sizes.** 4 ways for the L1, a 32-entry fully associative TLB with
  round-robin refill, and the tag-region base.
* **Register-tag bits.** The lowest-policy rule that maps register-tag bits
  to policies, and repetition as the way to widen a pointer tag or register
  tag to 16 bits.
* **Interfaces and timing.** The handshakes and state machine of the top,
  the three-cycle hit latency, and the register-tag save CSR.
* **Tag-only transfers.** A *need-data* bit in the data tagger, so that a
  tag can be moved without its data.
* **Out-of-range values.** A written granularity outside 4..64 bytes is
  clamped.
* **Explicit tag instructions bypass policy checks.** They are meant for
  the trusted allocator and runtime.

Things not built:

* the core pipeline and its exception handling;
* the data array and data write-back of the cache;
* the on-chip bus with its tag field;
* the page-table walker change that reads the bitmap from page-table
  entries (the entry format is not given, so the bitmap enters the TLB
  through the refill port);
* DRAM.

Register-tag checks at branches are mentioned as a possibility for flow
tracking, but no rule format is given for them, so there are none. With two
register-tag bits, the ALU rules can serve at most two policies at a time.

The top handles one request at a time. It does not overlap a miss with
later requests.
