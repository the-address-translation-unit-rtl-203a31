# Segment-based address translation unit for a DIVA PIM node

A DIVA processing-in-memory (PIM) chip holds several nodes. Each node is a
processor next to its own memory bank, and the same memory also serves as
main memory for a host. Each node's processor must turn 32-bit virtual
addresses into 32-bit physical addresses of its own memory. It must also
refuse accesses it is not allowed to make. Page tables would be too costly
on such a node, so the translation uses a few **segments** instead. A
segment is a power-of-two-sized block, from 256 bytes to 16 MB, described
by a handful of registers. A translation is then a small amount of
combinational logic over those registers. There are no table walks and no
TLB misses.

This repository holds synthesizable SystemVerilog for that translation unit
(ATU): the translation logic, the register file that holds the segment
table, a request decoder and the probe circuit. It also has self-checking
testbenches for each part and for the whole unit.

## Address format

Addresses are numbered the way the DIVA documentation draws them: **bit 0 is
the most significant bit**, bit 31 the least. The RTL keeps that numbering by
declaring addresses as `logic [0:31]` (`atu_pkg::addr_t`). So `va[0:4]` below
is literally `va[0:4]` in the code, and it holds the five top bits of the
value.

```
 0      4 5   7 8                                31
+--------+-----+-----------------------------------+
| scope  |index|              offset               |   (local addresses)
+--------+-----+-----------------------------------+
```

| scope `va[0:4]` | address range              | translation |
|-----------------|----------------------------|-------------|
| `00000`         | 0x00000000 - 0x07FFFFFF    | local: `index` picks one of 8 local segments |
| `00001`         | 0x08000000 - 0x0FFFFFFF    | direct (PA = VA), supervisor only |
| `va[0:3] != 0`  | 0x10000000 - 0xFFFFFFFF    | global: compared with all global segments |

When translation is disabled (`xlate_en = 0`), every address passes through
unchanged and no exception is ever raised.

## The segment registers

Each segment has a **limit register** with this layout:

```
 0                      23 24  28  29  30 31
+--------------------------+------+---+-----+
|        limit mask        | rsvd | V | PR  |
+--------------------------+------+---+-----+
```

The limit mask has a 1 in every address bit that lies *inside* the segment.
For a 2^k-byte segment, the limit register value is therefore
`(2^k - 1) & 0xFFFFFF00 | V<<2 | PR`. For example, a valid 64 KB segment with
PR = 01 has the value `0x0000FF05`. The field order limit | V | PR comes
from the DIVA design. The exact bit positions are this implementation's
choice.

The **PR** bits give the access rights:

| PR | supervisor | user |
|----|------------|------|
| 00 | read/write | read/write |
| 01 | read/write | read only |
| 10 | read/write | none |
| 11 | read only  | none |

An instruction fetch is checked as a read.

There are two kinds of segment:

* **8 local segments**, each a *base* register and a limit register.
* **4 global segments** (parameter `NUM_GLOBAL`), each a *virtual base*,
  a limit and a *physical base* register.

## Local translation

The index `va[5:7]` selects a local segment directly. The physical address
is `base | {8'b0, va[8:31]}`. This is an OR, not an add, so the base must be
aligned to the segment size. The checks are made in this order:

1. If the segment's V bit is 0, the result is an **unmapped** exception.
2. If the PR bits forbid this mode and access type, the result is an
   **invalid access** exception.
3. Bounds check. If any offset bit `va[i]`, i = 8..23, is 1 where the limit
   mask bit is 0, the result is an **unmapped** exception. As an equation:
   `E = OR_i (va[i] & ~limit[i])`. Bits 24..31 are never checked, because
   every segment is at least 256 bytes.

## Global translation (reverse lookup)

Global addresses are looked up the other way round. Every global register
set is compared with the address at once, like the tags of a fully
associative cache. Set `g` is *in range* when no bit outside its segment
differs from its virtual base:

```
miss[g] = OR_{i=0..23} ( ~limit[g][i] & (va[i] ^ vbase[g][i]) )      in range = ~miss[g]
```

A set **hits** when it is valid, in range and its PR bits allow the access.
The lowest-numbered hitting set translates the address:
`pa = pbase[g] | (va & {limit[g], 8'hFF})`. The hardware does not stop
software from defining overlapping segments, so this priority is what
decides between them.

* If no set hits but some valid set is in range, the result is an
  **invalid access** exception.
* If no valid set is in range, the result is an **unmapped** exception.
  System software can then resolve the address through the home node that
  owns it; that is outside this unit.

## Structure of the unit

```
             sr_we/sr_addr/sr_wdata/sr_rdata
 scalar unit ───────────────────────────────► atu_regfile ──(all 28 registers, in parallel)──┐
     │                                                                                       │
     │ xlate_en, supervisor, dreq_*, ireq_valid                                               ▼
     └──────────────► atu_controller ── dctl ──► atu_v2p (data)  ── dexc_raw ─► atu_probe ─► dexc, probe_exc
                                     │                         └─ dpa
                                     ├─ ictl ──► atu_v2p (instruction cache) ─► ipa, iexc
                                     └─ probe ──────────────────────────────────► atu_probe
```

| module | role |
|---|---|
| `diva_atu` | top: wires the parts below together |
| `atu_regfile` | segment table. The processor writes it through one 32-bit port; every register is also wired in parallel to both V2P units |
| `atu_controller` | decodes the data request (load/store/probe) and the instruction fetch into the control words of the two V2P units |
| `atu_v2p` | one virtual-to-physical unit: picks direct, local or global translation from the enable bit and the scope field |
| `atu_local_xlate` | local translation and its three checks |
| `atu_global_xlate` | parallel comparison against the global sets, selection, offset masking |
| `atu_pr_check` | the PR access-rights table |
| `atu_probe` | during a probe instruction, moves the data-side exception to `probe_exc` so that the processor does not trap |
| `atu_pkg` | shared types: `addr_t`, `seg_limit_t`, `atu_exc_e`, `v2p_ctl_t`, `mem_op_e`, register map |

The original implementation's area split shows where the cost lies. The
register file was about 60 % of the unit, each V2P unit about 20 %, and the
controller and probe circuit well under 1 %.

### Register map (`sr_addr`)

| address | register |
|---|---|
| 0-7 | local base 0-7 |
| 8-15 | local limit 0-7 |
| 16-19 | global virtual base 0-3 |
| 20-23 | global limit 0-3 |
| 24-27 | global physical base 0-3 |

With another `NUM_GLOBAL`, the global block is `16 + g`,
`16 + NUM_GLOBAL + g` and `16 + 2*NUM_GLOBAL + g`. Reset clears every
register, so every segment starts invalid.

## Timing

* **Translation is purely combinational.** `dpa`, `dexc`, `probe_exc`,
  `ipa` and `iexc` follow the request inputs in the same cycle. The
  original design targets 5 ns for this path in a 0.18 µm process.
* **A register write** takes effect at the rising edge of `clk`. `sr_rdata`
  is a combinational read of register `sr_addr`.
* Software must not rewrite the table while a translation is being
  requested. The register file has no bypass from the write port, and an
  assertion in `diva_atu` flags a write made in the same cycle as a request.

## Top-level interface (`diva_atu`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset (register file only) |
| `sr_we`, `sr_addr[4:0]`, `sr_wdata`, `sr_rdata` | in/out | register-file port |
| `xlate_en` | in | address translation enabled |
| `supervisor` | in | processor is in supervisor mode |
| `dreq_valid`, `dreq_op`, `dva` | in | data request: `OP_LOAD`, `OP_STORE` or `OP_PROBE`, and its address |
| `dpa`, `dexc` | out | data physical address and exception (`EXC_NONE`, `EXC_UNMAPPED`, `EXC_INVALID`) |
| `probe_exc` | out | result of a probe: the exception the address would have raised |
| `ireq_valid`, `iva` | in | instruction-cache request |
| `ipa`, `iexc` | out | instruction physical address and exception |
| `dpath`, `ipath` | out | which translation was used (off / direct / local / global), for observation |

`dpa` and `ipa` are driven whether or not there is an exception. They mean
something only when the exception is `EXC_NONE`. Exceptions are `EXC_NONE`
whenever the matching request valid is low.

## What is fixed by the DIVA design and what is chosen here

These parts follow the DIVA ATU description:

* the address fields;
* the scope decoding and the supervisor-only direct region;
* 8 local and 4 global segments;
* local translation by OR with the base, and global translation by parallel
  range match with OR onto the physical base;
* the PR table;
* the order and kinds of the local checks, and the global exception rules;
* two V2P units, a shared register file, a controller and a probe circuit.

These are choices made here, where the description is silent:

* **Sense of the limit mask.** A 1 marks an in-segment bit. Under this
  reading, the local bounds check is `va[i] & ~limit[i]`. One printed form
  of the local bounds equation also inverts `va[i]`; that form would fault
  on offset 0, so it was not followed.
* **Result of the range-match equation.** It is read as a mismatch: a set is
  in range when the OR is 0.
* Bit positions of V and PR in the limit register.
* The register map, synchronous writes and combinational reads, and reset
  to all-zero.
* Lowest-numbered set wins when global segments overlap.
* A user access to the direct region raises the *invalid access*
  exception. The description only says that it raises an exception.
* A probe is checked as a read. It diverts invalid-access exceptions as well
  as unmapped ones.
* The request signals of the processor (`dreq_op` and so on), and the
  `path` observation outputs.
* Encoding of the exceptions as a 2-bit enum.

Not included: the processor, memory, instruction cache and host-side
system. Home-node translation of remote addresses is also left out; it is
done by software after an unmapped exception.

## Verification

Each module has a testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. All of them check against
`tb/atu_ref_pkg.sv`, an independent reference model. The model describes
segments by base and size and uses arithmetic: in range when
`base <= va < base + 2^k`, and `pa = pbase + (va - vbase)`. It never uses
the limit bit masks. The top-level test `tb_diva_atu` runs at the default
size:

1. It programs the table through `sr_*` and reads it back.
2. It runs a directed sequence.
3. It runs 60 random tables with 100 paired data and instruction requests
   each.

Every result is checked before the next clock edge. The test also counts
each mechanism and fails if one never occurred: translation off, direct
region allowed and refused, the four local outcomes, global hit, unmapped
and protection fault, overlapping global segments, a probe that hid an
exception, a probe of a mapped address, an instruction-side fault, table
rewrites, and both sides in one cycle. Each testbench has also been run
against a deliberately broken copy of its module, and in every case the
testbench failed.

Timing, area and power have not been checked against the original 0.18 µm
implementation. That implementation measured 4.76 ns and about 8 k gates.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/atu_pkg.sv tb/atu_ref_pkg.sv tb/tb_diva_atu.sv --top-module tb_diva_atu
./obj_dir/Vtb_diva_atu
```

To run a block test, replace `tb_diva_atu` with that test's name, for
example `tb_atu_global_xlate`. To lint the RTL:
`verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl +libext+.sv rtl/atu_pkg.sv rtl/diva_atu.sv`.
Verilator reports ascending-range (`[0:31]`) warnings, which is why
`-Wno-fatal` is needed. They are expected, because the ascending ranges are what keep the bit numbering of the address
format.
