# FlexFilt: per-page hardware instruction filtering

Some security mechanisms rely on certain instructions never running in
untrusted code. One example is the instruction that rewrites memory-protection-key
permissions. Another is a kernel instruction that switches page tables. The
usual guard is to scan binaries and rewrite them. That is expensive, and it is
hard to do for code generated at run time by a JIT compiler. FlexFilt moves the
check into the pipeline. Every executable page gets a small *instruction
protection key* (ipkey), so pages fall into instruction domains. A few
configurable *Flexible Filters* recognise instructions. A per-domain register
says which filters apply to code in each domain. In the execute stage, an
instruction that a filter catches, in a domain where that filter is enabled,
becomes an illegal-instruction exception. Nothing is scanned and nothing is
rewritten, and the check adds no cycles.

This repository holds synthesizable SystemVerilog for the FlexFilt hardware of
a 64-bit RISC-V in-order core (Sv39 paging). It covers the changes to the
instruction TLB, the path that carries the ipkey through fetch, queue and
decode, and the execute-stage filter logic. The core's page table walker,
instruction cache arrays, decoder, register file and trap logic are not
included. The top module connects to them through ports.

## Instruction domains

The ipkey is 4 bits wide, so there are 16 domains. It is stored in the page
table entry in bits 57:54. These are the low four of the ten bits (63:54) that
Sv39/Sv48 reserve. The operating system sets the key when it maps a page. When
the I-TLB is filled from the page table walker, it copies the key into the
entry next to the physical page number and the X and U bits (`itlb.sv`).

From then on, the key travels with the instruction:

```
fetch_vaddr --> I-TLB --paddr--> instruction cache (outside)
                  |                    |
                ipkey --> fetch register <-- instruction
                               |
                     instruction queue {instr, pc, ppc, ipkey, fault}
                               |
                        decode register
                               |
                        execute register --> flexfilt_unit --> exception
```

Domain 0 is simply the key of pages that were never given another one. In the
usual setup, ordinary code stays in domain 0. Trusted functions are placed on
their own pages with a different key, and the filters are enabled only for
domain 0.

## Flexible Filters: Match and Mask

A filter (`flexible_filter.sv`) holds two 32-bit words:

* **Mask**: a 1 marks a don't-care bit. Those bits of the instruction are forced to 0.
* **Match**: the masked instruction is compared with Match. Equality is a hit.

The hit condition is therefore `(instr & ~Mask) == Match`. With the right
don't-care bits, one filter catches:

| target | Match | Mask |
|---|---|---|
| one exact instruction, e.g. `ret` (`jalr x0, 0(x1)`) | `0x00008067` | `0x00000000` |
| BLT, BGE, BLTU, BGEU (opcode 1100011, funct3 = 1xx) | `0x00004063` | `0xFFFFBF80` |
| every LOAD and STORE (opcode 0-00011) | `0x00000003` | `0xFFFFFFA0` |
| a whole opcode group, e.g. every ALU-immediate instruction (opcode 0010011) | `0x00000013` | `0xFFFFFF80` |

Match is compared in full. A Match with a 1 in a masked position can therefore
never hit. Reset uses this: Match = Mask = all ones, so every filter starts
disabled.

## The Instruction Protection Register (IPR)

There are four shared filters, and each domain chooses any subset of them. The
choice is held in the 64-bit IPR (`ipr.sv`). Domain *d* owns bits
`[4d+3:4d]`, and bit `4d+v` enables filter *v*. In the execute stage the ipkey
of the instruction selects its four bits. This is a combinational read. Shared
filter *i* stops the instruction when all three of these hold:

1. filter *i* hits;
2. IPR bit `4*ipkey + i` is set;
3. the core's current privilege level equals the level stored in the filter's
   priv field (normally U).

The four results are ORed together. The OR also takes the kernel-level result
(below), and the output is the illegal-instruction exception (cause 2). A
stopped instruction has no other effect. This matters for the custom
instructions below. If one filter catches the FlexFilt configuration
instructions, the configuration is locked for that domain.

## Kernel-level filters

User-level filtering is configured by the process itself. Kernel code gets
its own filtering in `kernel_filter_unit.sv`:

* Four dedicated Flexible Filters, separate from the shared four.
* Two physical address ranges, each a base/bound pair of CSRs (base
  inclusive, bound exclusive). The filters act only on supervisor-mode
  instructions whose physical pc lies in either range. Two ranges let the
  kernel text on both sides of one allowed routine, such as the context-switch
  code, be filtered while that routine is not.
* All of these registers are machine-mode CSRs. A write from S- or U-mode is
  refused and flagged on `csr_illegal`, so the core can trap. Boot firmware
  sets them up before the kernel starts. They are not saved on context
  switches.

| CSR | address |
|---|---|
| kernel filter Match 0-3 | `0x7C0`-`0x7C3` |
| kernel filter Mask 0-3 | `0x7C4`-`0x7C7` |
| range 0 base / bound | `0x7C8` / `0x7C9` |
| range 1 base / bound | `0x7CA` / `0x7CB` |

Reset disables all four filters and leaves both ranges empty.

## Custom instructions

FlexFilt is configured with R-type instructions on the custom-0 major opcode
(`0001011`), with funct3 = 0. funct7 selects the operation. The constants are
in `flexfilt_pkg.sv`.

| funct7 | name | effect | allowed in |
|---|---|---|---|
| 0 | SETMATCH | Match[rs2] = rs1[31:0] | any mode |
| 1 | SETMASK | Mask[rs2] = rs1[31:0] | any mode |
| 2 | SETPRIV | priv[rs2] = rs1[7:0] | any mode |
| 3 | WRIPR | IPR bit (4·rs1 + rs2) = 1 | any mode |
| 8 | RDMATCH | rd = Match[rs2] | S and M |
| 9 | RDMASK | rd = Mask[rs2] | S and M |
| 10 | RDPRIV | rd = priv[rs2] | S and M |
| 11 | RDIPR | rd = IPR | S and M |
| 12 | LDIPR | IPR = rs1 | S and M |

The first four implement the user API. `config_filter(match, mask, priv, index)`
issues SETMATCH, SETMASK and SETPRIV. `config_instr_domain(domain, filter)`
issues WRIPR. WRIPR can only set bits. The five privileged operations let the
kernel save and restore a process's filters and IPR on a context switch, and
LDIPR is also the way to clear IPR bits.

The priv byte of a shared filter:

* bits 1:0: the privilege level whose instructions the filter inspects
  (0 = U after reset). SETPRIV may not name a level above the current one, so
  user code can only filter user code.
* bit 2: seal. A sealed filter refuses SETMATCH, SETMASK and SETPRIV from
  U-mode. S-mode can still restore it on a context switch.

The unit raises an illegal-instruction exception for any of these:

* an index out of range (filter ≥ 4, domain ≥ 16);
* a privileged operation from U-mode;
* a SETPRIV that names a level above the current one;
* a write from U-mode to a sealed filter.

A write takes effect at the next clock edge, so the next instruction already
sees it.

## Pipeline timing and interfaces (`flexfilt_top`)

* **Fetch.** A fetch address is accepted (`fetch_ready`) only when the I-TLB
  hits and the fetch register is free or completes in that cycle. The cache
  request (`imem_req_*`) goes out in the same cycle. The response may arrive
  one or more cycles later, and only one access is outstanding. A new access
  can start in the cycle the previous one completes, so fetch sustains one
  instruction per cycle.
* **I-TLB misses.** A miss raises `ptw_req_valid` for one cycle with the VPN.
  The walker answers with `ptw_resp_valid` and the leaf PTE, which fills the
  TLB. The fetch is then retried.
* **Fetch faults.** A page that is not executable or has the wrong U bit for
  the current mode produces a packet with the fault flag. It reports cause 12
  in execute.
* **Queue and pipeline registers.** The 4-entry queue (`inst_queue.sv`) feeds
  the decode register, then the execute register. `stall` holds both
  registers. `flush` empties fetch, queue, decode and execute, and asserts
  `imem_kill` if a cache access is in flight.
* **Latency.** With a cache that answers in the next cycle and no stalls, an
  instruction accepted in cycle *t* is reported by execute in cycle *t+4*.
  The filter check is combinational inside that cycle.
* **Execute operands.** The execute stage names its source registers on
  `ex_rs1_idx`/`ex_rs2_idx` and expects their values back combinationally on
  `ex_rs1_data`/`ex_rs2_data`.
* **Execute results.** The result appears on `ex_out_*`: pc, instruction,
  ipkey, exception and cause, whether a filter caused it, and the register
  write of a privileged read. The core is expected to flush and redirect after
  an exception.

## Configuration sizes

| parameter | value | origin |
|---|---|---|
| shared Flexible Filters | 4 | design |
| instruction domains / ipkey width | 16 / 4 bits | design |
| IPR | 64 bits | design |
| kernel-level filters | 4 | design |
| kernel address ranges | 2 base/bound pairs | design (read as two ranges) |
| I-TLB entries (`TLB_ENTRIES`) | 32, fully associative, round robin | own choice |
| instruction queue (`IQ_DEPTH`) | 4 | own choice |

The filter state is 4 × (32 + 32 + 8) bits for the shared filters, 64 bits
for the IPR, 4 × 64 bits for the kernel Match/Mask and 4 × 56 bits for the
ranges. That is 832 flip-flops, and the TLB adds 4 bits per entry. An FPGA
prototype of the original design was reported at about 550 extra flip-flops
and roughly 1% more LUTs than its baseline core. The full-width range
registers and the priv byte account for most of the difference here.

## Where this implementation makes its own choices

The following follow the original design: the filter mechanism, the counts,
the IPR layout and its AND/OR rule, the PTE bits of the ipkey, the
machine-only kernel filters with address-range CSRs, and the rule that shared
filters act on user-level instructions.

The following are this implementation's own choices:

* **Encodings.** The instruction encodings and funct7 values, the CSR
  addresses, and the names and exact effects of the five privileged
  instructions.
* **priv byte.** The level field is compared with the current mode, and the
  seal bit is this implementation's form of sealing a filter.
* **Address ranges.** They are read as two ranges whose union is filtered.
* **Errors and reset.** Out-of-range operands trap. Reset disables every
  filter.
* **I-TLB.** 4 KiB pages only, with no superpages and no ASIDs. Replacement is
  round robin.
* **Pipeline.** The ipkey waits in the fetch register next to the cache
  access. The original design passes it through the instruction cache itself,
  but the effect is the same. All port handshakes are this implementation's
  own.
* **No hypervisor mode.** The kernel filters cover supervisor mode only.

## Verification

Each module has a self-checking testbench in `tb/` that compares it with an
independent reference. Each one ends with a `TB_RESULT checks=N failures=M`
line.

* `tb_flexible_filter`: all branch funct3 values against the BLT..BGEU filter,
  the `bltu` example `0x03776263`, `ret`, the LOAD/STORE group, one filter
  per RV64I opcode group (LUI, AUIPC, JAL, JALR, BRANCH, LOAD, STORE, ALUI,
  ALU, FENCE, ECALL/EBREAK) against instructions of every group, and 2000
  random configurations against a per-bit reference.
* `tb_ipr`: random WRIPR sets and whole-register loads against a 64-bit model,
  reading every domain after each step.
* `tb_kernel_filter_unit`: refused writes below M-mode, CSR read-back, both
  ranges and the gap between them, and a random sweep over instructions,
  modes and addresses.
* `tb_flexfilt_unit`: the trusted-domain scenario, sealing, a kernel filter,
  and 4000 random custom and ordinary instructions against a model of the
  whole configuration state.
* `tb_itlb`: fills with random reserved bits, ipkey extraction, permission
  faults in U and S mode, round-robin eviction and sfence. It also fills and
  reads back three example translations (VPage 150, 184 and 280 mapping to
  PPage 4500, 1220 and 560, the middle one with ipkey 1110).
* `tb_inst_queue`: random traffic with back-pressure and flushes against a
  reference queue, including full and simultaneous enqueue/dequeue.
* `tb_flexfilt_top`: the top at its default sizes, with models of the walker,
  a cache with 1-3 cycle latency, the register file and trap handling. It runs
  the following scenario:
  * User code configures filter 0 to catch a WRPKR-style instruction, and
    enables that filter for domain 0.
  * The instruction then runs in two trusted pages of domain 1 and traps in
    domain 0.
  * Machine mode sets up a kernel filter over two ranges.
  * Supervisor code has its FlexFilt reads stopped inside the ranges and
    executed between them. It reloads the IPR.
  * User code then sees the new policy.
  * Finally, 300 random user instructions run from the three user pages. They
    face random stalls and cache delays, and each filtered instruction causes
    a flush.

  Every retired instruction is compared with its expected outcome. The test
  also checks that each of these mechanisms occurs at least once: TLB miss,
  cache wait, full queue, stall, flush, user and kernel filter hits, fetch
  fault, executed and refused custom instructions, privileged read, IPR reload
  and privilege change. It also checks the four-cycle fetch-to-execute latency.

Simulating one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/flexfilt_pkg.sv tb/tb_flexfilt_top.sv --top-module tb_flexfilt_top
./obj_dir/Vtb_flexfilt_top
```

Replace `tb_flexfilt_top` with any other testbench name. Every testbench runs
in well under a second.

## Limits

* Only the FlexFilt additions are here. Performance claims depend on the host
  core and cannot be reproduced from this RTL. These include filtering adding
  no cycles to a running program, and the cost of saving the filter state on a
  context switch.
* The filters inspect the 32-bit instruction held in the execute stage. In a
  core with compressed (16-bit) instructions, this is the expanded form. This
  slice has no expander: its cache returns 32-bit instructions.
* The filters look at the instruction word only. They do not look at register
  contents or memory addresses.
* The I-TLB stands in for the core's own. In a real integration, the ipkey
  field and its fill from PTE bits 57:54 are what should be carried over.
