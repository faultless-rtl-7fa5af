# FAULTLESS-style fault protection for a dual-issue RISC-V core

A single flipped bit in a processor pipeline can silently corrupt a result,
a branch target or a memory address. Running two whole cores in lockstep
catches this but doubles the hardware. This design takes another route: a
superscalar in-order core already has two execution pipes, so when
protection is switched on, every instruction is simply **executed twice**.
The two instances run either side by side on the two pipes or one after the
other on a unit that exists only once. They are **compared before anything
becomes architectural**. Everything that sits outside the pipeline is
protected with a SECDED code: the PC, the register file, the CSRs, both
tightly coupled memories and the external bus. At each boundary between the
ECC domain and the duplicated domain there is a hand-over that leaves no
unprotected window.

Protection can be switched on and off by software at any time with a CSR
write. A second CSR chooses how a detected fault is handled: either a
transparent replay with no software involvement, or a trap to a handler.

The RTL is a compact RV32IM core (word loads/stores, Zicsr, MRET, FENCE)
written around these mechanisms. It is not a production core: the base
pipeline is deliberately simple, and the protection logic is the point.

## Contents

- `rtl/` holds the synthesizable design, one module or package per file.
  `faultless_core` is the top.
- `tb/` holds self-checking testbenches (`tb_<module>.sv`), a tiny
  instruction assembler package (`rv_asm_pkg`), an independent ECC
  reference (`ecc_ref_pkg`) and a behavioural external memory
  (`ext_mem_model`).

## Pipeline at a glance

```
          ICCM (39-bit words)
            |  2 words/cycle, ECC check || duplicate   (fetch_unit)
            v
   decode x2 -> instruction buffer, 4 entries         (rv_decoder, instr_buffer)
            |  issue <= 2 per cycle
            v
   pipe 0:  E1  E2  E3  E4  WB          E1: ALU/branch/address/CSR read, MUL/DIV
   pipe 1:  E1  E2  E3  E4  WB          E2: DCCM read   E3: branch redirect,
            \___ forwarding (fwd_unit) __/                  bus bridge
                                  |
                              commit_unit (compare, result buffer, ECC encode)
                                  |
              regfile_ecc  csr_file  DCCM  bus_bridge -> external bus
```

- **Fetch** reads the words at `pc` and `pc+4` from the ICCM every cycle.
  The PC itself is a 39-bit codeword (`pc_ecc`). Branches are not
  predicted.
- **Decode / instruction buffer.** Up to two instructions per cycle enter
  a four-entry queue, which offers its two oldest entries for issue.
- **Execute.** ALU results, jump links, CSR reads and effective addresses
  are produced in E1. The combinational multiplier/divider also works in
  E1, but its result may only be used from E3 on. A DCCM load reads the
  memory in E2, and its data may be used from E3 on. A taken branch or
  jump redirects fetch from E3 and flushes everything younger.
- **Commit** happens only in WB (the fifth execute stage). Register writes,
  DCCM stores and CSR writes all happen there. Because every result
  commits at the same point, a fault is always caught before it can become
  architectural.

Serial instructions (CSR access, MRET, FENCE, illegal) issue only into an
empty pipeline. A load waits at issue while an older store is still in
flight, because stores write the DCCM at commit.

## Duplication and issue strategy

With `u_protectionmode = 1`, the instruction buffer accepts one fetched
instruction per cycle and writes it twice. The second entry carries a
**copy flag**. How the pair then issues depends on the unit it needs:

| class | units | issue | redundancy |
|---|---|---|---|
| ALU, branch, JAL/JALR, CSR, MRET, FENCE | two ALU pipes | original on pipe 0 and copy on pipe 1, in the same cycle, never split | spatial |
| MUL/DIV | one multiplier/divider | original first, copy in a later cycle | temporal |
| LW, SW | one load-store unit | original first, copy in a later cycle | temporal |

A spatial pair is offered as an *atomic* pair: both instances issue or
neither does. A temporal original issues on its own. Its copy may share a
cycle with the *next* original, but only if that instruction is also
temporal and needs a different unit. For example, `MUL; LW` issues as
`M`, `M' + L`, `L'`. Without protection the buffer is an ordinary
dual-issue queue. It holds back only on unit conflicts and serial
instructions.

## Forwarding with copy flags

Duplicated execution adds two hazards to forwarding:

1. An instance must never read its own twin's result. Example:
   `add x1,x1,x2` and its copy issue together. If the copy took `x1` from
   the original, it would compute `x1+2*x2`.
2. A single instance must never feed *both* instances of a later
   instruction. If it did, one fault would corrupt both, and the
   comparison would pass.

`fwd_unit` solves both with one rule: a consumer only takes forwarded values
from producers with the **same copy flag**. Originals feed originals and
copies feed copies. The producer list is ordered youngest first (E1..WB of
both pipes, then the result buffer). The youngest matching producer wins,
and if its value is not ready yet the consumer stalls. Without protection
every instance has copy flag 0, so this is ordinary forwarding.

## Commit point, comparison and the result buffer

`pair_compare` is deliberately strict. Two pipeline entries match only if
every field is equal except the copy flag: PC, decoded micro-op (and so the
destination and unit), operands, result, address, branch outcome, CSR write
data and status bits. In addition, one entry must be the original and the
other the copy.

`commit_unit` works on the two WB entries each cycle:

- **Spatial pair** (the original on pipe 0, its copy on pipe 1): it is
  compared, then committed once.
- **Temporal pair**: the first instance to reach WB is parked in a
  one-entry **result buffer** and writes nothing. When the second instance
  arrives, it is compared with the buffered one and then committed. While
  the buffer holds a value, it is a forwarding source like a pipeline stage
  (with the first instance's copy flag = 0). This way a later original can
  still get its operand even though the producing instance has left the
  pipeline.
- A mismatch or a missing partner is a **fault**. The PC of the oldest
  instance involved is reported. Nothing from that instruction onward
  commits. An older instruction in the other WB slot still commits.
- The committed word is encoded as data from the original plus check bits
  computed from the copy (`ecc_egress`). A difference that slipped past the
  comparison would therefore still show up as an ECC error later.

Branch and jump pairs are compared a second time, in E3, before they may
redirect fetch. A corrupted branch can therefore neither send fetch to a
wrong target nor suppress a flush.

## ECC hand-overs

Every crossing between an ECC-protected structure and the duplicated
pipeline uses one of two small blocks:

- **`ecc_ingress`** (memory to pipeline). The raw data bits are fanned out
  to the original and the copy on the same wires that feed the SECDED
  checker, in the same cycle. A fault on the line before the registers is
  therefore either seen by the checker or makes the two copies differ. An
  ECC error is *reported* and not silently corrected, and the instruction
  carrying it traps when it reaches commit. This path is used for fetched
  instructions, DCCM load data and bus responses.
- **`ecc_egress`** (pipeline to memory). The original and copy data are
  compared while the check bits are computed from the copy. This path is
  used for register writes, DCCM stores and bus stores.

State that lives longer is held as 39-bit codewords and decoded on every
read. This covers the PC (`pc_ecc`), the 32 registers (`regfile_ecc`), the
five CSRs (`csr_file`) and both TCMs (`tcm_ecc`). Single-bit errors in the
PC, registers and CSRs are corrected on read. The PC and the CSRs are also
scrubbed: the corrected value is written back. A double-bit error in the PC
or a CSR raises `alarm_o`. In a register operand it traps.

The code is an extended Hamming (39,32) code:
`codeword = {p_all, c[5:0], data[31:0]}`. Think of the Hamming positions
1..38, where the powers of two hold the check bits. Data bit `i` sits at the
`i`-th position ≥ 3 that is not a power of two. Check bit `c[j]` is the XOR
of all data bits whose position has bit `j` set. `p_all` makes the
parity of the whole word even. A non-zero syndrome with odd overall parity
names the flipped position. A non-zero syndrome with even overall parity is
a double error.

## External memory: one transaction for two instances

Anything outside the DCCM window may have side effects, so it must be
accessed exactly once even though the pipeline carries two instances.
`bus_bridge` sits at E3 and handles this. The access must also never be
repeated by a replay or a mode flush. So the instance that would send the
request waits in E3 until every older instruction has committed. During
that wait E1-E3 hold, while E4 and WB drain.

1. The first instance (the original) reaching E3 is **parked** in the
   bridge and moves on. A load is marked *pending*.
2. The copy reaches E3. Its address and direction are compared with the
   parked ones. At the same time `ecc_egress` compares the store data and
   encodes it. Only if everything agrees is a single bus request sent.
   Otherwise the copy is marked faulty and nothing goes out.
3. The whole pipeline freezes until the response arrives. The 39-bit
   response passes an `ecc_ingress`. Its value goes to the copy in E3 and
   also *patches* the pending original, wherever that now is: E4, WB or the
   result buffer. The loaded word is thus read from the bridge twice, and
   both instances still meet at the commit comparison.

Without protection the single instance goes straight to the bus. The bus
protocol is a minimal valid/ready request with one response pulse, and data
travels as codewords in both directions. A real system would put an
AXI/AHB adapter behind it.

## Switching modes and recovering from faults

| CSR | address | meaning |
|---|---|---|
| `u_protectionmode` | `0x800` | bit 0: duplicate and compare |
| `u_detectionmode` | `0x801` | bit 0: 1 = trap on a detected fault, 0 = replay |
| `mtvec` / `mepc` / `mcause` | `0x305` / `0x341` / `0x342` | standard trap CSRs (reset `mtvec` = `RESET_MTVEC`) |

- **Writing `u_protectionmode`** commits like any CSR write. It then
  flushes the whole pipeline and the instruction buffer, and refetches from
  the next instruction. Every instruction after the write therefore runs
  under the new mode. This is needed in both directions, because the mode
  changes the issue logic, the forwarding rule and the commit comparison.
- **A detected fault with `u_detectionmode = 0`** flushes everything and
  restarts fetch at the faulting instruction. It is the oldest one in
  flight, because nothing younger has committed. No software is involved.
  A transient fault simply disappears on the second attempt.
- **With `u_detectionmode = 1`** the core traps to `mtvec` with
  `mcause = 24` and `mepc` = the faulting PC, so that software can log or
  diagnose the event.
- **ECC errors** trap with `mcause = 25` in either mode. This covers ICCM
  fetches, DCCM or bus loads, and uncorrectable register reads. Replaying
  would read the same bad stored word again.
- **Illegal instructions** trap with `mcause = 2`. `MRET` returns to `mepc`.

A fault always takes priority over anything else in the same cycle,
including a branch redirect or a mode flush.

## Memory map and ports of `faultless_core`

- ICCM: fetch only, from address 0, `ICCM_DEPTH` words. It is loaded
  through the `iccm_wr_*` port.
- DCCM: addresses whose bits [31:28] equal those of `DCCM_BASE`, with
  `DCCM_DEPTH` words. Loads and stores are word-sized.
- Everything else: the `bus_req_*` / `bus_rsp_*` port.

| parameter | default | |
|---|---|---|
| `RESET_PC` | `0x0000_0000` | first fetch address |
| `RESET_MTVEC` | `0x0000_0100` | trap vector after reset |
| `DCCM_BASE` | `0x1000_0000` | DCCM window (top nibble decoded) |
| `ICCM_DEPTH`, `DCCM_DEPTH` | 4096 | words (16 KiB each) |
| `IBUF_DEPTH` | 4 | instruction buffer entries |

The other ports exist so that the design can be tested and observed:

- Back-door TCM writes take an XOR mask on the stored codeword.
- There are read ports for the DCCM and the register file.
- `fi_i` XORs a mask into the result of one pipeline entry (by stage and
  slot) or into one CSR codeword, for one cycle.
- `pc_flip_i` does the same for the PC codeword.
- `ev_o` raises one bit per event in each cycle: issue kind, forwarding,
  result-buffer use, commits, comparisons, faults, flushes, bus
  transactions and ECC corrections.

## Where this design departs from the original proposal

The protection scheme was proposed as a set of changes to a large 9-stage
core. That core, with its three-stage fetch/align, branch predictor, AXI4
bus and partial stalls, is not reproduced here. The consequences are:

- The pipeline is simpler: one fetch stage, no alignment, no branch
  prediction, and one commit point (WB) for everything. In the original
  core, bus-bound accesses and mispredicted branches could also commit
  earlier. Because everything here commits at one point, the second
  forwarding rule comes for free. The E3 branch comparison is kept anyway,
  because a branch acts there.
- The original core can stall E1-E3 while E4/E5 continue, and adds
  comparators to the buffers this needs. This pipeline always stalls as a
  whole, so those buffers do not exist.
- The original core also has a "late" ALU that computes three cycles
  later. It is not built here.
- Only word loads and stores are implemented, and there are no compressed
  instructions and no interrupts.
- Design choices the proposal leaves open:
  - CSR addresses and trap cause values.
  - Correction instead of only detection for stored state.
  - Reporting (not correcting) errors at `ecc_ingress`.
  - The bus protocol.
  - The memory map and memory sizes.
- Because of the ISA subset, standard compiled benchmark binaries (e.g. the
  Embench suite built for RV32IMC) cannot run on this core without being
  rebuilt for the subset.

## Verification

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog. The
datapath blocks are checked against independent reference models over
thousands of random vectors. `ecc_ref_pkg` recomputes the code from its
positional definition. The control blocks (`instr_buffer`, `commit_unit`,
`bus_bridge`, `csr_file`, `fetch_unit`) are checked with directed
scenarios.

`tb_faultless_core` runs the core at its default parameters, with
`ext_mem_model` on the bus. It assembles one program (with `rv_asm_pkg`)
that performs the same calculation four times: arithmetic, MUL/DIV,
dependent loads, DCCM and external stores, branches and a loop. The four
passes are:

1. without protection;
2. with protection;
3. with protection and a result bit flipped in WB (replay);
4. with `u_detectionmode = 1` and another injected fault (trap). A small
   handler at `mtvec` stores `mcause`/`mepc` and returns with `MRET`, which
   re-executes the faulting instruction.

The testbench checks the stored results of every pass, the single external
write and read per protected access, and the handler's record. It also
checks through `ev_o` that every mechanism was actually exercised: spatial
pairs, temporal pairs, mixed copy+original issue, forwarding stalls,
result-buffer forwarding, E3 and WB comparisons, mode flushes, bus
transactions, replay and trap.

`tb_core_ecc_faults` covers the ECC-protected state at system level. It
stores a DCCM word and an ICCM word with one flipped bit each. Each one
must trap with `mcause = 25` without writing anything. The handler then
skips the bad instruction, and the rest of the program must still run.
While the program spins at its end, the test flips one bit of the PC
codeword and one bit of `u_protectionmode`. Both must be corrected with
no visible effect. A double flip in a CSR must raise `alarm_o`.

`tb_workload_kernels` is closer to a benchmark run. The program has two
kernels. The first updates counters in the style of a Petri-net state
machine, so loads and branches dominate. The second is a dot product with
running sums, so loads and MUL dominate. It runs in four configurations:
data in the DCCM or in external memory, each with protection off and on.
All data is checked against a model, and each bus access is counted. The
cycle counts it prints at the default parameters are:

| data | protection off | protection on | extra cost |
|---|---|---|---|
| DCCM | 759 | 987 | 30 % |
| external (bus) | 2019 | 2143 | 6 % |

The extra cost is smaller when data is external. There the pipeline
already waits for the bus, and the two instances of a load share one
transaction.

To simulate with Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/faultless_pkg.sv tb/rv_asm_pkg.sv tb/ecc_ref_pkg.sv \
    tb/tb_faultless_core.sv --top-module tb_faultless_core
./obj_dir/Vtb_faultless_core
```

To run a unit testbench instead, replace `tb_faultless_core` with its name.
The `-y` search paths let Verilator find the other modules by file name.
