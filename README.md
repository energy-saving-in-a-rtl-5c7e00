# NVCMA/MC: a multi-context CGRA whose every flip-flop is non-volatile

Edge devices run in short bursts and sleep in between. Power gating removes
the leakage of a sleeping accelerator, but a coarse-grained reconfigurable
array (CGRA) holds a lot of state (configuration, constants, data, the
controller's program) that power gating would wipe out. This design keeps all
of that state in **verify-and-retrievable non-volatile flip-flops (VR-NVFFs)**:
ordinary flip-flops backed by a magnetic tunnel junction (MTJ) pair. Any part
of the chip can be powered off and brought back by a restore from the MTJs,
without reloading anything from outside.

Two ideas build on that:

* **Four hardware contexts.** Four complete array configurations live on
  chip, each in its own power domain. The running task's context is powered;
  the other three can be switched off. Nothing is lost, and switching tasks
  costs a restore, not a reload.
* **Two-step store (TSS).** Writing an MTJ is slow and costly, and how long a
  bit needs varies from bit to bit. The chip therefore stores in two steps.
  It first verifies which bits differ from their MTJ. It gives those bits a
  short store pulse, then verifies again. Only the few bits that failed get a
  second, long pulse.

The RTL here is a cycle-level model of the whole chip. The datapath and the
controller are synthesizable. The NVFF cell is a behavioural model, because
an MTJ is an analog device.

## Block map

```
               +------------------- nvcma_mc_top --------------------+
 host port --> | instruction memory (vr_nvff_array, PD1, domains 9-10)|
               |        |                                             |
 ext_wake ---> | nvcma_uc ── nvff_ctrl_regs (bitmap, 24 x 10 ctrl,    |
               |    |  |                    CMP_OUT flags)            |
 ext_pg_* ---> |    |  └─ PGC ─> pg_ctrl ─> pd_on[5:0] (PD1..PD6)     |
 ext_ctx_* --> |    └─ CTX ─> active context ─┐                       |
               |  context_mem x4 (PD2..PD5, domains 11-23)            |
               |    config 96 PEs, 16 constants, DM tables ──┐        |
               |  dmem (2 interleaved banks, PD6, domains 0-8)│       |
               |    ⇅ pair port                              ▼        |
               |  cma_xfer: fetch regs ─> pe_array 12x8 ─> gather regs|
               |            (data_manipulator both ways)              |
               +------------------------------------------------------+
```

| module | what it is |
|---|---|
| `nvcma_pkg` | sizes, `nvff_ctrl_t`, `pe_cfg_t`, opcodes, store/power domain map |
| `vr_nvff_array` | behavioural model of a memory made of VR-NVFFs, split into store domains |
| `nvff_ctrl_regs` | bitmap register, per-domain NVFF control registers, CMP_OUT flags |
| `pg_ctrl` | PGC power-domain register and the internal/external select |
| `nvcma_uc` | microcontroller |
| `pe`, `pipeline_reg_row`, `pe_array` | processing element, row pipeline register, 12 x 8 array |
| `data_manipulator` | permutation network between memory and fetch/gather registers |
| `cma_xfer` | fetch/gather registers and the transfer sequencer |
| `context_mem` | configuration, constants and permutation tables of one context |
| `dmem` | interleaved two-bank data memory |
| `nvcma_mc_top` | the chip |

## The VR-NVFF and its ten control signals

Every storage bit has three parts:

* a volatile **slave latch**, which is the flip-flop's value;
* an **MTJ pair**, which is the non-volatile copy;
* a **balloon latch**, which reads the MTJ back.

An XOR of the balloon latch and the slave latch gives **CMP_OUT**. When
CMP_OUT is 1, the MTJ does not yet hold the flip-flop's value.

The bits are grouped into **store domains**. All bits of a domain share one
set of ten control signals, held in a 10-bit control register per domain
(`nvcma_pkg::nvff_ctrl_t`, bit 0 first):

| bit | signal | effect in this model (on a clock edge, domain powered) |
|---|---|---|
| 0 | SR1 | store current on (needs CTRL) |
| 1 | SR2 | verify gating: only bits with CMP_OUT = 1 draw store current |
| 2 | SR3 | MTJ read path on (needed by restore and verify) |
| 3 | SB_N | low with SR3: restore, slave latch <= MTJ |
| 4 | RB_N | low with SR3: verify read, balloon latch <= MTJ |
| 5 | LPGB_N | balloon latch supply (0 = off, CMP_OUT forced 0) |
| 6 | LPGA_N | slave latch supply (0 = off, value lost) |
| 7 | CTRL | MTJ common line driven for a store |
| 8 | PS_EN | domain power switch (AND-ed with the power domain's enable) |
| 9 | CG | clock gating: writes to the domain are blocked |

The reset values are: SB_N, RB_N, LPGA_N and PS_EN high, all the others low.

The level each signal works at is this design's reading of the cell
schematic. The cell's transistor-level behaviour is not reproduced.

**Write time model.** A bit's MTJ takes the slave value only after store
current has flowed for that bit's required number of clocks. A fixed hash of
the bit's index sets that number: about 31 bits in 32 need one clock, and the
rest need 2 to 4. At the 28 MHz clock of the measured chip, one clock is
35.7 ns and four clocks are 142.9 ns. So a one-clock pulse is the 35 ns
**short store** and a four-clock pulse is the 140 ns **long store**. Measured
chips saturate their pass rate below about 120 ns, and the model has no
permanently stuck bits.

**Energy proxy.** `store_bit_cycles` counts bit-clocks of store current and
`verify_bits` counts bits read by verify operations. On 800 freshly written
bits, the two-step store draws 455 bit-clocks against 3,200 for a long store
of every bit. This is a count, not a measurement: the verify energy, which
limits the gain for small domains, is only counted as bits read.

### Store and power domains

| store domains | holds | power domain |
|---|---|---|
| 0-4, 5-8 | data memory bank 0, bank 1 | PD6 |
| 9-10 | instruction memory | PD1 |
| 11-14 | context 0 | PD2 |
| 15-17, 18-20, 21-23 | contexts 1, 2, 3 | PD3, PD4, PD5 |

The architecture fixes the counts: 24 store domains (9 data, 2 instruction,
13 context), 6 power domains, and one power domain per context. The 4/3/3/3
split of the context domains is this design's choice, and so is the order of
the PGC operand bits (bit k drives PD k+1).

An unpowered domain keeps its MTJs and loses its volatile values, which then
read as 0.

## Microcontroller

It executes one instruction per clock. It has eight 16-bit registers (r0 reads
as 0), an 8-bit program counter and 32-bit instructions:
`[31:26]` opcode, `[25:23]` rd, `[22:20]` rs, `[19:0]` immediate (SETBM uses
`[23:0]`). `nvcma_pkg::mk_i` and `mk_bm` build instruction words.

| op | operands | action |
|---|---|---|
| NOP, HALT | | HALT stops and raises `done`; `start` restarts at address 0 |
| LDI / ADDI | rd, rs, imm16 | rd = imm / rd = rs + imm |
| JMP / BNZ | rs, target | jump / jump if rs != 0 |
| WAIT | n | the instruction takes n clocks |
| LDF / STG | rs | 12 words at address rs → fetch registers / gather registers → 12 words at rs (stalls) |
| EXE | n | run the array n clocks; gather registers load on the n-th (stalls) |
| SETBM | imm24 | bitmap register = imm24 |
| NVC | bit16 = set, [9:0] mask | for every domain selected in the bitmap: control bits selected by the mask are set or cleared |
| CBB | target | clear the lowest bitmap bit; branch unless the bitmap is now empty |
| BNW | target | the flag registers of the bitmap domains load their CMP_OUT; branch if none needs writing |
| PGC | imm6 | power-domain enables |
| PSE | n | pause n x 256 clocks (`PSE_SHIFT`), or until `ext_wake` |
| CTX | imm2 | active hardware context |

The architecture defines NVC, CBB, PGC, PSE, the bitmap, the control
registers, the captured CMP_OUT per domain, and instruction-driven context
switching and wake-up. Everything else in this table is this design's
choice: the encodings, the register file, BNW, WAIT and the three transfer
instructions.

**A store pulse** lasts from the clock after the set NVC to the clock after
the reset NVC: two adjacent NVCs give 1 clock, and `NVC set; WAIT 3; NVC
reset` gives 4.

**Two-step store**, as the end-to-end testbench assembles it:

```
SETBM  domains
NVC set  LPGB_N                         ; balloon latches on
NVC set SR3; NVC reset RB_N; NVC set RB_N; NVC reset SR3    ; verify
BNW    done                             ; nothing to write
NVC set SR1|SR2|CTRL; NVC reset SR1|SR2|CTRL                ; short store, 1 clock
(verify again)
BNW    done                             ; all written
NVC set SR1|SR2|CTRL; WAIT 3; NVC reset SR1|SR2|CTRL        ; long store, 4 clocks
done: NVC reset LPGB_N
```

A **restore** is `NVC set SR3; NVC reset SB_N; NVC set SB_N; NVC reset SR3`
on the powered-up domains. The microcontroller cannot run the array while it
manages NVFFs: both are sequenced by the same instruction stream.

## Array and data flow

Processing elements sit in 8 rows of 12 (PE `rcc`, row first). A pipeline
register follows each of rows 0 to 6, so a computation takes 7 enabled clocks
to cross the array. The gather registers capture it on the 8th, which is why
`EXE n` needs n ≥ 8.

The array clock runs only during EXE. Each PE has:

* two operand selectors, which pick from south channel 0, south channel 1,
  channel 0 of the south-west and south-east neighbours, the PE's constant
  register, or zero;
* an ALU with 14 operations (add, sub, and, or, xor, three shifts, pass A,
  pass B, signed less-than, equal, min, max), whose result drives channel 0;
* a switching element, which forwards one of the same sources, or the ALU
  result, on channel 1.

Taking the west and east inputs from the stage below keeps the array free of
combinational loops. This design chose that wiring, the operation set and the
17-bit `pe_cfg_t`. The row pipelining, the 12 x 8 size and the two channels
follow the architecture.

LDF reads 12 consecutive words two per clock from the interleaved data memory
(even words in bank 0, odd words in bank 1), then loads the fetch registers
through the data manipulator: 7 clocks in all. STG writes back two words per
clock, which takes 6 clocks. The data manipulator is a full 12 x 12 crossbar:
fetch register c takes word `fperm[c]` and memory word j takes gather register
`gperm[j]`. Both tables belong to the context.

A context holds 116 words of 25 bits:

* words 0 to 95: PE configuration, at word `r*12+c`;
* words 96 to 111: the constants;
* words 112 and 113: the fetch table, six 4-bit entries per word;
* words 114 and 115: the gather table, laid out the same way.

The host writes it through the top's host port.

## Sizes

| item | value | origin |
|---|---|---|
| array | 12 x 8, 7 pipeline registers | architecture |
| contexts / store domains / power domains | 4 / 24 / 6 | architecture |
| control signals per domain | 10 | architecture |
| data width | 25 bits | predecessor chip's data memory |
| data memory | 2 banks x 256 words | predecessor chip's data memory |
| instruction memory | 256 x 32 bits | this design |
| constants per context | 16 | this design |

The measured chip has data-memory store domains of 2,400 NVFFs. Here the
data memory has 12,800 bits over 9 domains, about 1,300 bits per domain, so
one of those domains does not fit in one domain of this model. The
2,400-bit domain is simulated on its own instead (`tb_workload_tss`).

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example, to run the whole chip:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/nvcma_pkg.sv tb/tb_ref_pkg.sv tb/tb_nvcma_mc_top.sv --top-module tb_nvcma_mc_top
obj_dir/Vtb_nvcma_mc_top
```

The other testbenches build the same way: swap in their own file and top
module (`tb_<module>`).

* `tb_nvcma_mc_top` runs the chip at its default sizes in under a second. It:
  1. loads two random contexts and a program;
  2. runs context 0;
  3. runs the two-step store on all 24 domains, then again on unchanged
     domains;
  4. runs context 0 again with the other three contexts off;
  5. stores the data memory and writes one more block after that;
  6. sleeps with only the instruction memory powered, through one timed pause
     and one pause ended by `ext_wake`;
  7. powers up and restores the data memory and context 1, then runs
     context 1;
  8. in a second phase, lets the outside controller override both the context
     and the power domains.

  It checks every result against a reference model of the array, and checks
  that the block written after the last store came back with its older,
  stored value. It counts each mechanism and fails if one never happened:
  context switch by instruction and from outside, power-off, external power
  control, each branch of the two-step store, each way a pause ends, restore,
  pipelined execution, and lost volatile data. It also checks that every
  store pulse lasts 1 or 4 clocks.
* `tb_workload_tss` (about a second) makes one 2,400-bit domain
  (96 x 25 VR-NVFFs). First it stores all bits to 0, then all to 1, for 1 to
  6 clocks each, and prints the pass rate. It also prints the cost of a short
  store of that length followed by a 4-clock store of the bits that failed.
  The pass rate reaches 100 % at 4 clocks, and the cost is lowest with a
  1-clock short store, which is the timing the store sequences use. The
  model treats 0 and 1 alike and has no stuck bits, unlike the silicon. Then
  it stores 2,400, 1,200, 600, 240, 100 and 24 changed bits, once with the
  long store alone and once with the two-step store. It
  prints the energy of each, counted in bit-clocks of store current plus a
  cost for every bit each verify reads. The verify cost is a free number
  (0.12 of a store bit-clock). It is chosen so that the two schemes break
  even at about 100 written bits, which is where the real chip breaks even.
  With that, the two-step store saves 72 % of the store current and 67 % of
  the total at 2,400 bits, and it loses below 100 bits. About 97 % of the
  bits pass after the short store.
* `tb_workload_intermittent` (under a minute) runs three 1 ms periods at
  28 MHz. In each one, context 0 runs for about 500 us with the three other
  contexts off. Then the data memory and context 0 are stored, the chip
  sleeps 503 us (PSE 55) with only the instruction memory powered, and both
  are restored. Results must survive every sleep, and each phase is timed.
  From wake-up to the first array run takes 19 clocks (0.68 us), counting
  the power-up, the restore and the reload of the array.
  The four context memories are powered 12.5 % of the time.
* `tb_vr_nvff_array` checks CMP_OUT at every verify, restore after a power
  cut, gating, and that the two-step store draws less current than the long
  store.
* The other testbenches compare their module with an independent reference:
  random ALU operations, random array configurations streamed through the
  pipeline with the 7-clock latency, permutations, control-register sequences,
  transfer clock counts (LDF 7, EXE n, STG 6), and microcontroller pulse
  widths and pause lengths.

## How far to trust it

* The datapath, the controller and the NVFF management registers are ordinary
  synthesizable RTL, and they are tested against reference models.
* `vr_nvff_array` is behavioural. It uses plain `always` with loops over every
  bit and cannot be synthesized. In silicon these memories are MTJ-backed
  custom cells. Its timing (whole clocks) and its energy counts are
  approximations that only show relative behaviour. It does not model power
  switching, leakage, the break-even time between sleep savings and recovery
  cost, or permanently stuck MTJ bits.
* Power switches, the MTJ device, the board controller, the supply and the
  clock are outside the RTL. Their control signals are top-level ports.
* The host port exists only to load the chip in simulation. The real chip's
  loading path is not modelled.
