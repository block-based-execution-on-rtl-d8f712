# Block-based vector execution on a scalar in-order core

A small in-order core gets vector instructions without a vector unit. Vector
loads and stores go through a vector memory unit. Vector computational
instructions run on the core's existing integer ALUs, one element operation per
cycle. The extra hardware is a vector register file, the vector memory unit and
three small pieces of control logic:

- **VECL**, the vector execution control logic, in the issue stage;
- **CCL**, the chaining control logic, which forwards results;
- **ACL**, the aliasing control logic, which orders scalar and vector memory accesses.

The central idea is **block-based execution (BBE)**. A classic vector machine
runs an instruction over all of its elements before it starts the next one.
This is called one-by-one execution (OBO). BBE instead takes a *block* of
consecutive vector computational instructions and runs it element-major:
element 0 of every instruction in the block, then element 1, and so on.

Two things follow from this:

- Dependent instructions in a block chain through the ordinary bypass path.
  Each one needs its producer's element only one cycle after it was computed.
- The block takes only one ALU slot per cycle. Scalar instructions and memory
  instructions behind the block keep issuing while it runs.

This RTL implements that scheme as a back-end: issue queue, issue logic and
execution. The ISA, the sizes and the pipeline details are choices of this
implementation. The section "Where this design chooses" lists them.

## Block diagram

```
 decoded instr ──► issue_queue ──window──► vecl (block former + block_table + sequencer)
                      │ head                      │ one element op / cycle
                      ▼                           ▼
                 issue logic ──────────► simple_alu / complex_alu ◄── ccl ◄── vrf
                 (ivs_core)                │ scalar result    │ element result
                      │                   srf                wb register ──► vrf
                      ├─ scalar ld/st ───────────┐
                      └─ vector ld/st ──► vmu ───┴─► acl ──► one L1 data-cache port
```

| module        | role |
|---------------|------|
| `ivs_core`    | Top. Issue logic, hazard checks, write-back register, wiring. |
| `issue_queue` | FIFO of decoded instructions. Shows its oldest `BLOCK_SIZE` entries and can pop several at once. |
| `vecl`        | Forms blocks and sequences their element operations. Holds `block_table`. |
| `block_table` | The instructions of the current block, plus masks of the vector registers it reads and writes. |
| `ccl`         | Forwards the write-back register to the element operands. |
| `simple_alu`  | add, sub, and, or, xor. Shared by scalar and vector operations. |
| `complex_alu` | Multiply, low 32 bits. Shared by scalar and vector operations. |
| `vrf`         | 16 vector registers × 8 elements × 32 bits. ALU ports: 2 read, 1 write. Memory-unit ports: 1 read, 1 write. |
| `srf`         | 16 scalar registers. 2 read ports, 2 write ports (ALU result, load data). |
| `vmu`         | Vector memory unit. Runs one unit-stride vector load or store, one element per cycle. |
| `acl`         | Holds scalar memory instructions behind vector ones. Merges both onto the port. |
| `ivs_pkg`     | Instruction format, opcodes, event record. |

## Instruction set

The ISA is defined in `ivs_pkg`. Memory is word addressed. An effective
address is `sreg[rs1] + sext(imm)`, truncated to `ADDR_W` bits.

| class     | effect |
|-----------|--------|
| `C_S_ALU` | `sreg[rd] = sreg[rs1] op (use_imm ? sext(imm) : sreg[rs2])` |
| `C_S_LD`  | `sreg[rd] = mem[ea]` |
| `C_S_ST`  | `mem[ea] = sreg[rs2]` |
| `C_V_ALU` | for every element e: `vreg[rd][e] = vreg[rs1][e] op vreg[rs2][e]` |
| `C_V_LD`  | for every element e: `vreg[rd][e] = mem[ea + e]` |
| `C_V_ST`  | for every element e: `mem[ea + e] = vreg[rs2][e]` |

`op` is one of add, sub, and, or, xor, mul. A multiply uses the complex ALU.
Every other op uses the simple ALU. The vector length is fixed at `VL`; there
is no vector-length register.

## How a block runs

In a cycle where no block is running and the queue head is a `C_V_ALU`, VECL
scans the window behind the head. It stops at the first entry that is not a
`C_V_ALU`, at the end of what is queued, or at `BLOCK_SIZE` entries. The
scanned instructions are popped and written into the block table.

This capture takes one cycle. Starting on the next cycle, VECL issues one
element operation per cycle in this order:

```
 cycle:   F    F+1    F+2    F+3    F+4    F+5   ...
          form  I0.e0  I1.e0  I0.e1  I1.e1  I0.e2 ...        (block of I0, I1)
```

A block of `k` instructions takes exactly `k*VL` cycles. On the cycle after its
last element operation, the next block may be captured.

The block does not stall. Its element operation always gets the ALU it needs,
and the rules below keep every conflicting instruction out of its way.

With `obo_mode = 1` every block holds a single instruction. That is one-by-one
execution on the same hardware, useful for comparison.

### Chaining (CCL)

An element operation reads both operands from the vector register file in the
cycle it issues. Its result spends one cycle in the write-back register
(`wb_*` in `ivs_core`) and is written to the register file on the next edge.

In a block, `I1.e0` issues the cycle after `I0.e0`. If `I1` reads `I0`'s
result, the register file does not hold it yet. CCL compares the operand's
(register, element) with the write-back register's and substitutes the new
value when they match.

That single comparator is the whole chaining mechanism. It works because, in a
block, a consumer never needs an element more than one cycle after it was
produced, provided the producer is the instruction just before it in the block.
If the producer is further back, the value has already reached the register
file.

### What may issue while a block runs

Issue is in order, one instruction per cycle from the queue head. It runs in
parallel with the block's element operations.

- **Scalar ALU instruction**: issues if the ALU it needs is not used by this
  cycle's element operation. A block of adds leaves the complex ALU free for a
  scalar multiply. A block containing a multiply leaves the simple ALU free in
  the cycles where the multiply runs.
- **Vector load**: issues if the vector memory unit is idle and its destination
  register is neither read nor written by the block, nor pending in the
  write-back register.
- **Vector store**: issues if the unit is idle and its source register is not
  written by the block, nor pending in write-back.
- **Scalar load/store**: issues unless ACL holds it (see below). The block
  never touches scalar registers.
- **Vector computational instruction**: waits until the block has finished.
  Only one block is active at a time.

A block is not captured while the vector memory unit is reading or writing any
register of the candidate block.

With the example sequence

```
vload v1; vadd v2=v1+v1; vsub v3=v2-v1; vload v4; vload v5; vadd v6=v4+v5
```

BBE puts `vadd` and `vsub` in one block. The second `vload` issues in the
block's first element cycle. It sends its first memory request in the same
cycle as `vsub`'s first element operation.

In OBO mode, that `vload` has to wait until `vadd` has run all its elements
and `vsub` has started. In the testbench this sequence takes 87 cycles in BBE
and 96 in OBO.

### Memory ordering (ACL) and the data-cache port

Scalar and vector memory instructions already leave the queue in program
order. What could still reorder them is that a vector access lasts `VL` or
`VL+1` cycles, while a scalar access lasts one.

ACL therefore holds any scalar load or store while the vector memory unit is
busy. It makes no address comparison, which is conservative but simple.

The two request streams are merged onto the single L1 data-cache port. They
never request in the same cycle, and an assertion checks this.

A vector instruction needs no hold. Its first request goes out the cycle after
it issues, and by then any earlier scalar access has finished.

Scalar loads return data one cycle after their request. A one-entry scoreboard
stalls an instruction that reads or overwrites that register in that cycle.

## Interface and timing of `ivs_core`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | Clock. Synchronous active-low reset. |
| `obo_mode` | in | 1 = blocks of one instruction (one-by-one execution). |
| `dec_valid`, `dec_instr`, `dec_ready` | in/in/out | Instruction push. An instruction transfers when valid and ready are both high. |
| `dmem_req`, `dmem_we`, `dmem_addr`, `dmem_wdata` | out | Data-cache request. The port is always ready. |
| `dmem_rdata` | in | Read data, valid in the cycle after a read request. |
| `idle` | out | Nothing queued, no block running, nothing in flight. |
| `ev` | out | One-cycle event pulses (`ivs_events_t`): block formed (and its size), block closed because full or by another instruction, chaining bypass, memory or scalar ALU issue during a block, ALU-busy stall, ACL hold, register-conflict stall, block-busy stall, load-use stall. |

Latencies:

| operation | latency |
|-----------|---------|
| Scalar ALU | Result written at the end of its issue cycle. |
| Scalar load | Data written one cycle after issue. |
| Vector memory instruction | Requests go out on cycles issue+1 … issue+VL. Load data are written one cycle after each request. |
| Vector block | Capture takes one cycle, then `k*VL` element cycles. Each result is written one cycle after its element cycle. |

Reset clears the queue, the block state, the scoreboards and the scalar
registers. It does not clear the vector registers, so programs should load
them before use.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `IQ_DEPTH`   | 8  | Issue-queue entries. |
| `BLOCK_SIZE` | 4  | Maximum instructions per block. This is also the queue window VECL scans. |
| `VL`         | 8  | Elements per vector register. |
| `NUM_VREGS`  | 16 | Vector registers. The 4-bit register fields in `instr_t` limit this to 16. |
| `NUM_SREGS`  | 16 | Scalar registers. |
| `ADDR_W`     | 16 | Word-address width of the data port. |

`VL`, `NUM_VREGS`, `NUM_SREGS`, `IQ_DEPTH` and `BLOCK_SIZE` must be at least 2,
because index widths are derived with `$clog2`. `XLEN` (32) is fixed in `ivs_pkg`. The event field `blk_size` is 3 bits wide,
so `BLOCK_SIZE` above 7 needs that field widened.

## Where this design chooses

Several things were not specified for the original scheme and are choices of
this implementation:

- The ISA and encodings.
- All sizes: vector length, register counts, block and queue sizes.
- Single issue. The original base core is a dual-issue, 8-stage ARM
  Cortex-A7-class pipeline.
- The one-cycle block capture.
- The one-cycle write-back distance that the chaining bypass covers.
- The register-conflict rules.
- ACL's drain-and-hold ordering instead of address comparison.
- Unit-stride vector accesses only.
- One vector memory instruction in flight.
- Integer ALUs only. The original example uses floating-point data on one
  floating-point unit.

Further departures from the original design:

- **One memory port.** The original block diagram gives the vector memory unit
  its own path to the L1 data cache, next to the scalar data cache unit. Here
  both share one port through ACL.
- **No VMIT/VMCT.** The vector memory unit of the original contains two
  sub-tables named VMIT and VMCT, whose function is not described. This unit
  keeps a single instruction and has no such tables.
- **No baseline front-end or caches.** Fetch, decode, the L1 caches and the
  data cache unit of the base core are not included. Decoded instructions
  enter at the issue queue, and memory is reached through the `dmem_*` port.
- **OBO is a limited comparison point.** OBO mode is blocks of size 1. It does
  not let two vector instructions run at once on the two ALUs, which a real
  one-by-one design with two ALUs could do.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). It
compares the module against values the testbench computes itself and prints
`TB_RESULT checks=N failures=M`.

`tb_ivs_core` is the end-to-end test. It uses the default parameters and
`l1_dmem_model`, a behavioural one-cycle memory. It runs two parts:

1. **The example sequence above, in both modes.** It checks the memory
   results, checks that the second vector load starts with `vsub`'s first
   element operation under BBE and later under OBO, and checks that BBE
   finishes first.
2. **40 random programs, about a quarter of them in OBO mode.** The programs
   mix runs of vector computational instructions with scalar and vector memory
   traffic on a small, heavily aliased address range. After each program, all
   registers are stored. The whole memory is then compared with an
   instruction-by-instruction reference interpreter in the testbench.

The test counts every event in `ev`. It fails if any of them never occurs.

`tb_vecl` also checks the element-major order and the `k*VL` block length
cycle by cycle, in both modes.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/ivs_pkg.sv tb/tb_ivs_core.sv \
  --top-module tb_ivs_core -Mdir obj_tb && ./obj_tb/Vtb_ivs_core
```

`-y` lets Verilator find each module in the file of the same name; the package
is named first because it is imported, not instantiated. Substitute another
`tb_<module>.sv` and its top name to run the unit tests.
The whole set runs in seconds.

The design lints with `verilator --lint-only -Wall` without errors. The only
notes are about unused signals: the upper address bits, the instruction fields
that the element path does not need, and package constants that some modules
do not use.
