# Pipelined TinyRV1 processors and quad adders

A processor that runs every instruction in one long clock cycle spends most
of each cycle waiting on the slowest step. Pipelining cuts the work into
stages separated by registers, so that several instructions are in flight at
once, each in a different stage, and the clock only has to cover the slowest
stage. The cost is hazards: an instruction may need a register value that an
older instruction has not written yet, or may have been fetched down a path
that an older branch then abandons.

This repository holds synthesizable SystemVerilog for two pipelined
implementations of TinyRV1, an eight-instruction subset of RISC-V, and for
the small quad-adder example that shows the same idea on a four-input sum:

| Design | Module | Idea |
|---|---|---|
| Five-stage TinyRV1 pipeline | `tinyrv1_proc5` | F D X M W, full bypassing, one-cycle load-use stall, jumps resolved in D, branches in X |
| Two-stage TinyRV1 pipeline | `tinyrv1_proc2` | A (fetch to operand read) and B (execute to write-back), bypass from B, branches resolved in B |
| Single-cycle quad adder | `quad_adder_sc` | three chained adders in one cycle |
| Multi-cycle quad adder | `quad_adder_mc` | one adder reused over three short cycles |
| Pipelined quad adder | `quad_adder_pipe` | three adder stages, one sum per cycle |

`pipelined_processors_top` instantiates all five side by side. They share
clock and reset and nothing else; each keeps its own ports (prefixes `p5_`,
`p2_`, `qsc_`, `qmc_`, `qpp_`).

The structure follows Cornell ECE 2300 (Fall 2024), Topic 12, "Pipelined
Processors": the stage split, the names of the pipeline registers and
control signals, the bypass paths and the stall and squash conditions are
taken from there. Encodings, reset, the memory handshake and a few datapath
details that the material leaves open are choices of this design; they are
listed in [Design choices](#design-choices-beyond-the-source).

## TinyRV1

| Instruction | Operation | Reads | Writes |
|---|---|---|---|
| `add rd, rs1, rs2` | R[rd] = R[rs1] + R[rs2] | rs1, rs2 | rd |
| `addi rd, rs1, imm` | R[rd] = R[rs1] + sext(imm) | rs1 | rd |
| `mul rd, rs1, rs2` | R[rd] = low 32 bits of R[rs1] × R[rs2] | rs1, rs2 | rd |
| `lw rd, imm(rs1)` | R[rd] = M[R[rs1] + sext(imm)] | rs1 | rd |
| `sw rs2, imm(rs1)` | M[R[rs1] + sext(imm)] = R[rs2] | rs1, rs2 | — |
| `jal rd, target` | R[rd] = pc + 4; pc = pc + offset | — | rd |
| `jr rs1` | pc = R[rs1] | rs1 | — |
| `bne rs1, rs2, target` | if R[rs1] ≠ R[rs2]: pc = pc + offset | rs1, rs2 | — |

Instructions use the standard RV32I/RV32M encodings (`jr` is `jalr x0,
rs1, 0`). Registers are 32 × 32 bits with x0 fixed at zero. Any other
instruction word decodes as a bubble and does nothing. The shared types
(`cs_t`, the control-signal bundle, and the mux-select enums) are in
`rtl/tinyrv1_pkg.sv`.

`tinyrv1_decoder` is the control-signal table: one row per instruction,
giving `rs1_en`, `rs2_en`, `rf_wen`, `rf_waddr`, `imm_type`, `op1_sel`,
`op2_sel`, `result_sel`, `wb_sel` and the memory read/write bits. The
datapath units it steers are `tinyrv1_regfile`, `tinyrv1_immgen` (I, S, B and
J immediates), `tinyrv1_alu` (an adder with an `eq` output for `bne`) and
`tinyrv1_mul`.

## The five-stage pipeline

```
   F            D                      X                M              W
 pc_F ─► ir_FD,pc_FD ─► decode    op1_DX,op2_DX ─►  result_XM ─►   result_MW ─► regfile
   ▲                   regfile    sd_DX, btarg_DX   sd_XM           (write)
   │                   bypass     alu / mul         data memory
   │                   imm, pc+imm                  wb mux
   └── pc_sel_F: pc+4 | jtarg (D) | jr (D) | btarg_DX (X)
```

* **F** sends `pc_F` to instruction memory and picks the next PC.
* **D** decodes `ir_FD`, reads rs1 and rs2, overrides them with bypassed
  values, forms the two operands (`op1` = rs1 or pc, `op2` = rs2, the
  immediate or 4) and computes `pc_FD + imm`, which serves both as the
  jump target of `jal` and, registered as `btarg_DX`, as the branch target.
* **X** adds (ALU) or multiplies, and the ALU's `eq` output decides `bne`.
* **M** sends `result_XM` as the address and `sd_XM` as the store data to
  data memory and chooses between the X result and the load data.
* **W** writes `result_MW` to the register file.

Every pipeline register row carries a valid bit (`val_FD`, `val_DX`,
`val_XM`, `val_MW`) and the decoded `cs_t` for its instruction. A squashed
or stalled slot moves on with its valid bit low.

### RAW hazards: bypassing and the load-use stall

A value is ready at the end of X for ALU and multiplier instructions and at
the end of M for loads. Instead of waiting for W, the D stage takes each
source operand from the youngest older instruction that writes it:

| Source | Signal | Carries |
|---|---|---|
| X | `bypass_from_X` | ALU or multiplier result being computed |
| M | `bypass_from_M` | the M write-back value, so load data too |
| W | `bypass_from_W` | `result_MW`, being written this cycle |
| register file | — | when no stage in flight writes the register |

A match is `val_D && rsN_en_D && val_S && rf_wen_S && rsN == rf_waddr_S &&
rf_waddr_S != 0` for stage S. X beats M beats W, so the newest value wins
when several stages write the same register. The W path is needed because
the register file returns the old value when it is read and written in the
same cycle.

The one case bypassing cannot cover is a `lw` in X whose destination the
instruction in D reads: the data only arrives in M. The X match is then a
stall instead of a bypass (`stall_D`, and `stall_F = stall_D`): F and D hold
for one cycle and a bubble enters X; next cycle the load is in M and its data
is bypassed. So ALU-use latency is one cycle and load-use latency two.

RAW dependences through memory need nothing: loads and stores reach memory
in program order, one per cycle, in M.

### Control hazards: predict not taken, squash on redirect

The front end always fetches `pc + 4`. When that turns out wrong, the
instructions fetched behind the redirecting one are squashed (their valid
bit cleared), not the redirecting instruction itself:

* `jal` and `jr` redirect from D (`jump_D`), using the target adder or the
  bypassed rs1. The instruction in F is squashed: one lost cycle. A `jr`
  whose rs1 comes from a load in X waits out the load-use stall first.
* A taken `bne` redirects from X to `btarg_DX`
  (`squash_X = val_X && op_X == bne && !eq_X`) and squashes D and F: two
  lost cycles. It wins over a jump in D at the same time, since that jump
  is on the abandoned path.

A stall and a branch squash both start in X and cannot occur together;
the module asserts this.

### Timing at a glance

With no hazards one instruction completes per cycle, and a program of n
instructions takes n + 4 cycles. Penalties add up per instruction: +1 for
each load directly followed by a reader of its destination, +1 per `jal` or
`jr`, +2 per taken `bne`. The vector-vector add loop

```
loop: lw   x5, 0(x1)
      lw   x6, 0(x2)
      add  x7, x5, x6      # reads x6 right after its load: 1 stall
      sw   x7, 0(x3)
      addi x1, x1, 4
      addi x2, x2, 4
      addi x3, x3, 4
      addi x4, x4, -1
      bne  x4, x0, loop    # taken: 2 squashed
```

takes 12 cycles per iteration (9 instructions), 766 cycles for n = 64; the
testbenches check exactly that.

## The two-stage pipeline

Stage A does what F and D do above and also forms the operands; stage B
does X, M and W in one cycle. Between them sit `val_AB`, `cs_AB`, `op1_AB`,
`op2_AB`, `sd_AB` and `btarg_AB`.

* Only one older instruction can be in flight, the one in B, and its
  final value (load data included, because memory answers within the
  cycle) is bypassed to A as `bypass_from_B`. No RAW stall is ever needed.
* `jal` and `jr` are resolved in A and steer the very next fetch: no lost
  cycle.
* `bne` is resolved in B: `squash_A = val_B && op_B == bne && !eq_B` kills
  the instruction in A and fetches `btarg_AB`: one lost cycle.

The vector-vector add loop takes 10 cycles per iteration here, but the
cycle must hold a register read, an ALU or multiply, a memory access and a
register write back to back.

## Quad adders

All three compute `z = a + b + c + d` on 4-bit inputs (width `W`, default
4; the sum wraps modulo 16) and register their inputs first.

* `quad_adder_sc`: three chained adders between the input registers and
  the output register. `out_val` follows `in_val` by two cycles; a new set
  each cycle, but the cycle must fit three adders.
* `quad_adder_mc`: one adder and two muxes. Step 1 adds the first two
  inputs, steps 2 and 3 add the third and fourth to the fed-back partial
  sum in the output register. `in_rdy` is high when idle and in step 3, so
  sets are accepted one per three cycles; `out_val` is high four cycles
  after the accepting cycle.
* `quad_adder_pipe`: stages S1, S2, S3 with one adder each and registers
  between them carrying the partial sum and the inputs still to be added.
  `out_val` follows `in_val` by four cycles, and a result leaves every cycle.

The valid/ready signals are this design's additions; the datapaths are the
example's.

## Memory interface

Both processors expect memory that answers combinationally, in the cycle
of the request:

| Port | Dir | Meaning |
|---|---|---|
| `imemreq_addr` | out | fetch address (every cycle after reset) |
| `imemresp_data` | in | instruction word at that address |
| `dmemreq_val` | out | a `lw` or `sw` is in M (five-stage) or B (two-stage) |
| `dmemreq_wen` | out | the access is a store |
| `dmemreq_addr`, `dmemreq_data` | out | byte address, store data |
| `dmemresp_data` | in | load data, same cycle |

Addresses are byte addresses of aligned words. Memory itself is not part
of the RTL; `tb/tinyrv1_test_mem.sv` is a behavioural 64 KiB model with
combinational reads and writes at the clock edge. `rst` is synchronous and
active high; the first fetch is at `0x200` (`RESET_PC` in the package). A
memory should ignore requests while `rst` is high, since pipeline contents
are only cleared by the first reset edge.

## Design choices beyond the source

* RISC-V encodings, the select encodings, `RESET_PC = 0x200` and the
  synchronous reset.
* `jal` writes `pc + 4` through the ALU with `op1 = pc` and `op2 = 4`; the
  op2 mux therefore has a constant-4 input.
* The ALU has no function select: TinyRV1 needs only an adder and an
  equality flag.
* `jr` jumps to R[rs1] unchanged.
* Bypass priority X > M > W, and the M and W bypass conditions, mirror the
  X condition.
* When a jump leaves D, the squash it causes in F, and the rule that a
  taken branch in X wins over it.
* Invalid instruction words become bubbles.
* The quad adders' valid/ready handshakes and reset.

Not built: the stall-only versions of both pipelines and the
branch-delay-slot ISA variant, which the source discusses as steps or
alternatives before arriving at the bypassed, squashing pipelines above; the
single-cycle and multi-cycle TinyRV1 processors it compares against; and
memory.

## Files

| File | Contents |
|---|---|
| `rtl/tinyrv1_pkg.sv` | types, opcodes, `cs_t`, select enums, `RESET_PC` |
| `rtl/tinyrv1_decoder.sv` | control-signal table |
| `rtl/tinyrv1_regfile.sv`, `tinyrv1_immgen.sv`, `tinyrv1_alu.sv`, `tinyrv1_mul.sv` | datapath units |
| `rtl/tinyrv1_proc5.sv`, `rtl/tinyrv1_proc2.sv` | the two pipelines |
| `rtl/quad_adder_sc.sv`, `quad_adder_mc.sv`, `quad_adder_pipe.sv` | quad adders |
| `rtl/pipelined_processors_top.sv` | everything side by side |
| `tb/tinyrv1_tb_pkg.sv` | assembler, reference ISA model, test programs |
| `tb/tinyrv1_test_mem.sv` | behavioural same-cycle memory |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    --top-module tinyrv1_proc5_tb \
    rtl/tinyrv1_pkg.sv tb/tinyrv1_tb_pkg.sv tb/tinyrv1_proc5_tb.sv
./obj_dir/Vtinyrv1_proc5_tb
```

`-y rtl -y tb` lets Verilator find every other module by its file name.
Swap in another testbench name for the other modules; the two packages are
only needed by the testbenches that import them (all but the quad adders').
`pipelined_processors_top_tb` runs the whole top at its default parameters.

How far the checks go:

* Unit testbenches compare against values computed in the testbench:
  random operands for the ALU, multiplier and immediate generator; a shadow
  array for the register file (x0, write-then-read, same-cycle read of the
  old value); every decoder row and a set of non-TinyRV1 words; the quad
  adders' sums, latencies and throughput.
* The processor testbenches assemble programs in SystemVerilog and run them
  on the pipeline and on an instruction-level reference model
  (`tinyrv1_tb_pkg`). Programs: the short hazard sequences of the course
  examples (bypass from X, M and W, load-use, `jal`, `jr`, taken and
  not-taken `bne`, store-then-load to the same address), vector-vector add,
  and 20 random programs of 150 items: random instructions, forward
  branches and jumps, and counted loops (`bne` back to a loop body of 1 to
  4 instructions, run 1 to 3 times). All 31 registers and the whole memory are compared, the total
  cycle count must match the penalty model above exactly, the number of
  stall, jump and squash cycles must match the model's counts, and each
  vector-vector add iteration must take 12 (five-stage) or 10 (two-stage)
  cycles.
* The top-level testbench runs both pipelines together on the hazard
  examples, 30 independent `addi`s (one per cycle), and vector-vector add
  with n = 64 (five-stage: 797 cycles including a 31-instruction register
  set-up; two-stage: 670). The quad adders get random traffic at the same
  time. Every mechanism must happen at least once: bypass from X, M, W and
  B, load-use stall, jump squash, branch squash, multi-cycle back-pressure
  and back-to-back pipelined results.

Not covered: backward jumps, loops whose body contains branches, and
programs that store into their own instruction stream (the five-stage
pipeline fetches ahead of its stores and does not handle that).
