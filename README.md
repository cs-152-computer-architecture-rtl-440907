# A five-stage pipelined MIPS-subset processor with interlocks and bypassing

A single-cycle processor has to fit instruction fetch, register read, ALU, data
memory and register write into one clock period. When those five steps take about
the same time, cutting the datapath into five stages with registers between them
shortens the clock period about five-fold. One instruction still completes per
cycle (CPI = 1), as long as nothing forces the pipeline to wait. What does force it
to wait is an instruction that needs a register value that an older instruction,
still in the pipeline, has not yet written back.

This RTL implements that pipeline for a small load/store MIPS subset. It also
implements the three classic ways of handling the register dependence, selected
by a parameter:

| `HAZARD`                   | what happens when D needs a value still in flight | bubbles for `r1 <- r0+10; r4 <- r1+17` | bubbles for `lw r1; addi r4, r1, 17` |
|----------------------------|----------------------------------------------------|:---:|:---:|
| `HZ_INTERLOCK`             | stall until the producer has written the register file | 3 | 3 |
| `HZ_ALU_BYPASS`            | forward the ALU output to operand A, otherwise stall    | 0 | 3 |
| `HZ_FULL_BYPASS` (default) | forward from E, M and W to both operands; only a load followed by a use waits | 0 | 1 |

## Instruction subset

| class | instructions | operation | reads | writes |
|---|---|---|---|---|
| ALU   | ADD ADDU SUB SUBU AND OR XOR NOR SLT SLTU SLLV SRLV SRAV | rd <- rs func rt | rs, rt | rd |
| ALUi  | ADDI ADDIU SLTI SLTIU | rt <- rs op sign-extended imm | rs | rt |
| ALUiu | ANDI ORI XORI | rt <- rs op zero-extended imm | rs | rt |
| LW    | LW | rt <- M[rs + sext(imm)] | rs | rt |
| SW    | SW | M[rs + sext(imm)] <- rt | rs, rt | – |
| BEQZ  | opcode 0x04, rt ignored | if rs == 0: PC <- PC+4 + 4*sext(imm) | rs | – |
| J, JAL | J JAL | PC <- {PC+4[31:28], target, 00}; JAL also r31 <- PC+4 | – | JAL: r31 |
| JR, JALR | JR JALR | PC <- rs; JALR also r31 <- PC+4 | rs | JALR: r31 |

Encodings are the standard MIPS-I ones. Note that JALR always links into r31, and
that there is no branch delay slot. The all-zero word is the nop, and every
unrecognised word behaves as a nop. There are no exceptions: arithmetic does not
trap on overflow.

## Pipeline organisation

```
   F            D                       E                M                   W
  PC ──► IMEM ─► IR_D ── GPR read ──► IR_E,A,B,MD1 ─► ALU ─► IR_M,Y,MD2 ─► DMEM ─► IR_W,R ─► GPR write
           PC4_D   Imm Ext, BSrc mux     PC4_E           WBSrc mux (Y / load data)
                   bypass muxes ◄────────── E result ◄──── M value ◄──────── R
                   C_stall ──► stall: hold PC and IR_D, inject nop into IR_E
```

* Each stage keeps its own copy of the instruction (IR_D, IR_E, IR_M, IR_W) and
  decodes its own control signals from it with `control_decode`. No control
  word is piped along.
* `cdest` gives each of E, M and W its destination register `ws` and write
  enable `we`. `cre` says which of rs and rt the instruction in D really reads
  (`re1`, `re2`). `cstall` compares the two and produces `stall` and the bypass
  selects.
* The register file is written at the end of W. A read in the same cycle sees
  the old value, so the interlock equations must also compare against W.
* Both memories read combinationally and write at the clock edge, so each stage
  is one cycle. A store therefore completes within its M cycle, and a load
  directly behind it reads the new word. No pipeline logic is needed for
  memory dependences.

## Stall and bypass equations (`cstall`)

Notation: `x=y` is a 5-bit register comparison, `.` is AND and `+` is OR. The
E-stage write enable is split in two. `we_bypass_E` covers ALU and ALUi results,
which come out of the ALU. `we_stall_E` covers LW, whose value exists only after
M, and JAL/JALR.

```
HZ_INTERLOCK
  stall = ((rs=wsE).weE + (rs=wsM).weM + (rs=wsW).weW).re1
        + ((rt=wsE).weE + (rt=wsM).weM + (rt=wsW).weW).re2

HZ_ALU_BYPASS
  ASrc  = (rs=wsE).we_bypassE.re1                       (ALU output -> A)
  stall = ((rs=wsE).we_stallE + (rs=wsM).weM + (rs=wsW).weW).re1
        + ((rt=wsE).weE       + (rt=wsM).weM + (rt=wsW).weW).re2

HZ_FULL_BYPASS
  stall = (rs=wsE).(opE=LW).(wsE!=0).re1 + (rt=wsE).(opE=LW).(wsE!=0).re2
  operand = youngest of  E result > M write-back value > R (W) > register file
```

Three details matter for correctness:

* The M-stage bypass source is the output of the write-back mux, not Y, so
  load data is forwarded from M. This is why a load in E is the only remaining
  reason to stall.
* The E > M > W priority matters when several in-flight instructions write the
  same register: the youngest value has to win.
* In `HZ_ALU_BYPASS` the equations are deliberately conservative. For example,
  they stall on a match in M even when E also matches and would supply the
  value.

A stall holds the PC and IR_D and puts a nop into IR_E. The bubble then drains
through M and W.

## Control transfers

The lecture material behind this design leaves branch and jump hazards for
later. The handling here is this design's own. Branches and jumps are resolved
in E, where their rs operand has already passed through the bypass network.
When the next PC is not PC+4, the instructions in D and F are replaced by nops
(the `kill` output): a taken transfer costs two cycles and a not-taken BEQZ
costs none. The link value PC+4 of JAL/JALR travels with the instruction and
replaces the ALU result in E. From there it is bypassed like any other result,
and the A operand stays free to carry JALR's target register. The whole cycle
budget is therefore

```
cycle of last retirement = 4 + (instructions - 1) + stall cycles + 2 * taken transfers
```

Here the stall cycles and taken transfers are only those that happen before the
last instruction enters E. The end-to-end testbenches check this exactly.

## Modules

| file | role |
|---|---|
| `rtl/mips_pkg.sv` | opcodes, instruction classes, control-field enums, `ctrl_t`, hazard modes |
| `rtl/mips_pipe.sv` | top: stages, pipeline registers, nop mux, bypass muxes, memories |
| `rtl/control_decode.sv` | hardwired control table (ExtSel, BSrc, OpSel, MemW, RegW, WBSrc, RegDst, PCSrc) |
| `rtl/cdest.sv`, `rtl/cre.sv`, `rtl/cstall.sv` | destination decode, source decode, stall/bypass logic |
| `rtl/alu_control.sv`, `rtl/alu.sv` | ALU operation select; 32-bit ALU with zero test |
| `rtl/imm_ext.sv` | sign/zero extension of the 16-bit immediate |
| `rtl/regfile.sv` | 32 x 32 GPRs, 2 read ports, 1 write port, r0 = 0 |
| `rtl/imem.sv`, `rtl/dmem.sv` | 1024-word memories with single-cycle access and a host load/inspect port |
| `rtl/next_pc.sv` | pc+4 / branch / register-indirect / absolute-jump selection |

Top-level ports of `mips_pipe`:

* `clk`, and `rst` (synchronous, active high; clears the PC, the IRs and the
  GPRs).
* The host ports `imem_ld_*` and `dmem_ld_*`. Each is word addressed: write
  with `*_ld_we`, and read through `*_ld_rdata` combinationally.
* Status outputs for every cycle: `retire` with `retire_ir`, `stall`, `kill`,
  and `fwd_a` / `fwd_b`, the bypass source used by the instruction leaving D.

The memories' contents are not reset. Load both memories before releasing `rst`.

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and ends with
`$finish`. To build and run the end-to-end test, which runs three processors,
one per hazard mode:

```
verilator --binary --timing --assert -y rtl -y tb rtl/mips_pkg.sv tb/mips_tb_pkg.sv \
          tb/tb_mips_pipe.sv --top-module tb_mips_pipe -Mdir obj_pipe
./obj_pipe/Vtb_mips_pipe
```

`tb_mips_pipe_full` runs the default configuration, with no parameter changed,
on two 1000-instruction random programs. Each block has its own `tb_<module>`,
built the same way (for example `rtl/mips_pkg.sv tb/tb_cstall.sv --top-module
tb_cstall`). All of them run in well under a second.

`tb/mips_tb_pkg.sv` holds a small assembler (`r_op`, `i_op`, `j_op`), a random
program generator and an instruction-at-a-time model of the subset. To run your
own program, fill `prog[]` and `dinit[]` and call the `run_prog` task of
`tb_mips_pipe.sv` the way its directed cases do.

## How far it is verified

* Block tests compare every block with values computed independently, over
  random and corner inputs. The `cstall` test derives the expected result per
  operand ("find the youngest writer, then decide") rather than from the
  equations.
* The end-to-end tests require each processor to retire exactly the
  instruction sequence of the reference model and to end with the same
  registers and data memory. They also check the cycle count formula above.
* Directed sequences check the exact bubble counts of the table at the top.
  They also check two-cycle taken branches, JAL followed by a use of r31
  (3 cycles apart with full bypass, 4 otherwise), and a store followed by a
  load of the same word.
* The testbenches count every mechanism (interlock stall, load-use stall, kill,
  each of the six full-bypass paths, the ALU bypass, store-then-load) and fail
  if any of them never happened.
* Assertions in `mips_pipe` check that a stall always puts a bubble into E,
  that nothing is written to r0, and that each hazard mode uses only its own
  bypass paths.

* A directed loop sums an array through a subroutine that is called by JAL
  and by JALR and left by JR, with a backward BEQZ and J. It checks the same
  results and cycle count on code that revisits instructions.

Not verified: timing and area on any real technology. The random programs
branch forward only, and no compiled code was run.

## Departures and open points

* **Branches and jumps** (resolved in E, two-cycle kill, no delay slot) are this
  design's choice. The lecture defers control hazards.
* **Jump targets.** J/JAL use the MIPS absolute form `{PC+4[31:28], target, 00}`
  and BEQZ uses `PC+4 + 4*sext(imm)`. A simpler reading, `PC + imm`, appears in
  some descriptions of the same subset.
* **Link value.** JAL/JALR write PC+4 into r31, and the value is inserted after
  the ALU rather than fed through operand A.
* **Sizes.** Memory sizes (1024 words each), the reset behaviour, the
  encodings and the host ports are not part of the source material; all are
  parameters or easy to change.
* **Not included.** The unpipelined single-cycle datapath and the microcoded
  machine that the pipeline is compared against are not included. Neither is
  the third hazard strategy (speculating on a dependence and killing on a
  misguess), which is only named as future work.
