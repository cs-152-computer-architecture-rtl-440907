// mips_pkg: types and constants shared by the five-stage MIPS-subset pipeline.
//
// The instruction set is the small load/store subset used to teach pipelining:
// register-register ALU operations, ALU operations with a 16-bit immediate
// (sign-extended "ALUi" and zero-extended "ALUiu"), LW, SW, BEQZ, J, JAL, JR and
// JALR. The control-field names (ExtSel, BSrc, OpSel, WBSrc, RegDst, PCSrc) follow
// the hardwired control table of the unpipelined datapath the pipeline is built
// from. The binary encodings are the standard MIPS-I ones; the subset itself does
// not fix them, so they are this design's choice. BEQZ uses the BEQ opcode and
// ignores the rt field; the all-zero word is the pipeline bubble (nop).
package mips_pkg;

  localparam int XLEN     = 32;
  localparam int NREGS    = 32;
  localparam int RIDX     = 5;
  localparam logic [RIDX-1:0] LINK_REG = 5'd31;

  // Pipeline bubble injected by the stall and kill logic.
  localparam logic [31:0] NOP = 32'h0000_0000;

  // Primary opcodes (instr[31:26]).
  typedef enum logic [5:0] {
    OPC_SPECIAL = 6'h00,
    OPC_J       = 6'h02,
    OPC_JAL     = 6'h03,
    OPC_BEQZ    = 6'h04,
    OPC_ADDI    = 6'h08,
    OPC_ADDIU   = 6'h09,
    OPC_SLTI    = 6'h0A,
    OPC_SLTIU   = 6'h0B,
    OPC_ANDI    = 6'h0C,
    OPC_ORI     = 6'h0D,
    OPC_XORI    = 6'h0E,
    OPC_LW      = 6'h23,
    OPC_SW      = 6'h2B
  } opcode_e;

  // Function codes (instr[5:0]) of SPECIAL instructions.
  typedef enum logic [5:0] {
    FN_SLLV = 6'h04,
    FN_SRLV = 6'h06,
    FN_SRAV = 6'h07,
    FN_JR   = 6'h08,
    FN_JALR = 6'h09,
    FN_ADD  = 6'h20,
    FN_ADDU = 6'h21,
    FN_SUB  = 6'h22,
    FN_SUBU = 6'h23,
    FN_AND  = 6'h24,
    FN_OR   = 6'h25,
    FN_XOR  = 6'h26,
    FN_NOR  = 6'h27,
    FN_SLT  = 6'h2A,
    FN_SLTU = 6'h2B
  } funct_e;

  // Instruction classes, the rows of the control table.
  typedef enum logic [3:0] {
    IC_NONE,   // nop or unrecognised word: reads and writes nothing
    IC_ALU,    // rd <- rs func rt
    IC_ALUI,   // rt <- rs op sExt16(imm)
    IC_ALUIU,  // rt <- rs op uExt16(imm)
    IC_LW,     // rt <- M[rs + sExt16(imm)]
    IC_SW,     // M[rs + sExt16(imm)] <- rt
    IC_BEQZ,   // if rs == 0: PC <- PC+4 + (sExt16(imm) << 2)
    IC_J,      // PC <- jump target
    IC_JAL,    // r31 <- PC+4, PC <- jump target
    IC_JR,     // PC <- rs
    IC_JALR    // r31 <- PC+4, PC <- rs
  } iclass_e;

  typedef enum logic {EXT_S16, EXT_U16} extsel_e;
  typedef enum logic {BSRC_REG, BSRC_IMM} bsrc_e;
  typedef enum logic [1:0] {OPSEL_FUNC, OPSEL_OP, OPSEL_ADD, OPSEL_ZERO} opsel_e;
  typedef enum logic [1:0] {WB_ALU, WB_MEM, WB_PC} wbsrc_e;
  typedef enum logic [1:0] {DST_RT, DST_RD, DST_R31} regdst_e;
  typedef enum logic [1:0] {PCS_PC4, PCS_BR, PCS_RIND, PCS_JABS} pcsrc_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_ZERO
  } aluop_e;

  // How read-after-write hazards are resolved.
  //   HZ_INTERLOCK   : no bypass, stall until the producer has written the GPRs
  //   HZ_ALU_BYPASS  : one bypass, ALU output (E) to operand A, stall otherwise
  //   HZ_FULL_BYPASS : bypass from E, M and W to both operands, stall only on a
  //                    load in E whose result is needed in D
  typedef enum logic [1:0] {HZ_INTERLOCK, HZ_ALU_BYPASS, HZ_FULL_BYPASS} hazard_mode_e;

  // Operand source of the bypass muxes in front of the A and B/MD1 registers.
  typedef enum logic [1:0] {FWD_RF, FWD_E, FWD_M, FWD_W} fwd_e;

  // Control word of the hardwired control table. For BEQZ the pcsrc field is
  // the taken case (br); the pipeline falls back to pc+4 when the test fails.
  typedef struct packed {
    iclass_e iclass;
    extsel_e extsel;
    bsrc_e   bsrc;
    opsel_e  opsel;
    logic    memw;
    logic    regw;
    wbsrc_e  wbsrc;
    regdst_e regdst;
    pcsrc_e  pcsrc;
  } ctrl_t;

  function automatic logic [RIDX-1:0] f_rs(input logic [31:0] ir);
    return ir[25:21];
  endfunction
  function automatic logic [RIDX-1:0] f_rt(input logic [31:0] ir);
    return ir[20:16];
  endfunction
  function automatic logic [RIDX-1:0] f_rd(input logic [31:0] ir);
    return ir[15:11];
  endfunction

endpackage
