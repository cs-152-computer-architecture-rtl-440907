// control_decode: the hardwired control table of the MIPS subset.
//
// A purely combinational decoder from a 32-bit instruction word to the control
// word ctrl_t (instruction class, ExtSel, BSrc, OpSel, MemW, RegW, WBSrc, RegDst,
// PCSrc). Each row of the table is one instruction class:
//   ALU   : ExtSel *,     BSrc Reg, OpSel Func, RegW, WBSrc ALU, RegDst rd,  pc+4
//   ALUi  : ExtSel sExt16, BSrc Imm, OpSel Op,  RegW, WBSrc ALU, RegDst rt,  pc+4
//   ALUiu : ExtSel uExt16, BSrc Imm, OpSel Op,  RegW, WBSrc ALU, RegDst rt,  pc+4
//   LW    : sExt16, Imm, +,  RegW, WBSrc Mem, RegDst rt, pc+4
//   SW    : sExt16, Imm, +,  MemW,                       pc+4
//   BEQZ  : sExt16, OpSel 0?,                            br if zero, else pc+4
//   J / JAL / JR / JALR : jabs / jabs / rind / rind; JAL and JALR write PC to R31.
// Don't-care entries of the table are driven to the first enumerator. Opcode and
// function encodings (MIPS-I) and the treatment of unknown words as nops are this
// design's choice; the table itself is followed as printed.
module control_decode
  import mips_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);

  logic [5:0] opc, fn;
  assign opc = instr[31:26];
  assign fn  = instr[5:0];

  always_comb begin
    ctrl = '{iclass: IC_NONE, extsel: EXT_S16, bsrc: BSRC_REG, opsel: OPSEL_FUNC,
             memw: 1'b0, regw: 1'b0, wbsrc: WB_ALU, regdst: DST_RT, pcsrc: PCS_PC4};
    unique case (opc)
      OPC_SPECIAL: begin
        unique case (fn)
          FN_ADD, FN_ADDU, FN_SUB, FN_SUBU, FN_AND, FN_OR, FN_XOR, FN_NOR,
          FN_SLT, FN_SLTU, FN_SLLV, FN_SRLV, FN_SRAV: begin
            ctrl.iclass = IC_ALU;
            ctrl.bsrc   = BSRC_REG;
            ctrl.opsel  = OPSEL_FUNC;
            ctrl.regw   = 1'b1;
            ctrl.wbsrc  = WB_ALU;
            ctrl.regdst = DST_RD;
          end
          FN_JR: begin
            ctrl.iclass = IC_JR;
            ctrl.pcsrc  = PCS_RIND;
          end
          FN_JALR: begin
            ctrl.iclass = IC_JALR;
            ctrl.regw   = 1'b1;
            ctrl.wbsrc  = WB_PC;
            ctrl.regdst = DST_R31;
            ctrl.pcsrc  = PCS_RIND;
          end
          default: ;
        endcase
      end
      OPC_ADDI, OPC_ADDIU, OPC_SLTI, OPC_SLTIU: begin
        ctrl.iclass = IC_ALUI;
        ctrl.extsel = EXT_S16;
        ctrl.bsrc   = BSRC_IMM;
        ctrl.opsel  = OPSEL_OP;
        ctrl.regw   = 1'b1;
        ctrl.regdst = DST_RT;
      end
      OPC_ANDI, OPC_ORI, OPC_XORI: begin
        ctrl.iclass = IC_ALUIU;
        ctrl.extsel = EXT_U16;
        ctrl.bsrc   = BSRC_IMM;
        ctrl.opsel  = OPSEL_OP;
        ctrl.regw   = 1'b1;
        ctrl.regdst = DST_RT;
      end
      OPC_LW: begin
        ctrl.iclass = IC_LW;
        ctrl.extsel = EXT_S16;
        ctrl.bsrc   = BSRC_IMM;
        ctrl.opsel  = OPSEL_ADD;
        ctrl.regw   = 1'b1;
        ctrl.wbsrc  = WB_MEM;
        ctrl.regdst = DST_RT;
      end
      OPC_SW: begin
        ctrl.iclass = IC_SW;
        ctrl.extsel = EXT_S16;
        ctrl.bsrc   = BSRC_IMM;
        ctrl.opsel  = OPSEL_ADD;
        ctrl.memw   = 1'b1;
      end
      OPC_BEQZ: begin
        ctrl.iclass = IC_BEQZ;
        ctrl.extsel = EXT_S16;
        ctrl.opsel  = OPSEL_ZERO;
        ctrl.pcsrc  = PCS_BR;
      end
      OPC_J: begin
        ctrl.iclass = IC_J;
        ctrl.pcsrc  = PCS_JABS;
      end
      OPC_JAL: begin
        ctrl.iclass = IC_JAL;
        ctrl.regw   = 1'b1;
        ctrl.wbsrc  = WB_PC;
        ctrl.regdst = DST_R31;
        ctrl.pcsrc  = PCS_JABS;
      end
      default: ;
    endcase
  end

endmodule
