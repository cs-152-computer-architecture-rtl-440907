// alu_control: the "ALU Control" box of the datapath.
//
// Combines the OpSel control field with the instruction's own operation fields
// into one ALU operation. OpSel = Func takes the operation from the funct field
// of a register-register instruction, Op from the primary opcode of an
// immediate instruction, "+" forces an add (address calculation of LW and SW)
// and "0?" selects the zero test used by BEQZ. Combinational. The mapping of
// each funct and opcode to an operation is the usual MIPS meaning; unknown codes
// give an add.
module alu_control
  import mips_pkg::*;
(
  input  opsel_e     opsel,
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  output aluop_e     aluop
);

  always_comb begin
    aluop = ALU_ADD;
    unique case (opsel)
      OPSEL_FUNC: begin
        case (funct)
          FN_ADD, FN_ADDU: aluop = ALU_ADD;
          FN_SUB, FN_SUBU: aluop = ALU_SUB;
          FN_AND:          aluop = ALU_AND;
          FN_OR:           aluop = ALU_OR;
          FN_XOR:          aluop = ALU_XOR;
          FN_NOR:          aluop = ALU_NOR;
          FN_SLT:          aluop = ALU_SLT;
          FN_SLTU:         aluop = ALU_SLTU;
          FN_SLLV:         aluop = ALU_SLL;
          FN_SRLV:         aluop = ALU_SRL;
          FN_SRAV:         aluop = ALU_SRA;
          default:         aluop = ALU_ADD;
        endcase
      end
      OPSEL_OP: begin
        case (opcode)
          OPC_ADDI, OPC_ADDIU: aluop = ALU_ADD;
          OPC_SLTI:            aluop = ALU_SLT;
          OPC_SLTIU:           aluop = ALU_SLTU;
          OPC_ANDI:            aluop = ALU_AND;
          OPC_ORI:             aluop = ALU_OR;
          OPC_XORI:            aluop = ALU_XOR;
          default:             aluop = ALU_ADD;
        endcase
      end
      OPSEL_ADD:  aluop = ALU_ADD;
      OPSEL_ZERO: aluop = ALU_ZERO;
    endcase
  end

endmodule
