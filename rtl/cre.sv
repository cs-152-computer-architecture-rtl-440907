// cre: source-register use of the instruction in decode (C_re).
//
// re1 is high when the instruction reads rs (ALU, ALUi, ALUiu, LW, SW, BEQZ,
// JR, JALR), re2 when it reads rt (ALU, SW). J and JAL read no register.
// The stall and bypass logic compares a register field only when it is really
// read, so that, for example, the immediate field of an ALUi is not mistaken
// for a source. Combinational; the case lists are the lecture's.
module cre
  import mips_pkg::*;
(
  input  logic [31:0] instr,
  output logic        re1,
  output logic        re2
);

  ctrl_t ctrl;
  control_decode u_dec (.instr(instr), .ctrl(ctrl));

  always_comb begin
    unique case (ctrl.iclass)
      IC_ALU, IC_SW:                                 re1 = 1'b1;
      IC_ALUI, IC_ALUIU, IC_LW, IC_BEQZ, IC_JR, IC_JALR: re1 = 1'b1;
      default:                                       re1 = 1'b0;
    endcase
    re2 = (ctrl.iclass == IC_ALU) || (ctrl.iclass == IC_SW);
  end

endmodule
