// imm_ext: the "Imm Ext" unit of the decode stage.
//
// Extends the 16-bit immediate field of an instruction to 32 bits, by sign
// (ExtSel = sExt16, used by ALUi, LW, SW and BEQZ) or by zeros (ExtSel = uExt16,
// used by ALUiu). Combinational. The two modes are those of the control table.
module imm_ext
  import mips_pkg::*;
(
  input  logic [15:0]     imm,
  input  extsel_e         extsel,
  output logic [XLEN-1:0] ext
);

  always_comb begin
    unique case (extsel)
      EXT_S16: ext = {{(XLEN-16){imm[15]}}, imm};
      EXT_U16: ext = {{(XLEN-16){1'b0}}, imm};
    endcase
  end

endmodule
