// next_pc: next-program-counter selection (the PCSrc mux and its adders).
//
// pc_plus4 = pc_F + 4 is the default next PC. A control transfer is resolved
// when it reaches the execute stage, where its operands have passed the
// bypass network; the PCSrc field of that instruction chooses
//   br   = pc4_E + (sExt16(imm) << 2)   BEQZ, taken when the zero flag z is set
//   rind = the value of rs                JR, JALR
//   jabs = {pc4_E[31:28], target, 2'b00}  J, JAL
// and redirect goes high whenever the next PC is not pc_plus4, telling the
// pipeline to discard the two younger instructions fetched behind the jump.
// Combinational. The four PCSrc choices come from the unpipelined datapath;
// the stage where they are resolved, the word scaling of br and the MIPS form of
// jabs are this design's choices.
module next_pc
  import mips_pkg::*;
(
  input  logic [31:0] pc_F,
  input  pcsrc_e      pcsrc_E,
  input  logic        z_E,
  input  logic [31:0] pc4_E,
  input  logic [31:0] sext_E,
  input  logic [25:0] target_E,
  input  logic [31:0] rind_E,
  output logic [31:0] pc_plus4,
  output logic [31:0] npc,
  output logic        redirect
);

  logic [31:0] br, jabs;
  assign pc_plus4 = pc_F + 32'd4;
  assign br       = pc4_E + {sext_E[29:0], 2'b00};
  assign jabs     = {pc4_E[31:28], target_E, 2'b00};

  always_comb begin
    redirect = 1'b1;
    npc      = pc_plus4;
    unique case (pcsrc_E)
      PCS_PC4:  redirect = 1'b0;
      PCS_BR:   if (z_E) npc = br; else redirect = 1'b0;
      PCS_RIND: npc = rind_E;
      PCS_JABS: npc = jabs;
    endcase
  end

endmodule
