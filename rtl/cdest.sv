// cdest: destination-register decode of one pipeline stage (C_dest).
//
// From the instruction held in a stage's IR, gives the register it will write
// (ws) and whether it writes at all (we):
//   ws = rd for ALU, rt for ALUi/ALUiu/LW, R31 for JAL/JALR (0 otherwise)
//   we = (ws != 0) for ALU, ALUi, LW; on for JAL, JALR; off otherwise
// and the two halves of we used when only the ALU output is bypassed:
//   we_bypass = (ws != 0) for ALU, ALUi  (value comes out of the ALU)
//   we_stall  = (ws != 0) for LW; on for JAL, JALR
// load is high for a LW, whose value exists only after the memory stage.
// Combinational. The equations are the lecture's; ALUiu is treated as ALUi.
module cdest
  import mips_pkg::*;
(
  input  logic [31:0]     instr,
  output logic [RIDX-1:0] ws,
  output logic            we,
  output logic            we_bypass,
  output logic            we_stall,
  output logic            load
);

  ctrl_t ctrl;
  control_decode u_dec (.instr(instr), .ctrl(ctrl));

  always_comb begin
    ws        = '0;
    we        = 1'b0;
    we_bypass = 1'b0;
    we_stall  = 1'b0;
    load      = 1'b0;
    unique case (ctrl.iclass)
      IC_ALU: begin
        ws        = f_rd(instr);
        we        = (ws != '0);
        we_bypass = (ws != '0);
      end
      IC_ALUI, IC_ALUIU: begin
        ws        = f_rt(instr);
        we        = (ws != '0);
        we_bypass = (ws != '0);
      end
      IC_LW: begin
        ws       = f_rt(instr);
        we       = (ws != '0);
        we_stall = (ws != '0);
        load     = 1'b1;
      end
      IC_JAL, IC_JALR: begin
        ws       = LINK_REG;
        we       = 1'b1;
        we_stall = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
