// tb_control_decode: self-checking test of the hardwired control table.
// Builds random instances of every instruction of the subset (random register
// and immediate fields) and compares the decoded control word with the row of
// the control table for that instruction, entered by hand below.
module tb_control_decode;
  import mips_pkg::*;
  logic [31:0] instr;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  control_decode dut (.instr(instr), .ctrl(ctrl));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected row; dc_* flags mark the don't-care ("*") entries of the table
  task automatic row(input logic [5:0] opc, input logic [5:0] fn, input iclass_e ic,
                     input logic dc_ext, input extsel_e ext, input logic dc_b, input bsrc_e bs,
                     input logic dc_op, input opsel_e os, input logic mw, input logic rw,
                     input logic dc_wb, input wbsrc_e wb, input logic dc_dst, input regdst_e dst,
                     input pcsrc_e pcs);
    for (int k = 0; k < 20; k++) begin
      instr = {opc, 20'($urandom), 6'($urandom)};
      if (opc == 6'h00) instr[5:0] = fn;
      #1;
      checks++;
      if (ctrl.iclass !== ic || (!dc_ext && ctrl.extsel !== ext) || (!dc_b && ctrl.bsrc !== bs) ||
          (!dc_op && ctrl.opsel !== os) || ctrl.memw !== mw || ctrl.regw !== rw ||
          (!dc_wb && ctrl.wbsrc !== wb) || (!dc_dst && ctrl.regdst !== dst) || ctrl.pcsrc !== pcs) begin
        failures++;
        $display("FAIL instr=%h got=%p", instr, ctrl);
      end
    end
  endtask

  initial begin
    //        opc    fn     class     ext            bsrc           opsel             MemW RegW WBSrc       RegDst        PCSrc
    row(6'h00, 6'h20, IC_ALU,   1, EXT_S16, 0, BSRC_REG, 0, OPSEL_FUNC, 0, 1, 0, WB_ALU, 0, DST_RD,  PCS_PC4);
    row(6'h00, 6'h2A, IC_ALU,   1, EXT_S16, 0, BSRC_REG, 0, OPSEL_FUNC, 0, 1, 0, WB_ALU, 0, DST_RD,  PCS_PC4);
    row(6'h00, 6'h07, IC_ALU,   1, EXT_S16, 0, BSRC_REG, 0, OPSEL_FUNC, 0, 1, 0, WB_ALU, 0, DST_RD,  PCS_PC4);
    row(6'h08, 6'h00, IC_ALUI,  0, EXT_S16, 0, BSRC_IMM, 0, OPSEL_OP,   0, 1, 0, WB_ALU, 0, DST_RT,  PCS_PC4);
    row(6'h0A, 6'h00, IC_ALUI,  0, EXT_S16, 0, BSRC_IMM, 0, OPSEL_OP,   0, 1, 0, WB_ALU, 0, DST_RT,  PCS_PC4);
    row(6'h0D, 6'h00, IC_ALUIU, 0, EXT_U16, 0, BSRC_IMM, 0, OPSEL_OP,   0, 1, 0, WB_ALU, 0, DST_RT,  PCS_PC4);
    row(6'h0C, 6'h00, IC_ALUIU, 0, EXT_U16, 0, BSRC_IMM, 0, OPSEL_OP,   0, 1, 0, WB_ALU, 0, DST_RT,  PCS_PC4);
    row(6'h23, 6'h00, IC_LW,    0, EXT_S16, 0, BSRC_IMM, 0, OPSEL_ADD,  0, 1, 0, WB_MEM, 0, DST_RT,  PCS_PC4);
    row(6'h2B, 6'h00, IC_SW,    0, EXT_S16, 0, BSRC_IMM, 0, OPSEL_ADD,  1, 0, 1, WB_ALU, 1, DST_RT,  PCS_PC4);
    row(6'h04, 6'h00, IC_BEQZ,  0, EXT_S16, 1, BSRC_REG, 0, OPSEL_ZERO, 0, 0, 1, WB_ALU, 1, DST_RT,  PCS_BR);
    row(6'h02, 6'h00, IC_J,     1, EXT_S16, 1, BSRC_REG, 1, OPSEL_ADD,  0, 0, 1, WB_ALU, 1, DST_RT,  PCS_JABS);
    row(6'h03, 6'h00, IC_JAL,   1, EXT_S16, 1, BSRC_REG, 1, OPSEL_ADD,  0, 1, 0, WB_PC,  0, DST_R31, PCS_JABS);
    row(6'h00, 6'h08, IC_JR,    1, EXT_S16, 1, BSRC_REG, 1, OPSEL_ADD,  0, 0, 1, WB_ALU, 1, DST_RT,  PCS_RIND);
    row(6'h00, 6'h09, IC_JALR,  1, EXT_S16, 1, BSRC_REG, 1, OPSEL_ADD,  0, 1, 0, WB_PC,  0, DST_R31, PCS_RIND);
    // the nop word and an unknown opcode write nothing and do not transfer control
    row(6'h00, 6'h00, IC_NONE,  1, EXT_S16, 1, BSRC_REG, 1, OPSEL_ADD,  0, 0, 1, WB_ALU, 1, DST_RT,  PCS_PC4);
    row(6'h3F, 6'h00, IC_NONE,  1, EXT_S16, 1, BSRC_REG, 1, OPSEL_ADD,  0, 0, 1, WB_ALU, 1, DST_RT,  PCS_PC4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
