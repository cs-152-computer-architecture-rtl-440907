// tb_alu_control: self-checking test of the ALU control.
// Each OpSel value with every funct/opcode of the subset, checked against a
// table written out by hand from the MIPS meaning of each code.
module tb_alu_control;
  import mips_pkg::*;
  opsel_e     opsel;
  logic [5:0] opcode, funct;
  aluop_e     aluop;
  int checks = 0, failures = 0;

  alu_control dut (.opsel(opsel), .opcode(opcode), .funct(funct), .aluop(aluop));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(opsel_e s, logic [5:0] opc, logic [5:0] fn, aluop_e exp);
    opsel = s; opcode = opc; funct = fn; #1;
    checks++;
    if (aluop !== exp) begin
      failures++;
      $display("FAIL opsel=%0d opc=%h fn=%h got=%0d exp=%0d", s, opc, fn, aluop, exp);
    end
  endtask

  initial begin
    check(OPSEL_FUNC, 6'h00, 6'h20, ALU_ADD);  check(OPSEL_FUNC, 6'h00, 6'h21, ALU_ADD);
    check(OPSEL_FUNC, 6'h00, 6'h22, ALU_SUB);  check(OPSEL_FUNC, 6'h00, 6'h23, ALU_SUB);
    check(OPSEL_FUNC, 6'h00, 6'h24, ALU_AND);  check(OPSEL_FUNC, 6'h00, 6'h25, ALU_OR);
    check(OPSEL_FUNC, 6'h00, 6'h26, ALU_XOR);  check(OPSEL_FUNC, 6'h00, 6'h27, ALU_NOR);
    check(OPSEL_FUNC, 6'h00, 6'h2A, ALU_SLT);  check(OPSEL_FUNC, 6'h00, 6'h2B, ALU_SLTU);
    check(OPSEL_FUNC, 6'h00, 6'h04, ALU_SLL);  check(OPSEL_FUNC, 6'h00, 6'h06, ALU_SRL);
    check(OPSEL_FUNC, 6'h00, 6'h07, ALU_SRA);
    check(OPSEL_OP, 6'h08, 6'h3F, ALU_ADD);    check(OPSEL_OP, 6'h09, 6'h22, ALU_ADD);
    check(OPSEL_OP, 6'h0A, 6'h00, ALU_SLT);    check(OPSEL_OP, 6'h0B, 6'h00, ALU_SLTU);
    check(OPSEL_OP, 6'h0C, 6'h25, ALU_AND);    check(OPSEL_OP, 6'h0D, 6'h24, ALU_OR);
    check(OPSEL_OP, 6'h0E, 6'h00, ALU_XOR);
    for (int k = 0; k < 50; k++) begin
      check(OPSEL_ADD,  6'($urandom), 6'($urandom), ALU_ADD);
      check(OPSEL_ZERO, 6'($urandom), 6'($urandom), ALU_ZERO);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
