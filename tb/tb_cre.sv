// tb_cre: self-checking test of the source-register decode (C_re).
// Compares re1/re2 with the source columns of the source/destination table
// for random instances of each instruction.
module tb_cre;
  logic [31:0] instr;
  logic        re1, re2;
  int checks = 0, failures = 0;

  cre dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [5:0] opc, input logic [5:0] fn, input logic e1, input logic e2);
    for (int k = 0; k < 30; k++) begin
      instr = {opc, 20'($urandom), fn};
      #1;
      checks++;
      if (re1 !== e1 || re2 !== e2) begin
        failures++;
        $display("FAIL instr=%h re1=%b/%b re2=%b/%b", instr, re1, e1, re2, e2);
      end
    end
  endtask

  initial begin
    one(6'h00, 6'h20, 1, 1);  // ALU
    one(6'h00, 6'h2B, 1, 1);  // ALU (sltu)
    one(6'h08, 6'h00, 1, 0);  // ALUi
    one(6'h0D, 6'h00, 1, 0);  // ALUiu
    one(6'h23, 6'h00, 1, 0);  // LW
    one(6'h2B, 6'h00, 1, 1);  // SW
    one(6'h04, 6'h00, 1, 0);  // BEQZ
    one(6'h02, 6'h00, 0, 0);  // J
    one(6'h03, 6'h00, 0, 0);  // JAL
    one(6'h00, 6'h08, 1, 0);  // JR
    one(6'h00, 6'h09, 1, 0);  // JALR
    one(6'h00, 6'h00, 0, 0);  // nop
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
