// tb_imm_ext: self-checking test of the immediate extender.
// Drives random 16-bit immediates in both ExtSel modes and compares with the
// sign/zero extension worked out arithmetically ($signed of a 16-bit value).
module tb_imm_ext;
  import mips_pkg::*;
  logic [15:0] imm;
  extsel_e     extsel;
  logic [31:0] ext;
  int checks = 0, failures = 0;

  imm_ext dut (.imm(imm), .extsel(extsel), .ext(ext));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] i, input extsel_e s);
    int signed expv;
    imm = i; extsel = s; #1;
    expv = (s == EXT_S16) ? int'($signed(i)) : int'(i);
    checks++;
    if (ext !== 32'(expv)) begin
      failures++;
      $display("FAIL imm=%h sel=%0d ext=%h exp=%h", i, s, ext, expv);
    end
  endtask

  initial begin
    check(16'h0000, EXT_S16); check(16'h8000, EXT_S16); check(16'hFFFF, EXT_S16);
    check(16'h7FFF, EXT_S16); check(16'h8000, EXT_U16); check(16'hFFFF, EXT_U16);
    for (int k = 0; k < 200; k++) check(16'($urandom), extsel_e'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
