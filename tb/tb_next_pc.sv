// tb_next_pc: self-checking test of next-PC selection.
// Random PCs, offsets and targets for each PCSrc value; the expected next PC
// and redirect flag are computed with integer arithmetic.
module tb_next_pc;
  import mips_pkg::*;
  logic [31:0] pc_F, pc4_E, sext_E, rind_E, pc_plus4, npc;
  pcsrc_e      pcsrc_E;
  logic        z_E, redirect;
  logic [25:0] target_E;
  int checks = 0, failures = 0;

  next_pc dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4000; k++) begin
      logic [31:0] exp_npc;
      logic        exp_red;
      int signed   off;
      pc_F = {30'($urandom), 2'b00} ; pc4_E = {30'($urandom), 2'b00};
      off = $urandom_range(0, 65535) - 32768;
      sext_E = 32'(off);
      target_E = 26'($urandom); rind_E = $urandom; z_E = 1'($urandom);
      pcsrc_E = pcsrc_e'($urandom_range(0, 3));
      #1;
      exp_red = 1;
      case (pcsrc_E)
        PCS_PC4:  begin exp_npc = pc_F + 4; exp_red = 0; end
        PCS_BR:   if (z_E) exp_npc = 32'(longint'(pc4_E) + 4 * longint'(off));
                  else begin exp_npc = pc_F + 4; exp_red = 0; end
        PCS_RIND: exp_npc = rind_E;
        default:  exp_npc = (pc4_E & 32'hF000_0000) + 32'(target_E) * 4;
      endcase
      checks++;
      if (npc !== exp_npc || redirect !== exp_red || pc_plus4 !== pc_F + 4) begin
        failures++;
        $display("FAIL pcsrc=%0d z=%b npc=%h exp=%h red=%b", pcsrc_E, z_E, npc, exp_npc, redirect);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
