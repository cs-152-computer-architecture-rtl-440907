// tb_cdest: self-checking test of the destination decode (C_dest).
// For random instances of each instruction, compares ws, we, we_bypass,
// we_stall and load with the case lists for ws, we, we-bypass and we-stall.
module tb_cdest;
  import mips_pkg::*;
  logic [31:0] instr;
  logic [4:0]  ws;
  logic        we, we_bypass, we_stall, load;
  int checks = 0, failures = 0;

  cdest dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // kind: 0 ALU(rd) 1 ALUi/ALUiu(rt) 2 LW(rt) 3 JAL/JALR(31) 4 no destination
  task automatic one(input logic [5:0] opc, input logic [5:0] fn, input int kind);
    logic [4:0] e_ws;
    logic e_we, e_wb, e_wst;
    for (int k = 0; k < 40; k++) begin
      instr = {opc, 20'($urandom), fn};
      if (k < 4) instr[20:11] = '0;   // make rt = rd = 0 appear
      #1;
      case (kind)
        0: e_ws = instr[15:11];
        1, 2: e_ws = instr[20:16];
        3: e_ws = 5'd31;
        default: e_ws = 5'd0;
      endcase
      e_we  = (kind <= 2) ? (e_ws != 0) : (kind == 3);
      e_wb  = (kind <= 1) && (e_ws != 0);
      e_wst = (kind == 2) ? (e_ws != 0) : (kind == 3);
      checks++;
      if ((kind != 4 && ws !== e_ws) || we !== e_we || we_bypass !== e_wb ||
          we_stall !== e_wst || load !== (kind == 2)) begin
        failures++;
        $display("FAIL instr=%h ws=%0d/%0d we=%b/%b wb=%b/%b wst=%b/%b", instr, ws, e_ws, we, e_we,
                 we_bypass, e_wb, we_stall, e_wst);
      end
    end
  endtask

  initial begin
    one(6'h00, 6'h20, 0); one(6'h00, 6'h27, 0); one(6'h00, 6'h04, 0);
    one(6'h08, 6'h11, 1); one(6'h0B, 6'h00, 1); one(6'h0E, 6'h3F, 1);
    one(6'h23, 6'h05, 2);
    one(6'h03, 6'h00, 3); one(6'h00, 6'h09, 3);
    one(6'h2B, 6'h00, 4); one(6'h04, 6'h00, 4); one(6'h02, 6'h00, 4); one(6'h00, 6'h08, 4);
    one(6'h00, 6'h00, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
