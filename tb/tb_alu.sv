// tb_alu: self-checking test of the ALU.
// Random and corner operands for every operation; expected values are
// computed with plain SystemVerilog arithmetic on 64-bit integers.
module tb_alu;
  import mips_pkg::*;
  aluop_e      op;
  logic [31:0] a, b, y;
  logic        z;
  int checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .y(y), .z(z));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(aluop_e o, logic [31:0] x, logic [31:0] w);
    longint sx, sw;
    sx = longint'($signed(x)); sw = longint'($signed(w));
    case (o)
      ALU_ADD:  return 32'(longint'(x) + longint'(w));
      ALU_SUB:  return 32'(longint'(x) - longint'(w));
      ALU_AND:  return x & w;
      ALU_OR:   return x | w;
      ALU_XOR:  return x ^ w;
      ALU_NOR:  return ~(x | w);
      ALU_SLT:  return (sx < sw) ? 32'd1 : 32'd0;
      ALU_SLTU: return (longint'(x) < longint'(w)) ? 32'd1 : 32'd0;
      ALU_SLL:  return 32'(longint'(w) * (longint'(1) << x[4:0]));
      ALU_SRL:  return 32'(longint'(w) / (longint'(1) << x[4:0]));
      ALU_SRA:  return 32'((sw - ((sw % (longint'(1) << x[4:0]) + (longint'(1) << x[4:0])) % (longint'(1) << x[4:0]))) / (longint'(1) << x[4:0]));
      ALU_ZERO: return (x == 0) ? 32'd1 : 32'd0;
      default:  return 32'hDEAD_BEEF;
    endcase
  endfunction

  task automatic check(aluop_e o, logic [31:0] x, logic [31:0] w);
    op = o; a = x; b = w; #1;
    checks++;
    if (y !== model(o, x, w) || z !== (x == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h z=%b", o.name(), x, w, y, model(o, x, w), z);
    end
  endtask

  initial begin
    static logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h1F};
    for (int o = 0; o <= int'(ALU_ZERO); o++) begin
      foreach (corner[i]) foreach (corner[j]) check(aluop_e'(o), corner[i], corner[j]);
      for (int k = 0; k < 300; k++) check(aluop_e'(o), $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
