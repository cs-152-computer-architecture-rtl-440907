// alu: the 32-bit integer ALU of the execute stage.
//
// Computes y = a op b for the operation chosen by alu_control, and the flag z
// ("zero?") that tells whether operand a is zero, which decides a BEQZ. The
// ALU_ZERO operation also returns that test as a 0/1 word in y. Shifts follow
// the MIPS variable shifts: the value is b (rt) and the amount a[4:0] (rs).
// Combinational, no overflow detection: exceptions are outside this pipeline.
module alu
  import mips_pkg::*;
(
  input  aluop_e          op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y,
  output logic            z
);

  assign z = (a == '0);

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {{(XLEN-1){1'b0}}, $signed(a) < $signed(b)};
      ALU_SLTU: y = {{(XLEN-1){1'b0}}, a < b};
      ALU_SLL:  y = b << a[4:0];
      ALU_SRL:  y = b >> a[4:0];
      ALU_SRA:  y = $unsigned($signed(b) >>> a[4:0]);
      ALU_ZERO: y = {{(XLEN-1){1'b0}}, z};
      default:  y = a + b;
    endcase
  end

endmodule
