// regfile: the general-purpose register file (GPRs).
//
// NREGS registers of XLEN bits with two combinational read ports (rs1 -> rd1,
// rs2 -> rd2), read in the decode stage, and one write port (ws, wd, we)
// written at the rising clock edge at the end of the write-back stage.
// Register 0 always reads as zero and ignores writes. A read in the same cycle
// as a write to the same register returns the old value: a value written in W
// becomes visible to the decode stage in the next cycle, which is why the
// interlock must also compare against the destination in W. Synchronous
// active-high reset clears every register (the reset is this design's choice).
module regfile
  import mips_pkg::*;
#(
  parameter int N = NREGS,
  parameter int W = XLEN
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [$clog2(N)-1:0] rs1,
  input  logic [$clog2(N)-1:0] rs2,
  output logic [W-1:0]         rd1,
  output logic [W-1:0]         rd2,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] ws,
  input  logic [W-1:0]         wd
);

  logic [W-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (we && ws != '0) begin
      regs[ws] <= wd;
    end
  end

  assign rd1 = (rs1 == '0) ? '0 : regs[rs1];
  assign rd2 = (rs2 == '0) ? '0 : regs[rs2];

endmodule
