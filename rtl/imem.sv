// imem: instruction memory of the fetch stage.
//
// DEPTH words of 32 bits, read combinationally: the word at byte address addr
// (word aligned, addr[1:0] ignored, higher bits wrapping around DEPTH) appears
// on inst in the same cycle, so fetch takes one cycle like every other stage.
// A second, synchronous port (ld_we, ld_addr, ld_wdata, ld_rdata; word
// addressed) lets a host load a program and read it back; the processor itself
// never writes this memory. The size and the load port are this design's
// choice: the memory is only described as small and fast.
module imem #(
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic [31:0]              addr,
  output logic [31:0]              inst,
  input  logic                     ld_we,
  input  logic [$clog2(DEPTH)-1:0] ld_addr,
  input  logic [31:0]              ld_wdata,
  output logic [31:0]              ld_rdata
);

  localparam int AW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_wdata;
  end

  assign inst     = mem[addr[AW+1:2]];
  assign ld_rdata = mem[ld_addr];

endmodule
