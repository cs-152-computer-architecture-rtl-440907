// dmem: data memory of the memory-access stage.
//
// DEPTH words of 32 bits. The processor port reads combinationally (addr ->
// rdata in the same cycle) and writes wdata at the rising edge that ends the
// cycle in which we is high, so a store completes in one cycle and a load in
// the very next instruction already sees it: store-then-load through the same
// address needs no pipeline logic. Byte address, word aligned, addr[1:0]
// ignored, higher bits wrapping around DEPTH. A host port (ld_*, word
// addressed) initialises and inspects the contents; when both write in the
// same cycle the processor's store wins. Size and host port are this
// design's choice.
module dmem #(
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [31:0]              addr,
  input  logic [31:0]              wdata,
  output logic [31:0]              rdata,
  input  logic                     ld_we,
  input  logic [$clog2(DEPTH)-1:0] ld_addr,
  input  logic [31:0]              ld_wdata,
  output logic [31:0]              ld_rdata
);

  localparam int AW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)         mem[addr[AW+1:2]] <= wdata;
    else if (ld_we) mem[ld_addr]      <= ld_wdata;
  end

  assign rdata    = mem[addr[AW+1:2]];
  assign ld_rdata = mem[ld_addr];

endmodule
