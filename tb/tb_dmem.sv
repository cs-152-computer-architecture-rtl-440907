// tb_dmem: self-checking test of the data memory.
// Random stores and loads against a shadow array. A store is visible to a
// read in the next cycle (write completes in one cycle); the host port loads
// and inspects words; a processor store wins over a host write.
module tb_dmem;
  localparam int DEPTH = 64;
  logic        clk = 0, we, ld_we;
  logic [31:0] addr, wdata, rdata, ld_wdata, ld_rdata;
  logic [5:0]  ld_addr;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  dmem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; ld_we = 0; addr = 0; wdata = 0; ld_addr = 0; ld_wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      shadow[i] = $urandom;
      @(negedge clk); ld_we = 1; ld_addr = 6'(i); ld_wdata = shadow[i];
    end
    @(negedge clk); ld_we = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      we    = 1'($urandom);
      addr  = {24'h0, 6'($urandom), 2'($urandom)};
      wdata = $urandom;
      ld_we = ($urandom_range(0, 7) == 0);
      ld_addr  = ($urandom_range(0, 1) == 0) ? addr[7:2] : 6'($urandom);
      ld_wdata = $urandom;
      #1;
      cmp(rdata, shadow[addr[7:2]], "rdata");
      cmp(ld_rdata, shadow[ld_addr], "ld_rdata");
      @(posedge clk); #1;
      if (we) shadow[addr[7:2]] = wdata;
      else if (ld_we) shadow[ld_addr] = ld_wdata;
      we = 0; ld_we = 0;
      #1 cmp(rdata, shadow[addr[7:2]], "after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
