// tb_imem: self-checking test of the instruction memory.
// Loads a pattern through the host port, then reads every word back through
// the fetch port by byte address (low two bits ignored) in the same cycle.
module tb_imem;
  localparam int DEPTH = 64;
  logic        clk = 0;
  logic [31:0] addr, inst, ld_wdata, ld_rdata;
  logic        ld_we;
  logic [5:0]  ld_addr;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  imem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_we = 0; ld_addr = 0; ld_wdata = 0; addr = 0;
    for (int i = 0; i < DEPTH; i++) begin
      shadow[i] = $urandom;
      @(negedge clk); ld_we = 1; ld_addr = 6'(i); ld_wdata = shadow[i];
    end
    @(negedge clk); ld_we = 0;
    for (int k = 0; k < 500; k++) begin
      int w;
      w = $urandom_range(0, DEPTH - 1);
      addr = {24'(0), 6'(w), 2'($urandom)};
      ld_addr = 6'($urandom);
      #1;
      checks++;
      if (inst !== shadow[addr[7:2]] || ld_rdata !== shadow[ld_addr]) begin
        failures++;
        $display("FAIL addr=%h inst=%h exp=%h", addr, inst, shadow[addr[7:2]]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
