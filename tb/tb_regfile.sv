// tb_regfile: self-checking test of the register file.
// Random writes and reads against a shadow array: r0 stays zero, a read in
// the cycle of a write returns the old value and the new one from the next
// cycle on, reset clears every register.
module tb_regfile;
  logic        clk = 0, rst;
  logic [4:0]  rs1, rs2, ws;
  logic [31:0] rd1, rd2, wd;
  logic        we;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    rst = 1; we = 0; rs1 = 0; rs2 = 0; ws = 0; wd = 0;
    @(posedge clk); #1; rst = 0;
    foreach (shadow[i]) shadow[i] = 0;
    for (int i = 0; i < 32; i++) begin
      rs1 = 5'(i); rs2 = 5'(31 - i); #1;
      cmp(rd1, 0, "reset rd1"); cmp(rd2, 0, "reset rd2");
    end
    for (int k = 0; k < 2000; k++) begin
      we  = 1'($urandom);
      ws  = 5'($urandom);
      wd  = $urandom;
      rs1 = ($urandom_range(0, 3) == 0) ? ws : 5'($urandom);
      rs2 = 5'($urandom);
      #1;
      // same-cycle read sees the old contents
      cmp(rd1, shadow[rs1], "rd1");
      cmp(rd2, shadow[rs2], "rd2");
      @(posedge clk); #1;
      if (we && ws != 0) shadow[ws] = wd;
    end
    we = 0;
    for (int i = 0; i < 32; i++) begin
      rs1 = 5'(i); #1; cmp(rd1, shadow[i], "final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
