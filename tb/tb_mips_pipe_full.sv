// tb_mips_pipe_full: the processor at its default configuration (full bypass,
// 1024-word instruction and data memories), nothing overridden.
//
// Runs a directed load-use / dependent-ALU sequence and two random programs
// of 1000 instructions, which nearly fill the instruction memory. Every
// program is also executed by the instruction-set model of mips_tb_pkg; the
// processor must retire the same instruction sequence, end with the same
// registers and data memory, and finish in 4 + (instructions - 1) + stalls +
// 2 * kills cycles. Load-use stalls, kills and every bypass path (E, M, W to
// each operand) must each occur.
module tb_mips_pipe_full;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic          imem_ld_we, dmem_ld_we;
  logic [AW-1:0] imem_ld_addr, dmem_ld_addr;
  logic [31:0]   imem_ld_wdata, dmem_ld_wdata, imem_ld_rdata, dmem_ld_rdata;
  logic          retire, stall, kill;
  logic [31:0]   retire_ir;
  fwd_e          fwd_a, fwd_b;

  mips_pipe u_dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  int rcyc [$];
  logic [31:0] rir [$];
  int n_stall, n_kill, n_fa [4], n_fb [4], cyc;
  int t_stall = 0, t_kill = 0, t_fa [4] = '{0, 0, 0, 0}, t_fb [4] = '{0, 0, 0, 0}, t_st_ld = 0;
  logic counting = 0;

  always @(posedge clk) begin
    if (counting) begin
      if (retire) begin
        rcyc.push_back(cyc);
        rir.push_back(retire_ir);
      end
      if (stall) n_stall++;
      if (kill) n_kill++;
      n_fa[fwd_a]++;
      n_fb[fwd_b]++;
      cyc++;
    end
  end

  task automatic run_prog(input int n_words, input string name);
    int n;
    n_st_ld = 0;
    model_run(4 * n_words);
    @(negedge clk);
    rst = 1;
    for (int i = 0; i < DEPTH; i++) begin
      imem_ld_we = 1; imem_ld_addr = AW'(i); imem_ld_wdata = (i < n_words) ? prog[i] : NOP;
      dmem_ld_we = 1; dmem_ld_addr = AW'(i); dmem_ld_wdata = dinit[i];
      @(negedge clk);
    end
    imem_ld_we = 0; dmem_ld_we = 0;
    rcyc.delete(); rir.delete(); n_stall = 0; n_kill = 0; cyc = 0;
    for (int k = 0; k < 4; k++) begin n_fa[k] = 0; n_fb[k] = 0; end
    @(negedge clk);
    rst = 0; counting = 1;
    n = trace.size();
    for (int t = 0; t < 4 * n + 100 && rir.size() < n; t++) @(negedge clk);
    repeat (8) @(negedge clk);
    counting = 0;
    begin
      logic same;
      same = (rir.size() == n);
      for (int k = 0; k < n && same; k++) if (rir[k] != trace[k]) same = 0;
      check(same, $sformatf("%s retired sequence differs (%0d of %0d)", name, rir.size(), n));
    end
    for (int r = 1; r < 32; r++)
      check(u_dut.u_rf.regs[r] == m_reg[r], $sformatf("%s r%0d = %h, model %h", name, r, u_dut.u_rf.regs[r], m_reg[r]));
    if (rcyc.size() == n && n > 0)
      check(rcyc[n-1] == 4 + (n - 1) + n_stall + 2 * n_kill,
            $sformatf("%s last retire at %0d, expected %0d", name, rcyc[n-1], 4 + (n - 1) + n_stall + 2 * n_kill));
    // hold the processor (it would run on past the program) while memory is read
    @(negedge clk);
    rst = 1;
    for (int i = 0; i < DEPTH; i++) begin
      dmem_ld_addr = AW'(i);
      #1;
      if (dmem_ld_rdata != m_mem[i]) check(0, $sformatf("%s mem[%0d]=%h model %h", name, i, dmem_ld_rdata, m_mem[i]));
    end
    checks++;
    t_stall += n_stall; t_kill += n_kill; t_st_ld += n_st_ld;
    for (int k = 0; k < 4; k++) begin t_fa[k] += n_fa[k]; t_fb[k] += n_fb[k]; end
  endtask

  initial begin
    imem_ld_we = 0; dmem_ld_we = 0; imem_ld_addr = 0; dmem_ld_addr = 0;
    imem_ld_wdata = 0; dmem_ld_wdata = 0;

    // r1 <- M[8]; r4 <- r1 + 17 (one bubble); r6 <- r1 + r4 (bypass from M and E)
    clear_prog();
    prog[0] = i_op(6'h23, 1, 0, 8);
    prog[1] = i_op(6'h08, 4, 1, 17);
    prog[2] = r_op(FN_ADD, 6, 1, 4);
    run_prog(3, "load-use");
    check(rcyc.size() == 3 && rcyc[1] - rcyc[0] == 2 && rcyc[2] - rcyc[1] == 1, "load-use timing");

    for (int p = 0; p < 2; p++) begin
      random_prog(1000);
      run_prog(1000, $sformatf("random%0d", p));
    end

    check(t_stall > 0, "load-use stall never seen");
    check(t_kill > 0, "kill never seen");
    for (int k = 1; k < 4; k++) begin
      check(t_fa[k] > 0, $sformatf("bypass to A from stage %0d never seen", k));
      check(t_fb[k] > 0, $sformatf("bypass to B from stage %0d never seen", k));
    end
    check(t_st_ld > 0, "store followed by load of the same word never seen");
    $display("events: stalls=%0d kills=%0d A(E,M,W)=%0d,%0d,%0d B(E,M,W)=%0d,%0d,%0d store->load=%0d",
             t_stall, t_kill, t_fa[1], t_fa[2], t_fa[3], t_fb[1], t_fb[2], t_fb[3], t_st_ld);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
