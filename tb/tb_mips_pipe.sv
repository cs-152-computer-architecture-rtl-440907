// tb_mips_pipe: end-to-end test of the five-stage pipeline.
//
// Three processors run side by side on the same programs: the default
// configuration (full bypass, default memory sizes, no parameter override),
// one with only the ALU-output bypass and one with interlocks only. An
// instruction-set model in this testbench executes each program one
// instruction at a time; every processor must retire exactly the model's
// instruction sequence and end with the model's registers and data memory.
//
// Directed programs check the timing of each hazard case in cycles (distance
// between the retirement of producer and consumer):
//   dependent neighbours (rs)   interlock 4, ALU bypass 1, full bypass 1
//   dependent neighbours (rt)   interlock 4, ALU bypass 4, full bypass 1
//   load followed by its use    interlock 4, ALU bypass 4, full bypass 2
//   dependence at distance two  interlock 4, ALU bypass 4, full bypass 2
//   taken branch / jump         3 in every configuration (two killed slots)
//   JAL, then a use of r31      interlock 4, ALU bypass 4, full bypass 3
// and three independent instructions retire on three consecutive cycles.
// A long random program (ALU, immediate, load, store, forward branches and
// jumps over few registers, so hazards are dense) then checks the results and
// the cycle count: last retirement = 4 + (instructions - 1) + stalls + 2 * kills,
// counting the stall and kill cycles before the last instruction entered E.
// A directed loop (backward branch and jump, a subroutine called by JAL and by
// JALR and left by JR) checks the same on code that revisits instructions.
// Each mechanism (interlock stall, load-use stall, kill, each bypass path,
// store followed by a load of the same word) must be seen at least once.
module tb_mips_pipe;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  localparam int NDUT  = 3;          // 0 full bypass (defaults), 1 ALU bypass, 2 interlock

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic          imem_ld_we, dmem_ld_we;
  logic [AW-1:0] imem_ld_addr, dmem_ld_addr;
  logic [31:0]   imem_ld_wdata, dmem_ld_wdata;
  logic [31:0]   imem_ld_rdata [NDUT], dmem_ld_rdata [NDUT];
  logic          retire [NDUT], stall [NDUT], kill [NDUT];
  logic [31:0]   retire_ir [NDUT];
  fwd_e          fwd_a [NDUT], fwd_b [NDUT];

  mips_pipe u_fb (
    .clk, .rst, .imem_ld_we, .imem_ld_addr, .imem_ld_wdata, .imem_ld_rdata(imem_ld_rdata[0]),
    .dmem_ld_we, .dmem_ld_addr, .dmem_ld_wdata, .dmem_ld_rdata(dmem_ld_rdata[0]),
    .retire(retire[0]), .retire_ir(retire_ir[0]), .stall(stall[0]), .kill(kill[0]),
    .fwd_a(fwd_a[0]), .fwd_b(fwd_b[0]));
  mips_pipe #(.HAZARD(HZ_ALU_BYPASS)) u_ab (
    .clk, .rst, .imem_ld_we, .imem_ld_addr, .imem_ld_wdata, .imem_ld_rdata(imem_ld_rdata[1]),
    .dmem_ld_we, .dmem_ld_addr, .dmem_ld_wdata, .dmem_ld_rdata(dmem_ld_rdata[1]),
    .retire(retire[1]), .retire_ir(retire_ir[1]), .stall(stall[1]), .kill(kill[1]),
    .fwd_a(fwd_a[1]), .fwd_b(fwd_b[1]));
  mips_pipe #(.HAZARD(HZ_INTERLOCK)) u_il (
    .clk, .rst, .imem_ld_we, .imem_ld_addr, .imem_ld_wdata, .imem_ld_rdata(imem_ld_rdata[2]),
    .dmem_ld_we, .dmem_ld_addr, .dmem_ld_wdata, .dmem_ld_rdata(dmem_ld_rdata[2]),
    .retire(retire[2]), .retire_ir(retire_ir[2]), .stall(stall[2]), .kill(kill[2]),
    .fwd_a(fwd_a[2]), .fwd_b(fwd_b[2]));

  int checks = 0, failures = 0;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
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

  // -------------------------------------------------------- running a DUT
  int rcyc [NDUT][$];           // retirement cycle of each retired instruction
  logic [31:0] rir [NDUT][$];   // retired instruction words
  int n_stall [NDUT], n_kill [NDUT], n_fa [NDUT][4], n_fb [NDUT][4];
  int stall_cyc [NDUT][$], kill_cyc [NDUT][$];   // cycles with a stall / a kill
  int cyc;
  logic counting = 0;

  always @(posedge clk) begin
    if (counting) begin
      for (int d = 0; d < NDUT; d++) begin
        if (retire[d]) begin
          rcyc[d].push_back(cyc);
          rir[d].push_back(retire_ir[d]);
        end
        if (stall[d]) begin n_stall[d]++; stall_cyc[d].push_back(cyc); end
        if (kill[d]) begin n_kill[d]++; kill_cyc[d].push_back(cyc); end
        n_fa[d][fwd_a[d]]++;
        n_fb[d][fwd_b[d]]++;
      end
      cyc++;
    end
  end

  // totals over all programs, for the coverage check at the end
  int tot_stall [NDUT], tot_kill [NDUT], tot_fa [NDUT][4], tot_fb [NDUT][4];
  int tot_st_ld = 0;

  task automatic run_prog(input int n_words, input string name, input logic check_cycles);
    int end_pc, n;
    end_pc = 4 * n_words;
    model_run(end_pc);
    // load both memories of all processors through their host ports
    @(negedge clk);
    rst = 1;
    for (int i = 0; i < DEPTH; i++) begin
      imem_ld_we = 1; imem_ld_addr = AW'(i); imem_ld_wdata = (i < n_words) ? prog[i] : NOP;
      dmem_ld_we = 1; dmem_ld_addr = AW'(i); dmem_ld_wdata = dinit[i];
      @(negedge clk);
    end
    imem_ld_we = 0; dmem_ld_we = 0;
    for (int d = 0; d < NDUT; d++) begin
      rcyc[d].delete(); rir[d].delete(); n_stall[d] = 0; n_kill[d] = 0;
      stall_cyc[d].delete(); kill_cyc[d].delete();
      for (int k = 0; k < 4; k++) begin n_fa[d][k] = 0; n_fb[d][k] = 0; end
    end
    @(negedge clk);
    rst = 0; cyc = 0; counting = 1;
    n = trace.size();
    // run until every processor retired the model's instruction count
    for (int t = 0; t < 8 * n + 100; t++) begin
      @(negedge clk);
      if (rir[0].size() >= n && rir[1].size() >= n && rir[2].size() >= n) break;
    end
    repeat (8) @(negedge clk);
    counting = 0;
    for (int d = 0; d < NDUT; d++) begin
      logic same;
      same = (rir[d].size() == n);
      for (int k = 0; k < n && same; k++) if (rir[d][k] != trace[k]) same = 0;
      check(same, $sformatf("%s dut%0d retired sequence differs (%0d of %0d)", name, d, rir[d].size(), n));
      for (int r = 1; r < 32; r++) begin
        logic [31:0] v;
        v = (d == 0) ? u_fb.u_rf.regs[r] : (d == 1) ? u_ab.u_rf.regs[r] : u_il.u_rf.regs[r];
        check(v == m_reg[r], $sformatf("%s dut%0d r%0d = %h, model %h", name, d, r, v, m_reg[r]));
      end
      if (check_cycles && rcyc[d].size() == n && n > 0) begin
        // only stalls and kills before the last instruction reached E delay it
        int expect_last, ns, nk, t_e;
        t_e = rcyc[d][n-1] - 2;
        ns = 0; nk = 0;
        foreach (stall_cyc[d][k]) if (stall_cyc[d][k] < t_e) ns++;
        foreach (kill_cyc[d][k]) if (kill_cyc[d][k] < t_e) nk++;
        expect_last = 4 + (n - 1) + ns + 2 * nk;
        check(rcyc[d][n-1] == expect_last,
              $sformatf("%s dut%0d last retire at %0d, expected %0d (stalls %0d kills %0d)",
                        name, d, rcyc[d][n-1], expect_last, ns, nk));
      end
      tot_stall[d] += n_stall[d]; tot_kill[d] += n_kill[d];
      for (int k = 0; k < 4; k++) begin tot_fa[d][k] += n_fa[d][k]; tot_fb[d][k] += n_fb[d][k]; end
    end
    // hold the processor (it would run on past the program) while memory is read
    @(negedge clk);
    rst = 1;
    // data memory through the host port
    for (int i = 0; i < DEPTH; i++) begin
      dmem_ld_addr = AW'(i);
      #1;
      for (int d = 0; d < NDUT; d++)
        if (dmem_ld_rdata[d] != m_mem[i]) check(0, $sformatf("%s dut%0d mem[%0d]=%h model %h", name, d, i, dmem_ld_rdata[d], m_mem[i]));
    end
    checks++;
  endtask

  // distance in cycles between the retirement of instructions i and j
  task automatic gap(input string name, input int i, input int j, input int e0, input int e1, input int e2);
    int e [NDUT];
    e = '{e0, e1, e2};
    for (int d = 0; d < NDUT; d++) begin
      if (rcyc[d].size() > j)
        check(rcyc[d][j] - rcyc[d][i] == e[d],
              $sformatf("%s dut%0d gap %0d expected %0d", name, d, rcyc[d][j] - rcyc[d][i], e[d]));
      else check(0, $sformatf("%s dut%0d too few retirements", name, d));
    end
  endtask

  initial begin
    imem_ld_we = 0; dmem_ld_we = 0; imem_ld_addr = 0; dmem_ld_addr = 0;
    imem_ld_wdata = 0; dmem_ld_wdata = 0;
    n_st_ld = 0;
    for (int d = 0; d < NDUT; d++) begin
      tot_stall[d] = 0; tot_kill[d] = 0;
      for (int k = 0; k < 4; k++) begin tot_fa[d][k] = 0; tot_fb[d][k] = 0; end
    end

    // three independent instructions retire on consecutive cycles (CPI = 1)
    clear_prog();
    prog[0] = i_op(6'h08, 1, 0, 1);
    prog[1] = i_op(6'h08, 2, 0, 2);
    prog[2] = i_op(6'h08, 3, 0, 3);
    run_prog(3, "cpi1", 1);
    gap("cpi1", 0, 2, 2, 2, 2);
    for (int d = 0; d < NDUT; d++)
      check(rcyc[d].size() == 3 && rcyc[d][0] == 4, $sformatf("cpi1 dut%0d first retirement not after the 4-cycle fill", d));

    // r1 <- r0 + 10 ; r4 <- r1 + 17   (dependence through rs)
    clear_prog();
    prog[0] = i_op(6'h08, 1, 0, 10);
    prog[1] = i_op(6'h08, 4, 1, 17);
    prog[2] = i_op(6'h08, 5, 0, 1);
    run_prog(3, "rs-dep", 1);
    gap("rs-dep", 0, 1, 1, 1, 4);

    // dependence through rt
    clear_prog();
    prog[0] = i_op(6'h08, 1, 0, 10);
    prog[1] = r_op(FN_ADD, 4, 2, 1);
    run_prog(2, "rt-dep", 1);
    gap("rt-dep", 0, 1, 1, 4, 4);

    // load followed by its use
    clear_prog();
    prog[0] = i_op(6'h23, 1, 0, 8);
    prog[1] = i_op(6'h08, 4, 1, 17);
    prog[2] = r_op(FN_ADD, 6, 1, 4);
    run_prog(3, "load-use", 1);
    gap("load-use", 0, 1, 2, 4, 4);

    // dependence at distance two
    clear_prog();
    prog[0] = i_op(6'h08, 1, 0, 10);
    prog[1] = i_op(6'h08, 9, 0, 1);
    prog[2] = i_op(6'h08, 4, 1, 17);
    run_prog(3, "dist-2", 1);
    gap("dist-2", 0, 2, 2, 4, 4);

    // taken branch over one instruction, then a not-taken branch
    clear_prog();
    prog[0] = i_op(6'h04, 0, 0, 1);
    prog[1] = i_op(6'h08, 7, 0, 99);
    prog[2] = i_op(6'h08, 8, 0, 5);
    prog[3] = i_op(6'h04, 0, 8, 1);
    prog[4] = i_op(6'h08, 9, 0, 6);
    run_prog(5, "branch", 1);
    gap("branch-taken", 0, 1, 3, 3, 3);

    // JAL, then a use of r31 at the target
    clear_prog();
    prog[0] = j_op(6'h03, 2);
    prog[1] = i_op(6'h08, 7, 0, 99);
    prog[2] = i_op(6'h08, 4, 31, 17);
    run_prog(3, "jal-link", 1);
    gap("jal-link", 0, 1, 3, 4, 4);

    // store, then load of the same word: the write completes in one cycle
    clear_prog();
    prog[0] = i_op(6'h08, 2, 0, 1234);
    prog[1] = i_op(6'h2B, 2, 0, 12);
    prog[2] = i_op(6'h23, 5, 0, 12);
    run_prog(3, "store-load", 1);
    gap("store-load", 1, 2, 1, 1, 1);
    tot_st_ld += n_st_ld;

    // a loop with backward transfers and a subroutine called by JAL and JALR:
    // sum of 4 * M[i] over 20 words, stored to word 100
    clear_prog();
    prog[0]  = i_op(6'h08, 1, 0, 0);            // r1 <- 0      pointer
    prog[1]  = i_op(6'h08, 2, 0, 20);           // r2 <- 20     count
    prog[2]  = i_op(6'h08, 3, 0, 0);            // r3 <- 0      sum
    prog[3]  = i_op(6'h23, 4, 1, 0);            // loop: r4 <- M[r1]
    prog[4]  = j_op(6'h03, 14);                 // JAL dbl
    prog[5]  = i_op(6'h08, 5, 0, 56);           // r5 <- address of dbl
    prog[6]  = r_op(FN_JALR, 31, 5, 0);         // JALR r5
    prog[7]  = r_op(FN_ADD, 3, 3, 4);           // r3 <- r3 + r4
    prog[8]  = i_op(6'h08, 1, 1, 4);            // r1 <- r1 + 4
    prog[9]  = i_op(6'h08, 2, 2, -1);           // r2 <- r2 - 1
    prog[10] = i_op(6'h04, 0, 2, 1);            // BEQZ r2, done
    prog[11] = j_op(6'h02, 3);                  // J loop
    prog[12] = i_op(6'h2B, 3, 0, 400);          // done: M[100] <- r3
    prog[13] = j_op(6'h02, 16);                 // leave the program
    prog[14] = r_op(FN_ADD, 4, 4, 4);           // dbl: r4 <- r4 + r4
    prog[15] = r_op(FN_JR, 0, 31, 0);           // JR r31
    run_prog(16, "loop", 1);
    check(m_mem[100] == 32'd5560, $sformatf("loop model sum %0d, expected 5560", m_mem[100]));

    // random programs
    for (int p = 0; p < 3; p++) begin
      n_st_ld = 0;
      random_prog(600);
      run_prog(600, $sformatf("random%0d", p), 1);
      tot_st_ld += n_st_ld;
    end

    // every mechanism must have happened
    check(tot_stall[2] > 0, "interlock stall never seen");
    check(tot_stall[1] > 0, "ALU-bypass stall never seen");
    check(tot_stall[0] > 0, "load-use stall never seen");
    check(tot_fa[1][FWD_E] > 0, "ALU bypass to A never seen");
    for (int k = 1; k < 4; k++) begin
      check(tot_fa[0][k] > 0, $sformatf("full bypass to A from stage %0d never seen", k));
      check(tot_fb[0][k] > 0, $sformatf("full bypass to B from stage %0d never seen", k));
    end
    for (int d = 0; d < NDUT; d++) check(tot_kill[d] > 0, "kill never seen");
    check(tot_st_ld > 0, "store followed by load of the same word never seen");
    $display("events: full bypass stalls=%0d kills=%0d A(E,M,W)=%0d,%0d,%0d B(E,M,W)=%0d,%0d,%0d",
             tot_stall[0], tot_kill[0], tot_fa[0][1], tot_fa[0][2], tot_fa[0][3],
             tot_fb[0][1], tot_fb[0][2], tot_fb[0][3]);
    $display("events: ALU-bypass stalls=%0d A(E)=%0d; interlock stalls=%0d; store->load=%0d",
             tot_stall[1], tot_fa[1][1], tot_stall[2], tot_st_ld);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
