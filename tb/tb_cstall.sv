// tb_cstall: self-checking test of the stall and bypass control (C_stall).
// Three instances, one per hazard strategy, see the same random decode-stage
// sources and E/M/W destinations (drawn from few registers so that matches
// are frequent). The reference works per operand: it finds the youngest
// uncommitted writer of the register and decides from the strategy whether
// that value can be bypassed or the decode stage must wait.
module tb_cstall;
  import mips_pkg::*;
  logic [4:0] rs_D, rt_D, ws_E, ws_M, ws_W;
  logic       re1_D, re2_D, we_E, we_bypass_E, we_stall_E, load_E, we_M, we_W;
  logic       stall [3];
  fwd_e       fwd_a [3], fwd_b [3];
  int checks = 0, failures = 0;
  int n_stall = 0, n_fwd = 0;

  cstall #(.MODE(HZ_INTERLOCK)) u_il (.stall(stall[0]), .fwd_a(fwd_a[0]), .fwd_b(fwd_b[0]), .*);
  cstall #(.MODE(HZ_ALU_BYPASS)) u_ab (.stall(stall[1]), .fwd_a(fwd_a[1]), .fwd_b(fwd_b[1]), .*);
  cstall #(.MODE(HZ_FULL_BYPASS)) u_fb (.stall(stall[2]), .fwd_a(fwd_a[2]), .fwd_b(fwd_b[2]), .*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4:0] rreg();
    int r;
    r = $urandom_range(0, 4);
    return (r == 4) ? 5'd31 : 5'(r);
  endfunction

  // youngest writer of register r: 0 none, 1 E, 2 M, 3 W
  function automatic int youngest(logic [4:0] r);
    if (we_E && ws_E == r) return 1;
    if (we_M && ws_M == r) return 2;
    if (we_W && ws_W == r) return 3;
    return 0;
  endfunction

  function automatic logic any_writer(logic [4:0] r);
    return (we_E && ws_E == r) || (we_M && ws_M == r) || (we_W && ws_W == r);
  endfunction

  initial begin
    for (int k = 0; k < 20000; k++) begin
      int cls;
      logic e_stall [3];
      fwd_e e_a [3], e_b [3];
      rs_D = rreg(); rt_D = rreg();
      re1_D = 1'($urandom); re2_D = 1'($urandom);
      // E-stage instruction: 0 none, 1 ALU-type, 2 LW, 3 JAL/JALR
      cls = $urandom_range(0, 3);
      ws_E = (cls == 3) ? 5'd31 : (cls == 0 ? 5'd0 : rreg());
      we_E = (cls == 3) || ((cls == 1 || cls == 2) && ws_E != 0);
      we_bypass_E = (cls == 1) && ws_E != 0;
      we_stall_E  = (cls == 3) || (cls == 2 && ws_E != 0);
      load_E = (cls == 2);
      ws_M = rreg(); we_M = 1'($urandom) && ws_M != 0;
      ws_W = rreg(); we_W = 1'($urandom) && ws_W != 0;
      #1;
      // interlock: wait while any uncommitted instruction writes a source
      e_stall[0] = (re1_D && any_writer(rs_D)) || (re2_D && any_writer(rt_D));
      e_a[0] = FWD_RF; e_b[0] = FWD_RF;
      // ALU bypass: only E's ALU result to A; everything else waits
      e_a[1] = (re1_D && we_bypass_E && ws_E == rs_D) ? FWD_E : FWD_RF;
      e_b[1] = FWD_RF;
      e_stall[1] = (re1_D && ((we_stall_E && ws_E == rs_D) || (we_M && ws_M == rs_D) ||
                              (we_W && ws_W == rs_D)))
                || (re2_D && any_writer(rt_D));
      // full bypass: take the youngest value, wait only for a load in E
      e_a[2] = re1_D ? fwd_e'(youngest(rs_D)) : FWD_RF;
      e_b[2] = re2_D ? fwd_e'(youngest(rt_D)) : FWD_RF;
      e_stall[2] = (re1_D && youngest(rs_D) == 1 && load_E) || (re2_D && youngest(rt_D) == 1 && load_E);
      for (int m = 0; m < 3; m++) begin
        checks++;
        if (stall[m] !== e_stall[m] || (!e_stall[m] && (fwd_a[m] !== e_a[m] || fwd_b[m] !== e_b[m]))) begin
          failures++;
          if (failures < 10)
            $display("FAIL mode=%0d rs=%0d rt=%0d re=%b%b E(%0d,cls%0d) M(%0d,%b) W(%0d,%b) stall=%b/%b a=%0d/%0d b=%0d/%0d",
                     m, rs_D, rt_D, re1_D, re2_D, ws_E, cls, ws_M, we_M, ws_W, we_W,
                     stall[m], e_stall[m], fwd_a[m], e_a[m], fwd_b[m], e_b[m]);
        end
        if (e_stall[m]) n_stall++;
        if (e_a[m] != FWD_RF) n_fwd++;
      end
    end
    checks++;
    if (n_stall == 0 || n_fwd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
