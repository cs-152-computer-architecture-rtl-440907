// mips_tb_pkg: test programs and instruction-set model shared by the
// processor testbenches.
//
// Holds a tiny assembler (r_op, i_op, j_op), the program and initial data
// arrays, a random program generator whose control transfers all go forward
// (so every program ends), and an instruction-at-a-time model of the MIPS
// subset. The model runs a program from address 0 until the PC leaves it and
// records the executed instruction words (trace), the final registers
// (m_reg) and data memory (m_mem), and how often a store was immediately
// followed by a load of the same word (n_st_ld). Memory addresses wrap at
// DEPTH words like the processor's memories.
package mips_tb_pkg;
  import mips_pkg::*;

  localparam int DEPTH = 1024;       // default memory sizes of mips_pipe
  localparam int AW    = $clog2(DEPTH);

  // ------------------------------------------------------------- assembler
  function automatic logic [31:0] r_op(logic [5:0] fn, int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'h00, fn};
  endfunction
  function automatic logic [31:0] i_op(logic [5:0] opc, int rt, int rs, int imm);
    return {opc, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] j_op(logic [5:0] opc, int word_target);
    return {opc, 26'(word_target)};
  endfunction

  // ------------------------------------------------- instruction-set model
  logic [31:0] prog [DEPTH];
  logic [31:0] dinit [DEPTH];
  logic [31:0] m_reg [32];
  logic [31:0] m_mem [DEPTH];
  logic [31:0] trace [$];
  int          n_st_ld = 0;   // store immediately followed by a load of the same word

  function automatic logic [31:0] sx(logic [15:0] v);
    return 32'(int'($signed(v)));
  endfunction

  task automatic model_run(input int end_pc);
    int pc, steps;
    logic [31:0] ir, a, b, res, ea;
    logic        last_sw;
    logic [31:0] last_sw_ea;
    foreach (m_reg[i]) m_reg[i] = 0;
    foreach (m_mem[i]) m_mem[i] = dinit[i];
    trace.delete();
    pc = 0; steps = 0; last_sw = 0; last_sw_ea = 0;
    while (pc < end_pc && steps < 100000) begin
      logic [5:0] opc, fn;
      int rs, rt, rd, npc;
      logic wr;
      int wreg;
      ir = prog[pc / 4];
      opc = ir[31:26]; fn = ir[5:0];
      rs = int'(ir[25:21]); rt = int'(ir[20:16]); rd = int'(ir[15:11]);
      a = m_reg[rs]; b = m_reg[rt];
      npc = pc + 4; wr = 0; wreg = 0; res = 0;
      if (ir != 0) trace.push_back(ir);
      case (opc)
        6'h00: begin
          wr = 1; wreg = rd;
          case (fn)
            6'h20, 6'h21: res = a + b;
            6'h22, 6'h23: res = a - b;
            6'h24: res = a & b;
            6'h25: res = a | b;
            6'h26: res = a ^ b;
            6'h27: res = ~(a | b);
            6'h2A: res = ($signed(a) < $signed(b)) ? 1 : 0;
            6'h2B: res = (a < b) ? 1 : 0;
            6'h04: res = b << a[4:0];
            6'h06: res = b >> a[4:0];
            6'h07: res = $unsigned($signed(b) >>> a[4:0]);
            6'h08: begin wr = 0; npc = a; end
            6'h09: begin wreg = 31; res = pc + 4; npc = a; end
            default: wr = 0;
          endcase
        end
        6'h08, 6'h09: begin wr = 1; wreg = rt; res = a + sx(ir[15:0]); end
        6'h0A: begin wr = 1; wreg = rt; res = ($signed(a) < $signed(sx(ir[15:0]))) ? 1 : 0; end
        6'h0B: begin wr = 1; wreg = rt; res = (a < sx(ir[15:0])) ? 1 : 0; end
        6'h0C: begin wr = 1; wreg = rt; res = a & {16'h0, ir[15:0]}; end
        6'h0D: begin wr = 1; wreg = rt; res = a | {16'h0, ir[15:0]}; end
        6'h0E: begin wr = 1; wreg = rt; res = a ^ {16'h0, ir[15:0]}; end
        6'h23: begin
          ea = a + sx(ir[15:0]);
          wr = 1; wreg = rt; res = m_mem[ea[AW+1:2]];
          if (last_sw && last_sw_ea[AW+1:2] == ea[AW+1:2]) n_st_ld++;
        end
        6'h2B: begin ea = a + sx(ir[15:0]); m_mem[ea[AW+1:2]] = b; end
        6'h04: if (a == 0) npc = pc + 4 + 4 * int'($signed(ir[15:0]));
        6'h02: npc = ((pc + 4) & 32'hF000_0000) | (int'(ir[25:0]) * 4);
        6'h03: begin wr = 1; wreg = 31; res = pc + 4; npc = ((pc + 4) & 32'hF000_0000) | (int'(ir[25:0]) * 4); end
        default: ;
      endcase
      last_sw = (opc == 6'h2B);
      if (opc == 6'h2B) last_sw_ea = a + sx(ir[15:0]);
      if (wr && wreg != 0) m_reg[wreg] = res;
      pc = npc;
      steps++;
    end
  endtask

  // --------------------------------------------------------------- programs
  task automatic clear_prog();
    foreach (prog[i]) prog[i] = NOP;
    foreach (dinit[i]) dinit[i] = 32'(i * 7 + 3);
  endtask

  // random program; every control transfer goes forward, so it ends
  task automatic random_prog(input int n);
    int i;
    logic is_jr [DEPTH];
    foreach (is_jr[k]) is_jr[k] = 0;
    clear_prog();
    foreach (dinit[i]) dinit[i] = $urandom;
    i = 0;
    while (i < n - 6) begin
      int kind, rs, rt, rd, skip;
      kind = $urandom_range(0, 99);
      rs = $urandom_range(0, 5); rt = $urandom_range(0, 5); rd = $urandom_range(0, 5);
      if (kind < 30) begin
        logic [5:0] fns [13] = '{6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h26, 6'h27, 6'h2A, 6'h2B, 6'h04, 6'h06, 6'h07};
        prog[i++] = r_op(fns[$urandom_range(0, 12)], rd, rs, rt);
      end else if (kind < 50) begin
        logic [5:0] ops [7] = '{6'h08, 6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E};
        prog[i++] = i_op(ops[$urandom_range(0, 6)], rt, rs, $urandom_range(0, 65535));
      end else if (kind < 62) begin
        prog[i++] = i_op(6'h23, rt, ($urandom_range(0, 3) == 0) ? rs : 0, 4 * $urandom_range(0, 15));
      end else if (kind < 72) begin
        int off;
        off = 4 * $urandom_range(0, 15);
        prog[i++] = i_op(6'h2B, rt, ($urandom_range(0, 3) == 0) ? rs : 0, off);
        if ($urandom_range(0, 1) == 0) prog[i++] = i_op(6'h23, rd, 0, off);
      end else if (kind < 82) begin
        skip = $urandom_range(0, 3);
        prog[i++] = i_op(6'h04, 0, rs, skip);
      end else if (kind < 87) begin
        skip = $urandom_range(0, 3);
        prog[i++] = j_op(($urandom_range(0, 1) == 0) ? 6'h02 : 6'h03, i + 1 + skip);
      end else if (kind < 92) begin
        // register-indirect jump through a freshly computed address
        skip = $urandom_range(0, 3);
        prog[i] = i_op(6'h08, rs == 0 ? 1 : rs, 0, 4 * (i + 2 + skip)); i++;
        prog[i] = r_op(($urandom_range(0, 1) == 0) ? FN_JR : FN_JALR, 0, rs == 0 ? 1 : rs, 0);
        is_jr[i] = 1; i++;
      end else begin
        // use of the link register
        prog[i++] = i_op(6'h08, rt, 31, $urandom_range(0, 100));
      end
    end
    // ordinary tail so that the last instruction is not a control transfer
    while (i < n) prog[i++] = i_op(6'h08, $urandom_range(1, 5), $urandom_range(0, 5), 1);
    // no branch or jump may land on a JR/JALR and skip the set-up of its target
    for (int k = 0; k < n; k++) begin
      if (prog[k][31:26] == 6'h04 && is_jr[k + 1 + int'(prog[k][15:0])])
        prog[k][15:0] = prog[k][15:0] + 1;
      if ((prog[k][31:26] == 6'h02 || prog[k][31:26] == 6'h03) && is_jr[int'(prog[k][25:0])])
        prog[k][25:0] = prog[k][25:0] + 1;
      if (is_jr[k + 1] && is_jr[int'(prog[k][15:0]) / 4])
        prog[k][15:0] = prog[k][15:0] + 4;
    end
  endtask

endpackage
