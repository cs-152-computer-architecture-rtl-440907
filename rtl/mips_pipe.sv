// mips_pipe: five-stage pipelined MIPS-subset processor with its memories.
//
// The single-cycle datapath (PC, instruction memory, GPRs, immediate extender,
// ALU, data memory, write-back mux) is cut by pipeline registers into five
// stages of roughly equal delay, so that the clock period shrinks to about one
// memory access while one instruction still completes per cycle:
//
//   F  fetch          PC -> instruction memory                      -> IR_D, PC4_D
//   D  decode/reg rd  GPR read, Imm Ext, BSrc mux, bypass muxes      -> IR_E, A, B, MD1, PC4_E
//   E  execute        ALU; control transfers resolved here          -> IR_M, Y, MD2
//   M  memory         data memory read or write, WBSrc mux          -> IR_W, R
//   W  write-back     R written into the GPRs at the end of the cycle
//
// Each stage carries its own copy of the instruction register (IR_D, IR_E,
// IR_M, IR_W) and decodes its own control signals from it. Data hazards are
// found in D by comparing the source registers of the instruction there with
// the destinations of the instructions in E, M and W (cdest, cre, cstall).
// On a stall the PC and IR_D hold and a nop is injected into E. The parameter
// HAZARD picks the strategy: HZ_INTERLOCK (stall until the producer has
// written back: three bubbles between dependent neighbours), HZ_ALU_BYPASS
// (ALU output bypassed to operand A only) or, by default, HZ_FULL_BYPASS
// (results of E, M and W bypassed to both operands; only a load followed by a
// user of its result costs one bubble). The data memory finishes a store within
// its cycle, so a load after a store to the same address needs no check.
//
// Control hazards are not treated by the lecture this design follows; here a
// branch or jump is resolved in E and the two instructions fetched after it are
// replaced by nops (two bubbles when the transfer is taken, none otherwise, no
// delay slot). The link value PC+4 of JAL/JALR travels with the instruction and
// replaces the ALU result in E, from where it is bypassed like any other value.
//
// Interface: clk, synchronous active-high rst (PC <- RESET_PC, all IRs <- nop,
// GPRs cleared). Host ports imem_ld_* and dmem_ld_* load and inspect the two
// memories (word addressed). Status outputs, one per cycle: retire (an
// instruction left W), stall (decode held), kill (a taken transfer discarded
// the two younger instructions), fwd_a / fwd_b (bypass source chosen for the
// operands of the instruction leaving D).
module mips_pipe
  import mips_pkg::*;
#(
  parameter hazard_mode_e HAZARD     = HZ_FULL_BYPASS,
  parameter int           IMEM_DEPTH = 1024,
  parameter int           DMEM_DEPTH = 1024,
  parameter logic [31:0]  RESET_PC   = 32'h0000_0000
) (
  input  logic                          clk,
  input  logic                          rst,
  // instruction memory host port
  input  logic                          imem_ld_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] imem_ld_addr,
  input  logic [31:0]                   imem_ld_wdata,
  output logic [31:0]                   imem_ld_rdata,
  // data memory host port
  input  logic                          dmem_ld_we,
  input  logic [$clog2(DMEM_DEPTH)-1:0] dmem_ld_addr,
  input  logic [31:0]                   dmem_ld_wdata,
  output logic [31:0]                   dmem_ld_rdata,
  // status
  output logic                          retire,
  output logic [31:0]                   retire_ir,
  output logic                          stall,
  output logic                          kill,
  output fwd_e                          fwd_a,
  output fwd_e                          fwd_b
);

  // ---------------------------------------------------------------- F stage
  logic [31:0] pc_F, inst_F, pc_plus4, npc;
  logic        redirect;

  imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk(clk), .addr(pc_F), .inst(inst_F),
    .ld_we(imem_ld_we), .ld_addr(imem_ld_addr), .ld_wdata(imem_ld_wdata),
    .ld_rdata(imem_ld_rdata)
  );

  // ---------------------------------------------------------------- D stage
  logic [31:0]     ir_D, pc4_D;
  ctrl_t           ctrl_D;
  logic [XLEN-1:0] rd1_D, rd2_D, imm_D, a_D, breg_D, b_D;
  logic            re1_D, re2_D, stall_raw;
  fwd_e            fwd_a_D, fwd_b_D;

  control_decode u_dec_D (.instr(ir_D), .ctrl(ctrl_D));
  cre            u_cre_D (.instr(ir_D), .re1(re1_D), .re2(re2_D));

  // W-stage signals used by the register file write port
  logic [31:0]     ir_W;
  logic [XLEN-1:0] r_W;
  logic [RIDX-1:0] ws_W;
  logic            we_W;

  regfile u_rf (
    .clk(clk), .rst(rst),
    .rs1(f_rs(ir_D)), .rs2(f_rt(ir_D)), .rd1(rd1_D), .rd2(rd2_D),
    .we(we_W), .ws(ws_W), .wd(r_W)
  );

  imm_ext u_immext (.imm(ir_D[15:0]), .extsel(ctrl_D.extsel), .ext(imm_D));

  // ---------------------------------------------------------------- E stage
  logic [31:0]     ir_E, pc4_E;
  logic [XLEN-1:0] a_E, b_E, md1_E, alu_y_E, res_E, sext_E;
  logic            z_E;
  ctrl_t           ctrl_E;
  aluop_e          aluop_E;
  logic [RIDX-1:0] ws_E;
  logic            we_E, we_bypass_E, we_stall_E, load_E;

  control_decode u_dec_E (.instr(ir_E), .ctrl(ctrl_E));
  alu_control    u_aluctl (.opsel(ctrl_E.opsel), .opcode(ir_E[31:26]), .funct(ir_E[5:0]),
                           .aluop(aluop_E));
  alu            u_alu (.op(aluop_E), .a(a_E), .b(b_E), .y(alu_y_E), .z(z_E));
  cdest          u_cdest_E (.instr(ir_E), .ws(ws_E), .we(we_E), .we_bypass(we_bypass_E),
                            .we_stall(we_stall_E), .load(load_E));

  // link value of JAL/JALR replaces the ALU result
  assign res_E  = (ctrl_E.wbsrc == WB_PC) ? pc4_E : alu_y_E;
  assign sext_E = {{(XLEN-16){ir_E[15]}}, ir_E[15:0]};

  next_pc u_npc (
    .pc_F(pc_F), .pcsrc_E(ctrl_E.pcsrc), .z_E(z_E), .pc4_E(pc4_E), .sext_E(sext_E),
    .target_E(ir_E[25:0]), .rind_E(a_E),
    .pc_plus4(pc_plus4), .npc(npc), .redirect(redirect)
  );

  // ---------------------------------------------------------------- M stage
  logic [31:0]     ir_M;
  logic [XLEN-1:0] y_M, md2_M, rdata_M, wbv_M;
  ctrl_t           ctrl_M;
  logic [RIDX-1:0] ws_M;
  logic            we_M, unused_M;

  control_decode u_dec_M (.instr(ir_M), .ctrl(ctrl_M));
  cdest          u_cdest_M (.instr(ir_M), .ws(ws_M), .we(we_M), .we_bypass(),
                            .we_stall(), .load(unused_M));

  dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk(clk), .we(ctrl_M.memw), .addr(y_M), .wdata(md2_M), .rdata(rdata_M),
    .ld_we(dmem_ld_we), .ld_addr(dmem_ld_addr), .ld_wdata(dmem_ld_wdata),
    .ld_rdata(dmem_ld_rdata)
  );

  assign wbv_M = (ctrl_M.wbsrc == WB_MEM) ? rdata_M : y_M;

  // ---------------------------------------------------------------- W stage
  logic unused_W;
  cdest u_cdest_W (.instr(ir_W), .ws(ws_W), .we(we_W), .we_bypass(), .we_stall(),
                   .load(unused_W));

  // ------------------------------------------------- hazard detection in D
  cstall #(.MODE(HAZARD)) u_cstall (
    .rs_D(f_rs(ir_D)), .rt_D(f_rt(ir_D)), .re1_D(re1_D), .re2_D(re2_D),
    .ws_E(ws_E), .we_E(we_E), .we_bypass_E(we_bypass_E), .we_stall_E(we_stall_E),
    .load_E(load_E), .ws_M(ws_M), .we_M(we_M), .ws_W(ws_W), .we_W(we_W),
    .stall(stall_raw), .fwd_a(fwd_a_D), .fwd_b(fwd_b_D)
  );

  // bypass muxes (ASrc, and the rt-side mux feeding BSrc and MD1)
  function automatic logic [XLEN-1:0] bypass(input fwd_e sel, input logic [XLEN-1:0] rf,
                                             input logic [XLEN-1:0] e, input logic [XLEN-1:0] m,
                                             input logic [XLEN-1:0] w);
    unique case (sel)
      FWD_RF: return rf;
      FWD_E:  return e;
      FWD_M:  return m;
      FWD_W:  return w;
    endcase
  endfunction

  assign a_D    = bypass(fwd_a_D, rd1_D, res_E, wbv_M, r_W);
  assign breg_D = bypass(fwd_b_D, rd2_D, res_E, wbv_M, r_W);
  assign b_D    = (ctrl_D.bsrc == BSRC_IMM) ? imm_D : breg_D;

  // a taken control transfer in E discards D and F, overriding a stall
  logic hold_D;
  assign hold_D = stall_raw && !redirect;

  // ------------------------------------------------------ pipeline registers
  always_ff @(posedge clk) begin
    if (rst) begin
      pc_F  <= RESET_PC;
      ir_D  <= NOP;
      pc4_D <= '0;
      ir_E  <= NOP;
      pc4_E <= '0;
      a_E   <= '0;
      b_E   <= '0;
      md1_E <= '0;
      ir_M  <= NOP;
      y_M   <= '0;
      md2_M <= '0;
      ir_W  <= NOP;
      r_W   <= '0;
    end else begin
      // F -> D
      if (redirect) begin
        pc_F <= npc;
        ir_D <= NOP;
      end else if (!hold_D) begin
        pc_F  <= pc_plus4;
        ir_D  <= inst_F;
        pc4_D <= pc_plus4;
      end
      // D -> E (nop mux)
      ir_E  <= (redirect || hold_D) ? NOP : ir_D;
      pc4_E <= pc4_D;
      a_E   <= a_D;
      b_E   <= b_D;
      md1_E <= breg_D;
      // E -> M
      ir_M  <= ir_E;
      y_M   <= res_E;
      md2_M <= md1_E;
      // M -> W
      ir_W  <= ir_M;
      r_W   <= wbv_M;
    end
  end

  // ----------------------------------------------------------------- status
  assign retire    = (ir_W != NOP);
  assign retire_ir = ir_W;
  assign stall     = hold_D;
  assign kill      = redirect;
  assign fwd_a     = (redirect || hold_D) ? FWD_RF : fwd_a_D;
  assign fwd_b     = (redirect || hold_D) ? FWD_RF : fwd_b_D;

  // ------------------------------------------------------------- assertions
  a_interlock_no_bypass: assert property (@(posedge clk) disable iff (rst)
    (HAZARD == HZ_INTERLOCK) |-> (fwd_a_D == FWD_RF && fwd_b_D == FWD_RF));
  a_alu_bypass_a_only: assert property (@(posedge clk) disable iff (rst)
    (HAZARD == HZ_ALU_BYPASS) |-> (fwd_a_D inside {FWD_RF, FWD_E} && fwd_b_D == FWD_RF));
  a_no_r0_write: assert property (@(posedge clk) disable iff (rst)
    we_W |-> (ws_W != '0));
  a_stall_bubble: assert property (@(posedge clk) disable iff (rst)
    hold_D |=> (ir_E == NOP));

endmodule
