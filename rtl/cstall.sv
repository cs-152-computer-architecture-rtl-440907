// cstall: stall and bypass control of the decode stage (C_stall).
//
// Compares the source registers of the instruction in decode (rs_D, rt_D,
// qualified by re1_D, re2_D) with the destinations of the uncommitted
// instructions in E, M and W (ws_x qualified by we_x). MODE selects one of the
// three hazard strategies of the lecture:
//
//   HZ_INTERLOCK   stall = ((rs=wsE).weE + (rs=wsM).weM + (rs=wsW).weW).re1
//                        + ((rt=wsE).weE + (rt=wsM).weM + (rt=wsW).weW).re2
//                  no bypass: operands always come from the GPRs.
//   HZ_ALU_BYPASS  ASrc  = (rs=wsE).we_bypassE.re1  (ALU output -> A)
//                  stall = ((rs=wsE).we_stallE + (rs=wsM).weM + (rs=wsW).weW).re1
//                        + ((rt=wsE).weE + (rt=wsM).weM + (rt=wsW).weW).re2
//   HZ_FULL_BYPASS stall = (rs=wsE).(opE=LW).(wsE!=0).re1
//                        + (rt=wsE).(opE=LW).(wsE!=0).re2
//                  both operands take the youngest matching value: E (result
//                  of the execute stage), else M (value about to be written
//                  back, load data included), else W (value being written).
//
// fwd_a / fwd_b steer the muxes in front of the A and B/MD1 registers
// (FWD_RF = register file). Combinational. The stall equations are the
// lecture's; the priority order E > M > W of the full bypass is this design's
// reading of the fully bypassed datapath (the youngest value must win).
module cstall
  import mips_pkg::*;
#(
  parameter hazard_mode_e MODE = HZ_FULL_BYPASS
) (
  input  logic [RIDX-1:0] rs_D,
  input  logic [RIDX-1:0] rt_D,
  input  logic            re1_D,
  input  logic            re2_D,
  input  logic [RIDX-1:0] ws_E,
  input  logic            we_E,
  input  logic            we_bypass_E,
  input  logic            we_stall_E,
  input  logic            load_E,
  input  logic [RIDX-1:0] ws_M,
  input  logic            we_M,
  input  logic [RIDX-1:0] ws_W,
  input  logic            we_W,
  output logic            stall,
  output fwd_e            fwd_a,
  output fwd_e            fwd_b
);

  logic rs_e, rs_m, rs_w, rt_e, rt_m, rt_w;
  assign rs_e = (rs_D == ws_E);
  assign rs_m = (rs_D == ws_M) && we_M;
  assign rs_w = (rs_D == ws_W) && we_W;
  assign rt_e = (rt_D == ws_E);
  assign rt_m = (rt_D == ws_M) && we_M;
  assign rt_w = (rt_D == ws_W) && we_W;

  logic lw_E;
  assign lw_E = load_E && (ws_E != '0);

  always_comb begin
    stall = 1'b0;
    fwd_a = FWD_RF;
    fwd_b = FWD_RF;
    unique case (MODE)
      HZ_INTERLOCK: begin
        stall = ((rs_e && we_E) || rs_m || rs_w) && re1_D
             || ((rt_e && we_E) || rt_m || rt_w) && re2_D;
      end
      HZ_ALU_BYPASS: begin
        if (rs_e && we_bypass_E && re1_D) fwd_a = FWD_E;
        stall = ((rs_e && we_stall_E) || rs_m || rs_w) && re1_D
             || ((rt_e && we_E) || rt_m || rt_w) && re2_D;
      end
      HZ_FULL_BYPASS: begin
        stall = (rs_e && lw_E && re1_D) || (rt_e && lw_E && re2_D);
        if (re1_D) begin
          if (rs_e && we_E)  fwd_a = FWD_E;
          else if (rs_m)     fwd_a = FWD_M;
          else if (rs_w)     fwd_a = FWD_W;
        end
        if (re2_D) begin
          if (rt_e && we_E)  fwd_b = FWD_E;
          else if (rt_m)     fwd_b = FWD_M;
          else if (rt_w)     fwd_b = FWD_W;
        end
      end
      default: ;
    endcase
  end

endmodule
