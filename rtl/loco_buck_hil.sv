// loco_buck_hil: real-time model of a synchronous buck converter with losses,
// computed in LOCOFloat arithmetic, one Explicit-Euler simulation step per
// clock cycle.
//
// The model integrates the inductor current iL and the capacitor voltage vC:
//   iC   = iL - iR                      (capacitor current, iR = load current)
//   vout = vC + iC*RC                   (output voltage across C and its ESR)
//   vL   = switch-node voltage - vout - iL*R - (diode drop)   per conduction state
//   iL  <= iL + (dt/L)*vL
//   vC  <= vC + (dt/C)*iC
// The conduction state follows the gate signals hsm/lsm and the sign of iL:
//   hsm on                : vL = vin - vout - iL*r_hs
//   lsm on                : vL =     - vout - iL*r_ls
//   both off, iL < 0      : vL = vin - vout - iL*r_d - v_d
//   both off, iL > 0      : vL =     - vout - iL*r_d - v_d
//   both off, iL = 0      : vL = 0
// These equations, the datapath of multiplexers, adders and multipliers, the
// 8/50 format of the two state registers and 8/25 of every other signal follow
// the document. The coefficients dt/L, dt/C and the resistances are inputs, so
// the step and the component values are set at run time. The diode terms are
// written as the document writes them (v_d subtracted in both diode states).
//
// This design's own choices: both gates on (shoot-through, not covered by the
// model) is treated as hsm on; r_hs, r_ls and r_d are separate inputs (each
// already including the inductor resistance RL); en gates the state update;
// reset clears both states to zero; 8/50 states enter the 8/25 datapath
// through loco_resize (truncation of the 25 LSBs); the four 25x25 products
// are truncated back to 25 bits.
//
// Timing: no pipelining. All arithmetic between the state registers is
// combinational; the outputs i_l and v_c are the register outputs and v_out,
// mode, ovf and norm_shift are combinational functions of them and of the inputs. The longest path
// runs from the vC register through vout and vL to the iL register.
module loco_buck_hil
  import loco_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,      // 1: take one simulation step this cycle
  input  logic       hsm,     // high-side MOSFET gate (1 = on)
  input  logic       lsm,     // low-side MOSFET gate (1 = on)
  input  loco25_t    vin,     // input voltage vg
  input  loco25_t    i_r,     // load current iR
  input  loco25_t    dt_l,    // dt / L
  input  loco25_t    dt_c,    // dt / C
  input  loco25_t    r_c,     // capacitor ESR RC
  input  loco25_t    r_hs,    // RL + Rdson of the high-side MOSFET
  input  loco25_t    r_ls,    // RL + Rdson of the low-side MOSFET
  input  loco25_t    r_d,     // RL + RD (diode resistance)
  input  loco25_t    v_d,     // diode forward voltage
  output loco50_t    i_l,     // inductor current state
  output loco50_t    v_c,     // capacitor voltage state
  output loco25_t    v_out,   // output voltage
  output cond_mode_t mode,    // conduction state used by this step
  output logic [6:0] ovf,     // overflow corrections in the adders this step:
                              // {vC, iL, diode, losses, vin-vout, vout, iC}
  output logic [1:0] norm_shift // soft-normalization shift on {vC, iL} this step
);

  localparam loco25_t ZERO25 = '{sig: '0, pl: PL_MAX};

  loco25_t il25, vc25, i_cap, rc_ic, vout, nvout, vg_vo;
  loco25_t v_ideal, r_loss, v_loss, v_real, v_real_d, v_ind, d_il, d_vc;
  loco50_t il_next, vc_next;
  logic    il_neg, il_zero;
  logic    ovf_ic, ovf_vo, ovf_vgvo, ovf_real, ovf_d, ovf_il, ovf_vc;
  logic    nsh_il, nsh_vc;

  assign ovf        = {ovf_vc, ovf_il, ovf_d, ovf_real, ovf_vgvo, ovf_vo, ovf_ic};
  assign norm_shift = {nsh_vc, nsh_il};

  // ---- 8/50 state variables into the 8/25 datapath ----
  loco_resize #(.WI(SIG_S_W), .WO(SIG_W)) u_rs_il (
    .din(i_l.sig), .pl_in(i_l.pl), .dout(il25.sig), .pl_out(il25.pl));
  loco_resize #(.WI(SIG_S_W), .WO(SIG_W)) u_rs_vc (
    .din(v_c.sig), .pl_in(v_c.pl), .dout(vc25.sig), .pl_out(vc25.pl));

  // ---- capacitor current and output voltage ----
  loco_addsub #(.WA(SIG_W), .WB(SIG_W)) u_ic (
    .a_sig(il25.sig), .a_pl(il25.pl), .b_sig(i_r.sig), .b_pl(i_r.pl), .sub(1'b1),
    .r_sig(i_cap.sig), .r_pl(i_cap.pl), .ovf(ovf_ic));

  loco_mul #(.WA(SIG_W), .WB(SIG_W), .WR(SIG_W)) u_m_rc (
    .a_sig(r_c.sig), .a_pl(r_c.pl), .b_sig(i_cap.sig), .b_pl(i_cap.pl),
    .r_sig(rc_ic.sig), .r_pl(rc_ic.pl));

  loco_addsub #(.WA(SIG_W), .WB(SIG_W)) u_vo (
    .a_sig(vc25.sig), .a_pl(vc25.pl), .b_sig(rc_ic.sig), .b_pl(rc_ic.pl), .sub(1'b0),
    .r_sig(vout.sig), .r_pl(vout.pl), .ovf(ovf_vo));

  assign v_out = vout;
  assign nvout = loco_neg(vout);

  // ---- conduction state ----
  assign il_zero = (i_l.sig == '0);
  assign il_neg  = i_l.sig[SIG_S_W-1];

  always_comb begin
    if (hsm)          mode = MODE_HS;
    else if (lsm)     mode = MODE_LS;
    else if (il_zero) mode = MODE_OPEN;
    else if (il_neg)  mode = MODE_DIODE_HS;
    else              mode = MODE_DIODE_LS;
  end

  // ---- inductor voltage ----
  loco_addsub #(.WA(SIG_W), .WB(SIG_W)) u_vgvo (
    .a_sig(vin.sig), .a_pl(vin.pl), .b_sig(vout.sig), .b_pl(vout.pl), .sub(1'b1),
    .r_sig(vg_vo.sig), .r_pl(vg_vo.pl), .ovf(ovf_vgvo));

  // closed-switch multiplexer: switch node at vin or at ground
  assign v_ideal = (mode == MODE_HS || mode == MODE_DIODE_HS) ? vg_vo : nvout;

  // loss resistance multiplexer
  always_comb begin
    unique case (mode)
      MODE_HS: r_loss = r_hs;
      MODE_LS: r_loss = r_ls;
      default: r_loss = r_d;
    endcase
  end

  loco_mul #(.WA(SIG_W), .WB(SIG_W), .WR(SIG_W)) u_m_loss (
    .a_sig(il25.sig), .a_pl(il25.pl), .b_sig(r_loss.sig), .b_pl(r_loss.pl),
    .r_sig(v_loss.sig), .r_pl(v_loss.pl));

  loco_addsub #(.WA(SIG_W), .WB(SIG_W)) u_real (
    .a_sig(v_ideal.sig), .a_pl(v_ideal.pl), .b_sig(v_loss.sig), .b_pl(v_loss.pl), .sub(1'b1),
    .r_sig(v_real.sig), .r_pl(v_real.pl), .ovf(ovf_real));

  loco_addsub #(.WA(SIG_W), .WB(SIG_W)) u_diode (
    .a_sig(v_real.sig), .a_pl(v_real.pl), .b_sig(v_d.sig), .b_pl(v_d.pl), .sub(1'b1),
    .r_sig(v_real_d.sig), .r_pl(v_real_d.pl), .ovf(ovf_d));

  always_comb begin
    unique case (mode)
      MODE_HS, MODE_LS:             v_ind = v_real;
      MODE_DIODE_HS, MODE_DIODE_LS: v_ind = v_real_d;
      default:                      v_ind = ZERO25;
    endcase
  end

  // ---- Euler updates ----
  loco_mul #(.WA(SIG_W), .WB(SIG_W), .WR(SIG_W)) u_m_dil (
    .a_sig(dt_l.sig), .a_pl(dt_l.pl), .b_sig(v_ind.sig), .b_pl(v_ind.pl),
    .r_sig(d_il.sig), .r_pl(d_il.pl));

  loco_addsub #(.WA(SIG_S_W), .WB(SIG_W)) u_il (
    .a_sig(i_l.sig), .a_pl(i_l.pl), .b_sig(d_il.sig), .b_pl(d_il.pl), .sub(1'b0),
    .r_sig(il_next.sig), .r_pl(il_next.pl), .ovf(ovf_il));

  loco_mul #(.WA(SIG_W), .WB(SIG_W), .WR(SIG_W)) u_m_dvc (
    .a_sig(dt_c.sig), .a_pl(dt_c.pl), .b_sig(i_cap.sig), .b_pl(i_cap.pl),
    .r_sig(d_vc.sig), .r_pl(d_vc.pl));

  loco_addsub #(.WA(SIG_S_W), .WB(SIG_W)) u_vc (
    .a_sig(v_c.sig), .a_pl(v_c.pl), .b_sig(d_vc.sig), .b_pl(d_vc.pl), .sub(1'b0),
    .r_sig(vc_next.sig), .r_pl(vc_next.pl), .ovf(ovf_vc));

  // ---- state registers (soft-normalized) ----
  loco_state_reg #(.W(SIG_S_W)) u_reg_il (
    .clk(clk), .rst_n(rst_n), .en(en), .d_sig(il_next.sig), .d_pl(il_next.pl),
    .q_sig(i_l.sig), .q_pl(i_l.pl), .norm_shift(nsh_il));

  loco_state_reg #(.W(SIG_S_W)) u_reg_vc (
    .clk(clk), .rst_n(rst_n), .en(en), .d_sig(vc_next.sig), .d_pl(vc_next.pl),
    .q_sig(v_c.sig), .q_pl(v_c.pl), .norm_shift(nsh_vc));

endmodule
