// tb_loco_buck_cases: the six buck-converter cases of the evaluation, run on
// the LOCOFloat model at its default widths with a 40 ns step, open loop
// (fixed duty = Vout/Vin), from switch-off to steady state.
//
// Case  C       L        Vin    Vout    P       Fsw      simulated time
//  1    100 uF  22 uH    62 V   5 V     10 W    210 kHz  0.45 ms
//  2    220 uF  22 uH    3.3 V  2.8 V   0.27 W  300 kHz  1.4 ms
//  3    8.8 mF  40 uH    12 V   5.2 V   250 W   150 kHz  6 ms
//  4    94 uF   1 uH     5.4 V  4.5 V   20 W    700 kHz  0.15 ms
//  5    100 uF  2.2 uH   5.5 V  4.7 V   40 W    550 kHz  90 us
//  6    66 uF   0.33 uH  3.9 V  3.25 V  33 W    700 kHz  80 us
// The load is a resistor Rout = Vout^2/P, fed to the model as the current
// vout(k-1)/Rout. Loss values (not part of the case table) are chosen here:
// RL = Rdson = 10 mohm, RD = 20 mohm, vD = 0.7 V, RC = 10 mohm; one step of
// dead time precedes each switch turn-on.
//
// Every step the model is compared with a double-precision Explicit-Euler
// model of the same equations and step. The test reports, per case, the
// largest deviation relative to the nominal steady-state inductor current
// (P/Vout) and output voltage, and fails a case whose deviation exceeds
// 0.01 %: the 50-bit state variables are meant to make the model as accurate
// as a 64-bit floating-point one.
module tb_loco_buck_cases;
  import loco_pkg::*;
  import loco_tb_pkg::*;

  localparam real DT = 40e-9;
  localparam real RL = 0.01, RDSON = 0.01, RD = 0.02, VD = 0.7, RC = 0.01;
  localparam real TOL = 1e-4;

  typedef struct {
    real c, l, vin, vout, p, fsw, t_end;
  } case_t;

  case_t cases[6] = '{
    '{100e-6, 22e-6,   62.0, 5.0,  10.0,  210e3, 0.45e-3},
    '{220e-6, 22e-6,   3.3,  2.8,  0.27,  300e3, 1.4e-3},
    '{8.8e-3, 40e-6,   12.0, 5.2,  250.0, 150e3, 6.0e-3},
    '{94e-6,  1e-6,    5.4,  4.5,  20.0,  700e3, 0.15e-3},
    '{100e-6, 2.2e-6,  5.5,  4.7,  40.0,  550e3, 90e-6},
    '{66e-6,  0.33e-6, 3.9,  3.25, 33.0,  700e3, 80e-6}
  };

  logic clk = 0, rst_n = 0, en = 0, hsm = 0, lsm = 0;
  loco25_t vin, i_r, dt_l, dt_c, r_c, r_hs, r_ls, r_d, v_d, v_out;
  loco50_t i_l, v_c;
  cond_mode_t mode;
  logic [6:0] ovf;
  logic [1:0] norm_shift;

  int checks = 0, failures = 0;
  longint cycles = 0;

  loco_buck_hil dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 64'd300000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input int n, input case_t cs);
    real rout, il_ref, vc_ref, vo_ref, vo_dut, ic, vl, ir_ref, inom;
    real ei, ev, max_ei, max_ev;
    int  period, ton, steps, ph;
    logic h, l;
    rout  = cs.vout * cs.vout / cs.p;
    inom  = cs.p / cs.vout;
    period = $rtoi(1.0 / (cs.fsw * DT) + 0.5);
    ton    = $rtoi(cs.vout / cs.vin * period + 0.5);
    steps  = $rtoi(cs.t_end / DT + 0.5);
    vin  = to_loco25(cs.vin);
    dt_l = to_loco25(DT / cs.l);
    dt_c = to_loco25(DT / cs.c);
    r_c  = to_loco25(RC);
    r_hs = to_loco25(RL + RDSON);
    r_ls = to_loco25(RL + RDSON);
    r_d  = to_loco25(RL + RD);
    v_d  = to_loco25(VD);
    i_r  = to_loco25(0.0);
    rst_n = 0; en = 0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1; en = 1;
    il_ref = 0.0; vc_ref = 0.0; vo_ref = 0.0; vo_dut = 0.0;
    max_ei = 0.0; max_ev = 0.0;
    for (int k = 0; k < steps; k++) begin
      ph  = k % period;
      h   = (ph >= 1 && ph < 1 + ton);
      l   = (ph >= 2 + ton);
      hsm = h; lsm = l;
      i_r = to_loco25(vo_dut / rout);
      ir_ref = vo_ref / rout;
      #1;
      vo_dut = real25(v_out);
      // reference step
      ic = il_ref - ir_ref;
      vo_ref = vc_ref + ic * RC;
      if (h)                 vl = cs.vin - vo_ref - il_ref * (RDSON + RL);
      else if (l)            vl = -vo_ref - il_ref * (RDSON + RL);
      else if (il_ref < 0.0) vl = cs.vin - vo_ref - il_ref * (RD + RL) - VD;
      else if (il_ref > 0.0) vl = -vo_ref - il_ref * (RD + RL) - VD;
      else                   vl = 0.0;
      il_ref = il_ref + DT / cs.l * vl;
      vc_ref = vc_ref + DT / cs.c * ic;
      @(posedge clk);
      #1;
      ei = (real50(i_l) - il_ref) / inom;
      ev = (real50(v_c) - vc_ref) / cs.vout;
      if (ei < 0.0) ei = -ei;
      if (ev < 0.0) ev = -ev;
      if (ei > max_ei) max_ei = ei;
      if (ev > max_ev) max_ev = ev;
      @(negedge clk);
    end
    $display("case %0d: %0d steps, period %0d, on %0d; final iL %g A (ref %g), vC %g V (ref %g); max error iL %.2e %%, vC %.2e %%",
             n, steps, period, ton, real50(i_l), il_ref, real50(v_c), vc_ref, max_ei * 100.0, max_ev * 100.0);
    checks++;
    if (max_ei > TOL) begin failures++; $display("FAIL case %0d inductor current deviation", n); end
    checks++;
    if (max_ev > TOL) begin failures++; $display("FAIL case %0d capacitor voltage deviation", n); end
  endtask

  initial begin
    for (int n = 0; n < 6; n++) run_case(n + 1, cases[n]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
