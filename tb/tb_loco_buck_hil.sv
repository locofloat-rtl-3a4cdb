// tb_loco_buck_hil: end-to-end test of the LOCOFloat buck converter model at
// its default (document) widths.
//
// Converter (one of the document's evaluation cases, losses chosen here):
// L = 1 uH, C = 94 uF, vin = 5.4 V, 20 W at 4.5 V (Rout = 1.0125 ohm),
// switching at 36 steps of 40 ns (about 700 kHz), duty 30/36 with one step of
// dead time before each switch turns on. The load current fed to the model
// is vout(k-1)/Rout. After 3750 steps at full load the load is cut to 1 %,
// so the inductor current ripple crosses zero and the high-side diode state
// (iL < 0 with both switches off) occurs.
//
// The model is compared every clock cycle with a double-precision Explicit
// Euler model of the same equations and step, written here with reals; one
// model step per clock is checked by running both in lockstep. The test also
// counts every mechanism of the model (the five conduction states, the
// adders' overflow correction, soft normalization, the zero state at point
// location +127) and fails if one never happens.
module tb_loco_buck_hil;
  import loco_pkg::*;
  import loco_tb_pkg::*;

  localparam real DT = 40e-9, L = 1e-6, C = 94e-6, VIN = 5.4, ROUT = 1.0125;
  localparam real RL = 0.01, RDSON = 0.01, RD = 0.02, VD = 0.7, RC = 0.01;
  localparam int  PERIOD = 36, TON = 30, N_FULL = 3750, N_LIGHT = 2000;

  logic clk = 0, rst_n = 0, en = 0, hsm = 0, lsm = 0;
  loco25_t vin, i_r, dt_l, dt_c, r_c, r_hs, r_ls, r_d, v_d, v_out;
  loco50_t i_l, v_c;
  cond_mode_t mode;
  logic [6:0] ovf;
  logic [1:0] norm_shift;

  int checks = 0, failures = 0, cycles = 0;
  int n_mode[5];
  int n_ovf = 0, n_norm = 0, n_zero_pl = 0;

  loco_buck_hil dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == N_FULL + N_LIGHT + 100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  real il_ref = 0.0, vc_ref = 0.0, vo_ref = 0.0, vo_dut_prev = 0.0, rout;
  real max_ei = 0.0, max_ev = 0.0;

  task automatic gates(input int k, output logic h, output logic l);
    int ph = k % PERIOD;
    h = (ph >= 1 && ph < 1 + TON);
    l = (ph >= 2 + TON);
  endtask

  task automatic ref_step(input logic h, input logic l, input real ir);
    real ic, vl;
    ic = il_ref - ir;
    vo_ref = vc_ref + ic * RC;
    if (h)                  vl = VIN - vo_ref - il_ref * (RDSON + RL);
    else if (l)             vl = -vo_ref - il_ref * (RDSON + RL);
    else if (il_ref < 0.0)  vl = VIN - vo_ref - il_ref * (RD + RL) - VD;
    else if (il_ref > 0.0)  vl = -vo_ref - il_ref * (RD + RL) - VD;
    else                    vl = 0.0;
    il_ref = il_ref + DT / L * vl;
    vc_ref = vc_ref + DT / C * ic;
  endtask

  task automatic expect_ok(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycles, what);
    end
  endtask

  initial begin
    real ir_ref, ei, ev;
    logic h, l;
    vin  = to_loco25(VIN);
    dt_l = to_loco25(DT / L);
    dt_c = to_loco25(DT / C);
    r_c  = to_loco25(RC);
    r_hs = to_loco25(RL + RDSON);
    r_ls = to_loco25(RL + RDSON);
    r_d  = to_loco25(RL + RD);
    v_d  = to_loco25(VD);
    i_r  = to_loco25(0.0);
    rout = ROUT;
    repeat (3) @(posedge clk);
    #1;
    expect_ok(i_l.sig == '0 && v_c.sig == '0 && i_l.pl == PL_MAX, "reset state");
    rst_n = 1;
    en = 1;
    for (int k = 0; k < N_FULL + N_LIGHT; k++) begin
      if (k == N_FULL) rout = ROUT * 100.0;
      gates(k, h, l);
      hsm = h; lsm = l;
      // load current from the previous step's output voltage
      i_r    = to_loco25(vo_dut_prev / rout);
      ir_ref = vo_ref / rout;
      #1;
      // mechanisms seen in this step
      n_mode[int'(mode)]++;
      if (ovf != '0) n_ovf++;
      if (norm_shift != '0) n_norm++;
      if (i_l.sig == '0 && i_l.pl == PL_MAX) n_zero_pl++;
      vo_dut_prev = real25(v_out);
      ref_step(h, l, ir_ref);
      @(posedge clk);
      #1;
      ei = real50(i_l) - il_ref;
      ev = real50(v_c) - vc_ref;
      if (ei < 0.0) ei = -ei;
      if (ev < 0.0) ev = -ev;
      if (ei > max_ei) max_ei = ei;
      if (ev > max_ev) max_ev = ev;
      expect_ok(ei < 2e-4 * 4.44, $sformatf("iL %g vs reference %g", real50(i_l), il_ref));
      expect_ok(ev < 2e-4 * 4.5,  $sformatf("vC %g vs reference %g", real50(v_c), vc_ref));
      @(negedge clk);
    end
    $display("final iL %g A (ref %g), vC %g V (ref %g); max |err| iL %g A, vC %g V",
             real50(i_l), il_ref, real50(v_c), vc_ref, max_ei, max_ev);
    $display("modes HS=%0d LS=%0d DIODE_HS=%0d DIODE_LS=%0d OPEN=%0d ovf=%0d norm=%0d zero@+127=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_ovf, n_norm, n_zero_pl);
    for (int m = 0; m < 5; m++) expect_ok(n_mode[m] > 0, $sformatf("conduction state %0d never seen", m));
    expect_ok(n_ovf > 0, "adder overflow correction never seen");
    expect_ok(n_norm > 0, "soft normalization never seen");
    expect_ok(n_zero_pl > 0, "zero state never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
