// tb_loco_ovf_ctrl: self-checking test of the overflow controller at W = 50.
// Sums that fit in 50 bits must pass unchanged; sums that need the 51st bit
// must come out halved (floor) with the point location lowered by one. The
// value represented must be kept up to the dropped LSB.
module tb_loco_ovf_ctrl;
  import loco_pkg::*;
  localparam int W = 50;
  logic signed [W:0]   sum;
  logic signed [W-1:0] result;
  pl_t pl_in, pl_out;
  logic ovf;
  int checks = 0, failures = 0, n_ovf = 0;

  loco_ovf_ctrl #(.W(W)) dut (.sum(sum), .pl_in(pl_in), .result(result), .pl_out(pl_out), .ovf(ovf));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic signed [W:0] s, input int p);
    longint sv, lim, er;
    int ep;
    bit eo;
    sum = s; pl_in = pl_t'(p);
    #1;
    sv  = longint'(s);
    lim = longint'(1) <<< (W-1);
    eo  = (sv >= lim) || (sv < -lim);
    er  = eo ? (sv >>> 1) : sv;
    ep  = eo ? p - 1 : p;
    checks++;
    if (eo) n_ovf++;
    if (ovf != eo || longint'(result) != er || int'(pl_out) != int'(pl_t'(ep))) begin
      failures++;
      $display("FAIL sum=%0d pl=%0d -> %0d/%0d ovf=%0d exp %0d/%0d/%0d", s, p, result, pl_out, ovf, er, ep, eo);
    end
  endtask

  initial begin
    check({2'b01, {(W-1){1'b0}}}, 10);    // +2^49: overflow
    check({2'b10, {(W-1){1'b1}}}, 10);    // -2^49 - 1: overflow
    check({2'b11, {(W-1){1'b0}}}, 10);    // -2^49: fits
    check({2'b00, {(W-1){1'b1}}}, -5);    // 2^49 - 1: fits
    for (int k = 0; k < 3000; k++) check((W+1)'({$urandom, $urandom}), $signed(8'($urandom)));
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow case exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
