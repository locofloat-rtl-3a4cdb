// tb_loco_mul: self-checking test of the LOCOFloat multiplier. The default
// 25 x 25 unit (50-bit full product) must return exactly the integer product
// and the sum of the point locations; a second instance narrowed to 25 bits
// (as used in the buck model) must return the product's top 25 bits with the
// point location lowered by 25. Products are checked as integers and as reals.
module tb_loco_mul;
  import loco_pkg::*;
  import loco_tb_pkg::*;
  logic signed [24:0] a, b, rn;
  logic signed [49:0] rf;
  pl_t pa, pb, prf, prn;
  int checks = 0, failures = 0;

  loco_mul dut_f (.a_sig(a), .a_pl(pa), .b_sig(b), .b_pl(pb), .r_sig(rf), .r_pl(prf));
  loco_mul #(.WR(25)) dut_n (.a_sig(a), .a_pl(pa), .b_sig(b), .b_pl(pb), .r_sig(rn), .r_pl(prn));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic signed [24:0] x, input int px, input logic signed [24:0] y, input int py);
    longint p;
    real vf, ve;
    a = x; pa = pl_t'(px); b = y; pb = pl_t'(py);
    #1;
    p = longint'(x) * longint'(y);
    checks++;
    if (longint'(rf) != p || prf != pl_t'(px + py)) begin
      failures++;
      $display("FAIL full %0d/%0d * %0d/%0d -> %0d/%0d", x, px, y, py, rf, prf);
    end
    checks++;
    if (longint'(rn) != (p >>> 25) || prn != pl_t'(px + py - 25)) begin
      failures++;
      $display("FAIL narrow %0d/%0d * %0d/%0d -> %0d/%0d", x, px, y, py, rn, prn);
    end
    vf = real'(longint'(rf)) * pow2(-int'(prf));
    ve = (real'(longint'(x)) * pow2(-px)) * (real'(longint'(y)) * pow2(-py));
    checks++;
    if (vf != ve) begin
      failures++;
      $display("FAIL value %g exp %g", vf, ve);
    end
  endtask

  initial begin
    run(25'sd1225, 5, 25'sd2041, 46);              // the format's worked examples
    run(-25'sd312, 7, 25'sd1641, -6);
    run({1'b1, 24'h0}, 10, {1'b1, 24'h0}, 10);     // most negative squared
    run({1'b0, {24{1'b1}}}, 0, {1'b1, 24'h0}, 3);
    for (int k = 0; k < 4000; k++)
      run(25'($urandom), int'($urandom % 120) - 60, 25'($urandom), int'($urandom % 120) - 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
