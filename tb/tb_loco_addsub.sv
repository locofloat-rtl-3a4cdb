// tb_loco_addsub: self-checking test of the LOCOFloat adder/subtractor.
// Two instances: the default 50 + 50 bit unit and a 50 + 25 bit unit (as used
// for the state-variable updates, the 25-bit operand left-aligned to 50 bits). Random operands and point locations are
// added and subtracted; the expected significand and point location are
// computed by the testbench in 64-bit integers from the format's rules (align
// on the lower point location by arithmetic right shift, saturated at 63;
// add; halve and lower the point location on overflow). The real values are
// also compared: the result must lie within a few result LSBs of the exact
// sum. Directed cases cover the document's alignment example and overflow.
module tb_loco_addsub;
  import loco_pkg::*;
  import loco_tb_pkg::*;

  logic signed [49:0] a1, b1, r1, a2, r2;
  logic signed [24:0] b2;
  pl_t pa1, pb1, pr1, pa2, pb2, pr2;
  logic sub1, sub2, ovf1, ovf2;
  int checks = 0, failures = 0, n_ovf = 0;

  loco_addsub dut1 (.a_sig(a1), .a_pl(pa1), .b_sig(b1), .b_pl(pb1), .sub(sub1),
                    .r_sig(r1), .r_pl(pr1), .ovf(ovf1));
  loco_addsub #(.WA(50), .WB(25)) dut2 (.a_sig(a2), .a_pl(pa2), .b_sig(b2), .b_pl(pb2), .sub(sub2),
                    .r_sig(r2), .r_pl(pr2), .ovf(ovf2));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, W = 50 internal width
  task automatic ref_model(input longint a, input int pa, input longint b, input int pb,
                           input bit sub, output longint r, output int pr, output bit ov);
    int d, s;
    longint s_, lim;
    d = pa - pb;
    if (d > 0) begin
      s = (d > 63) ? 63 : d;
      a = a >>> s;
      pr = pb;
    end else begin
      s = (-d > 63) ? 63 : -d;
      b = b >>> s;
      pr = pa;
    end
    s_  = sub ? a - b : a + b;
    lim = longint'(1) <<< 49;
    ov  = (s_ >= lim) || (s_ < -lim);
    if (ov) begin
      s_ = s_ >>> 1;
      pr = pr - 1;
    end
    r = s_;
  endtask

  task automatic run1(input logic signed [49:0] a, input int pa, input logic signed [49:0] b,
                      input int pb, input bit sub);
    longint er;
    int ep;
    bit eo;
    real va, vb, vr, ex;
    a1 = a; pa1 = pl_t'(pa); b1 = b; pb1 = pl_t'(pb); sub1 = sub;
    #1;
    ref_model(longint'(a), pa, longint'(b), pb, sub, er, ep, eo);
    checks++;
    if (eo) n_ovf++;
    if (longint'(r1) != er || int'(pr1) != ep || ovf1 != eo) begin
      failures++;
      $display("FAIL 50+50 a=%0d/%0d b=%0d/%0d sub=%0d -> %0d/%0d exp %0d/%0d", a, pa, b, pb, sub, r1, pr1, er, ep);
    end
    va = real'(longint'(a)) * pow2(-pa);
    vb = real'(longint'(b)) * pow2(-pb);
    ex = sub ? va - vb : va + vb;
    vr = real'(longint'(r1)) * pow2(-int'(pr1));
    checks++;
    if ((vr - ex) > 4.0 * pow2(-int'(pr1)) || (ex - vr) > 4.0 * pow2(-int'(pr1))) begin
      failures++;
      $display("FAIL 50+50 value %g exp %g", vr, ex);
    end
  endtask

  task automatic run2(input logic signed [49:0] a, input int pa, input logic signed [24:0] b,
                      input int pb, input bit sub);
    longint er;
    int ep;
    bit eo;
    a2 = a; pa2 = pl_t'(pa); b2 = b; pb2 = pl_t'(pb); sub2 = sub;
    #1;
    // the 25-bit operand is first left-aligned to 50 bits
    ref_model(longint'(a), pa, longint'(b) <<< 25, pb + 25, sub, er, ep, eo);
    checks++;
    if (longint'(r2) != er || int'(pr2) != ep || ovf2 != eo) begin
      failures++;
      $display("FAIL 50+25 a=%0d/%0d b=%0d/%0d sub=%0d -> %0d/%0d exp %0d/%0d", a, pa, b, pb, sub, r2, pr2, er, ep);
    end
  endtask

  initial begin
    // operand 1 with point location 15, operand 2 with 3: operand 1 shifted 12 places
    run1(50'sd4096 * 50'sd12345, 15, 50'sd7, 3, 1'b0);
    // overflow: two large positive normalized values
    run1({2'b01, 48'hFFFF_FFFF_FFFF}, 20, {2'b01, 48'h8000_0000_0000}, 20, 1'b0);
    // overflow on subtraction of a large negative value
    run1({2'b01, 48'h0}, 0, {2'b10, 48'h1}, 0, 1'b1);
    for (int k = 0; k < 4000; k++) begin
      run1(50'({$urandom, $urandom}) >>> ($urandom % 40), int'($urandom % 120) - 60,
           50'({$urandom, $urandom}) >>> ($urandom % 40), int'($urandom % 120) - 60, 1'($urandom));
      run2(50'({$urandom, $urandom}) >>> ($urandom % 40), int'($urandom % 120) - 60,
           25'($urandom) >>> ($urandom % 20), int'($urandom % 120) - 60, 1'($urandom));
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL overflow never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
