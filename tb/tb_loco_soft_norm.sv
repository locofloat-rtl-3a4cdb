// tb_loco_soft_norm: self-checking test of one soft-normalization step.
// Reproduces the three example rows of the format's normalization table at
// their printed widths (11 and 12 bits), then random 50-bit values: a value
// leading with 00 or 11 must come out shifted left one place with the point
// location raised by one; 01 and 10 must pass unchanged. Zero at point
// location +127 must stay put.
module tb_loco_soft_norm;
  import loco_pkg::*;
  logic signed [10:0] a11, r11;
  logic signed [11:0] a12, r12;
  logic signed [49:0] a50, r50;
  pl_t p11, q11, p12, q12, p50, q50;
  logic s11, s12, s50;
  int checks = 0, failures = 0;

  loco_soft_norm #(.W(11)) dut11 (.din(a11), .pl_in(p11), .dout(r11), .pl_out(q11), .shifted(s11));
  loco_soft_norm #(.W(12)) dut12 (.din(a12), .pl_in(p12), .dout(r12), .pl_out(q12), .shifted(s12));
  loco_soft_norm dut50 (.din(a50), .pl_in(p50), .dout(r50), .pl_out(q50), .shifted(s50));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    // positive number with suboptimal notation
    a11 = 11'b00001010010; p11 = 6;
    // negative number with suboptimal notation
    a12 = 12'b110100101101; p12 = 4;
    a50 = '0; p50 = PL_MAX;
    #1;
    expect_eq(r11 == 11'b00010100100 && q11 == 7 && s11, "table row 00");
    expect_eq(r12 == 12'b101001011010 && q12 == 5 && s12, "table row 11");
    expect_eq(r50 == '0 && q50 == PL_MAX && !s50, "zero saturates at +127");
    // already normalized
    a12 = 12'b011100110101; p12 = 7;
    #1;
    expect_eq(r12 == 12'b011100110101 && q12 == 7 && !s12, "table row other");
    for (int k = 0; k < 4000; k++) begin
      bit sh;
      a50 = 50'({$urandom, $urandom}) >>> ($urandom % 3);
      p50 = pl_t'(int'($urandom % 250) - 125);
      #1;
      sh = (a50[49] == a50[48]);
      if (sh) expect_eq(r50 == (a50 <<< 1) && int'(q50) == int'(p50) + 1 && s50, "random shift");
      else    expect_eq(r50 == a50 && q50 == p50 && !s50, "random hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
