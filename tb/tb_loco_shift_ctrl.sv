// tb_loco_shift_ctrl: self-checking test of the shifter controller. Checks
// the worked example (point locations 15 and 3 give Sh5..Sh0 = 001100 for the
// first operand), the saturation at 63 for large differences, and random
// pairs over the full signed 8-bit range.
module tb_loco_shift_ctrl;
  import loco_pkg::*;
  pl_t pl_a, pl_b, pl_r;
  logic [5:0] sh_a, sh_b;
  int checks = 0, failures = 0;

  loco_shift_ctrl dut (.pl_a(pl_a), .pl_b(pl_b), .sh_a(sh_a), .sh_b(sh_b), .pl_r(pl_r));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int a, input int b);
    int d, ea, eb, er;
    pl_a = pl_t'(a); pl_b = pl_t'(b);
    #1;
    d  = a - b;
    ea = (d > 0) ? ((d > 63) ? 63 : d) : 0;
    eb = (d < 0) ? ((-d > 63) ? 63 : -d) : 0;
    er = (a < b) ? a : b;
    checks++;
    if (int'(sh_a) != ea || int'(sh_b) != eb || int'(pl_r) != er) begin
      failures++;
      $display("FAIL a=%0d b=%0d sh_a=%0d sh_b=%0d pl_r=%0d exp %0d %0d %0d",
               a, b, sh_a, sh_b, pl_r, ea, eb, er);
    end
  endtask

  initial begin
    check(15, 3);
    checks++;
    if (sh_a != 6'b001100) begin failures++; $display("FAIL worked example"); end
    check(3, 15);
    check(127, -128);
    check(-128, 127);
    check(70, 7);
    check(7, 70);
    check(5, 5);
    for (int k = 0; k < 2000; k++) check($signed(8'($urandom)), $signed(8'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
