// tb_loco_barrel_shifter: self-checking test of the 0..63-place arithmetic
// right shifter at the default 50-bit width. Every shift amount is applied to
// random positive and negative words and to the all-ones / most-negative
// corner cases; the expected value is an arithmetic shift computed in a wider
// integer by the testbench.
module tb_loco_barrel_shifter;
  localparam int W = 50;
  logic signed [W-1:0] din, dout;
  logic        [5:0]   sh;
  int checks = 0, failures = 0;

  loco_barrel_shifter #(.W(W)) dut (.din(din), .sh(sh), .dout(dout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic signed [W-1:0] v, input int s);
    longint x, e;
    din = v; sh = 6'(s);
    #1;
    x = longint'(v);
    for (int i = 0; i < s; i++) x = x / 2 - ((x < 0 && (x % 2 != 0)) ? 1 : 0); // floor division
    e = x;
    checks++;
    if (longint'(dout) != e) begin
      failures++;
      $display("FAIL din=%0d sh=%0d dout=%0d exp=%0d", v, s, dout, e);
    end
  endtask

  initial begin
    for (int s = 0; s < 64; s++) begin
      check({1'b1, {(W-1){1'b0}}}, s);
      check({1'b0, {(W-1){1'b1}}}, s);
      check('1, s);
      for (int k = 0; k < 20; k++) check(W'({$urandom, $urandom}), s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
