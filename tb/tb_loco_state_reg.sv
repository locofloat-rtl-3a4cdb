// tb_loco_state_reg: self-checking test of the soft-normalizing state
// register (W = 50). The register output is fed back to its input, as a
// state variable that does not change. Starting from the value 1 at point
// location 0, the significand must move exactly one place per clock (point
// location +1 each cycle) and stop after 48 cycles in the normalized form
// 01...; the value must never change. Also checks the reset value, the hold
// when en = 0, and a negative value converging to the 10... form.
module tb_loco_state_reg;
  import loco_pkg::*;
  import loco_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [49:0] d, q;
  pl_t dp, qp;
  logic nsh;
  logic fb = 0;
  logic signed [49:0] d_ext;
  pl_t dp_ext;
  int checks = 0, failures = 0, cycles = 0;

  assign d  = fb ? q  : d_ext;
  assign dp = fb ? qp : dp_ext;

  loco_state_reg dut (.clk(clk), .rst_n(rst_n), .en(en), .d_sig(d), .d_pl(dp),
                      .q_sig(q), .q_pl(qp), .norm_shift(nsh));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (q=%h pl=%0d)", what, q, qp); end
  endtask

  task automatic converge(input logic signed [49:0] v, input int p, input int steps,
                          input logic [1:0] lead);
    real v0;
    d_ext = v; dp_ext = pl_t'(p); fb = 0; en = 1;
    @(posedge clk); #1;
    // first load already normalizes once
    fb = 1;
    v0 = real'(longint'(v)) * pow2(-p);
    for (int k = 1; k < steps; k++) begin
      expect_eq(int'(qp) == p + k, "one position per cycle");
      expect_eq(real'(longint'(q)) * pow2(-int'(qp)) == v0, "value kept");
      @(posedge clk); #1;
    end
    expect_eq(int'(qp) == p + steps && q[49:48] == lead, "normalized after expected cycles");
    repeat (3) @(posedge clk);
    #1;
    expect_eq(int'(qp) == p + steps && q[49:48] == lead, "stays normalized");
  endtask

  initial begin
    d_ext = 50'sd12345; dp_ext = 3;
    repeat (2) @(posedge clk);
    #1;
    expect_eq(q == '0 && qp == PL_MAX, "reset value");
    rst_n = 1;
    @(posedge clk); #1;
    expect_eq(q == '0 && qp == PL_MAX, "hold while en = 0");
    converge(50'sd1, 0, 48, 2'b01);
    converge(-50'sd3, -20, 47, 2'b10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
