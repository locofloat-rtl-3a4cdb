// loco_ovf_ctrl: overflow controller of the LOCOFloat adder/subtractor.
//
// The aligned sum is computed one bit wider than the operands (W+1 bits). If
// its two top bits differ the W-bit result would overflow: the sum is then
// shifted right one bit and the point location lowered by one (a multiplexer
// and a -1 adder, as the document describes). Otherwise the low W bits are
// kept unchanged. The dropped LSB is truncated, not rounded. A point location
// of -128 that is lowered wraps; like the rest of the format, no special case
// is checked.
//
// Interface: sum (W+1 bits), pl_in; result (W bits), pl_out, ovf (1 when the
// correction was applied). Combinational.
module loco_ovf_ctrl
  import loco_pkg::*;
#(
  parameter int unsigned W = 50
) (
  input  logic signed [W:0]   sum,
  input  pl_t                 pl_in,
  output logic signed [W-1:0] result,
  output pl_t                 pl_out,
  output logic                ovf
);

  always_comb begin
    ovf = sum[W] ^ sum[W-1];
    if (ovf) begin
      result = sum[W:1];
      pl_out = pl_in - pl_t'(1);
    end else begin
      result = sum[W-1:0];
      pl_out = pl_in;
    end
  end

endmodule
