// loco_mul: LOCOFloat multiplier (combinational, no pipelining).
//
// The significands are multiplied directly as two's-complement integers (no
// alignment is needed) and, in parallel, the point locations are added to give
// the product's point location. The full product has WA+WB bits and cannot
// overflow; it is then resized to WR bits (by default WR = WA+WB, nothing is
// dropped). This follows the document's multiplier figure. Two choices are
// this design's own: the optional narrowing to WR, which truncates LSBs, and
// saturation of the point-location sum at -128..+127 instead of wrapping.
//
// Interface: a_sig/a_pl, b_sig/b_pl in; r_sig/r_pl out, same cycle.
module loco_mul
  import loco_pkg::*;
#(
  parameter int unsigned WA = 25,
  parameter int unsigned WB = 25,
  parameter int unsigned WR = WA + WB
) (
  input  logic signed [WA-1:0] a_sig,
  input  pl_t                  a_pl,
  input  logic signed [WB-1:0] b_sig,
  input  pl_t                  b_pl,
  output logic signed [WR-1:0] r_sig,
  output pl_t                  r_pl
);

  logic signed [WA+WB-1:0] prod;
  logic signed [PL_W:0]    pl_wide;
  pl_t                     pl_sum;

  assign prod    = (WA+WB)'(a_sig) * (WA+WB)'(b_sig);
  assign pl_wide = (PL_W+1)'(a_pl) + (PL_W+1)'(b_pl);

  // Saturate the point-location sum to the 8-bit range. This matters mainly
  // for zero, which sits at point location +127: without saturation a zero
  // factor would wrap to a very negative point location and, in a following
  // addition, force the other operand to be shifted out.
  always_comb begin
    if (pl_wide > (PL_W+1)'(PL_MAX))
      pl_sum = PL_MAX;
    else if (pl_wide < -(PL_W+1)'(PL_MAX) - (PL_W+1)'(1))
      pl_sum = pl_t'(-(PL_W+1)'(PL_MAX) - (PL_W+1)'(1));
    else
      pl_sum = pl_t'(pl_wide);
  end

  loco_resize #(.WI(WA+WB), .WO(WR)) u_rs (
    .din(prod), .pl_in(pl_sum), .dout(r_sig), .pl_out(r_pl)
  );

endmodule
