// loco_shift_ctrl: shifter controller of the LOCOFloat adder/subtractor.
//
// Compares the point locations of the two operands. The operand with more
// fractional bits (higher point location) must be shifted right by the
// difference so both points line up; the other operand is not shifted (a left
// shift could overflow). The result point location is the lower of the two.
// Each operand gets its own 6-bit shift command Sh5..Sh0 for its barrel
// shifter; e.g. point locations 15 and 3 give 001100 for operand 1 and 000000
// for operand 2 (the document's example).
//
// This design's choice: a difference above 63 saturates at 63, the largest
// shift the six-stage shifter can make; with significands of at most 63 bits
// the shifted operand is then only sign bits either way.
//
// Interface: pl_a, pl_b (8-bit signed point locations), sh_a, sh_b (shift
// commands), pl_r (aligned point location). Combinational.
module loco_shift_ctrl
  import loco_pkg::*;
(
  input  pl_t        pl_a,
  input  pl_t        pl_b,
  output logic [5:0] sh_a,
  output logic [5:0] sh_b,
  output pl_t        pl_r
);

  logic signed [PL_W:0] diff;   // pl_a - pl_b, one bit wider: -255..255
  logic        [PL_W:0] mag;

  always_comb begin
    diff = (PL_W+1)'(pl_a) - (PL_W+1)'(pl_b);
    mag  = diff[PL_W] ? (PL_W+1)'(-diff) : (PL_W+1)'(diff);
    sh_a = '0;
    sh_b = '0;
    if (diff[PL_W]) begin
      // pl_b > pl_a: operand b has more fractional bits
      sh_b = (mag > 63) ? 6'd63 : mag[5:0];
      pl_r = pl_a;
    end else begin
      sh_a = (mag > 63) ? 6'd63 : mag[5:0];
      pl_r = pl_b;
    end
  end

endmodule
