// loco_soft_norm: one step of LOCOFloat soft normalization.
//
// A significand whose two leading bits are equal ("00": positive, "11":
// negative) carries a redundant sign bit: it is shifted left one place and the
// point location raised by one, which keeps the value and gains one bit of
// resolution. Any other significand ("01" or "10") is passed unchanged. Only
// one position is moved per pass, so a value far from normalized converges
// over several clock cycles when this sits in front of a register. That rule
// is the document's. This design adds one guard: the shift is suppressed when
// the point location is already +127, so a zero (which would shift forever)
// settles at point location +127 instead of wrapping to -128.
//
// Interface: din/pl_in in; dout/pl_out out; shifted = 1 when a shift was made.
// Combinational.
module loco_soft_norm
  import loco_pkg::*;
#(
  parameter int unsigned W = 50
) (
  input  logic signed [W-1:0] din,
  input  pl_t                 pl_in,
  output logic signed [W-1:0] dout,
  output pl_t                 pl_out,
  output logic                shifted
);

  always_comb begin
    shifted = (din[W-1] == din[W-2]) && (pl_in != PL_MAX);
    if (shifted) begin
      dout   = din <<< 1;
      pl_out = pl_in + pl_t'(1);
    end else begin
      dout   = din;
      pl_out = pl_in;
    end
  end

endmodule
