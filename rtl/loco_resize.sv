// loco_resize: change the significand width of a LOCOFloat number.
//
// Narrowing (WO < WI) keeps the WO most significant bits and lowers the point
// location by the number of bits dropped, so the value is kept up to the
// truncated LSBs (no rounding). Widening (WO >= WI) left-aligns the
// significand (zero LSBs appended) and raises the point location by the same
// amount, which is exact and keeps a normalized value normalized; a value
// whose point location would pass +127 (magnitude below about 2^-(127-WO+WI))
// is flushed to zero at point location +127 instead. The model's
// schematic draws this as a triangle where an 8/50 state-variable line enters
// the 8/25 datapath; the document does not describe its insides, so
// truncation on narrowing, left alignment on widening and the flush to zero
// are this design's choices. Narrowing wraps the point location if it would
// pass -128 (magnitudes above about 2^103), like the rest of the format.
//
// Interface: din/pl_in in, dout/pl_out out. Combinational. When narrowing,
// the low WI-WO input bits are unused by design (lint reports them).
module loco_resize
  import loco_pkg::*;
#(
  parameter int unsigned WI = 50,
  parameter int unsigned WO = 25
) (
  input  logic signed [WI-1:0] din,
  input  pl_t                  pl_in,
  output logic signed [WO-1:0] dout,
  output pl_t                  pl_out
);

  if (WO < WI) begin : g_narrow
    assign dout   = din[WI-1 -: WO];
    assign pl_out = pl_in - pl_t'(WI - WO);
  end else begin : g_widen
    // left-align: append WO-WI zero LSBs and raise the point location
    localparam int unsigned D = WO - WI;
    logic flush;
    assign flush  = (D > 0) && (int'(pl_in) > int'(PL_MAX) - int'(D));
    assign dout   = flush ? '0     : ({din, {D{1'b0}}} >> 0);
    assign pl_out = flush ? PL_MAX : pl_t'(int'(pl_in) + int'(D));
  end

endmodule
