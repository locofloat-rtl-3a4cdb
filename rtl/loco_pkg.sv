// loco_pkg: shared types and constants of the LOCOFloat arithmetic.
//
// A LOCOFloat number is a pair (significand, point location), both in two's
// complement. The significand is an integer; the point location says how many
// of its bits are fractional, so value = significand * 2^(-point_location).
// A larger point location therefore means a smaller magnitude, the opposite
// of an IEEE-754 exponent. The point location is always 8 bits. The buck model
// uses 50-bit significands for its two state variables ("8/50") and 25-bit
// significands for every other signal ("8/25"); those widths and the 8-bit
// point location follow the document. The function loco_neg is this design's
// helper for the negation drawn as a minus circle in the model's schematic.
package loco_pkg;

  localparam int unsigned PL_W    = 8;   // point-location width
  localparam int unsigned SIG_S_W = 50;  // state-variable significand width
  localparam int unsigned SIG_W   = 25;  // significand width of all other signals

  typedef logic signed [PL_W-1:0] pl_t;

  localparam pl_t PL_MAX = pl_t'(8'sd127);

  // 8/25 number
  typedef struct packed {
    logic signed [SIG_W-1:0] sig;
    pl_t                     pl;
  } loco25_t;

  // 8/50 number (state variables)
  typedef struct packed {
    logic signed [SIG_S_W-1:0] sig;
    pl_t                       pl;
  } loco50_t;

  // Conduction state of the buck converter's switching cell, chosen from the
  // two gate signals and the sign of the inductor current (Equation 4 cases).
  typedef enum logic [2:0] {
    MODE_HS       = 3'd0,  // high-side MOSFET on
    MODE_LS       = 3'd1,  // low-side MOSFET on
    MODE_DIODE_HS = 3'd2,  // both off, iL < 0: current through the high-side diode
    MODE_DIODE_LS = 3'd3,  // both off, iL > 0: current through the low-side diode
    MODE_OPEN     = 3'd4   // both off, iL = 0: inductor voltage is zero
  } cond_mode_t;

  // Negation of an 8/25 number. The most negative significand has no positive
  // counterpart, so it is first halved (point location lowered by one).
  function automatic loco25_t loco_neg(input loco25_t a);
    loco25_t r;
    if (a.sig == {1'b1, {(SIG_W-1){1'b0}}}) begin
      r.sig = {2'b01, {(SIG_W-2){1'b0}}};
      r.pl  = a.pl - pl_t'(1);
    end else begin
      r.sig = -a.sig;
      r.pl  = a.pl;
    end
    return r;
  endfunction

endpackage
