// loco_addsub: LOCOFloat adder/subtractor (combinational, no pipelining).
//
// Both significands are first brought to the wider operand width WI by
// left alignment in loco_resize (operand widths need not match). The
// shifter controller compares the point
// locations and the barrel shifter of the operand with more fractional bits
// shifts it right by the difference, so both points line up at the lower
// point location. The aligned significands are then added, or b subtracted
// from a, in WI+1 bits, and the overflow controller shifts the sum right one
// place (point location minus one) if it does not fit in WI bits. Finally the
// result is resized to WR bits. This structure (two barrel shifters, shifter
// controller, +/- unit, overflow controller) follows the document; the
// left alignment of a narrower operand and the final resize are this design's
// choices. No rounding, no special values.
//
// Interface: a_sig/a_pl, b_sig/b_pl, sub (1: a-b, 0: a+b); r_sig/r_pl, ovf
// (overflow correction applied). Result is valid in the same cycle.
module loco_addsub
  import loco_pkg::*;
#(
  parameter int unsigned WA = 50,
  parameter int unsigned WB = 50,
  parameter int unsigned WR = (WA > WB) ? WA : WB
) (
  input  logic signed [WA-1:0] a_sig,
  input  pl_t                  a_pl,
  input  logic signed [WB-1:0] b_sig,
  input  pl_t                  b_pl,
  input  logic                 sub,
  output logic signed [WR-1:0] r_sig,
  output pl_t                  r_pl,
  output logic                 ovf
);

  localparam int unsigned WI = (WA > WB) ? WA : WB;

  logic signed [WI-1:0] a_ext, b_ext, a_al, b_al, s_res;
  logic signed [WI:0]   sum;
  logic        [5:0]    sh_a, sh_b;
  pl_t                  pl_al, pl_s;

  pl_t a_pl_ext, b_pl_ext;

  // bring both operands to WI bits by left alignment (exact)
  loco_resize #(.WI(WA), .WO(WI)) u_ext_a (
    .din(a_sig), .pl_in(a_pl), .dout(a_ext), .pl_out(a_pl_ext));
  loco_resize #(.WI(WB), .WO(WI)) u_ext_b (
    .din(b_sig), .pl_in(b_pl), .dout(b_ext), .pl_out(b_pl_ext));

  loco_shift_ctrl u_shctl (
    .pl_a(a_pl_ext), .pl_b(b_pl_ext), .sh_a(sh_a), .sh_b(sh_b), .pl_r(pl_al)
  );

  loco_barrel_shifter #(.W(WI)) u_bs_a (.din(a_ext), .sh(sh_a), .dout(a_al));
  loco_barrel_shifter #(.W(WI)) u_bs_b (.din(b_ext), .sh(sh_b), .dout(b_al));

  assign sum = sub ? ((WI+1)'(a_al) - (WI+1)'(b_al))
                   : ((WI+1)'(a_al) + (WI+1)'(b_al));

  loco_ovf_ctrl #(.W(WI)) u_ovf (
    .sum(sum), .pl_in(pl_al), .result(s_res), .pl_out(pl_s), .ovf(ovf)
  );

  loco_resize #(.WI(WI), .WO(WR)) u_rs (
    .din(s_res), .pl_in(pl_s), .dout(r_sig), .pl_out(r_pl)
  );

endmodule
