// loco_barrel_shifter: arithmetic right shift by 0..63 places.
//
// Six fixed shifters in series, of 32, 16, 8, 4, 2 and 1 places, each enabled
// by one control bit Sh5..Sh0; the shift amount is the binary number
// Sh5..Sh0. The chain order (32-bit stage first, 1-bit stage last) and the six
// enables follow the document's barrel-shifter figure. Making the shifts arithmetic is
// this design's reading of "right shift" for two's-complement data
// (the sign bit is copied in), so a two's-complement significand keeps its
// sign; bits shifted out are dropped (truncation, no rounding).
//
// Interface: din (W bits, signed), sh (6 bits), dout (W bits). Purely
// combinational, no clock.
module loco_barrel_shifter #(
  parameter int unsigned W = 50
) (
  input  logic signed [W-1:0] din,
  input  logic        [5:0]   sh,
  output logic signed [W-1:0] dout
);

  logic signed [W-1:0] stage [0:6];

  assign stage[0] = din;

  for (genvar i = 0; i < 6; i++) begin : g_stage
    // stage i uses control bit Sh(5-i): 32, 16, 8, 4, 2, 1 places
    localparam int unsigned AMT = 32 >> i;
    assign stage[i+1] = sh[5-i] ? (stage[i] >>> AMT) : stage[i];
  end

  assign dout = stage[6];

endmodule
