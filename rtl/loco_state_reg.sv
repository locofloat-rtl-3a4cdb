// loco_state_reg: state-variable register with soft normalization.
//
// Stores one LOCOFloat state variable (W-bit significand, 8-bit point
// location). The value presented at d is passed through one soft-normalization
// step before it is clocked in, so a stored value moves at most one bit
// position towards the normalized form per update, as the document prescribes
// for its state variables. Register on the rising edge of clk when en is 1.
// Reset (rst_n low, synchronous) is this design's choice: zero with point
// location +127, the form a zero settles in under soft normalization.
//
// Interface: clk, rst_n, en, d_sig/d_pl in; q_sig/q_pl out (one-cycle
// latency), norm_shift = 1 when the value being stored is shifted.
module loco_state_reg
  import loco_pkg::*;
#(
  parameter int unsigned W = 50
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] d_sig,
  input  pl_t                 d_pl,
  output logic signed [W-1:0] q_sig,
  output pl_t                 q_pl,
  output logic                norm_shift
);

  logic signed [W-1:0] n_sig;
  pl_t                 n_pl;

  loco_soft_norm #(.W(W)) u_sn (
    .din(d_sig), .pl_in(d_pl), .dout(n_sig), .pl_out(n_pl), .shifted(norm_shift)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_sig <= '0;
      q_pl  <= PL_MAX;
    end else if (en) begin
      q_sig <= n_sig;
      q_pl  <= n_pl;
    end
  end

endmodule
