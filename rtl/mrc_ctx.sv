// mrc_ctx: magnitude refinement context block.
//
// Inputs are the sigma' bit of the coded position (set after its first
// refinement) and hood0, high when all 8 neighbours are insignificant. The
// first refinement of a position uses context 14 when hood0 is high and 15
// otherwise; every later refinement uses 16. The data bit is the magnitude
// bit itself. Purely combinational.
//
// Follows the published architecture: contexts 14-16. Own choice: the
// condition order, taken from the standard.
module mrc_ctx (
  input  logic       sigp,
  input  logic       hood0,
  input  logic       mag,
  output logic [4:0] cx,
  output logic       d
);

  always_comb begin
    if (sigp)       cx = 5'd16;
    else if (hood0) cx = 5'd14;
    else            cx = 5'd15;
    d = mag;
  end

endmodule
