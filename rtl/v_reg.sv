// v_reg: 4-bit magnitude shift register of the bit plane coder.
//
// Loaded with the magnitude bits of the current column (bit 3 = top row, the
// first bit coded) and shifted left once per coded or skipped bit, so bit 3
// is always the magnitude of the bit being coded. A zero detector gives all0s
// (no '1' in the column), evaluated on the value the register takes at the
// next edge so that the controller can branch in the cycle of the load, and a
// 4-to-2 priority encoder gives the zero index zi of the first '1' (top row
// 00 ... bottom row 11) for run length coding.
//
// Follows the published architecture: the 4-bit register, the All0s detector
// and the zero-index encoder (first position 00, fourth 11).
module v_reg (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [3:0] ldata,
  input  logic       shift,
  output logic [3:0] q,
  output logic       x,
  output logic       nxt_all0s,
  output logic [1:0] zi
);

  logic [3:0] nxt;

  always_comb begin
    nxt = q;
    if (shift)     nxt = {q[2:0], 1'b0};
    else if (load) nxt = ldata;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= nxt;

  always_comb begin
    if (q[3])      zi = 2'd0;
    else if (q[2]) zi = 2'd1;
    else if (q[1]) zi = 2'd2;
    else           zi = 2'd3;
  end

  assign x         = q[3];
  assign nxt_all0s = (nxt == 4'b0);

endmodule
