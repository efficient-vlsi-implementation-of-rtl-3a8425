// sigma_reg: 15-bit significance shift register of the bit plane coder.
//
// Holds the sigma bits of three adjacent stripe columns (previous, current,
// next), each preceded by a zero, so that bit 14 is the leftmost position:
//   bit 14    13..10     9     8..5      4     3..0
//    0      col c-1      0    col c      0    col c+1
// The bit being coded X sits at bit 8; its neighbours are D0=14, H0=13, D3=12,
// V0=9, V1=7, D1=4, H1=3, D2=2. The zeros stand for the rows above and below
// the stripe, which are treated as insignificant. A column is read from
// memory into bits 3..0 (memory bit 3 = top row) and written back from bits
// 13..10. Operations (one per cycle, priority clr > ishift > shift > load):
//   clr    : all zero
//   load   : bits 3..0 <= ldata
//   shift  : 1-bit left shift; with upd the bit moving into position 9 (the
//            coded bit after the shift) is set, which records a new
//            significance
//   ishift : 5-bit left shift (initialisation and skipped columns)
// One extra 1-bit shift at the end of each column re-aligns the zero
// separators. Two zero detectors give hood0 (all 8 neighbours of X clear) and
// rlc_c (the whole register clear). They are provided both on the present
// contents (cur_*) and on the value the register takes at the next edge
// (nxt_*), which the controller uses to choose the next state in the same
// cycle as the operation.
//
// Follows the published architecture: the width (15), the zero separators,
// the coded and update positions and the five-bit initial shift. Own choice:
// the next-cycle outputs.
module sigma_reg (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        load,
  input  logic [3:0]  ldata,
  input  logic        shift,
  input  logic        upd,
  input  logic        ishift,
  output logic [14:0] q,
  output logic [3:0]  wdata,      // column to write back (bit 3 = top row)
  // neighbourhood of X on the present contents
  output logic        h0, h1, v0, v1, d0, d1, d2, d3,
  output logic        cur_x,
  output logic        cur_hood0,
  // flags on the next contents
  output logic        nxt_x,
  output logic        nxt_hood0,
  output logic        nxt_rlc_c
);

  logic [14:0] nxt;

  always_comb begin
    nxt = q;
    if (clr)         nxt = '0;
    else if (ishift) nxt = {q[9:0], 5'b0};
    else if (shift) begin
      nxt    = {q[13:0], 1'b0};
      nxt[9] = q[8] | upd;
    end
    else if (load)   nxt = {q[14:4], ldata};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= nxt;

  function automatic logic hood_zero(input logic [14:0] r);
    return ~(r[14] | r[13] | r[12] | r[9] | r[7] | r[4] | r[3] | r[2]);
  endfunction

  assign wdata     = q[13:10];
  assign d0        = q[14];
  assign h0        = q[13];
  assign d3        = q[12];
  assign v0        = q[9];
  assign cur_x     = q[8];
  assign v1        = q[7];
  assign d1        = q[4];
  assign h1        = q[3];
  assign d2        = q[2];
  assign cur_hood0 = hood_zero(q);
  assign nxt_x     = nxt[8];
  assign nxt_hood0 = hood_zero(nxt);
  assign nxt_rlc_c = (nxt == '0);

endmodule
