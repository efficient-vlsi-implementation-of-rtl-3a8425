// chi_reg: 12-bit sign shift register of the bit plane coder.
//
// Holds the signs of three stripe columns without the zero separators that
// sigma_reg needs: a sign only matters when the matching sigma bit is set, and
// sigma_reg already forces the out-of-stripe neighbours to zero. Bit 11 is the
// leftmost position; the coded sign X is bit 7, and SH0 = 11, SV0 = 8,
// SV1 = 6, SH1 = 3. A column is read into bits 3..0 (memory bit 3 = top row).
// One 1-bit shift per coded or skipped bit, a 4-bit shift (ishift) for
// initialisation and for columns skipped by run length coding. Because there
// are no separators, no extra shift is needed at the end of a column.
// Priority clr > ishift > shift > load.
//
// Follows the published architecture: the width (12), the tap positions and
// the four-bit initial shift.
module chi_reg (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        load,
  input  logic [3:0]  ldata,
  input  logic        shift,
  input  logic        ishift,
  output logic [11:0] q,
  output logic        sh0, sv0, x, sv1, sh1
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      q <= '0;
    else if (clr)    q <= '0;
    else if (ishift) q <= {q[7:0], 4'b0};
    else if (shift)  q <= {q[10:0], 1'b0};
    else if (load)   q <= {q[11:4], ldata};

  assign sh0 = q[11];
  assign sv0 = q[8];
  assign x   = q[7];
  assign sv1 = q[6];
  assign sh1 = q[3];

endmodule
