// zc_ctx: zero coding context block.
//
// Maps the significance bits of the 8 neighbours of the bit being coded to one
// of the zero coding contexts 0-8 and pairs it with the magnitude bit as data.
// For LL and LH code blocks it is the sum-of-products form: horizontal,
// vertical and diagonal counts are classified as none / exactly one / two or
// more (hc0, hc1, hc2, vc0, vc1, vc2, dc0, dc1, dc22), and the 5-bit context
// word is ORed together from the one-hot terms cx1..cx8. HL code blocks use
// the same logic with horizontal and vertical neighbours exchanged, and HH
// code blocks use the diagonal-first table of the JPEG2000 standard; these two
// tables are this design's addition, taken from the standard because the coder
// serves HL, LH and HH subbands. Purely combinational.
module zc_ctx
  import bpc_pkg::*;
(
  input  subband_t   subband,
  input  logic       h0, h1,          // horizontal neighbours
  input  logic       v0, v1,          // vertical neighbours
  input  logic       d0, d1, d2, d3,  // diagonal neighbours
  input  logic       mag,             // magnitude bit of the coded position
  output logic [4:0] cx,
  output logic       d
);

  logic a0, a1;   // the pair used as "horizontal" by the LL/LH equations
  logic b0, b1;   // the pair used as "vertical"
  logic hc11, hc2, hc0, hc1, vc11, vc2, vc0, vc1;
  logic dc11, dc22, dc0, dc1;
  logic cx1, cx2, cx3, cx4, cx5, cx6, cx7, cx8;
  logic [4:0] cx_lh, cx_hh;
  logic [2:0] nd, nhv;

  always_comb begin
    // HL: exchange the roles of horizontal and vertical neighbours
    if (subband == SB_HL) begin
      a0 = v0; a1 = v1; b0 = h0; b1 = h1;
    end else begin
      a0 = h0; a1 = h1; b0 = v0; b1 = v1;
    end

    hc11 = a0 | a1;
    hc2  = a0 & a1;
    vc11 = b0 | b1;
    vc2  = b0 & b1;
    dc11 = d0 | d1 | d2 | d3;
    dc22 = (d0 & (d1 | d2 | d3)) | (d1 & (d2 | d3)) | (d2 & d3);
    hc0  = ~hc11;
    hc1  = ~hc2 & hc11;
    vc0  = ~vc11;
    vc1  = ~vc2 & vc11;
    dc0  = ~dc11;
    dc1  = dc11 & ~dc22;   // exactly one diagonal neighbour

    cx8 = hc2;
    cx7 = hc1 & vc11;
    cx6 = hc1 & vc0 & dc11;
    cx5 = hc1 & vc0 & dc0;
    cx4 = hc0 & vc2;
    cx3 = hc0 & vc1;
    cx2 = hc0 & vc0 & dc22;
    cx1 = hc0 & vc0 & dc1;

    cx_lh[4] = 1'b0;
    cx_lh[3] = cx8;
    cx_lh[2] = cx7 | cx6 | cx5 | cx4;
    cx_lh[1] = cx7 | cx6 | cx3 | cx2;
    cx_lh[0] = cx7 | cx5 | cx3 | cx1;

    // HH: diagonal count first, then horizontal plus vertical count
    nd  = 3'(d0) + 3'(d1) + 3'(d2) + 3'(d3);
    nhv = 3'(h0) + 3'(h1) + 3'(v0) + 3'(v1);
    if (nd >= 3'd3)                     cx_hh = 5'd8;
    else if (nd == 3'd2)                cx_hh = (nhv != 3'd0) ? 5'd7 : 5'd6;
    else if (nd == 3'd1)                cx_hh = (nhv >= 3'd2) ? 5'd5 :
                                                (nhv == 3'd1) ? 5'd4 : 5'd3;
    else                                cx_hh = (nhv >= 3'd2) ? 5'd2 :
                                                (nhv == 3'd1) ? 5'd1 : 5'd0;

    cx = (subband == SB_HH) ? cx_hh : cx_lh;
    d  = mag;
  end

endmodule
