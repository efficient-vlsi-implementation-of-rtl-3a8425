// sc_ctx: sign coding context block.
//
// Step one forms the horizontal and vertical contributions: each significant
// neighbour adds +1 if positive and -1 if negative, and the sum is clipped to
// -1..+1. Step two maps the pair of contributions to a context 9-13 and an
// "xor" bit; the data bit is the sign of the coded position XOR that bit. The
// two-step structure follows the coder's description; the contribution and
// context tables are those of the JPEG2000 standard. Purely combinational.
module sc_ctx (
  input  logic       sig_h0, sig_h1, sig_v0, sig_v1,  // neighbour significance
  input  logic       chi_h0, chi_h1, chi_v0, chi_v1,  // neighbour signs (1 = negative)
  input  logic       chi,                             // sign of the coded position
  output logic [4:0] cx,
  output logic       d
);

  // contribution: 2'b01 = +1, 2'b11 = -1, 2'b00 = 0
  function automatic logic [1:0] contrib(input logic s0, input logic c0,
                                         input logic s1, input logic c1);
    logic pos, neg;
    pos = (s0 & ~c0) | (s1 & ~c1);
    neg = (s0 &  c0) | (s1 &  c1);
    if (pos & ~neg)      return 2'b01;
    else if (neg & ~pos) return 2'b11;
    else                 return 2'b00;   // none, or one of each
  endfunction

  logic [1:0] hcon, vcon;
  logic       xbit;

  always_comb begin
    hcon = contrib(sig_h0, chi_h0, sig_h1, chi_h1);
    vcon = contrib(sig_v0, chi_v0, sig_v1, chi_v1);
    unique case ({hcon, vcon})
      4'b0101: begin cx = 5'd13; xbit = 1'b0; end  // H+1 V+1
      4'b0100: begin cx = 5'd12; xbit = 1'b0; end  // H+1 V 0
      4'b0111: begin cx = 5'd11; xbit = 1'b0; end  // H+1 V-1
      4'b0001: begin cx = 5'd10; xbit = 1'b0; end  // H 0 V+1
      4'b0000: begin cx = 5'd9;  xbit = 1'b0; end  // H 0 V 0
      4'b0011: begin cx = 5'd10; xbit = 1'b1; end  // H 0 V-1
      4'b1101: begin cx = 5'd11; xbit = 1'b1; end  // H-1 V+1
      4'b1100: begin cx = 5'd12; xbit = 1'b1; end  // H-1 V 0
      4'b1111: begin cx = 5'd13; xbit = 1'b1; end  // H-1 V-1
      default: begin cx = 5'd9;  xbit = 1'b0; end  // unreachable codes
    endcase
    d = chi ^ xbit;
  end

endmodule
