// cxd_mux: context and data multiplexer of the bit plane coder.
//
// Selects the context/data pair sent to the arithmetic coder with the 3-bit
// word cntrl_cx:
//   000 nothing      001 ZC context, magnitude   010 SC context, sign data
//   011 MR context, magnitude   100 context 17, 0   101 context 17, 1
//   110 context 18, zero index MSB   111 context 18, zero index LSB
// valid is high for every word except 000. Purely combinational.
//
// Follows the published architecture: the select encoding and the sources.
// Own choice: select 000 means no output.
module cxd_mux
  import bpc_pkg::*;
(
  input  cntrl_cx_t  cntrl_cx,
  input  logic [4:0] zc_cx,
  input  logic       zc_d,
  input  logic [4:0] sc_cx,
  input  logic       sc_d,
  input  logic [4:0] mr_cx,
  input  logic       mr_d,
  input  logic [1:0] zi,
  output logic [4:0] cx,
  output logic       d,
  output logic       valid
);

  always_comb begin
    valid = 1'b1;
    unique case (cntrl_cx)
      CX_ZC:    begin cx = zc_cx;   d = zc_d;  end
      CX_SC:    begin cx = sc_cx;   d = sc_d;  end
      CX_MR:    begin cx = mr_cx;   d = mr_d;  end
      CX_RL0:   begin cx = CTX_RL;  d = 1'b0;  end
      CX_RL1:   begin cx = CTX_RL;  d = 1'b1;  end
      CX_ZIMSB: begin cx = CTX_UNI; d = zi[1]; end
      CX_ZILSB: begin cx = CTX_UNI; d = zi[0]; end
      default:  begin cx = 5'd0;    d = 1'b0;  valid = 1'b0; end
    endcase
  end

endmodule
