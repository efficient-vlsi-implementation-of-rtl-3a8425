// subband_mem: code block memory between the wavelet transform and a bit
// plane coder.
//
// Holds one code block of sign-magnitude coefficients ({sign, MAG_W-bit
// magnitude}), organised as N*STRIPES words of one stripe column each, i.e.
// four vertically adjacent coefficients; word address = stripe * N + column.
// The write port stores a single coefficient (word address plus row 0..3), as
// the transform produces them one at a time. The read port returns a whole
// stripe column combinationally, which is what the bit plane coder needs to
// fill its magnitude and sign memories at one column per cycle.
//
// Follows the published architecture: a subband memory between DWT and coder.
// Own choice: its organisation.
module subband_mem #(
  parameter int unsigned N       = 64,
  parameter int unsigned STRIPES = 16,
  parameter int unsigned MAG_W   = 15,
  localparam int unsigned AW     = $clog2(N * STRIPES)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [1:0]       wrow,
  input  logic [MAG_W:0]   wdata,
  input  logic [AW-1:0]    raddr,
  output logic [MAG_W:0]   rdata [4]
);

  logic [MAG_W:0] mem0 [N*STRIPES];
  logic [MAG_W:0] mem1 [N*STRIPES];
  logic [MAG_W:0] mem2 [N*STRIPES];
  logic [MAG_W:0] mem3 [N*STRIPES];

  always_ff @(posedge clk) begin
    if (we && wrow == 2'd0) mem0[waddr] <= wdata;
    if (we && wrow == 2'd1) mem1[waddr] <= wdata;
    if (we && wrow == 2'd2) mem2[waddr] <= wdata;
    if (we && wrow == 2'd3) mem3[waddr] <= wdata;
  end

  assign rdata[0] = mem0[raddr];
  assign rdata[1] = mem1[raddr];
  assign rdata[2] = mem2[raddr];
  assign rdata[3] = mem3[raddr];

endmodule
