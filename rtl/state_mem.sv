// state_mem: N x 4 memory with one read port and one write port.
//
// One word per stripe column, bit 3 = top row. The bit plane coder uses five
// of them: sigma, eta, sigma' (written back by their registers), v (the
// magnitude bits of the current bit plane) and chi (signs). The read port is
// asynchronous (register-file style), so a column is available in the cycle
// its address is presented; the write port is synchronous.
//
// Follows the published architecture: N x 4 memories. Own choice:
// asynchronous read.
module state_mem #(
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [3:0]               wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [3:0]               rdata
);

  logic [3:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
