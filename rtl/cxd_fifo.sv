// cxd_fifo: context/data (CXD) buffer between a bit plane coder and its MQ
// coder.
//
// A synchronous first-in first-out queue of DEPTH entries of W bits (a 5-bit
// context and its data bit by default). The writer sees in_ready (not full)
// and the reader out_valid (not empty); a word moves when valid and ready are
// both high. The buffer lets the bit plane coder run ahead of the arithmetic
// coder, whose renormalisation and byte output take extra cycles, and stalls
// it through in_ready when the arithmetic coder falls behind. Read data is
// taken from the head entry combinationally. DEPTH must be a power of two.
//
// Follows the published architecture: a context/data buffer between coder and
// arithmetic coder. Own choices: the depth and the valid/ready protocol.
module cxd_fifo #(
  parameter int unsigned W     = 6,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       in_valid,
  input  logic [W-1:0]               in_data,
  output logic                       in_ready,
  output logic                       out_valid,
  output logic [W-1:0]               out_data,
  input  logic                       out_ready,
  output logic [$clog2(DEPTH):0]     count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          push, pop;

  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk)
    if (push) mem[wp] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else if (clr) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));

endmodule
