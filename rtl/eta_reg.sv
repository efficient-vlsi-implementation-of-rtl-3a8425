// eta_reg: 8-bit shift register for the eta (coded in this bit plane) or the
// sigma' (refined at least once) state bits.
//
// Bit 7 is the leftmost position. A column is read from memory into bits 3..0
// (memory bit 3 = top row); the bit being coded is bit 3. Each coded or
// skipped bit shifts the register left by one; with upd the bit moving into
// bit 4 is set, which records the new state of the position just coded.
// After the four shifts of a column, bits 7..4 hold the updated column, which
// is what is written back. No neighbour of the state bit is ever needed, so
// the register needs no boundary handling. Priority clr > shift > load.
//
// Follows the published architecture: the width (8), the coded position and
// the update position.
module eta_reg (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       load,
  input  logic [3:0] ldata,
  input  logic       shift,
  input  logic       upd,
  output logic [7:0] q,
  output logic [3:0] wdata,
  output logic       cur_x,
  output logic       nxt_x
);

  logic [7:0] nxt;

  always_comb begin
    nxt = q;
    if (clr) nxt = '0;
    else if (shift) begin
      nxt    = {q[6:0], 1'b0};
      nxt[4] = q[3] | upd;
    end
    else if (load) nxt = {q[7:4], ldata};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= nxt;

  assign wdata = q[7:4];
  assign cur_x = q[3];
  assign nxt_x = nxt[3];

endmodule
