// bpc_counter: position and progress counter of the bit plane coder.
//
// Keeps track of the element (row 0..3) within the stripe column being coded,
// the column (0..N-1), the pass, the bit plane, and the stripe of the code
// block. All updates are synchronous strobes from the controller:
//   init_block : stripe 0, then as init_stripe
//   init_stripe: first pass is clean up on plane num_planes-1
//   count_up   : next element          row_clr: element 0
//   col_up     : next column, element 0
//   col_clr    : column 0, element 0
//   next_pass  : SP -> MRP -> CP -> SP of the next lower plane
//   next_stripe: next stripe of the code block, then as init_stripe
// first_plane is high while the most significant coded plane is processed.
// The block size is set at run time (cols_m1, stripes_m1) up to N x STRIPES.
//
// Follows the published architecture: a counter for position, pass and plane.
// Own choices: the exact counter set, the runtime block size and the stripe
// counter.
module bpc_counter
  import bpc_pkg::*;
#(
  parameter int unsigned N       = 64,  // columns of the code block
  parameter int unsigned STRIPES = 16,  // stripes of four rows
  parameter int unsigned PLANE_W = 4    // width of a bit plane index
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [PLANE_W:0]            num_planes,
  input  logic [$clog2(N)-1:0]        cols_m1,     // columns of this block - 1
  input  logic [$clog2(STRIPES+1)-1:0] stripes_m1, // stripes of this block - 1
  input  logic                        init_block,
  input  logic                        init_stripe,
  input  logic                        count_up,
  input  logic                        row_clr,
  input  logic                        col_up,
  input  logic                        col_clr,
  input  logic                        next_pass,
  input  logic                        next_stripe,
  output logic [1:0]                  row,
  output logic [$clog2(N)-1:0]        col,
  output pass_t                       pass,
  output logic [PLANE_W-1:0]          bp,
  output logic [$clog2(STRIPES+1)-1:0]  stripe,
  output logic                        first_plane,
  output logic                        last_row,
  output logic                        last_col,
  output logic                        last_bp,
  output logic                        last_stripe
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row         <= '0;
      col         <= '0;
      pass        <= PASS_CP;
      bp          <= '0;
      stripe      <= '0;
      first_plane <= 1'b0;
    end else begin
      if (init_block || init_stripe || next_stripe) begin
        row         <= '0;
        col         <= '0;
        pass        <= PASS_CP;
        bp          <= PLANE_W'(num_planes - 1'b1);
        first_plane <= 1'b1;
        if (init_block)       stripe <= '0;
        else if (next_stripe) stripe <= stripe + 1'b1;
      end else begin
        if (col_clr) begin
          col <= '0;
          row <= '0;
        end else if (col_up) begin
          col <= col + 1'b1;
          row <= '0;
        end else if (row_clr) begin
          row <= '0;
        end else if (count_up) begin
          row <= row + 1'b1;
        end
        if (next_pass) begin
          unique case (pass)
            PASS_SP:  pass <= PASS_MRP;
            PASS_MRP: pass <= PASS_CP;
            default: begin
              pass        <= PASS_SP;
              bp          <= bp - 1'b1;
              first_plane <= 1'b0;
            end
          endcase
        end
      end
    end
  end

  assign last_row    = (row == 2'd3);
  assign last_col    = (col == cols_m1);
  assign last_bp     = (bp == '0);
  assign last_stripe = (stripe == stripes_m1);

endmodule
