// tb_jpeg2000_full: end-to-end test of the tile encoder with every parameter
// at its default (128 x 128 tile, 5 levels, 64 x 64 code blocks, 16-entry
// CXD buffers). See tb_top_body.svh.
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_jpeg2000_full;
  import bpc_pkg::*;

  localparam int T = 128, LEVELS = 5, N = 64, STRIPES = 16, MAG_W = 15, PLANE_W = 4, W = 16;
  localparam int TAW = $clog2(T*T);
  localparam int LW  = $clog2(LEVELS+1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pix_we, start, busy, done, ll_phase;
  logic dec_start, dec_bin_valid, dec_bin_ready, dec_wr_en, dec_busy, dec_done;
  subband_t dec_subband;
  logic [PLANE_W:0] dec_num_planes;
  logic [$clog2(N)-1:0] dec_cols_m1;
  logic [$clog2(STRIPES+1)-1:0] dec_stripes_m1;
  logic [7:0] dec_bin_byte;
  logic [$clog2(N*STRIPES)-1:0] dec_wr_addr;
  logic [1:0] dec_wr_row;
  logic [MAG_W:0] dec_wr_data;
  logic [TAW-1:0] pix_addr;
  logic signed [W-1:0] pix_data;
  logic [2:0] code_valid, blk_end;
  logic [7:0] code_byte [3];
  logic [PLANE_W:0] blk_planes [3];
  logic [LW-1:0] level;

  jpeg2000_top dut (
    .clk, .rst_n, .pix_we, .pix_addr, .pix_data, .start, .busy, .done,
    .code_valid, .code_byte, .blk_end, .blk_planes, .level, .ll_phase,
    .dec_start, .dec_subband, .dec_num_planes, .dec_cols_m1, .dec_stripes_m1,
    .dec_bin_valid, .dec_bin_byte, .dec_bin_ready, .dec_wr_en, .dec_wr_addr, .dec_wr_row,
    .dec_wr_data, .dec_busy, .dec_done);

  `include "tb_top_body.svh"

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
