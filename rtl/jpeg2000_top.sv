// jpeg2000_top: tile encoder with three parallel entropy coding lanes.
//
// An image tile is loaded into the wavelet transform's tile memory and
// decomposed level by level. After each level the HL, LH and HH bands are
// copied into three subband memories and entropy coded in parallel by three
// lanes, each a bit plane coder (context modelling) feeding an MQ arithmetic
// coder through a CXD buffer. The LL band left after the last level is coded
// on the HL lane. A global controller sequences the steps.
//
//   tile port -> dwt53 -> global_ctrl copy -> subband_mem x3 -> bpc x3
//             -> cxd_fifo x3 -> mq_encoder x3 -> code bytes x3
//
// Interface: write the tile (signed samples, address row * T + column)
// through pix_we/pix_addr/pix_data while idle, then pulse start. Each lane k
// delivers its code bytes on code_valid[k]/code_byte[k] (no back-pressure);
// blk_end[k] pulses after the last byte of a code block, with blk_planes[k]
// (number of coded bit planes), level and ll_phase telling which block it
// was. The dec_* ports reach a decoding lane (bpc_dec fed by mq_decoder)
// that stands beside the encoder: pulse dec_start with the block's subband,
// plane count and size, supply its bytes on dec_bin_*, and the coefficients
// come out on dec_wr_* (see bpc_dec). Lane 0 codes HL (and LL at the end), lane 1 LH, lane 2 HH. done pulses
// when the whole tile is coded. Code block size at level l is h x h,
// h = T >> (l + 1), which must not exceed N columns and 4 * STRIPES rows.
//
// Follows the published architecture: the block structure (DWT, three subband
// memories, coders, buffers and arithmetic coders under a global controller).
// Own choices: the tile size, the level count, the code block size, the
// buffer depth and the byte output without back-pressure.
module jpeg2000_top
  import bpc_pkg::*;
#(
  parameter int unsigned T          = 128,  // tile size
  parameter int unsigned LEVELS     = 5,    // decomposition levels
  parameter int unsigned N          = 64,   // code block columns
  parameter int unsigned STRIPES    = 16,   // code block stripes (4 rows each)
  parameter int unsigned MAG_W      = 15,   // coefficient magnitude bits
  parameter int unsigned PLANE_W    = 4,
  parameter int unsigned W          = 16,   // internal sample precision
  parameter int unsigned FIFO_DEPTH = 16,   // CXD buffer entries
  localparam int unsigned TAW       = $clog2(T * T),
  localparam int unsigned LW        = $clog2(LEVELS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pix_we,
  input  logic [TAW-1:0]      pix_addr,
  input  logic signed [W-1:0] pix_data,
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic [2:0]          code_valid,
  output logic [7:0]          code_byte [3],
  output logic [2:0]          blk_end,
  output logic [PLANE_W:0]    blk_planes [3],
  output logic [LW-1:0]       level,
  output logic                ll_phase,
  // decoding lane (bit plane decoder + MQ decoder), on its own ports
  input  logic                dec_start,
  input  subband_t            dec_subband,
  input  logic [PLANE_W:0]    dec_num_planes,
  input  logic [$clog2(N)-1:0] dec_cols_m1,
  input  logic [$clog2(STRIPES+1)-1:0] dec_stripes_m1,
  input  logic                dec_bin_valid,
  input  logic [7:0]          dec_bin_byte,
  output logic                dec_bin_ready,
  output logic                dec_wr_en,
  output logic [$clog2(N*STRIPES)-1:0] dec_wr_addr,
  output logic [1:0]          dec_wr_row,
  output logic [MAG_W:0]      dec_wr_data,
  output logic                dec_busy,
  output logic                dec_done
);

  localparam int unsigned SAW = $clog2(N * STRIPES);

  initial begin
    assert ((T >> 1) <= N && (T >> 1) <= 4 * STRIPES && (T >> LEVELS) >= 4)
      else $error("tile size does not match the code block size");
  end

  // transform
  logic                dwt_start, dwt_done, dwt_busy;
  logic [LW-1:0]       dwt_level;
  logic [TAW-1:0]      dwt_rd_addr;
  logic signed [W-1:0] dwt_rd_data;

  // subband memory writes
  logic [2:0]          sb_we;
  logic [SAW-1:0]      sb_waddr;
  logic [1:0]          sb_wrow;
  logic [MAG_W:0]      sb_wdata;

  // lane control
  logic [2:0]                   bpc_start, bpc_done, bpc_busy;
  subband_t                     bpc_subband [3];
  logic [$clog2(N)-1:0]         cols_m1;
  logic [$clog2(STRIPES+1)-1:0] stripes_m1;
  logic [2:0]                   fifo_empty, mq_busy, mq_init, mq_flush, mq_flush_done;

  dwt53 #(.T(T), .LEVELS(LEVELS), .W(W)) u_dwt (
    .clk, .rst_n, .pix_we, .pix_addr, .pix_data,
    .start(dwt_start), .level(dwt_level), .busy(dwt_busy), .done(dwt_done),
    .rd_addr(dwt_rd_addr), .rd_data(dwt_rd_data));

  global_ctrl #(.T(T), .LEVELS(LEVELS), .N(N), .STRIPES(STRIPES), .MAG_W(MAG_W),
                .PLANE_W(PLANE_W), .W(W)) u_gctrl (
    .clk, .rst_n, .start, .busy, .done,
    .dwt_start, .dwt_level, .dwt_done, .dwt_rd_addr, .dwt_rd_data,
    .sb_we, .sb_waddr, .sb_wrow, .sb_wdata,
    .bpc_start, .bpc_subband, .blk_planes, .cols_m1, .stripes_m1, .bpc_done,
    .fifo_empty, .mq_busy, .mq_init, .mq_flush, .mq_flush_done,
    .level, .ll_phase);

  for (genvar k = 0; k < 3; k++) begin : g_lane
    logic [SAW-1:0] sb_raddr;
    logic [MAG_W:0] sb_rdata [4];
    logic [4:0]     cx;
    logic           d, valid, ack;
    logic [5:0]     q_data;
    logic           q_valid, q_ready;
    logic [$clog2(FIFO_DEPTH):0] q_count;
    bpc_state_t     bpc_state;

    subband_mem #(.N(N), .STRIPES(STRIPES), .MAG_W(MAG_W)) u_sbmem (
      .clk, .we(sb_we[k]), .waddr(sb_waddr), .wrow(sb_wrow), .wdata(sb_wdata),
      .raddr(sb_raddr), .rdata(sb_rdata));

    bpc #(.N(N), .STRIPES(STRIPES), .MAG_W(MAG_W), .PLANE_W(PLANE_W)) u_bpc (
      .clk, .rst_n, .start(bpc_start[k]), .subband(bpc_subband[k]),
      .num_planes(blk_planes[k]), .cols_m1, .stripes_m1,
      .sb_raddr, .sb_rdata, .cx, .d, .valid, .ack,
      .busy(bpc_busy[k]), .done(bpc_done[k]), .state_o(bpc_state));

    cxd_fifo #(.W(6), .DEPTH(FIFO_DEPTH)) u_cxd (
      .clk, .rst_n, .clr(1'b0),
      .in_valid(valid), .in_data({cx, d}), .in_ready(ack),
      .out_valid(q_valid), .out_data(q_data), .out_ready(q_ready),
      .count(q_count));

    assign fifo_empty[k] = !q_valid;

    mq_encoder u_mq (
      .clk, .rst_n, .init(mq_init[k]),
      .in_valid(q_valid), .in_cx(q_data[5:1]), .in_d(q_data[0]), .in_ready(q_ready),
      .flush(mq_flush[k]), .out_valid(code_valid[k]), .out_byte(code_byte[k]),
      .flush_done(mq_flush_done[k]), .busy(mq_busy[k]));

    assign blk_end[k] = mq_flush_done[k];
  end

  // Decoding lane: the inverse of one coding lane. The bit plane decoder
  // holds its context in a register and waits for each decision of the MQ
  // decoder; it has no connection to the encoder lanes.
  logic       dl_cx_valid, dl_cx_ready, dl_d_valid, dl_d, dl_mq_busy, dl_bpc_busy;
  logic [4:0] dl_cx;

  mq_decoder u_mqdec (
    .clk, .rst_n, .init(dec_start),
    .bin_valid(dec_bin_valid), .bin_byte(dec_bin_byte), .bin_ready(dec_bin_ready),
    .in_valid(dl_cx_valid), .in_cx(dl_cx), .in_ready(dl_cx_ready),
    .out_valid(dl_d_valid), .out_d(dl_d), .busy(dl_mq_busy));

  bpc_dec #(.N(N), .STRIPES(STRIPES), .MAG_W(MAG_W), .PLANE_W(PLANE_W)) u_bpcdec (
    .clk, .rst_n, .start(dec_start), .subband(dec_subband), .num_planes(dec_num_planes),
    .cols_m1(dec_cols_m1), .stripes_m1(dec_stripes_m1),
    .cx_valid(dl_cx_valid), .cx(dl_cx), .cx_ready(dl_cx_ready), .d_valid(dl_d_valid), .d(dl_d),
    .wr_en(dec_wr_en), .wr_addr(dec_wr_addr), .wr_row(dec_wr_row), .wr_data(dec_wr_data),
    .busy(dl_bpc_busy), .done(dec_done));

  assign dec_busy = dl_bpc_busy;

endmodule
