// bpc: EBCOT bit plane coder (encoder side).
//
// Codes one code block of up to 4*STRIPES rows by N columns (the size of
// each block is given at start by cols_m1 and stripes_m1) held in a subband
// memory as sign-magnitude coefficients, and emits the context/data pairs
// that the arithmetic coder consumes. The block is coded stripe by stripe;
// rows outside the current stripe and columns outside the block count as
// insignificant, so the stripes are independent (vertically causal coding
// carried to both stripe edges). For each stripe the most significant of
// num_planes planes is coded with the clean up pass only, every lower plane
// with the significance, refinement and clean up passes.
//
// Structure: five N x 4 state memories (sigma, eta, sigma', v, chi), five
// shift registers that hold the state bits around the coded position, three
// context blocks (ZC, SC, MR), hard-wired run length contexts, the
// context/data mux, a counter and the 24-state controller bpc_ctrl.
// At the start of each plane the v memory is filled from the subband memory
// (one column per cycle); on the first plane of a stripe the chi memory is
// filled and the sigma, eta and sigma' memories are cleared in the same
// cycles. The register files are read and written once per column.
//
// Interface: pulse start with subband, num_planes and the size stable; busy stays high
// until done pulses. Each pair is presented on cx/d with valid high and held
// until ack is high in the same cycle. sb_raddr addresses one stripe column
// (four coefficients, sb_rdata[0] the top row) of the subband memory; the
// read is expected to be combinational.
//
// Follows the published architecture: the five N x 4 memories, the register
// widths and the per-column read/write scheme. Own choices: coding each
// stripe through all planes with out-of-stripe neighbours at zero, reading
// sigma/chi one column ahead, and clearing the state memories during the
// first fill.
module bpc
  import bpc_pkg::*;
#(
  parameter int unsigned N       = 64,  // columns of the code block
  parameter int unsigned STRIPES = 16,  // stripes of four rows
  parameter int unsigned MAG_W   = 15,  // magnitude bits of a coefficient
  parameter int unsigned PLANE_W = 4,   // width of a bit plane index
  localparam int unsigned AW     = $clog2(N * STRIPES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  subband_t           subband,
  input  logic [PLANE_W:0]   num_planes,
  input  logic [$clog2(N)-1:0]          cols_m1,     // block width - 1
  input  logic [$clog2(STRIPES+1)-1:0]  stripes_m1,  // block height / 4 - 1
  // subband memory read port
  output logic [AW-1:0]      sb_raddr,
  input  logic [MAG_W:0]     sb_rdata [4],   // {sign, magnitude} per row
  // context/data output
  output logic [4:0]         cx,
  output logic               d,
  output logic               valid,
  input  logic               ack,
  output logic               busy,
  output logic               done,
  output bpc_state_t         state_o        // controller state, for observation
);

  localparam int unsigned CW = $clog2(N);

  // controller strobes
  logic reg_clr;
  logic sig_load, sig_shift, sig_upd, sig_ishift;
  logic eta_load, eta_shift, eta_upd;
  logic sgp_load, sgp_shift, sgp_upd;
  logic chi_load, chi_shift, chi_ishift;
  logic v_load, v_shift;
  logic fill, rd_first, rd_col, wr_sig, wr_eta, wr_sgp;
  logic init_block, init_stripe, count_up, row_clr, col_up, col_clr, next_pass, next_stripe;
  cntrl_cx_t  cntrl_cx;
  bpc_state_t state;

  // counter
  logic [1:0]                       row;
  logic [CW-1:0]                    col;
  pass_t                            pass;
  logic [PLANE_W-1:0]               bp;
  logic [$clog2(STRIPES+1)-1:0]     stripe;
  logic first_plane, last_row, last_col, last_bp, last_stripe;

  // registers
  logic [14:0] sig_q;
  logic [7:0]  eta_q, sgp_q;
  logic [11:0] chi_q;
  logic [3:0]  v_q;
  logic [3:0]  sig_wd, eta_wd, sgp_wd;
  logic n_h0, n_h1, n_v0, n_v1, n_d0, n_d1, n_d2, n_d3;
  logic sig_x, sig_hood0, nxt_sig_x, nxt_hood0, nxt_rlc_c;
  logic eta_x, nxt_eta_x, sgp_x, nxt_sgp_x;
  logic chi_sh0, chi_sv0, chi_x, chi_sv1, chi_sh1;
  logic v_x, nxt_all0s;
  logic [1:0] zi;

  // memories
  logic [CW-1:0] rd_next_addr, rd_cur_addr;
  logic [3:0] sig_rd, eta_rd, sgp_rd, v_rd, chi_rd;
  logic [3:0] sig_ld, chi_ld;
  logic [3:0] v_fill, chi_fill;

  // contexts
  logic [4:0] zc_cx, sc_cx, mr_cx;
  logic       zc_d, sc_d, mr_d;

  bpc_ctrl u_ctrl (
    .clk, .rst_n, .start,
    .num_planes_zero (num_planes == '0),
    .ack,
    .pass, .first_plane, .last_row, .last_col, .last_bp, .last_stripe,
    .nxt_sig_x, .nxt_hood0, .nxt_rlc_c, .nxt_eta_x, .nxt_all0s,
    .v_x, .zi,
    .reg_clr,
    .sig_load, .sig_shift, .sig_upd, .sig_ishift,
    .eta_load, .eta_shift, .eta_upd,
    .sgp_load, .sgp_shift, .sgp_upd,
    .chi_load, .chi_shift, .chi_ishift,
    .v_load, .v_shift,
    .fill, .rd_first, .rd_col, .wr_sig, .wr_eta, .wr_sgp,
    .init_block, .init_stripe, .count_up, .row_clr, .col_up, .col_clr,
    .next_pass, .next_stripe,
    .cntrl_cx, .busy, .done, .state
  );

  assign init_stripe = 1'b0;
  assign state_o     = state;

  bpc_counter #(.N(N), .STRIPES(STRIPES), .PLANE_W(PLANE_W)) u_cnt (
    .clk, .rst_n, .num_planes, .cols_m1, .stripes_m1,
    .init_block, .init_stripe, .count_up, .row_clr, .col_up, .col_clr,
    .next_pass, .next_stripe,
    .row, .col, .pass, .bp, .stripe,
    .first_plane, .last_row, .last_col, .last_bp, .last_stripe
  );

  // ---------------------------------------------------------------- memories
  assign rd_next_addr = rd_first ? '0 : CW'(col + 1'b1);
  assign rd_cur_addr  = col;
  assign sb_raddr     = AW'(stripe * N + col);

  // one bit plane of the magnitudes and the signs of a stripe column
  always_comb begin
    for (int r = 0; r < 4; r++) begin
      v_fill[3-r]   = sb_rdata[r][bp];
      chi_fill[3-r] = sb_rdata[r][MAG_W];
    end
  end

  state_mem #(.DEPTH(N)) u_sig_mem (
    .clk, .we(wr_sig | (fill & first_plane)), .waddr(col),
    .wdata(fill ? 4'b0 : sig_wd), .raddr(rd_next_addr), .rdata(sig_rd));
  state_mem #(.DEPTH(N)) u_eta_mem (
    .clk, .we(wr_eta | (fill & first_plane)), .waddr(col),
    .wdata(fill ? 4'b0 : eta_wd), .raddr(rd_cur_addr), .rdata(eta_rd));
  state_mem #(.DEPTH(N)) u_sgp_mem (
    .clk, .we(wr_sgp | (fill & first_plane)), .waddr(col),
    .wdata(fill ? 4'b0 : sgp_wd), .raddr(rd_cur_addr), .rdata(sgp_rd));
  state_mem #(.DEPTH(N)) u_v_mem (
    .clk, .we(fill), .waddr(col), .wdata(v_fill),
    .raddr(rd_cur_addr), .rdata(v_rd));
  state_mem #(.DEPTH(N)) u_chi_mem (
    .clk, .we(fill & first_plane), .waddr(col), .wdata(chi_fill),
    .raddr(rd_next_addr), .rdata(chi_rd));

  // no column beyond the right edge of the block: load zeros instead
  assign sig_ld = (rd_col && last_col) ? 4'b0 : sig_rd;
  assign chi_ld = (rd_col && last_col) ? 4'b0 : chi_rd;

  // --------------------------------------------------------------- registers
  sigma_reg u_sig (
    .clk, .rst_n, .clr(reg_clr), .load(sig_load), .ldata(sig_ld),
    .shift(sig_shift), .upd(sig_upd), .ishift(sig_ishift),
    .q(sig_q), .wdata(sig_wd),
    .h0(n_h0), .h1(n_h1), .v0(n_v0), .v1(n_v1),
    .d0(n_d0), .d1(n_d1), .d2(n_d2), .d3(n_d3),
    .cur_x(sig_x), .cur_hood0(sig_hood0),
    .nxt_x(nxt_sig_x), .nxt_hood0, .nxt_rlc_c);

  eta_reg u_eta (
    .clk, .rst_n, .clr(reg_clr), .load(eta_load), .ldata(eta_rd),
    .shift(eta_shift), .upd(eta_upd), .q(eta_q), .wdata(eta_wd),
    .cur_x(eta_x), .nxt_x(nxt_eta_x));

  eta_reg u_sgp (
    .clk, .rst_n, .clr(reg_clr), .load(sgp_load), .ldata(sgp_rd),
    .shift(sgp_shift), .upd(sgp_upd), .q(sgp_q), .wdata(sgp_wd),
    .cur_x(sgp_x), .nxt_x(nxt_sgp_x));

  chi_reg u_chi (
    .clk, .rst_n, .clr(reg_clr), .load(chi_load), .ldata(chi_ld),
    .shift(chi_shift), .ishift(chi_ishift), .q(chi_q),
    .sh0(chi_sh0), .sv0(chi_sv0), .x(chi_x), .sv1(chi_sv1), .sh1(chi_sh1));

  v_reg u_v (
    .clk, .rst_n, .load(v_load), .ldata(v_rd), .shift(v_shift),
    .q(v_q), .x(v_x), .nxt_all0s, .zi);

  // ---------------------------------------------------------------- contexts
  zc_ctx u_zc (
    .subband, .h0(n_h0), .h1(n_h1), .v0(n_v0), .v1(n_v1),
    .d0(n_d0), .d1(n_d1), .d2(n_d2), .d3(n_d3), .mag(v_x),
    .cx(zc_cx), .d(zc_d));

  sc_ctx u_sc (
    .sig_h0(n_h0), .sig_h1(n_h1), .sig_v0(n_v0), .sig_v1(n_v1),
    .chi_h0(chi_sh0), .chi_h1(chi_sh1), .chi_v0(chi_sv0), .chi_v1(chi_sv1),
    .chi(chi_x), .cx(sc_cx), .d(sc_d));

  mrc_ctx u_mr (
    .sigp(sgp_x), .hood0(sig_hood0), .mag(v_x), .cx(mr_cx), .d(mr_d));

  cxd_mux u_mux (
    .cntrl_cx, .zc_cx, .zc_d, .sc_cx, .sc_d, .mr_cx, .mr_d, .zi,
    .cx, .d, .valid);

endmodule
