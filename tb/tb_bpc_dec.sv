// tb_bpc_dec: round trip through the bit plane decoder. Random code blocks
// (width 1..N, one or more stripes, 0..9 bit planes, sparse and dense
// magnitudes, random signs, all four subband types) are coded with the
// reference bit plane coder and MQ coder of j2k_ref_pkg. The bytes go
// through mq_decoder into bpc_dec. The test checks that each context the
// decoder asks for is the reference context of that position in the pair
// sequence, that exactly as many decisions are asked for as were coded, and
// that every coefficient written out (sign and magnitude) equals the
// original; a zero coefficient must come back with sign 0.
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_bpc_dec;
  import bpc_pkg::*;
  import j2k_ref_pkg::*;

  localparam int N = 16, S = 2, MAG_W = 15, PLANE_W = 4;
  localparam int AW = $clog2(N * S);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, init;
  subband_t subband;
  logic [PLANE_W:0] num_planes;
  logic [3:0] cols_m1;
  logic [1:0] stripes_m1;
  logic cx_valid, cx_ready, d_valid, d;
  logic [4:0] cx;
  logic wr_en;
  logic [AW-1:0] wr_addr;
  logic [1:0] wr_row;
  logic [MAG_W:0] wr_data;
  logic bin_valid, bin_ready, mq_busy;
  logic [7:0] bin_byte;

  bpc_dec #(.N(N), .STRIPES(S), .MAG_W(MAG_W), .PLANE_W(PLANE_W)) dut (
    .clk, .rst_n, .start, .subband, .num_planes, .cols_m1, .stripes_m1,
    .cx_valid, .cx, .cx_ready, .d_valid, .d, .wr_en, .wr_addr, .wr_row, .wr_data, .busy, .done);
  mq_decoder u_mq (
    .clk, .rst_n, .init, .bin_valid, .bin_byte, .bin_ready,
    .in_valid(cx_valid), .in_cx(cx), .in_ready(cx_ready), .out_valid(d_valid), .out_d(d), .busy(mq_busy));

  int checks = 0, failures = 0;
  byte unsigned data[$];
  int pairs[$];
  int ptr, np_idx;
  int got [N*S*4];
  int n_rl1 = 0, n_mr = 0;

  always @(negedge clk) begin
    bin_valid <= ($urandom % 4 != 0);
    bin_byte  <= (ptr < data.size()) ? data[ptr] : 8'hFF;
  end
  always @(posedge clk) begin
    if (bin_valid && bin_ready) ptr <= ptr + 1;
    if (cx_valid && cx_ready) begin
      checks++;
      if (np_idx >= pairs.size() || int'(cx) != (pairs[np_idx] >> 1)) begin
        failures++;
        if (failures < 10) $display("FAIL decision %0d: context %0d, expected %0d", np_idx, cx,
                                    (np_idx < pairs.size()) ? pairs[np_idx] >> 1 : -1);
      end
      if (np_idx < pairs.size() && pairs[np_idx] == ((17 << 1) | 1)) n_rl1++;
      if (cx >= 14 && cx <= 16) n_mr++;
      np_idx <= np_idx + 1;
    end
    if (wr_en) got[(int'(wr_addr) / N * 4 + int'(wr_row)) * N + int'(wr_addr) % N] = int'(wr_data);
  end

  initial begin
    start = 0; init = 0; subband = SB_LL; num_planes = 0; cols_m1 = 0; stripes_m1 = 0; ptr = 0;
    np_idx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 60; blk++) begin
      int W, H, np, sb, dens;
      int mag[], sgn[];
      j2k_ref_pkg::mq_ref mq;
      W = 1 + $urandom % N; H = 4 * (1 + $urandom % S);
      np = (blk == 0) ? 0 : $urandom % 10; sb = $urandom % 4; dens = $urandom % 100;
      mag = new[H*W]; sgn = new[H*W];
      foreach (mag[i]) begin
        mag[i] = (np == 0 || int'($urandom % 100) >= dens) ? 0 : int'($urandom % (1 << np));
        sgn[i] = $urandom % 2;
      end
      // make the top plane really used
      if (np > 0) mag[$urandom % (H*W)] |= 1 << (np - 1);
      pairs.delete();
      j2k_ref_pkg::ref_bpc(mag, sgn, H, W, np, sb, pairs);
      mq = new();
      mq.init();
      foreach (pairs[k]) mq.code(pairs[k] >> 1, pairs[k] & 1);
      mq.flush();
      @(negedge clk);
      data = mq.out; ptr = 0; np_idx = 0;
      foreach (got[i]) got[i] = -1;
      subband = subband_t'(sb); num_planes = (PLANE_W+1)'(np);
      cols_m1 = 4'(W - 1); stripes_m1 = 2'(H / 4 - 1);
      init = 1; start = 1;
      @(negedge clk);
      init = 0; start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (np_idx != pairs.size()) begin
        failures++;
        $display("FAIL block %0d: %0d decisions, expected %0d", blk, np_idx, pairs.size());
      end
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        int e;
        e = ((mag[r*W+c] != 0 && sgn[r*W+c] != 0) ? (1 << MAG_W) : 0) | mag[r*W+c];
        checks++;
        if (got[r*N+c] != e) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d (%0dx%0d, %0d planes) r%0d c%0d: %h expected %h",
                                      blk, H, W, np, r, c, got[r*N+c], e);
        end
      end
    end
    checks++;
    if (n_rl1 == 0 || n_mr == 0) begin failures++; $display("FAIL run length 1 or refinement never decoded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
