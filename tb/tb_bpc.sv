// tb_bpc: self-checking testbench of the bit plane coder.
//
// Random code blocks (sparse sign-magnitude coefficients, one all-zero region
// per stripe so that run length coding skips columns) are coded in all four
// subband modes. A behavioural reference written directly from the coding
// rules (passes, primitives, contexts, stripe-bounded neighbourhood) predicts
// every context/data pair and the cycle count of the controller: one cycle per
// skipped bit, two per coded bit, three per bit that becomes significant, plus
// per-column, per-pass and per-plane overheads. Blocks run once with ack
// always high (cycle count checked exactly) and once with random ack stalls
// (cycle count = reference + stall cycles).
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_bpc;
  import bpc_pkg::*;

  localparam int N = 8, STRIPES = 2, MAG_W = 15, PLANE_W = 4;
  localparam int AW = $clog2(N*STRIPES);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, ack, valid, d, busy, done;
  logic [4:0] cx;
  subband_t subband;
  logic [PLANE_W:0] num_planes;
  logic [$clog2(N)-1:0] cols_m1;
  logic [$clog2(STRIPES+1)-1:0] stripes_m1;
  int NC, NS;   // size of the block under test
  logic [AW-1:0] sb_raddr;
  logic [MAG_W:0] sb_rdata [4];
  bpc_state_t st;

  logic [MAG_W:0] sbmem [N*STRIPES][4];
  always_comb for (int r = 0; r < 4; r++) sb_rdata[r] = sbmem[sb_raddr][r];

  bpc #(.N(N), .STRIPES(STRIPES), .MAG_W(MAG_W), .PLANE_W(PLANE_W)) dut (
    .clk, .rst_n, .start, .subband, .num_planes, .cols_m1, .stripes_m1, .sb_raddr, .sb_rdata,
    .cx, .d, .valid, .ack, .busy, .done, .state_o(st));

  int checks = 0, failures = 0;
  int unsigned exp_q[$];     // {cx, d}
  int exp_cycles;

  // ------------------------------------------------------------ reference
  int sig[4][N], eta[4][N], sgp[4][N], mag[4][N], sgn[4][N];

  function automatic int sg(int r, int c);
    if (r < 0 || r > 3 || c < 0 || c >= NC) return 0;
    return sig[r][c];
  endfunction

  function automatic int zc(subband_t sb, int r, int c);
    int h, v, dd, t;
    h  = sg(r, c-1) + sg(r, c+1);
    v  = sg(r-1, c) + sg(r+1, c);
    dd = sg(r-1, c-1) + sg(r-1, c+1) + sg(r+1, c-1) + sg(r+1, c+1);
    if (sb == SB_HL) begin t = h; h = v; v = t; end
    if (sb == SB_HH) begin
      if (dd >= 3) return 8;
      if (dd == 2) return (h+v >= 1) ? 7 : 6;
      if (dd == 1) return (h+v >= 2) ? 5 : (h+v == 1) ? 4 : 3;
      return (h+v >= 2) ? 2 : (h+v == 1) ? 1 : 0;
    end
    if (h == 2) return 8;
    if (h == 1) return (v >= 1) ? 7 : (dd >= 1) ? 6 : 5;
    if (v == 2) return 4;
    if (v == 1) return 3;
    if (dd >= 2) return 2;
    if (dd == 1) return 1;
    return 0;
  endfunction

  function automatic int contrib(int r0, int c0, int r1, int c1);
    int s;
    s = 0;
    if (sg(r0, c0) != 0) s += (sgn[r0][c0] != 0) ? -1 : 1;
    if (sg(r1, c1) != 0) s += (sgn[r1][c1] != 0) ? -1 : 1;
    if (s > 1) s = 1;
    if (s < -1) s = -1;
    return s;
  endfunction

  // returns {cx, d}
  function automatic int sc(int r, int c);
    int h, v, ctx, xb;
    h = contrib(r, c-1, r, c+1);
    v = contrib(r-1, c, r+1, c);
    if (h < 0) begin h = -h; v = -v; xb = 1; end
    else if (h == 0 && v < 0) begin v = -v; xb = 1; end
    else xb = 0;
    if (h == 0) ctx = (v == 0) ? 9 : 10;
    else ctx = (v == 1) ? 13 : (v == 0) ? 12 : 11;
    return (ctx << 1) | (sgn[r][c] ^ xb);
  endfunction

  function automatic int hood(int r, int c);
    return sg(r-1,c-1)+sg(r-1,c)+sg(r-1,c+1)+sg(r,c-1)+sg(r,c+1)+sg(r+1,c-1)+sg(r+1,c)+sg(r+1,c+1);
  endfunction

  function automatic int vb(int r, int c, int p);
    return (mag[r][c] >> p) & 1;
  endfunction

  // code a bit with ZC (+SC); adds cycles
  task automatic zc_sc(subband_t sb, int r, int c, int p);
    exp_q.push_back((zc(sb, r, c) << 1) | vb(r, c, p));
    eta[r][c] = 1;
    if (vb(r, c, p) != 0) begin
      exp_q.push_back(sc(r, c));
      sig[r][c] = 1;
      exp_cycles += 3;
    end else exp_cycles += 2;
  endtask

  task automatic ref_block(subband_t sb, int np);
    for (int s = 0; s < NS; s++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < NC; c++) begin
        sig[r][c] = 0; eta[r][c] = 0; sgp[r][c] = 0;
        mag[r][c] = int'(sbmem[s*N+c][r][MAG_W-1:0]);
        sgn[r][c] = int'(sbmem[s*N+c][r][MAG_W]);
      end
      for (int p = np-1; p >= 0; p--) begin
        for (int ps = (p == np-1) ? 2 : 0; ps <= 2; ps++) begin
          if (ps == 0 || p == np-1) exp_cycles += NC; // fill
          exp_cycles += 3;                             // states 1,2,3
          for (int c = 0; c < NC; c++) begin
            exp_cycles += 1;                           // column read
            if (ps == 0) begin
              for (int r = 0; r < 4; r++)
                if (sig[r][c] == 0 && hood(r, c) != 0) zc_sc(sb, r, c, p);
                else exp_cycles += 1;
              exp_cycles += 2;
            end else if (ps == 1) begin
              for (int r = 0; r < 4; r++)
                if (sig[r][c] != 0 && eta[r][c] == 0) begin
                  exp_q.push_back(((sgp[r][c] != 0 ? 16 : (hood(r, c) == 0 ? 14 : 15)) << 1) | vb(r, c, p));
                  sgp[r][c] = 1;
                  exp_cycles += 2;
                end else exp_cycles += 1;
              exp_cycles += 2;
            end else begin
              int all, zi, any;
              all = 0;
              for (int r = 0; r < 4; r++)
                all += sg(r, c-1) + sg(r, c) + sg(r, c+1);
              if (sig[0][c] == 0 && eta[0][c] == 0 && all == 0) begin
                any = 0; zi = 0;
                for (int r = 3; r >= 0; r--) if (vb(r, c, p) != 0) begin any = 1; zi = r; end
                if (any == 0) begin
                  exp_q.push_back(17 << 1);
                  exp_cycles += 2;                     // states 17, 11
                end else begin
                  exp_q.push_back((17 << 1) | 1);
                  exp_q.push_back((18 << 1) | (zi >> 1));
                  exp_q.push_back((18 << 1) | (zi & 1));
                  exp_cycles += 3 + zi;
                  exp_q.push_back(sc(zi, c));
                  sig[zi][c] = 1;
                  exp_cycles += 2;
                  for (int r = zi + 1; r < 4; r++) zc_sc(sb, r, c, p);
                  exp_cycles += 2;
                end
              end else begin
                for (int r = 0; r < 4; r++)
                  if (sig[r][c] == 0 && eta[r][c] == 0) zc_sc(sb, r, c, p);
                  else exp_cycles += 1;
                exp_cycles += 2;
              end
            end
          end
        end
        for (int r = 0; r < 4; r++) for (int c = 0; c < NC; c++) eta[r][c] = 0;
      end
    end
  endtask

  // ---------------------------------------------------------------- driver
  int cyc_busy, stalls, got;
  bit rand_ack;

  always @(posedge clk) begin
    if (rst_n && busy) cyc_busy++;
    if (rst_n && valid && !ack) stalls++;
    if (rst_n && valid && ack) begin
      got++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected pair cx=%0d d=%0d", cx, d);
      end else begin
        int unsigned e;
        e = exp_q.pop_front();
        if (e != {27'd0, cx, d}) begin
          failures++;
          if (failures < 10)
            $display("FAIL pair %0d: got cx=%0d d=%0d exp cx=%0d d=%0d (state %0d)",
                     got, cx, d, e >> 1, e & 1, st);
        end
      end
    end
  end

  always @(negedge clk) ack <= rand_ack ? ($urandom % 3 != 0) : 1'b1;

  task automatic gen_block(int np, int dens);
    for (int a = 0; a < N*STRIPES; a++)
      for (int r = 0; r < 4; r++) begin
        logic [MAG_W-1:0] m;
        m = ($urandom % 100 < dens) ? MAG_W'($urandom % (1 << np)) : '0;
        if ((a % N) >= NC-3 && (a % N) < NC-1) m = '0;  // zero columns
        sbmem[a][r] = {1'($urandom), m};
      end
  endtask

  task automatic run_block(subband_t sb, int np, bit ra);
    exp_q.delete();
    exp_cycles = 0;
    ref_block(sb, np);
    cyc_busy = 0; stalls = 0; got = 0;
    rand_ack = ra;
    @(posedge clk);
    subband <= sb; num_planes <= (PLANE_W+1)'(np); start <= 1'b1;
    cols_m1 <= $bits(cols_m1)'(NC - 1); stripes_m1 <= $bits(stripes_m1)'(NS - 1);
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d pairs missing (sb=%0d np=%0d)", exp_q.size(), sb, np);
    end
    checks++;
    if (cyc_busy != exp_cycles + stalls) begin
      failures++;
      $display("FAIL cycles %0d expected %0d + %0d stalls (sb=%0d np=%0d)",
               cyc_busy, exp_cycles, stalls, sb, np);
    end
  endtask

  initial begin
    start = 0; subband = SB_LL; num_planes = '0; rand_ack = 0;
    cols_m1 = '0; stripes_m1 = '0; NC = N; NS = STRIPES;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      NC = (i % 5 == 4) ? 4 : N;
      NS = (i % 3 == 2) ? 1 : STRIPES;
      gen_block(2 + i % 5, (i % 4 == 0) ? 8 : 35);
      run_block(subband_t'(i % 4), 2 + i % 5, i >= 10);
    end
    // no plane to code: done at once, nothing emitted
    exp_q.delete();
    @(posedge clk); num_planes <= '0; start <= 1'b1;
    @(posedge clk); start <= 1'b0;
    checks++;
    if (!done) begin failures++; $display("FAIL num_planes=0 did not finish"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
