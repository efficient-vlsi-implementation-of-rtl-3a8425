// Body shared by the system testbenches (tb_jpeg2000_top, tb_jpeg2000_full).
// Expects localparams T, LEVELS, N, STRIPES, MAG_W, PLANE_W, W, TAW and the
// instance "dut" of jpeg2000_top with its ports on signals of the same names.
//
// A synthetic tile (smooth ramps, a sharp edge, a flat patch and noise) is
// loaded and coded. The reference runs the software transform, bit plane
// coder and MQ coder of j2k_ref_pkg on the same tile and predicts, for every
// lane and code block, the code bytes and the number of bit planes. Each
// mechanism of the design is counted and must occur at least once: the three
// passes, run length skips and run length '1's with zero index shifts, sign
// coding, CXD buffer back-pressure on a bit plane coder, the MQ carry into
// the byte buffer and bit stuffing after 0xFF, all four zero coding tables
// (LL mode switch on lane 0), and the end of every level.
// Afterwards the code bytes that each lane produced are decoded again by the
// design's decoding lane (bit plane decoder and MQ decoder), and every
// coefficient it writes out is compared with the reference coefficient.

  int checks = 0, failures = 0;

  // expected per lane: bytes of all blocks in order, block lengths, planes
  byte unsigned exp_bytes [3][$];
  int           exp_len   [3][$];
  int           exp_np    [3][$];
  byte unsigned got_bytes [3][$];
  int           blocks_seen [3];

  int tile[];

  // for the decoding round trip: reference coefficients ({sign, magnitude},
  // row by row), band size, planes and subband per block, and hardware bytes
  int           ref_coef   [3][$];
  int           ref_h      [3][$];
  int           ref_np     [3][$];
  int           ref_sb     [3][$];
  byte unsigned hw_flat    [3][$];
  int           hw_len     [3][$];

  task automatic build_reference();
    j2k_ref_pkg::mq_ref mq;
    mq = new();
    for (int l = 0; l <= LEVELS; l++) begin
      int h, nb;
      h  = (l < LEVELS) ? (T >> (l + 1)) : (T >> LEVELS);
      if (l < LEVELS) j2k_ref_pkg::ref_dwt_level(tile, T, l);
      nb = (l < LEVELS) ? 3 : 1;
      for (int b = 0; b < nb; b++) begin
        int mag[], sgn[];
        int r0, c0, mor, np, sb;
        int pairs[$];
        mag = new[h*h]; sgn = new[h*h];
        if (l == LEVELS) begin r0 = 0; c0 = 0; sb = 0; end
        else if (b == 0) begin r0 = 0; c0 = h; sb = 1; end
        else if (b == 1) begin r0 = h; c0 = 0; sb = 2; end
        else begin r0 = h; c0 = h; sb = 3; end
        mor = 0;
        for (int y = 0; y < h; y++) for (int x = 0; x < h; x++) begin
          int v;
          v = tile[(r0+y)*T + c0 + x];
          sgn[y*h+x] = (v < 0) ? 1 : 0;
          mag[y*h+x] = (v < 0) ? -v : v;
          mor |= mag[y*h+x];
        end
        np = 0;
        for (int i = 0; i < 16; i++) if (((mor >> i) & 1) != 0) np = i + 1;
        j2k_ref_pkg::ref_bpc(mag, sgn, h, h, np, sb, pairs);
        mq.init();
        foreach (pairs[k]) mq.code(pairs[k] >> 1, pairs[k] & 1);
        mq.flush();
        foreach (mq.out[k]) exp_bytes[b].push_back(mq.out[k]);
        for (int i = 0; i < h*h; i++)
          ref_coef[b].push_back(((sgn[i] != 0 && mag[i] != 0) ? (1 << MAG_W) : 0) | mag[i]);
        ref_h[b].push_back(h);
        ref_np[b].push_back(np);
        ref_sb[b].push_back(sb);
        exp_len[b].push_back(mq.out.size());
        exp_np[b].push_back(np);
      end
    end
  endtask

  // ------------------------------------------------------------ monitors
  int n_sp, n_mr, n_cp, n_rl0, n_rl1, n_zish, n_sc, n_stall, n_carry, n_ff;
  int n_sb [4];
  int n_levels;

  for (genvar k = 0; k < 3; k++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (code_valid[k]) got_bytes[k].push_back(code_byte[k]);
      if (code_valid[k]) hw_flat[k].push_back(code_byte[k]);
      if (code_valid[k] && code_byte[k] == 8'hFF) n_ff++;
      if (dut.g_lane[k].valid && !dut.g_lane[k].ack) n_stall++;
      if (dut.g_lane[k].u_mq.state == 3'd3 && dut.g_lane[k].u_mq.c[27]) n_carry++;
      case (int'(dut.g_lane[k].bpc_state))
        4:  n_sp++;
        12: n_mr++;
        16: n_cp++;
        17: n_rl0++;
        18: n_rl1++;
        21, 22, 23: n_zish++;
        7:  n_sc++;
        default: ;
      endcase
      if (dut.g_lane[k].u_bpc.start) n_sb[int'(dut.g_lane[k].u_bpc.subband)]++;
      if (blk_end[k]) begin
        int len, np;
        len = (exp_len[k].size() > 0) ? exp_len[k].pop_front() : -1;
        np  = (exp_np[k].size() > 0) ? exp_np[k].pop_front() : -1;
        blocks_seen[k]++;
        checks++;
        if (int'(blk_planes[k]) != np) begin
          failures++;
          $display("FAIL lane %0d block %0d: %0d planes, expected %0d", k, blocks_seen[k], blk_planes[k], np);
        end
        checks++;
        if (got_bytes[k].size() != len) begin
          failures++;
          $display("FAIL lane %0d block %0d: %0d bytes, expected %0d", k, blocks_seen[k], got_bytes[k].size(), len);
        end
        for (int i = 0; i < len && i < got_bytes[k].size(); i++) begin
          byte unsigned e;
          e = exp_bytes[k].pop_front();
          checks++;
          if (got_bytes[k][i] != e) begin
            failures++;
            if (failures < 12)
              $display("FAIL lane %0d block %0d byte %0d: %02x expected %02x", k, blocks_seen[k], i, got_bytes[k][i], e);
          end
        end
        hw_len[k].push_back(got_bytes[k].size());
        got_bytes[k].delete();
      end
    end
  end

  always @(posedge clk) if (rst_n && dut.u_dwt.done) n_levels++;

  int n_cyc;

  // ------------------------------------------------------ decoder round trip
  byte unsigned dsrc[$];
  int dptr, n_dec;
  always @(negedge clk) begin
    dec_bin_valid <= ($urandom % 8 != 0);
    dec_bin_byte  <= (dptr < dsrc.size()) ? dsrc[dptr] : 8'hFF;
  end
  always @(posedge clk) if (dec_bin_valid && dec_bin_ready) dptr <= dptr + 1;

  int dgot [N*STRIPES*4];
  always @(posedge clk)
    if (dec_wr_en) dgot[(int'(dec_wr_addr) / N * 4 + int'(dec_wr_row)) * N + int'(dec_wr_addr) % N] = int'(dec_wr_data);

  task automatic decode_all();
    for (int k = 0; k < 3; k++) begin
      while (hw_len[k].size() > 0 && ref_h[k].size() > 0) begin
        int len, h, np, sb, wd;
        len = hw_len[k].pop_front();
        h = ref_h[k].pop_front(); np = ref_np[k].pop_front(); sb = ref_sb[k].pop_front();
        dsrc.delete();
        for (int i = 0; i < len; i++) dsrc.push_back(hw_flat[k].pop_front());
        foreach (dgot[i]) dgot[i] = -1;
        dptr = 0;
        dec_subband = subband_t'(sb); dec_num_planes = (PLANE_W+1)'(np);
        dec_cols_m1 = ($clog2(N))'(h - 1); dec_stripes_m1 = ($clog2(STRIPES+1))'(h / 4 - 1);
        dec_start = 1;
        @(negedge clk);
        dec_start = 0;
        wd = 0;
        while (!dec_done && wd < 50000000) begin @(negedge clk); wd++; end
        for (int r = 0; r < h; r++) for (int c = 0; c < h; c++) begin
          int e;
          e = ref_coef[k].pop_front();
          checks++;
          n_dec++;
          if (dgot[r*N + c] != e) begin
            failures++;
            if (failures < 12) $display("FAIL decoder lane %0d r%0d c%0d: %h expected %h", k, r, c, dgot[r*N + c], e);
          end
        end
      end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    pix_we = 0; pix_addr = '0; pix_data = '0; start = 0;
    dec_start = 0; dec_subband = SB_LL; dec_num_planes = '0; dec_cols_m1 = '0; dec_stripes_m1 = '0;
    dptr = 0; n_dec = 0;
    tile = new[T*T];
    for (int r = 0; r < T; r++) for (int c = 0; c < T; c++) begin
      int v;
      if (r < T/4 && c < T/4) v = 40;                              // flat patch
      else if (c > (T*5)/8) v = 100 - (r * 60) / T;               // bright side
      else v = (r * 90) / T - (c * 50) / T - 30;                  // ramps
      v += int'($urandom % 9) - 4;                                 // noise
      if ((r * 31 + c * 17) % 97 == 0) v = -v;                     // isolated spikes
      if (v > 127) v = 127;
      if (v < -128) v = -128;
      tile[r*T + c] = v;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < T*T; a++) begin
      @(negedge clk);
      pix_we = 1; pix_addr = TAW'(a); pix_data = W'(tile[a]);
    end
    @(negedge clk); pix_we = 0;
    build_reference();
    start = 1;
    @(negedge clk); start = 0;
    n_cyc = 1;
    while (!done) begin @(negedge clk); n_cyc++; end
    $display("  tile coded in %0d cycles", n_cyc);
    repeat (4) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (exp_len[k].size() != 0 || blocks_seen[k] != ((k == 0) ? LEVELS + 1 : LEVELS)) begin
        failures++;
        $display("FAIL lane %0d: %0d blocks seen, %0d expected blocks left", k, blocks_seen[k], exp_len[k].size());
      end
    end
    decode_all();
    need("significance passes (columns)", n_sp);
    need("refinement passes (columns)", n_mr);
    need("clean up passes (columns)", n_cp);
    need("run length skip (all zero)", n_rl0);
    need("run length one", n_rl1);
    need("zero index shifts", n_zish);
    need("sign coding", n_sc);
    need("CXD buffer full, coder stalled", n_stall);
    need("MQ carry into byte buffer", n_carry);
    need("0xFF byte, bit stuffing", n_ff);
    need("LL table blocks (mode switch)", n_sb[0]);
    need("HL table blocks", n_sb[1]);
    need("LH table blocks", n_sb[2]);
    need("HH table blocks", n_sb[3]);
    need("coefficients decoded (round trip)", n_dec);
    need("transform levels", (n_levels == LEVELS) ? n_levels : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
