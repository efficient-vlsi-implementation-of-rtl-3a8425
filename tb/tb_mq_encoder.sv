// tb_mq_encoder: self-checking testbench of the MQ coder.
//
// A software model of the MQ coding procedures (initialisation, CODEMPS,
// CODELPS, RENORME, BYTEOUT, FLUSH), written as plain integer code, produces
// the expected byte stream. Sequences: random pairs over all 19 contexts with
// skewed symbol statistics (long MPS runs, frequent LPS), runs that drive C
// into carries and 0xFF bytes, and a short block. Input stalls are random.
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_mq_encoder;
  import bpc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init, in_valid, in_d, in_ready, flush, out_valid, flush_done, busy;
  logic [4:0] in_cx;
  logic [7:0] out_byte;

  mq_encoder dut (.clk, .rst_n, .init, .in_valid, .in_cx, .in_d, .in_ready,
                  .flush, .out_valid, .out_byte, .flush_done, .busy);

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ reference
  int qe[47] = '{'h5601,'h3401,'h1801,'h0AC1,'h0521,'h0221,'h5601,'h5401,'h4801,'h3801,
                 'h3001,'h2401,'h1C01,'h1601,'h5601,'h5401,'h5101,'h4801,'h3801,'h3401,
                 'h3001,'h2801,'h2401,'h2201,'h1C01,'h1801,'h1601,'h1401,'h1201,'h1101,
                 'h0AC1,'h09C1,'h08A1,'h0521,'h0441,'h02A1,'h0221,'h0141,'h0111,'h0085,
                 'h0049,'h0025,'h0015,'h0009,'h0005,'h0001,'h5601};
  int nmps[47] = '{1,2,3,4,5,38,7,8,9,10,11,12,13,29,15,16,17,18,19,20,21,22,23,24,25,26,
                   27,28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,44,45,45,46};
  int nlps[47] = '{1,6,9,12,29,33,6,14,14,14,17,18,20,21,14,14,15,16,17,18,19,19,20,21,22,
                   23,24,25,26,27,28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,46};
  int sw[47]   = '{1,0,0,0,0,0,1,0,0,0,0,0,0,0,1,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
                   0,0,0,0,0,0,0,0,0,0,0};

  longint A, C;
  int CT, B, I[19], MPS[19];
  bit first;
  byte unsigned exp_b[$];

  task automatic r_init();
    A = 'h8000; C = 0; CT = 12; B = 0; first = 1;
    for (int k = 0; k < 19; k++) begin
      I[k] = (k == 0) ? 4 : (k == 17) ? 3 : (k == 18) ? 46 : 0;
      MPS[k] = 0;
    end
  endtask

  task automatic r_emit(int v);
    if (!first) exp_b.push_back(byte'(v));
    first = 0;
  endtask

  task automatic r_byteout();
    if (B == 'hFF) begin
      r_emit(B); B = int'(C >> 20); C &= 'hFFFFF; CT = 7;
    end else if (C < 'h8000000) begin
      r_emit(B); B = int'(C >> 19); C &= 'h7FFFF; CT = 8;
    end else begin
      B = B + 1;
      if (B == 'hFF) begin
        C &= 'h7FFFFFF; r_emit(B); B = int'(C >> 20); C &= 'hFFFFF; CT = 7;
      end else begin
        r_emit(B); B = int'(C >> 19); C &= 'h7FFFF; CT = 8;
      end
    end
  endtask

  task automatic r_renorm();
    do begin
      A = (A << 1) & 'hFFFF; C = C << 1; CT--;
      if (CT == 0) r_byteout();
    end while ((A & 'h8000) == 0);
  endtask

  task automatic r_code(int cx, int d);
    int q;
    q = qe[I[cx]];
    A = A - q;
    if (d == MPS[cx]) begin
      if ((A & 'h8000) == 0) begin
        if (A < q) A = q; else C = C + q;
        I[cx] = nmps[I[cx]];
        r_renorm();
      end else C = C + q;
    end else begin
      if (A < q) C = C + q; else A = q;
      if (sw[I[cx]] != 0) MPS[cx] = 1 - MPS[cx];
      I[cx] = nlps[I[cx]];
      r_renorm();
    end
  endtask

  task automatic r_flush();
    longint t;
    t = C + A;
    C = C | 'hFFFF;
    if (C >= t) C = C - 'h8000;
    C = C << CT; r_byteout();
    C = C << CT; r_byteout();
    if (B != 'hFF) r_emit(B);
  endtask

  // ---------------------------------------------------------------- driver
  byte unsigned got_b[$];
  always @(posedge clk) if (rst_n && out_valid) got_b.push_back(out_byte);

  int sym_cx[$], sym_d[$];

  task automatic run_seq(int label);
    exp_b.delete(); got_b.delete();
    r_init();
    foreach (sym_cx[k]) r_code(sym_cx[k], sym_d[k]);
    r_flush();
    @(negedge clk); init = 1'b1;
    @(negedge clk); init = 1'b0;
    foreach (sym_cx[k]) begin
      @(negedge clk);
      while ($urandom % 4 == 0 || !in_ready) @(negedge clk);
      in_valid = 1'b1; in_cx = 5'(sym_cx[k]); in_d = sym_d[k][0];
      @(negedge clk);
      in_valid = 1'b0;
    end
    while (busy) @(negedge clk);
    flush = 1'b1;
    @(negedge clk); flush = 1'b0;
    while (!flush_done) @(posedge clk);
    @(posedge clk);
    checks++;
    if (got_b.size() != exp_b.size()) begin
      failures++;
      $display("FAIL seq %0d: %0d bytes, expected %0d", label, got_b.size(), exp_b.size());
    end
    for (int k = 0; k < exp_b.size() && k < got_b.size(); k++) begin
      checks++;
      if (got_b[k] != exp_b[k]) begin
        failures++;
        if (failures < 10) $display("FAIL seq %0d byte %0d: %02x expected %02x", label, k, got_b[k], exp_b[k]);
      end
    end
  endtask

  initial begin
    int ff;
    init = 0; in_valid = 0; in_cx = 0; in_d = 0; flush = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 12; s++) begin
      int p;
      sym_cx.delete(); sym_d.delete();
      p = 5 + s * 8;           // per-mille chance of a '1'
      for (int k = 0; k < 300 + 200 * s; k++) begin
        sym_cx.push_back($urandom % 19);
        sym_d.push_back(($urandom % 100 < p % 100) ? 1 : 0);
      end
      run_seq(s);
    end
    // a very short block
    sym_cx.delete(); sym_d.delete();
    sym_cx.push_back(17); sym_d.push_back(0);
    run_seq(100);
    // the reference itself against the published MQ test sequence (one
    // context starting at state 0): 256 bits in; the published 30 bytes end
    // with the two-byte marker FF AC of that test, which this flush omits
    begin
      byte unsigned din[32] = '{'h00,'h02,'h00,'h51,'h00,'h00,'h00,'hC0,'h03,'h52,'h87,'h2A,
                                'hAA,'hAA,'hAA,'hAA,'h82,'hC0,'h20,'h00,'hFC,'hD7,'h9E,'hF6,
                                'hBF,'h7F,'hED,'h90,'h4F,'h46,'hA3,'hBF};
      byte unsigned dout[30] = '{'h84,'hC7,'h3B,'hFC,'hE1,'hA1,'h43,'h04,'h02,'h20,'h00,'h00,
                                 'h41,'h0D,'hBB,'h86,'hF4,'h31,'h7F,'hFF,'h88,'hFF,'h37,'h47,
                                 'h1A,'hDB,'h6A,'hDF,'hFF,'hAC};
      exp_b.delete();
      r_init();
      I[0] = 0;
      for (int k = 0; k < 256; k++) r_code(0, (din[k/8] >> (7 - k%8)) & 1);
      r_flush();
      ff = 0;
      for (int k = 0; k < 28 && k < exp_b.size(); k++) if (exp_b[k] == dout[k]) ff++;
      checks++;
      if (ff != 28) begin
        failures++;
        $display("FAIL reference model: %0d of 28 test bytes match (%0d bytes)", ff, exp_b.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
