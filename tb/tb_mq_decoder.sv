// tb_mq_decoder: round trip through the MQ decoder. For each test block a
// sequence of (context, decision) pairs is drawn with $urandom: contexts are
// spread over all 19, and each context has its own bias so that both long
// MPS runs, frequent LPS and MPS switches occur. The pairs are encoded with
// the reference MQ encoder of j2k_ref_pkg (which follows the standard, and
// whose output the encoder testbench checks against the published test
// sequence), then the bytes are fed to the decoder with random gaps, followed
// by 0xFF fill, and every decoded decision is compared with the original.
// Also checks the cycle count of a decision that needs no renormalisation
// (one cycle from request to result) and that no byte is consumed beyond the
// end of the block's data.
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_mq_decoder;
  import bpc_pkg::*;
  import j2k_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init, bin_valid, bin_ready, in_valid, in_ready, out_valid, out_d, busy;
  logic [7:0] bin_byte;
  logic [4:0] in_cx;
  int checks = 0, failures = 0;

  mq_decoder dut (.*);

  mq_ref enc;
  byte unsigned data[$];
  int ptr;
  int fast_seen = 0;

  // byte source: serves data[ptr], 0xFF after the end, with random gaps
  always @(negedge clk) begin
    bin_valid <= ($urandom % 4 != 0);
    bin_byte  <= (ptr < data.size()) ? data[ptr] : 8'hFF;
  end
  always @(posedge clk) if (bin_valid && bin_ready) begin
    if (ptr >= data.size() + 2) begin
      failures++;
      $display("FAIL byte consumed past the end of the data (ptr %0d of %0d)", ptr, data.size());
    end
    ptr <= ptr + 1;
  end

  initial begin
    int cxs[$], ds[$];
    int bias[19];
    init = 0; in_valid = 0; in_cx = 0; bin_valid = 0; bin_byte = 0; ptr = 0;
    enc = new();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 40; blk++) begin
      int n;
      n = 1 + $urandom % ((blk < 5) ? 8 : 1500);
      for (int k = 0; k < 19; k++) bias[k] = $urandom % 100;
      cxs.delete(); ds.delete();
      enc.init();
      for (int i = 0; i < n; i++) begin
        int cx, d;
        cx = (blk % 3 == 0) ? 0 : $urandom % 19;
        d = (int'($urandom % 100) < bias[cx]) ? 1 : 0;
        cxs.push_back(cx); ds.push_back(d);
        enc.code(cx, d);
      end
      enc.flush();
      @(negedge clk);
      data = enc.out;
      ptr = 0;
      init = 1;
      @(negedge clk);
      init = 0;
      for (int i = 0; i < n; i++) begin
        int wait_c, lat;
        wait_c = 0;
        in_valid = 1; in_cx = 5'(cxs[i]);
        while (!in_ready) begin
          @(negedge clk);
          if (++wait_c > 10000) break;
        end
        @(negedge clk);
        in_valid = 0;
        lat = 1;
        while (!out_valid && lat < 200) begin @(negedge clk); lat++; end
        checks++;
        if (!out_valid || int'(out_d) != ds[i]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d symbol %0d cx %0d: got %0d expected %0d", blk, i, cxs[i], out_d, ds[i]);
        end
        if (lat == 1) fast_seen++;
      end
    end
    checks++;
    if (fast_seen == 0) begin failures++; $display("FAIL no single-cycle decision seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
