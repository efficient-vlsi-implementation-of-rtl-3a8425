// tb_zc_ctx: exhaustive test of the zero coding context block: all 256
// neighbourhoods in all four subband modes against the count-based tables
// (horizontal, vertical and diagonal neighbour counts).
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_zc_ctx;
  import bpc_pkg::*;
  subband_t sb;
  logic h0, h1, v0, v1, d0, d1, d2, d3, mag, d;
  logic [4:0] cx;
  int checks = 0, failures = 0;

  zc_ctx dut (.subband(sb), .h0, .h1, .v0, .v1, .d0, .d1, .d2, .d3, .mag, .cx, .d);

  function automatic int expect_cx(int s, int h, int v, int dd);
    int t;
    if (s == 1) begin t = h; h = v; v = t; end
    if (s == 3) begin
      if (dd >= 3) return 8;
      if (dd == 2) return (h + v >= 1) ? 7 : 6;
      if (dd == 1) return (h + v >= 2) ? 5 : (h + v == 1) ? 4 : 3;
      return (h + v >= 2) ? 2 : (h + v == 1) ? 1 : 0;
    end
    if (h == 2) return 8;
    if (h == 1) return (v >= 1) ? 7 : (dd >= 1) ? 6 : 5;
    if (v == 2) return 4;
    if (v == 1) return 3;
    if (dd >= 2) return 2;
    if (dd == 1) return 1;
    return 0;
  endfunction

  initial begin
    for (int s = 0; s < 4; s++)
      for (int n = 0; n < 512; n++) begin
        sb = subband_t'(s);
        {mag, h0, h1, v0, v1, d0, d1, d2, d3} = 9'(n);
        #1;
        checks++;
        if (int'(cx) != expect_cx(s, h0 + h1, v0 + v1, d0 + d1 + d2 + d3) || d != mag) begin
          failures++;
          if (failures < 10) $display("FAIL sb=%0d n=%0h cx=%0d", s, n, cx);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
