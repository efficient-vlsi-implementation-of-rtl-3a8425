// tb_sc_ctx: exhaustive test of the sign coding context block: all 512
// combinations of neighbour significance, neighbour signs and own sign.
// Expected values come from signed contribution sums and the context table.
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_sc_ctx;
  logic sh0, sh1, sv0, sv1, ch0, ch1, cv0, cv1, chi, d;
  logic [4:0] cx;
  int checks = 0, failures = 0;

  sc_ctx dut (.sig_h0(sh0), .sig_h1(sh1), .sig_v0(sv0), .sig_v1(sv1),
              .chi_h0(ch0), .chi_h1(ch1), .chi_v0(cv0), .chi_v1(cv1), .chi, .cx, .d);

  function automatic int con(logic s, logic c);
    return s ? (c ? -1 : 1) : 0;
  endfunction

  initial begin
    for (int n = 0; n < 512; n++) begin
      int h, v, ec, ex;
      {chi, sh0, sh1, sv0, sv1, ch0, ch1, cv0, cv1} = 9'(n);
      #1;
      h = con(sh0, ch0) + con(sh1, ch1);
      v = con(sv0, cv0) + con(sv1, cv1);
      h = (h > 0) ? 1 : (h < 0) ? -1 : 0;
      v = (v > 0) ? 1 : (v < 0) ? -1 : 0;
      // table: (h,v) -> context, xor bit
      case ({h, v})
        {1, 1}:   begin ec = 13; ex = 0; end
        {1, 0}:   begin ec = 12; ex = 0; end
        {1, -1}:  begin ec = 11; ex = 0; end
        {0, 1}:   begin ec = 10; ex = 0; end
        {0, 0}:   begin ec = 9;  ex = 0; end
        {0, -1}:  begin ec = 10; ex = 1; end
        {-1, 1}:  begin ec = 11; ex = 1; end
        {-1, 0}:  begin ec = 12; ex = 1; end
        default:  begin ec = 13; ex = 1; end
      endcase
      checks++;
      if (int'(cx) != ec || int'(d) != (int'(chi) ^ ex)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0h cx=%0d d=%0d exp %0d %0d", n, cx, d, ec, int'(chi) ^ ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
