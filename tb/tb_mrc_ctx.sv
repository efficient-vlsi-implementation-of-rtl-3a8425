// tb_mrc_ctx: exhaustive test of the magnitude refinement context block.
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_mrc_ctx;
  logic sigp, hood0, mag, d;
  logic [4:0] cx;
  int checks = 0, failures = 0;
  mrc_ctx dut (.sigp, .hood0, .mag, .cx, .d);
  initial begin
    for (int n = 0; n < 8; n++) begin
      {sigp, hood0, mag} = 3'(n);
      #1;
      checks++;
      if (int'(cx) != (sigp ? 16 : hood0 ? 14 : 15) || d != mag) begin
        failures++;
        $display("FAIL sigp=%0b hood0=%0b cx=%0d", sigp, hood0, cx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
