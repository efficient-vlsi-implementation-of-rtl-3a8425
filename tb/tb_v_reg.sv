// tb_v_reg: the magnitude register for every 4-bit column: the coded bit
// after 0..3 shifts, the All0s detector on the next-cycle view, and the zero
// index of the first '1' from the top (top row 00, bottom row 11).
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_v_reg;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, shift, x, nxt_all0s;
  logic [3:0] ldata, q;
  logic [1:0] zi;
  int checks = 0, failures = 0;

  v_reg dut (.clk, .rst_n, .load, .ldata, .shift, .q, .x, .nxt_all0s, .zi);

  initial begin
    load = 0; shift = 0; ldata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int col = 0; col < 16; col++) begin
      int ez;
      ldata = 4'(col); load = 1;
      #1;
      checks++;
      if (nxt_all0s != (col == 0)) begin failures++; $display("FAIL all0s %0d", col); end
      @(posedge clk); #1;
      load = 0;
      ez = (col >= 8) ? 0 : (col >= 4) ? 1 : (col >= 2) ? 2 : 3;
      checks++;
      if (int'(zi) != ez) begin failures++; $display("FAIL zi col=%04b zi=%0d", col, zi); end
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (int'(x) != ((col >> (3 - r)) & 1)) begin failures++; $display("FAIL bit %0d of %04b", r, col); end
        shift = 1;
        @(posedge clk); #1;
        shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
