// tb_chi_reg: random operation sequences on the sign register against a
// position model (12 positions, leftmost first): load fills 8..11, shift
// moves one position, ishift four. Taps: SH0 = 0, SV0 = 3, X = 4, SV1 = 5,
// SH1 = 8.
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_chi_reg;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr, load, shift, ishift, sh0, sv0, x, sv1, sh1;
  logic [3:0] ldata;
  logic [11:0] q;
  int checks = 0, failures = 0;
  int m[12];

  chi_reg dut (.clk, .rst_n, .clr, .load, .ldata, .shift, .ishift, .q, .sh0, .sv0, .x, .sv1, .sh1);

  task automatic op(int kind, int dat);
    clr = (kind == 0); load = (kind == 1); shift = (kind == 2); ishift = (kind == 3); ldata = 4'(dat);
    case (kind)
      0: for (int i = 0; i < 12; i++) m[i] = 0;
      1: for (int i = 0; i < 4; i++) m[8+i] = (dat >> (3-i)) & 1;
      2: begin for (int i = 0; i < 11; i++) m[i] = m[i+1]; m[11] = 0; end
      default: begin for (int i = 0; i < 8; i++) m[i] = m[i+4]; for (int i = 8; i < 12; i++) m[i] = 0; end
    endcase
    @(posedge clk); #1;
    clr = 0; load = 0; shift = 0; ishift = 0;
    checks++;
    if (sh0 != m[0] || sv0 != m[3] || x != m[4] || sv1 != m[5] || sh1 != m[8]) begin
      failures++;
      if (failures < 10) $display("FAIL q=%012b", q);
    end
  endtask

  initial begin
    clr = 0; load = 0; shift = 0; ishift = 0; ldata = 0;
    for (int i = 0; i < 12; i++) m[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int k;
      k = $urandom % 10;
      op((k == 0) ? 0 : (k < 4) ? 1 : (k < 9) ? 2 : 3, $urandom % 16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
