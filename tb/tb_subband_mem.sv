// tb_subband_mem: writes single coefficients at random (address, row) and
// checks that a read of an address returns all four rows of that column at
// once, combinationally, against an array model.
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_subband_mem;
  localparam int N = 8, S = 4, MW = 15;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [4:0] waddr, raddr;
  logic [1:0] wrow;
  logic [MW:0] wdata;
  logic [MW:0] rdata [4];
  int checks = 0, failures = 0;
  logic [MW:0] model [N*S][4];

  subband_mem #(.N(N), .STRIPES(S), .MAG_W(MW)) dut (.*);

  initial begin
    we = 1;
    for (int a = 0; a < N * S; a++)
      for (int r = 0; r < 4; r++) begin
        waddr = 5'(a); wrow = 2'(r); wdata = 16'(a * 4 + r); model[a][r] = 16'(a * 4 + r);
        @(posedge clk); #1;
      end
    for (int t = 0; t < 3000; t++) begin
      we = 1'($urandom % 2); waddr = 5'($urandom); wrow = 2'($urandom); wdata = 16'($urandom);
      raddr = 5'($urandom);
      #1;
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (rdata[r] != model[raddr][r]) begin failures++; if (failures < 10) $display("FAIL %0d/%0d", raddr, r); end
      end
      @(posedge clk); #1;
      if (we) model[waddr][wrow] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
