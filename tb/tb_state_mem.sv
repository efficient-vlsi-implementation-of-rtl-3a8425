// tb_state_mem: random writes and reads of the column state memory against an
// array model. Reads are combinational (data valid in the same cycle as the
// address), writes take effect at the clock edge; a read of the address being
// written returns the old word until the edge.
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_state_mem;
  localparam int D = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [5:0] waddr, raddr;
  logic [3:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [3:0] model [D];

  state_mem #(.DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    we = 1;
    for (int a = 0; a < D; a++) begin
      waddr = 6'(a); wdata = 4'(a * 7); model[a] = 4'(a * 7);
      @(posedge clk); #1;
    end
    for (int t = 0; t < 3000; t++) begin
      we = 1'($urandom % 2); waddr = 6'($urandom); wdata = 4'($urandom); raddr = 6'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr]) begin failures++; if (failures < 10) $display("FAIL read %0d", raddr); end
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
