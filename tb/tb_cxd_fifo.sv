// tb_cxd_fifo: random producer and consumer on the CX/D buffer against a
// queue model. Checks order and content of every word, the count output, that
// in_ready drops exactly when DEPTH words are held and out_valid exactly when
// one or more are, and that clr empties the buffer. A fill-then-drain phase
// checks the rate: DEPTH words in DEPTH cycles and out in DEPTH cycles.
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_cxd_fifo;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr, in_valid, in_ready, out_valid, out_ready;
  logic [5:0] in_data, out_data;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [5:0] q[$];

  cxd_fifo #(.W(6), .DEPTH(D)) dut (.*);

  task automatic step;
    bit push, pop;
    #1;
    checks++;
    if (in_ready != (q.size() < D) || out_valid != (q.size() > 0) || int'(count) != q.size() ||
        (q.size() > 0 && out_data != q[0])) begin
      failures++;
      if (failures < 10) $display("FAIL size=%0d count=%0d", q.size(), count);
    end
    push = in_valid && in_ready;
    pop = out_valid && out_ready;
    @(posedge clk);
    if (clr) q.delete();
    else begin
      if (pop) void'(q.pop_front());
      if (push) q.push_back(in_data);
    end
    #1;
  endtask

  initial begin
    int t0;
    clr = 0; in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int t = 0; t < 4000; t++) begin
      in_valid = 1'($urandom % 3 != 0); in_data = 6'($urandom);
      out_ready = 1'((t / 500) % 2 ? ($urandom % 4 == 0) : ($urandom % 4 != 0));
      clr = 1'($urandom % 300 == 0);
      step();
    end
    clr = 1; in_valid = 0; out_ready = 0; step(); clr = 0;
    t0 = 0;
    in_valid = 1;
    while (in_ready) begin in_data = 6'(t0); step(); t0++; end
    checks++;
    if (t0 != D) begin failures++; $display("FAIL filled %0d words", t0); end
    in_valid = 0; out_ready = 1; t0 = 0;
    while (out_valid) begin step(); t0++; end
    checks++;
    if (t0 != D) begin failures++; $display("FAIL drained in %0d cycles", t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
