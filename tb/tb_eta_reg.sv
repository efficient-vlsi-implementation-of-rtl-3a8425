// tb_eta_reg: random operation sequences on the eta / sigma' register against
// a position model (8 positions, leftmost first): load fills positions 4..7,
// shift moves one position left and with upd sets position 3 (where the
// coded bit lands), the coded bit is position 4 and the write-back column is
// positions 0..3. Also checks that a loaded column comes back out, updated,
// after four shifts.
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_eta_reg;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr, load, shift, upd, cur_x, nxt_x;
  logic [3:0] ldata, wdata;
  logic [7:0] q;
  int checks = 0, failures = 0;
  int m[8];

  eta_reg dut (.clk, .rst_n, .clr, .load, .ldata, .shift, .upd, .q, .wdata, .cur_x, .nxt_x);

  task automatic op(int kind, int dat, int u);
    clr = (kind == 0); load = (kind == 1); shift = (kind == 2); upd = 1'(u); ldata = 4'(dat);
    #1;
    case (kind)
      0: for (int i = 0; i < 8; i++) m[i] = 0;
      1: for (int i = 0; i < 4; i++) m[4+i] = (dat >> (3-i)) & 1;
      default: begin
        int x;
        x = m[4];
        for (int i = 0; i < 7; i++) m[i] = m[i+1];
        m[7] = 0;
        m[3] = x | u;
      end
    endcase
    checks++;
    if (nxt_x != m[4]) begin failures++; $display("FAIL next view"); end
    @(posedge clk); #1;
    clr = 0; load = 0; shift = 0; upd = 0;
    checks++;
    if (cur_x != m[4] || int'(wdata) != ((m[0] << 3) | (m[1] << 2) | (m[2] << 1) | m[3])) begin
      failures++;
      if (failures < 10) $display("FAIL q=%08b", q);
    end
  endtask

  initial begin
    clr = 0; load = 0; shift = 0; upd = 0; ldata = 0;
    for (int i = 0; i < 8; i++) m[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // column 1001, set rows 1 and 2 while coding: expect 1111 to write back
    op(0, 0, 0); op(1, 'b1001, 0); op(2, 0, 0); op(2, 0, 1); op(2, 0, 1); op(2, 0, 0);
    checks++;
    if (wdata != 4'b1111) begin failures++; $display("FAIL write back %04b", wdata); end
    for (int t = 0; t < 2000; t++) begin
      int k;
      k = $urandom % 8;
      op((k == 0) ? 0 : (k < 3) ? 1 : 2, $urandom % 16, $urandom % 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
