// tb_sigma_reg: random operation sequences on the sigma register against a
// position model (15 positions, leftmost first): load fills the four
// rightmost positions, shift moves everything one position left (setting the
// position left of the coded one when upd is high), ishift moves five
// positions. The neighbour taps are checked at their positions (D0 H0 D3 at
// 0..2, V0 X V1 at 5..7, D1 H1 D2 at 10..12) together with hood0, rlc_c and
// the write-back column (positions 1..4). Also replays the initialisation of
// a stripe: reset, load, Ishift, load puts the first column at the coded
// positions with zeros above, below and to the left.
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_sigma_reg;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr, load, shift, upd, ishift;
  logic [3:0] ldata, wdata;
  logic [14:0] q;
  logic h0, h1, v0, v1, d0, d1, d2, d3, cur_x, cur_hood0, nxt_x, nxt_hood0, nxt_rlc_c;
  int checks = 0, failures = 0;
  int m[15];

  sigma_reg dut (.clk, .rst_n, .clr, .load, .ldata, .shift, .upd, .ishift, .q, .wdata,
                 .h0, .h1, .v0, .v1, .d0, .d1, .d2, .d3, .cur_x, .cur_hood0,
                 .nxt_x, .nxt_hood0, .nxt_rlc_c);

  task automatic check(string what);
    int hz, all, wd;
    hz = (m[0] | m[1] | m[2] | m[5] | m[7] | m[10] | m[11] | m[12]) == 0;
    all = 0;
    for (int i = 0; i < 15; i++) all |= m[i];
    wd = (m[1] << 3) | (m[2] << 2) | (m[3] << 1) | m[4];
    checks++;
    if (d0 != m[0] || h0 != m[1] || d3 != m[2] || v0 != m[5] || cur_x != m[6] || v1 != m[7] ||
        d1 != m[10] || h1 != m[11] || d2 != m[12] || cur_hood0 != hz || int'(wdata) != wd) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%015b", what, q);
    end
  endtask

  task automatic op(int kind, int dat, int u);
    clr = (kind == 0); load = (kind == 1); shift = (kind == 2); ishift = (kind == 3);
    upd = 1'(u); ldata = 4'(dat);
    #1;
    // model next state
    case (kind)
      0: for (int i = 0; i < 15; i++) m[i] = 0;
      1: for (int i = 0; i < 4; i++) m[11+i] = (dat >> (3-i)) & 1;
      2: begin
        int x;
        x = m[6];
        for (int i = 0; i < 14; i++) m[i] = m[i+1];
        m[14] = 0;
        m[5] = x | u;
      end
      3: begin
        for (int i = 0; i < 10; i++) m[i] = m[i+5];
        for (int i = 10; i < 15; i++) m[i] = 0;
      end
      default: ;
    endcase
    begin
      int all;
      all = 0;
      for (int i = 0; i < 15; i++) all |= m[i];
      checks++;
      if (nxt_x != m[6] || nxt_rlc_c != (all == 0) ||
          nxt_hood0 != ((m[0] | m[1] | m[2] | m[5] | m[7] | m[10] | m[11] | m[12]) == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL next view, op %0d", kind);
      end
    end
    @(posedge clk); #1;
    clr = 0; load = 0; shift = 0; ishift = 0; upd = 0;
    check("after op");
  endtask

  initial begin
    clr = 0; load = 0; shift = 0; ishift = 0; upd = 0; ldata = 0;
    for (int i = 0; i < 15; i++) m[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // stripe initialisation: column A = 1011, then column B = 0110
    op(0, 0, 0); op(1, 'b1011, 0); op(3, 0, 0); op(1, 'b0110, 0);
    checks++;
    if (cur_x != 1'b1 || v0 || v1 || h0 || d0 || d3 || d1 || h1 || !d2) begin
      failures++;
      $display("FAIL initial alignment q=%015b", q);
    end
    for (int t = 0; t < 3000; t++) begin
      int k;
      k = $urandom % 10;
      op((k == 0) ? 0 : (k < 4) ? 1 : (k < 9) ? 2 : 3, $urandom % 16, $urandom % 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
