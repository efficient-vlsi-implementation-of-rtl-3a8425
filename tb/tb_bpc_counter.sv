// tb_bpc_counter: drives the counter through block and stripe starts, row and
// column steps and pass changes in the order the controller uses them and
// checks every output against a model: the pass starts at the cleanup pass of
// the top plane (num_planes - 1), goes CP -> SP -> MRP -> CP with the plane
// index decremented when leaving a cleanup pass, the first-plane flag is
// cleared at that point, and the last_* flags follow the limits given.
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_bpc_counter;
  import bpc_pkg::*;
  localparam int N = 8, S = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] num_planes;
  logic [2:0] cols_m1;
  logic [2:0] stripes_m1;
  logic init_block, init_stripe, count_up, row_clr, col_up, col_clr, next_pass, next_stripe;
  logic [1:0] row;
  logic [2:0] col;
  pass_t pass;
  logic [3:0] bp;
  logic [2:0] stripe;
  logic first_plane, last_row, last_col, last_bp, last_stripe;
  int checks = 0, failures = 0;
  int m_row, m_col, m_pass, m_bp, m_stripe, m_first;

  bpc_counter #(.N(N), .STRIPES(S), .PLANE_W(4)) dut (.*);

  task automatic chk;
    checks++;
    if (int'(row) != m_row || int'(col) != m_col || int'(pass) != m_pass || int'(bp) != m_bp ||
        int'(stripe) != m_stripe || int'(first_plane) != m_first || last_row != (m_row == 3) ||
        last_col != (m_col == int'(cols_m1)) || last_bp != (m_bp == 0) ||
        last_stripe != (m_stripe == int'(stripes_m1))) begin
      failures++;
      if (failures < 10) $display("FAIL row=%0d/%0d col=%0d/%0d pass=%0d/%0d bp=%0d/%0d stripe=%0d/%0d",
                                  row, m_row, col, m_col, pass, m_pass, bp, m_bp, stripe, m_stripe);
    end
  endtask

  task automatic pulse(ref logic s);
    s = 1; @(posedge clk); #1; s = 0;
  endtask

  initial begin
    {init_block, init_stripe, count_up, row_clr, col_up, col_clr, next_pass, next_stripe} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int blk = 0; blk < 6; blk++) begin
      num_planes = 5'(1 + $urandom % 6); cols_m1 = 3'($urandom); stripes_m1 = 3'($urandom % S);
      pulse(init_block);
      m_row = 0; m_col = 0; m_pass = 2; m_bp = num_planes - 1; m_stripe = 0; m_first = 1;
      chk();
      for (int s = 0; s <= int'(stripes_m1); s++) begin
        while (1) begin
          for (int c = 0; c <= int'(cols_m1); c++) begin
            for (int r = 0; r < 3; r++) begin pulse(count_up); m_row++; chk(); end
            if (c % 3 == 1) begin pulse(row_clr); m_row = 0; chk(); end
            if (c < int'(cols_m1)) begin pulse(col_up); m_col++; m_row = 0; chk(); end
          end
          pulse(col_clr); m_col = 0; m_row = 0; chk();
          if (m_pass == 2 && m_bp == 0) break;
          pulse(next_pass);
          if (m_pass == 0) m_pass = 1;
          else if (m_pass == 1) m_pass = 2;
          else begin m_pass = 0; m_bp--; m_first = 0; end
          chk();
        end
        if (s < int'(stripes_m1)) begin
          pulse(next_stripe);
          m_row = 0; m_col = 0; m_pass = 2; m_bp = num_planes - 1; m_stripe++; m_first = 1;
          chk();
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
