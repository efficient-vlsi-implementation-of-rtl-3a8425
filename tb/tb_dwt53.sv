// tb_dwt53: self-checking testbench of the lifting wavelet transform.
//
// Loads a random tile, runs every decomposition level and compares the whole
// tile memory after each level with a software (5,3) lifting model (integer
// predict and update with symmetric extension, rows then columns, low half
// then high half). Also checks the cycle count of a level: 2 * S lines of
// 3 * S cycles each, S = T >> level.
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_dwt53;
  localparam int T = 16, LEVELS = 3, W = 16;
  localparam int AW = $clog2(T*T);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pix_we, start, busy, done;
  logic [AW-1:0] pix_addr, rd_addr;
  logic signed [W-1:0] pix_data, rd_data;
  logic [$clog2(LEVELS+1)-1:0] level;

  dwt53 #(.T(T), .LEVELS(LEVELS), .W(W)) dut (.clk, .rst_n, .pix_we, .pix_addr, .pix_data,
    .start, .level, .busy, .done, .rd_addr, .rd_data);

  int checks = 0, failures = 0;
  int ref_t [T][T];

  function automatic int fdiv(int a, int sh);   // floor division by 2**sh
    return a >>> sh;
  endfunction

  task automatic lift_line(ref int x[T], input int S);
    int d[T], s[T];
    int h;
    h = S / 2;
    for (int n = 0; n < h; n++)
      d[n] = x[2*n+1] - fdiv(x[2*n] + ((n == h-1) ? x[2*n] : x[2*n+2]), 1);
    for (int n = 0; n < h; n++)
      s[n] = x[2*n] + fdiv(((n == 0) ? d[0] : d[n-1]) + d[n] + 2, 2);
    for (int n = 0; n < h; n++) begin x[n] = s[n]; x[h+n] = d[n]; end
  endtask

  task automatic ref_level(int l);
    int S;
    int x[T];
    S = T >> l;
    for (int r = 0; r < S; r++) begin
      for (int i = 0; i < S; i++) x[i] = ref_t[r][i];
      lift_line(x, S);
      for (int i = 0; i < S; i++) ref_t[r][i] = x[i];
    end
    for (int c = 0; c < S; c++) begin
      for (int i = 0; i < S; i++) x[i] = ref_t[i][c];
      lift_line(x, S);
      for (int i = 0; i < S; i++) ref_t[i][c] = x[i];
    end
  endtask

  initial begin
    int cyc;
    pix_we = 0; start = 0; level = 0; pix_addr = 0; pix_data = 0; rd_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 2; trial++) begin
      for (int r = 0; r < T; r++) for (int c = 0; c < T; c++) begin
        ref_t[r][c] = (trial == 0) ? int'($urandom % 256) - 128 : ((r + c) % 2 == 0 ? 127 : -128);
        @(negedge clk);
        pix_we = 1; pix_addr = AW'(r*T + c); pix_data = W'(ref_t[r][c]);
      end
      @(negedge clk); pix_we = 0;
      for (int l = 0; l < LEVELS; l++) begin
        ref_level(l);
        @(negedge clk); start = 1; level = $bits(level)'(l);
        @(negedge clk); start = 0;
        cyc = 1;
        while (!done) begin @(negedge clk); cyc++; end
        checks++;
        if (cyc != 2 * (T >> l) * 3 * (T >> l) + 1) begin
          failures++;
          $display("FAIL level %0d took %0d cycles", l, cyc);
        end
        for (int r = 0; r < T; r++) for (int c = 0; c < T; c++) begin
          rd_addr = AW'(r*T + c);
          #1;
          checks++;
          if (int'(rd_data) != ref_t[r][c]) begin
            failures++;
            if (failures < 10) $display("FAIL level %0d (%0d,%0d): %0d expected %0d", l, r, c, rd_data, ref_t[r][c]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
