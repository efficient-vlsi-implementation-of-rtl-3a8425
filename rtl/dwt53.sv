// dwt53: lifting-based 2-D discrete wavelet transform of an image tile.
//
// One lifting processor works in place on a single T x T tile memory. A call
// (start with level l) transforms the top-left S x S square, S = T >> l, i.e.
// the LL band left by the previous level: first every row, then every column.
// Each line is read into a line buffer, lifted in two steps and written back
// de-interleaved (low-pass half first, high-pass half second), so that after
// the call the square holds LL | HL over LH | HH.
// The lifting steps are those of the reversible (5,3) filter, with high-pass
// samples computed first:
//   predict: d[n] = x[2n+1] - floor((x[2n] + x[2n+2]) / 2)
//   update : s[n] = x[2n]   + floor((d[n-1] + d[n] + 2) / 4)
// with symmetric extension at both ends (x[S] = x[S-2], d[-1] = d[0]). Each
// step uses two adders and a shifter; the scaling factors K1 and K2 are 1 for
// this filter, so no multiplier is needed. One sample is lifted per cycle;
// a line of S samples takes 3*S cycles (S reads, S/2 + S/2 lifts, S writes).
//
// Interface: the tile is loaded through the pixel port (signed samples,
// address row * T + column) while idle. rd_addr/rd_data is a combinational
// read port for whoever collects the subbands afterwards.
//
// Follows the published architecture: a lifting-based DWT feeding the coders.
// Own choices: the (5,3) filter, a single time-shared lifting unit, in-place
// storage and symmetric extension.
module dwt53 #(
  parameter int unsigned T      = 128,   // tile width and height
  parameter int unsigned LEVELS = 5,     // decomposition levels
  parameter int unsigned W      = 16,    // sample width
  localparam int unsigned AW    = $clog2(T * T),
  localparam int unsigned LW    = $clog2(LEVELS + 1),
  localparam int unsigned IW    = $clog2(T + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // tile load
  input  logic                pix_we,
  input  logic [AW-1:0]       pix_addr,
  input  logic signed [W-1:0] pix_data,
  // level control
  input  logic                start,
  input  logic [LW-1:0]       level,
  output logic                busy,
  output logic                done,
  // coefficient read port
  input  logic [AW-1:0]       rd_addr,
  output logic signed [W-1:0] rd_data
);

  typedef enum logic [2:0] {D_IDLE, D_LOAD, D_PRED, D_UPD, D_STORE} dwt_state_t;

  dwt_state_t         state;
  logic signed [W-1:0] mem [T*T];
  logic signed [W-1:0] lb  [T];
  logic                col_phase;     // 0: rows, 1: columns
  logic [IW-1:0]       size;          // S
  logic [IW-1:0]       line;          // row or column being transformed
  logic [IW-1:0]       idx;           // sample (or lifting pair) index
  logic [IW-1:0]       half;

  // address of sample i of the current line
  function automatic logic [AW-1:0] line_addr(input logic cp, input logic [IW-1:0] ln,
                                               input logic [IW-1:0] i);
    return cp ? AW'(i * T + ln) : AW'(ln * T + i);
  endfunction

  logic [AW-1:0]       mem_raddr, mem_waddr;
  logic                mem_we;
  logic signed [W-1:0] mem_wdata;
  logic signed [W-1:0] lift_a, lift_b, lift_t;   // neighbours and target
  logic signed [W+1:0] lift_sum, lift_res;

  assign half = size >> 1;

  // one lifting step: target + or - a shifted sum of two neighbours
  always_comb begin
    if (state == D_PRED) begin
      lift_t   = lb[2*idx+1];
      lift_a   = lb[2*idx];
      lift_b   = (idx == half - 1'b1) ? lb[2*idx] : lb[2*idx+2];
      lift_sum = (W+2)'(lift_a) + (W+2)'(lift_b);
      lift_res = (W+2)'(lift_t) - (lift_sum >>> 1);
    end else begin
      lift_t   = lb[2*idx];
      lift_a   = (idx == '0) ? lb[1] : lb[2*idx-1];
      lift_b   = lb[2*idx+1];
      lift_sum = (W+2)'(lift_a) + (W+2)'(lift_b) + (W+2)'(2);
      lift_res = (W+2)'(lift_t) + (lift_sum >>> 2);
    end
  end

  assign mem_raddr = line_addr(col_phase, line, idx);
  assign mem_waddr = pix_we && state == D_IDLE ? pix_addr : line_addr(col_phase, line, idx);
  assign mem_we    = (pix_we && state == D_IDLE) || state == D_STORE;
  assign mem_wdata = (state == D_STORE) ?
                     ((idx < half) ? lb[2*idx] : lb[2*(idx-half)+1]) : pix_data;

  always_ff @(posedge clk)
    if (mem_we) mem[mem_waddr] <= mem_wdata;

  assign rd_data = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (state == D_LOAD) lb[$clog2(T)'(idx)] <= mem[mem_raddr];
    else if (state == D_PRED) lb[2*idx+1] <= W'(lift_res);
    else if (state == D_UPD)  lb[2*idx]   <= W'(lift_res);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= D_IDLE;
      col_phase <= 1'b0;
      size      <= '0;
      line      <= '0;
      idx       <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        D_IDLE: if (start) begin
          size      <= IW'(T >> level);
          col_phase <= 1'b0;
          line      <= '0;
          idx       <= '0;
          state     <= D_LOAD;
        end
        D_LOAD: begin
          if (idx == size - 1'b1) begin idx <= '0; state <= D_PRED; end
          else idx <= idx + 1'b1;
        end
        D_PRED: begin
          if (idx == half - 1'b1) begin idx <= '0; state <= D_UPD; end
          else idx <= idx + 1'b1;
        end
        D_UPD: begin
          if (idx == half - 1'b1) begin idx <= '0; state <= D_STORE; end
          else idx <= idx + 1'b1;
        end
        D_STORE: begin
          if (idx == size - 1'b1) begin
            idx <= '0;
            if (line == size - 1'b1) begin
              line <= '0;
              if (col_phase) begin
                state <= D_IDLE;
                done  <= 1'b1;
              end else begin
                col_phase <= 1'b1;
                state     <= D_LOAD;
              end
            end else begin
              line  <= line + 1'b1;
              state <= D_LOAD;
            end
          end else idx <= idx + 1'b1;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  assign busy = (state != D_IDLE);

endmodule
