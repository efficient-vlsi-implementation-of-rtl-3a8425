// global_ctrl: global controller of the tile encoder.
//
// Sequences the wavelet transform and the three coding lanes (lane 0 = HL,
// lane 1 = LH, lane 2 = HH). For each decomposition level it
//   1. runs the transform on the current LL square,
//   2. copies the HL, LH and HH bands (h x h, h = T >> (level + 1)) from the
//      tile memory into the three subband memories, converting each
//      coefficient to sign-magnitude and ORing the magnitudes of a band to
//      find how many bit planes its code block needs,
//   3. initialises the three MQ coders and starts the three bit plane coders
//      in parallel, each on one h x h code block,
//   4. flushes each MQ coder once its bit plane coder is done and its CXD
//      buffer has drained, and waits for all three flushes.
// After the last level the LL band is copied into the HL subband memory and
// coded alone on lane 0 with the LL zero coding table. The copy moves one
// coefficient per cycle (3 h^2 cycles per level); the steps do not overlap.
// blk_planes reports the number of bit planes of each lane's current block,
// which a decoder needs along with the code bytes.
//
// Follows the published architecture: a global controller driving three
// BPC/BAC lanes for HL, LH and HH, with the last LL band coded on the HL
// lane. Own choices: non-overlapping phases, one code block per band, and
// the plane count from the OR of the magnitudes.
module global_ctrl
  import bpc_pkg::*;
#(
  parameter int unsigned T       = 128,
  parameter int unsigned LEVELS  = 5,
  parameter int unsigned N       = 64,
  parameter int unsigned STRIPES = 16,
  parameter int unsigned MAG_W   = 15,
  parameter int unsigned PLANE_W = 4,
  parameter int unsigned W       = 16,
  localparam int unsigned TAW    = $clog2(T * T),
  localparam int unsigned SAW    = $clog2(N * STRIPES),
  localparam int unsigned LW     = $clog2(LEVELS + 1),
  localparam int unsigned HW     = $clog2(T + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  // wavelet transform
  output logic                         dwt_start,
  output logic [LW-1:0]                dwt_level,
  input  logic                         dwt_done,
  output logic [TAW-1:0]               dwt_rd_addr,
  input  logic signed [W-1:0]          dwt_rd_data,
  // subband memory write port (shared address and data)
  output logic [2:0]                   sb_we,
  output logic [SAW-1:0]               sb_waddr,
  output logic [1:0]                   sb_wrow,
  output logic [MAG_W:0]               sb_wdata,
  // bit plane coders
  output logic [2:0]                   bpc_start,
  output subband_t                     bpc_subband [3],
  output logic [PLANE_W:0]             blk_planes [3],
  output logic [$clog2(N)-1:0]         cols_m1,
  output logic [$clog2(STRIPES+1)-1:0] stripes_m1,
  input  logic [2:0]                   bpc_done,
  // CXD buffers and MQ coders
  input  logic [2:0]                   fifo_empty,
  input  logic [2:0]                   mq_busy,
  output logic [2:0]                   mq_init,
  output logic [2:0]                   mq_flush,
  input  logic [2:0]                   mq_flush_done,
  // status
  output logic [LW-1:0]                level,
  output logic                         ll_phase
);

  typedef enum logic [2:0] {
    G_IDLE, G_DWT, G_DWT_WAIT, G_XFER, G_INIT, G_START, G_CODE, G_DONE
  } g_state_t;

  g_state_t      state;
  logic [HW-1:0] h;            // band size of this level
  logic [HW-1:0] x, y;         // position in the band
  logic [1:0]    band;         // 0 HL, 1 LH, 2 HH (LL in ll_phase)
  logic [2:0]    active;       // lanes coding in this step
  logic [2:0]    coded, flushed, finished;
  logic [MAG_W-1:0] mag_or [3];
  logic [HW-1:0] row0, col0;
  logic signed [W-1:0] coef;
  logic [MAG_W-1:0]    mag;

  // highest set bit + 1 of a magnitude OR
  function automatic logic [PLANE_W:0] planes_of(input logic [MAG_W-1:0] m);
    logic [PLANE_W:0] p;
    p = '0;
    for (int i = 0; i < MAG_W; i++) if (m[i]) p = (PLANE_W+1)'(i + 1);
    return p;
  endfunction

  always_comb begin
    if (ll_phase) begin
      row0 = '0; col0 = '0;
    end else begin
      unique case (band)
        2'd0:    begin row0 = '0; col0 = h;  end   // HL: top right
        2'd1:    begin row0 = h;  col0 = '0; end   // LH: bottom left
        default: begin row0 = h;  col0 = h;  end   // HH: bottom right
      endcase
    end
  end

  assign dwt_rd_addr = TAW'((int'(row0) + int'(y)) * int'(T) + int'(col0) + int'(x));
  assign coef        = dwt_rd_data;
  assign mag         = coef[W-1] ? MAG_W'(-coef) : MAG_W'(coef);
  assign sb_waddr    = SAW'((int'(y) >> 2) * int'(N) + int'(x));
  assign sb_wrow     = y[1:0];
  assign sb_wdata    = {coef[W-1], mag};
  assign sb_we       = (state == G_XFER) ? (3'b001 << band) : 3'b000;
  assign dwt_level   = level;
  assign dwt_start   = (state == G_DWT);
  assign cols_m1     = $bits(cols_m1)'(h - 1'b1);
  assign stripes_m1  = $bits(stripes_m1)'((h >> 2) - 1'b1);
  assign mq_init     = (state == G_INIT)  ? active : 3'b000;
  assign bpc_start   = (state == G_START) ? active : 3'b000;
  assign busy        = (state != G_IDLE);

  always_comb begin
    bpc_subband[0] = ll_phase ? SB_LL : SB_HL;
    bpc_subband[1] = SB_LH;
    bpc_subband[2] = SB_HH;
    for (int k = 0; k < 3; k++) blk_planes[k] = planes_of(mag_or[k]);
  end

  always_comb
    for (int k = 0; k < 3; k++)
      mq_flush[k] = (state == G_CODE) && active[k] && coded[k] && !flushed[k]
                    && fifo_empty[k] && !mq_busy[k];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= G_IDLE;
      level    <= '0;
      ll_phase <= 1'b0;
      h        <= '0;
      x        <= '0;
      y        <= '0;
      band     <= '0;
      active   <= '0;
      coded    <= '0;
      flushed  <= '0;
      finished <= '0;
      done     <= 1'b0;
      for (int k = 0; k < 3; k++) mag_or[k] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        G_IDLE: if (start) begin
          level    <= '0;
          ll_phase <= 1'b0;
          state    <= G_DWT;
        end
        G_DWT: begin
          h     <= HW'(T >> (level + 1'b1));
          state <= G_DWT_WAIT;
        end
        G_DWT_WAIT: if (dwt_done) begin
          x     <= '0;
          y     <= '0;
          band  <= '0;
          for (int k = 0; k < 3; k++) mag_or[k] <= '0;
          state <= G_XFER;
        end
        G_XFER: begin
          mag_or[band] <= mag_or[band] | mag;
          if (x == h - 1'b1) begin
            x <= '0;
            if (y == h - 1'b1) begin
              y <= '0;
              if (ll_phase || band == 2'd2) begin
                active <= ll_phase ? 3'b001 : 3'b111;
                state  <= G_INIT;
              end else band <= band + 1'b1;
            end else y <= y + 1'b1;
          end else x <= x + 1'b1;
        end
        G_INIT: begin
          coded    <= '0;
          flushed  <= '0;
          finished <= '0;
          state    <= G_START;
        end
        G_START: state <= G_CODE;
        G_CODE: begin
          coded    <= coded | bpc_done;
          flushed  <= flushed | mq_flush;
          finished <= finished | mq_flush_done;
          if ((finished & active) == active) begin
            if (ll_phase) begin
              ll_phase <= 1'b0;
              state    <= G_DONE;
            end else if (level == LW'(LEVELS - 1)) begin
              ll_phase <= 1'b1;
              x        <= '0;
              y        <= '0;
              band     <= '0;
              mag_or[0] <= '0;
              state    <= G_XFER;
            end else begin
              level <= level + 1'b1;
              state <= G_DWT;
            end
          end
        end
        G_DONE: begin
          done  <= 1'b1;
          state <= G_IDLE;
        end
        default: state <= G_IDLE;
      endcase
    end
  end

endmodule
