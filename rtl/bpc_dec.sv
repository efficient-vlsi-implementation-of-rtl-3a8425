// bpc_dec: EBCOT bit plane decoder.
//
// The inverse of bpc: it asks an MQ decoder for one decision at a time and
// rebuilds the sign-magnitude coefficients of a code block. It follows the
// encoder's coding order exactly (stripe by stripe, every stripe through all
// planes: clean up only on the top plane, then SP, MRP, CP; columns left to
// right, rows top to bottom; neighbours outside the stripe or the block are
// insignificant), and it uses the same context blocks (zc_ctx, sc_ctx,
// mrc_ctx), so the context it requests is the one the encoder used.
//
// The decoder differs from the encoder where the data must now be decided:
//   - after a zero coding decision, the sign is requested only if the
//     decoded bit was 1;
//   - after the run-length context 17, a 0 skips the column and a 1 is
//     followed by the two zero-index bits, which arrive one at a time
//     (context 18 twice); the bit at that row is then 1 and its sign follows;
//   - decoded magnitude bits and signs are written into the magnitude and
//     sign state, and the sign bit is the decoded bit XOR the predicted sign.
// The state of one stripe (sigma, eta, sigma', sign as N x 4 bit arrays and
// the magnitudes as an N x 4 array) is kept in registers and indexed by the
// column and row counters; this is the simplest structure that decodes one
// decision at a time, not the shift-register scheme of the encoder.
//
// Interface: pulse start with subband, num_planes and the block size stable;
// busy until done pulses. A context is offered on cx with cx_valid and held
// until cx_ready; the decision comes back on d with d_valid (one cycle). At
// the end of each stripe the stripe's coefficients are written out on
// wr_en/wr_addr (stripe * N + column)/wr_row/wr_data ({sign, magnitude}), one
// per cycle, in the format of subband_mem's write port.
//
// Timing: two cycles per position that needs no decision, plus the
// request/answer handshake of each decision; 4 * N cycles per stripe to write
// the coefficients out.
//
// Follows the published architecture: the decoder mirrors the encoder,
// obtains the zero-index bits one at a time and writes the magnitude and sign
// data out. Own choices: the register-array state and the write-out port.
module bpc_dec
  import bpc_pkg::*;
#(
  parameter int unsigned N       = 64,  // columns of the code block
  parameter int unsigned STRIPES = 16,  // stripes of four rows
  parameter int unsigned MAG_W   = 15,  // magnitude bits of a coefficient
  parameter int unsigned PLANE_W = 4,   // width of a bit plane index
  localparam int unsigned CW     = $clog2(N),
  localparam int unsigned SW     = $clog2(STRIPES + 1),
  localparam int unsigned AW     = $clog2(N * STRIPES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  subband_t         subband,
  input  logic [PLANE_W:0] num_planes,
  input  logic [CW-1:0]    cols_m1,     // block width - 1
  input  logic [SW-1:0]    stripes_m1,  // block height / 4 - 1
  output logic             cx_valid,
  output logic [4:0]       cx,
  input  logic             cx_ready,
  input  logic             d_valid,
  input  logic             d,
  output logic             wr_en,
  output logic [AW-1:0]    wr_addr,
  output logic [1:0]       wr_row,
  output logic [MAG_W:0]   wr_data,
  output logic             busy,
  output logic             done
);

  typedef enum logic [3:0] {
    B_IDLE, B_STRIPE, B_VISIT, B_SCCALC, B_REQ, B_WAIT, B_NEXT, B_DUMP, B_DONE
  } dstate_t;
  typedef enum logic [2:0] { K_ZC, K_SC, K_MR, K_RL, K_ZI1, K_ZI0 } kind_t;

  dstate_t state;
  kind_t   kind;
  logic [3:0]       sig [N];
  logic [3:0]       eta [N];
  logic [3:0]       sgp [N];
  logic [3:0]       chi [N];
  logic [MAG_W-1:0] mag [N][4];
  logic [CW-1:0]    col;
  logic [1:0]       row;
  logic [SW-1:0]    stripe;
  pass_t            pass;
  logic [PLANE_W-1:0] bp;
  logic [4:0]       cx_r;
  logic             zi_msb;
  logic             xbit_r;

  // ---------------------------------------------------------- neighbours
  function automatic logic at(input logic [3:0] a [N], input int c, input int r);
    if (c < 0 || c >= int'(N) || r < 0 || r > 3) return 1'b0;
    return a[c][r];
  endfunction

  logic nh0, nh1, nv0, nv1, nd0, nd1, nd2, nd3, hood0, win0;
  logic ch0, ch1, cv0, cv1;
  always_comb begin
    int c, r;
    c = int'(col);
    r = int'(row);
    nh0 = at(sig, c - 1, r);     nh1 = at(sig, c + 1, r);
    nv0 = at(sig, c, r - 1);     nv1 = at(sig, c, r + 1);
    nd0 = at(sig, c - 1, r - 1); nd1 = at(sig, c - 1, r + 1);
    nd2 = at(sig, c + 1, r + 1); nd3 = at(sig, c + 1, r - 1);
    ch0 = at(chi, c - 1, r);     ch1 = at(chi, c + 1, r);
    cv0 = at(chi, c, r - 1);     cv1 = at(chi, c, r + 1);
    hood0 = !(nh0 | nh1 | nv0 | nv1 | nd0 | nd1 | nd2 | nd3);
    win0  = (sig[col] == 4'b0) && (col == '0 || sig[col - 1'b1] == 4'b0) &&
            (int'(col) == int'(N) - 1 || sig[col + 1'b1] == 4'b0);
  end

  logic [4:0] zc_cx, sc_cx, mr_cx;
  logic       zc_d_unused, sc_xbit, mr_d_unused;
  zc_ctx u_zc (.subband, .h0(nh0), .h1(nh1), .v0(nv0), .v1(nv1),
               .d0(nd0), .d1(nd1), .d2(nd2), .d3(nd3), .mag(1'b0), .cx(zc_cx), .d(zc_d_unused));
  // with the own sign at 0 the data output is the predicted-sign bit
  sc_ctx u_sc (.sig_h0(nh0), .sig_h1(nh1), .sig_v0(nv0), .sig_v1(nv1),
               .chi_h0(ch0), .chi_h1(ch1), .chi_v0(cv0), .chi_v1(cv1), .chi(1'b0),
               .cx(sc_cx), .d(sc_xbit));
  mrc_ctx u_mr (.sigp(sgp[col][row]), .hood0, .mag(1'b0), .cx(mr_cx), .d(mr_d_unused));

  logic cur_sig, cur_eta;
  assign cur_sig = sig[col][row];
  assign cur_eta = eta[col][row];

  assign cx_valid = (state == B_REQ);
  assign cx       = cx_r;
  assign busy     = (state != B_IDLE);
  assign wr_en    = (state == B_DUMP);
  assign wr_addr  = AW'(int'(stripe) * int'(N) + int'(col));
  assign wr_row   = row;
  assign wr_data  = {chi[col][row], mag[col][row]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= B_IDLE;
      kind   <= K_ZC;
      col    <= '0;
      row    <= '0;
      stripe <= '0;
      pass   <= PASS_CP;
      bp     <= '0;
      cx_r   <= '0;
      zi_msb <= 1'b0;
      xbit_r <= 1'b0;
      done   <= 1'b0;
      for (int c = 0; c < int'(N); c++) begin
        sig[c] <= '0; eta[c] <= '0; sgp[c] <= '0; chi[c] <= '0;
        for (int r = 0; r < 4; r++) mag[c][r] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        B_IDLE: if (start) begin
          stripe <= '0;
          state  <= B_STRIPE;
        end
        B_STRIPE: begin
          for (int c = 0; c < int'(N); c++) begin
            sig[c] <= '0; eta[c] <= '0; sgp[c] <= '0; chi[c] <= '0;
            for (int r = 0; r < 4; r++) mag[c][r] <= '0;
          end
          col   <= '0;
          row   <= '0;
          pass  <= PASS_CP;
          bp    <= PLANE_W'(num_planes - 1'b1);
          state <= (num_planes == '0) ? B_DUMP : B_VISIT;
        end
        B_VISIT: begin
          state <= B_NEXT;
          unique case (pass)
            PASS_SP: if (!cur_sig && !hood0) begin
              kind <= K_ZC; cx_r <= zc_cx; state <= B_REQ;
            end
            PASS_MRP: if (cur_sig && !cur_eta) begin
              kind <= K_MR; cx_r <= mr_cx; state <= B_REQ;
            end
            default: if (row == 2'd0 && !eta[col][0] && win0) begin
              kind <= K_RL; cx_r <= CTX_RL; state <= B_REQ;
            end else if (!cur_sig && !cur_eta) begin
              kind <= K_ZC; cx_r <= zc_cx; state <= B_REQ;
            end
          endcase
        end
        B_SCCALC: begin
          kind   <= K_SC;
          cx_r   <= sc_cx;
          xbit_r <= sc_xbit;
          state  <= B_REQ;
        end
        B_REQ: if (cx_ready) state <= B_WAIT;
        B_WAIT: if (d_valid) begin
          unique case (kind)
            K_ZC: begin
              eta[col][row] <= 1'b1;
              if (d) begin
                mag[col][row] <= mag[col][row] | (MAG_W'(1) << bp);
                state <= B_SCCALC;
              end else state <= B_NEXT;
            end
            K_SC: begin
              chi[col][row] <= d ^ xbit_r;
              sig[col][row] <= 1'b1;
              state <= B_NEXT;
            end
            K_MR: begin
              if (d) mag[col][row] <= mag[col][row] | (MAG_W'(1) << bp);
              sgp[col][row] <= 1'b1;
              state <= B_NEXT;
            end
            K_RL: begin
              if (d) begin
                kind  <= K_ZI1;
                cx_r  <= CTX_UNI;
                state <= B_REQ;
              end else begin
                row   <= 2'd3;            // skip the rest of the column
                state <= B_NEXT;
              end
            end
            K_ZI1: begin
              zi_msb <= d;
              kind   <= K_ZI0;
              cx_r   <= CTX_UNI;
              state  <= B_REQ;
            end
            default: begin                // K_ZI0: first 1 of the column
              row <= {zi_msb, d};
              mag[col][{zi_msb, d}] <= mag[col][{zi_msb, d}] | (MAG_W'(1) << bp);
              eta[col][{zi_msb, d}] <= 1'b1;
              state <= B_SCCALC;
            end
          endcase
        end
        B_NEXT: begin
          state <= B_VISIT;
          if (row != 2'd3) row <= row + 1'b1;
          else begin
            row <= '0;
            if (col != cols_m1) col <= col + 1'b1;
            else begin
              col <= '0;
              unique case (pass)
                PASS_SP:  pass <= PASS_MRP;
                PASS_MRP: pass <= PASS_CP;
                default: begin
                  for (int c = 0; c < int'(N); c++) eta[c] <= '0;
                  if (bp == '0) state <= B_DUMP;
                  else begin
                    bp   <= bp - 1'b1;
                    pass <= PASS_SP;
                  end
                end
              endcase
            end
          end
        end
        B_DUMP: begin
          if (row != 2'd3) row <= row + 1'b1;
          else begin
            row <= '0;
            if (col != cols_m1) col <= col + 1'b1;
            else begin
              col <= '0;
              if (stripe == stripes_m1) state <= B_DONE;
              else begin
                stripe <= stripe + 1'b1;
                state  <= B_STRIPE;
              end
            end
          end
        end
        default: begin                    // B_DONE
          done  <= 1'b1;
          state <= B_IDLE;
        end
      endcase
    end
  end

  a_hold_cx: assert property (@(posedge clk) disable iff (!rst_n)
                              cx_valid && !cx_ready |=> cx_valid && $stable(cx));

endmodule
