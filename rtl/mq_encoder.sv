// mq_encoder: MQ binary arithmetic coder (the BAC of one coding lane).
//
// Codes the context/data pairs of one code block into a byte stream. Two
// look-up tables hold the statistics: a 19-entry context table (probability
// state index I and most probable symbol MPS per context) and the 47-entry
// probability table (Qe, next index after MPS and LPS, MPS switch flag). The
// datapath is the interval register A (16 bits), the code register C (28
// bits, bit 27 catches the carry), the shift counter CT and the byte buffer B.
// The algorithm is the MQ coder of JPEG2000 (CODEMPS, CODELPS, RENORME,
// BYTEOUT with bit stuffing after 0xFF, FLUSH); the state sequencing is this
// design's: one symbol per cycle when no renormalisation is needed, one extra
// cycle per renormalisation shift and one per byte output.
//
// Interface: pulse init before a code block (contexts to their initial
// states, A = 0x8000, C = 0, CT = 12). A pair is taken when in_valid and
// in_ready are both high. Pulse flush after the last pair; out_valid/out_byte
// deliver the code bytes (no back-pressure) and flush_done pulses after the
// last byte. The byte buffer starts with a dummy byte that is never sent.
// Initial context states: context 0 -> 4, run length 17 -> 3, uniform
// 18 -> 46, all others 0.
//
// Follows the JPEG2000 MQ coder definition (tables, renormalisation, bit
// stuffing, flush), which the published architecture uses without detailing.
// Own choice: the state split of the controller.
module mq_encoder
  import bpc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic       in_valid,
  input  logic [4:0] in_cx,
  input  logic       in_d,
  output logic       in_ready,
  input  logic       flush,
  output logic       out_valid,
  output logic [7:0] out_byte,
  output logic       flush_done,
  output logic       busy
);

  typedef enum logic [2:0] {
    M_IDLE, M_CODE, M_RENORM, M_BYTEOUT, M_FLUSH_SET, M_FLUSH_SH, M_FLUSH_END
  } mq_state_t;

  mq_state_t  state;
  logic [5:0] ctx_i   [NUM_CTX];
  logic       ctx_mps [NUM_CTX];
  logic [15:0] a;
  logic [27:0] c;
  logic [3:0]  ct;
  logic [7:0]  b;
  logic        first;       // B still holds the dummy byte
  logic        flushing;    // byte outputs belong to the flush sequence
  logic        flush_sh2;   // second flush shift pending
  logic [4:0]  cur_cx;
  logic        cur_d;

  mq_entry_t   ent;
  logic [15:0] a_sub;
  logic [7:0]  b_inc;

  assign ent   = qe_rom(ctx_i[cur_cx]);
  assign a_sub = a - ent.qe;
  assign b_inc = b + 8'd1;
  assign in_ready = (state == M_IDLE) && !init && !flush;
  assign busy     = (state != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= M_IDLE;
      a          <= 16'h8000;
      c          <= '0;
      ct         <= 4'd12;
      b          <= '0;
      first      <= 1'b1;
      flushing   <= 1'b0;
      flush_sh2  <= 1'b0;
      cur_cx     <= '0;
      cur_d      <= 1'b0;
      out_valid  <= 1'b0;
      out_byte   <= '0;
      flush_done <= 1'b0;
      for (int k = 0; k < NUM_CTX; k++) begin
        ctx_i[k]   <= '0;
        ctx_mps[k] <= 1'b0;
      end
    end else begin
      out_valid  <= 1'b0;
      flush_done <= 1'b0;
      unique case (state)
        M_IDLE: begin
          if (init) begin
            a        <= 16'h8000;
            c        <= '0;
            ct       <= 4'd12;
            b        <= '0;
            first    <= 1'b1;
            flushing <= 1'b0;
            for (int k = 0; k < NUM_CTX; k++) begin
              ctx_i[k]   <= (k == 0) ? 6'd4 : (k == 17) ? 6'd3 : (k == 18) ? 6'd46 : 6'd0;
              ctx_mps[k] <= 1'b0;
            end
          end else if (flush) begin
            state <= M_FLUSH_SET;
          end else if (in_valid) begin
            cur_cx <= in_cx;
            cur_d  <= in_d;
            state  <= M_CODE;
          end
        end
        M_CODE: begin
          if (cur_d == ctx_mps[cur_cx]) begin
            // CODEMPS
            if (a_sub[15]) begin
              a     <= a_sub;
              c     <= c + 28'(ent.qe);
              state <= M_IDLE;
            end else begin
              if (a_sub < ent.qe) a <= ent.qe;
              else begin
                a <= a_sub;
                c <= c + 28'(ent.qe);
              end
              ctx_i[cur_cx] <= ent.nmps;
              state <= M_RENORM;
            end
          end else begin
            // CODELPS
            if (a_sub < ent.qe) begin
              a <= a_sub;
              c <= c + 28'(ent.qe);
            end else a <= ent.qe;
            if (ent.sw) ctx_mps[cur_cx] <= ~ctx_mps[cur_cx];
            ctx_i[cur_cx] <= ent.nlps;
            state <= M_RENORM;
          end
        end
        M_RENORM: begin
          // one RENORME iteration per cycle
          a  <= {a[14:0], 1'b0};
          c  <= {c[26:0], 1'b0};
          ct <= ct - 4'd1;
          if (ct == 4'd1)   state <= M_BYTEOUT;
          else if (a[14])   state <= M_IDLE;
        end
        M_BYTEOUT: begin
          if (b == 8'hFF) begin
            out_valid <= !first;
            out_byte  <= b;
            b  <= c[27:20];
            c  <= {8'd0, c[19:0]};
            ct <= 4'd7;
          end else if (!c[27]) begin
            out_valid <= !first;
            out_byte  <= b;
            b  <= c[26:19];
            c  <= {9'd0, c[18:0]};
            ct <= 4'd8;
          end else if (b_inc == 8'hFF) begin
            out_valid <= !first;
            out_byte  <= b_inc;
            b  <= {1'b0, c[26:20]};
            c  <= {8'd0, c[19:0]};
            ct <= 4'd7;
          end else begin
            out_valid <= !first;
            out_byte  <= b_inc;
            b  <= c[26:19];
            c  <= {9'd0, c[18:0]};
            ct <= 4'd8;
          end
          first <= 1'b0;
          if (flushing) state <= flush_sh2 ? M_FLUSH_SH : M_FLUSH_END;
          else if (a[15]) state <= M_IDLE;
          else            state <= M_RENORM;
        end
        M_FLUSH_SET: begin
          // SETBITS, then C <<= CT and the first flush byte
          flushing  <= 1'b1;
          flush_sh2 <= 1'b1;
          if ((c | 28'hFFFF) >= (c + 28'(a)))
            c <= ((c | 28'hFFFF) - 28'h8000) << ct;
          else
            c <= (c | 28'hFFFF) << ct;
          state <= M_BYTEOUT;
        end
        M_FLUSH_SH: begin
          flush_sh2 <= 1'b0;
          c         <= c << ct;
          state     <= M_BYTEOUT;
        end
        M_FLUSH_END: begin
          out_valid  <= (b != 8'hFF) && !first;
          out_byte   <= b;
          flush_done <= 1'b1;
          flushing   <= 1'b0;
          state      <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

endmodule
