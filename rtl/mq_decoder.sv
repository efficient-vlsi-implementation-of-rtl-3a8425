// mq_decoder: MQ binary arithmetic decoder (the BAC of a decoding lane).
//
// Turns the byte stream of one code block back into the decisions of a
// sequence of contexts. It keeps the same two tables as the encoder (19
// context states and the shared 47-entry probability table qe_rom) and a
// datapath of the interval register A (16 bits), the code register C (32
// bits, the upper half is compared with Qe), the bit counter CT and the last
// byte read B. The algorithm is the MQ decoder of JPEG2000: INITDEC, DECODE
// with the MPS/LPS conditional exchange, RENORMD, and BYTEIN, which after a
// 0xFF byte either takes the next byte as 7 stuffed bits or, when that byte
// is above 0x8F (a marker or the end of the data), feeds 1 bits without
// consuming it.
//
// Interface: pulse init at the start of a code block; the decoder then reads
// its first two bytes. Bytes arrive on bin_valid/bin_byte and are consumed
// when bin_ready is high in the same cycle; the head byte is also inspected
// without being consumed after a 0xFF. After the last byte of a code block
// the source must present 0xFF (any value above 0x8F) until the block has
// been decoded. A decision is requested by holding in_valid with in_cx until
// in_ready; the result appears on out_d with out_valid high for one cycle.
//
// Timing: one cycle per decision when no renormalisation is needed, plus one
// cycle per renormalisation shift and one per byte read; initialisation
// takes two cycles once bytes are available.
//
// Follows the published architecture in that the decoder pairs with the
// bit plane decoder and uses the same tables and a 16-bit datapath; the
// algorithm is the one of the JPEG2000 standard. Own choice: the state
// split of the controller and the byte and decision handshakes.
module mq_decoder
  import bpc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic       bin_valid,
  input  logic [7:0] bin_byte,
  output logic       bin_ready,
  input  logic       in_valid,
  input  logic [4:0] in_cx,
  output logic       in_ready,
  output logic       out_valid,
  output logic       out_d,
  output logic       busy
);

  typedef enum logic [2:0] {
    Q_IDLE, Q_INIT_B, Q_INIT_IN, Q_READY, Q_RENORM
  } mqd_state_t;

  mqd_state_t  state;
  logic [5:0]  ctx_i   [NUM_CTX];
  logic        ctx_mps [NUM_CTX];
  logic [15:0] a;
  logic [31:0] c;
  logic [3:0]  ct;
  logic [7:0]  b;

  // BYTEIN on the current byte buffer and the head of the byte stream
  logic [31:0] bi_c;
  logic [3:0]  bi_ct;
  logic        bi_take;
  always_comb begin
    bi_take = 1'b1;
    if (b == 8'hFF) begin
      if (bin_byte > 8'h8F) begin
        bi_c    = c + 32'hFF00;
        bi_ct   = 4'd8;
        bi_take = 1'b0;
      end else begin
        bi_c  = c + {15'b0, bin_byte, 9'b0};
        bi_ct = 4'd7;
      end
    end else begin
      bi_c  = c + {16'b0, bin_byte, 8'b0};
      bi_ct = 4'd8;
    end
  end

  // DECODE for the requested context
  mq_entry_t   ent;
  logic [15:0] a_sub;
  logic        lps_path, exch_lps, dec_d, dec_renorm;
  assign ent      = qe_rom(ctx_i[in_cx]);
  assign a_sub    = a - ent.qe;
  assign lps_path = (c[31:16] < ent.qe);
  always_comb begin
    if (lps_path) begin
      exch_lps   = !(a_sub < ent.qe);   // LPS exchange: the LPS wins unless A < Qe
      dec_renorm = 1'b1;
    end else begin
      exch_lps   = !a_sub[15] && (a_sub < ent.qe);
      dec_renorm = !a_sub[15];
    end
    dec_d = exch_lps ? !ctx_mps[in_cx] : ctx_mps[in_cx];
  end

  assign in_ready  = (state == Q_READY);
  assign busy      = (state != Q_IDLE);
  assign bin_ready = bin_valid && ((state == Q_INIT_B) ||
                     (((state == Q_INIT_IN) || (state == Q_RENORM && ct == 4'd0)) && bi_take));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= Q_IDLE;
      a         <= 16'h8000;
      c         <= '0;
      ct        <= '0;
      b         <= '0;
      out_valid <= 1'b0;
      out_d     <= 1'b0;
      for (int k = 0; k < NUM_CTX; k++) begin
        ctx_i[k]   <= '0;
        ctx_mps[k] <= 1'b0;
      end
    end else begin
      out_valid <= 1'b0;
      if (init) begin
        state <= Q_INIT_B;
        for (int k = 0; k < NUM_CTX; k++) begin
          ctx_i[k]   <= (k == 0) ? 6'd4 : (k == int'(CTX_RL)) ? 6'd3 : (k == int'(CTX_UNI)) ? 6'd46 : 6'd0;
          ctx_mps[k] <= 1'b0;
        end
      end else begin
        unique case (state)
          Q_INIT_B: if (bin_valid) begin
            b     <= bin_byte;
            c     <= {8'b0, bin_byte, 16'b0};
            state <= Q_INIT_IN;
          end
          Q_INIT_IN: if (bin_valid) begin
            if (bi_take) b <= bin_byte;
            c     <= bi_c << 7;
            ct    <= bi_ct - 4'd7;
            a     <= 16'h8000;
            state <= Q_READY;
          end
          Q_READY: if (in_valid) begin
            out_d <= dec_d;
            if (lps_path) a <= ent.qe;
            else begin
              a         <= a_sub;
              c[31:16]  <= c[31:16] - ent.qe;
            end
            if (exch_lps) begin
              if (ent.sw) ctx_mps[in_cx] <= !ctx_mps[in_cx];
              ctx_i[in_cx] <= ent.nlps;
            end else if (dec_renorm) begin
              ctx_i[in_cx] <= ent.nmps;
            end
            if (dec_renorm) state <= Q_RENORM;
            else            out_valid <= 1'b1;
          end
          Q_RENORM: begin
            if (ct == 4'd0) begin
              if (bin_valid) begin
                if (bi_take) b <= bin_byte;
                c  <= bi_c;
                ct <= bi_ct;
              end
            end else begin
              a  <= a << 1;
              c  <= c << 1;
              ct <= ct - 4'd1;
              if (a[14]) begin
                out_valid <= 1'b1;
                state     <= Q_READY;
              end
            end
          end
          default: ;
        endcase
      end
    end
  end

  a_hold_cx: assert property (@(posedge clk) disable iff (!rst_n)
                              in_valid && !in_ready |=> in_valid);

endmodule
