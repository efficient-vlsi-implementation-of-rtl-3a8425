// bpc_ctrl: 24-state controller of the bit plane coder.
//
// Walks a code block stripe by stripe. Each stripe (4 rows x N columns) is
// coded through all bit planes: the top plane with the clean up pass only,
// every lower plane with significance propagation (SP), magnitude refinement
// (MRP) and clean up (CP). Within a pass the columns are visited left to
// right and the four bits of a column top to bottom. The controller drives
// the register operations, the memory strobes, the counter and the select
// word of the context/data mux.
//
// Phases and states (numbers as in bpc_pkg::bpc_state_t):
//   initialisation 0 fill the v (and on the first plane chi) memories, one
//                    column per cycle, 1 reset registers, 2 read the first
//                    sigma/chi column, 3 initialisation shift, then 4/12/16
//                    by pass;
//   ZC and SC      4 read, 6 emit ZC, 7 emit SC, 8 set sigma and eta,
//                    9 set eta, 5 skip a bit;
//   MRC           12 read, 14 emit MR, 15 set sigma';
//   RLC           16 read, 17 emit run-length 0 and skip the column,
//                   18 emit run-length 1, 19/20 emit the zero index,
//                   21..23 shift up to the first '1', then SC (7);
//   termination   10 extra sigma shift, 11 write back and choose the next
//                   column, pass, plane or stripe; 13 stop (idle).
// Every bit costs one cycle when skipped, two when coded without becoming
// significant and three when it becomes significant (ZC, SC, set). A state
// that emits a pair (valid high) waits for ack, and does nothing until it
// arrives. Branch conditions that concern the next bit are taken from the
// next-cycle view of the registers (nxt_* inputs), so a decision is made in
// the same cycle as the shift or load that exposes that bit.
//
// Follows the published architecture: the 24 numbered states and what each
// one does. Own choices: state 13 as the idle/stop state, the column step
// done in state 11, decisions taken on next-cycle register views, and the
// valid/ack hold.
module bpc_ctrl
  import bpc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       num_planes_zero,
  input  logic       ack,
  // counter
  input  pass_t      pass,
  input  logic       first_plane,
  input  logic       last_row,
  input  logic       last_col,
  input  logic       last_bp,
  input  logic       last_stripe,
  // status from the registers
  input  logic       nxt_sig_x,
  input  logic       nxt_hood0,
  input  logic       nxt_rlc_c,
  input  logic       nxt_eta_x,
  input  logic       nxt_all0s,
  input  logic       v_x,
  input  logic [1:0] zi,
  // register operations
  output logic       reg_clr,
  output logic       sig_load, sig_shift, sig_upd, sig_ishift,
  output logic       eta_load, eta_shift, eta_upd,
  output logic       sgp_load, sgp_shift, sgp_upd,
  output logic       chi_load, chi_shift, chi_ishift,
  output logic       v_load, v_shift,
  // memory strobes
  output logic       fill,        // state 0: write v (chi, clear others) for column col
  output logic       rd_first,    // read column 0 of sigma/chi
  output logic       rd_col,      // read next sigma/chi column, current v/eta/sigma'
  output logic       wr_sig, wr_eta, wr_sgp,
  // counter strobes
  output logic       init_block, init_stripe, count_up, row_clr, col_up,
  output logic       col_clr, next_pass, next_stripe,
  // output pairs
  output cntrl_cx_t  cntrl_cx,
  output logic       busy,
  output logic       done,
  output bpc_state_t state
);

  bpc_state_t nstate;
  logic       rlc_cb, rlc_cb_set, rlc_cb_clr;
  logic       shift_all;

  // next state for the bit that follows a shift, by pass
  function automatic bpc_state_t next_bit(input pass_t p, input logic s,
                                          input logic h0, input logic e,
                                          input logic cb);
    unique case (p)
      PASS_SP:  return (!s && !h0)     ? S6_ZC  : S5_SKIP;
      PASS_MRP: return (s && !e)       ? S14_MR : S5_SKIP;
      default:  return ((!s && !e) || cb) ? S6_ZC : S5_SKIP;
    endcase
  endfunction

  function automatic bpc_state_t read_state(input pass_t p);
    unique case (p)
      PASS_SP:  return S4_RD_SP;
      PASS_MRP: return S12_RD_MR;
      default:  return S16_RD_CP;
    endcase
  endfunction

  always_comb begin
    nstate      = state;
    reg_clr     = 1'b0;
    shift_all   = 1'b0;
    sig_load    = 1'b0; sig_shift = 1'b0; sig_upd = 1'b0; sig_ishift = 1'b0;
    eta_load    = 1'b0; eta_upd   = 1'b0;
    sgp_load    = 1'b0; sgp_upd   = 1'b0;
    chi_load    = 1'b0; chi_ishift = 1'b0;
    v_load      = 1'b0;
    fill        = 1'b0; rd_first = 1'b0; rd_col = 1'b0;
    wr_sig      = 1'b0; wr_eta = 1'b0; wr_sgp = 1'b0;
    init_block  = 1'b0; init_stripe = 1'b0; count_up = 1'b0; row_clr = 1'b0;
    col_up      = 1'b0; col_clr = 1'b0; next_pass = 1'b0; next_stripe = 1'b0;
    cntrl_cx    = CX_NONE;
    rlc_cb_set  = 1'b0;
    rlc_cb_clr  = 1'b0;
    done        = 1'b0;

    unique case (state)
      S13_STOP: begin
        if (start) begin
          if (num_planes_zero) done = 1'b1;
          else begin
            init_block = 1'b1;
            nstate     = S0_FILL;
          end
        end
      end
      S0_FILL: begin
        fill = 1'b1;
        if (last_col) nstate = S1_RESET;
        else          col_up = 1'b1;
      end
      S1_RESET: begin
        reg_clr    = 1'b1;
        col_clr    = 1'b1;
        rlc_cb_clr = 1'b1;
        nstate     = S2_READ;
      end
      S2_READ: begin
        rd_first = 1'b1;
        sig_load = 1'b1;
        chi_load = 1'b1;
        nstate   = S3_ISHIFT;
      end
      S3_ISHIFT: begin
        sig_ishift = 1'b1;
        chi_ishift = 1'b1;
        nstate     = read_state(pass);
      end
      S4_RD_SP: begin
        rd_col   = 1'b1;
        sig_load = 1'b1;
        chi_load = 1'b1;
        v_load   = 1'b1;
        nstate   = next_bit(PASS_SP, nxt_sig_x, nxt_hood0, 1'b0, 1'b0);
      end
      S12_RD_MR: begin
        rd_col   = 1'b1;
        sig_load = 1'b1;
        chi_load = 1'b1;
        v_load   = 1'b1;
        eta_load = 1'b1;
        sgp_load = 1'b1;
        nstate   = next_bit(PASS_MRP, nxt_sig_x, nxt_hood0, nxt_eta_x, 1'b0);
      end
      S16_RD_CP: begin
        rd_col   = 1'b1;
        sig_load = 1'b1;
        chi_load = 1'b1;
        v_load   = 1'b1;
        eta_load = 1'b1;
        if (!nxt_sig_x && !nxt_eta_x) begin
          if (!nxt_rlc_c)     nstate = S6_ZC;
          else if (nxt_all0s) nstate = S17_RL0;
          else                nstate = S18_RL1;
        end else              nstate = S5_SKIP;
      end
      S5_SKIP, S8_SETSIG, S9_SETETA, S15_SETSIGP: begin
        shift_all = 1'b1;
        count_up  = 1'b1;
        sig_upd   = (state == S8_SETSIG);
        eta_upd   = (state == S8_SETSIG) || (state == S9_SETETA);
        sgp_upd   = (state == S15_SETSIGP);
        if (last_row) nstate = S10_XSHIFT;
        else          nstate = next_bit(pass, nxt_sig_x, nxt_hood0, nxt_eta_x, rlc_cb);
      end
      S6_ZC: begin
        cntrl_cx = CX_ZC;
        if (ack) nstate = v_x ? S7_SC : S9_SETETA;
      end
      S7_SC: begin
        cntrl_cx = CX_SC;
        if (ack) nstate = S8_SETSIG;
      end
      S14_MR: begin
        cntrl_cx = CX_MR;
        if (ack) nstate = S15_SETSIGP;
      end
      S17_RL0: begin
        cntrl_cx = CX_RL0;
        if (ack) begin
          sig_ishift = 1'b1;
          chi_ishift = 1'b1;
          row_clr    = 1'b1;
          nstate     = S11_WRITE;
        end
      end
      S18_RL1: begin
        cntrl_cx = CX_RL1;
        if (ack) nstate = S19_ZIMSB;
      end
      S19_ZIMSB: begin
        cntrl_cx = CX_ZIMSB;
        if (ack) nstate = S20_ZILSB;
      end
      S20_ZILSB: begin
        cntrl_cx = CX_ZILSB;
        if (ack) begin
          rlc_cb_set = 1'b1;
          unique case (zi)
            2'd0:    nstate = S7_SC;
            2'd1:    nstate = S23_ZSH1;
            2'd2:    nstate = S22_ZSH2;
            default: nstate = S21_ZSH3;
          endcase
        end
      end
      S21_ZSH3, S22_ZSH2, S23_ZSH1: begin
        shift_all = 1'b1;
        count_up  = 1'b1;
        nstate    = (state == S21_ZSH3) ? S22_ZSH2 :
                    (state == S22_ZSH2) ? S23_ZSH1 : S7_SC;
      end
      S10_XSHIFT: begin
        sig_shift = 1'b1;
        nstate    = S11_WRITE;
      end
      S11_WRITE: begin
        rlc_cb_clr = 1'b1;
        wr_sig     = (pass != PASS_MRP);
        wr_eta     = (pass == PASS_SP);
        wr_sgp     = (pass == PASS_MRP);
        if (!last_col) begin
          col_up = 1'b1;
          nstate = read_state(pass);
        end else if (pass == PASS_CP && last_bp) begin
          if (last_stripe) begin
            done   = 1'b1;
            nstate = S13_STOP;
          end else begin
            next_stripe = 1'b1;
            nstate      = S0_FILL;
          end
        end else if (pass == PASS_CP) begin
          next_pass = 1'b1;
          col_clr   = 1'b1;
          nstate    = S0_FILL;
        end else begin
          next_pass = 1'b1;
          nstate    = S1_RESET;
        end
      end
      default: nstate = S13_STOP;
    endcase
    sig_shift = sig_shift | shift_all;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S13_STOP;
      rlc_cb <= 1'b0;
    end else begin
      state <= nstate;
      if (rlc_cb_clr)      rlc_cb <= 1'b0;
      else if (rlc_cb_set) rlc_cb <= 1'b1;
    end
  end

  // shifts common to all registers; sigma also shifts alone in state 10
  always_comb begin
    eta_shift = shift_all;
    sgp_shift = shift_all;
    chi_shift = shift_all;
    v_shift   = shift_all;
  end

  assign busy = (state != S13_STOP);

  // an emitted pair is held until it is acknowledged
  property p_hold_pair;
    @(posedge clk) disable iff (!rst_n)
      (cntrl_cx != CX_NONE && !ack) |=> (state == $past(state));
  endproperty
  a_hold_pair: assert property (p_hold_pair);

endmodule
