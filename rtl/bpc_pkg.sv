// bpc_pkg: types and constants shared by the bit plane coder, the MQ coder and
// the system top.
//
// Context numbering follows the coder's own 19-context scheme: zero coding 0-8,
// sign coding 9-13, magnitude refinement 14-16, run length 17, zero index
// (uniform) 18. The mux select codes are the 3-bit cntrl_cx words of the
// context/data multiplexer. The state numbers of the 24-state controller are
// kept as the enum values so that a waveform shows the same numbers as the
// state charts described in the README.
//
// Follows the published architecture: the context numbering (0-18), the pass
// names and the mux select codes. Own choice: the MQ table entry layout.
package bpc_pkg;

  // coding pass being performed
  typedef enum logic [1:0] {
    PASS_SP  = 2'd0,   // significance propagation
    PASS_MRP = 2'd1,   // magnitude refinement
    PASS_CP  = 2'd2    // clean up
  } pass_t;

  // subband of the code block: selects the zero coding table
  typedef enum logic [1:0] {
    SB_LL = 2'd0,
    SB_HL = 2'd1,
    SB_LH = 2'd2,
    SB_HH = 2'd3
  } subband_t;

  // select word of the context and data mux
  typedef enum logic [2:0] {
    CX_NONE  = 3'b000,
    CX_ZC    = 3'b001,
    CX_SC    = 3'b010,
    CX_MR    = 3'b011,
    CX_RL0   = 3'b100,
    CX_RL1   = 3'b101,
    CX_ZIMSB = 3'b110,
    CX_ZILSB = 3'b111
  } cntrl_cx_t;

  localparam logic [4:0] CTX_RL  = 5'd17;
  localparam logic [4:0] CTX_UNI = 5'd18;
  localparam int unsigned NUM_CTX = 19;

  // 24 states of the bit plane coder controller
  typedef enum logic [4:0] {
    S0_FILL     = 5'd0,   // fill v (and chi, first plane) MEMs from subband MEM
    S1_RESET    = 5'd1,   // reset registers and address pointers
    S2_READ     = 5'd2,   // read first column of sigma and chi
    S3_ISHIFT   = 5'd3,   // initialisation shift
    S4_RD_SP    = 5'd4,   // column read for significance pass
    S5_SKIP     = 5'd5,   // shift registers, count up (bit not coded)
    S6_ZC       = 5'd6,   // emit zero coding pair
    S7_SC       = 5'd7,   // emit sign coding pair
    S8_SETSIG   = 5'd8,   // shift, set eta and sigma, count up
    S9_SETETA   = 5'd9,   // shift, set eta, count up
    S10_XSHIFT  = 5'd10,  // extra shift of sigma at end of column
    S11_WRITE   = 5'd11,  // write back state bits, choose next column/pass/plane
    S12_RD_MR   = 5'd12,  // column read for refinement pass
    S13_STOP    = 5'd13,  // idle / stop
    S14_MR      = 5'd14,  // emit magnitude refinement pair
    S15_SETSIGP = 5'd15,  // shift, set sigma', count up
    S16_RD_CP   = 5'd16,  // column read for clean up pass
    S17_RL0     = 5'd17,  // emit run length 0, Ishift
    S18_RL1     = 5'd18,  // emit run length 1
    S19_ZIMSB   = 5'd19,  // emit zero index MSB
    S20_ZILSB   = 5'd20,  // emit zero index LSB, set RLC_cb
    S21_ZSH3    = 5'd21,  // zero index shifts (3 left)
    S22_ZSH2    = 5'd22,  // zero index shifts (2 left)
    S23_ZSH1    = 5'd23   // zero index shifts (1 left)
  } bpc_state_t;

  // MQ coder probability estimation table entry
  typedef struct packed {
    logic [15:0] qe;
    logic [5:0]  nmps;
    logic [5:0]  nlps;
    logic        sw;
  } mq_entry_t;

  // MQ coder probability state table (JPEG2000): Qe, next index after an
  // MPS, next index after an LPS, MPS switch flag.
  function automatic mq_entry_t qe_rom(input logic [5:0] i);
    unique case (i)
      6'd0:  return '{16'h5601, 6'd1,  6'd1,  1'b1};
      6'd1:  return '{16'h3401, 6'd2,  6'd6,  1'b0};
      6'd2:  return '{16'h1801, 6'd3,  6'd9,  1'b0};
      6'd3:  return '{16'h0AC1, 6'd4,  6'd12, 1'b0};
      6'd4:  return '{16'h0521, 6'd5,  6'd29, 1'b0};
      6'd5:  return '{16'h0221, 6'd38, 6'd33, 1'b0};
      6'd6:  return '{16'h5601, 6'd7,  6'd6,  1'b1};
      6'd7:  return '{16'h5401, 6'd8,  6'd14, 1'b0};
      6'd8:  return '{16'h4801, 6'd9,  6'd14, 1'b0};
      6'd9:  return '{16'h3801, 6'd10, 6'd14, 1'b0};
      6'd10: return '{16'h3001, 6'd11, 6'd17, 1'b0};
      6'd11: return '{16'h2401, 6'd12, 6'd18, 1'b0};
      6'd12: return '{16'h1C01, 6'd13, 6'd20, 1'b0};
      6'd13: return '{16'h1601, 6'd29, 6'd21, 1'b0};
      6'd14: return '{16'h5601, 6'd15, 6'd14, 1'b1};
      6'd15: return '{16'h5401, 6'd16, 6'd14, 1'b0};
      6'd16: return '{16'h5101, 6'd17, 6'd15, 1'b0};
      6'd17: return '{16'h4801, 6'd18, 6'd16, 1'b0};
      6'd18: return '{16'h3801, 6'd19, 6'd17, 1'b0};
      6'd19: return '{16'h3401, 6'd20, 6'd18, 1'b0};
      6'd20: return '{16'h3001, 6'd21, 6'd19, 1'b0};
      6'd21: return '{16'h2801, 6'd22, 6'd19, 1'b0};
      6'd22: return '{16'h2401, 6'd23, 6'd20, 1'b0};
      6'd23: return '{16'h2201, 6'd24, 6'd21, 1'b0};
      6'd24: return '{16'h1C01, 6'd25, 6'd22, 1'b0};
      6'd25: return '{16'h1801, 6'd26, 6'd23, 1'b0};
      6'd26: return '{16'h1601, 6'd27, 6'd24, 1'b0};
      6'd27: return '{16'h1401, 6'd28, 6'd25, 1'b0};
      6'd28: return '{16'h1201, 6'd29, 6'd26, 1'b0};
      6'd29: return '{16'h1101, 6'd30, 6'd27, 1'b0};
      6'd30: return '{16'h0AC1, 6'd31, 6'd28, 1'b0};
      6'd31: return '{16'h09C1, 6'd32, 6'd29, 1'b0};
      6'd32: return '{16'h08A1, 6'd33, 6'd30, 1'b0};
      6'd33: return '{16'h0521, 6'd34, 6'd31, 1'b0};
      6'd34: return '{16'h0441, 6'd35, 6'd32, 1'b0};
      6'd35: return '{16'h02A1, 6'd36, 6'd33, 1'b0};
      6'd36: return '{16'h0221, 6'd37, 6'd34, 1'b0};
      6'd37: return '{16'h0141, 6'd38, 6'd35, 1'b0};
      6'd38: return '{16'h0111, 6'd39, 6'd36, 1'b0};
      6'd39: return '{16'h0085, 6'd40, 6'd37, 1'b0};
      6'd40: return '{16'h0049, 6'd41, 6'd38, 1'b0};
      6'd41: return '{16'h0025, 6'd42, 6'd39, 1'b0};
      6'd42: return '{16'h0015, 6'd43, 6'd40, 1'b0};
      6'd43: return '{16'h0009, 6'd44, 6'd41, 1'b0};
      6'd44: return '{16'h0005, 6'd45, 6'd42, 1'b0};
      6'd45: return '{16'h0001, 6'd45, 6'd43, 1'b0};
      default: return '{16'h5601, 6'd46, 6'd46, 1'b0};
    endcase
  endfunction

endpackage
