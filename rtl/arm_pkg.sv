// arm_pkg: shared types and constants of the ARM32 behavioural core.
// It holds the processor-mode encodings of the status register M[4:0]
// field, the condition-code and data-processing opcode encodings of the
// ARM instruction set, the status-register bit positions, the instruction
// classes produced by the decoder and the exception vectors. The mode
// encodings and status-register layout follow the reference paper; the vector
// addresses and the class list are the usual ARM architecture values and
// this design's own grouping.
package arm_pkg;

  // Processor modes, CPSR[4:0]
  typedef enum logic [4:0] {
    MODE_USR = 5'b10000,
    MODE_FIQ = 5'b10001,
    MODE_IRQ = 5'b10010,
    MODE_SVC = 5'b10011,
    MODE_ABT = 5'b10111,
    MODE_UND = 5'b11011,
    MODE_SYS = 5'b11111
  } mode_e;

  // Status-register bit positions
  localparam int PSR_N = 31;
  localparam int PSR_Z = 30;
  localparam int PSR_C = 29;
  localparam int PSR_V = 28;
  localparam int PSR_Q = 27;
  localparam int PSR_J = 24;
  localparam int PSR_E = 9;
  localparam int PSR_A = 8;
  localparam int PSR_I = 7;
  localparam int PSR_F = 6;
  localparam int PSR_T = 5;

  // Bits of the status register that the design keeps; writes to the rest
  // are ignored: N Z C V Q, GE[19:16], E, A, I, F, M[4:0]. T and J stay 0
  // because only the 32-bit ARM instruction set is executed.
  localparam logic [31:0] PSR_KEEP = 32'hF80F_03DF;

  // Condition field
  typedef enum logic [3:0] {
    C_EQ = 4'h0, C_NE = 4'h1, C_CS = 4'h2, C_CC = 4'h3,
    C_MI = 4'h4, C_PL = 4'h5, C_VS = 4'h6, C_VC = 4'h7,
    C_HI = 4'h8, C_LS = 4'h9, C_GE = 4'hA, C_LT = 4'hB,
    C_GT = 4'hC, C_LE = 4'hD, C_AL = 4'hE, C_NV = 4'hF
  } cond_e;

  // Data-processing opcodes, instruction bits [24:21]
  typedef enum logic [3:0] {
    OP_AND = 4'h0, OP_EOR = 4'h1, OP_SUB = 4'h2, OP_RSB = 4'h3,
    OP_ADD = 4'h4, OP_ADC = 4'h5, OP_SBC = 4'h6, OP_RSC = 4'h7,
    OP_TST = 4'h8, OP_TEQ = 4'h9, OP_CMP = 4'hA, OP_CMN = 4'hB,
    OP_ORR = 4'hC, OP_MOV = 4'hD, OP_BIC = 4'hE, OP_MVN = 4'hF
  } alu_op_e;

  // Shift types, instruction bits [6:5]
  typedef enum logic [1:0] {
    SH_LSL = 2'b00, SH_LSR = 2'b01, SH_ASR = 2'b10, SH_ROR = 2'b11
  } shift_e;

  // Instruction classes found by the decoder
  typedef enum logic [3:0] {
    I_DP    = 4'd0,   // data processing
    I_MUL   = 4'd1,   // MUL / MLA
    I_SWP   = 4'd2,   // SWP / SWPB
    I_MRS   = 4'd3,   // status register to register
    I_MSR   = 4'd4,   // register or immediate to status register
    I_BR    = 4'd5,   // B / BL
    I_LDST  = 4'd6,   // LDR / STR / LDRB / STRB
    I_LDSTH = 4'd7,   // LDRH / STRH / LDRSB / LDRSH
    I_LDSTM = 4'd8,   // LDM / STM
    I_UNDEF = 4'd9    // anything else
  } iclass_e;

  // Exception vectors
  localparam logic [31:0] VEC_RESET = 32'h0000_0000;
  localparam logic [31:0] VEC_UNDEF = 32'h0000_0004;
  localparam logic [31:0] VEC_DABT  = 32'h0000_0010;
  localparam logic [31:0] VEC_IRQ   = 32'h0000_0018;
  localparam logic [31:0] VEC_FIQ   = 32'h0000_001C;

  // Index of a mode's SPSR in the SPSR bank (0 for modes without one)
  function automatic logic [2:0] spsr_index(logic [4:0] m);
    case (m)
      MODE_FIQ: return 3'd1;
      MODE_IRQ: return 3'd2;
      MODE_SVC: return 3'd3;
      MODE_ABT: return 3'd4;
      MODE_UND: return 3'd5;
      default:  return 3'd0;
    endcase
  endfunction

  // A mode that owns an SPSR
  function automatic logic has_spsr(logic [4:0] m);
    return spsr_index(m) != 3'd0;
  endfunction

endpackage
