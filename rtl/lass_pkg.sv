// lass_pkg: types and constants shared by the 168/E processor.
//
// The 168/E executes 24-bit program words. The top 6 bits (the control
// field) select which control section executes the word; the low 18 bits
// (the data field) carry that section's data. For slice words the data field
// is the 18-bit 2901A micro-instruction: 3 bits source, 3 bits function,
// 1 carry-in bit, 3 bits destination and two 4-bit register addresses, the
// split given for the 2901A. The codes of the source, function and
// destination fields are the standard 2901 codes. The layout of the control
// field and of the non-slice data fields is this design's own encoding.
//
// Control field (ctl[5:0]):
//   00 m ccc  SLICE   m = arithmetic (sign) fill on down shifts, ccc = cc_mode_e
//   01 oooo   MEM     oooo = mem_op_e; data[13:12] = mar_ctl_e,
//                     data[11:0] = displacement (half-words), data[15:14] = FP reg
//   10 0ooo   DLOAD   ooo = dload_e; data[15:0] = immediate
//   10 10xx   FP      data field = fp_word_t
//   10 1100   MUL     data[7:4] = multiplicand register, data[3:0] = product-high register
//   10 1101   DIV     data[7:4] = divisor register, data[3:0] = remainder register
//   10 1111   HALT    stops the program counter
//   11 mmmm   BRANCH  mmmm = IBM 370 branch mask, data[17] = target from Y bus,
//                     data[14:0] = absolute program address
package lass_pkg;

  localparam int unsigned PW       = 24;  // program word width
  localparam int unsigned DW       = 32;  // data word width
  localparam int unsigned PC_W     = 15;  // program counter width
  localparam int unsigned DM_AW    = 15;  // data memory word address width
  localparam int unsigned FPW      = 48;  // floating-point register width

  // 2901 source operand pairs (R, S)
  typedef enum logic [2:0] {
    SRC_AQ = 3'd0, SRC_AB = 3'd1, SRC_ZQ = 3'd2, SRC_ZB = 3'd3,
    SRC_ZA = 3'd4, SRC_DA = 3'd5, SRC_DQ = 3'd6, SRC_DZ = 3'd7
  } src_e;

  // 2901 ALU functions
  typedef enum logic [2:0] {
    FN_ADD = 3'd0, FN_SUBR = 3'd1, FN_SUBS = 3'd2, FN_OR = 3'd3,
    FN_AND = 3'd4, FN_NOTRS = 3'd5, FN_EXOR = 3'd6, FN_EXNOR = 3'd7
  } func_e;

  // 2901 destinations
  typedef enum logic [2:0] {
    DST_QREG = 3'd0, DST_NOP = 3'd1, DST_RAMA = 3'd2, DST_RAMF = 3'd3,
    DST_RAMQD = 3'd4, DST_RAMD = 3'd5, DST_RAMQU = 3'd6, DST_RAMU = 3'd7
  } dst_e;

  // 18-bit slice micro-instruction
  typedef struct packed {
    src_e       src;
    func_e      func;
    logic       cin;
    dst_e       dst;
    logic [3:0] a;
    logic [3:0] b;
  } slice_instr_t;

  // Most-significant-bit fill of the register file on down shifts
  typedef enum logic [1:0] {
    SH_ZERO = 2'd0,   // logical shift
    SH_SIGN = 2'd1,   // arithmetic shift (F31)
    SH_TRUE = 2'd2,   // true sign of the ALU result (F31 xor OVR), multiply
    SH_EXT  = 2'd3    // bit supplied by the sequencer, divide
  } shift_mode_e;

  // How a slice word sets the condition code
  typedef enum logic [2:0] {
    CC_NONE  = 3'd0,  // condition code unchanged
    CC_ARITH = 3'd1,  // 0 zero, 1 negative, 2 positive, 3 overflow
    CC_CMP   = 3'd2,  // signed compare R-S: 0 equal, 1 low, 2 high
    CC_CMPL  = 3'd3,  // unsigned compare: 0 equal, 1 low, 2 high
    CC_LOGIC = 3'd4,  // 0 zero, 1 not zero
    CC_LADD  = 3'd5   // logical add/subtract: {carry, not zero}
  } cc_mode_e;

  typedef enum logic [3:0] {
    MEM_MAR   = 4'd0,  // address only
    MEM_RD    = 4'd1,  // full word -> D register
    MEM_RDH   = 4'd2,  // half word, sign extended -> D register
    MEM_WR    = 4'd3,  // Y bus -> full word
    MEM_WRH   = 4'd4,  // Y[15:0] -> half word
    MEM_FRDH  = 4'd5,  // full word -> FP working register bits 47:16
    MEM_FRDL  = 4'd6,  // most significant half word -> FP working register 15:0
    MEM_FWRH  = 4'd7,  // FP register bits 47:16 -> full word
    MEM_FWRL  = 4'd8   // {FP register bits 15:0, 16'h0} -> full word
  } mem_op_e;

  typedef enum logic [1:0] {
    MAR_HOLD = 2'd0,   // use the address held in the MAR
    MAR_ADD  = 2'd1,   // MAR <= Y[16:1] + displacement
    MAR_ABS  = 2'd2,   // MAR <= displacement (no base register)
    MAR_NEXT = 2'd3    // MAR <= MAR + 2 (next full word)
  } mar_ctl_e;

  typedef enum logic [2:0] {
    DL_HOLD = 3'd0,    // D register unchanged
    DL_SEXT = 3'd1,    // D <= sign-extended immediate
    DL_ZEXT = 3'd2,    // D <= zero-extended immediate
    DL_HIGH = 3'd3,    // D[31:16] <= immediate
    DL_MEMW = 3'd4,    // D <= memory full word
    DL_MEMH = 3'd5     // D <= memory half word, sign extended
  } dload_e;

  typedef enum logic [2:0] {
    FP_LOAD = 3'd0,    // r1 <= operand 2
    FP_ADD  = 3'd1,
    FP_SUB  = 3'd2,
    FP_CMP  = 3'd3,
    FP_MUL  = 3'd4,
    FP_LTST = 3'd5,    // load and test: r1 <= operand 2, set condition code
    FP_DIV  = 3'd6     // r1 <= r1 / operand 2
  } fp_op_e;

  // Sign control of LOAD and LTST (370 load, load complement, load
  // positive, load negative)
  typedef enum logic [1:0] {
    SG_KEEP = 2'd0, SG_COMP = 2'd1, SG_POS = 2'd2, SG_NEG = 2'd3
  } fp_sign_e;

  // Data field of an FP word
  typedef struct packed {
    fp_op_e     op;    // 17:15
    logic       long_p;// 14: 48-bit precision
    logic [1:0] r1;    // 13:12
    logic [1:0] r2;    // 11:10
    logic       wr_src;// 9: operand 2 is the working register
    fp_sign_e   sgn;   // 8:7: sign control of LOAD and LTST
    logic [6:0] unused;
  } fp_word_t;

  typedef enum logic [1:0] {
    SEC_SLICE = 2'b00, SEC_MEM = 2'b01, SEC_MISC = 2'b10, SEC_BRANCH = 2'b11
  } section_e;

  localparam logic [5:0] CTL_MUL  = 6'b10_1100;
  localparam logic [5:0] CTL_DIV  = 6'b10_1101;
  localparam logic [5:0] CTL_NOP  = 6'b10_1110;
  localparam logic [5:0] CTL_HALT = 6'b10_1111;

  // Condition code -> IBM 370 branch mask bit (mask bit 8 tests CC 0).
  function automatic logic mask_hit(input logic [3:0] mask, input logic [1:0] cc);
    return mask[3 - cc];
  endfunction

endpackage
