// fp_unit: floating-point processing unit of the 168/E (IBM 370 hexadecimal
// floating point, 32-bit or 48-bit precision).
//
// Number format (48-bit register): bit 47 sign, bits 46:40 exponent (power of
// 16, excess 64), bits 39:0 fraction (10 hex digits). The 32-bit short format
// is the upper 32 bits (6 fraction digits), identical to IBM 370 single
// precision. The 48-bit "pseudo-double" format keeps 10 fraction digits
// where the 370 long format keeps 14.
//
// Parts: a two-port register file of four 48-bit registers (370 registers
// 0, 2, 4, 6), a working register loaded from data memory, an ALU
// (aligning adder/subtractor and a multiplier that takes one hex digit of the
// multiplier per cycle), a shifting network (alignment shifter and
// leading-zero-digit normalizer) and a control unit. Operations
// (lass_pkg::fp_op_e):
//   LOAD, LTST  1 cycle   r1 <= operand 2 (LTST also sets the condition code);
//                         the sign can be kept, inverted, cleared or set
//                         (w.sgn), as the 370 load complement, positive and
//                         negative instructions do
//   CMP         1 cycle   condition code from r1 - operand 2
//   ADD, SUB    2 cycles  align + add, then normalize and write r1
//   MUL         13 cycles start, 10 multiply steps, load, normalize (48-bit result)
//   DIV         47 cycles start, 44 restoring divide steps, load, write
// Operand 2 is register r2 or the working register. Short operations read
// and write only bits 47:16 of a register, as the 370 does; a short
// multiply writes the 48-bit product, like the 370 short multiply that
// returns a long result. Alignment keeps one guard digit; bits below the
// guard digit of the chosen precision are dropped before adding, and
// results are truncated, as on the 370. Condition code: 0 zero, 1 negative
// (first operand low), 2 positive (first operand high).
//
// Divide works on the fractions one quotient bit per cycle (restoring
// division) and yields 11 hex digits, the guard digit included. With both
// operands normalized the quotient lies in [1/16, 16); when the dividend
// fraction is not below the divisor's, it is first shifted right one digit
// and the exponent raised by one, so the quotient is always in [1/16, 1) and
// needs no further normalization. Divide leaves the condition code alone, as
// the 370 does. A divisor with a zero fraction leaves r1 unchanged and takes
// one cycle (the 370 would take a program interrupt, which the 168/E lacks).
//
// The register file, ALU, shifter, control unit, the two precisions and the
// stopping of the integer processor come from the processor description. The
// register count, the operation timings, the treatment of exponent overflow
// (the exponent wraps; there are no program interrupts), exponent underflow
// (a true zero results), the absence of pre-normalization for multiply and
// divide, and the divide method are this design's own.
//
// Timing: start is high while the FP word is executing. stall is high in
// every cycle of a multi-cycle operation except the last, in which the result
// is written and cc_valid is high for ADD/SUB. CMP and LTST give cc_valid in
// their single cycle. wr_load_hi/wr_load_lo load the working register from
// the data memory word at the rising edge; st_data is register st_reg.
module fp_unit
  import lass_pkg::*;
#(
  parameter int unsigned NFPR = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  fp_word_t                 w,
  input  logic                     wr_load_hi,
  input  logic                     wr_load_lo,
  input  logic [31:0]              mem_rdata,
  input  logic [$clog2(NFPR)-1:0]  st_reg,
  output logic [47:0]              st_data,
  output logic                     stall,
  output logic                     cc_valid,
  output logic [1:0]               cc
);

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_DIV, S_NORM} state_e;

  state_e      state;
  logic [47:0] fpr [NFPR];
  logic [47:0] wr;

  // Latched operation
  fp_op_e      op_q;
  logic        long_q;
  logic [1:0]  r1_q;

  // Operand fetch
  logic [47:0] op1, op2;
  logic [43:0] prec_mask, in_mask;

  // in_mask keeps the digits of the chosen precision; prec_mask also keeps
  // the guard digit that follows them
  assign prec_mask = w.long_p ? {44{1'b1}} : {{28{1'b1}}, 16'h0};
  assign in_mask   = w.long_p ? {44{1'b1}} : {{24{1'b1}}, 20'h0};
  assign op1 = fpr[w.r1];
  assign op2 = w.wr_src ? wr : fpr[w.r2];

  // LOAD / LTST value after sign control
  logic        ld_zero, ld_sign;
  logic [47:0] ld_val;
  always_comb begin
    ld_zero = (op2[39:0] & in_mask[43:4]) == 40'h0;
    unique case (w.sgn)
      SG_COMP: ld_sign = !op2[47];
      SG_POS:  ld_sign = 1'b0;
      SG_NEG:  ld_sign = 1'b1;
      default: ld_sign = op2[47];
    endcase
    ld_val = {ld_sign, op2[46:0]};
  end
  assign st_data = fpr[st_reg];

  // ---------------- aligning adder (ADD, SUB, CMP) ----------------
  logic        sa, sb, s_big, s_small, add_sign, fb_nz;
  logic [6:0]  ea, eb, e_big;
  logic [43:0] fa, fb, f_big, f_small, f_small_al;
  logic [6:0]  ediff;
  logic [44:0] add_mag;

  always_comb begin
    sa = op1[47];
    sb = op2[47] ^ (w.op != FP_ADD);    // SUB and CMP negate operand 2
    ea = op1[46:40];
    eb = op2[46:40];
    fa = {op1[39:0], 4'h0} & in_mask;
    fb = {op2[39:0], 4'h0} & in_mask;
    if (ea >= eb) begin
      e_big = ea; f_big = fa; s_big = sa; f_small = fb; s_small = sb; ediff = ea - eb;
    end else begin
      e_big = eb; f_big = fb; s_big = sb; f_small = fa; s_small = sa; ediff = eb - ea;
    end
    f_small_al = (ediff > 7'd11) ? 44'h0 : ((f_small >> (4 * ediff)) & prec_mask);
    if (s_big == s_small) begin
      add_mag  = {1'b0, f_big} + {1'b0, f_small_al};
      add_sign = s_big;
    end else if (f_big >= f_small_al) begin
      add_mag  = {1'b0, f_big} - {1'b0, f_small_al};
      add_sign = s_big;
    end else begin
      add_mag  = {1'b0, f_small_al} - {1'b0, f_big};
      add_sign = s_small;
    end
    if (add_mag == 45'h0) add_sign = 1'b0;
  end

  // ---------------- multiplier (one hex digit per cycle) ----------------
  logic [83:0] prod;
  logic [39:0] mplier, mcand;
  logic [3:0]  mcnt;
  logic [44:0] psum;

  assign psum = {1'b0, prod[83:40]} + 45'(mcand * mplier[3:0]);

  // ---------------- divider (one quotient bit per cycle) ----------------
  logic [43:0] rem, dvs, quo;     // rem < dvs after every step
  logic [44:0] rem2;
  logic [5:0]  dcnt;
  logic        div_go, dvd_big;

  assign fb_nz   = fb != 44'h0;
  assign div_go  = (w.op == FP_DIV) && fb_nz;
  assign dvd_big = fa >= fb;
  assign rem2    = {rem, 1'b0};

  // ---------------- normalizer ----------------
  logic        t_sign;
  logic [8:0]  t_exp;          // signed, room for over/underflow
  logic [44:0] t_frac;         // bit 44: carry digit
  logic [3:0]  lz;
  logic [43:0] n_frac;
  logic [8:0]  n_exp;
  logic [47:0] n_res;
  logic        n_zero;

  always_comb begin
    lz = 4'd11;
    for (int i = 0; i < 11; i++)
      if (t_frac[40 - 4*i +: 4] != 4'h0 && lz == 4'd11) lz = 4'(i);
    if (t_frac[44]) begin
      n_frac = t_frac[44:1] >> 3;
      n_exp  = t_exp + 9'd1;
    end else begin
      n_frac = t_frac[43:0] << (4 * lz);
      n_exp  = t_exp - 9'(lz);
    end
    n_zero = (lz == 4'd11 && !t_frac[44]) || $signed(n_exp) < 0;
    n_res  = n_zero ? 48'h0 : {t_sign, n_exp[6:0], n_frac[43:4]};
  end

  // ---------------- control ----------------
  logic multi;
  assign multi = (w.op == FP_ADD) || (w.op == FP_SUB) || (w.op == FP_MUL) || div_go;

  always_comb begin
    stall    = 1'b0;
    cc_valid = 1'b0;
    cc       = 2'd0;
    unique case (state)
      S_IDLE: if (start) begin
        stall = multi;
        if (w.op == FP_CMP) begin
          cc_valid = 1'b1;
          cc       = (add_mag == 45'h0) ? 2'd0 : add_sign ? 2'd1 : 2'd2;
        end else if (w.op == FP_LTST) begin
          cc_valid = 1'b1;
          cc       = ld_zero ? 2'd0 : ld_sign ? 2'd1 : 2'd2;
        end
      end
      S_MUL, S_DIV: stall = 1'b1;
      default: begin   // S_NORM
        if (op_q == FP_ADD || op_q == FP_SUB) begin
          cc_valid = 1'b1;
          cc       = n_zero ? 2'd0 : t_sign ? 2'd1 : 2'd2;
        end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      for (int i = 0; i < int'(NFPR); i++) fpr[i] <= '0;
      wr    <= '0;
      mcnt  <= '0;
    end else begin
      if (wr_load_hi) wr <= {mem_rdata, 16'h0};
      if (wr_load_lo) wr[15:0] <= mem_rdata[31:16];
      unique case (state)
        S_IDLE: if (start) begin
          op_q   <= w.op;
          long_q <= w.long_p;
          r1_q   <= w.r1;
          unique case (w.op)
            FP_LOAD, FP_LTST: begin
              if (w.long_p) fpr[w.r1] <= ld_val;
              else          fpr[w.r1][47:16] <= ld_val[47:16];
            end
            FP_ADD, FP_SUB: begin
              t_sign <= add_sign;
              t_exp  <= {2'b00, e_big};
              t_frac <= add_mag;
              state  <= S_NORM;
            end
            FP_MUL: begin
              t_sign <= op1[47] ^ op2[47];
              t_exp  <= 9'(op1[46:40]) + 9'(op2[46:40]) - 9'd64;
              mcand  <= op1[39:0] & in_mask[43:4];
              mplier <= op2[39:0] & in_mask[43:4];
              prod   <= '0;
              mcnt   <= '0;
              state  <= S_MUL;
            end
            FP_DIV: if (fb_nz) begin
              t_sign <= op1[47] ^ op2[47];
              t_exp  <= 9'(op1[46:40]) - 9'(op2[46:40]) + 9'd64 + 9'(dvd_big);
              rem    <= dvd_big ? fa >> 4 : fa;
              dvs    <= fb;
              quo    <= '0;
              dcnt   <= '0;
              state  <= S_DIV;
            end
            default: ;
          endcase
        end
        S_MUL: begin
          if (mcnt == 4'd10) begin
            t_frac <= {1'b0, prod[79:36]};
            long_q <= 1'b1;           // product is written in 48 bits
            state  <= S_NORM;
          end else begin
            prod   <= 84'({psum, prod[39:0]} >> 4);
            mplier <= mplier >> 4;
            mcnt   <= mcnt + 4'd1;
          end
        end
        S_DIV: begin
          if (dcnt == 6'd44) begin
            t_frac <= {1'b0, quo};
            state  <= S_NORM;
          end else begin
            if (rem2 >= {1'b0, dvs}) begin
              rem <= 44'(rem2 - {1'b0, dvs});
              quo <= {quo[42:0], 1'b1};
            end else begin
              rem <= rem2[43:0];
              quo <= {quo[42:0], 1'b0};
            end
            dcnt <= dcnt + 6'd1;
          end
        end
        default: begin   // S_NORM
          if (long_q) fpr[r1_q] <= n_res;
          else        fpr[r1_q][47:16] <= n_res[47:16];
          state <= S_IDLE;
        end
      endcase
    end
  end

endmodule
