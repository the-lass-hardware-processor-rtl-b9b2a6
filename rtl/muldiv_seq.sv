// muldiv_seq: hardware multiply and divide sequencer of the 168/E.
//
// Multiplication and division are done by stopping the program counter while
// the slices are cycled through conditional ADD and SHIFT micro-instructions.
// While active, this block supplies the slice micro-instruction, the shift
// control and the Q shift-in bit, and holds stall high until its last step.
//
// Multiply (IBM 370 M, signed 32 x 32 -> 64 bits), 33 cycles. Before it the
// program puts the multiplier in Q. Register ra holds the multiplicand; rb
// receives the high product word and Q the low word.
//   step 0      rb <= 0
//   steps 1-31  rb:Q <= (rb + (Q0 ? ra : 0)) >> 1, MSB filled with the true
//               sign (F31 xor OVR)
//   step 32     as above but subtracting ra (the multiplier sign bit has
//               negative weight)
// Divide (64 / 32 -> 32-bit quotient and remainder), 67 cycles,
// non-restoring. rb:Q holds the dividend, ra the divisor. Required:
// 0 < divisor < 2^31 and 0 <= rb < divisor. Signed operands are handled by the
// program around it. Each quotient bit takes a shift cycle (rb:Q shifted up,
// the previous quotient bit entering Q0) and an add/subtract cycle (subtract
// the divisor if the partial remainder was not negative, else add). Then Q
// takes the last quotient bit, rb is shifted back down with its saved sign
// bit, and a negative remainder is corrected by adding the divisor. Result:
// Q = quotient, rb = remainder.
//
// The stopped counter and the conditional add-and-shift method are from the
// processor description. The step sequences, the 32-bit restriction on the
// divisor and the sign handling are this design's own.
//
// Timing: start is high while the MUL/DIV word is in the execute stage. Step 0
// runs in that first cycle; stall is high in every cycle but the last.
module muldiv_seq
  import lass_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         is_div,
  input  logic [3:0]   ra,
  input  logic [3:0]   rb,
  input  logic         q_lsb,     // Q[0] of the slice array
  input  logic         f_msb,     // F31 of the slice array
  output logic         active,
  output logic         stall,
  output slice_instr_t instr,
  output shift_mode_e  shift_mode,
  output logic         ext_msb,
  output logic         q_lsb_in
);

  localparam int unsigned MUL_LAST = 32;
  localparam int unsigned DIV_LAST = 66;

  logic       busy;
  logic [6:0] cnt, step;
  logic       prev_neg, qbit, saved_msb;
  logic       last;

  assign step   = busy ? cnt : 7'd0;
  assign active = start;
  assign last   = is_div ? (step == 7'(DIV_LAST)) : (step == 7'(MUL_LAST));
  assign stall  = start && !last;

  function automatic slice_instr_t mk(src_e s, func_e f, logic c, dst_e d);
    slice_instr_t i;
    i.src = s; i.func = f; i.cin = c; i.dst = d; i.a = ra; i.b = rb;
    return i;
  endfunction

  always_comb begin
    shift_mode = SH_ZERO;
    ext_msb    = saved_msb;
    q_lsb_in   = qbit;
    instr      = mk(SRC_ZB, FN_ADD, 1'b0, DST_NOP);
    if (!is_div) begin
      shift_mode = SH_TRUE;
      if (step == 7'd0)
        instr = mk(SRC_ZA, FN_AND, 1'b0, DST_RAMF);
      else if (!q_lsb)
        instr = mk(SRC_ZB, FN_ADD, 1'b0, DST_RAMQD);
      else if (step == 7'(MUL_LAST))
        instr = mk(SRC_AB, FN_SUBR, 1'b1, DST_RAMQD);
      else
        instr = mk(SRC_AB, FN_ADD, 1'b0, DST_RAMQD);
    end else begin
      if (step <= 7'd64 && !step[0])
        instr = mk(SRC_ZB, FN_ADD, 1'b0, DST_RAMQU);          // shift
      else if (step < 7'd64)
        instr = prev_neg ? mk(SRC_AB, FN_ADD, 1'b0, DST_RAMF)  // add back
                         : mk(SRC_AB, FN_SUBR, 1'b1, DST_RAMF); // subtract
      else if (step == 7'd65) begin
        shift_mode = SH_EXT;
        instr      = mk(SRC_ZB, FN_ADD, 1'b0, DST_RAMD);        // undo last shift
      end else
        instr = prev_neg ? mk(SRC_AB, FN_ADD, 1'b0, DST_RAMF)
                         : mk(SRC_ZB, FN_ADD, 1'b0, DST_NOP);   // correction
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      cnt       <= '0;
      prev_neg  <= 1'b0;
      qbit      <= 1'b0;
      saved_msb <= 1'b0;
    end else if (start) begin
      if (last) begin
        busy <= 1'b0;
        cnt  <= '0;
      end else begin
        busy <= 1'b1;
        cnt  <= step + 7'd1;
      end
      if (step == 7'd0) begin
        prev_neg <= 1'b0;
        qbit     <= 1'b0;
      end
      if (is_div && step[0] && step < 7'd64) begin
        prev_neg <= f_msb;
        qbit     <= !f_msb;
      end
      if (is_div && step == 7'd64) saved_msb <= f_msb;
    end
  end

endmodule
