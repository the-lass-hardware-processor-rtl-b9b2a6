// lass_asm_pkg: functions that build 168/E program words, used by the
// testbenches to write programs. Each function returns one 24-bit word in
// the encoding described in lass_pkg.
package lass_asm_pkg;
  import lass_pkg::*;

  // SLICE word: 2901 micro-instruction plus condition-code mode and
  // arithmetic down-shift fill
  function automatic logic [23:0] sl(src_e s, func_e f, logic c, dst_e d, int a, int b,
                                     cc_mode_e m = CC_NONE, logic arith = 1'b0);
    slice_instr_t i;
    i = '{src: s, func: f, cin: c, dst: d, a: 4'(a), b: 4'(b)};
    return {2'b00, arith, m, i};
  endfunction

  // register b <= D register
  function automatic logic [23:0] d_to_r(int b);
    return sl(SRC_DZ, FN_ADD, 1'b0, DST_RAMF, 0, b);
  endfunction

  // Y bus <= register b (no write)
  function automatic logic [23:0] r_to_y(int b);
    return sl(SRC_ZB, FN_OR, 1'b0, DST_NOP, 0, b);
  endfunction

  function automatic logic [23:0] mem(mem_op_e op, mar_ctl_e mc, int disp, int fpreg = 0);
    return {2'b01, op, 2'b00, 2'(fpreg), mc, 12'(disp)};
  endfunction

  function automatic logic [23:0] dl(dload_e k, int imm);
    return {3'b100, k, 2'b00, 16'(imm)};
  endfunction

  function automatic logic [23:0] fp(fp_op_e op, logic lp, int r1, int r2, logic wr_src,
                                     fp_sign_e sg = SG_KEEP);
    fp_word_t w;
    w = '{op: op, long_p: lp, r1: 2'(r1), r2: 2'(r2), wr_src: wr_src, sgn: sg, unused: '0};
    return {4'b1010, 2'b00, w};
  endfunction

  function automatic logic [23:0] mul(int ra, int rb);
    return {CTL_MUL, 10'h0, 4'(ra), 4'(rb)};
  endfunction

  function automatic logic [23:0] div(int ra, int rb);
    return {CTL_DIV, 10'h0, 4'(ra), 4'(rb)};
  endfunction

  function automatic logic [23:0] halt();
    return {CTL_HALT, 18'h0};
  endfunction

  // branch on IBM 370 mask to an absolute address, or to Y when sel_y
  function automatic logic [23:0] br(int mask, int addr, logic sel_y = 1'b0);
    return {2'b11, 4'(mask), sel_y, 2'b00, 15'(addr)};
  endfunction

endpackage
