// tb_am2901: self-checking test of one 2901A slice.
//
// Drives random micro-instructions (all sources, functions, destinations),
// random D, carry and shift-in bits, and compares Y, carry, overflow, zero,
// F3, G and P with an integer reference model that keeps its own copy of the
// 16 registers and Q. The register file is first cleared through the
// slice itself (DZ source, AND function, RAMF).
module tb_am2901;
  import lass_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic         we;
  slice_instr_t instr;
  logic [3:0]   d, y;
  logic         cin, r0i, r3i, q0i, q3i, r0o, r3o, q0o, q3o, cout, ovr, fz, f3, g, p;
  int           checks = 0, failures = 0;

  am2901 dut (.clk, .we, .instr, .d, .cin, .ram0_in(r0i), .ram3_in(r3i),
              .q0_in(q0i), .q3_in(q3i), .y, .ram0_out(r0o), .ram3_out(r3o),
              .q0_out(q0o), .q3_out(q3o), .cout, .ovr, .f_zero(fz), .f3, .g, .p);

  int mregs[16];
  int mq;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (src %0d fn %0d dst %0d)", what, got, exp,
               instr.src, instr.func, instr.dst);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, s, rr, ss, full, low3, exp_f, exp_y, exp_c, exp_v, arith;
    we = 1; cin = 0; r0i = 0; r3i = 0; q0i = 0; q3i = 0; d = 0;
    // clear registers and Q through the slice
    for (int k = 0; k < 16; k++) begin
      instr = '{src: SRC_DZ, func: FN_AND, cin: 1'b0, dst: DST_RAMF, a: 4'(k), b: 4'(k)};
      @(negedge clk);
      mregs[k] = 0;
    end
    instr = '{src: SRC_DZ, func: FN_AND, cin: 1'b0, dst: DST_QREG, a: 4'h0, b: 4'h0};
    @(negedge clk);
    mq = 0;
    for (int n = 0; n < 3000; n++) begin
      instr.src  = src_e'($urandom_range(0, 7));
      instr.func = func_e'($urandom_range(0, 7));
      instr.dst  = dst_e'($urandom_range(0, 7));
      instr.a    = 4'($urandom);
      instr.b    = 4'($urandom);
      instr.cin  = 1'b0;
      cin = 1'($urandom); d = 4'($urandom);
      r0i = 1'($urandom); r3i = 1'($urandom); q0i = 1'($urandom); q3i = 1'($urandom);
      we  = ($urandom_range(0, 9) != 0);
      #1;
      case (instr.src)
        SRC_AQ: begin r = mregs[instr.a]; s = mq; end
        SRC_AB: begin r = mregs[instr.a]; s = mregs[instr.b]; end
        SRC_ZQ: begin r = 0; s = mq; end
        SRC_ZB: begin r = 0; s = mregs[instr.b]; end
        SRC_ZA: begin r = 0; s = mregs[instr.a]; end
        SRC_DA: begin r = d; s = mregs[instr.a]; end
        SRC_DQ: begin r = d; s = mq; end
        default: begin r = d; s = 0; end
      endcase
      rr = r; ss = s; arith = 1;
      if (instr.func == FN_SUBR) rr = 15 - r;
      if (instr.func == FN_SUBS) ss = 15 - s;
      if (instr.func > FN_SUBS) arith = 0;
      full = rr + ss + cin;
      low3 = (rr % 8) + (ss % 8) + cin;
      case (instr.func)
        FN_OR:    exp_f = r | s;
        FN_AND:   exp_f = r & s;
        FN_NOTRS: exp_f = (15 - r) & s;
        FN_EXOR:  exp_f = r ^ s;
        FN_EXNOR: exp_f = 15 - (r ^ s);
        default:  exp_f = full % 16;
      endcase
      exp_c = arith ? full / 16 : 0;
      exp_v = arith ? ((full / 16) ^ (low3 / 8)) : 0;
      exp_y = (instr.dst == DST_RAMA) ? mregs[instr.a] : exp_f;
      chk("Y", y, exp_y);
      chk("cout", cout, exp_c);
      chk("ovr", ovr, exp_v);
      chk("zero", fz, exp_f == 0);
      chk("f3", f3, exp_f / 8);
      chk("p", p, arith ? ((rr | ss) == 15) : 0);
      chk("g", g, arith ? ((rr + ss) >= 16) : 0);
      chk("ram0_out", r0o, exp_f % 2);
      chk("q3_out", q3o, mq / 8);
      // model update
      if (we) begin
        case (instr.dst)
          DST_RAMA, DST_RAMF: mregs[instr.b] = exp_f;
          DST_RAMQD, DST_RAMD: mregs[instr.b] = exp_f / 2 + 8 * r3i;
          DST_RAMQU, DST_RAMU: mregs[instr.b] = (exp_f * 2) % 16 + r0i;
          default: ;
        endcase
        case (instr.dst)
          DST_QREG:  mq = exp_f;
          DST_RAMQD: mq = mq / 2 + 8 * q3i;
          DST_RAMQU: mq = (mq * 2) % 16 + q0i;
          default: ;
        endcase
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
