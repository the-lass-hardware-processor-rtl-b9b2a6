// tb_slice_array: self-checking test of the 32-bit slice array.
//
// Random micro-instructions, D values and shift modes are applied to the
// eight cascaded slices and compared with a 32-bit reference model (own
// register file and Q): Y, carry-out, overflow, zero, negative and the
// register/Q contents after single and double-length up and down shifts.
// This checks the carry look-ahead across slices and the shift linkage.
module tb_slice_array;
  import lass_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic         we;
  slice_instr_t instr;
  logic [31:0]  d, y;
  shift_mode_e  sm;
  logic         ext, qin, cout, ovr, zero, neg, q_lsb, f_msb;
  int           checks = 0, failures = 0;

  slice_array dut (.clk, .we, .instr, .d, .shift_mode(sm), .ext_msb(ext), .q_lsb_in(qin),
                   .y, .cout, .ovr, .zero, .neg, .q_lsb, .f_msb);

  logic [31:0] mregs[16];
  logic [31:0] mq;

  task automatic chk(string what, longint got, longint exp);
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
    logic [31:0] r, s, rr, ss, f, nb, nq;
    logic [32:0] full;
    logic        fill, v, c31, arith;
    we = 1; sm = SH_ZERO; ext = 0; qin = 0; d = 0;
    for (int k = 0; k < 16; k++) begin
      instr = '{src: SRC_DZ, func: FN_ADD, cin: 1'b0, dst: DST_RAMF, a: 4'h0, b: 4'(k)};
      d = $urandom;
      @(negedge clk);
      mregs[k] = d;
    end
    instr = '{src: SRC_DZ, func: FN_ADD, cin: 1'b0, dst: DST_QREG, a: 4'h0, b: 4'h0};
    d = $urandom;
    @(negedge clk);
    mq = d;
    for (int n = 0; n < 3000; n++) begin
      instr.src  = src_e'($urandom_range(0, 7));
      instr.func = func_e'($urandom_range(0, 7));
      instr.dst  = dst_e'($urandom_range(0, 7));
      instr.a    = 4'($urandom);
      instr.b    = 4'($urandom);
      instr.cin  = 1'($urandom);
      d   = $urandom;
      if ($urandom_range(0, 3) == 0) d = 32'hffff_ffff;  // long carry chains
      sm  = shift_mode_e'($urandom_range(0, 3));
      ext = 1'($urandom);
      qin = 1'($urandom);
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
      rr = (instr.func == FN_SUBR) ? ~r : r;
      ss = (instr.func == FN_SUBS) ? ~s : s;
      arith = (instr.func <= FN_SUBS);
      full = {1'b0, rr} + {1'b0, ss} + 33'(instr.cin);
      c31  = (({1'b0, rr[30:0]} + {1'b0, ss[30:0]} + 32'(instr.cin)) >> 31) != 0;
      case (instr.func)
        FN_OR:    f = r | s;
        FN_AND:   f = r & s;
        FN_NOTRS: f = ~r & s;
        FN_EXOR:  f = r ^ s;
        FN_EXNOR: f = ~(r ^ s);
        default:  f = full[31:0];
      endcase
      v = arith & (full[32] ^ c31);
      chk("Y", y, (instr.dst == DST_RAMA) ? mregs[instr.a] : f);
      chk("cout", cout, arith & full[32]);
      chk("ovr", ovr, v);
      chk("zero", zero, f == 0);
      chk("neg", neg, f[31]);
      chk("q_lsb", q_lsb, mq[0]);
      case (sm)
        SH_ZERO: fill = 0;
        SH_SIGN: fill = f[31];
        SH_TRUE: fill = f[31] ^ v;
        default: fill = ext;
      endcase
      nb = mregs[instr.b];
      nq = mq;
      case (instr.dst)
        DST_RAMA, DST_RAMF: nb = f;
        DST_RAMQD: begin nb = {fill, f[31:1]}; nq = {f[0], mq[31:1]}; end
        DST_RAMD:  nb = {fill, f[31:1]};
        DST_RAMQU: begin nb = {f[30:0], mq[31]}; nq = {mq[30:0], qin}; end
        DST_RAMU:  nb = {f[30:0], 1'b0};
        DST_QREG:  nq = f;
        default: ;
      endcase
      @(negedge clk);
      mregs[instr.b] = nb;
      mq = nq;
      // read back the written register through the array
      instr = '{src: SRC_ZB, func: FN_OR, cin: 1'b0, dst: DST_NOP, a: 4'h0, b: instr.b};
      #1;
      chk("reg", y, nb);
      instr.src = SRC_ZQ;
      #1;
      chk("Q", y, nq);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
