// tb_fp_unit: self-checking test of the hexadecimal floating-point unit.
//
// Operands are loaded into the working register from "memory" words and
// moved into the register file with LOAD. Random operands carry three
// significant hex digits and nearby exponents, so sums, differences and
// products are exact in both precisions; the expected results are computed
// with real arithmetic and converted back to the 370 format by the testbench.
// Directed cases check truncation (a digit shifted past the guard digit in
// short precision), true zero, and the condition codes of CMP, LTST, ADD and
// SUB. LTST is also run with each sign control (keep, complement, positive,
// negative). The stall length is checked: 1 cycle for ADD/SUB, 12 for MUL, 46 for
// DIV, none for LOAD and CMP.
//
// Divide is checked on random full-length fractions against an integer
// reference: the quotient of the two fractions taken to 44 bits, shifted one
// digit right when it reaches 1, and truncated to the precision. Directed
// cases check an exact quotient, that divide leaves the condition code alone,
// and that a zero divisor leaves the register unchanged without stalling.
module tb_fp_unit;
  import lass_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst, start, wl_hi, wl_lo, stall, ccv;
  fp_word_t    w;
  logic [31:0] mem;
  logic [1:0]  st_reg, cc;
  logic [47:0] st_data;
  int          checks = 0, failures = 0;

  fp_unit dut (.clk, .rst, .start, .w, .wr_load_hi(wl_hi), .wr_load_lo(wl_lo), .mem_rdata(mem),
               .st_reg, .st_data, .stall, .cc_valid(ccv), .cc);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic real pow16(int k);
    real p = 1.0;
    for (int i = 0; i < k; i++) p = p * 16.0;
    for (int i = 0; i > k; i--) p = p / 16.0;
    return p;
  endfunction

  function automatic real to_real(logic [47:0] x);
    real m;
    m = real'(x[39:0]) / pow16(10) * pow16(int'(x[46:40]) - 64);
    return x[47] ? -m : m;
  endfunction

  function automatic logic [47:0] to_hex(real v);
    real m;
    int  e;
    logic s;
    if (v == 0.0) return 48'h0;
    s = v < 0.0;
    m = s ? -v : v;
    e = 64;
    while (m >= 1.0) begin m = m / 16.0; e++; end
    while (m < 1.0 / 16.0) begin m = m * 16.0; e--; end
    return {s, 7'(e), 40'(longint'(m * pow16(10)))};
  endfunction

  // load a 48-bit value into register r through the working register
  task automatic load(input logic [1:0] r, input logic [47:0] v);
    mem = v[47:16]; wl_hi = 1; @(negedge clk); wl_hi = 0;
    mem = {v[15:0], 16'h0}; wl_lo = 1; @(negedge clk); wl_lo = 0;
    w = '{op: FP_LOAD, long_p: 1'b1, r1: r, r2: 2'd0, wr_src: 1'b1, sgn: SG_KEEP, unused: '0};
    start = 1; @(negedge clk); start = 0;
  endtask

  // run one register-register operation, return stall cycles and code
  task automatic op(input fp_op_e o, input logic lp, input logic [1:0] r1, input logic [1:0] r2,
                    output int stalls, output int code, input fp_sign_e sg = SG_KEEP);
    w = '{op: o, long_p: lp, r1: r1, r2: r2, wr_src: 1'b0, sgn: sg, unused: '0};
    start = 1; stalls = 0; code = -1;
    forever begin
      #1;
      if (ccv) code = int'(cc);
      if (!stall) break;
      stalls++;
      @(negedge clk);
      if (stalls > 50) break;
    end
    @(negedge clk); start = 0;
  endtask

  function automatic logic [47:0] rnd();
    logic [11:0] f;
    f = 12'($urandom_range(12'h100, 12'hfff));
    return {1'($urandom), 7'(64 + $urandom_range(0, 4) - 2), f, 28'h0};
  endfunction

  function automatic logic [47:0] rnd_full();
    return {1'($urandom), 7'(64 + $urandom_range(0, 6) - 3),
            4'($urandom_range(1, 15)), 36'({$urandom, $urandom})};
  endfunction

  function automatic logic [47:0] div_ref(logic [47:0] a, logic [47:0] b, logic lp);
    logic [127:0] fa, fb, q;
    int           ex;
    fa = 128'(a[39:0]);
    fb = 128'(b[39:0]);
    if (!lp) begin
      fa = fa & 128'h00FF_FFFF_0000;
      fb = fb & 128'h00FF_FFFF_0000;
    end
    if (fa == 0) return 48'h0;
    ex = int'(a[46:40]) - int'(b[46:40]) + 64;
    q  = (fa << 44) / fb;
    if (q >= (128'd1 << 44)) begin
      q = q >> 4;
      ex++;
    end
    return {a[47] ^ b[47], 7'(ex), q[43:4]};
  endfunction

  function automatic int sgn_cc(real v);
    return (v == 0.0) ? 0 : (v < 0.0) ? 1 : 2;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] a, b, e;
    real         ra, rb, rr;
    int          st, code;
    fp_op_e      o;
    fp_sign_e    sg;
    logic        lp;
    rst = 1; start = 0; wl_hi = 0; wl_lo = 0; mem = 0; st_reg = 0;
    w = '{op: FP_LOAD, long_p: 1'b1, r1: 2'd0, r2: 2'd0, wr_src: 1'b1, sgn: SG_KEEP, unused: '0};
    @(negedge clk); rst = 0;
    for (int n = 0; n < 400; n++) begin
      a = rnd(); b = rnd();
      if (n % 10 == 0) b = {~a[47], a[46:0]};       // exact cancellation
      o  = fp_op_e'($urandom_range(1, 4));
      lp = 1'($urandom);
      load(0, a); load(1, b);
      op(FP_LTST, lp, 2, 1, st, code);
      chk("LTST code", code, sgn_cc(to_real(b)));
      chk("LOAD stall", st, 0);
      st_reg = 2;
      #1 chk("LTST copy", st_data, b);
      sg = fp_sign_e'($urandom_range(0, 3));
      op(FP_LTST, 1'b1, 3, 1, st, code, sg);
      st_reg = 3;
      case (sg)
        SG_COMP: e = {~b[47], b[46:0]};
        SG_POS:  e = {1'b0, b[46:0]};
        SG_NEG:  e = {1'b1, b[46:0]};
        default: e = b;
      endcase
      #1 chk("signed LTST value", st_data, e);
      chk("signed LTST code", code, sgn_cc(to_real(e)));
      op(o, lp, 0, 1, st, code);
      ra = to_real(a); rb = to_real(b);
      case (o)
        FP_ADD: rr = ra + rb;
        FP_SUB: rr = ra - rb;
        FP_MUL: rr = ra * rb;
        default: rr = ra - rb;
      endcase
      e = to_hex(rr);
      st_reg = 0;
      #1;
      case (o)
        FP_CMP: begin
          chk("CMP code", code, sgn_cc(rr));
          chk("CMP stall", st, 0);
          chk("CMP leaves register", st_data, a);
        end
        FP_MUL: begin
          chk("MUL result", st_data, e);
          chk("MUL stall", st, 12);
        end
        default: begin
          chk("ADD/SUB result", lp ? st_data : st_data[47:16], lp ? e : e[47:16]);
          chk("ADD/SUB code", code, sgn_cc(rr));
          chk("ADD/SUB stall", st, 1);
        end
      endcase
    end
    // divide
    for (int n = 0; n < 300; n++) begin
      a  = rnd_full(); b = rnd_full();
      if (n % 7 == 0) b[39:0] = a[39:0];             // fractions equal: quotient 1
      lp = 1'($urandom);
      load(0, a); load(1, b);
      op(FP_DIV, lp, 0, 1, st, code);
      e = div_ref(a, b, lp);
      st_reg = 0;
      #1 chk("DIV result", lp ? st_data : st_data[47:16], lp ? e : e[47:16]);
      chk("DIV stall", st, 46);
      chk("DIV leaves code", code, -1);
      if (!lp) chk("short DIV keeps low bits", st_data[15:0], a[15:0]);
    end
    load(0, 48'h41_1000000000); load(1, 48'h40_8000000000);   // 1.0 / 0.5
    op(FP_DIV, 1'b1, 0, 1, st, code);
    st_reg = 0; #1 chk("DIV exact", st_data, 48'h41_2000000000);
    load(0, 48'hC2_3000000000); load(1, 48'h41_4000000000);   // -48.0 / 4.0
    op(FP_DIV, 1'b0, 0, 1, st, code);
    #1 chk("DIV exact negative", st_data, 48'hC1_C000000000);
    load(0, 48'h41_1000000000); load(1, 48'h41_0000000000);   // divisor 0
    op(FP_DIV, 1'b1, 0, 1, st, code);
    #1 chk("DIV by zero leaves register", st_data, 48'h41_1000000000);
    chk("DIV by zero no stall", st, 0);
    // truncation: 1.0 + 16^-7 keeps the small term in 48-bit precision only
    load(0, 48'h41_1000000000); load(1, 48'h3A_1000000000);
    op(FP_ADD, 1'b0, 0, 1, st, code);
    st_reg = 0; #1 chk("short add truncates", st_data, 48'h41_1000000000);
    load(0, 48'h41_1000000000);
    op(FP_ADD, 1'b1, 0, 1, st, code);
    #1 chk("long add keeps", st_data, 48'h41_1000000100);
    // normalization after cancellation: 1.0 - 0.FFFFFF (short) = 16^-6, kept
    // through the guard digit
    load(0, 48'h41_1000000000); load(1, 48'h40_FFFFFF0000);
    op(FP_SUB, 1'b0, 0, 1, st, code);
    #1 chk("short sub normalizes", st_data, 48'h3B_1000000000);
    chk("short sub code", code, 2);
    // short operations ignore the low 16 bits of a register
    load(0, 48'h41_1000000000); load(1, 48'h40_FFFFFFF000);
    op(FP_SUB, 1'b0, 0, 1, st, code);
    #1 chk("short sub ignores low bits", st_data[47:16], 32'h3B_100000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
