// tb_muldiv_seq: self-checking test of the multiply/divide sequencer driving
// the 32-bit slice array.
//
// Operands are written into the slice registers and Q with DZ micro-
// instructions, then the sequencer runs. The test checks the 64-bit signed
// product (high word in rb, low word in Q) against the testbench's own
// multiplication, and quotient (Q) and remainder (rb) against its own
// division, for random and corner operands. It also checks the timing:
// stall is high for 32 cycles of a 33-cycle multiply and 66 cycles of a
// 67-cycle divide.
module tb_muldiv_seq;
  import lass_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic         rst, start, is_div, active, stall, ext_msb, q_lsb_in, q_lsb, f_msb;
  logic [3:0]   ra, rb;
  slice_instr_t md_instr, tb_instr, instr;
  shift_mode_e  md_shift;
  logic [31:0]  d, y;
  logic         cout, ovr, zero, neg, we;
  int           checks = 0, failures = 0;

  muldiv_seq u_seq (.clk, .rst, .start, .is_div, .ra, .rb, .q_lsb, .f_msb, .active, .stall,
                    .instr(md_instr), .shift_mode(md_shift), .ext_msb, .q_lsb_in);
  assign instr = active ? md_instr : tb_instr;
  slice_array u_sa (.clk, .we, .instr, .d, .shift_mode(active ? md_shift : SH_ZERO), .ext_msb,
                    .q_lsb_in, .y, .cout, .ovr, .zero, .neg, .q_lsb, .f_msb);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [3:0] b, input logic [31:0] v, input logic to_q);
    tb_instr = '{src: SRC_DZ, func: FN_ADD, cin: 1'b0, dst: to_q ? DST_QREG : DST_RAMF, a: 4'h0, b: b};
    d = v;
    @(negedge clk);
  endtask

  task automatic rd(input logic [3:0] b, input logic from_q, output logic [31:0] v);
    tb_instr = '{src: from_q ? SRC_ZQ : SRC_ZB, func: FN_OR, cin: 1'b0, dst: DST_NOP, a: 4'h0, b: b};
    #1 v = y;
  endtask

  task automatic run(input logic div, output int cycles);
    int st = 0;
    logic fin;
    is_div = div; start = 1; cycles = 0;
    do begin
      #1;
      if (stall) st++;
      fin = !stall;
      cycles++;
      @(negedge clk);
    end while (!fin && cycles < 200);
    start = 0;
    chk("stall cycles", st, cycles - 1);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] hi, lo, x, m, dv;
    logic [63:0] num;
    longint      prod;
    int          cyc;
    rst = 1; start = 0; is_div = 0; we = 1; ra = 4'd3; rb = 4'd6; d = 0;
    tb_instr = '{src: SRC_ZB, func: FN_OR, cin: 1'b0, dst: DST_NOP, a: 4'h0, b: 4'h0};
    @(negedge clk); rst = 0;
    for (int n = 0; n < 60; n++) begin
      case (n)
        0: begin x = 32'h8000_0000; m = 32'h8000_0000; end
        1: begin x = 32'h7fff_ffff; m = 32'h8000_0000; end
        2: begin x = 32'hffff_ffff; m = 32'hffff_ffff; end
        3: begin x = 0;             m = 32'h1234_5678; end
        default: begin x = $urandom; m = $urandom; end
      endcase
      ra = 4'($urandom_range(0, 7)); rb = 4'($urandom_range(8, 15));
      wr(ra, x, 0); wr(0, m, 1);
      run(0, cyc);
      chk("multiply cycles", cyc, 33);
      rd(rb, 0, hi); rd(0, 1, lo);
      prod = longint'($signed(x)) * longint'($signed(m));
      chk("product", {hi, lo}, prod);
      @(negedge clk);
    end
    for (int n = 0; n < 60; n++) begin
      case (n)
        0: begin dv = 32'h7fff_ffff; num = 64'h7fff_fffe_ffff_ffff; end
        1: begin dv = 1;             num = 64'h0000_0000_ffff_ffff; end
        2: begin dv = 32'h4000_0001; num = 64'h4000_0000_0000_0000; end
        default: begin
          dv  = $urandom_range(1, 32'h7fff_ffff);
          num = {32'($urandom) % dv, 32'($urandom)};
        end
      endcase
      ra = 4'($urandom_range(0, 7)); rb = 4'($urandom_range(8, 15));
      wr(ra, dv, 0); wr(rb, num[63:32], 0); wr(0, num[31:0], 1);
      run(1, cyc);
      chk("divide cycles", cyc, 67);
      rd(rb, 0, hi); rd(0, 1, lo);
      chk("quotient", lo, num / 64'(dv));
      chk("remainder", hi, num % 64'(dv));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
