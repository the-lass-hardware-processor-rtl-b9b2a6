// tb_status_branch: self-checking test of the condition-code and branch logic.
//
// For every condition-code mode and random flag combinations it checks the
// IBM 370 condition code against a table written out in the testbench, that
// the code register loads only when asked, that an FP code takes priority,
// and that a branch is taken exactly when the mask bit for the new code
// is set.
module tb_status_branch;
  import lass_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst, upd, cout, ovr, zero, neg, fpv, taken;
  cc_mode_e   mode;
  logic [1:0] fpcc, cc, ccn;
  logic [3:0] mask;
  int         checks = 0, failures = 0;

  status_branch dut (.clk, .rst, .upd, .cc_mode(mode), .cout, .ovr, .zero, .neg,
                     .fp_cc_valid(fpv), .fp_cc(fpcc), .br_mask(mask), .cc, .cc_next(ccn),
                     .br_taken(taken));

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (mode %0d c%0d v%0d z%0d n%0d)", what, got, exp,
               mode, cout, ovr, zero, neg);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp, held;
    rst = 1; upd = 0; mode = CC_NONE; {cout, ovr, zero, neg} = 0; fpv = 0; fpcc = 0; mask = 0;
    @(negedge clk); rst = 0;
    chk("reset", cc, 0);
    for (int n = 0; n < 2000; n++) begin
      held = cc;
      mode = cc_mode_e'($urandom_range(0, 5));
      {cout, ovr, zero, neg} = 4'($urandom);
      upd  = ($urandom_range(0, 3) != 0);
      fpv  = ($urandom_range(0, 4) == 0);
      fpcc = 2'($urandom);
      mask = 4'($urandom);
      case (mode)
        CC_ARITH: exp = ovr ? 3 : zero ? 0 : neg ? 1 : 2;
        CC_CMP:   exp = zero ? 0 : (neg != ovr) ? 1 : 2;
        CC_CMPL:  exp = zero ? 0 : cout ? 2 : 1;
        CC_LOGIC: exp = zero ? 0 : 1;
        CC_LADD:  exp = 2 * cout + (zero ? 0 : 1);
        default:  exp = held;
      endcase
      if (fpv) exp = fpcc;
      if (!upd) exp = held;
      #1;
      chk("cc_next", ccn, exp);
      chk("taken", taken, (mask >> (3 - exp)) & 1);
      @(negedge clk);
      chk("cc register", cc, exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
