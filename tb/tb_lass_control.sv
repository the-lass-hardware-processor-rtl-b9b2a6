// tb_lass_control: self-checking test of the program decode/control.
//
// The testbench plays program memory: it presents one word per cycle on the
// program data bus, advancing only when the control says so. It checks that
// each word reaches the execute stage one cycle after it is fetched, with
// the decoded strobes expected for its section; that the slice instruction
// register holds the last slice word through non-slice words with writes
// off; that branch fields are decoded in the fetch cycle; that an FP stall
// and a multiply hold the pipeline (33 cycles for a multiply); and that HALT
// stops the processor.
module tb_lass_control;
  import lass_pkg::*;
  import lass_asm_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic         rst, start, halted, advance, br_fetch, br_sel_y;
  logic [23:0]  pm_data;
  logic [3:0]   br_mask;
  logic [14:0]  br_addr;
  slice_instr_t s_instr;
  logic         s_we, ext_msb, q_lsb_in, cc_upd, mar_en, wf, wh, d_en, fp_start, wl_hi, wl_lo;
  logic         fp_stall, md_busy;
  shift_mode_e  s_shift;
  cc_mode_e     cc_mode;
  mar_ctl_e     mar_ctl;
  logic [11:0]  disp;
  logic [1:0]   wsrc, st_reg;
  dload_e       d_op;
  logic [15:0]  imm;
  fp_word_t     fpw;
  int           checks = 0, failures = 0;

  lass_control dut (
    .clk, .rst, .start, .halted, .pm_data, .advance, .br_fetch, .br_mask, .br_sel_y, .br_addr,
    .slice_instr(s_instr), .slice_we(s_we), .shift_mode(s_shift), .ext_msb, .q_lsb_in,
    .q_lsb(1'b0), .f_msb(1'b0), .cc_upd, .cc_mode, .mar_en, .mar_ctl, .disp,
    .dm_wr_full(wf), .dm_wr_half(wh), .dm_wsrc(wsrc), .d_en, .d_op, .imm,
    .fp_start, .fp_word(fpw), .fp_wr_load_hi(wl_hi), .fp_wr_load_lo(wl_lo), .fp_st_reg(st_reg),
    .fp_stall, .md_busy
  );

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] prog [$];
  int          pc, hold, mul_cycles;

  initial begin
    logic [23:0] slw;
    slw = sl(SRC_AB, FN_SUBR, 1'b1, DST_RAMF, 1, 9, CC_ARITH, 1'b1);
    prog = '{
      slw,                                        // 0
      mem(MEM_WR, MAR_ADD, 'h123),                // 1
      dl(DL_SEXT, 16'hBEEF),                      // 2
      fp(FP_ADD, 1'b1, 1, 2, 1'b0),               // 3
      br(4'hB, 'h1234, 1'b1),                     // 4
      mem(MEM_FWRL, MAR_NEXT, 0, 3),              // 5
      mul(3, 6),                                  // 6
      mem(MEM_FRDH, MAR_ABS, 7),                  // 7
      halt(),                                     // 8
      halt()
    };
    rst = 1; start = 0; fp_stall = 0; pc = 0; hold = 0; mul_cycles = 0; pm_data = prog[0];
    @(negedge clk); rst = 0;
    chk("halted after reset", halted, 1);
    start = 1; @(negedge clk); start = 0;
    chk("running", halted, 0);
    // cycle loop: present prog[pc]; after the edge the word is in execute
    for (int cyc = 0; cyc < 80 && !halted; cyc++) begin
      pm_data = prog[pc];
      // the FP add asks for one stall cycle when it is executing
      fp_stall = (dut.e_word == prog[3]) && (hold == 0) && dut.e_valid;
      #1;
      if (pm_data == prog[4]) begin
        chk("branch decoded in fetch", br_fetch, 1);
        chk("branch mask", br_mask, 4'hB);
        chk("branch to Y", br_sel_y, 1);
        chk("branch address", br_addr, 15'h1234);
      end
      if (dut.e_valid) case (dut.e_word)
        prog[0]: begin
          chk("slice write", s_we, 1);
          chk("slice instruction", s_instr, slw[17:0]);
          chk("cc mode", cc_mode, CC_ARITH);
          chk("arith shift", s_shift, SH_SIGN);
        end
        prog[1]: begin
          chk("mem: no slice write", s_we, 0);
          chk("mem: instruction register held", s_instr, slw[17:0]);
          chk("mem: MAR", {mar_en, mar_ctl, disp}, {1'b1, MAR_ADD, 12'h123});
          chk("mem: write", {wf, wh, wsrc}, {1'b1, 1'b0, 2'd0});
        end
        prog[2]: chk("dload", {d_en, d_op, imm}, {1'b1, DL_SEXT, 16'hBEEF});
        prog[3]: begin
          chk("fp start", fp_start, 1);
          chk("fp word", fpw, prog[3][17:0]);
          if (fp_stall) chk("fp stall holds", advance, 0);
          hold++;
        end
        prog[5]: chk("fp store", {wf, wsrc, st_reg, mar_ctl}, {1'b1, 2'd2, 2'd3, MAR_NEXT});
        prog[6]: begin
          chk("multiply drives slices", s_we, 1);
          mul_cycles++;
          if (!md_busy) chk("sequencer active", 0, 1);
        end
        prog[7]: chk("fp working register load", {wl_hi, wl_lo, mar_ctl, disp}, {1'b1, 1'b0, MAR_ABS, 12'd7});
        default: ;
      endcase
      if (advance) pc++;
      @(negedge clk);
    end
    chk("halted", halted, 1);
    chk("words consumed", pc, 10);
    chk("multiply cycles", mul_cycles, 33);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
