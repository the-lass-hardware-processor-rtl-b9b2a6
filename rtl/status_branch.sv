// status_branch: condition-code register and branch logic of the 168/E.
//
// The 2901A status flags (carry, overflow, zero, negative) are converted into
// the IBM 370 two-bit condition code by a few gates chosen by cc_mode
// (lass_pkg::cc_mode_e); a floating-point result may set the code instead.
// cc_next is the code as it will be after this cycle, and it is what a
// conditional branch tests: a branch fetched right after an instruction that
// sets the code sees that instruction's result, so compare-and-branch and
// decrement-and-branch pairs run one machine cycle each. A branch is taken
// when the 370 mask bit for the code is set (mask bit 8 tests code 0).
//
// The conversion to 370 codes, loading of the condition-code register and
// "branch if the status matches the instruction" follow the processor
// description; the forwarding of the new code to the branch and the mode
// encoding are this design's own.
//
// Timing: combinational cc_next and br_taken; cc register loads at the rising
// edge when upd is high.
module status_branch
  import lass_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       upd,        // the executing word may change the code
  input  cc_mode_e   cc_mode,    // from an executing slice word
  input  logic       cout,
  input  logic       ovr,
  input  logic       zero,
  input  logic       neg,
  input  logic       fp_cc_valid,
  input  logic [1:0] fp_cc,
  input  logic [3:0] br_mask,
  output logic [1:0] cc,
  output logic [1:0] cc_next,
  output logic       br_taken
);

  logic [1:0] slice_cc;
  logic       set_slice;

  always_comb begin
    set_slice = 1'b1;
    unique case (cc_mode)
      CC_ARITH: slice_cc = ovr ? 2'd3 : zero ? 2'd0 : neg ? 2'd1 : 2'd2;
      CC_CMP:   slice_cc = zero ? 2'd0 : (neg ^ ovr) ? 2'd1 : 2'd2;
      CC_CMPL:  slice_cc = zero ? 2'd0 : !cout ? 2'd1 : 2'd2;
      CC_LOGIC: slice_cc = zero ? 2'd0 : 2'd1;
      CC_LADD:  slice_cc = {cout, !zero};
      default: begin
        slice_cc  = cc;
        set_slice = 1'b0;
      end
    endcase
  end

  always_comb begin
    cc_next = cc;
    if (upd && fp_cc_valid)    cc_next = fp_cc;
    else if (upd && set_slice) cc_next = slice_cc;
  end

  assign br_taken = mask_hit(br_mask, cc_next);

  always_ff @(posedge clk) begin
    if (rst)      cc <= 2'd0;
    else if (upd) cc <= cc_next;
  end

endmodule
