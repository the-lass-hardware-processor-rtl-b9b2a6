// tb_lass_168e_nofpu: end-to-end test of the integer-only 168/E, built
// without the optional floating-point unit (HAS_FPU = 0).
//
// The program is the search loop with an integer compare: the list element
// is read into the D register and the slices subtract it from R0, setting
// the code. An FP compare and an FP store are placed in the program as well;
// without the FP unit they must take one cycle each, leave the condition
// code alone and store zero. The test checks the index found, the 6-cycle
// loop pass, the absence of FP stalls and the FP words' effects.
module tb_lass_168e_nofpu;
  import lass_pkg::*;
  import lass_asm_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst, start, halted, pm_we, dm_we;
  logic [14:0] pm_addr, dm_addr, pc;
  logic [23:0] pm_wdata;
  logic [31:0] dm_wdata, dm_rdata, y_bus;
  logic [1:0]  cc;
  logic        stall_fp, stall_md, branch_taken;
  int          checks = 0, failures = 0;

  lass_168e #(.HAS_FPU(1'b0)) dut (
    .clk, .rst, .start, .halted,
    .hst_pm_we(pm_we), .hst_pm_addr(pm_addr), .hst_pm_wdata(pm_wdata),
    .hst_dm_we(dm_we), .hst_dm_addr(dm_addr), .hst_dm_wdata(dm_wdata), .hst_dm_rdata(dm_rdata),
    .pc, .cc, .y_bus, .stall_fp, .stall_md, .branch_taken
  );

  int n_fp_stall, n_taken;
  always @(posedge clk) if (!rst) begin
    if (stall_fp) n_fp_stall++;
    if (branch_taken) n_taken++;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N     = 6;
  localparam int R10   = 'h80;   // base (byte address)
  localparam int ED    = 'h20;   // displacement (half-words)
  localparam int XW    = 'h30;   // word address of X(0) = (R10/2 + ED)/2
  localparam int RES_W = 'h40;
  localparam int FPS_W = 'h42;
  localparam int LOOP  = 8;
  localparam int HIT   = 2;

  logic [23:0] prog [$];
  int          loop_at [$];

  initial begin
    int cyc;
    rst = 1; start = 0; pm_we = 0; dm_we = 0; pm_addr = 0; dm_addr = 0; pm_wdata = 0; dm_wdata = 0;
    n_fp_stall = 0; n_taken = 0;
    repeat (2) @(negedge clk);

    prog = '{
      dl(DL_ZEXT, 4),              d_to_r(1),          // R1 = 4
      dl(DL_ZEXT, R10),            d_to_r(10),         // R10 = base
      dl(DL_ZEXT, 4 * (N - 1)),    d_to_r(9),          // R9 = last index
      dl(DL_ZEXT, 500),            d_to_r(0),          // R0 = 500
      // LOOP (8)
      sl(SRC_AB, FN_ADD, 1'b0, DST_NOP, 9, 10),        // R9 + R10 -> Y
      mem(MEM_RD, MAR_ADD, ED),                        // X(i) -> D
      sl(SRC_DA, FN_SUBR, 1'b1, DST_NOP, 0, 0, CC_CMP),// R0 - X(i) -> code
      br(4, 20),                                       // low: FOUND
      sl(SRC_AB, FN_SUBR, 1'b1, DST_RAMF, 1, 9, CC_ARITH),
      br(4'hB, LOOP),                                  // not minus: LOOP
      dl(DL_ZEXT, 16'hDEAD),       d_to_r(2),
      r_to_y(2),                   mem(MEM_WR, MAR_ABS, 2 * RES_W),
      halt(),                      halt(),
      // FOUND (20): code is 1 (low); an FP compare must not change it
      fp(FP_CMP, 1'b0, 0, 0, 1'b1),
      br(4, 23),
      halt(),
      // 23
      r_to_y(9),                   mem(MEM_WR, MAR_ABS, 2 * RES_W),
      mem(MEM_FWRH, MAR_ABS, 2 * FPS_W, 1),            // FP store: zero
      halt()
    };
    for (int i = 0; i < prog.size(); i++) begin
      pm_we = 1; pm_addr = 15'(i); pm_wdata = prog[i];
      @(negedge clk);
    end
    pm_we = 0;
    for (int i = 0; i < N; i++) begin
      dm_we = 1; dm_addr = 15'(XW + i); dm_wdata = (i == HIT) ? 32'd900 : 32'd100 + 32'(i);
      @(negedge clk);
    end
    dm_we = 1; dm_addr = 15'(FPS_W); dm_wdata = 32'hFFFF_FFFF;
    @(negedge clk);
    dm_we = 0;

    rst = 1; @(negedge clk); rst = 0;
    start = 1; @(negedge clk); start = 0;
    cyc = 0;
    while (!halted && cyc < 10000) begin
      if (dut.advance && pc == 15'(LOOP)) loop_at.push_back(cyc);
      @(negedge clk);
      cyc++;
    end

    chk("halts", halted, 1);
    dm_addr = 15'(RES_W); #1 chk("index found", dm_rdata, 4 * HIT);
    dm_addr = 15'(FPS_W); #1 chk("FP store without FP unit", dm_rdata, 0);
    chk("loop passes", loop_at.size(), N - HIT);
    for (int k = 1; k < loop_at.size(); k++)
      chk("cycles per loop pass", loop_at[k] - loop_at[k-1], 6);
    chk("no FP stall", n_fp_stall, 0);
    // taken: N-HIT-1 loop-backs, BL to FOUND, branch after the FP compare
    chk("taken branches", n_taken, N - HIT + 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
