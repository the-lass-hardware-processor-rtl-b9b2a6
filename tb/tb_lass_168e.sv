// tb_lass_168e: end-to-end test of the 168/E processor at its full size.
//
// Program A is the inner DO-loop used to compare processors:
//   LOOP: slices  R9 + R10 -> Y
//         memory  X(i) at Y/2 + ED -> FP working register
//         FP      compare R0 (XP) with the working register, set code
//         branch  if low to FOUND
//         slices  R9 - R1 -> R9, set code
//         branch  if not minus to LOOP
// It is run twice: once with a hit at a known index, once with none. The test
// checks the index stored at FOUND (or the not-found marker) and that one
// pass of the loop takes 6 machine cycles.
//
// Program B exercises the rest: 32-bit immediates, signed multiply and
// divide through the sequencer, half-word store and load with sign
// extension, arithmetic shift, unsigned compare, branch through the Y bus,
// 48-bit FP load from two memory words, FP add and multiply (which stall the
// integer processor), load negative, FP divide and FP store of both words.
// Results are read back through the host port and compared with values
// computed here.
//
// Each mechanism is counted and must occur: FP stall, multiply/divide stall,
// taken and untaken branches, branch to Y, condition code forwarded to a
// branch, half-word write, FP store.
module tb_lass_168e;
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

  lass_168e dut (
    .clk, .rst, .start, .halted,
    .hst_pm_we(pm_we), .hst_pm_addr(pm_addr), .hst_pm_wdata(pm_wdata),
    .hst_dm_we(dm_we), .hst_dm_addr(dm_addr), .hst_dm_wdata(dm_wdata), .hst_dm_rdata(dm_rdata),
    .pc, .cc, .y_bus, .stall_fp, .stall_md, .branch_taken
  );

  // mechanism counters
  int n_fp_stall, n_md_stall, n_taken, n_untaken, n_br_y, n_fwd, n_half_wr, n_fp_store, n_fp_div;
  always @(posedge clk) if (!rst) begin
    if (stall_fp) n_fp_stall++;
    if (stall_md) n_md_stall++;
    if (branch_taken) n_taken++;
    if (dut.advance && dut.br_fetch && !dut.br_taken) n_untaken++;
    if (branch_taken && dut.br_sel_y) n_br_y++;
    if (dut.advance && dut.br_fetch && dut.u_ctl.exec &&
        (dut.cc_mode != CC_NONE || dut.fp_cc_valid)) n_fwd++;
    if (dut.dm_wr_half) n_half_wr++;
    if (dut.dm_wr_full && dut.dm_wsrc != 2'd0) n_fp_store++;
    if (stall_fp && dut.fp_start && dut.fp_word.op == FP_DIV) n_fp_div++;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic [23:0] prog [$];

  task automatic load_prog();
    for (int i = 0; i < prog.size(); i++) begin
      pm_we = 1; pm_addr = 15'(i); pm_wdata = prog[i];
      @(negedge clk);
    end
    pm_we = 0;
  endtask

  task automatic dm_write(int a, logic [31:0] v);
    dm_we = 1; dm_addr = 15'(a); dm_wdata = v;
    @(negedge clk);
    dm_we = 0;
  endtask

  task automatic dm_read(int a, output logic [31:0] v);
    dm_addr = 15'(a);
    #1 v = dm_rdata;
  endtask

  // run from address 0 to HALT; returns cycles and the cycle numbers at which
  // the loop head was fetched
  int loop_at [$];
  task automatic run(input int loop_pc, output int cycles);
    rst = 1; @(negedge clk); rst = 0;
    start = 1; @(negedge clk); start = 0;
    cycles = 0;
    loop_at.delete();
    while (!halted && cycles < 100000) begin
      if (dut.advance && pc == 15'(loop_pc)) loop_at.push_back(cycles);
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N      = 8;      // list length
  localparam int R10    = 'h100;  // base (byte address)
  localparam int ED     = 'h40;   // displacement (half-words)
  localparam int XW     = 'h60;   // word address of X(0) = (R10/2 + ED)/2
  localparam int XP_W   = 'h50;   // word address of XP
  localparam int RES_W  = 'h58;   // word address of the result
  localparam int LOOP   = 8;

  initial begin
    logic [31:0] v, v2;
    int          cyc, hit;
    logic [47:0] fa, fb;
    rst = 1; start = 0; pm_we = 0; dm_we = 0; pm_addr = 0; dm_addr = 0; pm_wdata = 0; dm_wdata = 0;
    {n_fp_stall, n_md_stall, n_taken, n_untaken, n_br_y, n_fwd, n_half_wr, n_fp_store, n_fp_div} = '0;
    repeat (2) @(negedge clk);
    rst = 0;

    // ---------------- program A: the DO-loop ----------------
    prog = '{
      dl(DL_ZEXT, 4),              d_to_r(1),          // R1 = 4
      dl(DL_ZEXT, R10),            d_to_r(10),         // R10 = base
      dl(DL_ZEXT, 4 * (N - 1)),    d_to_r(9),          // R9 = last index
      mem(MEM_FRDH, MAR_ABS, 2 * XP_W),                // XP -> working register
      fp(FP_LOAD, 1'b0, 0, 0, 1'b1),                   // R0 = XP
      // LOOP (8)
      sl(SRC_AB, FN_ADD, 1'b0, DST_NOP, 9, 10),        // R9 + R10 -> Y
      mem(MEM_FRDH, MAR_ADD, ED),                      // X(i) -> working register
      fp(FP_CMP, 1'b0, 0, 0, 1'b1),                    // R0 - X(i) -> code
      br(4, 20),                                       // BL FOUND
      sl(SRC_AB, FN_SUBR, 1'b1, DST_RAMF, 1, 9, CC_ARITH), // R9 = R9 - R1
      br(4'hB, LOOP),                                  // BNM LOOP
      dl(DL_ZEXT, 16'hDEAD),       d_to_r(2),
      r_to_y(2),                   mem(MEM_WR, MAR_ABS, 2 * RES_W),
      halt(),                      halt(),
      // FOUND (20)
      r_to_y(9),                   mem(MEM_WR, MAR_ABS, 2 * RES_W),
      halt()
    };
    load_prog();
    for (int pass = 0; pass < 2; pass++) begin
      hit = (pass == 0) ? 3 : -1;
      dm_write(XP_W, 32'h41_200000);                        // XP = 2.0
      for (int i = 0; i < N; i++)                           // X(i) = 1.0, or 3.0 at the hit
        dm_write(XW + i, (i == hit) ? 32'h41_300000 : 32'h41_100000);
      run(LOOP, cyc);
      chk("program A halts", halted, 1);
      dm_read(RES_W, v);
      chk("program A result", v, (hit >= 0) ? 4 * hit : 32'hDEAD);
      chk("loop passes", loop_at.size(), (hit >= 0) ? N - hit : N);
      for (int k = 1; k < loop_at.size(); k++)
        chk("cycles per loop pass", loop_at[k] - loop_at[k-1], 6);
    end

    // ---------------- program B ----------------
    dm_write('h300, 32'h41_180000);   // 1.5 high word
    dm_write('h301, 32'h1234_0000);   // 48-bit tail
    dm_write('h302, 32'hC2_100000);   // -16.0
    dm_write('h303, 32'h0000_0000);
    prog = '{
      // 0: R3 = 0x12345678, R4 = -3
      dl(DL_ZEXT, 16'h5678), dl(DL_HIGH, 16'h1234), d_to_r(3),
      dl(DL_SEXT, 16'hFFFD), d_to_r(4),
      // 5: Q = R4; R6:Q = R3 * R4; R7 = Q
      sl(SRC_ZA, FN_ADD, 1'b0, DST_QREG, 4, 0),
      mul(3, 6),
      sl(SRC_ZQ, FN_OR, 1'b0, DST_RAMF, 0, 7),
      r_to_y(6), mem(MEM_WR, MAR_ABS, 'h200),
      r_to_y(7), mem(MEM_WR, MAR_ABS, 'h202),
      // 12: R8 = 1000, R11 = 0, Q = 123457; Q, R11 = 123457 / 1000
      dl(DL_ZEXT, 1000), d_to_r(8),
      sl(SRC_ZA, FN_AND, 1'b0, DST_RAMF, 0, 11),
      dl(DL_ZEXT, 16'hE241), dl(DL_HIGH, 16'h0001),
      sl(SRC_DZ, FN_ADD, 1'b0, DST_QREG, 0, 0),
      div(8, 11),
      sl(SRC_ZQ, FN_OR, 1'b0, DST_NOP, 0, 0), mem(MEM_WR, MAR_ABS, 'h204),
      r_to_y(11), mem(MEM_WR, MAR_ABS, 'h206),
      // 23: half-word store of 0x8001 to the low half of word 0x104, load it
      // back sign-extended, shift right arithmetically, store
      dl(DL_SEXT, 16'h8001), d_to_r(12), r_to_y(12),
      mem(MEM_WRH, MAR_ABS, 'h209),
      mem(MEM_RDH, MAR_HOLD, 0),
      d_to_r(13),
      sl(SRC_ZB, FN_ADD, 1'b0, DST_RAMD, 0, 13, CC_NONE, 1'b1),
      r_to_y(13), mem(MEM_WR, MAR_ABS, 'h20A),
      // 32: unsigned compare R3 with R4 (low), branch if low to 35
      sl(SRC_AB, FN_SUBS, 1'b1, DST_NOP, 3, 4, CC_CMPL),
      br(4, 35),
      halt(),
      // 35: branch through Y to 40
      dl(DL_ZEXT, 40), sl(SRC_DZ, FN_OR, 1'b0, DST_NOP, 0, 0),
      br(4'hF, 0, 1'b1),
      halt(), halt(),
      // 40: FP: R1 = 1.5+tail (48-bit), R2 = -16.0; R1 = R1 + R2; R2 = R2 * R1
      mem(MEM_FRDH, MAR_ABS, 'h600), mem(MEM_FRDL, MAR_NEXT, 0),
      fp(FP_LOAD, 1'b1, 1, 0, 1'b1),
      mem(MEM_FRDH, MAR_ABS, 'h604), mem(MEM_FRDL, MAR_NEXT, 0),
      fp(FP_LOAD, 1'b1, 2, 0, 1'b1),
      fp(FP_ADD, 1'b1, 1, 2, 1'b0),
      br(4, 49),                                       // result negative: BL
      halt(),
      // 49
      fp(FP_MUL, 1'b1, 2, 1, 1'b0),
      mem(MEM_FWRH, MAR_ABS, 'h610, 1), mem(MEM_FWRL, MAR_NEXT, 0, 1),
      mem(MEM_FWRH, MAR_ABS, 'h614, 2), mem(MEM_FWRL, MAR_NEXT, 0, 2),
      // R3 = -R2 (load negative), R3 = R3 / R1 = 16.0 exactly
      fp(FP_LTST, 1'b1, 3, 2, 1'b0, SG_NEG),
      fp(FP_DIV, 1'b1, 3, 1, 1'b0),
      mem(MEM_FWRH, MAR_ABS, 'h618, 3), mem(MEM_FWRL, MAR_NEXT, 0, 3),
      dl(DL_ZEXT, 16'h600D), d_to_r(5), r_to_y(5), mem(MEM_WR, MAR_ABS, 'h220),
      halt()
    };
    load_prog();
    run(0, cyc);
    chk("program B halts", halted, 1);
    dm_read('h110, v);  // passed all branches
    chk("program B end marker", v, 32'h600D);
    begin
      longint p;
      p = longint'(32'sh1234_5678) * longint'(-3);
      dm_read('h100, v); dm_read('h101, v2);
      chk("multiply", {v, v2}, p);
    end
    dm_read('h102, v);  chk("quotient", v, 123);
    dm_read('h103, v);  chk("remainder", v, 457);
    dm_read('h104, v);  chk("half-word store", v[15:0], 16'h8001);
    dm_read('h105, v);  chk("half-word load, arithmetic shift", v, 32'hFFFF_C000);
    // 1.5 + 0.0000000001234 (hex digits) - 16 = -14.5 + tiny, 48-bit:
    // 0x1.80000000001234 -> fraction .1800001234; sum = -(16 - 1.5000001234...)
    fa = 48'h41_1800001234;
    fb = 48'hC2_1000000000;
    dm_read('h308, v); dm_read('h309, v2);
    chk("FP add high", v, 32'hC1_E7FFFF);
    chk("FP add low", v2, 32'hEDCC_0000);
    dm_read('h30A, v); dm_read('h30B, v2);
    chk("FP multiply high", v, 32'h42_E7FFFF);
    chk("FP multiply low", v2, 32'hEDCC_0000);
    dm_read('h30C, v); dm_read('h30D, v2);
    chk("FP divide high", v, 32'h42_100000);
    chk("FP divide low", v2, 32'h0000_0000);

    // every mechanism must have happened
    chk("FP stall seen",           n_fp_stall > 0, 1);
    chk("multiply/divide stall seen", n_md_stall > 0, 1);
    chk("taken branch seen",       n_taken > 0, 1);
    chk("untaken branch seen",     n_untaken > 0, 1);
    chk("branch to Y seen",        n_br_y > 0, 1);
    chk("forwarded code seen",     n_fwd > 0, 1);
    chk("half-word write seen",    n_half_wr > 0, 1);
    chk("FP store seen",           n_fp_store > 0, 1);
    chk("FP divide stall seen",    n_fp_div > 0, 1);
    $display("mechanisms: fp_stall=%0d md_stall=%0d taken=%0d untaken=%0d br_y=%0d fwd=%0d half_wr=%0d fp_store=%0d fp_div=%0d",
             n_fp_stall, n_md_stall, n_taken, n_untaken, n_br_y, n_fwd, n_half_wr, n_fp_store, n_fp_div);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
