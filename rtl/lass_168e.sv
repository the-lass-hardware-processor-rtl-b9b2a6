// lass_168e: the 168/E programmable processor, which emulates the subset of
// IBM 370 instructions that FORTRAN track-reconstruction code needs.
//
// Structure (the processor block diagram):
//   program memory (24-bit words) --program data bus--> decode/control,
//     instruction register, program counter multiplexer, address adder,
//     D register
//   program counter (15 bits) <- multiplexer (data field or Y bus)
//   8 x 2901A slices with carry look-ahead and shift control -> Y bus (32)
//   status register / branch logic (IBM 370 condition code)
//   address adder (12-bit displacement + Y) -> memory address register
//   data memory (32 bits, two half-word halves), written from the Y bus
//   half/full word multiplexer -> D register -> slice direct-data inputs
//   floating-point unit, loaded from data memory, setting the condition code
// The three-state buffers of the board (program counter to program memory,
// Y bus to data memory bus) are plain multiplexers here: the program memory
// address is the program counter, or the host address while the processor
// is halted; the data memory write data is the Y bus or an FP register.
//
// Host side: the processor is loaded while halted through hst_* ports
// (program memory writes, data memory reads and writes), started with a
// one-cycle start pulse at program address 0 after reset, and reports halted
// after a HALT word. One program word executes per cycle except for the
// multi-cycle FP operations and multiply/divide, which stop the counter.
// This host side is this design's own; the published description leaves
// the system around the processor unspecified.
//
// Parameters: PM_ADDR_W and DM_ADDR_W set the memory sizes (32K words each);
// HAS_FPU = 0 builds the integer-only processor, since the floating-point
// board is optional in a 168/E.
module lass_168e
  import lass_pkg::*;
#(
  parameter int unsigned PM_ADDR_W = 15,
  parameter int unsigned DM_ADDR_W = 15,
  parameter bit          HAS_FPU   = 1'b1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  output logic             halted,
  // host access while halted
  input  logic             hst_pm_we,
  input  logic [PM_ADDR_W-1:0] hst_pm_addr,
  input  logic [23:0]      hst_pm_wdata,
  input  logic             hst_dm_we,
  input  logic [DM_ADDR_W-1:0] hst_dm_addr,
  input  logic [31:0]      hst_dm_wdata,
  output logic [31:0]      hst_dm_rdata,
  // observation
  output logic [14:0]      pc,
  output logic [1:0]       cc,
  output logic [31:0]      y_bus,
  output logic             stall_fp,
  output logic             stall_md,
  output logic             branch_taken
);

  // fetch / control
  logic [23:0]  pm_data;
  logic         advance, br_fetch, br_sel_y, br_taken;
  logic [3:0]   br_mask;
  logic [14:0]  br_addr;
  slice_instr_t s_instr;
  logic         s_we, ext_msb, q_lsb_in, q_lsb, f_msb;
  shift_mode_e  s_shift;
  logic         cc_upd;
  cc_mode_e     cc_mode;
  logic         mar_en, dm_wr_full, dm_wr_half, d_en;
  mar_ctl_e     mar_ctl;
  logic [11:0]  disp;
  logic [1:0]   dm_wsrc;
  dload_e       d_op;
  logic [15:0]  imm;
  logic         fp_start, fp_wr_hi, fp_wr_lo, fp_stall, fp_cc_valid;
  fp_word_t     fp_word;
  logic [1:0]   fp_st_reg, fp_cc;
  logic [47:0]  fp_st_data;
  logic         md_busy;
  // datapath
  logic [31:0]  y, d, dm_rdata, dm_wdata;
  logic         s_cout, s_ovr, s_zero, s_neg;
  logic [15:0]  maddr;

  logic [PM_ADDR_W-1:0] pc_full;

  lass_control u_ctl (
    .clk(clk), .rst(rst), .start(start), .halted(halted),
    .pm_data(pm_data), .advance(advance), .br_fetch(br_fetch), .br_mask(br_mask),
    .br_sel_y(br_sel_y), .br_addr(br_addr),
    .slice_instr(s_instr), .slice_we(s_we), .shift_mode(s_shift), .ext_msb(ext_msb),
    .q_lsb_in(q_lsb_in), .q_lsb(q_lsb), .f_msb(f_msb),
    .cc_upd(cc_upd), .cc_mode(cc_mode),
    .mar_en(mar_en), .mar_ctl(mar_ctl), .disp(disp),
    .dm_wr_full(dm_wr_full), .dm_wr_half(dm_wr_half), .dm_wsrc(dm_wsrc),
    .d_en(d_en), .d_op(d_op), .imm(imm),
    .fp_start(fp_start), .fp_word(fp_word), .fp_wr_load_hi(fp_wr_hi),
    .fp_wr_load_lo(fp_wr_lo), .fp_st_reg(fp_st_reg), .fp_stall(fp_stall),
    .md_busy(md_busy)
  );

  program_counter #(.PC_W(PM_ADDR_W)) u_pc (
    .clk(clk), .rst(rst), .en(advance), .load(br_fetch && br_taken),
    .sel_y(br_sel_y), .field_addr(PM_ADDR_W'(br_addr)), .y_addr(y[PM_ADDR_W-1:0]), .pc(pc_full)
  );
  assign pc = 15'(pc_full);

  program_memory #(.WIDTH(24), .ADDR_W(PM_ADDR_W)) u_pm (
    .clk(clk), .raddr(pc_full), .rdata(pm_data),
    .we(hst_pm_we && halted), .waddr(hst_pm_addr), .wdata(hst_pm_wdata)
  );

  slice_array #(.NSLICES(8)) u_slices (
    .clk(clk), .we(s_we), .instr(s_instr), .d(d), .shift_mode(s_shift),
    .ext_msb(ext_msb), .q_lsb_in(q_lsb_in), .y(y), .cout(s_cout), .ovr(s_ovr),
    .zero(s_zero), .neg(s_neg), .q_lsb(q_lsb), .f_msb(f_msb)
  );

  status_branch u_sb (
    .clk(clk), .rst(rst), .upd(cc_upd), .cc_mode(cc_mode), .cout(s_cout),
    .ovr(s_ovr), .zero(s_zero), .neg(s_neg), .fp_cc_valid(fp_cc_valid),
    .fp_cc(fp_cc), .br_mask(br_mask), .cc(cc), .cc_next(), .br_taken(br_taken)
  );

  mar_unit #(.AW(16)) u_mar (
    .clk(clk), .rst(rst), .en(mar_en), .mar_ctl(mar_ctl), .disp(disp),
    .y_addr(y[16:1]), .addr(maddr), .mar()
  );

  // Y bus or FP register onto the data memory bus
  always_comb begin
    unique case (dm_wsrc)
      2'd1:    dm_wdata = fp_st_data[47:16];
      2'd2:    dm_wdata = {fp_st_data[15:0], 16'h0};
      default: dm_wdata = y;
    endcase
  end

  data_memory #(.AW(DM_ADDR_W)) u_dm (
    .clk(clk),
    .addr(halted ? hst_dm_addr : DM_ADDR_W'(maddr[15:1])),
    .wr_full(halted ? hst_dm_we : dm_wr_full),
    .wr_half(!halted && dm_wr_half),
    .half_sel(maddr[0]),
    .wdata(halted ? hst_dm_wdata : dm_wdata),
    .rdata(dm_rdata)
  );
  assign hst_dm_rdata = dm_rdata;

  d_register u_d (
    .clk(clk), .rst(rst), .en(d_en), .op(d_op), .mem_rdata(dm_rdata),
    .half_sel(maddr[0]), .imm(imm), .d(d)
  );

  // The floating-point unit is an option of the 168/E. Without it, FP words
  // execute as one-cycle no-ops, leave the condition code alone, and FP
  // stores write zero.
  if (HAS_FPU) begin : g_fpu
    fp_unit #(.NFPR(4)) u_fp (
      .clk(clk), .rst(rst), .start(fp_start), .w(fp_word), .wr_load_hi(fp_wr_hi),
      .wr_load_lo(fp_wr_lo), .mem_rdata(dm_rdata), .st_reg(fp_st_reg),
      .st_data(fp_st_data), .stall(fp_stall), .cc_valid(fp_cc_valid), .cc(fp_cc)
    );
  end else begin : g_no_fpu
    assign fp_st_data  = '0;
    assign fp_stall    = 1'b0;
    assign fp_cc_valid = 1'b0;
    assign fp_cc       = 2'd0;
  end

  assign y_bus        = y;
  assign stall_fp     = fp_stall;
  assign stall_md     = md_busy;
  assign branch_taken = advance && br_fetch && br_taken;

endmodule
