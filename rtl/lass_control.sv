// lass_control: program decode/control of the 168/E integer processing unit.
//
// The processor is a two-stage pipeline: while one program word executes,
// the next is fetched from program memory. The control field (top 6 bits)
// of a program word selects the control section that executes it; the
// encoding is listed in lass_pkg.
//
// Fetch stage: the word at the program counter is on the program data bus.
// A BRANCH word is executed here, in the cycle it is fetched: its mask and
// target go to the status/branch logic and the program counter, so a branch
// costs one machine cycle and needs no slot behind it. At the clock edge the
// word moves into the execute register; a SLICE word's 18-bit data field also
// goes into the instruction register that feeds the slices.
//
// Execute stage: a SLICE word runs the slices (register and Q writes enabled)
// and may set the condition code. For every other word the instruction
// register keeps the last slice micro-instruction with writes disabled, so
// the Y bus keeps showing the last slice result: a MEM word adds its
// displacement to it (address), stores it, or loads the D register or the FP
// working register from memory; a DLOAD word loads an immediate into the D
// register; an FP word starts the floating-point unit; MUL/DIV start the
// sequencer, which then drives the slices; HALT stops the processor.
//
// Stalls: while the FP unit or the multiply/divide sequencer asks for it,
// the program counter, fetch and execute registers hold (the counter clock
// is stopped).
//
// The instruction register between program memory and slices, the control
// field / data field split, one-cycle branches and the stopped counter clock
// follow the processor description. The encodings, the forwarding of the new
// condition code to a fetched branch, the start/halt handshake and reset
// behaviour are this design's own.
//
// Interface: start (one cycle) starts execution at the current program
// counter; halted is high once a HALT word has executed, until the next
// start.
module lass_control
  import lass_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  output logic         halted,
  // fetch
  input  logic [23:0]  pm_data,
  output logic         advance,      // counter and pipeline step this cycle
  output logic         br_fetch,     // fetched word is a branch
  output logic [3:0]   br_mask,
  output logic         br_sel_y,
  output logic [14:0]  br_addr,
  // slices
  output slice_instr_t slice_instr,
  output logic         slice_we,
  output shift_mode_e  shift_mode,
  output logic         ext_msb,
  output logic         q_lsb_in,
  input  logic         q_lsb,
  input  logic         f_msb,
  // condition code
  output logic         cc_upd,
  output cc_mode_e     cc_mode,
  // data memory, MAR, D register
  output logic         mar_en,
  output mar_ctl_e     mar_ctl,
  output logic [11:0]  disp,
  output logic         dm_wr_full,
  output logic         dm_wr_half,
  output logic [1:0]   dm_wsrc,      // 0 Y bus, 1 FP high word, 2 FP low word
  output logic         d_en,
  output dload_e       d_op,
  output logic [15:0]  imm,
  // floating-point unit
  output logic         fp_start,
  output fp_word_t     fp_word,
  output logic         fp_wr_load_hi,
  output logic         fp_wr_load_lo,
  output logic [1:0]   fp_st_reg,
  input  logic         fp_stall,
  // activity, for observation
  output logic         md_busy
);

  logic         running, e_valid, exec, stall;
  logic [23:0]  e_word;
  slice_instr_t sir;
  section_e     e_sec;
  logic [5:0]   e_ctl;
  mem_op_e      m_op;
  logic         md_start, md_active, md_stall;
  slice_instr_t md_instr;
  shift_mode_e  md_shift;

  assign e_ctl = e_word[23:18];
  assign e_sec = section_e'(e_ctl[5:4]);
  assign m_op  = mem_op_e'(e_ctl[3:0]);
  assign exec  = e_valid && running;
  assign stall = fp_stall || md_stall;
  assign advance = running && !stall;
  assign halted  = !running;

  // Fetch-stage branch decode
  assign br_fetch = running && (pm_data[23:22] == SEC_BRANCH);
  assign br_mask  = pm_data[21:18];
  assign br_sel_y = pm_data[17];
  assign br_addr  = pm_data[14:0];

  // Multiply / divide sequencer
  assign md_start = exec && (e_ctl == CTL_MUL || e_ctl == CTL_DIV);

  muldiv_seq u_md (
    .clk        (clk),
    .rst        (rst),
    .start      (md_start),
    .is_div     (e_ctl == CTL_DIV),
    .ra         (e_word[7:4]),
    .rb         (e_word[3:0]),
    .q_lsb      (q_lsb),
    .f_msb      (f_msb),
    .active     (md_active),
    .stall      (md_stall),
    .instr      (md_instr),
    .shift_mode (md_shift),
    .ext_msb    (ext_msb),
    .q_lsb_in   (q_lsb_in)
  );
  assign md_busy = md_active;

  // Slice control
  assign slice_instr = md_active ? md_instr : sir;
  assign slice_we    = exec && ((e_sec == SEC_SLICE) || md_active);
  assign shift_mode  = md_active ? md_shift : (e_ctl[3] ? SH_SIGN : SH_ZERO);
  assign cc_upd      = exec;
  assign cc_mode     = (exec && e_sec == SEC_SLICE) ? cc_mode_e'(e_ctl[2:0]) : CC_NONE;

  // Memory section
  always_comb begin
    mar_en        = 1'b0;
    mar_ctl       = mar_ctl_e'(e_word[13:12]);
    disp          = e_word[11:0];
    dm_wr_full    = 1'b0;
    dm_wr_half    = 1'b0;
    dm_wsrc       = 2'd0;
    d_en          = exec;
    d_op          = DL_HOLD;
    imm           = e_word[15:0];
    fp_wr_load_hi = 1'b0;
    fp_wr_load_lo = 1'b0;
    fp_st_reg     = e_word[15:14];
    if (exec && e_sec == SEC_MEM) begin
      mar_en = 1'b1;
      unique case (m_op)
        MEM_RD:   d_op = DL_MEMW;
        MEM_RDH:  d_op = DL_MEMH;
        MEM_WR:   dm_wr_full = 1'b1;
        MEM_WRH:  dm_wr_half = 1'b1;
        MEM_FRDH: fp_wr_load_hi = 1'b1;
        MEM_FRDL: fp_wr_load_lo = 1'b1;
        MEM_FWRH: begin dm_wr_full = 1'b1; dm_wsrc = 2'd1; end
        MEM_FWRL: begin dm_wr_full = 1'b1; dm_wsrc = 2'd2; end
        default: ;
      endcase
    end
    if (exec && e_sec == SEC_MISC && !e_ctl[3]) begin
      unique case (dload_e'(e_ctl[2:0]))
        DL_SEXT, DL_ZEXT, DL_HIGH: d_op = dload_e'(e_ctl[2:0]);
        default: ;
      endcase
    end
  end

  // Floating-point section
  assign fp_start = exec && e_sec == SEC_MISC && e_ctl[3:2] == 2'b10;
  assign fp_word  = fp_word_t'(e_word[17:0]);

  // Pipeline registers and run state
  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      e_valid <= 1'b0;
      e_word  <= {CTL_NOP, 18'h0};
      sir     <= slice_instr_t'({SRC_ZB, FN_ADD, 1'b0, DST_NOP, 4'h0, 4'h0});
    end else begin
      if (start) begin
        running <= 1'b1;
        e_valid <= 1'b0;
      end else if (exec && e_ctl == CTL_HALT) begin
        running <= 1'b0;
        e_valid <= 1'b0;
      end else if (advance) begin
        e_valid <= 1'b1;
        e_word  <= pm_data;
        if (pm_data[23:22] == SEC_SLICE) sir <= slice_instr_t'(pm_data[17:0]);
      end
    end
  end

endmodule
