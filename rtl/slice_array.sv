// slice_array: the 32-bit integer ALU of the 168/E, eight am2901 slices in
// cascade with carry look-ahead and shift control.
//
// All slices receive the same 18-bit micro-instruction. The carry into slice
// k is formed by look-ahead from the G/P outputs of the slices below it and
// the array carry-in (the micro-instruction's carry bit), as a 2902-style
// look-ahead unit does. The shift pins are chained: on a down shift slice k
// receives F[0] of slice k+1, on an up shift F[3] of slice k-1; Q is chained
// the same way. The shift control closes the ends of the chains:
//   register down shift MSB: 0, F31, F31^OVR or ext_msb (shift_mode_e)
//   register up shift LSB:   Q31 for RAMQU (double-length shift), else 0
//   Q down shift MSB:        F0 (double-length shift and multiply)
//   Q up shift LSB:          q_lsb_in (divide quotient bit)
// The eight slices and the look-ahead come from the processor block diagram;
// the end-of-chain choices are this design's own.
//
// Combinational from instruction to Y and flags; registers change at the
// rising clock edge when we is high.
module slice_array
  import lass_pkg::*;
#(
  parameter int unsigned NSLICES = 8
) (
  input  logic                   clk,
  input  logic                   we,
  input  slice_instr_t           instr,
  input  logic [4*NSLICES-1:0]   d,
  input  shift_mode_e            shift_mode,
  input  logic                   ext_msb,
  input  logic                   q_lsb_in,
  output logic [4*NSLICES-1:0]   y,
  output logic                   cout,
  output logic                   ovr,
  output logic                   zero,
  output logic                   neg,
  output logic                   q_lsb,   // Q[0], multiplier bit
  output logic                   f_msb    // F31
);

  localparam int unsigned N = NSLICES;

  logic [N:0]   c;
  logic [N-1:0] g, p, ovr_s, fz, f3, r0o, r3o, q0o, q3o, r0i, r3i, q0i, q3i, co;
  logic         down_fill;

  // Carry look-ahead: c[k+1] = G[k] | P[k] c[k], expanded from c[0]
  always_comb begin
    c[0] = instr.cin;
    for (int k = 0; k < int'(N); k++) begin
      logic acc_g, acc_p;
      acc_g = 1'b0;
      acc_p = 1'b1;
      for (int j = k; j >= 0; j--) begin
        acc_g = acc_g | (acc_p & g[j]);
        acc_p = acc_p & p[j];
      end
      c[k+1] = acc_g | (acc_p & instr.cin);
    end
  end

  always_comb begin
    unique case (shift_mode)
      SH_ZERO: down_fill = 1'b0;
      SH_SIGN: down_fill = f3[N-1];
      SH_TRUE: down_fill = f3[N-1] ^ ovr_s[N-1];
      default: down_fill = ext_msb;
    endcase
  end

  // Shift linkage between slices
  always_comb begin
    for (int k = 0; k < int'(N); k++) begin
      r3i[k] = (k == int'(N) - 1) ? down_fill : r0o[(k+1) % N];
      r0i[k] = (k == 0) ? ((instr.dst == DST_RAMQU) ? q3o[N-1] : 1'b0) : r3o[(k+N-1) % N];
      q3i[k] = (k == int'(N) - 1) ? r0o[0] : q0o[(k+1) % N];
      q0i[k] = (k == 0) ? q_lsb_in : q3o[(k+N-1) % N];
    end
  end

  for (genvar k = 0; k < int'(N); k++) begin : g_slice
    am2901 u_slice (
      .clk      (clk),
      .we       (we),
      .instr    (instr),
      .d        (d[4*k +: 4]),
      .cin      (c[k]),
      .ram0_in  (r0i[k]),
      .ram3_in  (r3i[k]),
      .q0_in    (q0i[k]),
      .q3_in    (q3i[k]),
      .y        (y[4*k +: 4]),
      .ram0_out (r0o[k]),
      .ram3_out (r3o[k]),
      .q0_out   (q0o[k]),
      .q3_out   (q3o[k]),
      .cout     (co[k]),
      .ovr      (ovr_s[k]),
      .f_zero   (fz[k]),
      .f3       (f3[k]),
      .g        (g[k]),
      .p        (p[k])
    );
  end

  assign cout  = co[N-1];
  assign ovr   = ovr_s[N-1];
  assign zero  = &fz;
  assign neg   = f3[N-1];
  assign f_msb = f3[N-1];
  assign q_lsb = q0o[0];

endmodule
