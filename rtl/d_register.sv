// d_register: half/full word multiplexer and D register of the 168/E.
//
// The D register drives the direct-data inputs of the slices. It is loaded
// either from the data memory (a full word, or the half word chosen by
// half_sel and sign extended, as the IBM 370 half-word instructions need) or
// from the data field of a program word (a 16-bit immediate, sign or zero
// extended, or placed in the upper half to build a 32-bit constant).
// The multiplexer, the register and its two sources come from the block
// diagram; the list of load modes (lass_pkg::dload_e) is this design's own.
//
// Timing: d changes at the rising clock edge when en is high and op is not
// DL_HOLD.
module d_register
  import lass_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  dload_e      op,
  input  logic [31:0] mem_rdata,
  input  logic        half_sel,   // 0: most significant half word
  input  logic [15:0] imm,
  output logic [31:0] d
);

  logic [15:0] half;
  logic [31:0] d_next;

  assign half = half_sel ? mem_rdata[15:0] : mem_rdata[31:16];

  always_comb begin
    unique case (op)
      DL_SEXT: d_next = {{16{imm[15]}}, imm};
      DL_ZEXT: d_next = {16'h0, imm};
      DL_HIGH: d_next = {imm, d[15:0]};
      DL_MEMW: d_next = mem_rdata;
      DL_MEMH: d_next = {{16{half[15]}}, half};
      default: d_next = d;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)     d <= '0;
    else if (en) d <= d_next;
  end

endmodule
