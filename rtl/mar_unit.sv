// mar_unit: data memory address adder and memory address register (MAR).
//
// Memory operands are addressed like the IBM 370: a displacement from the
// program word is added to a base/index sum computed by the slices. The
// adder sums the 12-bit displacement (data field) with 16 bits of the Y bus
// and the result is loaded into the MAR. Addresses here are half-word
// addresses: Y[16:1] turns the byte address held in a register into a
// half-word address, and the 12-bit displacement counts half-words, so the
// first 8K bytes of data memory can be addressed by the displacement alone.
// Bit 0 of the address selects the half of a 32-bit memory word.
//
// mar_ctl (lass_pkg::mar_ctl_e) chooses the address used this cycle:
// hold the MAR, load Y+displacement, load the displacement alone, or step to
// the next full word. The new address is used in the same cycle it is
// formed (the memory read completes in that cycle), and is kept in the MAR.
// The adder and MAR are from the block diagram; half-word units and the
// four controls are this design's own reading.
module mar_unit
  import lass_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  mar_ctl_e      mar_ctl,
  input  logic [11:0]   disp,
  input  logic [AW-1:0] y_addr,
  output logic [AW-1:0] addr,
  output logic [AW-1:0] mar
);

  always_comb begin
    unique case (mar_ctl)
      MAR_ADD:  addr = y_addr + AW'(disp);
      MAR_ABS:  addr = AW'(disp);
      MAR_NEXT: addr = mar + AW'(2);
      default:  addr = mar;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)     mar <= '0;
    else if (en) mar <= addr;
  end

endmodule
