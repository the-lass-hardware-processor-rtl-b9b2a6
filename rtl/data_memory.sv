// data_memory: the 32-bit data memory of the 168/E.
//
// The memory is two 16-bit wide halves (most and least significant half
// word) sharing one word address. A full-word write stores both halves. A
// half-word write stores the low 16 bits of the write data into the half
// chosen by half_sel; the multiplexer in front of the upper half routes those
// bits there when the upper half is addressed. Reads return the whole word;
// the processor picks a half. Two halves, the multiplexer and per-half write
// strobes follow the block diagram; the 15-bit word address (32K words,
// 128K bytes) is read from the address widths in the diagram.
//
// Timing: asynchronous read; writes at the rising clock edge.
module data_memory #(
  parameter int unsigned AW = 15
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          wr_full,
  input  logic          wr_half,
  input  logic          half_sel,   // 0: most significant half word
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);

  logic [15:0] mshw [2**AW];
  logic [15:0] lshw [2**AW];
  logic        we_ms, we_ls;
  logic [15:0] din_ms;

  assign we_ms  = wr_full || (wr_half && !half_sel);
  assign we_ls  = wr_full || (wr_half &&  half_sel);
  assign din_ms = wr_full ? wdata[31:16] : wdata[15:0];

  always_ff @(posedge clk) begin
    if (we_ms) mshw[addr] <= din_ms;
    if (we_ls) lshw[addr] <= wdata[15:0];
  end

  assign rdata = {mshw[addr], lshw[addr]};

endmodule
