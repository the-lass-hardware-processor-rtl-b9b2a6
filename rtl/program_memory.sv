// program_memory: the 24-bit wide program memory of the 168/E.
//
// Program and data memories are separate so that an instruction can be
// fetched while the previous one accesses data. The program counter addresses
// this memory and the word appears on the program data bus in the same
// cycle (asynchronous read). A write port lets the system that owns the
// processor load a program. Width 24 and 15 address bits (32K words) follow
// the processor description; the write port is this design's own.
module program_memory #(
  parameter int unsigned WIDTH  = 24,
  parameter int unsigned ADDR_W = 15
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata
);

  logic [WIDTH-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
