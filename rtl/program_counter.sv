// program_counter: the 15-bit program counter and its input multiplexer.
//
// Normally the counter steps through program memory by one word each cycle.
// A taken branch puts it in parallel-load mode: the new address comes either
// from the data field of the fetched program word (absolute address known at
// load time) or from the slice Y bus (branch to a register). This is as the
// processor description gives it; a synchronous reset to address 0 is this
// design's own choice.
//
// Timing: pc changes at the rising edge when en is high; otherwise it holds
// (the counter clock is stopped during multiply, divide and floating-point
// stalls).
module program_counter #(
  parameter int unsigned PC_W = 15
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  input  logic            load,
  input  logic            sel_y,
  input  logic [PC_W-1:0] field_addr,
  input  logic [PC_W-1:0] y_addr,
  output logic [PC_W-1:0] pc
);

  logic [PC_W-1:0] pc_next;

  always_comb begin
    if (load) pc_next = sel_y ? y_addr : field_addr;
    else      pc_next = pc + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)     pc <= '0;
    else if (en) pc <= pc_next;
  end

endmodule
