// tb_program_counter: self-checking test of the program counter and its
// multiplexer: reset to 0, sequential stepping, hold while the counter clock
// is stopped, parallel load from the data field or from the Y bus, and
// wrap-around at the top of the 15-bit space.
module tb_program_counter;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst, en, load, sel_y;
  logic [14:0] fa, ya, pc;
  int          checks = 0, failures = 0;

  program_counter dut (.clk, .rst, .en, .load, .sel_y, .field_addr(fa), .y_addr(ya), .pc);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    rst = 1; en = 0; load = 0; sel_y = 0; fa = 0; ya = 0;
    @(negedge clk); rst = 0;
    exp = 0;
    for (int n = 0; n < 2000; n++) begin
      en = ($urandom_range(0, 3) != 0); load = ($urandom_range(0, 3) == 0);
      sel_y = 1'($urandom); fa = 15'($urandom); ya = 15'($urandom);
      if (n == 5) begin load = 1; sel_y = 0; fa = 15'h7ffe; en = 1; end
      @(negedge clk);
      if (en) exp = load ? (sel_y ? ya : fa) : (exp + 1) % 32768;
      checks++;
      if (pc != 15'(exp)) begin
        failures++;
        $display("FAIL pc %0h expected %0h", pc, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
