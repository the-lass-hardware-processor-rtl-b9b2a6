// tb_mar_unit: self-checking test of the address adder and memory address
// register: Y + displacement, displacement alone, hold, next full word, and
// that the MAR only loads when enabled.
module tb_mar_unit;
  import lass_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst, en;
  mar_ctl_e    ctl;
  logic [11:0] disp;
  logic [15:0] ya, addr, mar;
  int          checks = 0, failures = 0;

  mar_unit dut (.clk, .rst, .en, .mar_ctl(ctl), .disp, .y_addr(ya), .addr, .mar);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (ctl %0d)", what, got, exp, ctl);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, a;
    rst = 1; en = 0; ctl = MAR_HOLD; disp = 0; ya = 0;
    @(negedge clk); rst = 0;
    m = 0;
    for (int n = 0; n < 2000; n++) begin
      ctl = mar_ctl_e'($urandom_range(0, 3)); en = ($urandom_range(0, 3) != 0);
      disp = 12'($urandom); ya = 16'($urandom);
      case (ctl)
        MAR_ADD:  a = (ya + disp) % 65536;
        MAR_ABS:  a = disp;
        MAR_NEXT: a = (m + 2) % 65536;
        default:  a = m;
      endcase
      #1 chk("addr", addr, a);
      @(negedge clk);
      if (en) m = a;
      chk("mar", mar, m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
