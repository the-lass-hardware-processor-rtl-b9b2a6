// tb_program_memory: self-checking test of the 24-bit program memory at its
// full 32K-word size: words written through the load port at random
// addresses (both ends included) read back on the program data bus.
module tb_program_memory;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [14:0] ra, wa;
  logic [23:0] rd, wd;
  logic        we;
  int          checks = 0, failures = 0;
  logic [23:0] model [int];
  int          used [$];

  program_memory dut (.clk, .raddr(ra), .rdata(rd), .we, .waddr(wa), .wdata(wd));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    we = 0; ra = 0; wa = 0; wd = 0;
    for (int n = 0; n < 2000; n++) begin
      a = (n == 0) ? 0 : (n == 1) ? 32767 : $urandom_range(0, 32767);
      we = (n < 200) || ($urandom_range(0, 3) == 0);
      wa = 15'(a); wd = 24'($urandom);
      if (used.size() > 0) ra = 15'(used[$urandom_range(0, used.size() - 1)]);
      #1;
      if (used.size() > 0) begin
        checks++;
        if (rd != model[int'(ra)]) begin
          failures++;
          $display("FAIL read %0h: %0h expected %0h", ra, rd, model[int'(ra)]);
        end
      end
      @(negedge clk);
      if (we) begin
        if (!model.exists(a)) used.push_back(a);
        model[a] = wd;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
