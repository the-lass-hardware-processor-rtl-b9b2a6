// tb_data_memory: self-checking test of the 32-bit data memory at its full
// 32K-word size: full-word writes, half-word writes into either half (the
// upper half through the multiplexer), reads, compared with a sparse model.
module tb_data_memory;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [14:0] addr;
  logic        wf, wh, hs;
  logic [31:0] wd, rd;
  int          checks = 0, failures = 0;
  logic [31:0] model [int];
  int          used [$];

  data_memory dut (.clk, .addr, .wr_full(wf), .wr_half(wh), .half_sel(hs), .wdata(wd), .rdata(rd));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    wf = 0; wh = 0; hs = 0; addr = 0; wd = 0;
    // initialise a set of addresses, including both ends
    for (int n = 0; n < 64; n++) begin
      a = (n == 0) ? 0 : (n == 1) ? 32767 : $urandom_range(0, 32767);
      addr = 15'(a); wd = $urandom; wf = 1;
      @(negedge clk);
      model[a] = wd; used.push_back(a);
    end
    wf = 0;
    for (int n = 0; n < 3000; n++) begin
      a = used[$urandom_range(0, used.size() - 1)];
      addr = 15'(a);
      wf = ($urandom_range(0, 3) == 0); wh = !wf && ($urandom_range(0, 2) == 0);
      hs = 1'($urandom); wd = $urandom;
      #1;
      checks++;
      if (rd != model[a]) begin
        failures++;
        $display("FAIL read %0h: %0h expected %0h", a, rd, model[a]);
      end
      @(negedge clk);
      if (wf) model[a] = wd;
      else if (wh) model[a] = hs ? {model[a][31:16], wd[15:0]} : {wd[15:0], model[a][15:0]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
