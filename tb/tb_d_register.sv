// tb_d_register: self-checking test of the half/full word multiplexer and D
// register: every load mode, both half words with sign extension, the
// 32-bit constant built from two immediates, and hold when not enabled.
module tb_d_register;
  import lass_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst, en, hs;
  dload_e      op;
  logic [31:0] mem, d;
  logic [15:0] imm;
  int          checks = 0, failures = 0;

  d_register dut (.clk, .rst, .en, .op, .mem_rdata(mem), .half_sel(hs), .imm, .d);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    int h;
    rst = 1; en = 0; op = DL_HOLD; mem = 0; imm = 0; hs = 0;
    @(negedge clk); rst = 0;
    e = 0;
    for (int n = 0; n < 2000; n++) begin
      op = dload_e'($urandom_range(0, 5)); en = ($urandom_range(0, 4) != 0);
      mem = $urandom; imm = 16'($urandom); hs = 1'($urandom);
      h = hs ? mem[15:0] : mem[31:16];
      if (en) case (op)
        DL_SEXT: e = (imm >= 32768) ? 64'hffff_0000 + imm : imm;
        DL_ZEXT: e = imm;
        DL_HIGH: e = imm * 65536 + (e % 65536);
        DL_MEMW: e = mem;
        DL_MEMH: e = (h >= 32768) ? 64'hffff_0000 + h : h;
        default: ;
      endcase
      @(negedge clk);
      checks++;
      if (d != 32'(e)) begin
        failures++;
        $display("FAIL op %0d: d %0h expected %0h", op, d, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
