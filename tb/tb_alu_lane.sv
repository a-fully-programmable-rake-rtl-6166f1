// tb_alu_lane: self-checking test of one vector ALU lane.
// Drives random samples and all nine short codes a + jb (a, b in {-1,0,1}),
// including full-scale -32768 inputs, with random sum restarts, and compares
// the accumulator with an integer model of (a + jb)(xr + j xi) summed.
module tb_alu_lane;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  cplx_t x; scode_t code; aacc_t acc;
  int checks = 0, failures = 0;
  longint mre = 0, mim = 0;
  always #5 clk = ~clk;
  alu_lane dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    x = '0; code = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int a, b, xr, xi;
      a = int'($urandom_range(0, 2)) - 1; b = int'($urandom_range(0, 2)) - 1;
      xr = (i % 50 == 7) ? -32768 : int'($urandom_range(0, 65535)) - 32768;
      xi = (i % 50 == 7) ? -32768 : int'($urandom_range(0, 65535)) - 32768;
      @(negedge clk);
      en = ($urandom_range(0, 9) != 0); clr = (i == 0) || ($urandom_range(0, 15) == 0);
      x.re = 16'(xr); x.im = 16'(xi); code.a = 2'(a); code.b = 2'(b);
      if (en) begin
        if (clr) begin mre = 0; mim = 0; end
        mre += a * xr - b * xi; mim += a * xi + b * xr;
      end
      @(posedge clk); #1;
      if (!en) begin  // idle lane: masked input, adder outputs stay at zero
        checks++;
        if (dut.p_re != 0 || dut.p_im != 0) failures++;
      end
      checks++;
      if (longint'(acc.re) != mre || longint'(acc.im) != mim) begin
        failures++;
        if (failures < 5) $display("FAIL i=%0d acc=%0d,%0d model=%0d,%0d", i, acc.re, acc.im, mre, mim);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
