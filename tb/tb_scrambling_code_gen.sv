// tb_scrambling_code_gen: checks the Gold code generator against the
// sequence-level definition: x(i+18) = x(i+7)^x(i), y(i+18) = y(i+10)^y(i+7)^
// y(i+5)^y(i), I(i) = x(i)^y(i), Q(i) = x(i+4)^x(i+6)^x(i+15)^y(i+5)^y(i+6)^
// y(i+8)^...^y(i+15); chip 0 -> +1, 1 -> -1; conj negates Q.
module tb_scrambling_code_gen;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, step = 0, conj = 0;
  logic [17:0] seed_x; scode_t code;
  int checks = 0, failures = 0;
  localparam int N = 3000;
  bit xs [N+40]; bit ys [N+40];
  always #5 clk = ~clk;
  scrambling_code_gen dut (.*);
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input logic [17:0] s, input bit cj);
    for (int k = 0; k < 18; k++) begin xs[k] = s[k]; ys[k] = 1'b1; end
    for (int i = 0; i + 18 < N + 40; i++) begin
      xs[i+18] = xs[i+7] ^ xs[i];
      ys[i+18] = ys[i+10] ^ ys[i+7] ^ ys[i+5] ^ ys[i];
    end
    @(negedge clk); seed_x = s; load = 1; conj = cj; @(negedge clk); load = 0;
    for (int i = 0; i < N; i++) begin
      bit ci, cq; int ea, eb;
      ci = xs[i] ^ ys[i];
      cq = xs[i+4] ^ xs[i+6] ^ xs[i+15] ^ ys[i+5] ^ ys[i+6] ^ ys[i+8] ^ ys[i+9] ^ ys[i+10]
         ^ ys[i+11] ^ ys[i+12] ^ ys[i+13] ^ ys[i+14] ^ ys[i+15];
      ea = ci ? -1 : 1; eb = cq ? -1 : 1; if (cj) eb = -eb;
      step = ($urandom_range(0, 3) != 0);
      while (!step) begin
        checks++; if (int'(code.a) != ea || int'(code.b) != eb) failures++;
        @(negedge clk); step = ($urandom_range(0, 3) != 0);
      end
      checks++;
      if (int'(code.a) != ea || int'(code.b) != eb) begin
        failures++; if (failures < 5) $display("FAIL chip %0d got %0d,%0d exp %0d,%0d", i, code.a, code.b, ea, eb);
      end
      @(negedge clk); step = 0;
    end
  endtask
  initial begin
    seed_x = 18'd1;
    repeat (2) @(posedge clk); rst_n = 1;
    run(18'd1, 1'b0);
    run(18'h2a5c3, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
