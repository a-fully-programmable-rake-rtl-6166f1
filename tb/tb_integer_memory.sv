// tb_integer_memory: random writes and reads against a software image,
// checking the one-cycle read latency.
module tb_integer_memory;
  logic clk = 0, en = 0, we = 0; logic [7:0] addr; logic [15:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [15:0] img [256];
  always #5 clk = ~clk;
  integer_memory #(.DEPTH(256)) dut (.*);
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    addr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 8'(i); wdata = 16'($urandom); img[i] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk); en = 1; we = $urandom_range(0, 2) == 0; addr = 8'($urandom); wdata = 16'($urandom);
      if (we) img[addr] = wdata;
      else begin
        @(posedge clk); #1; checks++;
        if (rdata != img[addr]) begin failures++; if (failures < 5) $display("FAIL addr %0d", addr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
