// tb_agu: checks linear, strided modulo (circular) and bit-reversed FFT
// addressing against a software address model, including restart.
module tb_agu;
  localparam int A = 10;
  logic clk = 0, rst_n = 0, cfg_we = 0, cfg_fft = 0, restart = 0, step = 0;
  logic [A-1:0] cfg_base, cfg_stride, init_off, addr; logic [A:0] cfg_len; logic [3:0] cfg_fft_log;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  agu #(.ADDR_W(A)) dut (.*);
  function automatic int brev(input int v, input int n);
    int r; r = 0; for (int i = 0; i < n; i++) if (v & (1 << i)) r |= 1 << (n - 1 - i); return r;
  endfunction
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cfg_base = 0; cfg_stride = 1; cfg_len = 0; cfg_fft_log = 0; init_off = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int base, stride, len, off, fft, lg;
      fft = (t % 4 == 3); lg = int'($urandom_range(1, 8));
      base = int'($urandom_range(0, 1023)); len = fft ? 0 : ((t % 4 == 0) ? 0 : int'($urandom_range(2, 300)));
      stride = fft ? 1 : int'($urandom_range(1, (len == 0) ? 8 : len - 1));
      off = (len == 0) ? int'($urandom_range(0, 1023)) : int'($urandom_range(0, len - 1));
      if (fft) off = 0;
      @(negedge clk);
      cfg_we = 1; cfg_base = A'(base); cfg_stride = A'(stride); cfg_len = (A+1)'(len);
      cfg_fft = fft[0]; cfg_fft_log = 4'(lg); init_off = A'(off);
      @(negedge clk); cfg_we = 0;
      for (int i = 0; i < 300; i++) begin
        int exp;
        exp = fft ? (base + brev(off % (1 << lg), lg)) % 1024 : (base + off) % 1024;
        checks++;
        if (int'(addr) != exp) begin failures++; if (failures < 5) $display("FAIL t=%0d i=%0d %0d vs %0d", t, i, addr, exp); end
        step = ($urandom_range(0, 4) != 0);
        restart = (i == 150);
        @(negedge clk);
        if (restart) off = int'(init_off);
        else if (step) begin
          off = off + stride;
          if (len != 0 && off >= len) off -= len;
          off = off % 1024;
        end
        step = 0; restart = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
