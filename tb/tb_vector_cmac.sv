// tb_vector_cmac: checks each CMAC operation against an integer model:
// products, conjugated products, sums with fold, |x|^2, maximum search with
// its index, and the radix-2 butterfly with a Q1.15 twiddle.
module tb_vector_cmac;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, first = 0, fold = 0, conj_b = 0;
  vcmac_op_e op; cplx_t a [2]; cplx_t b [2]; logic [15:0] idx;
  cacc_t r [2]; logic [CW-1:0] max_val; logic [15:0] max_idx;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vector_cmac dut (.*);
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", m); end
  endtask
  function automatic void rnd();
    for (int k = 0; k < 2; k++) begin
      a[k].re = 16'($urandom); a[k].im = 16'($urandom); b[k].re = 16'($urandom); b[k].im = 16'($urandom);
    end
  endfunction
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint sre [2], sim [2], mx, ar, a_im, br, bi; int mi;
    op = VC_MUL; idx = 0; rnd();
    repeat (2) @(posedge clk); rst_n = 1;
    // MUL, with and without conjugate
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); op = VC_MUL; en = 1; conj_b = i[0]; rnd();
      ar = a[0].re; a_im = a[0].im; br = b[0].re; bi = conj_b ? -longint'(b[0].im) : b[0].im;
      @(posedge clk); #1;
      chk(longint'(r[0].re) == ar*br - a_im*bi && longint'(r[0].im) == ar*bi + a_im*br, "mul");
    end
    // ABSQR
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); op = VC_ABSQR; en = 1; rnd();
      @(posedge clk); #1;
      chk(longint'(r[0].re) == longint'(a[0].re)*a[0].re + longint'(a[0].im)*a[0].im && r[0].im == 0, "absqr");
    end
    // MAC over 50 elements, then fold
    for (int t = 0; t < 10; t++) begin
      for (int i = 0; i < 50; i++) begin
        @(negedge clk); op = (t % 2) ? VC_MAC2 : VC_MAC; en = 1; first = (i == 0); conj_b = 0; rnd();
        for (int k = 0; k < 2; k++) begin
          if (first) begin sre[k] = 0; sim[k] = 0; end
          sre[k] += longint'(a[k].re)*b[k].re - longint'(a[k].im)*b[k].im;
          sim[k] += longint'(a[k].re)*b[k].im + longint'(a[k].im)*b[k].re;
        end
      end
      @(negedge clk); en = 0; first = 0;
      chk(longint'(r[0].re) == sre[0] && longint'(r[1].im) == sim[1], "mac");
      fold = 1; @(negedge clk); fold = 0;
      chk(longint'(r[0].re) == sre[0] + sre[1] && longint'(r[0].im) == sim[0] + sim[1], "fold");
    end
    // MAX search
    for (int t = 0; t < 10; t++) begin
      mx = -1; mi = 0;
      for (int i = 0; i < 40; i++) begin
        longint m;
        @(negedge clk); op = VC_MAX; en = 1; first = (i == 0); idx = 16'(i); rnd();
        if ($urandom_range(0, 1)) begin a[0].re = 16'($urandom_range(0, 2000)); a[0].im = 0; end
        m = longint'(a[0].re)*a[0].re + longint'(a[0].im)*a[0].im;
        if (m > mx) begin mx = m; mi = i; end
      end
      @(negedge clk); en = 0; first = 0;
      chk(longint'(max_val) == mx && int'(max_idx) == mi, "max");
    end
    // Butterfly
    for (int i = 0; i < 100; i++) begin
      longint tr, ti;
      @(negedge clk); op = VC_BFLY; en = 1; rnd();
      tr = (longint'(a[1].re)*b[0].re - longint'(a[1].im)*b[0].im) >>> 15;
      ti = (longint'(a[1].re)*b[0].im + longint'(a[1].im)*b[0].re) >>> 15;
      @(posedge clk); #1;
      chk(longint'(r[0].re) == a[0].re + tr && longint'(r[0].im) == a[0].im + ti &&
          longint'(r[1].re) == a[0].re - tr && longint'(r[1].im) == a[0].im - ti, "bfly");
    end
    // Idle unit: operands masked, multiplier outputs stay at zero.
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); en = 0; op = vcmac_op_e'(i % 6); rnd(); #1;
      chk(dut.p_re[0] == 0 && dut.p_im[1] == 0 && dut.mag0 == 0 && dut.t_re == 0, "mask");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
