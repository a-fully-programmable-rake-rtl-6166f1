// tb_cmac_cluster: runs the CMAC kernels of the benchmark table on the cluster
// with memory models (one access per cycle, one-cycle read latency, stride per
// access) and checks results and cycle costs:
//   vmul 16 -> 18, vabsqr 64 -> 66, vmac 256 -> 132, vmac2 256 -> 260 cycles,
// plus conjugated MAC (MRC weighting), maximum search and butterflies.
module tb_cmac_cluster;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  cfg_t cfg; vcmac_op_e op; logic [15:0] len; logic busy, done;
  mreq_t lda_req, ldb_req, st_req; mvec_t lda_rdata, ldb_rdata;
  logic [CW-1:0] max_val; logic [15:0] max_idx;
  int checks = 0, failures = 0;
  cplx_t amem [1024]; cplx_t bmem [1024]; cplx_t smem [1024];
  int ap, as_, bp, bs, sp, ss;
  always #5 clk = ~clk;
  cmac_cluster dut (.*);
  always_ff @(posedge clk) begin
    if (lda_req.en) begin for (int k = 0; k < 4; k++) lda_rdata[k] <= amem[(ap + k) % 1024]; ap <= ap + as_; end
    if (ldb_req.en) begin for (int k = 0; k < 4; k++) ldb_rdata[k] <= bmem[(bp + k) % 1024]; bp <= bp + bs; end
    if (st_req.en) begin
      for (int k = 0; k < 4; k++) if (st_req.wmask[k]) smem[(sp + k) % 1024] <= st_req.wdata[k];
      sp <= sp + ss;
    end
  end
  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask
  task automatic wcfg(input int r, input int v);
    @(negedge clk); cfg.we = 1; cfg.addr = {U_CMAC, 4'(r)}; cfg.data = 16'(v);
    @(negedge clk); cfg = '0;
  endtask
  task automatic run(input vcmac_op_e o, input int n, output int cycles);
    @(negedge clk); op = o; len = 16'(n); start = 1;
    @(negedge clk); start = 0; cycles = 0;
    while (busy) begin cycles++; @(negedge clk); end
  endtask
  function automatic int rnd(input int m); return int'($urandom_range(0, 2 * m)) - m; endfunction
  function automatic int sc(input longint v, input int sh);
    longint r; r = v; if (sh != 0) r = (r + (longint'(1) << (sh - 1))) >>> sh;
    if (r > 32767) r = 32767; if (r < -32768) r = -32768; return int'(r);
  endfunction
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int cyc; longint er, ei, er2, ei2;
    cfg = '0; op = VC_MUL; len = 0;
    for (int i = 0; i < 1024; i++) begin
      amem[i].re = 16'(rnd(3000)); amem[i].im = 16'(rnd(3000)); bmem[i].re = 16'(rnd(3000)); bmem[i].im = 16'(rnd(3000));
    end
    repeat (2) @(posedge clk); rst_n = 1;
    // vmul 16
    wcfg(0, 8); wcfg(1, 0); ap = 0; as_ = 1; bp = 0; bs = 1; sp = 0; ss = 1;
    run(VC_MUL, 16, cyc);
    chk(cyc == 18, $sformatf("vmul cycles %0d", cyc));
    for (int i = 0; i < 16; i++)
      chk(int'(smem[i].re) == sc(longint'(amem[i].re)*bmem[i].re - longint'(amem[i].im)*bmem[i].im, 8) &&
          int'(smem[i].im) == sc(longint'(amem[i].re)*bmem[i].im + longint'(amem[i].im)*bmem[i].re, 8), "vmul");
    // vabsqr 64
    wcfg(0, 10); ap = 64; as_ = 1; sp = 100; ss = 1;
    run(VC_ABSQR, 64, cyc);
    chk(cyc == 66, $sformatf("vabsqr cycles %0d", cyc));
    for (int i = 0; i < 64; i++)
      chk(int'(smem[100 + i].re) == sc(longint'(amem[64+i].re)*amem[64+i].re + longint'(amem[64+i].im)*amem[64+i].im, 10) && smem[100+i].im == 0, "vabsqr");
    // vmac 256 with conjugated coefficients (MRC weighting)
    wcfg(0, 12); wcfg(1, 1); ap = 0; as_ = 2; bp = 256; bs = 2; sp = 200; ss = 1;
    run(VC_MAC, 256, cyc);
    chk(cyc == 132, $sformatf("vmac cycles %0d", cyc));
    er = 0; ei = 0;
    for (int i = 0; i < 256; i++) begin
      er += longint'(amem[i].re)*bmem[256+i].re + longint'(amem[i].im)*bmem[256+i].im;
      ei += longint'(amem[i].im)*bmem[256+i].re - longint'(amem[i].re)*bmem[256+i].im;
    end
    chk(int'(smem[200].re) == sc(er, 12) && int'(smem[200].im) == sc(ei, 12) && sp == 201, "vmac");
    // vmac2 256: two sums of the same data with interleaved coefficient sets
    wcfg(1, 0); ap = 300; as_ = 1; bp = 0; bs = 2; sp = 210; ss = 1;
    run(VC_MAC2, 256, cyc);
    chk(cyc == 260, $sformatf("vmac2 cycles %0d", cyc));
    er = 0; ei = 0; er2 = 0; ei2 = 0;
    for (int i = 0; i < 256; i++) begin
      cplx_t x, c0, c1; x = amem[(300 + i) % 1024]; c0 = bmem[2*i]; c1 = bmem[2*i+1];
      er += longint'(x.re)*c0.re - longint'(x.im)*c0.im; ei += longint'(x.re)*c0.im + longint'(x.im)*c0.re;
      er2 += longint'(x.re)*c1.re - longint'(x.im)*c1.im; ei2 += longint'(x.re)*c1.im + longint'(x.im)*c1.re;
    end
    chk(int'(smem[210].re) == sc(er, 12) && int'(smem[210].im) == sc(ei, 12), "vmac2 sum 0");
    chk(int'(smem[211].re) == sc(er2, 12) && int'(smem[211].im) == sc(ei2, 12), "vmac2 sum 1");
    // maximum search over 100 values with a planted peak
    begin
      int pk; longint mx; pk = 37; amem[500 + pk] = '{re: 16'sd20000, im: -16'sd15000};
      ap = 500; as_ = 1;
      run(VC_MAX, 100, cyc);
      mx = longint'(20000)*20000 + longint'(15000)*15000;
      chk(cyc == 102 && int'(max_idx) == pk && longint'(max_val) == mx, $sformatf("max idx %0d", max_idx));
    end
    // butterflies with twiddles in Q1.15
    wcfg(0, 0); ap = 600; as_ = 2; bp = 700; bs = 1; sp = 800; ss = 2;
    run(VC_BFLY, 20, cyc);
    chk(cyc == 22, "bfly cycles");
    for (int i = 0; i < 20; i++) begin
      cplx_t a0, a1, w; longint tr, ti;
      a0 = amem[600 + 2*i]; a1 = amem[601 + 2*i]; w = bmem[700 + i];
      tr = (longint'(a1.re)*w.re - longint'(a1.im)*w.im) >>> 15;
      ti = (longint'(a1.re)*w.im + longint'(a1.im)*w.re) >>> 15;
      chk(int'(smem[800 + 2*i].re) == sc(a0.re + tr, 0) && int'(smem[801 + 2*i].im) == sc(a0.im - ti, 0), "bfly");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
