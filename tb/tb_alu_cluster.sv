// tb_alu_cluster: runs vector ALU instructions on the cluster with a simple
// memory model (one access per cycle, one-cycle read latency, address
// advancing by a stride per access) and checks results and cycle costs:
//   vsmac  64 elements, parallel load, data-supplied code: 1 sum, 18 cycles
//   vsmac4 64 elements, broadcast load, four OVSF codes:    4 sums, 70 cycles
//   vsmac4 sliding window, scrambling code: 4 correlations at offsets 0..3
//   vsmul  from the delay-buffer input with stalls: de-scrambled fingers
// Reference codes are built independently: Gold code from its sequence
// recursion, OVSF codes from the code-tree recursion.
module tb_alu_cluster;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  cfg_t cfg; valu_op_e op; logic [15:0] len; logic busy, done;
  mreq_t ld_req, st_req; mvec_t ld_rdata;
  cplx_t dly_fingers [4]; logic dly_valid, dly_ack;
  int checks = 0, failures = 0;
  cplx_t lmem [1024]; cplx_t smem [1024];
  int lp, ls, sp, ss;
  bit gi [4200]; bit gq [4200];
  always #5 clk = ~clk;
  alu_cluster dut (.*);

  // memory model
  always_ff @(posedge clk) begin
    if (ld_req.en) begin
      for (int k = 0; k < 4; k++) ld_rdata[k] <= lmem[(lp + k) % 1024];
      lp <= lp + ls;
    end
    if (st_req.en) begin
      for (int k = 0; k < 4; k++) if (st_req.wmask[k]) smem[(sp + k) % 1024] <= st_req.wdata[k];
      sp <= sp + ss;
    end
  end

  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask
  task automatic wcfg(input int r, input int v);
    @(negedge clk); cfg.we = 1; cfg.addr = {U_ALU, 4'(r)}; cfg.data = 16'(v);
    @(negedge clk); cfg = '0;
  endtask
  task automatic run(input valu_op_e o, input int n, output int cycles);
    @(negedge clk); op = o; len = 16'(n); start = 1;
    @(negedge clk); start = 0; cycles = 0;
    while (busy) begin cycles++; @(negedge clk); end
  endtask
  function automatic bit ovsf(input int sf, input int k, input int n);
    if (sf == 1) return 1'b0;
    return ovsf(sf / 2, k / 2, n % (sf / 2)) ^ ((k % 2 == 1) && (n >= sf / 2));
  endfunction
  function automatic void gold(input int seed);
    bit xs [4240]; bit ys [4240];
    for (int k = 0; k < 18; k++) begin xs[k] = seed[k]; ys[k] = 1; end
    for (int i = 0; i + 18 < 4240; i++) begin
      xs[i+18] = xs[i+7] ^ xs[i]; ys[i+18] = ys[i+10] ^ ys[i+7] ^ ys[i+5] ^ ys[i];
    end
    for (int i = 0; i < 4200; i++) begin
      gi[i] = xs[i] ^ ys[i];
      gq[i] = xs[i+4] ^ xs[i+6] ^ xs[i+15] ^ ys[i+5] ^ ys[i+6] ^ ys[i+8] ^ ys[i+9] ^ ys[i+10]
            ^ ys[i+11] ^ ys[i+12] ^ ys[i+13] ^ ys[i+14] ^ ys[i+15];
    end
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc; longint er, ei;
    cfg = '0; op = VA_SMAC; len = 0; lp = 0; ls = 4; sp = 0; ss = 1; dly_valid = 0;
    for (int l = 0; l < 4; l++) dly_fingers[l] = '0;
    for (int i = 0; i < 1024; i++) begin lmem[i].re = 16'($urandom_range(0, 400) - 200); lmem[i].im = 16'($urandom_range(0, 400) - 200); end
    repeat (2) @(posedge clk); rst_n = 1;

    // --- vsmac, 64 elements, parallel load, code = signs of the data word
    wcfg(0, CS_MEM); wcfg(2, LM_PAR); wcfg(11, 0);
    lp = 0; ls = 4; sp = 0; ss = 1;
    run(VA_SMAC, 64, cyc);
    er = 0; ei = 0;
    for (int i = 0; i < 64; i++) begin
      int a, b; a = lmem[i].re < 0 ? -1 : 1; b = lmem[i].im < 0 ? -1 : 1;
      er += a * lmem[i].re - b * lmem[i].im; ei += a * lmem[i].im + b * lmem[i].re;
    end
    chk(cyc == 18, $sformatf("vsmac cycles %0d", cyc));
    chk(smem[0].re == 16'(er) && smem[0].im == 16'(ei) && sp == 1, "vsmac result");

    // --- vsmac4, 64 elements, broadcast, four OVSF codes of SF 64
    begin
      int k [4];
      for (int l = 0; l < 4; l++) begin k[l] = int'($urandom_range(0, 63)); wcfg(7 + l, k[l]); end
      wcfg(6, 6); wcfg(0, CS_OVSF); wcfg(2, LM_BCAST);
      lp = 100; ls = 1; sp = 10; ss = 1;
      run(VA_SMAC4, 64, cyc);
      chk(cyc == 70, $sformatf("vsmac4 cycles %0d", cyc));
      for (int l = 0; l < 4; l++) begin
        er = 0; ei = 0;
        for (int n = 0; n < 64; n++) begin
          int c; c = ovsf(64, k[l], n) ? -1 : 1;
          er += c * lmem[100 + n].re; ei += c * lmem[100 + n].im;
        end
        chk(smem[10 + l].re == 16'(er) && smem[10 + l].im == 16'(ei), $sformatf("ovsf lane %0d", l));
      end
    end

    // --- vsmac4, sliding window, scrambling code (conjugated): 4 offsets
    gold(1);
    wcfg(3, 1); wcfg(4, 0); wcfg(5, 1); wcfg(0, CS_SCRAMBLE); wcfg(2, LM_SLIDE);
    lp = 200; ls = 1; sp = 20; ss = 1;
    run(VA_SMAC4, 40, cyc);
    chk(cyc == 40 + 3 + 6, $sformatf("slide cycles %0d", cyc));
    chk(lp == 200 + 43, "slide fetches one word per step");
    for (int l = 0; l < 4; l++) begin
      er = 0; ei = 0;
      for (int i = 0; i < 40; i++) begin
        int a, b; a = gi[i] ? -1 : 1; b = gq[i] ? 1 : -1;  // conjugate
        er += a * lmem[200 + i + l].re - b * lmem[200 + i + l].im;
        ei += a * lmem[200 + i + l].im + b * lmem[200 + i + l].re;
      end
      chk(smem[20 + l].re == 16'(er) && smem[20 + l].im == 16'(ei), $sformatf("slide lane %0d", l));
    end

    // --- vsmul from the delay buffer, with stalls: 4 fingers per step
    begin
      cplx_t fv [30][4]; int nsent, stalls;
      gold(5);
      wcfg(3, 5); wcfg(4, 0); wcfg(5, 1); wcfg(0, CS_SCRAMBLE); wcfg(2, 16 + LM_PAR);
      sp = 300; ss = 4;
      for (int s = 0; s < 30; s++) for (int l = 0; l < 4; l++) begin
        fv[s][l].re = 16'($urandom_range(0, 400) - 200); fv[s][l].im = 16'($urandom_range(0, 400) - 200);
      end
      @(negedge clk); op = VA_SMUL; len = 16'(30 * 4); start = 1;
      @(negedge clk); start = 0;
      nsent = 0; stalls = 0; cyc = 0;
      while (busy) begin
        if (!dly_valid && nsent < 30 && $urandom_range(0, 2) == 0) begin
          dly_valid = 1; for (int l = 0; l < 4; l++) dly_fingers[l] = fv[nsent][l];
        end
        if (!dly_valid) stalls++;
        #1;
        if (dly_ack) nsent++;
        @(negedge clk);
        cyc++;
        if (last_ack) dly_valid = 0;   // the vector was taken at the last edge
      end
      chk(nsent == 30, $sformatf("vsmul consumed %0d", nsent));
      chk(stalls > 0, "stall happened");
      for (int s = 0; s < 30; s++) for (int l = 0; l < 4; l++) begin
        int a, b; cplx_t x; a = gi[s] ? -1 : 1; b = gq[s] ? 1 : -1; x = fv[s][l];
        chk(smem[300 + 4*s + l].re == 16'(a * x.re - b * x.im) && smem[300 + 4*s + l].im == 16'(a * x.im + b * x.re),
            $sformatf("descramble s%0d f%0d", s, l));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic last_ack = 0;
  always @(posedge clk) last_ack <= dly_ack;
endmodule
