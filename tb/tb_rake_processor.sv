// tb_rake_processor: end-to-end test of the Rake processor at its default
// sizes. A program for the RISC controller runs a complete Rake reception of
// one symbol interval on four fingers and four OVSF codes:
//   1 capture:    a 67-sample pilot burst passes the delay buffer and the ALU
//                 (vsmul, broadcast, code 1) into MEM2
//   2 search:     sliding-window vsmac4 correlates it with the scrambling code
//                 at offsets 0..3 (channel estimates, MEM4); MEM3/MEM4 are
//                 swapped to the CMAC, whose maximum search finds the strongest
//                 path (its index is output)
//   3 descramble: the data burst passes the delay buffer with finger delays
//                 3,2,1,0; vsmul (parallel, scrambling code) writes the four
//                 aligned, de-scrambled fingers to MEM1
//   4 de-spread:  per finger, vsmac4 (broadcast) with four OVSF codes of SF 32
//                 into MEM3; MEM3 is swapped to the CMAC
//   5 MRC:        per code, vmac of the finger values with the conjugated
//                 channel estimates into MEM5, read back in bit-reversed order
//   6 butterfly:  two radix-2 butterflies on the MRC results, read back.
// Every output is compared with an integer reference model of the same
// arithmetic, the recovered symbols with the transmitted ones, and the test
// counts each mechanism (delay-buffer stall, memory swap, idle wait, RISC work
// during a vector instruction, busy-cluster wait, each load mode and code
// source, maximum search, MRC, butterfly, modulo and bit-reversed addressing).
module tb_rake_processor;
  import rake_pkg::*;
  import risc_pkg::*;

  localparam int SF = 32, LP = 67, LD = SF + 3, A1 = 16, A2 = 8;
  localparam int S1 = 2, S2 = 4, S3 = 10;

  logic clk = 0, rst_n = 0, prog_we = 0, start = 0, running;
  logic [9:0] prog_addr; logic [31:0] prog_wdata;
  logic sample_valid = 0; cplx_t sample;
  logic out_valid; logic [15:0] out_data;
  logic dly_overrun, dly_lost, net_cfg_err, net_conflict;
  logic [31:0] idle_cycles, vec_issued;
  always #5 clk = ~clk;

  rake_processor dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ------------------------------------------------------------ program
  logic [31:0] prog [1024]; int np = 0;
  function automatic void emit(input opcode_e o, input int rd, input int rs, input int imm);
    prog[np] = {o, 4'(rd), 4'(rs), 2'b00, 16'(imm)}; np++;
  endfunction
  function automatic void cfgi(input int addr, input int v);   // r1 = v; cfg[addr] = r1
    emit(OP_LI, 1, 0, v); emit(OP_CFG, 0, 1, addr);
  endfunction
  function automatic void memcfg(input int m, input int base, input int stride, input int len, input int mode);
    cfgi(16*m + 0, base); cfgi(16*m + 1, stride); cfgi(16*m + 2, len); cfgi(16*m + 3, mode);
    cfgi(16*m + 4, 0);
  endfunction
  localparam int NET = 16*5, ALU = 16*6, CM = 16*7, DLY = 16*8, NONE = 15;

  // ------------------------------------------------------------ reference model
  bit gi [200]; bit gq [200];
  int hre [4] = '{1, -1, 3, 0}; int him [4] = '{1, 2, -1, 1};
  int kc [4]; int dre [4]; int dim [4];
  longint r1re [LP], r1im [LP], r2re [LD], r2im [LD];
  int est_re [4], est_im [4], y_re [4][4], y_im [4][4], mrc_re [4], mrc_im [4];
  int bf_re [4], bf_im [4]; int peak;
  function automatic int sc(input longint v, input int sh);
    longint r; r = v; if (sh != 0) r = (r + (longint'(1) << (sh - 1))) >>> sh;
    if (r > 32767) r = 32767; if (r < -32768) r = -32768; return int'(r);
  endfunction
  function automatic bit ovsf(input int sf, input int k, input int n);
    if (sf == 1) return 1'b0;
    return ovsf(sf / 2, k / 2, n % (sf / 2)) ^ ((k % 2 == 1) && (n >= sf / 2));
  endfunction
  function automatic int sr(input int m); return gi[m] ? -1 : 1; endfunction
  function automatic int si(input int m); return gq[m] ? -1 : 1; endfunction

  task automatic build_model();
    bit xs [240]; bit ys [240];
    longint t1re [LP], t1im [LP], t2re [LD], t2im [LD];
    int cap_re [LP], cap_im [LP], z_re [4][SF], z_im [4][SF];
    longint mx, m;
    for (int k = 0; k < 18; k++) begin xs[k] = (k == 0); ys[k] = 1; end
    for (int i = 0; i + 18 < 240; i++) begin
      xs[i+18] = xs[i+7] ^ xs[i]; ys[i+18] = ys[i+10] ^ ys[i+7] ^ ys[i+5] ^ ys[i];
    end
    for (int i = 0; i < 200; i++) begin
      gi[i] = xs[i] ^ ys[i];
      gq[i] = xs[i+4] ^ xs[i+6] ^ xs[i+15] ^ ys[i+5] ^ ys[i+6] ^ ys[i+8] ^ ys[i+9] ^ ys[i+10]
            ^ ys[i+11] ^ ys[i+12] ^ ys[i+13] ^ ys[i+14] ^ ys[i+15];
    end
    // bursts: pilot = A1 * s[m]; data = s[m] * sum_c A2 d_c ovsf_c[m]
    for (int m = 0; m < LP; m++) begin t1re[m] = A1 * sr(m); t1im[m] = A1 * si(m); end
    for (int m = 0; m < LD; m++) begin
      longint ure, uim; ure = 0; uim = 0;
      if (m < SF) for (int c = 0; c < 4; c++) begin
        int o; o = ovsf(SF, kc[c], m) ? -1 : 1; ure += A2 * o * dre[c]; uim += A2 * o * dim[c];
      end
      t2re[m] = sr(m) * ure - si(m) * uim; t2im[m] = sr(m) * uim + si(m) * ure;
    end
    for (int n = 0; n < LP; n++) begin
      r1re[n] = 0; r1im[n] = 0;
      for (int f = 0; f < 4; f++) if (n - f >= 0) begin
        r1re[n] += hre[f] * t1re[n-f] - him[f] * t1im[n-f]; r1im[n] += hre[f] * t1im[n-f] + him[f] * t1re[n-f];
      end
      cap_re[n] = sc(r1re[n], 0); cap_im[n] = sc(r1im[n], 0);
    end
    for (int n = 0; n < LD; n++) begin
      r2re[n] = 0; r2im[n] = 0;
      for (int f = 0; f < 4; f++) if (n - f >= 0) begin
        r2re[n] += hre[f] * t2re[n-f] - him[f] * t2im[n-f]; r2im[n] += hre[f] * t2im[n-f] + him[f] * t2re[n-f];
      end
    end
    // search: lane k = sum_i conj(s_i) cap[i+k]
    mx = -1; peak = 0;
    for (int k = 0; k < 4; k++) begin
      longint are, aim; are = 0; aim = 0;
      for (int i = 0; i < 64; i++) begin
        are += sr(i) * cap_re[i+k] + si(i) * cap_im[i+k]; aim += sr(i) * cap_im[i+k] - si(i) * cap_re[i+k];
      end
      est_re[k] = sc(are, S1); est_im[k] = sc(aim, S1);
      m = longint'(est_re[k]) * est_re[k] + longint'(est_im[k]) * est_im[k];
      if (m > mx) begin mx = m; peak = k; end
    end
    // descramble: finger f at data chip m sees r2[m + f]
    for (int f = 0; f < 4; f++) for (int m = 0; m < SF; m++) begin
      longint xr, xi; xr = r2re[m+f]; xi = r2im[m+f];
      xr = sc(xr, 0); xi = sc(xi, 0);
      z_re[f][m] = sc(sr(m) * xr + si(m) * xi, 0); z_im[f][m] = sc(sr(m) * xi - si(m) * xr, 0);
    end
    // de-spread
    for (int f = 0; f < 4; f++) for (int c = 0; c < 4; c++) begin
      longint are, aim; are = 0; aim = 0;
      for (int m = 0; m < SF; m++) begin
        int o; o = ovsf(SF, kc[c], m) ? -1 : 1; are += o * z_re[f][m]; aim += o * z_im[f][m];
      end
      y_re[c][f] = sc(are, S2); y_im[c][f] = sc(aim, S2);
    end
    // MRC with conjugated estimates
    for (int c = 0; c < 4; c++) begin
      longint are, aim; are = 0; aim = 0;
      for (int f = 0; f < 4; f++) begin
        are += longint'(y_re[c][f]) * est_re[f] + longint'(y_im[c][f]) * est_im[f];
        aim += longint'(y_im[c][f]) * est_re[f] - longint'(y_re[c][f]) * est_im[f];
      end
      mrc_re[c] = sc(are, S3); mrc_im[c] = sc(aim, S3);
    end
    // butterflies (R0,R1) with w = est0 and (R2,R3) with w = est1, Q1.15
    for (int b = 0; b < 2; b++) begin
      longint tr, ti;
      tr = (longint'(mrc_re[2*b+1]) * est_re[b] - longint'(mrc_im[2*b+1]) * est_im[b]) >>> 15;
      ti = (longint'(mrc_re[2*b+1]) * est_im[b] + longint'(mrc_im[2*b+1]) * est_re[b]) >>> 15;
      bf_re[2*b] = sc(mrc_re[2*b] + tr, 0); bf_im[2*b] = sc(mrc_im[2*b] + ti, 0);
      bf_re[2*b+1] = sc(mrc_re[2*b] - tr, 0); bf_im[2*b+1] = sc(mrc_im[2*b] - ti, 0);
    end
  endtask

  task automatic build_program();
    // network ports: 0 ALU ld, 1 ALU st, 2 CMAC A, 3 CMAC B, 4 CMAC st, 5 ctrl
    // memories: 0 MEM1 .. 4 MEM5
    emit(OP_LI, 2, 0, 0);                       // r2 = 0 (seed-load value)
    // ---- 1 capture pilot into MEM2
    for (int f = 1; f <= 4; f++) cfgi(DLY + f, 0);
    cfgi(DLY + 0, 0);
    cfgi(NET + 1, 1);                           // ALU st -> MEM2
    memcfg(1, 0, 1, 0, 0);
    cfgi(ALU + 0, CS_INSTR); cfgi(ALU + 1, 4);  // code 1 + j0
    cfgi(ALU + 2, 16 + LM_BCAST); cfgi(ALU + 11, 0);
    emit(OP_LI, 3, 0, LP); emit(OP_VALU, 0, 3, VA_SMUL);
    emit(OP_LI, 4, 0, 16'hb1); emit(OP_OUT, 0, 4, 0);     // marker: send pilot
    emit(OP_IDLE, 0, 0, 1);
    // ---- 2 search
    cfgi(NET + 0, 1); cfgi(NET + 1, 3); cfgi(NET + 2, 2);  // ALU ld MEM2, ALU st MEM4, CMAC A MEM3
    memcfg(1, 0, 1, 0, 0); memcfg(3, 0, 1, 0, 0);
    cfgi(ALU + 3, 1); emit(OP_CFG, 0, 2, ALU + 4);         // load Gold seed 1
    cfgi(ALU + 5, 1); cfgi(ALU + 0, CS_SCRAMBLE); cfgi(ALU + 2, LM_SLIDE); cfgi(ALU + 11, S1);
    emit(OP_LI, 3, 0, 64); emit(OP_VALU, 0, 3, VA_SMAC4);
    emit(OP_IDLE, 0, 0, 1);
    cfgi(NET + 8, 8'h12);                                  // swap: CMAC A now MEM4
    memcfg(3, 0, 1, 0, 0);
    emit(OP_LI, 3, 0, 4); emit(OP_VCMAC, 0, 3, VC_MAX);
    emit(OP_IDLE, 0, 0, 2);
    emit(OP_RDMAX, 5, 0, 0); emit(OP_OUT, 0, 5, 0);        // strongest path
    // ---- 3 descramble data burst into MEM1
    cfgi(DLY + 1, 3); cfgi(DLY + 2, 2); cfgi(DLY + 3, 1); cfgi(DLY + 4, 0); cfgi(DLY + 0, 0);
    cfgi(NET + 0, NONE); cfgi(NET + 1, 0);                 // ALU st -> MEM1
    memcfg(0, 1024 - 12, 4, 0, 0);                         // 3 discarded vectors wrap to 0
    cfgi(ALU + 2, 16 + LM_PAR); cfgi(ALU + 11, 0);
    emit(OP_LI, 3, 0, 12); emit(OP_LI, 6, 0, 4 * SF);
    emit(OP_VALU, 0, 3, VA_SMUL);                          // discard the first 3 vectors
    emit(OP_LI, 4, 0, 16'hb2); emit(OP_OUT, 0, 4, 0);     // marker: send data
    emit(OP_IDLE, 0, 0, 1);
    emit(OP_CFG, 0, 2, ALU + 4);                           // restart the Gold code
    emit(OP_VALU, 0, 6, VA_SMUL);
    // ---- 4 de-spread, overlapped set-up while the ALU works
    for (int c = 0; c < 4; c++) cfgi(ALU + 7 + c, kc[c]);
    emit(OP_IDLE, 0, 0, 1);
    cfgi(NET + 0, 0); cfgi(NET + 1, 2);                    // ALU ld MEM1, ALU st MEM3
    cfgi(ALU + 0, CS_OVSF); cfgi(ALU + 2, LM_BCAST); cfgi(ALU + 11, S2);
    emit(OP_LI, 3, 0, SF);
    for (int f = 0; f < 4; f++) begin
      memcfg(0, f, 4, 0, 0); memcfg(2, f, 4, 0, 0);
      cfgi(ALU + 6, 5);                                    // OVSF SF = 32
      emit(OP_VALU, 0, 3, VA_SMAC4);
      emit(OP_IDLE, 0, 0, 1);
    end
    cfgi(NET + 8, 8'h12);                                  // swap: CMAC A = MEM3, ALU st = MEM4
    // ---- 5 MRC
    cfgi(NET + 1, NONE); cfgi(NET + 3, 3); cfgi(NET + 4, 4);  // CMAC B MEM4, CMAC st MEM5
    memcfg(2, 0, 2, 0, 0); memcfg(3, 0, 2, 4, 0); memcfg(4, 0, 1, 0, 0);
    cfgi(CM + 1, 1); cfgi(CM + 0, S3);
    emit(OP_LI, 3, 0, 4);
    for (int c = 0; c < 4; c++) emit(OP_VCMAC, 0, 3, VC_MAC);   // waits while busy
    emit(OP_IDLE, 0, 0, 2);
    cfgi(NET + 5, 4); memcfg(4, 0, 1, 0, 16'h21);           // bit-reversed read, 4 points
    for (int c = 0; c < 4; c++) begin emit(OP_LDS, 7, 0, 8); emit(OP_OUT, 0, 7, 0); emit(OP_OUT, 0, 8, 0); end
    // ---- 6 butterflies: A = MEM5 (MRC), B = MEM4 (estimates), st = MEM3
    cfgi(NET + 5, NONE); cfgi(NET + 2, 4); cfgi(NET + 4, 2);
    memcfg(4, 0, 2, 0, 0); memcfg(3, 0, 1, 0, 0); memcfg(2, 0, 2, 0, 0);
    cfgi(CM + 1, 0); cfgi(CM + 0, 0);
    emit(OP_LI, 3, 0, 2); emit(OP_VCMAC, 0, 3, VC_BFLY); emit(OP_IDLE, 0, 0, 2);
    cfgi(NET + 4, NONE); cfgi(NET + 5, 2); memcfg(2, 0, 1, 0, 0);
    for (int c = 0; c < 4; c++) begin emit(OP_LDS, 7, 0, 8); emit(OP_OUT, 0, 7, 0); emit(OP_OUT, 0, 8, 0); end
    emit(OP_HALT, 0, 0, 0);
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_stall = 0, n_swap = 0, n_idle = 0, n_concurrent = 0, n_waitbusy = 0;
  int n_par = 0, n_bcast = 0, n_slide = 0, n_scr = 0, n_ovsf = 0, n_max = 0, n_mrc = 0, n_bfly = 0;
  int n_modulo = 0, n_bitrev = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_alu.u_vctrl.state == 2'd1 && dut.u_alu.from_dly && !dut.dly_valid) n_stall++;
    if (dut.cfg.we && dut.cfg.addr == 8'h58) n_swap++;
    if (dut.u_ctrl.running && dut.u_ctrl.wait_busy) begin
      if (dut.u_ctrl.ins.op == OP_IDLE) n_idle++; else n_waitbusy++;
    end
    if (dut.u_ctrl.issue && (dut.alu_busy || dut.cmac_busy) && dut.u_ctrl.ins.op != OP_IDLE) n_concurrent++;
    if (dut.u_alu.lane_en) begin
      case (dut.u_alu.lmode) LM_PAR: n_par++; LM_BCAST: n_bcast++; default: n_slide++; endcase
      if (dut.u_alu.code_src == CS_SCRAMBLE) n_scr++;
      if (dut.u_alu.code_src == CS_OVSF) n_ovsf++;
    end
    if (dut.u_cmac.ex && dut.u_cmac.op_q == VC_MAX) n_max++;
    if (dut.u_cmac.ex && dut.u_cmac.op_q == VC_MAC && dut.u_cmac.conj_b) n_mrc++;
    if (dut.u_cmac.ex && dut.u_cmac.op_q == VC_BFLY) n_bfly++;
    if (dut.u_dly.sample_done) n_modulo++;
    if (dut.mem_req[4].en && dut.g_mem[4].u_mem.fft_r) n_bitrev++;
  end

  // ------------------------------------------------------------ stimulus
  logic [15:0] outs [$];
  always @(posedge clk) if (out_valid) outs.push_back(out_data);

  task automatic send(input bit pilot);
    int n; n = pilot ? LP : LD;
    for (int i = 0; i < n; i++) begin
      @(negedge clk); sample_valid = 1;
      sample.re = 16'(sc(pilot ? r1re[i] : r2re[i], 0)); sample.im = 16'(sc(pilot ? r1im[i] : r2im[i], 0));
      @(negedge clk); sample_valid = 0;
      repeat (3) @(negedge clk);                 // one sample per 5 cycles
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sample = '0; prog_addr = 0; prog_wdata = 0;
    for (int c = 0; c < 4; c++) begin
      bit dup;
      do begin
        kc[c] = int'($urandom_range(0, SF - 1));
        dup = 0; for (int j = 0; j < c; j++) if (kc[j] == kc[c]) dup = 1;
      end while (dup);
      dre[c] = $urandom_range(0, 1) ? 1 : -1; dim[c] = $urandom_range(0, 1) ? 1 : -1;
    end
    build_model();
    build_program();
    chk(np <= 1024, $sformatf("program length %0d", np));
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < np; i++) begin @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_wdata = prog[i]; end
    @(negedge clk); prog_we = 0; start = 1; @(negedge clk); start = 0;
    while (outs.size() < 1) @(negedge clk); chk(outs[0] == 16'hb1, "marker 1");
    send(1);
    while (outs.size() < 3) @(negedge clk); chk(outs[2] == 16'hb2, "marker 2");
    send(0);
    while (running) @(negedge clk);
    repeat (4) @(negedge clk);
    // ---- results
    chk(outs.size() == 3 + 8 + 8, $sformatf("outputs %0d", outs.size()));
    if (outs.size() == 19) begin
      int order [4] = '{0, 2, 1, 3};
      chk(int'(outs[1]) == peak && peak == 2, $sformatf("peak %0d model %0d", outs[1], peak));
      for (int i = 0; i < 4; i++) begin
        int c; c = order[i];
        chk($signed(outs[3 + 2*i]) == mrc_re[c] && $signed(outs[4 + 2*i]) == mrc_im[c],
            $sformatf("MRC code %0d: %0d,%0d model %0d,%0d", c, $signed(outs[3+2*i]), $signed(outs[4+2*i]), mrc_re[c], mrc_im[c]));
        // the decisions must give back the transmitted symbol
        chk(($signed(outs[3 + 2*i]) > 0) == (dre[c] > 0) && ($signed(outs[4 + 2*i]) > 0) == (dim[c] > 0),
            $sformatf("symbol of code %0d", c));
      end
      for (int i = 0; i < 4; i++)
        chk($signed(outs[11 + 2*i]) == bf_re[i] && $signed(outs[12 + 2*i]) == bf_im[i], $sformatf("butterfly %0d", i));
    end
    chk(!dly_overrun && !dly_lost && !net_cfg_err && !net_conflict, "no error flags");
    // ---- mechanisms
    chk(n_stall > 0, "delay-buffer stall");      chk(n_swap == 2, "memory swaps");
    chk(n_idle > 0, "idle synchronisation");     chk(n_concurrent > 0, "RISC during vector op");
    chk(n_waitbusy > 0, "issue waits on busy cluster");
    chk(n_par > 0 && n_bcast > 0 && n_slide > 0, "load modes");
    chk(n_scr > 0 && n_ovsf > 0, "code generators");
    chk(n_max > 0 && n_mrc > 0 && n_bfly > 0, "CMAC max / MRC / butterfly");
    chk(n_modulo > 0 && n_bitrev > 0, "modulo and bit-reversed addressing");
    $display("mechanisms: stall=%0d swap=%0d idle=%0d concurrent=%0d waitbusy=%0d par=%0d bcast=%0d slide=%0d scr=%0d ovsf=%0d max=%0d mrc=%0d bfly=%0d modulo=%0d bitrev=%0d",
             n_stall, n_swap, n_idle, n_concurrent, n_waitbusy, n_par, n_bcast, n_slide, n_scr, n_ovsf, n_max, n_mrc, n_bfly, n_modulo, n_bitrev);
    $display("program %0d instructions, vector instructions %0d, idle cycles %0d", np, vec_issued, idle_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
