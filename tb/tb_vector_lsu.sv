// tb_vector_lsu: checks the three load modes (parallel, broadcast, sliding
// window, where lane k must see x[n-3+k]) and the store path's rounding shift
// and saturation against a software model.
module tb_vector_lsu;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0, ld_valid = 0, st_en = 0;
  load_mode_e mode; mvec_t rdata; cplx_t x [4];
  logic [3:0] st_mask; logic [4:0] shift;
  logic signed [47:0] st_re [4]; logic signed [47:0] st_im [4]; mreq_t st_req;
  int checks = 0, failures = 0;
  cplx_t hist [$];
  always #5 clk = ~clk;
  vector_lsu #(.VW(48)) dut (.*);
  function automatic int model(input longint v, input int sh);
    longint r; r = v;
    if (sh != 0) r = (r + (longint'(1) << (sh - 1))) >>> sh;
    if (r > 32767) r = 32767; if (r < -32768) r = -32768; return int'(r);
  endfunction
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    mode = LM_PAR; rdata = '0; st_mask = 0; shift = 0;
    for (int k = 0; k < 4; k++) begin st_re[k] = 0; st_im[k] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      mode = load_mode_e'((i / 200) % 3);
      for (int k = 0; k < 4; k++) begin rdata[k].re = 16'($urandom); rdata[k].im = 16'($urandom); end
      ld_valid = 1;
      #1;
      for (int k = 0; k < 4; k++) begin
        cplx_t e;
        unique case (mode)
          LM_PAR:   e = rdata[k];
          LM_BCAST: e = rdata[0];
          default:  e = (k == 3) ? rdata[0] : ((hist.size() >= 3 - k) ? hist[hist.size() - 3 + k] : '0);
        endcase
        if (mode != LM_SLIDE || hist.size() >= 3) begin
          checks++; if (x[k] != e) begin failures++; if (failures < 5) $display("FAIL load i=%0d k=%0d", i, k); end
        end
      end
      if (mode == LM_SLIDE) hist.push_back(rdata[0]);
      // store path
      st_en = 1; st_mask = 4'($urandom); shift = 5'($urandom_range(0, 20));
      for (int k = 0; k < 4; k++) begin
        st_re[k] = 48'($signed(64'($urandom)) * $signed(64'($urandom_range(0, 300))));
        st_im[k] = 48'($signed($urandom_range(0, 70000)) - 35000);
      end
      #1;
      checks++;
      if (!st_req.en || !st_req.we || st_req.wmask != st_mask) failures++;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(st_req.wdata[k].re) != model(st_re[k], shift) || int'(st_req.wdata[k].im) != model(st_im[k], shift)) begin
          failures++; if (failures < 5) $display("FAIL store k=%0d sh=%0d", k, shift);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
