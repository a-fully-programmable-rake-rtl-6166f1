// tb_sample_memory: writes through the AGU with vector and single-word
// writes (masks, unaligned starts, strides), reads back with vector reads and
// compares with a software memory image; checks the configuration registers
// of another unit number are ignored.
module tb_sample_memory;
  import rake_pkg::*;
  localparam int D = 256;
  logic clk = 0, rst_n = 0;
  cfg_t cfg; mreq_t req; mvec_t rdata;
  int checks = 0, failures = 0;
  cplx_t img [D];
  always #5 clk = ~clk;
  sample_memory #(.DEPTH(D), .UNIT(4'd2)) dut (.*);
  task automatic wcfg(input int unit, input int r, input int v);
    @(negedge clk); cfg.we = 1; cfg.addr = {4'(unit), 4'(r)}; cfg.data = 16'(v);
    @(negedge clk); cfg = '0;
  endtask
  task automatic setup(input int unit, input int base, input int stride, input int len, input int off);
    wcfg(unit, 0, base); wcfg(unit, 1, stride); wcfg(unit, 2, len); wcfg(unit, 3, 0); wcfg(unit, 4, off);
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cfg = '0; req = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    // fill the memory with vector writes, 4 words per access
    setup(2, 0, 4, 0, 0);
    for (int i = 0; i < D / 4; i++) begin
      @(negedge clk); req.en = 1; req.we = 1; req.wmask = '1;
      for (int k = 0; k < 4; k++) begin
        req.wdata[k].re = 16'($urandom); req.wdata[k].im = 16'($urandom); img[4*i+k] = req.wdata[k];
      end
    end
    @(negedge clk); req = '0;
    // this write goes to another unit's registers and must not move our AGU
    setup(3, 100, 1, 0, 0);
    for (int t = 0; t < 20; t++) begin
      int base, stride, len, off, a;
      base = int'($urandom_range(0, 200)); stride = int'($urandom_range(1, 5));
      len = int'($urandom_range(8, 50)); off = 0;
      setup(2, base, stride, len, off);
      if (t % 2 == 1) begin
        // masked single-word/partial writes at unaligned addresses
        a = off;
        for (int i = 0; i < 30; i++) begin
          @(negedge clk); req.en = 1; req.we = 1; req.wmask = 4'($urandom);
          for (int k = 0; k < 4; k++) begin
            req.wdata[k].re = 16'($urandom); req.wdata[k].im = 16'($urandom);
            if (req.wmask[k]) img[(base + a + k) % D] = req.wdata[k];
          end
          a = (a + stride) % len;
        end
        @(negedge clk); req = '0;
        setup(2, base, stride, len, off);
      end
      a = off;
      for (int i = 0; i < 40; i++) begin
        int ra;
        @(negedge clk); req.en = 1; req.we = 0; ra = a;
        @(posedge clk); #1; req.en = 0;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (rdata[k] != img[(base + ra + k) % D]) begin
            failures++; if (failures < 5) $display("FAIL t=%0d i=%0d k=%0d addr=%0d", t, i, k, base + ra + k);
          end
        end
        a = (a + stride) % len;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
