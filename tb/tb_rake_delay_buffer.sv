// tb_rake_delay_buffer: streams samples at the full rate (one every NF+1 = 5
// cycles, the time-interleaved access rate) into the full-size 184-word
// buffer with four finger delays up to 183 and checks that every output
// vector holds sample n - d_k for finger k, that out_valid follows NF+3 cycles
// after each input, that a too-early sample sets overrun and that an
// unconsumed vector sets out_lost.
module tb_rake_delay_buffer;
  import rake_pkg::*;
  localparam int N = 184;
  logic clk = 0, rst_n = 0, in_valid = 0, out_ack = 0;
  cfg_t cfg; cplx_t in_sample; cplx_t fingers [4]; logic out_valid, overrun, out_lost;
  int checks = 0, failures = 0;
  cplx_t hist [$];
  int d [4];
  int tin [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always #5 clk = ~clk;
  rake_delay_buffer #(.DEPTH(N), .NF(4)) dut (.*);
  task automatic wcfg(input int r, input int v);
    @(negedge clk); cfg.we = 1; cfg.addr = {U_DLY, 4'(r)}; cfg.data = 16'(v);
    @(negedge clk); cfg = '0;
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cfg = '0; in_sample = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      d[0] = 0; d[1] = int'($urandom_range(1, 40)); d[2] = int'($urandom_range(41, 120)); d[3] = (t == 0) ? N - 1 : int'($urandom_range(121, N - 1));
      for (int k = 0; k < 4; k++) wcfg(k + 1, d[k]);
      wcfg(0, 0);
      hist.delete();
      fork
        // driver: one sample every NF+1 = 5 cycles
        for (int n = 0; n < 2 * N + 20; n++) begin
          @(negedge clk); in_valid = 1; in_sample.re = 16'($urandom); in_sample.im = 16'($urandom);
          hist.push_back(in_sample); tin.push_back(cyc);
          @(negedge clk); in_valid = 0;
          repeat (3) @(negedge clk);
        end
        // monitor: check and consume each aligned vector
        for (int n = 0; n < 2 * N + 20; n++) begin
          @(negedge clk);
          while (!out_valid) @(negedge clk);
          checks++;
          if (cyc - tin[n] != 4 + 3) begin
            failures++; if (failures < 5) $display("FAIL latency %0d", cyc - tin[n]);
          end
          for (int k = 0; k < 4; k++)
            if (n >= d[k]) begin
              checks++;
              if (fingers[k] != hist[n - d[k]]) begin
                failures++; if (failures < 5) $display("FAIL t=%0d n=%0d finger %0d", t, n, k);
              end
            end
          out_ack = 1; @(negedge clk); out_ack = 0;
        end
      join
      tin.delete();
    end
    checks++; if (overrun || out_lost) failures++;
    // overrun: two samples two cycles apart
    @(negedge clk); in_valid = 1; @(negedge clk); in_valid = 0; @(negedge clk); in_valid = 1; @(negedge clk); in_valid = 0;
    repeat (8) @(negedge clk);
    checks++; if (!overrun) begin failures++; $display("FAIL overrun not flagged"); end
    // out_lost: two vectors without ack
    repeat (6) @(negedge clk); in_valid = 1; @(negedge clk); in_valid = 0; repeat (6) @(negedge clk);
    checks++; if (!out_lost) begin failures++; $display("FAIL out_lost not flagged"); end
    wcfg(0, 0);
    checks++; if (overrun || out_lost) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
