// tb_vector_controller: checks the loop count, first/last marks, drain cycles,
// busy length (steps + drain, plus any stall cycles) and the done pulse.
module tb_vector_controller;
  logic clk = 0, rst_n = 0, start = 0, stall = 0;
  logic [15:0] steps; logic [3:0] drain;
  logic busy, step, first, last, draining, done; logic [15:0] idx; logic [3:0] dcnt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vector_controller #(.CNT_W(16)) dut (.*);
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", m); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    steps = 0; drain = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int s, d, nbusy, nstep, nstall, ndrain, nfirst, nlast, ndone, exp_idx;
      s = int'($urandom_range(1, 80)); d = int'($urandom_range(0, 6));
      @(negedge clk); steps = 16'(s); drain = 4'(d); start = 1;
      @(negedge clk); start = 0; steps = 0;
      nbusy = 0; nstep = 0; nstall = 0; ndrain = 0; nfirst = 0; nlast = 0; ndone = 0; exp_idx = 0;
      while (busy) begin
        stall = (t % 3 == 1) && ($urandom_range(0, 3) == 0);
        #1;
        nbusy++;
        if (step) begin
          chk(int'(idx) == exp_idx, "idx"); exp_idx++; nstep++;
          if (first) begin nfirst++; chk(exp_idx == 1, "first"); end
          if (last) begin nlast++; chk(exp_idx == s, "last"); end
        end else if (!draining) nstall++;
        if (draining) begin ndrain++; chk(int'(dcnt) == ndrain, "dcnt"); end
        if (done) begin ndone++; chk(nbusy == s + d + nstall, "done timing"); end
        @(negedge clk);
      end
      stall = 0;
      chk(nstep == s && ndrain == d && nfirst == 1 && nlast == 1 && ndone == 1, "counts");
      chk(nbusy == s + d + nstall, $sformatf("busy %0d vs %0d+%0d+%0d", nbusy, s, d, nstall));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
