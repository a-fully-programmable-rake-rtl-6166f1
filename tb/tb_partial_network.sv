// tb_partial_network: checks routing of requests and read data through the
// selected memory, refusal of selections the partial wiring forbids
// (cfg_err), the ping-pong swap of two ports' memories, and the conflict flag.
// The memories are modelled by registering each memory's request so that the
// read data identifies the memory and the request it saw.
module tb_partial_network;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_t cfg; mreq_t port_req [6]; mvec_t port_rdata [6]; mreq_t mem_req [5]; mvec_t mem_rdata [5];
  logic [3:0] sel [6]; logic cfg_err, conflict;
  int checks = 0, failures = 0;
  // allowed memories per port, written out independently of the RTL default
  bit ok [6][5] = '{'{1,1,1,1,0}, '{1,1,1,1,0}, '{0,0,1,1,1}, '{0,0,1,1,1}, '{0,0,1,1,1}, '{1,1,1,1,1}};
  int cur [6];
  always #5 clk = ~clk;
  partial_network dut (.*);
  // memory model: returns {memory number, the request's first data word}
  for (genvar m = 0; m < 5; m++) begin : g_m
    always_ff @(posedge clk) begin
      mem_rdata[m][0] <= '{re: 16'(m), im: mem_req[m].wdata[0].re};
      mem_rdata[m][1] <= '{re: 16'(mem_req[m].en), im: 16'(mem_req[m].we)};
      mem_rdata[m][2] <= '0; mem_rdata[m][3] <= '0;
    end
  end
  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; if (failures < 8) $display("FAIL %s", msg); end
  endtask
  task automatic wcfg(input int r, input int v);
    @(negedge clk); cfg.we = 1; cfg.addr = {U_NET, 4'(r)}; cfg.data = 16'(v);
    @(negedge clk); cfg = '0;
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cfg = '0; for (int p = 0; p < 6; p++) begin port_req[p] = '0; cur[p] = 15; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int p, m; bit err0;
      p = int'($urandom_range(0, 5)); m = int'($urandom_range(0, 5));
      err0 = cfg_err;
      wcfg(p, m);
      if (m >= 5) cur[p] = 15;
      else if (ok[p][m]) cur[p] = m;
      else chk(cfg_err, "illegal selection accepted");
      chk(int'(sel[p]) == cur[p], $sformatf("sel p%0d=%0d exp %0d", p, sel[p], cur[p]));
      // exercise one port at a time
      @(negedge clk);
      port_req[p].en = 1; port_req[p].we = t[0]; port_req[p].wdata[0].re = 16'(t);
      #1;
      for (int mm = 0; mm < 5; mm++)
        chk((mm == cur[p]) ? (mem_req[mm].en && mem_req[mm].wdata[0].re == 16'(t)) : !mem_req[mm].en, "route");
      @(negedge clk); port_req[p] = '0;
      if (cur[p] != 15) chk(int'(port_rdata[p][0].re) == cur[p] && port_rdata[p][0].im == 16'(t), "rdata");
      else chk(port_rdata[p] == '0, "disconnected rdata");
    end
    // ping-pong: ALU store on MEM3 (2), CMAC load A on MEM4 (3), then swap
    wcfg(1, 2); wcfg(2, 3); cur[1] = 2; cur[2] = 3;
    wcfg(8, 8'h12);
    chk(sel[1] == 4'd3 && sel[2] == 4'd2, "swap");
    // swap that would put MEM5 on the ALU store port must be refused
    wcfg(0, 15); wcfg(4, 4); rst_n = 1;
    wcfg(8, 8'h14);
    chk(sel[1] == 4'd3 && sel[4] == 4'd4 && cfg_err, "illegal swap refused");
    // conflict: two ports on one memory, lower port wins
    wcfg(5, 3);
    @(negedge clk); port_req[1].en = 1; port_req[1].wdata[0].re = 16'h11; port_req[5].en = 1; port_req[5].wdata[0].re = 16'h55;
    #1; chk(conflict && mem_req[3].wdata[0].re == 16'h11, "conflict");
    @(negedge clk); port_req[1] = '0; port_req[5] = '0; #1; chk(!conflict, "no conflict");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
