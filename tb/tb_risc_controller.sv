// tb_risc_controller: loads a small program and checks what the controller
// does: ALSU and MAC results (seen on the output port), a counted loop,
// integer-memory store/load, a configuration write, vector issue to both
// clusters with RISC instructions running while a vector instruction is busy,
// waiting on a busy cluster, IDLE synchronisation, sample-port store/load,
// reading the CMAC maximum index and HALT. The clusters are modelled as busy
// for a fixed number of cycles after each start.
module tb_risc_controller;
  import rake_pkg::*;
  import risc_pkg::*;
  logic clk = 0, rst_n = 0, prog_we = 0, start = 0, running;
  logic [7:0] prog_addr; logic [31:0] prog_wdata;
  cfg_t cfg; logic alu_start, cmac_start, alu_busy = 0, cmac_busy = 0; valu_op_e alu_op; vcmac_op_e cmac_op;
  logic [15:0] vlen, max_idx = 16'h55;
  logic im_en, im_we; logic [7:0] im_addr; logic [15:0] im_wdata, im_rdata;
  mreq_t sm_req; mvec_t sm_rdata; logic out_valid; logic [15:0] out_data;
  logic [31:0] idle_cycles, vec_issued;
  int checks = 0, failures = 0;
  logic [31:0] prog [64]; int np = 0;
  logic [15:0] imem [256]; cplx_t sword;
  int alu_left = 0, cmac_left = 0, n_alu = 0, n_cmac = 0, cfg_seen = 0, bad_issue = 0;
  logic [15:0] outs [$]; bit busy_at_out [$];
  always #5 clk = ~clk;
  risc_controller #(.PROG_DEPTH(256), .IMEM_DEPTH(256)) dut (.*);

  function automatic void emit(input opcode_e o, input int rd, input int rs, input int imm);
    prog[np] = {o, 4'(rd), 4'(rs), 2'b00, 16'(imm)}; np++;
  endfunction
  // models of the memories and the clusters
  always_ff @(posedge clk) begin
    if (im_en) begin if (im_we) imem[im_addr] <= im_wdata; im_rdata <= imem[im_addr]; end
    if (sm_req.en) begin if (sm_req.we) sword <= sm_req.wdata[0]; sm_rdata[0] <= sword; end
    if (cfg.we && cfg.addr == 8'h61 && cfg.data == 16'd64) cfg_seen <= cfg_seen + 1;
    if (alu_start) begin
      if (alu_busy) bad_issue <= bad_issue + 1;
      n_alu <= n_alu + 1; alu_left <= 30; alu_busy <= 1;
      if (alu_op != VA_SMAC || vlen != 16'd64) bad_issue <= bad_issue + 1;
    end else if (alu_left > 1) alu_left <= alu_left - 1; else begin alu_left <= 0; alu_busy <= 0; end
    if (cmac_start) begin
      if (cmac_busy) bad_issue <= bad_issue + 1;
      n_cmac <= n_cmac + 1; cmac_left <= 20; cmac_busy <= 1;
    end else if (cmac_left > 1) cmac_left <= cmac_left - 1; else begin cmac_left <= 0; cmac_busy <= 0; end
    if (out_valid) begin outs.push_back(out_data); busy_at_out.push_back(alu_busy); end
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    sword = '0; sm_rdata = '0;
    emit(OP_LI, 1, 0, 5);  emit(OP_LI, 2, 0, 0);  emit(OP_LI, 3, 0, 1);
    emit(OP_ADD, 2, 2, 1); emit(OP_SUB, 1, 1, 3); emit(OP_BNE, 1, 0, 3);   // 3..5 loop
    emit(OP_OUT, 0, 2, 0);                                                 // 15
    emit(OP_LI, 4, 0, 123); emit(OP_ST, 4, 0, 10); emit(OP_LD, 5, 0, 10);
    emit(OP_ADDI, 5, 5, 7); emit(OP_OUT, 0, 5, 0);                         // 130
    emit(OP_LI, 6, 0, 16'hfffd); emit(OP_LI, 7, 0, 1000); emit(OP_CLA, 0, 0, 0);
    emit(OP_MAC, 0, 6, 7); emit(OP_MAC, 0, 6, 7); emit(OP_MFA, 8, 0, 1);
    emit(OP_OUT, 0, 8, 0);                                                 // -3000
    emit(OP_MUL, 9, 6, 7); emit(OP_OUT, 0, 9, 0);                          // -3000
    emit(OP_SHL, 10, 7, 2); emit(OP_SHR, 11, 6, 1);
    emit(OP_OUT, 0, 10, 0); emit(OP_OUT, 0, 11, 0);                        // 4000, -2
    emit(OP_LI, 12, 0, 64); emit(OP_CFG, 0, 12, 8'h61);
    emit(OP_VALU, 0, 12, VA_SMAC); emit(OP_ADDI, 13, 0, 1);
    emit(OP_OUT, 0, 13, 0);                                                // 1, ALU busy
    emit(OP_IDLE, 0, 0, 1); emit(OP_OUT, 0, 12, 0);                        // 64, ALU idle
    emit(OP_VCMAC, 0, 12, VC_ABSQR); emit(OP_VCMAC, 0, 12, VC_MAC); emit(OP_IDLE, 0, 0, 3);
    emit(OP_STS, 6, 7, 0); emit(OP_LDS, 14, 0, 15);
    emit(OP_OUT, 0, 14, 0); emit(OP_OUT, 0, 15, 0);                        // 1000, -3
    emit(OP_RDMAX, 1, 0, 0); emit(OP_OUT, 0, 1, 0);                        // 0x55
    emit(OP_XOR, 2, 7, 6); emit(OP_AND, 3, 2, 7); emit(OP_OR, 4, 3, 6);
    emit(OP_OUT, 0, 4, 0);                                                 // ((1000^-3)&1000)|-3
    emit(OP_BEQ, 0, 0, np + 2); emit(OP_OUT, 0, 0, 0); emit(OP_JMP, 0, 0, np + 1);
    emit(OP_OUT, 0, 0, 0);                                                 // skipped
    emit(OP_HALT, 0, 0, 0);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < np; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_wdata = prog[i];
    end
    @(negedge clk); prog_we = 0; start = 1; @(negedge clk); start = 0;
    while (running) @(negedge clk);
    begin
      int exp [$] = '{15, 130, 16'(-3000), 16'(-3000), 4000, 16'(-2), 1, 64, 1000, 16'(-3), 16'h55,
                      16'(((1000 ^ -3) & 1000) | -3), 0};
      chk(outs.size() == exp.size(), $sformatf("number of outputs %0d", outs.size()));
      for (int i = 0; i < exp.size() && i < outs.size(); i++)
        chk(outs[i] == 16'(exp[i]), $sformatf("out %0d = %0d, expected %0d", i, $signed(outs[i]), $signed(16'(exp[i]))));
      if (outs.size() > 7) chk(busy_at_out[6] && !busy_at_out[7], "RISC ran during vector op; IDLE waited");
    end
    chk(cfg_seen == 1, "cfg write");
    chk(n_alu == 1 && n_cmac == 2 && vec_issued == 3, "vector issues");
    chk(bad_issue == 0, "no issue to a busy cluster");
    chk(idle_cycles > 30, $sformatf("idle cycles %0d", idle_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
