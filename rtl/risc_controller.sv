// risc_controller: single-issue RISC controller of the processor.
//
// Issues exactly one instruction per clock cycle from a program memory. RISC
// instructions run here on 16-bit integers (16-entry register file, ALSU and a
// 16x16 -> 32-bit MAC unit); vector instructions are only issued here and then
// run for many cycles on a SIMD cluster, so the following RISC instructions
// execute in parallel with them. An idle instruction halts the control flow
// until the selected clusters have finished, which is how tasks synchronise.
// Issuing to a cluster that is still busy also waits. The controller also
// writes the configuration registers of the memories, network and clusters.
// Single issue, the three instruction classes, the RF/ALSU/MAC contents and
// idle-based synchronisation follow the document; the encoding (risc_pkg), the
// program memory size and the one-cycle execution model are this design's.
//
// Interface: prog_* writes the program memory while stopped; a start pulse
// runs from address 0 until HALT. Data loads (integer memory, sample memory
// port) stall the controller for one cycle while the read completes.
// The sample-memory port moves one complex word at a time, so lanes 1-3 of
// sm_req are constant zero.
// Counters: idle_cycles counts cycles spent waiting in IDLE or on a busy
// cluster; vec_issued counts vector instructions.
module risc_controller
  import rake_pkg::*;
  import risc_pkg::*;
#(
  parameter int unsigned PROG_DEPTH = 1024,
  parameter int unsigned IMEM_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] prog_addr,
  input  logic [31:0] prog_wdata,
  input  logic        start,
  output logic        running,
  // configuration bus
  output cfg_t        cfg,
  // vector issue
  output logic        alu_start,
  output valu_op_e    alu_op,
  output logic        cmac_start,
  output vcmac_op_e   cmac_op,
  output logic [15:0] vlen,
  input  logic        alu_busy,
  input  logic        cmac_busy,
  input  logic [15:0] max_idx,
  // integer memory
  output logic        im_en,
  output logic        im_we,
  output logic [$clog2(IMEM_DEPTH)-1:0] im_addr,
  output logic [15:0] im_wdata,
  input  logic [15:0] im_rdata,
  // sample memory port through the network
  output mreq_t       sm_req,
  input  mvec_t       sm_rdata,
  // output port
  output logic        out_valid,
  output logic [15:0] out_data,
  output logic [31:0] idle_cycles,
  output logic [31:0] vec_issued
);

  localparam int unsigned PC_W = $clog2(PROG_DEPTH);

  logic [31:0]        prog [PROG_DEPTH];
  logic [PC_W-1:0]    pc;
  instr_t             ins;
  logic [15:0]        rf [16];
  logic signed [31:0] acc;
  logic               ld_wait;    // second cycle of a load
  logic               wait_busy;  // this cycle's instruction cannot issue yet
  logic [15:0]        rs_v, rd_v, rt_v, sum;

  always_ff @(posedge clk)
    if (prog_we && !running) prog[prog_addr] <= prog_wdata;

  assign ins  = instr_t'(prog[pc]);
  assign rs_v = rf[ins.rs];
  assign rd_v = rf[ins.rd];
  assign rt_v = rf[ins.imm[3:0]];
  assign sum  = rs_v + ins.imm;

  always_comb begin
    wait_busy = 1'b0;
    unique case (ins.op)
      OP_VALU:  wait_busy = alu_busy;
      OP_VCMAC: wait_busy = cmac_busy;
      OP_IDLE:  wait_busy = (ins.imm[0] && alu_busy) || (ins.imm[1] && cmac_busy);
      default:  ;
    endcase
  end

  // Side effects that leave the controller (combinational from the issued instruction).
  logic issue;
  assign issue = running && !wait_busy && !ld_wait;

  always_comb begin
    cfg        = '0;
    cfg.we     = issue && ins.op == OP_CFG;
    cfg.addr   = ins.imm[7:0];
    cfg.data   = rs_v;
    alu_start  = issue && ins.op == OP_VALU;
    cmac_start = issue && ins.op == OP_VCMAC;
    alu_op     = valu_op_e'(ins.imm[2:0]);
    cmac_op    = vcmac_op_e'(ins.imm[2:0]);
    vlen       = rs_v;
    im_en      = issue && (ins.op == OP_LD || ins.op == OP_ST);
    im_we      = ins.op == OP_ST;
    im_addr    = sum[$clog2(IMEM_DEPTH)-1:0];
    im_wdata   = rd_v;
    sm_req     = '0;
    sm_req.en  = issue && (ins.op == OP_LDS || ins.op == OP_STS);
    sm_req.we  = ins.op == OP_STS;
    sm_req.wmask = LANES'(1);
    sm_req.wdata[0] = '{re: rs_v, im: rd_v};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; running <= 1'b0; ld_wait <= 1'b0; acc <= '0;
      out_valid <= 1'b0; out_data <= '0; idle_cycles <= '0; vec_issued <= '0;
      for (int i = 0; i < 16; i++) rf[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          pc      <= '0;
        end
      end else if (ld_wait) begin
        // second cycle of a load: write the returned data
        ld_wait <= 1'b0;
        pc      <= pc + 1'b1;
        if (ins.op == OP_LD) rf[ins.rd] <= im_rdata;
        else begin
          rf[ins.rd]      <= sm_rdata[0].re;
          rf[ins.imm[3:0]] <= sm_rdata[0].im;
        end
      end else if (wait_busy) begin
        idle_cycles <= idle_cycles + 1;
      end else begin
        pc <= pc + 1'b1;
        unique case (ins.op)
          OP_ADD:   rf[ins.rd] <= rs_v + rt_v;
          OP_SUB:   rf[ins.rd] <= rs_v - rt_v;
          OP_AND:   rf[ins.rd] <= rs_v & rt_v;
          OP_OR:    rf[ins.rd] <= rs_v | rt_v;
          OP_XOR:   rf[ins.rd] <= rs_v ^ rt_v;
          OP_SHL:   rf[ins.rd] <= rs_v << ins.imm[3:0];
          OP_SHR:   rf[ins.rd] <= 16'($signed(rs_v) >>> ins.imm[3:0]);
          OP_ADDI:  rf[ins.rd] <= sum;
          OP_LI:    rf[ins.rd] <= ins.imm;
          OP_MUL:   rf[ins.rd] <= 16'($signed(rs_v) * $signed(rt_v));
          OP_MAC:   acc <= acc + $signed(rs_v) * $signed(rt_v);
          OP_MFA:   rf[ins.rd] <= 16'(acc >>> ins.imm[3:0]);
          OP_CLA:   acc <= '0;
          OP_BEQ:   if (rd_v == rs_v) pc <= PC_W'(ins.imm);
          OP_BNE:   if (rd_v != rs_v) pc <= PC_W'(ins.imm);
          OP_JMP:   pc <= PC_W'(ins.imm);
          OP_LD, OP_LDS: begin
            ld_wait <= 1'b1;
            pc      <= pc;
          end
          OP_VALU, OP_VCMAC: vec_issued <= vec_issued + 1;
          OP_OUT: begin
            out_valid <= 1'b1;
            out_data  <= rs_v;
          end
          OP_RDMAX: rf[ins.rd] <= max_idx;
          OP_HALT: begin
            running <= 1'b0;
            pc      <= pc;
          end
          default: ;   // NOP, ST, STS, CFG, IDLE: effects are combinational
        endcase
      end
    end
  end

endmodule
