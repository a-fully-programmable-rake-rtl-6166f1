// rake_processor: programmable Rake-receiver baseband processor core.
//
// A clustered SIMD machine: one RISC controller issues one instruction per
// cycle; vector instructions run on two heterogeneous SIMD clusters, a 4-way
// complex ALU (short multipliers by 0, +-1, +-j, +-1+-j with accumulators, fed
// by de-scrambling and OVSF code generators) and a 2-way complex MAC, while
// later RISC instructions keep executing. Data sits in five banked sample
// memories, each with its own AGU, reached through a partial interconnect
// network; MEM3 and MEM4 are shared by both clusters and are swapped between
// them instead of copying data. Incoming samples from the front end go into a
// circular delay-equalisation buffer that delivers four time-aligned Rake
// finger samples per input sample. The mapping of a Rake receiver is:
// delay buffer -> ALU de-scramble -> ALU de-spread with four OVSF codes ->
// CMAC weighting by the conjugated channel estimate and maximum ratio
// combining; multi-path search uses ALU correlation and CMAC |x|^2 / maximum
// search. The block structure follows the document; sizes, encodings and
// register maps are this design's (see each module).
//
// Network ports: 0 ALU load, 1 ALU store, 2 CMAC load A, 3 CMAC load B,
// 4 CMAC store, 5 controller. Configuration units on the controller's cfg bus:
// 0..4 sample memories MEM1..MEM5, 5 network, 6 ALU cluster, 7 CMAC cluster,
// 8 delay buffer.
// Interface: load the program with prog_*, pulse start, stream samples with
// sample_valid (at most one per NF+1 = 5 cycles); results appear on out_*.
module rake_processor
  import rake_pkg::*;
#(
  parameter int unsigned MEM_DEPTH  = 1024,  // words per sample memory
  parameter int unsigned DLY_DEPTH  = 184,   // delay buffer length N
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
  // front-end (analog interface) sample stream
  input  logic        sample_valid,
  input  cplx_t       sample,
  // results
  output logic        out_valid,
  output logic [15:0] out_data,
  // status
  output logic        dly_overrun,
  output logic        dly_lost,
  output logic        net_cfg_err,
  output logic        net_conflict,
  output logic [31:0] idle_cycles,
  output logic [31:0] vec_issued
);

  localparam int unsigned NMEM  = 5;
  localparam int unsigned NPORT = 6;

  cfg_t        cfg;
  logic        alu_start, cmac_start, alu_busy, cmac_busy;
  valu_op_e    alu_op;
  vcmac_op_e   cmac_op;
  logic [15:0] vlen;
  logic [CW-1:0] max_val;
  logic [15:0] max_idx;

  mreq_t port_req   [NPORT];
  mvec_t port_rdata [NPORT];
  mreq_t mem_req    [NMEM];
  mvec_t mem_rdata  [NMEM];

  logic        im_en, im_we;
  logic [$clog2(IMEM_DEPTH)-1:0] im_addr;
  logic [15:0] im_wdata, im_rdata;

  cplx_t dly_fingers [LANES];
  logic  dly_valid, dly_ack;

  risc_controller #(.PROG_DEPTH(PROG_DEPTH), .IMEM_DEPTH(IMEM_DEPTH)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_wdata(prog_wdata),
    .start(start), .running(running), .cfg(cfg),
    .alu_start(alu_start), .alu_op(alu_op), .cmac_start(cmac_start), .cmac_op(cmac_op),
    .vlen(vlen), .alu_busy(alu_busy), .cmac_busy(cmac_busy), .max_idx(max_idx),
    .im_en(im_en), .im_we(im_we), .im_addr(im_addr), .im_wdata(im_wdata), .im_rdata(im_rdata),
    .sm_req(port_req[5]), .sm_rdata(port_rdata[5]),
    .out_valid(out_valid), .out_data(out_data),
    .idle_cycles(idle_cycles), .vec_issued(vec_issued)
  );

  integer_memory #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk(clk), .en(im_en), .we(im_we), .addr(im_addr), .wdata(im_wdata), .rdata(im_rdata)
  );

  alu_cluster u_alu (
    .clk(clk), .rst_n(rst_n), .cfg(cfg),
    .start(alu_start), .op(alu_op), .len(vlen), .busy(alu_busy), .done(),
    .ld_req(port_req[0]), .ld_rdata(port_rdata[0]), .st_req(port_req[1]),
    .dly_fingers(dly_fingers), .dly_valid(dly_valid), .dly_ack(dly_ack)
  );

  cmac_cluster u_cmac (
    .clk(clk), .rst_n(rst_n), .cfg(cfg),
    .start(cmac_start), .op(cmac_op), .len(vlen), .busy(cmac_busy), .done(),
    .lda_req(port_req[2]), .lda_rdata(port_rdata[2]),
    .ldb_req(port_req[3]), .ldb_rdata(port_rdata[3]),
    .st_req(port_req[4]), .max_val(max_val), .max_idx(max_idx)
  );

  partial_network #(.NMEM(NMEM), .NPORT(NPORT)) u_net (
    .clk(clk), .rst_n(rst_n), .cfg(cfg),
    .port_req(port_req), .port_rdata(port_rdata),
    .mem_req(mem_req), .mem_rdata(mem_rdata), .sel(),
    .cfg_err(net_cfg_err), .conflict(net_conflict)
  );

  for (genvar m = 0; m < NMEM; m++) begin : g_mem
    sample_memory #(.DEPTH(MEM_DEPTH), .UNIT(4'(m))) u_mem (
      .clk(clk), .rst_n(rst_n), .cfg(cfg), .req(mem_req[m]), .rdata(mem_rdata[m])
    );
  end

  rake_delay_buffer #(.DEPTH(DLY_DEPTH), .NF(LANES)) u_dly (
    .clk(clk), .rst_n(rst_n), .cfg(cfg),
    .in_valid(sample_valid), .in_sample(sample),
    .fingers(dly_fingers), .out_valid(dly_valid), .out_ack(dly_ack),
    .overrun(dly_overrun), .out_lost(dly_lost)
  );

endmodule
