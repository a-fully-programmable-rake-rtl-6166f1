// alu_cluster: the ALU SIMD cluster (4-way complex ALU with its own control).
//
// A vector controller runs each vector instruction as a loop of element steps;
// the VLU feeds the four lanes from the memory port (or, for Rake finger
// processing, from the delay buffer, which delivers the four time-aligned
// finger samples of one input sample); the lanes multiply by short codes from
// the instruction, the de-scrambling generator or the OVSF generator and
// accumulate; the VSU scales, saturates and stores the results.
//   VA_SMUL  steps = len/4 (PAR) or len: per lane product c*x; four words
//            stored per step in PAR mode (de-scrambling each finger), lane 0's
//            word in the one-item modes (e.g. capturing a sample stream).
//   VA_SMAC  steps = len/4: one sum over len elements split over the lanes,
//            folded by the lane adder tree, one word stored (vsmac).
//   VA_SMAC4 steps = len (BCAST) or len+3 (SLIDE, window fill): one sum per
//            lane, four words stored (vsmac4: four OVSF codes, or four
//            correlation offsets).
// Drain cycles are 2, 2 and 6, so with the load unit kept busy a vsmac of 64
// takes 18 cycles and a vsmac4 of 64 takes 70, as in the document's kernel
// table. The sequencing is this design's; the units and their roles follow the
// document.
//
// Configuration (cfg bus, unit U_ALU): reg 0 code source, 1 instruction code
// {a[3:2], b[1:0]}, 2 load mode [1:0] and data source [4] (1 = delay buffer),
// 3 Gold seed [15:0], 4 Gold seed [17:16] (writing it loads the generator),
// 5 conjugate scrambling code [0], 6 log2 SF (writing it loads the OVSF
// generator), 7..10 OVSF code index of lanes 0..3, 11 store shift.
// Interface: start/op/len issue an instruction while busy is low; busy stays
// high until the last store; done pulses in the last cycle.
// The request structs are shared by all memory ports, so the load request's
// write fields are constant zero here.
// Timing: memory read data is expected one cycle after the load request.
module alu_cluster
  import rake_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  cfg_t      cfg,
  input  logic      start,
  input  valu_op_e  op,
  input  logic [15:0] len,
  output logic      busy,
  output logic      done,
  output mreq_t     ld_req,
  input  mvec_t     ld_rdata,
  output mreq_t     st_req,
  input  cplx_t     dly_fingers [LANES],
  input  logic      dly_valid,
  output logic      dly_ack
);

  localparam int unsigned VW = 48;

  // ---------------- configuration registers
  code_src_e   code_src;
  scode_t      instr_code;
  load_mode_e  lmode;
  logic        from_dly;
  logic [15:0] seed;   // seed bits 15:0; bits 17:16 come with the load write
  logic        scr_conj;
  logic [8:0]  ovsf_idx [LANES];
  logic [4:0]  shift;
  logic        scr_load, ovsf_load;
  logic [3:0]  sf_log;
  logic        hit;

  assign hit       = cfg.we && cfg.addr[7:4] == U_ALU;
  assign scr_load  = hit && cfg.addr[3:0] == 4'd4;
  assign ovsf_load = hit && cfg.addr[3:0] == 4'd6;
  assign sf_log    = cfg.data[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_src <= CS_INSTR; instr_code <= '{a: 2'sd1, b: 2'sd0};
      lmode <= LM_PAR; from_dly <= 1'b0; seed <= 16'd1; scr_conj <= 1'b1;
      for (int l = 0; l < LANES; l++) ovsf_idx[l] <= '0;
      shift <= '0;
    end else if (hit) begin
      unique case (cfg.addr[3:0])
        4'd0: code_src   <= code_src_e'(cfg.data[1:0]);
        4'd1: instr_code <= '{a: cfg.data[3:2], b: cfg.data[1:0]};
        4'd2: begin lmode <= load_mode_e'(cfg.data[1:0]); from_dly <= cfg.data[4]; end
        4'd3: seed[15:0]  <= cfg.data;
        4'd5: scr_conj   <= cfg.data[0];
        4'd7, 4'd8, 4'd9, 4'd10: ovsf_idx[cfg.addr[1:0] - 2'd3] <= cfg.data[8:0];
        4'd11: shift     <= cfg.data[4:0];
        default: ;
      endcase
    end
  end

  // ---------------- instruction sequencing
  valu_op_e    op_q;
  logic [15:0] steps;
  logic [3:0]  drain;
  logic        vstep, draining;
  logic [15:0] vidx;
  logic [3:0]  dcnt;
  logic        slide;

  assign slide = lmode == LM_SLIDE;

  always_comb begin
    unique case (op)
      VA_SMUL:  begin steps = (lmode == LM_PAR) ? len >> 2 : len; drain = 4'd2; end
      VA_SMAC:  begin steps = len >> 2;                         drain = 4'd2; end
      default:  begin steps = slide ? len + 16'd3 : len;        drain = 4'd6; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              op_q <= VA_SMUL;
    else if (start && !busy) op_q <= op;
  end

  vector_controller #(.CNT_W(16)) u_vctrl (
    .clk(clk), .rst_n(rst_n),
    .start(start && !busy), .steps(steps), .drain(drain),
    .stall(from_dly && !dly_valid),
    .busy(busy), .step(vstep), .first(), .last(), .idx(vidx),
    .draining(draining), .dcnt(dcnt), .done(done)
  );

  // Load request: one access per step from the memory port, or take the
  // aligned finger samples from the delay buffer.
  always_comb begin
    ld_req    = '0;
    ld_req.en = vstep && !from_dly;
  end
  assign dly_ack = vstep && from_dly;

  // ---------------- execute stage (one cycle after the step)
  logic        ex;
  logic [15:0] ex_idx;
  mvec_t       dly_q, src;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex <= 1'b0; ex_idx <= '0; dly_q <= '0;
    end else begin
      ex     <= vstep;
      ex_idx <= vidx;
      if (dly_ack) for (int l = 0; l < LANES; l++) dly_q[l] <= dly_fingers[l];
    end
  end
  assign src = from_dly ? dly_q : ld_rdata;

  cplx_t x [LANES];
  logic  lane_en, lane_clr;
  logic                 st_en;
  logic [LANES-1:0]     st_mask;
  logic signed [VW-1:0] st_re [LANES];
  logic signed [VW-1:0] st_im [LANES];

  vector_lsu #(.VW(VW)) u_lsu (
    .clk(clk), .rst_n(rst_n),
    .mode(lmode), .ld_valid(ex), .rdata(src), .x(x),
    .st_en(st_en), .st_mask(st_mask), .shift(shift),
    .st_re(st_re), .st_im(st_im), .st_req(st_req)
  );

  assign lane_en  = ex && !(slide && op_q == VA_SMAC4 && ex_idx < 16'd3);
  assign lane_clr = (op_q == VA_SMUL) || ex_idx == ((slide && op_q == VA_SMAC4) ? 16'd3 : 16'd0);

  // ---------------- code generators (one chip per processed element)
  scode_t           scr_code;
  logic [LANES-1:0] ovsf_chip;
  scode_t           mem_code [LANES];

  scrambling_code_gen u_scr (
    .clk(clk), .rst_n(rst_n), .load(scr_load),
    .seed_x({cfg.data[1:0], seed[15:0]}), .step(lane_en),
    .conj(scr_conj), .code(scr_code)
  );

  ovsf_code_gen #(.LANES(LANES), .LOGSF_MAX(9)) u_ovsf (
    .clk(clk), .rst_n(rst_n), .load(ovsf_load), .sf_log(sf_log),
    .idx(ovsf_idx), .step(lane_en), .chip(ovsf_chip), .sym_end()
  );

  // Code supplied with the data: signs of the word give a = sign(re), b = sign(im)
  // (a pilot or spreading sequence stored as +-1 +- j).
  always_comb
    for (int l = 0; l < LANES; l++)
      mem_code[l] = '{a: x[l].re[DW-1] ? -2'sd1 : 2'sd1, b: x[l].im[DW-1] ? -2'sd1 : 2'sd1};

  aacc_t               acc [LANES];
  logic signed [AW+1:0] sum_re, sum_im;

  vector_alu #(.NL(LANES)) u_alu (
    .clk(clk), .rst_n(rst_n), .en(lane_en), .clr(lane_clr),
    .code_src(code_src), .instr_code(instr_code), .scr_code(scr_code),
    .ovsf_chip(ovsf_chip), .mem_code(mem_code), .x(x),
    .acc(acc), .sum_re(sum_re), .sum_im(sum_im)
  );

  // ---------------- store stage
  logic                 ex2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ex2 <= 1'b0;
    else        ex2 <= ex;
  end

  always_comb begin
    st_en   = 1'b0;
    st_mask = '0;
    for (int l = 0; l < LANES; l++) begin
      st_re[l] = VW'(acc[l].re);
      st_im[l] = VW'(acc[l].im);
    end
    unique case (op_q)
      VA_SMUL: begin
        st_en   = ex2;
        st_mask = (lmode == LM_PAR) ? '1 : LANES'(1);
      end
      VA_SMAC: begin
        st_en    = draining && dcnt == 4'd2;
        st_mask  = LANES'(1);
        st_re[0] = VW'(sum_re);
        st_im[0] = VW'(sum_im);
      end
      default: begin
        st_en   = draining && dcnt >= 4'd3;
        st_mask = LANES'(1);
        st_re[0] = VW'(acc[2'(dcnt - 4'd3)].re);
        st_im[0] = VW'(acc[2'(dcnt - 4'd3)].im);
      end
    endcase
  end

endmodule
