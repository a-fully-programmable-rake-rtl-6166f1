// cmac_cluster: the CMAC SIMD cluster (2-way complex MAC with its own control).
//
// Same control and load/store structure as the ALU cluster, around the 2-way
// CMAC. Two load ports (A: data, B: coefficients) and one store port:
//   VC_MUL   steps = len: r0 = A0*B0, one word stored per element     (vmul)
//   VC_ABSQR steps = len: r0 = |A0|^2, one word stored per element    (vabsqr)
//   VC_MAC   steps = len/2: datapath k takes A_k*B_k (two elements per
//            access), the two partial sums are folded, one word stored  (vmac)
//   VC_MAC2  steps = len: both datapaths take A0; datapath k takes B_k, two
//            coefficient streams stored interleaved; two words stored  (vmac2)
//   VC_MAX   steps = len: largest |A0|^2 and its index, kept in max_val/max_idx
//   VC_BFLY  steps = len: A0, A1 = butterfly inputs, B0 = twiddle (Q1.15),
//            two words A0 + w*A1, A0 - w*A1 stored per butterfly
// Drain: 2 cycles, 4 for VC_MAC (fold in drain cycle 2, store in 4) and
// VC_MAC2 (stores in 3 and 4). Cycle costs are then len+2 for vmul and vabsqr
// and len/2+4, len+4 for vmac and vmac2, as in the document's kernel table.
// The grouping of operations and the sequencing are this design's choices.
//
// Configuration (cfg bus, unit U_CMAC): reg 0 store shift, reg 1 conjugate B [0]
// (MRC multiplies by the conjugated channel estimate).
// The request structs are shared by all memory ports, so the load requests'
// write fields, and store lanes 2-3 (two datapaths only), are constant zero.
// Timing: memory read data is expected one cycle after the load request.
module cmac_cluster
  import rake_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_t        cfg,
  input  logic        start,
  input  vcmac_op_e   op,
  input  logic [15:0] len,
  output logic        busy,
  output logic        done,
  output mreq_t       lda_req,
  input  mvec_t       lda_rdata,
  output mreq_t       ldb_req,
  input  mvec_t       ldb_rdata,
  output mreq_t       st_req,
  output logic [CW-1:0] max_val,
  output logic [15:0] max_idx
);

  localparam int unsigned VW = 48;

  logic [4:0] shift;
  logic       conj_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift <= '0; conj_b <= 1'b0;
    end else if (cfg.we && cfg.addr[7:4] == U_CMAC) begin
      if (cfg.addr[3:0] == 4'd0) shift  <= cfg.data[4:0];
      if (cfg.addr[3:0] == 4'd1) conj_b <= cfg.data[0];
    end
  end

  vcmac_op_e   op_q;
  logic [15:0] steps;
  logic [3:0]  drain;
  logic        vstep, vfirst, draining;
  logic [15:0] vidx;
  logic [3:0]  dcnt;

  always_comb begin
    unique case (op)
      VC_MAC:  begin steps = len >> 1; drain = 4'd4; end
      VC_MAC2: begin steps = len;      drain = 4'd4; end
      default: begin steps = len;      drain = 4'd2; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              op_q <= VC_MUL;
    else if (start && !busy) op_q <= op;
  end

  vector_controller #(.CNT_W(16)) u_vctrl (
    .clk(clk), .rst_n(rst_n),
    .start(start && !busy), .steps(steps), .drain(drain), .stall(1'b0),
    .busy(busy), .step(vstep), .first(vfirst), .last(), .idx(vidx),
    .draining(draining), .dcnt(dcnt), .done(done)
  );

  logic use_b;
  assign use_b = op_q inside {VC_MUL, VC_MAC, VC_MAC2, VC_BFLY};

  always_comb begin
    lda_req    = '0;
    ldb_req    = '0;
    lda_req.en = vstep;
    ldb_req.en = vstep && use_b;
  end

  // Execute stage, one cycle after the step.
  logic        ex, ex_first, ex2;
  logic [15:0] ex_idx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex <= 1'b0; ex_first <= 1'b0; ex_idx <= '0; ex2 <= 1'b0;
    end else begin
      ex <= vstep; ex_first <= vfirst; ex_idx <= vidx; ex2 <= ex;
    end
  end

  cplx_t a [CMACS];
  cplx_t b [CMACS];
  always_comb begin
    a[0] = lda_rdata[0];
    a[1] = (op_q == VC_MAC2) ? lda_rdata[0] : lda_rdata[1];
    b[0] = ldb_rdata[0];
    b[1] = ldb_rdata[1];
  end

  cacc_t r [CMACS];

  vector_cmac u_cmac (
    .clk(clk), .rst_n(rst_n), .en(ex), .first(ex_first),
    .fold(op_q == VC_MAC && draining && dcnt == 4'd2),
    .op(op_q), .conj_b(conj_b), .a(a), .b(b), .idx(ex_idx),
    .r(r), .max_val(max_val), .max_idx(max_idx)
  );

  // Store stage through the VSU (the load half of the unit is not used here:
  // the CMAC takes its operands straight from the two ports).
  logic                 st_en;
  logic [LANES-1:0]     st_mask;
  logic signed [VW-1:0] st_re [LANES];
  logic signed [VW-1:0] st_im [LANES];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      st_re[l] = '0;
      st_im[l] = '0;
    end
    st_re[0] = VW'(r[0].re);  st_im[0] = VW'(r[0].im);
    st_re[1] = VW'(r[1].re);  st_im[1] = VW'(r[1].im);
    st_en   = 1'b0;
    st_mask = LANES'(1);
    unique case (op_q)
      VC_MUL, VC_ABSQR: st_en = ex2;
      VC_BFLY: begin st_en = ex2; st_mask = LANES'(3); end
      VC_MAC:  st_en = draining && dcnt == 4'd4;
      VC_MAC2: begin
        st_en = draining && dcnt >= 4'd3;
        if (dcnt == 4'd4) begin st_re[0] = VW'(r[1].re); st_im[0] = VW'(r[1].im); end
      end
      default: ;
    endcase
  end

  vector_lsu #(.VW(VW)) u_vsu (
    .clk(clk), .rst_n(rst_n),
    .mode(LM_PAR), .ld_valid(1'b0), .rdata('0), .x(),
    .st_en(st_en), .st_mask(st_mask), .shift(shift),
    .st_re(st_re), .st_im(st_im), .st_req(st_req)
  );

endmodule
