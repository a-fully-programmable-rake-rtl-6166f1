// vector_lsu: vector load unit (VLU) and vector store unit (VSU) of a cluster.
//
// Load side: the memory returns LANES consecutive words per access. The VLU
// hands them to the lanes in one of three modes:
//   LM_PAR   lane k gets word k (several items per cycle from the banks),
//   LM_BCAST lane k gets word 0 (one item, distributed to every lane),
//   LM_SLIDE one item per access is shifted into a register window and lane k
//            gets x[n-(LANES-1)+k], so LANES correlations at consecutive
//            offsets need one fetch instead of LANES (3/4 fewer fetches).
// Store side: the VSU turns wide results into 16-bit words: rounding
// arithmetic right shift by `shift`, then saturation, and issues a write of
// the words selected by st_mask.
// The two load modes and the fetch saving follow the document; the sliding
// window form of the saving, the rounding and the saturation are this design's.
//
// Timing: ld_valid marks the cycle in which rdata holds fetched data; in
// LM_SLIDE the window register updates at that clock edge and x shows the
// window including the newest item combinationally. The store request is
// combinational from its inputs.
module vector_lsu
  import rake_pkg::*;
#(
  parameter int unsigned VW = 48   // width of values handed to the VSU
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // load
  input  load_mode_e           mode,
  input  logic                 ld_valid,
  input  mvec_t                rdata,
  output cplx_t                x [LANES],
  // store
  input  logic                 st_en,
  input  logic [LANES-1:0]     st_mask,
  input  logic [4:0]           shift,
  input  logic signed [VW-1:0] st_re [LANES],
  input  logic signed [VW-1:0] st_im [LANES],
  output mreq_t                st_req
);

  cplx_t win [LANES-1];   // the LANES-1 most recent items, win[LANES-2] newest

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LANES-1; k++) win[k] <= '0;
    end else if (ld_valid && mode == LM_SLIDE) begin
      for (int k = 0; k < LANES-2; k++) win[k] <= win[k+1];
      win[LANES-2] <= rdata[0];
    end
  end

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      unique case (mode)
        LM_BCAST: x[k] = rdata[0];
        LM_SLIDE: x[k] = (k == LANES-1) ? rdata[0] : win[k];
        default:  x[k] = rdata[k];
      endcase
    end
  end

  function automatic logic signed [DW-1:0] scale(input logic signed [VW-1:0] v,
                                                 input logic [4:0] sh);
    logic signed [VW:0] r;
    r = (VW+1)'(v);
    if (sh != '0) r = (r + ((VW+1)'(1) <<< (sh - 5'd1))) >>> sh;
    return sat16(64'(r));
  endfunction

  always_comb begin
    st_req.en    = st_en;
    st_req.we    = st_en;
    st_req.wmask = st_mask;
    for (int k = 0; k < LANES; k++) begin
      st_req.wdata[k].re = scale(st_re[k], shift);
      st_req.wdata[k].im = scale(st_im[k], shift);
    end
  end

endmodule
