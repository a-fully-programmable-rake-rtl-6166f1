// vector_cmac: 2-way complex multiply-accumulate unit.
//
// Two full complex datapaths, each forming p_k = a_k * b_k (or a_k * conj(b_k))
// with 16x16-bit multipliers and a CW-bit result/accumulator register r_k. They
// run separately or together:
//   VC_MUL   r_0 = a_0 * b_0                    (one result per element)
//   VC_ABSQR r_0 = |a_0|^2                      (real result)
//   VC_MAC   r_k += a_k * b_k, then fold: r_0 = r_0 + r_1  (one sum split over both)
//   VC_MAC2  r_k += a_k * b_k                   (two independent sums)
//   VC_MAX   keeps the largest |a_0|^2 and its element index (peak search)
//   VC_BFLY  r_0 = a_0 + w*a_1, r_1 = a_0 - w*a_1 with w = b_0 in Q1.15
// The document states the two datapaths and the radix-2 butterfly use, and that
// peak detection / maximum search and the MRC sum run on this unit; the op set,
// widths and Q1.15 twiddle format are this design's choices.
//
// Interface: en processes one element; first (with en) starts a new sum or
// maximum; fold (without en) adds r_1 into r_0; idx is the element index
// recorded by VC_MAX.
// Operands are masked to zero while en is low, so an idle unit's multipliers
// do not switch (the document's low-power input masking; the gating point is
// this design's).
// Timing: all results registered, valid the cycle after en/fold.
module vector_cmac
  import rake_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        first,
  input  logic        fold,
  input  vcmac_op_e   op,
  input  logic        conj_b,
  input  cplx_t       a [CMACS],
  input  cplx_t       b [CMACS],
  input  logic [15:0] idx,
  output cacc_t       r [CMACS],
  output logic [CW-1:0] max_val,
  output logic [15:0] max_idx
);

  localparam int unsigned MW = 2*DW + 1;

  logic signed [MW-1:0] p_re [CMACS];
  logic signed [MW-1:0] p_im [CMACS];
  logic signed [MW-1:0] mag0;
  logic signed [MW-1:0] t_re, t_im;   // w * a_1, Q1.15 scaled
  logic signed [MW-1:0] w_re_full, w_im_full;
  cplx_t                am [CMACS];  // operands, forced to zero while idle
  cplx_t                bm [CMACS];

  // Operand masking: while no element is processed the multipliers see
  // constant zero inputs, so they do not toggle.
  always_comb begin
    for (int k = 0; k < CMACS; k++) begin
      am[k] = en ? a[k] : '0;
      bm[k] = en ? b[k] : '0;
    end
  end

  always_comb begin
    for (int k = 0; k < CMACS; k++) begin
      logic signed [DW:0] bi;
      bi = conj_b ? -(DW+1)'(bm[k].im) : (DW+1)'(bm[k].im);
      p_re[k] = MW'(am[k].re * bm[k].re) - MW'(am[k].im * bi);
      p_im[k] = MW'(am[k].re * bi) + MW'(am[k].im * bm[k].re);
    end
    mag0      = MW'(am[0].re * am[0].re) + MW'(am[0].im * am[0].im);
    w_re_full = MW'(am[1].re * bm[0].re) - MW'(am[1].im * bm[0].im);
    w_im_full = MW'(am[1].re * bm[0].im) + MW'(am[1].im * bm[0].re);
    t_re      = w_re_full >>> 15;
    t_im      = w_im_full >>> 15;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < CMACS; k++) r[k] <= '0;
      max_val <= '0;
      max_idx <= '0;
    end else if (en) begin
      unique case (op)
        VC_MUL: begin
          r[0].re <= CW'(p_re[0]);
          r[0].im <= CW'(p_im[0]);
        end
        VC_ABSQR: begin
          r[0].re <= CW'(mag0);
          r[0].im <= '0;
        end
        VC_MAC, VC_MAC2: begin
          for (int k = 0; k < CMACS; k++) begin
            r[k].re <= (first ? '0 : r[k].re) + CW'(p_re[k]);
            r[k].im <= (first ? '0 : r[k].im) + CW'(p_im[k]);
          end
        end
        VC_MAX: begin
          if (first || CW'(mag0) > max_val) begin
            max_val <= CW'(mag0);
            max_idx <= idx;
          end
        end
        VC_BFLY: begin
          r[0].re <= CW'(am[0].re) + CW'(t_re);
          r[0].im <= CW'(am[0].im) + CW'(t_im);
          r[1].re <= CW'(am[0].re) - CW'(t_re);
          r[1].im <= CW'(am[0].im) - CW'(t_im);
        end
        default: ;
      endcase
    end else if (fold) begin
      r[0].re <= r[0].re + r[1].re;
      r[0].im <= r[0].im + r[1].im;
    end
  end

endmodule
