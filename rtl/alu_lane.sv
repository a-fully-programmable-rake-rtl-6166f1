// alu_lane: one lane of the 4-way complex vector ALU.
//
// A "short" complex multiplier forms p = (a + jb) * x for a, b in {-1, 0, +1},
// which covers multiplication by 0, +-1, +-j and the QPSK-type codes +-1+-j
// used for de-scrambling. As in the lane datapath of the document, each output
// component is one adder fed by two multiplexers that pick Re, ~Re, Im, ~Im or
// "0", with the negations completed through the adder's carry-in; the sum is
// sign-extended by GUARD bits and goes into an accumulator whose feedback can
// be forced to zero. The guard width is this design's choice.
//
// Interface: en updates the accumulator; clr (with en) starts a new sum, i.e.
// the register loads the product instead of adding it.
// The sample input is masked to zero while en is low (low-power input
// masking as described for idle execution units).
// Timing: one product per cycle; acc is registered (latency 1).
module alu_lane
  import rake_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   clr,
  input  cplx_t  x,
  input  scode_t code,
  output aacc_t  acc
);

  localparam int unsigned PW = DW + 2;  // product width: |Re|+|Im| needs two extra bits

  logic signed [PW-1:0] xr, xi;
  logic signed [PW-1:0] re_op1, re_op2, im_op1, im_op2;
  logic [1:0]           cin_re, cin_im;
  logic signed [PW-1:0] p_re, p_im;
  aacc_t                p_ext, fb;

  // Input masking: an idle lane sees zero, so its adders do not switch.
  assign xr = en ? PW'(x.re) : '0;
  assign xi = en ? PW'(x.im) : '0;

  // Real part: a*Re - b*Im ; imaginary part: a*Im + b*Re.
  always_comb begin
    re_op1 = '0; re_op2 = '0; im_op1 = '0; im_op2 = '0;
    cin_re = 2'd0; cin_im = 2'd0;
    unique case (code.a)
      2'sb01:  begin re_op1 = xr;  im_op1 = xi; end
      2'sb11:  begin re_op1 = ~xr; im_op1 = ~xi; cin_re += 2'd1; cin_im += 2'd1; end
      default: ;
    endcase
    unique case (code.b)
      2'sb01:  begin re_op2 = ~xi; im_op2 = xr; cin_re += 2'd1; end
      2'sb11:  begin re_op2 = xi;  im_op2 = ~xr; cin_im += 2'd1; end
      default: ;
    endcase
    p_re = re_op1 + re_op2 + PW'(cin_re);
    p_im = im_op1 + im_op2 + PW'(cin_im);
  end

  // Guard: sign extension to the accumulator width.
  assign p_ext.re = AW'(p_re);
  assign p_ext.im = AW'(p_im);
  assign fb       = clr ? '0 : acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (en) begin
      acc.re <= fb.re + p_ext.re;
      acc.im <= fb.im + p_ext.im;
    end
  end

endmodule
