// vector_alu: 4-way complex vector ALU with short multipliers and accumulators.
//
// LANES copies of alu_lane share one control. Each lane's short-multiplier
// code is chosen, as the document describes, from the instruction word (one
// constant code for all lanes), the de-scrambling code generator (one code for
// all lanes) or the OVSF generator (a separate +-1 code per lane, so that four
// OVSF codes are de-spread from the same data). A fourth source, a code per
// lane supplied with the data, serves correlation with a stored pilot or
// spreading sequence; that source and the lane-sum adder tree (used to fold
// the four partial sums of vsmac into one result) are this design's choices.
//
// Interface: en/clr as in alu_lane; x holds one sample per lane.
// Timing: acc and acc_sum are valid one cycle after the last enabled cycle.
module vector_alu
  import rake_pkg::*;
#(
  parameter int unsigned NL = LANES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              clr,
  input  code_src_e         code_src,
  input  scode_t            instr_code,
  input  scode_t            scr_code,
  input  logic [NL-1:0]     ovsf_chip,
  input  scode_t            mem_code [NL],
  input  cplx_t             x        [NL],
  output aacc_t             acc      [NL],
  output logic signed [AW+1:0] sum_re,
  output logic signed [AW+1:0] sum_im
);

  scode_t lane_code [NL];

  always_comb begin
    for (int l = 0; l < NL; l++) begin
      unique case (code_src)
        CS_INSTR:    lane_code[l] = instr_code;
        CS_SCRAMBLE: lane_code[l] = scr_code;
        CS_OVSF:     lane_code[l] = '{a: ovsf_chip[l] ? -2'sd1 : 2'sd1, b: 2'sd0};
        default:     lane_code[l] = mem_code[l];
      endcase
    end
  end

  for (genvar l = 0; l < NL; l++) begin : g_lane
    alu_lane u_lane (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .clr  (clr),
      .x    (x[l]),
      .code (lane_code[l]),
      .acc  (acc[l])
    );
  end

  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int l = 0; l < NL; l++) begin
      sum_re += (AW+2)'(acc[l].re);
      sum_im += (AW+2)'(acc[l].im);
    end
  end

endmodule
