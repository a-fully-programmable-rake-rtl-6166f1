// tb_vector_alu: checks code selection and the four lanes of the vector ALU.
// Each trial picks a code source (instruction code, scrambling code, per-lane
// OVSF chip, per-lane data code), accumulates random samples for a few cycles
// and compares every lane and the lane sum with an integer model.
module tb_vector_alu;
  import rake_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  code_src_e code_src; scode_t instr_code, scr_code; logic [3:0] ovsf_chip;
  scode_t mem_code [4]; cplx_t x [4]; aacc_t acc [4];
  logic signed [AW+1:0] sum_re, sum_im;
  int checks = 0, failures = 0;
  longint mre [4], mim [4];
  always #5 clk = ~clk;
  vector_alu dut (.*);
  function automatic int rnd2(); return int'($urandom_range(0, 2)) - 1; endfunction
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    code_src = CS_INSTR; instr_code = '0; scr_code = '0; ovsf_chip = '0;
    for (int l = 0; l < 4; l++) begin mem_code[l] = '0; x[l] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      code_src = code_src_e'(t % 4);
      for (int c = 0; c < 8; c++) begin
        int ca [4], cb [4];
        @(negedge clk);
        en = 1; clr = (c == 0);
        instr_code = '{a: 2'(rnd2()), b: 2'(rnd2())};
        scr_code   = '{a: 2'(rnd2()), b: 2'(rnd2())};
        ovsf_chip  = 4'($urandom);
        for (int l = 0; l < 4; l++) begin
          mem_code[l] = '{a: 2'(rnd2()), b: 2'(rnd2())};
          x[l].re = 16'($urandom); x[l].im = 16'($urandom);
          unique case (code_src)
            CS_INSTR:    begin ca[l] = int'(instr_code.a); cb[l] = int'(instr_code.b); end
            CS_SCRAMBLE: begin ca[l] = int'(scr_code.a);   cb[l] = int'(scr_code.b); end
            CS_OVSF:     begin ca[l] = ovsf_chip[l] ? -1 : 1; cb[l] = 0; end
            default:     begin ca[l] = int'(mem_code[l].a); cb[l] = int'(mem_code[l].b); end
          endcase
          if (clr) begin mre[l] = 0; mim[l] = 0; end
          mre[l] += ca[l] * int'(x[l].re) - cb[l] * int'(x[l].im);
          mim[l] += ca[l] * int'(x[l].im) + cb[l] * int'(x[l].re);
        end
        @(posedge clk); #1;
        begin
          longint sr, si; sr = 0; si = 0;
          for (int l = 0; l < 4; l++) begin
            checks++;
            if (longint'(acc[l].re) != mre[l] || longint'(acc[l].im) != mim[l]) begin
              failures++; if (failures < 5) $display("FAIL t=%0d lane %0d", t, l);
            end
            sr += mre[l]; si += mim[l];
          end
          checks++; if (longint'(sum_re) != sr || longint'(sum_im) != si) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
