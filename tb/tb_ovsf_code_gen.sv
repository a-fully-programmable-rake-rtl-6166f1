// tb_ovsf_code_gen: builds OVSF codes by the recursive tree definition
// C(2SF,2k) = [C(SF,k) C(SF,k)], C(2SF,2k+1) = [C(SF,k) -C(SF,k)] and checks
// the generator's per-lane chips for several spreading factors and indices,
// plus the symbol-end flag and wrap-around.
module tb_ovsf_code_gen;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [3:0] sf_log; logic [8:0] idx [4]; logic [3:0] chip; logic sym_end;
  int checks = 0, failures = 0;
  bit tree [10][512][512];  // [log2 SF][k][n], 1 = -1
  always #5 clk = ~clk;
  ovsf_code_gen #(.LANES(4), .LOGSF_MAX(9)) dut (.*);
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    tree[0][0][0] = 0;
    for (int l = 0; l < 9; l++) begin
      int sf; sf = 1 << l;
      for (int k = 0; k < sf; k++)
        for (int n = 0; n < sf; n++) begin
          tree[l+1][2*k][n] = tree[l][k][n]; tree[l+1][2*k][n+sf] = tree[l][k][n];
          tree[l+1][2*k+1][n] = tree[l][k][n]; tree[l+1][2*k+1][n+sf] = !tree[l][k][n];
        end
    end
    sf_log = 0; for (int l = 0; l < 4; l++) idx[l] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int lg, sf; int kk [4];
      lg = (t < 3) ? t + 2 : int'($urandom_range(1, 9)); sf = 1 << lg;
      @(negedge clk); sf_log = 4'(lg); load = 1;
      for (int l = 0; l < 4; l++) begin kk[l] = int'($urandom_range(0, sf - 1)); idx[l] = 9'(kk[l]); end
      @(negedge clk); load = 0;
      for (int l = 0; l < 4; l++) idx[l] = '0;  // registered at load
      for (int n = 0; n < 2 * sf; n++) begin
        for (int l = 0; l < 4; l++) begin
          checks++;
          if (chip[l] != tree[lg][kk[l]][n % sf]) begin
            failures++; if (failures < 5) $display("FAIL sf=%0d lane %0d n=%0d", sf, l, n);
          end
        end
        checks++; if (sym_end != (n % sf == sf - 1)) failures++;
        step = 1; @(negedge clk); step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
