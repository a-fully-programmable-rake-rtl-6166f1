// ovsf_code_gen: Orthogonal Variable Spreading Factor code generator.
//
// The document feeds each accumulator of the 4-way ALU with its own OVSF code
// so that four codes are de-spread at once. This generator produces, per lane,
// chip n of code C(SF, k) as the parity of (n AND bitreverse(k)), with the bit
// reversal taken over log2(SF) bits, which is the tree ordering of OVSF codes.
// A chip bit 0 means +1, 1 means -1. The formula is this design's choice of
// implementation; the document names the generator only.
//
// Interface: load clears the chip counter and takes sf_log (log2 SF, up to
// LOGSF_MAX) and one code index per lane; step advances one chip. The counter
// wraps every SF chips; sym_end marks the last chip of a symbol.
// Timing: chip outputs are combinational from the registered counter.
module ovsf_code_gen #(
  parameter int unsigned LANES     = 4,
  parameter int unsigned LOGSF_MAX = 9   // SF up to 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [3:0]           sf_log,
  input  logic [LOGSF_MAX-1:0] idx [LANES],
  input  logic                 step,
  output logic [LANES-1:0]     chip,
  output logic                 sym_end
);

  logic [LOGSF_MAX-1:0] n, mask;
  logic [3:0]           sfl;
  logic [LOGSF_MAX-1:0] k_rev [LANES];
  logic [LOGSF_MAX-1:0] idx_q [LANES];

  assign mask = LOGSF_MAX'((1 << sfl) - 1);

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      k_rev[l] = '0;
      for (int b = 0; b < LOGSF_MAX; b++)
        if (b < int'(sfl)) k_rev[l][int'(sfl) - 1 - b] = idx_q[l][b];
      chip[l] = ^(n & k_rev[l] & mask);
    end
  end

  assign sym_end = ((n & mask) == mask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n   <= '0;
      sfl <= '0;
      for (int l = 0; l < LANES; l++) idx_q[l] <= '0;
    end else if (load) begin
      n   <= '0;
      sfl <= (sf_log > 4'(LOGSF_MAX)) ? 4'(LOGSF_MAX) : sf_log;
      for (int l = 0; l < LANES; l++) idx_q[l] <= idx[l];
    end else if (step) begin
      n <= (n + 1'b1) & mask;
    end
  end

endmodule
