// sample_memory: banked single-port sample memory with its own AGU.
//
// DEPTH complex words are spread over BANKS single-port banks, word w in bank
// w mod BANKS. One access reads or writes up to BANKS consecutive words
// starting at the AGU address, each from a different bank, which is how the
// vector load unit fetches several items per cycle from "a bank of memories".
// After each access the AGU steps by its stride. The document gives the
// memory organisation (small memories, each with an AGU, single-port to save
// power) but no size or banking; those are this design's choices.
//
// Configuration (cfg bus, unit UNIT): reg 0 base, 1 stride, 2 modulo length,
// 3 mode (bit 0 FFT addressing, bits 7:4 log2 FFT length), reg 4 start offset;
// writing reg 4 applies the configuration and restarts the AGU.
// Timing: read data is registered, valid the cycle after the request.
module sample_memory
  import rake_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter logic [3:0]  UNIT  = 4'd0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cfg_t  cfg,
  input  mreq_t req,
  output mvec_t rdata
);

  localparam int unsigned BANKS  = LANES;
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned ROWS   = DEPTH / BANKS;
  localparam int unsigned ROW_W  = $clog2(ROWS);
  localparam int unsigned BSEL_W = $clog2(BANKS);

  cplx_t bank_q [BANKS][ROWS];

  logic [ADDR_W-1:0] base_r, stride_r, addr;
  logic [ADDR_W:0]   len_r;
  logic              fft_r;
  logic [3:0]        fft_log_r;
  logic              apply;

  assign apply = cfg.we && cfg.addr[7:4] == UNIT && cfg.addr[3:0] == 4'd4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_r <= '0; stride_r <= ADDR_W'(1); len_r <= '0; fft_r <= 1'b0; fft_log_r <= '0;
    end else if (cfg.we && cfg.addr[7:4] == UNIT) begin
      unique case (cfg.addr[3:0])
        4'd0:    base_r   <= cfg.data[ADDR_W-1:0];
        4'd1:    stride_r <= cfg.data[ADDR_W-1:0];
        4'd2:    len_r    <= cfg.data[ADDR_W:0];
        4'd3:    begin fft_r <= cfg.data[0]; fft_log_r <= cfg.data[7:4]; end
        default: ;
      endcase
    end
  end

  agu #(.ADDR_W(ADDR_W)) u_agu (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_we     (apply),
    .cfg_base   (base_r),
    .cfg_stride (stride_r),
    .cfg_len    (len_r),
    .cfg_fft    (fft_r),
    .cfg_fft_log(fft_log_r),
    .restart    (1'b0),
    .init_off   (cfg.data[ADDR_W-1:0]),
    .step       (req.en),
    .addr       (addr)
  );

  // Word addr+k sits in bank (addr+k) mod BANKS, row (addr+k) / BANKS.
  logic [ADDR_W-1:0] wa [BANKS];
  always_comb
    for (int k = 0; k < BANKS; k++) wa[k] = addr + ADDR_W'(k);

  cplx_t             bank_rd [BANKS];
  logic [BSEL_W-1:0] rot_q;

  for (genvar bk = 0; bk < BANKS; bk++) begin : g_bank
    // Item k that lands in this bank: k = (bk - addr) mod BANKS.
    logic [BSEL_W-1:0] k;
    logic [ROW_W-1:0]  row;
    assign k   = BSEL_W'(bk) - addr[BSEL_W-1:0];
    assign row = wa[k][ADDR_W-1:BSEL_W];

    always_ff @(posedge clk) begin
      if (req.en) begin
        if (req.we && req.wmask[k]) bank_q[bk][row] <= req.wdata[k];
        bank_rd[bk] <= bank_q[bk][row];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      rot_q <= '0;
    else if (req.en) rot_q <= addr[BSEL_W-1:0];
  end

  // Undo the bank rotation: item k came from bank (addr + k) mod BANKS.
  always_comb
    for (int k = 0; k < BANKS; k++) rdata[k] = bank_rd[BSEL_W'(k) + rot_q];

endmodule
