// agu: address generator unit of one memory.
//
// Each physical memory has its own AGU. It keeps an offset that advances by a
// stride on every access and produces
//   linear/modulo mode: addr = base + offset, offset = (offset + stride) mod len
//   FFT mode:           addr = base + bitreverse(offset) over fft_log bits
// Modulo addressing makes a circular buffer of len words (len = 0 means the
// whole address space); FFT mode yields the bit-reversed order of a radix-2
// FFT. The document requires modulo and FFT addressing; the register set
// (base, stride, len, mode, restart offset) is this design's choice.
//
// Interface: cfg_we writes the configuration and restarts at init_off;
// restart reloads init_off without changing the configuration; step advances.
// Timing: addr is combinational from the registers; step takes effect at the
// next clock edge, so an access in the cycle of step uses the old address.
module agu #(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_base,
  input  logic [ADDR_W-1:0] cfg_stride,
  input  logic [ADDR_W:0]   cfg_len,      // modulo length, 0 = none
  input  logic              cfg_fft,      // bit-reversed addressing
  input  logic [3:0]        cfg_fft_log,
  input  logic              restart,
  input  logic [ADDR_W-1:0] init_off,
  input  logic              step,
  output logic [ADDR_W-1:0] addr
);

  logic [ADDR_W-1:0] base, stride, off;
  logic [ADDR_W:0]   len;
  logic              fft;
  logic [3:0]        fft_log;
  logic [ADDR_W-1:0] off_rev;
  logic [ADDR_W:0]   nxt;

  always_comb begin
    off_rev = '0;
    for (int b = 0; b < ADDR_W; b++)
      if (b < int'(fft_log)) off_rev[int'(fft_log) - 1 - b] = off[b];
    addr = base + (fft ? off_rev : off);
  end

  // Next offset, reduced modulo len (stride < len is required).
  always_comb begin
    nxt = {1'b0, off} + {1'b0, stride};
    if (len != '0 && nxt >= len) nxt = nxt - len;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base <= '0; stride <= ADDR_W'(1); len <= '0; fft <= 1'b0; fft_log <= '0; off <= '0;
    end else if (cfg_we) begin
      base <= cfg_base; stride <= cfg_stride; len <= cfg_len;
      fft <= cfg_fft; fft_log <= cfg_fft_log; off <= init_off;
    end else if (restart) begin
      off <= init_off;
    end else if (step) begin
      off <= nxt[ADDR_W-1:0];
    end
  end

endmodule
