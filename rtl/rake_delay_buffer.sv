// rake_delay_buffer: circular delay-equalisation buffer shared by all fingers.
//
// One single-port memory of DEPTH complex samples serves all NF Rake fingers.
// For every input sample a memory access controller runs NF+1 time-interleaved
// accesses: slot 0 writes the sample at the write AGU's address, slots 1..NF
// read the sample delayed by d_k for finger k from that finger's AGU. All AGUs
// use modulo-DEPTH addressing and step once per input sample, so finger k
// always reads address (write pointer - d_k) mod DEPTH. When the last read
// returns, the NF aligned samples are presented together. Delays can be as
// large as DEPTH-1 samples, i.e. many symbol times. The organisation (one
// memory, write AGU plus four finger AGUs, access controller, NF+1 accesses per
// sample, DEPTH = 184 for 12 us delay spread at OSR 4 and 3.84 Mcps) follows
// the document; the configuration registers and the output handshake are this
// design's.
//
// Configuration (cfg bus, unit U_DLY): regs 1..NF finger delays; writing reg 0
// restarts the write pointer and reloads all finger AGUs.
// Interface: in_valid/in_sample from the front end. Samples must be at least
// NF+1 cycles apart (NF+1 accesses per sample); one that arrives earlier is dropped and sets overrun.
// out_valid stays high from the cycle the aligned samples are ready until
// out_ack; a new vector that arrives before out_ack sets out_lost.
// Timing: out_valid rises NF+3 cycles after in_valid; fingers change only then.
module rake_delay_buffer
  import rake_pkg::*;
#(
  parameter int unsigned DEPTH = 184,
  parameter int unsigned NF    = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cfg_t  cfg,
  input  logic  in_valid,
  input  cplx_t in_sample,
  output cplx_t fingers [NF],
  output logic  out_valid,
  input  logic  out_ack,
  output logic  overrun,
  output logic  out_lost
);

  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned SLOT_W = $clog2(NF + 2);

  cplx_t             mem [DEPTH];
  cplx_t             in_q, rd_q;
  cplx_t             col [NF-1];  // finger samples collected so far
  logic [ADDR_W-1:0] delay [NF];
  logic [ADDR_W-1:0] waddr;
  logic [ADDR_W-1:0] faddr [NF];
  logic [SLOT_W-1:0] slot;        // 0 idle, 1 write, 2..NF+1 finger reads
  logic [SLOT_W-1:0] rd_slot;     // slot whose read data is in rd_q
  logic              restart, active, sample_done;

  assign restart     = cfg.we && cfg.addr[7:4] == U_DLY && cfg.addr[3:0] == 4'd0;
  assign active      = slot != '0;
  assign sample_done = slot == SLOT_W'(NF + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NF; k++) delay[k] <= '0;
    end else if (cfg.we && cfg.addr[7:4] == U_DLY) begin
      for (int k = 0; k < NF; k++)
        if (int'(cfg.addr[3:0]) == k + 1) delay[k] <= cfg.data[ADDR_W-1:0];
    end
  end

  // Write AGU and finger AGUs: modulo DEPTH, stride 1, step once per sample.
  agu #(.ADDR_W(ADDR_W)) u_wagu (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(restart), .cfg_base('0), .cfg_stride(ADDR_W'(1)),
    .cfg_len((ADDR_W+1)'(DEPTH)), .cfg_fft(1'b0), .cfg_fft_log('0),
    .restart(1'b0), .init_off('0), .step(sample_done), .addr(waddr)
  );

  for (genvar k = 0; k < NF; k++) begin : g_fagu
    logic [ADDR_W-1:0] init;
    assign init = (delay[k] == '0) ? '0 : ADDR_W'(DEPTH) - delay[k];
    agu #(.ADDR_W(ADDR_W)) u_fagu (
      .clk(clk), .rst_n(rst_n),
      .cfg_we(restart), .cfg_base('0), .cfg_stride(ADDR_W'(1)),
      .cfg_len((ADDR_W+1)'(DEPTH)), .cfg_fft(1'b0), .cfg_fft_log('0),
      .restart(1'b0), .init_off(init), .step(sample_done), .addr(faddr[k])
    );
  end

  // Memory access controller: one access per cycle on the single port.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot    <= '0;
      rd_slot <= '0;
      in_q    <= '0;
      overrun <= 1'b0;
    end else begin
      rd_slot <= (slot >= SLOT_W'(2)) ? slot : '0;
      if (restart) begin
        slot    <= '0;
        overrun <= 1'b0;
      end else begin
        if (in_valid && (!active || sample_done)) begin
          in_q <= in_sample;
          slot <= SLOT_W'(1);
        end else if (active) begin
          slot <= sample_done ? '0 : slot + 1'b1;
        end
        if (in_valid && active && !sample_done) overrun <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (slot == SLOT_W'(1))       mem[waddr] <= in_q;
    else if (slot >= SLOT_W'(2))  rd_q <= mem[faddr[int'(slot) - 2]];
  end

  // Collect the finger samples and present them together.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NF; k++) fingers[k] <= '0;
      for (int k = 0; k < NF-1; k++) col[k] <= '0;
      out_valid <= 1'b0;
      out_lost  <= 1'b0;
    end else begin
      if (rd_slot >= SLOT_W'(2) && rd_slot < SLOT_W'(NF + 1)) col[int'(rd_slot) - 2] <= rd_q;
      if (rd_slot == SLOT_W'(NF + 1)) begin
        for (int k = 0; k < NF-1; k++) fingers[k] <= col[k];
        fingers[NF-1] <= rd_q;
        out_valid <= 1'b1;
        if (out_valid && !out_ack) out_lost <= 1'b1;
      end else if (out_ack) begin
        out_valid <= 1'b0;
      end
      if (restart) out_lost <= 1'b0;
    end
  end

endmodule
