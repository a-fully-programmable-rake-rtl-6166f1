// integer_memory: 16-bit data memory of the RISC controller.
//
// A single-port memory of DEPTH 16-bit integers for the controller's scalar
// data (loop bounds, finger delays, configuration values). The document shows
// an integer memory beside the sample memories; its size and its direct
// connection to the controller's load/store port are this design's choices.
// Interface: en with we writes wdata at addr; en without we reads.
// Timing: read data registered, valid the cycle after the request.
module integer_memory #(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [15:0]              wdata,
  output logic [15:0]              rdata
);

  logic [15:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      rdata <= mem[addr];
    end
  end

endmodule
