// scrambling_code_gen: de-scrambling code generator for the vector ALU.
//
// The document calls for a de-scrambling (Gold) code generator that drives the
// short complex multipliers. This design implements the WCDMA downlink complex
// scrambling code (3GPP TS 25.213): two 18-stage LFSRs, x with feedback
// x(i+18) = x(i+7) + x(i) and y with y(i+18) = y(i+10) + y(i+7) + y(i+5) + y(i),
// I chip = x(i) + y(i) and Q chip from the tapped, shifted copies of both
// (x taps 4, 6, 15; y taps 5, 6, 8..15). A chip bit 0 means +1 and 1 means -1.
// The output code is I + jQ, or its conjugate when conj is set (conj is what
// de-scrambling multiplies with). Different Gold sequences are chosen by the
// x seed, y always starts at all ones.
//
// Interface: load (re)starts the sequence from seed_x; step advances one chip.
// Timing: code shows chip i combinationally from the registers; step moves to
// chip i+1 at the next clock edge.
module scrambling_code_gen
  import rake_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [17:0] seed_x,
  input  logic        step,
  input  logic        conj,
  output scode_t      code
);

  logic [17:0] x, y;  // bit k holds x(i+k), y(i+k)
  logic        ci, cq;

  assign ci = x[0] ^ y[0];
  assign cq = (x[4] ^ x[6] ^ x[15]) ^
              (y[5] ^ y[6] ^ y[8] ^ y[9] ^ y[10] ^ y[11] ^ y[12] ^ y[13] ^ y[14] ^ y[15]);

  always_comb begin
    code.a = ci ? -2'sd1 : 2'sd1;
    code.b = (cq ^ conj) ? -2'sd1 : 2'sd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= 18'd1;
      y <= '1;
    end else if (load) begin
      x <= seed_x;
      y <= '1;
    end else if (step) begin
      x <= {x[0] ^ x[7], x[17:1]};
      y <= {y[0] ^ y[5] ^ y[7] ^ y[10], y[17:1]};
    end
  end

endmodule
