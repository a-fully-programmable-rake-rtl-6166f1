// vector_controller: loop and pipeline control of one SIMD cluster.
//
// A vector instruction runs a hardware loop of `steps` element steps followed
// by `drain` cycles in which the pipeline empties and results are stored. The
// controller counts the loop, marks the first and last step and the drain
// cycles, and holds busy for the whole instruction, which the RISC controller
// uses for task synchronisation (its idle instruction waits for busy to
// fall). A stall input holds the loop while the data source has nothing new
// (for instance the Rake delay buffer between samples). The document gives the
// vector controller's duties (load/store order, hardware loop counting); the
// steps + drain timing is this design's model, chosen so that the cycle costs
// match the kernel benchmark table of the document.
//
// Interface: start (while not busy) latches steps and drain.
// Timing: steps occur from the cycle after start; with no stall busy is high
// for exactly steps + drain cycles; done pulses in the last busy cycle.
module vector_controller #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] steps,
  input  logic [3:0]       drain,
  input  logic             stall,
  output logic             busy,
  output logic             step,
  output logic             first,
  output logic             last,
  output logic [CNT_W-1:0] idx,
  output logic             draining,
  output logic [3:0]       dcnt,     // drain cycle number, 1..drain
  output logic             done
);

  typedef enum logic [1:0] { S_IDLE, S_LOOP, S_DRAIN } state_e;

  state_e           state;
  logic [CNT_W-1:0] n_steps;
  logic [3:0]       n_drain;

  assign busy     = state != S_IDLE;
  assign step     = state == S_LOOP && !stall;
  assign first    = step && idx == '0;
  assign last     = step && idx == n_steps - 1'b1;
  assign draining = state == S_DRAIN;
  assign done     = (state == S_DRAIN && dcnt == n_drain) ||
                    (last && n_drain == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      idx     <= '0;
      dcnt    <= '0;
      n_steps <= '0;
      n_drain <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          n_steps <= (steps == '0) ? CNT_W'(1) : steps;
          n_drain <= drain;
          idx     <= '0;
          dcnt    <= 4'd1;
          state   <= S_LOOP;
        end
        S_LOOP: if (step) begin
          idx <= idx + 1'b1;
          if (last) state <= (n_drain == '0) ? S_IDLE : S_DRAIN;
        end
        S_DRAIN: begin
          dcnt <= dcnt + 4'd1;
          if (dcnt == n_drain) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
