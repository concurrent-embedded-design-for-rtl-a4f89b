// cycle_timer: free-running cycle counter with a start/stop capture.
//
// The counter advances by one on every clock, so it measures time in clock
// cycles, and wraps at 2^WIDTH. A start pulse records the current count;
// a later stop pulse stores the cycles elapsed since that start in
// elapsed and raises elapsed_valid until the next start. The encoder uses
// it to measure the cycles from the first pixel of an image to the last
// byte of its bitstream, the figure by which the topologies are compared.
//
// Interface: start and stop are single-cycle pulses; a stop without a
// preceding start is ignored. Timing: elapsed is updated on the clock edge
// at which stop is high and counts that edge.
//
// A free-running cycle counter as the timing instrument follows the source
// design; the capture registers are this design's choice, in place of
// software reading the counter over a peripheral bus.
module cycle_timer #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             stop,
  output logic [WIDTH-1:0] count,
  output logic [WIDTH-1:0] elapsed,
  output logic             elapsed_valid
);

  logic [WIDTH-1:0] t0;
  logic             running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count         <= '0;
      t0            <= '0;
      running       <= 1'b0;
      elapsed       <= '0;
      elapsed_valid <= 1'b0;
    end else begin
      count <= count + 1'b1;
      if (start) begin
        t0            <= count;
        running       <= 1'b1;
        elapsed_valid <= 1'b0;
      end else if (stop && running) begin
        elapsed       <= count - t0 + 1'b1;
        elapsed_valid <= 1'b1;
        running       <= 1'b0;
      end
    end
  end

endmodule
