// fsl_fifo: point-to-point, one-way FIFO channel between two actors.
//
// This is the channel of the dataflow process network: bounded storage, a
// write that blocks while the FIFO is full and a read that blocks while it
// is empty. Reads are destructive: each token is delivered exactly once, in
// order. Blocking is expressed as a valid/ready handshake on both sides: a
// token moves on a clock edge where valid and ready are both high.
//
// Storage is a circular buffer of DEPTH words with read and write pointers
// one bit wider than the address, so full and empty are told apart without
// a separate counter. A written token can be read on the cycle after the
// write (one cycle of latency). s_ready and m_valid depend only on the
// pointers, so neither side sees a combinational path from the other. A full
// FIFO accepts no write in the cycle it is read; the freed slot is offered
// on the next cycle. DEPTH must be a power of two.
//
// The channel semantics (bounded, blocking, destructive reads) follow the
// source design. The depth of 16 words and the 32-bit width are this
// design's defaults; the actors instantiate it at the width of their tokens.
module fsl_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // write side
  input  logic [WIDTH-1:0] s_data,
  input  logic             s_valid,
  output logic             s_ready,
  // read side
  output logic [WIDTH-1:0] m_data,
  output logic             m_valid,
  input  logic             m_ready,
  // occupancy, for monitoring
  output logic [$clog2(DEPTH):0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign s_ready = (wptr - rptr) != (AW+1)'(DEPTH);
  assign m_valid = wptr != rptr;
  assign m_data  = mem[rptr[AW-1:0]];
  assign level   = wptr - rptr;

  assign do_wr = s_valid && s_ready;
  assign do_rd = m_valid && m_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= s_data;
  end

  // A power-of-two depth keeps the pointer arithmetic exact.
  initial assert ((DEPTH & (DEPTH - 1)) == 0 && DEPTH >= 2)
    else $error("fsl_fifo: DEPTH must be a power of two");

endmodule
