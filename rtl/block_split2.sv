// block_split2: hands whole blocks of a stream alternately to two outputs.
//
// Tokens arrive on one valid/ready input. The first BLOCK tokens go to
// output 0, the next BLOCK to output 1, and so on, so that two parallel
// actors each receive every other block. The split is combinational
// (no storage): the input sees the ready of the selected output.
// Used to share the colour conversion between two actors, each converting
// every other MCU; the even/odd assignment is this design's choice.
module block_split2 #(
  parameter int unsigned WIDTH = 24,
  parameter int unsigned BLOCK = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] s_data,
  input  logic             s_valid,
  output logic             s_ready,
  output logic [WIDTH-1:0] m_data  [2],
  output logic [1:0]       m_valid,
  input  logic [1:0]       m_ready
);

  logic                     sel;
  logic [$clog2(BLOCK)-1:0] cnt;

  assign m_data[0] = s_data;
  assign m_data[1] = s_data;
  assign m_valid   = {s_valid && sel, s_valid && !sel};
  assign s_ready   = m_ready[sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel <= 1'b0;
      cnt <= '0;
    end else if (s_valid && s_ready) begin
      if (cnt == ($clog2(BLOCK))'(BLOCK - 1)) begin
        cnt <= '0;
        sel <= !sel;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
