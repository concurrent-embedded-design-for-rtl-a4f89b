// block_merge2: reads whole blocks alternately from two input channels.
//
// The counterpart of block_split2: BLOCK tokens are taken from input 0,
// then BLOCK from input 1, and so on, restoring the original block order
// when two parallel actors each produced every other block. The input whose
// turn it is not is held (blocking read). Combinational, no storage.
// Used in front of each colour pipeline, which receives its samples from
// both colour-conversion actors.
module block_merge2 #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned BLOCK = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] s_data  [2],
  input  logic [1:0]       s_valid,
  output logic [1:0]       s_ready,
  output logic [WIDTH-1:0] m_data,
  output logic             m_valid,
  input  logic             m_ready
);

  logic                     sel;
  logic [$clog2(BLOCK)-1:0] cnt;

  assign m_data  = s_data[sel];
  assign m_valid = s_valid[sel];
  assign s_ready = {m_ready && sel, m_ready && !sel};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel <= 1'b0;
      cnt <= '0;
    end else if (m_valid && m_ready) begin
      if (cnt == ($clog2(BLOCK))'(BLOCK - 1)) begin
        cnt <= '0;
        sel <= !sel;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
