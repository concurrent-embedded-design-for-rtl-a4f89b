// quantizer: the Q actor, quantization and zig-zag reordering of a block.
//
// A firing takes the 64 DCT coefficients of one block in natural
// (row-major) order, stores them, and emits the 64 quantized coefficients
// in zig-zag scan order, each divided by its table entry and rounded to the
// nearest integer, halves away from zero:
//   Sq = sign(S) * floor((|S| + Q/2) / Q)
// The luminance or chrominance example table of the JPEG standard is chosen
// by the CHROMA parameter.
//
// Interface: valid/ready coefficient input, valid/ready output.
// Timing per block: 64 cycles to load, then one coefficient per cycle while
// the output is ready; the divide is combinational. A new block is loaded
// only after the previous one has left.
//
// Quantization by a table from the JPEG standard follows the source design,
// which makes it an actor of its own in its final topology. Doing the
// zig-zag reorder in this actor and the rounding rule are this design's
// choices.
module quantizer
  import jpeg_pkg::*;
#(
  parameter bit CHROMA = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  coef_t s_data,
  input  logic  s_valid,
  output logic  s_ready,
  output coef_t m_data,
  output logic  m_valid,
  input  logic  m_ready
);

  localparam logic [63:0][7:0] QT = CHROMA ? QTAB_CHROMA : QTAB_LUMA;

  coef_t      buffer [BLOCK_N];
  logic       out_phase;
  logic [5:0] idx;

  always_comb begin
    logic [5:0]  pos;
    logic [15:0] mag, q, quo;
    coef_t       c;
    pos = ZIGZAG[idx];
    c   = buffer[pos];
    q   = 16'(QT[pos]);
    mag = c[15] ? 16'(-c) : 16'(c);
    quo = (mag + (q >> 1)) / q;
    m_data = c[15] ? -coef_t'(quo) : coef_t'(quo);
  end

  assign s_ready = !out_phase;
  assign m_valid = out_phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_phase <= 1'b0;
      idx       <= '0;
    end else if (!out_phase) begin
      if (s_valid) begin
        idx <= idx + 1'b1;
        if (idx == 6'd63) out_phase <= 1'b1;
      end
    end else if (m_ready) begin
      idx <= idx + 1'b1;
      if (idx == 6'd63) out_phase <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!out_phase && s_valid) buffer[idx] <= s_data;
  end

endmodule
