// color_convert: colour-conversion actor, RGB pixels in, Y, Cb and Cr out.
//
// Each accepted pixel is converted with the JFIF equations
//   Y  =  0.299 R + 0.587 G + 0.114 B
//   Cb = -0.16874 R - 0.33126 G + 0.5 B + 128
//   Cr =  0.5 R - 0.41869 G - 0.08131 B + 128
// in 16-bit fixed point (coefficients scaled by 2^16 and rounded; Y rounds
// half up, Cb and Cr add one half less one, so that no result exceeds 255).
// The three components leave on three separate output channels, one per
// colour pipeline, so one actor supplies all three pipelines as in the
// source design. Blocks are not reordered: pixels are expected in the order
// the pipelines want their samples, 64 per 8x8 block.
//
// Interface: one valid/ready input, three valid/ready outputs. A pixel is
// taken when every output register is empty or being emptied in that cycle,
// so the actor blocks on a full downstream channel like a blocking write.
// Timing: one pixel per cycle, results one cycle after the pixel is taken.
//
// The colour space and the three-way fan-out follow the source design; the
// fixed-point constants are this design's choice.
module color_convert
  import jpeg_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  rgb_t    s_pix,
  input  logic    s_valid,
  output logic    s_ready,
  output sample_t m_y,
  output logic    m_y_valid,
  input  logic    m_y_ready,
  output sample_t m_cb,
  output logic    m_cb_valid,
  input  logic    m_cb_ready,
  output sample_t m_cr,
  output logic    m_cr_valid,
  input  logic    m_cr_ready
);

  // Fixed-point coefficients, round(c * 2^16).
  localparam int unsigned K_YR  = 19595, K_YG  = 38470, K_YB = 7471;
  localparam int unsigned K_CBR = 11059, K_CBG = 21709;
  localparam int unsigned K_CRG = 27439, K_CRB = 5329;
  localparam int unsigned HALF  = 32768;

  logic [31:0] y_acc, cb_acc, cr_acc;
  logic        take;

  always_comb begin
    logic [31:0] r, g, b;
    r = 32'(s_pix.r);
    g = 32'(s_pix.g);
    b = 32'(s_pix.b);
    y_acc  = K_YR * r + K_YG * g + K_YB * b + HALF;
    // Cb and Cr: the 128 offset is folded into the constant; the sum is never
    // negative, so unsigned arithmetic is exact.
    cb_acc = (b << 15) + (32'd128 << 16) + (HALF - 1) - K_CBR * r - K_CBG * g;
    cr_acc = (r << 15) + (32'd128 << 16) + (HALF - 1) - K_CRG * g - K_CRB * b;
  end

  assign s_ready = (!m_y_valid  || m_y_ready) &&
                   (!m_cb_valid || m_cb_ready) &&
                   (!m_cr_valid || m_cr_ready);
  assign take = s_valid && s_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_y_valid  <= 1'b0;
      m_cb_valid <= 1'b0;
      m_cr_valid <= 1'b0;
      m_y  <= '0;
      m_cb <= '0;
      m_cr <= '0;
    end else if (take) begin
      m_y  <= y_acc[23:16];
      m_cb <= cb_acc[23:16];
      m_cr <= cr_acc[23:16];
      m_y_valid  <= 1'b1;
      m_cb_valid <= 1'b1;
      m_cr_valid <= 1'b1;
    end else begin
      if (m_y_ready)  m_y_valid  <= 1'b0;
      if (m_cb_ready) m_cb_valid <= 1'b0;
      if (m_cr_ready) m_cr_valid <= 1'b0;
    end
  end

endmodule
