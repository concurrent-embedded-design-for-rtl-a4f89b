// jpeg_encoder_top: dataflow JPEG encoder, twelve actors joined by FIFOs.
//
// The encoder is a static pipeline of actors that talk only through
// bounded, blocking point-to-point FIFOs (fsl_fifo):
//
//                 pixels
//                   |  block_split2: even MCUs to C_A, odd MCUs to C_B
//              +----+----+
//             C_A       C_B         color_convert, RGB -> Y, Cb, Cr
//              |\ \     /|/|        each writes all three channels
//           Y  Cb  Cr  (six FIFOs, merged per channel by block_merge2)
//           |   |   |
//          L/D L/D L/D              level_shift_dct
//           |   |   |
//           Q   Q   Q               quantizer (luma table for Y)
//           |   |   |
//           H   H   H               huffman_encoder
//            \  |  /
//               W                   bitstream_writer
//               |
//             bytes
//
// This is the twelve-actor topology of the source design: two colour
// converters sharing the MCUs, and for each of the three channels separate
// level-shift/DCT, quantization and Huffman actors, converging in one write
// actor. In the source design every actor is a program on its own soft
// processor; here every actor is a hardware block with the same inputs,
// outputs and blocking behaviour.
//
// Input: 4:4:4 image data as RGB pixels, MCU by MCU, 64 pixels of each 8x8
// MCU in row-major order, MCUs in scan order; edge MCUs are complete (the
// producer pads them). image_width and image_height give the image size in
// pixels, at most 65535 MCUs in all, and must be stable while an image is in
// flight. Output: a complete baseline JPEG file per image (marker segments
// with the tables, entropy-coded scan with byte stuffing and padding, EOI),
// m_last on its final byte. Both sides are valid/ready.
// The cycle timer measures from the first pixel taken while no image is in
// flight to the last byte of that image (image_cycles, image_cycles_valid);
// cycle_count is the free-running counter itself.
module jpeg_encoder_top
  import jpeg_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] image_width,
  input  logic [15:0] image_height,
  input  rgb_t        s_pix,
  input  logic        s_valid,
  output logic        s_ready,
  output logic [7:0]  m_data,
  output logic        m_valid,
  output logic        m_last,
  input  logic        m_ready,
  output logic [31:0] cycle_count,
  output logic [31:0] image_cycles,
  output logic        image_cycles_valid
);

  localparam int unsigned LW = $clog2(FIFO_DEPTH) + 1;

  // MCUs in the image: ceil(width / 8) * ceil(height / 8)
  logic [15:0] blocks_per_image, mcu_cols, mcu_rows;
  assign mcu_cols         = {3'b000, image_width[15:3]}  + 16'(|image_width[2:0]);
  assign mcu_rows         = {3'b000, image_height[15:3]} + 16'(|image_height[2:0]);
  assign blocks_per_image = mcu_cols * mcu_rows;

  // ------------------------------------------------ colour conversion x 2
  rgb_t       cc_pix   [2];
  logic [1:0] cc_valid, cc_ready;

  block_split2 #(.WIDTH($bits(rgb_t)), .BLOCK(BLOCK_N)) u_split (
    .clk, .rst_n,
    .s_data (s_pix), .s_valid, .s_ready,
    .m_data (cc_pix), .m_valid (cc_valid), .m_ready (cc_ready)
  );

  // cc_out[i][c]: sample of channel c from converter i, before its FIFO
  sample_t    cc_out   [2][3];
  logic [2:0] cc_ovalid [2], cc_oready [2];
  // after the FIFOs, grouped per channel for the merge: ch_in[c][i]
  sample_t    ch_in    [3][2];
  logic [1:0] ch_ivalid [3], ch_iready [3];

  for (genvar i = 0; i < 2; i++) begin : g_cc
    color_convert u_cc (
      .clk, .rst_n,
      .s_pix      (cc_pix[i]), .s_valid (cc_valid[i]), .s_ready (cc_ready[i]),
      .m_y        (cc_out[i][0]), .m_y_valid  (cc_ovalid[i][0]), .m_y_ready  (cc_oready[i][0]),
      .m_cb       (cc_out[i][1]), .m_cb_valid (cc_ovalid[i][1]), .m_cb_ready (cc_oready[i][1]),
      .m_cr       (cc_out[i][2]), .m_cr_valid (cc_ovalid[i][2]), .m_cr_ready (cc_oready[i][2])
    );
    for (genvar c = 0; c < 3; c++) begin : g_link
      logic [LW-1:0] level;
      fsl_fifo #(.WIDTH($bits(sample_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
        .clk, .rst_n,
        .s_data (cc_out[i][c]), .s_valid (cc_ovalid[i][c]), .s_ready (cc_oready[i][c]),
        .m_data (ch_in[c][i]),  .m_valid (ch_ivalid[c][i]), .m_ready (ch_iready[c][i]),
        .level
      );
    end
  end

  // --------------------------------------------- three colour pipelines
  vlc_tok_t   w_tok [3];
  logic [2:0] w_valid, w_ready;

  for (genvar c = 0; c < 3; c++) begin : g_ch
    localparam bit IS_CHROMA = (c != 0);

    sample_t  ld_in;
    logic     ld_in_valid, ld_in_ready;
    coef_t    ld_out, q_in, q_out, h_in;
    logic     ld_out_valid, ld_out_ready, q_in_valid, q_in_ready;
    logic     q_out_valid, q_out_ready, h_in_valid, h_in_ready;
    vlc_tok_t h_out;
    logic     h_out_valid, h_out_ready;
    logic [LW-1:0] level_ld_q, level_q_h, level_h_w;

    block_merge2 #(.WIDTH($bits(sample_t)), .BLOCK(BLOCK_N)) u_merge (
      .clk, .rst_n,
      .s_data (ch_in[c]), .s_valid (ch_ivalid[c]), .s_ready (ch_iready[c]),
      .m_data (ld_in), .m_valid (ld_in_valid), .m_ready (ld_in_ready)
    );

    level_shift_dct u_ld (
      .clk, .rst_n,
      .s_data (ld_in),  .s_valid (ld_in_valid),  .s_ready (ld_in_ready),
      .m_data (ld_out), .m_valid (ld_out_valid), .m_ready (ld_out_ready)
    );

    fsl_fifo #(.WIDTH($bits(coef_t)), .DEPTH(FIFO_DEPTH)) u_fifo_ld_q (
      .clk, .rst_n,
      .s_data (ld_out), .s_valid (ld_out_valid), .s_ready (ld_out_ready),
      .m_data (q_in),   .m_valid (q_in_valid),   .m_ready (q_in_ready),
      .level  (level_ld_q)
    );

    quantizer #(.CHROMA(IS_CHROMA)) u_q (
      .clk, .rst_n,
      .s_data (q_in),  .s_valid (q_in_valid),  .s_ready (q_in_ready),
      .m_data (q_out), .m_valid (q_out_valid), .m_ready (q_out_ready)
    );

    fsl_fifo #(.WIDTH($bits(coef_t)), .DEPTH(FIFO_DEPTH)) u_fifo_q_h (
      .clk, .rst_n,
      .s_data (q_out), .s_valid (q_out_valid), .s_ready (q_out_ready),
      .m_data (h_in),  .m_valid (h_in_valid),  .m_ready (h_in_ready),
      .level  (level_q_h)
    );

    huffman_encoder #(.CHROMA(IS_CHROMA)) u_h (
      .clk, .rst_n, .blocks_per_image,
      .s_data (h_in),  .s_valid (h_in_valid),  .s_ready (h_in_ready),
      .m_tok  (h_out), .m_valid (h_out_valid), .m_ready (h_out_ready)
    );

    fsl_fifo #(.WIDTH($bits(vlc_tok_t)), .DEPTH(FIFO_DEPTH)) u_fifo_h_w (
      .clk, .rst_n,
      .s_data (h_out),    .s_valid (h_out_valid), .s_ready (h_out_ready),
      .m_data (w_tok[c]), .m_valid (w_valid[c]),  .m_ready (w_ready[c]),
      .level  (level_h_w)
    );
  end

  // ------------------------------------------------------- write stage
  bitstream_writer u_w (
    .clk, .rst_n, .blocks_per_image, .image_width, .image_height,
    .s_tok (w_tok), .s_valid (w_valid), .s_ready (w_ready),
    .m_data, .m_valid, .m_last, .m_ready
  );

  // ------------------------------------------------------------ timing
  logic busy, t_start, t_stop;

  assign t_start = s_valid && s_ready && !busy;
  assign t_stop  = m_valid && m_ready && m_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       busy <= 1'b0;
    else if (t_start) busy <= 1'b1;
    else if (t_stop)  busy <= 1'b0;
  end

  cycle_timer #(.WIDTH(32)) u_timer (
    .clk, .rst_n,
    .start (t_start), .stop (t_stop),
    .count (cycle_count), .elapsed (image_cycles), .elapsed_valid (image_cycles_valid)
  );

endmodule
