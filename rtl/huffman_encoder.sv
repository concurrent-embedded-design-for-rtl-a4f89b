// huffman_encoder: the H actor, run-length and Huffman coding of one channel.
//
// Input is a channel's stream of quantized coefficients, 64 per block in
// zig-zag order. Output is a stream of variable-length code tokens
// (jpeg_pkg::vlc_tok_t), each holding one Huffman code followed by its
// additional magnitude bits, at most 26 bits. Baseline JPEG coding:
//   * coefficient 0 (DC): the difference from the previous block's DC of the
//     same channel is coded as its size category with the DC table,
//     followed by size magnitude bits;
//   * coefficients 1..63 (AC): zeros are counted; a nonzero value is coded
//     as the symbol (run << 4 | size) with the AC table followed by its
//     magnitude bits. A run longer than 15 first emits one ZRL symbol (0xF0)
//     per 16 zeros. Zeros that reach the end of the block are coded as one
//     EOB symbol (0x00).
// The last token of each block has last = 1. The DC predictor restarts at
// zero after blocks_per_image blocks, i.e. at every image boundary.
//
// Interface: valid/ready coefficient input, valid/ready token output, and
// blocks_per_image, which must be stable while an image is in flight.
// Timing: one coefficient per cycle; an extra cycle, with the input held,
// for each ZRL. The output register holds one token; the actor blocks on a
// full output like a blocking write.
//
// The coding follows the JPEG baseline process with the standard's example
// tables, as the source design did; each channel has its own actor as in
// the source design's final topology. The token format and the image-length
// input are this design's choices.
module huffman_encoder
  import jpeg_pkg::*;
#(
  parameter bit CHROMA = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] blocks_per_image,
  input  coef_t       s_data,
  input  logic        s_valid,
  output logic        s_ready,
  output vlc_tok_t    m_tok,
  output logic        m_valid,
  input  logic        m_ready
);

  localparam logic [255:0][20:0] DC_TAB = CHROMA ? DC_CHROMA_TAB : DC_LUMA_TAB;
  localparam logic [255:0][20:0] AC_TAB = CHROMA ? AC_CHROMA_TAB : AC_LUMA_TAB;

  logic [5:0]  idx;       // position in the zig-zag scan
  logic [5:0]  run;       // zeros seen since the last nonzero AC value
  coef_t       prev_dc;
  logic [15:0] blk_cnt;

  // Decision for the coefficient at the head of the input.
  logic     slot_free, consume, emit;
  vlc_tok_t tok;

  always_comb begin
    coef_t       val;
    logic [3:0]  size;
    logic [15:0] extra;
    hcode_t      hc;
    logic [7:0]  sym;

    val     = (idx == 6'd0) ? coef_t'(s_data - prev_dc) : s_data;
    size    = mag_size(val);
    extra   = mag_bits(val, size);
    consume = 1'b0;
    emit    = 1'b0;
    tok     = '0;
    sym     = '0;
    hc      = '0;

    if (idx == 6'd0) begin
      hc      = DC_TAB[{4'd0, size}];
      emit    = 1'b1;
      consume = 1'b1;
    end else if (s_data == '0) begin
      consume = 1'b1;
      if (idx == 6'd63) begin
        sym  = 8'h00;       // EOB
        hc   = AC_TAB[sym];
        emit = 1'b1;
        size = 4'd0;
      end
    end else if (run > 6'd15) begin
      sym  = 8'hf0;         // ZRL, the coefficient waits
      hc   = AC_TAB[sym];
      emit = 1'b1;
      size = 4'd0;
    end else begin
      sym     = {run[3:0], size};
      hc      = AC_TAB[sym];
      emit    = 1'b1;
      consume = 1'b1;
    end

    tok.len  = hc.len + 5'(size);
    tok.bits = (26'(hc.code) << size) | 26'(extra & 16'((32'd1 << size) - 1));
    tok.last = consume && (idx == 6'd63);
  end

  assign slot_free = !m_valid || m_ready;
  assign s_ready   = slot_free && consume;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx     <= '0;
      run     <= '0;
      prev_dc <= '0;
      blk_cnt <= '0;
      m_valid <= 1'b0;
      m_tok   <= '0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (s_valid && slot_free) begin
        if (emit) begin
          m_tok   <= tok;
          m_valid <= 1'b1;
        end
        if (consume) begin
          idx <= idx + 1'b1;
          if (idx == 6'd0) begin
            prev_dc <= s_data;
            run     <= '0;
          end else if (s_data == '0) begin
            run <= run + 1'b1;
          end else begin
            run <= '0;
          end
          if (idx == 6'd63) begin
            if (blk_cnt + 16'd1 >= blocks_per_image) begin
              blk_cnt <= '0;
              prev_dc <= '0;
            end else begin
              blk_cnt <= blk_cnt + 16'd1;
            end
          end
        end else begin
          run <= run - 6'd16;   // a ZRL was emitted
        end
      end
    end
  end

endmodule
