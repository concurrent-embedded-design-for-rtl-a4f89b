// bitstream_writer: the W actor, convergence of the three channel streams.
//
// The three Huffman actors each produce a variable-length code stream for
// one colour channel. A 4:4:4 scan interleaves them block by block: the Y
// block of an MCU, then its Cb block, then its Cr block, then the next MCU.
// Each image starts with the marker segments of a baseline JPEG file
// (jpeg_pkg::JPEG_HEADER: SOI, the quantization tables, the frame header
// with the image size, the Huffman tables and the scan header); they are
// written when the first Y token of the image is waiting, with the height
// and width taken from image_height and image_width at that moment.
// This actor then reads code tokens from the Y input until a token marked last,
// then from Cb, then from Cr, and so on, and packs the code bits MSB first
// into bytes. Every 0xFF byte of entropy-coded data is followed by a
// stuffed 0x00 byte, as JPEG requires. After blocks_per_image MCUs the last
// partial byte is padded with 1 bits, the EOI marker (0xFF 0xD9) is
// appended, and m_last marks its final byte.
//
// Interface: three valid/ready token inputs (jpeg_pkg::vlc_tok_t), one
// valid/ready byte output with m_last, and blocks_per_image, image_width and
// image_height, which must be stable while an image is in flight.
// Timing: a token is taken in one cycle when fewer than 8 bits are waiting;
// each byte then takes one cycle on the output, a stuffed 0x00 one more.
// Only the channel whose turn it is sees ready; the others block, which is
// how the write stage manages the convergence of the three streams.
//
// The block-wise merge of the three channel streams in one write stage
// follows the source design, as does a file made of the tables and the
// compressed bitstream. Byte stuffing, padding, markers and their layout are
// those of the JPEG standard; the token format, the image-length input and
// writing the header ahead of every image are this design's choices.
module bitstream_writer
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] blocks_per_image,
  input  logic [15:0] image_width,
  input  logic [15:0] image_height,
  input  vlc_tok_t    s_tok   [3],
  input  logic  [2:0] s_valid,
  output logic  [2:0] s_ready,
  output logic  [7:0] m_data,
  output logic        m_valid,
  output logic        m_last,
  input  logic        m_ready
);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_RUN, S_FLUSH, S_EOI_FF, S_EOI_D9} state_e;

  state_e      state;
  chan_e       ch;
  logic [39:0] acc;         // bit buffer, the low nbits bits are valid
  logic [5:0]  nbits;
  logic        stuff;       // a 0x00 must follow the 0xFF just written
  logic [15:0] mcu_cnt;
  logic [9:0]  hidx;        // header byte index
  logic [7:0]  hdr_byte;

  logic [7:0]  full_byte, pad_byte;
  logic        out_full, out_pad, take_tok;
  vlc_tok_t    tok;

  always_comb begin
    hdr_byte = JPEG_HEADER[hidx];
    unique case (int'(hidx))
      HDR_POS_HEIGHT:     hdr_byte = image_height[15:8];
      HDR_POS_HEIGHT + 1: hdr_byte = image_height[7:0];
      HDR_POS_WIDTH:      hdr_byte = image_width[15:8];
      HDR_POS_WIDTH + 1:  hdr_byte = image_width[7:0];
      default: ;
    endcase
  end

  assign tok       = s_tok[ch];
  assign full_byte = 8'(acc >> (nbits - 6'd8));
  assign pad_byte  = 8'((acc << (6'd8 - nbits)) | ((40'd1 << (6'd8 - nbits)) - 40'd1));
  assign out_full  = !stuff && nbits >= 6'd8;
  assign out_pad   = !stuff && state == S_FLUSH && nbits != 6'd0 && nbits < 6'd8;

  always_comb begin
    m_valid = 1'b0;
    m_last  = 1'b0;
    m_data  = 8'h00;
    if (state == S_HDR) begin
      m_valid = 1'b1;
      m_data  = hdr_byte;
    end else if (stuff) begin
      m_valid = 1'b1;
    end else if (out_full) begin
      m_valid = 1'b1;
      m_data  = full_byte;
    end else if (out_pad) begin
      m_valid = 1'b1;
      m_data  = pad_byte;
    end else if (state == S_EOI_FF) begin
      m_valid = 1'b1;
      m_data  = 8'hff;
    end else if (state == S_EOI_D9) begin
      m_valid = 1'b1;
      m_data  = 8'hd9;
      m_last  = 1'b1;
    end
  end

  always_comb begin
    s_ready = '0;
    if (state == S_RUN && !stuff && nbits < 6'd8) s_ready[ch] = 1'b1;
  end
  assign take_tok = s_valid[ch] && s_ready[ch];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      hidx    <= '0;
      ch      <= CH_Y;
      acc     <= '0;
      nbits   <= '0;
      stuff   <= 1'b0;
      mcu_cnt <= '0;
    end else begin
      if (state == S_IDLE && s_valid[CH_Y]) state <= S_HDR;
      if (state == S_HDR && m_ready) begin
        hidx <= hidx + 1'b1;
        if (int'(hidx) == HDR_LEN - 1) begin
          hidx  <= '0;
          state <= S_RUN;
        end
      end
      if (take_tok) begin
        acc   <= (acc << tok.len) | 40'(tok.bits);
        nbits <= nbits + 6'(tok.len);
        if (tok.last) begin
          unique case (ch)
            CH_Y:    ch <= CH_CB;
            CH_CB:   ch <= CH_CR;
            default: begin
              ch <= CH_Y;
              if (mcu_cnt + 16'd1 >= blocks_per_image) begin
                mcu_cnt <= '0;
                state   <= S_FLUSH;
              end else begin
                mcu_cnt <= mcu_cnt + 16'd1;
              end
            end
          endcase
        end
      end
      if (m_valid && m_ready && state != S_HDR) begin
        if (stuff) begin
          stuff <= 1'b0;
        end else if (out_full) begin
          nbits <= nbits - 6'd8;
          stuff <= (full_byte == 8'hff);
        end else if (out_pad) begin
          nbits <= '0;
          stuff <= (pad_byte == 8'hff);
        end else if (state == S_EOI_FF) begin
          state <= S_EOI_D9;
        end else if (state == S_EOI_D9) begin
          state <= S_IDLE;
        end
      end
      if (state == S_FLUSH && !stuff && nbits == 6'd0) state <= S_EOI_FF;
    end
  end

  // Bits never pile up beyond what one token can add to a partial byte.
  always_ff @(posedge clk) begin
    if (rst_n) assert (nbits <= 6'd33) else $error("bitstream_writer: bit buffer overrun");
  end

endmodule
