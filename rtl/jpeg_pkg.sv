// jpeg_pkg: types, constants and table builders shared by the actors of the
// dataflow JPEG encoder.
//
// The encoder is a network of actors joined by blocking FIFOs. Every token
// type that crosses a FIFO is declared here, together with the fixed tables
// of baseline JPEG that the actors use:
//   * the zig-zag scan order (computed from the diagonal walk, not listed),
//   * the example quantization tables of the JPEG standard (Annex K.1/K.2),
//   * the example Huffman tables of the JPEG standard (Annex K.3), given as
//     their BITS counts and the leading part of their HUFFVAL lists; the rest
//     of each AC HUFFVAL list is every remaining run/size symbol in ascending
//     order, so it is generated instead of listed,
//   * the marker segments of a baseline JPEG file that precede the scan,
//   * the integer 8-point DCT basis, round(c(u)/2 * cos((2x+1)u*pi/16) * 2^13).
// Using the standard's example tables follows the source design, which took
// its quantization and Huffman tables from the reference implementation of
// the standard. Quality scaling of the tables is not supported.
package jpeg_pkg;

  localparam int unsigned BLOCK_N = 64;   // samples in an 8x8 block

  // One RGB pixel as delivered to the colour converters.
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // Channel index inside a 4:4:4 MCU, in the order the scan writes them.
  typedef enum logic [1:0] {
    CH_Y  = 2'd0,
    CH_CB = 2'd1,
    CH_CR = 2'd2
  } chan_e;

  typedef logic [7:0]         sample_t;   // colour component, 0..255
  typedef logic signed [15:0] coef_t;     // DCT or quantized coefficient

  // Variable-length code token from a Huffman actor to the write actor.
  // bits holds the len least significant bits to be written, MSB first.
  // last marks the final token of an 8x8 block.
  typedef struct packed {
    logic        last;
    logic [4:0]  len;
    logic [25:0] bits;
  } vlc_tok_t;

  // A Huffman table entry: code length (0 = symbol absent) and code.
  typedef struct packed {
    logic [4:0]  len;
    logic [15:0] code;
  } hcode_t;

  // ---------------------------------------------------------------- zig-zag
  // Natural (row-major) index of the k-th coefficient of the zig-zag scan.
  function automatic logic [5:0] zigzag(input int unsigned k);
    int unsigned n;
    n = 0;
    for (int s = 0; s < 15; s++) begin
      for (int i = 0; i < 8; i++) begin
        int r, c;
        // even diagonals run bottom-left to top-right, odd ones the reverse
        if (s % 2 == 0) begin r = s - i; c = i;     end
        else            begin r = i;     c = s - i; end
        if (r >= 0 && r < 8 && c >= 0 && c < 8) begin
          if (n == k) return 6'(r * 8 + c);
          n++;
        end
      end
    end
    return 6'd0;
  endfunction

  function automatic logic [63:0][5:0] build_zigzag();
    logic [63:0][5:0] zz;
    for (int k = 0; k < 64; k++) zz[k] = zigzag(k);
    return zz;
  endfunction

  // ZIGZAG[k]: natural index of the k-th coefficient in scan order.
  localparam logic [63:0][5:0] ZIGZAG = build_zigzag();

  // ----------------------------------------------------------- quantization
  // Example quantization tables of the JPEG standard, natural order.
  localparam logic [63:0][7:0] QTAB_LUMA = {
    8'd99, 8'd103, 8'd100, 8'd112, 8'd98, 8'd95, 8'd92, 8'd72,
    8'd101, 8'd120, 8'd121, 8'd103, 8'd87, 8'd78, 8'd64, 8'd49,
    8'd92, 8'd113, 8'd104, 8'd81, 8'd64, 8'd55, 8'd35, 8'd24,
    8'd77, 8'd103, 8'd109, 8'd68, 8'd56, 8'd37, 8'd22, 8'd18,
    8'd62, 8'd80, 8'd87, 8'd51, 8'd29, 8'd22, 8'd17, 8'd14,
    8'd56, 8'd69, 8'd57, 8'd40, 8'd24, 8'd16, 8'd13, 8'd14,
    8'd55, 8'd60, 8'd58, 8'd26, 8'd19, 8'd14, 8'd12, 8'd12,
    8'd61, 8'd51, 8'd40, 8'd24, 8'd16, 8'd10, 8'd11, 8'd16
  };  // element [i] is natural position i (listed from i = 63 down to 0)

  // Chrominance table: a 4x4 top-left corner, 99 everywhere else.
  function automatic logic [7:0] qtab_chroma(input int unsigned i);
    logic [15:0][7:0] corner;
    corner = {8'd99, 8'd99, 8'd66, 8'd47,
              8'd99, 8'd56, 8'd26, 8'd24,
              8'd66, 8'd26, 8'd21, 8'd18,
              8'd47, 8'd24, 8'd18, 8'd17};
    if ((i / 8) < 4 && (i % 8) < 4) return corner[(i / 8) * 4 + (i % 8)];
    return 8'd99;
  endfunction

  function automatic logic [63:0][7:0] build_qtab_chroma();
    logic [63:0][7:0] q;
    for (int i = 0; i < 64; i++) q[i] = qtab_chroma(i);
    return q;
  endfunction

  localparam logic [63:0][7:0] QTAB_CHROMA = build_qtab_chroma();

  // ---------------------------------------------------------------- Huffman
  // Number of codes of each length 1..16 (BITS), element [L-1] is length L.
  localparam logic [15:0][7:0] DC_LUMA_BITS = {
    8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd1,
    8'd1, 8'd1, 8'd1, 8'd1, 8'd1, 8'd5, 8'd1, 8'd0};
  localparam logic [15:0][7:0] DC_CHROMA_BITS = {
    8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd1, 8'd1, 8'd1,
    8'd1, 8'd1, 8'd1, 8'd1, 8'd1, 8'd1, 8'd3, 8'd0};
  localparam logic [15:0][7:0] AC_LUMA_BITS = {
    8'h7d, 8'd1, 8'd0, 8'd0, 8'd4, 8'd4, 8'd5, 8'd5,
    8'd3, 8'd4, 8'd2, 8'd3, 8'd3, 8'd1, 8'd2, 8'd0};
  localparam logic [15:0][7:0] AC_CHROMA_BITS = {
    8'h77, 8'd2, 8'd1, 8'd0, 8'd4, 8'd4, 8'd5, 8'd7,
    8'd4, 8'd3, 8'd4, 8'd4, 8'd2, 8'd1, 8'd2, 8'd0};

  // Leading HUFFVAL symbols (those with codes shorter than 16 bits), element
  // [k] is the k-th symbol.
  localparam int unsigned AC_LUMA_NLEAD   = 37;
  localparam int unsigned AC_CHROMA_NLEAD = 43;
  localparam logic [36:0][7:0] AC_LUMA_LEAD = {
    8'h82, 8'h72, 8'h62, 8'h33, 8'h24,
    8'hf0, 8'hd1, 8'h52, 8'h15, 8'hc1, 8'hb1, 8'h42, 8'h23,
    8'h08, 8'ha1, 8'h91, 8'h81, 8'h32, 8'h14, 8'h71, 8'h22,
    8'h07, 8'h61, 8'h51, 8'h13, 8'h06, 8'h41, 8'h31, 8'h21,
    8'h12, 8'h05, 8'h11, 8'h04, 8'h00, 8'h03, 8'h02, 8'h01};
  localparam logic [42:0][7:0] AC_CHROMA_LEAD = {
    8'hf1, 8'h25, 8'he1, 8'h34, 8'h24, 8'h16, 8'h0a,
    8'hd1, 8'h72, 8'h62, 8'h15,
    8'hf0, 8'h52, 8'h33, 8'h23, 8'h09, 8'hc1, 8'hb1, 8'ha1,
    8'h91, 8'h42, 8'h14, 8'h08, 8'h81, 8'h32, 8'h22, 8'h13,
    8'h71, 8'h61, 8'h07, 8'h51, 8'h41, 8'h12, 8'h06, 8'h31,
    8'h21, 8'h05, 8'h04, 8'h11, 8'h03, 8'h02, 8'h01, 8'h00};

  // A symbol of a baseline AC table: EOB, ZRL or run 0..15 / size 1..10.
  function automatic logic ac_symbol(input int unsigned v);
    return (v == 'h00) || (v == 'hf0) || ((v % 16) >= 1 && (v % 16) <= 10);
  endfunction

  function automatic logic ac_in_lead(input logic chroma, input int unsigned v);
    if (chroma) begin
      for (int k = 0; k < AC_CHROMA_NLEAD; k++)
        if (int'(AC_CHROMA_LEAD[k]) == v) return 1'b1;
    end else begin
      for (int k = 0; k < AC_LUMA_NLEAD; k++)
        if (int'(AC_LUMA_LEAD[k]) == v) return 1'b1;
    end
    return 1'b0;
  endfunction

  // Full AC HUFFVAL list (162 symbols): the leading symbols, then every
  // other AC symbol in ascending order. Built once per table.
  function automatic logic [161:0][7:0] build_ac_huffval(input logic chroma);
    logic [161:0][7:0] hv;
    int unsigned n;
    hv = '0;
    n  = chroma ? AC_CHROMA_NLEAD : AC_LUMA_NLEAD;
    for (int k = 0; k < int'(n); k++) hv[k] = chroma ? AC_CHROMA_LEAD[k] : AC_LUMA_LEAD[k];
    for (int v = 0; v < 256; v++) begin
      if (ac_symbol(v) && !ac_in_lead(chroma, v) && n < 162) begin
        hv[n] = 8'(v);
        n++;
      end
    end
    return hv;
  endfunction

  localparam logic [161:0][7:0] AC_LUMA_HUFFVAL   = build_ac_huffval(1'b0);
  localparam logic [161:0][7:0] AC_CHROMA_HUFFVAL = build_ac_huffval(1'b1);

  // k-th symbol of an AC HUFFVAL list.
  function automatic logic [7:0] ac_huffval(input logic chroma, input int unsigned k);
    return chroma ? AC_CHROMA_HUFFVAL[k] : AC_LUMA_HUFFVAL[k];
  endfunction

  // Canonical Huffman code assignment (JPEG Annex C), indexed by symbol.
  function automatic logic [255:0][20:0] build_table(input logic ac, input logic chroma);
    logic [255:0][20:0] tab;
    logic [15:0][7:0]   bits;
    int unsigned code, k;
    tab  = '0;
    bits = ac ? (chroma ? AC_CHROMA_BITS : AC_LUMA_BITS)
              : (chroma ? DC_CHROMA_BITS : DC_LUMA_BITS);
    code = 0;
    k    = 0;
    for (int l = 1; l <= 16; l++) begin
      for (int i = 0; i < int'(bits[l-1]); i++) begin
        logic [7:0] sym;
        sym = ac ? ac_huffval(chroma, k) : 8'(k);   // DC symbols are 0..11 in order
        tab[sym] = {5'(l), 16'(code)};
        code++;
        k++;
      end
      code = code << 1;
    end
    return tab;
  endfunction

  localparam logic [255:0][20:0] DC_LUMA_TAB   = build_table(1'b0, 1'b0);
  localparam logic [255:0][20:0] DC_CHROMA_TAB = build_table(1'b0, 1'b1);
  localparam logic [255:0][20:0] AC_LUMA_TAB   = build_table(1'b1, 1'b0);
  localparam logic [255:0][20:0] AC_CHROMA_TAB = build_table(1'b1, 1'b1);

  // Magnitude category of a coefficient: number of bits of |v|.
  function automatic logic [3:0] mag_size(input logic signed [15:0] v);
    logic [15:0] a;
    a = v[15] ? 16'(-v) : 16'(v);
    for (int b = 15; b >= 0; b--)
      if (a[b]) return 4'(b + 1);
    return 4'd0;
  endfunction

  // Additional bits that follow a Huffman code: v itself if positive, the
  // ones' complement of |v| if negative, in the low size bits.
  function automatic logic [15:0] mag_bits(input logic signed [15:0] v, input logic [3:0] size);
    logic [15:0] raw, mask;
    raw  = v[15] ? 16'(v - 16'sd1) : 16'(v);
    mask = 16'((32'd1 << size) - 32'd1);
    return raw & mask;
  endfunction

  // ---------------------------------------------------------- file header
  // Marker segments written ahead of the scan: SOI, DQT (both tables, in
  // zig-zag order), SOF0 (8-bit baseline, three components, 1x1 sampling,
  // Y on table 0, Cb and Cr on table 1), DHT (DC and AC tables 0 and 1) and
  // SOS. The image height and width fields are filled in at run time at
  // HDR_POS_HEIGHT and HDR_POS_WIDTH.
  localparam int unsigned HDR_LEN        = 589;
  localparam int unsigned HDR_POS_HEIGHT = 141;
  localparam int unsigned HDR_POS_WIDTH  = 143;

  function automatic logic [HDR_LEN-1:0][7:0] build_header();
    logic [HDR_LEN-1:0][7:0] h;
    int unsigned n;
    h = '0;
    n = 0;
    // SOI
    h[n++] = 8'hff; h[n++] = 8'hd8;
    // DQT, length 2 + 2 * 65
    h[n++] = 8'hff; h[n++] = 8'hdb; h[n++] = 8'h00; h[n++] = 8'h84;
    for (int t = 0; t < 2; t++) begin
      h[n++] = 8'(t);
      for (int k = 0; k < 64; k++)
        h[n++] = (t == 0) ? QTAB_LUMA[zigzag(k)] : qtab_chroma(int'(zigzag(k)));
    end
    // SOF0, length 17
    h[n++] = 8'hff; h[n++] = 8'hc0; h[n++] = 8'h00; h[n++] = 8'h11; h[n++] = 8'h08;
    n += 4;   // height, width
    h[n++] = 8'h03;
    for (int c = 1; c <= 3; c++) begin
      h[n++] = 8'(c); h[n++] = 8'h11; h[n++] = (c == 1) ? 8'h00 : 8'h01;
    end
    // DHT, length 2 + 2 * (17 + 12) + 2 * (17 + 162) = 418
    h[n++] = 8'hff; h[n++] = 8'hc4; h[n++] = 8'h01; h[n++] = 8'ha2;
    for (int t = 0; t < 4; t++) begin
      logic ac, chroma;
      logic [15:0][7:0] bits;
      int unsigned cnt;
      ac     = t[0];
      chroma = t[1];
      bits = ac ? (chroma ? AC_CHROMA_BITS : AC_LUMA_BITS)
                : (chroma ? DC_CHROMA_BITS : DC_LUMA_BITS);
      h[n++] = {3'b000, ac, 3'b000, chroma};
      cnt = 0;
      for (int l = 0; l < 16; l++) begin
        h[n++] = bits[l];
        cnt += int'(bits[l]);
      end
      for (int k = 0; k < int'(cnt); k++) h[n++] = ac ? ac_huffval(chroma, k) : 8'(k);
    end
    // SOS, length 12
    h[n++] = 8'hff; h[n++] = 8'hda; h[n++] = 8'h00; h[n++] = 8'h0c; h[n++] = 8'h03;
    for (int c = 1; c <= 3; c++) begin
      h[n++] = 8'(c); h[n++] = (c == 1) ? 8'h00 : 8'h11;
    end
    h[n++] = 8'h00; h[n++] = 8'h3f; h[n++] = 8'h00;
    return h;
  endfunction

  localparam logic [HDR_LEN-1:0][7:0] JPEG_HEADER = build_header();

  // ------------------------------------------------------------------- DCT
  // Integer basis A[u][x] = round(c(u)/2 * cos((2x+1)u*pi/16) * 2^13),
  // c(0) = 1/sqrt(2), c(u>0) = 1. Built from cos(k*pi/16) by symmetry.
  function automatic logic signed [13:0] dct_basis(input int unsigned u, input int unsigned x);
    logic [8:0][12:0] half_cos;   // round(cos(k*pi/16)/2 * 2^13), k = 0..8
    int unsigned k;
    half_cos = {13'd0, 13'd799, 13'd1567, 13'd2276, 13'd2896,
                13'd3406, 13'd3784, 13'd4017, 13'd4096};
    if (u == 0) return 14'sd2896;   // 1/(2*sqrt(2))
    k = (u * (2 * x + 1)) % 32;
    if (k <= 8)  return  14'(half_cos[k]);
    if (k <= 16) return -14'(half_cos[16 - k]);
    if (k <= 24) return -14'(half_cos[k - 16]);
    return 14'(half_cos[32 - k]);
  endfunction

endpackage
