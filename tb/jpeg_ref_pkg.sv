// jpeg_ref_pkg: behavioural reference model of the JPEG encoder, for the
// testbenches only.
//
// Each step is written as plain sequential code, separately from the RTL:
// colour conversion with the JFIF equations in 16-bit fixed point, the 2-D
// DCT with a basis computed from $cos (rounded to 2^-13), quantization with
// round-half-away-from-zero, zig-zag order from an explicit table, and
// baseline Huffman coding with byte stuffing, padding and EOI, and the
// marker segments ahead of the scan. The Huffman code tables themselves are
// taken from jpeg_pkg; the Huffman testbench checks their entries against
// codes printed in the JPEG standard.
package jpeg_ref_pkg;
  import jpeg_pkg::*;

  typedef int blk_t [64];

  localparam int ZZ [64] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};

  // Example tables of the JPEG standard, row-major.
  localparam int QL [64] = '{
    16, 11, 10, 16, 24, 40, 51, 61,   12, 12, 14, 19, 26, 58, 60, 55,
    14, 13, 16, 24, 40, 57, 69, 56,   14, 17, 22, 29, 51, 87, 80, 62,
    18, 22, 37, 56, 68,109,103, 77,   24, 35, 55, 64, 81,104,113, 92,
    49, 64, 78, 87,103,121,120,101,   72, 92, 95, 98,112,100,103, 99};
  localparam int QC [64] = '{
    17, 18, 24, 47, 99, 99, 99, 99,   18, 21, 26, 66, 99, 99, 99, 99,
    24, 26, 56, 99, 99, 99, 99, 99,   47, 66, 99, 99, 99, 99, 99, 99,
    99, 99, 99, 99, 99, 99, 99, 99,   99, 99, 99, 99, 99, 99, 99, 99,
    99, 99, 99, 99, 99, 99, 99, 99,   99, 99, 99, 99, 99, 99, 99, 99};

  function automatic void ref_color(input int r, input int g, input int b,
                                    output int y, output int cb, output int cr);
    y  = (19595 * r + 38470 * g + 7471 * b + 32768) >>> 16;
    cb = (-11059 * r - 21709 * g + 32768 * b + (128 << 16) + 32767) >>> 16;
    cr = (32768 * r - 27439 * g - 5329 * b + (128 << 16) + 32767) >>> 16;
  endfunction

  function automatic int basis(input int u, input int x);
    real c;
    c = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return int'($floor(c / 2.0 * $cos((2.0 * x + 1.0) * u * 3.14159265358979 / 16.0) * 8192.0 + 0.5));
  endfunction

  // Level shift and fixed-point separable DCT: samples in, coefficients out,
  // both row-major.
  function automatic blk_t ref_fdct(input blk_t f);
    blk_t t, o;
    for (int y = 0; y < 8; y++)
      for (int u = 0; u < 8; u++) begin
        int s = 512;
        for (int x = 0; x < 8; x++) s += basis(u, x) * (f[y*8+x] - 128);
        t[y*8+u] = s >>> 10;
      end
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        int s = 32768;
        for (int y = 0; y < 8; y++) s += basis(v, y) * t[y*8+u];
        o[v*8+u] = s >>> 16;
      end
    return o;
  endfunction

  // Real-valued DCT (no level shift applied here), for tolerance checks.
  function automatic real real_dct(input blk_t f, input int v, input int u);
    real s, cu, cv;
    s = 0.0;
    cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    cv = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++)
        s += (f[y*8+x] - 128) * $cos((2.0*x+1.0)*u*3.14159265358979/16.0)
                              * $cos((2.0*y+1.0)*v*3.14159265358979/16.0);
    return 0.25 * cu * cv * s;
  endfunction

  function automatic int ref_qdiv(input int c, input int q);
    int m;
    m = (c < 0) ? -c : c;
    m = (m + q / 2) / q;
    return (c < 0) ? -m : m;
  endfunction

  // Quantize (natural order in) and return the block in zig-zag order.
  function automatic blk_t ref_quant(input blk_t c, input bit chroma);
    blk_t o;
    for (int k = 0; k < 64; k++)
      o[k] = ref_qdiv(c[ZZ[k]], chroma ? QC[ZZ[k]] : QL[ZZ[k]]);
    return o;
  endfunction

  function automatic int nbits_of(input int v);
    int a, n;
    a = (v < 0) ? -v : v;
    n = 0;
    while (a != 0) begin a >>= 1; n++; end
    return n;
  endfunction

  // Marker segments ahead of the scan for a w x h image: SOI, DQT, SOF0,
  // DHT, SOS. Quantization tables from QL/QC in ZZ order; Huffman BITS and
  // HUFFVAL lists from jpeg_pkg.
  function automatic void ref_header(ref byte unsigned q[$], input int w, input int h);
    byte unsigned seg[$];
    q.push_back(8'hff); q.push_back(8'hd8);
    // DQT
    seg = {};
    for (int t = 0; t < 2; t++) begin
      seg.push_back(8'(t));
      for (int k = 0; k < 64; k++) seg.push_back(8'(t == 0 ? QL[ZZ[k]] : QC[ZZ[k]]));
    end
    put_segment(q, 8'hdb, seg);
    // SOF0
    seg = {8'd8, 8'(h >> 8), 8'(h), 8'(w >> 8), 8'(w), 8'd3,
           8'd1, 8'h11, 8'd0,  8'd2, 8'h11, 8'd1,  8'd3, 8'h11, 8'd1};
    put_segment(q, 8'hc0, seg);
    // DHT: DC luma, AC luma, DC chroma, AC chroma
    seg = {};
    for (int t = 0; t < 4; t++) begin
      bit ac, ch;
      logic [15:0][7:0] b;
      int cnt;
      ac = t % 2;
      ch = t / 2;
      b = ac ? (ch ? AC_CHROMA_BITS : AC_LUMA_BITS) : (ch ? DC_CHROMA_BITS : DC_LUMA_BITS);
      seg.push_back(8'(ac * 16 + ch));
      cnt = 0;
      for (int l = 0; l < 16; l++) begin
        seg.push_back(b[l]);
        cnt += b[l];
      end
      for (int k = 0; k < cnt; k++) seg.push_back(ac ? ac_huffval(ch, k) : 8'(k));
    end
    put_segment(q, 8'hc4, seg);
    // SOS
    seg = {8'd3, 8'd1, 8'h00, 8'd2, 8'h11, 8'd3, 8'h11, 8'd0, 8'd63, 8'd0};
    put_segment(q, 8'hda, seg);
  endfunction

  function automatic void put_segment(ref byte unsigned q[$], input byte unsigned marker,
                                      input byte unsigned seg[$]);
    q.push_back(8'hff);
    q.push_back(marker);
    q.push_back(8'((seg.size() + 2) >> 8));
    q.push_back(8'(seg.size() + 2));
    foreach (seg[i]) q.push_back(seg[i]);
  endfunction

  // Bit writer state of the reference encoder.
  class bit_sink;
    byte unsigned bytes[$];
    int unsigned  acc;
    int           n;
    int           zrl_count, eob_count, stuff_count;

    function new();
      acc = 0; n = 0; zrl_count = 0; eob_count = 0; stuff_count = 0;
    endfunction

    function void put(input int unsigned code, input int len);
      for (int i = len - 1; i >= 0; i--) begin
        acc = (acc << 1) | ((code >> i) & 1);
        n++;
        if (n == 8) begin
          bytes.push_back(byte'(acc & 8'hff));
          if ((acc & 8'hff) == 8'hff) begin bytes.push_back(8'h00); stuff_count++; end
          acc = 0;
          n = 0;
        end
      end
    endfunction

    function void finish();
      if (n != 0) put((1 << (8 - n)) - 1, 8 - n);
      bytes.push_back(8'hff);
      bytes.push_back(8'hd9);
    endfunction

    function void put_value(input int v, input int size);
      int unsigned raw;
      raw = (v < 0) ? unsigned'(v - 1) : unsigned'(v);
      if (size > 0) put(raw & ((1 << size) - 1), size);
    endfunction

    // One block: zig-zag quantized coefficients, DC predictor in/out.
    function void encode_block(input blk_t zz, inout int pred, input bit chroma);
      logic [255:0][20:0] dct, act;
      int diff, s, run;
      dct = chroma ? DC_CHROMA_TAB : DC_LUMA_TAB;
      act = chroma ? AC_CHROMA_TAB : AC_LUMA_TAB;
      diff = zz[0] - pred;
      pred = zz[0];
      s = nbits_of(diff);
      put(dct[s][15:0], int'(dct[s][20:16]));
      put_value(diff, s);
      run = 0;
      for (int k = 1; k < 64; k++) begin
        if (zz[k] == 0) begin
          run++;
        end else begin
          while (run > 15) begin
            put(act[8'hf0][15:0], int'(act[8'hf0][20:16]));
            zrl_count++;
            run -= 16;
          end
          s = nbits_of(zz[k]);
          put(act[run*16+s][15:0], int'(act[run*16+s][20:16]));
          put_value(zz[k], s);
          run = 0;
        end
      end
      if (run > 0) begin
        put(act[0][15:0], int'(act[0][20:16]));
        eob_count++;
      end
    endfunction
  endclass

endpackage
