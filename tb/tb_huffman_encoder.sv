// tb_huffman_encoder: self-checking test of the run-length/Huffman actor.
//
// Part 1 feeds hand-made blocks to a luminance and a chrominance instance
// and compares the token stream with codes written out from the code
// tables printed in the JPEG standard (not taken from the RTL's tables):
// DC differences, AC values with runs, ZRL for runs of 16, EOB, a block that
// ends in a nonzero coefficient (no EOB, last flag on that code), and the
// DC predictor restart after blocks_per_image blocks.
// Part 2 feeds random sparse blocks and compares with the reference
// encoder's bit string, under random output back-pressure.
module tb_huffman_encoder;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] blocks_per_image;
  coef_t s_data;
  logic s_valid;
  logic [1:0] s_ready;
  vlc_tok_t m_tok [2];
  logic [1:0] m_valid, m_ready;
  logic sel;   // which instance the stimulus goes to

  huffman_encoder #(.CHROMA(1'b0)) dut_l (.clk, .rst_n, .blocks_per_image, .s_data,
    .s_valid(s_valid && !sel), .s_ready(s_ready[0]),
    .m_tok(m_tok[0]), .m_valid(m_valid[0]), .m_ready(m_ready[0]));
  huffman_encoder #(.CHROMA(1'b1)) dut_c (.clk, .rst_n, .blocks_per_image, .s_data,
    .s_valid(s_valid && sel), .s_ready(s_ready[1]),
    .m_tok(m_tok[1]), .m_valid(m_valid[1]), .m_ready(m_ready[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit bp = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected tokens as {last, len, bits}; expected bit strings for part 2
  vlc_tok_t exp_tok[2][$];
  bit       exp_bits[2][$];
  bit       part2 = 1'b0;

  // code string like "1010" followed by magnitude bits string
  function automatic vlc_tok_t mk(input string code, input string extra, input bit last);
    vlc_tok_t t;
    string s;
    s = {code, extra};
    t = '0;
    t.len = 5'(s.len());
    for (int i = 0; i < s.len(); i++) t.bits = (t.bits << 1) | 26'(s[i] == "1");
    t.last = last;
    return t;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++)
      if (m_valid[c] && m_ready[c]) begin
        if (!part2) begin
          vlc_tok_t e;
          e = exp_tok[c].pop_front();
          check(m_tok[c] == e, $sformatf("%s token len %0d bits %b last %0d, expected len %0d bits %b last %0d",
                c ? "chroma" : "luma", m_tok[c].len, m_tok[c].bits, m_tok[c].last, e.len, e.bits, e.last));
        end else begin
          for (int i = int'(m_tok[c].len) - 1; i >= 0; i--) begin
            bit e;
            e = exp_bits[c].pop_front();
            check(m_tok[c].bits[i] == e, "bit of random block stream");
          end
        end
      end
  end

  always @(negedge clk) begin
    m_ready[0] = bp ? ($urandom % 3) != 0 : 1'b1;
    m_ready[1] = bp ? ($urandom % 3) != 0 : 1'b1;
  end

  task automatic send_block(input bit chroma, input blk_t zz);
    sel = chroma;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      s_data = coef_t'(zz[i]); s_valid = 1'b1;
      #1;
      while (!s_ready[chroma]) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk); s_valid = 1'b0;
  endtask

  initial begin
    blk_t b;
    s_valid = 1'b0; s_data = '0; sel = 1'b0;
    blocks_per_image = 16'd2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- luma block A: DC 5, AC 1 -1 at 1,2; 3 at 5 (run 2); 2 at 40 (run 34)
    b = '{default: 0};
    b[0] = 5; b[1] = 1; b[2] = -1; b[5] = 3; b[40] = 2;
    exp_tok[0].push_back(mk("100", "101", 0));        // DC size 3, +5
    exp_tok[0].push_back(mk("00", "1", 0));           // 0/1 +1
    exp_tok[0].push_back(mk("00", "0", 0));           // 0/1 -1
    exp_tok[0].push_back(mk("11111001", "11", 0));    // 2/2 +3
    exp_tok[0].push_back(mk("11111111001", "", 0));   // ZRL
    exp_tok[0].push_back(mk("11111111001", "", 0));   // ZRL
    exp_tok[0].push_back(mk("11111001", "10", 0));    // 2/2 +2
    exp_tok[0].push_back(mk("1010", "", 1));          // EOB
    send_block(1'b0, b);
    // ---- luma block B: DC 5 again (difference 0), 16 zeros then ones to the end
    b = '{default: 0};
    b[0] = 5; b[1] = -3;
    for (int i = 18; i < 64; i++) b[i] = 1;
    exp_tok[0].push_back(mk("00", "", 0));            // DC size 0
    exp_tok[0].push_back(mk("01", "00", 0));          // 0/2 -3
    exp_tok[0].push_back(mk("11111111001", "", 0));   // ZRL for 2..17
    for (int i = 18; i < 64; i++) exp_tok[0].push_back(mk("00", "1", i == 63));
    send_block(1'b0, b);
    // ---- luma block E: new image, the predictor restarts at zero
    b = '{default: 0};
    b[0] = 5; b[1] = 12;
    exp_tok[0].push_back(mk("100", "101", 0));        // DC +5 again
    exp_tok[0].push_back(mk("1011", "1100", 0));      // 0/4 +12
    exp_tok[0].push_back(mk("1010", "", 1));          // EOB
    send_block(1'b0, b);

    // ---- chroma block C: DC -3, 1 at 1, 1 at 3 (run 1), 1 at 21 (run 17)
    b = '{default: 0};
    b[0] = -3; b[1] = 1; b[3] = 1; b[21] = 1;
    exp_tok[1].push_back(mk("10", "00", 0));          // DC size 2, -3
    exp_tok[1].push_back(mk("01", "1", 0));           // 0/1
    exp_tok[1].push_back(mk("1011", "1", 0));         // 1/1
    exp_tok[1].push_back(mk("1111111010", "", 0));    // ZRL
    exp_tok[1].push_back(mk("1011", "1", 0));         // 1/1
    exp_tok[1].push_back(mk("00", "", 1));            // EOB
    send_block(1'b1, b);
    // ---- chroma block D: DC unchanged, all AC zero
    b = '{default: 0};
    b[0] = -3;
    exp_tok[1].push_back(mk("00", "", 0));            // DC size 0
    exp_tok[1].push_back(mk("00", "", 1));            // EOB
    send_block(1'b1, b);
    repeat (10) @(negedge clk);
    check(exp_tok[0].size() == 0 && exp_tok[1].size() == 0, "all hand-made tokens produced");

    // ---- part 2: random sparse blocks against the reference encoder
    // The chroma instance has finished its two-block image; the luma one
    // is one block into its second image, which one zero block closes.
    part2 = 1'b1;
    bp = 1'b1;
    b = '{default: 0};
    begin
      bit_sink sink;
      int pred;
      sink = new();
      pred = 5;
      sink.encode_block(b, pred, 1'b0);
      for (int k = 0; k < sink.bytes.size(); k++)
        for (int i = 7; i >= 0; i--) exp_bits[0].push_back(sink.bytes[k][i]);
      for (int i = sink.n - 1; i >= 0; i--) exp_bits[0].push_back(sink.acc[i]);
    end
    send_block(1'b0, b);
    repeat (5) @(negedge clk);
    blocks_per_image = 16'd1000;
    for (int c = 0; c < 2; c++) begin
      int pred;
      pred = 0;
      for (int n = 0; n < 12; n++) begin
        bit_sink sink;
        sink = new();
        for (int i = 0; i < 64; i++)
          b[i] = (($urandom % 4) == 0 || i == 0) ? int'($urandom % 511) - 255 : 0;
        if (n % 3 == 1) for (int i = 1; i < 64; i++) if (i % 20 != 0) b[i] = 0;
        sink.encode_block(b, pred, c == 1);
        // raw bit string, before byte stuffing: rebuild from the bytes
        for (int k = 0; k < sink.bytes.size(); k++) begin
          if (k > 0 && sink.bytes[k-1] == 8'hff && sink.bytes[k] == 8'h00) continue;
          for (int i = 7; i >= 0; i--) exp_bits[c].push_back(sink.bytes[k][i]);
        end
        for (int i = sink.n - 1; i >= 0; i--) exp_bits[c].push_back(sink.acc[i]);
        send_block(c == 1, b);
      end
    end
    repeat (20) @(negedge clk);
    check(exp_bits[0].size() == 0 && exp_bits[1].size() == 0, "all random-block bits produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
