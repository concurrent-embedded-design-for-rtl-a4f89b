// tb_bitstream_writer: self-checking test of the write actor.
//
// Three producers offer random code tokens for their channel, each at its
// own random pace, so tokens of later channels are often waiting before
// their turn. Each block is a few random tokens, the last one marked last;
// some tokens are all ones so that 0xFF bytes, which must be followed by a
// stuffed 0x00, occur often. The reference writes the marker segments with
// the image size, then concatenates the blocks in scan order (Y, Cb, Cr per
// MCU), packs, stuffs, pads with ones and appends EOI.
// Two images are written; m_last must mark the final byte of each, and
// the output is back-pressured at random.
module tb_bitstream_writer;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] blocks_per_image, image_width, image_height;
  vlc_tok_t s_tok [3];
  logic [2:0] s_valid, s_ready;
  logic [7:0] m_data;
  logic m_valid, m_last, m_ready;

  bitstream_writer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  vlc_tok_t     tokq[3][$];      // tokens each producer still has to offer
  byte unsigned expected[$];
  int           exp_last[$];
  byte unsigned got[$];
  int           got_last[$];
  int           n_ffs = 0;
  int           exp_first[$];    // index of each image's first byte

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic make_image(input int mcus, input int w, input int h);
    bit_sink sink = new();
    exp_first.push_back(expected.size());
    ref_header(expected, w, h);
    for (int m = 0; m < mcus; m++)
      for (int c = 0; c < 3; c++) begin
        int n = 1 + $urandom % 5;
        for (int k = 0; k < n; k++) begin
          vlc_tok_t t;
          t.len  = 5'(1 + $urandom % 26);
          t.bits = (($urandom % 4) == 0) ? 26'h3ffffff : 26'($urandom);
          t.bits &= 26'((32'd1 << t.len) - 1);
          t.last = (k == n - 1);
          tokq[c].push_back(t);
          sink.put(32'(t.bits), int'(t.len));
        end
      end
    sink.finish();
    n_ffs += sink.stuff_count;
    foreach (sink.bytes[i]) expected.push_back(sink.bytes[i]);
    exp_last.push_back(expected.size() - 1);
  endtask

  // producers: offer the head token of each channel at random
  always @(negedge clk) begin
    for (int c = 0; c < 3; c++) begin
      s_valid[c] = rst_n && tokq[c].size() > 0 && ($urandom % 3) != 0;
      s_tok[c]   = (tokq[c].size() > 0) ? tokq[c][0] : '0;
    end
    m_ready = ($urandom % 4) != 0;
  end

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 3; c++)
      if (s_valid[c] && s_ready[c]) void'(tokq[c].pop_front());
    if (m_valid && m_ready) begin
      got.push_back(m_data);
      if (m_last) got_last.push_back(got.size() - 1);
    end
  end

  initial begin
    blocks_per_image = 16'd7;
    image_width      = 16'd56;
    image_height     = 16'd8;
    s_valid = '0;
    make_image(7, 56, 8);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (got_last.size() == 1);
    @(negedge clk);
    blocks_per_image = 16'd3;
    image_width      = 16'd20;
    image_height     = 16'd300;
    make_image(3, 20, 300);
    wait (got_last.size() == 2);
    repeat (5) @(negedge clk);
    check(got.size() == expected.size(), $sformatf("%0d bytes, expected %0d", got.size(), expected.size()));
    for (int i = 0; i < expected.size() && i < got.size(); i++)
      check(got[i] == expected[i], $sformatf("byte %0d: 0x%02x, expected 0x%02x", i, got[i], expected[i]));
    check(got_last.size() == 2 && got_last[0] == exp_last[0] && got_last[1] == exp_last[1], "last flags");
    check(n_ffs > 0, "0xFF bytes were stuffed");
    // each image starts with SOI, and its frame header carries the size
    for (int i = 0; i < 2; i++) begin
      int b;
      b = exp_first[i];
      check(got.size() > b + HDR_POS_WIDTH + 1 && got[b] == 8'hff && got[b+1] == 8'hd8 &&
            got[b+HDR_POS_HEIGHT-5] == 8'hff && got[b+HDR_POS_HEIGHT-4] == 8'hc0 &&
            {got[b+HDR_POS_HEIGHT], got[b+HDR_POS_HEIGHT+1]} == (i == 0 ? 16'd8 : 16'd300) &&
            {got[b+HDR_POS_WIDTH], got[b+HDR_POS_WIDTH+1]} == (i == 0 ? 16'd56 : 16'd20),
            $sformatf("image %0d: SOI and frame header size", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
