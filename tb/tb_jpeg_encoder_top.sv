// tb_jpeg_encoder_top: end-to-end test of the twelve-actor JPEG encoder at
// its default parameters.
//
// Two images are encoded back to back (IMG0_MCUS and IMG1_MCUS MCUs). The
// pixels are generated from four block patterns that exercise the coding
// paths: smooth gradients (short blocks ending in EOB), a checkerboard
// (energy only in the last zig-zag position, so runs of zeros longer than
// 15 need ZRL symbols and the block ends without EOB), random noise (long
// codes, frequent 0xFF bytes that must be stuffed) and flat saturated
// colours. The reference model (jpeg_ref_pkg) encodes the same images and
// the output bytes, from the marker segments with the image size through
// padding and EOI, and the last flag must match exactly. The pixel source inserts random gaps and the byte sink random
// back-pressure.
//
// Mechanisms counted, each of which must occur at least once: blocking
// write at the input (pipeline full), blocking read at a DCT actor
// (channel empty), MCUs handled by the second colour converter, ZRL
// symbols, EOB symbols, stuffed bytes, output back-pressure, the DC
// predictor restarting at an image boundary (second image), and the cycle
// timer, whose measurement must equal the testbench's own cycle count.
module tb_jpeg_encoder_top;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;

  // image 0 is 64 x 40 pixels (8 x 5 MCUs), image 1 is 20 x 14 pixels,
  // whose edge MCUs the producer pads to full size (3 x 2 MCUs)
  localparam int IMG0_W = 64, IMG0_H = 40, IMG0_MCUS = 40;
  localparam int IMG1_W = 20, IMG1_H = 14, IMG1_MCUS = 6;
  localparam int WATCHDOG  = 400000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] image_width, image_height;
  rgb_t        s_pix;
  logic        s_valid;
  logic        s_ready;
  logic [7:0]  m_data;
  logic        m_valid, m_last, m_ready;
  logic [31:0] cycle_count, image_cycles;
  logic        image_cycles_valid;

  always #5 clk = ~clk;

  jpeg_encoder_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;

  // ----------------------------------------------------------- image data
  function automatic rgb_t pixel(input int img, input int mcu, input int p);
    int x, y, kind, seed;
    rgb_t px;
    x = p % 8;
    y = p / 8;
    kind = (mcu + img) % 4;
    seed = (img * 7919 + mcu * 104729 + p * 31337) ^ 32'h5bd1e995;
    case (kind)
      0: begin   // gradient
        px.r = 8'(x * 16 + mcu * 3);
        px.g = 8'(y * 20 + 40);
        px.b = 8'(200 - x * 8 - y * 8);
      end
      1: begin   // checkerboard
        px.r = ((x + y) % 2 == 0) ? 8'd230 : 8'd20;
        px.g = ((x + y) % 2 == 0) ? 8'd200 : 8'd40;
        px.b = ((x + y) % 2 == 0) ? 8'd60  : 8'd180;
      end
      2: begin   // noise
        seed = seed * 1103515245 + 12345;
        px.r = 8'(seed >>> 16);
        seed = seed * 1103515245 + 12345;
        px.g = 8'(seed >>> 16);
        seed = seed * 1103515245 + 12345;
        px.b = 8'(seed >>> 16);
      end
      default: begin   // flat saturated colour, changes per MCU
        px.r = (mcu % 2) ? 8'd255 : 8'd0;
        px.g = 8'd255;
        px.b = (mcu % 3 == 0) ? 8'd255 : 8'd0;
      end
    endcase
    return px;
  endfunction

  byte unsigned expected[$];
  int           exp_last_idx[$];
  int           ref_zrl, ref_eob, ref_stuff;

  task automatic build_reference(input int img, input int mcus, input int w, input int h);
    bit_sink sink;
    int pred[3];
    sink = new();
    ref_header(expected, w, h);
    pred = '{0, 0, 0};
    for (int m = 0; m < mcus; m++) begin
      blk_t comp[3];
      for (int p = 0; p < 64; p++) begin
        rgb_t px;
        int y, cb, cr;
        px = pixel(img, m, p);
        ref_color(int'(px.r), int'(px.g), int'(px.b), y, cb, cr);
        comp[0][p] = y;
        comp[1][p] = cb;
        comp[2][p] = cr;
      end
      for (int c = 0; c < 3; c++)
        sink.encode_block(ref_quant(ref_fdct(comp[c]), c != 0), pred[c], c != 0);
    end
    sink.finish();
    foreach (sink.bytes[i]) expected.push_back(sink.bytes[i]);
    exp_last_idx.push_back(expected.size() - 1);
    ref_zrl   += sink.zrl_count;
    ref_eob   += sink.eob_count;
    ref_stuff += sink.stuff_count;
  endtask

  // ------------------------------------------------------------- counters
  int n_in_stall = 0, n_dct_starved = 0, n_ccb = 0, n_zrl = 0;
  int n_stuff = 0, n_out_bp = 0;

  int first_pix_cyc = -1;
  byte unsigned got[$];
  int           got_last[$];
  int           last_byte_cyc = -1;

  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready && first_pix_cyc < 0) first_pix_cyc = cyc;
    if (s_valid && !s_ready) n_in_stall++;
    if (dut.g_ch[0].ld_in_ready && !dut.g_ch[0].ld_in_valid) n_dct_starved++;
    if (dut.cc_valid[1] && dut.cc_ready[1]) n_ccb++;
    if (dut.g_ch[0].u_h.s_valid && dut.g_ch[0].u_h.slot_free &&
        dut.g_ch[0].u_h.emit && !dut.g_ch[0].u_h.consume) n_zrl++;
    if (dut.g_ch[1].u_h.s_valid && dut.g_ch[1].u_h.slot_free &&
        dut.g_ch[1].u_h.emit && !dut.g_ch[1].u_h.consume) n_zrl++;
    if (dut.g_ch[2].u_h.s_valid && dut.g_ch[2].u_h.slot_free &&
        dut.g_ch[2].u_h.emit && !dut.g_ch[2].u_h.consume) n_zrl++;
    if (dut.u_w.stuff && m_ready) n_stuff++;
    if (m_valid && !m_ready) n_out_bp++;
    if (m_valid && m_ready) begin
      got.push_back(m_data);
      if (m_last) begin
        got_last.push_back(got.size() - 1);
        if (got_last.size() == 1) last_byte_cyc = cyc;
      end
    end
    cyc++;
  end

  // ------------------------------------------------------------- stimulus
  // Inputs change on the falling edge; a pixel moves on the rising edge at
  // which s_ready is high.
  task automatic send_image(input int img, input int mcus);
    for (int m = 0; m < mcus; m++)
      for (int p = 0; p < 64; p++) begin
        @(negedge clk);
        while (($urandom % 8) == 0) begin
          s_valid = 1'b0;
          @(negedge clk);
        end
        s_pix   = pixel(img, m, p);
        s_valid = 1'b1;
        #1;
        while (!s_ready) begin
          @(negedge clk);
          #1;
        end
        @(posedge clk);
      end
    @(negedge clk);
    s_valid = 1'b0;
  endtask

  // byte sink with random back-pressure
  always @(negedge clk) m_ready = ($urandom % 4) != 0;

  // Timer: the first image's elapsed cycles are captured when its last byte
  // leaves; sample them before the second image starts a new measurement.
  logic [31:0] timer_img0;
  logic        timer_seen = 1'b0;
  always @(posedge clk)
    if (rst_n && image_cycles_valid && !timer_seen) begin
      timer_img0 <= image_cycles;
      timer_seen <= 1'b1;
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    s_valid = 1'b0;
    s_pix   = '0;
    m_ready = 1'b0;
    ref_zrl = 0; ref_eob = 0; ref_stuff = 0;
    image_width  = 16'(IMG0_W);
    image_height = 16'(IMG0_H);
    build_reference(0, IMG0_MCUS, IMG0_W, IMG0_H);
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    send_image(0, IMG0_MCUS);
    wait (got_last.size() == 1);
    @(posedge clk);
    // second image, different length: the DC predictors must restart
    build_reference(1, IMG1_MCUS, IMG1_W, IMG1_H);
    image_width  = 16'(IMG1_W);
    image_height = 16'(IMG1_H);
    send_image(1, IMG1_MCUS);
    wait (got_last.size() == 2);
    repeat (4) @(posedge clk);

    check(got.size() == expected.size(),
          $sformatf("byte count %0d, expected %0d", got.size(), expected.size()));
    for (int i = 0; i < expected.size() && i < got.size(); i++) begin
      if (got[i] != expected[i]) begin
        check(1'b0, $sformatf("byte %0d: 0x%02x, expected 0x%02x", i, got[i], expected[i]));
        break;
      end
    end
    check(1'b1, "byte stream compared");
    check(got_last.size() == 2 && got_last[0] == exp_last_idx[0] && got_last[1] == exp_last_idx[1],
          "last flag positions");

    // cycle timer against the testbench's own count, first pixel to last byte
    check(timer_seen && int'(timer_img0) == last_byte_cyc - first_pix_cyc + 1,
          $sformatf("timer %0d, testbench %0d", timer_img0, last_byte_cyc - first_pix_cyc + 1));
    $display("image 0: %0d MCUs, %0d bytes, %0d cycles (%0d cycles per MCU)",
             IMG0_MCUS, exp_last_idx[0] + 1, timer_img0, int'(timer_img0) / IMG0_MCUS);

    // throughput: the level-shift/DCT actors are the slowest stage at 192
    // cycles per block, so an MCU should take little more than that; the
    // header adds one cycle per byte, more under back-pressure
    check(int'(timer_img0) < IMG0_MCUS * 224 + 2 * HDR_LEN,
          $sformatf("%0d cycles, expected under %0d", timer_img0, IMG0_MCUS * 224 + 2 * HDR_LEN));

    // every mechanism must have happened
    $display("mechanisms: input stalls %0d, DCT input empty %0d, MCU pixels via C_B %0d, ZRL %0d (ref %0d), EOB (ref) %0d, stuffed %0d (ref %0d), output back-pressure %0d, images 2",
             n_in_stall, n_dct_starved, n_ccb, n_zrl, ref_zrl, ref_eob, n_stuff, ref_stuff, n_out_bp);
    check(n_in_stall > 0, "blocking write at the input never happened");
    check(n_dct_starved > 0, "blocking read at a DCT actor never happened");
    check(n_ccb == 64 * (IMG0_MCUS / 2 + IMG1_MCUS / 2), "second colour converter share");
    check(n_zrl > 0 && n_zrl == ref_zrl, "ZRL count");
    check(ref_eob > 0, "EOB never happened");
    check(n_stuff > 0 && n_stuff == ref_stuff, "stuffed byte count");
    check(n_out_bp > 0, "output back-pressure never happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
