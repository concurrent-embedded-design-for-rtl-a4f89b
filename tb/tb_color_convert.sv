// tb_color_convert: self-checking test of the colour-conversion actor.
//
// Random pixels (plus the eight corners of the RGB cube) are converted and
// each component is compared with the fixed-point reference and, within
// one step, with the real-valued JFIF equations. The three outputs are
// back-pressured independently at random, so the actor must hold its
// results and block its input until all three are taken. With all outputs
// ready, the throughput must be one pixel per cycle.
module tb_color_convert;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;

  localparam int NPIX = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  rgb_t s_pix;
  logic s_valid, s_ready;
  sample_t m_y, m_cb, m_cr;
  logic m_y_valid, m_cb_valid, m_cr_valid;
  logic m_y_ready, m_cb_ready, m_cr_ready;

  color_convert dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int exp_q[3][$];
  bit bp = 1'b1;
  int n_taken = 0, n_stall = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int rnd(real v);
    return int'($floor(v + 0.5));
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) begin
      int y, cb, cr;
      real ry, rcb, rcr;
      ref_color(int'(s_pix.r), int'(s_pix.g), int'(s_pix.b), y, cb, cr);
      ry  =  0.299 * s_pix.r + 0.587 * s_pix.g + 0.114 * s_pix.b;
      rcb = -0.168736 * s_pix.r - 0.331264 * s_pix.g + 0.5 * s_pix.b + 128.0;
      rcr =  0.5 * s_pix.r - 0.418688 * s_pix.g - 0.081312 * s_pix.b + 128.0;
      check(y - rnd(ry) <= 1 && rnd(ry) - y <= 1 && cb - rnd(rcb) <= 1 && rnd(rcb) - cb <= 1 &&
            cr - rnd(rcr) <= 1 && rnd(rcr) - cr <= 1, "reference within one step of JFIF");
      exp_q[0].push_back(y);
      exp_q[1].push_back(cb);
      exp_q[2].push_back(cr);
      n_taken++;
    end
    if (s_valid && !s_ready) n_stall++;
    if (m_y_valid && m_y_ready) begin
      int e;
      e = exp_q[0].pop_front();
      check(int'(m_y) == e, $sformatf("Y %0d, expected %0d", m_y, e));
    end
    if (m_cb_valid && m_cb_ready) begin
      int e;
      e = exp_q[1].pop_front();
      check(int'(m_cb) == e, $sformatf("Cb %0d, expected %0d", m_cb, e));
    end
    if (m_cr_valid && m_cr_ready) begin
      int e;
      e = exp_q[2].pop_front();
      check(int'(m_cr) == e, $sformatf("Cr %0d, expected %0d", m_cr, e));
    end
  end

  always @(negedge clk) begin
    m_y_ready  = bp ? ($urandom % 3) != 0 : 1'b1;
    m_cb_ready = bp ? ($urandom % 3) != 0 : 1'b1;
    m_cr_ready = bp ? ($urandom % 3) != 0 : 1'b1;
  end

  task automatic send(input rgb_t p);
    @(negedge clk);
    s_pix = p; s_valid = 1'b1;
    #1;
    while (!s_ready) begin @(negedge clk); #1; end
    @(posedge clk);
  endtask

  initial begin
    int t0;
    s_valid = 1'b0; s_pix = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 8; c++)
      send('{r: c[0] ? 8'hff : 8'h00, g: c[1] ? 8'hff : 8'h00, b: c[2] ? 8'hff : 8'h00});
    for (int i = 0; i < NPIX; i++) send(rgb_t'($urandom));
    // throughput with free outputs: one pixel per cycle
    @(negedge clk); s_valid = 1'b0; bp = 1'b0;
    repeat (3) @(negedge clk);
    t0 = n_taken;
    for (int i = 0; i < 100; i++) begin
      s_pix = rgb_t'($urandom); s_valid = 1'b1;
      @(negedge clk);
    end
    s_valid = 1'b0;
    check(n_taken - t0 == 100, $sformatf("100 pixels in 100 cycles, took %0d", n_taken - t0));
    repeat (5) @(negedge clk);
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0 && exp_q[2].size() == 0, "all results delivered");
    check(n_stall > 0, "input blocked by a full output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
