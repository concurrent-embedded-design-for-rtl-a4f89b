// tb_fsl_fifo: self-checking test of the blocking FIFO channel.
//
// A random producer and a random consumer run against a scoreboard queue:
// every token must come out once, in order. The test also checks that the
// FIFO reports full after exactly DEPTH writes with no read (blocking
// write), that it reports empty when drained (blocking read), that a token
// written on one edge is readable right after it (one cycle of latency),
// and that level tracks the occupancy.
module tb_fsl_fifo;
  localparam int WIDTH = 32;
  localparam int DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [WIDTH-1:0] s_data, m_data;
  logic s_valid, s_ready, m_valid, m_ready;
  logic [$clog2(DEPTH):0] level;

  fsl_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] sb[$];
  int n_full = 0, n_empty = 0, n_moved = 0;
  bit random_phase = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // scoreboard on the rising edge, stimulus on the falling edge
  always @(posedge clk) if (rst_n) begin
    check(int'(level) == sb.size(), "level tracks occupancy");
    if (s_valid && s_ready) sb.push_back(s_data);
    if (m_valid && m_ready) begin
      logic [WIDTH-1:0] e;
      e = sb.pop_front();
      check(m_data == e, $sformatf("read 0x%08x, expected 0x%08x", m_data, e));
      n_moved++;
    end
    if (!s_ready) n_full++;
    if (!m_valid) n_empty++;
  end

  always @(negedge clk) if (random_phase) begin
    s_valid = ($urandom % 3) != 0;
    s_data  = $urandom;
    m_ready = ($urandom % 3) != 0;
  end

  initial begin
    s_valid = 1'b0; m_ready = 1'b0; s_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!m_valid && s_ready, "empty after reset");
    // fill without reading: full after exactly DEPTH writes
    for (int i = 0; i < DEPTH; i++) begin
      check(s_ready, "ready while not full");
      s_valid = 1'b1; s_data = 32'hA000_0000 + i;
      @(negedge clk);
      check(m_valid, "token readable one cycle after its write");
    end
    s_valid = 1'b0;
    check(!s_ready && level == DEPTH, "full after DEPTH writes");
    // drain
    m_ready = 1'b1;
    for (int i = 0; i < DEPTH; i++) @(negedge clk);
    m_ready = 1'b0;
    check(!m_valid && level == 0, "empty after draining");
    // random traffic
    random_phase = 1'b1;
    repeat (4000) @(negedge clk);
    random_phase = 1'b0;
    s_valid = 1'b0; m_ready = 1'b1;
    repeat (DEPTH + 2) @(negedge clk);
    check(sb.size() == 0, "all tokens delivered");
    check(n_moved > 2000 && n_full > 0 && n_empty > 0, "traffic saw full and empty");
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
