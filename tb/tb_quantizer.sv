// tb_quantizer: self-checking test of the quantization actor.
//
// A luminance and a chrominance instance receive the same blocks of
// coefficients: random values over the full DCT range, exact half-step
// values (which must round away from zero) and extremes. Their outputs
// must match the reference, which divides by the standard's tables (listed
// again in the reference, in row-major order) and reorders with an explicit
// zig-zag table. With a free output a block takes 128 cycles from first
// input to last output.
module tb_quantizer;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;

  localparam int NBLK = 30;

  logic clk = 1'b0, rst_n = 1'b0;
  coef_t s_data;
  logic s_valid;
  logic [1:0] s_ready;
  coef_t m_data [2];
  logic [1:0] m_valid, m_ready;

  quantizer #(.CHROMA(1'b0)) dut_l (.clk, .rst_n, .s_data, .s_valid(s_valid && s_ready[1]), .s_ready(s_ready[0]),
    .m_data(m_data[0]), .m_valid(m_valid[0]), .m_ready(m_ready[0]));
  quantizer #(.CHROMA(1'b1)) dut_c (.clk, .rst_n, .s_data, .s_valid(s_valid && s_ready[0]), .s_ready(s_ready[1]),
    .m_data(m_data[1]), .m_valid(m_valid[1]), .m_ready(m_ready[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  blk_t blocks[NBLK];
  int out_blk[2] = '{0, 0}, out_idx[2] = '{0, 0};
  int cyc = 0, first_in = -1, last_out = -1;
  bit bp = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && s_valid && &s_ready && first_in < 0) first_in = cyc;
    for (int c = 0; c < 2; c++)
      if (rst_n && m_valid[c] && m_ready[c]) begin
        blk_t e;
        e = ref_quant(blocks[out_blk[c]], c == 1);
        check(int'(m_data[c]) == e[out_idx[c]],
              $sformatf("%s block %0d pos %0d: %0d, expected %0d", c ? "chroma" : "luma",
                        out_blk[c], out_idx[c], m_data[c], e[out_idx[c]]));
        if (c == 0 && out_blk[0] == 0 && out_idx[0] == 63) last_out = cyc;
        out_idx[c]++;
        if (out_idx[c] == 64) begin out_idx[c] = 0; out_blk[c]++; end
      end
    cyc++;
  end

  always @(negedge clk) begin
    m_ready[0] = bp ? ($urandom % 3) != 0 : 1'b1;
    m_ready[1] = bp ? ($urandom % 3) != 0 : 1'b1;
  end

  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++)
        case (b % 4)
          0: blocks[b][i] = int'($urandom % 2049) - 1024;
          1: blocks[b][i] = ((i % 2) ? -1 : 1) * int'(QL[i] / 2);    // half steps, luma
          2: blocks[b][i] = ((i % 2) ? 1 : -1) * int'(QC[i] / 2 + QC[i] * (i % 3));
          default: blocks[b][i] = (i % 2) ? 1023 : -1024;
        endcase
    s_valid = 1'b0; s_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      if (b == 2) bp = 1'b1;
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        s_data = coef_t'(blocks[b][i]); s_valid = 1'b1;
        #1;
        while (!(&s_ready)) begin @(negedge clk); #1; end
        @(posedge clk);
      end
      @(negedge clk); s_valid = 1'b0;
    end
    wait (out_blk[0] == NBLK && out_blk[1] == NBLK);
    check(last_out - first_in + 1 == 128,
          $sformatf("block latency %0d cycles, expected 128", last_out - first_in + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
