// tb_level_shift_dct: self-checking test of the level-shift/DCT actor.
//
// Random, flat, extreme and gradient blocks are transformed. Every
// coefficient must equal the fixed-point reference exactly and lie within
// 2 of the real-valued DCT of the level-shifted block. With a free output a
// block must take 192 cycles from its first sample to its last coefficient
// (64 load, 64 row pass, 64 output); with random back-pressure the results
// must be unchanged.
module tb_level_shift_dct;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;

  localparam int NBLK = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  sample_t s_data;
  logic s_valid, s_ready;
  coef_t m_data;
  logic m_valid, m_ready;

  level_shift_dct dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  blk_t blocks[NBLK];
  int   out_blk = 0, out_idx = 0;
  int   cyc = 0, first_in_cyc[NBLK], last_out_cyc[NBLK];
  int   in_blk = 0, in_idx = 0;
  bit   bp = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && s_valid && s_ready) begin
      if (in_idx == 0) first_in_cyc[in_blk] = cyc;
      in_idx++;
      if (in_idx == 64) begin in_idx = 0; in_blk++; end
    end
    if (rst_n && m_valid && m_ready) begin
      blk_t e;
      real r;
      e = ref_fdct(blocks[out_blk]);
      r = real_dct(blocks[out_blk], out_idx / 8, out_idx % 8);
      check(int'(m_data) == e[out_idx],
            $sformatf("block %0d coef %0d: %0d, expected %0d", out_blk, out_idx, m_data, e[out_idx]));
      check(real'(m_data) - r <= 2.0 && r - real'(m_data) <= 2.0, $sformatf("coef %0d far from real DCT %f", m_data, r));
      if (out_idx == 63) last_out_cyc[out_blk] = cyc;
      out_idx++;
      if (out_idx == 64) begin out_idx = 0; out_blk++; end
    end
    cyc++;
  end

  always @(negedge clk) m_ready = bp ? ($urandom % 3) != 0 : 1'b1;

  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++)
        case (b % 5)
          0: blocks[b][i] = $urandom % 256;
          1: blocks[b][i] = 255;
          2: blocks[b][i] = 0;
          3: blocks[b][i] = ((i / 8 + i % 8) % 2) ? 255 : 0;
          default: blocks[b][i] = (i % 8) * 32 + (i / 8);
        endcase
    s_valid = 1'b0; s_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      if (b == NBLK / 2) bp = 1'b1;
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        s_data = sample_t'(blocks[b][i]); s_valid = 1'b1;
        #1;
        while (!s_ready) begin @(negedge clk); #1; end
        @(posedge clk);
      end
      @(negedge clk); s_valid = 1'b0;
    end
    wait (out_blk == NBLK);
    // first block was sent back to back into an idle actor with a free output
    check(last_out_cyc[0] - first_in_cyc[0] + 1 == 192,
          $sformatf("block latency %0d cycles, expected 192", last_out_cyc[0] - first_in_cyc[0] + 1));
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
