// tb_cycle_timer: self-checking test of the cycle timer.
//
// Checks that the counter advances by one per clock, that a start/stop pair
// N cycles apart reports N + 1 (both edges counted), that a stop without a
// start is ignored, and that a new start clears elapsed_valid.
module tb_cycle_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, stop;
  logic [31:0] count, elapsed;
  logic elapsed_valid;

  cycle_timer #(.WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] c0;
    start = 1'b0; stop = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    c0 = count;
    repeat (37) @(negedge clk);
    check(count == c0 + 37, "counter advances once per cycle");
    // stop with no start
    stop = 1'b1; @(negedge clk); stop = 1'b0;
    check(!elapsed_valid, "stop without start ignored");
    for (int n = 1; n <= 300; n = n * 3 + 1) begin
      start = 1'b1; @(negedge clk); start = 1'b0;
      check(!elapsed_valid, "start clears elapsed_valid");
      repeat (n - 1) @(negedge clk);
      stop = 1'b1; @(negedge clk); stop = 1'b0;
      check(elapsed_valid && elapsed == 32'(n + 1),
            $sformatf("elapsed %0d for stop %0d cycles after start", elapsed, n));
      repeat (5) @(negedge clk);
      check(elapsed_valid && elapsed == 32'(n + 1), "elapsed held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
