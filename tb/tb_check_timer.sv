// tb_check_timer: the timeout rises exactly TIMEOUT_CYCLES cycles after
// start when nothing stops the timer, never when stop comes earlier, and a
// new start clears it.
module tb_check_timer;
  localparam int T = 50;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, start, stop, timeout, running;
  logic [31:0] count;
  int checks = 0, failures = 0;

  check_timer #(.TIMEOUT_CYCLES(T)) dut (.clk, .rst, .start, .stop, .timeout, .running, .count);

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n;
    rst = 1; start = 0; stop = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // run out
    start = 1;
    @(negedge clk);
    start = 0;
    n = 0;  // edges since the edge that sampled start
    while (!timeout && n < 3 * T) begin @(negedge clk); n++; end
    expect_true(timeout && n == T, $sformatf("timeout after %0d cycles, expected %0d", n, T));
    expect_true(!running, "stopped at timeout");
    repeat (5) @(negedge clk);
    expect_true(timeout, "timeout holds");
    // restart clears; stop before the limit
    start = 1;
    @(negedge clk);
    start = 0;
    expect_true(!timeout && running, "restart clears");
    repeat (T - 5) @(negedge clk);
    stop = 1;
    @(negedge clk);
    stop = 0;
    repeat (2 * T) @(negedge clk);
    expect_true(!timeout && !running, "no timeout after stop");
    // stop on the last cycle still wins
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (T - 2) @(negedge clk);
    stop = 1;
    @(negedge clk);
    stop = 0;
    repeat (5) @(negedge clk);
    expect_true(!timeout, "stop in the final cycle prevents timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
