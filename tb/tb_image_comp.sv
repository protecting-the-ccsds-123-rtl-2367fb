// tb_image_comp: a random golden frame stream is replayed as the protected
// design's output, unchanged, with one data bit changed, one cycle late,
// and without its end-of-image flag; check_failed and check_finished must
// follow the rules worked out in the testbench.
module tb_image_comp;
  import selfcheck_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic clear, check_failed, check_finished;
  frame_beat_t dut_b, gold_b;
  logic [31:0] frames;
  int checks = 0, failures = 0;

  image_comp u_cmp (.clk, .clear, .dut(dut_b), .gold(gold_b), .check_failed, .check_finished, .frames);

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mode 0 same, 1 bit flip, 2 dut one cycle late, 3 dut without last
  task automatic run(int mode, int n);
    frame_beat_t g [$];
    for (int i = 0; i < n; i++) begin
      frame_beat_t b;
      b.valid = ($urandom_range(0, 3) != 0) || i == n - 1;
      b.data  = {$urandom, $urandom};
      b.last  = 0;
      g.push_back(b);
    end
    g[n-1].valid = 1; g[n-1].last = 1;
    g[n/2].valid = 1;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int i = 0; i <= n; i++) begin
      gold_b = (i < n) ? g[i] : '0;
      if (mode == 2) dut_b = (i > 0) ? g[i-1] : '0;
      else dut_b = gold_b;
      if (mode == 1 && i == n / 2 && dut_b.valid) dut_b.data[3] = ~dut_b.data[3];
      if (mode == 3) dut_b.last = 0;
      @(negedge clk);
    end
    gold_b = '0; dut_b = '0;
    @(negedge clk);
  endtask

  initial begin
    int nv;
    clear = 1; gold_b = '0; dut_b = '0;
    @(negedge clk);
    run(0, 30);
    expect_true(!check_failed && !check_finished, "identical streams");
    run(1, 31);
    expect_true(check_failed && !check_finished, "changed frame differs");
    run(2, 30);
    expect_true(check_failed && check_finished, "late output differs and ends after the golden image");
    run(3, 30);
    expect_true(check_failed && check_finished, "missing end flag");
    // a guaranteed-valid middle frame with a flipped bit
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    gold_b = '{valid: 1, last: 0, data: 64'h1234}; dut_b = gold_b; dut_b.data[0] = 1'b1;
    @(negedge clk);
    gold_b = '{valid: 1, last: 1, data: 64'h55}; dut_b = gold_b;
    @(negedge clk);
    gold_b = '0; dut_b = '0;
    @(negedge clk);
    expect_true(check_failed && !check_finished && frames == 2, "data difference only");
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
