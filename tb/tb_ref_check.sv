// tb_ref_check: method B checker. Streams of random frames are sent with
// gaps; the checker must pass the correct stream and flag a wrong final
// frame, a stream that ends early and a stream whose final frame lacks the
// end-of-image flag. Frames in the middle of the stream are not compared.
module tb_ref_check;
  import selfcheck_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst, start, finished, failed, active;
  frame_beat_t beat;
  logic [31:0] exp_words;
  frame_t      exp_last;
  int checks = 0, failures = 0;

  ref_check dut (.clk, .rst, .start, .out_beat(beat), .exp_words, .exp_last,
                 .finished, .failed, .active);

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mode 0 good, 1 wrong last frame, 2 early end, 3 no last flag,
  // 4 middle frame changed (must still pass)
  task automatic run(int n, int mode);
    frame_t fr [];
    fr = new[n];
    foreach (fr[i]) fr[i] = {$urandom, $urandom};
    exp_words = 32'(n);
    exp_last  = fr[n-1];
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(0, 2) == 0) begin beat = '0; @(negedge clk); end
      beat.valid = 1;
      beat.data  = fr[i];
      beat.last  = (i == n - 1) && mode != 3;
      if (mode == 1 && i == n - 1) beat.data[5] = ~beat.data[5];
      if (mode == 4 && i == n / 2) beat.data[9] = ~beat.data[9];
      if (mode == 2 && i == n - 3) begin
        beat.last = 1;
        @(negedge clk);
        break;
      end
      @(negedge clk);
    end
    beat = '0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    rst = 1; start = 0; beat = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    run(20, 0);
    expect_true(finished && !failed && !active, "good stream passes");
    run(20, 1);
    expect_true(finished && failed, "wrong final frame fails");
    run(20, 0);
    expect_true(finished && !failed, "flags cleared by start");
    run(20, 2);
    expect_true(!finished && failed, "early end fails without finishing");
    run(20, 3);
    expect_true(finished && failed, "missing end flag fails");
    run(20, 4);
    expect_true(finished && !failed, "middle frames are not compared");
    run(1, 0);
    expect_true(finished && !failed, "single-frame stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
