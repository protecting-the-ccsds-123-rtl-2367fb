// tb_test_control: the capture schedule. A passing check returns to
// compression; a failing check goes through reconfiguration (waiting for its
// acknowledge), a reset of RST_CYCLES cycles and a recompression; a
// reconfiguration request from the protected design is honoured while
// compressing.
module tb_test_control;
  import selfcheck_pkg::*;
  localparam int RC = 5;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, img_done, chk_done, chk_fail, a_err, reconfig_done;
  logic check, rst_a, reconfig_req, recompress;
  phase_t phase;
  int checks = 0, failures = 0;

  test_control #(.RST_CYCLES(RC)) dut (.*);

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic pulse_img_done();
    img_done = 1;
    @(negedge clk);
    img_done = 0;
  endtask

  task automatic finish_check(bit fail);
    chk_done = 1; chk_fail = fail;
    @(negedge clk);
    chk_done = 0; chk_fail = 0;
  endtask

  initial begin
    int n;
    rst = 1; img_done = 0; chk_done = 0; chk_fail = 0; a_err = 0; reconfig_done = 0;
    @(negedge clk);
    expect_true(rst_a, "reset passes to the protected design");
    @(negedge clk);
    rst = 0;
    #1;
    expect_true(phase == PH_COMPRESS && !rst_a && !check, "compressing after reset");
    // pass
    pulse_img_done();
    expect_true(check && phase == PH_CHECK_REQ, "check requested after the image");
    @(negedge clk);
    expect_true(!check && phase == PH_CHECK, "check is one cycle");
    repeat (5) @(negedge clk);
    finish_check(0);
    expect_true(phase == PH_COMPRESS && !reconfig_req, "pass returns to compression");
    // fail
    pulse_img_done();
    @(negedge clk);
    finish_check(1);
    expect_true(reconfig_req && phase == PH_RECONFIG, "failure requests reconfiguration");
    repeat (10) @(negedge clk);
    expect_true(reconfig_req, "waits for the configuration port");
    reconfig_done = 1;
    @(negedge clk);
    reconfig_done = 0;
    n = 0;
    while (rst_a) begin n++; @(negedge clk); end
    expect_true(n == RC, $sformatf("reset held %0d cycles, expected %0d", n, RC));
    expect_true(recompress && phase == PH_RECOMPRESS, "recompress requested");
    @(negedge clk);
    expect_true(!recompress, "recompress is a pulse");
    repeat (4) @(negedge clk);
    pulse_img_done();
    expect_true(phase == PH_COMPRESS && !check, "after recompression back to compressing");
    // request from the protected design while compressing
    a_err = 1;
    @(negedge clk);
    a_err = 0;
    expect_true(phase == PH_RECONFIG && reconfig_req, "protected design's request honoured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
