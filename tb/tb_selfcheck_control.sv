// tb_selfcheck_control: drives the control's inputs directly and checks its
// sequence: an immediate check that passes, a check that must wait for an
// image in flight, failures by comparator, by timeout and by a TMR
// disagreement (each leading to the held error state until reset), the
// image-done pulse, and an image that never leaves the core (the watchdog
// is started for the flush and its timeout fails the check).
module tb_selfcheck_control;
  import selfcheck_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, check, img_accept, core_out_valid, core_out_last;
  logic ref_finished, ref_failed, full_finished, full_failed, timeout, tmr_err;
  logic sel_golden, hold, out_enable, chk_start, flush_start, chk_busy, chk_done, chk_pass, chk_fail;
  logic reconfig_req, img_done, drained;
  logic [NX_W-1:0] img_nx;
  logic [NY_W-1:0] img_ny;
  logic [NZ_W-1:0] img_nz;
  int checks = 0, failures = 0;

  selfcheck_control dut (.*);

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic clear_inputs();
    check = 0; img_accept = 0; core_out_valid = 0; core_out_last = 0;
    ref_finished = 0; ref_failed = 0; full_finished = 0; full_failed = 0;
    timeout = 0; tmr_err = 0;
  endtask

  task automatic do_reset();
    rst = 1;
    clear_inputs();
    repeat (2) @(negedge clk);
    rst = 0;
    #1;
    expect_true(!sel_golden && out_enable && !hold && !reconfig_req && !chk_busy, "idle after reset");
  endtask

  task automatic start_check();
    check = 1;
    @(negedge clk);
    check = 0;
    expect_true(chk_start && sel_golden && !out_enable, "check starts at once when idle");
    @(negedge clk);
    expect_true(!chk_start && sel_golden && chk_busy, "check running");
  endtask

  initial begin
    img_nx = 2; img_ny = 1; img_nz = 2;
    do_reset();

    // 1: immediate check that passes
    start_check();
    repeat (5) @(negedge clk);
    ref_finished = 1;
    @(negedge clk);
    expect_true(!chk_done && sel_golden, "one checker finished is not enough");
    full_finished = 1;
    @(negedge clk);
    expect_true(chk_done && chk_pass && !chk_fail && !sel_golden && out_enable, "pass ends the check");
    @(negedge clk);
    expect_true(!chk_done, "chk_done is a pulse");
    clear_inputs();

    // 2: image in flight
    img_accept = 1;
    repeat (2) @(negedge clk);
    img_accept = 0;
    check = 1;
    @(negedge clk);
    check = 0;
    expect_true(!sel_golden && !chk_start && !hold && out_enable, "waits while image enters");
    img_accept = 1;
    @(negedge clk);
    #1;
    expect_true(img_done, "image done pulse on the last input sample");
    expect_true(!flush_start, "no flush timer while the image still enters");
    @(negedge clk);
    img_accept = 0;
    #1;
    expect_true(hold && !sel_golden, "next image held back after input complete");
    expect_true(flush_start, "flush timer started once the image is in");
    @(negedge clk);
    expect_true(!flush_start, "flush_start is a pulse");
    repeat (2) @(negedge clk);
    expect_true(!chk_start, "still waiting for the last frame");
    core_out_valid = 1; core_out_last = 1;
    @(negedge clk);
    core_out_valid = 0; core_out_last = 0;
    expect_true(chk_start && drained, "check starts after the image left the core");
    @(negedge clk);
    ref_finished = 1; full_finished = 1;
    @(negedge clk);
    expect_true(chk_done && chk_pass, "drained check passes");
    clear_inputs();

    // 3: comparator failure -> error held until reset
    start_check();
    repeat (3) @(negedge clk);
    full_failed = 1;
    @(negedge clk);
    expect_true(chk_done && chk_fail && !chk_pass, "comparator failure ends the check");
    full_failed = 0;
    repeat (4) @(negedge clk);
    expect_true(reconfig_req && hold && !out_enable && sel_golden, "error state held");
    check = 1;
    @(negedge clk);
    check = 0;
    @(negedge clk);
    expect_true(!chk_start && reconfig_req, "no new check in the error state");
    do_reset();

    // 4: timeout
    start_check();
    timeout = 1;
    @(negedge clk);
    expect_true(chk_done && chk_fail && reconfig_req, "timeout fails the check");
    do_reset();

    // 5: image that never leaves the core: the flush wait times out
    img_accept = 1;
    repeat (4) @(negedge clk);
    img_accept = 0;
    check = 1;
    @(negedge clk);
    check = 0;
    #1;
    expect_true(flush_start && hold && !sel_golden, "flush timer started for the stuck image");
    repeat (5) @(negedge clk);
    expect_true(!chk_done && !reconfig_req, "still waiting");
    timeout = 1;
    @(negedge clk);
    expect_true(chk_done && chk_fail && reconfig_req && !chk_start, "flush timeout fails the check");
    do_reset();

    // 6: TMR disagreement while idle
    tmr_err = 1;
    @(negedge clk);
    tmr_err = 0;
    expect_true(reconfig_req && !chk_done, "TMR disagreement requests reconfiguration");
    do_reset();

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
