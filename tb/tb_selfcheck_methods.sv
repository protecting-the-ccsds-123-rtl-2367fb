// tb_selfcheck_methods: the protected design built three ways side by side,
// with both comparison methods (index 0), with the last-frame check alone
// (index 1) and with the full-output check alone (index 2). Each build has
// its own copy of the core stand-in; all three receive the same emulated
// upset and the same check request. Expected outcomes:
//   - no upset: every build passes;
//   - corrupted final frame, stopped output, missing end flag, stuck input
//     bit: every build fails;
//   - one middle frame corrupted without spreading: only the builds with the
//     full-output check fail; the last-frame check alone lets it through.
// A method that is not built must report finished and never failed.
module tb_selfcheck_methods;
  import selfcheck_pkg::*;
  import tb_ref_pkg::*;
  localparam int NX = 3, NY = 2, NZ = 4, ABS = 2, FS = 4, TO = 200, DEPTH = 16;
  localparam int NB = 3;
  localparam bit USE_REF[NB]  = '{1'b1, 1'b1, 1'b0};
  localparam bit USE_FULL[NB] = '{1'b1, 1'b0, 1'b1};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst, check;
  logic [31:0] exp_words;
  frame_t      exp_last, ref_wdata;
  logic        ref_we;
  logic [3:0]  ref_waddr;
  int unsigned fault_mode = 0, fault_arg = 0;
  int checks = 0, failures = 0;

  logic [NB-1:0] sc_to, sc_rfin, sc_rfail, sc_ffin, sc_ffail, tmr_error;
  logic [NB-1:0] chk_done, chk_pass, chk_fail, reconfig_req, img_ready;

  for (genvar b = 0; b < NB; b++) begin : g_build
    core_cfg_t   core_cfg;
    sample_t     core_sample;
    logic        core_valid, core_ready, chk_busy, img_done, drained;
    frame_beat_t core_out, store_out;

    selfcheck_module_a #(.NX(NX), .NY(NY), .NZ(NZ), .ABS_ERR(ABS), .REL_ERR(0),
                         .TIMEOUT_CYCLES(TO), .REF_DEPTH(DEPTH),
                         .USE_REF_CHECK(USE_REF[b]), .USE_FULL_CHECK(USE_FULL[b])) dut (
      .clk, .rst, .check,
      .img_cfg('{ny: 1, nx: 1, nz: 1, max_abs_err: 0, max_rel_err: 0}),
      .img_valid(1'b0), .img_sample(16'h0000), .img_ready(img_ready[b]),
      .core_cfg, .core_valid, .core_sample, .core_ready, .core_out, .store_out,
      .exp_words, .exp_last, .ref_we, .ref_waddr, .ref_wdata,
      .selfcheck_timeout(sc_to[b]), .selfcheck_ref_finished(sc_rfin[b]),
      .selfcheck_ref_failed(sc_rfail[b]), .selfcheck_full_finished(sc_ffin[b]),
      .selfcheck_full_failed(sc_ffail[b]), .tmr_error(tmr_error[b]), .chk_busy,
      .chk_done(chk_done[b]), .chk_pass(chk_pass[b]), .chk_fail(chk_fail[b]),
      .reconfig_req(reconfig_req[b]), .img_done, .drained);

    ccsds_core_model #(.FRAME_SAMPLES(FS)) u_core (
      .clk, .rst, .cfg(core_cfg), .in_valid(core_valid), .in_sample(core_sample),
      .in_ready(core_ready), .out(core_out), .fault_mode, .fault_arg);

    // test frames must never reach storage
    always @(negedge clk)
      if (!rst && store_out.valid) begin
        failures++;
        $display("FAIL: build %0d passed a frame to storage (t=%0t)", b, $time);
      end
  end

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // chk_done is a pulse and the builds end at different times: latch it
  logic [NB-1:0] ended;
  always @(posedge clk) ended <= check ? '0 : ended | chk_done;

  // request a check in every build and wait until all have ended
  task automatic do_check();
    int i = 0;
    @(negedge clk);
    check = 1;
    @(negedge clk);
    check = 0;
    while (ended != '1 && i < 500) begin
      @(negedge clk);
      i++;
    end
    expect_true(ended == '1, "every build ended its check");
  endtask

  task automatic reset_all();
    @(negedge clk);
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
  endtask

  // run one upset in every build and compare the pass/fail pattern
  task automatic run_case(int unsigned mode, int unsigned arg, logic [NB-1:0] want_fail,
                          string what);
    reset_all();
    fault_mode = mode;
    fault_arg  = arg;
    do_check();
    for (int b = 0; b < NB; b++) begin
      expect_true(chk_fail[b] == want_fail[b] && chk_pass[b] == !want_fail[b],
                  $sformatf("%s: build %0d %s", what, b, want_fail[b] ? "fails" : "passes"));
      expect_true(reconfig_req[b] == want_fail[b],
                  $sformatf("%s: build %0d reconfiguration request", what, b));
    end
    fault_mode = 0;
  endtask

  logic [15:0] gs[$];
  logic [63:0] gf[$];
  initial begin
    rst = 1; check = 0; ref_we = 0; ref_waddr = '0; ref_wdata = '0;
    golden_samples(NX, NY, NZ, gs);
    model_compress(gs, ABS + 1, FS, gf);
    exp_words = 32'(gf.size());
    exp_last = gf[gf.size() - 1];
    foreach (gf[i]) begin
      @(negedge clk);
      ref_we = 1; ref_waddr = 4'(i); ref_wdata = gf[i];
    end
    @(negedge clk);
    ref_we = 0;

    run_case(0, 0, 3'b000, "no upset");
    // a build without a method reports that method finished and clean
    expect_true(sc_ffin[1] && !sc_ffail[1], "last-frame-only build: full check reads finished");
    expect_true(sc_rfin[2] && !sc_rfail[2], "full-only build: last-frame check reads finished");
    expect_true(sc_rfin[0] && sc_ffin[0] && !sc_to[0], "both-methods build: both finished");

    run_case(4, 17, 3'b111, "final frame corrupted");
    expect_true(sc_rfail[0] && sc_rfail[1] && sc_ffail[2], "final frame: each built method flags it");

    run_case(5, 1, 3'b101, "middle frame corrupted");
    expect_true(sc_ffail[0] && !sc_rfail[0], "middle frame: seen by the full check only");
    expect_true(!sc_rfail[1] && sc_rfin[1], "middle frame: last-frame check alone misses it");

    run_case(2, 2, 3'b111, "output stops");
    expect_true(sc_to == '1, "output stops: every build times out");

    run_case(3, 0, 3'b111, "end flag missing");
    expect_true(sc_to == '0, "end flag missing: judged on size, not by the timer");

    run_case(1, 15, 3'b111, "input bit 15 stuck at 0");
    expect_true(tmr_error == '0 && img_ready == '0, "no voter disagreement, no image accepted");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
