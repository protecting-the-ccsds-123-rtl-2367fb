// tb_selfcheck_module_a: the protected design with the behavioural core
// stand-in, at a 3 x 2 x 4 test pattern. Checks that the image reaches
// storage and the pattern never does, that a fault-free check passes with
// both methods, that a corrupted final frame fails both, that a stalled
// core times out, that a core ending its stream early fails on size, and
// that a disagreeing comparator copy is out-voted but flagged.
module tb_selfcheck_module_a;
  import selfcheck_pkg::*;
  import tb_ref_pkg::*;
  localparam int NX = 3, NY = 2, NZ = 4, ABS = 2, FS = 4, TO = 200, DEPTH = 16;
  localparam int G = NX * NY * NZ;
  localparam int IMG_N = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst, check, img_valid, img_ready, core_valid, core_ready;
  core_cfg_t   img_cfg, core_cfg;
  sample_t     img_sample, core_sample;
  frame_beat_t core_out, store_out;
  logic [31:0] exp_words;
  frame_t      exp_last, ref_wdata;
  logic        ref_we;
  logic [3:0]  ref_waddr;
  logic        sc_to, sc_rfin, sc_rfail, sc_ffin, sc_ffail, tmr_error;
  logic        chk_busy, chk_done, chk_pass, chk_fail, reconfig_req, img_done, drained;
  int unsigned fault_mode = 0, fault_arg = 0;
  int checks = 0, failures = 0;

  selfcheck_module_a #(.NX(NX), .NY(NY), .NZ(NZ), .ABS_ERR(ABS), .REL_ERR(0),
                       .TIMEOUT_CYCLES(TO), .REF_DEPTH(DEPTH)) dut (
    .clk, .rst, .check, .img_cfg, .img_valid, .img_sample, .img_ready,
    .core_cfg, .core_valid, .core_sample, .core_ready, .core_out, .store_out,
    .exp_words, .exp_last, .ref_we, .ref_waddr, .ref_wdata,
    .selfcheck_timeout(sc_to), .selfcheck_ref_finished(sc_rfin),
    .selfcheck_ref_failed(sc_rfail), .selfcheck_full_finished(sc_ffin),
    .selfcheck_full_failed(sc_ffail), .tmr_error, .chk_busy, .chk_done,
    .chk_pass, .chk_fail, .reconfig_req, .img_done, .drained);

  ccsds_core_model #(.FRAME_SAMPLES(FS), .STALL_PERIOD(3)) u_core (
    .clk, .rst, .cfg(core_cfg), .in_valid(core_valid), .in_sample(core_sample),
    .in_ready(core_ready), .out(core_out), .fault_mode, .fault_arg);

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // image feeder
  int to_feed = 0, idx = 0;
  always_comb begin
    img_cfg = '{ny: 1, nx: 4, nz: 4, max_abs_err: 0, max_rel_err: 0};
    img_valid = to_feed > 0;
    img_sample = 16'(idx * 331 + 5);
  end
  always @(posedge clk)
    if (img_valid && img_ready) begin
      if (idx == IMG_N - 1) begin idx <= 0; to_feed <= to_feed - 1; end
      else idx <= idx + 1;
    end

  // storage monitor
  frame_t stored[$];
  always @(posedge clk) if (!rst && store_out.valid) stored.push_back(store_out.data);

  task automatic do_check(int limit);
    int i = 0;
    @(negedge clk);
    check = 1;
    @(negedge clk);
    check = 0;
    while (!chk_done && i < limit) begin @(negedge clk); i++; end
    expect_true(chk_done, "check ended");
  endtask

  task automatic reset_all();
    @(negedge clk);
    rst = 1; fault_mode = 0;
    repeat (2) @(negedge clk);
    rst = 0;
  endtask

  logic [15:0] gs[$], is[$];
  logic [63:0] gf[$], imf[$];
  initial begin
    rst = 1; check = 0; ref_we = 0; ref_waddr = '0; ref_wdata = '0;
    golden_samples(NX, NY, NZ, gs);
    model_compress(gs, ABS + 1, FS, gf);
    for (int i = 0; i < IMG_N; i++) is.push_back(16'(i * 331 + 5));
    model_compress(is, 1, FS, imf);
    exp_words = 32'(gf.size());
    exp_last = gf[gf.size() - 1];
    foreach (gf[i]) begin
      @(negedge clk);
      ref_we = 1; ref_waddr = 4'(i); ref_wdata = gf[i];
    end
    @(negedge clk);
    ref_we = 0; rst = 0;

    // image, then a passing check; pattern frames must not reach storage
    to_feed = 1;
    while (to_feed > 0) @(negedge clk);
    do_check(500);
    expect_true(chk_pass && sc_rfin && sc_ffin && !sc_rfail && !sc_ffail && !sc_to && !tmr_error,
                "fault-free check passes");
    expect_true(stored == imf, "storage received exactly the compressed image");

    // corrupted final frame
    fault_mode = 4; fault_arg = 40;
    do_check(500);
    expect_true(chk_fail && sc_rfail && sc_ffail && !sc_to && reconfig_req, "final frame corruption");
    reset_all();

    // core stops emitting
    fault_mode = 2; fault_arg = 2;
    do_check(500);
    expect_true(chk_fail && sc_to && !sc_rfin && !sc_ffin, "timeout");
    reset_all();

    // end-of-image flag lost
    fault_mode = 3;
    do_check(500);
    expect_true(chk_fail && sc_rfail && sc_ffail && sc_rfin && sc_ffin && !sc_to, "size error");
    reset_all();

    // one ref_check copy disagrees: out-voted but flagged
    force dut.g_tmr[2].g_ref.u_ref.failed = 1'b1;
    #1;
    expect_true(tmr_error && !sc_rfail, "single copy out-voted and flagged");
    @(negedge clk);
    expect_true(reconfig_req, "disagreement requests reconfiguration");
    release dut.g_tmr[2].g_ref.u_ref.failed;
    reset_all();
    do_check(500);
    expect_true(chk_pass && !reconfig_req, "passes again after reset");
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
