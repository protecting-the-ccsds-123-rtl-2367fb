// tb_selfcheck_testbed_full: one full capture cycle of the protected
// compressor with every parameter of the design at its default: the
// 32 x 26 x 512 test pattern (425,984 samples, 6,656 frames of 64 samples
// from the behavioural core stand-in), the 440,000-cycle timer and the
// 8,192-frame reference memory.
//
// It compresses a small image, runs a self-check that must pass within the
// timer budget (2.2 ms at 200 MHz), then injects an upset that corrupts the
// final frame and follows the failed check through reconfiguration, reset
// and recompression of the image.
module tb_selfcheck_testbed_full;
  import selfcheck_pkg::*;
  import tb_ref_pkg::*;

  localparam int NX = 32, NY = 26, NZ = 512, ABS = 16, FS = 64;
  localparam int TO = 440_000;
  localparam int G = NX * NY * NZ;
  localparam int INX = 4, INY = 4, INZ = 16, IMG_N = INX * INY * INZ;

  logic clk = 1'b0;
  always #2.5 clk = ~clk;   // 200 MHz

  logic        rst;
  core_cfg_t   img_cfg;
  logic        img_valid, img_ready;
  sample_t     img_sample;
  logic        core_rst, core_valid, core_ready;
  core_cfg_t   core_cfg;
  sample_t     core_sample;
  frame_beat_t core_out, store_out, gold_img;
  logic [31:0] exp_words;
  frame_t      exp_last;
  logic        ref_we;
  logic [12:0] ref_waddr;
  frame_t      ref_wdata;
  logic        reconfig_req, reconfig_done, recompress;
  phase_t      phase;
  logic        sc_to, sc_rfin, sc_rfail, sc_ffin, sc_ffail, tmr_error;
  logic        chk_done, chk_pass, chk_fail, img_done, drained;
  logic        check_failed, check_finished;
  logic [31:0] check_frames;
  int unsigned fault_mode = 0, fault_arg = 0;
  logic        gold_ready_unused;

  selfcheck_testbed dut (
    .clk, .rst, .img_cfg, .img_valid, .img_sample, .img_ready,
    .core_rst, .core_cfg, .core_valid, .core_sample, .core_ready, .core_out,
    .store_out, .exp_words, .exp_last, .ref_we, .ref_waddr, .ref_wdata,
    .reconfig_req, .reconfig_done, .recompress, .phase,
    .selfcheck_timeout(sc_to), .selfcheck_ref_finished(sc_rfin),
    .selfcheck_ref_failed(sc_rfail), .selfcheck_full_finished(sc_ffin),
    .selfcheck_full_failed(sc_ffail), .tmr_error,
    .chk_done, .chk_pass, .chk_fail, .img_done, .drained,
    .gold_img, .check_failed, .check_finished, .check_frames
  );

  ccsds_core_model #(.FRAME_SAMPLES(FS)) u_core (
    .clk, .rst(core_rst), .cfg(core_cfg), .in_valid(core_valid),
    .in_sample(core_sample), .in_ready(core_ready), .out(core_out),
    .fault_mode, .fault_arg
  );

  ccsds_core_model #(.FRAME_SAMPLES(FS)) u_gold (
    .clk, .rst(core_rst), .cfg(img_cfg), .in_valid(img_valid && img_ready),
    .in_sample(img_sample), .in_ready(gold_ready_unused), .out(gold_img),
    .fault_mode(0), .fault_arg(0)
  );

  int checks = 0, failures = 0;
  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // image source: one image per request, replayed on recompress
  int img_idx = 0, to_feed = 0, recompress_cnt = 0;
  always_comb begin
    img_cfg.nx = NX_W'(INX);
    img_cfg.ny = NY_W'(INY);
    img_cfg.nz = NZ_W'(INZ);
    img_cfg.max_abs_err = '0;
    img_cfg.max_rel_err = '0;
    img_valid  = (to_feed > 0);
    img_sample = 16'((img_idx * 193) & 16'h7FFF);
  end
  always @(posedge clk) begin
    if (recompress) begin
      img_idx <= 0;
      to_feed <= to_feed + 1;
      recompress_cnt++;
    end else if (img_valid && img_ready) begin
      if (img_idx == IMG_N - 1) begin
        img_idx <= 0;
        to_feed <= to_feed - 1;
      end else img_idx <= img_idx + 1;
    end
  end

  // emulated reconfiguration: clears the upset
  int reconfig_cnt = 0;
  initial begin
    reconfig_done = 1'b0;
    forever begin
      @(negedge clk);
      if (reconfig_req) begin
        repeat (100) @(posedge clk);
        @(negedge clk);
        fault_mode = 0;
        reconfig_done = 1'b1;
        reconfig_cnt++;
        @(negedge clk);
        reconfig_done = 1'b0;
      end
    end
  end

  // upset injected once the image has left the core, before the check
  int unsigned pend_mode = 0;
  always @(posedge clk)
    if (store_out.valid && store_out.last && pend_mode != 0) begin
      fault_mode <= pend_mode;
      fault_arg  <= 13;
      pend_mode  <= 0;
    end

  int cyc = 0, chk_t0 = 0, last_dur = 0, n_img = 0;
  always @(negedge clk) begin
    cyc++;
    if (dut.u_module_a.u_ctrl.chk_start) chk_t0 = cyc;
    if (chk_done) last_dur = cyc - chk_t0;
    if (img_done) n_img++;
  end

  task automatic wait_chk_done(int limit);
    int i = 0;
    @(negedge clk);
    while (!chk_done && i < limit) begin
      @(negedge clk);
      i++;
    end
    expect_true(chk_done, "check finished");
  endtask

  task automatic wait_phase(phase_t p, int limit);
    int i = 0;
    while (phase != p && i < limit) begin
      @(negedge clk);
      i++;
    end
  endtask

  logic [15:0] gsmp[$];
  logic [63:0] gfr[$];
  initial begin
    rst = 1'b1;
    ref_we = 1'b0;
    ref_waddr = '0;
    ref_wdata = '0;
    golden_samples(NX, NY, NZ, gsmp);
    model_compress(gsmp, ABS + 1, FS, gfr);
    exp_words = 32'(gfr.size());
    exp_last  = gfr[gfr.size() - 1];
    expect_true(gfr.size() == G / FS && gfr.size() <= 8192, "pattern fits the reference memory");
    foreach (gfr[i]) begin
      @(negedge clk);
      ref_we = 1'b1;
      ref_waddr = 13'(i);
      ref_wdata = gfr[i];
    end
    @(negedge clk);
    ref_we = 1'b0;
    rst = 1'b0;

    // fault-free capture cycle
    @(negedge clk) to_feed = 1;
    wait_chk_done(TO + 10_000);
    expect_true(chk_pass && sc_rfin && sc_ffin && !sc_to && !sc_rfail && !sc_ffail,
                "fault-free check passes");
    @(negedge clk);
    @(negedge clk);
    $display("check length %0d cycles = %0d us at 200 MHz (timer %0d cycles)",
             last_dur, last_dur / 200, TO);
    expect_true(last_dur >= G && last_dur < TO, "check within the 2.2 ms budget");
    expect_true(!check_failed && !check_finished && check_frames == IMG_N / FS,
                "stored image equals the golden image");

    // upset before the next check: final frame corrupted
    @(negedge clk);
    pend_mode = 4;
    to_feed = 1;
    wait_chk_done(TO + 10_000);
    expect_true(chk_fail && sc_rfail && sc_ffail && !sc_to, "corrupted pattern detected");
    wait_phase(PH_RECOMPRESS, 1000);
    $display("phase %s reconfig %0d", phase.name(), reconfig_cnt);
    expect_true(phase == PH_RECOMPRESS && reconfig_cnt == 1, "reconfigured");
    wait_phase(PH_COMPRESS, 5000);
    expect_true(phase == PH_COMPRESS && recompress_cnt == 1 && n_img == 3,
                "image compressed again");
    expect_true(!check_failed && !check_finished, "recompressed image correct");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
