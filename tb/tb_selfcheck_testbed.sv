// tb_selfcheck_testbed: end-to-end test of the protected compressor in its
// test setup, at reduced size (4 x 3 x 8 test pattern, 8 samples per frame).
//
// A behavioural compressor stand-in plays the core; a second, fault-free
// copy fed with the same accepted image samples plays the golden compressed
// image of the test setup. Expected frames are computed with tb_ref_pkg. The
// testbench emulates configuration upsets in the stand-in, answers
// reconfiguration requests (clearing the upset) and replays the image on a
// recompress request. Scenarios:
//   1 fault-free image and check (pass, check length measured);
//   2 two images back to back: the check requested after the first waits
//     until the image output (and any image already let in) has left the
//     core;
//   3 input bit 15 stuck at 0: the image never uses that bit, so its output
//     is correct, but the test pattern exposes the upset;
//   4 output stops during the check: timeout;
//   5 last frame corrupted: image monitor flags the image, both checkers fail,
//     reconfiguration and recompression follow;
//   6 end-of-image flag lost during the check: size error;
//   7 one timer copy disagrees with the other two: TMR mismatch;
//   8 end-of-image flag lost on the image: the golden image ends first,
//     and the check, waiting for that image to leave the core, times out.
// Each mechanism is counted and must occur at least once.
module tb_selfcheck_testbed;
  import selfcheck_pkg::*;
  import tb_ref_pkg::*;

  localparam int NX = 4, NY = 3, NZ = 8, ABS = 16, REL = 16;
  localparam int TO = 600, DEPTH = 64, RSTC = 4, FS = 8;
  localparam int G = NX * NY * NZ;
  localparam int INX = 2, INY = 2, INZ = 6, IMG_N = INX * INY * INZ;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

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
  logic [AW-1:0] ref_waddr;
  frame_t      ref_wdata;
  logic        reconfig_req, reconfig_done, recompress;
  phase_t      phase;
  logic        sc_to, sc_rfin, sc_rfail, sc_ffin, sc_ffail, tmr_error;
  logic        chk_done, chk_pass, chk_fail, img_done, drained;
  logic        check_failed, check_finished;
  logic [31:0] check_frames;
  int unsigned fault_mode, fault_arg;
  logic        gold_ready_unused;

  selfcheck_testbed #(
    .NX(NX), .NY(NY), .NZ(NZ), .ABS_ERR(ABS), .REL_ERR(REL),
    .TIMEOUT_CYCLES(TO), .REF_DEPTH(DEPTH), .RST_CYCLES(RSTC)
  ) dut (
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

  ccsds_core_model #(.FRAME_SAMPLES(FS), .STALL_PERIOD(5)) u_core (
    .clk, .rst(core_rst), .cfg(core_cfg), .in_valid(core_valid),
    .in_sample(core_sample), .in_ready(core_ready), .out(core_out),
    .fault_mode, .fault_arg
  );

  ccsds_core_model #(.FRAME_SAMPLES(FS), .STALL_PERIOD(0)) u_gold (
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

  // ------------------------------------------------------------ image source
  function automatic sample_t img_pix(int k, int i);
    return 16'((k * 1237 + i * 97 + (i * i) % 31) & 16'h7FFF);
  endfunction

  int img_k = 0, img_idx = 0, to_feed = 0;
  int out_k_q[$];
  always_comb begin
    img_cfg.nx = NX_W'(INX);
    img_cfg.ny = NY_W'(INY);
    img_cfg.nz = NZ_W'(INZ);
    img_cfg.max_abs_err = '0;
    img_cfg.max_rel_err = '0;
    img_valid  = (to_feed > 0);
    img_sample = img_pix(img_k, img_idx);
  end

  int recompress_cnt = 0;
  always @(posedge clk) begin
    if (recompress) begin
      img_k   <= img_k - 1;
      img_idx <= 0;
      to_feed <= to_feed + 1;
      recompress_cnt++;
    end else if (img_valid && img_ready) begin
      if (img_idx == IMG_N - 1) begin
        img_idx <= 0;
        img_k   <= img_k + 1;
        to_feed <= to_feed - 1;
        out_k_q.push_back(img_k);
      end else begin
        img_idx <= img_idx + 1;
      end
    end
    if (core_rst) out_k_q.delete();
  end

  // ----------------------------------------------- stored output checking
  frame_t got[$];
  int img_ok = 0, img_bad = 0;
  always @(posedge clk) begin
    if (core_rst) got.delete();
    else if (store_out.valid) begin
      got.push_back(store_out.data);
      if (store_out.last) begin
        logic [15:0] smp[$];
        logic [63:0] exp_f[$];
        int k;
        smp.delete();
        k = out_k_q.size() > 0 ? out_k_q.pop_front() : -1;
        for (int i = 0; i < IMG_N; i++) smp.push_back(img_pix(k, i));
        model_compress(smp, 1, FS, exp_f);
        if (got == exp_f) img_ok++;
        else begin
          img_bad++;
          $display("image %0d stored wrong: %0d frames, %0d expected", k, got.size(), exp_f.size());
        end
        got.delete();
      end
    end
  end

  // ------------------------------------------- emulated reconfiguration
  int reconfig_cnt = 0;
  bit forcing = 0;
  initial begin
    reconfig_done = 1'b0;
    forever begin
      @(negedge clk);
      if (reconfig_req) begin
        repeat (20) @(posedge clk);
        @(negedge clk);
        fault_mode = 0;
        if (forcing) begin
          release dut.u_module_a.g_tmr[1].u_timer.timeout;
          forcing = 0;
        end
        reconfig_done = 1'b1;
        reconfig_cnt++;
        @(negedge clk);
        reconfig_done = 1'b0;
      end
    end
  end

  // upset injected when the image has left the core, before the check
  int unsigned pend_mode = 0, pend_arg = 0;
  always @(posedge clk)
    if (store_out.valid && store_out.last && pend_mode != 0) begin
      fault_mode <= pend_mode;
      fault_arg  <= pend_arg;
      pend_mode  <= 0;
    end

  // ------------------------------------------------ mechanism counters
  int n_pass = 0, n_fail = 0, n_drain = 0, n_timeout = 0, n_ref_fail = 0;
  int n_full_fail = 0, n_tmr = 0, n_stall = 0, n_cmp_failed = 0, n_cmp_fin = 0;
  int n_masked = 0, n_size = 0, n_flush_to = 0;
  int chk_t0 = 0, cyc = 0, last_dur = 0;
  always @(negedge clk) begin
    cyc++;
    if (dut.u_module_a.u_ctrl.chk_start) chk_t0 = cyc;
    if (chk_done) last_dur = cyc - chk_t0;
    if (chk_done && chk_pass) n_pass++;
    if (chk_done && chk_fail) n_fail++;
    if (drained) n_drain++;
    if (core_valid && !core_ready) n_stall++;
  end

  task automatic wait_cycles(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic wait_phase(phase_t p, int limit);
    int i = 0;
    while (phase != p && i < limit) begin
      @(negedge clk);
      i++;
    end
  endtask

  task automatic wait_chk_done(int limit);
    int i = 0;
    @(negedge clk);
    while (!chk_done && i < limit) begin
      @(negedge clk);
      i++;
    end
    expect_true(chk_done, "check finished in time");
  endtask

  // ------------------------------------------------------------ scenarios
  logic [15:0] gsmp[$];
  logic [63:0] gfr[$];
  int ok0, bad0;

  initial begin
    rst = 1'b1;
    fault_mode = 0;
    fault_arg  = 0;
    ref_we = 1'b0;
    ref_waddr = '0;
    ref_wdata = '0;
    golden_samples(NX, NY, NZ, gsmp);
    model_compress(gsmp, ABS + 1, FS, gfr);
    exp_words = 32'(gfr.size());
    exp_last  = gfr[gfr.size() - 1];
    wait_cycles(3);
    foreach (gfr[i]) begin
      @(negedge clk);
      ref_we = 1'b1;
      ref_waddr = AW'(i);
      ref_wdata = gfr[i];
    end
    @(negedge clk);
    ref_we = 1'b0;
    rst = 1'b0;

    // 1: fault-free image and check
    @(negedge clk) to_feed = 1;
    wait_chk_done(2000);
    expect_true(chk_pass && !chk_fail, "S1 check passes");
    expect_true(sc_rfin && sc_ffin && !sc_rfail && !sc_ffail && !sc_to, "S1 flags");
    wait_cycles(2);
    $display("S1 check length %0d cycles (pattern %0d samples, timer %0d)", last_dur, G, TO);
    expect_true(last_dur >= G && last_dur < TO, "S1 check length within timer budget");
    expect_true(phase == PH_COMPRESS, "S1 back to compress");
    expect_true(img_ok == 1 && img_bad == 0, "S1 stored image correct");
    expect_true(!check_failed && !check_finished, "S1 image monitor quiet");

    // 2: next image enters the core while the check is requested
    ok0 = n_drain;
    @(negedge clk) to_feed = 2;
    wait_chk_done(3000);
    expect_true(chk_pass, "S2 check passes after draining");
    expect_true(n_drain == ok0 + 1, "S2 check waited for the images in flight");
    // the second image either slipped in before the check (and was drained
    // with the first) or was held back and gets a check of its own
    begin
      int i = 0;
      while (img_ok < 3 && i < 2000) begin @(negedge clk); i++; end
    end
    wait_cycles(5);
    if (phase != PH_COMPRESS) begin
      wait_chk_done(3000);
      expect_true(chk_pass, "S2 second image's check passes");
    end
    expect_true(img_ok == 3 && img_bad == 0, "S2 both images stored correctly");

    // 3: upset masked for images, caught by the pattern
    @(negedge clk);
    fault_mode = 1;
    fault_arg  = 15;
    ok0 = img_ok;
    to_feed = 1;
    wait_chk_done(3000);
    $display("S3 pass=%0d fail=%0d rf=%0d ff=%0d to=%0d ok=%0d bad=%0d", chk_pass, chk_fail, sc_rfail, sc_ffail, sc_to, img_ok, img_bad);
    expect_true(chk_fail && sc_ffail && !sc_to, "S3 full check fails first and ends the check");
    expect_true(img_ok == ok0 + 1 && !check_failed, "S3 image itself was not damaged");
    if (chk_fail && img_ok == ok0 + 1) n_masked++;
    wait_phase(PH_RECOMPRESS, 200);
    expect_true(phase == PH_RECOMPRESS, "S3 reconfigured and recompressing");
    wait_phase(PH_COMPRESS, 2000);
    wait_cycles(20);
    expect_true(phase == PH_COMPRESS && img_ok == ok0 + 2, "S3 image recompressed correctly");

    // 4: output stops during the check
    @(negedge clk);
    pend_mode = 2;
    pend_arg  = 3;
    to_feed = 1;
    wait_chk_done(3000);
    expect_true(chk_fail && sc_to && !sc_rfin && !sc_ffin, "S4 timeout");
    if (sc_to) n_timeout++;
    wait_phase(PH_COMPRESS, 3000);
    expect_true(phase == PH_COMPRESS, "S4 recovered");

    // 5: final frame corrupted, on the image and on the pattern
    @(negedge clk);
    fault_mode = 4;
    fault_arg  = 7;
    ok0 = img_ok;
    bad0 = img_bad;
    to_feed = 1;
    wait_chk_done(3000);
    expect_true(chk_fail && sc_rfail && sc_ffail && sc_rfin && sc_ffin, "S5 both checkers fail");
    expect_true(check_failed && !check_finished, "S5 image monitor sees the damage");
    expect_true(img_bad == bad0 + 1, "S5 damaged image reached storage");
    if (sc_rfail) n_ref_fail++;
    if (sc_ffail) n_full_fail++;
    if (check_failed) n_cmp_failed++;
    wait_phase(PH_COMPRESS, 3000);
    wait_cycles(20);
    expect_true(img_ok == ok0 + 1 && !check_failed, "S5 recompressed image correct");

    // 6: end-of-image flag lost during the check
    @(negedge clk);
    pend_mode = 3;
    pend_arg  = 0;
    to_feed = 1;
    wait_chk_done(3000);
    expect_true(chk_fail && sc_rfail && sc_ffail && !sc_to, "S6 size error detected");
    if (sc_rfail) n_size++;
    wait_phase(PH_COMPRESS, 3000);

    // 7: one timer copy disagrees
    wait_cycles(3);
    @(negedge clk);
    forcing = 1;
    force dut.u_module_a.g_tmr[1].u_timer.timeout = 1'b1;
    @(negedge clk);
    expect_true(tmr_error && !sc_to, "S7 mismatch flagged, vote unchanged");
    if (tmr_error) n_tmr++;
    wait_phase(PH_RECONFIG, 20);
    expect_true(phase == PH_RECONFIG, "S7 reconfiguration requested");
    wait_phase(PH_RECOMPRESS, 200);
    wait_phase(PH_COMPRESS, 2000);
    expect_true(!tmr_error && phase == PH_COMPRESS, "S7 recovered");

    // 8: end-of-image flag lost on the image: the check waits for an image
    // end that never comes, the timer ends the wait, and the image is redone
    @(negedge clk);
    fault_mode = 3;
    ok0 = img_ok;
    to_feed = 1;
    wait_chk_done(3000);
    expect_true(chk_fail && sc_to && !sc_rfin && !sc_ffin, "S8 flush wait timed out");
    expect_true(check_finished && check_failed, "S8 golden image ended first");
    if (check_finished) n_cmp_fin++;
    if (chk_fail && sc_to) n_flush_to++;
    wait_phase(PH_RECOMPRESS, 200);
    wait_phase(PH_COMPRESS, 2000);
    wait_cycles(20);
    expect_true(img_ok == ok0 + 1 && !check_finished && !check_failed,
                "S8 image recompressed after reconfiguration");

    // every mechanism must have happened
    expect_true(n_pass >= 2, "mechanism: passed check");
    expect_true(n_drain >= 1, "mechanism: wait for image in flight");
    expect_true(n_masked >= 1, "mechanism: upset masked for the image detected");
    expect_true(n_timeout >= 1, "mechanism: timeout");
    expect_true(n_ref_fail >= 1, "mechanism: last-frame mismatch");
    expect_true(n_full_fail >= 1, "mechanism: full-output mismatch");
    expect_true(n_size >= 1, "mechanism: size mismatch");
    expect_true(n_tmr >= 1, "mechanism: TMR disagreement");
    expect_true(n_flush_to >= 1, "mechanism: image never finishing");
    expect_true(reconfig_cnt >= 4, "mechanism: reconfiguration");
    expect_true(recompress_cnt >= 4, "mechanism: recompression");
    expect_true(n_stall >= 1, "mechanism: core back-pressure");
    expect_true(n_cmp_failed >= 1, "mechanism: image monitor check_failed");
    expect_true(n_cmp_fin >= 1, "mechanism: image monitor check_finished");
    $display("mechanisms: pass=%0d fail=%0d drain=%0d masked=%0d timeout=%0d ref_fail=%0d full_fail=%0d size=%0d tmr=%0d reconfig=%0d recompress=%0d stall=%0d cmp_failed=%0d cmp_finished=%0d flush_timeout=%0d",
             n_pass, n_fail, n_drain, n_masked, n_timeout, n_ref_fail, n_full_fail,
             n_size, n_tmr, reconfig_cnt, recompress_cnt, n_stall, n_cmp_failed, n_cmp_fin, n_flush_to);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
