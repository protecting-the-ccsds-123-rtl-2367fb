// tb_fault_campaign: a small, exhaustive fault-injection campaign on the
// complete test setup, organised like the published campaigns: three sensor
// images, each compressed with different error limits, and for each image
// every upset of a fixed list is injected once. The published settings are
// kept: image 1 with max absolute error 1024 and max relative error 4096,
// image 2 with 1 and 0, image 3 with 16 and 16 (images 1 and 3 have the same
// content).
//
// Two copies of the test setup run side by side, one built with the
// full-output check only (method A) and one with the last-frame check only
// (method B), each with its own faulty core stand-in and its own fault-free
// copy producing the golden compressed image. One injection is:
//   reset, set the upset, compress the image, let the scheduled self-check
//   run, then read the image monitor (check_failed / check_finished) and
//   the check result of each build.
// The upsets are those the core stand-in can emulate: none, an input bit
// stuck at 0 (each of the 16 bits), output stopping after k frames, a lost
// end-of-image flag, a flipped bit in the last frame, and one corrupted
// output frame that does not spread (frames 0 to 19).
//
// For every injection the testbench predicts from tb_ref_pkg, without the
// RTL, whether the stored image is damaged and whether each method must
// detect the upset, and checks the hardware against that. At the end it
// prints, per image, the rows of the published result tables: injections,
// errors at the output image, detected and undetected errors per method,
// plus the upsets caught although the image was correct.
//
// The numbers describe the stand-in, not a CCSDS 123.0-B-2 core on an FPGA;
// only the bookkeeping and the mechanisms are the ones measured in the
// published campaign.
module tb_fault_campaign;
  import selfcheck_pkg::*;
  import tb_ref_pkg::*;

  localparam int NX = 4, NY = 3, NZ = 8, ABS_G = 16, REL_G = 16;
  localparam int TO = 600, DEPTH = 64, RSTC = 4, FS = 8;
  localparam int AW = $clog2(DEPTH);
  localparam int INX = 4, INY = 4, INZ = 8, IMG_N = INX * INY * INZ;
  localparam int NB = 2;                  // build 0: method A, build 1: method B
  localparam int NIMG = 3;
  localparam int IMG_ABS[NIMG] = '{1024, 1, 16};
  localparam int IMG_REL[NIMG] = '{4096, 0, 16};
  localparam int IMG_SCENE[NIMG] = '{0, 1, 0};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst;
  logic [31:0] exp_words;
  frame_t      exp_last, ref_wdata;
  logic        ref_we;
  logic [AW-1:0] ref_waddr;
  int unsigned fault_mode = 0, fault_arg = 0;
  core_cfg_t   img_cfg;
  int          cur_scene = 0;
  int checks = 0, failures = 0;

  logic [NB-1:0] chk_done, chk_fail, chk_pass, check_failed, check_finished, sc_to;
  logic [NB-1:0] feeding, ended;
  logic          start_feed;

  function automatic sample_t scene_pix(int scene, int i);
    int x, y, z;
    z = i % INZ;
    x = (i / INZ) % INX;
    y = i / (INZ * INX);
    // 12-bit radiance-like values: a smooth spectrum plus a little texture
    if (scene == 0) return 16'((900 + 150 * z + 40 * x + 25 * y + (i * 37) % 23) & 12'hFFF);
    else            return 16'((2400 - 90 * z + 60 * x - 35 * y + (i * 53) % 41) & 12'hFFF);
  endfunction

  for (genvar b = 0; b < NB; b++) begin : g_build
    logic        img_valid, img_ready, core_rst, core_valid, core_ready, gold_ready_unused;
    core_cfg_t   core_cfg;
    sample_t     img_sample, core_sample;
    frame_beat_t core_out, store_out, gold_img;
    logic        reconfig_req, recompress, tmr_error, img_done, drained;
    logic        rfin, rfail, ffin, ffail;
    logic [31:0] check_frames;
    phase_t      phase;
    int          idx;

    selfcheck_testbed #(
      .NX(NX), .NY(NY), .NZ(NZ), .ABS_ERR(ABS_G), .REL_ERR(REL_G),
      .TIMEOUT_CYCLES(TO), .REF_DEPTH(DEPTH), .RST_CYCLES(RSTC),
      .USE_REF_CHECK(b == 1), .USE_FULL_CHECK(b == 0)
    ) dut (
      .clk, .rst, .img_cfg, .img_valid, .img_sample, .img_ready,
      .core_rst, .core_cfg, .core_valid, .core_sample, .core_ready, .core_out,
      .store_out, .exp_words, .exp_last, .ref_we, .ref_waddr, .ref_wdata,
      .reconfig_req, .reconfig_done(1'b0), .recompress, .phase,
      .selfcheck_timeout(sc_to[b]), .selfcheck_ref_finished(rfin),
      .selfcheck_ref_failed(rfail), .selfcheck_full_finished(ffin),
      .selfcheck_full_failed(ffail), .tmr_error,
      .chk_done(chk_done[b]), .chk_pass(chk_pass[b]), .chk_fail(chk_fail[b]),
      .img_done, .drained,
      .gold_img, .check_failed(check_failed[b]), .check_finished(check_finished[b]),
      .check_frames
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

    // image source: one image per injection
    always_comb begin
      img_valid  = feeding[b];
      img_sample = scene_pix(cur_scene, idx);
    end
    always @(posedge clk)
      if (rst) begin
        idx        <= 0;
        feeding[b] <= 1'b0;
      end else if (start_feed) begin
        feeding[b] <= 1'b1;
      end else if (img_valid && img_ready) begin
        idx <= idx + 1;
        if (idx == IMG_N - 1) feeding[b] <= 1'b0;
      end

    always @(posedge clk) ended[b] <= rst ? 1'b0 : ended[b] | chk_done[b];

    // both builds must be in the same state as far as the image goes
    always @(negedge clk)
      if (!rst && (tmr_error || recompress)) begin
        failures++;
        $display("FAIL: build %0d unexpected TMR error or recompress (t=%0t)", b, $time);
      end
  end

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // --------------------------------------------------- fault list
  typedef struct { int unsigned mode; int unsigned arg; } upset_t;
  upset_t upsets[$];

  function automatic void build_upsets();
    upsets.push_back('{0, 0});
    for (int b = 0; b < 16; b++) upsets.push_back('{1, b});
    for (int k = 0; k < 20; k++) upsets.push_back('{2, k});
    upsets.push_back('{3, 0});
    for (int b = 0; b < 64; b += 4) upsets.push_back('{4, b});
    for (int k = 0; k < 20; k++) upsets.push_back('{5, k});
  endfunction

  // ------------------------------------------------- prediction
  // frames a faulty stand-in emits for a sample list (modes 0, 1, 4, 5; the
  // output of modes 2 and 3 is judged from the frame count alone)
  function automatic void faulty_frames(ref logic [15:0] smp[$], input int unsigned qstep,
                                        input upset_t u, ref logic [63:0] fr[$]);
    logic [15:0] s2[$];
    foreach (smp[i]) s2.push_back((u.mode == 1) ? (smp[i] & ~(16'd1 << u.arg)) : smp[i]);
    model_compress(s2, qstep, FS, fr);
    if (u.mode == 4) fr[fr.size() - 1] ^= (64'd1 << u.arg);
    if (u.mode == 5 && u.arg < fr.size()) fr[u.arg] ^= 64'd1;
  endfunction

  // does the upset change the image output; does it make the image's end
  // never reach the core output (the check then fails on its flush watchdog)
  function automatic void predict_image(ref logic [15:0] smp[$], input int unsigned qstep,
                                        input upset_t u, output bit damaged,
                                        output bit never_ends);
    logic [63:0] good[$], bad[$];
    model_compress(smp, qstep, FS, good);
    never_ends = (u.mode == 3) || (u.mode == 2 && u.arg < good.size());
    if (never_ends) damaged = 1'b1;
    else if (u.mode == 2) damaged = 1'b0;
    else begin
      faulty_frames(smp, qstep, u, bad);
      damaged = (bad != good);
    end
  endfunction

  // does the check of a build with method A (full) or B (last frame) fail
  function automatic bit predict_check(ref logic [15:0] gs[$], input upset_t u, input bit full);
    logic [63:0] good[$], bad[$];
    model_compress(gs, ABS_G + 1, FS, good);
    if (u.mode == 3) return 1'b1;                         // size rule
    if (u.mode == 2) return u.arg < good.size();         // watchdog
    faulty_frames(gs, ABS_G + 1, u, bad);
    if (full) return bad != good;
    return bad[bad.size() - 1] != good[good.size() - 1];
  endfunction

  // ------------------------------------------------------- campaign
  logic [15:0] gsmp[$], ismp[$];
  logic [63:0] gfr[$];
  int n_inj[NIMG], n_err[NIMG], n_det[NIMG][NB], n_undet[NIMG][NB], n_clean_det[NIMG][NB];

  initial begin
    rst = 1'b1;
    start_feed = 1'b0;
    ref_we = 1'b0; ref_waddr = '0; ref_wdata = '0;
    build_upsets();
    golden_samples(NX, NY, NZ, gsmp);
    model_compress(gsmp, ABS_G + 1, FS, gfr);
    exp_words = 32'(gfr.size());
    exp_last  = gfr[gfr.size() - 1];
    foreach (gfr[i]) begin
      @(negedge clk);
      ref_we = 1'b1; ref_waddr = AW'(i); ref_wdata = gfr[i];
    end
    @(negedge clk);
    ref_we = 1'b0;

    for (int im = 0; im < NIMG; im++) begin
      cur_scene = IMG_SCENE[im];
      img_cfg = '{nx: NX_W'(INX), ny: NY_W'(INY), nz: NZ_W'(INZ),
                  max_abs_err: ERR_W'(IMG_ABS[im]), max_rel_err: ERR_W'(IMG_REL[im])};
      ismp.delete();
      for (int i = 0; i < IMG_N; i++) ismp.push_back(scene_pix(cur_scene, i));
      n_inj[im] = 0; n_err[im] = 0;
      for (int b = 0; b < NB; b++) begin
        n_det[im][b] = 0; n_undet[im][b] = 0; n_clean_det[im][b] = 0;
      end

      foreach (upsets[k]) begin
        automatic bit dmg, never_ends;
        automatic bit want_fail[NB];
        automatic int i = 0;
        automatic upset_t u = upsets[k];
        predict_image(ismp, IMG_ABS[im] + 1, u, dmg, never_ends);
        for (int b = 0; b < NB; b++)
          want_fail[b] = never_ends || predict_check(gsmp, u, b == 0);

        @(negedge clk);
        rst = 1'b1;
        fault_mode = u.mode;
        fault_arg  = u.arg;
        repeat (3) @(negedge clk);
        rst = 1'b0;
        start_feed = 1'b1;
        @(negedge clk);
        start_feed = 1'b0;
        while (ended != '1 && i < 4 * TO) begin
          @(negedge clk);
          i++;
        end
        expect_true(ended == '1, $sformatf("image %0d upset %0d/%0d: both checks ended",
                                           im + 1, u.mode, u.arg));
        n_inj[im]++;
        for (int b = 0; b < NB; b++) begin
          automatic bit err = check_failed[b] || check_finished[b];
          expect_true(err == dmg, $sformatf("image %0d upset %0d/%0d build %0d: image damage %0b, predicted %0b",
                                            im + 1, u.mode, u.arg, b, err, dmg));
          expect_true(chk_fail[b] == want_fail[b] && chk_pass[b] == !want_fail[b],
                      $sformatf("image %0d upset %0d/%0d method %s: check failed %0b, predicted %0b",
                                im + 1, u.mode, u.arg, b == 0 ? "A" : "B", chk_fail[b], want_fail[b]));
          if (err && chk_fail[b])  n_det[im][b]++;
          if (err && !chk_fail[b]) n_undet[im][b]++;
          if (!err && chk_fail[b]) n_clean_det[im][b]++;
        end
        if (check_failed[0] || check_finished[0]) n_err[im]++;
      end
    end

    for (int im = 0; im < NIMG; im++) begin
      $display("image %0d (max abs error %0d, max rel error %0d):", im + 1, IMG_ABS[im], IMG_REL[im]);
      $display("  total injections                 %4d", n_inj[im]);
      $display("  errors at the output image       %4d  %6.2f%%", n_err[im],
               100.0 * n_err[im] / n_inj[im]);
      for (int b = 0; b < NB; b++) begin
        $display("  detected errors method %s         %4d  %6.2f%%", b == 0 ? "A" : "B",
                 n_det[im][b], n_err[im] ? 100.0 * n_det[im][b] / n_err[im] : 0.0);
        $display("  undetected errors method %s       %4d  %6.2f%%", b == 0 ? "A" : "B",
                 n_undet[im][b], n_err[im] ? 100.0 * n_undet[im][b] / n_err[im] : 0.0);
        $display("  caught with a correct image (%s)  %4d", b == 0 ? "A" : "B",
                 n_clean_det[im][b]);
      end
    end
    // the stronger method never detects less
    for (int im = 0; im < NIMG; im++)
      expect_true(n_det[im][0] >= n_det[im][1], $sformatf("image %0d: method A >= method B", im + 1));
    // the heavier the compression, the more upsets the image masks
    expect_true(n_err[0] <= n_err[2], "image 1 (1024) shows no more damage than image 3 (16)");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
