// selfcheck_module_a: the protected compressor ("Module A") without the
// compressor core itself.
//
// Idea: a configuration upset in an FPGA changes the compressor's logic until
// the device is reconfigured, and the compressor's adaptive models carry any
// error to the end of its output. So the core is checked by compressing a
// small, fixed synthetic image whose compressed form is known in advance;
// any difference means the core is corrupted and the FPGA must be
// reconfigured.
//
// Parts and data flow:
//   golden_source      generates the test pattern and its configuration;
//   input_mux          feeds the core from the image or the pattern;
//   selfcheck_control  sequences a check and raises reconfig_req on failure;
//   check_timer  x3    flags a check that runs past its known length;
//   ref_check    x3    method B: output size and final 64-bit frame;
//   full_check   x3    method A: every frame against ref_mem;
//   tmr_vote           majority of each triplicated output; any
//                      disagreement counts as a failure;
//   ref_mem            reference frames of method A (not triplicated:
//                      block RAM has its own ECC).
// The core's output reaches the storage port only while the core works on
// the sensor image (the output gate); during a check it goes only to the
// checkers. The core is outside this module: its ports (core_*) are
// brought out.
//
// The structure, the two comparison methods, the timer and the
// triplication of timer and comparators are the published design. The
// expected size and final frame arrive on exp_words/exp_last (constants of
// a given pattern); the reference memory is loaded through ref_we/ref_waddr/
// ref_wdata before the first check. Both are this design's interface choice.
//
// USE_REF_CHECK and USE_FULL_CHECK select which comparison methods are
// built (both by default; the published area and power figures compare a
// build with each method alone). A method that is left out reports
// finished and never failed, and without the full check no reference memory
// is built (its write port is then ignored).
//
// Timing: `check` is a one-cycle request. The check starts when no image is
// inside the core, and ends with a one-cycle chk_done, chk_pass or chk_fail
// giving the result. The selfcheck flags (timeout, *_finished, *_failed)
// are cleared at the start of a check and hold until the next one; the
// timeout flag is also cleared when the timer starts guarding an image
// flush (see selfcheck_control).
module selfcheck_module_a
  import selfcheck_pkg::*;
#(
  parameter int unsigned NX             = 32,
  parameter int unsigned NY             = 26,
  parameter int unsigned NZ             = 512,
  parameter int unsigned ABS_ERR        = 16,
  parameter int unsigned REL_ERR        = 16,
  parameter int unsigned TIMEOUT_CYCLES = 440_000,
  parameter int unsigned REF_DEPTH      = 8192,
  parameter int unsigned CNT_W          = 32,
  parameter bit          USE_REF_CHECK  = 1'b1,
  parameter bit          USE_FULL_CHECK = 1'b1,
  localparam int unsigned REF_AW        = $clog2(REF_DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              check,
  // sensor image
  input  core_cfg_t         img_cfg,
  input  logic              img_valid,
  input  sample_t           img_sample,
  output logic              img_ready,
  // compressor core
  output core_cfg_t         core_cfg,
  output logic              core_valid,
  output sample_t           core_sample,
  input  logic              core_ready,
  input  frame_beat_t       core_out,
  // compressed image to storage
  output frame_beat_t       store_out,
  // expected result of the test pattern
  input  logic [CNT_W-1:0]  exp_words,
  input  frame_t            exp_last,
  input  logic              ref_we,
  input  logic [REF_AW-1:0] ref_waddr,
  input  frame_t            ref_wdata,
  // self-check signals
  output logic              selfcheck_timeout,
  output logic              selfcheck_ref_finished,
  output logic              selfcheck_ref_failed,
  output logic              selfcheck_full_finished,
  output logic              selfcheck_full_failed,
  output logic              tmr_error,
  output logic              chk_busy,
  output logic              chk_done,
  output logic              chk_pass,
  output logic              chk_fail,
  output logic              reconfig_req,
  output logic              img_done,
  output logic              drained
);
  // ---------------------------------------------------------------- inputs
  core_cfg_t gold_cfg;
  sample_t   gold_sample;
  logic      gold_valid, gold_ready, gold_last, gold_busy;
  logic      sel_golden, hold, out_enable, chk_start, flush_start;

  golden_source #(
    .NX(NX), .NY(NY), .NZ(NZ), .ABS_ERR(ABS_ERR), .REL_ERR(REL_ERR)
  ) u_golden (
    .clk, .rst, .start(chk_start), .ready(gold_ready), .valid(gold_valid),
    .sample(gold_sample), .last(gold_last), .busy(gold_busy), .cfg(gold_cfg)
  );

  input_mux u_mux (
    .sel_golden, .hold,
    .img_cfg, .img_valid, .img_sample, .img_ready,
    .gold_cfg, .gold_valid, .gold_sample, .gold_ready,
    .core_cfg, .core_valid, .core_sample, .core_ready
  );

  // ------------------------------------------------- triplicated checkers
  logic [2:0]        t_timeout, t_ref_fin, t_ref_fail, t_full_fin, t_full_fail;
  logic [REF_AW-1:0] t_rd_addr [3];
  logic [REF_AW-1:0] rd_addr;
  frame_t            rd_data;
  logic              timer_stop;
  logic [3:0]        mism;

  logic              timer_start;

  // the timer guards the check and, before it, the flush of an image still
  // inside the core; the checkers' results only stop it during the check
  always_comb begin
    timer_start = chk_start || flush_start;
    timer_stop  = sel_golden && ((selfcheck_ref_finished && selfcheck_full_finished)
                                 || selfcheck_ref_failed || selfcheck_full_failed);
  end

  for (genvar i = 0; i < 3; i++) begin : g_tmr
    logic unused_run, unused_ref_act, unused_full_act;
    logic [CNT_W-1:0] unused_count;

    check_timer #(.CNT_W(CNT_W), .TIMEOUT_CYCLES(TIMEOUT_CYCLES)) u_timer (
      .clk, .rst, .start(timer_start), .stop(timer_stop),
      .timeout(t_timeout[i]), .running(unused_run), .count(unused_count)
    );

    if (USE_REF_CHECK) begin : g_ref
      ref_check #(.CNT_W(CNT_W)) u_ref (
        .clk, .rst, .start(chk_start), .out_beat(core_out),
        .exp_words, .exp_last,
        .finished(t_ref_fin[i]), .failed(t_ref_fail[i]), .active(unused_ref_act)
      );
    end else begin : g_no_ref
      always_comb begin
        t_ref_fin[i]   = 1'b1;
        t_ref_fail[i]  = 1'b0;
        unused_ref_act = 1'b0;
      end
    end

    if (USE_FULL_CHECK) begin : g_full
      full_check #(.CNT_W(CNT_W), .ADDR_W(REF_AW)) u_full (
        .clk, .rst, .start(chk_start), .out_beat(core_out), .exp_words,
        .rd_addr(t_rd_addr[i]), .rd_data,
        .finished(t_full_fin[i]), .failed(t_full_fail[i]), .active(unused_full_act)
      );
    end else begin : g_no_full
      always_comb begin
        t_full_fin[i]   = 1'b1;
        t_full_fail[i]  = 1'b0;
        t_rd_addr[i]    = '0;
        unused_full_act = 1'b0;
      end
    end
  end

  tmr_vote #(.W(1)) u_vote_timer (
    .a(t_timeout[0]), .b(t_timeout[1]), .c(t_timeout[2]),
    .y(selfcheck_timeout), .mismatch(mism[0])
  );
  tmr_vote #(.W(2)) u_vote_ref (
    .a({t_ref_fin[0], t_ref_fail[0]}), .b({t_ref_fin[1], t_ref_fail[1]}),
    .c({t_ref_fin[2], t_ref_fail[2]}),
    .y({selfcheck_ref_finished, selfcheck_ref_failed}), .mismatch(mism[1])
  );
  tmr_vote #(.W(2)) u_vote_full (
    .a({t_full_fin[0], t_full_fail[0]}), .b({t_full_fin[1], t_full_fail[1]}),
    .c({t_full_fin[2], t_full_fail[2]}),
    .y({selfcheck_full_finished, selfcheck_full_failed}), .mismatch(mism[2])
  );
  tmr_vote #(.W(REF_AW)) u_vote_addr (
    .a(t_rd_addr[0]), .b(t_rd_addr[1]), .c(t_rd_addr[2]),
    .y(rd_addr), .mismatch(mism[3])
  );

  always_comb tmr_error = |mism;

  if (USE_FULL_CHECK) begin : g_ref_mem
    ref_mem #(.DEPTH(REF_DEPTH)) u_ref_mem (
      .clk, .we(ref_we), .waddr(ref_waddr), .wdata(ref_wdata),
      .raddr(rd_addr), .rdata(rd_data)
    );
  end else begin : g_no_ref_mem
    logic unused_mem_port;
    assign unused_mem_port = ^{ref_we, ref_waddr, ref_wdata, rd_addr, rd_data};
    assign rd_data = '0;
  end

  if (!USE_REF_CHECK) begin : g_no_exp_last
    logic unused_exp_last;
    assign unused_exp_last = ^exp_last;
  end

  // --------------------------------------------------------------- control
  selfcheck_control u_ctrl (
    .clk, .rst, .check,
    .img_nx(img_cfg.nx), .img_ny(img_cfg.ny), .img_nz(img_cfg.nz),
    .img_accept(img_valid && img_ready),
    .core_out_valid(core_out.valid), .core_out_last(core_out.last),
    .ref_finished(selfcheck_ref_finished), .ref_failed(selfcheck_ref_failed),
    .full_finished(selfcheck_full_finished), .full_failed(selfcheck_full_failed),
    .timeout(selfcheck_timeout), .tmr_err(tmr_error),
    .sel_golden, .hold, .out_enable, .chk_start, .flush_start, .chk_busy, .chk_done,
    .chk_pass, .chk_fail, .reconfig_req, .img_done, .drained
  );

  // ----------------------------------------------------------- output gate
  always_comb begin
    store_out       = core_out;
    store_out.valid = core_out.valid && out_enable;
  end

  // gold_last and gold_busy only mark the end of the pattern inside the
  // generator; the checkers judge the end from the core's output.
  logic unused_gold;
  always_comb unused_gold = gold_last ^ gold_busy;
endmodule
