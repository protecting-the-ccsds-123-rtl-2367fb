// selfcheck_testbed: the protected compressor inside its test setup
// ("Module B"), the top level of this design.
//
// It joins three parts:
//   selfcheck_module_a  the protected design (self-check around the core);
//   test_control        the capture schedule: compress, check, and on a
//                       failure reconfigure, reset and recompress;
//   image_comp          compares the compressed image leaving the
//                       protected design with a golden compressed image, to
//                       tell whether an upset really damaged the output.
// What is outside the design is reached through ports: the CCSDS 123.0-B-2
// compressor core (core_*, including its reset core_rst), the sensor image
// (img_*), the image buffer that replays an image (recompress), the FPGA
// configuration port (reconfig_req / reconfig_done), the storage the
// compressed image goes to (store_out), the golden compressed image of the
// test setup (gold_img) and the expected result of the test pattern
// (exp_words, exp_last and the reference-memory write port).
//
// The reset of the protected design, of the core and of the image monitor
// is rst_a from test_control: the global reset or the reset after a
// reconfiguration. The parameters are those of selfcheck_module_a
// (including the choice of comparison methods) plus the reset length of
// test_control.
module selfcheck_testbed
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
  parameter int unsigned RST_CYCLES     = 16,
  parameter bit          USE_REF_CHECK  = 1'b1,
  parameter bit          USE_FULL_CHECK = 1'b1,
  localparam int unsigned REF_AW        = $clog2(REF_DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  // sensor image
  input  core_cfg_t         img_cfg,
  input  logic              img_valid,
  input  sample_t           img_sample,
  output logic              img_ready,
  // compressor core
  output logic              core_rst,
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
  // FPGA configuration port and image buffer
  output logic              reconfig_req,
  input  logic              reconfig_done,
  output logic              recompress,
  output phase_t            phase,
  // self-check signals
  output logic              selfcheck_timeout,
  output logic              selfcheck_ref_finished,
  output logic              selfcheck_ref_failed,
  output logic              selfcheck_full_finished,
  output logic              selfcheck_full_failed,
  output logic              tmr_error,
  output logic              chk_done,
  output logic              chk_pass,
  output logic              chk_fail,
  output logic              img_done,
  output logic              drained,
  // check signals of the test setup
  input  frame_beat_t       gold_img,
  output logic              check_failed,
  output logic              check_finished,
  output logic [CNT_W-1:0]  check_frames
);
  logic rst_a, check, a_err, chk_busy;

  test_control #(.RST_CYCLES(RST_CYCLES)) u_test_ctrl (
    .clk, .rst, .img_done, .chk_done, .chk_fail, .a_err, .reconfig_done,
    .check, .rst_a, .reconfig_req, .recompress, .phase
  );

  selfcheck_module_a #(
    .NX(NX), .NY(NY), .NZ(NZ), .ABS_ERR(ABS_ERR), .REL_ERR(REL_ERR),
    .TIMEOUT_CYCLES(TIMEOUT_CYCLES), .REF_DEPTH(REF_DEPTH), .CNT_W(CNT_W),
    .USE_REF_CHECK(USE_REF_CHECK), .USE_FULL_CHECK(USE_FULL_CHECK)
  ) u_module_a (
    .clk, .rst(rst_a), .check,
    .img_cfg, .img_valid, .img_sample, .img_ready,
    .core_cfg, .core_valid, .core_sample, .core_ready, .core_out,
    .store_out,
    .exp_words, .exp_last, .ref_we, .ref_waddr, .ref_wdata,
    .selfcheck_timeout, .selfcheck_ref_finished, .selfcheck_ref_failed,
    .selfcheck_full_finished, .selfcheck_full_failed, .tmr_error,
    .chk_busy, .chk_done, .chk_pass, .chk_fail, .reconfig_req(a_err),
    .img_done, .drained
  );

  image_comp #(.CNT_W(CNT_W)) u_image_comp (
    .clk, .clear(rst_a), .dut(store_out), .gold(gold_img),
    .check_failed, .check_finished, .frames(check_frames)
  );

  always_comb core_rst = rst_a;

  logic unused_busy;
  always_comb unused_busy = chk_busy;
endmodule
