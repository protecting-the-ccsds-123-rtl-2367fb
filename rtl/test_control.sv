// test_control: TEST CONTROL, the capture-cycle scheduler around the
// protected compressor.
//
// Within one capture period of the sensor it runs the schedule
//   COMPRESS -> CHECK -> (RECONFIGURE -> RECOMPRESS) -> slack,
// where the bracketed steps happen only when the check fails:
//   PH_COMPRESS    wait until the whole image has entered the core
//                  (img_done; the protected design lets the image's
//                  output finish before it starts the check);
//   PH_CHECK_REQ   pulse `check` to the protected design for one cycle;
//   PH_CHECK       wait for chk_done; a pass returns to PH_COMPRESS;
//                  a failure, or a reconfiguration request of the protected
//                  design (a_err) while compressing or checking, leads to
//                  PH_RECONFIG;
//   PH_RECONFIG    hold reconfig_req until the configuration port answers
//                  with reconfig_done;
//   PH_RESET       hold rst_a (reset of the protected design and its core)
//                  for RST_CYCLES cycles;
//   PH_RECOMPRESS  pulse `recompress` (the image buffer replays the image
//                  it still holds) and wait for that image's img_done.
// The order of the steps and the rule that reconfiguration and
// recompression follow only a failed check are the published schedule; the
// handshakes with the configuration port and the image buffer, and the
// reset length, are this design's own. rst_a is also high while the global
// reset is.
module test_control
  import selfcheck_pkg::*;
#(
  parameter int unsigned RST_CYCLES = 16
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   img_done,       // the last sample of an image entered the core
  input  logic   chk_done,
  input  logic   chk_fail,
  input  logic   a_err,          // protected design requests reconfiguration
  input  logic   reconfig_done,
  output logic   check,
  output logic   rst_a,
  output logic   reconfig_req,
  output logic   recompress,
  output phase_t phase
);
  localparam int unsigned RC_W = $clog2(RST_CYCLES + 1);
  logic [RC_W-1:0] rst_cnt;

  always_comb begin
    check        = (phase == PH_CHECK_REQ);
    reconfig_req = (phase == PH_RECONFIG);
    rst_a        = rst || (phase == PH_RESET);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase      <= PH_COMPRESS;
      rst_cnt    <= '0;
      recompress <= 1'b0;
    end else begin
      recompress <= 1'b0;
      unique case (phase)
        PH_COMPRESS:
          if (a_err)         phase <= PH_RECONFIG;
          else if (img_done) phase <= PH_CHECK_REQ;
        PH_CHECK_REQ:  phase <= PH_CHECK;
        PH_CHECK:
          if (a_err || (chk_done && chk_fail)) phase <= PH_RECONFIG;
          else if (chk_done)                   phase <= PH_COMPRESS;
        PH_RECONFIG:
          if (reconfig_done) begin
            phase   <= PH_RESET;
            rst_cnt <= '0;
          end
        PH_RESET:
          if (rst_cnt == RC_W'(RST_CYCLES - 1)) begin
            phase      <= PH_RECOMPRESS;
            recompress <= 1'b1;
          end else begin
            rst_cnt <= rst_cnt + 1'b1;
          end
        PH_RECOMPRESS: if (img_done) phase <= PH_COMPRESS;
        default:       phase <= PH_COMPRESS;
      endcase
    end
  end

  // the requests to the protected design and the image buffer are pulses
  a_check_pulse:      assert property (@(posedge clk) disable iff (rst) check |=> !check);
  a_recompress_pulse: assert property (@(posedge clk) disable iff (rst) recompress |=> !recompress);
endmodule
