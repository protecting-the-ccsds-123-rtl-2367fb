// selfcheck_control: the CONTROL block of the protected compressor.
//
// It decides what the compressor works on and runs one self-check when
// `check` is pulsed:
//   IDLE   the core compresses the sensor image; its output goes to storage.
//   DRAIN  a check was requested while an image was inside the core: the
//          rest of that image is let in, new images are held back, and the
//          control waits until its last frame has left the core. Once the
//          image is fully in, `flush_start` starts the watchdog timer: a
//          core that never finishes the image (an upset can swallow its end)
//          times out into ERROR instead of stalling the check forever.
//   START  one cycle: the multiplexers switch to the golden pattern and
//          `chk_start` restarts pattern generator, timer and checkers.
//   RUN    the core compresses the pattern; its output is kept from storage.
//          Both checkers finishing ends the check as passed (back to IDLE).
//          A failed comparator, a timeout or a disagreement between the
//          triplicated copies ends it as failed.
//   ERROR  the core is considered corrupted: both input streams are held,
//          the output stays blocked and `reconfig_req` is raised until the
//          design is reset after reconfiguration.
// A disagreement of the triplicated copies leads to ERROR from any state.
// Switching the core between image and pattern, and reconfiguring on any
// failure, follow the published design; the states, the draining of an
// image in flight and the hold after a failure are this design's own.
//
// Image tracking: samples accepted from the image side are counted against
// img_nx*img_ny*img_nz of the image configuration; every complete image input is
// matched by a frame flagged last at the core output. `img_done` pulses when
// the last sample of an image enters the core (the capture schedule asks for
// the check at that point; the check itself waits for the image's output to
// finish, see DRAIN). `chk_done` pulses for one cycle when a check ends; `chk_pass`
// and `chk_fail` hold its result until the next one.
module selfcheck_control
  import selfcheck_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      check,          // request a self-check
  input  logic [NX_W-1:0] img_nx,  // geometry of the image being fed
  input  logic [NY_W-1:0] img_ny,
  input  logic [NZ_W-1:0] img_nz,
  input  logic      img_accept,     // an image sample entered the core
  input  logic      core_out_valid,
  input  logic      core_out_last,
  input  logic      ref_finished,
  input  logic      ref_failed,
  input  logic      full_finished,
  input  logic      full_failed,
  input  logic      timeout,
  input  logic      tmr_err,
  output logic      sel_golden,
  output logic      hold,
  output logic      out_enable,     // core output may go to storage
  output logic      chk_start,
  output logic      flush_start,    // pulse: start the timer on an image flush
  output logic      chk_busy,
  output logic      chk_done,
  output logic      chk_pass,
  output logic      chk_fail,
  output logic      reconfig_req,
  output logic      img_done,
  output logic      drained         // pulse: a check had to wait for an image
);
  typedef enum logic [2:0] {S_IDLE, S_DRAIN, S_START, S_RUN, S_ERROR} state_t;
  state_t state;

  localparam int unsigned TOT_W = NX_W + NY_W + NZ_W;
  logic [TOT_W-1:0] in_count, img_total;
  logic [1:0]       pending;        // images fully input, last frame not out
  logic             pend_req;
  logic             img_out_last, img_in_end, img_idle, failure;
  logic             flush_wait, flush_timing;

  always_comb begin
    sel_golden   = (state == S_START) || (state == S_RUN) || (state == S_ERROR);
    img_total    = TOT_W'(img_nx) * TOT_W'(img_ny) * TOT_W'(img_nz);
    img_in_end   = img_accept && (in_count + 1'b1 == img_total);
    img_out_last = core_out_valid && core_out_last && !sel_golden;
    img_idle     = (in_count == '0) && (pending == '0);
    failure      = ref_failed || full_failed || timeout || tmr_err;
    flush_wait   = (state == S_DRAIN) && (in_count == '0);
    flush_start  = flush_wait && !flush_timing;
    hold         = (state == S_ERROR) || flush_wait;
    out_enable   = (state == S_IDLE) || (state == S_DRAIN);
    chk_start    = (state == S_START);
    chk_busy     = (state != S_IDLE) && (state != S_ERROR);
    reconfig_req = (state == S_ERROR);
    img_done     = img_in_end;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      in_count <= '0;
      pending  <= '0;
      pend_req <= 1'b0;
      flush_timing <= 1'b0;
      chk_done <= 1'b0;
      chk_pass <= 1'b0;
      chk_fail <= 1'b0;
      drained  <= 1'b0;
    end else begin
      chk_done <= 1'b0;
      drained  <= 1'b0;
      flush_timing <= flush_wait;

      // image bookkeeping
      if (img_accept) in_count <= img_in_end ? '0 : in_count + 1'b1;
      case ({img_in_end, img_out_last})
        2'b10:   pending <= pending + 1'b1;
        2'b01:   pending <= pending - 1'b1;
        default: ;
      endcase

      if (check) pend_req <= 1'b1;

      if (tmr_err && state != S_ERROR) begin
        state    <= S_ERROR;
        chk_done <= chk_busy;
        chk_pass <= 1'b0;
        chk_fail <= 1'b1;
      end else begin
        unique case (state)
          S_IDLE:
            if (check || pend_req) begin
              pend_req <= 1'b0;
              if (img_idle && !img_accept) state <= S_START;
              else                         state <= S_DRAIN;
            end
          S_DRAIN:
            if (img_idle || (in_count == '0 && pending == 2'd1 && img_out_last)) begin
              state   <= S_START;
              drained <= 1'b1;
            end else if (flush_timing && timeout) begin
              state    <= S_ERROR;
              chk_done <= 1'b1;
              chk_pass <= 1'b0;
              chk_fail <= 1'b1;
            end
          S_START: state <= S_RUN;
          S_RUN:
            if (failure) begin
              state    <= S_ERROR;
              chk_done <= 1'b1;
              chk_pass <= 1'b0;
              chk_fail <= 1'b1;
            end else if (ref_finished && full_finished) begin
              state    <= S_IDLE;
              chk_done <= 1'b1;
              chk_pass <= 1'b1;
              chk_fail <= 1'b0;
            end
          S_ERROR: ;
          default: state <= S_ERROR;
        endcase
      end
    end
  end

  // the test pattern's frames never reach storage
  a_gate_closed: assert property (@(posedge clk) disable iff (rst) !(sel_golden && out_enable));
  // an ended check has exactly one result
  a_one_result: assert property (@(posedge clk) disable iff (rst) chk_done |-> (chk_pass ^ chk_fail));
endmodule
