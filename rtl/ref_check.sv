// ref_check: "Method B" self-check comparator (REF CHECK).
//
// Instead of storing the whole compressed test pattern, this checker keeps
// only its size (exp_words, in 64-bit frames) and its final 64-bit frame
// (exp_last). Because every error in the compressor propagates to the end of
// the stream, the last frame acts as a signature of the whole run.
//
// After `start` it counts the frames the core emits. When the count reaches
// exp_words it raises `finished` and compares that frame with exp_last; it
// also requires that frame, and no earlier one, to carry the core's
// end-of-image flag. Any difference raises `failed`. Both flags stay high
// until the next `start`; frames arriving after the check has ended are
// ignored. The comparison of size and final frame is the published method;
// using the core's end-of-image flag to judge the size is this design's own
// choice. exp_words must be at least 1.
//
// Timing: a frame sampled at edge n updates finished/failed after edge n.
module ref_check
  import selfcheck_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  frame_beat_t      out_beat,   // core output stream
  input  logic [CNT_W-1:0] exp_words,  // expected size in frames
  input  frame_t           exp_last,   // expected final frame
  output logic             finished,
  output logic             failed,
  output logic             active
);
  logic [CNT_W-1:0] count;
  logic             final_frame;

  always_comb final_frame = (count + 1'b1 == exp_words);

  always_ff @(posedge clk) begin
    if (rst) begin
      count    <= '0;
      active   <= 1'b0;
      finished <= 1'b0;
      failed   <= 1'b0;
    end else if (start) begin
      count    <= '0;
      active   <= 1'b1;
      finished <= 1'b0;
      failed   <= 1'b0;
    end else if (active && out_beat.valid) begin
      count <= count + 1'b1;
      if (final_frame) begin
        finished <= 1'b1;
        active   <= 1'b0;
        if (out_beat.data != exp_last || !out_beat.last) failed <= 1'b1;
      end else if (out_beat.last) begin
        // the core closed its stream before the expected size
        failed <= 1'b1;
        active <= 1'b0;
      end
    end
  end
endmodule
