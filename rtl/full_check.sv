// full_check: "Method A" self-check comparator (FULL CHECK).
//
// Compares every 64-bit frame the core emits for the test pattern with the
// pre-computed compressed pattern held in a reference memory (ref_mem). The
// memory has a registered read port: rd_addr is driven with the index of the
// frame expected next, so rd_data holds that frame when it arrives and
// frames can be checked back to back, one per cycle.
//
// After `start` the checker counts frames; a frame that differs from the
// stored one, an end-of-image flag before frame exp_words, or a missing
// end-of-image flag on frame exp_words raises `failed`. Reaching exp_words
// frames raises `finished`. Flags stay high until the next `start`. Checking
// the full output is the published method; the prefetching read port and the
// size rule are this design's own. exp_words must be between 1 and the
// memory depth.
module full_check
  import selfcheck_pkg::*;
#(
  parameter int unsigned CNT_W  = 32,
  parameter int unsigned ADDR_W = 13
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  frame_beat_t       out_beat,
  input  logic [CNT_W-1:0]  exp_words,
  output logic [ADDR_W-1:0] rd_addr,   // to the reference memory
  input  frame_t            rd_data,   // memory word at last cycle's rd_addr
  output logic              finished,
  output logic              failed,
  output logic              active
);
  logic [CNT_W-1:0] count;
  logic             final_frame;
  logic             take;

  always_comb begin
    take        = active && out_beat.valid;
    final_frame = (count + 1'b1 == exp_words);
    if (start)     rd_addr = '0;
    else if (take) rd_addr = ADDR_W'(count + 1'b1);
    else           rd_addr = ADDR_W'(count);
  end

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
    end else if (take) begin
      count <= count + 1'b1;
      if (out_beat.data != rd_data) failed <= 1'b1;
      if (final_frame) begin
        finished <= 1'b1;
        active   <= 1'b0;
        if (!out_beat.last) failed <= 1'b1;
      end else if (out_beat.last) begin
        failed <= 1'b1;
        active <= 1'b0;
      end
    end
  end
endmodule
