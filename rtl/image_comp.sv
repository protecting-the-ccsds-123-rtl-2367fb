// image_comp: Image Comp, the output monitor of the fault-injection setup.
//
// Module B of the test setup holds a golden model of the compressed sensor
// image, i.e. the stream a fault-free compressor produces. This block
// compares the compressed image leaving the protected design with that
// stream, cycle by cycle (the compressor is deterministic, so a fault-free
// run matches in time as well as in value). It counts whether an injected
// upset actually damaged the output image, independently of the self-check:
//   check_failed    the two streams differ: in valid, in data or in the
//                   end-of-image flag;
//   check_finished  the golden stream has ended while the protected design
//                   has not yet produced its last frame.
// Both flags are sticky until `clear`. `frames` counts the golden frames
// seen. The two flags and their meaning are from the published setup; the
// cycle-exact comparison is this design's reading of it.
module image_comp
  import selfcheck_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             clear,
  input  frame_beat_t      dut,      // compressed image from Module A
  input  frame_beat_t      gold,     // golden compressed image
  output logic             check_failed,
  output logic             check_finished,
  output logic [CNT_W-1:0] frames
);
  logic gold_done, dut_done;

  always_ff @(posedge clk) begin
    if (clear) begin
      check_failed   <= 1'b0;
      check_finished <= 1'b0;
      gold_done      <= 1'b0;
      dut_done       <= 1'b0;
      frames         <= '0;
    end else begin
      if (dut.valid != gold.valid) check_failed <= 1'b1;
      else if (gold.valid && (dut.data != gold.data || dut.last != gold.last))
        check_failed <= 1'b1;
      if (gold.valid) frames <= frames + 1'b1;
      if (dut.valid && dut.last) dut_done <= 1'b1;
      if (gold.valid && gold.last) begin
        gold_done <= 1'b1;
        if (!dut_done && !(dut.valid && dut.last)) check_finished <= 1'b1;
      end
      // a new image starts: both streams open again
      if (gold_done && dut_done) begin
        gold_done <= 1'b0;
        dut_done  <= 1'b0;
      end
    end
  end
endmodule
