// input_mux: the two multiplexers in front of the compressor's cfg and data
// inputs.
//
// In normal operation the core compresses the sensor image: its
// configuration and sample stream come from the image side. During a
// self-check `sel_golden` switches both to the golden test pattern. The
// sample stream uses valid/ready; the core's ready is returned only to the
// selected source, so the image source is held (not dropped) while a check
// runs and the golden source waits while the image is compressed. Placing
// multiplexers on both cfg and data follows the published block diagram;
// the handshake is this design's own. `hold` (used while the control waits
// for an image to leave the core before a check, and after a failed check)
// stops both streams. Purely combinational.
module input_mux
  import selfcheck_pkg::*;
(
  input  logic      sel_golden,
  input  logic      hold,
  // sensor image
  input  core_cfg_t img_cfg,
  input  logic      img_valid,
  input  sample_t   img_sample,
  output logic      img_ready,
  // golden test pattern
  input  core_cfg_t gold_cfg,
  input  logic      gold_valid,
  input  sample_t   gold_sample,
  output logic      gold_ready,
  // to the compressor
  output core_cfg_t core_cfg,
  output logic      core_valid,
  output sample_t   core_sample,
  input  logic      core_ready
);
  always_comb begin
    core_cfg    = sel_golden ? gold_cfg    : img_cfg;
    core_valid  = !hold && (sel_golden ? gold_valid : img_valid);
    core_sample = sel_golden ? gold_sample : img_sample;
    img_ready   = core_ready && !hold && !sel_golden;
    gold_ready  = core_ready && !hold &&  sel_golden;
  end
endmodule
