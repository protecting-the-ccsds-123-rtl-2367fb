// selfcheck_pkg: types and constants shared by the self-check blocks.
//
// The protected compressor is a CCSDS 123.0-B-2 core that takes one image
// sample per cycle and emits its compressed stream as 64-bit frames. The
// frame width (64 bits) and the maximum image geometry of the core
// (4096 lines x 640 pixels x 512 bands) are the design's published figures;
// the 16-bit sample width follows from the quoted throughput of 3.2 Gbit/s at
// 200 MHz (16 bits per cycle). The layout of the configuration word and the
// widths of the error limits are this design's own choice.
package selfcheck_pkg;

  localparam int unsigned SAMPLE_W = 16;   // bits per image sample
  localparam int unsigned FRAME_W  = 64;   // bits per compressed output frame
  localparam int unsigned NX_W     = 10;   // pixels per line, up to 640
  localparam int unsigned NY_W     = 13;   // lines, up to 4096
  localparam int unsigned NZ_W     = 10;   // bands, up to 512
  localparam int unsigned ERR_W    = 16;   // near-lossless error limits

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [FRAME_W-1:0]  frame_t;

  // Compression configuration presented to the core together with the
  // samples (the "cfg" input of the core). Geometry plus the maximum
  // absolute and relative error of near-lossless mode.
  typedef struct packed {
    logic [NY_W-1:0]  ny;
    logic [NX_W-1:0]  nx;
    logic [NZ_W-1:0]  nz;
    logic [ERR_W-1:0] max_abs_err;
    logic [ERR_W-1:0] max_rel_err;
  } core_cfg_t;

  // One beat of the compressed output stream.
  typedef struct packed {
    logic   valid;
    logic   last;   // final frame of the compressed image
    frame_t data;
  } frame_beat_t;

  // Phases of the capture schedule run by test_control.
  typedef enum logic [2:0] {
    PH_COMPRESS   = 3'd0,  // compressing the current image
    PH_CHECK_REQ  = 3'd1,  // asking Module A for a self-check
    PH_CHECK      = 3'd2,  // self-check running
    PH_RECONFIG   = 3'd3,  // waiting for the FPGA to be reconfigured
    PH_RESET      = 3'd4,  // holding the protected design in reset
    PH_RECOMPRESS = 3'd5   // compressing the buffered image again
  } phase_t;

endpackage
