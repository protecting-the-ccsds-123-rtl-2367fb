// golden_source: the synthetic test image (GOLDEN) fed to the core during a
// self-check, together with the configuration it is compressed with.
//
// The test pattern is a small synthetic hyperspectral image, built to drive
// every part of the compressor, that replaces the sensor image during a
// check. This generator computes the pattern on the fly from the sample
// coordinates, so no block RAM holds the input image. Samples are produced
// in band-interleaved-by-pixel order (band fastest, then pixel, then line).
//
// Pattern (this design's own formula; the published pattern is not
// reproduced): with t = (x*0x9E37 + y*0x7F4B + z*0x3C6F) mod 2^16 and
// h = t ^ (t >> 7),
//   * pixel (0,0): 0x0000 in even bands, 0xFFFF in odd bands, the extremes of
//     the sample range;
//   * last line (y = NY-1): h, full-range noise that yields large residuals;
//   * elsewhere: (61*z + 13*x + 7*y + h[3:0]) mod 2^16, smooth spectral and
//     spatial ramps with a little noise, well predicted by the core.
// The default size, 32 pixels x 26 lines x 512 bands = 425,984 samples, uses
// every band the core supports and at one sample per cycle fits in the
// 440,000 cycles (2.2 ms at 200 MHz) the self-check is given; the split of
// that budget into pixels and lines is this design's choice.
//
// Interface: `start` (one cycle) restarts the pattern from the first sample;
// the stream then uses valid/ready, one sample per cycle when ready is high;
// `last` marks the final sample; `busy` is high until it has been taken.
// `cfg` is constant.
module golden_source
  import selfcheck_pkg::*;
#(
  parameter int unsigned NX      = 32,
  parameter int unsigned NY      = 26,
  parameter int unsigned NZ      = 512,
  parameter int unsigned ABS_ERR = 16,
  parameter int unsigned REL_ERR = 16
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      start,
  input  logic      ready,
  output logic      valid,
  output sample_t   sample,
  output logic      last,
  output logic      busy,
  output core_cfg_t cfg
);
  logic [NX_W-1:0] x;
  logic [NY_W-1:0] y;
  logic [NZ_W-1:0] z;
  logic            end_z, end_x, end_y;

  function automatic sample_t pattern(input logic [NX_W-1:0] px,
                                      input logic [NY_W-1:0] py,
                                      input logic [NZ_W-1:0] pz);
    logic [15:0] t, h;
    t = 16'(px * 16'h9E37) + 16'(py * 16'h7F4B) + 16'(pz * 16'h3C6F);
    h = t ^ (t >> 7);
    if (px == '0 && py == '0)          return pz[0] ? 16'hFFFF : 16'h0000;
    else if (py == NY_W'(NY - 1))      return h;
    else return 16'(16'(pz * 7'd61) + 16'(px * 4'd13) + 16'(py * 3'd7) + {12'h000, h[3:0]});
  endfunction

  always_comb begin
    cfg.nx          = NX_W'(NX);
    cfg.ny          = NY_W'(NY);
    cfg.nz          = NZ_W'(NZ);
    cfg.max_abs_err = ERR_W'(ABS_ERR);
    cfg.max_rel_err = ERR_W'(REL_ERR);
    end_z  = (z == NZ_W'(NZ - 1));
    end_x  = (x == NX_W'(NX - 1));
    end_y  = (y == NY_W'(NY - 1));
    valid  = busy;
    last   = busy && end_z && end_x && end_y;
    sample = pattern(x, y, z);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      x <= '0; y <= '0; z <= '0;
    end else if (start) begin
      busy <= 1'b1;
      x <= '0; y <= '0; z <= '0;
    end else if (busy && ready) begin
      if (!end_z) z <= z + 1'b1;
      else begin
        z <= '0;
        if (!end_x) x <= x + 1'b1;
        else begin
          x <= '0;
          if (!end_y) y <= y + 1'b1;
          else begin
            y    <= '0;
            busy <= 1'b0;
          end
        end
      end
    end
  end

  // handshake rule: a sample offered and not taken stays offered, unchanged
  a_hold_sample: assert property (@(posedge clk) disable iff (rst)
                                  valid && !ready && !start |=> valid && $stable(sample));
endmodule
