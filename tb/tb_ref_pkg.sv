// tb_ref_pkg: reference functions shared by the testbenches.
//
// golden_pattern() recomputes the synthetic test image from its formula
// (written separately from the generator under test), and model_* describe
// what the behavioural compressor stand-in (ccsds_core_model) must produce,
// so testbenches can compute expected compressed streams on their own.
package tb_ref_pkg;
  import selfcheck_pkg::*;

  function automatic logic [15:0] golden_pattern(int x, int y, int z, int ny);
    logic [15:0] t, h, base;
    t = 16'(x * 40503) + 16'(y * 32587) + 16'(z * 15471);   // 0x9E37 0x7F4B 0x3C6F
    h = t ^ {7'b0, t[15:7]};
    if (x == 0 && y == 0) return (z % 2 == 1) ? 16'hFFFF : 16'h0000;
    if (y == ny - 1)      return h;
    base = 16'(61 * z + 13 * x + 7 * y);
    return base + {12'h000, h[3:0]};
  endfunction

  localparam logic [63:0] MODEL_SEED = 64'h0123_4567_89AB_CDEF;
  localparam logic [63:0] MODEL_MUL  = 64'h9E37_79B9_7F4A_7C15;

  // one step of the stand-in compressor's running signature
  function automatic logic [63:0] model_step(logic [63:0] st, logic [15:0] s,
                                             int unsigned qstep, int unsigned idx);
    logic [63:0] q;
    q = 64'(s / 16'(qstep));
    return ({st[56:0], st[63:57]} ^ (q * MODEL_MUL)) + 64'(idx);
  endfunction

  // expected frames of the stand-in for a given sample list
  function automatic void model_compress(ref logic [15:0] smp[$], input int unsigned qstep,
                                         input int unsigned frame_samples,
                                         ref logic [63:0] frames[$]);
    logic [63:0] st = MODEL_SEED;
    int unsigned n = 0;
    frames.delete();
    foreach (smp[i]) begin
      st = model_step(st, smp[i], qstep, i);
      n++;
      if (n == frame_samples || i == smp.size() - 1) begin
        frames.push_back(st);
        n = 0;
      end
    end
  endfunction

  function automatic void golden_samples(int nx, int ny, int nz, ref logic [15:0] smp[$]);
    smp.delete();
    for (int y = 0; y < ny; y++)
      for (int x = 0; x < nx; x++)
        for (int z = 0; z < nz; z++)
          smp.push_back(golden_pattern(x, y, z, ny));
  endfunction
endpackage
