// wt_pkg: constants and helper functions shared by the lifting wavelet core.
//
// The core computes a multi-level 2-D wavelet transform with the CDF 2-2
// (5/3) bi-orthogonal wavelet using the lifting scheme. Pixels enter as a
// raster stream, one per clock at most; every level of the pyramid is
// computed by the same horizontal and vertical lifting units, which switch
// their working context from level to level.
//
// The default sizes follow the published design: lines of up to 1024
// pixels and images of up to 2048 lines, 8-bit samples. The coefficient
// width (16 bits) and the number of levels (4, the depth drawn in the
// recursive-pyramid schedule) are this design's choices.
package wt_pkg;

  localparam int unsigned PIX_W_DEF  = 8;     // input pixel width
  localparam int unsigned COEF_W_DEF = 16;    // signed coefficient width
  localparam int unsigned LINE_N_DEF = 1024;  // pixels per line at level 0
  localparam int unsigned IMG_H_DEF  = 2048;  // lines per frame at level 0
  localparam int unsigned LEVELS_DEF = 4;     // decomposition levels

  // Level l works on lines of (n >> l) samples, that is (n >> (l+1))
  // even/odd pairs. The line memories stack the levels one after the other:
  // level l starts at pair address n - (n >> l).
  function automatic int unsigned level_base(int unsigned n, int unsigned l);
    return n - (n >> l);
  endfunction

  // Total pair entries needed to stack `levels` levels of a line memory.
  function automatic int unsigned stack_depth(int unsigned n, int unsigned levels);
    return n - (n >> levels);
  endfunction

endpackage
