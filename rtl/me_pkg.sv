// me_pkg: constants and width helpers shared by the low-power full-search
// block-matching (FS-BM) motion estimator.
//
// The array matches an n x n reference block against (p+1) x (p+1) candidate
// blocks of an (n+p) x (n+p) search area. The default sizes, n = 16 and
// p = 31 (a 47 x 47 search area, motion vectors -16..+15), and the 8-bit pixel
// follow the evaluated configuration. The width helpers are this design's own
// choice: every sum is just wide enough for its worst case, and the
// distortion width keeps one spare code above the largest possible SAD so
// that the all-ones value can stand for "infinity" as the initial minimum.
package me_pkg;

  localparam int PIX_W     = 8;   // pixel width
  localparam int DEFAULT_N = 16;  // reference block is N x N
  localparam int DEFAULT_P = 31;  // search area is (N+P) x (N+P), P odd

  // Width of the row sum D_i produced by N PEs: N * (2^PIX_W - 1).
  function automatic int row_sum_w(input int n);
    return $clog2(n * ((1 << PIX_W) - 1) + 1);
  endfunction

  // Width of the block distortion D: N*N*(2^PIX_W - 1) plus one spare code.
  function automatic int dist_w(input int n);
    return $clog2(n * n * ((1 << PIX_W) - 1) + 2);
  endfunction

  // Width of an index 0..k-1 (at least 1 bit).
  function automatic int idx_w(input int k);
    return (k <= 2) ? 1 : $clog2(k);
  endfunction

  // Width of a signed motion vector component floor(-P/2)..floor(P/2).
  function automatic int mv_w(input int p);
    return $clog2(p + 1);  // -(P+1)/2 .. (P-1)/2
  endfunction

endpackage
