// pca_pkg -- shared constants and sizing functions of the pipelined carry
// adder (PCA).
//
// A PCA adds two N-bit words with nothing but half adders arranged in
// stages: stage 1 adds a and b bit by bit, and every later stage adds the
// previous stage's sum vector to the previous stage's carries shifted up by
// one bit. The lowest bit still in play moves up one position per stage, so
// the triangle of half adders ends after N stages (N + 1 with a carry-in).
// The functions below give the shape of that triangle; the RTL and the
// testbenches both use them, and the half-adder counts they return are the
// ones of the sizing rule N(N+1)/2 for a plain PCA.
package pca_pkg;

  // Number of half-adder stages of a PCA of width w.
  // Without a carry-in the triangle has w stages; a carry-in enters bit 0
  // of stage 2 and adds one stage.
  function automatic int unsigned pca_stages(int unsigned w, bit has_cin);
    return has_cin ? w + 1 : w;
  endfunction

  // Lowest bit that still holds a half adder in stage k (k counts from 1).
  function automatic int unsigned pca_low_bit(int unsigned k, bit has_cin);
    if (k <= 1) return 0;
    return has_cin ? k - 2 : k - 1;
  endfunction

  // Half adders in a PCA of width w: w(w+1)/2, plus one extra row of w
  // when the carry-in has to be absorbed.
  function automatic int unsigned pca_ha_count(int unsigned w, bit has_cin);
    return has_cin ? w + (w * (w + 1)) / 2 : (w * (w + 1)) / 2;
  endfunction

endpackage
