// kara_pkg: sizes and index helpers shared by the Karatsuba polynomial
// multiplier blocks.
//
// An operand of N*W bits is read as a polynomial of degree N-1 in x = 2^W,
// with N coefficients of W bits each. The Karatsuba scheme needs one
// auxiliary product per coefficient (D_i) and one per unordered pair of
// coefficients (D_{p,q}, q > p). The pairs are numbered row by row:
// (0,1), (0,2), ..., (0,N-1), (1,2), ..., (N-2,N-1).
//
// Widths (all unsigned):
//   D_i     : 2W bits            (product of two W-bit coefficients)
//   D_{p,q} : 2W+2 bits          (product of two (W+1)-bit pair sums)
//   c_i     : coeff_width(W, N)  (a sum of at most N products of W-bit
//                                 coefficients, with room to spare)
// These widths are this design's own derivation; the formulas they serve
// are the Karatsuba auxiliary-variable equations.
package kara_pkg;

  // Number of coefficient pairs (p,q) with q > p.
  function automatic int unsigned num_pairs(input int unsigned n);
    return n * (n - 1) / 2;
  endfunction

  // Position of pair (p,q), q > p, in the row-by-row numbering.
  function automatic int unsigned pair_idx(input int unsigned p,
                                           input int unsigned q,
                                           input int unsigned n);
    return p * n - (p * (p + 1)) / 2 + (q - p - 1);
  endfunction

  // Width of a product-polynomial coefficient c_i. The true value of c_i is
  // at most N*(2^W-1)^2; the two extra bits also hold the pair products so
  // that the subtractions can be carried out modulo 2^width.
  function automatic int unsigned coeff_width(input int unsigned w,
                                              input int unsigned n);
    return 2 * w + 2 + $clog2(n);
  endfunction

endpackage : kara_pkg
