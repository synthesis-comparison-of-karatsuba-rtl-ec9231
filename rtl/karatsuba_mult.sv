// karatsuba_mult: unsigned combinational multiplier built on Karatsuba
// polynomial multiplication; by default an 8x8 -> 16-bit multiplier.
//
// Each operand of N*W bits is cut into N coefficients of W bits, read as a
// polynomial in x = 2^W (a = sum a_i x^i). The product is then formed in
// three stages:
//   1. kara_aux_products : D_i = a_i b_i and D_{p,q} = (a_p+a_q)(b_p+b_q),
//                          N + N(N-1)/2 small multiplications instead of N^2
//   2. kara_coeff_combine: c_i = sum (D_{p,q} - D_p - D_q) (+ D_{i/2}, i even)
//   3. kara_recombine    : p = sum c_i 2^(i*W)
// The defaults N = 2, W = 4 give the two-part step: the 8-bit operands are
// split into 4-bit halves and three 4/5-bit products replace four.
// The arithmetic of stages 1-3 follows the Karatsuba polynomial scheme; the
// choice of N = 2, W = 4 for the 8x8 size, unsigned operands and a purely
// combinational datapath with no registers are this design's own choices.
//
// Interface: a, b (N*W bits each, unsigned) in; p = a*b (2*N*W bits) out.
// Timing: combinational, p is valid one propagation delay after a and b.
module karatsuba_mult #(
  parameter int unsigned N = 2,  // coefficients per operand
  parameter int unsigned W = 4,  // bits per coefficient
  localparam int unsigned NP = kara_pkg::num_pairs(N),
  localparam int unsigned CW = kara_pkg::coeff_width(W, N)
) (
  input  logic [N*W-1:0]   a,
  input  logic [N*W-1:0]   b,
  output logic [2*N*W-1:0] p
);

  logic [N-1:0][W-1:0]    a_coef, b_coef;
  logic [N-1:0][2*W-1:0]  d;
  logic [NP-1:0][2*W+1:0] dpq;
  logic [2*N-2:0][CW-1:0] c;

  // Coefficient i is bits [i*W +: W]: a packed [N-1:0][W-1:0] array has
  // exactly that layout.
  assign a_coef = a;
  assign b_coef = b;

  kara_aux_products #(.N(N), .W(W)) u_aux (
    .a_coef(a_coef),
    .b_coef(b_coef),
    .d     (d),
    .dpq   (dpq)
  );

  kara_coeff_combine #(.N(N), .W(W)) u_comb (
    .d  (d),
    .dpq(dpq),
    .c  (c)
  );

  kara_recombine #(.N(N), .W(W), .CW(CW)) u_rec (
    .c(c),
    .p(p)
  );

endmodule : karatsuba_mult
