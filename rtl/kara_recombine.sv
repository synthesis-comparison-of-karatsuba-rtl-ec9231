// kara_recombine: evaluates the product polynomial at x = R = 2^W.
//
// With the operands split as a = sum a_i R^i and b = sum b_i R^i, the
// integer product is ab = sum_{i=0}^{2N-2} c_i R^i. Because R is a power of
// two, each term is c_i shifted left by i*W bits; the shifted coefficients
// overlap (c_i is wider than W bits) and are summed with carries. For N = 2
// this is ab = u2 R^2 + u1 R + u0 of the two-part Karatsuba step.
//
// Interface: c[i] = c_i (CW bits), p = the 2*N*W-bit product.
// Timing: purely combinational.
module kara_recombine #(
  parameter int unsigned N  = 2,                          // coefficients per operand
  parameter int unsigned W  = 4,                          // bits per coefficient
  parameter int unsigned CW = kara_pkg::coeff_width(W, N) // bits per c_i
) (
  input  logic [2*N-2:0][CW-1:0] c,
  output logic [2*N*W-1:0]       p
);

  localparam int unsigned PW = 2 * N * W;
  // Working width: wide enough for the top coefficient shifted into place,
  // so no bit is dropped before the final truncation to PW bits.
  localparam int unsigned XW = (CW + (2 * N - 2) * W > PW) ? CW + (2 * N - 2) * W : PW;

  logic [XW-1:0] acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i <= 2 * N - 2; i++) begin
      acc = acc + (XW'(c[i]) << (i * W));
    end
    p = acc[PW-1:0];
  end

endmodule : kara_recombine
