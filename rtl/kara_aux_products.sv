// kara_aux_products: the auxiliary products of the Karatsuba scheme.
//
// For two polynomials A(x) = sum a_i x^i and B(x) = sum b_i x^i with N
// coefficients each it forms, all in parallel:
//   D_i     = a_i * b_i                  for i = 0 .. N-1
//   D_{p,q} = (a_p + a_q) * (b_p + b_q)  for every pair q > p >= 0
// That is N + N(N-1)/2 multiplications of coefficient size, against N^2 for
// the schoolbook product. The pair sums are kept at W+1 bits so their carry
// is not lost. The products follow the Karatsuba auxiliary-variable
// definitions; the pair numbering (kara_pkg::pair_idx) is this design's own.
//
// Interface: a_coef, b_coef hold the N coefficients (index i = weight x^i).
// d[i] is D_i, dpq[pair_idx(p,q,N)] is D_{p,q}.
// Timing: purely combinational.
module kara_aux_products #(
  parameter int unsigned N = 2,  // coefficients per operand (degree N-1)
  parameter int unsigned W = 4,  // bits per coefficient
  localparam int unsigned NP = kara_pkg::num_pairs(N)
) (
  input  logic [N-1:0][W-1:0]    a_coef,
  input  logic [N-1:0][W-1:0]    b_coef,
  output logic [N-1:0][2*W-1:0]  d,
  output logic [NP-1:0][2*W+1:0] dpq
);

  if (N < 2) begin : g_bad_n
    $error("kara_aux_products needs N >= 2");
  end

  // D_i = a_i * b_i
  for (genvar i = 0; i < N; i++) begin : g_diag
    kara_digit_mult #(.AW(W), .BW(W)) u_mult (
      .a(a_coef[i]),
      .b(b_coef[i]),
      .p(d[i])
    );
  end

  // D_{p,q} = (a_p + a_q) * (b_p + b_q), q > p
  for (genvar p = 0; p < N - 1; p++) begin : g_row
    for (genvar q = p + 1; q < N; q++) begin : g_pair
      localparam int unsigned K = kara_pkg::pair_idx(p, q, N);
      logic [W:0] sum_a, sum_b;

      always_comb begin
        sum_a = {1'b0, a_coef[p]} + {1'b0, a_coef[q]};
        sum_b = {1'b0, b_coef[p]} + {1'b0, b_coef[q]};
      end

      kara_digit_mult #(.AW(W + 1), .BW(W + 1)) u_mult (
        .a(sum_a),
        .b(sum_b),
        .p(dpq[K])
      );
    end
  end

endmodule : kara_aux_products
