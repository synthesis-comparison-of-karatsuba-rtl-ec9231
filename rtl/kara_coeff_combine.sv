// kara_coeff_combine: builds the coefficients of the product polynomial
// C(x) = A(x)B(x) = sum_{i=0}^{2N-2} c_i x^i from the Karatsuba auxiliary
// products.
//
// For every i:
//   c_i = sum_{p+q=i, q>p>=0} ( D_{p,q} - D_p - D_q )  (+ D_{i/2} if i even)
// which gives c_0 = D_0 and c_{2N-2} = D_{N-1} at the ends, where no pair
// exists. Each bracket equals a_p*b_q + a_q*b_p, so every c_i is a
// non-negative sum of cross products. The adder/subtractor network follows
// that formula term by term. It works modulo 2^CW: the final value is
// exact because the true c_i always fits in CW bits (kara_pkg::coeff_width).
//
// The end coefficients c_0 = D_0 and c_{2N-2} = D_{N-1} are therefore plain
// copies of inputs, zero-extended to CW bits; a netlist check will list
// them as outputs wired straight to inputs, which is intended.
//
// Interface: d[i] = D_i, dpq[kara_pkg::pair_idx(p,q,N)] = D_{p,q};
// c[i] = c_i, CW bits each.
// Timing: purely combinational.
module kara_coeff_combine #(
  parameter int unsigned N = 2,  // coefficients per operand
  parameter int unsigned W = 4,  // bits per coefficient
  localparam int unsigned NP = kara_pkg::num_pairs(N),
  localparam int unsigned CW = kara_pkg::coeff_width(W, N)
) (
  input  logic [N-1:0][2*W-1:0]  d,
  input  logic [NP-1:0][2*W+1:0] dpq,
  output logic [2*N-2:0][CW-1:0] c
);

  always_comb begin
    for (int i = 0; i <= 2 * N - 2; i++) begin
      c[i] = '0;
      // pair terms D_{p,q} - (D_p + D_q), p + q = i, q > p
      for (int p = 0; p < N; p++) begin
        for (int q = p + 1; q < N; q++) begin
          if (p + q == i) begin
            c[i] = c[i] + CW'(dpq[kara_pkg::pair_idx(p, q, N)])
                        - (CW'(d[p]) + CW'(d[q]));
          end
        end
      end
      // square term D_{i/2} for even i
      if (i % 2 == 0) begin
        c[i] = c[i] + CW'(d[i / 2]);
      end
    end
  end

endmodule : kara_coeff_combine
