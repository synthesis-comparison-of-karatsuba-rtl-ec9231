// kara_digit_mult: the "single digit" multiplication of the Karatsuba scheme.
//
// Multiplies two unsigned coefficients combinationally. In the Karatsuba
// multiplier every auxiliary product, D_i = a_i*b_i and
// D_{p,q} = (a_p+a_q)*(b_p+b_q), is one instance of this block. The scheme
// fixes only what the block computes; how the small product is built is
// left open, so it is written here as a plain unsigned multiplication and
// left to synthesis to map.
//
// Interface: a (AW bits) and b (BW bits) in, p = a*b (AW+BW bits) out.
// Timing: purely combinational, no clock.
module kara_digit_mult #(
  parameter int unsigned AW = 4,  // width of operand a
  parameter int unsigned BW = 4   // width of operand b
) (
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-1:0] p
);

  always_comb begin
    p = (AW + BW)'(a) * (AW + BW)'(b);
  end

endmodule : kara_digit_mult
