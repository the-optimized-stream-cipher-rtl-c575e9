// gf_pow_2k1 -- the power X^(2^10 - 1) of the WG transform, GF(2^29).
//
// Uses the addition chain 1, 2, 4, 5, 10 on the exponent 2^k - 1:
//   t2  = t1^(2^1) * t1   = X^3
//   t4  = t2^(2^2) * t2   = X^15
//   t5  = t4^(2^1) * X    = X^31
//   t10 = t5^(2^5) * t5   = X^1023
// i.e. four field multiplications (Montgomery multipliers) and four
// squaring networks. The document names the block and states four
// multiplications and four squarings; the particular chain is this design's.
//
// Interface: x in, y = x^1023 out, Montgomery-domain elements; combinational.
module gf_pow_2k1
  import mowg_pkg::*;
#(
  parameter gf_t F = F_POLY
) (
  input  gf_t x,
  output gf_t y
);

  gf_t s1, t2, s2, t4, s3, t5, s5;

  gf_frob #(.N(1), .F(F)) u_sq1 (.x(x),  .y(s1));
  mont_mul #(.W(M))       u_m1  (.a(s1), .b(x),  .f(F), .c(t2));
  gf_frob #(.N(2), .F(F)) u_sq2 (.x(t2), .y(s2));
  mont_mul #(.W(M))       u_m2  (.a(s2), .b(t2), .f(F), .c(t4));
  gf_frob #(.N(1), .F(F)) u_sq3 (.x(t4), .y(s3));
  mont_mul #(.W(M))       u_m3  (.a(s3), .b(x),  .f(F), .c(t5));
  gf_frob #(.N(5), .F(F)) u_sq4 (.x(t5), .y(s5));
  mont_mul #(.W(M))       u_m4  (.a(s5), .b(t5), .f(F), .c(y));

endmodule
