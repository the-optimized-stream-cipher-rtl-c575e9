// mowg_transform -- proposed MOWG permutation transform, GF(2^29).
//
// Input X is the complemented LFSR word B(t+10) = A(t+10) + 1, so the
// transform's first inverter is gone. It computes
//   X^r1          = X * X^(2^10)                      r1 = 2^10 + 1
//   Y             = X^(2^10 - 1)
//   X^r2 + X^r4   = X^(2^20) * (X^r1 + Y)             (signal reuse of X^r1)
//   X^r3          = X * Y^(2^10)
//   wgperm        = (X + 1) + X^r1 + (X^r2 + X^r4) + X^r3
// The "+1" (the second inverter) sits on the X path, away from the three
// multiplier paths. With X = A + 1 the sum equals q(A+1) + 1, the WG
// permutation of the uncomplemented LFSR word A. All 29 bits form the
// initialization feedback; D = 17 of them are the key stream.
//
// The dataflow follows the document's transform figure. The field
// representation (polynomial-basis Montgomery domain) makes the ">>10" and
// ">>20" blocks fixed XOR networks and the "+1" an XOR with the constant
// ONE = x^29 mod f; the choice of key-stream bits [16:0] is this design's.
//
// Interface: x (29 bits) in; wgperm (29 bits) and key_strm (17 bits) out.
// Purely combinational: the longest path is five Montgomery multipliers
// deep (the four of the power chain in series, then X^r2+X^r4 or X^r3).
module mowg_transform
  import mowg_pkg::*;
#(
  parameter gf_t F = F_POLY
) (
  input  gf_t          x,
  output gf_t          wgperm,
  output logic [D-1:0] key_strm
);

  localparam gf_t ONE = mont_one(F);

  gf_t x10, x20, xr1, y, y10, sum_r1y, xr24, xr3;

  gf_frob #(.N(10), .F(F)) u_x10 (.x(x), .y(x10));
  gf_frob #(.N(20), .F(F)) u_x20 (.x(x), .y(x20));
  gf_pow_2k1 #(.F(F))      u_pow (.x(x), .y(y));
  gf_frob #(.N(10), .F(F)) u_y10 (.x(y), .y(y10));

  mont_mul #(.W(M)) u_r1  (.a(x),   .b(x10),     .f(F), .c(xr1));
  assign sum_r1y = xr1 ^ y;
  mont_mul #(.W(M)) u_r24 (.a(x20), .b(sum_r1y), .f(F), .c(xr24));
  mont_mul #(.W(M)) u_r3  (.a(x),   .b(y10),     .f(F), .c(xr3));

  assign wgperm   = (x ^ ONE) ^ xr1 ^ xr24 ^ xr3;
  assign key_strm = wgperm[D-1:0];

endmodule
