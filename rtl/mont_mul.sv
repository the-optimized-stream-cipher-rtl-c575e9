// mont_mul -- combinational Montgomery multiplier over GF(2^M).
//
// Computes c = a * b * x^-M mod f(x) with M cascaded multiplier elements,
// one per bit of a, each doing one pass of the bit-level Montgomery loop:
// c += a_i*b (AND/XOR row), c += c_0*f (AND/XOR row), c /= x (wiring only,
// the x^M term of f is never stored: bit M of the sum is c_0 and becomes the
// new MSB). With both operands in the Montgomery domain (A = a*x^M) the
// result is the Montgomery form of a*b, so products chain directly.
//
// The element follows the algorithm and multiplier element of the
// architecture; unrolling all M elements into one combinational array (rather
// than iterating one element, see mont_mul_serial) is this design's choice so
// that the key-stream transform produces a new word every clock.
//
// Interface: a, b operands; f the field polynomial without its x^M term
// (tie to a constant; its bit 0 must be 1, so it is not read); c the
// product. Purely combinational, no clock.
module mont_mul
  import mowg_pkg::*;
#(
  parameter int unsigned W = M
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] f,
  output logic [W-1:0] c
);

  logic [W-1:0] stage [W+1];

  assign stage[0] = '0;

  for (genvar i = 0; i < W; i++) begin : g_elem
    logic [W-1:0] s3;
    logic [W-1:1] s4;                         // bit 0 of step 4 is always 0
    assign s3 = stage[i] ^ (b & {W{a[i]}});   // step 3
    assign s4 = s3[W-1:1] ^ (f[W-1:1] & {(W-1){s3[0]}});  // step 4
    assign stage[i+1] = {s3[0], s4};          // step 5, a shift by wiring
  end

  assign c = stage[W];

endmodule
