// mowg_pkg -- field arithmetic shared by the MOWG(29,11,17) stream cipher.
//
// All field elements of GF(2^29) are held in the Montgomery domain of the
// polynomial basis: an element a is stored as A = a * x^29 mod f(x). In that
// domain the Montgomery product MM(A,B) = A*B*x^-29 mod f equals (a*b)*x^29,
// so a chain of Montgomery multipliers computes ordinary field products
// without ever converting back. Field addition stays a bitwise XOR, and the
// field element 1 is the constant ONE = x^29 mod f.
//
// The Montgomery step (one loop pass of the bit-level algorithm, r(x)=x^k)
// is the "multiplier element": c += a_i*b; c += c_0*f; c /= x, with the
// x^k term of f not stored: after step 4 bit k equals c_0, so after the
// division the MSB is c_0 and the shift is only a rewiring.
//
// The field polynomial, the LFSR feedback polynomial and gamma are those of
// the WG(29,11) cipher family; they are parameters of this design, not values
// fixed by the architecture. The constant functions below are evaluated at
// elaboration time only (constants, tables of the squaring networks).
package mowg_pkg;

  localparam int unsigned M = 29;          // field degree
  localparam int unsigned L = 11;          // LFSR stages
  localparam int unsigned D = 17;          // key-stream bits per clock

  typedef logic [M-1:0] gf_t;

  // f(x) = x^29+x^28+x^24+x^21+x^20+x^19+x^18+x^17+x^14+x^12+x^11+x^10
  //        +x^7+x^6+x^4+x+1, stored without its x^29 term.
  localparam gf_t F_POLY = 29'h113e5cd3;

  // LFSR feedback polynomial x^11+x^10+x^9+x^6+x^3+x+gamma:
  // bit j set means stage A(t+j) enters the linear feedback (j = 1..10).
  localparam logic [L-1:0] TAPS = 11'b110_0100_1010;

  // gamma = x^GAMMA_EXP in the polynomial basis.
  localparam longint unsigned GAMMA_EXP = 64'd464730077;

  // Phase of operation (Table of op1/op0).
  typedef enum logic [1:0] {
    PH_LOAD = 2'b00,   // op1=0 op0=0 : load complemented key/IV words
    PH_INIT = 2'b01,   // op1=0 op0=1 : key initialization, WGperm fed back
    PH_RUN  = 2'b10    // op1=1 op0=0 : running, key stream valid
  } phase_e;

  // One Montgomery step (steps 3-5 of the bit-level algorithm).
  function automatic gf_t mont_step(gf_t c, logic ai, gf_t b, gf_t f);
    gf_t s;
    logic c0;
    s  = c ^ (ai ? b : '0);            // step 3: c += a_i b
    c0 = s[0];
    s  = s ^ (c0 ? f : '0);            // step 4: c += c_0 f, bit k of the sum is c_0
    return {c0, s[M-1:1]};             // step 5: divide by x (a rewiring)
  endfunction

  // Full Montgomery product a*b*x^-M mod f.
  function automatic gf_t mont_mul_f(gf_t a, gf_t b, gf_t f);
    gf_t c = '0;
    for (int i = 0; i < M; i++) c = mont_step(c, a[i], b, f);
    return c;
  endfunction

  // a * x mod f in the plain polynomial basis (used to build constants).
  function automatic gf_t mulx(gf_t a, gf_t f);
    return a[M-1] ? ((a << 1) ^ f) : (a << 1);
  endfunction

  // Polynomial-basis element -> Montgomery domain (multiply by x^M).
  function automatic gf_t to_mont(gf_t a, gf_t f);
    gf_t r = a;
    for (int i = 0; i < M; i++) r = mulx(r, f);
    return r;
  endfunction

  // The field element 1 in the Montgomery domain: x^M mod f = f without x^M.
  function automatic gf_t mont_one(gf_t f);
    return f;
  endfunction

  // x^e in the Montgomery domain, by square-and-multiply on Montgomery products.
  function automatic gf_t mont_xpow(longint unsigned e, gf_t f);
    gf_t r = mont_one(f);
    gf_t b = to_mont(gf_t'(2), f);
    for (int i = 0; i < 64; i++) begin
      if (e[i]) r = mont_mul_f(r, b, f);
      b = mont_mul_f(b, b, f);
    end
    return r;
  endfunction

  // Column j of the GF(2)-linear map A -> A^(2^n) (Montgomery domain).
  function automatic gf_t frob_col(int unsigned j, int unsigned n, gf_t f);
    gf_t c = gf_t'(1) << j;
    for (int unsigned i = 0; i < n; i++) c = mont_mul_f(c, c, f);
    return c;
  endfunction

endpackage
