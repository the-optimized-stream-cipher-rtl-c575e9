// mowg_ref_pkg -- reference model of the WG(29,11) arithmetic for the testbenches.
//
// Works in the plain polynomial basis of GF(2^29) with shift-and-add
// multiplication and square-and-multiply powers; it shares no code with the
// Montgomery-domain datapath. from_mont/to_mont convert to and from the
// design's representation (A = a * x^29 mod f) by multiplying with x^-29 or
// x^29, where x^-29 = x^(2^29 - 1 - 29).
package mowg_ref_pkg;

  localparam int M = 29;
  localparam longint unsigned ORD = (64'd1 << M) - 1;   // order of GF(2^29)*
  localparam logic [M-1:0] F_LOW = 29'h113e5cd3;         // f without x^29

  function automatic logic [M-1:0] rmul(logic [M-1:0] a, logic [M-1:0] b);
    logic [M-1:0] r = '0;
    for (int i = 0; i < M; i++) begin
      if (b[i]) r ^= a;
      a = a[M-1] ? ((a << 1) ^ F_LOW) : (a << 1);
    end
    return r;
  endfunction

  function automatic logic [M-1:0] rpow(logic [M-1:0] a, longint unsigned e);
    logic [M-1:0] r = 1;
    e = e % ORD;
    while (e != 0) begin
      if (e[0]) r = rmul(r, a);
      a = rmul(a, a);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic logic [M-1:0] xpow(longint unsigned e);
    return rpow(29'd2, e);
  endfunction

  function automatic logic [M-1:0] to_mont(logic [M-1:0] a);
    return rmul(a, xpow(M));
  endfunction

  function automatic logic [M-1:0] from_mont(logic [M-1:0] a);
    return rmul(a, xpow(ORD - M));
  endfunction

  // WG permutation WGperm(a) = q(a+1) + 1, q(y) = y + y^r1 + y^r2 + y^r3 + y^r4
  function automatic logic [M-1:0] wgperm(logic [M-1:0] a);
    longint unsigned r1 = (64'd1 << 10) + 1;
    longint unsigned r2 = (64'd1 << 20) + (64'd1 << 10) + 1;
    longint unsigned r3 = (64'd1 << 20) - (64'd1 << 10) + 1;
    longint unsigned r4 = (64'd1 << 20) + (64'd1 << 10) - 1;
    logic [M-1:0] y = a ^ 29'd1;
    return y ^ rpow(y, r1) ^ rpow(y, r2) ^ rpow(y, r3) ^ rpow(y, r4) ^ 29'd1;
  endfunction

  // gamma of the feedback polynomial x^11+x^10+x^9+x^6+x^3+x+gamma
  function automatic logic [M-1:0] gamma();
    return xpow(64'd464730077);
  endfunction

  // one step of the plain (uncomplemented) WG LFSR, polynomial basis;
  // st[0] = A(t) ... st[10] = A(t+10); returns A(t+11) without the WGperm term
  localparam logic [M-1:0] GAMMA_P = 29'h0d93fcfe;   // x^464730077 mod f

  function automatic logic [M-1:0] lin_fb(logic [M-1:0] st [11]);
    return st[10] ^ st[9] ^ st[6] ^ st[3] ^ st[1] ^ rmul(GAMMA_P, st[0]);
  endfunction

  // Key stream of the plain WG(29,11) cipher with 17 output bits per step.
  // w[j] are the 11 load words as the design receives them (Montgomery
  // domain). 11 load steps, 22 init steps with WGperm(A(t+10)) fed back,
  // then n run steps; run step i outputs bits [16:0] of to_mont(WGperm(A(t+10))).
  function automatic void wg_keystream(input logic [M-1:0] w [11], input int n,
                                       ref logic [16:0] ks [$]);
    logic [M-1:0] st [11];
    logic [M-1:0] nw, o;
    ks.delete();
    for (int j = 0; j < 11; j++) st[j] = from_mont(w[j]);
    for (int t = 0; t < 22 + n; t++) begin
      o  = wgperm(st[10]);
      nw = lin_fb(st);
      if (t < 22) nw ^= o;
      else        begin o = to_mont(o); ks.push_back(o[16:0]); end
      for (int j = 0; j < 10; j++) st[j] = st[j+1];
      st[10] = nw;
    end
  endfunction

endpackage
