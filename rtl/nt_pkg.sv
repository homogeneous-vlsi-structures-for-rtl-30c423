// nt_pkg - elaboration-time arithmetic shared by the finite-ring blocks.
// Everything here is evaluated while the design elaborates: ROM contents,
// fixed coefficients, modular inverses and the square root of -1 are all
// derived from the moduli given as parameters, so no table is typed in by
// hand. Arguments and results are 32-bit; products are formed in 64 bits.
package nt_pkg;

  // Number of bits B = ceil(log2 m) that hold a residue of modulus m.
  function automatic int unsigned res_bits(input int unsigned m);
    int unsigned b;
    longint lm;
    lm = longint'(m);
    b = 0;
    while ((longint'(1) << b) < lm) b++;
    return (b == 0) ? 1 : b;
  endfunction

  // a mod m for a possibly negative a.
  function automatic int unsigned mod_red(input longint a, input int unsigned m);
    longint lm, r;
    lm = longint'(m);
    r = a % lm;
    if (r < 0) r += lm;
    return int'(r);
  endfunction

  function automatic int unsigned mod_mul(input int unsigned a, input int unsigned b,
                                          input int unsigned m);
    longint la, lb, lm;
    la = longint'(a); lb = longint'(b); lm = longint'(m);
    return int'(((la % lm) * (lb % lm)) % lm);
  endfunction

  // |2^i|_m
  function automatic int unsigned mod_pow2(input int unsigned i, input int unsigned m);
    longint r, lm;
    lm = longint'(m);
    r = 1 % lm;
    for (int unsigned k = 0; k < i; k++) r = (r * 2) % lm;
    return int'(r);
  endfunction

  // Multiplicative inverse of a modulo m (extended Euclid); 0 when none exists.
  function automatic int unsigned mod_inv(input int unsigned a, input int unsigned m);
    longint t, nt, r, nr, q, tmp;
    t = 0; nt = 1; r = longint'(m); nr = longint'(a) % longint'(m);
    while (nr != 0) begin
      q = r / nr;
      tmp = t - q * nt; t = nt; nt = tmp;
      tmp = r - q * nr; r = nr; nr = tmp;
    end
    if (r != 1) return 0;
    return mod_red(t, m);
  endfunction

  // Smallest j with j*j = -1 (mod m); 0 when -1 is not a quadratic residue.
  function automatic int unsigned sqrt_m1(input int unsigned m);
    longint lm;
    lm = longint'(m);
    for (longint j = 1; j < lm; j++)
      if ((j * j) % lm == lm - 1) return int'(j);
    return 0;
  endfunction

  // Default 32 x 5 look-up table: word w = (w + 5) mod 31.
  function automatic bit [32*5-1:0] default_rom5();
    bit [32*5-1:0] t;
    for (int w = 0; w < 32; w++) t[w*5 +: 5] = 5'((w + 5) % 31);
    return t;
  endfunction

endpackage
