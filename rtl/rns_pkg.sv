// rns_pkg: constants and elaboration-time functions shared by the residue
// number system (RNS) wavelet filter bank.
//
// Every look-up table in the design (the index table Phi_j, its inverse, the
// binary-to-RNS nibble tables and the epsilon-CRT tables) is filled at
// elaboration time from the functions below, so a different modulus set only
// needs a different parameter, never a new data file.
//
// Index arithmetic: for a prime modulus m every non-zero residue q can be
// written q = g^i mod m, with g a primitive root of m and 0 <= i <= m-2.
// The design uses g = the smallest primitive root of m (prim_root); the
// coefficient indices loaded into the filter must be computed with that same
// root. The choice of root is this design's own; any primitive root works.
package rns_pkg;

  // Default modulus set and word widths: the 8-tap filter bank with 8-bit
  // input, 10-bit coefficients and 21-bit output, built on the 5-bit moduli
  // {31, 29, 23, 19, 17}.
  localparam int unsigned DEF_NUM_MOD = 5;
  localparam int unsigned DEF_MODULI [DEF_NUM_MOD] = '{31, 29, 23, 19, 17};
  localparam int unsigned DEF_N_TAPS  = 8;
  localparam int unsigned DEF_B_IN    = 8;
  localparam int unsigned DEF_OUT_W   = 16;

  // Number of bits needed to hold residues 0 .. m-1 (n_j = ceil(log2 m)).
  function automatic int unsigned res_width(input int unsigned m);
    return $clog2(m);
  endfunction

  // (base ** e) mod m, by repeated multiplication.
  function automatic int unsigned mod_pow(input int unsigned base,
                                          input int unsigned e,
                                          input int unsigned m);
    longint unsigned r;
    r = 1;
    for (int unsigned k = 0; k < e; k++) r = (r * base) % longint'(m);
    return int'(r);
  endfunction

  // Smallest primitive root of the prime m: the first g whose powers
  // g^1 .. g^(m-2) never return to 1.
  function automatic int unsigned prim_root(input int unsigned m);
    int unsigned p;
    bit          ok;
    if (m <= 3) return m - 1;
    for (int unsigned g = 2; g < m; g++) begin
      p  = 1;
      ok = 1'b1;
      for (int unsigned e = 1; e < m - 1; e++) begin
        p = (p * g) % m;
        if (p == 1) ok = 1'b0;
      end
      if (ok) return g;
    end
    return 0;
  endfunction

  // Phi_j(q): the index i with g^i = q (mod m). Zero and values >= m have no
  // index; 0 is returned for them (the zero flag handles q = 0).
  function automatic int unsigned phi(input int unsigned m, input int unsigned q);
    int unsigned g, p;
    if (q == 0 || q >= m) return 0;
    g = prim_root(m);
    p = 1;
    for (int unsigned i = 0; i < m - 1; i++) begin
      if (p == q) return i;
      p = (p * g) % m;
    end
    return 0;
  endfunction

  // Phi_j^-1(i) = g^i mod m; indices outside 0 .. m-2 map to 0.
  function automatic int unsigned phi_inv(input int unsigned m, input int unsigned i);
    if (i > m - 2) return 0;
    return mod_pow(prim_root(m), i, m);
  endfunction

  // Multiplicative inverse of a modulo the prime m.
  function automatic int unsigned mod_inv(input longint unsigned a, input int unsigned m);
    int unsigned r;
    r = int'(a % longint'(m));
    for (int unsigned k = 1; k < m; k++)
      if ((r * k) % m == 1) return k;
    return 0;
  endfunction

  // Binary-to-RNS table entry. The B-bit two's complement input is cut into
  // 4-bit groups; group grp covers bits 4*grp .. 4*grp+3 (the top group may be
  // narrower). The entry is |v * 2^(4*grp)|_m where v is the group's value,
  // the input's sign bit counting with weight -2^(B-1).
  function automatic int unsigned b2r_entry(input int unsigned m,
                                            input int unsigned b,
                                            input int unsigned grp,
                                            input int unsigned v);
    longint val;
    int unsigned lo, w;
    lo  = 4 * grp;
    w   = (b - lo < 4) ? b - lo : 4;
    val = 0;
    for (int unsigned k = 0; k < w; k++) begin
      if (v[k]) begin
        if (lo + k == b - 1) val = val - (longint'(1) << (lo + k));
        else                 val = val + (longint'(1) << (lo + k));
      end
    end
    val = val % longint'(m);
    if (val < 0) val = val + longint'(m);
    return int'(val);
  endfunction

  // Epsilon-CRT table entry for channel j: round(|x * Mj^-1|_mj * 2^n / mj)
  // mod 2^n, with Mj = M / mj. Summing the entries of all channels modulo 2^n
  // gives X * 2^n / M, i.e. the RNS value scaled to an n-bit fraction of the
  // dynamic range, within L/2 units of the last place.
  function automatic longint unsigned crt_entry(input int unsigned mj,
                                                input longint unsigned big_mj,
                                                input int unsigned x,
                                                input int unsigned n);
    longint unsigned t;
    if (x >= mj) return 0;
    t = (longint'(x) * longint'(mod_inv(big_mj, mj))) % longint'(mj);
    return (((t << n) + longint'(mj) / 2) / longint'(mj)) & ((longint'(1) << n) - 1);
  endfunction

endpackage
