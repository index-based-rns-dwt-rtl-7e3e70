// tb_rns_ref_pkg: reference arithmetic for the testbenches of the RNS filter
// bank, written independently of the design's own package.
//
// Primitive roots are found by checking that g^((m-1)/q) != 1 for every prime
// factor q of m-1; discrete logarithms by walking the powers of the root.
// Residues of signed numbers are always returned in 0 .. m-1.
package tb_rns_ref_pkg;

  function automatic longint smod(input longint v, input longint m);
    longint r;
    r = v % m;
    if (r < 0) r += m;
    return r;
  endfunction

  function automatic longint powmod(input longint b, input longint e, input longint m);
    longint r, bb, ee;
    r = 1; bb = smod(b, m); ee = e;
    while (ee > 0) begin
      if (ee[0]) r = (r * bb) % m;
      bb = (bb * bb) % m;
      ee = ee >> 1;
    end
    return r;
  endfunction

  function automatic int root_of(input int m);
    int n, f, ok;
    for (int g = 2; g < m; g++) begin
      ok = 1;
      n = m - 1;
      f = 2;
      while (n > 1) begin
        if (n % f == 0) begin
          if (powmod(g, (m - 1) / f, m) == 1) ok = 0;
          while (n % f == 0) n = n / f;
        end
        f++;
      end
      if (ok == 1) return g;
    end
    return 0;
  endfunction

  // discrete log of q (1 .. m-1) to the base root_of(m)
  function automatic int dlog(input int m, input int q);
    longint p;
    int g;
    g = root_of(m);
    p = 1;
    for (int i = 0; i < m - 1; i++) begin
      if (p == longint'(q)) return i;
      p = (p * g) % m;
    end
    return -1;
  endfunction

endpackage
