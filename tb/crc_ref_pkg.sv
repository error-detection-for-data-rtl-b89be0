// crc_ref_pkg: reference arithmetic for the test benches, written the way the
// algebra is done on paper rather than the way the hardware does it.
//
//  - ref_mod: remainder of a polynomial by g(X) through schoolbook long
//    division: for every set coefficient from the top down to X^m, subtract
//    (XOR) g(X) shifted under it.
//  - ref_crc: R(X) = X^m M(X) mod g(X).
//  - ref_mul: a(X) * b(X) as a sum of shifted copies of b(X).
//  - bits_from_string: a '0'/'1' string, first character the highest-order
//    coefficient, as a vector; and stage_vec for register contents printed
//    stage 0 first.
// Polynomials are at most 64 coefficients; g and b are given with their
// leading term (g_full has bit m set).
package crc_ref_pkg;

  function automatic logic [63:0] ref_mod(logic [63:0] dividend, int nbits,
                                          int m, logic [63:0] g_full);
    logic [63:0] d;
    d = dividend;
    for (int i = nbits - 1; i >= m; i--)
      if (d[i]) d ^= g_full << (i - m);
    return d & ((64'd1 << m) - 64'd1);
  endfunction

  function automatic logic [63:0] ref_crc(logic [63:0] msg, int k,
                                          int m, logic [63:0] g_full);
    return ref_mod(msg << m, k + m, m, g_full);
  endfunction

  function automatic logic [63:0] ref_mul(logic [63:0] a, logic [63:0] b);
    logic [63:0] p;
    p = '0;
    for (int i = 0; i < 64; i++)
      if (a[i]) p ^= b << i;
    return p;
  endfunction

  // "1011" -> 4'b1011 (the first character is the highest-order coefficient)
  function automatic logic [63:0] bits_from_string(string s);
    logic [63:0] v;
    v = '0;
    for (int i = 0; i < s.len(); i++) v = {v[62:0], s[i] == "1"};
    return v;
  endfunction

  // register contents printed stage 0 first -> vector with bit i = stage i
  function automatic logic [63:0] stage_vec(string s);
    logic [63:0] v;
    v = '0;
    for (int i = 0; i < s.len(); i++) v[i] = (s[i] == "1");
    return v;
  endfunction

endpackage
